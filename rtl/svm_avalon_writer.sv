// svm_avalon_writer: the Avalon Memory-Mapped write master that carries the
// classifier's confidence values into the frame buffer in external SDRAM,
// through the HPS's FPGA-to-HPS slave bridge.
//
// Each result (in_valid, in_data, in_index) is queued in a small FIFO and
// written as one 32-bit word to base_addr + 4*in_index, so the values of a
// frame form an array of floats indexed by window number (wy*73 + wx), ready
// for software to scan against its threshold. The master holds address,
// write and writedata steady while waitrequest is high, as Avalon-MM
// requires. The classifier cannot be stalled, so a full FIFO drops the new
// result and sets the sticky overflow flag; with the default sizes a result
// arrives at most once per block, at least 16 cycles apart, so a 4-entry
// FIFO covers long waitrequest bursts.
//
// The published design names this master and its purpose; the FIFO, the
// address layout and the overflow flag are this design's own choices.
//
// Timing: a result written into an empty FIFO is on the bus the next cycle.
module svm_avalon_writer #(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned INDEX_W = 12,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DEPTH   = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ADDR_W-1:0]   base_addr,
  // result stream
  input  logic                in_valid,
  input  logic [DATA_W-1:0]   in_data,
  input  logic [INDEX_W-1:0]  in_index,
  output logic                overflow,     // sticky: a result was dropped
  // Avalon-MM master
  output logic [ADDR_W-1:0]   avm_address,
  output logic                avm_write,
  output logic [DATA_W-1:0]   avm_writedata,
  output logic [DATA_W/8-1:0] avm_byteenable,
  input  logic                avm_waitrequest
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LSB   = $clog2(DATA_W / 8);

  typedef struct packed {
    logic [DATA_W-1:0]  data;
    logic [INDEX_W-1:0] index;
  } entry_t;

  entry_t           fifo [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;
  logic             push, pop;

  assign push = in_valid && (int'(count) < int'(DEPTH));
  assign pop  = avm_write && !avm_waitrequest;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (push) wr_ptr <= (int'(wr_ptr) == int'(DEPTH) - 1) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (int'(rd_ptr) == int'(DEPTH) - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
      if (in_valid && !push) overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wr_ptr] <= '{data: in_data, index: in_index};
  end

  assign avm_write      = (count != '0);
  assign avm_writedata  = fifo[rd_ptr].data;
  assign avm_address    = base_addr + (ADDR_W'(fifo[rd_ptr].index) << LSB);
  assign avm_byteenable = '1;

  // Avalon-MM: a stalled write keeps its command stable.
  assert property (@(posedge clk) disable iff (!rst_n)
    avm_write && avm_waitrequest |=> avm_write && $stable(avm_address) && $stable(avm_writedata));

endmodule
