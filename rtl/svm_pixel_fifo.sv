// svm_pixel_fifo: the PIXEL FIFO of the detection system. It decouples the
// image sensor, which delivers one pixel per valid cycle and cannot wait,
// from the Avalon master that stores the pixels in SDRAM and may be stalled
// by the bus.
//
// A plain synchronous FIFO of DEPTH entries of DATA_W bits with a show-ahead
// read side: rd_data is the oldest entry whenever rd_valid is high, and
// rd_ready consumes it. A pixel that arrives when the FIFO is full is dropped
// and sets the sticky overflow flag. The start-of-frame marker of each pixel
// is stored beside it. The published design only names this FIFO; its depth,
// the 8-bit pixel and the overflow rule are this design's choices.
//
// Timing: a pixel written into an empty FIFO is readable the next cycle.
module svm_pixel_fifo #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  logic              wr_sof,     // first pixel of a frame
  input  logic [DATA_W-1:0] wr_data,
  output logic              rd_valid,
  output logic              rd_sof,
  output logic [DATA_W-1:0] rd_data,
  input  logic              rd_ready,
  output logic              overflow    // sticky: a pixel was dropped
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W:0]  mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;
  logic             push, pop;

  assign push = wr_valid && (int'(count) < int'(DEPTH));
  assign pop  = rd_valid && rd_ready;

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
      if (wr_valid && !push) overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= {wr_sof, wr_data};
  end

  assign rd_valid = (count != '0);
  assign {rd_sof, rd_data} = mem[rd_ptr];

endmodule
