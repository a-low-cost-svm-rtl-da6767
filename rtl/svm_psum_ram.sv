// svm_psum_ram: the partial-sum RAM. One word per detection window that is
// in progress: a 12-bit partial sum and a 7-bit count of the blocks already
// added (svm_pkg::ram_word_t). The default depth is 30 window rows of 73
// windows, 2190 words of 19 bits. The two RAM boxes drawn for reading and
// writing are one simple dual-port memory: the read port feeds the
// accumulator, the write port takes its result. The size, word layout and
// single physical memory follow the published design; the read latency and
// read-during-write behaviour are this design's choices.
//
// Timing: synchronous read, data one cycle after rd_addr. A read and a write
// to the same address in the same cycle return the old word; the controller
// spaces its accesses so that this never matters.
module svm_psum_ram
  import svm_pkg::*;
#(
  parameter int unsigned DEPTH = RAM_ROWS * (FRAME_BLK_W - WIN_BLK_W + 1)
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output ram_word_t                rd_data,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  ram_word_t                wr_data
);

  ram_word_t mem [DEPTH];

  initial assert ($bits(ram_word_t) == RAM_W)
    else $error("svm_psum_ram: word layout does not match RAM_W");

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
