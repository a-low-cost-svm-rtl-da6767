// svm_acc: the ACC stage with the write-back multiplexer in front of the
// partial-sum RAM.
//
// For the window being processed it adds the block sum from the ADD stage to
// the partial sum read from the RAM and increments the 7-bit block counter
// stored beside it. When the counter reaches WIN_BLOCKS (105 blocks for a
// 7x15 window) the window's sum is complete: win_done rises, the finished sum
// leaves on acc_sum towards the bias stage, and the RAM word is written back
// as zero so that the location can serve a later window. Otherwise the new
// sum and count are written back. The same zero word is written while the
// controller clears the RAM after reset.
//
// The accumulation saturates at the limits of the 12-bit Q4.8 partial-sum
// format; the published design gives the width but not the overflow rule, so
// saturation is this design's choice.
//
// Timing: purely combinational; it sits between the RAM read data and the
// RAM write port in the same cycle.
module svm_acc
  import svm_pkg::*;
#(
  parameter int unsigned WIN_BLOCKS = WIN_BLK_W * WIN_BLK_H
) (
  input  sum_t      blk_sum,      // block contribution from svm_add
  input  ram_word_t ram_rd,       // stored partial sum and count
  input  logic      clear,        // RAM clear in progress: write zero
  output ram_word_t ram_wr,       // word to write back
  output psum_t     acc_sum,      // updated partial sum
  output logic      win_done,     // this block completes the window
  output logic      sat           // the partial sum saturated
);

  localparam logic signed [SUM_W:0] PMAX = (SUM_W+1)'(2 ** (PSUM_W - 1) - 1);
  localparam logic signed [SUM_W:0] PMIN = -(SUM_W+1)'(2 ** (PSUM_W - 1));

  logic signed [SUM_W:0] wide;
  logic [CNT_W-1:0]      cnt_next;

  always_comb begin
    wide = (SUM_W+1)'(blk_sum) + (SUM_W+1)'(ram_rd.psum);
    sat  = 1'b0;
    if (wide > PMAX) begin
      acc_sum = psum_t'(PMAX);
      sat     = 1'b1;
    end else if (wide < PMIN) begin
      acc_sum = psum_t'(PMIN);
      sat     = 1'b1;
    end else begin
      acc_sum = psum_t'(wide);
    end
    cnt_next = ram_rd.cnt + 1'b1;
    win_done = (cnt_next == CNT_W'(WIN_BLOCKS));
    if (win_done || clear) ram_wr = '0;
    else                   ram_wr = '{psum: acc_sum, cnt: cnt_next};
  end

endmodule
