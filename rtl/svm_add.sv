// svm_add: the ADD stage. Sums the 36 products of one block into the block's
// contribution to one detection window.
//
// The sum is kept exact: 36 twelve-bit products need 18 bits. Narrowing to
// the 12-bit partial-sum format happens only when the value is accumulated
// into the partial-sum RAM (svm_acc). The adder is written as a loop and
// left to synthesis to build as a tree. The stage itself follows the
// published design; its output width and register are this design's choice.
//
// Timing: one register stage; the sum appears one cycle after prod.
module svm_add
  import svm_pkg::*;
(
  input  logic      clk,
  input  blk_prod_t prod,
  output sum_t      sum    // registered sum of the 36 products, Q10.8
);

  sum_t sum_d;

  always_comb begin
    sum_d = '0;
    for (int i = 0; i < int'(BLK_ELEMS); i++) sum_d += sum_t'(prod[i]);
  end

  always_ff @(posedge clk) sum <= sum_d;

endmodule
