// svm_multiply: the MULTIPLY stage. Multiplies the 36 elements of one HOG
// block with the 36 weights read from the weight ROM for the block's
// position inside the current detection window, all in one cycle.
//
// Each product of two Q2.8 numbers is a Q4.16 number; as in the published
// design only 8 fractional bits are kept, here by an arithmetic shift right
// (truncation toward minus infinity, this design's choice), which leaves a
// 12-bit Q4.8 product with no loss of integer bits. The products are built
// from logic, with no vendor multiplier macro.
//
// Timing: one register stage; products appear one cycle after feat/weight.
module svm_multiply
  import svm_pkg::*;
(
  input  logic        clk,
  input  blk_feat_t   feat,    // HOG block, held by the controller
  input  blk_weight_t weight,  // ROM word for the block's place in the window
  output blk_prod_t   prod     // registered products, Q4.8
);

  blk_prod_t prod_d;

  always_comb begin
    for (int i = 0; i < int'(BLK_ELEMS); i++) begin
      logic signed [FEAT_W+WEIGHT_W-1:0] full;
      full      = feat[i] * weight[i];
      prod_d[i] = prod_t'(full >>> FRAC_BITS);
    end
  end

  always_ff @(posedge clk) prod <= prod_d;

endmodule
