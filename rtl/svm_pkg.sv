// svm_pkg: number formats, geometry defaults and shared types of the SVM
// sliding-window classifier.
//
// HOG features and SVM weights are both 10-bit two's-complement fixed-point
// numbers with 8 fractional bits (Q2.8). A product of two such numbers keeps
// only 8 fractional bits, so it fits in 12 bits. Partial sums of a detection
// window are stored as 12-bit Q4.8 values beside a 7-bit block counter: one
// 19-bit RAM word per window. The frame geometry (79x59 HOG blocks for a
// 640x480 image, 7x15-block windows, 36 elements per block) and the RAM depth
// of 30 window rows follow the published design; the signedness of the
// formats, the bias format and the widths after the bias stage are this
// design's own choices.
package svm_pkg;

  // ---------------- geometry defaults (640x480 image, 8x8 cells, 2x2 cells per block)
  localparam int unsigned FRAME_BLK_W = 79;  // HOG blocks per row
  localparam int unsigned FRAME_BLK_H = 59;  // HOG block rows
  localparam int unsigned WIN_BLK_W   = 7;   // detection window width in blocks
  localparam int unsigned WIN_BLK_H   = 15;  // detection window height in blocks
  localparam int unsigned RAM_ROWS    = 30;  // window rows held in the partial-sum RAM
  localparam int unsigned BLK_ELEMS   = 36;  // HOG elements per block (4 cells x 9 bins)

  // ---------------- number formats
  localparam int unsigned FRAC_BITS = 8;
  localparam int unsigned FEAT_W    = 10;  // HOG element, signed Q2.8
  localparam int unsigned WEIGHT_W  = 10;  // SVM weight, signed Q2.8
  localparam int unsigned PROD_W    = FEAT_W + WEIGHT_W - FRAC_BITS;  // 12, signed Q4.8
  localparam int unsigned SUM_W     = PROD_W + $clog2(BLK_ELEMS);     // 18, exact sum of 36 products
  localparam int unsigned PSUM_W    = 12;  // stored partial sum, signed Q4.8
  localparam int unsigned CNT_W     = 7;   // blocks accumulated so far (0..105)
  localparam int unsigned RAM_W     = PSUM_W + CNT_W;  // 19
  localparam int unsigned BIAS_W    = PSUM_W;          // bias, signed Q4.8
  localparam int unsigned CONF_W    = PSUM_W + 1;      // confidence after bias, signed Q5.8

  // ---------------- pipeline timing, in cycles after a window is issued
  localparam int unsigned RD_DELAY = 2;  // partial-sum RAM read address is presented
  localparam int unsigned WR_DELAY = 3;  // accumulate and write back

  typedef logic signed [FEAT_W-1:0]   feat_t;
  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [PROD_W-1:0]   prod_t;
  typedef logic signed [SUM_W-1:0]    sum_t;
  typedef logic signed [PSUM_W-1:0]   psum_t;
  typedef logic signed [CONF_W-1:0]   conf_t;
  typedef logic signed [BIAS_W-1:0]   bias_t;

  typedef feat_t   [BLK_ELEMS-1:0] blk_feat_t;    // one HOG block, element 0 in the low bits
  typedef weight_t [BLK_ELEMS-1:0] blk_weight_t;  // the 36 weights that meet one block
  typedef prod_t   [BLK_ELEMS-1:0] blk_prod_t;

  // One partial-sum RAM word.
  typedef struct packed {
    psum_t            psum;
    logic [CNT_W-1:0] cnt;
  } ram_word_t;

  // Default weight of element k of the weight vector, used to fill the weight
  // ROM at power-up until a trained model is loaded. A multiplicative hash
  // gives a spread of small values in [-0.5, +0.5).
  function automatic weight_t default_weight(input int unsigned k);
    logic [31:0] h;
    h = (k + 32'd1) * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    return weight_t'($signed(h[9:0]) >>> 2);
  endfunction

endpackage
