// svm_classifier: a linear SVM sliding-window classifier for HOG-based
// pedestrian detection. It computes the confidence y = w.x + b of every
// 7x15-block detection window of a 79x59-block HOG frame (a 640x480 image),
// 73x45 = 3285 windows, while the HOG blocks are still being produced.
//
// Each incoming block is used once, at once, for every window that contains
// it (up to 105): per window, MULTIPLY forms the 36 products of the block with
// the weights for the block's place in that window, ADD sums them, and ACC
// adds the sum to the window's partial sum in the partial-sum RAM. A 7-bit
// counter beside each partial sum tells when all 105 blocks are in; the
// finished sum then goes through BIAS and FIX2FLOAT and leaves as a 32-bit
// float with conf_valid and the window position, and its RAM word is zeroed
// for reuse. Only 30 rows of 73 windows are held at once.
//
// Pipeline, in cycles after the controller issues a window:
//   0  ROM read address;  1  ROM data, MULTIPLY;  2  ADD, RAM read address;
//   3  RAM data, ACC, write-back;  4  BIAS;  5  conf_value, conf_valid.
// One window is issued per cycle; a block occupies (windows it belongs to)
// + 1 cycles. window_position is {wy[5:0], wx[6:0]} at the defaults.
//
// The block structure follows the published design; the pipeline placement,
// the number formats beyond those it gives and the HOG handshake are this
// design's own (see svm_pkg and svm_main_ctrl).
module svm_classifier
  import svm_pkg::*;
#(
  parameter int unsigned FRAME_W   = FRAME_BLK_W,
  parameter int unsigned FRAME_H   = FRAME_BLK_H,
  parameter int unsigned WIN_W     = WIN_BLK_W,
  parameter int unsigned WIN_H     = WIN_BLK_H,
  parameter int unsigned ROWS      = RAM_ROWS,
  parameter string       INIT_FILE = "",
  // derived, not meant to be overridden
  parameter int unsigned NWX       = FRAME_W - WIN_W + 1,
  parameter int unsigned NWY       = FRAME_H - WIN_H + 1,
  parameter int unsigned WORDS     = WIN_W * WIN_H,
  parameter int unsigned POS_W     = ((NWX > 1) ? $clog2(NWX) : 1) + ((NWY > 1) ? $clog2(NWY) : 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // HOG extractor side
  input  logic                     blk_available,
  output logic                     blk_req,
  input  blk_feat_t                blk_feature,
  // model
  input  bias_t                    bias,
  input  logic                     w_ld_en,
  input  logic [$clog2(WORDS)-1:0] w_ld_addr,
  input  blk_weight_t              w_ld_data,
  // results
  output logic                     conf_valid,
  output logic [31:0]              conf_value,
  output logic [POS_W-1:0]         window_position,
  output logic                     busy_clear,    // RAM clear after reset in progress
  output logic                     sat_event      // a partial sum saturated (write-back cycle)
);

  localparam int unsigned DEPTH = ROWS * NWX;

  blk_feat_t                feat_q;
  blk_weight_t              rom_data;
  blk_prod_t                prod;
  sum_t                     blk_sum;
  ram_word_t                ram_rd, ram_wr;
  psum_t                    acc_sum;
  logic                     win_done, sat, ram_we, wr_valid, clearing;
  logic [$clog2(WORDS)-1:0] rom_addr;
  logic [$clog2(DEPTH)-1:0] ram_raddr, ram_waddr;
  logic [POS_W-1:0]         wr_pos, bias_pos;
  logic                     bias_valid;
  conf_t                    bias_conf;

  svm_main_ctrl #(
    .FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .WIN_W(WIN_W), .WIN_H(WIN_H), .ROWS(ROWS)
  ) u_ctrl (
    .clk, .rst_n, .blk_available, .blk_req, .blk_feature,
    .feat_q, .rom_addr, .issue(), .ram_raddr, .ram_we, .ram_waddr, .wr_valid,
    .clearing, .window_position(wr_pos)
  );

  svm_weight_rom #(.WORDS(WORDS), .INIT_FILE(INIT_FILE)) u_rom (
    .clk, .rd_addr(rom_addr), .rd_data(rom_data),
    .ld_en(w_ld_en), .ld_addr(w_ld_addr), .ld_data(w_ld_data)
  );

  svm_multiply u_mul (.clk, .feat(feat_q), .weight(rom_data), .prod);

  svm_add u_add (.clk, .prod, .sum(blk_sum));

  svm_psum_ram #(.DEPTH(DEPTH)) u_ram (
    .clk, .rd_addr(ram_raddr), .rd_data(ram_rd),
    .we(ram_we), .wr_addr(ram_waddr), .wr_data(ram_wr)
  );

  svm_acc #(.WIN_BLOCKS(WORDS)) u_acc (
    .blk_sum, .ram_rd, .clear(clearing), .ram_wr, .acc_sum, .win_done, .sat
  );

  svm_bias #(.POS_W(POS_W)) u_bias (
    .clk, .rst_n,
    .in_valid(wr_valid && win_done), .in_sum(acc_sum), .in_pos(wr_pos), .bias,
    .out_valid(bias_valid), .out_conf(bias_conf), .out_pos(bias_pos)
  );

  svm_fix2float #(.IN_W(CONF_W), .FRAC(FRAC_BITS), .POS_W(POS_W)) u_f2f (
    .clk, .rst_n,
    .in_valid(bias_valid), .in_fix(bias_conf), .in_pos(bias_pos),
    .out_valid(conf_valid), .out_float(conf_value), .out_pos(window_position)
  );

  assign busy_clear = clearing;
  assign sat_event  = wr_valid && sat;

endmodule
