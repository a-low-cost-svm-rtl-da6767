// svm_detection_fpga: the FPGA side of a HOG pedestrian detector around its
// SVM classifier: the sliding-window SVM classifier with the Avalon-MM master
// that stores its confidence values in the SDRAM frame buffer shared with the
// HPS, and beside it the camera path that stores the image itself (pixel
// FIFO and pixel Avalon master). The HOG extractor, the camera and the HPS
// bridges are outside this module; their signals are its ports.
//
// Interface: HOG blocks enter through blk_available / blk_req / blk_feature
// (one block taken per blk_req cycle, see svm_main_ctrl). The model is
// given by bias and loaded through the weight port (w_ld_*). Each finished
// window leaves as a float on conf_value with conf_valid and window_position,
// and is also written to conf_base + 4*(wy*NWX + wx) over avm_*. Camera
// pixels (8 bits, pix_sof on the first pixel of a frame) are packed four to
// a word and written to pix_base + 4*n over pav_*.
//
// The arrangement follows the published system diagram; the address layout
// of the result array is this design's own.
module svm_detection_fpga
  import svm_pkg::*;
#(
  parameter int unsigned FRAME_W = FRAME_BLK_W,
  parameter int unsigned FRAME_H = FRAME_BLK_H,
  parameter int unsigned WIN_W   = WIN_BLK_W,
  parameter int unsigned WIN_H   = WIN_BLK_H,
  parameter int unsigned ROWS    = RAM_ROWS,
  // derived, not meant to be overridden
  parameter int unsigned NWX     = FRAME_W - WIN_W + 1,
  parameter int unsigned NWY     = FRAME_H - WIN_H + 1,
  parameter int unsigned WORDS   = WIN_W * WIN_H,
  parameter int unsigned WX_W    = (NWX > 1) ? $clog2(NWX) : 1,
  parameter int unsigned WY_W    = (NWY > 1) ? $clog2(NWY) : 1,
  parameter int unsigned IDX_W   = (NWX * NWY > 1) ? $clog2(NWX * NWY) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // HOG extractor
  input  logic                     blk_available,
  output logic                     blk_req,
  input  blk_feat_t                blk_feature,
  // model
  input  bias_t                    bias,
  input  logic                     w_ld_en,
  input  logic [$clog2(WORDS)-1:0] w_ld_addr,
  input  blk_weight_t              w_ld_data,
  // results as a stream
  output logic                     conf_valid,
  output logic [31:0]              conf_value,
  output logic [WY_W+WX_W-1:0]     window_position,
  output logic                     busy_clear,
  output logic                     sat_event,
  // results to the SDRAM frame buffer (FPGA-to-HPS bridge)
  input  logic [31:0]              conf_base,
  output logic [31:0]              avm_address,
  output logic                     avm_write,
  output logic [31:0]              avm_writedata,
  output logic [3:0]               avm_byteenable,
  input  logic                     avm_waitrequest,
  output logic                     conf_overflow,
  // camera pixels to the SDRAM frame buffer (second FPGA-to-HPS bridge)
  input  logic                     pix_valid,
  input  logic                     pix_sof,
  input  logic [7:0]               pix_data,
  input  logic [31:0]              pix_base,
  output logic [31:0]              pav_address,
  output logic                     pav_write,
  output logic [31:0]              pav_writedata,
  output logic [3:0]               pav_byteenable,
  input  logic                     pav_waitrequest,
  output logic                     pix_overflow
);

  logic [IDX_W-1:0] win_index;

  svm_classifier #(
    .FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .WIN_W(WIN_W), .WIN_H(WIN_H), .ROWS(ROWS)
  ) u_svm (
    .clk, .rst_n, .blk_available, .blk_req, .blk_feature,
    .bias, .w_ld_en, .w_ld_addr, .w_ld_data,
    .conf_valid, .conf_value, .window_position, .busy_clear, .sat_event
  );

  assign win_index = IDX_W'(int'(window_position[WX_W +: WY_W]) * int'(NWX)
                          + int'(window_position[WX_W-1:0]));

  svm_avalon_writer #(.DATA_W(32), .INDEX_W(IDX_W), .ADDR_W(32), .DEPTH(4)) u_conf_wr (
    .clk, .rst_n, .base_addr(conf_base),
    .in_valid(conf_valid), .in_data(conf_value), .in_index(win_index),
    .overflow(conf_overflow),
    .avm_address, .avm_write, .avm_writedata, .avm_byteenable, .avm_waitrequest
  );

  // ---------------- camera path
  logic       fifo_valid, fifo_sof, fifo_ready;
  logic [7:0] fifo_data;

  svm_pixel_fifo #(.DATA_W(8), .DEPTH(16)) u_pix_fifo (
    .clk, .rst_n, .wr_valid(pix_valid), .wr_sof(pix_sof), .wr_data(pix_data),
    .rd_valid(fifo_valid), .rd_sof(fifo_sof), .rd_data(fifo_data), .rd_ready(fifo_ready),
    .overflow(pix_overflow)
  );

  svm_pixel_writer #(.ADDR_W(32)) u_pix_wr (
    .clk, .rst_n, .base_addr(pix_base),
    .pix_valid(fifo_valid), .pix_sof(fifo_sof), .pix_data(fifo_data), .pix_ready(fifo_ready),
    .avm_address(pav_address), .avm_write(pav_write), .avm_writedata(pav_writedata),
    .avm_byteenable(pav_byteenable), .avm_waitrequest(pav_waitrequest)
  );

endmodule
