// svm_main_ctrl: the MAIN CONTROLLER of the SVM classifier, a small FSM.
//
// HOG blocks arrive in raster order, 79 per row and 59 rows per frame. The
// controller tracks the position (bx, by) of the next block. When the
// previous block is finished and a new one is available it takes it
// (blk_req), holds its 36 elements for the MULTIPLY stage, and then issues,
// one per cycle, every detection window (wx, wy) that contains the block:
//   max(0, bx-WIN_W+1) <= wx <= min(bx, NWX-1)
//   max(0, by-WIN_H+1) <= wy <= min(by, NWY-1)
// row by row, so a block issues between 1 and WIN_W*WIN_H (105) windows and
// takes that many cycles. For each window it drives
//   rom_addr  = (by-wy)*WIN_W + (bx-wx)            block place in the window
//   RAM addr  = (wy mod RAM_ROWS)*NWX + wx          partial-sum location
// A window row uses RAM row wy mod RAM_ROWS; as a window row is finished
// before the one RAM_ROWS rows below it starts (RAM_ROWS >= WIN_H), the
// 30x73-word RAM serves all 45x73 windows. The row slot is kept as a
// wrapping counter rather than computed by a modulo.
//
// A delay line carries each issued window down the datapath: the RAM read
// address leaves RD_DELAY cycles after issue, so that the read data meets the
// block sum from ADD, and the write-back (ram_we, ram_waddr, window position)
// comes WR_DELAY cycles after issue. The one-cycle FETCH state between two
// blocks lets the last write of one block land before the next block can
// read the same window.
//
// After reset the controller spends DEPTH cycles in CLEAR writing zero to
// every RAM word (the published design relies on zeroed words; how they are
// zeroed at power-up is this design's choice). blk_req is high for exactly
// one cycle per block taken: blk_feature must be valid whenever
// blk_available is high, and the block is consumed in the cycle blk_req is
// high (a show-ahead FIFO read). This handshake, the row-major window order
// and the raster restart after the last block of a frame are this design's
// choices; the block-position bookkeeping, the address generation and the
// reuse of RAM rows follow the published design.
module svm_main_ctrl
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
  parameter int unsigned DEPTH   = ROWS * NWX,
  parameter int unsigned WORDS   = WIN_W * WIN_H,
  parameter int unsigned WX_W    = (NWX > 1) ? $clog2(NWX) : 1,
  parameter int unsigned WY_W    = (NWY > 1) ? $clog2(NWY) : 1,
  parameter int unsigned POS_W   = WX_W + WY_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // HOG extractor side
  input  logic                     blk_available,
  output logic                     blk_req,
  input  blk_feat_t                blk_feature,
  // datapath side
  output blk_feat_t                feat_q,      // block held for MULTIPLY
  output logic [$clog2(WORDS)-1:0] rom_addr,    // issue stage
  output logic                     issue,       // a window is issued this cycle
  output logic [$clog2(DEPTH)-1:0] ram_raddr,   // issue + RD_DELAY
  output logic                     ram_we,      // issue + WR_DELAY, or clearing
  output logic [$clog2(DEPTH)-1:0] ram_waddr,
  output logic                     wr_valid,    // write-back of an issued window
  output logic                     clearing,    // RAM clear after reset
  output logic [POS_W-1:0]         window_position  // {wy, wx} of the write-back
);

  localparam int unsigned BX_W = (FRAME_W > 1) ? $clog2(FRAME_W) : 1;
  localparam int unsigned BY_W = (FRAME_H > 1) ? $clog2(FRAME_H) : 1;
  localparam int unsigned SL_W = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned AD_W = $clog2(DEPTH);

  typedef enum logic [1:0] {S_CLEAR, S_FETCH, S_ISSUE} state_t;

  state_t          state;
  logic [AD_W-1:0] clr_addr;
  logic [BX_W-1:0] bx;
  logic [BY_W-1:0] by;
  logic [WY_W-1:0] wy_top;       // first window row containing block row by
  logic [SL_W-1:0] slot_top;     // its RAM row
  logic [WX_W-1:0] wx, wx_lo, wx_hi;
  logic [WY_W-1:0] wy, wy_hi;
  logic [SL_W-1:0] slot;

  // window range of the current block
  always_comb begin
    wx_lo = (int'(bx) >= int'(WIN_W) - 1) ? WX_W'(int'(bx) - int'(WIN_W) + 1) : '0;
    wx_hi = (int'(bx) < int'(NWX)) ? WX_W'(bx) : WX_W'(NWX - 1);
    wy_hi = (int'(by) < int'(NWY)) ? WY_W'(by) : WY_W'(NWY - 1);
  end

  assign blk_req  = (state == S_FETCH) && blk_available;
  assign issue    = (state == S_ISSUE);
  assign clearing = (state == S_CLEAR);
  assign rom_addr = $clog2(WORDS)'((int'(by) - int'(wy)) * int'(WIN_W) + (int'(bx) - int'(wx)));

  logic [AD_W-1:0] iss_addr;
  assign iss_addr = AD_W'(int'(slot) * int'(NWX) + int'(wx));

  wire last_x = (wx == wx_hi);
  wire last_y = (wy == wy_hi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_CLEAR;
      clr_addr <= '0;
      bx       <= '0;
      by       <= '0;
      wy_top   <= '0;
      slot_top <= '0;
      wx       <= '0;
      wy       <= '0;
      slot     <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (int'(clr_addr) == int'(DEPTH) - 1) state <= S_FETCH;
        end
        S_FETCH: begin
          if (blk_available) begin
            wx    <= wx_lo;
            wy    <= wy_top;
            slot  <= slot_top;
            state <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          if (!last_x) begin
            wx <= wx + 1'b1;
          end else begin
            wx <= wx_lo;
            if (!last_y) begin
              wy   <= wy + 1'b1;
              slot <= (int'(slot) == int'(ROWS) - 1) ? '0 : slot + 1'b1;
            end else begin
              // block finished: advance to the next block position
              state <= S_FETCH;
              if (int'(bx) == int'(FRAME_W) - 1) begin
                bx <= '0;
                if (int'(by) == int'(FRAME_H) - 1) begin
                  by       <= '0;
                  wy_top   <= '0;
                  slot_top <= '0;
                end else begin
                  by <= by + 1'b1;
                  if (int'(by) >= int'(WIN_H) - 1) begin
                    wy_top   <= wy_top + 1'b1;
                    slot_top <= (int'(slot_top) == int'(ROWS) - 1) ? '0 : slot_top + 1'b1;
                  end
                end
              end else begin
                bx <= bx + 1'b1;
              end
            end
          end
        end
        default: state <= S_CLEAR;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (blk_req) feat_q <= blk_feature;
  end

  // ---------------- delay line from issue to read and write-back
  logic [AD_W-1:0]  addr_d  [1:WR_DELAY];
  logic [POS_W-1:0] pos_d   [1:WR_DELAY];
  logic             valid_d [1:WR_DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= int'(WR_DELAY); i++) valid_d[i] <= 1'b0;
    end else begin
      valid_d[1] <= issue;
      for (int i = 2; i <= int'(WR_DELAY); i++) valid_d[i] <= valid_d[i-1];
    end
  end

  always_ff @(posedge clk) begin
    addr_d[1] <= iss_addr;
    pos_d[1]  <= {wy, wx};
    for (int i = 2; i <= int'(WR_DELAY); i++) begin
      addr_d[i] <= addr_d[i-1];
      pos_d[i]  <= pos_d[i-1];
    end
  end

  assign ram_raddr       = addr_d[RD_DELAY];
  assign wr_valid        = valid_d[WR_DELAY];
  assign ram_we          = wr_valid || clearing;
  assign ram_waddr       = clearing ? clr_addr : addr_d[WR_DELAY];
  assign window_position = pos_d[WR_DELAY];

  // The RAM must hold every window row that a block row can touch.
  initial assert (ROWS >= WIN_H && FRAME_W >= WIN_W && FRAME_H >= WIN_H)
    else $error("svm_main_ctrl: geometry parameters out of range");
  // Two blocks are at least two cycles apart so write-back precedes the next read.
  initial assert (WR_DELAY - RD_DELAY == 1)
    else $error("svm_main_ctrl: FETCH spacing assumes a one-cycle read-to-write gap");
  assert property (@(posedge clk) disable iff (!rst_n) blk_req |-> state == S_FETCH);

endmodule
