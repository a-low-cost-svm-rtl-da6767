// tb_svm_classifier: end-to-end test of svm_classifier on a 14x40-block frame (7x15-block windows, 15 RAM rows, so RAM rows are reused).
// Two frames of random HOG blocks go through it while the block source
// stalls at random. Before each frame the weight ROM is (re)loaded
// through the load port with a new model. An integer model computes every
// window's confidence (accumulated in block order and clamped to 12 bits
// like the hardware), and the testbench checks
//   - every conf_value (as a float), its window_position, and that it comes
//     exactly 6 cycles after the block at the window's bottom-right corner
//     was taken,
//   - the number of windows issued per block and that no cycle is idle while
//     a block is available (one cycle per window, one per block fetch),
//   - that the saturation events equal the clamps of the model,
// and it counts each mechanism: source stalls, RAM clear, window
// completions, completions in reused RAM rows, 105-window and 1-window
// blocks, saturation, model reload, frame restart.
module tb_svm_classifier;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  localparam int FW = 14, FH = 40, WW = 7, WH = 15, ROWS = 15;
  localparam int NWX = FW - WW + 1, NWY = FH - WH + 1, NWIN = NWX * NWY;
  localparam int NBLK = FW * FH, WORDS = WW * WH, DEPTH = ROWS * NWX;
  localparam int WX_W = (NWX > 1) ? $clog2(NWX) : 1, WY_W = (NWY > 1) ? $clog2(NWY) : 1;
  localparam int FRAMES = 2;
  localparam int LATENCY = 6;  // block taken -> conf_valid of the window it completes
  localparam longint MAX_CYCLES = longint'(FRAMES) * (NWIN * WORDS + NBLK) * 2 + 20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     blk_available, blk_req;
  blk_feat_t                blk_feature;
  psum_t                    bias;
  logic                     w_ld_en;
  logic [$clog2(WORDS)-1:0] w_ld_addr;
  blk_weight_t              w_ld_data;
  logic                     conf_valid, busy_clear, sat_event;
  logic [31:0]              conf_value;
  logic [WY_W+WX_W-1:0]     window_position;

  svm_classifier #(.FRAME_W(FW), .FRAME_H(FH), .WIN_W(WW), .WIN_H(WH), .ROWS(ROWS)) dut (
    .clk, .rst_n, .blk_available, .blk_req, .blk_feature,
    .bias, .w_ld_en, .w_ld_addr, .w_ld_data,
    .conf_valid, .conf_value, .window_position, .busy_clear, .sat_event
  );

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d exp %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int feat[];
  int wt[];
  int exp_fix[];
  int n_sat_model = 0;
  // mechanism counters
  int n_stall = 0, n_clear = 0, n_done = 0, n_reuse = 0, n_full = 0, n_single = 0;
  int n_sat = 0, n_reload = 0, n_wrap = 0;

  initial begin
    longint cyc = 0;
    int blk, issued, nwin, seen;
    int exp_done[longint];
    bit got_win[];
    blk_available = 0;
    blk_feature   = '0;
    bias          = '0;
    w_ld_en       = 0;
    w_ld_addr     = '0;
    w_ld_data     = '0;

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      int fmax, wlo, whi, b;
      // ---- model of this frame: small HOG values first, then large ones
      fmax = (f == 0) ? 51 : 255;
      wlo  = (f == 0) ? -64 : 0;
      whi  = (f == 0) ? 63 : 127;
      b    = int'($urandom_range(0, 1023)) - 512;
      feat = new[NBLK * 36];
      wt   = new[WORDS * 36];
      foreach (feat[i]) feat[i] = int'($urandom_range(0, fmax));
      foreach (wt[i]) wt[i] = wlo + int'($urandom_range(0, whi - wlo));
      frame_expect(FW, FH, WW, WH, feat, wt, b, exp_fix, n_sat_model);
      got_win = new[NWIN];
      // ---- load the model (the source is idle)
      for (int r = 0; r < WORDS; r++) begin
        w_ld_en   = 1;
        w_ld_addr = $clog2(WORDS)'(r);
        for (int e = 0; e < 36; e++) w_ld_data[e] = weight_t'(wt[r * 36 + e]);
        #1;
        if (busy_clear) n_clear++;
        @(negedge clk);
        cyc++;
      end
      w_ld_en = 0;
      bias    = psum_t'(b);
      n_reload++;
      if (f > 0) n_wrap++;
      // ---- stream the frame
      blk = 0;
      issued = 0;
      nwin = 0;
      seen = 0;
      while (seen < NWIN) begin
        blk_available = (blk < NBLK) && ($urandom_range(0, 4) != 0);
        if (blk < NBLK)
          for (int e = 0; e < 36; e++) blk_feature[e] = feat_t'(feat[blk * 36 + e]);

        #1;
        if (busy_clear) n_clear++;
        if (blk_req) begin
          int bx, by;
          bx = blk % FW;
          by = blk / FW;
          if (blk > 0) check("windows issued for previous block", issued, nwin);
          nwin = (((bx < NWX) ? bx : NWX - 1) - ((bx >= WW - 1) ? bx - WW + 1 : 0) + 1)
               * (((by < NWY) ? by : NWY - 1) - ((by >= WH - 1) ? by - WH + 1 : 0) + 1);
          if (nwin == WORDS) n_full++;
          if (nwin == 1) n_single++;
          issued = 0;
          if (bx >= WW - 1 && by >= WH - 1)
            exp_done[cyc + LATENCY] = (by - WH + 1) * NWX + (bx - WW + 1);
          blk++;
        end
        if (dut.u_ctrl.issue) issued++;
        if (!busy_clear && !dut.u_ctrl.issue && !blk_req) begin
          if (blk_available) begin
            failures++;
            $display("%0t idle cycle with a block available", $time);
          end else if (blk < NBLK) n_stall++;
        end
        if (sat_event) n_sat++;
        checks++;
        if (conf_valid != exp_done.exists(cyc)) begin
          failures++;
          if (failures < 20) $display("%0t conf_valid %0d unexpected", $time, conf_valid);
        end
        if (conf_valid) begin
          int wi, wx, wy;
          wx = int'(window_position[WX_W-1:0]);
          wy = int'(window_position[WX_W +: WY_W]);
          wi = wy * NWX + wx;
          if (exp_done.exists(cyc)) check("window index", wi, exp_done[cyc]);
          if (wi < NWIN) begin
            check("conf_value", conf_value, q8_to_f32(exp_fix[wi]));
            check("window reported once", got_win[wi], 0);
            got_win[wi] = 1;
            if (wy >= ROWS) n_reuse++;
          end
          n_done++;
          seen++;
        end
        if (exp_done.exists(cyc)) exp_done.delete(cyc);

        @(negedge clk);
        cyc++;
      end
      check("last block issued", issued, nwin);

    end
    check("RAM clear cycles", n_clear, DEPTH);
    check("saturation events", n_sat, n_sat_model);
    $display("stall=%0d clear=%0d done=%0d reuse=%0d full_blocks=%0d single_blocks=%0d sat=%0d reload=%0d wrap=%0d",
             n_stall, n_clear, n_done, n_reuse, n_full, n_single, n_sat, n_reload, n_wrap);
    if (n_stall == 0 || n_clear == 0 || n_done == 0 || n_reuse == 0 || n_full == 0 || n_single == 0
        || n_sat == 0 || n_reload < 2 || n_wrap == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
