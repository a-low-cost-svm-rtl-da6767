// tb_svm_detection_fpga: end-to-end test of svm_detection_fpga at its full default size: 79x59-block frames (640x480 pixels), 7x15-block windows, 30 RAM rows.
// Two frames of random HOG blocks go through it while the block source
// stalls at random and the SDRAM bridges answer with random waitrequest;
// meanwhile camera pixels (640x480 frames) stream into the pixel path. Before each frame the weight ROM is (re)loaded
// through the load port with a new model. An integer model computes every
// window's confidence (accumulated in block order and clamped to 12 bits
// like the hardware), and the testbench checks
//   - every conf_value (as a float), its window_position, and that it comes
//     exactly 6 cycles after the block at the window's bottom-right corner
//     was taken,
//   - the number of windows issued per block and that no cycle is idle while
//     a block is available (one cycle per window, one per block fetch),
//   - that the saturation events equal the clamps of the model,
//   - that the Avalon master writes every value once per frame to
//     conf_base + 4*(wy*NWX + wx), holding stalled writes, and never overflows,
//   - that the pixel master writes every packed pixel word, in order, to
//     pix_base + 4*n, restarting at each frame, without overflow,
// and it counts each mechanism: source stalls, RAM clear, window
// completions, completions in reused RAM rows, 105-window and 1-window
// blocks, saturation, model reload, frame restart, Avalon waitrequest stalls on both
// masters and pixel frame restarts.
module tb_svm_detection_fpga;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  localparam int FW = 79, FH = 59, WW = 7, WH = 15, ROWS = 30;
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
  logic [31:0]              conf_base = 32'h3800_0000;
  logic [31:0]              avm_address, avm_writedata;
  logic                     avm_write, avm_waitrequest, conf_overflow;
  logic [3:0]               avm_byteenable;
  logic                     pix_valid, pix_sof, pav_write, pav_waitrequest, pix_overflow;
  logic [7:0]               pix_data;
  logic [31:0]              pix_base = 32'h3000_0000;
  logic [31:0]              pav_address, pav_writedata;
  logic [3:0]               pav_byteenable;

  svm_detection_fpga dut (
    .clk, .rst_n, .blk_available, .blk_req, .blk_feature,
    .bias, .w_ld_en, .w_ld_addr, .w_ld_data,
    .conf_valid, .conf_value, .window_position, .busy_clear, .sat_event,
    .conf_base, .avm_address, .avm_write, .avm_writedata, .avm_byteenable,
    .avm_waitrequest, .conf_overflow,
    .pix_valid, .pix_sof, .pix_data, .pix_base, .pav_address, .pav_write, .pav_writedata,
    .pav_byteenable, .pav_waitrequest, .pix_overflow
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
  int n_wait = 0, n_avm = 0, n_pwait = 0, n_pframe = 0, pix_n = 0, pix_word = 0, n_pwr = 0;
  logic [31:0] pix_pack = '0;
  logic [63:0] pix_q[$];  // expected {address, data} of pixel words
  logic [31:0] sdram [];
  bit          sdram_hit [];

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
    avm_waitrequest = 0;
    pav_waitrequest = 0;
    pix_valid = 0;
    pix_sof   = 0;
    pix_data  = '0;
    sdram     = new[NWIN];
    sdram_hit = new[NWIN];

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
        avm_waitrequest = ($urandom_range(0, 2) == 0);
        pav_waitrequest = ($urandom_range(0, 2) == 0);
        pix_valid = ($urandom_range(0, 1) == 1);
        pix_sof   = pix_valid && (pix_n % (640 * 480) == 0);
        pix_data  = 8'($urandom);
        if (pix_valid) begin
          if (pix_sof) begin
            n_pframe++;
            pix_word = 0;
          end
          pix_pack[8 * (pix_n % 4) +: 8] = pix_data;
          if (pix_n % 4 == 3) begin
            pix_q.push_back({pix_base + 32'(pix_word) * 4, pix_pack});
            pix_word++;
          end
          pix_n++;
        end
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
        if (dut.u_svm.u_ctrl.issue) issued++;
        if (!busy_clear && !dut.u_svm.u_ctrl.issue && !blk_req) begin
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
        if (avm_write && avm_waitrequest) n_wait++;
        if (avm_write && !avm_waitrequest) begin
          longint off;
          off = longint'(avm_address) - longint'(conf_base);
          checks++;
          if (off < 0 || off >= 4 * NWIN || off % 4 != 0 || avm_byteenable != 4'hF) begin
            failures++;
            $display("%0t bad Avalon write address %h", $time, avm_address);
          end else begin
            check("SDRAM word written once", sdram_hit[off / 4], 0);
            sdram[off / 4]     = avm_writedata;
            sdram_hit[off / 4] = 1;
          end
          n_avm++;
        end
        if (pav_write && pav_waitrequest) n_pwait++;
        if (pav_write && !pav_waitrequest) begin
          checks++;
          if (pix_q.size() == 0 || {pav_address, pav_writedata} != pix_q[0] || pav_byteenable != 4'hF) begin
            failures++;
            if (failures < 20) $display("%0t pixel write %h %h", $time, pav_address, pav_writedata);
          end
          if (pix_q.size() > 0) void'(pix_q.pop_front());
          n_pwr++;
        end
        @(negedge clk);
        cyc++;
      end
      check("last block issued", issued, nwin);
      // drain the result master, then check the frame in SDRAM; the pixel
      // path pauses meanwhile (no pixels, its bus stalled)
      pix_valid       = 0;
      pav_waitrequest = 1;
      for (int k = 0; k < 64; k++) begin
        avm_waitrequest = ($urandom_range(0, 2) == 0);
        #1;
        if (avm_write && !avm_waitrequest) begin
          longint off;
          off = longint'(avm_address) - longint'(conf_base);
          if (off >= 0 && off < 4 * NWIN && off % 4 == 0) begin
            sdram[off / 4]     = avm_writedata;
            sdram_hit[off / 4] = 1;
          end
          n_avm++;
        end
        @(negedge clk);
        cyc++;
      end
      for (int i = 0; i < NWIN; i++) begin
        check("SDRAM word present", sdram_hit[i], 1);
        check("SDRAM value", sdram[i], q8_to_f32(exp_fix[i]));
        sdram_hit[i] = 0;
      end
      check("Avalon overflow", conf_overflow, 0);
      check("pixel FIFO overflow", pix_overflow, 0);
    end
    check("RAM clear cycles", n_clear, DEPTH);
    check("saturation events", n_sat, n_sat_model);
    $display("stall=%0d clear=%0d done=%0d reuse=%0d full_blocks=%0d single_blocks=%0d sat=%0d reload=%0d wrap=%0d avm_wait=%0d avm_writes=%0d pix_wait=%0d pix_frames=%0d pix_words=%0d",
             n_stall, n_clear, n_done, n_reuse, n_full, n_single, n_sat, n_reload, n_wrap, n_wait, n_avm, n_pwait, n_pframe, n_pwr);
    if (n_stall == 0 || n_clear == 0 || n_done == 0 || n_reuse == 0 || n_full == 0 || n_single == 0
        || n_sat == 0 || n_reload < 2 || n_wrap == 0 || n_wait == 0 || n_avm != FRAMES * NWIN || n_pwait == 0 || n_pframe < 2
        || n_pwr + 4 < pix_n / 4) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
