// tb_svm_main_ctrl: runs the controller on a small geometry (12x20 blocks,
// 3x5-block windows, 6 RAM rows, so RAM rows are reused) for two frames with
// a randomly stalling block source. A model of the sliding window predicts,
// for every block, the list of windows it belongs to; the testbench checks
//   - the RAM clear after reset (every address once),
//   - the ROM address of every issued window and the held block,
//   - the RAM read address RD_DELAY and write-back WR_DELAY cycles later,
//   - the number of windows issued per block (= cycles per block),
//   - that no cycle is idle while a block is available,
//   - that no RAM word is shared by two live windows, and that no read
//     overtakes a pending write to the same word.
module tb_svm_main_ctrl;
  import svm_pkg::*;

  localparam int FW = 12, FH = 20, WW = 3, WH = 5, ROWS = 6;
  localparam int NWX = FW - WW + 1, NWY = FH - WH + 1, DEPTH = ROWS * NWX, WORDS = WW * WH;
  localparam int FRAMES = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             blk_available, blk_req, issue, ram_we, wr_valid, clearing;
  blk_feat_t        blk_feature, feat_q;
  logic [3:0]       rom_addr;
  logic [5:0]       ram_raddr, ram_waddr;
  logic [7:0]       window_position;  // {wy[3:0], wx[3:0]}

  svm_main_ctrl #(.FRAME_W(FW), .FRAME_H(FH), .WIN_W(WW), .WIN_H(WH), .ROWS(ROWS)) dut (
    .clk, .rst_n, .blk_available, .blk_req, .blk_feature, .feat_q, .rom_addr, .issue,
    .ram_raddr, .ram_we, .ram_waddr, .wr_valid, .clearing, .window_position
  );

  int checks = 0, failures = 0;
  int n_stall = 0, n_reuse = 0, n_full = 0, n_single = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d exp %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0, clr_next = 0, blk = 0, cur = -1, issued = 0;
    int q_rom[$], q_addr[$], q_pos[$];
    int exp_r[int], exp_wa[int], exp_wp[int];
    int owner[int];       // RAM address -> window index + 1 of the live window using it
    int wcount[int];      // window index -> blocks issued so far
    int sched_w[int];     // RAM address -> cycle of its latest scheduled write
    blk_feat_t cur_feat;
    int total = FRAMES * FW * FH;

    blk_available = 0;
    blk_feature   = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    forever begin
      // drive the block source: block blk is offered with probability 3/4
      blk_available = (blk < total) && ($urandom_range(0, 3) != 0);
      for (int e = 0; e < 36; e++) blk_feature[e] = feat_t'(blk * 7 + e * 13);
      #1;
      cyc++;
      if (clearing) begin
        check("clear we", int'(ram_we), 1);
        check("clear addr", int'(ram_waddr), clr_next);
        clr_next++;
      end
      if (blk_req) begin
        int bx, by, n;
        bx = (blk % (FW * FH)) % FW;
        by = (blk % (FW * FH)) / FW;
        n  = 0;
        if (cur >= 0) check("windows per block", issued, 0);
        for (int wy = 0; wy < NWY; wy++)
          for (int wx = 0; wx < NWX; wx++)
            if (bx >= wx && bx < wx + WW && by >= wy && by < wy + WH) begin
              q_rom.push_back((by - wy) * WW + (bx - wx));
              q_addr.push_back((wy % ROWS) * NWX + wx);
              q_pos.push_back(wy * 16 + wx);
              n++;
            end
        if (n == WORDS) n_full++;
        if (n == 1) n_single++;
        issued = n;
        cur_feat = blk_feature;
        cur = blk;
        blk++;
      end
      if (issue) begin
        int a, p, wi;
        check("issue expected", int'(q_rom.size() > 0), 1);
        if (q_rom.size() > 0) begin
          check("rom_addr", int'(rom_addr), q_rom.pop_front());
          a = q_addr.pop_front();
          p = q_pos.pop_front();
          issued--;
          checks++;
          if (feat_q != cur_feat) failures++;
          exp_r[cyc + RD_DELAY] = a;
          exp_wa[cyc + WR_DELAY] = a;
          exp_wp[cyc + WR_DELAY] = p;
          // RAM word ownership
          wi = (p / 16) * NWX + (p % 16);
          if (owner.exists(a) && owner[a] != wi + 1) begin
            failures++;
            $display("RAM word %0d shared by live windows", a);
          end
          if (!owner.exists(a) && wcount.exists(wi) == 0 && (p / 16) >= ROWS) n_reuse++;
          owner[a] = wi + 1;
          wcount[wi] = wcount.exists(wi) ? wcount[wi] + 1 : 1;
          if (wcount[wi] == WORDS) begin
            owner.delete(a);
            wcount.delete(wi);
          end
          // read must come after the previous write to the word
          checks++;
          if (sched_w.exists(a) && sched_w[a] >= cyc + RD_DELAY) begin
            failures++;
            $display("read of word %0d overtakes a pending write", a);
          end
          sched_w[a] = cyc + WR_DELAY;
        end
      end
      if (exp_r.exists(cyc)) check("ram_raddr", int'(ram_raddr), exp_r[cyc]);
      if (!clearing) begin
        check("wr_valid", int'(wr_valid), int'(exp_wa.exists(cyc)));
        check("ram_we", int'(ram_we), int'(exp_wa.exists(cyc)));
      end
      if (exp_wa.exists(cyc)) begin
        check("ram_waddr", int'(ram_waddr), exp_wa[cyc]);
        check("window_position", int'(window_position), exp_wp[cyc]);
      end
      if (!clearing && !issue && !blk_req) begin
        if (blk_available) begin
          failures++;
          $display("%0t idle cycle with a block available", $time);
        end else if (blk < total) n_stall++;
      end
      if (blk >= total && q_rom.size() == 0 && !exp_wa.exists(cyc + 1) && !exp_wa.exists(cyc + 2)
          && !exp_wa.exists(cyc)) break;
      @(negedge clk);
    end
    check("clear length", clr_next, DEPTH);
    check("blocks taken", blk, total);
    $display("stall cycles=%0d row reuses=%0d full blocks=%0d single blocks=%0d",
             n_stall, n_reuse, n_full, n_single);
    if (n_stall == 0 || n_reuse == 0 || n_full == 0 || n_single == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
