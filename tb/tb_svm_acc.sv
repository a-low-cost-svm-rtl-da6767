// tb_svm_acc: exercises the accumulate/write-back logic with random partial
// sums and counts, saturation at both ends, window completion at count 104
// and the clear override; every output is checked against an integer model.
module tb_svm_acc;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  sum_t      blk_sum;
  ram_word_t ram_rd, ram_wr;
  logic      clear, win_done, sat;
  psum_t     acc_sum;
  int checks = 0, failures = 0;
  int n_done = 0, n_sat = 0;

  svm_acc dut (.blk_sum, .ram_rd, .clear, .ram_wr, .acc_sum, .win_done, .sat);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int s, p, c, full, e_sum, e_done, e_sat, cl;
      s  = (t % 7 == 0) ? int'($urandom_range(0, 200000)) - 100000 : int'($urandom_range(0, 4000)) - 2000;
      p  = int'($urandom_range(0, 4095)) - 2048;
      c  = (t % 3 == 0) ? 104 : int'($urandom_range(0, 104));
      cl = (t % 11 == 0) ? 1 : 0;
      blk_sum     = sum_t'(s);
      ram_rd.psum = psum_t'(p);
      ram_rd.cnt  = CNT_W'(c);
      clear       = cl[0];
      #1;
      full   = s + p;
      e_sum  = sat12(full);
      e_sat  = (e_sum != full) ? 1 : 0;
      e_done = (c + 1 == 105) ? 1 : 0;
      check("acc_sum", int'(acc_sum), e_sum);
      check("sat", int'(sat), e_sat);
      check("win_done", int'(win_done), e_done);
      if (e_done == 1 || cl == 1) begin
        check("wr zero", int'(ram_wr), 0);
      end else begin
        check("wr psum", int'(ram_wr.psum), e_sum);
        check("wr cnt", int'(ram_wr.cnt), c + 1);
      end
      n_done += e_done;
      n_sat  += e_sat;
    end
    if (n_done == 0 || n_sat == 0) failures++;
    $display("completions=%0d saturations=%0d", n_done, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
