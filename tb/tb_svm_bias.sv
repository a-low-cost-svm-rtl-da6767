// tb_svm_bias: random window sums and biases through svm_bias; checks the
// widened sum, the position tag and the one-cycle valid delay.
module tb_svm_bias;
  import svm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  psum_t       in_sum, bias;
  conf_t       out_conf;
  logic [12:0] in_pos, out_pos;
  int checks = 0, failures = 0;

  svm_bias dut (.clk, .rst_n, .in_valid, .in_sum, .in_pos, .bias, .out_valid, .out_conf, .out_pos);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_sum = '0; bias = '0; in_pos = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int s, b, v, p;
      s = (t % 10 == 0) ? 2047 : int'($urandom_range(0, 4095)) - 2048;
      b = (t % 10 == 0) ? 2047 : (t % 10 == 1) ? -2048 : int'($urandom_range(0, 4095)) - 2048;
      if (t % 10 == 1) s = -2048;
      v = int'($urandom_range(0, 1));
      p = int'($urandom_range(0, 8191));
      @(negedge clk);
      in_sum = psum_t'(s); bias = psum_t'(b); in_valid = v[0]; in_pos = 13'(p);
      @(posedge clk);
      #1;
      checks += 3;
      if (int'(out_conf) != s + b) failures++;
      if (int'(out_valid) != v) failures++;
      if (int'(out_pos) != p) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
