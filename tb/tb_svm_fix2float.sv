// tb_svm_fix2float: every 13-bit Q5.8 input through svm_fix2float; the float
// must equal the encoding of the same value computed through a real.
module tb_svm_fix2float;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid, out_valid;
  logic signed [12:0] in_fix;
  logic [12:0]        in_pos, out_pos;
  logic [31:0]        out_float;
  int checks = 0, failures = 0;

  svm_fix2float dut (.clk, .rst_n, .in_valid, .in_fix, .in_pos, .out_valid, .out_float, .out_pos);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_fix = '0; in_pos = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int v = -4096; v < 4096; v++) begin
      @(negedge clk);
      in_fix = 13'(v); in_valid = v[0]; in_pos = 13'(v + 4096);
      @(posedge clk);
      #1;
      checks += 3;
      if (out_float != q8_to_f32(v)) begin
        failures++;
        if (failures < 10) $display("v=%0d got %h exp %h", v, out_float, q8_to_f32(v));
      end
      if (out_valid != v[0]) failures++;
      if (int'(out_pos) != v + 4096) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
