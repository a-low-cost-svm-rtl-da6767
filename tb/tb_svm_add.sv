// tb_svm_add: random and extreme sets of 36 products into svm_add; the
// registered sum must equal the integer sum one cycle later.
module tb_svm_add;
  import svm_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  blk_prod_t prod;
  sum_t      sum;
  int checks = 0, failures = 0;

  svm_add dut (.clk, .prod, .sum);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int t = 0; t < 500; t++) begin
      exp = 0;
      for (int i = 0; i < int'(BLK_ELEMS); i++) begin
        int v;
        case (t % 5)
          0: v = -2048;
          1: v = 2047;
          default: v = int'($urandom_range(0, 4095)) - 2048;
        endcase
        prod[i] = prod_t'(v);
        exp += v;
      end
      @(posedge clk);
      #1;
      checks++;
      if (int'(sum) != exp) begin
        failures++;
        if (failures < 10) $display("mismatch t=%0d got %0d exp %0d", t, int'(sum), exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
