// tb_svm_multiply: drives random blocks and weights, including the extreme
// values, into svm_multiply and compares each of the 36 registered products
// with floor(f*w/256) one cycle later.
module tb_svm_multiply;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  blk_feat_t   feat;
  blk_weight_t weight;
  blk_prod_t   prod;
  int checks = 0, failures = 0;

  svm_multiply dut (.clk, .feat, .weight, .prod);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fv [BLK_ELEMS];
    int wv [BLK_ELEMS];
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < int'(BLK_ELEMS); i++) begin
        case (t % 4)
          0: begin fv[i] = -512; wv[i] = (i % 2) ? -512 : 511; end
          default: begin fv[i] = int'($urandom_range(0, 1023)) - 512; wv[i] = int'($urandom_range(0, 1023)) - 512; end
        endcase
        feat[i]   = feat_t'(fv[i]);
        weight[i] = weight_t'(wv[i]);
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < int'(BLK_ELEMS); i++) begin
        checks++;
        if (int'(prod[i]) != fix_mul(fv[i], wv[i])) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d i=%0d f=%0d w=%0d got %0d exp %0d",
                                      t, i, fv[i], wv[i], int'(prod[i]), fix_mul(fv[i], wv[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
