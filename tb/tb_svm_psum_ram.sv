// tb_svm_psum_ram: fills the 2190-word partial-sum RAM with random words,
// reads them back with the one-cycle latency, and checks that a read of the
// address being written returns the old word.
module tb_svm_psum_ram;
  import svm_pkg::*;

  localparam int DEPTH = 2190;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [11:0] rd_addr, wr_addr;
  logic        we;
  ram_word_t   rd_data, wr_data;
  ram_word_t   model [DEPTH];
  int checks = 0, failures = 0;

  svm_psum_ram dut (.clk, .rd_addr, .rd_data, .we, .wr_addr, .wr_data);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wr_addr = 12'(a); wr_data = ram_word_t'($urandom_range(0, (1 << 19) - 1));
      model[a] = wr_data;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 4000; t++) begin
      int a, w;
      ram_word_t old;
      a = int'($urandom_range(0, DEPTH - 1));
      w = int'($urandom_range(0, 1));
      @(negedge clk);
      rd_addr = 12'(a);
      we      = w[0];
      wr_addr = 12'(a);
      wr_data = ram_word_t'($urandom_range(0, (1 << 19) - 1));
      old = model[a];
      if (w == 1) model[a] = wr_data;
      @(posedge clk);
      #1;
      checks++;
      if (rd_data != old) begin
        failures++;
        if (failures < 10) $display("addr %0d got %h exp %h", a, rd_data, old);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
