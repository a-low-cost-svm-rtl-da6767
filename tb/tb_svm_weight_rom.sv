// tb_svm_weight_rom: checks the power-up contents of the weight ROM against
// an independent copy of the placeholder-weight hash, then reloads every
// word with random weights and reads them back with the one-cycle latency.
module tb_svm_weight_rom;
  import svm_pkg::*;

  localparam int WORDS = 105;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [6:0]  rd_addr, ld_addr;
  logic        ld_en;
  blk_weight_t rd_data, ld_data;
  blk_weight_t model [WORDS];
  int checks = 0, failures = 0;

  svm_weight_rom dut (.clk, .rd_addr, .rd_data, .ld_en, .ld_addr, .ld_data);

  function automatic int hash_weight(int k);
    longint unsigned h;
    int v;
    h = ((longint'(k) + 1) * 64'h9E37_79B1) & 64'hFFFF_FFFF;
    h = h ^ (h >> 15);
    v = int'(h & 10'h3FF);
    if (v >= 512) v -= 1024;
    return (v >= 0) ? v / 4 : -((-v + 3) / 4);
  endfunction

  task automatic read_check(int a);
    @(negedge clk);
    rd_addr = 7'(a);
    @(posedge clk);
    #1;
    for (int e = 0; e < 36; e++) begin
      checks++;
      if (rd_data[e] != model[a][e]) begin
        failures++;
        if (failures < 10) $display("word %0d elem %0d got %0d exp %0d", a, e, rd_data[e], model[a][e]);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_en = 0; ld_addr = '0; ld_data = '0; rd_addr = '0;
    for (int a = 0; a < WORDS; a++)
      for (int e = 0; e < 36; e++) model[a][e] = weight_t'(hash_weight(a * 36 + e));
    for (int a = 0; a < WORDS; a++) read_check(a);
    for (int a = WORDS - 1; a >= 0; a--) begin
      @(negedge clk);
      ld_en = 1; ld_addr = 7'(a);
      for (int e = 0; e < 36; e++) ld_data[e] = weight_t'($urandom_range(0, 1023));
      model[a] = ld_data;
    end
    @(negedge clk);
    ld_en = 0;
    for (int t = 0; t < 300; t++) read_check(int'($urandom_range(0, WORDS - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
