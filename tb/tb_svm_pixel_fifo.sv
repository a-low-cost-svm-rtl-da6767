// tb_svm_pixel_fifo: random writes and reads on the pixel FIFO against a
// queue model: order, data, start-of-frame marks, the full limit of 16
// entries, dropped pixels and the sticky overflow flag.
module tb_svm_pixel_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       wr_valid, wr_sof, rd_valid, rd_sof, rd_ready, overflow;
  logic [7:0] wr_data, rd_data;

  svm_pixel_fifo dut (.clk, .rst_n, .wr_valid, .wr_sof, .wr_data, .rd_valid, .rd_sof, .rd_data,
                      .rd_ready, .overflow);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] q[$];
    int dropped = 0, n_full = 0;
    wr_valid = 0; wr_sof = 0; wr_data = '0; rd_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int phase;
      phase = (c / 1000) % 3;   // 0: balanced, 1: reader slow (fills), 2: reader fast (empties)
      wr_valid = ($urandom_range(0, 1) == 1);
      wr_sof   = ($urandom_range(0, 15) == 0);
      wr_data  = 8'($urandom);
      rd_ready = (phase == 1) ? ($urandom_range(0, 7) == 0) : (phase == 2) ? 1'b1 : ($urandom_range(0, 1) == 1);
      #1;
      checks++;
      if (rd_valid != (q.size() > 0)) begin
        failures++;
        if (failures < 10) $display("%0t rd_valid %0d, model holds %0d", $time, rd_valid, q.size());
      end
      if (rd_valid && q.size() > 0) begin
        checks++;
        if ({rd_sof, rd_data} != q[0]) failures++;
      end
      if (q.size() == 16) n_full++;
      // the FIFO decides on its occupancy at the start of the cycle
      if (wr_valid) begin
        if (q.size() < 16) q.push_back({wr_sof, wr_data});
        else dropped++;
      end
      if (rd_valid && rd_ready) void'(q.pop_front());
      @(negedge clk);
    end
    checks++;
    if (overflow != (dropped > 0) || n_full == 0 || dropped == 0) failures++;
    $display("full cycles=%0d dropped=%0d", n_full, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
