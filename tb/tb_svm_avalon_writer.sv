// tb_svm_avalon_writer: feeds results into the Avalon write master at a
// random rate against a slave with random waitrequest. Every accepted write
// must carry base + 4*index and the data of the next queued result, in
// order, and a stalled write must hold its command. A final burst faster
// than the slave drains must set the overflow flag and drop exactly the
// results that did not fit.
module tb_svm_avalon_writer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] base_addr = 32'h2000_0000;
  logic        in_valid, overflow, avm_write, avm_waitrequest;
  logic [31:0] in_data, avm_address, avm_writedata;
  logic [11:0] in_index;
  logic [3:0]  avm_byteenable;

  svm_avalon_writer dut (
    .clk, .rst_n, .base_addr, .in_valid, .in_data, .in_index, .overflow,
    .avm_address, .avm_write, .avm_writedata, .avm_byteenable, .avm_waitrequest
  );

  int checks = 0, failures = 0, n_wait = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [43:0] q[$];       // {index, data} in flight
    logic [31:0] held_a, held_d;
    bit          held = 0;
    int          dropped = 0, sent = 0, wrote = 0;
    in_valid = 0; in_data = '0; in_index = '0; avm_waitrequest = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      bit burst;
      burst = (c >= 5000 && c < 5020);
      in_valid        = burst || ($urandom_range(0, 9) == 0 && c < 5000);
      in_data         = $urandom;
      in_index        = 12'($urandom_range(0, 3284));
      avm_waitrequest = burst ? 1'b1 : ($urandom_range(0, 2) == 0);
      #1;
      // slave side
      if (held) begin
        checks++;
        if (!avm_write || avm_address != held_a || avm_writedata != held_d) begin
          failures++;
          $display("%0t stalled write not held", $time);
        end
      end
      if (avm_write) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("%0t write with nothing queued", $time);
        end else begin
          if (avm_address != base_addr + 32'(q[0][43:32]) * 4 || avm_writedata != q[0][31:0]
              || avm_byteenable != 4'hF) begin
            failures++;
            if (failures < 10) $display("%0t write %h/%h exp %h/%h", $time, avm_address, avm_writedata,
                                        base_addr + 32'(q[0][43:32]) * 4, q[0][31:0]);
          end
        end
      end
      held   = avm_write && avm_waitrequest;
      held_a = avm_address;
      held_d = avm_writedata;
      if (avm_write && avm_waitrequest) n_wait++;
      if (avm_write && !avm_waitrequest && q.size() > 0) begin
        void'(q.pop_front());
        wrote++;
      end
      // source side: the FIFO holds 4 results
      if (in_valid) begin
        if (level_ok(q.size(), avm_write && !avm_waitrequest)) begin
          q.push_back({in_index, in_data});
          sent++;
        end else dropped++;
      end
      @(negedge clk);
    end
    checks++;
    if (overflow != (dropped > 0)) failures++;
    checks++;
    if (dropped == 0 || n_wait == 0) failures++;
    $display("sent=%0d wrote=%0d dropped=%0d waits=%0d", sent, wrote, dropped, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A result is accepted when the FIFO had room at the start of the cycle
  // (after this cycle's pop was taken out of the model queue, the size seen
  // here already excludes it, so add it back).
  function automatic bit level_ok(int size_after_pop, bit popped);
    return (size_after_pop + (popped ? 1 : 0)) < 4;
  endfunction
endmodule
