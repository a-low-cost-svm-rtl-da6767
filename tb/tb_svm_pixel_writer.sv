// tb_svm_pixel_writer: streams short frames of random pixels (with gaps,
// with frames whose length is not a multiple of four) into the pixel
// writer against a slave with random waitrequest. A model packs the same
// pixels; every accepted write must match its address (base + 4*word),
// data and byte enables in order, and a stalled write must hold.
module tb_svm_pixel_writer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] base_addr = 32'h3000_0000;
  logic        pix_valid, pix_sof, pix_ready, avm_write, avm_waitrequest;
  logic [7:0]  pix_data;
  logic [31:0] avm_address, avm_writedata;
  logic [3:0]  avm_byteenable;

  svm_pixel_writer dut (.clk, .rst_n, .base_addr, .pix_valid, .pix_sof, .pix_data, .pix_ready,
                        .avm_address, .avm_write, .avm_writedata, .avm_byteenable, .avm_waitrequest);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [67:0] q[$];        // expected {byteenable, address, data}
    logic [31:0] pk;
    int lane = 0, word = 0, n_flush = 0, n_wait = 0, n_frames = 0, frame_len = 0, in_frame = 0;
    bit held = 0, taken = 1;
    logic [67:0] held_cmd;
    pix_valid = 0; pix_sof = 0; pix_data = '0; avm_waitrequest = 0;
    pk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 40000; c++) begin
      if (taken) begin
        // offer a new pixel
        pix_valid = ((c / 2000) % 2 == 1) || ($urandom_range(0, 3) != 0);
        if (pix_valid) begin
          if (in_frame == frame_len) begin
            pix_sof   = 1;
            frame_len = 40 + int'($urandom_range(0, 20));
            in_frame  = 0;
          end else pix_sof = 0;
          pix_data = 8'($urandom);
          in_frame++;
        end
      end
      avm_waitrequest = ($urandom_range(0, 2) == 0);
      #1;
      if (held) begin
        checks++;
        if (!avm_write || {avm_byteenable, avm_address, avm_writedata} != held_cmd) failures++;
      end
      if (avm_write && !avm_waitrequest) begin
        checks++;
        if (q.size() == 0 || {avm_byteenable, avm_address, avm_writedata} != q[0]) begin
          failures++;
          if (failures < 10) $display("%0t write %h %h %h", $time, avm_byteenable, avm_address, avm_writedata);
        end
        if (q.size() > 0) void'(q.pop_front());
      end
      if (avm_write && avm_waitrequest) n_wait++;
      held     = avm_write && avm_waitrequest;
      held_cmd = {avm_byteenable, avm_address, avm_writedata};
      // model the pixel accepted this cycle
      taken = !pix_valid || pix_ready;
      if (pix_valid && pix_ready) begin
        if (pix_sof) begin
          n_frames++;
          word = 0;
        end
        pk[8*lane +: 8] = pix_data;
        lane++;
        if (lane == 4) begin
          q.push_back({4'hF, base_addr + 32'(word) * 4, pk});
          word++;
          lane = 0;
        end
      end else if (pix_valid && pix_sof && lane != 0 && (!avm_write || !avm_waitrequest)) begin
        // partial word flushed before the new frame
        q.push_back({4'((1 << lane) - 1), base_addr + 32'(word) * 4, pk});
        lane = 0;
        n_flush++;
      end
      @(negedge clk);
    end
    // let the last write finish
    avm_waitrequest = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_flush == 0 || n_wait == 0 || n_frames < 2) failures++;
    $display("frames=%0d flushes=%0d waits=%0d left=%0d", n_frames, n_flush, n_wait, q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
