// svm_pixel_writer: the Avalon-MM write master that stores the camera image
// in the SDRAM frame buffer through the HPS's FPGA-to-HPS slave bridge, so
// that software and the display path can show the pixels with the
// detection results.
//
// It takes 8-bit pixels from the pixel FIFO and packs four of them into a
// 32-bit word, the first pixel in the low byte. Word n of a frame is written to
// base_addr + 4*n. The first pixel of a frame (sof) restarts the word
// count at zero, and a partly filled word is flushed first (its missing
// bytes are disabled with byteenable). The next word is gathered while the
// previous one is on the bus; only a word that is complete while the bus is
// still stalled holds the pixel stream back, and the FIFO absorbs that. The published design
// states only that a custom Avalon master sends the pixels to SDRAM; the
// packing, the layout and the frame restart are this design's choices.
//
// Timing: a word goes on the bus in the cycle after its fourth pixel is
// taken; without waitrequest one pixel is taken every cycle.
module svm_pixel_writer #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned WORD_W = 17   // word counter: 640*480/4 = 76,800 words
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] base_addr,
  // pixel stream from the FIFO
  input  logic              pix_valid,
  input  logic              pix_sof,
  input  logic [7:0]        pix_data,
  output logic              pix_ready,
  // Avalon-MM master
  output logic [ADDR_W-1:0] avm_address,
  output logic              avm_write,
  output logic [31:0]       avm_writedata,
  output logic [3:0]        avm_byteenable,
  input  logic              avm_waitrequest
);

  logic [31:0]       pack;       // pixels gathered so far
  logic [1:0]        lane;       // next byte lane
  logic [WORD_W-1:0] word;       // word index of the word being gathered
  logic              pending;    // a word is on the bus
  logic              bus_free;   // the bus can take a new word this cycle
  logic              flush;      // sof arrived with a partial word

  assign bus_free  = !pending || !avm_waitrequest;
  assign flush     = pix_valid && pix_sof && (lane != 2'd0);
  assign pix_ready = !flush && (lane != 2'd3 || bus_free);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack           <= '0;
      lane           <= '0;
      word           <= '0;
      pending        <= 1'b0;
      avm_address    <= '0;
      avm_writedata  <= '0;
      avm_byteenable <= '0;
    end else begin
      if (pending && !avm_waitrequest) pending <= 1'b0;
      if (flush) begin
        // write out the partial word of the previous frame, then restart
        if (bus_free) begin
          pending        <= 1'b1;
          avm_address    <= base_addr + (ADDR_W'(word) << 2);
          avm_writedata  <= pack;
          avm_byteenable <= 4'((1 << lane) - 1);
          lane           <= '0;
          word           <= '0;
        end
      end else if (pix_valid && pix_ready) begin
        logic [WORD_W-1:0] w;
        w = pix_sof ? '0 : word;
        pack[8*lane +: 8] <= pix_data;
        if (lane == 2'd3) begin
          pending        <= 1'b1;
          avm_address    <= base_addr + (ADDR_W'(w) << 2);
          avm_writedata  <= {pix_data, pack[23:0]};
          avm_byteenable <= 4'hF;
          word           <= w + 1'b1;
          lane           <= '0;
        end else begin
          word <= w;
          lane <= lane + 1'b1;
        end
      end
    end
  end

  assign avm_write = pending;

  // Avalon-MM: a stalled write keeps its command stable.
  assert property (@(posedge clk) disable iff (!rst_n)
    avm_write && avm_waitrequest |=> avm_write && $stable(avm_address) && $stable(avm_writedata));

endmodule
