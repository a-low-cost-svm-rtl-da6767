// svm_weight_rom: the weight vector w of the linear SVM model, 3780 ten-bit
// weights for a 7x15-block window, organised as one 360-bit word per block
// position so that the 36 weights a block needs come out in one read.
//
// Word r holds the weights for the block in window row r / WIN_W, column
// r % WIN_W (row-major order inside the window); element e of a word meets
// element e of the HOG block. The memory is a ROM to the datapath. It can be
// reloaded through the load port when the model changes, as the published
// design requires, one word per cycle. At power-up it holds either the
// contents of INIT_FILE (one 360-bit hex word per line) or, when INIT_FILE
// is empty, the placeholder weights of svm_pkg::default_weight.
//
// Timing: synchronous read, data one cycle after rd_addr.
module svm_weight_rom
  import svm_pkg::*;
#(
  parameter int unsigned WORDS     = WIN_BLK_W * WIN_BLK_H,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output blk_weight_t              rd_data,
  input  logic                     ld_en,    // reload one word of the model
  input  logic [$clog2(WORDS)-1:0] ld_addr,
  input  blk_weight_t              ld_data
);

  blk_weight_t mem [WORDS];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int r = 0; r < int'(WORDS); r++)
        for (int e = 0; e < int'(BLK_ELEMS); e++)
          mem[r][e] = default_weight(r * BLK_ELEMS + e);
    end
  end

  always_ff @(posedge clk) begin
    if (ld_en) mem[ld_addr] <= ld_data;
    rd_data <= mem[rd_addr];
  end

endmodule
