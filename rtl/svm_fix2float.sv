// svm_fix2float: the FIX2FLOAT stage. Converts a signed fixed-point
// confidence value into an IEEE-754 single-precision number so that software
// can compare it with its threshold directly.
//
// The input has IN_W bits of which FRAC are fractional (13-bit Q5.8 here).
// The conversion takes the magnitude, finds its leading one, and shifts it
// into the 24-bit significand; the biased exponent is 127 + (position of the
// leading one) - FRAC. With IN_W <= 25 every input is exactly representable,
// so there is no rounding. Zero gives +0.0. Only the top IN_W-2 fraction bits
// can be non-zero (11 low bits are always zero at the default width). The valid flag and window
// position travel through the same register.
//
// The published design converts to a 32-bit float here; the IEEE-754 single
// format, the exact conversion and the register are this design's choices.
//
// Timing: one register stage.
module svm_fix2float
  import svm_pkg::*;
#(
  parameter int unsigned IN_W  = CONF_W,
  parameter int unsigned FRAC  = FRAC_BITS,
  parameter int unsigned POS_W = 13
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_fix,
  input  logic [POS_W-1:0]       in_pos,
  output logic                   out_valid,
  output logic [31:0]            out_float,
  output logic [POS_W-1:0]       out_pos
);

  logic [IN_W-1:0] mag;
  logic [7:0]      lead;
  logic            nz;
  logic [31:0]     f;
  logic [IN_W-1:0] norm;

  always_comb begin
    mag  = in_fix[IN_W-1] ? IN_W'(-in_fix) : IN_W'(in_fix);
    lead = '0;
    nz   = 1'b0;
    for (int i = 0; i < int'(IN_W); i++) begin
      if (mag[i]) begin
        lead = 8'(i);
        nz   = 1'b1;
      end
    end
    // Put the leading one at bit IN_W-1; the bits below it start the fraction.
    norm = mag << (IN_W - 1 - int'(lead));
    if (!nz) f = 32'h0;
    else     f = {in_fix[IN_W-1], 8'(8'd127 + lead - 8'(FRAC)), 23'({norm[IN_W-2:0], 23'b0} >> (IN_W - 1))};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_float <= f;
    out_pos   <= in_pos;
  end

endmodule
