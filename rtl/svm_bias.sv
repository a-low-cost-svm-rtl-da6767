// svm_bias: the BIAS stage. Adds the model's bias b to a finished window sum,
// giving the fixed-point confidence value w.x + b.
//
// The bias is taken in the same 12-bit Q4.8 format as the partial sums (the
// published design does not give its format) and the result is widened by
// one bit to Q5.8 so that the addition cannot overflow. The valid flag and
// window position travel through the same register.
//
// Timing: one register stage.
module svm_bias
  import svm_pkg::*;
#(
  parameter int unsigned POS_W = 13  // width of the window position tag
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  psum_t            in_sum,
  input  logic [POS_W-1:0] in_pos,
  input  bias_t            bias,
  output logic             out_valid,
  output conf_t            out_conf,
  output logic [POS_W-1:0] out_pos
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_conf <= conf_t'(in_sum) + conf_t'(bias);
    out_pos  <= in_pos;
  end

endmodule
