// rotation: supplies cos(alpha), sin(alpha) and -sin(alpha) to the matrix
// builder.
//
// The angle goes through the mycossin look-up table; the sine is negated by
// flipping its sign bit, and the three values are registered, so they appear
// one clock edge after alpha. The three registered outputs and the sign flip
// follow the reference design; the synchronous active-high reset (to zero)
// is this design's choice. Keeping the trigonometry in its own unit lets a
// finer table or a CORDIC core replace mycossin without touching the matrix
// builder.
module rotation
  import fp32_pkg::*;
#(
  parameter int unsigned ANGLE_W = gfx_pkg::ANGLE_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [ANGLE_W-1:0] alpha,
  output fp32_t              cos_o,
  output fp32_t              sin_o,
  output fp32_t              msin_o
);
  fp32_t c, s;

  mycossin #(.ANGLE_W(ANGLE_W)) u_lut (.alpha(alpha), .cos_o(c), .sin_o(s));

  always_ff @(posedge clk) begin
    if (rst) begin
      cos_o  <= FP_ZERO;
      sin_o  <= FP_ZERO;
      msin_o <= FP_ZERO;
    end else begin
      cos_o  <= c;
      sin_o  <= s;
      msin_o <= {~s[31], s[30:0]};
    end
  end
endmodule
