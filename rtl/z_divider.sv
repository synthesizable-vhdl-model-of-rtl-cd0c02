// z_divider: forms Z/d and d/Z for the perspective unit.
//
// d is the distance from the eye to the front (image) plane. d/Z is the
// factor that scales X and Y in the simple perspective projection. Z/d is
// the homogeneous W that the projection matrix would produce; it is kept
// for use before the division by W. The inputs are registered and then go
// to two floating point dividers side by side. Latency: 1 + DIV_LAT = 17
// cycles, which matches the reference design. The 16-cycle divider core
// inside that count is this design's choice.
module z_divider
  import fp32_pkg::*;
#(
  parameter int unsigned DIV_LATENCY = gfx_pkg::DIV_LAT
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t z,
  input  fp32_t d,
  output fp32_t z_over_d,
  output fp32_t d_over_z
);
  fp32_t z_q, d_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      z_q <= FP_ZERO;
      d_q <= FP_ZERO;
    end else begin
      z_q <= z;
      d_q <= d;
    end
  end

  fp_div #(.LATENCY(DIV_LATENCY)) u_zd (.clk, .rst, .a(z_q), .b(d_q), .y(z_over_d));
  fp_div #(.LATENCY(DIV_LATENCY)) u_dz (.clk, .rst, .a(d_q), .b(z_q), .y(d_over_z));
endmodule
