// matrix_builder: builds one combined 4x4 transform matrix for rotation,
// scaling and translation, so that one pass through the multiply and add
// stages applies all three.
//
// The mode word RVST picks the contents (see gfx_pkg):
//   * start from the identity;
//   * S = 1 puts Sx, Sy, Sz on the diagonal;
//   * T = 1 puts Tx, Ty, Tz in column 4 of rows A..C;
//   * RV = X, Y or Z writes that axis' rotation: cos on the two diagonal
//     places of the rotated axes, sin and -sin off the diagonal. Example for
//     Z: A2 = -sin, B1 = sin.
//   * When rotation and scaling are both set, the rotated diagonal places
//     hold cos*S (for example A1 = cos*Sx, B2 = cos*Sy for Z rotation), and
//     the axis that is not rotated keeps its plain scale.
//   * Row D is always (0, 0, 0, 1).
// This follows the reference design exactly, including its limit: the
// off-diagonal sines are not scaled. The result is therefore the true product
// R*S only when the scales of the two rotated axes are 1 or the angle is a
// multiple of 180 degrees. A zero cosine also removes the scale of those
// axes.
//
// Three multipliers form cos*Sx, cos*Sy and cos*Sz. Every other input is
// delayed by the multiplier latency so it stays in step with the products;
// matrix_select then places all values into the matrix.
// The matrix is registered at the output. Latency: MUL_LAT + 1 = 8 cycles
// from all inputs (cos, sin and -sin included) to m. The alignment delays
// and the output register are this design's choice. They let a new mode,
// angle and scale be presented every cycle.
module matrix_builder
  import fp32_pkg::*;
  import gfx_pkg::*;
#(
  parameter int unsigned MUL_LATENCY = gfx_pkg::MUL_LAT
) (
  input  logic  clk,
  input  logic  rst,
  input  rvst_t rvst,
  input  fp32_t sx, sy, sz,
  input  fp32_t tx, ty, tz,
  input  fp32_t cos_i, sin_i, msin_i,
  output mat4_t m
);
  fp32_t cs_x, cs_y, cs_z;               // cos * S products

  fp_mul #(.LATENCY(MUL_LATENCY)) u_mx (.clk, .rst, .a(cos_i), .b(sx), .y(cs_x));
  fp_mul #(.LATENCY(MUL_LATENCY)) u_my (.clk, .rst, .a(cos_i), .b(sy), .y(cs_y));
  fp_mul #(.LATENCY(MUL_LATENCY)) u_mz (.clk, .rst, .a(cos_i), .b(sz), .y(cs_z));

  typedef struct packed {
    rvst_t rvst;
    fp32_t sx, sy, sz, tx, ty, tz, c, s, ms;
  } mb_in_t;

  mb_in_t in_now, in_d;

  always_comb begin
    in_now = '{rvst: rvst, sx: sx, sy: sy, sz: sz, tx: tx, ty: ty, tz: tz,
               c: cos_i, s: sin_i, ms: msin_i};
  end

  pipe_delay #(.WIDTH($bits(mb_in_t)), .DEPTH(MUL_LATENCY)) u_align (
    .clk, .rst, .d(in_now), .q(in_d)
  );

  mat4_t m_next;

  matrix_select u_sel (
    .rvst(in_d.rvst), .sx(in_d.sx), .sy(in_d.sy), .sz(in_d.sz),
    .tx(in_d.tx), .ty(in_d.ty), .tz(in_d.tz),
    .c(in_d.c), .s(in_d.s), .ms(in_d.ms),
    .cs_x(cs_x), .cs_y(cs_y), .cs_z(cs_z), .m(m_next)
  );

  always_ff @(posedge clk) begin
    if (rst) m <= '0;
    else     m <= m_next;
  end
endmodule
