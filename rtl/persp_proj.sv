// persp_proj: simple single-viewpoint perspective projection.
//
// The projection matrix with 1/d in row D, column 3 gives W = Z/d. Dividing
// by that W yields (d/Z * X, d/Z * Y, d, 1). This unit computes that final
// vector directly, without a second pass through the multiply and add
// stages, as the reference design does. The steps are:
//   1. register X, Y, Z and d;
//   2. the Z divider forms d/Z (17 cycles);
//   3. two multipliers form d/Z * X and d/Z * Y (7 cycles);
//   4. register the result.
// X, Y and d wait in delay registers while the divider works. Those delays
// are this design's choice; they let a new vector enter every cycle.
// Latency: 1 + 17 + 7 + 1 = 26 cycles, the count the reference design
// reports. A zero Z gives an infinite (or NaN) X and Y; clipping should
// remove such points first.
module persp_proj
  import fp32_pkg::*;
  import gfx_pkg::*;
#(
  parameter int unsigned DIV_LATENCY = gfx_pkg::DIV_LAT,
  parameter int unsigned MUL_LATENCY = gfx_pkg::MUL_LAT
) (
  input  logic  clk,
  input  logic  rst,
  input  vec4_t v,
  input  fp32_t d,
  output vec4_t o
);
  vec4_t v_q;
  fp32_t d_q;
  fp32_t z_over_d, d_over_z;
  fp32_t x_al, y_al, d_al, d_fin;
  fp32_t px, py;

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q <= '0;
      d_q <= FP_ZERO;
    end else begin
      v_q <= v;
      d_q <= d;
    end
  end

  z_divider #(.DIV_LATENCY(DIV_LATENCY)) u_zdiv (
    .clk, .rst, .z(v_q.z), .d(d_q), .z_over_d(z_over_d), .d_over_z(d_over_z)
  );

  pipe_delay #(.WIDTH(96), .DEPTH(1 + DIV_LATENCY)) u_al1 (
    .clk, .rst, .d({v_q.x, v_q.y, d_q}), .q({x_al, y_al, d_al})
  );

  fp_mul #(.LATENCY(MUL_LATENCY)) u_mx (.clk, .rst, .a(d_over_z), .b(x_al), .y(px));
  fp_mul #(.LATENCY(MUL_LATENCY)) u_my (.clk, .rst, .a(d_over_z), .b(y_al), .y(py));

  pipe_delay #(.WIDTH(32), .DEPTH(MUL_LATENCY)) u_al2 (
    .clk, .rst, .d(d_al), .q(d_fin)
  );

  always_ff @(posedge clk) begin
    if (rst) o <= '0;
    else     o <= '{x: px, y: py, z: d_fin, w: FP_ONE};
  end
endmodule
