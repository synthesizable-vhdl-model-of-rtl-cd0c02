// gfx_top: floating point 3D vertex transformation and projection pipeline.
//
// A vertex (X, Y, Z, W) enters with its transform settings: the RVST mode,
// the angle alpha, scales Sx..Sz, translations Tx..Tz, the display mode and
// the front plane distance d. It leaves as a projected vector
// (xans, yans, zans, wans). The five units run in this order:
//   rotation       cos, sin and -sin of alpha from a table        1 cycle
//   matrix_builder one combined rotate/scale/translate matrix     8 cycles
//   mult_stage     the 16 products of the matrix-vector multiply  8 cycles
//   add_stage      12 adders sum the products in two levels      17 cycles
//   display_stage  orthographic (00) or perspective (01)         26 cycles
// The order, the units and their cycle counts follow the reference design.
//
// This design adds the following. Each setting and the vertex are delayed so
// that they reach their unit together with the results computed from them.
// The whole pipeline is therefore fully pipelined: one vertex, with its own
// settings, may enter every clock cycle. out_valid marks the result of a
// vertex given with in_valid, TOP_LAT = 60 cycles later. It is only a marker
// that travels through a delay line; the datapath runs whether or not
// in_valid is set. Reset is synchronous and active high and clears every
// pipeline register.
//
// The reference design had two multiplier enable inputs, whose function it
// does not give. This design has no enables.
module gfx_top
  import fp32_pkg::*;
  import gfx_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  fp32_t              xin, yin, zin, win,
  input  fp32_t              tx, ty, tz,
  input  fp32_t              sx, sy, sz,
  input  logic [ANGLE_W-1:0] alpha,
  input  logic [3:0]         rvst,
  input  logic [1:0]         mode,
  input  fp32_t              d,
  output logic               out_valid,
  output fp32_t              xans, yans, zans, wans
);
  localparam int unsigned VEC_DLY  = ROT_LAT + MB_LAT;             // 9
  localparam int unsigned DISP_DLY = VEC_DLY + MST_LAT + AST_LAT;  // 34

  // ---- rotation and matrix builder -------------------------------------
  fp32_t c, s, ms;
  rotation u_rot (.clk, .rst, .alpha(alpha), .cos_o(c), .sin_o(s), .msin_o(ms));

  typedef struct packed {
    rvst_t rvst;
    fp32_t sx, sy, sz, tx, ty, tz;
  } xf_t;

  xf_t xf_now, xf_d;
  always_comb xf_now = '{rvst: rvst_t'(rvst), sx: sx, sy: sy, sz: sz, tx: tx, ty: ty, tz: tz};

  pipe_delay #(.WIDTH($bits(xf_t)), .DEPTH(ROT_LAT)) u_al_xf (
    .clk, .rst, .d(xf_now), .q(xf_d)
  );

  mat4_t m;
  matrix_builder u_mb (
    .clk, .rst, .rvst(xf_d.rvst),
    .sx(xf_d.sx), .sy(xf_d.sy), .sz(xf_d.sz),
    .tx(xf_d.tx), .ty(xf_d.ty), .tz(xf_d.tz),
    .cos_i(c), .sin_i(s), .msin_i(ms), .m(m)
  );

  // ---- multiply and add -------------------------------------------------
  vec4_t v_in, v_al;
  always_comb v_in = '{x: xin, y: yin, z: zin, w: win};

  pipe_delay #(.WIDTH($bits(vec4_t)), .DEPTH(VEC_DLY)) u_al_vec (
    .clk, .rst, .d(v_in), .q(v_al)
  );

  mat4_t p;
  mult_stage u_mst (.clk, .rst, .v(v_al), .m(m), .p(p));

  vec4_t t_vec;
  add_stage u_ast (.clk, .rst, .p(p), .ans(t_vec));

  // ---- projection -------------------------------------------------------
  logic [1:0] mode_al;
  fp32_t      d_al;
  pipe_delay #(.WIDTH(34), .DEPTH(DISP_DLY)) u_al_disp (
    .clk, .rst, .d({mode, d}), .q({mode_al, d_al})
  );

  vec4_t o;
  display_stage u_disp (.clk, .rst, .mode(disp_mode_e'(mode_al)), .v(t_vec), .d(d_al), .o(o));

  assign xans = o.x;
  assign yans = o.y;
  assign zans = o.z;
  assign wans = o.w;

  pipe_delay #(.WIDTH(1), .DEPTH(TOP_LAT)) u_valid (
    .clk, .rst, .d(in_valid), .q(out_valid)
  );
endmodule
