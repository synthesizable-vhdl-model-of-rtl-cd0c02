// transform_chain_tb: the transform half of the pipeline without projection,
// built up in two steps.
//   1. mult_stage feeding add_stage, given the matrix directly. The vertex
//      (2, 1, -2, 1) with an identity matrix whose A4 (X translation) is 1
//      must give (3, 1, -2, 1).
//   2. rotation, matrix_builder, mult_stage and add_stage. The vertex
//      (1, 1, 1, 1) with RVST 0011, Tx 3, Sy 2 and the other scales 1 must
//      give (4, 2, 1, 1).
// Both results are checked bit for bit, and so is the cycle count. The
// multiply-add chain takes 8 + 17 = 25 cycles. The full transform takes
// 1 + 8 + 8 + 17 = 34 cycles from the angle and settings, with the vertex
// entering the multiply stage 9 cycles after them.
module transform_chain_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- chain 1: mult_stage -> add_stage ----
  vec4_t v1, o1;
  mat4_t m1, p1;
  mult_stage u_m1 (.clk, .rst, .v(v1), .m(m1), .p(p1));
  add_stage  u_a1 (.clk, .rst, .p(p1), .ans(o1));

  // ---- chain 2: rotation -> matrix_builder -> mult_stage -> add_stage ----
  logic [9:0] alpha;
  rvst_t rvst, rvst_d;
  logic [31:0] sx, sy, sz, tx, ty, tz, c, s, ms;
  logic [191:0] st_d;
  vec4_t v2, v2_d, o2;
  mat4_t m2, p2;
  rotation u_rot (.clk, .rst, .alpha, .cos_o(c), .sin_o(s), .msin_o(ms));
  pipe_delay #(.WIDTH(196), .DEPTH(1)) u_d1 (.clk, .rst, .d({rvst, sx, sy, sz, tx, ty, tz}),
                                              .q({rvst_d, st_d}));
  matrix_builder u_mb (.clk, .rst, .rvst(rvst_d), .sx(st_d[191:160]), .sy(st_d[159:128]),
                       .sz(st_d[127:96]), .tx(st_d[95:64]), .ty(st_d[63:32]), .tz(st_d[31:0]),
                       .cos_i(c), .sin_i(s), .msin_i(ms), .m(m2));
  pipe_delay #(.WIDTH(128), .DEPTH(9)) u_d2 (.clk, .rst, .d(v2), .q(v2_d));
  mult_stage u_m2 (.clk, .rst, .v(v2_d), .m(m2), .p(p2));
  add_stage  u_a2 (.clk, .rst, .p(p2), .ans(o2));

  localparam logic [31:0] ONE = 32'h3F80_0000;

  task automatic wait_for(input vec4_t want, ref vec4_t got, input int lat);
    int n;
    n = 0;
    while (got !== want && n < 200) begin
      @(posedge clk);
      #1;
      n++;
    end
    checks += 2;
    if (got !== want) begin
      failures++;
      $display("result never appeared: got %h", got);
    end
    if (n != lat) begin
      failures++;
      $display("latency %0d, expected %0d", n, lat);
    end
  endtask

  initial begin
    v1 = '0; m1 = '0; v2 = '0; alpha = '0; rvst = '0;
    {sx, sy, sz, tx, ty, tz} = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    #1;
    // step 1
    v1 = '{x: r2fp(2.0), y: r2fp(1.0), z: r2fp(-2.0), w: ONE};
    m1 = '0;
    m1[0][0] = ONE; m1[1][1] = ONE; m1[2][2] = ONE; m1[3][3] = ONE;
    m1[0][3] = ONE;
    wait_for('{x: r2fp(3.0), y: r2fp(1.0), z: r2fp(-2.0), w: ONE}, o1, 25);
    // step 2
    v2 = '{x: ONE, y: ONE, z: ONE, w: ONE};
    rvst = '{rv: ROT_NONE, s: 1'b1, t: 1'b1};
    sx = ONE; sy = r2fp(2.0); sz = ONE;
    tx = r2fp(3.0); ty = '0; tz = '0;
    wait_for('{x: r2fp(4.0), y: r2fp(2.0), z: ONE, w: ONE}, o2, 34);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
