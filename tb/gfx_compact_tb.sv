// gfx_compact_tb: the single-multiplier, single-adder design against the
// pipelined transform chain (rotation, matrix_builder, mult_stage,
// add_stage). Both perform the same float operations in the same order, so
// their results must agree bit for bit.
//   * Two worked examples: vertex (1,1,1,1) with RVST 0011, Tx 3, Sy 2 gives
//     (4,2,1,1); vertex (2,1,-2,1) with RVST 0001, Tx 1 gives (3,1,-2,1).
//   * 150 random vertices with random mode words, angles, scales and
//     translations, against the chain.
//   * done must come exactly LAT cycles after start, with busy high in
//     between; a start while busy must be ignored; a reset while busy must
//     return the design to idle with zero outputs.
// A second copy runs with one-cycle multiplier and adder, as a unit that
// answers on the next clock edge would.
module gfx_compact_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  localparam int N = 150;
  localparam int LAT7 = 2 + (3 + MUL_LAT + 1) + (16 + MUL_LAT + 1) + (8 + ADD_LAT + 1) + (4 + ADD_LAT + 1);
  localparam int LAT1 = 2 + (3 + 2) + (16 + 2) + (8 + 2) + (4 + 2);
  localparam logic [31:0] ONE = 32'h3F80_0000;

  logic clk = 1'b0, rst = 1'b1;
  logic start;
  logic [31:0] xin, yin, zin, win, tx, ty, tz, sx, sy, sz;
  logic [9:0] alpha;
  logic [3:0] rvst;
  logic busy7, done7, busy1, done1;
  vec4_t o7, o1, oref;
  int checks = 0, failures = 0;

  gfx_compact dut7 (.clk, .rst, .start, .xin, .yin, .zin, .win, .tx, .ty, .tz, .sx, .sy, .sz,
                    .alpha, .rvst, .busy(busy7), .done(done7),
                    .xo(o7.x), .yo(o7.y), .zo(o7.z), .wo(o7.w));
  gfx_compact #(.MUL_LATENCY(1), .ADD_LATENCY(1)) dut1 (
                    .clk, .rst, .start, .xin, .yin, .zin, .win, .tx, .ty, .tz, .sx, .sy, .sz,
                    .alpha, .rvst, .busy(busy1), .done(done1),
                    .xo(o1.x), .yo(o1.y), .zo(o1.z), .wo(o1.w));

  // ---- reference: the pipelined chain, inputs held steady ----
  logic [31:0] c, s, ms;
  mat4_t mref, pref;
  rotation u_rot (.clk, .rst, .alpha, .cos_o(c), .sin_o(s), .msin_o(ms));
  matrix_builder u_mb (.clk, .rst, .rvst(rvst_t'(rvst)), .sx, .sy, .sz, .tx, .ty, .tz,
                       .cos_i(c), .sin_i(s), .msin_i(ms), .m(mref));
  mult_stage u_ms (.clk, .rst, .v('{x: xin, y: yin, z: zin, w: win}), .m(mref), .p(pref));
  add_stage  u_as (.clk, .rst, .p(pref), .ans(oref));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one transform: start both copies, check the timing of each, and give
  // the chain time to settle on the same held inputs
  task automatic run(output vec4_t r7, output vec4_t r1, input logic poke);
    int n, t7, t1;
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    t7 = -1; t1 = -1;
    n = 0;
    while ((t7 < 0 || t1 < 0) && n < 200) begin
      if (poke && n == 5) begin
        // a start while busy, with other inputs, must be ignored; restore
        // the inputs before the chain reads them again
        logic [31:0] keep;
        keep = xin;
        start = 1'b1; xin = r2fp(1234.0);
        @(posedge clk);
        #1;
        start = 1'b0; xin = keep;
        n++;
        checks++;
        if (done7 || done1) failures++;
        continue;
      end
      checks += 2;
      if (!done7 && t7 < 0 && !busy7) failures++;
      if (!done1 && t1 < 0 && !busy1 && n < LAT1 - 1) failures++;
      @(posedge clk);
      #1;
      n++;
      if (done7 && t7 < 0) t7 = n;
      if (done1 && t1 < 0) t1 = n;
    end
    checks += 4;
    if (t7 != LAT7) begin failures++; $display("latency %0d, expected %0d", t7, LAT7); end
    if (t1 != LAT1) begin failures++; $display("latency %0d, expected %0d", t1, LAT1); end
    @(posedge clk);
    #1;
    if (done7 || done1) failures++;     // done is a single-cycle pulse
    if (busy7 || busy1) failures++;
    r7 = o7;
    r1 = o1;
  endtask

  task automatic compare(input vec4_t want, input string what);
    vec4_t r7, r1;
    run(r7, r1, what == "poke");
    repeat (40) @(posedge clk);       // the chain's result on the held inputs
    #1;
    if (what == "chain" || what == "poke") want = oref;
    checks += 2;
    if (r7 !== want || r1 !== want) begin
      failures++;
      if (failures < 6)
        $display("%s: got %h / %h, expected %h", what, r7, r1, want);
    end
  endtask

  initial begin
    start = 1'b0; alpha = '0; rvst = '0;
    {xin, yin, zin, win, tx, ty, tz, sx, sy, sz} = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (o7 !== '0 || busy7 || done7) failures++;
    rst = 1'b0;
    @(posedge clk);
    #1;

    // worked examples
    {xin, yin, zin, win} = {ONE, ONE, ONE, ONE};
    rvst = 4'b0011; sx = ONE; sy = r2fp(2.0); sz = ONE; tx = r2fp(3.0); ty = '0; tz = '0;
    compare('{x: r2fp(4.0), y: r2fp(2.0), z: ONE, w: ONE}, "scale and translate");
    {xin, yin, zin, win} = {r2fp(2.0), ONE, r2fp(-2.0), ONE};
    rvst = 4'b0001; tx = ONE;
    compare('{x: r2fp(3.0), y: ONE, z: r2fp(-2.0), w: ONE}, "translate");

    // random vertices against the pipelined chain
    for (int i = 0; i < N; i++) begin
      {xin, yin, zin} = {rand_fp(110, 140), rand_fp(110, 140), rand_fp(110, 140)};
      win = (i % 4 == 0) ? rand_fp(120, 130) : ONE;
      {tx, ty, tz} = {rand_fp(110, 140), rand_fp(110, 140), rand_fp(110, 140)};
      {sx, sy, sz} = {rand_fp(120, 134), rand_fp(120, 134), rand_fp(120, 134)};
      alpha = 10'($urandom_range(0, 1023));
      rvst = 4'(i % 16);
      compare('0, (i % 10 == 3) ? "poke" : "chain");
    end

    // reset while busy
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    repeat (20) @(posedge clk);
    #1;
    checks++; if (!busy7) failures++;
    rst = 1'b1;
    @(posedge clk);
    #1;
    rst = 1'b0;
    checks += 2;
    if (busy7 || busy1) failures++;
    if (o7 !== '0 || o1 !== '0) failures++;
    repeat (LAT7 + 5) @(posedge clk);
    #1;
    checks++; if (done7 || o7 !== '0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
