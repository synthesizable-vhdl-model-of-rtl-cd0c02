// gfx_top_tb: end-to-end test of the transformation and projection pipeline
// at its default sizes.
//
// Part 1 replays the reference design's worked examples bit for bit:
//   * vertex (2,2,2,1), RVST 0011, Tx 4, Sy 2, perspective, d 1 -> (3,2,1,1)
//   * vertex (2,2,2,1), RVST 1100, alpha 180, perspective, d 1 -> (-1,-1,1,1)
//   * same with RVST 1111, Tz 2, Sy 2                            -> (-0.5,-1,1,1)
//   * vertex (1,1,1,1), RVST 0011, Tx 3, Sy 2, orthographic       -> (4,2,0,0)
//   * vertex (2,1,-2,1), RVST 0001, Tx 1, orthographic            -> (3,1,0,0)
// Part 2 streams random vertices back to back, one per cycle. Every vertex
// has its own mode word, angle, scales, translations, display mode and d.
// The outputs are compared with a model in real arithmetic. The model builds
// the same combined matrix and takes cos and sin from $cos and $sin at the
// angle rounded down to 15 degrees. The tolerance follows the rounding
// error each float operation may add.
// Every result must appear exactly 60 cycles after its vertex, marked by
// out_valid. A reset in the middle of the run must clear the outputs. The
// testbench counts each mechanism: no rotation, X, Y and Z rotation,
// scaling, translation, rotation combined with scaling, orthographic,
// perspective and free display modes, back-to-back vertices and the reset.
// A mechanism that never occurred counts as a failure.
module gfx_top_tb;
  import fp_ref_pkg::*;
  localparam real PI  = 3.14159265358979323846;
  localparam int  LAT = 60;
  localparam int  N_RANDOM = 600;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid, out_valid;
  logic [31:0] xin, yin, zin, win, tx, ty, tz, sx, sy, sz, d;
  logic [9:0]  alpha;
  logic [3:0]  rvst;
  logic [1:0]  mode;
  logic [31:0] xans, yans, zans, wans;
  int checks = 0, failures = 0;
  longint cycle = 0;

  gfx_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [31:0] xin, yin, zin, win, tx, ty, tz, sx, sy, sz, d;
    logic [9:0]  alpha;
    logic [3:0]  rvst;
    logic [1:0]  mode;
    logic        exact;
    logic [31:0] ex, ey, ez, ew;        // exact expectation (part 1)
  } job_t;

  job_t   jobs [$];
  job_t   pend [$];
  longint pend_t [$];

  // mechanism counters
  int n_rot[4], n_scale, n_trans, n_rotscale, n_mode[4], n_b2b, n_reset;

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  // real-arithmetic model; returns expected vector and error bounds
  task automatic model(input job_t j, output real e[4], output real tol[4]);
    real m[4][4], v[4], t[4], terr[4], c, s, ang, f, ferr;
    logic [1:0] rv;
    ang = real'(((int'(j.alpha) % 360) / 15) * 15) * PI / 180.0;
    c = $cos(ang); s = $sin(ang);
    if (c < 1e-9 && c > -1e-9) c = 0.0;
    if (s < 1e-9 && s > -1e-9) s = 0.0;
    rv = j.rvst[3:2];
    for (int r = 0; r < 4; r++) for (int k = 0; k < 4; k++) m[r][k] = (r == k) ? 1.0 : 0.0;
    if (j.rvst[1]) begin m[0][0] = fp2r(j.sx); m[1][1] = fp2r(j.sy); m[2][2] = fp2r(j.sz); end
    if (j.rvst[0]) begin m[0][3] = fp2r(j.tx); m[1][3] = fp2r(j.ty); m[2][3] = fp2r(j.tz); end
    case (rv)
      2'b01: begin m[1][1] = c * (j.rvst[1] ? fp2r(j.sy) : 1.0); m[1][2] = -s;
                   m[2][1] = s; m[2][2] = c * (j.rvst[1] ? fp2r(j.sz) : 1.0); end
      2'b10: begin m[0][0] = c * (j.rvst[1] ? fp2r(j.sx) : 1.0); m[0][2] = s;
                   m[2][0] = -s; m[2][2] = c * (j.rvst[1] ? fp2r(j.sz) : 1.0); end
      2'b11: begin m[0][0] = c * (j.rvst[1] ? fp2r(j.sx) : 1.0); m[0][1] = -s;
                   m[1][0] = s; m[1][1] = c * (j.rvst[1] ? fp2r(j.sy) : 1.0); end
      default: ;
    endcase
    v = '{fp2r(j.xin), fp2r(j.yin), fp2r(j.zin), fp2r(j.win)};
    for (int r = 0; r < 4; r++) begin
      t[r] = 0.0; terr[r] = 0.0;
      for (int k = 0; k < 4; k++) begin
        t[r] += m[r][k] * v[k];
        terr[r] += absr(m[r][k] * v[k]);
      end
      terr[r] = terr[r] * 1e-6 + 1e-30;
    end
    case (j.mode)
      2'b00: begin e = '{t[0], t[1], 0.0, 0.0}; tol = '{terr[0], terr[1], 0.0, 0.0}; end
      2'b01: begin
        f = fp2r(j.d) / t[2];
        ferr = absr(f) * (1e-6 + terr[2] / absr(t[2]));
        e   = '{f * t[0], f * t[1], fp2r(j.d), 1.0};
        tol = '{absr(f) * terr[0] + absr(t[0]) * ferr + 1e-6 * absr(f * t[0]),
                absr(f) * terr[1] + absr(t[1]) * ferr + 1e-6 * absr(f * t[1]), 0.0, 0.0};
      end
      default: begin e = '{0.0, 0.0, 0.0, 0.0}; tol = '{0.0, 0.0, 0.0, 0.0}; end
    endcase
  endtask

  function automatic logic [31:0] rnd_val(input real lo, input real hi);
    return r2fp(lo + (hi - lo) * real'($urandom % 100000) / 100000.0);
  endfunction

  task automatic drive(input job_t j);
    in_valid <= 1'b1;
    xin <= j.xin; yin <= j.yin; zin <= j.zin; win <= j.win;
    tx <= j.tx; ty <= j.ty; tz <= j.tz; sx <= j.sx; sy <= j.sy; sz <= j.sz;
    alpha <= j.alpha; rvst <= j.rvst; mode <= j.mode; d <= j.d;
  endtask

  task automatic idle();
    in_valid <= 1'b0;
    {xin, yin, zin, win, tx, ty, tz, sx, sy, sz, d} <= '0;
    alpha <= '0; rvst <= '0; mode <= '0;
  endtask

  // output checker
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      job_t j;
      longint t0;
      real e[4], tol[4];
      logic [31:0] got[4];
      got = '{xans, yans, zans, wans};
      checks++;
      if (pend.size() == 0) begin
        failures++;
        $display("unexpected out_valid at cycle %0d", cycle);
      end else begin
        j = pend.pop_front();
        t0 = pend_t.pop_front();
        checks++;
        if (cycle - t0 != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - t0, LAT);
        end
        if (j.exact) begin
          checks++;
          if (got[0] !== j.ex || got[1] !== j.ey || got[2] !== j.ez || got[3] !== j.ew) begin
            failures++;
            $display("example: got (%h %h %h %h) want (%h %h %h %h)", got[0], got[1], got[2], got[3],
                     j.ex, j.ey, j.ez, j.ew);
          end
        end else begin
          model(j, e, tol);
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (absr(fp2r(got[k]) - e[k]) > tol[k]) begin
              failures++;
              if (failures < 10)
                $display("vertex rvst=%b mode=%b a=%0d coord %0d: got %g want %g (tol %g)",
                         j.rvst, j.mode, j.alpha, k, fp2r(got[k]), e[k], tol[k]);
            end
          end
        end
      end
    end
  end

  task automatic issue(input job_t j);
    drive(j);
    @(posedge clk);
    pend.push_back(j);
    pend_t.push_back(cycle);
    n_rot[j.rvst[3:2]]++;
    if (j.rvst[1]) n_scale++;
    if (j.rvst[0]) n_trans++;
    if (j.rvst[1] && j.rvst[3:2] != 2'b00) n_rotscale++;
    n_mode[j.mode]++;
  endtask

  function automatic job_t ex_job(input real x, y, z, w, input logic [3:0] rv, input int a,
                                  input real ttx, tty, ttz, ssx, ssy, ssz,
                                  input logic [1:0] md, input real dd,
                                  input real ox, oy, oz, ow);
    job_t j;
    j.xin = r2fp(x); j.yin = r2fp(y); j.zin = r2fp(z); j.win = r2fp(w);
    j.rvst = rv; j.alpha = 10'(a);
    j.tx = r2fp(ttx); j.ty = r2fp(tty); j.tz = r2fp(ttz);
    j.sx = r2fp(ssx); j.sy = r2fp(ssy); j.sz = r2fp(ssz);
    j.mode = md; j.d = r2fp(dd); j.exact = 1'b1;
    j.ex = r2fp(ox); j.ey = r2fp(oy); j.ez = r2fp(oz); j.ew = r2fp(ow);
    return j;
  endfunction

  initial begin
    idle();
    repeat (4) @(posedge clk);
    #1;
    checks++; if (out_valid || xans !== '0 || yans !== '0) failures++;
    rst = 1'b0;
    @(posedge clk);

    // ---- part 1: worked examples, one at a time ----
    issue(ex_job(2, 2, 2, 1, 4'b0011,   0, 4, 0, 0, 1, 2, 1, 2'b01, 1,  3,  2, 1, 1));
    idle(); repeat (LAT + 2) @(posedge clk);
    issue(ex_job(2, 2, 2, 1, 4'b1100, 180, 0, 0, 0, 1, 1, 1, 2'b01, 1, -1, -1, 1, 1));
    idle(); repeat (LAT + 2) @(posedge clk);
    issue(ex_job(2, 2, 2, 1, 4'b1111, 180, 0, 0, 2, 1, 2, 1, 2'b01, 1, -0.5, -1, 1, 1));
    idle(); repeat (LAT + 2) @(posedge clk);
    issue(ex_job(1, 1, 1, 1, 4'b0011,   0, 3, 0, 0, 1, 2, 1, 2'b00, 1,  4,  2, 0, 0));
    idle(); repeat (LAT + 2) @(posedge clk);
    issue(ex_job(2, 1, -2, 1, 4'b0001,  0, 1, 0, 0, 1, 1, 1, 2'b00, 1,  3,  1, 0, 0));
    idle(); repeat (LAT + 2) @(posedge clk);

    // ---- part 2: random vertices back to back ----
    for (int i = 0; i < N_RANDOM; i++) begin
      job_t j;
      j.xin = rnd_val(-10, 10); j.yin = rnd_val(-10, 10); j.zin = rnd_val(-10, 10);
      j.win = r2fp(1.0);
      j.tx = rnd_val(-5, 5); j.ty = rnd_val(-5, 5); j.tz = rnd_val(50, 70);
      j.sx = rnd_val(0.5, 3); j.sy = rnd_val(0.5, 3); j.sz = rnd_val(0.5, 3);
      j.alpha = 10'($urandom % 1024);
      j.rvst = 4'($urandom);
      j.mode = 2'($urandom % 8 == 0 ? 2 + $urandom % 2 : $urandom % 2);
      j.d = rnd_val(0.5, 4);
      j.exact = 1'b0;
      // keep perspective away from Z near 0: project with d = 1 and, if X/Z
      // or Y/Z is huge, turn translation on (Tz >= 50 moves Z well past 0)
      if (j.mode == 2'b01) begin
        real pe[4], ptol[4];
        job_t jo;
        jo = j; jo.d = r2fp(1.0);
        model(jo, pe, ptol);
        if (absr(pe[0]) > 1e3 || absr(pe[1]) > 1e3) j.rvst[0] = 1'b1;
      end
      if (i > 0) n_b2b++;
      issue(j);
    end
    idle();
    repeat (LAT + 5) @(posedge clk);

    // ---- reset in the middle of a stream ----
    for (int i = 0; i < 10; i++) begin
      job_t j;
      j = ex_job(1, 2, 3, 1, 4'b0011, 0, 1, 1, 1, 2, 2, 2, 2'b00, 1, 0, 0, 0, 0);
      drive(j);
      @(posedge clk);
    end
    idle();
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    n_reset++;
    repeat (LAT + 5) @(posedge clk);
    #1;
    checks++;
    if (out_valid || xans !== '0 || yans !== '0 || zans !== '0 || wans !== '0) begin
      failures++;
      $display("reset did not clear the pipeline");
    end

    checks++;
    if (pend.size() != 0) begin failures++; $display("%0d results missing", pend.size()); end

    $display("mechanisms: rot none=%0d X=%0d Y=%0d Z=%0d scale=%0d translate=%0d rot+scale=%0d",
             n_rot[0], n_rot[1], n_rot[2], n_rot[3], n_scale, n_trans, n_rotscale);
    $display("            ortho=%0d persp=%0d free=%0d back-to-back=%0d reset=%0d",
             n_mode[0], n_mode[1], n_mode[2] + n_mode[3], n_b2b, n_reset);
    for (int k = 0; k < 4; k++) begin checks++; if (n_rot[k] == 0) failures++; end
    checks++; if (n_scale == 0) failures++;
    checks++; if (n_trans == 0) failures++;
    checks++; if (n_rotscale == 0) failures++;
    checks++; if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] + n_mode[3] == 0) failures++;
    checks++; if (n_b2b == 0) failures++;
    checks++; if (n_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
