// matrix_select_tb: random mode words and values, every matrix element
// checked against a model that describes each rotation by its pair of
// rotated axes (i, j): X rotates (Y, Z), Y rotates (Z, X), Z rotates (X, Y).
// For the pair, m[i][j] = -sin and m[j][i] = sin; the diagonal places hold
// cos, or cos*S when scaling. All 16 mode words are covered many times.
module matrix_select_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  localparam int N = 400;
  localparam logic [31:0] ONE = 32'h3F80_0000;
  rvst_t rvst;
  logic [31:0] sx, sy, sz, tx, ty, tz, c, s, ms, cs_x, cs_y, cs_z;
  mat4_t m;
  int checks = 0, failures = 0;
  int seen [16];

  matrix_select dut (.rvst, .sx, .sy, .sz, .tx, .ty, .tz, .c, .s, .ms,
                     .cs_x, .cs_y, .cs_z, .m);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) begin
      mat4_t e;
      logic [31:0] sc [3], cs [3];
      int i, j;
      rvst = rvst_t'(4'(n % 16));
      seen[n % 16]++;
      {sx, sy, sz, tx, ty, tz} = {rand_fp(100, 150), rand_fp(100, 150), rand_fp(100, 150),
                                  rand_fp(100, 150), rand_fp(100, 150), rand_fp(100, 150)};
      {c, s, cs_x, cs_y, cs_z} = {rand_fp(100, 150), rand_fp(100, 150), rand_fp(100, 150),
                                  rand_fp(100, 150), rand_fp(100, 150)};
      ms = {~s[31], s[30:0]};
      sc = '{sx, sy, sz};
      cs = '{cs_x, cs_y, cs_z};
      e = '0;
      for (int k = 0; k < 3; k++) e[k][k] = rvst.s ? sc[k] : ONE;
      e[3][3] = ONE;
      if (rvst.t) begin
        e[0][3] = tx; e[1][3] = ty; e[2][3] = tz;
      end
      if (rvst.rv != ROT_NONE) begin
        i = (rvst.rv == ROT_X) ? 1 : (rvst.rv == ROT_Y) ? 2 : 0;
        j = (i + 1) % 3;
        e[i][i] = rvst.s ? cs[i] : c;
        e[j][j] = rvst.s ? cs[j] : c;
        e[i][j] = ms;
        e[j][i] = s;
      end
      #1;
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (m[r][k] !== e[r][k]) begin
            failures++;
            if (failures < 5)
              $display("rvst %b m[%0d][%0d] = %h, expected %h", rvst, r, k, m[r][k], e[r][k]);
          end
        end
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
