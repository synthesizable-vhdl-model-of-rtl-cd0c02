// matrix_builder_tb: streams random mode words, scales, translations and
// cosine/sine values, one set per cycle, through the matrix builder. Each
// set's matrix is checked exactly 8 cycles later. The expected matrix is
// written out element by element in this testbench:
//   * identity; the scales replace the diagonal when S is set;
//   * the translations fill column 4 when T is set;
//   * the chosen axis' cos, sin and -sin go in the rotation places;
//   * cos*S replaces a rotated diagonal entry when S is also set.
// cos*S is formed in double precision and rounded to single. The testbench
// counts each of the four rotation settings with and without S and T; a
// setting that never occurred counts as a failure.
module matrix_builder_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  localparam int LAT = 8;
  logic clk = 1'b0, rst = 1'b1;
  rvst_t rvst;
  logic [31:0] sx, sy, sz, tx, ty, tz, c, s, ms;
  mat4_t m;
  int checks = 0, failures = 0;
  int seen [16];

  matrix_builder dut (.clk, .rst, .rvst, .sx, .sy, .sz, .tx, .ty, .tz,
                      .cos_i(c), .sin_i(s), .msin_i(ms), .m(m));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mulr(input logic [31:0] x, input logic [31:0] y);
    return r2fp(fp2r(x) * fp2r(y));
  endfunction

  function automatic mat4_t ref_m(input rvst_t r, input logic [31:0] Sx, Sy, Sz, Tx, Ty, Tz,
                                  input logic [31:0] C, S, MS);
    mat4_t e;
    e = '0;
    e[0][0] = r.s ? Sx : 32'h3F80_0000;
    e[1][1] = r.s ? Sy : 32'h3F80_0000;
    e[2][2] = r.s ? Sz : 32'h3F80_0000;
    e[3][3] = 32'h3F80_0000;
    if (r.t) begin e[0][3] = Tx; e[1][3] = Ty; e[2][3] = Tz; end
    case (r.rv)
      2'b01: begin
        e[1][1] = r.s ? mulr(C, Sy) : C;  e[1][2] = MS;
        e[2][1] = S;                      e[2][2] = r.s ? mulr(C, Sz) : C;
      end
      2'b10: begin
        e[0][0] = r.s ? mulr(C, Sx) : C;  e[0][2] = S;
        e[2][0] = MS;                     e[2][2] = r.s ? mulr(C, Sz) : C;
      end
      2'b11: begin
        e[0][0] = r.s ? mulr(C, Sx) : C;  e[0][1] = MS;
        e[1][0] = S;                      e[1][1] = r.s ? mulr(C, Sy) : C;
      end
      default: ;
    endcase
    return e;
  endfunction

  mat4_t exp_q [$];

  initial begin
    rvst = '0; {sx, sy, sz, tx, ty, tz, c, s, ms} = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (m !== '0) failures++;
    rst = 1'b0;
    for (int i = 0; i < 400 + LAT; i++) begin
      if (i < 400) begin
        rvst = rvst_t'(4'(i));         // every mode in turn
        sx = rand_fp(120, 130); sy = rand_fp(120, 130); sz = rand_fp(120, 130);
        tx = rand_fp(120, 130); ty = rand_fp(120, 130); tz = rand_fp(120, 130);
        c  = rand_fp(120, 126); s = rand_fp(120, 126); ms = {~s[31], s[30:0]};
        exp_q.push_back(ref_m(rvst, sx, sy, sz, tx, ty, tz, c, s, ms));
        seen[4'(rvst)]++;
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && i - (LAT - 1) < 400) begin
        checks++;
        if (m !== exp_q[i - (LAT - 1)]) begin
          failures++;
          if (failures < 5) $display("matrix %0d mismatch", i - (LAT - 1));
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
