// mult_stage_tb: streams a random vector and matrix every cycle. Each of the
// sixteen products p[r][c] = v[c] * m[r][c] is checked exactly 8 cycles
// later, the stage's latency. Expected products are formed in double
// precision and rounded to single.
module mult_stage_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  localparam int LAT = 8;
  localparam int N = 300;
  logic clk = 1'b0, rst = 1'b1;
  vec4_t v;
  mat4_t m, p;
  int checks = 0, failures = 0;

  mult_stage dut (.clk, .rst, .v, .m, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mat4_t exp_q [$];

  initial begin
    v = '0; m = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (p !== '0) failures++;
    rst = 1'b0;
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        mat4_t e;
        logic [31:0] col [4];
        v = '{x: rand_fp(110, 140), y: rand_fp(110, 140), z: rand_fp(110, 140), w: rand_fp(110, 140)};
        col = '{v.x, v.y, v.z, v.w};
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            m[r][c] = rand_fp(110, 140);
            e[r][c] = r2fp(fp2r(col[c]) * fp2r(m[r][c]));
          end
        exp_q.push_back(e);
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && i - (LAT - 1) < N) begin
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            checks++;
            if (p[r][c] !== exp_q[i - (LAT - 1)][r][c]) failures++;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
