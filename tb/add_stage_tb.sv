// add_stage_tb: streams sixteen random products every cycle. Each output
// coordinate must equal (p[r][0] + p[r][1]) + (p[r][2] + p[r][3]), each sum
// rounded to single precision as the two adder levels do, exactly 17 cycles
// later. Exponents are kept within a range where double precision sums are
// exact before rounding. A directed case from the reference design's
// multiply-add test is included: the products of (2, 1, -2, 1) with a matrix
// that translates X by 1 give (3, 1, -2, 1).
module add_stage_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  localparam int LAT = 17;
  localparam int N = 300;
  logic clk = 1'b0, rst = 1'b1;
  mat4_t p;
  vec4_t ans;
  int checks = 0, failures = 0;

  add_stage dut (.clk, .rst, .p, .ans);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] addr(input logic [31:0] x, input logic [31:0] y);
    return r2fp(fp2r(x) + fp2r(y));
  endfunction

  vec4_t exp_q [$];
  mat4_t in_q [$];

  initial begin
    mat4_t d;
    // directed: X row 2*1 + 1*0 + -2*0 + 1*1, other rows identity products
    d = '0;
    d[0][0] = 32'h4000_0000; d[0][3] = 32'h3F80_0000; d[0][1] = 32'h0; d[0][2] = 32'h0;
    d[1][1] = 32'h3F80_0000;
    d[2][2] = 32'hC000_0000;
    d[3][3] = 32'h3F80_0000;
    in_q.push_back(d);
    exp_q.push_back('{x: 32'h4040_0000, y: 32'h3F80_0000, z: 32'hC000_0000, w: 32'h3F80_0000});
    for (int i = 1; i < N; i++) begin
      vec4_t e;
      logic [31:0] r4 [4];
      for (int r = 0; r < 4; r++) begin
        for (int c = 0; c < 4; c++) d[r][c] = rand_fp(118, 132);
        r4[r] = addr(addr(d[r][0], d[r][1]), addr(d[r][2], d[r][3]));
      end
      e = '{x: r4[0], y: r4[1], z: r4[2], w: r4[3]};
      in_q.push_back(d);
      exp_q.push_back(e);
    end
    p = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (ans !== '0) failures++;
    rst = 1'b0;
    for (int i = 0; i < N + LAT; i++) begin
      p = (i < N) ? in_q[i] : '0;
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && i - (LAT - 1) < N) begin
        checks++;
        if (ans !== exp_q[i - (LAT - 1)]) begin
          failures++;
          if (failures < 5) $display("sum %0d: got %h want %h", i - (LAT - 1), ans, exp_q[i - (LAT - 1)]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
