// mult_handler_tb: issues the 19 products of the shared multiplier in a
// random order, with random idle cycles between issues, for a random vector,
// matrix, cos and scales. After the last done pulse every product register
// must hold the right value, computed in double precision and rounded to
// single, and exactly 19 done pulses must have appeared, each LATENCY cycles
// after its issue. Run at the default latency and at latency 1 (a
// multiplier that answers on the next clock edge).
module mult_handler_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  localparam int ROUNDS = 40;
  logic clk = 1'b0, rst = 1'b1;
  logic issue;
  logic [4:0] sel;
  vec4_t v;
  mat4_t m, p7, p1;
  logic [31:0] c, sx, sy, sz, cx7, cy7, cz7, cx1, cy1, cz1;
  logic done7, done1;
  int checks = 0, failures = 0;

  mult_handler #(.LATENCY(MUL_LAT)) dut7 (.clk, .rst, .issue, .sel, .v, .m, .c, .sx, .sy, .sz,
                                          .p(p7), .cs_x(cx7), .cs_y(cy7), .cs_z(cz7), .done(done7));
  mult_handler #(.LATENCY(1)) dut1 (.clk, .rst, .issue, .sel, .v, .m, .c, .sx, .sy, .sz,
                                    .p(p1), .cs_x(cx1), .cs_y(cy1), .cs_z(cz1), .done(done1));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // done pulses: count them and check their timing against the issues
  int n7 = 0, n1 = 0, cyc = 0;
  int iss_cyc [$];
  int iss_cyc1 [$];
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (issue) begin
        iss_cyc.push_back(cyc);
        iss_cyc1.push_back(cyc);
      end
      if (done7) begin
        n7++;
        checks++;
        if (iss_cyc.size() == 0 || cyc - iss_cyc.pop_front() != MUL_LAT) failures++;
      end
      if (done1) begin
        n1++;
        checks++;
        if (iss_cyc1.size() == 0 || cyc - iss_cyc1.pop_front() != 1) failures++;
      end
    end
  end

  function automatic logic [31:0] mul(input logic [31:0] a, input logic [31:0] b);
    return r2fp(fp2r(a) * fp2r(b));
  endfunction

  initial begin
    issue = 1'b0; sel = '0; v = '0; m = '0; {c, sx, sy, sz} = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (p7 !== '0 || cx7 !== '0 || done7 !== 1'b0) failures++;
    rst = 1'b0;
    for (int rnd = 0; rnd < ROUNDS; rnd++) begin
      int order [19];
      logic [31:0] col [4];
      v = '{x: rand_fp(110, 140), y: rand_fp(110, 140), z: rand_fp(110, 140), w: rand_fp(110, 140)};
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 4; k++) m[r][k] = rand_fp(110, 140);
      {c, sx, sy, sz} = {rand_fp(110, 140), rand_fp(110, 140), rand_fp(110, 140), rand_fp(110, 140)};
      col = '{v.x, v.y, v.z, v.w};
      for (int k = 0; k < 19; k++) order[k] = k;
      order.shuffle();
      n7 = 0; n1 = 0;
      for (int k = 0; k < 19; k++) begin
        while ($urandom_range(0, 2) == 0) begin
          issue = 1'b0;
          @(posedge clk);
          #1;
        end
        issue = 1'b1;
        sel = 5'(order[k]);
        @(posedge clk);
        #1;
      end
      issue = 1'b0;
      repeat (MUL_LAT + 1) @(posedge clk);
      #1;
      checks += 2;
      if (n7 != 19) failures++;
      if (n1 != 19) failures++;
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 4; k++) begin
          checks += 2;
          if (p7[r][k] !== mul(m[r][k], col[k])) failures++;
          if (p1[r][k] !== mul(m[r][k], col[k])) failures++;
        end
      checks += 6;
      if (cx7 !== mul(c, sx) || cx1 !== mul(c, sx)) failures++;
      if (cy7 !== mul(c, sy) || cy1 !== mul(c, sy)) failures++;
      if (cz7 !== mul(c, sz) || cz1 !== mul(c, sz)) failures++;
      if (cx7 === cy7) failures++;
      if (cy7 === cz7) failures++;
      if (p7[0][0] === p7[1][1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
