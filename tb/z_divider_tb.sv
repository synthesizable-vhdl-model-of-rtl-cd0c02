// z_divider_tb: streams random (Z, d) pairs. Exactly 17 cycles later Z/d and
// d/Z must equal the double precision quotients rounded to single
// precision. The stream includes the reference design's Z = 2, 4 and d = 1.
module z_divider_tb;
  import fp_ref_pkg::*;
  localparam int LAT = 17;
  localparam int N = 300;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] z, d, zd, dz;
  int checks = 0, failures = 0;

  z_divider dut (.clk, .rst, .z, .d, .z_over_d(zd), .d_over_z(dz));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] zq [$], dq [$];

  initial begin
    zq.push_back(32'h4000_0000); dq.push_back(32'h3F80_0000);   // Z = 2, d = 1
    zq.push_back(32'h4080_0000); dq.push_back(32'h3F80_0000);   // Z = 4, d = 1
    for (int i = 2; i < N; i++) begin
      zq.push_back(rand_fp(100, 150)); dq.push_back(rand_fp(100, 150));
    end
    z = '0; d = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (zd !== '0 || dz !== '0) failures++;
    rst = 1'b0;
    for (int i = 0; i < N + LAT; i++) begin
      z = (i < N) ? zq[i] : '0;
      d = (i < N) ? dq[i] : '0;
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && i - (LAT - 1) < N) begin
        int k;
        k = i - (LAT - 1);
        checks += 2;
        if (zd !== r2fp(fp2r(zq[k]) / fp2r(dq[k]))) failures++;
        if (dz !== r2fp(fp2r(dq[k]) / fp2r(zq[k]))) failures++;
      end
    end
    checks++; if (fp2r(32'h3F00_0000) != 0.5) failures++;  // helper sanity
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
