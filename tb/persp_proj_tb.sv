// persp_proj_tb: streams random vectors and front plane distances d.
// Exactly 26 cycles later the output must be (d/Z * X, d/Z * Y, d, 1). d/Z is
// rounded to single precision before the products, as the unit does. The
// stream starts with the reference design's example: (6, 4, 2) with d = 1
// projects to (3, 2, 1, 1).
module persp_proj_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  localparam int LAT = 26;
  localparam int N = 300;
  logic clk = 1'b0, rst = 1'b1;
  vec4_t v, o;
  logic [31:0] d;
  int checks = 0, failures = 0;

  persp_proj dut (.clk, .rst, .v, .d, .o);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec4_t vq [$], eq [$];
  logic [31:0] dq [$];

  initial begin
    vq.push_back('{x: 32'h40C0_0000, y: 32'h4080_0000, z: 32'h4000_0000, w: 32'h3F80_0000});
    dq.push_back(32'h3F80_0000);
    eq.push_back('{x: 32'h4040_0000, y: 32'h4000_0000, z: 32'h3F80_0000, w: 32'h3F80_0000});
    for (int i = 1; i < N; i++) begin
      vec4_t vi;
      logic [31:0] di, f;
      vi = '{x: rand_fp(110, 140), y: rand_fp(110, 140), z: rand_fp(110, 140), w: rand_fp(110, 140)};
      di = rand_fp(110, 140);
      f  = r2fp(fp2r(di) / fp2r(vi.z));
      vq.push_back(vi); dq.push_back(di);
      eq.push_back('{x: r2fp(fp2r(f) * fp2r(vi.x)), y: r2fp(fp2r(f) * fp2r(vi.y)),
                     z: di, w: 32'h3F80_0000});
    end
    v = '0; d = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (o !== '0) failures++;
    rst = 1'b0;
    for (int i = 0; i < N + LAT; i++) begin
      v = (i < N) ? vq[i] : '0;
      d = (i < N) ? dq[i] : '0;
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && i - (LAT - 1) < N) begin
        checks++;
        if (o !== eq[i - (LAT - 1)]) begin
          failures++;
          if (failures < 5) $display("proj %0d: got %h want %h", i - (LAT - 1), o, eq[i - (LAT - 1)]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
