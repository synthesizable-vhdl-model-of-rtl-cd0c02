// display_stage_tb: streams random vectors, each with a random display mode:
// orthographic (00), perspective (01) or a free code (10, 11). Exactly 26
// cycles later, for every mode, the output must be (X, Y, 0, 0) for
// orthographic, (d/Z * X, d/Z * Y, d, 1) for perspective and zero for the
// free codes. The modes change from one cycle to the next, so this also
// checks that vectors leave in order. Each mode must occur at least once.
module display_stage_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  localparam int LAT = 26;
  localparam int N = 400;
  logic clk = 1'b0, rst = 1'b1;
  disp_mode_e mode;
  vec4_t v, o;
  logic [31:0] d;
  int checks = 0, failures = 0;
  int seen [4];

  display_stage dut (.clk, .rst, .mode, .v, .d, .o);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec4_t vq [$], eq [$];
  logic [31:0] dq [$];
  logic [1:0] mq [$];

  initial begin
    for (int i = 0; i < N; i++) begin
      vec4_t vi, e;
      logic [31:0] di, f;
      logic [1:0] mi;
      vi = '{x: rand_fp(110, 140), y: rand_fp(110, 140), z: rand_fp(110, 140), w: rand_fp(110, 140)};
      di = rand_fp(110, 140);
      mi = (i < 4) ? 2'(i) : 2'($urandom);
      f  = r2fp(fp2r(di) / fp2r(vi.z));
      case (mi)
        2'b00:   e = '{x: vi.x, y: vi.y, z: 32'd0, w: 32'd0};
        2'b01:   e = '{x: r2fp(fp2r(f) * fp2r(vi.x)), y: r2fp(fp2r(f) * fp2r(vi.y)),
                       z: di, w: 32'h3F80_0000};
        default: e = '0;
      endcase
      seen[mi]++;
      vq.push_back(vi); dq.push_back(di); mq.push_back(mi); eq.push_back(e);
    end
    v = '0; d = '0; mode = DISP_ORTHO;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (o !== '0) failures++;
    rst = 1'b0;
    for (int i = 0; i < N + LAT; i++) begin
      v    = (i < N) ? vq[i] : '0;
      d    = (i < N) ? dq[i] : '0;
      mode = disp_mode_e'((i < N) ? mq[i] : 2'b00);
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && i - (LAT - 1) < N) begin
        checks++;
        if (o !== eq[i - (LAT - 1)]) begin
          failures++;
          if (failures < 5) $display("out %0d (mode %0d): got %h want %h", i - (LAT - 1),
                                     mq[i - (LAT - 1)], o, eq[i - (LAT - 1)]);
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
