// ortho_proj_tb: streams random vectors; one cycle later the output must be
// (X, Y, 0, 0) of the vector that entered. The output is zero after reset.
module ortho_proj_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  vec4_t v, o;
  int checks = 0, failures = 0;

  ortho_proj dut (.clk, .rst, .v, .o);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '{x: 32'h4000_0000, y: 32'h4000_0000, z: 32'h4000_0000, w: 32'h3F80_0000};
    repeat (3) @(posedge clk);
    #1;
    checks++; if (o !== '0) failures++;
    rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      vec4_t vin;
      vin = '{x: rand_fp(1, 254), y: rand_fp(1, 254), z: rand_fp(1, 254), w: rand_fp(1, 254)};
      v = vin;
      @(posedge clk);
      #1;
      checks++;
      if (o !== '{x: vin.x, y: vin.y, z: 32'd0, w: 32'd0}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
