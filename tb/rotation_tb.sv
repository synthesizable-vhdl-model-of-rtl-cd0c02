// rotation_tb: applies a new random angle every cycle. One cycle later it
// checks cos, sin and -sin against the simulator's $cos and $sin at the
// angle reduced modulo 360 and rounded down to 15 degrees. -sin must be sin
// with its sign bit flipped. All three outputs must be zero after reset.
module rotation_tb;
  import fp_ref_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst = 1'b1;
  logic [9:0]  alpha;
  logic [31:0] c, s, ms;
  int checks = 0, failures = 0;

  rotation dut (.clk, .rst, .alpha(alpha), .cos_o(c), .sin_o(s), .msin_o(ms));

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_of(input real v);
    if (v < 1e-9 && v > -1e-9) return 32'd0;
    return r2fp(v);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    alpha = 10'd90;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (c !== '0 || s !== '0 || ms !== '0) failures++;
    rst = 1'b0;
    prev = -1;
    for (int i = 0; i < 600; i++) begin
      int a;
      a = (i < 25) ? i * 15 : int'($urandom % 1024);
      alpha = 10'(a);
      @(posedge clk);
      #1;
      begin
        real ang;
        logic [31:0] ws;
        ang = real'(((a % 360) / 15) * 15) * PI / 180.0;
        ws = ref_of($sin(ang));
        checks += 3;
        if (c !== ref_of($cos(ang))) failures++;
        if (s !== ws) failures++;
        if (ms !== {~ws[31], ws[30:0]}) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
