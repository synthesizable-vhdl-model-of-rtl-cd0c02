// mycossin_tb: sweeps every angle 0..1023. The expected cosine and sine come
// from the simulator's $cos and $sin at the angle reduced modulo 360 and
// rounded down to a multiple of 15 degrees. They are rounded to single
// precision, and exact zeros are taken as +0. The table output must match
// bit for bit.
module mycossin_tb;
  import fp_ref_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic [9:0]  alpha;
  logic [31:0] c, s;
  int checks = 0, failures = 0;

  mycossin dut (.alpha(alpha), .cos_o(c), .sin_o(s));

  function automatic logic [31:0] ref_of(input real v);
    if (v < 1e-9 && v > -1e-9) return 32'd0;
    return r2fp(v);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      real ang;
      alpha = 10'(a);
      #1;
      ang = real'(((a % 360) / 15) * 15) * PI / 180.0;
      checks += 2;
      if (c !== ref_of($cos(ang))) begin
        failures++;
        if (failures < 10) $display("cos(%0d): got %h want %h", a, c, ref_of($cos(ang)));
      end
      if (s !== ref_of($sin(ang))) begin
        failures++;
        if (failures < 10) $display("sin(%0d): got %h want %h", a, s, ref_of($sin(ang)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
