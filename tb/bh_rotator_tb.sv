// bh_rotator_tb: every axis and angle code on random points, against
// integer rotation matrices at -90 * k degrees, plus the reference design's
// example: (2, 2, 2) turned 90 degrees about Z gives (2, -2, 2).
module bh_rotator_tb;
  import sm_pkg::*;
  import sm_ref_pkg::*;
  sm_in_t xin, yin, zin;
  logic [1:0] axis_sel, angle_sel;
  sm_res_t a1, a2, a3;
  int checks = 0, failures = 0;

  bh_rotator dut (.xin, .yin, .zin, .axis_sel, .angle_sel, .ans1(a1), .ans2(a2), .ans3(a3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xin = 9'd2; yin = 9'd2; zin = 9'd2; axis_sel = 2'b11; angle_sel = 2'b01;
    #1;
    checks++;
    if (a1 !== i2sm(2) || a2 !== i2sm(-2) || a3 !== i2sm(2)) failures++;
    for (int n = 0; n < 1600; n++) begin
      int x, y, z;
      {xin, yin, zin} = {rand_in(), rand_in(), rand_in()};
      axis_sel = 2'(n % 4);
      angle_sel = 2'((n / 4) % 4);
      x = in2i(xin); y = in2i(yin); z = in2i(zin);
      rot_ref(int'(axis_sel), int'(angle_sel), x, y, z);
      #1;
      checks += 3;
      if (a1 !== i2sm(x)) failures++;
      if (a2 !== i2sm(y)) failures++;
      if (a3 !== i2sm(z)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
