// bh_adder_tb: random and corner sign-magnitude operands, including equal
// magnitudes of opposite sign; each of the three sums must equal the
// integer sum, with +0 for a zero result.
module bh_adder_tb;
  import sm_pkg::*;
  import sm_ref_pkg::*;
  sm_in_t xin, yin, zin, tx, ty, tz;
  sm_res_t a1, a2, a3;
  int checks = 0, failures = 0;

  bh_adder dut (.xin, .yin, .zin, .tx, .ty, .tz, .ans1(a1), .ans2(a2), .ans3(a3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      {xin, yin, zin, tx, ty, tz} = {rand_in(), rand_in(), rand_in(), rand_in(), rand_in(), rand_in()};
      if (n % 7 == 0) tx = {~xin[MAG_W], xin[MAG_W-1:0]};   // exact cancellation
      #1;
      checks += 3;
      if (a1 !== i2sm(in2i(xin) + in2i(tx))) failures++;
      if (a2 !== i2sm(in2i(yin) + in2i(ty))) failures++;
      if (a3 !== i2sm(in2i(zin) + in2i(tz))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
