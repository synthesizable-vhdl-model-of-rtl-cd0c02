// bh_multiplier_tb: random and corner sign-magnitude operands (zero, minus
// zero, largest magnitude); each of the three products must equal the
// integer product, with +0 for a zero result.
module bh_multiplier_tb;
  import sm_pkg::*;
  import sm_ref_pkg::*;
  sm_in_t xin, yin, zin, sx, sy, sz;
  sm_res_t a1, a2, a3;
  int checks = 0, failures = 0;

  bh_multiplier dut (.xin, .yin, .zin, .sx, .sy, .sz, .ans1(a1), .ans2(a2), .ans3(a3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      {xin, yin, zin, sx, sy, sz} = {rand_in(), rand_in(), rand_in(), rand_in(), rand_in(), rand_in()};
      #1;
      checks += 3;
      if (a1 !== i2sm(in2i(xin) * in2i(sx))) failures++;
      if (a2 !== i2sm(in2i(yin) * in2i(sy))) failures++;
      if (a3 !== i2sm(in2i(zin) * in2i(sz))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
