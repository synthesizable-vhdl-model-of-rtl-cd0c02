// bh_adder: translation block of the behavioural transform design.
//
// Three sign-magnitude adders, one per axis: ans1 = X + Tx, ans2 = Y + Ty,
// ans3 = Z + Tz. Equal signs add the magnitudes; different signs subtract
// the smaller magnitude from the larger and keep the larger one's sign.
// The reference design describes the sign handling; the exact rules (zero
// is always +0, results one bit wider than the inputs so sums never
// overflow) are this design's choice. Combinational, no latency.
module bh_adder
  import sm_pkg::*;
(
  input  sm_in_t  xin, yin, zin,
  input  sm_in_t  tx, ty, tz,
  output sm_res_t ans1, ans2, ans3
);
  always_comb begin
    ans1 = sm_add(xin, tx);
    ans2 = sm_add(yin, ty);
    ans3 = sm_add(zin, tz);
  end
endmodule
