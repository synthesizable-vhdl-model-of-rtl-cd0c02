// bh_multiplier: scaling block of the behavioural transform design.
//
// Three sign-magnitude multipliers, one per axis: ans1 = X * Sx,
// ans2 = Y * Sy, ans3 = Z * Sz. The magnitudes are multiplied as unsigned
// numbers and the sign is the exclusive or of the input signs, as in the
// reference design; the 16-bit result magnitude, wide enough to hold every
// product, is this design's choice. Combinational, no latency.
module bh_multiplier
  import sm_pkg::*;
(
  input  sm_in_t  xin, yin, zin,
  input  sm_in_t  sx, sy, sz,
  output sm_res_t ans1, ans2, ans3
);
  always_comb begin
    ans1 = sm_mul(xin, sx);
    ans2 = sm_mul(yin, sy);
    ans3 = sm_mul(zin, sz);
  end
endmodule
