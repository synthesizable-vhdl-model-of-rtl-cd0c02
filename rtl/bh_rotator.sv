// bh_rotator: quarter-turn rotations of the behavioural transform design.
//
// With only 0, 90, 180 and 270 degrees, a rotation needs no cosine or sine:
// the two coordinates of the rotated plane swap places and change sign, and
// the coordinate along the axis passes unchanged. axis_sel: 00 none,
// 01 X, 10 Y, 11 Z (the same code as the RV field of the main design);
// angle_sel: 00 0 (or 360), 01 90, 10 180, 11 270 degrees.
// The turn direction follows the reference design's own example: (2, 2, 2)
// turned 90 degrees about Z becomes (2, -2, 2). For a plane (u, v) that is
// (u, v) -> (v, -u) for 90 degrees, (-u, -v) for 180 and (-v, u) for 270,
// with the planes (Y, Z) for X, (Z, X) for Y and (X, Y) for Z. The
// reference design names the angles and the sign changes; the swaps and
// the code values are this design's choice. Combinational, no latency.
module bh_rotator
  import sm_pkg::*;
(
  input  sm_in_t     xin, yin, zin,
  input  logic [1:0] axis_sel,
  input  logic [1:0] angle_sel,
  output sm_res_t    ans1, ans2, ans3
);
  sm_res_t x, y, z, u, v, u2, v2;

  always_comb begin
    x = sm_widen(xin);
    y = sm_widen(yin);
    z = sm_widen(zin);
    // pick the plane being turned
    unique case (axis_sel)
      2'b01:   begin u = y; v = z; end
      2'b10:   begin u = z; v = x; end
      default: begin u = x; v = y; end
    endcase
    unique case (angle_sel)
      2'b01:   begin u2 = v;         v2 = sm_neg(u); end
      2'b10:   begin u2 = sm_neg(u); v2 = sm_neg(v); end
      2'b11:   begin u2 = sm_neg(v); v2 = u;         end
      default: begin u2 = u;         v2 = v;         end
    endcase
    {ans1, ans2, ans3} = {x, y, z};
    unique case (axis_sel)
      2'b01:   begin ans2 = u2; ans3 = v2; end
      2'b10:   begin ans3 = u2; ans1 = v2; end
      2'b11:   begin ans1 = u2; ans2 = v2; end
      default: ;
    endcase
  end
endmodule
