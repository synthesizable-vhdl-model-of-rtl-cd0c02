// behav_top: small integer transform design, the behavioural forerunner of
// the floating point pipeline.
//
// It computes each transform separately rather than through a matrix:
//   bh_adder       translated point (X + Tx, Y + Ty, Z + Tz)
//   bh_multiplier  scaled point     (X * Sx, Y * Sy, Z * Sz)
//   bh_rotator     point turned by 0, 90, 180 or 270 degrees about X, Y or Z
// All three run every cycle; bh_mux_9_to_3 picks one by mode_sel and a
// register block (pipe_delay) registers the three coordinates so they
// change together. Taking only xans and yans gives an orthographic view.
// Values are sign-magnitude integers: 9-bit inputs and 17-bit results
// (see sm_pkg). This structure follows the reference design's behavioural
// stage; the number widths, the select codes and the reset are this
// design's choice.
// Interface: inputs may change every cycle; the selected result appears on
// xans, yans, zans one clock edge later. Reset is synchronous, active high,
// and clears the outputs.
module behav_top
  import sm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  sm_in_t     xin, yin, zin,
  input  sm_in_t     tx, ty, tz,
  input  sm_in_t     sx, sy, sz,
  input  logic [1:0] axis_sel,
  input  logic [1:0] angle_sel,
  input  logic [1:0] mode_sel,
  output sm_res_t    xans, yans, zans
);
  sm_res_t t1, t2, t3, s1, s2, s3, r1, r2, r3, ax, ay, az;

  bh_adder      u_add (.xin, .yin, .zin, .tx, .ty, .tz, .ans1(t1), .ans2(t2), .ans3(t3));
  bh_multiplier u_mul (.xin, .yin, .zin, .sx, .sy, .sz, .ans1(s1), .ans2(s2), .ans3(s3));
  bh_rotator    u_rot (.xin, .yin, .zin, .axis_sel, .angle_sel, .ans1(r1), .ans2(r2), .ans3(r3));

  bh_mux_9_to_3 u_mux (
    .tx_x(t1), .ty_y(t2), .tz_z(t3), .sx_x(s1), .sy_y(s2), .sz_z(s3),
    .rot_x(r1), .rot_y(r2), .rot_z(r3),
    .pass_x(sm_widen(xin)), .pass_y(sm_widen(yin)), .pass_z(sm_widen(zin)),
    .mode_sel, .ans_x(ax), .ans_y(ay), .ans_z(az)
  );

  pipe_delay #(.WIDTH(3 * (RES_W + 1)), .DEPTH(1)) u_reg (
    .clk, .rst, .d({ax, ay, az}), .q({xans, yans, zans})
  );
endmodule
