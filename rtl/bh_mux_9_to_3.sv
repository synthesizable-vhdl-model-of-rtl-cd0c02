// bh_mux_9_to_3: output select of the behavioural transform design.
//
// All three transforms are computed every time; this multiplexer passes one
// of them on as (AnsX, AnsY, AnsZ). mode_sel: 00 translated, 01 scaled,
// 10 rotated, 11 the input unchanged. The reference design has the
// multiplexer and its select line but gives no codes; the codes, and the
// pass-through for the spare code, are this design's choice.
// Combinational, no latency.
module bh_mux_9_to_3
  import sm_pkg::*;
(
  input  sm_res_t    tx_x, ty_y, tz_z,
  input  sm_res_t    sx_x, sy_y, sz_z,
  input  sm_res_t    rot_x, rot_y, rot_z,
  input  sm_res_t    pass_x, pass_y, pass_z,
  input  logic [1:0] mode_sel,
  output sm_res_t    ans_x, ans_y, ans_z
);
  always_comb begin
    unique case (mode_sel)
      2'b00:   {ans_x, ans_y, ans_z} = {tx_x, ty_y, tz_z};
      2'b01:   {ans_x, ans_y, ans_z} = {sx_x, sy_y, sz_z};
      2'b10:   {ans_x, ans_y, ans_z} = {rot_x, rot_y, rot_z};
      default: {ans_x, ans_y, ans_z} = {pass_x, pass_y, pass_z};
    endcase
  end
endmodule
