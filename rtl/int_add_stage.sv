// int_add_stage: integer addition stage of the matrix-multiply design.
//
// Twelve sign-magnitude adders sum each row of products in two levels:
// eight form (p1 + p2) and (p3 + p4) for the four rows, four add those two
// halves. ans[r] is the transformed coordinate of row r (X, Y, Z, W). The
// 17-bit products give 19-bit sums, as in the reference design's block
// diagram, so nothing overflows. The result is registered and appears one
// clock edge after the products; that timing and the synchronous
// active-high reset are this design's choice.
module int_add_stage
  import sm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sm_res_t [3:0][3:0] p,
  output sm_sum_t [3:0]      ans
);
  always_ff @(posedge clk) begin
    for (int r = 0; r < 4; r++)
      ans[r] <= rst ? '0 : sm_add_sum(sm_add_sum(sm_res2sum(p[r][0]), sm_res2sum(p[r][1])),
                                      sm_add_sum(sm_res2sum(p[r][2]), sm_res2sum(p[r][3])));
  end
endmodule
