// add_stage: sums the sixteen products into the transformed vector.
//
// Each adder has only two inputs, so every coordinate is summed in two
// levels. The first level uses eight adders: tmp1 = p[r][0] + p[r][1] and
// tmp2 = p[r][2] + p[r][3]. The second level uses four adders:
// ans[r] = tmp1 + tmp2. The products are registered on entry, the
// partial sums between the levels and the answer on exit.
// Latency: 1 + ADD_LAT + 1 + ADD_LAT + 1 = 17 cycles. A new set of products
// may be presented every cycle. The twelve adders, their two levels and the
// 17-cycle latency follow the reference design. Where the two middle
// registers sit is this design's choice.
module add_stage
  import fp32_pkg::*;
  import gfx_pkg::*;
#(
  parameter int unsigned ADD_LATENCY = gfx_pkg::ADD_LAT
) (
  input  logic  clk,
  input  logic  rst,
  input  mat4_t p,
  output vec4_t ans
);
  mat4_t p_q;
  fp32_t tmp1 [4], tmp2 [4];
  fp32_t tmp1_q [4], tmp2_q [4];
  fp32_t sum [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      p_q <= '0;
      for (int r = 0; r < 4; r++) begin
        tmp1_q[r] <= FP_ZERO;
        tmp2_q[r] <= FP_ZERO;
      end
      ans <= '0;
    end else begin
      p_q <= p;
      for (int r = 0; r < 4; r++) begin
        tmp1_q[r] <= tmp1[r];
        tmp2_q[r] <= tmp2[r];
      end
      ans <= '{x: sum[0], y: sum[1], z: sum[2], w: sum[3]};
    end
  end

  for (genvar r = 0; r < 4; r++) begin : g_row
    fp_add #(.LATENCY(ADD_LATENCY)) u_add1 (.clk, .rst, .a(p_q[r][0]), .b(p_q[r][1]), .y(tmp1[r]));
    fp_add #(.LATENCY(ADD_LATENCY)) u_add2 (.clk, .rst, .a(p_q[r][2]), .b(p_q[r][3]), .y(tmp2[r]));
    fp_add #(.LATENCY(ADD_LATENCY)) u_add3 (.clk, .rst, .a(tmp1_q[r]), .b(tmp2_q[r]), .y(sum[r]));
  end
endmodule
