// mult_stage: the sixteen products of a 4x4 matrix-vector multiply.
//
// The vector (X, Y, Z, W) and the matrix are registered on entry. Sixteen
// floating point multipliers then run in parallel. Product p[r][c] is the
// vector component of column c times matrix element m[r][c]: row A gives
// X*A1, Y*A2, Z*A3, W*A4. The add stage sums each row into one output
// coordinate. Using sixteen multipliers, rather than one time-shared
// multiplier, and registering the inputs both follow the reference design.
// Latency: 1 + MUL_LAT = 8 cycles. A new vector and matrix may be presented
// every cycle.
module mult_stage
  import fp32_pkg::*;
  import gfx_pkg::*;
#(
  parameter int unsigned MUL_LATENCY = gfx_pkg::MUL_LAT
) (
  input  logic  clk,
  input  logic  rst,
  input  vec4_t v,
  input  mat4_t m,
  output mat4_t p
);
  vec4_t v_q;
  mat4_t m_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q <= '0;
      m_q <= '0;
    end else begin
      v_q <= v;
      m_q <= m;
    end
  end

  fp32_t col [4];
  assign col[0] = v_q.x;
  assign col[1] = v_q.y;
  assign col[2] = v_q.z;
  assign col[3] = v_q.w;

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      fp_mul #(.LATENCY(MUL_LATENCY)) u_mul (
        .clk, .rst, .a(col[c]), .b(m_q[r][c]), .y(p[r][c])
      );
    end
  end
endmodule
