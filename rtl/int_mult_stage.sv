// int_mult_stage: integer multiplication stage of the matrix-multiply design
// that came between the behavioural design and the floating point pipeline.
//
// Sixteen sign-magnitude multipliers form every product of a 4x4 matrix and
// a vertex at once: p[r][c] = m[r][c] * v[c], with 9-bit inputs and 17-bit
// exact products (see sm_pkg). The products are registered, so they appear
// one clock edge after their inputs. The widths follow the reference
// design's block diagram; the register and the synchronous active-high
// reset are this design's choice. The reference design's block also had a
// 4-bit count input whose use it does not give; it is left out here.
module int_mult_stage
  import sm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sm_in_t  [3:0]      v,          // X, Y, Z, W in 0..3
  input  sm_in_t  [3:0][3:0] m,          // m[r][c]: rows A..D, columns 1..4
  output sm_res_t [3:0][3:0] p
);
  always_ff @(posedge clk) begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        p[r][c] <= rst ? '0 : sm_mul(m[r][c], v[c]);
  end
endmodule
