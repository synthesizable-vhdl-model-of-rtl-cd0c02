// ortho_proj: orthographic (parallel) projection.
//
// An orthographic projection of a vector already turned to face the viewer
// just keeps X and Y. This unit registers the incoming vector and outputs
// (X, Y, 0, 0), as the reference design does. Latency: 1 cycle. Reset
// clears the output to zero.
module ortho_proj
  import fp32_pkg::*;
  import gfx_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  vec4_t v,
  output vec4_t o
);
  always_ff @(posedge clk) begin
    if (rst) o <= '0;
    else     o <= '{x: v.x, y: v.y, z: FP_ZERO, w: FP_ZERO};
  end
endmodule
