// mult_handler: all products of the compact design on one shared multiplier.
//
// The compact design trades speed for area: instead of sixteen multipliers in
// the multiplication stage and three in the matrix builder, one multiplier
// forms every product in turn. An operand multiplexer in front of it picks
// the pair for product number sel, and a result demultiplexer behind it
// writes the product into its own register:
//   sel 0..15  p[r][c] = m[r][c] * v[c], with sel = 4*r + c (row A..D, column 1..4)
//   sel 16..18 cos * Sx, cos * Sy, cos * Sz for the matrix
// A controller issues one product per cycle by raising issue with a new sel.
// The sel of each issued product travels beside the multiplier in a delay
// line of the same length, so the result lands in the right register
// whatever the multiplier latency is. done pulses in the cycle a result is
// written, and the new register value is visible from the next cycle.
// The single multiplier and the two multiplexers follow the reference
// design; the tag delay line that replaces its hand-counted timing is this
// design's choice. Latency: LATENCY cycles per product, one issue per cycle.
module mult_handler
  import fp32_pkg::*;
  import gfx_pkg::*;
#(
  parameter int unsigned LATENCY = gfx_pkg::MUL_LAT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       issue,
  input  logic [4:0] sel,
  input  vec4_t      v,
  input  mat4_t      m,
  input  fp32_t      c,
  input  fp32_t      sx, sy, sz,
  output mat4_t      p,
  output fp32_t      cs_x, cs_y, cs_z,
  output logic       done
);
  // ---- operand multiplexer --------------------------------------------
  fp32_t a, b, vc[4], y;

  always_comb begin
    vc = '{v.x, v.y, v.z, v.w};
    a  = FP_ZERO;
    b  = FP_ZERO;
    if (sel < 5'd16) begin
      a = m[sel[3:2]][sel[1:0]];
      b = vc[sel[1:0]];
    end else begin
      a = c;
      unique case (sel)
        5'd16:   b = sx;
        5'd17:   b = sy;
        default: b = sz;
      endcase
    end
  end

  fp_mul #(.LATENCY(LATENCY)) u_mul (.clk, .rst, .a, .b, .y);

  // ---- result demultiplexer -------------------------------------------
  logic       wb_valid;
  logic [4:0] wb_sel;

  pipe_delay #(.WIDTH(6), .DEPTH(LATENCY)) u_tag (
    .clk, .rst, .d({issue, sel}), .q({wb_valid, wb_sel})
  );

  assign done = wb_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      p    <= '0;
      cs_x <= FP_ZERO;
      cs_y <= FP_ZERO;
      cs_z <= FP_ZERO;
    end else if (wb_valid) begin
      if (wb_sel < 5'd16) p[wb_sel[3:2]][wb_sel[1:0]] <= y;
      else if (wb_sel == 5'd16) cs_x <= y;
      else if (wb_sel == 5'd17) cs_y <= y;
      else cs_z <= y;
    end
  end
endmodule
