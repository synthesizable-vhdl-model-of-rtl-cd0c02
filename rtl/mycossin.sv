// mycossin: cosine and sine look-up table for the rotation angle.
//
// The angle alpha is an unsigned whole number of degrees (10 bits, 0..1023).
// The table holds cos and sin as single precision floats for every angle
// from 0 to 360 degrees in steps of 15 degrees, which covers the common
// rotations; the reference design used the same step. How other angles are
// handled is this design's choice: alpha is first reduced modulo 360 and then
// rounded down to a multiple of 15.
//
// Only the first quadrant is stored: C[r] = cos(15*r degrees), r = 0..6,
// each rounded to the nearest single precision float (C[6] = 0 exactly).
// The other quadrants follow from cos(90q + t) and sin(90q + t) by swapping
// and negating. Exact zeros are always returned as +0.
// The block is purely combinational; the rotation unit registers its outputs.
module mycossin
  import fp32_pkg::*;
#(
  parameter int unsigned ANGLE_W = gfx_pkg::ANGLE_W
) (
  input  logic [ANGLE_W-1:0] alpha,
  output fp32_t              cos_o,
  output fp32_t              sin_o
);
  function automatic fp32_t c_tab(input logic [2:0] r);
    case (r)
      3'd0:    return 32'h3F80_0000;  // cos  0 = 1.0
      3'd1:    return 32'h3F77_46EA;  // cos 15 = 0.9659258
      3'd2:    return 32'h3F5D_B3D7;  // cos 30 = 0.8660254
      3'd3:    return 32'h3F35_04F3;  // cos 45 = 0.7071068
      3'd4:    return 32'h3F00_0000;  // cos 60 = 0.5
      3'd5:    return 32'h3E84_83EE;  // cos 75 = 0.2588190
      default: return 32'h0000_0000;  // cos 90 = 0
    endcase
  endfunction

  function automatic fp32_t neg(input fp32_t v);
    return (v[30:0] == 31'd0) ? v : {~v[31], v[30:0]};
  endfunction

  logic [ANGLE_W-1:0] a360;
  logic [4:0]         k;      // 15-degree step, 0..23
  logic [1:0]         quad;
  logic [2:0]         r;
  fp32_t              c_r, c_6r;

  always_comb begin
    a360 = alpha % ANGLE_W'(360);
    k    = 5'(a360 / ANGLE_W'(15));
    quad = 2'(k / 5'd6);
    r    = 3'(k % 5'd6);
    c_r  = c_tab(r);
    c_6r = c_tab(3'd6 - r);
    unique case (quad)
      2'd0: begin cos_o = c_r;       sin_o = c_6r;      end
      2'd1: begin cos_o = neg(c_6r); sin_o = c_r;       end
      2'd2: begin cos_o = neg(c_r);  sin_o = neg(c_6r); end
      default: begin cos_o = c_6r;   sin_o = neg(c_r);  end
    endcase
  end
endmodule
