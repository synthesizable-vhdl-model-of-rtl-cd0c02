// matrix_select: places the transform values into the combined 4x4 matrix.
//
// This is the purely combinational part of the matrix builder: it decides
// which value goes into which matrix position for a given RVST mode word.
// It performs no arithmetic. The cos*S products arrive ready-made: the
// pipelined matrix_builder forms them with three multipliers of its own,
// and the compact design forms them on its single shared multiplier.
// The rules:
//   * start from the identity;
//   * S = 1 puts Sx, Sy, Sz on the diagonal;
//   * T = 1 puts Tx, Ty, Tz in column 4 of rows A..C;
//   * RV = X, Y or Z writes that axis' rotation: cos on the two diagonal
//     places of the rotated axes (cos*S instead when S = 1), sin and -sin
//     off the diagonal. Example for Z: A1 = cos, A2 = -sin, B1 = sin,
//     B2 = cos;
//   * row D is always (0, 0, 0, 1).
// The sines are not scaled, as in the reference design. Interface: the mode,
// scales, translations, cos, sin, -sin and the three cos*S products in;
// the matrix m[row][col] out. No clock, no latency.
module matrix_select
  import fp32_pkg::*;
  import gfx_pkg::*;
(
  input  rvst_t rvst,
  input  fp32_t sx, sy, sz,
  input  fp32_t tx, ty, tz,
  input  fp32_t c, s, ms,
  input  fp32_t cs_x, cs_y, cs_z,
  output mat4_t m
);
  always_comb begin
    // identity, optionally scaled and translated
    m = '0;
    m[0][0] = rvst.s ? sx : FP_ONE;
    m[1][1] = rvst.s ? sy : FP_ONE;
    m[2][2] = rvst.s ? sz : FP_ONE;
    m[3][3] = FP_ONE;
    if (rvst.t) begin
      m[0][3] = tx;
      m[1][3] = ty;
      m[2][3] = tz;
    end
    // rotation, with cos*S on the rotated diagonal when scaling
    unique case (rvst.rv)
      ROT_X: begin
        m[1][1] = rvst.s ? cs_y : c;
        m[1][2] = ms;
        m[2][1] = s;
        m[2][2] = rvst.s ? cs_z : c;
      end
      ROT_Y: begin
        m[0][0] = rvst.s ? cs_x : c;
        m[0][2] = s;
        m[2][0] = ms;
        m[2][2] = rvst.s ? cs_z : c;
      end
      ROT_Z: begin
        m[0][0] = rvst.s ? cs_x : c;
        m[0][1] = ms;
        m[1][0] = s;
        m[1][1] = rvst.s ? cs_y : c;
      end
      default: ;
    endcase
  end
endmodule
