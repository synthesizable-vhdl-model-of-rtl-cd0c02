// gfx_compact: area-saving variant of the transform pipeline, built around a
// single multiplier and a single adder.
//
// It transforms one vertex at a time with the same combined matrix as the
// pipelined design: rotation, then scaling, then translation in one
// matrix-vector multiply. There is no projection: the divider is left out
// and the transformed vector (X', Y', Z', W') is the output, as in the
// reference design's cut-down version. The results are bit-identical to the
// transform part of gfx_top, because every float operation is the same and
// runs in the same order.
//
// How it works. start latches the vertex and all settings. A controller
// then runs four phases, each issuing one operation per cycle to a shared
// unit and waiting until all of that phase's results are written back:
//   1. cos*Sx, cos*Sy, cos*Sz on the multiplier      (3 products)
//   2. the matrix-vector products on the multiplier   (16 products)
//   3. first-level sums on the adder                   (8 sums)
//   4. second-level sums on the adder                  (4 sums)
// Between phases 1 and 2 matrix_select places the values into the matrix.
// The reference design drove its multiplexers from free-running counters;
// the phase controller, and waiting for every result of a phase, are this
// design's choice.
//
// Interface: raise start for one cycle while busy is low, with the inputs
// valid in that cycle. done pulses for one cycle with the result on
// xo..wo, which hold until the next result. Starts while busy are ignored.
// Timing: a phase of n operations takes n + latency + 1 cycles, so done is
// high LAT = 2 + (3 + MUL + 1) + (16 + MUL + 1) + (8 + ADD + 1) +
// (4 + ADD + 1) clock edges after the edge that samples start: 65 cycles at
// the default latencies, against 34 for the transform part of gfx_top. The
// compact design accepts a new vertex only after done.
// Reset is synchronous and active high and clears all registers.
module gfx_compact
  import fp32_pkg::*;
  import gfx_pkg::*;
#(
  parameter int unsigned MUL_LATENCY = gfx_pkg::MUL_LAT,
  parameter int unsigned ADD_LATENCY = gfx_pkg::ADD_LAT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  fp32_t              xin, yin, zin, win,
  input  fp32_t              tx, ty, tz,
  input  fp32_t              sx, sy, sz,
  input  logic [ANGLE_W-1:0] alpha,
  input  logic [3:0]         rvst,
  output logic               busy,
  output logic               done,
  output fp32_t              xo, yo, zo, wo
);
  typedef enum logic [2:0] {
    S_IDLE, S_ROT, S_CS, S_PROD, S_SUM1, S_SUM2, S_OUT
  } state_e;

  state_e state;
  logic [4:0] n_iss, n_done;             // operations issued / written back

  // ---- latched inputs ------------------------------------------------
  vec4_t              v_q;
  rvst_t              rvst_q;
  fp32_t              sx_q, sy_q, sz_q, tx_q, ty_q, tz_q;
  logic [ANGLE_W-1:0] alpha_q;

  // ---- shared units --------------------------------------------------
  fp32_t c, s, ms, cs_x, cs_y, cs_z;
  mat4_t m, p;
  vec4_t ans;
  logic  mul_issue, add_issue, mul_done, add_done;
  logic [4:0] mul_sel;
  logic [3:0] add_sel;

  rotation u_rot (.clk, .rst, .alpha(alpha_q), .cos_o(c), .sin_o(s), .msin_o(ms));

  matrix_select u_sel (
    .rvst(rvst_q), .sx(sx_q), .sy(sy_q), .sz(sz_q), .tx(tx_q), .ty(ty_q), .tz(tz_q),
    .c, .s, .ms, .cs_x, .cs_y, .cs_z, .m
  );

  mult_handler #(.LATENCY(MUL_LATENCY)) u_mh (
    .clk, .rst, .issue(mul_issue), .sel(mul_sel), .v(v_q), .m, .c,
    .sx(sx_q), .sy(sy_q), .sz(sz_q), .p, .cs_x, .cs_y, .cs_z, .done(mul_done)
  );

  add_handler #(.LATENCY(ADD_LATENCY)) u_ah (
    .clk, .rst, .issue(add_issue), .sel(add_sel), .p, .ans, .done(add_done)
  );

  // ---- phase controller ----------------------------------------------
  logic [4:0] n_ops;                     // operations in the current phase

  always_comb begin
    unique case (state)
      S_CS:    n_ops = 5'd3;
      S_PROD:  n_ops = 5'd16;
      S_SUM1:  n_ops = 5'd8;
      S_SUM2:  n_ops = 5'd4;
      default: n_ops = 5'd0;
    endcase
    mul_issue = (state == S_CS || state == S_PROD) && n_iss < n_ops;
    add_issue = (state == S_SUM1 || state == S_SUM2) && n_iss < n_ops;
    mul_sel   = (state == S_CS) ? 5'd16 + n_iss : n_iss;
    add_sel   = (state == S_SUM2) ? 4'd8 + n_iss[3:0] : n_iss[3:0];
  end

  assign busy = state != S_IDLE;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      n_iss   <= '0;
      n_done  <= '0;
      done    <= 1'b0;
      v_q     <= '0;
      rvst_q  <= '0;
      alpha_q <= '0;
      {sx_q, sy_q, sz_q, tx_q, ty_q, tz_q} <= '0;
      {xo, yo, zo, wo} <= '0;
    end else begin
      done <= 1'b0;
      if (mul_issue || add_issue) n_iss <= n_iss + 5'd1;
      if (mul_done || add_done) n_done <= n_done + 5'd1;
      unique case (state)
        S_IDLE: if (start) begin
          v_q     <= '{x: xin, y: yin, z: zin, w: win};
          rvst_q  <= rvst_t'(rvst);
          alpha_q <= alpha;
          {sx_q, sy_q, sz_q, tx_q, ty_q, tz_q} <= {sx, sy, sz, tx, ty, tz};
          state   <= S_ROT;
        end
        S_ROT: state <= S_CS;            // rotation registers cos and sin
        S_CS, S_PROD, S_SUM1, S_SUM2: if (n_done == n_ops) begin
          n_iss  <= '0;
          n_done <= '0;
          unique case (state)
            S_CS:    state <= S_PROD;
            S_PROD:  state <= S_SUM1;
            S_SUM1:  state <= S_SUM2;
            default: state <= S_OUT;
          endcase
        end
        default: begin                   // S_OUT
          {xo, yo, zo, wo} <= {ans.x, ans.y, ans.z, ans.w};
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end
endmodule
