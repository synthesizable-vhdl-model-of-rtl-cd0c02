// display_stage: projects the transformed vector for the screen.
//
// The display mode selects the projection: 00 orthographic, 01 perspective.
// The codes 10 and 11 are left free for further projections and currently
// output a zero vector. Both projection units run on every vector and the
// mode chooses whose result leaves. The mode is carried along with the
// vector, so each vector may use its own mode.
//
// The orthographic unit takes 1 cycle and the perspective unit 26. The
// orthographic result is delayed by 25 cycles so that both paths have the
// same latency and vectors leave in the order they came, whatever their
// mode. This alignment is this design's choice; the reference design only
// multiplexes the two units' outputs. Latency: 26 cycles for either mode.
module display_stage
  import fp32_pkg::*;
  import gfx_pkg::*;
#(
  parameter int unsigned DIV_LATENCY = gfx_pkg::DIV_LAT,
  parameter int unsigned MUL_LATENCY = gfx_pkg::MUL_LAT
) (
  input  logic       clk,
  input  logic       rst,
  input  disp_mode_e mode,
  input  vec4_t      v,
  input  fp32_t      d,
  output vec4_t      o
);
  localparam int unsigned P_LAT = 1 + 1 + DIV_LATENCY + MUL_LATENCY + 1;

  vec4_t o_ortho, o_ortho_al, o_persp;
  logic [1:0] mode_al;

  ortho_proj u_ortho (.clk, .rst, .v(v), .o(o_ortho));

  persp_proj #(.DIV_LATENCY(DIV_LATENCY), .MUL_LATENCY(MUL_LATENCY)) u_persp (
    .clk, .rst, .v(v), .d(d), .o(o_persp)
  );

  pipe_delay #(.WIDTH($bits(vec4_t)), .DEPTH(P_LAT - ORTHO_LAT)) u_al_ortho (
    .clk, .rst, .d(o_ortho), .q(o_ortho_al)
  );

  pipe_delay #(.WIDTH(2), .DEPTH(P_LAT)) u_al_mode (
    .clk, .rst, .d(mode), .q(mode_al)
  );

  always_comb begin
    unique case (mode_al)
      DISP_ORTHO: o = o_ortho_al;
      DISP_PERSP: o = o_persp;
      default:    o = '0;
    endcase
  end
endmodule
