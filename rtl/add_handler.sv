// add_handler: all sums of the compact design on one shared adder.
//
// Each output coordinate is the sum of the four products of its matrix row,
// added as (p1 + p2) + (p3 + p4) like the pipelined addition stage, so both
// designs give bit-identical results. Here a single adder does all twelve
// additions. An operand multiplexer picks the pair for sum number sel, and
// a result demultiplexer writes the sum into its register:
//   sel 0..7   first level: row r = sel[2:1], half k = sel[0],
//              t[r][k] = p[r][2k] + p[r][2k+1]
//   sel 8..11  second level: row r = sel[1:0], ans[r] = t[r][0] + t[r][1]
// The first-level sums t are fed back into the multiplexer for the second
// level, so a second-level sum may only be issued after both of its halves
// are done. Rows A..D give X, Y, Z and W of ans.
// The single adder with a feedback path follows the reference design; the
// tag delay line that steers each result, and the exact sum order, are this
// design's choice. done pulses in the cycle a result is written.
// Latency: LATENCY cycles per sum, one issue per cycle.
module add_handler
  import fp32_pkg::*;
  import gfx_pkg::*;
#(
  parameter int unsigned LATENCY = gfx_pkg::ADD_LAT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       issue,
  input  logic [3:0] sel,
  input  mat4_t      p,
  output vec4_t      ans,
  output logic       done
);
  fp32_t t [4][2];
  fp32_t a, b, y;

  // ---- operand multiplexer, with the first-level sums fed back ---------
  always_comb begin
    if (!sel[3]) begin
      a = p[sel[2:1]][{sel[0], 1'b0}];
      b = p[sel[2:1]][{sel[0], 1'b1}];
    end else begin
      a = t[sel[1:0]][0];
      b = t[sel[1:0]][1];
    end
  end

  fp_add #(.LATENCY(LATENCY)) u_add (.clk, .rst, .a, .b, .y);

  // ---- result demultiplexer -------------------------------------------
  logic       wb_valid;
  logic [3:0] wb_sel;

  pipe_delay #(.WIDTH(5), .DEPTH(LATENCY)) u_tag (
    .clk, .rst, .d({issue, sel}), .q({wb_valid, wb_sel})
  );

  assign done = wb_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < 4; r++) begin
        t[r][0] <= FP_ZERO;
        t[r][1] <= FP_ZERO;
      end
      ans <= '0;
    end else if (wb_valid) begin
      if (!wb_sel[3]) t[wb_sel[2:1]][wb_sel[0]] <= y;
      else unique case (wb_sel[1:0])
        2'd0: ans.x <= y;
        2'd1: ans.y <= y;
        2'd2: ans.z <= y;
        default: ans.w <= y;
      endcase
    end
  end
endmodule
