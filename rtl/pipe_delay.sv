// pipe_delay: a chain of DEPTH registers of WIDTH bits.
//
// This is the design's D flip-flop register, widened from the 8-bit register
// of the earliest prototype to whole 32-bit floats and vectors. Every stage
// registers its inputs with it, and it carries operands alongside slower
// units so that values that belong together arrive in the same cycle.
// The output is the input from DEPTH clock edges earlier. A synchronous,
// active-high reset clears every register to zero; that reset style is this
// design's choice.
module pipe_delay #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

  initial assert (DEPTH >= 1) else $error("pipe_delay: DEPTH must be at least 1");
endmodule
