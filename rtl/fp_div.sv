// fp_div: pipelined IEEE-754 single precision divider, y = a / b.
//
// The arithmetic is the combinational core fp_div_f of fp32_pkg (round to
// nearest even, denormals flushed to zero, quiet NaN on invalid operations);
// a chain of LATENCY registers follows it, so y is the result for the
// operands presented LATENCY clock edges earlier and a new pair can be
// presented every cycle. The reference design used a third-party unit here
// and gives only its function and its cycle count; this core is this
// design's own. Synthesis tools can retime the register chain into the core.
module fp_div
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = gfx_pkg::DIV_LAT
) (
  input  logic  clk,
  input  logic  rst,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  fp32_t res;

  always_comb res = fp_div_f(a, b);

  pipe_delay #(.WIDTH(32), .DEPTH(LATENCY)) u_pipe (
    .clk(clk), .rst(rst), .d(res), .q(y)
  );
endmodule
