// int_matmul: integer 4x4 matrix times vertex, the two-stage datapath that
// the floating point pipeline later extended.
//
// int_mult_stage forms the sixteen products and int_add_stage sums each row,
// so ans = M * v for a matrix M given element by element. There is no matrix
// builder: the matrix is an input, as it was when this design stage was
// tested. Values are sign-magnitude integers: 9-bit inputs, 19-bit results.
// A new matrix and vertex may be given every cycle; the result appears two
// clock edges later. Reset is synchronous and active high.
module int_matmul
  import sm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sm_in_t  [3:0]      v,
  input  sm_in_t  [3:0][3:0] m,
  output sm_sum_t [3:0]      ans
);
  sm_res_t [3:0][3:0] p;

  int_mult_stage u_mul (.clk, .rst, .v, .m, .p);
  int_add_stage  u_add (.clk, .rst, .p, .ans);
endmodule
