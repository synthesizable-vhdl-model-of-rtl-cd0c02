// sm_ref_pkg: reference model for the sign-magnitude behavioural design.
// Values are converted to plain signed integers, the transform is done in
// integer arithmetic, and the result is converted back. Rotations use the
// standard right-handed rotation matrices with integer cos and sin at the
// angle -90 * k degrees.
package sm_ref_pkg;
  import sm_pkg::*;

  function automatic int sm2i(input logic [RES_W:0] a);
    return a[RES_W] ? -int'(a[RES_W-1:0]) : int'(a[RES_W-1:0]);
  endfunction

  function automatic int in2i(input sm_in_t a);
    return a[MAG_W] ? -int'(a[MAG_W-1:0]) : int'(a[MAG_W-1:0]);
  endfunction

  function automatic sm_res_t i2sm(input int v);
    if (v == 0) return '0;
    return {v < 0, RES_W'(v < 0 ? -v : v)};
  endfunction

  // random input; about one in eight is zero or minus zero
  function automatic sm_in_t rand_in();
    int k;
    k = $urandom_range(0, 15);
    if (k == 0) return '0;
    if (k == 1) return {1'b1, MAG_W'(0)};
    if (k == 2) return {1'($urandom_range(0, 1)), {MAG_W{1'b1}}};
    return sm_in_t'($urandom);
  endfunction

  // rotate (x, y, z) about axis (1 X, 2 Y, 3 Z, 0 none) by -90 * k degrees
  function automatic void rot_ref(input int axis, input int k, inout int x, inout int y, inout int z);
    int c, s, a, b;
    int cs [4] = '{1, 0, -1, 0};
    c = cs[k % 4];
    s = -cs[(k + 3) % 4];            // sin(-90k)
    case (axis)
      1: begin a = c * y - s * z; b = s * y + c * z; y = a; z = b; end
      2: begin a = c * x + s * z; b = -s * x + c * z; x = a; z = b; end
      3: begin a = c * x - s * y; b = s * x + c * y; x = a; y = b; end
      default: ;
    endcase
  endfunction
endpackage
