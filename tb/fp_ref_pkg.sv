// fp_ref_pkg: reference helpers for the testbenches.
//
// Converts between IEEE-754 single precision bit patterns and SystemVerilog
// reals (doubles) through the 64-bit double layout, so that expected values
// come from the simulator's double arithmetic and not from the design's own
// floating point cores. real-to-single rounds to nearest even and flushes
// results below the normal range to zero, matching the design's number
// handling.
package fp_ref_pkg;

  function automatic real fp2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2fp(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] mr;
    int e;
    logic rb, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:0]};
    rb = m[28];
    st = |m[27:0];
    mr = {1'b0, m[52:29]} + 25'((rb && (st || m[29])) ? 1 : 0);
    if (mr[24]) begin mr = mr >> 1; e++; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  // random normal float with biased exponent in [emin, emax]
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  // true when the single precision value got is within a relative error
  // tol of the real value want (absolute tol near zero)
  function automatic logic close(input logic [31:0] got, input real want, input real tol);
    real g, diff, mag;
    g    = fp2r(got);
    diff = (g > want) ? g - want : want - g;
    mag  = (want < 0.0) ? -want : want;
    return diff <= tol * ((mag > 1.0) ? mag : 1.0);
  endfunction

endpackage
