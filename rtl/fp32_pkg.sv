// fp32_pkg: IEEE-754 single precision arithmetic used by every datapath unit.
//
// The transformation pipeline works entirely in 32-bit single precision
// floating point (1 sign bit, 8 exponent bits with bias 127, 23 fraction bits
// and a hidden leading one). This package holds the combinational cores of
// the three operators the pipeline needs: multiply, add and divide. The
// pipelined wrappers fp_mul, fp_add and fp_div put a register chain after
// these cores.
//
// Number handling, chosen for this design:
//   * rounding is round-to-nearest, ties to even;
//   * denormal inputs are read as zero and results too small for a normal
//     number are flushed to a signed zero;
//   * infinities are produced on overflow and propagate as IEEE-754 says;
//   * any invalid operation (0*inf, inf-inf, 0/0, inf/inf) or NaN input
//     gives the quiet NaN 32'h7FC0_0000.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_QNAN = 32'h7FC0_0000;

  function automatic logic fp_is_zero(input fp32_t a);
    return a[30:23] == 8'd0;               // zero or denormal (flushed)
  endfunction

  function automatic logic fp_is_inf(input fp32_t a);
    return a[30:23] == 8'hFF && a[22:0] == 23'd0;
  endfunction

  function automatic logic fp_is_nan(input fp32_t a);
    return a[30:23] == 8'hFF && a[22:0] != 23'd0;
  endfunction

  function automatic fp32_t fp_inf(input logic s);
    return {s, 8'hFF, 23'd0};
  endfunction

  // Round a 24-bit mantissa (hidden bit included) with its round and sticky
  // bits, then pack it with the biased exponent e. Over- and underflow of e
  // are resolved here.
  function automatic fp32_t fp_round_pack(input logic s, input logic signed [11:0] e,
                                          input logic [23:0] m, input logic r,
                                          input logic st);
    logic [24:0] mr;
    logic signed [11:0] er;
    mr = {1'b0, m} + 25'((r && (st || m[0])) ? 1 : 0);
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 12'sd1;
    end
    if (er >= 12'sd255)     return fp_inf(s);
    else if (er <= 12'sd0)  return {s, 31'd0};
    else                    return {s, er[7:0], mr[22:0]};
  endfunction

  function automatic fp32_t fp_mul_f(input fp32_t a, input fp32_t b);
    logic s;
    logic [47:0] p;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a) || fp_is_inf(b)) begin
      if (fp_is_zero(a) || fp_is_zero(b)) return FP_QNAN;
      return fp_inf(s);
    end
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 12'(a[30:23]) + 12'(b[30:23]) - 12'sd127;
    if (p[47]) return fp_round_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    else       return fp_round_pack(s, e,          p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic fp32_t fp_add_f(input fp32_t a, input fp32_t b);
    fp32_t bg, sml;
    logic [7:0]  d;
    logic [49:0] ma, mb, sum, norm;
    logic        st;
    int          pos;
    logic signed [11:0] e;
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a) && fp_is_inf(b)) return (a[31] == b[31]) ? a : FP_QNAN;
    if (fp_is_inf(a)) return a;
    if (fp_is_inf(b)) return b;
    if (fp_is_zero(a) && fp_is_zero(b)) return {a[31] & b[31], 31'd0};
    if (fp_is_zero(a)) return b;
    if (fp_is_zero(b)) return a;
    // order by magnitude so that the difference is never negative
    if (a[30:0] >= b[30:0]) begin bg = a; sml = b; end
    else                    begin bg = b; sml = a; end
    d  = bg[30:23] - sml[30:23];
    ma = {2'b01, bg[22:0], 25'd0};
    mb = {2'b01, sml[22:0], 25'd0};
    if (d > 8'd49) begin
      mb = 50'd1;                        // only the sticky bit survives
    end else begin
      st = 1'b0;
      for (int i = 0; i < 50; i++)
        if (i < int'(d) && mb[i]) st = 1'b1;
      mb = (mb >> d) | {49'd0, st};
    end
    sum = (bg[31] == sml[31]) ? ma + mb : ma - mb;
    if (sum == 50'd0) return FP_ZERO;
    pos = 0;
    for (int i = 0; i < 50; i++)
      if (sum[i]) pos = i;
    norm = sum << (49 - pos);
    e = 12'(bg[30:23]) + 12'(pos) - 12'sd48;
    return fp_round_pack(bg[31], e, norm[49:26], norm[25], |norm[24:0]);
  endfunction

  function automatic fp32_t fp_div_f(input fp32_t a, input fp32_t b);
    logic s;
    logic [49:0] n, q, r;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a)) return fp_is_inf(b) ? FP_QNAN : fp_inf(s);
    if (fp_is_inf(b)) return {s, 31'd0};
    if (fp_is_zero(b)) return fp_is_zero(a) ? FP_QNAN : fp_inf(s);
    if (fp_is_zero(a)) return {s, 31'd0};
    n = {1'b1, a[22:0], 26'd0};
    q = n / {26'd0, 1'b1, b[22:0]};
    r = n % {26'd0, 1'b1, b[22:0]};
    e = 12'(a[30:23]) - 12'(b[30:23]) + 12'sd127;
    if (q[26]) return fp_round_pack(s, e,          q[26:3], q[2], (|q[1:0]) || (r != 50'd0));
    else       return fp_round_pack(s, e - 12'sd1, q[25:2], q[1], q[0] || (r != 50'd0));
  endfunction

endpackage
