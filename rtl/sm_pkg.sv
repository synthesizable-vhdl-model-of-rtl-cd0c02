// sm_pkg: sign-magnitude integer arithmetic for the small behavioural
// transform design (behav_top).
//
// A value is a sign bit above an unsigned magnitude. Inputs have MAG_W = 8
// magnitude bits (9 bits in all). Results are held with RES_W = 16 magnitude
// bits, wide enough for any product or sum of two inputs, so the arithmetic
// here never overflows or rounds. The integer matrix stages sum four
// products; their sums have SUM_W = 18 magnitude bits (19 bits in all), again
// wide enough for any input. A zero result is always +0; an input -0
// is read as zero. The 9-bit input format follows the reference design; the
// result width and the zero rule are this design's choice.
package sm_pkg;

  localparam int unsigned MAG_W = 8;
  localparam int unsigned RES_W = 2 * MAG_W;

  typedef logic [MAG_W:0] sm_in_t;       // {sign, magnitude}
  typedef logic [RES_W:0] sm_res_t;

  localparam int unsigned SUM_W = RES_W + 2;
  typedef logic [SUM_W:0] sm_sum_t;

  // widen an input to the result format
  function automatic sm_res_t sm_widen(input sm_in_t a);
    return (a[MAG_W-1:0] == '0) ? '0 : {a[MAG_W], RES_W'(a[MAG_W-1:0])};
  endfunction

  function automatic sm_res_t sm_neg(input sm_res_t a);
    return (a[RES_W-1:0] == '0) ? '0 : {~a[RES_W], a[RES_W-1:0]};
  endfunction

  function automatic sm_res_t sm_mul(input sm_in_t a, input sm_in_t b);
    logic [RES_W-1:0] m;
    m = RES_W'(a[MAG_W-1:0]) * RES_W'(b[MAG_W-1:0]);
    return (m == '0) ? '0 : {a[MAG_W] ^ b[MAG_W], m};
  endfunction

  function automatic sm_res_t sm_add(input sm_in_t a, input sm_in_t b);
    logic [RES_W-1:0] ma, mb, m;
    logic s;
    ma = RES_W'(a[MAG_W-1:0]);
    mb = RES_W'(b[MAG_W-1:0]);
    if (a[MAG_W] == b[MAG_W]) begin
      m = ma + mb;
      s = a[MAG_W];
    end else if (ma >= mb) begin
      m = ma - mb;
      s = a[MAG_W];
    end else begin
      m = mb - ma;
      s = b[MAG_W];
    end
    return (m == '0) ? '0 : {s, m};
  endfunction

  function automatic sm_sum_t sm_res2sum(input sm_res_t a);
    return (a[RES_W-1:0] == '0) ? '0 : {a[RES_W], SUM_W'(a[RES_W-1:0])};
  endfunction

  // sum of two values in the wide format; callers keep the magnitudes small
  // enough that the sum fits (four products at most)
  function automatic sm_sum_t sm_add_sum(input sm_sum_t a, input sm_sum_t b);
    logic [SUM_W-1:0] ma, mb, m;
    logic s;
    ma = a[SUM_W-1:0];
    mb = b[SUM_W-1:0];
    if (a[SUM_W] == b[SUM_W]) begin
      m = ma + mb;
      s = a[SUM_W];
    end else if (ma >= mb) begin
      m = ma - mb;
      s = a[SUM_W];
    end else begin
      m = mb - ma;
      s = b[SUM_W];
    end
    return (m == '0) ? '0 : {s, m};
  endfunction

endpackage
