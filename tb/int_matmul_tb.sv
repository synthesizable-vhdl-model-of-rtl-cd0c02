// int_matmul_tb: the integer matrix-multiply datapath end to end. First an
// identity matrix with X translation 1 on the vertex (2, 1, -2, 1), which
// must give (3, 1, -2, 1); then a new random matrix and vertex every cycle,
// each result checked against the integer product M * v two cycles later.
module int_matmul_tb;
  import sm_pkg::*;
  import sm_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sm_in_t [3:0] v;
  sm_in_t [3:0][3:0] m;
  sm_sum_t [3:0] ans;
  int checks = 0, failures = 0;

  int_matmul dut (.clk, .rst, .v, .m, .ans);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sm_sum_t i2sum(input int x);
    if (x == 0) return '0;
    return {x < 0, SUM_W'(x < 0 ? -x : x)};
  endfunction

  int exp_q [$];

  initial begin
    v = '0; m = '0;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    m = '0;
    for (int k = 0; k < 4; k++) m[k][k] = 9'd1;
    m[0][3] = 9'd1;
    v = '{9'd1, {1'b1, 8'd2}, 9'd1, 9'd2};   // W, Z, Y, X = 1, -2, 1, 2
    repeat (2) @(posedge clk);
    #1;
    checks += 4;
    if (ans[0] !== i2sum(3))  failures++;
    if (ans[1] !== i2sum(1))  failures++;
    if (ans[2] !== i2sum(-2)) failures++;
    if (ans[3] !== i2sum(1))  failures++;
    for (int n = 0; n < 1000 + 2; n++) begin
      if (n < 1000) begin
        for (int c = 0; c < 4; c++) v[c] = rand_in();
        for (int r = 0; r < 4; r++) begin
          int s;
          s = 0;
          for (int c = 0; c < 4; c++) begin
            m[r][c] = rand_in();
            s += in2i(m[r][c]) * in2i(v[c]);
          end
          exp_q.push_back(s);
        end
      end
      @(posedge clk);
      #1;
      if (n >= 1) begin
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (ans[r] !== i2sum(exp_q.pop_front())) failures++;
        end
      end
      if (exp_q.size() == 0) break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
