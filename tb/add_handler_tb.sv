// add_handler_tb: for random product matrices, issues the eight first-level
// sums in a random order with random gaps, then the four second-level sums
// once their halves are back. Each row of ans must equal
// (p[r][0] + p[r][1]) + (p[r][2] + p[r][3]), rounded after each addition,
// and every done pulse must come LATENCY cycles after its issue. The
// operands lie within a factor of 2^10 of each other, so each sum is exact
// in double precision before it is rounded to single. Run at the default
// latency and at latency 1.
module add_handler_tb;
  import fp_ref_pkg::*;
  import gfx_pkg::*;
  localparam int ROUNDS = 60;
  logic clk = 1'b0, rst = 1'b1;
  logic issue;
  logic [3:0] sel;
  mat4_t p;
  vec4_t a7, a1;
  logic done7, done1;
  int checks = 0, failures = 0;

  add_handler #(.LATENCY(ADD_LAT)) dut7 (.clk, .rst, .issue, .sel, .p, .ans(a7), .done(done7));
  add_handler #(.LATENCY(1))       dut1 (.clk, .rst, .issue, .sel, .p, .ans(a1), .done(done1));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n7 = 0, n1 = 0, cyc = 0;
  int iss_a [$];
  int iss_b [$];
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (issue) begin
        iss_a.push_back(cyc);
        iss_b.push_back(cyc);
      end
      if (done7) begin
        n7++;
        checks++;
        if (iss_a.size() == 0 || cyc - iss_a.pop_front() != ADD_LAT) failures++;
      end
      if (done1) begin
        n1++;
        checks++;
        if (iss_b.size() == 0 || cyc - iss_b.pop_front() != 1) failures++;
      end
    end
  end

  function automatic logic [31:0] add(input logic [31:0] a, input logic [31:0] b);
    return r2fp(fp2r(a) + fp2r(b));
  endfunction

  task automatic issue_set(input int first, input int n);
    int order [];
    order = new[n];
    for (int k = 0; k < n; k++) order[k] = first + k;
    order.shuffle();
    for (int k = 0; k < n; k++) begin
      while ($urandom_range(0, 2) == 0) begin
        issue = 1'b0;
        @(posedge clk);
        #1;
      end
      issue = 1'b1;
      sel = 4'(order[k]);
      @(posedge clk);
      #1;
    end
    issue = 1'b0;
    repeat (ADD_LAT + 1) @(posedge clk);
    #1;
  endtask

  initial begin
    issue = 1'b0; sel = '0; p = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (a7 !== '0 || done7 !== 1'b0) failures++;
    rst = 1'b0;
    for (int rnd = 0; rnd < ROUNDS; rnd++) begin
      logic [31:0] e [4];
      for (int r = 0; r < 4; r++) begin
        for (int k = 0; k < 4; k++) p[r][k] = rand_fp(120, 130);
        e[r] = add(add(p[r][0], p[r][1]), add(p[r][2], p[r][3]));
      end
      n7 = 0; n1 = 0;
      issue_set(0, 8);
      issue_set(8, 4);
      checks += 2;
      if (n7 != 12) failures++;
      if (n1 != 12) failures++;
      checks += 8;
      if (a7.x !== e[0] || a1.x !== e[0]) failures++;
      if (a7.y !== e[1] || a1.y !== e[1]) failures++;
      if (a7.z !== e[2] || a1.z !== e[2]) failures++;
      if (a7.w !== e[3] || a1.w !== e[3]) failures++;
      if (a7.x === a7.y) failures++;
      if (a7.z === a7.w) failures++;
      if (a7.x === a7.z) failures++;
      if (a7.y === a7.w) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
