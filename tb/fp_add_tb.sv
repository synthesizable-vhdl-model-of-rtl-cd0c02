// fp_add_tb: self-checking testbench of the pipelined floating point
// add unit.
//
// A new operand pair enters every cycle. The expected result is computed in
// double precision by the simulator and rounded to single precision by
// fp_ref_pkg. Each result is checked exactly 7 cycles after its operands
// entered, which also checks the latency. The run covers random normal
// operands and a set of directed cases: exact values, zeros, infinities and
// NaN.
module fp_add_tb;
  import fp_ref_pkg::*;

  localparam int LAT = 7;
  localparam int N_RANDOM = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_add dut (.clk(clk), .rst(rst), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q [$];
  logic [31:0] da [$], db [$];

  function automatic logic [31:0] expect_of(input logic [31:0] x, input logic [31:0] z);
    return r2fp(fp2r(x) + fp2r(z));
  endfunction

  task automatic push(input logic [31:0] x, input logic [31:0] z, input logic [31:0] e);
    da.push_back(x); db.push_back(z); exp_q.push_back(e);
  endtask

  initial begin
    // directed cases
    push(32'h4000_0000, 32'h3F80_0000, 32'h4040_0000);  // 2 + 1 = 3
    push(32'h4000_0000, 32'hC000_0000, 32'h0000_0000);  // 2 - 2 = +0
    push(32'h4080_0000, 32'hC040_0000, 32'h3F80_0000);  // 4 - 3 = 1
    push(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);  // -0 + -0 = -0
    push(32'h0000_0000, 32'hC0A0_0000, 32'hC0A0_0000);  // 0 + -5 = -5
    push(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);  // inf - inf = NaN
    push(32'h7F80_0000, 32'h4000_0000, 32'h7F80_0000);  // inf + 2 = inf
    push(32'h4B80_0000, 32'h3F80_0000, 32'h4B80_0000);  // 2^24 + 1 = 2^24 (tie to even)
    push(32'h4B80_0000, 32'h4000_0000, 32'h4B80_0001);  // 2^24 + 2
    push(32'h3F80_0000, 32'h2F80_0000, 32'h3F80_0000);  // 1 + 2^-32 = 1
    for (int i = 0; i < N_RANDOM; i++) begin
      logic [31:0] x, z;
      x = rand_fp(115, 135);
      z = (i % 4 == 0) ? {~x[31], x[30:0] ^ 31'($urandom % 8)} : rand_fp(115, 135);
      push(x, z, expect_of(x, z));
    end

    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    if (y !== 32'd0) failures++;   // pipeline cleared by reset
    checks++;
    for (int i = 0; i < da.size() + LAT; i++) begin
      if (i < da.size()) begin a <= da[i]; b <= db[i]; end
      else begin a <= '0; b <= '0; end
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && (i - (LAT - 1)) < da.size()) begin
        int k;
        k = i - (LAT - 1);
        checks++;
        if (y !== exp_q[k]) begin
          failures++;
          if (failures < 10)
            $display("mismatch %0d: %h add %h -> %h, expected %h", k, da[k], db[k], y, exp_q[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
