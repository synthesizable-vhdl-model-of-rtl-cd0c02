// pipe_delay_tb: checks the register chain at depth 1 (its default, the plain
// D flip-flop) and at depth 5. A random word enters every cycle. Each output
// must equal the input from exactly DEPTH cycles earlier. Both outputs must
// be zero right after reset.
module pipe_delay_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] d1, q1;
  logic [7:0]  d5, q5;
  int checks = 0, failures = 0;

  pipe_delay                           dut1 (.clk, .rst, .d(d1), .q(q1));
  pipe_delay #(.WIDTH(8), .DEPTH(5))   dut5 (.clk, .rst, .d(d5), .q(q5));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] h1 [$];
  logic [7:0]  h5 [$];

  initial begin
    d1 = 32'hDEAD_BEEF; d5 = 8'hA5;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (q1 !== '0 || q5 !== '0) failures++;
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      d1 = $urandom; d5 = 8'($urandom);
      h1.push_back(d1); h5.push_back(d5);
      @(posedge clk);
      #1;
      checks++; if (q1 !== h1[i]) failures++;
      if (i >= 4) begin
        checks++; if (q5 !== h5[i-4]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
