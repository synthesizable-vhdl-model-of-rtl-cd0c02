// bin_mult_tb: every pair of 8-bit operands, back to back, on the default
// 8-bit multiplier, and every pair of 3-bit operands on a 3-bit copy. Each
// product must be exact, done must come exactly 2N cycles after the edge
// that samples go, and
// a go while busy must be ignored. Reset must clear the product.
module bin_mult_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic go, go3;
  logic [7:0] mc, mp;
  logic [2:0] mc3, mp3;
  logic busy, done, busy3, done3;
  logic [15:0] prod;
  logic [5:0] prod3;
  int checks = 0, failures = 0;

  bin_mult dut (.clk, .rst, .go, .multiplicand(mc), .multiplier(mp), .busy, .done, .product(prod));
  bin_mult #(.N(3)) dut3 (.clk, .rst, .go(go3), .multiplicand(mc3), .multiplier(mp3),
                          .busy(busy3), .done(done3), .product(prod3));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    go = 1'b0; go3 = 1'b0; {mc, mp, mc3, mp3} = '0;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    // 3-bit copy, exhaustive
    for (int i = 0; i < 64; i++) begin
      mc3 = 3'(i); mp3 = 3'(i >> 3);
      go3 = 1'b1;
      @(posedge clk);
      #1;
      go3 = 1'b0;
      n = 0;
      while (!done3 && n < 100) begin
        @(posedge clk);
        #1;
        n++;
      end
      checks += 2;
      if (n != 2 * 3) begin failures++; $display("N=3 latency %0d", n); end
      if (prod3 !== 6'(i % 8 * (i / 8))) begin failures++; $display("N=3 %0d: %0d", i, prod3); end
    end
    // 8-bit, exhaustive
    for (int i = 0; i < 65536; i++) begin
      mc = 8'(i); mp = 8'(i >> 8);
      go = 1'b1;
      @(posedge clk);
      #1;
      go = 1'b0;
      n = 0;
      while (!done && n < 100) begin
        if (n == 4) begin               // go while busy, other operands
          go = 1'b1; mc = ~mc;
          @(posedge clk);
          #1;
          go = 1'b0; mc = ~mc;
          n++;
          continue;
        end
        @(posedge clk);
        #1;
        n++;
      end
      checks += 2;
      if (n != 2 * 8) begin failures++; $display("N=8 latency %0d", n); end
      if (prod !== 16'((i % 256) * (i / 256))) begin
        failures++;
        if (failures < 5) $display("%0d * %0d = %0d", i % 256, i / 256, prod);
      end
    end
    rst = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (prod !== '0 || busy) begin failures++; $display("after reset: %h busy %b", prod, busy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
