// int_add_stage_tb: a new random set of sixteen 17-bit sign-magnitude
// products every cycle, including the largest magnitudes and exact
// cancellations; each row sum must equal the integer sum one cycle later.
module int_add_stage_tb;
  import sm_pkg::*;
  import sm_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sm_res_t [3:0][3:0] p;
  sm_sum_t [3:0] ans;
  int checks = 0, failures = 0;

  int_add_stage dut (.clk, .rst, .p, .ans);

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

  initial begin
    p = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (ans !== '0) failures++;
    rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      int e [4];
      for (int r = 0; r < 4; r++) begin
        e[r] = 0;
        for (int c = 0; c < 4; c++) begin
          case ($urandom_range(0, 5))
            0: p[r][c] = {1'($urandom_range(0, 1)), RES_W'(255 * 255)};
            1: p[r][c] = '0;
            default: p[r][c] = i2sm(in2i(rand_in()) * in2i(rand_in()));
          endcase
          if (n % 5 == 0 && c == 1) p[r][1] = sm_neg(p[r][0]);
          e[r] += sm2i(p[r][c]);
        end
      end
      @(posedge clk);
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (ans[r] !== i2sum(e[r])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
