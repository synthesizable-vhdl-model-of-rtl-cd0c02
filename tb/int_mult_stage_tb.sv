// int_mult_stage_tb: a new random matrix and vertex every cycle; all
// sixteen products must equal the integer products one cycle later.
module int_mult_stage_tb;
  import sm_pkg::*;
  import sm_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sm_in_t [3:0] v;
  sm_in_t [3:0][3:0] m;
  sm_res_t [3:0][3:0] p;
  int checks = 0, failures = 0;

  int_mult_stage dut (.clk, .rst, .v, .m, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '0; m = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (p !== '0) failures++;
    rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      sm_res_t [3:0][3:0] e;
      for (int c = 0; c < 4; c++) v[c] = rand_in();
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          m[r][c] = rand_in();
          e[r][c] = i2sm(in2i(m[r][c]) * in2i(v[c]));
        end
      @(posedge clk);
      #1;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (p[r][c] !== e[r][c]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
