// behav_top_tb: the behavioural transform design end to end. New random
// inputs and select codes are applied every cycle, and each result must
// appear on the outputs one clock edge later, equal to the integer model of
// the selected transform. Also checks the reference design's rotation
// example (2, 2, 2) -> (2, -2, 2), a scale and translate example, and that
// reset clears the outputs.
module behav_top_tb;
  import sm_pkg::*;
  import sm_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sm_in_t xin, yin, zin, tx, ty, tz, sx, sy, sz;
  logic [1:0] axis_sel, angle_sel, mode_sel;
  sm_res_t xa, ya, za;
  int checks = 0, failures = 0;

  behav_top dut (.clk, .rst, .xin, .yin, .zin, .tx, .ty, .tz, .sx, .sy, .sz,
                 .axis_sel, .angle_sel, .mode_sel, .xans(xa), .yans(ya), .zans(za));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model(output int x, output int y, output int z);
    x = in2i(xin); y = in2i(yin); z = in2i(zin);
    case (mode_sel)
      2'b00: begin x += in2i(tx); y += in2i(ty); z += in2i(tz); end
      2'b01: begin x *= in2i(sx); y *= in2i(sy); z *= in2i(sz); end
      2'b10: rot_ref(int'(axis_sel), int'(angle_sel), x, y, z);
      default: ;
    endcase
  endfunction

  task automatic expect3(input int x, input int y, input int z);
    checks += 3;
    if (xa !== i2sm(x)) failures++;
    if (ya !== i2sm(y)) failures++;
    if (za !== i2sm(z)) failures++;
  endtask

  initial begin
    int ex, ey, ez;
    {xin, yin, zin, tx, ty, tz, sx, sy, sz} = '0;
    {axis_sel, angle_sel, mode_sel} = '0;
    repeat (3) @(posedge clk);
    #1;
    expect3(0, 0, 0);
    rst = 1'b0;
    // worked examples
    {xin, yin, zin} = {9'd2, 9'd2, 9'd2};
    axis_sel = 2'b11; angle_sel = 2'b01; mode_sel = 2'b10;
    @(posedge clk);
    #1;
    expect3(2, -2, 2);
    {sx, sy, sz} = {9'd3, 9'h102, 9'd1};     // 3, -2, 1
    mode_sel = 2'b01;
    @(posedge clk);
    #1;
    expect3(6, -4, 2);
    // random stream, one new input set per cycle
    model(ex, ey, ez);
    for (int n = 0; n < 2000; n++) begin
      {xin, yin, zin, tx, ty, tz} = {rand_in(), rand_in(), rand_in(), rand_in(), rand_in(), rand_in()};
      {sx, sy, sz} = {rand_in(), rand_in(), rand_in()};
      {axis_sel, angle_sel} = 4'($urandom);
      mode_sel = 2'(n % 4);
      model(ex, ey, ez);
      @(posedge clk);
      #1;
      expect3(ex, ey, ez);
    end
    rst = 1'b1;
    @(posedge clk);
    #1;
    expect3(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
