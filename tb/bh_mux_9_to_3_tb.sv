// bh_mux_9_to_3_tb: random, distinct values on all twelve inputs; for each
// select code the three outputs must come from the right group.
module bh_mux_9_to_3_tb;
  import sm_pkg::*;
  sm_res_t v [12];
  logic [1:0] mode_sel;
  sm_res_t ax, ay, az;
  int checks = 0, failures = 0;

  bh_mux_9_to_3 dut (.tx_x(v[0]), .ty_y(v[1]), .tz_z(v[2]), .sx_x(v[3]), .sy_y(v[4]), .sz_z(v[5]),
                     .rot_x(v[6]), .rot_y(v[7]), .rot_z(v[8]),
                     .pass_x(v[9]), .pass_y(v[10]), .pass_z(v[11]),
                     .mode_sel, .ans_x(ax), .ans_y(ay), .ans_z(az));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int k = 0; k < 12; k++) v[k] = {1'($urandom_range(0, 1)), 12'(n), 4'(k)};
      mode_sel = 2'(n % 4);
      #1;
      checks += 3;
      if (ax !== v[3 * (n % 4)])     failures++;
      if (ay !== v[3 * (n % 4) + 1]) failures++;
      if (az !== v[3 * (n % 4) + 2]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
