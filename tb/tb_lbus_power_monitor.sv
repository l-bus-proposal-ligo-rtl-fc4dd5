// tb_lbus_power_monitor: sets all rails to nominal, then moves each rail in
// turn just inside and just outside both ends of its window and checks the
// failure bit of that rail alone, and the summary pwr_fail.
module tb_lbus_power_monitor;
  real v [9];
  real lo [9] = '{4.75, 4.75, 4.75, 14.25, 14.25, 9.0, 9.0, 22.0, 22.0};
  real hi [9] = '{5.25, 5.25, 5.25, 15.75, 15.75, 12.0, 12.0, 28.0, 28.0};
  real nom [9] = '{5.0, 5.0, -5.0, 15.0, -15.0, 10.0, -10.0, 24.0, -24.0};
  logic [8:0] fail_mask;
  logic pwr_fail;
  int checks = 0, failures = 0;

  lbus_power_monitor dut (
    .v_dig5(v[0]), .v_p5(v[1]), .v_n5(v[2]), .v_p15(v[3]), .v_n15(v[4]),
    .v_p10(v[5]), .v_n10(v[6]), .v_p24(v[7]), .v_n24(v[8]),
    .fail_mask, .pwr_fail);

  task automatic expect_mask(input logic [8:0] m, input string what);
    #1;
    checks++;
    if (fail_mask !== m || pwr_fail !== (m != 0)) begin
      failures++; $display("FAIL %s: mask=%b exp=%b", what, fail_mask, m);
    end
  endtask

  initial begin
    for (int i = 0; i < 9; i++) v[i] = nom[i];
    expect_mask('0, "nominal");
    for (int i = 0; i < 9; i++) begin
      automatic real s = (nom[i] < 0.0) ? -1.0 : 1.0;
      v[i] = s * (lo[i] + 0.01); expect_mask('0, "just above low end");
      v[i] = s * (lo[i] - 0.01); expect_mask(9'(1 << i), "below low end");
      v[i] = s * (hi[i] - 0.01); expect_mask('0, "just below high end");
      v[i] = s * (hi[i] + 0.01); expect_mask(9'(1 << i), "above high end");
      v[i] = 0.0;                expect_mask(9'(1 << i), "rail lost");
      v[i] = nom[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
