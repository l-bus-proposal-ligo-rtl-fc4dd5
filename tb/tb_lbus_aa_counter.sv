// tb_lbus_aa_counter: drives random aa_tick and sync pulses and compares the
// 4-bit analog address and its wrap pulse with a reference count.
module tb_lbus_aa_counter;
  logic clk = 0, rst_n = 0, sync = 0, aa_tick = 0;
  logic [3:0] aa;
  logic wrap;
  int checks = 0, failures = 0;
  int ref_aa = 0, n_wrap = 0;
  logic ref_wrap;

  lbus_aa_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      aa_tick <= ($urandom_range(0, 2) == 0);
      sync    <= ($urandom_range(0, 300) == 0);
      @(posedge clk);
      ref_wrap = !sync && aa_tick && (ref_aa == 15);
      if (sync) ref_aa = 0;
      else if (aa_tick) ref_aa = (ref_aa + 1) % 16;
      #1;
      checks++;
      if (aa != 4'(ref_aa) || wrap != ref_wrap) begin
        failures++;
        $display("FAIL i=%0d aa=%0d ref=%0d wrap=%0b", i, aa, ref_aa, wrap);
      end
      n_wrap += wrap;
    end
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
