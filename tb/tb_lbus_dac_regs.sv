// tb_lbus_dac_regs: writes random codes to all 8 DAC channels as byte pairs
// and checks that a channel changes only on its high byte write, with one
// load pulse, and that each code reads back.
module tb_lbus_dac_regs;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [3:0] sub = 0;
  logic [7:0] wdata = 0, rdata;
  logic [15:0] code [8];
  logic [7:0] dac_load;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  lbus_dac_regs dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 100; t++) begin
      automatic int ch = $urandom_range(0, 7);
      automatic logic [15:0] v = 16'($urandom);
      wr <= 1; sub <= 4'(ch * 2); wdata <= v[7:0]; @(posedge clk);
      wr <= 0; #1;
      check(code[ch] == model[ch] && dac_load == 0, "low byte staged only");
      wr <= 1; sub <= 4'(ch * 2 + 1); wdata <= v[15:8]; @(posedge clk);
      wr <= 0; #1;
      model[ch] = v;
      check(code[ch] == v, "code loaded");
      check(dac_load == 8'(1 << ch), "load strobe");
      sub <= 4'(ch * 2); #1 check(rdata == v[7:0], "read low");
      sub <= 4'(ch * 2 + 1); #1 check(rdata == v[15:8], "read high");
      @(posedge clk); #1 check(dac_load == 0, "strobe one cycle");
    end
    for (int i = 0; i < 8; i++) check(code[i] == model[i], "final codes");
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
