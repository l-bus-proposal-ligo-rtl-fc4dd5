// tb_lbus_addr_latch: loads random bytes and checks the 16-bit address,
// including that bit 0 always reads zero.
module tb_lbus_addr_latch;
  logic clk = 0, rst_n = 0, wr_lo = 0, wr_hi = 0;
  logic [7:0] wdata = 0;
  logic [15:0] addr, model = 0;
  int checks = 0, failures = 0;

  lbus_addr_latch dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 500; t++) begin
      automatic logic lo = 1'($urandom), hi = 1'($urandom);
      automatic logic [7:0] d = 8'($urandom);
      wr_lo <= lo; wr_hi <= hi; wdata <= d;
      @(posedge clk); #1;
      if (lo) model[7:0] = {d[7:1], 1'b0};
      if (hi) model[15:8] = d;
      checks++;
      if (addr !== model || addr[0] !== 1'b0) begin
        failures++; $display("FAIL addr=%h model=%h", addr, model);
      end
    end
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
