// tb_lbus_data_latch: random byte loads and backplane captures; a capture
// must win over a byte load in the same cycle.
module tb_lbus_data_latch;
  logic clk = 0, rst_n = 0, wr_lo = 0, wr_hi = 0, cap = 0;
  logic [7:0] wdata = 0;
  logic [15:0] cap_data = 0, data, model = 0;
  int checks = 0, failures = 0, n_cap = 0;

  lbus_data_latch dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 500; t++) begin
      automatic logic lo = 1'($urandom), hi = 1'($urandom), c = ($urandom_range(0, 3) == 0);
      automatic logic [7:0] d = 8'($urandom);
      automatic logic [15:0] cd = 16'($urandom);
      wr_lo <= lo; wr_hi <= hi; wdata <= d; cap <= c; cap_data <= cd;
      @(posedge clk); #1;
      if (c) begin model = cd; n_cap++; end
      else begin
        if (lo) model[7:0] = d;
        if (hi) model[15:8] = d;
      end
      checks++;
      if (data !== model) begin failures++; $display("FAIL data=%h model=%h", data, model); end
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
