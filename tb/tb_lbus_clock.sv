// tb_lbus_clock: checks the timebase against a cycle count kept by the
// testbench. With a sample period of 16 cycles (CLK_HZ = 16*4096) a
// sample tick must come every 16 cycles, an AA tick every 256 and a frame
// tick every 4096; a 1 pps pulse must restart all of them.
module tb_lbus_clock;
  localparam int unsigned DIV = 16;
  logic clk = 0, rst_n = 0, pps = 0;
  logic sample_tick, aa_tick, frame_tick, pps_sync, irq;
  logic [3:0] frame_num;
  int checks = 0, failures = 0;
  int n = 0;          // cycles since the last restart
  int n_s = 0, n_a = 0, n_f = 0;

  lbus_clock #(.CLK_HZ(DIV * 4096), .SAMPLE_HZ(4096)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at n=%0d", what, n); end
  endtask

  // Independent reference: tick k of the sample chain comes one cycle after
  // the counter reaches k*DIV-1, i.e. when n == k*DIV (n counts edges).
  always @(posedge clk) if (rst_n) begin
    #1;
    check(sample_tick == (n > 0 && n % DIV == 0), "sample_tick");
    check(aa_tick     == (n > 0 && n % (DIV*16) == 0), "aa_tick");
    check(frame_tick  == (n > 0 && n % (DIV*256) == 0), "frame_tick");
    check(irq == sample_tick, "irq");
    if (n > 0) check(frame_num == 4'(n / (DIV*256)), "frame_num");
    n_s += sample_tick; n_a += aa_tick; n_f += frame_tick;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // run two frames
    repeat (2 * DIV * 256 + 5) begin @(posedge clk); n++; end
    // pps restarts the chain
    pps <= 1; @(posedge clk); pps <= 0; n = 0;
    #1 check(pps_sync == 1'b1, "pps_sync");
    repeat (DIV * 256 + 3) begin @(posedge clk); n++; end
    check(n_f == 3, "frame count");
    check(n_a == 3 * 16, "aa tick count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
