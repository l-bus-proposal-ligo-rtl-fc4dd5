// tb_lbus_bus_logic: runs bus reads and writes against a behavioural L-bus
// slave and measures every interval of the bus timing in ns, at the real
// 2^24 Hz clock (59.6 ns period), against the minimum times of the L-bus
// specification: t_ADDR >= 200, t_AH >= 50, t_DS >= 50, t_WR/t_RD >= 200,
// t_DH >= 50, t_CD >= 50, t_CA >= 50, t_CH >= 100. It also checks the cycle
// count of a write (12) and a read (11), the data rate (> 10 kB/s), ACK
// reporting for a decoded and a non-decoded address, ERR latching and
// clearing, the RESET line and stand-by.
`timescale 1ns/1ps
module tb_lbus_bus_logic;
  localparam realtime TCLK = 1.0e9 / 16777216.0;  // ns
  logic clk = 0, rst_n = 0;
  logic start = 0, write = 0, standby = 0, reset_req = 0, err_clr = 0;
  logic [15:0] addr = 0, wdata = 0;
  logic busy, done, ack_ok, rd_cap, err_latched;
  logic [15:0] rdata, ad_out, ad_in;
  logic ad_oe, addr_n, wr_n, bclk_n, reset_n;
  logic ack_n, err_n;
  int checks = 0, failures = 0;
  int n_stby = 0, n_noack = 0, n_err = 0;

  lbus_bus_logic dut (.*);
  always #(TCLK / 2) clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // ---------------- behavioural slave at board address 0x42 ----------------
  logic [15:0] s_alat = 0, s_mem [8];
  logic        s_oe = 0, s_ack = 0, s_err = 0;
  logic [15:0] s_dout = 0;
  wire         s_sel = (s_alat[15:8] == 8'h42);
  assign ad_in = ad_oe ? ad_out : (s_oe ? s_dout : 16'hFFFF);
  assign ack_n = !s_ack;
  assign err_n = !s_err;

  always @(posedge addr_n) s_alat = ad_in;
  always @(negedge bclk_n) if (s_sel) begin
    #20 s_ack = 1;                       // t_AD typical
    if (wr_n) begin s_dout = s_mem[s_alat[3:1]]; s_oe = 1; end
  end
  always @(posedge bclk_n) begin
    if (s_sel && !wr_n) s_mem[s_alat[3:1]] = ad_in;
    #20 s_ack = 0; s_oe = 0;             // t_DD
  end

  // ---------------- timing monitor ----------------
  realtime t_addr_fall, t_addr_rise, t_clk_fall, t_clk_rise, t_wr_fall, t_ad_addr_end;
  realtime t_last_clk_rise = -1.0e9, t_last_ad_data = 0;
  logic    was_drv_addr = 0;
  always @(negedge addr_n) begin
    t_addr_fall = $realtime;
    check($realtime - t_last_clk_rise >= 50.0, "t_CA");
  end
  always @(posedge addr_n) begin
    t_addr_rise = $realtime;
    check($realtime - t_addr_fall >= 200.0, "t_ADDR");
  end
  always @(negedge wr_n) t_wr_fall = $realtime;
  always @(negedge bclk_n) begin
    t_clk_fall = $realtime;
    check($realtime - t_addr_rise >= 50.0, "t_CD");
    check($realtime - t_last_clk_rise >= 100.0, "t_CH");
    check(t_ad_addr_end - t_addr_rise >= 50.0, "t_AH");
    if (!wr_n) check($realtime - t_wr_fall >= 50.0, "t_DS");
  end
  always @(posedge bclk_n) begin
    t_clk_rise = $realtime;
    t_last_clk_rise = $realtime;
    check($realtime - t_clk_fall >= 200.0, "t_WR/t_RD");
  end
  // end of the address on AD: the first change of the controller's drive
  // after ADDR rose
  always @(posedge clk) begin
    if (addr_n && was_drv_addr && !(ad_oe && ad_out == dut.a_q)) t_ad_addr_end = $realtime;
    was_drv_addr = ad_oe && (ad_out == dut.a_q) && (dut.state inside {dut.S_ADDR, dut.S_AHOLD});
  end
  // data hold after CLK rises (write)
  realtime t_wr_rise;
  always @(posedge wr_n) begin
    t_wr_rise = $realtime;
    check($realtime - t_clk_rise >= 50.0, "t_DH");
  end

  // ---------------- command tasks ----------------
  task automatic bus_cycle(input logic w, input logic [15:0] a, input logic [15:0] d,
                           output int cycles, output logic ok, output logic [15:0] q);
    @(posedge clk);
    start <= 1; write <= w; addr <= a; wdata <= d;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    #1;
    while (busy) begin @(posedge clk); #1; cycles++; end
    ok = ack_ok;
    q = rdata;
  endtask

  initial begin
    int cyc; logic ok; logic [15:0] q;
    realtime t0, t1;
    foreach (s_mem[i]) s_mem[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);

    // writes then reads back
    for (int i = 0; i < 8; i++) begin
      bus_cycle(1, 16'h4200 + 16'(2 * i), 16'hA5A0 + 16'(i), cyc, ok, q);
      check(cyc == 12, "write cycle count"); if (cyc != 12) $display("cyc=%0d", cyc);
      check(ok, "write acknowledged");
      check(s_mem[i] == 16'hA5A0 + 16'(i), "slave received data");
    end
    t0 = $realtime;
    for (int i = 0; i < 8; i++) begin
      bus_cycle(0, 16'h4200 + 16'(2 * i), 0, cyc, ok, q);
      check(cyc == 11, "read cycle count"); if (cyc != 11) $display("cyc=%0d", cyc);
      check(ok, "read acknowledged");
      check(q == 16'hA5A0 + 16'(i), "read data");
    end
    t1 = $realtime;
    // data rate: 16 bytes in (t1-t0) ns must exceed 10 kB/s
    check(16.0 / ((t1 - t0) * 1.0e-9) > 10.0e3, "data rate > 10 kB/s");

    // address bit 0 is always zero on the bus
    bus_cycle(0, 16'h4203, 0, cyc, ok, q);
    check(q == 16'hA5A1 && s_alat[0] == 1'b0, "address bit 0 forced to zero");

    // nobody at 0x77: no ACK, bus floats high
    bus_cycle(0, 16'h7700, 0, cyc, ok, q);
    check(!ok, "no ACK from empty slot"); n_noack += !ok;
    check(q == 16'hFFFF, "empty bus reads ones");

    // stand-by: no bus activity
    standby <= 1;
    fork
      begin : watch
        @(negedge addr_n or negedge bclk_n);
        check(0, "bus activity during stand-by");
      end
      begin
        bus_cycle(1, 16'h4200, 16'h1234, cyc, ok, q);
        check(!ok, "stand-by refuses"); n_stby += !ok;
        check(s_mem[0] == 16'hA5A0, "stand-by: nothing written");
        repeat (20) @(posedge clk);
        disable watch;
      end
    join
    standby <= 0;

    // ERR is latched and can only be cleared once released
    check(!err_latched, "no ERR yet");
    s_err = 1; repeat (4) @(posedge clk);
    check(err_latched, "ERR latched"); n_err += err_latched;
    s_err = 0; repeat (4) @(posedge clk);
    check(err_latched, "ERR stays latched");
    err_clr <= 1; @(posedge clk); err_clr <= 0; @(posedge clk);
    check(!err_latched, "ERR cleared");

    // RESET
    reset_req <= 1; repeat (2) @(posedge clk); #1;
    check(!reset_n, "RESET driven low");
    reset_req <= 0; repeat (2) @(posedge clk); #1;
    check(reset_n, "RESET released");

    check(n_stby > 0 && n_noack > 0 && n_err > 0, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
