// tb_lbus_controller: drives the controller through its processor registers
// only, with a behavioural ADC (code = function of the MUX line and AA that
// were settled before the convert pulse) and a behavioural bus slave at
// board address 0x42 on the backplane. The sample period is shortened to
// 64 clock cycles (CLK_HZ = 64*4096). Checks: bus write and read with
// ACK status, missing ACK, stand-by, ERR latch and clear, RESET from the
// register and the button, control DAC codes and load pulses, and one full
// readback scan of 256 channels in order with their data.
module tb_lbus_controller;
  import lbus_pkg::*;
  localparam int DIV = 64;
  logic clk = 0, rst_n = 0, pps = 0, reset_btn = 0;
  logic [5:0] up_adr = 0;
  logic [7:0] up_wdata = 0, up_rdata;
  logic up_wr = 0, up_rd = 0, irq;
  logic [3:0] mux_sel, aa;
  logic adc_convert, adc_drdy = 0;
  logic [15:0] adc_data = 0;
  logic [15:0] dac_code [8];
  logic [7:0] dac_load;
  logic [15:0] ad_out, ad_in;
  logic ad_oe, addr_n, wr_n, bclk_n, reset_n, ack_n, err_n;
  int checks = 0, failures = 0;

  lbus_controller #(.CLK_HZ(DIV * 4096)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- processor bus ----------------
  task automatic up_write(input logic [5:0] a, input logic [7:0] d);
    @(posedge clk); up_adr <= a; up_wdata <= d; up_wr <= 1;
    @(posedge clk); up_wr <= 0;
  endtask
  task automatic up_read(input logic [5:0] a, output logic [7:0] d);
    @(posedge clk); up_adr <= a; up_rd <= 1;
    #1 d = up_rdata;
    @(posedge clk); up_rd <= 0;
  endtask
  task automatic bus_op(input logic w, input logic [15:0] a, input logic [15:0] d,
                        output logic ok, output logic [15:0] q);
    logic [7:0] st, lo, hi;
    up_write(REG_BADDR_LO, a[7:0]);
    up_write(REG_BADDR_HI, a[15:8]);
    if (w) begin
      up_write(REG_BDATA_LO, d[7:0]);
      up_write(REG_BDATA_HI, d[15:8]);
    end
    up_write(REG_BCMD, {6'd0, w, 1'b1});
    do up_read(REG_BCMD, st); while (st[0]);
    ok = st[1];
    up_read(REG_BDATA_LO, lo);
    up_read(REG_BDATA_HI, hi);
    q = {hi, lo};
  endtask

  // ---------------- behavioural ADC ----------------
  logic [3:0] prev_mux = 0, prev_aa = 0;
  function automatic logic [15:0] vin(input logic [3:0] line, input logic [3:0] a);
    return {line, a, ~line, a ^ 4'h9};
  endfunction
  always @(posedge clk) begin
    if (adc_convert) begin
      automatic logic [15:0] v = vin(prev_mux, prev_aa);
      fork begin
        repeat (5) @(posedge clk);
        adc_data <= v; adc_drdy <= 1;
        @(posedge clk) adc_drdy <= 0;
      end join_none
    end
    prev_mux <= mux_sel; prev_aa <= aa;
  end

  // ---------------- behavioural bus slave (board 0x42) ----------------
  logic [15:0] s_alat = 0, s_mem [4];
  logic s_oe = 0, s_ack = 0, s_err = 0;
  assign ad_in = ad_oe ? ad_out : (s_oe ? s_mem[s_alat[2:1]] : 16'hFFFF);
  assign ack_n = !s_ack;
  assign err_n = !s_err;
  always @(posedge addr_n) s_alat = ad_in;
  always @(negedge bclk_n) if (s_alat[15:8] == 8'h42) begin s_ack = 1; s_oe = wr_n; end
  always @(posedge bclk_n) begin
    if (s_alat[15:8] == 8'h42 && !wr_n) s_mem[s_alat[2:1]] = ad_in;
    s_ack = 0; s_oe = 0;
  end

  initial begin
    logic ok; logic [15:0] q; logic [7:0] b, lo, hi, tag;
    int seen [256];
    int nsamp;
    logic [7:0] exp_tag;
    foreach (s_mem[i]) s_mem[i] = 0;
    foreach (seen[i]) seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    pps <= 1; @(posedge clk); pps <= 0;   // align the scan

    // bus write / read through the registers
    for (int i = 0; i < 4; i++) begin
      bus_op(1, 16'h4200 + 16'(2 * i), 16'h1000 * 16'(i + 1) + 16'h0ABC, ok, q);
      check(ok, "write acknowledged");
      check(s_mem[i] == 16'h1000 * 16'(i + 1) + 16'h0ABC, "slave got data");
    end
    for (int i = 0; i < 4; i++) begin
      bus_op(0, 16'h4200 + 16'(2 * i), 0, ok, q);
      check(ok && q == 16'h1000 * 16'(i + 1) + 16'h0ABC, "read data");
    end
    bus_op(0, 16'h9900, 0, ok, q);
    check(!ok && q == 16'hFFFF, "no ACK on empty slot");
    // stand-by
    up_write(REG_CTRL, 8'h01);
    up_read(REG_BCMD, b); check(b[3], "stand-by status");
    bus_op(1, 16'h4200, 16'h5555, ok, q);
    check(!ok && s_mem[0] == 16'h1ABC, "stand-by: no bus cycle");
    up_write(REG_CTRL, 8'h00);
    // ERR
    s_err = 1; repeat (4) @(posedge clk); s_err = 0;
    up_read(REG_BCMD, b); check(b[2], "ERR latched");
    up_write(REG_CTRL, 8'h04);
    up_read(REG_BCMD, b); check(!b[2], "ERR cleared");
    // RESET from register and button
    up_write(REG_CTRL, 8'h02); repeat (2) @(posedge clk);
    check(!reset_n, "RESET from register");
    up_write(REG_CTRL, 8'h00); repeat (2) @(posedge clk);
    check(reset_n, "RESET released");
    reset_btn <= 1; repeat (3) @(posedge clk); #1 check(!reset_n, "RESET from button");
    reset_btn <= 0; repeat (3) @(posedge clk); #1 check(reset_n, "button released");
    // DACs
    for (int c = 0; c < 8; c++) begin
      up_write(6'(REG_DAC_BASE + 2 * c), 8'(c * 17));
      check(dac_code[c] == 0, "DAC unchanged after low byte");
      @(posedge clk); up_adr <= 6'(REG_DAC_BASE + 2 * c + 1); up_wdata <= 8'(200 - c); up_wr <= 1;
      @(posedge clk); up_wr <= 0; #1;
      check(dac_load == 8'(1 << c), "DAC load pulse");
      check(dac_code[c] == {8'(200 - c), 8'(c * 17)}, "DAC code");
    end

    // full scan: restart with pps, then follow 256 + 16 samples
    pps <= 1; @(posedge clk); pps <= 0;
    repeat (10) @(posedge clk);
    up_read(REG_ADC_HI, hi);   // drop the sample taken before the restart
    exp_tag = 8'h00; nsamp = 0;
    while (nsamp < 272) begin
      do up_read(REG_BCMD, b); while (!b[5]);
      up_read(REG_ADC_LO, lo);
      up_read(REG_ADC_TAG, tag);
      up_read(REG_ADC_HI, hi);
      check(tag == exp_tag, "scan order: line fastest, AA every 16");
      if (tag != exp_tag) $display("tag=%h exp=%h", tag, exp_tag);
      check({hi, lo} == vin(tag[3:0], tag[7:4]), "sample data matches its channel");
      seen[tag]++;
      exp_tag = exp_tag + 8'd1;
      nsamp++;
    end
    begin
      int all = 1;
      foreach (seen[i]) if (seen[i] == 0) all = 0;
      check(all == 1, "all 256 readback channels sampled");
    end
    up_read(REG_AACNT, b);
    check(b[3:0] == aa, "4-bit counter readable");
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
