// tb_lbus_migration_adapter: a behavioural bus master drives the L-bus
// strobes with the minimum times of the bus specification (ns delays, no
// clock) and exercises the adapter at switch address 0x21: both binary
// output words, the binary inputs, all 8 DAC registers, unused words,
// another board's address (no ACK, no drive, no change) and the power-up
// ERR request. A second adapter with 16 outputs and 4 DACs checks that
// absent registers ignore writes and read as ones.
`timescale 1ns/1ps
module tb_lbus_migration_adapter;
  logic        pwr_up = 0;
  logic [15:0] ad_in, ad_out, bi = 0;
  logic        addr_n = 1, wr_n = 1, bclk_n = 1;
  logic        ad_oe, ack_drv, err_drv;
  logic [31:0] bo;
  logic [15:0] dac_code [8];
  int checks = 0, failures = 0;
  logic        m_oe = 0;
  logic [15:0] m_ad = 0;

  lbus_migration_adapter dut (.pwr_up, .sw_addr(8'h21), .ad_in, .ad_out,
    .addr_n, .wr_n, .bclk_n, .ad_oe, .ack_drv, .err_drv, .bi, .bo, .dac_code);

  logic [15:0] ad_out2, bo2;
  logic        ad_oe2, ack2, err2;
  logic [15:0] dac2 [4];
  lbus_migration_adapter #(.NUM_BO(16), .NUM_DACS(4)) dut2 (
    .pwr_up, .sw_addr(8'h22), .ad_in, .addr_n, .wr_n, .bclk_n,
    .ad_out(ad_out2), .ad_oe(ad_oe2), .ack_drv(ack2), .err_drv(err2),
    .bi(16'h5A5A), .bo(bo2), .dac_code(dac2));

  assign ad_in = m_oe ? m_ad : (ad_oe ? ad_out : (ad_oe2 ? ad_out2 : 16'hFFFF));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  task automatic bus_write(input logic [15:0] a, input logic [15:0] d, output logic ack);
    m_ad = a; m_oe = 1; addr_n = 0; #200;
    addr_n = 1; #50;
    m_ad = d; wr_n = 0; #50;
    bclk_n = 0; #200;
    ack = ack_drv || ack2;
    bclk_n = 1; #50;
    wr_n = 1; m_oe = 0; #50;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [15:0] d, output logic ack);
    m_ad = a; m_oe = 1; addr_n = 0; #200;
    addr_n = 1; #50;
    m_oe = 0; #50;
    bclk_n = 0; #200;
    d = ad_in; ack = ack_drv || ack2;
    bclk_n = 1; #50;
    check(!ad_oe && !ad_oe2, "adapter releases AD after CLK rises");
    #50;
  endtask

  initial begin
    logic ack; logic [15:0] d;
    logic [15:0] dv [8];
    #5 pwr_up = 1;
    #100;
    check(err_drv && err2, "ERR pulled during power-up");
    pwr_up = 0; #100;
    check(!err_drv, "ERR released after power-up");
    check(bo == 0 && dac_code[7] == 0, "registers cleared at power-up");

    for (int t = 0; t < 20; t++) begin
      automatic logic [15:0] v = 16'($urandom);
      automatic logic [15:0] w = 16'($urandom);
      bus_write(16'h2100, v, ack);
      check(ack && bo[15:0] == v, "outputs BO15..BO0");
      bus_write(16'h2102, w, ack);
      check(ack && bo == {w, v}, "outputs BO31..BO16");
      bus_read(16'h2100, d, ack); check(ack && d == v, "BO15..BO0 read back");
      bus_read(16'h2102, d, ack); check(ack && d == w, "BO31..BO16 read back");
      bi = v ^ w;
      bus_read(16'h2108, d, ack); check(ack && d == (v ^ w), "binary inputs");
      for (int n = 0; n < 8; n++) begin
        dv[n] = 16'($urandom);
        bus_write(16'h2110 + 16'(2 * n), dv[n], ack);
        check(ack && dac_code[n] == dv[n], "DAC write");
      end
      for (int n = 0; n < 8; n++) begin
        bus_read(16'h2110 + 16'(2 * n), d, ack);
        check(ack && d == dv[n], "DAC read back");
      end
      // unused words and regions: acknowledged, ignored, read as ones
      bus_write(16'h2104, ~v, ack);
      check(ack && bo == {w, v}, "unused output word ignored");
      bus_read(16'h210A, d, ack); check(ack && d == 16'hFFFF, "unused input word reads ones");
      bus_read(16'h2120, d, ack); check(ack && d == 16'hFFFF, "unused region reads ones");
      // another board's address
      bus_write(16'h2300, ~v, ack);
      check(!ack && bo == {w, v}, "other board write ignored");
      bus_read(16'h2310, d, ack);
      check(!ack && d == 16'hFFFF, "other board read not answered");
    end

    // the smaller adapter: 16 outputs, 4 DACs
    bus_write(16'h2200, 16'h1234, ack); check(ack && bo2 == 16'h1234, "small adapter outputs");
    bus_write(16'h2202, 16'h9999, ack); check(bo2 == 16'h1234, "small adapter has no BO31..16");
    bus_read(16'h2202, d, ack); check(ack && d == 16'hFFFF, "absent output word reads ones");
    bus_read(16'h2208, d, ack); check(d == 16'h5A5A, "small adapter inputs");
    bus_write(16'h2216, 16'h4321, ack); check(dac2[3] == 16'h4321, "small adapter DAC 3");
    bus_write(16'h2218, 16'h7777, ack); check(dac2[3] == 16'h4321 && dac2[0] == 0, "DAC 4 absent");
    bus_read(16'h2218, d, ack); check(ack && d == 16'hFFFF, "absent DAC reads ones");
    check(bo == {16'(bo >> 16), 16'(bo)}, "first adapter untouched");

    pwr_up = 1; #10;
    check(err_drv && bo == 0 && dac_code[3] == 0, "power-up clears and flags");
    pwr_up = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
