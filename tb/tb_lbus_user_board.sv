// tb_lbus_user_board: a behavioural bus master drives the L-bus strobes with
// the typical times of the bus specification (ns delays, no clock) and
// exercises every register of the example user board at switch address
// 0x05: binary output latch (write, read back), binary inputs, high
// resolution DAC latch, the four quad-DAC channels (12 bits), an unused
// region, accesses to another board's address (no ACK, no drive, no
// change) and the power-up ERR request.
`timescale 1ns/1ps
module tb_lbus_user_board;
  logic        pwr_up = 0;
  logic [7:0]  sw_addr = 8'h05;
  logic [15:0] ad_in, ad_out, bin_in = 0, bin_out, hires_code;
  logic        addr_n = 1, wr_n = 1, bclk_n = 1;
  logic        ad_oe, ack_drv, err_drv;
  logic [11:0] lores_code [4];
  int checks = 0, failures = 0;
  logic        m_oe = 0;
  logic [15:0] m_ad = 0;

  lbus_user_board dut (.*);

  // a second board that compares only 7 address bits: switch 0x0A answers
  // at 0x0A00-0x0BFF
  logic [15:0] ad_out2, bin_out2, hires2;
  logic        ad_oe2, ack2, err2;
  logic [11:0] lores2 [4];
  lbus_user_board #(.SEL_BITS(7)) dut2 (
    .pwr_up, .sw_addr(8'h0A), .ad_in, .addr_n, .wr_n, .bclk_n,
    .ad_out(ad_out2), .ad_oe(ad_oe2), .ack_drv(ack2), .err_drv(err2),
    .bin_in(16'h0), .bin_out(bin_out2), .hires_code(hires2), .lores_code(lores2));

  // backplane: master or a board drives AD, else pull-ups
  assign ad_in = m_oe ? m_ad : (ad_oe ? ad_out : (ad_oe2 ? ad_out2 : 16'hFFFF));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  task automatic bus_write(input logic [15:0] a, input logic [15:0] d, output logic ack);
    m_ad = a; m_oe = 1; addr_n = 0; #200;
    addr_n = 1; #50;
    m_ad = d; wr_n = 0; #50;
    bclk_n = 0; #20;                       // t_AD typical
    #180 ack = ack_drv;
    bclk_n = 1; #50;
    wr_n = 1; m_oe = 0; #50;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [15:0] d, output logic ack);
    m_ad = a; m_oe = 1; addr_n = 0; #200;
    addr_n = 1; #50;
    m_oe = 0; #50;
    bclk_n = 0; #200;
    d = ad_in; ack = ack_drv;
    bclk_n = 1; #50;
    check(!ad_oe, "board releases AD after CLK rises");
    #50;
  endtask

  initial begin
    logic ack; logic [15:0] d;
    #5 pwr_up = 1;
    #100;
    check(err_drv, "ERR pulled during power-up");
    pwr_up = 0; #100;
    check(!err_drv, "ERR released after power-up");
    check(bin_out == 0 && hires_code == 0, "latches cleared at power-up");

    for (int t = 0; t < 30; t++) begin
      automatic logic [15:0] v = 16'($urandom);
      automatic logic [15:0] w = 16'($urandom);
      bus_write(16'h0500, v, ack);
      check(ack, "ACK on write"); check(bin_out == v, "binary output latch");
      bus_read(16'h0500, d, ack);
      check(ack && d == v, "binary output read back");
      bin_in = w;
      bus_read(16'h0508, d, ack);
      check(ack && d == w, "binary inputs");
      bus_write(16'h0510, w ^ v, ack);
      check(hires_code == (w ^ v), "high resolution DAC latch");
      bus_read(16'h0510, d, ack);
      check(d == (w ^ v), "high resolution DAC read back");
      for (int c = 0; c < 4; c++) begin
        bus_write(16'h0518 + 16'(2 * c), v + 16'(c), ack);
        check(ack && lores_code[c] == 12'(v + 16'(c)), "quad DAC write");
      end
      for (int c = 0; c < 4; c++) begin
        bus_read(16'h0518 + 16'(2 * c), d, ack);
        check(d == {4'h0, 12'(v + 16'(c))}, "quad DAC read back");
      end
      // another board's address: no ACK, no change, no drive
      bus_write(16'h0600, ~v, ack);
      check(!ack && bin_out == v, "other board write ignored");
      bus_read(16'h0610, d, ack);
      check(!ack && d == 16'hFFFF, "other board read not answered");
      // unused region of this board
      bus_read(16'h0528, d, ack);
      check(ack && d == 16'hFFFF, "unused region reads ones");
    end
    // the 7-bit board answers in both of its 256-byte pages
    bus_write(16'h0A00, 16'h1111, ack);
    check(bin_out2 == 16'h1111 && !ack, "wide board, first page");
    bus_write(16'h0B00, 16'h2222, ack);
    check(bin_out2 == 16'h2222, "wide board, second page");
    bus_read(16'h0B00, d, ack);
    check(d == 16'h2222, "wide board read");
    bus_write(16'h0C00, 16'h3333, ack);
    check(bin_out2 == 16'h2222, "wide board ignores other pages");
    // a board powering up again asks for initialisation and loses its data
    pwr_up = 1; #10;
    check(err_drv && bin_out == 0 && lores_code[2] == 0, "power-up clears and flags");
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
