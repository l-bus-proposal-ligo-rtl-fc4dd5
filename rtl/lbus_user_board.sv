// lbus_user_board: digital L-bus interface of the example user board.
//
// The board has no clock of its own: like the TTL/HCT logic it describes,
// every register here is clocked by an edge of a bus strobe.
//
//   address latch  On the rising edge of ADDR (end of the address phase) the
//                  16-bit address on AD is latched.
//   board select   The latched A15..A8 are compared with the 8-bit switch
//                  address sw_addr; sel is high while they are equal.
//   bus logic      With sel high and CLK low, the board drives ACK low. A
//                  read strobe (WR high) or a write strobe (WR low) is
//                  formed from sel and CLK; during a read the board drives
//                  AD (ad_oe).
//   decode         A5..A3 pick one of 8 regions of 8 bytes each:
//                    0  binary output latch, 16 bits, write and read back
//                    1  binary inputs, 16 bits, read only
//                    2  16-bit DAC latch (high resolution DAC), write and
//                       read back
//                    3  quad 12-bit DAC; A2..A1 select the channel, write
//                       and read back, AD11..AD0 carry the code
//                    4-7 unused: acknowledged, read as all ones
//                  Write registers load on the rising edge of their write
//                  strobe (when CLK rises), while AD and WR are still held.
//   ERR            pwr_up high pulls the open-collector ERR line low, so the
//                  controller learns that this board lost its settings.
//
// With base address B (board number in A15..A8) the registers are at
// B+0x00, B+0x08, B+0x10 and B+0x18..0x1E. A board that needs more than 256
// bytes may compare fewer address bits (SEL_BITS); the rest of its switch is
// then ignored.
//
// The structure (574 address latch on ADDR, 520 comparator against a switch,
// 138 decoders on A5..A3 gated by the read and write strobes, region 3 for
// the quad DAC, ACK from select and CLK, ERR on power-up) follows the example
// board's schematics. This design's own choices: pwr_up stands for the board's
// power-up RC and also clears all latches (the parts have no reset), latches
// capture on the strobe's rising edge instead of being transparent while it
// is low, undecoded regions read as all ones, and the RESET line is not
// used (the example board ignores it).
module lbus_user_board
  import lbus_pkg::*;
#(
  // number of top address bits compared with the switch (8 on the example
  // board; fewer give the board a larger address window)
  parameter int unsigned SEL_BITS = 8
) (
  input  logic                   pwr_up,     // board power-up (high while the RC holds)
  input  logic [BOARD_ADR_W-1:0] sw_addr,    // board address switch
  // backplane
  input  logic [AD_W-1:0]        ad_in,
  input  logic                   addr_n,
  input  logic                   wr_n,
  input  logic                   bclk_n,
  output logic [AD_W-1:0]        ad_out,
  output logic                   ad_oe,
  output logic                   ack_drv,    // pull ACK low
  output logic                   err_drv,    // pull ERR low
  // board side
  input  logic [15:0]            bin_in,
  output logic [15:0]            bin_out,
  output logic [15:0]            hires_code,
  output logic [11:0]            lores_code [4]
);
  logic [AD_W-1:0] a_lat;
  logic            sel, clk_act, rd_n, wrs_n;
  logic [7:0]      rd_dec_n, wr_dec_n;
  logic            cs3_n;
  logic [2:0]      region;
  logic [1:0]      dac_ch;

  // Address latch, clocked by the rising (trailing) edge of ADDR.
  always_ff @(posedge addr_n or posedge pwr_up) begin
    if (pwr_up) a_lat <= '0;
    else        a_lat <= ad_in;
  end

  assign region = a_lat[5:3];
  assign dac_ch = a_lat[2:1];

  always_comb begin
    sel     = (a_lat[15 -: SEL_BITS] == sw_addr[BOARD_ADR_W-1 -: SEL_BITS]);
    clk_act = !bclk_n;
    rd_n    = !(sel && clk_act && wr_n);
    wrs_n   = !(sel && clk_act && !wr_n);
    for (int k = 0; k < 8; k++) begin
      rd_dec_n[k] = !(!rd_n  && (region == 3'(k)));
      wr_dec_n[k] = !(!wrs_n && (region == 3'(k)));
    end
    cs3_n   = rd_dec_n[3] && wr_dec_n[3];
    ack_drv = sel && clk_act;
    ad_oe   = !rd_n;
    err_drv = pwr_up;
  end

  // Region 0: binary output latch.
  always_ff @(posedge wr_dec_n[0] or posedge pwr_up) begin
    if (pwr_up) bin_out <= '0;
    else        bin_out <= ad_in;
  end

  // Region 2: high resolution DAC latch.
  always_ff @(posedge wr_dec_n[2] or posedge pwr_up) begin
    if (pwr_up) hires_code <= '0;
    else        hires_code <= ad_in;
  end

  // Region 3: quad DAC input registers, written when its chip select ends
  // with WR (the DAC's R/W) low.
  always_ff @(posedge cs3_n or posedge pwr_up) begin
    if (pwr_up) begin
      for (int i = 0; i < 4; i++) lores_code[i] <= '0;
    end else if (!wr_n) begin
      lores_code[dac_ch] <= ad_in[11:0];
    end
  end

  // Read data onto the backplane.
  always_comb begin
    unique case (region)
      3'd0:    ad_out = bin_out;
      3'd1:    ad_out = bin_in;
      3'd2:    ad_out = hires_code;
      3'd3:    ad_out = {4'h0, lores_code[dac_ch]};
      default: ad_out = '1;
    endcase
  end

endmodule
