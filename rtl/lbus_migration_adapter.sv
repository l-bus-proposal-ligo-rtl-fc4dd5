// lbus_migration_adapter: L-bus interface of the adapter for older eurocards.
//
// The adapter sits between the L-bus backplane and an older board that
// still expects its I/O on individual P1/P2 pins. It gives that board up to
// 32 binary outputs, 16 binary inputs and up to 8 control DACs, all reached
// through the digital bus; a 16-channel readback multiplexer on the adapter
// (analog, selected directly by AA0-AA3) is not part of this RTL.
//
// Like the example user board it has no clock: every register is clocked by
// an edge of a bus strobe.
//   address latch  The rising edge of ADDR latches the 16-bit address.
//   board select   A15..A8 are compared with the switch address sw_addr.
//   bus logic      sel and CLK low give ACK; with WR high the adapter drives
//                  AD (read strobe), with WR low it forms the write strobe.
//   decode         A5..A3 pick an 8-byte region, A2..A1 a word in it:
//                    0  binary outputs: word 0 = BO15..BO0, word 1 =
//                       BO31..BO16 (if NUM_BO > 16); write and read back
//                    1  binary inputs BI15..BI0, read only
//                    2  DAC 0..3 (word = DAC number), 16-bit codes
//                    3  DAC 4..7, 16-bit codes; write and read back
//                    4-7, and words of absent outputs or DACs: acknowledged,
//                       writes ignored, read as all ones
//                  Write registers load when the write strobe ends (CLK
//                  rises), while AD and WR are still held.
//   ERR            pwr_up high pulls ERR low so the controller reloads it.
//
// What follows the adapter's description: 16 to 32 binary outputs, 16
// binary inputs, up to 8 DACs, the analog readback mux, and the bus
// interface every user board has (switch-selected board address in
// A15..A8, ACK, ERR on power-up). This design's own choices: the register
// layout above, 16-bit DAC codes (the width of the crate's control DACs),
// pwr_up also clearing every register, and latches that capture on the
// strobe's trailing edge.
module lbus_migration_adapter
  import lbus_pkg::*;
#(
  parameter int unsigned NUM_BO   = 32,  // binary outputs, 16 to 32
  parameter int unsigned NUM_DACS = 8    // control DACs, 0 to 8
) (
  input  logic                   pwr_up,     // adapter power-up (high while the RC holds)
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
  // old board side
  input  logic [15:0]            bi,         // binary inputs
  output logic [NUM_BO-1:0]      bo,         // binary outputs
  output logic [15:0]            dac_code [NUM_DACS]
);
  logic [AD_W-1:0] a_lat;
  logic            sel, rd_n, wrs_n;
  logic [2:0]      region;
  logic [1:0]      word;
  logic [2:0]      dac_idx;
  logic            bo_wr_n, dac_wr_n;
  logic [31:0]     bo_r;

  always_ff @(posedge addr_n or posedge pwr_up) begin
    if (pwr_up) a_lat <= '0;
    else        a_lat <= ad_in;
  end

  assign region  = a_lat[5:3];
  assign word    = a_lat[2:1];
  assign dac_idx = {a_lat[3], a_lat[2:1]};

  always_comb begin
    sel      = (a_lat[15:8] == sw_addr);
    rd_n     = !(sel && !bclk_n && wr_n);
    wrs_n    = !(sel && !bclk_n && !wr_n);
    bo_wr_n  = !(!wrs_n && region == 3'd0);
    dac_wr_n = !(!wrs_n && region[2:1] == 2'b01);
    ack_drv  = sel && !bclk_n;
    ad_oe    = !rd_n;
    err_drv  = pwr_up;
  end

  // Binary output latches (word 1 exists only with more than 16 outputs).
  always_ff @(posedge bo_wr_n or posedge pwr_up) begin
    if (pwr_up)                          bo_r <= '0;
    else if (word == 2'd0)               bo_r[15:0]  <= ad_in;
    else if (word == 2'd1 && NUM_BO > 16) bo_r[31:16] <= ad_in;
  end
  assign bo = bo_r[NUM_BO-1:0];

  // DAC input registers.
  always_ff @(posedge dac_wr_n or posedge pwr_up) begin
    if (pwr_up) begin
      for (int i = 0; i < NUM_DACS; i++) dac_code[i] <= '0;
    end else begin
      for (int i = 0; i < NUM_DACS; i++)
        if (dac_idx == 3'(i)) dac_code[i] <= ad_in;
    end
  end

  // Read data onto the backplane.
  always_comb begin
    ad_out = '1;
    unique case (region)
      3'd0: if (word == 2'd0) ad_out = bo_r[15:0];
            else if (word == 2'd1 && NUM_BO > 16) ad_out = bo_r[31:16];
      3'd1: if (word == 2'd0) ad_out = bi;
      3'd2, 3'd3:
        for (int i = 0; i < NUM_DACS; i++)
          if (dac_idx == 3'(i)) ad_out = dac_code[i];
      default: ad_out = '1;
    endcase
  end

endmodule
