// lbus_top: one L-bus front-end crate.
//
// A crate holds the bus controller and up to NUM_BOARDS user boards on a
// common backplane. The controller drives ADDR, WR, CLK and RESET to every
// board and shares AD0-AD15 with them through lbus_backplane; the boards
// answer on the open-collector ACK and ERR lines. Each board here is the
// example user board (binary output latch, binary inputs, one 16-bit DAC
// latch, a quad 12-bit DAC), with its own address switch and power-up input,
// except the last NUM_ADAPTERS slots, which hold migration adapters that
// connect older eurocards (32 binary outputs, 16 inputs, 8 DACs each). The
// mix of boards is this design's choice; the slot count is the document's.
//
// The analog parts of the crate are outside: the readback MUX and ADC of the
// controller (mux_sel, adc_convert, adc_drdy, adc_data), the analog address
// AA0-AA3 that every board's readback multiplexer decodes (aa), the control
// DACs (dac_code, dac_load) and the boards' own converters (hires_code,
// lores_code). The processor that links the crate to the host computer is
// outside too and uses the up_* register bus of the controller.
//
// The crate's supply monitor (a behavioural model with the rail voltages as
// real inputs v_*) joins the ERR line, so a rail outside its window is
// reported to the controller the same way as a board that needs loading.
//
// Timing: everything on clk (2^24 Hz) except the boards, which run from the
// bus strobes as described in lbus_user_board. NUM_BOARDS = 20 is the full
// width backplane (21 slots including the controller).
module lbus_top
  import lbus_pkg::*;
#(
  parameter int unsigned NUM_BOARDS = 20,
  parameter int unsigned NUM_ADAPTERS = 1,  // last slots hold migration adapters
  parameter int unsigned CLK_HZ     = 16_777_216,
  parameter int unsigned SAMPLE_HZ  = 4096
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   pps,
  input  logic                   reset_btn,
  // processor
  input  logic [UP_ADR_W-1:0]    up_adr,
  input  logic [7:0]             up_wdata,
  input  logic                   up_wr,
  input  logic                   up_rd,
  output logic [7:0]             up_rdata,
  output logic                   irq,
  // controller ADC/MUX and DACs
  output logic [3:0]             mux_sel,
  output logic                   adc_convert,
  input  logic                   adc_drdy,
  input  logic [15:0]            adc_data,
  output logic [3:0]             aa,
  output logic [15:0]            dac_code [NUM_CTRL_DACS],
  output logic [NUM_CTRL_DACS-1:0] dac_load,
  // backplane lines, for observation
  output logic [15:0]            bus_ad,
  output logic                   bus_addr_n,
  output logic                   bus_wr_n,
  output logic                   bus_clk_n,
  output logic                   bus_ack_n,
  output logic                   bus_err_n,
  output logic                   bus_reset_n,
  // user boards
  input  logic [7:0]             board_sw     [NUM_BOARDS],
  input  logic [NUM_BOARDS-1:0]  board_pwr_up,
  input  logic [15:0]            bin_in       [NUM_BOARDS],
  output logic [15:0]            bin_out      [NUM_BOARDS],
  output logic [15:0]            hires_code   [NUM_BOARDS],
  output logic [11:0]            lores_code   [NUM_BOARDS][4],
  // migration adapters (slots NUM_BOARDS-NUM_ADAPTERS and up; their binary
  // inputs are bin_in of their slot)
  output logic [31:0]            mig_bo       [NUM_ADAPTERS],
  output logic [15:0]            mig_dac      [NUM_ADAPTERS][8],
  // supply rails (volts) seen by the crate's supply monitor
  input  real                    v_dig5, v_p5, v_n5, v_p15, v_n15,
  input  real                    v_p10, v_n10, v_p24, v_n24,
  output logic [8:0]             pwr_fail_mask
);
  logic [15:0]           ctrl_ad;
  logic                  ctrl_oe;
  logic [15:0]           brd_ad [NUM_BOARDS];
  logic [NUM_BOARDS-1:0] brd_oe, brd_ack, brd_err;
  logic                  bp_err_n, pwr_fail;

  // A supply out of its window pulls ERR like a board does.
  lbus_power_monitor u_pwr (
    .v_dig5, .v_p5, .v_n5, .v_p15, .v_n15, .v_p10, .v_n10, .v_p24, .v_n24,
    .fail_mask(pwr_fail_mask), .pwr_fail);
  assign bus_err_n = bp_err_n && !pwr_fail;

  lbus_controller #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_ctrl (
    .clk, .rst_n, .pps, .reset_btn,
    .up_adr, .up_wdata, .up_wr, .up_rd, .up_rdata, .irq,
    .mux_sel, .adc_convert, .adc_drdy, .adc_data,
    .aa, .dac_code, .dac_load,
    .ad_out(ctrl_ad), .ad_oe(ctrl_oe), .addr_n(bus_addr_n), .wr_n(bus_wr_n),
    .bclk_n(bus_clk_n), .reset_n(bus_reset_n),
    .ad_in(bus_ad), .ack_n(bus_ack_n), .err_n(bus_err_n));

  lbus_backplane #(.NUM_BOARDS(NUM_BOARDS)) u_bp (
    .ctrl_ad, .ctrl_oe, .brd_ad, .brd_oe, .brd_ack, .brd_err,
    .ad(bus_ad), .ack_n(bus_ack_n), .err_n(bp_err_n));

  for (genvar b = 0; b < NUM_BOARDS - NUM_ADAPTERS; b++) begin : g_board
    lbus_user_board u_board (
      .pwr_up(board_pwr_up[b]), .sw_addr(board_sw[b]),
      .ad_in(bus_ad), .addr_n(bus_addr_n), .wr_n(bus_wr_n), .bclk_n(bus_clk_n),
      .ad_out(brd_ad[b]), .ad_oe(brd_oe[b]), .ack_drv(brd_ack[b]),
      .err_drv(brd_err[b]),
      .bin_in(bin_in[b]), .bin_out(bin_out[b]), .hires_code(hires_code[b]),
      .lores_code(lores_code[b]));
  end

  for (genvar m = 0; m < NUM_ADAPTERS; m++) begin : g_adapter
    localparam int unsigned S = NUM_BOARDS - NUM_ADAPTERS + m;
    lbus_migration_adapter u_adapter (
      .pwr_up(board_pwr_up[S]), .sw_addr(board_sw[S]),
      .ad_in(bus_ad), .addr_n(bus_addr_n), .wr_n(bus_wr_n), .bclk_n(bus_clk_n),
      .ad_out(brd_ad[S]), .ad_oe(brd_oe[S]), .ack_drv(brd_ack[S]),
      .err_drv(brd_err[S]),
      .bi(bin_in[S]), .bo(mig_bo[m]), .dac_code(mig_dac[m]));
    // an adapter slot has no example-board outputs
    assign bin_out[S]    = '0;
    assign hires_code[S] = '0;
    for (genvar c = 0; c < 4; c++) begin : g_no_lores
      assign lores_code[S][c] = '0;
    end
  end

endmodule
