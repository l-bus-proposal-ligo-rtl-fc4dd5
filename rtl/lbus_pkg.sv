// lbus_pkg: shared types and constants of the L-bus front end.
//
// The L-bus is a slow, low-noise, memory-mapped backplane bus on the P2
// connector of a eurocrate. It carries a multiplexed 16-bit address/data bus
// (AD0-AD15) and the low-active strobes ADDR, WR, CLK, ACK, ERR and RESET.
// A board decodes the top 8 address bits against its own board address.
// Word size is 16 bits, so address bit 0 is always zero.
//
// Also defined here is the 8-bit register map that the bus controller shows
// to its processor. That map is this design's own choice; the 8-bit width
// and the devices behind it (ADC, 4-bit counter, digital backplane
// latches, DACs) follow the controller block diagram.
package lbus_pkg;

  localparam int unsigned AD_W        = 16;  // multiplexed address/data width
  localparam int unsigned BOARD_ADR_W = 8;   // top address bits compared per board
  localparam int unsigned AA_W        = 4;   // analog readback address AA0-AA3
  localparam int unsigned NUM_AN_LINES = 16; // analog readback lines on P1
  localparam int unsigned NUM_CTRL_DACS = 8; // analog control lines on P1
  localparam int unsigned UP_ADR_W    = 6;   // processor register address width

  // Convert a time in ns to whole cycles of a clock of clk_hz, rounded up,
  // never less than one cycle.
  function automatic int unsigned ns_to_cycles(int unsigned ns,
                                               int unsigned clk_hz);
    longint unsigned c;
    c = (64'(ns) * 64'(clk_hz) + 64'd999_999_999) / 64'd1_000_000_000;
    if (c == 0) c = 1;
    return int'(c);
  endfunction

  // Processor register map of the controller (byte registers).
  typedef enum logic [UP_ADR_W-1:0] {
    REG_BADDR_LO = 6'h00,  // backplane address latch, low byte (bit 0 reads 0)
    REG_BADDR_HI = 6'h01,  // backplane address latch, high byte
    REG_BDATA_LO = 6'h02,  // backplane data latch, low byte
    REG_BDATA_HI = 6'h03,  // backplane data latch, high byte
    REG_BCMD     = 6'h04,  // write: bit0 start, bit1 1=write 0=read; read: status
    REG_CTRL     = 6'h05,  // bit0 stand-by, bit1 master reset, bit2 (w1) clear ERR latch
    REG_ADC_LO   = 6'h06,  // last ADC sample, low byte
    REG_ADC_HI   = 6'h07,  // last ADC sample, high byte (reading clears 'valid')
    REG_ADC_TAG  = 6'h08,  // {AA[3:0], line[3:0]} of the last sample
    REG_AACNT    = 6'h09,  // {frame[3:0], current AA[3:0]}
    REG_DAC_BASE = 6'h10   // 0x10..0x1F: DAC n low byte at 0x10+2n, high byte at 0x11+2n
  } up_reg_e;

  // One-hot device selects produced by the controller's decoding logic.
  typedef struct packed {
    logic baddr;   // address latch
    logic bdata;   // data latch
    logic bcmd;    // bus logic command/status
    logic ctrl;    // stand-by / reset / ERR control
    logic adc;     // ADC sample registers
    logic aacnt;   // 4-bit counter
    logic dac;     // control DACs
  } dev_sel_t;

  // Status byte of REG_BCMD.
  typedef struct packed {
    logic [1:0] zero;
    logic       adc_valid;  // an unread ADC sample is waiting
    logic       reset_out;  // RESET line asserted
    logic       standby;    // stand-by mode active
    logic       err;        // ERR latched
    logic       ack_ok;     // last cycle was acknowledged
    logic       busy;       // a bus cycle is running
  } bus_status_t;

endpackage
