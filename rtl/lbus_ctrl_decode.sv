// lbus_ctrl_decode: the controller's decoding logic.
//
// The processor talks to the controller's devices over an 8-bit data bus
// with a few address lines; this block turns the 6-bit register address into
// one device select (see up_reg_e in lbus_pkg for the map) and a 4-bit
// sub-address inside that device. Unused addresses select nothing and read
// as zero. Purely combinational. The map itself is this design's choice:
// the document only says a few control lines decode which device answers.
module lbus_ctrl_decode
  import lbus_pkg::*;
(
  input  logic [UP_ADR_W-1:0] adr,
  output dev_sel_t            sel,
  output logic [3:0]          sub
);
  always_comb begin
    sel = '0;
    sub = adr[3:0];
    unique casez (adr)
      6'b00000?:                  sel.baddr = 1'b1;  // 0x00-0x01
      6'b00001?:                  sel.bdata = 1'b1;  // 0x02-0x03
      REG_BCMD:                   sel.bcmd  = 1'b1;
      REG_CTRL:                   sel.ctrl  = 1'b1;
      6'b00011?, REG_ADC_TAG:     sel.adc   = 1'b1;  // 0x06-0x08
      REG_AACNT:                  sel.aacnt = 1'b1;
      6'b01????:                  sel.dac   = 1'b1;  // 0x10-0x1F
      default:                    sel       = '0;
    endcase
  end
endmodule
