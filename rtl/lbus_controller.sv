// lbus_controller: the L-bus crate controller.
//
// The controller sits in one slot of the crate and turns requests of its
// processor (a USB controller or a small microprocessor with ethernet, which
// is outside this RTL) into activity on the two backplanes:
//   - a read or write on the P2 digital bus (address latch, data latch and
//     bus logic),
//   - the continuous scan of the analog readbacks: 16 readback lines through
//     a 16:1 MUX into one ADC at 4096 Hz, while the 4-bit analog address AA
//     cycles at 16 Hz, giving 256 channels at 16 Hz each,
//   - the codes of the 8 analog control DACs.
// A timebase derived from the 2^24 Hz clock paces the scan, restarts on the
// 1 pps and gives the processor a heartbeat interrupt.
//
// Processor interface: 8-bit registers (map in lbus_pkg::up_reg_e). up_wr
// writes at the clock edge; up_rdata is combinational from up_adr; up_rd
// marks a read, which matters only for REG_ADC_HI (it clears the sample's
// 'valid' flag). A bus cycle: write REG_BADDR_LO/HI, for a write also
// REG_BDATA_LO/HI, then REG_BCMD = 1 (read) or 3 (write); poll REG_BCMD
// until 'busy' is clear and check 'ack_ok'; after a read, the datum is in
// REG_BDATA_LO/HI.
//
// What follows the document: the set of devices and their roles, the 8-bit
// processor bus, the rates. The register map, handshakes and the order of
// the analog scan are this design's choices.
module lbus_controller
  import lbus_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 16_777_216,
  parameter int unsigned SAMPLE_HZ = 4096
) (
  input  logic                clk,         // 2^24 Hz, locked to the fiber clock
  input  logic                rst_n,
  input  logic                pps,         // decoded 1 pps
  input  logic                reset_btn,   // crate reset button
  // processor bus
  input  logic [UP_ADR_W-1:0] up_adr,
  input  logic [7:0]          up_wdata,
  input  logic                up_wr,
  input  logic                up_rd,
  output logic [7:0]          up_rdata,
  output logic                irq,
  // ADC and MUX
  output logic [3:0]          mux_sel,
  output logic                adc_convert,
  input  logic                adc_drdy,
  input  logic [15:0]         adc_data,
  // analog backplane
  output logic [3:0]          aa,
  output logic [15:0]         dac_code [NUM_CTRL_DACS],
  output logic [NUM_CTRL_DACS-1:0] dac_load,
  // digital backplane
  output logic [15:0]         ad_out,
  output logic                ad_oe,
  output logic                addr_n,
  output logic                wr_n,
  output logic                bclk_n,
  output logic                reset_n,
  input  logic [15:0]         ad_in,
  input  logic                ack_n,
  input  logic                err_n
);
  dev_sel_t    sel;
  logic [3:0]  sub;
  logic        sample_tick, aa_tick, frame_tick, pps_sync, aa_wrap;
  logic [3:0]  frame_num;
  logic [15:0] sample;
  logic [7:0]  sample_tag;
  logic        sample_valid, sample_ack;
  logic [7:0]  dac_rdata;
  logic [15:0] baddr, bdata, bl_rdata;
  logic        bl_start, bl_write, bl_busy, bl_done, bl_ack_ok, bl_rd_cap;
  logic        err_latched, err_clr;
  logic        standby, reset_sw;
  bus_status_t status;

  lbus_ctrl_decode u_dec (.adr(up_adr), .sel(sel), .sub(sub));

  lbus_clock #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_clock (
    .clk, .rst_n, .pps, .sample_tick, .aa_tick, .frame_tick, .pps_sync,
    .irq, .frame_num);

  lbus_aa_counter u_aa (
    .clk, .rst_n, .sync(pps_sync), .aa_tick, .aa, .wrap(aa_wrap));

  assign sample_ack = sel.adc && up_rd && (sub == 4'h7);

  lbus_adc_seq u_adc (
    .clk, .rst_n, .sync(pps_sync), .sample_tick, .aa, .mux_sel, .adc_convert,
    .adc_drdy, .adc_data, .sample, .sample_tag, .valid(sample_valid),
    .ack(sample_ack));

  lbus_dac_regs #(.NUM_DACS(NUM_CTRL_DACS), .DAC_BITS(16)) u_dac (
    .clk, .rst_n, .wr(sel.dac && up_wr), .sub, .wdata(up_wdata),
    .rdata(dac_rdata), .code(dac_code), .dac_load);

  lbus_addr_latch u_alat (
    .clk, .rst_n,
    .wr_lo(sel.baddr && up_wr && !sub[0]), .wr_hi(sel.baddr && up_wr && sub[0]),
    .wdata(up_wdata), .addr(baddr));

  lbus_data_latch u_dlat (
    .clk, .rst_n,
    .wr_lo(sel.bdata && up_wr && !sub[0]), .wr_hi(sel.bdata && up_wr && sub[0]),
    .wdata(up_wdata), .cap(bl_rd_cap), .cap_data(bl_rdata), .data(bdata));

  assign bl_start = sel.bcmd && up_wr && up_wdata[0];
  assign bl_write = up_wdata[1];
  assign err_clr  = sel.ctrl && up_wr && up_wdata[2];

  lbus_bus_logic #(.CLK_HZ(CLK_HZ)) u_bus (
    .clk, .rst_n, .start(bl_start), .write(bl_write), .addr(baddr),
    .wdata(bdata), .standby, .reset_req(reset_sw || reset_btn), .err_clr,
    .busy(bl_busy), .done(bl_done), .ack_ok(bl_ack_ok), .rd_cap(bl_rd_cap),
    .rdata(bl_rdata), .err_latched, .ad_out, .ad_oe, .addr_n, .wr_n, .bclk_n,
    .reset_n, .ad_in, .ack_n, .err_n);

  // Stand-by and software master reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      standby  <= 1'b0;
      reset_sw <= 1'b0;
    end else if (sel.ctrl && up_wr) begin
      standby  <= up_wdata[0];
      reset_sw <= up_wdata[1];
    end
  end

  always_comb begin
    status           = '0;
    status.busy      = bl_busy || bl_start;
    status.ack_ok    = bl_ack_ok;
    status.err       = err_latched;
    status.standby   = standby;
    status.reset_out = !reset_n;
    status.adc_valid = sample_valid;
  end

  // Processor read mux.
  always_comb begin
    up_rdata = '0;
    unique case (1'b1)
      sel.baddr: up_rdata = sub[0] ? baddr[15:8] : baddr[7:0];
      sel.bdata: up_rdata = sub[0] ? bdata[15:8] : bdata[7:0];
      sel.bcmd:  up_rdata = status;
      sel.ctrl:  up_rdata = {6'd0, reset_sw, standby};
      sel.adc:   up_rdata = (sub == 4'h6) ? sample[7:0] :
                            (sub == 4'h7) ? sample[15:8] : sample_tag;
      sel.aacnt: up_rdata = {frame_num, aa};
      sel.dac:   up_rdata = dac_rdata;
      default:   up_rdata = '0;
    endcase
  end

  // frame_tick, aa_wrap and bl_done are kept as visible events for
  // monitoring; the register interface polls instead.
  logic unused_ok;
  assign unused_ok = ^{frame_tick, aa_wrap, bl_done};

endmodule
