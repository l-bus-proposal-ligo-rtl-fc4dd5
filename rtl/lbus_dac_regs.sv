// lbus_dac_regs: code registers of the controller's analog control DACs.
//
// The controller drives up to 8 analog control lines on the P1 backplane
// from 16-bit DACs with an 8-bit interface. The processor writes a channel
// as two bytes over its 8-bit bus: the low byte is staged, and writing the
// high byte loads both bytes into the channel at once and pulses that
// channel's dac_load for one cycle (so a DAC never shows a half-written
// code). Every code can be read back.
//
// Interface: wr/rd with a 4-bit sub-address, sub[3:1] = channel, sub[0] =
// 0 low byte, 1 high byte. rdata is combinational. The channel count and
// code width follow the document; byte order and staging are this design's.
module lbus_dac_regs #(
  parameter int unsigned NUM_DACS = 8,
  parameter int unsigned DAC_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr,
  input  logic [3:0]          sub,
  input  logic [7:0]          wdata,
  output logic [7:0]          rdata,
  output logic [DAC_BITS-1:0] code [NUM_DACS],
  output logic [NUM_DACS-1:0] dac_load
);
  localparam int unsigned CH_W = (NUM_DACS > 1) ? $clog2(NUM_DACS) : 1;
  logic [7:0]          stage;
  logic [CH_W-1:0]     ch;
  logic [15:0]         rd_word;

  assign ch = CH_W'(sub[3:1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage    <= '0;
      dac_load <= '0;
      for (int i = 0; i < NUM_DACS; i++) code[i] <= '0;
    end else begin
      dac_load <= '0;
      if (wr && !sub[0]) stage <= wdata;
      if (wr && sub[0] && (32'(sub[3:1]) < NUM_DACS)) begin
        code[ch]     <= DAC_BITS'({wdata, stage});
        dac_load[ch] <= 1'b1;
      end
    end
  end

  always_comb begin
    rd_word = '0;
    if (32'(sub[3:1]) < NUM_DACS) rd_word = 16'(code[ch]);
    rdata = sub[0] ? rd_word[15:8] : rd_word[7:0];
  end
endmodule
