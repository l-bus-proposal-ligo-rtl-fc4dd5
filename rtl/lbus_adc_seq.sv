// lbus_adc_seq: sequencer of the controller's readback ADC and its 16:1 MUX.
//
// The controller samples its 16 analog readback lines through one MUX and
// one ADC. With 16 lines and 16 AA values there are 256 readback channels,
// each sampled at 16 Hz, so the ADC runs at 4096 Hz (one conversion per
// sample_tick). At each sample_tick this block pulses adc_convert for the
// line the MUX has been settled on during the past sample period, remembers
// its tag {aa, line}, and steps mux_sel to the next line. When the ADC raises
// adc_drdy its data is latched into 'sample' with the tag and 'valid' is set;
// the processor clears 'valid' with ack (reading the sample's high byte).
//
// The rates follow the document. The ADC handshake (convert pulse, data
// ready), its 16-bit width and the convert-then-step order are this design's
// choices; the ADC part is not named in the document.
module lbus_adc_seq #(
  parameter int unsigned ADC_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sync,         // restart line count (pps)
  input  logic             sample_tick,  // 4096 Hz
  input  logic [3:0]       aa,           // current analog address
  // ADC and MUX
  output logic [3:0]       mux_sel,      // MUX line select
  output logic             adc_convert,  // start conversion (one cycle)
  input  logic             adc_drdy,     // conversion result valid (one cycle)
  input  logic [ADC_W-1:0] adc_data,
  // to the processor registers
  output logic [ADC_W-1:0] sample,
  output logic [7:0]       sample_tag,   // {aa, line}
  output logic             valid,
  input  logic             ack
);
  logic [7:0] pending_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mux_sel     <= '0;
      adc_convert <= 1'b0;
      pending_tag <= '0;
      sample      <= '0;
      sample_tag  <= '0;
      valid       <= 1'b0;
    end else begin
      adc_convert <= 1'b0;
      if (sync) begin
        mux_sel <= '0;
      end else if (sample_tick) begin
        adc_convert <= 1'b1;
        pending_tag <= {aa, mux_sel};
        mux_sel     <= mux_sel + 4'd1;
      end
      if (adc_drdy) begin
        sample     <= adc_data;
        sample_tag <= pending_tag;
        valid      <= 1'b1;
      end else if (ack) begin
        valid <= 1'b0;
      end
    end
  end
endmodule
