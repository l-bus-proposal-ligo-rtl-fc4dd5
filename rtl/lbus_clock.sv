// lbus_clock: timebase of the bus controller.
//
// The controller clock is the 2^24 Hz VCXO that is phase-locked to the
// fiber clock, so a 24-bit counter wraps exactly once per second. The
// counter is split into fields:
//   cnt[11:0]  phase inside one sample period (4096 Hz sample rate)
//   cnt[15:12] analog readback line (16 per AA value)
//   cnt[19:16] analog address AA (full cycle at 16 Hz)
//   cnt[23:20] 16 Hz frame number inside the second
// The outputs are one-cycle ticks at the end of each sample period
// (sample_tick), at the end of every 16th sample (aa_tick, 256 Hz) and of
// every 256th sample (frame_tick, 16 Hz). irq is the processor heartbeat:
// one cycle at every sample tick.
//
// A decoded 1 pps pulse (pps) restarts the counter at zero, which aligns the
// readback scan with GPS time; pps_sync is a one-cycle pulse when that
// happens, so the downstream counters restart too. The sample and clock
// rates follow the document. How the 1 pps is encoded on the clock fiber
// is not given: this block expects it already decoded, and the choice of IRQ
// rate is this design's own.
//
// With CLK_HZ and SAMPLE_HZ changed (for short simulations) the sample
// period is CLK_HZ/SAMPLE_HZ cycles, which must be a power of two.
module lbus_clock #(
  parameter int unsigned CLK_HZ    = 16_777_216,
  parameter int unsigned SAMPLE_HZ = 4096
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pps,          // decoded 1 pps, one clk cycle wide
  output logic sample_tick,  // end of a sample period
  output logic aa_tick,      // end of 16 samples
  output logic frame_tick,   // end of 256 samples (16 Hz)
  output logic pps_sync,     // counter restarted by pps
  output logic irq,          // heartbeat to the processor
  output logic [3:0] frame_num // 16 Hz frame inside the current second
);
  localparam int unsigned DIV   = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned PH_W  = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned CNT_W = PH_W + 12;

  logic [CNT_W-1:0] cnt;
  logic             phase_end;

  assign phase_end = (cnt[PH_W-1:0] == PH_W'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      sample_tick <= 1'b0;
      aa_tick     <= 1'b0;
      frame_tick  <= 1'b0;
      pps_sync    <= 1'b0;
    end else begin
      pps_sync    <= pps;
      if (pps) begin
        cnt         <= '0;
        sample_tick <= 1'b0;
        aa_tick     <= 1'b0;
        frame_tick  <= 1'b0;
      end else begin
        cnt         <= cnt + 1'b1;
        sample_tick <= phase_end;
        aa_tick     <= phase_end && (cnt[PH_W+3:PH_W] == 4'hF);
        frame_tick  <= phase_end && (cnt[PH_W+7:PH_W] == 8'hFF);
      end
    end
  end

  assign irq       = sample_tick;
  assign frame_num = cnt[PH_W+11:PH_W+8];

  initial begin
    assert (DIV >= 2 && (DIV & (DIV - 1)) == 0)
      else $error("lbus_clock: CLK_HZ/SAMPLE_HZ must be a power of two");
  end

endmodule
