// lbus_aa_counter: the controller's 4-bit analog readback address counter.
//
// Each user board multiplexes up to 16 readback channels onto its one analog
// readback line, selected by the 4-bit analog address AA0-AA3 on the P1
// backplane. The controller cycles this address through all 16 values at
// 16 Hz. The counter therefore advances once per aa_tick (every 16 samples,
// 256 Hz at the default rates) and restarts at zero on sync (1 pps).
// The processor can read the count. The 16 Hz full-cycle rate follows the
// document; stepping AA slowly and the controller MUX fast (so the user
// board multiplexers have 16 sample periods to settle) is this design's
// reading of it.
//
// Timing: aa changes in the cycle after aa_tick; wrap marks the change
// from 15 to 0 (one cycle).
module lbus_aa_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync,     // restart at zero (pps)
  input  logic       aa_tick,  // advance
  output logic [3:0] aa,       // AA0-AA3 to the analog backplane
  output logic       wrap      // one cycle when aa returned to zero
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aa   <= '0;
      wrap <= 1'b0;
    end else if (sync) begin
      aa   <= '0;
      wrap <= 1'b0;
    end else begin
      wrap <= aa_tick && (aa == 4'hF);
      if (aa_tick) aa <= aa + 4'd1;
    end
  end
endmodule
