// lbus_power_monitor: behavioural model of the crate's supply monitor.
//
// This is a behavioural model, not synthesizable logic: in the crate the
// check is made by analog window comparators on the supply rails. It takes
// the rail voltages as real numbers (volts) and reports every rail that is
// outside its window; any failure pulls the open-collector ERR line of the
// backplane (pwr_fail), so the controller latches it like a board's request.
//
// Windows (negative rails by magnitude), as specified for the L-bus crate:
//   +5 V digital, +5 V and -5 V analog      4.75 .. 5.25 V
//   +15 V, -15 V                            14.25 .. 15.75 V
//   +10 V, -10 V unregulated input          9 .. 12 V
//   +24 V, -24 V unregulated                22 .. 28 V
// fail_mask bit order: {n24, p24, n10, p10, n15, p15, n5, p5, dig5}.
// Combinational, no filtering or delay (the real comparators' hysteresis and
// response time are not specified).
module lbus_power_monitor (
  input  real        v_dig5,   // +5 V digital (VCC)
  input  real        v_p5,     // +5 V analog, post-regulated
  input  real        v_n5,     // -5 V analog, post-regulated
  input  real        v_p15,    // +15 V, post-regulated
  input  real        v_n15,    // -15 V, post-regulated
  input  real        v_p10,    // +10 V unregulated input
  input  real        v_n10,    // -10 V unregulated input
  input  real        v_p24,    // +24 V raw
  input  real        v_n24,    // -24 V raw
  output logic [8:0] fail_mask,
  output logic       pwr_fail
);
  function automatic logic outside(input real v, input real lo, input real hi);
    real m;
    m = (v < 0.0) ? -v : v;
    return (m < lo) || (m > hi);
  endfunction

  always_comb begin
    fail_mask[0] = outside(v_dig5, 4.75, 5.25);
    fail_mask[1] = outside(v_p5,   4.75, 5.25);
    fail_mask[2] = outside(v_n5,   4.75, 5.25);
    fail_mask[3] = outside(v_p15, 14.25, 15.75);
    fail_mask[4] = outside(v_n15, 14.25, 15.75);
    fail_mask[5] = outside(v_p10,  9.0,  12.0);
    fail_mask[6] = outside(v_n10,  9.0,  12.0);
    fail_mask[7] = outside(v_p24, 22.0,  28.0);
    fail_mask[8] = outside(v_n24, 22.0,  28.0);
    pwr_fail     = |fail_mask;
  end
endmodule
