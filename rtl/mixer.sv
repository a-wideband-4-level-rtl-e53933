// mixer: behavioural model of the double-balanced down-conversion mixer.
// This is a behavioural model of an analog circuit, not synthesizable logic.
//
// The real circuit is a fully differential, double-balanced mixer: a
// degenerated transconductance stage for the RF input, LO-driven switching
// pairs and LC resonator loads (L1,C1 and L2,C2) that raise the conversion
// gain.  The RF port is biased at 1 V by resistive dividers and the LO by
// bias resistors.  It moves an RF carrier near 9.95 MHz down to an IF near
// 50 kHz with a 10 MHz LO.
//
// The model multiplies the differential RF and LO voltages by CONV_K and
// passes the product through two real poles at F_POLE_HZ, which stand for the
// output loads: they keep the difference frequency and remove the sum
// frequency near 20 MHz.  With the default CONV_K, a 50 mV RF and a 200 mV LO
// give an IF of about 386 mV amplitude, the conversion the circuit
// achieves.  The output is differential around VCM_OUT.
//
// Interface: voltages as reals, in volts.  Timing: the inputs are sampled and
// the output updated every STEP_NS nanoseconds of simulated time.
//
// From the design: the double-balanced topology, the signal frequencies and
// amplitudes, the 386 mV IF amplitude.  This model's own choices: the ideal
// multiplier, the two-pole load at 1 MHz and the 0.9 V output common mode.
module mixer #(
  parameter real CONV_K    = 77.2,   // 1/V; IF amplitude = CONV_K/2 * Arf * Alo
  parameter real F_POLE_HZ = 1.0e6,  // pole of the output load, two of them
  parameter real VCM_OUT   = 0.9,    // output common mode, V
  parameter real STEP_NS   = 2.0     // model time step, ns
) (
  input  real rf_p,  // RF input, positive side
  input  real rf_n,  // RF input, negative side
  input  real lo_p,  // local oscillator, positive side
  input  real lo_n,  // local oscillator, negative side
  output real if_p,  // IF output, positive side
  output real if_n   // IF output, negative side
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real PI = 3.14159265358979;

  real alpha;   // one-pole update factor per step
  real prod;    // ideal product
  real y1;      // after first pole
  real y2;      // after second pole

  initial begin
    alpha = 1.0 - $exp(-2.0 * PI * F_POLE_HZ * STEP_NS * 1.0e-9);
    y1    = 0.0;
    y2    = 0.0;
    if_p  = VCM_OUT;
    if_n  = VCM_OUT;
  end

  always begin
    #(STEP_NS);
    prod = CONV_K * (rf_p - rf_n) * (lo_p - lo_n);
    y1   = y1 + alpha * (prod - y1);
    y2   = y2 + alpha * (y1 - y2);
    if_p = VCM_OUT + 0.5 * y2;
    if_n = VCM_OUT - 0.5 * y2;
  end

endmodule
