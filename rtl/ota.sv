// ota: behavioural model of the IF operational transconductance amplifier.
// This is a behavioural model of an analog circuit, not synthesizable logic.
//
// The amplifier takes the differential IF from the mixer, a few hundred
// millivolts, and amplifies it until its single-ended output swings from rail
// to rail, so that the digital demodulator can count its periods.  The model
// has the amplifier's DC gain (51.1 dB) and its -3 dB frequency (4.24 MHz) as
// a single pole, and an output that clips at 0 V and VDD.  The output is
// given both as a voltage (vout) and as the logic level a CMOS input sees
// (vout_logic, high above VDD/2).
//
// Interface: voltages as reals, in volts.  Timing: the inputs are sampled and
// the output updated every STEP_NS nanoseconds of simulated time.
//
// From the design: DC gain, -3 dB frequency, 1.8 V supply, full-swing
// single-ended output.  This model's own choices: one pole only, hard clipping
// and the VDD/2 logic threshold.
module ota #(
  parameter real GAIN_DB   = 51.1,    // DC gain, dB
  parameter real F_3DB_HZ  = 4.24e6,  // -3 dB frequency
  parameter real VDD       = 1.8,     // supply, V
  parameter real STEP_NS   = 2.0      // model time step, ns
) (
  input  real  vin_p,       // differential input, positive side
  input  real  vin_n,       // differential input, negative side
  output real  vout,        // single-ended output, 0..VDD
  output logic vout_logic   // output as a logic level
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real PI = 3.14159265358979;

  real gain;    // DC gain, V/V
  real alpha;   // one-pole update factor per step
  real y;       // output swing around VDD/2, before clipping

  initial begin
    gain       = $pow(10.0, GAIN_DB / 20.0);
    alpha      = 1.0 - $exp(-2.0 * PI * F_3DB_HZ * STEP_NS * 1.0e-9);
    y          = 0.0;
    vout       = 0.5 * VDD;
    vout_logic = 1'b0;
  end

  always begin
    #(STEP_NS);
    y = y + alpha * (gain * (vin_p - vin_n) - y);
    // The output stage saturates: keep the state inside the rails too.
    if (y >  0.5 * VDD) y =  0.5 * VDD;
    if (y < -0.5 * VDD) y = -0.5 * VDD;
    vout       = 0.5 * VDD + y;
    vout_logic = (vout > 0.5 * VDD);
  end

endmodule
