// fsk4_receiver: 4-level FSK receiver for a wireless biomedical implant.
//
// Data reach the implant on one of four RF carriers near 9.95 MHz
// (9.9476, 9.9492, 9.9508, 9.9524 MHz).  A double-balanced mixer with a
// 10 MHz local oscillator moves them to IF carriers of 52.4, 50.8, 49.2 and
// 47.6 kHz; an OTA amplifies the IF to a rail-to-rail square wave; and a
// digital demodulator counts 5 MHz clock cycles over each whole IF period and
// turns the count into a 2-bit symbol (11, 10, 01, 00 respectively).
//
//   rf, lo --> mixer --> if --> ota --> full-swing IF --> fsk4_demod --> data
//
// The mixer and the OTA are analog circuits and appear here as behavioural
// models with real-valued ports, so this module is a simulation model of
// the whole receiver; fsk4_demod is the synthesizable part.  The local
// oscillator is outside the receiver: its differential signal is an input.
//
// Interface: RF and LO as differential voltages (reals, volts); clk is the
// 5 MHz counter clock, which need not be related to the LO.  Outputs as in
// fsk4_demod: one decision per IF period with a valid pulse.  The analog
// models update every 2 ns of simulated time.
//
// The chain and all frequencies follow the design's specification; clocking
// the counter from a separate 5 MHz input is this design's own choice.
module fsk4_receiver
  import fsk4_pkg::*;
(
  input  real    rf_p,       // received RF, positive side
  input  real    rf_n,       // received RF, negative side
  input  real    lo_p,       // 10 MHz local oscillator, positive side
  input  real    lo_n,       // 10 MHz local oscillator, negative side
  input  logic   clk,        // 5 MHz counter clock
  input  logic   rst_n,      // asynchronous reset, active low
  output real    if_p,       // mixer IF output, positive side (observation)
  output real    if_n,       // mixer IF output, negative side (observation)
  output real    ota_vout,   // OTA output voltage, 0..1.8 V (observation)
  output logic   if_digital, // OTA full-swing output seen as a logic level
  output count_t period_o,   // last measured whole-period count
  output count_t code_o,     // 7-bit code of the matched carrier, 0 if none
  output data_t  data_o,     // demodulated 2-bit symbol
  output logic   match_o,    // the last period matched a carrier
  output logic   valid_o,    // one-cycle pulse per measured IF period
  output logic   timeout_o   // no IF edge for 127 counter cycles
);
  timeunit 1ns;
  timeprecision 1ps;

  mixer u_mixer (
    .rf_p (rf_p),
    .rf_n (rf_n),
    .lo_p (lo_p),
    .lo_n (lo_n),
    .if_p (if_p),
    .if_n (if_n)
  );

  ota u_ota (
    .vin_p      (if_p),
    .vin_n      (if_n),
    .vout       (ota_vout),
    .vout_logic (if_digital)
  );

  fsk4_demod u_demod (
    .clk       (clk),
    .rst_n     (rst_n),
    .if_in     (if_digital),
    .period_o  (period_o),
    .code_o    (code_o),
    .data_o    (data_o),
    .match_o   (match_o),
    .valid_o   (valid_o),
    .timeout_o (timeout_o)
  );

endmodule
