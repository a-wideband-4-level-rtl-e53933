// fsk4_demod: digital demodulator for the 4-level FSK receiver.
//
// The full-swing IF signal from the amplifier drives a period counter
// clocked at 5 MHz; every whole IF period it measures is classified by the
// code decoder into one of the four carriers (52.4, 50.8, 49.2, 47.6 kHz ->
// symbols 11, 10, 01, 00) or into "no carrier" (code 0000000).  One decision
// is made per IF period, so a symbol that lasts N IF periods yields about N
// decisions; grouping them into symbols is left to the data sink.
//
// Interface: if_in is asynchronous; all outputs are synchronous to clk.
// Timing: valid_o pulses in the cycle after clock edge k+3 when the rising IF
// edge that closes a period is first sampled at clock edge k.
//
// The structure (binary counter, then code assignment with a +/-1 count
// tolerance) follows the design's specification; the handshake signals, the
// timeout output and the reset style are this design's own.
module fsk4_demod
  import fsk4_pkg::*;
(
  input  logic   clk,       // counter clock, 5 MHz
  input  logic   rst_n,     // asynchronous reset, active low
  input  logic   if_in,     // full-swing IF signal from the amplifier
  output count_t period_o,  // last measured whole-period count
  output count_t code_o,    // 7-bit code of the matched carrier, 0 if none
  output data_t  data_o,    // demodulated 2-bit symbol
  output logic   match_o,   // the last period matched a carrier
  output logic   valid_o,   // one-cycle pulse per measured IF period
  output logic   timeout_o  // no IF edge for 127 cycles (carrier lost)
);
  timeunit 1ns;
  timeprecision 1ps;

  count_t period;
  logic   period_valid;
  logic   period_ovf;

  period_counter #(.CNT_W(CNT_W)) u_counter (
    .clk            (clk),
    .rst_n          (rst_n),
    .if_in          (if_in),
    .period_o       (period),
    .period_valid_o (period_valid),
    .period_ovf_o   (period_ovf),
    .timeout_o      (timeout_o)
  );

  code_decoder u_decoder (
    .clk            (clk),
    .rst_n          (rst_n),
    .period_i       (period),
    .period_valid_i (period_valid),
    .period_ovf_i   (period_ovf),
    .code_o         (code_o),
    .data_o         (data_o),
    .match_o        (match_o),
    .valid_o        (valid_o)
  );

  assign period_o = period;

endmodule
