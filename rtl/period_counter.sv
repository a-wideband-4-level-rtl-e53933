// period_counter: measures the whole period of the full-swing IF signal.
//
// The IF signal from the amplifier is asynchronous to the counter clock.  It
// passes a two-flop synchronizer, and a third flop finds its rising edges.
// A binary counter, clocked by the 5 MHz counter clock, restarts at 1 on
// every rising edge and counts up by one per clock, so at the next rising
// edge it holds the number of clock cycles in one whole IF period.  That
// value is handed out with a one-cycle valid pulse.  Measuring a whole period,
// rather than a half period, gives the most counts per carrier and so the
// widest separation between the four carriers.
//
// The counter stops at its largest value (127 for the 7-bit default).  A
// period that reached it is reported with period_ovf_o set, and timeout_o
// stays high for as long as the counter sits there, i.e. while no carrier
// edge has been seen for 2^CNT_W - 1 cycles.  The first edge after reset only
// starts the count and produces no measurement; the synchronizer resets to
// ones, so an IF input that is already high when reset ends is not taken
// for an edge.
//
// Timing: an input edge that the synchronizer samples at clock edge k gives
// period_valid_o high in the cycle after clock edge k+2.  One measurement per
// IF period, about every 100 cycles at the design's carriers.
//
// Following the design's specification: whole-period measurement, 7-bit
// binary counter, 5 MHz clock.  This design's own choices: the synchronizer,
// the restart value, saturation, the first-edge rule and the active-low
// asynchronous reset.
//
// rst_n also disables the assertions below; lint reports that as a
// synchronous use of an asynchronous reset, which it is not in the logic.
module period_counter #(
  parameter int unsigned CNT_W = fsk4_pkg::CNT_W
) (
  input  logic             clk,            // counter clock, 5 MHz
  input  logic             rst_n,          // asynchronous reset, active low
  input  logic             if_in,          // full-swing IF signal, asynchronous
  output logic [CNT_W-1:0] period_o,       // cycles in the last whole IF period
  output logic             period_valid_o, // one-cycle pulse: period_o is new
  output logic             period_ovf_o,   // the period reached the counter limit
  output logic             timeout_o       // no rising edge for 2^CNT_W-1 cycles
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [2:0]       sync_q;   // [0],[1] synchronizer, [2] previous sample
  logic             rise;
  logic             armed_q;  // a first edge has been seen
  logic             sat_q;    // counter stopped at CNT_MAX
  logic [CNT_W-1:0] cnt_q;

  assign rise = sync_q[1] & ~sync_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q         <= '1;   // an input already high is not an edge
      armed_q        <= 1'b0;
      sat_q          <= 1'b0;
      cnt_q          <= '0;
      period_o       <= '0;
      period_valid_o <= 1'b0;
      period_ovf_o   <= 1'b0;
    end else begin
      sync_q         <= {sync_q[1:0], if_in};
      period_valid_o <= 1'b0;
      if (rise) begin
        if (armed_q) begin
          period_o       <= cnt_q;
          period_ovf_o   <= sat_q;
          period_valid_o <= 1'b1;
        end
        armed_q <= 1'b1;
        cnt_q   <= CNT_W'(1);
        sat_q   <= 1'b0;
      end else if (cnt_q == CNT_MAX) begin
        sat_q <= 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assign timeout_o = sat_q;

  // Rising edges are at least two cycles apart, so a measurement is always a
  // single-cycle pulse, and a period that overflowed always reads as the limit.
  a_valid_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                  period_valid_o |=> !period_valid_o);
  a_ovf_at_limit: assert property (@(posedge clk) disable iff (!rst_n)
                                   period_valid_o && period_ovf_o |-> period_o == CNT_MAX);

endmodule
