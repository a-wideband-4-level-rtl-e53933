// code_decoder: assigns a carrier, code and 2-bit symbol to a period count.
//
// Each measured period is compared with the nominal count of each of the
// four carriers.  A count within +/-TOL of a nominal count (104..106 for the
// 47.6 kHz carrier, for example) selects that carrier: the output code is the
// carrier's nominal count and the data output its 2-bit symbol.  Any other
// count, and any period that overflowed the counter, gives code 0000000 and
// match_o low.  The windows must not overlap and must fit in the counter;
// elaboration stops with an error if they do not.
//
// Interface: period_i/period_ovf_i are read when period_valid_i is high.
// Timing: the decision is registered; valid_o pulses one cycle after
// period_valid_i, and code_o/data_o/match_o hold until the next decision.
//
// Following the design's specification: the nominal counts, the codes, the
// mapping 52.4/50.8/49.2/47.6 kHz to 11/10/01/00, the +/-1 tolerance and the
// all-zero code for other frequencies.  This design's own choices: the output
// register, match_o, and that data_o is 2'b00 when nothing matched.
//
// rst_n also disables the assertions below; lint reports that as a
// synchronous use of an asynchronous reset, which it is not in the logic.
module code_decoder
  import fsk4_pkg::*;
#(
  parameter count_table_t NOMINAL = NOMINAL_COUNT, // nominal count per carrier
  parameter data_table_t  SYMBOL  = NOMINAL_DATA,  // symbol per carrier
  parameter int unsigned  TOL_CNT = TOL            // accepted count error, +/-
) (
  input  logic   clk,
  input  logic   rst_n,           // asynchronous reset, active low
  input  count_t period_i,        // measured whole-period count
  input  logic   period_valid_i,  // period_i is new
  input  logic   period_ovf_i,    // the period overflowed the counter
  output count_t code_o,          // matched nominal count, 0 if none
  output data_t  data_o,          // demodulated 2-bit symbol
  output logic   match_o,         // the last period matched a carrier
  output logic   valid_o          // one-cycle pulse: a new decision
);
  timeunit 1ns;
  timeprecision 1ps;

  // Windows must be disjoint and inside the counter range.
  for (genvar i = 0; i < NUM_SYM; i++) begin : g_check
    if (int'(NOMINAL[i]) < int'(TOL_CNT) + 1 ||
        int'(NOMINAL[i]) + int'(TOL_CNT) >= (1 << CNT_W) - 1) begin : g_range
      $error("code_decoder: window %0d outside the counter range", i);
    end
    if (i > 0) begin : g_order
      if (int'(NOMINAL[i-1]) + int'(TOL_CNT) >= int'(NOMINAL[i]) - int'(TOL_CNT)) begin : g_overlap
        $error("code_decoder: windows %0d and %0d overlap", i - 1, i);
      end
    end
  end

  decision_t dec;
  logic      hit;

  always_comb begin
    dec = '{code: NO_CODE, data: '0};
    hit = 1'b0;
    for (int i = 0; i < NUM_SYM; i++) begin
      if (!period_ovf_i &&
          int'(period_i) >= int'(NOMINAL[i]) - int'(TOL_CNT) &&
          int'(period_i) <= int'(NOMINAL[i]) + int'(TOL_CNT)) begin
        dec = '{code: NOMINAL[i], data: SYMBOL[i]};
        hit = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_o  <= NO_CODE;
      data_o  <= '0;
      match_o <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= period_valid_i;
      if (period_valid_i) begin
        code_o  <= dec.code;
        data_o  <= dec.data;
        match_o <= hit;
      end
    end
  end

  // A match always carries a non-zero code, and only a match does.
  a_match_code: assert property (@(posedge clk) disable iff (!rst_n)
                                 match_o == (code_o != NO_CODE));

endmodule
