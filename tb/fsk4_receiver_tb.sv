// fsk4_receiver_tb: end-to-end test of the 4-level FSK receiver.
//
// A 4-FSK transmitter is modelled here: a 50 mV RF carrier whose frequency
// follows the symbol being sent (data 11, 10, 01, 00 on 9.9476, 9.9492,
// 9.9508, 9.9524 MHz), with continuous phase across symbol changes, and a
// 200 mV, 10 MHz LO.  The 5 MHz counter clock runs from its own source.
// Each segment lasts 160 us, about eight IF periods.  Decisions made more
// than 45 us after a segment starts measure a period that lies wholly inside
// the segment; each of them must match the carrier, give the symbol sent and
// a count within one of 5 MHz / f_IF.  Every data segment must yield at least
// four such decisions.  Besides the four symbols the run sends a carrier
// 60 kHz from the LO (no symbol: match must stay low), switches the RF off
// (timeout_o must rise and no decision may come), and then resumes.
// Counted mechanisms: each symbol value, a count off its nominal value
// accepted by the tolerance window, a rejected period, a timeout, the
// first edge after reset.  Each must happen at least once.
module fsk4_receiver_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real PI     = 3.14159265358979;
  localparam real F_LO   = 10.0e6;
  localparam real SEG_NS = 160000.0;
  localparam real GUARD  = 45000.0;

  real  rf_p = 1.0, rf_n = 1.0, lo_p = 1.0, lo_n = 1.0;
  logic clk = 1'b0, rst_n = 1'b0;
  real  if_p, if_n, ota_vout;
  logic if_digital, match, valid, timeout;
  logic [6:0] period, code;
  logic [1:0] data;

  fsk4_receiver dut (
    .rf_p, .rf_n, .lo_p, .lo_n, .clk, .rst_n, .if_p, .if_n, .ota_vout, .if_digital,
    .period_o(period), .code_o(code), .data_o(data), .match_o(match),
    .valid_o(valid), .timeout_o(timeout)
  );

  // ---- transmitter and LO: phase accumulators, 1 ns steps ----
  real f_rf = 9.95e6, a_rf = 0.05, ph_rf = 0.0;
  always begin
    #1;
    ph_rf = ph_rf + 2.0 * PI * f_rf * 1.0e-9;
    if (ph_rf > 2.0 * PI) ph_rf = ph_rf - 2.0 * PI;
    rf_p = 1.0 + 0.5 * a_rf * $sin(ph_rf);
    rf_n = 1.0 - 0.5 * a_rf * $sin(ph_rf);
    lo_p = 1.0 + 0.1 * $sin(2.0 * PI * F_LO * $realtime * 1.0e-9);
    lo_n = 1.0 - 0.1 * $sin(2.0 * PI * F_LO * $realtime * 1.0e-9);
  end

  // 5 MHz counter clock, phase unrelated to the LO.
  initial begin
    #37;
    forever #100 clk = ~clk;
  end

  int checks = 0, failures = 0;
  int n_sym[4] = '{0, 0, 0, 0};
  int n_tol = 0, n_reject = 0, n_timeout = 0, n_first = 0;
  int if_rises = 0;             // IF edges seen since reset ended
  int seg_good = 0;             // guarded, correct decisions in this segment
  int sending = -1;             // 0..3 data, -1 other carrier, -2 RF off
  real f_if_now = 0.0;
  realtime seg_start = 0.0;

  task automatic fail(input string what);
    failures++;
    $display("FAIL %0t ns: %s", $realtime, what);
  endtask

  // Check every decision, half a cycle after it is set.
  always @(negedge clk) if (valid && rst_n) begin
    real expect_cnt;
    expect_cnt = 5.0e6 / f_if_now;
    if ($realtime - seg_start > GUARD) begin
      checks++;
      if (sending >= 0) begin
        if (!match || int'(data) != sending || real'(period) - expect_cnt > 1.0 ||
            expect_cnt - real'(period) > 1.0)
          fail($sformatf("sent %0d (count %0.1f), got match %0b data %0d count %0d",
                         sending, expect_cnt, match, data, period));
        else begin
          seg_good++;
          n_sym[sending]++;
          if (period != code) n_tol++;
        end
      end else if (sending == -1) begin
        if (match || code != 7'd0) fail($sformatf("other carrier matched, count %0d", period));
        else n_reject++;
      end else begin
        fail("decision with the RF off");
      end
    end
  end

  task automatic segment(input int what);
    sending   = -3;   // no checks until the new segment is set up
    seg_good  = 0;
    if (what >= 0) begin
      f_if_now = 52.4e3 - 1.6e3 * real'(3 - what);
      a_rf = 0.05;
    end else if (what == -1) begin
      f_if_now = 60.0e3;
      a_rf = 0.05;
    end else begin
      a_rf = 0.0;
    end
    f_rf = F_LO - f_if_now;
    seg_start = $realtime;
    sending = what;
    #(SEG_NS);
    if (what >= 0) begin
      checks++;
      if (seg_good < 4) fail($sformatf("only %0d good decisions for symbol %0d", seg_good, what));
    end
  endtask

  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sending = -3;
    f_if_now = 52.4e3;
    f_rf = F_LO - f_if_now;
    #1000;
    rst_n = 1'b1;
    // First edge after reset: it only opens a period, so the first decision
    // needs a second edge.
    fork
      begin
        fork
          forever @(posedge if_digital) if_rises++;
        join_none
        @(posedge valid);
        checks++;
        if (if_rises < 2) fail("decision before the second IF edge after reset");
        else n_first++;
      end
    join_none
    segment(3); segment(2); segment(1); segment(0);
    repeat (12) segment(int'($urandom_range(3)));
    segment(-1);                       // carrier that is not a symbol
    segment(-2);                       // RF off
    checks++;
    if (!timeout) fail("timeout not raised with the RF off");
    else n_timeout++;
    segment(1);
    segment(2);
    checks++;
    if (n_sym[0] == 0 || n_sym[1] == 0 || n_sym[2] == 0 || n_sym[3] == 0 ||
        n_tol == 0 || n_reject == 0 || n_timeout == 0 || n_first == 0)
      fail("a mechanism was never exercised");
    $display("decisions 00:%0d 01:%0d 10:%0d 11:%0d, tolerance used %0d, rejected %0d, timeouts %0d, first-edge %0d",
             n_sym[0], n_sym[1], n_sym[2], n_sym[3], n_tol, n_reject, n_timeout, n_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
