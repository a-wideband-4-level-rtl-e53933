// fsk4_demod_tb: self-checking test of the digital 4-FSK demodulator.
//
// The full-swing IF input is generated from real carrier frequencies with
// its own timing, unrelated to the 5 MHz clock, and with a random jitter of
// up to +/-30 ns on every edge.  For every IF period the reference computes
// the true period in ns; the measured count must be the floor or the ceiling
// of period / 200 ns (or 127 with the overflow behaviour for a period past
// the counter), the decision must follow the carrier table (checked against
// the count ranges written out here), and valid_o must come 3 to 4 clock
// periods after the IF edge that closed the period.  Carriers: the four data
// carriers, a 60 kHz and a 48.5 kHz signal that match no carrier, and a gap
// in the IF that must raise timeout_o.
module fsk4_demod_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real TCLK = 200.0;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       if_in = 1'b0;
  logic [6:0] period, code;
  logic [1:0] data;
  logic       match, valid, timeout;

  int checks = 0, failures = 0;
  int n_sym[4] = '{0, 0, 0, 0};
  int n_reject = 0, n_timeout = 0;
  typedef struct { realtime t; int burst; int sym; } rise_t;
  rise_t rise_q[$];             // IF rising edges awaiting a decision
  int burst = 0;                // number of the current send() call
  real jit_prev = 0.0;          // jitter of the last edge sent

  fsk4_demod dut (
    .clk, .rst_n, .if_in, .period_o(period), .code_o(code), .data_o(data),
    .match_o(match), .valid_o(valid), .timeout_o(timeout)
  );

  always #100 clk = ~clk;

  function automatic void table_lookup(input int p, output logic [6:0] c,
                                       output logic [1:0] d, output bit m);
    c = 7'b0000000; d = 2'b00; m = 1'b0;
    if (p >= 94 && p <= 96)        begin c = 7'b1011111; d = 2'b11; m = 1'b1; end
    else if (p >= 97 && p <= 99)   begin c = 7'b1100010; d = 2'b10; m = 1'b1; end
    else if (p >= 100 && p <= 102) begin c = 7'b1100101; d = 2'b01; m = 1'b1; end
    else if (p >= 104 && p <= 106) begin c = 7'b1101001; d = 2'b00; m = 1'b1; end
  endfunction

  // Decisions are sampled half a cycle after the clock edge that sets them.
  always @(negedge clk) if (valid) begin
    rise_t r_open, r_close;
    realtime dt, lat;
    int lo, hi;
    logic [6:0] c;
    logic [1:0] d;
    bit m;
    checks++;
    if (rise_q.size() < 2) begin
      failures++;
      $display("FAIL %0t: decision without a measured period", $realtime);
    end else begin
      r_open  = rise_q.pop_front();
      r_close = rise_q[0];
      dt  = r_close.t - r_open.t;
      lat = $realtime - 0.5 * TCLK - r_close.t;
      lo  = int'($floor(dt / TCLK));
      hi  = int'($ceil(dt / TCLK));
      if (lo > 127) begin lo = 127; hi = 127; end
      if (int'(period) < lo || int'(period) > hi) begin
        failures++;
        $display("FAIL %0t: period %0d for %0.1f ns", $realtime, period, dt);
      end
      table_lookup((dt > 127.0 * TCLK) ? 0 : int'(period), c, d, m);
      if (code != c || match != m || (m && data != d)) begin
        failures++;
        $display("FAIL %0t: count %0d gave code %b data %b match %0b", $realtime,
                 period, code, data, match);
      end
      // A period wholly inside one burst of a data carrier must give its symbol.
      if (r_open.burst == r_close.burst && r_open.sym >= 0 &&
          (!m || int'(data) != r_open.sym)) begin
        failures++;
        $display("FAIL %0t: match %0b data %0d while sending %0d", $realtime, m, data,
                 r_open.sym);
      end
      if (lat <= 3.0 * TCLK || lat > 4.0 * TCLK + 1.0) begin
        failures++;
        $display("FAIL %0t: latency %0.1f ns", $realtime, lat);
      end
      if (m) n_sym[data]++; else n_reject++;
    end
  end

  // n periods of a square wave of frequency f (Hz), each edge jittered.
  task automatic send(input real f, input int n, input int sym);
    real half = 0.5e9 / f;
    burst++;
    repeat (n) begin
      real j1 = (real'($urandom_range(60)) - 30.0);
      real j2 = (real'($urandom_range(60)) - 30.0);
      #(half + j1 - jit_prev);
      if_in = 1'b1;
      rise_q.push_back('{t: $realtime, burst: burst, sym: sym});
      #(half + j2 - j1);
      if_in = 1'b0;
      jit_prev = j2;
    end
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real freq[4] = '{47.6e3, 49.2e3, 50.8e3, 52.4e3};  // data 00, 01, 10, 11
    #450;
    rst_n = 1'b1;
    #333;
    // The first edge after reset only opens the first measured period.
    send(freq[0], 1, 0);
    for (int r = 0; r < 3; r++)
      for (int s = 0; s < 4; s++) send(freq[s], 5, s);
    repeat (12) begin
      automatic int s = $urandom_range(3);
      send(freq[s], 3, s);
    end
    send(60.0e3, 4, -1);     // count 83: matches nothing
    send(48.5e3, 4, -1);     // count 103: between two windows
    // Carrier lost for 40 us.
    #40us;
    checks++;
    if (!timeout) begin
      failures++;
      $display("FAIL timeout not raised");
    end else n_timeout++;
    send(freq[3], 4, 3);     // its first period spans the gap
    #2us;
    checks++;
    if (rise_q.size() != 1 || n_reject < 8) begin
      failures++;
      $display("FAIL %0d decisions missing, %0d rejects", rise_q.size() - 1, n_reject);
    end
    checks++;
    if (n_sym[0] == 0 || n_sym[1] == 0 || n_sym[2] == 0 || n_sym[3] == 0 || n_timeout == 0) begin
      failures++;
      $display("FAIL not every case exercised");
    end
    $display("symbols 00:%0d 01:%0d 10:%0d 11:%0d rejected:%0d", n_sym[0], n_sym[1],
             n_sym[2], n_sym[3], n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
