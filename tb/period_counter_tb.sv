// period_counter_tb: self-checking test of the IF period counter.
//
// The IF input is driven synchronously (changing after the falling clock
// edge) so the expected count of every period is known exactly: it is the
// number of rising clock edges between two rising IF edges.  The test runs
// the four nominal carriers (95, 98, 101, 105 cycles), periods with +/-1
// cycle jitter, the counter limit (127), periods past it (overflow) and a
// long gap (timeout), and a reset that ends while the IF is high.  A reference queue holds, for each rising IF edge
// after the first, the clock edge at which period_valid_o must pulse (two
// edges after the one that first samples the IF edge), the count and the
// overflow flag; any pulse that is missing, early, late or unexpected fails.
module period_counter_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CNT_W = 7;
  localparam int MAXC  = (1 << CNT_W) - 1;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             if_in = 1'b0;
  logic [CNT_W-1:0] period;
  logic             period_valid, period_ovf, timeout;

  int checks = 0, failures = 0;
  int cyc = 0;            // rising clock edges so far
  int last_rise = -1;     // clock edge index that sampled the last IF rise
  int n_meas = 0, n_ovf = 0, n_timeout = 0;

  typedef struct { int at; int cnt; bit ovf; } exp_t;
  exp_t expq[$];

  period_counter #(.CNT_W(CNT_W)) dut (
    .clk, .rst_n, .if_in,
    .period_o(period), .period_valid_o(period_valid),
    .period_ovf_o(period_ovf), .timeout_o(timeout)
  );

  always #100 clk = ~clk;   // 5 MHz
  always @(posedge clk) cyc <= cyc + 1;

  // Monitor, half a cycle after each rising edge.
  always @(negedge clk) if (rst_n) begin
    if (expq.size() > 0 && expq[0].at == cyc) begin
      checks++;
      if (!period_valid || period != CNT_W'(expq[0].cnt) || period_ovf != expq[0].ovf) begin
        failures++;
        $display("FAIL cyc %0d: valid=%0b period=%0d ovf=%0b, expected period %0d ovf %0b",
                 cyc, period_valid, period, period_ovf, expq[0].cnt, expq[0].ovf);
      end
      n_meas++;
      if (expq[0].ovf) n_ovf++;
      void'(expq.pop_front());
    end else if (period_valid) begin
      checks++; failures++;
      $display("FAIL cyc %0d: unexpected valid, period=%0d", cyc, period);
    end
  end

  // One IF period of p cycles, high for the first half.  Called just after a
  // falling clock edge; the rise is sampled at the next rising edge.
  task automatic one_period(input int p);
    int k;
    if_in = 1'b1;
    k = cyc + 1;
    if (last_rise >= 0)
      expq.push_back('{at: k + 2, cnt: (k - last_rise > MAXC) ? MAXC : k - last_rise,
                       ovf: (k - last_rise > MAXC)});
    last_rise = k;
    repeat (p / 2) @(negedge clk);
    if_in = 1'b0;
    repeat (p - p / 2) @(negedge clk);
  endtask

  task automatic check_timeout(input bit want, input string what);
    checks++;
    if (timeout != want) begin
      failures++;
      $display("FAIL %s: timeout=%0b expected %0b", what, timeout, want);
    end
  endtask

  initial begin : watchdog
    #(200 * 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int nominal[4] = '{95, 98, 101, 105};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // The four carriers, several periods each.
    foreach (nominal[i]) repeat (4) one_period(nominal[i]);
    // Jitter of one cycle either way.
    repeat (40) one_period(nominal[$urandom_range(3)] + $urandom_range(2) - 1);
    // Short and long periods, up to and past the counter limit.
    one_period(20); one_period(3); one_period(126); one_period(127);
    one_period(128); one_period(200); one_period(105);
    // A lost carrier: timeout rises, and the next period overflows.
    if_in = 1'b0;
    repeat (MAXC + 5) @(negedge clk);
    check_timeout(1'b1, "after gap");
    n_timeout++;
    one_period(105);
    check_timeout(1'b0, "after edge");
    one_period(105);
    one_period(98);
    // Reset in the middle clears the first-edge rule: no measurement for
    // the first edge after it.
    // The IF is high when reset ends: that level is not an edge.
    rst_n = 1'b0;
    expq.delete();
    if_in = 1'b1;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (30) @(negedge clk);
    if_in = 1'b0;
    repeat (30) @(negedge clk);
    last_rise = -1;
    repeat (3) one_period(101);
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d expected measurements never appeared", expq.size());
    end
    checks++;
    if (n_ovf < 2 || n_timeout < 1) begin
      failures++;
      $display("FAIL overflow/timeout not exercised");
    end
    $display("measurements %0d, overflows %0d", n_meas, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
