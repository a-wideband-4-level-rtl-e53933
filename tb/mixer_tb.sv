// mixer_tb: self-checking test of the mixer behavioural model.
//
// For each of the four RF carriers (9.9476 to 9.9524 MHz, 50 mV) and a
// 10 MHz, 200 mV LO, the test lets the model settle, then measures the IF
// output over two IF periods: its amplitude must be within 3% of
// 386 mV x |H|^2 (the two output poles at 1 MHz), its frequency, from the
// zero crossings, within 1% of LO - RF, its common mode 0.9 V, and what is
// left of the sum frequency (ripple between neighbouring samples) small.
// With the RF switched off the IF must be silent.
module mixer_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real PI = 3.14159265358979;

  real rf_p = 1.0, rf_n = 1.0, lo_p = 1.0, lo_n = 1.0;
  real if_p, if_n;
  real a_rf = 0.05, a_lo = 0.2, f_rf = 9.9476e6, f_lo = 10.0e6;

  int checks = 0, failures = 0;

  mixer dut (.rf_p, .rf_n, .lo_p, .lo_n, .if_p, .if_n);

  // Differential sources around a 1 V bias, updated every nanosecond.
  always begin
    #1;
    rf_p = 1.0 + 0.5 * a_rf * $sin(2.0 * PI * f_rf * $realtime * 1.0e-9);
    rf_n = 1.0 - 0.5 * a_rf * $sin(2.0 * PI * f_rf * $realtime * 1.0e-9);
    lo_p = 1.0 + 0.5 * a_lo * $sin(2.0 * PI * f_lo * $realtime * 1.0e-9);
    lo_n = 1.0 - 0.5 * a_lo * $sin(2.0 * PI * f_lo * $realtime * 1.0e-9);
  end

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real rf_list[4] = '{9.9476e6, 9.9492e6, 9.9508e6, 9.9524e6};
    foreach (rf_list[i]) begin
      real f_if, h2, amp_exp, vmax, vmin, vd, vd_prev, t_first, t_last, f_meas;
      real cm_err, ripple;
      int  ncross;
      f_rf = rf_list[i];
      f_if = f_lo - f_rf;
      h2 = 1.0 / (1.0 + (f_if / 1.0e6) ** 2);   // |H|^2 of two poles
      amp_exp = 0.5 * 77.2 * a_rf * a_lo * $sqrt(h2);
      #(10us);                                  // settle
      vmax = -10.0; vmin = 10.0; ncross = 0; t_first = 0.0; t_last = 0.0;
      cm_err = 0.0; ripple = 0.0;
      vd_prev = if_p - if_n;
      repeat (int'(2.0e9 / f_if / 2.0)) begin
        #2;
        vd = if_p - if_n;
        if (vd > vmax) vmax = vd;
        if (vd < vmin) vmin = vd;
        if (fabs((if_p + if_n) / 2.0 - 0.9) > cm_err) cm_err = fabs((if_p + if_n) / 2.0 - 0.9);
        if (fabs(vd - vd_prev) > ripple) ripple = fabs(vd - vd_prev);
        if (vd_prev < 0.0 && vd >= 0.0) begin
          if (ncross == 0) t_first = $realtime;
          t_last = $realtime;
          ncross++;
        end
        vd_prev = vd;
      end
      f_meas = (ncross > 1) ? (ncross - 1) * 1.0e9 / (t_last - t_first) : 0.0;
      $display("RF %0.4f MHz: IF %0.2f kHz (expected %0.2f), amplitude %0.1f mV (expected %0.1f)",
               f_rf / 1e6, f_meas / 1e3, f_if / 1e3, 500.0 * (vmax - vmin), 1000.0 * amp_exp);
      check(fabs(0.5 * (vmax - vmin) - amp_exp) < 0.03 * amp_exp, "IF amplitude");
      check(fabs(0.5 * (vmax + vmin)) < 0.03 * amp_exp, "IF offset");
      check(ncross >= 2 && fabs(f_meas - f_if) < 0.01 * f_if, "IF frequency");
      check(cm_err < 1.0e-9, "output common mode");
      check(ripple < 0.01 * amp_exp, "sum-frequency residue");
    end
    // RF off: the product, and so the IF, dies away.
    a_rf = 0.0;
    #(20us);
    check(fabs(if_p - if_n) < 1.0e-3, "IF with no RF");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
