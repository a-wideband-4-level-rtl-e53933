// ota_tb: self-checking test of the OTA behavioural model.
//
// Small-signal: a 1 mV differential sine at 10 kHz must come out amplified
// by 51.1 dB (within 0.2 dB), and at 4.24 MHz 3 dB lower (within 0.5 dB).
// Large-signal: the mixer's 386 mV, 47.6 kHz IF must give a rail-to-rail
// output (0 V to 1.8 V) whose logic view toggles at the same frequency with
// a duty cycle near 50%.
module ota_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real PI = 3.14159265358979;

  real  vin_p = 0.9, vin_n = 0.9, vout;
  logic vout_logic;
  real  amp = 0.0, f_in = 10.0e3;

  int checks = 0, failures = 0;

  ota dut (.vin_p, .vin_n, .vout, .vout_logic);

  always begin
    #1;
    vin_p = 0.9 + 0.5 * amp * $sin(2.0 * PI * f_in * $realtime * 1.0e-9);
    vin_n = 0.9 - 0.5 * amp * $sin(2.0 * PI * f_in * $realtime * 1.0e-9);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Peak-to-peak of vout over the given time, sampled every nanosecond.
  task automatic measure_pp(input real t_ns, output real pp, output real vmax,
                            output real vmin);
    vmax = -10.0; vmin = 10.0;
    repeat (int'(t_ns)) begin
      #1;
      if (vout > vmax) vmax = vout;
      if (vout < vmin) vmin = vout;
    end
    pp = vmax - vmin;
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pp, vmax, vmin, g_db, g_hf;
    real t_rise0, t_rise1, t_fall, duty, f_meas;
    int  nrise;
    // DC gain.
    amp = 1.0e-3; f_in = 10.0e3;
    #(20us);
    measure_pp(200000.0, pp, vmax, vmin);
    g_db = 20.0 * $log10(pp / 2.0e-3);
    $display("gain at 10 kHz: %0.2f dB", g_db);
    check(g_db > 50.9 && g_db < 51.3, "DC gain");
    check(vmax < 1.8 && vmin > 0.0, "small signal does not clip");
    // -3 dB point.
    f_in = 4.24e6;
    #(5us);
    measure_pp(2000.0, pp, vmax, vmin);
    g_hf = 20.0 * $log10(pp / 2.0e-3);
    $display("gain at 4.24 MHz: %0.2f dB", g_hf);
    check(g_db - g_hf > 2.5 && g_db - g_hf < 3.5, "-3 dB frequency");
    // Full swing from the IF.
    amp = 0.386; f_in = 47.6e3;
    #(30us);
    measure_pp(25000.0, pp, vmax, vmin);
    check(vmax > 1.799 && vmin < 0.001, "rail-to-rail output");
    check(vmax <= 1.8 && vmin >= 0.0, "output within the rails");
    nrise = 0; t_rise0 = 0.0; t_rise1 = 0.0; t_fall = 0.0;
    while (nrise < 3) begin
      @(vout_logic);
      if (vout_logic) begin
        nrise++;
        if (nrise == 2) t_rise0 = $realtime;
        if (nrise == 3) t_rise1 = $realtime;
      end else if (nrise == 2) t_fall = $realtime;
    end
    f_meas = 1.0e9 / (t_rise1 - t_rise0);
    duty = (t_fall - t_rise0) / (t_rise1 - t_rise0);
    $display("logic output: %0.2f kHz, duty %0.3f", f_meas / 1e3, duty);
    check(f_meas > 47.4e3 && f_meas < 47.8e3, "logic output frequency");
    check(duty > 0.49 && duty < 0.51, "logic output duty cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
