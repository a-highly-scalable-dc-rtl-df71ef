// Self-checking testbench for the front-end model afe_model.
// The testbench plays the digital side itself: one oversampling period
// (64 kHz in real time, as the integrator model is time-based) is f_os
// rising (comparator decision), phi2 (copy), f_os falling, a step chosen
// from the last two bits by the delta-step table, and phi1 (transfer).
// Checks:
//  - every transfer moves v_dac by C_S/(C_S+C_INT) times the step voltage
//    (about 20 uV per unit step in high resolution, 80 uV in low);
//  - skipping the copy phase corrupts the next transfer (why S2 exists);
//  - the loop tracks a 1 mV, 100 Hz sine sampled at 64 kHz (its slope,
//    10 uV per period, is within the 20 uV unit step) and a 5 mV DC offset,
//    with v_dac - vbias following vinp - vinn to within a few steps;
//  - a 50 mV offset step is followed within 100 uV after at most 3200
//    periods (50 ms at 64 kHz) and stays within 150 uV from period 4400
//    on; the integrator's 20 Hz pole bounds its wind-up during the slew;
//  - with a constant input the bitstream averages one half;
//  - a second instance with X3_RATIO = 4, fed the same step commands,
//    moves by 4 unit steps wherever the default moves by 3.
module afe_model_tb;
  import nadc_pkg::*;

  real vinp = 0.6, vinn = 0.6, vbias = 0.6;
  logic f_os = 0, phi1 = 0, phi2 = 0, step_up = 1, step_x3 = 0;
  res_t res_mode = RES_HIGH;
  logic v_out;
  real v_dac, v_int;
  int checks = 0, failures = 0;
  logic v_prev = 0;
  real ratio;
  localparam real PI = 3.14159265358979;
  localparam real TP = 1.0e9 / 64.0e3;   // oversampling period, ns (64 kHz)

  afe_model dut (.vinp, .vinn, .vbias, .f_os, .phi1, .phi2, .step_up, .step_x3,
                 .res_mode, .v_out, .v_dac, .v_int);

  // continuous-time step ratio; only its DAC steps are checked
  logic v_out_ct;
  real v_dac_ct, v_int_ct, dv_ct;
  afe_model #(.X3_RATIO(4.0)) dut_ct (.vinp, .vinn, .vbias, .f_os, .phi1, .phi2, .step_up,
                                      .step_x3, .res_mode, .v_out(v_out_ct), .v_dac(v_dac_ct),
                                      .v_int(v_int_ct));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t: %s", $time, what); end
  endtask

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // one oversampling period; returns the DAC change it produced
  task automatic period(input bit do_copy, output real dv, output int mult);
    real v_before, v_before_ct;
    #(TP / 8.0) f_os = 1;
    #(TP / 8.0) if (do_copy) phi2 = 1;
    #(TP / 4.0) phi2 = 0;
    #(TP / 8.0) f_os = 0;
    unique case ({v_prev, v_out})
      2'b00: mult = -1;
      2'b01: mult = 3;
      2'b10: mult = -3;
      default: mult = 1;
    endcase
    step_up = (mult > 0);
    step_x3 = (mult == 3 || mult == -3);
    v_prev  = v_out;
    v_before  = v_dac;
    v_before_ct = v_dac_ct;
    #(TP / 8.0) phi1 = 1;
    #(TP / 4.0) phi1 = 0;
    dv = v_dac - v_before;
    dv_ct = v_dac_ct - v_before_ct;
  endtask

  initial begin
    real dv, err, max_err, vstep, ones;
    int mult, n, n_x3 = 0;
    ratio = 10.0e-15 / (10.0e-15 + 10.0e-12);
    #5;
    // --- step sizes, high and low resolution, small input
    vinp = 0.6 + 100.0e-6;
    for (int i = 0; i < 200; i++) begin
      period(1, dv, mult);
      vstep = ((res_mode == RES_HIGH) ? 20.0e-3 : 80.0e-3) * mult;
      check(absr(dv - ratio * vstep) < 1.0e-9, $sformatf("step %g exp %g", dv, ratio * vstep));
      if (mult == 3 || mult == -3) begin
        n_x3++;
        check(absr(dv_ct - dv * 4.0 / 3.0) < 1.0e-9, "X3_RATIO 4 gives a 4x large step");
      end else
        check(absr(dv_ct - dv) < 1.0e-9, "X3_RATIO leaves the unit step");
      if (i == 99) res_mode = RES_LOW;
    end
    // --- without the copy phase the floating plate is off by the last step
    res_mode = RES_HIGH;
    period(1, dv, mult);
    period(0, dv, mult);
    period(0, dv, mult);
    vstep = 20.0e-3 * mult;
    check(absr(dv - ratio * vstep) > 1.0e-6, "missing copy phase corrupts the transfer");
    period(1, dv, mult);
    period(1, dv, mult);
    vstep = 20.0e-3 * mult;
    check(absr(dv - ratio * vstep) < 1.0e-9, "copy phase restores exact steps");
    // --- sine tracking, 1 mV amplitude, 100 Hz, 64 kHz
    max_err = 0.0;
    for (int i = 0; i < 64 * 10 * 4; i++) begin
      vinp = 0.6 + 1.0e-3 * $sin(2.0 * PI * 100.0 * real'(i) / 64000.0);
      period(1, dv, mult);
      err = absr((vinp - vinn) - (v_dac - vbias));
      if (i > 640 && err > max_err) max_err = err;
    end
    $display("sine tracking: max |input - feedback| = %g V", max_err);
    check(max_err < 200.0e-6, "DAC tracks a 1 mV 100 Hz sine within 200 uV");
    // --- DC offset 5 mV: feedback converges to it
    vinp = 0.6 + 5.0e-3;
    for (int i = 0; i < 40000; i++) period(1, dv, mult);
    err = absr((vinp - vinn) - (v_dac - vbias));
    check(err < 100.0e-6, $sformatf("DC offset tracked, error %g", err));
    // --- 50 mV offset step: the loop slews at one unit step per period
    // (2500 periods for 50 mV) and must then settle, not ring
    vinp = 0.6 + 50.0e-3;
    n = -1;
    max_err = 0.0;
    for (int i = 0; i < 6400; i++) begin
      period(1, dv, mult);
      err = absr((vinp - vinn) - (v_dac - vbias));
      if (err < 100.0e-6 && n < 0) n = i;
      if (i >= 4400 && err > max_err) max_err = err;
    end
    $display("50 mV offset: within 100 uV at period %0d (%0.1f ms at 64 kHz), later max error %g V",
             n, real'(n) * TP * 1.0e-6, max_err);
    check(n >= 0 && n <= 3200, "50 mV offset followed within 50 ms");
    check(max_err < 150.0e-6, "50 mV offset held after settling");
    // bitstream mean at DC
    ones = 0.0; n = 2000;
    for (int i = 0; i < n; i++) begin
      period(1, dv, mult);
      ones += v_out ? 1.0 : 0.0;
    end
    check(absr(ones / n - 0.5) < 0.05, $sformatf("bit mean %g at constant input", ones / n));
    check(n_x3 > 0, "large steps occurred in the step-size test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2s;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
