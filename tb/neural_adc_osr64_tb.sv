// End-to-end testbench for neural_adc_top at the faster oversampling
// setting: f_ref = 128 kHz with f_OS_high on tap 0 (64 kHz, OSR 64) and
// f_OS_low on tap 2 (16 kHz, OSR 16), f_s still 1 kHz. This is the rate the
// front-end's integrator bandwidth and OTA speed are designed for; at tap 0
// each half of f_os is a single f_ref cycle, so the DAC phases run with no
// gap. The other settings are those of the main end-to-end test (band 8,
// mid thresholds 138/118, counting steps 1 and 4, baseline every 19
// samples), and so are the checks. The stimulus has a large electrode
// offset: vinp = vbias + 50 mV + an idle 100 uV, 10 Hz tone, then one 1 mV,
// 20 Hz burst for 0.5 s and 0.7 s of recovery. The modulator loop removes
// the offset (the DAC slews to it in about 40 ms) and the baseline
// tracker then pulls the saturated decimator back to mid-scale within the
// 2 s before the checks start. Checks: one sample per 128
// f_ref cycles; the idle output sits near mid-scale in low resolution; the
// burst switches to high resolution and idle switches back; sample-to-
// sample output changes follow the input in 20 uV units (within 12 codes in
// high and 24 in low resolution, not judged across a mode change); each
// mechanism (switch up and down, baseline update, 3x and 1x DAC steps)
// must occur.
module neural_adc_osr64_tb;
  import nadc_pkg::*;

  localparam real T_REF = 1.0e9 / 128.0e3;   // ns
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  real vinp, vinn, vbias, v_dac;
  backend_cfg_t cfg;
  logic [7:0] dout;
  res_t dout_res, res_mode;
  logic dout_valid, mod_bit, f_os, f_s, dc_update;
  logic signed [7:0] dc_value;
  int checks = 0, failures = 0;
  real t_s = 0.0;
  bit burst = 0;

  // bench stimulus generator (side by side with the channel)
  logic meas_clk_in = 1'b0, meas_reset_in = 1'b0, meas_clk_chip_in;
  logic meas_ud_out, meas_clk_out, meas_reset_out;
  logic [7:0] meas_th_l, meas_th_h;
  logic [4:0] meas_band;
  logic [2:0] meas_sel_low, meas_sel_high, meas_sel_nq, meas_leds;

  neural_adc_top dut (.clk, .rst_n, .vinp, .vinn, .vbias, .cfg, .dout, .dout_res,
                      .dout_valid, .res_mode, .mod_bit, .f_os, .f_s, .dc_value,
                      .dc_update, .v_dac, .meas_clk_in, .meas_clk_chip_in, .meas_reset_in,
                      .meas_ud_out, .meas_clk_out, .meas_reset_out, .meas_th_l, .meas_th_h,
                      .meas_band, .meas_sel_low, .meas_sel_high, .meas_sel_nq, .meas_leds);

  always #(T_REF / 2.0) clk = ~clk;
  assign meas_clk_chip_in = 1'b0;   // stimulus generator idle in this test

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0.4f s: %s", t_s, what); end
  endtask

  // input waveform, updated every f_ref cycle
  always @(posedge clk) begin
    t_s = t_s + 1.0 / 128.0e3;
    vinp = vbias + 50.0e-3 + 100.0e-6 * $sin(2.0 * PI * 10.0 * t_s)
         + (burst ? 1.0e-3 * $sin(2.0 * PI * 20.0 * t_s) : 0.0);
  end

  int cyc = 0, last_valid = -1;
  int n_samples = 0, n_up = 0, n_down = 0, n_updates = 0, n_x3 = 0, n_x1 = 0, n_sat = 0;
  int n_hi = 0, n_lo = 0, n_track = 0, n_idle_ok = 0, n_idle = 0;
  int dc_since = 0;
  real prev_u = 0.0;
  int prev_dout = 128;
  res_t prev_mode = RES_LOW, prev_res = RES_LOW;
  int n_trans = 0;
  bit measuring = 0;

  always @(posedge clk) cyc++;

  // a bit that differs from the previous one asks the DAC for a 3x step
  logic last_bit = 1'b0;
  always @(negedge f_os) if (rst_n) begin
    if (mod_bit != last_bit) n_x3++; else n_x1++;
    last_bit = mod_bit;
  end

  always @(negedge clk) if (rst_n) begin
    if (dc_update) begin n_updates++; dc_since += int'(dc_value); end
    if (res_mode != prev_mode) begin
      if (res_mode == RES_HIGH) n_up++; else n_down++;
      prev_mode = res_mode;
    end
    if (dout_valid) begin
      real u;
      int du, tol;
      u = (vinp - vinn) / 20.0e-6;
      if (last_valid >= 0) check(cyc - last_valid == 128, "one sample per 128 f_ref cycles");
      last_valid = cyc;
      n_samples++;
      if (dout == 8'd255 || dout == 8'd0) n_sat++;
      if (measuring) begin
        if (dout_res == RES_HIGH) n_hi++; else n_lo++;
        du  = int'(dout) - prev_dout + dc_since;
        tol = (dout_res == RES_HIGH) ? 12 : 24;
        if (dout_res != prev_res) n_trans++;
        else if (prev_dout > 8 && prev_dout < 247 && dout > 8 && dout < 247) begin
          n_track++;
          check((real'(du) - (u - prev_u)) <= tol && (real'(du) - (u - prev_u)) >= -tol,
                $sformatf("tracking: output change %0d, input change %0.1f", du, u - prev_u));
        end
        if (!burst) begin
          n_idle++;
          if (dout >= 8'd110 && dout <= 8'd146) n_idle_ok++;
        end
      end
      dc_since = 0;
      prev_res = dout_res;
      prev_u = u;
      prev_dout = int'(dout);
    end
  end

  initial begin
    int hi0, lo0, idle_ok0, idle0;
    vbias = 0.6; vinn = 0.6; vinp = 0.6;
    cfg = '{sel_clk_nyq: 3'd6, sel_clk_high: 3'd0, sel_clk_low: 3'd2, hyst_band: 5'd8,
            mid_high_thr: 8'd138, mid_low_thr: 8'd118, step_high: 8'd1, step_low: 8'd4,
            dc_period: 8'd19};
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // offset pull-in and settling: 2 s
    repeat (2000) @(posedge dout_valid);
    measuring = 1;
    for (int rep = 0; rep < 1; rep++) begin
      // idle 1 s
      hi0 = n_hi; lo0 = n_lo; idle_ok0 = n_idle_ok; idle0 = n_idle;
      repeat (1000) @(posedge dout_valid);
      $display("idle: high-res samples %0d, low-res %0d, near mid-scale %0d of %0d",
               n_hi - hi0, n_lo - lo0, n_idle_ok - idle_ok0, n_idle - idle0);
      check(n_lo - lo0 > 900, "idle runs in low resolution");
      check(n_idle_ok - idle_ok0 > 900, "idle output stays near mid-scale (offset removed)");
      // burst 0.5 s
      burst = 1;
      hi0 = n_hi; lo0 = n_lo;
      repeat (500) @(posedge dout_valid);
      $display("burst: high-res samples %0d, low-res %0d", n_hi - hi0, n_lo - lo0);
      check(n_hi - hi0 > 250, "burst runs mostly in high resolution");
      burst = 0;
      // recovery of the baseline after the burst, not judged as idle
      measuring = 0;
      repeat (700) @(posedge dout_valid);
      measuring = 1;
    end
    $display("samples %0d, switches up %0d down %0d, baseline updates %0d, 3x steps %0d, 1x steps %0d, saturated samples %0d, tracked %0d",
             n_samples, n_up, n_down, n_updates, n_x3, n_x1, n_sat, n_track);
    check(n_up >= 1 && n_down >= 1, "mode switches both ways");
    check(n_updates > 50, "baseline updates");
    check(n_x3 > 0 && n_x1 > 0, "both DAC step sizes used");
    check(n_track > 1000, "tracking checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (128 * 5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
