// End-to-end testbench for neural_adc_top (no parameters, so this is the
// full-size design): front-end model, DAC control and digital back-end
// together, with f_ref = 128 kHz and the reference settings (f_s 1 kHz,
// f_OS_high 32 kHz, f_OS_low 8 kHz, band 8, mid thresholds 138/118,
// counting steps 1 and 4 to match the 20 uV / 80 uV DAC steps, baseline
// every 19 samples).
// Input: vinp = vbias + a 2 mV electrode offset + an idle 100 uV, 10 Hz
// tone; a 1 mV, 20 Hz burst is added for 0.5 s twice, each followed by
// 0.7 s for the baseline to recover. Checks:
//  - one sample per 128 f_ref cycles;
//  - the offset is removed: after settling the idle output sits near
//    mid-scale in low resolution;
//  - the burst switches to high resolution, and idle switches back;
//  - sample-to-sample changes of the output (plus any DC correction made
//    between them) follow the input's change in 20 uV units, within
//    12 codes in high and 24 codes in low resolution (not judged across
//    a mode change, where the modulator's loop state is rescaled);
//  - counts of each mechanism: switches up and down, baseline updates,
//    3x and 1x DAC steps (saturated output samples are only reported).
// The bench stimulus generator beside the channel is run too: it is
// released from reset, loads its settings, and replays its bitstream at
// the channel's f_os; each replayed bit and the loop wrap are checked.
module neural_adc_top_tb;
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

  // The stimulus generator gets a 10 MHz clock for its first 2000 cycles
  // (its reset delay is 511 of them) and replays its bitstream at the
  // channel's f_os.
  assign meas_clk_chip_in = f_os;
  initial #1000 meas_reset_in = 1'b1;
  initial repeat (4000) #50 meas_clk_in = ~meas_clk_in;
  logic meas_ref [1024];
  initial $readmemb("rtl/meas_bitstream.mem", meas_ref);
  int meas_slot = 0, meas_loops = 0, meas_played = 0;
  logic meas_exp = 1'b0;
  always @(posedge meas_clk_chip_in) begin
    if (!meas_reset_out) begin
      meas_slot = 0;
      meas_exp = 1'b0;
    end else if (meas_slot == 511) begin
      meas_slot = 0;
      meas_exp = 1'b0;
      meas_loops++;
    end else begin
      meas_exp = meas_ref[meas_slot];
      meas_slot++;
      meas_played++;
    end
  end
  always @(negedge meas_clk_chip_in)
    if (meas_reset_out) check(meas_ud_out == meas_exp, "stimulus generator replays its bitstream");

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0.4f s: %s", t_s, what); end
  endtask

  // input waveform, updated every f_ref cycle
  always @(posedge clk) begin
    t_s = t_s + 1.0 / 128.0e3;
    vinp = vbias + 2.0e-3 + 100.0e-6 * $sin(2.0 * PI * 10.0 * t_s)
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
    cfg = '{sel_clk_nyq: 3'd6, sel_clk_high: 3'd1, sel_clk_low: 3'd3, hyst_band: 5'd8,
            mid_high_thr: 8'd138, mid_low_thr: 8'd118, step_high: 8'd1, step_low: 8'd4,
            dc_period: 8'd19};
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // offset pull-in and settling: 2 s
    repeat (2000) @(posedge dout_valid);
    measuring = 1;
    for (int rep = 0; rep < 2; rep++) begin
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
    check(n_up >= 2 && n_down >= 2, "mode switches both ways");
    check(n_updates > 100, "baseline updates");
    check(n_x3 > 0 && n_x1 > 0, "both DAC step sizes used");
    check(n_track > 2000, "tracking checked");
    $display("stimulus generator: settings %0d %0d %0d, bits replayed %0d, loops %0d",
             meas_th_l, meas_th_h, meas_band, meas_played, meas_loops);
    check(meas_reset_out && meas_leds == 3'b111 && meas_th_l == 8'd112 && meas_th_h == 8'd144
          && meas_sel_low == 3'd1 && meas_sel_high == 3'd0 && meas_sel_nq == 3'd5,
          "stimulus generator out of reset with its settings");
    check(meas_loops > 0, "stimulus generator replay loop wraps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (128 * 8000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
