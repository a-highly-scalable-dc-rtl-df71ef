// Bench measurement setup, simulated: the stimulus generator drives the
// digital back-end as it did the fabricated chip. The generator's clk_out
// is the back-end's reference clock, its reset_out the back-end's reset and
// its settings the back-end's thresholds, band and clock selects. The
// back-end's oversampling clock f_os returns to the generator, which
// replays one stored bit per f_os period into the back-end in place of
// the modulator.
// clk_in is 50 MHz, so clk_out is 50 MHz / 782 = 63.9 kHz. The generator's
// selects (low 1, high 0, Nyquist 5) then give 16 kHz and 32 kHz
// oversampling and a 1 kHz sample rate. The counting steps (1 and 4) and
// the baseline period (19) are not among the generator's outputs and are
// set here. The replayed pattern idles for 128 bits, rises for 128 bits
// (bit density 9/16), then falls for 256 bits (density 3/8) within each
// 512-bit loop.
// Checks: one sample per 64 clk_out cycles; each sample's resolution flag
// equals the mode that was in use while it was counted; the rising
// segment drives the output above the upper threshold (144 + 14) and the
// falling segment below the lower one (112 - 14); the back-end switches to
// high resolution and back; the baseline tracker updates.
module bench_replay_tb;
  import nadc_pkg::*;

  logic clk_in = 1'b0, reset_in = 1'b0;
  logic ud_out, clk_out, reset_out;
  logic [7:0] th_l, th_h;
  logic [4:0] band;
  logic [2:0] sel_low, sel_high, sel_nq, leds;
  backend_cfg_t cfg;

  logic f_os, f_s, os_rise, os_fall, os_half_one, dout_valid, dc_update, flag_high, flag_low;
  res_t res_mode, dout_res, clk_sel;
  logic [7:0] counter_out, dout, abs_dc;
  logic signed [7:0] dc_value;
  int checks = 0, failures = 0;

  meas_stimulus_gen u_gen (
    .clk_in, .clk_chip_in(f_os), .reset_in, .ud_out, .clk_out, .reset_out,
    .th_l, .th_h, .band, .sel_low, .sel_high, .sel_nq,
    .led_test_l(leds[0]), .led_test_h(leds[1]), .led_test_b(leds[2]));

  always_comb begin
    cfg.sel_clk_nyq  = sel_nq;
    cfg.sel_clk_high = sel_high;
    cfg.sel_clk_low  = sel_low;
    cfg.hyst_band    = band;
    cfg.mid_high_thr = th_h;
    cfg.mid_low_thr  = th_l;
    cfg.step_high    = 8'd1;
    cfg.step_low     = 8'd4;
    cfg.dc_period    = 8'd19;
  end

  adaptive_backend u_be (
    .clk(clk_out), .rst_n(reset_out), .cfg, .mod_bit(ud_out), .f_os, .f_s, .os_rise, .os_fall,
    .os_half_one, .res_mode, .counter_out, .dout, .dout_res, .dout_valid, .abs_dc, .dc_value,
    .dc_update, .clk_sel, .flag_high, .flag_low);

  always #10 clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int cyc = 0, last_valid = -1, n_samples = 0, n_up = 0, n_down = 0, n_updates = 0;
  int max_out = 0, min_out = 255;
  res_t prev_mode = RES_HIGH, period_mode = RES_HIGH;

  always @(posedge clk_out) cyc++;

  always @(negedge clk_out) if (reset_out) begin
    if (dc_update) n_updates++;
    if (res_mode != prev_mode) begin
      if (res_mode == RES_HIGH) n_up++; else n_down++;
      prev_mode = res_mode;
    end
    if (dout_valid) begin
      if (last_valid >= 0) check(cyc - last_valid == 64, "one sample per 64 clk_out cycles");
      if (n_samples > 0) check(dout_res == period_mode, "sample flagged with its counting mode");
      last_valid = cyc;
      n_samples++;
      if (n_samples > 2) begin
        if (int'(dout) > max_out) max_out = int'(dout);
        if (int'(dout) < min_out) min_out = int'(dout);
      end
    end
    // mode in use for the Nyquist period now running (it changes only at
    // the f_s edge that also produces the sample)
    if (dout_valid) period_mode = res_mode;
  end

  initial begin
    repeat (5) @(posedge clk_in);
    reset_in = 1'b1;
    wait (reset_out);
    check(leds == 3'b111, "generator settings loaded");
    // 70 output samples (70 ms, several replay loops)
    repeat (70) @(posedge f_s);
    $display("samples %0d, switches up %0d down %0d, baseline updates %0d, output range %0d..%0d",
             n_samples, n_up, n_down, n_updates, min_out, max_out);
    check(max_out > 158, "rising segment crosses the upper threshold");
    check(min_out < 98, "falling segment crosses the lower threshold");
    check(n_up >= 1 && n_down >= 1, "mode switches both ways");
    check(n_updates >= 2, "baseline updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
