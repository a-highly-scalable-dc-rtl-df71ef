// Self-checking testbench for adaptive_backend with the reference test
// settings: f_ref = 128 kHz, f_s tap 6 (1 kHz), f_OS_high tap 1 (32 kHz),
// f_OS_low tap 3 (8 kHz), band 8, mid-high 138, mid-low 118, steps 1 and
// 7, baseline period 19.
// The testbench stands in for the modulator: it produces one bit per
// oversampling period so that a bit counter follows a target level, and
// moves the target through idle, positive burst, idle, negative burst.
// Checks against values computed here:
//  - sample rate: one output per 128 f_ref cycles;
//  - oversampling period: 4 cycles in high, 16 in low resolution;
//  - the counter: running sum of +-step per bit minus each DC correction;
//  - the mode of sample n+2 is the decision of the hysteresis model on
//    sample n;
//  - every 19th sample updates the baseline by the 7/8 average.
// Each mechanism (switch up, switch down, baseline update, band hold) is
// counted and must occur.
module adaptive_backend_tb;
  import nadc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  backend_cfg_t cfg;
  logic mod_bit = 1'b0;
  logic f_os, f_s, os_rise, os_fall, os_half_one;
  res_t res_mode, dout_res, clk_sel;
  logic [7:0] counter_out, dout, abs_dc;
  logic signed [7:0] dc_value;
  logic dout_valid, dc_update, flag_high, flag_low;
  int checks = 0, failures = 0, cyc = 0;
  int target = 128;

  adaptive_backend dut (.clk, .rst_n, .cfg, .mod_bit, .f_os, .f_s, .os_rise, .os_fall,
                        .os_half_one, .res_mode, .counter_out, .dout, .dout_res,
                        .dout_valid, .abs_dc, .dc_value, .dc_update, .clk_sel,
                        .flag_high, .flag_low);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // reference state
  int ref_cnt = 128, ref_abs = 128, samp_idx = 0, last_valid = -1, last_rise = -1;
  int dc_samples = 0, n_updates = 0, n_up = 0, n_down = 0, n_hold = 0;
  bit ref_above = 0, ref_below = 0;
  bit dec_q[$];            // decisions waiting to take effect
  res_t prev_res = RES_LOW;

  always @(posedge clk) if (rst_n) begin
    int n;
    cyc++;
    n = ref_cnt;
    if (os_fall) n += mod_bit ? ((res_mode == RES_HIGH) ? 1 : 7) : -((res_mode == RES_HIGH) ? 1 : 7);
    if (dc_update) n -= int'(dc_value);
    if (n > 255) n = 255;
    if (n < 0) n = 0;
    ref_cnt = n;
  end

  // modulator stand-in: new bit right after each comparator edge
  always @(negedge clk) if (rst_n && os_rise) mod_bit <= (ref_cnt < target);

  always @(negedge clk) if (rst_n) begin
    check(counter_out == 8'(ref_cnt), $sformatf("counter %0d exp %0d", counter_out, ref_cnt));
    if (os_rise) begin
      if (last_rise >= 0 && res_mode == prev_res)
        check(cyc - last_rise == ((res_mode == RES_HIGH) ? 4 : 16), $sformatf("f_os period %0d", cyc - last_rise));
      last_rise = cyc;
      prev_res = res_mode;
    end
    if (dc_update) begin
      n_updates++;
      check(dc_samples == 19, $sformatf("baseline update after %0d samples", dc_samples));
      check(abs_dc == 8'(ref_abs) && int'(dc_value) == ref_abs - 128, "baseline value");
      dc_samples = 0;
    end
    if (dout_valid) begin
      int hi, lo;
      bit old_sel, sel;
      if (last_valid >= 0) check(cyc - last_valid == 128, "one sample per 128 f_ref cycles");
      last_valid = cyc;
      // mode of this sample was decided two samples ago
      if (dec_q.size() == 2) check(dout_res == res_t'(dec_q.pop_front()), "mode follows decision two samples back");
      hi = 138 + 8; lo = 118 - 8;
      old_sel = ref_above || ref_below;
      if (int'(dout) > hi) ref_above = 1; else if (int'(dout) <= 138) ref_above = 0;
      if (int'(dout) < lo) ref_below = 1; else if (int'(dout) >= 118) ref_below = 0;
      sel = ref_above || ref_below;
      if (sel && !old_sel) n_up++;
      if (!sel && old_sel) n_down++;
      if (sel && ((int'(dout) > 138 && int'(dout) <= hi) || (int'(dout) < 118 && int'(dout) >= lo))) n_hold++;
      dec_q.push_back(sel);
      // baseline reference
      dc_samples++;
      if (dc_samples == 19) ref_abs = (7 * ref_abs + int'(dout)) / 8;
      samp_idx++;
    end
  end

  initial begin
    cfg = '{sel_clk_nyq: 3'd6, sel_clk_high: 3'd1, sel_clk_low: 3'd3, hyst_band: 5'd8,
            mid_high_thr: 8'd138, mid_low_thr: 8'd118, step_high: 8'd1, step_low: 8'd7,
            dc_period: 8'd19};
    dec_q.push_back(1'b0); dec_q.push_back(1'b0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      target = 128; repeat (30) @(posedge dout_valid);
      target = 200; repeat (20) @(posedge dout_valid);
      target = 143; repeat (10) @(posedge dout_valid);
      target = 128; repeat (30) @(posedge dout_valid);
      target = 60;  repeat (20) @(posedge dout_valid);
      target = 113; repeat (10) @(posedge dout_valid);
    end
    $display("switches up %0d, down %0d, band holds %0d, baseline updates %0d",
             n_up, n_down, n_hold, n_updates);
    check(n_up >= 3 && n_down >= 3, "mode switches both ways");
    check(n_hold > 0, "hysteresis band held a decision");
    check(n_updates >= 10, "baseline updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (128 * 500) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
