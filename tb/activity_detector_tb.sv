// Self-checking testbench for activity_detector.
// Uses the reference test's thresholds (mid-high 138, mid-low 118, band 8,
// so the outer thresholds are 146 and 110) and then random thresholds. The
// expected CLOCK SELECTOR comes from a region model: above HIGH or below
// LOW means high activity, between MID-LOW and MID-HIGH means idle, and
// inside a hysteresis band the previous decision is kept.
module activity_detector_tb;
  import nadc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_valid = 0;
  logic [7:0] sample = 8'd128, mid_high = 8'd138, mid_low = 8'd118;
  logic [4:0] band = 5'd8;
  logic flag_high, flag_low;
  res_t clk_sel;
  int checks = 0, failures = 0;
  bit ref_above = 0, ref_below = 0;
  int to_high = 0, to_low = 0, held_in_band = 0;

  activity_detector dut (.clk, .rst_n, .sample_valid, .sample, .mid_high_thr(mid_high),
                         .mid_low_thr(mid_low), .hyst_band(band), .flag_high, .flag_low,
                         .clk_sel);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t: %s", $time, what); end
  endtask

  function automatic bit ref_sel();
    return ref_above || ref_below;
  endfunction

  task automatic send(input int v);
    int hi, lo;
    bit old_sel;
    hi = int'(mid_high) + int'(band);
    lo = int'(mid_low) - int'(band);
    old_sel = ref_sel();
    if (v > hi) ref_above = 1;
    else if (v <= int'(mid_high)) ref_above = 0;
    if (v < lo) ref_below = 1;
    else if (v >= int'(mid_low)) ref_below = 0;
    if ((v > int'(mid_high) && v <= hi) || (v < int'(mid_low) && v >= lo)) held_in_band++;
    @(negedge clk); sample_valid = 1; sample = 8'(v);
    @(negedge clk); sample_valid = 0;
    check(clk_sel == res_t'(ref_sel()), $sformatf("sample %0d: clk_sel %0d exp %0d", v, clk_sel, ref_sel()));
    if (ref_sel() && !old_sel) to_high++;
    if (!ref_sel() && old_sel) to_low++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(clk_sel == RES_LOW, "idle after reset");
    send(133); check(clk_sel == RES_LOW, "133 is idle");
    send(97);  check(clk_sel == RES_HIGH, "97 is high activity");
    send(112); check(clk_sel == RES_HIGH, "112 inside lower band keeps high");
    send(118); check(clk_sel == RES_LOW, "118 back to idle");
    send(146); check(clk_sel == RES_LOW, "146 is not above HIGH");
    send(147); check(clk_sel == RES_HIGH, "147 above HIGH");
    send(139); check(clk_sel == RES_HIGH, "139 inside upper band keeps high");
    send(138); check(clk_sel == RES_LOW, "138 back to idle");
    send(140); check(clk_sel == RES_LOW, "140 inside upper band keeps idle");
    // random thresholds and samples
    for (int r = 0; r < 20; r++) begin
      mid_high = 8'($urandom_range(130, 220));
      mid_low  = 8'($urandom_range(40, 126));
      band     = 5'($urandom_range(0, 31));
      // re-align the reference with the new thresholds through two clear samples
      send(255); send(128);
      for (int i = 0; i < 200; i++) send($urandom_range(0, 255));
    end
    check(to_high > 50 && to_low > 50 && held_in_band > 50, "coverage of switches and bands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
