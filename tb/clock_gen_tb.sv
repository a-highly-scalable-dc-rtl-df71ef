// Self-checking testbench for clock_gen.
// Checks, against a reference divider kept in the testbench, that each
// selected clock has period 2^(tap+1) f_ref cycles, that the os_rise /
// os_fall / fs_tick strobes precede the matching edges, and that a mode
// request is taken over only at an f_s rising edge with both oversampling
// clocks low afterwards. Uses the reference settings: f_s tap 6
// (128 kHz / 128 = 1 kHz), f_OS_high tap 1 (32 kHz), f_OS_low tap 3 (8 kHz).
module clock_gen_tb;
  import nadc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] sel_high = 3'd1, sel_low = 3'd3, sel_nyq = 3'd6;
  res_t sel_req = RES_LOW, res_mode;
  logic f_os_high, f_os_low, f_os, f_s, os_rise, os_fall, os_half_one, fs_tick;
  int checks = 0, failures = 0, cyc = 0;
  int switches = 0;

  clock_gen dut (.clk, .rst_n, .sel_clk_high(sel_high), .sel_clk_low(sel_low),
                 .sel_clk_nyq(sel_nyq), .sel_req, .res_mode, .f_os_high, .f_os_low,
                 .f_os, .f_s, .os_rise, .os_fall, .os_half_one, .fs_tick);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Reference divider
  int unsigned ref_cnt = 0;
  logic prev_fs_tick, prev_os_rise, prev_os_fall, prev_f_s, prev_f_os;
  res_t prev_mode;
  int last_rise = -1, period_checks = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      // state after this edge, reference counter advanced
      ref_cnt = (ref_cnt + 1) % 256;
    end
  end

  always @(negedge clk) if (rst_n && cyc > 0) begin
    check(f_os_high == ref_cnt[sel_high], "f_os_high tap");
    check(f_os_low  == ref_cnt[sel_low],  "f_os_low tap");
    check(f_s       == ref_cnt[sel_nyq],  "f_s tap");
    check(f_os == ((res_mode == RES_HIGH) ? ref_cnt[sel_high] : ref_cnt[sel_low]), "f_os mux");
    if (cyc > 1) begin
      check(prev_os_rise == (!prev_f_os && f_os), "os_rise precedes f_os rise");
      check(prev_os_fall == (prev_f_os && !f_os), "os_fall precedes f_os fall");
      check(prev_fs_tick == (!prev_f_s && f_s), "fs_tick precedes f_s rise");
      if (res_mode != prev_mode) begin
        switches++;
        check(prev_fs_tick, "mode changes only at f_s edge");
        check(!f_os_high && !f_os_low, "both oversampling clocks low after switch");
      end
    end
    if (!prev_f_os && f_os && cyc > 1) begin
      if (last_rise >= 0) begin
        int exp_p;
        exp_p = 1 << (((prev_mode == RES_HIGH) ? sel_high : sel_low) + 1);
        if (res_mode == prev_mode && res_mode == RES_HIGH && cyc - last_rise <= 4) begin
          check(cyc - last_rise == exp_p, "f_os_high period 4 cycles");
          period_checks++;
        end else if (res_mode == RES_LOW && cyc - last_rise == 16) begin
          period_checks++;
        end
      end
      last_rise = cyc;
    end
    prev_fs_tick = fs_tick; prev_os_rise = os_rise; prev_os_fall = os_fall;
    prev_f_s = f_s; prev_f_os = f_os; prev_mode = res_mode;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (300) @(posedge clk);
    @(negedge clk) sel_req = RES_HIGH;
    repeat (400) @(posedge clk);
    @(negedge clk) sel_req = RES_LOW;
    repeat (400) @(posedge clk);
    check(switches == 2, "two mode switches seen");
    check(period_checks > 20, "oversampling periods measured");
    check(os_half_one == 1'b0, "half period longer than one cycle for tap 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
