// Self-checking testbench for dac_phase_gen.
// A divider in the testbench produces f_os for taps 0..3 with the matching
// edge strobes. Checks that phi1 and phi2 never overlap, that phi2 lies in
// the high half and phi1 in the low half of f_os, that each half period
// opens with a one-cycle gap (no gap when a half is a single cycle), and
// that each phase is active for half-period - 1 cycles.
module dac_phase_gen_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic f_os, os_rise, os_fall, os_half_one, phi1, phi2;
  logic [7:0] cnt = '0;
  int tap = 1;
  int checks = 0, failures = 0;
  int run_hi = 0, run_lo = 0, halves = 0;
  logic prev_f_os = 0;

  dac_phase_gen dut (.clk, .rst_n, .f_os, .os_rise, .os_fall, .os_half_one, .phi1, .phi2);

  always #5 clk = ~clk;

  always_comb begin
    logic [7:0] m;
    m = 8'((1 << tap) - 1);
    f_os        = cnt[tap];
    os_rise     = ((cnt & m) == m) && !cnt[tap];
    os_fall     = ((cnt & m) == m) &&  cnt[tap];
    os_half_one = (tap == 0);
  end

  always @(posedge clk) if (rst_n) cnt <= cnt + 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t: %s", $time, what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    int half;
    half = 1 << tap;
    check(!(phi1 && phi2), "phases overlap");
    check(!phi2 || f_os, "phi2 only in high half");
    check(!phi1 || !f_os, "phi1 only in low half");
    if (f_os != prev_f_os) begin
      // first cycle of a new half
      if (tap == 0) check(f_os ? phi2 : phi1, "no gap when the half is one cycle");
      else          check(!phi1 && !phi2, "gap at start of half");
      if (prev_f_os) begin
        if (halves > 1) check(run_hi == ((tap == 0) ? 1 : half - 1), $sformatf("phi2 length %0d", run_hi));
      end else begin
        if (halves > 1) check(run_lo == ((tap == 0) ? 1 : half - 1), $sformatf("phi1 length %0d", run_lo));
      end
      run_hi = 0; run_lo = 0; halves++;
    end
    if (phi2) run_hi++;
    if (phi1) run_lo++;
    prev_f_os = f_os;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      rst_n = 1'b0; cnt = '0; halves = 0; run_hi = 0; run_lo = 0; prev_f_os = 0;
      tap = t;
      repeat (2) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      repeat (200) @(posedge clk);
    end
    check(checks > 1000, "enough cycles checked");
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
