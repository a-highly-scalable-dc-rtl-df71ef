// Self-checking testbench for baseline_calc.
// Feeds decimated samples and checks that every PERIOD-th sample (19, as in
// the reference test) updates abs_dc = (7*abs_dc + sample)/8 and
// dc_value = abs_dc - 128, with a one-cycle dc_update pulse; also checks
// the reference test's case of a DC value of -4 (absolute 124), a change
// of period to 1, and that period 0 never updates.
module baseline_calc_tb;
  import nadc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_valid = 0;
  logic [7:0] sample = '0, dc_period = 8'd19, abs_dc;
  logic signed [7:0] dc_value;
  logic dc_update;
  int checks = 0, failures = 0;
  int ref_abs = 128, ref_cnt = 0, updates = 0;
  bit exp_update = 0;

  baseline_calc dut (.clk, .rst_n, .sample_valid, .sample, .dc_period, .abs_dc,
                     .dc_value, .dc_update);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    exp_update = 0;
    if (sample_valid) begin
      if (dc_period != 0 && ref_cnt + 1 == int'(dc_period)) begin
        ref_cnt = 0;
        ref_abs = (7 * ref_abs + int'(sample)) / 8;
        exp_update = 1;
      end else begin
        ref_cnt = (ref_cnt + 1) % 256;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    check(dc_update == exp_update, "dc_update pulse");
    check(abs_dc == 8'(ref_abs), $sformatf("abs_dc %0d exp %0d", abs_dc, ref_abs));
    check(int'(dc_value) == ref_abs - 128, "dc_value = abs_dc - 128");
    if (dc_update) updates++;
  end

  task automatic send(input int v, input int gap);
    @(negedge clk); sample_valid = 1; sample = 8'(v);
    @(negedge clk); sample_valid = 0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // steady low input drives the DC value negative
    for (int i = 0; i < 19; i++) send(100, 1);
    // first update from mid-scale: (7*128 + 100)/8 = 124, i.e. DC value -4
    check(abs_dc == 8'd124 && dc_value == -8'sd4, "DC value -4 after first update");
    for (int i = 0; i < 19 * 5; i++) send(100, 1);
    check(updates == 6, "one update per 19 samples");
    // random samples
    for (int i = 0; i < 19 * 40; i++) send($urandom_range(0, 255), $urandom_range(0, 2));
    @(negedge clk);
    dc_period = 8'd1;
    for (int i = 0; i < 10; i++) send(200, 0);
    begin
      int n_before;
      dc_period = 8'd0;
      repeat (3) @(negedge clk);
      n_before = updates;
      for (int i = 0; i < 300; i++) send(50, 0);
      check(updates == n_before, "period 0 disables updates");
    end
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
