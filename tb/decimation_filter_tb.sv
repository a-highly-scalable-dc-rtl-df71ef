// Self-checking testbench for decimation_filter.
// Drives random modulator bits, mode changes, DC corrections and
// down-sampling strobes, and compares the counter and the down-sampled
// output with a saturating integer model kept in the testbench. Step sizes
// are those of the reference test: 1 (high resolution) and 7 (low).
// Also checks the mid-scale start, a long run of ones into saturation at
// 255 and the one-cycle latency of dout_valid after fs_tick.
module decimation_filter_tb;
  import nadc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_en = 0, mod_bit = 0, dc_update = 0, fs_tick = 0;
  res_t res_mode = RES_LOW;
  logic [7:0] step_high = 8'd1, step_low = 8'd7;
  logic signed [7:0] dc_value = '0;
  logic [7:0] counter_out, dout;
  res_t dout_res;
  logic dout_valid;
  int checks = 0, failures = 0;
  int ref_cnt = 128, ref_dout = 128;
  res_t ref_res = RES_LOW;
  int sat_hits = 0, dc_hits = 0, valid_seen = 0;
  logic exp_valid = 0;

  decimation_filter dut (.clk, .rst_n, .bit_en, .mod_bit, .res_mode, .step_high,
                         .step_low, .dc_update, .dc_value, .fs_tick, .counter_out,
                         .dout, .dout_res, .dout_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t: %s", $time, what); end
  endtask

  // Reference model, updated on every rising edge from the pre-edge inputs.
  always @(posedge clk) if (rst_n) begin
    int n;
    n = ref_cnt;
    if (fs_tick) begin ref_dout = ref_cnt; ref_res = res_mode; end
    exp_valid = fs_tick;
    if (bit_en) n = mod_bit ? n + ((res_mode == RES_HIGH) ? step_high : step_low)
                            : n - ((res_mode == RES_HIGH) ? step_high : step_low);
    if (dc_update) begin n = n - int'(dc_value); dc_hits++; end
    if (n > 255) begin n = 255; sat_hits++; end
    if (n < 0)   begin n = 0;   sat_hits++; end
    ref_cnt = n;
  end

  always @(negedge clk) if (rst_n) begin
    check(counter_out == 8'(ref_cnt), $sformatf("counter %0d exp %0d", counter_out, ref_cnt));
    check(dout_valid == exp_valid, "dout_valid one cycle after fs_tick");
    if (dout_valid) begin
      valid_seen++;
      check(dout == 8'(ref_dout), $sformatf("dout %0d exp %0d", dout, ref_dout));
      check(dout_res == ref_res, "dout_res");
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    check(counter_out == 8'd128, "reset to mid-scale");
    @(negedge clk) rst_n = 1'b1;
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      bit_en    = ($urandom_range(0, 3) == 0);
      mod_bit   = $urandom_range(0, 1);
      fs_tick   = ($urandom_range(0, 15) == 0);
      dc_update = ($urandom_range(0, 40) == 0);
      dc_value  = 8'($urandom_range(0, 255));
      if ($urandom_range(0, 200) == 0) res_mode = res_t'(~res_mode);
    end
    // long run of ones in low resolution: must saturate, not wrap
    @(negedge clk);
    res_mode = RES_LOW; dc_update = 0; fs_tick = 0;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk); bit_en = 1; mod_bit = 1;
    end
    @(negedge clk) bit_en = 0;
    @(negedge clk);
    check(counter_out == 8'd255, "saturates at full scale");
    check(sat_hits > 0 && dc_hits > 20 && valid_seen > 100, "coverage of saturation, DC and samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
