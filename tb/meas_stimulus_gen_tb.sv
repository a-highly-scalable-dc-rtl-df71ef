// Self-checking testbench for meas_stimulus_gen at its default sizes.
// clk_in runs with a 20 ns period, and clk_chip_in with a 30 ns period
// whose edges never coincide with clk_in's. Checks:
//  - reset_out stays low for 511 clk_in rising edges after reset_in is
//    released and then rises;
//  - every half period of clk_out is 391 clk_in cycles;
//  - the settings (112, 144, 14, selects 1/0/5) are loaded while
//    reset_out is low, and the three test LEDs are lit;
//  - ud_out is 0 during reset; afterwards, on each clk_chip_in edge it
//    gives the next bit of the memory file (read here separately) for slots
//    0..510 of a 512-slot loop and 0 in slot 511; three loops are checked
//    and the wraps counted;
//  - a second reset_in pulse restarts the replay at address 0.
module meas_stimulus_gen_tb;

  logic clk_in = 1'b0, clk_chip_in = 1'b0, reset_in = 1'b0;
  logic ud_out, clk_out, reset_out, led_test_l, led_test_h, led_test_b;
  logic [7:0] th_l, th_h;
  logic [4:0] band;
  logic [2:0] sel_low, sel_high, sel_nq;
  int checks = 0, failures = 0;
  logic ref_bits [1024];

  meas_stimulus_gen dut (.clk_in, .clk_chip_in, .reset_in, .ud_out, .clk_out, .reset_out,
                         .th_l, .th_h, .band, .sel_low, .sel_high, .sel_nq,
                         .led_test_l, .led_test_h, .led_test_b);

  always #10 clk_in = ~clk_in;
  initial begin
    #3;
    forever #15 clk_chip_in = ~clk_chip_in;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // clk_out half periods, counted in clk_in cycles
  int n_in = 0, last_toggle = -1, n_half = 0;
  logic clk_out_d = 1'b0;
  always @(posedge clk_in) begin
    n_in++;
    #1;
    if (!reset_in) last_toggle = -1;
    else if (clk_out != clk_out_d) begin
      if (last_toggle >= 0) begin
        check(n_in - last_toggle == 391, $sformatf("clk_out half period %0d", n_in - last_toggle));
        n_half++;
      end
      last_toggle = n_in;
    end
    clk_out_d = clk_out;
  end

  // replay model
  int idx = 0, n_play = 0, n_wrap = 0;
  logic exp_bit = 1'b0;
  always @(posedge clk_chip_in) begin
    if (!reset_out) begin
      idx = 0;
      exp_bit = 1'b0;
    end else if (idx == 511) begin
      idx = 0;
      exp_bit = 1'b0;
      n_wrap++;
    end else begin
      exp_bit = ref_bits[idx];
      idx++;
    end
  end
  always @(negedge clk_chip_in) begin
    check(ud_out == exp_bit, $sformatf("ud_out %0b expected %0b (slot %0d)", ud_out, exp_bit, idx));
    if (reset_out) n_play++;
  end

  initial begin
    int edges;
    $readmemb("rtl/meas_bitstream.mem", ref_bits);
    repeat (3) @(posedge clk_in);
    #2 reset_in = 1'b1;
    // reset delay
    edges = 0;
    while (!reset_out) begin
      @(posedge clk_in);
      #1 edges++;
    end
    check(edges == 511, $sformatf("reset_out after %0d clk_in edges", edges));
    check(th_l == 8'd112 && th_h == 8'd144 && band == 5'd14, "threshold and band settings");
    check(sel_low == 3'd1 && sel_high == 3'd0 && sel_nq == 3'd5, "clock select settings");
    check(led_test_l && led_test_h && led_test_b, "test LEDs lit");
    // three replay loops
    wait (n_wrap == 3);
    check(n_half >= 2, "clk_out toggled");
    // restart
    @(negedge clk_in) reset_in = 1'b0;
    @(negedge clk_in);
    check(!reset_out, "reset_in pulls reset_out low");
    reset_in = 1'b1;
    wait (reset_out);
    n_wrap = 0;
    wait (n_wrap == 1);
    $display("clk_out half periods %0d, bits replayed %0d", n_half, n_play);
    check(n_play > 4 * 500, "bits replayed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
