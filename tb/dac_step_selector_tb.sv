// Self-checking testbench for dac_step_selector.
// Reproduces the worked bit sequence 1 1 1 0 1 1 0 0 1 0 1 1 1 0 0, for
// which the summed feedback (bit, with 0 as -1, plus the running integral
// of the bits) must read 2 3 4 1 4 5 2 1 4 1 4 5 6 3 2, computed here
// directly from its definition, then random bits. Checks that the outputs
// only change on bit_en and that the mode is registered with each step.
module dac_step_selector_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_en = 0, mod_bit = 0;
  logic signed [2:0] step_mult;
  logic step_up, step_x3;
  nadc_pkg::res_t res_mode = nadc_pkg::RES_LOW, step_res;
  int checks = 0, failures = 0;
  int acc, integ, prev_bit, sum_prev;
  int seq[15] = '{1,1,1,0,1,1,0,0,1,0,1,1,1,0,0};
  int wbar[15] = '{2,3,4,1,4,5,2,1,4,1,4,5,6,3,2};

  dac_step_selector dut (.clk, .rst_n, .bit_en, .mod_bit, .res_mode, .step_mult,
                         .step_up, .step_x3, .step_res);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t: %s", $time, what); end
  endtask

  task automatic push(input int b);
    int held;
    nadc_pkg::res_t m;
    m = nadc_pkg::res_t'($urandom_range(0, 1));
    @(negedge clk); bit_en = 1; mod_bit = b[0]; res_mode = m;
    @(negedge clk); bit_en = 0; res_mode = nadc_pkg::res_t'(~m);
    check(step_res == m, "mode registered with the step");
    held = int'(step_mult);
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      mod_bit = $urandom_range(0, 1);
      check(int'(step_mult) == held, "holds between bits");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // the first bit of the worked example follows a 1
    push(1);
    integ = 0; sum_prev = 2 - 1;  // w-bar before the sequence: bit 1 + integral 0
    for (int i = 0; i < 15; i++) begin
      push(seq[i]);
      integ += seq[i] ? 1 : -1;
      acc = (seq[i] ? 1 : -1) + integ;
      check(acc == wbar[i], "reference w-bar value");
      check(int'(step_mult) == wbar[i] - ((i == 0) ? 1 : wbar[i-1]),
            $sformatf("step %0d at bit %0d", step_mult, i));
    end
    // random bits against the definition
    prev_bit = seq[14];
    integ = 0;
    sum_prev = (prev_bit ? 1 : -1);
    for (int i = 0; i < 2000; i++) begin
      int b, s;
      b = $urandom_range(0, 1);
      push(b);
      integ += b ? 1 : -1;
      s = (b ? 1 : -1) + integ;
      check(int'(step_mult) == s - sum_prev, "step equals change of summed feedback");
      check(step_up == (step_mult > 0), "step_up");
      check(step_x3 == (step_mult == 3 || step_mult == -3), "step_x3");
      sum_prev = s;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
