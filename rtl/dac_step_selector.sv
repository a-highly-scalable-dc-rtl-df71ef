// Step size selector of the variable-step integrating-summing DAC.
//
// The modulator's feedback is the sum of its output bit (proportional
// path) and the running integral of its output bits (integral path). With
// a bit of 0 counting as -1, the sum changes from one period to the next by
//     v[n-1] v[n] :  00  01  10  11
//     change      :  -1  +3  -3  +1   unit steps,
// so a single DAC that adds +-1 or +-3 unit steps per period replaces the
// two feedback paths. This block keeps v[n-1], and for each new bit
// (bit_en) registers the signed multiplier (step_mult), its sign (step_up)
// and magnitude (step_x3), together with the resolution mode the bit was
// counted in (step_res), which selects the unit step voltage. Registering
// the mode with the step keeps the DAC and the decimation counter on the
// same scale for a bit that straddles a mode switch (this design's
// choice). The analog part turns these into a voltage step of 1x or 3x
// the unit step size.
//
// Timing: the outputs change on the edge that ends a bit_en cycle and hold
// until the next bit. v[n-1] resets to 0 (this design's choice).
module dac_step_selector
  import nadc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_en,
  input  logic              mod_bit,
  input  res_t              res_mode,
  output logic signed [2:0] step_mult,
  output logic              step_up,
  output logic              step_x3,
  output res_t              step_res
);

  logic v_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_prev    <= 1'b0;
      step_mult <= '0;
      step_res  <= RES_LOW;
    end else if (bit_en) begin
      step_res  <= res_mode;
      v_prev    <= mod_bit;
      step_mult <= dac_step(v_prev, mod_bit);
    end
  end

  always_comb begin
    step_up = !step_mult[2];
    step_x3 = (step_mult == 3'sd3) || (step_mult == -3'sd3);
  end

endmodule
