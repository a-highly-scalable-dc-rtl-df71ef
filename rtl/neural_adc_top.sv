// One adaptive-resolution neural recording channel.
//
// A DC-coupled delta/delta-sigma modulator digitises the electrode voltage
// directly (no separate amplifier), and a digital back-end decimates its
// bitstream and chooses its oversampling clock: high (fine resolution)
// while the signal shows high activity, low (coarse resolution, less
// power, fewer bits to transmit) while it is idle. Output samples always
// come at the Nyquist rate f_s; only their precision changes, and each one
// is tagged with the mode it was taken in.
//
// Contents: the front-end model (afe_model, analog and not synthesizable),
// the two digital control blocks of its feedback DAC (dac_step_selector,
// dac_phase_gen) and the synthesizable back-end (adaptive_backend). All
// digital logic runs on the reference clock clk = f_ref (128 kHz in the
// reference configuration). The back-end settings come in through cfg.
//
// The top also holds, side by side and unconnected to the channel, the
// bench stimulus generator (meas_stimulus_gen) that drove the back-end
// chip in measurement; its ports carry the meas_ prefix.
//
// Origin: the loop structure (comparator bit to both the decimator and the
// DAC's step selector, f_os from the back-end) follows the reference
// design; sampling the bit for the DAC on the falling edge of f_os, the
// same instant the decimator counts it, is this design's choice.
module neural_adc_top
  import nadc_pkg::*;
(
  input  logic                     clk,        // f_ref
  input  logic                     rst_n,
  input  real                      vinp,       // electrode inputs, volts
  input  real                      vinn,
  input  real                      vbias,
  input  backend_cfg_t             cfg,
  output logic [DATA_W-1:0]        dout,       // decimated sample
  output res_t                     dout_res,   // its resolution mode
  output logic                     dout_valid,
  output res_t                     res_mode,   // mode now in use
  output logic                     mod_bit,    // modulator bitstream
  output logic                     f_os,
  output logic                     f_s,
  output logic signed [DATA_W-1:0] dc_value,
  output logic                     dc_update,
  output real                      v_dac,
  // bench stimulus generator, independent of the channel
  input  logic                     meas_clk_in,
  input  logic                     meas_clk_chip_in,
  input  logic                     meas_reset_in,
  output logic                     meas_ud_out,
  output logic                     meas_clk_out,
  output logic                     meas_reset_out,
  output logic [7:0]               meas_th_l,
  output logic [7:0]               meas_th_h,
  output logic [4:0]               meas_band,
  output logic [2:0]               meas_sel_low,
  output logic [2:0]               meas_sel_high,
  output logic [2:0]               meas_sel_nq,
  output logic [2:0]               meas_leds   // {band, high, low} test LEDs
);

  logic os_rise, os_fall, os_half_one, phi1, phi2, step_up, step_x3;
  logic flag_high, flag_low;
  logic signed [2:0] step_mult;
  logic [DATA_W-1:0] counter_out, abs_dc;
  res_t clk_sel, step_res;
  real  v_int;

  afe_model u_afe (
    .vinp    (vinp),
    .vinn    (vinn),
    .vbias   (vbias),
    .f_os    (f_os),
    .phi1    (phi1),
    .phi2    (phi2),
    .step_up (step_up),
    .step_x3 (step_x3),
    .res_mode(step_res),
    .v_out   (mod_bit),
    .v_dac   (v_dac),
    .v_int   (v_int)
  );

  dac_step_selector u_step_sel (
    .clk      (clk),
    .rst_n    (rst_n),
    .bit_en   (os_fall),
    .mod_bit  (mod_bit),
    .res_mode (res_mode),
    .step_mult(step_mult),
    .step_up  (step_up),
    .step_x3  (step_x3),
    .step_res (step_res)
  );

  dac_phase_gen u_phase_gen (
    .clk        (clk),
    .rst_n      (rst_n),
    .f_os       (f_os),
    .os_rise    (os_rise),
    .os_fall    (os_fall),
    .os_half_one(os_half_one),
    .phi1       (phi1),
    .phi2       (phi2)
  );

  adaptive_backend u_backend (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg        (cfg),
    .mod_bit    (mod_bit),
    .f_os       (f_os),
    .f_s        (f_s),
    .os_rise    (os_rise),
    .os_fall    (os_fall),
    .os_half_one(os_half_one),
    .res_mode   (res_mode),
    .counter_out(counter_out),
    .dout       (dout),
    .dout_res   (dout_res),
    .dout_valid (dout_valid),
    .abs_dc     (abs_dc),
    .dc_value   (dc_value),
    .dc_update  (dc_update),
    .clk_sel    (clk_sel),
    .flag_high  (flag_high),
    .flag_low   (flag_low)
  );

  // Bench stimulus generator used to measure a back-end chip without its
  // front-end. It is not connected to the channel; its ports are brought
  // out so a bench or a testbench can wire it to a back-end.
  meas_stimulus_gen u_meas (
    .clk_in     (meas_clk_in),
    .clk_chip_in(meas_clk_chip_in),
    .reset_in   (meas_reset_in),
    .ud_out     (meas_ud_out),
    .clk_out    (meas_clk_out),
    .reset_out  (meas_reset_out),
    .th_l       (meas_th_l),
    .th_h       (meas_th_h),
    .band       (meas_band),
    .sel_low    (meas_sel_low),
    .sel_high   (meas_sel_high),
    .sel_nq     (meas_sel_nq),
    .led_test_l (meas_leds[0]),
    .led_test_h (meas_leds[1]),
    .led_test_b (meas_leds[2])
  );

endmodule
