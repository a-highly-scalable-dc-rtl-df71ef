// Digital back-end of the adaptive-resolution recording channel.
//
// It closes the adaptive loop around the modulator:
//   - clock_gen divides the reference clock and hands the modulator either
//     f_OS_high or f_OS_low;
//   - decimation_filter counts the modulator bits (step size by mode) and
//     down-samples to f_s;
//   - baseline_calc tracks the DC level of the decimated signal and feeds a
//     correction back into the decimation counter;
//   - activity_detector compares the baseline-corrected output with the
//     hysteresis thresholds and requests high or low resolution.
// Everything runs on one clock, the reference clock f_ref, using the clock
// generator's strobes as enables. The modulator bit is taken at the end of
// the high half of each f_os period (os_fall), i.e. half a period after the
// comparator decided it on the rising edge of f_os. The requested mode is
// applied at the next f_s rising edge. Each output sample carries the mode
// (dout_res) of the Nyquist period it covers, the flag a receiver needs to
// tell fine from coarse samples.
//
// Origin: the partition into these four units and their connections follow
// the reference design's back-end; the single-clock strobe scheme, the
// os_fall sampling instant and the packed configuration struct are this
// design's own choices.
module adaptive_backend
  import nadc_pkg::*;
(
  input  logic           clk,          // f_ref
  input  logic           rst_n,
  input  backend_cfg_t   cfg,
  input  logic           mod_bit,      // comparator output
  output logic           f_os,         // oversampling clock to the modulator
  output logic           f_s,
  output logic           os_rise,
  output logic           os_fall,
  output logic           os_half_one,
  output res_t           res_mode,
  output logic [DATA_W-1:0] counter_out,
  output logic [DATA_W-1:0] dout,
  output res_t           dout_res,
  output logic           dout_valid,
  output logic [DATA_W-1:0] abs_dc,
  output logic signed [DATA_W-1:0] dc_value,
  output logic           dc_update,
  output res_t           clk_sel,
  output logic           flag_high,
  output logic           flag_low
);

  logic f_os_high, f_os_low, fs_tick;

  clock_gen u_clock_gen (
    .clk         (clk),
    .rst_n       (rst_n),
    .sel_clk_high(cfg.sel_clk_high),
    .sel_clk_low (cfg.sel_clk_low),
    .sel_clk_nyq (cfg.sel_clk_nyq),
    .sel_req     (clk_sel),
    .res_mode    (res_mode),
    .f_os_high   (f_os_high),
    .f_os_low    (f_os_low),
    .f_os        (f_os),
    .f_s         (f_s),
    .os_rise     (os_rise),
    .os_fall     (os_fall),
    .os_half_one (os_half_one),
    .fs_tick     (fs_tick)
  );

  decimation_filter u_decimator (
    .clk        (clk),
    .rst_n      (rst_n),
    .bit_en     (os_fall),
    .mod_bit    (mod_bit),
    .res_mode   (res_mode),
    .step_high  (cfg.step_high),
    .step_low   (cfg.step_low),
    .dc_update  (dc_update),
    .dc_value   (dc_value),
    .fs_tick    (fs_tick),
    .counter_out(counter_out),
    .dout       (dout),
    .dout_res   (dout_res),
    .dout_valid (dout_valid)
  );

  baseline_calc u_baseline (
    .clk         (clk),
    .rst_n       (rst_n),
    .sample_valid(dout_valid),
    .sample      (dout),
    .dc_period   (cfg.dc_period),
    .abs_dc      (abs_dc),
    .dc_value    (dc_value),
    .dc_update   (dc_update)
  );

  activity_detector u_activity (
    .clk         (clk),
    .rst_n       (rst_n),
    .sample_valid(dout_valid),
    .sample      (dout),
    .mid_high_thr(cfg.mid_high_thr),
    .mid_low_thr (cfg.mid_low_thr),
    .hyst_band   (cfg.hyst_band),
    .flag_high   (flag_high),
    .flag_low    (flag_low),
    .clk_sel     (clk_sel)
  );

endmodule
