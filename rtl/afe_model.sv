// Behavioural model (not synthesizable) of the mixed-signal front-end: a
// continuous-time delta/delta-sigma modulator built from a differential-
// difference Gm-C integrator, a clocked comparator and the analog half of
// a variable-step integrating-summing DAC.
//
// Signal flow: the integrator accumulates the difference between the
// electrode input (vinp - vinn) and the DAC feedback (v_dac - vbias); the
// comparator takes the integrator's sign on every rising edge of f_os and
// gives the output bit. The DAC output follows the input: in each period
// its sampling capacitor C_S is first charged to the DAC output voltage
// through the buffer (phi2, S2 closed), then connected to the integrating
// capacitor C_INT (phi1, S1 closed) while a step voltage of 1x or 3x the
// unit step (sign step_up, size step_x3, from the digital step selector)
// is applied to its other plate. Charge sharing moves the DAC output by
// C_S/(C_S+C_INT) of the step (about 20 uV for a 20 mV step with 10 fF and
// 10 pF). When phi1 ends the step voltage returns to zero and the floating
// plate follows, which is why the next phi2 must restore it. The unit step
// voltage depends on the resolution mode (20 mV high, 80 mV low).
//
// The DAC output integrates the input's DC level, so the loop removes
// input offsets and drifts: the modulator's signal transfer is (1 - z^-1)
// while its quantisation noise is shaped by (1 - z^-1)^2.
//
// Modelling choices: the Gm-C integrator is a single pole (DC gain A0 =
// 83 dB, 3-dB frequency F_POLE = 20 Hz, the reference design's figures)
// integrated exactly over each real-time period between comparator
// decisions, and clips at +-V_SAT; the pole bounds its wind-up while the
// DAC slews after a large offset step. The comparator has no offset or
// hysteresis, the buffer is ideal, and DAC charge transfer is
// instantaneous at the rising edge of phi1. Voltages are in volts and
// time in ns (the module sets its own time unit).
//
// Origin: the loop, the C_S/C_INT charge sharing with the copy phase and
// the 10 fF / 20 mV values follow the reference design; C_INT = 10 pF is
// worked out from the 20 uV target step, and the 80 mV low-resolution step
// matches the 4x coarse counter step used in this design's examples.
// The large step is 3x the unit step by default (the 20 mV / 60 mV of the
// discrete-time step table); X3_RATIO raises it for a continuous-time
// loop, where the reference design found about 4x gave the same noise
// shaping.
module afe_model
  import nadc_pkg::*;
#(
  parameter real C_S        = 10.0e-15,
  parameter real C_INT      = 10.0e-12,
  parameter real VSTEP_HIGH = 20.0e-3,
  parameter real VSTEP_LOW  = 80.0e-3,
  parameter real A0         = 14125.0,   // integrator DC gain, 83 dB
  parameter real F_POLE     = 20.0,      // integrator 3-dB frequency, Hz
  parameter real V_SAT      = 1.2,
  parameter real X3_RATIO   = 3.0        // large-step multiple (about 4 in a CT loop)
) (
  input  real  vinp,
  input  real  vinn,
  input  real  vbias,
  input  logic f_os,       // comparator clock
  input  logic phi1,       // S1: charge transfer
  input  logic phi2,       // S2: voltage copy
  input  logic step_up,
  input  logic step_x3,
  input  res_t res_mode,
  output logic v_out,      // modulator output bit
  output real  v_dac,      // DAC output (integrator reference input)
  output real  v_int       // integrator output
);

  timeunit 1ns;
  timeprecision 1ps;

  real w_rel;      // DAC output relative to vbias
  real plate_rel;  // free plate of C_S relative to vbias
  real v_step;     // step voltage on the other plate of C_S
  real y;          // integrator state
  logic copied;    // S2 has been closed since the last transfer
  realtime t_last; // time of the previous comparator decision

  initial begin
    w_rel     = 0.0;
    plate_rel = 0.0;
    v_step    = 0.0;
    y         = 0.0;
    v_out     = 1'b0;
    copied    = 1'b0;
    t_last    = -1.0;
  end

  always_comb v_dac = vbias + w_rel;
  always_comb v_int = y;

  function automatic real clip(input real x, input real lim);
    if (x > lim)  return lim;
    if (x < -lim) return -lim;
    return x;
  endfunction

  // Gm-C integration over the period since the last decision (a single
  // pole at F_POLE with DC gain A0, exact for an input held over the
  // period), then the comparator decision.
  always @(posedge f_os) begin
    real t_per, target;
    if (t_last >= 0.0) begin
      t_per  = ($realtime - t_last) * 1.0e-9;
      target = A0 * ((vinp - vinn) - w_rel);
      y      = clip(target + (y - target) * $exp(-2.0 * 3.14159265358979 * F_POLE * t_per), V_SAT);
    end
    t_last = $realtime;
    v_out  = (y >= 0.0);
  end

  // S2 closes: the buffer drives the free plate to the DAC output. The DAC
  // output cannot change before S1 closes, so the copy is applied there;
  // this keeps the model independent of the order of coincident phase
  // edges (at the fastest rate phi2 rises as phi1 falls).
  always @(posedge phi2) copied = 1'b1;

  // S1 closes and the step voltage is applied: charge sharing.
  always @(posedge phi1) begin
    if (copied) plate_rel = w_rel;
    copied    = 1'b0;
    v_step    = ((res_mode == RES_HIGH) ? VSTEP_HIGH : VSTEP_LOW)
              * (step_x3 ? X3_RATIO : 1.0) * (step_up ? 1.0 : -1.0);
    w_rel     = clip((C_S * (plate_rel + v_step) + C_INT * w_rel) / (C_S + C_INT), V_SAT);
    plate_rel = w_rel;
  end

  // S1 opens, the step voltage returns to zero and the floating plate follows.
  always @(negedge phi1) begin
    plate_rel = plate_rel - v_step;
    v_step    = 0.0;
  end

endmodule
