// Switch phase generator (timing controller) of the integrating-summing DAC.
//
// The DAC has two switches: S2 (phase phi2) lets a unity-gain buffer copy
// the DAC output voltage onto the free plate of the sampling capacitor,
// and S1 (phase phi1) then connects that capacitor to the integrating
// capacitor while the step voltage is applied. The phases must never
// overlap. Here phi2 is active while the oversampling clock f_os is high
// (just after the comparator decision) and phi1 while it is low, so the new
// step lands before the next decision. The first f_ref cycle of each half
// period is a gap in which neither switch is closed; it also gives the step
// selector, which updates on the edge where f_os falls, one cycle to settle
// before S1 closes. When a half period is a single f_ref cycle
// (os_half_one) there is no room for a gap and the phases are simply f_os
// and its complement. The placement of the phases within the period and the
// gap are this design's choices; the reference design states only that the
// copy must be finished before S1 closes.
//
// Timing: phi1/phi2 are decoded from f_os and the clock generator's edge
// strobes delayed by one f_ref cycle, so they change only on f_ref edges.
module dac_phase_gen (
  input  logic clk,          // f_ref
  input  logic rst_n,
  input  logic f_os,
  input  logic os_rise,      // f_os rises after this cycle
  input  logic os_fall,      // f_os falls after this cycle
  input  logic os_half_one,
  output logic phi1,
  output logic phi2
);

  logic first_high, first_low;   // first cycle of the high / low half

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_high <= 1'b0;
      first_low  <= 1'b0;
    end else begin
      first_high <= os_rise;
      first_low  <= os_fall;
    end
  end

  always_comb begin
    phi2 = f_os  && (!first_high || os_half_one);
    phi1 = !f_os && (!first_low  || os_half_one);
  end

endmodule
