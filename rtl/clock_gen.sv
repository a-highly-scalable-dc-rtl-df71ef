// Clock generator and selector (timing control) of the adaptive back-end.
//
// A free-running DIV_W-bit counter on the reference clock f_ref provides
// binary sub-multiples of f_ref: tap k of the counter toggles at
// f_ref / 2^(k+1). Three tap selects choose f_OS_high, f_OS_low and the
// Nyquist-rate clock f_s; the CLOCK SELECTOR flag then picks which of the
// two oversampling clocks drives the modulator. With f_ref = 128 kHz, taps
// 1, 3 and 6 give 32 kHz, 8 kHz and 1 kHz.
//
// Everything downstream runs on f_ref with enables, so besides the divided
// clock levels this block emits one-cycle strobes: os_rise / os_fall are
// high in the f_ref cycle after which the selected oversampling clock
// rises / falls, fs_tick likewise for the rising edge of f_s. The
// requested resolution (sel_req) is taken over only at an fs_tick edge.
// After that edge all counter taps below the f_s tap are zero, so both
// oversampling clocks are low and the switch cannot produce a runt pulse,
// provided both oversampling taps are below the f_s tap. Doing the switch
// at the Nyquist boundary is this design's choice; the counter and tap
// multiplexers follow the reference design.
module clock_gen
  import nadc_pkg::*;
#(
  parameter int unsigned CNT_W = nadc_pkg::DIV_W,
  parameter int unsigned TAP_W = nadc_pkg::SEL_W
) (
  input  logic             clk,          // f_ref
  input  logic             rst_n,
  input  logic [TAP_W-1:0] sel_clk_high,
  input  logic [TAP_W-1:0] sel_clk_low,
  input  logic [TAP_W-1:0] sel_clk_nyq,
  input  res_t             sel_req,      // from the activity detector
  output res_t             res_mode,     // active resolution
  output logic             f_os_high,
  output logic             f_os_low,
  output logic             f_os,         // selected oversampling clock
  output logic             f_s,
  output logic             os_rise,
  output logic             os_fall,
  output logic             os_half_one,  // each half period of f_os is one f_ref cycle
  output logic             fs_tick
);

  logic [CNT_W-1:0] div_cnt;
  logic [TAP_W-1:0] os_tap;

  // True when tap k of c is about to change to 'to_high' on the next edge.
  function automatic logic tap_edge(input logic [CNT_W-1:0] c,
                                    input logic [TAP_W-1:0] k,
                                    input logic             to_high);
    logic [CNT_W-1:0] low_mask;
    low_mask = (CNT_W'(1) << k) - CNT_W'(1);
    return ((c & low_mask) == low_mask) && (c[k] == !to_high);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      res_mode <= RES_LOW;
    end else begin
      div_cnt <= div_cnt + 1'b1;
      if (fs_tick) res_mode <= sel_req;
    end
  end

  always_comb begin
    os_tap      = (res_mode == RES_HIGH) ? sel_clk_high : sel_clk_low;
    f_os_high   = div_cnt[sel_clk_high];
    f_os_low    = div_cnt[sel_clk_low];
    f_os        = div_cnt[os_tap];
    f_s         = div_cnt[sel_clk_nyq];
    os_rise     = tap_edge(div_cnt, os_tap, 1'b1);
    os_fall     = tap_edge(div_cnt, os_tap, 1'b0);
    os_half_one = (os_tap == '0);
    fs_tick     = tap_edge(div_cnt, sel_clk_nyq, 1'b1);
  end

endmodule
