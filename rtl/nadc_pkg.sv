// Shared widths, types and helper functions of the adaptive-resolution
// neural recording channel.
//
// The channel is an oversampling delta/delta-sigma ADC whose oversampling
// clock (and therefore its resolution) is switched between a high and a low
// rate by a digital controller that watches the decimated output. The
// widths below are those of the fabricated back-end: an 8-bit decimation
// counter, an 8-bit reference-clock divider with 3-bit tap selects, a 5-bit
// hysteresis band and an 8-bit baseline sampling period.
//
// Origin: the widths and the two-bit DAC step table (00 -1, 01 +3, 10 -3,
// 11 +1) follow the reference design; the enum and struct packaging of
// the settings is this design's own.
package nadc_pkg;

  localparam int unsigned DATA_W  = 8;  // decimation counter / output width
  localparam int unsigned DIV_W   = 8;  // reference clock divider width
  localparam int unsigned SEL_W   = 3;  // clock tap select width
  localparam int unsigned BAND_W  = 5;  // hysteresis band width
  localparam int unsigned PER_W   = 8;  // baseline sampling period width

  // Resolution mode; the activity detector's CLOCK SELECTOR flag.
  typedef enum logic {
    RES_LOW  = 1'b0,   // f_OS_low, coarse counter step
    RES_HIGH = 1'b1    // f_OS_high, fine counter step
  } res_t;

  // User (off-chip) settings of the digital back-end.
  typedef struct packed {
    logic [SEL_W-1:0]  sel_clk_nyq;   // divider tap for f_s
    logic [SEL_W-1:0]  sel_clk_high;  // divider tap for f_OS_high
    logic [SEL_W-1:0]  sel_clk_low;   // divider tap for f_OS_low
    logic [BAND_W-1:0] hyst_band;     // hysteresis band value
    logic [DATA_W-1:0] mid_high_thr;  // mid-high threshold level value
    logic [DATA_W-1:0] mid_low_thr;   // mid-low threshold level value
    logic [DATA_W-1:0] step_high;     // high-res counting step size
    logic [DATA_W-1:0] step_low;      // low-res counting step size
    logic [PER_W-1:0]  dc_period;     // baseline update period, in f_s samples
  } backend_cfg_t;

  // Change of the integrating-summing DAC output, in unit steps, for the
  // last two modulator bits: the DAC adds the bit (+1/-1) to its own
  // running integral of the bits, which reduces to this table.
  function automatic logic signed [2:0] dac_step(input logic v_prev, input logic v_now);
    unique case ({v_prev, v_now})
      2'b00:   return -3'sd1;
      2'b01:   return  3'sd3;
      2'b10:   return -3'sd3;
      default: return  3'sd1;
    endcase
  endfunction

endpackage
