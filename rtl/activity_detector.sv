// Activity detector: decides, from the decimated amplitude, whether the
// signal is in a high-activity episode (CLOCK SELECTOR = 1, high
// resolution) or idle (0, low resolution).
//
// The user sets a mid-high and a mid-low threshold and a hysteresis band.
// The outer thresholds are derived as HIGH = mid-high + band and
// LOW = mid-low - band (9-bit values). Each side keeps one flag:
//   flag_high = 1 once the signal has gone above HIGH; it stays 1 until the
//               signal drops to MID-HIGH or below.
//   flag_low  = 1 while the signal is above the lower band: it drops to 0
//               when the signal goes below LOW and returns to 1 once the
//               signal is back at MID-LOW or above.
// The threshold each side compares against is chosen by its own flag, and
// the comparison is the sign bit of a 10-bit subtraction. The flags are
// registered on each new decimated sample. CLOCK SELECTOR is 1 when
// flag_high == flag_low (above the upper band, or below the lower band)
// and 0 in the middle region; inside a hysteresis band the flags, and so
// the selector, keep their previous value. The 4-to-1 selector table is the
// reference design's; the treatment of a sample exactly on a threshold is
// this design's choice.
//
// Timing: flags update on the edge that ends a sample_valid cycle; clk_sel
// follows combinationally from the flags.
module activity_detector
  import nadc_pkg::*;
#(
  parameter int unsigned W   = nadc_pkg::DATA_W,
  parameter int unsigned B_W = nadc_pkg::BAND_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sample_valid,
  input  logic [W-1:0]   sample,
  input  logic [W-1:0]   mid_high_thr,
  input  logic [W-1:0]   mid_low_thr,
  input  logic [B_W-1:0] hyst_band,
  output logic           flag_high,
  output logic           flag_low,
  output res_t           clk_sel
);

  localparam int unsigned DW = W + 2;   // 10 bits for 8-bit data

  logic signed [DW-1:0] high_thr, low_thr, set_high, set_low, sub_high, sub_low;

  always_comb begin
    high_thr = $signed(DW'(mid_high_thr)) + $signed(DW'(hyst_band));
    low_thr  = $signed(DW'(mid_low_thr))  - $signed(DW'(hyst_band));
    set_high = flag_high ? $signed(DW'(mid_high_thr)) : high_thr;
    set_low  = flag_low  ? low_thr : $signed(DW'(mid_low_thr));
    sub_high = set_high - $signed(DW'(sample));   // negative: above
    sub_low  = $signed(DW'(sample)) - set_low;    // negative: below
    clk_sel  = (flag_high == flag_low) ? RES_HIGH : RES_LOW;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_high <= 1'b0;
      flag_low  <= 1'b1;
    end else if (sample_valid) begin
      flag_high <= sub_high[DW-1];
      flag_low  <= !sub_low[DW-1];
    end
  end

endmodule
