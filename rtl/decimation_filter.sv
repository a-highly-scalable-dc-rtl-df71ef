// Variable-rate decimation filter: up/down counter plus down sampler.
//
// The modulator's 1-bit output sets the counting direction of a DATA_W-bit
// counter (up for 1, down for 0), once per oversampling period (bit_en).
// Counting the bitstream is a running average; reading the counter once
// per Nyquist period (fs_tick) decimates it. The step size is the
// high-resolution step in high-resolution mode and the larger low-res step
// otherwise, so that both modes use the same full-scale code range; the
// ratio of the steps must match the ratio of the modulator's feedback step
// voltages. The counter starts at mid-scale (2^(DATA_W-1)), which stands
// for 0 V at the input. Whenever the baseline calculator publishes a new
// DC value (dc_update) it is subtracted once from the counter, which
// re-centres the decimated signal on mid-scale.
//
// Timing: the counter updates on the clock edge at the end of a cycle with
// bit_en or dc_update. The down sampler registers the counter on the fs_tick
// edge; dout, dout_res (mode during the period just ended) and the
// one-cycle dout_valid strobe appear in the next cycle.
//
// The counter saturates at 0 and 2^DATA_W-1 instead of wrapping (this
// design's choice: a wrap would turn a large offset into a full-scale jump).
//
// Origin: the up/down counter with two programmable step sizes, the DC
// value input and the down sampler follow the reference design; the
// saturation, the one-time subtraction per update and the output register
// timing are this design's.
module decimation_filter
  import nadc_pkg::*;
#(
  parameter int unsigned W = nadc_pkg::DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bit_en,      // one modulator bit to count
  input  logic                mod_bit,
  input  res_t                res_mode,    // step size selector
  input  logic [W-1:0]        step_high,
  input  logic [W-1:0]        step_low,
  input  logic                dc_update,   // new DC value, subtract once
  input  logic signed [W-1:0] dc_value,
  input  logic                fs_tick,     // down-sampling instant
  output logic [W-1:0]        counter_out,
  output logic [W-1:0]        dout,
  output res_t                dout_res,
  output logic                dout_valid
);

  localparam int unsigned SW = W + 3;   // room for count + step - dc
  localparam logic signed [SW-1:0] MAX_CODE = SW'((1 << W) - 1);

  logic [W-1:0]         step;
  logic signed [SW-1:0] next_sum;

  always_comb begin
    step     = (res_mode == RES_HIGH) ? step_high : step_low;
    next_sum = $signed({3'b000, counter_out});
    if (bit_en)
      next_sum = mod_bit ? next_sum + $signed({3'b000, step})
                         : next_sum - $signed({3'b000, step});
    if (dc_update)
      next_sum = next_sum - SW'(dc_value);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      counter_out <= W'(1) << (W - 1);
      dout        <= W'(1) << (W - 1);
      dout_res    <= RES_LOW;
      dout_valid  <= 1'b0;
    end else begin
      if (next_sum < 0)              counter_out <= '0;
      else if (next_sum > MAX_CODE)  counter_out <= '1;
      else                           counter_out <= next_sum[W-1:0];
      dout_valid <= fs_tick;
      if (fs_tick) begin
        dout     <= counter_out;
        dout_res <= res_mode;
      end
    end
  end

endmodule
