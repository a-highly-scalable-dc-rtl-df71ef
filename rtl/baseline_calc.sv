// Baseline calculator: tracks the slowly varying DC level of the decimated
// signal.
//
// Every PERIOD-th decimated sample (PERIOD = dc_period, counted with a
// sampling counter on the sample strobe) updates the absolute DC estimate
// as a 7-to-1 weighted average,
//     abs_dc <= (7 * abs_dc + sample) / 8,
// built as in the reference design from shift-and-add terms
// (2*abs_dc + 4*abs_dc + abs_dc + sample, an 11-bit sum for 8-bit data)
// followed by a 3-bit right shift. The published DC value is abs_dc minus
// mid-scale (128 for 8 bits), a two's-complement offset relative to the
// decimator's own baseline, held in an output register until the next
// update. dc_update pulses for one cycle with each new value.
//
// Timing: the update happens on the edge that ends the sample_valid cycle
// of every PERIOD-th sample; dc_value and dc_update are valid in the next
// cycle. dc_period = 1 updates on every sample; dc_period = 0 never
// updates (this design's choice). abs_dc starts at mid-scale, so the first
// DC value is 0 (also this design's choice).
module baseline_calc
  import nadc_pkg::*;
#(
  parameter int unsigned W   = nadc_pkg::DATA_W,
  parameter int unsigned P_W = nadc_pkg::PER_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_valid,
  input  logic [W-1:0]        sample,
  input  logic [P_W-1:0]      dc_period,
  output logic [W-1:0]        abs_dc,
  output logic signed [W-1:0] dc_value,
  output logic                dc_update
);

  localparam logic [W-1:0] MID = W'(1) << (W - 1);

  logic [P_W-1:0] samp_cnt;
  logic [W+2:0]   wsum;
  logic [W-1:0]   abs_next;
  logic           take;

  always_comb begin
    // 2*DC + 4*DC + DC + sample = 7*DC + sample
    wsum     = {2'b00, abs_dc, 1'b0} + {1'b0, abs_dc, 2'b00}
             + {3'b000, abs_dc} + {3'b000, sample};
    abs_next = wsum[W+2:3];
    take     = sample_valid && ({1'b0, samp_cnt} + 1'b1 == {1'b0, dc_period});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samp_cnt  <= '0;
      abs_dc    <= MID;
      dc_value  <= '0;
      dc_update <= 1'b0;
    end else begin
      dc_update <= take;
      if (take) begin
        samp_cnt <= '0;
        abs_dc   <= abs_next;
        dc_value <= $signed(abs_next - MID);
      end else if (sample_valid) begin
        samp_cnt <= samp_cnt + 1'b1;
      end
    end
  end

endmodule
