// Measurement stimulus generator: the FPGA-side logic that exercises a
// fabricated back-end on the bench without its analog front-end.
//
// It supplies everything the back-end needs from outside. From its own
// fast clock (clk_in) it divides down the back-end's reference clock
// clk_out, whose half period is HALF_DIV clk_in cycles. It holds the
// back-end in reset for RST_DLY clk_in cycles after reset_in is released.
// While reset_out is low it loads the threshold levels, the hysteresis band
// and the three clock tap selects on clk_out edges, and it lights one test
// LED for each value that reads back as expected. In place of the
// modulator it replays a stored bitstream: the back-end's oversampling
// clock comes back as clk_chip_in, and on each of its rising edges the
// next memory bit is put on ud_out. The replay loop has PLAY_LEN slots;
// slot PLAY_LEN-1 outputs 0 and restarts at address 0, so bits
// 0..PLAY_LEN-2 are played. The memory is MEM_DEPTH bits, loaded from
// INIT_FILE with $readmemb.
//
// Clock domains: clk_in (divider and reset delay), clk_out (settings) and
// clk_chip_in (replay). reset_out crosses into the other two as a level
// that changes once, which is how the bench setup used it; there is no
// synchronizer. The replay address is reset asynchronously by reset_out:
// clk_chip_in comes from the back-end, which is itself held in reset by
// reset_out, so a synchronous reset would never see a clock edge. A lint
// tool therefore sees reset_out used both as data (in its own counter and
// in the settings load) and as an asynchronous reset; that is intended.
// The settings and LEDs only ever take the parameter values, so synthesis
// may reduce them to constants; they are registered, as on the bench, so
// that the LEDs show the loaded values.
//
// Origin: the divide count, reset delay, settings, replay loop and test
// LEDs follow the reference design's FPGA test bench. The parameter names,
// the registered settings, the asynchronous replay reset and the bitstream
// contents are this design's.
// The bench bitstream came from recorded EEG. The default file here instead
// holds a synthetic first-order sigma-delta pattern (an accumulator adds
// the density d for each bit and emits 1 whenever it reaches 1): d = 1/2
// for bits 0..127 (idle), 9/16 for 128..255 (rising), 3/8 for 256..511
// (falling) and 1/2 for the rest.
module meas_stimulus_gen #(
  parameter int unsigned HALF_DIV  = 391,          // clk_out half period, clk_in cycles
  parameter int unsigned RST_DLY   = 511,          // reset_out rises after this many clk_in cycles
  parameter int unsigned MEM_DEPTH = 1024,
  parameter int unsigned PLAY_LEN  = 512,          // replay loop length, clk_chip_in cycles
  parameter string       INIT_FILE = "rtl/meas_bitstream.mem",
  parameter logic [7:0]  TH_L      = 8'd112,
  parameter logic [7:0]  TH_H      = 8'd144,
  parameter logic [4:0]  BAND      = 5'd14,
  parameter logic [2:0]  SEL_LOW   = 3'd1,
  parameter logic [2:0]  SEL_HIGH  = 3'd0,
  parameter logic [2:0]  SEL_NQ    = 3'd5
) (
  input  logic       clk_in,       // FPGA clock
  input  logic       clk_chip_in,  // oversampling clock returned by the back-end
  input  logic       reset_in,     // active low
  output logic       ud_out,       // bitstream to the back-end
  output logic       clk_out,      // reference clock to the back-end
  output logic       reset_out,    // active-low reset to the back-end
  output logic [7:0] th_l,
  output logic [7:0] th_h,
  output logic [4:0] band,
  output logic [2:0] sel_low,
  output logic [2:0] sel_high,
  output logic [2:0] sel_nq,
  output logic       led_test_l,
  output logic       led_test_h,
  output logic       led_test_b
);

  localparam int unsigned DIV_W  = $clog2(HALF_DIV);
  localparam int unsigned RST_W  = $clog2(RST_DLY + 1);
  localparam int unsigned ADDR_W = $clog2(MEM_DEPTH);

  logic             bits [MEM_DEPTH];
  logic [DIV_W-1:0] div_cnt;
  logic [RST_W-1:0] rst_cnt;
  logic [ADDR_W-1:0] addr;

  initial $readmemb(INIT_FILE, bits);

  // reference clock divider and reset delay
  always_ff @(posedge clk_in or negedge reset_in) begin
    if (!reset_in) begin
      div_cnt   <= '0;
      clk_out   <= 1'b0;
      rst_cnt   <= '0;
      reset_out <= 1'b0;
    end else begin
      if (div_cnt == DIV_W'(HALF_DIV - 1)) begin
        div_cnt <= '0;
        clk_out <= ~clk_out;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
      if (!reset_out) begin
        if (rst_cnt == RST_W'(RST_DLY - 1)) reset_out <= 1'b1;
        else                                rst_cnt   <= rst_cnt + 1'b1;
      end
    end
  end

  // settings, loaded while the back-end is held in reset
  always_ff @(posedge clk_out) begin
    if (!reset_out) begin
      th_l     <= TH_L;
      th_h     <= TH_H;
      band     <= BAND;
      sel_low  <= SEL_LOW;
      sel_high <= SEL_HIGH;
      sel_nq   <= SEL_NQ;
    end
  end

  assign led_test_l = (th_l == TH_L);
  assign led_test_h = (th_h == TH_H);
  assign led_test_b = (band == BAND);

  // bitstream replay at the back-end's oversampling clock; reset
  // asynchronously, as that clock stops while the back-end is in reset
  always_ff @(posedge clk_chip_in or negedge reset_out) begin
    if (!reset_out) begin
      addr   <= '0;
      ud_out <= 1'b0;
    end else if (addr == ADDR_W'(PLAY_LEN - 1)) begin
      addr   <= '0;
      ud_out <= 1'b0;
    end else begin
      addr   <= addr + 1'b1;
      ud_out <= bits[addr];
    end
  end

endmodule
