// band_gain_sum: per-band gain and recombination of the hearing-aid filter bank.
//
// Each of the NB band signals is multiplied by its own programmable gain, the products are added
// and the sum is scaled back and saturated to a 16-bit output sample. Setting the six gains to the
// hearing loss of a listener at each band's frequencies shapes the overall response to their
// audiogram. Gains are signed 16-bit numbers with GAIN_FRAC fractional bits (default 4: gains up
// to 2047.9, about 66 dB, in steps of 1/16). The multiplications use the same signed approximate
// multiplier as the filters.
//
// Timing: on a clock with `en` the result for the current band samples is registered; y_out and
// `sat` (the sum did not fit in 16 bits) change one clock after `en`. Asynchronous active-low
// reset. The published design describes the per-band gain adjustment only as what matches the
// audiogram; the gain format, rounding, saturation and the use of the approximate multiplier
// here are this design's choices.
module band_gain_sum
  import frm_pkg::*;
#(
  parameter int unsigned NB        = 6,
  parameter int unsigned GAIN_FRAC = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t band [NB],
  input  coef_t   gain [NB],
  output sample_t y_out,
  output logic    sat
);
  localparam int unsigned ACC_W = 2 * DATA_W + 4;

  logic signed [2*DATA_W-1:0] prod [NB];
  logic signed [ACC_W-1:0]    acc, scaled;
  sample_t                    y_next;

  for (genvar b = 0; b < NB; b++) begin : g_band
    approx_mult_signed #(.N(DATA_W)) u_mul (.a(band[b]), .x(gain[b]), .p(prod[b]));
  end

  always_comb begin
    acc = '0;
    for (int b = 0; b < NB; b++) acc += ACC_W'(prod[b]);
    if (GAIN_FRAC > 0) scaled = (acc + (ACC_W'(1) <<< (GAIN_FRAC - 1))) >>> GAIN_FRAC;
    else               scaled = acc;
    y_next = sat_sample(64'(scaled));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out <= '0;
      sat   <= 1'b0;
    end else if (en) begin
      y_out <= y_next;
      sat   <= (64'(scaled) != 64'(y_next));
    end
  end
endmodule
