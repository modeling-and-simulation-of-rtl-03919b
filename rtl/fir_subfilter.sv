// fir_subfilter: one FIR section H(z^L) of the FRM filter bank, with optional mirror output.
//
// A direct-form FIR filter with the 41 prototype coefficients h[k] spaced L samples apart, so it
// realises the interpolated filter H(z^L) (L = 1, 2 or 4 in the bank). Every tap has its own
// signed approximate multiplier; the filtering is the convolution of the input samples with the
// impulse response, as published. Even-index and odd-index products are summed separately, so
// the same multipliers also give the mirror filter Hc(z^L) = H(-z^L), whose coefficients are
// h[k](-1)^k: y_h = (even + odd), y_hc = (even - odd). Both sums are rounded, shifted right by
// the coefficient scaling (2^15) and saturated to 16 bits.
//
// Timing: `en` marks a new input sample (one per audio sample period, at most one per clock).
// On that clock edge the sample enters the delay line and the outputs are registered, so y_h and
// y_hc change one clock after `en` and hold until the next `en`; the registered result includes
// the sample presented with `en`. `sat` is high for the sample period whose output saturated.
// Asynchronous active-low reset clears the delay line and outputs.
//
// Follows the published design: the prototype length, interpolation by L, integer coefficients, one
// approximate multiplier per product. This design's own choices: the even/odd split for the
// mirror output, rounding and saturation to 16 bits, the sample enable and the reset.
module fir_subfilter
  import frm_pkg::*;
#(
  parameter int unsigned L    = 1,   // interpolation factor: realises H(z^L)
  parameter bit          DUAL = 1'b1 // also produce the mirror output H(-z^L)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x_in,
  output sample_t y_h,
  output sample_t y_hc,
  output logic    sat
);
  localparam int unsigned DLEN  = (NTAPS - 1) * L;  // stored past samples
  localparam int unsigned ACC_W = 2 * DATA_W + 8;   // 41 products of 32 bits

  sample_t                   dl  [DLEN];
  sample_t                   tap [NTAPS];
  logic signed [2*DATA_W-1:0] prod[NTAPS];
  logic signed [ACC_W-1:0]   acc_even, acc_odd, sum_h, sum_hc;
  sample_t                   h_next, hc_next;
  logic                      sat_h, sat_hc;

  // Tap k reads the sample k*L periods old; tap 0 is the incoming sample.
  always_comb begin
    tap[0] = x_in;
    for (int k = 1; k < NTAPS; k++) tap[k] = dl[k*L-1];
  end

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    approx_mult_signed #(.N(DATA_W)) u_mul (
      .a(tap[k]),
      .x(H_COEF[k]),
      .p(prod[k])
    );
  end

  always_comb begin
    acc_even = '0;
    acc_odd  = '0;
    for (int k = 0; k < NTAPS; k += 2) acc_even += ACC_W'(prod[k]);
    for (int k = 1; k < NTAPS; k += 2) acc_odd  += ACC_W'(prod[k]);
    // round half up, then drop the coefficient scaling
    sum_h  = (acc_even + acc_odd + (ACC_W'(1) <<< (COEF_SHIFT - 1))) >>> COEF_SHIFT;
    sum_hc = (acc_even - acc_odd + (ACC_W'(1) <<< (COEF_SHIFT - 1))) >>> COEF_SHIFT;
    h_next  = sat_sample(64'(sum_h));
    hc_next = DUAL ? sat_sample(64'(sum_hc)) : '0;
    sat_h   = (64'(sum_h) != 64'(h_next));
    sat_hc  = DUAL && (64'(sum_hc) != 64'(hc_next));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DLEN; i++) dl[i] <= '0;
      y_h  <= '0;
      y_hc <= '0;
      sat  <= 1'b0;
    end else if (en) begin
      dl[0] <= x_in;
      for (int i = 1; i < DLEN; i++) dl[i] <= dl[i-1];
      y_h  <= h_next;
      y_hc <= hc_next;
      sat  <= sat_h | sat_hc;
    end
  end
endmodule
