// hearing_aid_top: FRM six-band hearing-aid filter bank with per-band gains.
//
// Input samples (16-bit two's complement, one per `en`, nominally at fs = 16 kHz) go through the
// six-band frequency-response-masking filter bank; each band is scaled by a programmable gain and
// the bands are summed into the output sample. Every multiplication, in the filters and in the
// gains, is done by the signed approximate multiplier.
//
// Interface: `gain[b]` are signed with 4 fractional bits (see band_gain_sum) and may change at
// any time; `band[b]` exposes the six band signals. Timing: band outputs lag the input by the
// filter bank's 140-sample group delay plus three `en`s of registers; y_out follows band one
// `en` later, and y_valid pulses one clock after each `en`, when band and y_out have just been
// updated. sat_bank / sat_out flag saturation in the filter bank / the output sum.
// The unsigned variant of the approximate multiplier, which the filter bank does not use, is
// brought out on its own combinational ports um_a, um_x -> um_p.
module hearing_aid_top
  import frm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x_in,
  input  coef_t   gain [NBANDS],
  output sample_t band [NBANDS],
  output sample_t y_out,
  output logic    y_valid,
  output logic    sat_bank,
  output logic    sat_out,
  // stand-alone unsigned approximate multiplier (not used by the filter bank)
  input  logic [DATA_W-1:0]   um_a,
  input  logic [DATA_W-1:0]   um_x,
  output logic [2*DATA_W-1:0] um_p
);
  frm_filter_bank u_bank (
    .clk, .rst_n, .en, .x_in, .band, .sat(sat_bank)
  );

  band_gain_sum #(.NB(NBANDS), .GAIN_FRAC(4)) u_gain (
    .clk, .rst_n, .en, .band, .gain, .y_out, .sat(sat_out)
  );

  approx_mult_unsigned #(.N(DATA_W)) u_umul (.a(um_a), .x(um_x), .p(um_p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= en;
  end
endmodule
