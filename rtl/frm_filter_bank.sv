// frm_filter_bank: six-band non-uniform FIR filter bank built by frequency-response masking.
//
// Three branches run from the input. Branch 1 cascades H(z^4), H(z^2) and H(z); its last section
// gives both H and the mirror Hc(z) = H(-z), i.e. bands B1 = H(z^4)H(z^2)H(z) and
// B6 = H(z^4)H(z^2)Hc(z). Branch 2 cascades H(z^2) and H(z): a = H(z^2)H(z), b = H(z^2)Hc(z).
// Branch 3 is H(z) alone: c = H(z), d = Hc(z). The remaining bands are differences:
// B2 = a - B1, B5 = b - B6, B3 = c - a, B4 = d - b. With fs = 16 kHz the bands tile 0..8 kHz,
// narrow at both ends and wide in the middle (about 0-1.1, 1.1-2.2, 2.2-4.4 kHz and their
// mirror images 3.6-5.8, 5.8-6.9, 6.9-8 kHz for this design's prototype).
//
// The branches differ in group delay (20 samples per H(z), 40 per H(z^2), 80 per H(z^4)) and in
// register stages, so branch 2 is delayed by 81 samples and branch 3 by 122 before the
// subtractions; all six bands then share one latency: a band output registered after the `en`
// of sample n is the band-filtered signal centred on sample n-143 (group delay 140 plus three
// register stages). Differences are saturated to 16 bits. `sat` flags a saturation anywhere in
// the bank for the current sample.
//
// The branch structure, band equations and prototype length are published. The delay
// alignment, the reading of Hc(z) as H(-z), registering and saturation are this design's own.
module frm_filter_bank
  import frm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x_in,
  output sample_t band [NBANDS],
  output logic    sat
);
  // total extra samples of branch 1 over branches 2 and 3 (group delay + register stages)
  localparam int unsigned D2 = 20 * 4 + 1;        // 81
  localparam int unsigned D3 = 20 * (4 + 2) + 2;  // 122

  sample_t y1a, y1b, b1, b6;
  sample_t y2a, br_a, br_b;
  sample_t br_c, br_d;
  sample_t a_d, b_d, c_d, d_d;
  logic    s1a, s1b, s1c, s2a, s2b, s3;
  sample_t band_next [NBANDS];
  logic    band_sat;

  // Branch 1: H(z^4) -> H(z^2) -> H(z)/Hc(z)
  fir_subfilter #(.L(4), .DUAL(1'b0)) u_f1a (
    .clk, .rst_n, .en, .x_in(x_in), .y_h(y1a), .y_hc(), .sat(s1a));
  fir_subfilter #(.L(2), .DUAL(1'b0)) u_f1b (
    .clk, .rst_n, .en, .x_in(y1a), .y_h(y1b), .y_hc(), .sat(s1b));
  fir_subfilter #(.L(1), .DUAL(1'b1)) u_f1c (
    .clk, .rst_n, .en, .x_in(y1b), .y_h(b1), .y_hc(b6), .sat(s1c));

  // Branch 2: H(z^2) -> H(z)/Hc(z)
  fir_subfilter #(.L(2), .DUAL(1'b0)) u_f2a (
    .clk, .rst_n, .en, .x_in(x_in), .y_h(y2a), .y_hc(), .sat(s2a));
  fir_subfilter #(.L(1), .DUAL(1'b1)) u_f2b (
    .clk, .rst_n, .en, .x_in(y2a), .y_h(br_a), .y_hc(br_b), .sat(s2b));

  // Branch 3: H(z)/Hc(z)
  fir_subfilter #(.L(1), .DUAL(1'b1)) u_f3 (
    .clk, .rst_n, .en, .x_in(x_in), .y_h(br_c), .y_hc(br_d), .sat(s3));

  // Alignment of branches 2 and 3 with branch 1
  delay_line #(.W(DATA_W), .DEPTH(D2)) u_da (.clk, .rst_n, .en, .in(br_a), .out(a_d));
  delay_line #(.W(DATA_W), .DEPTH(D2)) u_db (.clk, .rst_n, .en, .in(br_b), .out(b_d));
  delay_line #(.W(DATA_W), .DEPTH(D3)) u_dc (.clk, .rst_n, .en, .in(br_c), .out(c_d));
  delay_line #(.W(DATA_W), .DEPTH(D3)) u_dd (.clk, .rst_n, .en, .in(br_d), .out(d_d));

  always_comb begin
    band_next[0] = b1;
    band_next[1] = sat_sample(64'(a_d) - 64'(b1));
    band_next[2] = sat_sample(64'(c_d) - 64'(a_d));
    band_next[3] = sat_sample(64'(d_d) - 64'(b_d));
    band_next[4] = sat_sample(64'(b_d) - 64'(b6));
    band_next[5] = b6;
    band_sat = (64'(band_next[1]) != 64'(a_d) - 64'(b1)) ||
               (64'(band_next[2]) != 64'(c_d) - 64'(a_d)) ||
               (64'(band_next[3]) != 64'(d_d) - 64'(b_d)) ||
               (64'(band_next[4]) != 64'(b_d) - 64'(b6));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBANDS; i++) band[i] <= '0;
      sat <= 1'b0;
    end else if (en) begin
      for (int i = 0; i < NBANDS; i++) band[i] <= band_next[i];
      sat <= band_sat | s1a | s1b | s1c | s2a | s2b | s3;
    end
  end
endmodule
