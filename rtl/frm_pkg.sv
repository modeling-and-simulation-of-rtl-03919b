// frm_pkg: constants shared by the frequency-response-masking (FRM) hearing-aid filter bank.
//
// Holds the sample and coefficient word lengths, the prototype filter length and the integer
// coefficients of the prototype low-pass filter H(z). The filter bank follows the published
// design in using a 40th-order (41-tap) linear-phase prototype whose real coefficients are scaled
// by 2^n and rounded to integers. The coefficient values themselves are this design's own:
// a least-squares low-pass with pass-band edge 0.45*pi and stop-band edge 0.65*pi (a normalised
// transition width of 0.2, as published), equal weights, scaled by 2^15 and rounded to the
// nearest integer. Its stop band is about 58 dB down. The pass-band edge was chosen so that the six
// Table-style combinations of H(z), H(z^2), H(z^4) and the mirror filter H(-z) tile 0..fs/2.
package frm_pkg;

  parameter int unsigned DATA_W     = 16;  // audio sample width (signed)
  parameter int unsigned COEF_W     = 16;  // coefficient width (signed), equals multiplier width
  parameter int unsigned NTAPS      = 41;  // prototype H(z) length: order 40
  parameter int unsigned COEF_SHIFT = 15;  // coefficients are h[k]*2^COEF_SHIFT
  parameter int unsigned NBANDS     = 6;   // bands of the filter bank

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Prototype coefficients, h[0] .. h[40]; symmetric (linear phase), centre tap h[20].
  parameter coef_t H_COEF [NTAPS] = '{
    -16'sd1,    16'sd13,   -16'sd5,    -16'sd39,   16'sd34,    16'sd74,   -16'sd110,
    -16'sd99,   16'sd253,   16'sd70,   -16'sd475,  16'sd78,    16'sd765,  -16'sd445,
    -16'sd1086, 16'sd1204,  16'sd1383, -16'sd2884, -16'sd1593, 16'sd10221, 16'sd18054,
    16'sd10221, -16'sd1593, -16'sd2884, 16'sd1383, 16'sd1204, -16'sd1086, -16'sd445,
    16'sd765,   16'sd78,   -16'sd475,  16'sd70,    16'sd253,  -16'sd99,   -16'sd110,
    16'sd74,    16'sd34,   -16'sd39,   -16'sd5,    16'sd13,   -16'sd1
  };

  // Saturate a wide signed value to DATA_W bits, symmetrically to +-(2^(DATA_W-1)-1): the
  // approximate multiplier does not accept -2^(DATA_W-1), so no stage may produce it.
  function automatic sample_t sat_sample(input logic signed [63:0] v);
    logic signed [63:0] maxv, minv;
    maxv = (64'sd1 <<< (DATA_W - 1)) - 64'sd1;
    minv = -maxv;
    if (v > maxv)      return sample_t'(maxv);
    else if (v < minv) return sample_t'(minv);
    else               return sample_t'(v);
  endfunction

endpackage
