// approx_ref_pkg: reference models used by the testbenches.
//
// approx_ref() computes the approximate product arithmetically, independent of the RTL's
// encoder/shifter structure: each operand magnitude keeps its top N/2 significant bits (those
// below are dropped), the truncated values are multiplied exactly and the product is scaled back
// by 2^(shift_a + shift_x). For signed operands the sign is reapplied; the out-of-range operand
// -2^(N-1) gives 0. fir_ref() is the 41-tap FIR section with its output rounding and 16-bit
// saturation, evaluated on a stored sample history.
package approx_ref_pkg;

  // number of significant bits of v
  function automatic int nbits(longint unsigned v);
    int n = 0;
    while (v != 0) begin
      v = v >> 1;
      n++;
    end
    return n;
  endfunction

  // shift that leaves at most `half` significant bits
  function automatic int trunc_shift(longint unsigned m, int half);
    int k = nbits(m);
    return (k > half) ? k - half : 0;
  endfunction

  function automatic longint unsigned approx_ref_u(longint unsigned a, longint unsigned x, int n);
    int sa = trunc_shift(a, n / 2);
    int sx = trunc_shift(x, n / 2);
    return ((a >> sa) * (x >> sx)) << (sa + sx);
  endfunction

  // products seen by approx_ref_s with nonzero operands: exact (both below 2^(n/2)) or truncated
  longint n_exact = 0, n_trunc = 0;

  function automatic longint approx_ref_s(longint a, longint x, int n);
    longint lim = longint'(1) <<< (n - 1);
    longint unsigned ma, mx, pm;
    if (a == -lim || x == -lim) return 0;
    ma = (a < 0) ? longint'(-a) : a;
    mx = (x < 0) ? longint'(-x) : x;
    if (ma != 0 && mx != 0) begin
      if (trunc_shift(ma, n / 2) == 0 && trunc_shift(mx, n / 2) == 0) n_exact++;
      else n_trunc++;
    end
    pm = approx_ref_u(ma, mx, n);
    return ((a < 0) != (x < 0)) ? -longint'(pm) : longint'(pm);
  endfunction

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32767) return -32767;
    return v;
  endfunction

  // One FIR section of the bank: sample history s[0..idx], taps spaced L apart; mirror selects
  // the H(-z) output. Returns the rounded result for time index idx before saturation.
  function automatic longint fir_ref_raw(const ref longint s[], input int idx, input int L,
                                     input bit mirror, const ref longint h[]);
    longint acc = 0;
    longint v, p;
    for (int k = 0; k < h.size(); k++) begin
      v = (idx - k * L >= 0) ? s[idx - k * L] : 0;
      p = approx_ref_s(v, h[k], 16);
      if (mirror && (k % 2 == 1)) acc -= p;
      else                        acc += p;
    end
    return (acc + 16384) >>> 15;
  endfunction

  function automatic longint fir_ref(const ref longint s[], input int idx, input int L,
                                     input bit mirror, const ref longint h[]);
    return sat16(fir_ref_raw(s, idx, L, mirror, h));
  endfunction

  // Whole six-band bank, register-accurate. x[n] is the sample given with the n-th enable;
  // band[n*6+b] is band b+1 as registered at that enable, sat[n] the bank's saturation flag.
  // Branch timing: each FIR section adds one enable of register delay; branch 2 is realigned by
  // 81 enables and branch 3 by 122.
  function automatic void bank_ref(const ref longint x[], const ref longint h[], input int ns,
                                   ref longint band[], ref bit sat[]);
    longint r1a[], r1b[], r1c[], r1cm[], r2a[], r2b[], r2bm[], r3[], r3m[];
    bit     st[];
    longint b1, b6, ad, bd, cd, dd, d;
    r1a = new[ns]; r1b = new[ns]; r1c = new[ns]; r1cm = new[ns];
    r2a = new[ns]; r2b = new[ns]; r2bm = new[ns]; r3 = new[ns]; r3m = new[ns];
    st = new[ns];
    band = new[ns * 6];
    sat = new[ns];
    for (int n = 0; n < ns; n++) begin
      longint raw[9];
      raw[0] = fir_ref_raw(x,   n,     4, 1'b0, h);
      raw[1] = fir_ref_raw(r1a, n - 1, 2, 1'b0, h);
      raw[2] = fir_ref_raw(r1b, n - 1, 1, 1'b0, h);
      raw[3] = fir_ref_raw(r1b, n - 1, 1, 1'b1, h);
      raw[4] = fir_ref_raw(x,   n,     2, 1'b0, h);
      raw[5] = fir_ref_raw(r2a, n - 1, 1, 1'b0, h);
      raw[6] = fir_ref_raw(r2a, n - 1, 1, 1'b1, h);
      raw[7] = fir_ref_raw(x,   n,     1, 1'b0, h);
      raw[8] = fir_ref_raw(x,   n,     1, 1'b1, h);
      st[n] = 1'b0;
      foreach (raw[i]) if (sat16(raw[i]) != raw[i]) st[n] = 1'b1;
      r1a[n] = sat16(raw[0]); r1b[n] = sat16(raw[1]); r1c[n] = sat16(raw[2]);
      r1cm[n] = sat16(raw[3]); r2a[n] = sat16(raw[4]); r2b[n] = sat16(raw[5]);
      r2bm[n] = sat16(raw[6]); r3[n] = sat16(raw[7]); r3m[n] = sat16(raw[8]);
      b1 = (n >= 1) ? r1c[n - 1] : 0;
      b6 = (n >= 1) ? r1cm[n - 1] : 0;
      ad = (n >= 82) ? r2b[n - 82] : 0;
      bd = (n >= 82) ? r2bm[n - 82] : 0;
      cd = (n >= 123) ? r3[n - 123] : 0;
      dd = (n >= 123) ? r3m[n - 123] : 0;
      sat[n] = (n >= 1) ? st[n - 1] : 1'b0;
      band[n*6+0] = b1;
      d = ad - b1; band[n*6+1] = sat16(d); if (sat16(d) != d) sat[n] = 1'b1;
      d = cd - ad; band[n*6+2] = sat16(d); if (sat16(d) != d) sat[n] = 1'b1;
      d = dd - bd; band[n*6+3] = sat16(d); if (sat16(d) != d) sat[n] = 1'b1;
      d = bd - b6; band[n*6+4] = sat16(d); if (sat16(d) != d) sat[n] = 1'b1;
      band[n*6+5] = b6;
    end
  endfunction

  // Gain-and-sum stage: returns the unsaturated rounded sum for one set of band samples.
  function automatic longint gain_sum_raw(const ref longint b[], input int base,
                                          const ref longint g[], input int frac);
    longint acc = 0;
    for (int i = 0; i < g.size(); i++) acc += approx_ref_s(b[base + i], g[i], 16);
    return (frac > 0) ? (acc + (longint'(1) <<< (frac - 1))) >>> frac : acc;
  endfunction

endpackage
