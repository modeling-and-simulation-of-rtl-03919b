// tb_hearing_aid_top: end-to-end test of the hearing-aid filter bank at its default size.
// A sample stream (impulse, noise, quiet passage, full-scale tone) runs through the six-band
// bank and the gain stage with two gain settings (a noise-induced-loss-like and a
// presbycusis-like set, switched half way). Every band output, y_out and both saturation flags are
// compared with the register-accurate reference on every sample; y_valid must pulse one clock
// after each enable. The side-by-side unsigned multiplier is checked on random operands.
// Mechanisms counted, each must occur: exact (untruncated) products, truncated products,
// filter-bank saturation, output saturation, a gain change.
module tb_hearing_aid_top;
  import frm_pkg::*;
  import approx_ref_pkg::*;
  localparam int NS = 700;

  logic    clk = 0, rst_n = 0, en = 0;
  sample_t x_in = '0;
  coef_t   gain [NBANDS];
  sample_t band [NBANDS];
  sample_t y_out;
  logic    y_valid, sat_bank, sat_out;
  logic [15:0] um_a = '0, um_x = '0;
  logic [31:0] um_p;
  int checks = 0, failures = 0;
  int n_sat_bank = 0, n_sat_out = 0, n_gain_change = 0;
  longint xs[], h[], bref[], g[];
  bit     sref[];

  hearing_aid_top dut (.clk, .rst_n, .en, .x_in, .gain, .band, .y_out, .y_valid,
                       .sat_bank, .sat_out, .um_a, .um_x, .um_p);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // gains in dB -> 4 fractional bits
  function automatic longint db_gain(real db);
    return longint'($rtoi(16.0 * (10.0 ** (db / 20.0)) + 0.5));
  endfunction

  task automatic set_gains(input real d0, d1, d2, d3, d4, d5);
    real d [6];
    d = '{d0, d1, d2, d3, d4, d5};
    for (int i = 0; i < 6; i++) begin
      g[i]    = db_gain(d[i]);
      gain[i] = 16'(g[i]);
    end
    n_gain_change++;
  endtask

  initial begin
    longint raw, e, prev_band[];
    xs = new[NS];
    h  = new[NTAPS];
    g  = new[NBANDS];
    prev_band = new[NBANDS];
    for (int k = 0; k < NTAPS; k++) h[k] = longint'(H_COEF[k]);
    for (int n = 0; n < NS; n++) begin
      if (n == 0)       xs[n] = 8000;
      else if (n < 250) xs[n] = 0;
      else if (n < 420) xs[n] = longint'(signed'(16'($urandom()))) / 8;
      else if (n < 560) xs[n] = longint'($urandom_range(0, 120)) - 60;
      else              xs[n] = (n % 2 == 0) ? 32767 : -32767;
    end
    bank_ref(xs, h, NS, bref, sref);
    foreach (prev_band[i]) prev_band[i] = 0;

    set_gains(20.0, 20.0, 27.0, 38.0, 30.0, 24.0);   // NIHL-like, 20..40 dB
    n_gain_change = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      if (n == 350) set_gains(15.0, 19.0, 31.0, 44.0, 54.0, 58.0);  // presbycusis-like, 15..60 dB
      x_in = 16'(xs[n]);
      um_a = 16'($urandom());
      um_x = 16'($urandom());
      en   = 1'b1;
      #1;
      checks++;
      if (um_p != 32'(approx_ref_u(longint'(um_a), longint'(um_x), 16))) failures++;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (!y_valid) failures++;
      for (int b = 0; b < NBANDS; b++) begin
        checks++;
        if (longint'(band[b]) != bref[n*6+b]) begin
          failures++;
          if (failures < 12) $display("n=%0d B%0d=%0d expected %0d", n, b + 1, band[b], bref[n*6+b]);
        end
      end
      checks++;
      if (sat_bank != sref[n]) failures++;
      // output is the gain sum of the bands registered at the previous enable
      raw = gain_sum_raw(prev_band, 0, g, 4);
      e   = sat16(raw);
      checks++;
      if (longint'(y_out) != e || sat_out != (raw != e)) begin
        failures++;
        if (failures < 12) $display("n=%0d y_out=%0d expected %0d", n, y_out, e);
      end
      for (int b = 0; b < NBANDS; b++) prev_band[b] = bref[n*6+b];
      if (sat_bank) n_sat_bank++;
      if (sat_out) n_sat_out++;
      @(negedge clk);
      checks++;
      if (y_valid) failures++;
    end
    checks += 5;
    if (n_exact == 0)       begin failures++; $display("no exact product"); end
    if (n_trunc == 0)       begin failures++; $display("no truncated product"); end
    if (n_sat_bank == 0)    begin failures++; $display("no bank saturation"); end
    if (n_sat_out == 0)     begin failures++; $display("no output saturation"); end
    if (n_gain_change == 0) begin failures++; $display("no gain change"); end
    $display("exact products %0d, truncated %0d, bank sat %0d, output sat %0d, gain changes %0d",
             n_exact, n_trunc, n_sat_bank, n_sat_out, n_gain_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
