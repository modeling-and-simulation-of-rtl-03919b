// tb_band_gain_sum: gain-and-sum stage with random bands and gains, unity gains (output equals
// the band sum), and large gains that saturate the output; checks y_out and sat one clock after
// each enable.
module tb_band_gain_sum;
  import frm_pkg::*;
  import approx_ref_pkg::*;
  logic    clk = 0, rst_n = 0, en = 0;
  sample_t band [6];
  coef_t   gain [6];
  sample_t y_out;
  logic    sat;
  int checks = 0, failures = 0, n_sat = 0;
  longint b[], g[];

  band_gain_sum #(.NB(6), .GAIN_FRAC(4)) dut (.clk, .rst_n, .en, .band, .gain, .y_out, .sat);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint raw, e, s;
    b = new[6];
    g = new[6];
    foreach (band[i]) begin band[i] = '0; gain[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      s = 0;
      for (int i = 0; i < 6; i++) begin
        b[i] = longint'($urandom_range(0, 8000)) - 4000;
        if (t < 1000)      g[i] = 16;                                   // unity
        else if (t < 2000) g[i] = longint'($urandom_range(0, 64)) - 32; // within +-2
        else               g[i] = longint'($urandom_range(16, 1600));  // up to 40 dB
        band[i] = 16'(b[i]);
        gain[i] = 16'(g[i]);
        s += b[i];
      end
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      raw = gain_sum_raw(b, 0, g, 4);
      e   = sat16(raw);
      checks++;
      if (longint'(y_out) != e || sat != (raw != e)) begin
        failures++;
        if (failures < 10) $display("t=%0d y=%0d expected %0d sat=%0d", t, y_out, e, sat);
      end
      if (t < 1000) begin
        // unity gains: the band values are below 2^8 or exact after truncation only if small;
        // the sum must be within the multiplier's relative error of the exact sum
        checks++;
        if (longint'(y_out) - s > 6 * 64 || s - longint'(y_out) > 6 * 64) failures++;
      end
      if (sat) n_sat++;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
