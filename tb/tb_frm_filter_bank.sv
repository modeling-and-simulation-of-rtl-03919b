// tb_frm_filter_bank: six-band FRM filter bank against the register-accurate reference model.
// Input: an impulse (checks that every band's impulse response peaks at the bank latency of 143
// samples, i.e. group delay 140 plus three register stages, and that the mirror bands B4..B6
// carry energy), then random noise, a small-amplitude stretch, and a full-scale square wave at
// fs/2 that saturates the high band sections. All six bands and the saturation flag are compared
// on every sample.
module tb_frm_filter_bank;
  import frm_pkg::*;
  import approx_ref_pkg::*;
  localparam int NS = 700;

  logic    clk = 0, rst_n = 0, en = 0;
  sample_t x_in = '0;
  sample_t band [NBANDS];
  logic    sat;
  int checks = 0, failures = 0, n_sat = 0;
  longint xs[], h[], bref[];
  bit     sref[];
  longint peak [NBANDS];
  int     peak_at [NBANDS];

  frm_filter_bank dut (.clk, .rst_n, .en, .x_in, .band, .sat);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xs = new[NS];
    h  = new[NTAPS];
    for (int k = 0; k < NTAPS; k++) h[k] = longint'(H_COEF[k]);
    for (int n = 0; n < NS; n++) begin
      if (n == 0)       xs[n] = 20000;
      else if (n < 300) xs[n] = 0;
      else if (n < 450) xs[n] = longint'(signed'(16'($urandom()))) / 2;
      else if (n < 550) xs[n] = longint'($urandom_range(0, 200)) - 100;
      else              xs[n] = (n % 2 == 0) ? 32767 : -32767;
    end
    bank_ref(xs, h, NS, bref, sref);
    foreach (peak[b]) begin peak[b] = 0; peak_at[b] = -1; end

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      x_in = 16'(xs[n]);
      en   = 1'b1;
      @(negedge clk);
      en   = 1'b0;
      for (int b = 0; b < NBANDS; b++) begin
        checks++;
        if (longint'(band[b]) != bref[n*6+b]) begin
          failures++;
          if (failures < 12) $display("n=%0d B%0d=%0d expected %0d", n, b + 1, band[b], bref[n*6+b]);
        end
        if (n < 300 && (band[b] > peak[b] || -band[b] > peak[b])) begin
          peak[b]    = (band[b] < 0) ? -longint'(band[b]) : longint'(band[b]);
          peak_at[b] = n;
        end
      end
      checks++;
      if (sat != sref[n]) begin
        failures++;
        if (failures < 12) $display("n=%0d sat=%0d expected %0d", n, sat, sref[n]);
      end
      if (sat) n_sat++;
    end
    // latency: the symmetric impulse responses of all bands are centred on sample 143
    for (int b = 0; b < NBANDS; b++) begin
      checks++;
      if (peak_at[b] != 143 || peak[b] < 500) begin
        failures++;
        $display("B%0d impulse peak %0d at sample %0d, expected at 143", b + 1, peak[b], peak_at[b]);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never happened"); end
    $display("saturation samples %0d, exact products %0d, truncated products %0d",
             n_sat, n_exact, n_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
