// tb_fir_subfilter: one FIR section at L = 2 (H(z^2) and its mirror H(-z^2)).
// Feeds an impulse (the outputs must read back the scaled coefficients at every second sample,
// with alternating signs on the mirror output), then random samples, then a worst-case pattern
// that drives the output into saturation; irregular gaps between sample enables check that the
// outputs hold. Every registered output is compared with the reference convolution, one clock
// after its enable.
module tb_fir_subfilter;
  import frm_pkg::*;
  import approx_ref_pkg::*;
  localparam int L = 2;
  localparam int NS = 400;

  logic    clk = 0, rst_n = 0, en = 0;
  sample_t x_in = '0, y_h, y_hc;
  logic    sat;
  int checks = 0, failures = 0, n_sat = 0;
  longint xs[], h[];

  fir_subfilter #(.L(L), .DUAL(1'b1)) dut (.clk, .rst_n, .en, .x_in, .y_h, .y_hc, .sat);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint eh, ehc, rh, rhc;
    xs = new[NS];
    h  = new[NTAPS];
    for (int k = 0; k < NTAPS; k++) h[k] = longint'(H_COEF[k]);
    for (int n = 0; n < NS; n++) begin
      if (n == 0)        xs[n] = 32767;              // impulse
      else if (n < 100)  xs[n] = 0;
      else if (n < 300)  xs[n] = longint'(signed'(16'($urandom())));
      else               xs[n] = (((n - 300) / 2) % 2 == 0) ? 32767 : -32767;
    end
    // pattern for saturation: x[n-2k] = 32767*sign(h[k]) around n = 380
    for (int k = 0; k < NTAPS; k++) xs[380 - k * L] = (h[k] >= 0) ? 32767 : -32767;

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      x_in = 16'(xs[n]);
      en   = 1'b1;
      @(negedge clk);
      en   = 1'b0;
      rh  = fir_ref_raw(xs, n, L, 1'b0, h);
      rhc = fir_ref_raw(xs, n, L, 1'b1, h);
      eh  = sat16(rh);
      ehc = sat16(rhc);
      checks++;
      if (longint'(y_h) != eh || longint'(y_hc) != ehc) begin
        failures++;
        if (failures < 10) $display("n=%0d y_h=%0d (%0d) y_hc=%0d (%0d)", n, y_h, eh, y_hc, ehc);
      end
      checks++;
      if (sat != (rh != eh || rhc != ehc)) begin
        failures++;
        $display("n=%0d sat flag %0d", n, sat);
      end
      if (sat) n_sat++;
      // impulse response: coefficient k appears at sample k*L
      if (n <= (NTAPS - 1) * L && n % L == 0) begin
        checks++;
        if (longint'(y_h) != sat16((approx_ref_s(32767, h[n / L], 16) + 16384) >>> 15)) failures++;
      end
      // gaps between enables: outputs must hold
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        checks++;
        if (longint'(y_h) != eh) failures++;
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never happened"); end
    $display("saturated samples: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
