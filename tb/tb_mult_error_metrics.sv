// tb_mult_error_metrics: error characterisation of the approximate multipliers on 100,000 uniform
// random operand pairs for each of 8-, 16- and 32-bit unsigned and signed versions. Measures the
// error rate, the normalised mean error distance (NMED), the mean relative error distance (MRED)
// and the share of products whose relative error is below 0.5/1/2/5/10/20 %, and checks them
// against the expected figures:
//   16-bit unsigned: ER 99.95 %, NMED 0.13 %, MRED 0.53 %;  16-bit signed: ER 99.87 %, MRED 0.52 %
//   RE < 0.5/1/2/5/10/20 %: unsigned 8-bit 3.79/5.4/9.6/31.7/79.8/100, 16-bit 47/97/100,
//   signed 8-bit 9.3/10.72/16.1/41.7/85.6/100, 16-bit 48.6/97.23/100; 32-bit: all below 0.5 %.
// NMED is normalised by the largest exact product of the operand range; for the signed
// multiplier the expected 0.032 % corresponds to normalising by (2^16-1)^2 instead, which is
// also checked. The tolerances allow for the different random samples.
module tb_mult_error_metrics;
  localparam int CNT = 100000;

  logic [7:0]  ua8,  ux8;   logic [15:0] up8;
  logic [15:0] ua16, ux16;  logic [31:0] up16;
  logic [31:0] ua32, ux32;  logic [63:0] up32;
  logic signed [7:0]  sa8,  sx8;   logic signed [15:0] sp8;
  logic signed [15:0] sa16, sx16;  logic signed [31:0] sp16;
  logic signed [31:0] sa32, sx32;  logic signed [63:0] sp32;
  int checks = 0, failures = 0;

  approx_mult_unsigned #(.N(8))  u8  (.a(ua8),  .x(ux8),  .p(up8));
  approx_mult_unsigned #(.N(16)) u16 (.a(ua16), .x(ux16), .p(up16));
  approx_mult_unsigned #(.N(32)) u32 (.a(ua32), .x(ux32), .p(up32));
  approx_mult_signed   #(.N(8))  s8  (.a(sa8),  .x(sx8),  .p(sp8));
  approx_mult_signed   #(.N(16)) s16 (.a(sa16), .x(sx16), .p(sp16));
  approx_mult_signed   #(.N(32)) s32 (.a(sa32), .x(sx32), .p(sp32));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(input string what, input real got, input real want, input real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("%s = %f, expected %f +- %f", what, got, want, tol);
    end
  endtask

  // one configuration: n bits, signed or not; returns metrics in percent
  task automatic measure(input int n, input bit sgn, output real er, output real nmed,
                         output real mred, output real frac [6], output real med);
    real    lim [6] = '{0.5, 1.0, 2.0, 5.0, 10.0, 20.0};
    real    sum_ed = 0, sum_re = 0, ed, ex, ap, mmax;
    int     n_err = 0, n_nz = 0, below [6];
    longint ra, rx, lo;
    foreach (below[i]) below[i] = 0;
    lo = longint'(1) <<< (n - 1);
    for (int t = 0; t < CNT; t++) begin
      if (sgn) begin
        ra = longint'({$urandom(), $urandom()} % (2 * lo - 1)) - (lo - 1);
        rx = longint'({$urandom(), $urandom()} % (2 * lo - 1)) - (lo - 1);
      end else begin
        ra = longint'({$urandom(), $urandom()} % (2 * lo));
        rx = longint'({$urandom(), $urandom()} % (2 * lo));
      end
      case ({sgn, n[5:0]})
        {1'b0, 6'd8}:  begin ua8  = 8'(ra);  ux8  = 8'(rx);  end
        {1'b0, 6'd16}: begin ua16 = 16'(ra); ux16 = 16'(rx); end
        {1'b0, 6'd32}: begin ua32 = 32'(ra); ux32 = 32'(rx); end
        {1'b1, 6'd8}:  begin sa8  = 8'(ra);  sx8  = 8'(rx);  end
        {1'b1, 6'd16}: begin sa16 = 16'(ra); sx16 = 16'(rx); end
        default:       begin sa32 = 32'(ra); sx32 = 32'(rx); end
      endcase
      #1;
      case ({sgn, n[5:0]})
        {1'b0, 6'd8}:  ap = real'(up8);
        {1'b0, 6'd16}: ap = real'(up16);
        {1'b0, 6'd32}: ap = real'(up32);
        {1'b1, 6'd8}:  ap = real'(sp8);
        {1'b1, 6'd16}: ap = real'(sp16);
        default:       ap = real'(sp32);
      endcase
      ex = real'(ra) * real'(rx);
      ed = (ex > ap) ? ex - ap : ap - ex;
      if (ed != 0.0) n_err++;
      sum_ed += ed;
      if (ex != 0.0) begin
        real re = 100.0 * ed / ((ex < 0) ? -ex : ex);
        n_nz++;
        sum_re += re;
        foreach (lim[i]) if (re < lim[i]) below[i]++;
      end
    end
    mmax = sgn ? real'(lo - 1) * real'(lo - 1) : real'(2 * lo - 1) * real'(2 * lo - 1);
    er   = 100.0 * n_err / CNT;
    med  = sum_ed / CNT;
    nmed = 100.0 * med / mmax;
    mred = sum_re / n_nz;
    foreach (frac[i]) frac[i] = 100.0 * below[i] / n_nz;
    $display("%0d-bit %s: ER %.3f %%  NMED %.4f %%  MRED %.4f %%  RE<0.5/1/2/5/10/20 %%: %.2f %.2f %.2f %.2f %.2f %.2f",
             n, sgn ? "signed" : "unsigned", er, nmed, mred,
             frac[0], frac[1], frac[2], frac[3], frac[4], frac[5]);
  endtask

  initial begin
    real er, nmed, mred, med, fr [6];
    measure(8, 1'b0, er, nmed, mred, fr, med);
    near("u8 RE<0.5", fr[0], 3.79, 1.0);  near("u8 RE<1", fr[1], 5.4, 1.0);
    near("u8 RE<2", fr[2], 9.6, 1.0);     near("u8 RE<5", fr[3], 31.7, 1.5);
    near("u8 RE<10", fr[4], 79.8, 1.5);   near("u8 RE<20", fr[5], 100.0, 0.01);
    measure(16, 1'b0, er, nmed, mred, fr, med);
    near("u16 ER", er, 99.95, 0.05);      near("u16 NMED", nmed, 0.13, 0.01);
    near("u16 MRED", mred, 0.53, 0.02);
    near("u16 RE<0.5", fr[0], 47.0, 1.5); near("u16 RE<1", fr[1], 97.0, 1.0);
    near("u16 RE<2", fr[2], 100.0, 0.01);
    measure(32, 1'b0, er, nmed, mred, fr, med);
    near("u32 RE<0.5", fr[0], 100.0, 0.01);
    measure(8, 1'b1, er, nmed, mred, fr, med);
    near("s8 RE<0.5", fr[0], 9.3, 1.0);   near("s8 RE<1", fr[1], 10.72, 1.0);
    near("s8 RE<2", fr[2], 16.1, 1.0);    near("s8 RE<5", fr[3], 41.7, 1.5);
    near("s8 RE<10", fr[4], 85.6, 1.5);   near("s8 RE<20", fr[5], 100.0, 0.01);
    measure(16, 1'b1, er, nmed, mred, fr, med);
    near("s16 ER", er, 99.87, 0.08);      near("s16 MRED", mred, 0.52, 0.02);
    near("s16 NMED / (2^16-1)^2", 100.0 * med / (65535.0 * 65535.0), 0.032, 0.003);
    near("s16 RE<0.5", fr[0], 48.6, 1.5); near("s16 RE<1", fr[1], 97.23, 1.0);
    near("s16 RE<2", fr[2], 100.0, 0.01);
    measure(32, 1'b1, er, nmed, mred, fr, med);
    near("s32 RE<0.5", fr[0], 100.0, 0.01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
