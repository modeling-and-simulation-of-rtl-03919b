// tb_wlr_unsigned: checks the truncated operand and shift against a leading-one count.
module tb_wlr_unsigned;
  import approx_ref_pkg::*;
  logic [15:0] a;
  logic [7:0]  a_trunc;
  logic [3:0]  shift;
  int checks = 0, failures = 0;

  wlr_unsigned #(.N(16)) dut (.a, .a_trunc, .shift);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned v);
    int s;
    a = 16'(v);
    #1;
    s = trunc_shift(longint'(v), 8);
    checks++;
    if (int'(shift) != s || int'(a_trunc) != int'(v >> s)) begin
      failures++;
      $display("a=%0d shift=%0d trunc=%0d expected %0d %0d", v, shift, a_trunc, s, v >> s);
    end
  endtask

  initial begin
    for (int v = 0; v < 1024; v++) check(v);
    for (int k = 0; k < 16; k++) begin
      check(32'd1 << k);
      check((32'd2 << k) - 1);
    end
    for (int t = 0; t < 20000; t++) check($urandom() & 32'hFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
