// tb_approx_mult_unsigned: unsigned 16 x 16 approximate multiplier against the arithmetic
// reference model, on exhaustive small operands (exact path), corners and random operands.
// Also checks the bound the scheme guarantees: approximate <= exact, relative error < 2^-6.
module tb_approx_mult_unsigned;
  import approx_ref_pkg::*;
  logic [15:0] a, x;
  logic [31:0] p;
  int checks = 0, failures = 0;

  approx_mult_unsigned #(.N(16)) dut (.a, .x, .p);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned va, input longint unsigned vx);
    longint unsigned expv, exact;
    a = 16'(va);
    x = 16'(vx);
    #1;
    expv  = approx_ref_u(va, vx, 16);
    exact = va * vx;
    checks++;
    if (64'(p) != expv) begin
      failures++;
      if (failures < 20) $display("%0d*%0d = %0d expected %0d", va, vx, p, expv);
    end
    checks++;
    if (64'(p) > exact || (exact - 64'(p)) * 64 > exact) begin
      failures++;
      if (failures < 20) $display("%0d*%0d = %0d out of error bound (exact %0d)", va, vx, p, exact);
    end
  endtask

  initial begin
    // both operands below 2^8: product must be exact
    for (int i = 0; i < 256; i += 3)
      for (int j = 0; j < 256; j += 5) begin
        check(i, j);
        checks++;
        if (64'(p) != longint'(i * j)) failures++;
      end
    check(16'hFFFF, 16'hFFFF);
    check(259, 517);   // truncated to 129 x 129, shifted 3: 133128
    checks++;
    if (p != 32'd133128) begin failures++; $display("259*517 gave %0d", p); end
    check(256, 256);
    check(255, 65535);
    for (int t = 0; t < 50000; t++) check($urandom() & 32'hFFFF, $urandom() & 32'hFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
