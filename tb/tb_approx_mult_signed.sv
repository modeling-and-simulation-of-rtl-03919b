// tb_approx_mult_signed: signed 16 x 16 approximate multiplier. Checks the worked example
// -259 x 517 = -133128 (truncated operands 129 and 129, shifts 1 and 2), exactness for
// magnitudes below 2^8, the excluded operand -32768 (gives 0), sign symmetry and random operands
// against the arithmetic reference model.
module tb_approx_mult_signed;
  import approx_ref_pkg::*;
  logic signed [15:0] a, x;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  approx_mult_signed #(.N(16)) dut (.a, .x, .p);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint va, input longint vx);
    longint expv;
    a = 16'(va);
    x = 16'(vx);
    #1;
    expv = approx_ref_s(va, vx, 16);
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      if (failures < 20) $display("%0d*%0d = %0d expected %0d", va, vx, p, expv);
    end
  endtask

  initial begin
    longint p1;
    a = -16'sd259;
    x = 16'sd517;
    #1;
    checks++;
    if (p != -32'sd133128) begin failures++; $display("-259*517 gave %0d", p); end
    checks++;
    if (dut.t_a != 8'd129 || dut.t_x != 8'd129 || dut.sh_a != 3'd1 || dut.sh_x != 3'd2) begin
      failures++;
      $display("example internals: %0d %0d %0d %0d", dut.t_a, dut.t_x, dut.sh_a, dut.sh_x);
    end
    for (int i = -255; i < 256; i += 7)
      for (int j = -255; j < 256; j += 11) begin
        check(i, j);
        checks++;
        if (longint'(p) != longint'(i * j)) failures++;
      end
    check(-32768, 1234);
    checks++;
    if (p != 0) failures++;
    check(32767, 32767);
    check(-32767, 32767);
    check(-32767, -32767);
    for (int t = 0; t < 50000; t++) begin
      longint va = longint'(signed'(16'($urandom())));
      longint vx = longint'(signed'(16'($urandom())));
      check(va, vx);
      if (va != -32768 && vx != -32768) begin
        p1 = longint'(p);
        check(-va, vx);
        checks++;
        if (longint'(p) != -p1) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
