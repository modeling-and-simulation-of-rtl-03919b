// tb_sign_set: negation of the product magnitude exactly when the operand signs differ.
module tb_sign_set;
  logic [31:0] mag, p;
  logic        sign1, sign2;
  int checks = 0, failures = 0;

  sign_set #(.N(16)) dut (.mag, .sign1, .sign2, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m, e;
    for (int t = 0; t < 2000; t++) begin
      m = (t == 0) ? 0 : (t == 1) ? 133128 : longint'($urandom() & 32'h3FFFFFFF);
      for (int s = 0; s < 4; s++) begin
        mag   = 32'(m);
        sign1 = s[0];
        sign2 = s[1];
        #1;
        e = (s == 1 || s == 2) ? -m : m;
        checks++;
        if (longint'(signed'(p)) != e) begin
          failures++;
          if (failures < 10) $display("mag=%0d s=%0d p=%0d", m, s, signed'(p));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
