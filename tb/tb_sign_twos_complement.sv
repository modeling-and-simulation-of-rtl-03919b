// tb_sign_twos_complement: sign and magnitude of every 16-bit value.
module tb_sign_twos_complement;
  logic [15:0] in, mag;
  logic        sign;
  int checks = 0, failures = 0;

  sign_twos_complement #(.N(16)) dut (.in, .sign, .mag);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, m;
    for (int u = 0; u < 65536; u++) begin
      in = 16'(u);
      #1;
      v = (u >= 32768) ? u - 65536 : u;
      m = (v < 0) ? -v : v;
      checks++;
      if (sign != (v < 0) || int'(mag) != m) begin
        failures++;
        if (failures < 10) $display("in=%0d sign=%0d mag=%0d", v, sign, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
