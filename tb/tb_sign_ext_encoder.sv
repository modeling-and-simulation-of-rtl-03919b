// tb_sign_ext_encoder: zeros between the (zero) sign bit and the leading one, all 128 inputs.
module tb_sign_ext_encoder;
  logic [7:0] hi;
  logic [2:0] zcount;
  int checks = 0, failures = 0;

  sign_ext_encoder #(.N(16)) dut (.hi, .zcount);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int z;
    for (int v = 0; v < 128; v++) begin
      hi = 8'(v);
      #1;
      z = 0;
      for (int i = 6; i >= 0; i--) begin
        if ((v >> i) & 1) break;
        z++;
      end
      checks++;
      if (int'(zcount) != z) begin
        failures++;
        $display("hi=%b zcount=%0d expected %0d", hi, zcount, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
