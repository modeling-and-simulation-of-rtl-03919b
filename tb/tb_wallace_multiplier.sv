// tb_wallace_multiplier: exhaustive 8 x 8 check, plus random 16 x 16 on a second instance.
module tb_wallace_multiplier;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;

  wallace_multiplier #(.W(8))  dut   (.a(a), .b(b), .p(p));
  wallace_multiplier #(.W(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("%0d*%0d gave %0d", i, j, p);
        end
      end
    end
    for (int t = 0; t < 5000; t++) begin
      a16 = 16'($urandom());
      b16 = (t == 0) ? 16'hFFFF : 16'($urandom());
      if (t == 0) a16 = 16'hFFFF;
      #1;
      checks++;
      if (64'(p16) != 64'(a16) * 64'(b16)) begin
        failures++;
        if (failures < 10) $display("%0d*%0d gave %0d", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
