// tb_priority_encoder: exhaustive check of the 8-bit priority encoder against a scan from the top.
module tb_priority_encoder;
  logic [7:0] in;
  logic [2:0] pos;
  logic       valid;
  int checks = 0, failures = 0;

  priority_encoder #(.W(8)) dut (.in, .pos, .valid);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_pos;
    for (int v = 0; v < 256; v++) begin
      in = 8'(v);
      #1;
      exp_pos = 0;
      for (int i = 7; i >= 0; i--) if (v >= (1 << i)) begin exp_pos = i; break; end
      checks++;
      if (valid !== (v != 0)) begin failures++; $display("valid wrong for %0d", v); end
      if (v != 0) begin
        checks++;
        if (int'(pos) != exp_pos) begin
          failures++;
          $display("in=%b pos=%0d expected %0d", in, pos, exp_pos);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
