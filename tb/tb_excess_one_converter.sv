// tb_excess_one_converter: exhaustive check that out = in + 1 without wrap-around.
module tb_excess_one_converter;
  logic [2:0] in;
  logic [3:0] out;
  int checks = 0, failures = 0;

  excess_one_converter #(.W(3)) dut (.in, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      in = 3'(v);
      #1;
      checks++;
      if (int'(out) != v + 1) begin
        failures++;
        $display("in=%0d out=%0d", v, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
