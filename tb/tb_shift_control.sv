// tb_shift_control: shift = 7 - zero count for each operand, and their sum, all 64 cases.
module tb_shift_control;
  logic [2:0] z1, z2, shift1, shift2;
  logic [3:0] shift_sum;
  int checks = 0, failures = 0;

  shift_control #(.N(16)) dut (.z1, .z2, .shift1, .shift2, .shift_sum);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        z1 = 3'(i);
        z2 = 3'(j);
        #1;
        checks++;
        if (int'(shift1) != 7 - i || int'(shift2) != 7 - j || int'(shift_sum) != 14 - i - j) begin
          failures++;
          $display("z=%0d,%0d -> %0d %0d %0d", i, j, shift1, shift2, shift_sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
