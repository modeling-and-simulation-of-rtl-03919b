// tb_left_barrel_shifter: every shift amount 0..31 on random and corner words, 32-bit result.
module tb_left_barrel_shifter;
  logic [15:0] in;
  logic [4:0]  sh;
  logic [31:0] out;
  int checks = 0, failures = 0;

  left_barrel_shifter #(.IW(16), .SW(5), .OW(32)) dut (.in, .sh, .out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned v, expv;
    for (int t = 0; t < 300; t++) begin
      v = (t == 0) ? 64'hFFFF : (t == 1) ? 64'h8001 : longint'($urandom() & 32'hFFFF);
      for (int s = 0; s < 32; s++) begin
        in = 16'(v);
        sh = 5'(s);
        #1;
        expv = (v * (64'd1 << s)) % (64'd1 << 32);
        checks++;
        if (64'(out) != expv) begin
          failures++;
          $display("in=%h sh=%0d out=%h expected %h", in, s, out, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
