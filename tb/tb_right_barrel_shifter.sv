// tb_right_barrel_shifter: every shift amount on random and corner 16-bit words, 8-bit result.
module tb_right_barrel_shifter;
  logic [15:0] in;
  logic [3:0]  sh;
  logic [7:0]  out;
  int checks = 0, failures = 0;

  right_barrel_shifter #(.IW(16), .SW(4), .OW(8)) dut (.in, .sh, .out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned v, expv;
    for (int t = 0; t < 400; t++) begin
      v = (t < 4) ? ((t == 0) ? 32'hFFFF : (t == 1) ? 32'h8001 : (t == 2) ? 0 : 32'h5A5A)
                  : ($urandom() & 32'hFFFF);
      for (int s = 0; s < 16; s++) begin
        in = 16'(v);
        sh = 4'(s);
        #1;
        expv = (v / (32'd1 << s)) % 256;
        checks++;
        if (32'(out) != expv) begin
          failures++;
          $display("in=%h sh=%0d out=%h expected %h", in, s, out, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
