// tb_delay_line: a 7-deep line must return each sample exactly 7 enables later, ignoring clocks
// without enable, and read zero after reset.
module tb_delay_line;
  localparam int D = 7;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [15:0] in = '0, out;
  int checks = 0, failures = 0;
  logic signed [15:0] hist [$];

  delay_line #(.W(16), .DEPTH(D)) dut (.clk, .rst_n, .en, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      checks++;
      if (out != ((n >= D) ? hist[n - D] : 16'sd0)) begin
        failures++;
        $display("n=%0d out=%0d", n, out);
      end
      in = 16'($urandom());
      hist.push_back(in);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
