// delay_line: sample-enabled shift register that delays a signed sample stream by DEPTH samples.
//
// The FRM filter bank subtracts outputs of branches with different group delays; these lines
// align the shorter branches with the longest one (the published structure does not show them,
// but the band-pass differences only form when the linear-phase responses are time aligned).
// On each clock with `en` the input enters and everything moves one place; `out` is the value
// that entered DEPTH enables earlier. Asynchronous active-low reset clears it.
module delay_line #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 81
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] in,
  output logic signed [W-1:0] out
);
  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (en) begin
      mem[0] <= in;
      for (int i = 1; i < DEPTH; i++) mem[i] <= mem[i-1];
    end
  end
  assign out = mem[DEPTH-1];
endmodule
