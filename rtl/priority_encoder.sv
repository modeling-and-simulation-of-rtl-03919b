// priority_encoder: position of the most-significant '1' in a W-bit word.
//
// In the unsigned approximate multiplier it sees only the upper half A[N-1:N/2] of an operand
// and reports where that half's leading one sits; the caller turns the position into a right
// shift. Purely combinational. `valid` is the OR of all input bits (the "select" of the 2:1 mux
// that follows); when it is 0, `pos` is 0. The block and its input slice are the published
// design; the highest-index-wins scan is the usual priority-encoder form.
module priority_encoder #(
  parameter int unsigned W  = 8,
  parameter int unsigned PW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  in,
  output logic [PW-1:0] pos,
  output logic          valid
);
  always_comb begin
    pos = '0;
    for (int i = 0; i < W; i++) begin
      if (in[i]) pos = PW'(i);
    end
  end
  assign valid = |in;
endmodule
