// excess_one_converter: binary to excess-one code, out = in + 1.
//
// The unsigned approximate multiplier needs a right shift of (p + 1) when the leading one of
// the operand's upper half is at position p of that half; this block forms p + 1. The output is
// one bit wider than the input so that p = W'max does not wrap. Combinational; written as a
// ripple incrementer (half-adder chain), which is this design's choice of circuit.
module excess_one_converter #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] in,
  output logic [W:0]   out
);
  logic [W:0] carry;
  assign carry[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_ha
    assign out[i]     = in[i] ^ carry[i];
    assign carry[i+1] = in[i] & carry[i];
  end
  assign out[W] = carry[W];
endmodule
