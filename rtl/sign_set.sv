// sign_set: output stage of the signed approximate multiplier.
//
// Gives the unsigned 2N-bit approximate product the sign of the true product: when exactly one
// operand was negative (SIGN1 xor SIGN2) the magnitude is negated in two's complement.
// Combinational. Function as published; the XOR-and-negate circuit is this design's choice.
module sign_set #(
  parameter int unsigned N = 16
) (
  input  logic [2*N-1:0] mag,
  input  logic           sign1,
  input  logic           sign2,
  output logic [2*N-1:0] p
);
  assign p = (sign1 ^ sign2) ? (~mag + (2 * N)'(1)) : mag;
endmodule
