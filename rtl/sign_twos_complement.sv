// sign_twos_complement: sign detect and two's complement (input stage of the signed multiplier).
//
// Takes an N-bit two's-complement operand and returns its sign bit and its magnitude. A negative
// operand is negated (invert and add one). The most negative value -2^(N-1) is outside the
// multiplier's range, as in the published design; its magnitude comes out as 2^(N-1), bit N-1 set,
// which the later stages do not look at, so that operand multiplies as 0. Combinational.
module sign_twos_complement #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] in,
  output logic         sign,
  output logic [N-1:0] mag
);
  assign sign = in[N-1];
  assign mag  = sign ? (~in + N'(1)) : in;
endmodule
