// shift_control: inverter-based control logic of the signed approximate multiplier.
//
// From the sign-extension-zero counts z1, z2 of the two operands it forms the right shifts that
// bring each magnitude down to N/2 bits, and their sum for the left barrel shifter. With
// N/2 - 1 = 2^ZW - 1 the shift is (N/2 - 1) - z, which in ZW bits is simply the bitwise inverse
// of z; hence "inverter based". A magnitude below 2^(N/2) gives z = N/2 - 1 and a zero shift.
// Combinational. The inverter form is the published one; the adder for the sum is this
// design's own way of producing "Shift 1 + Shift 2".
module shift_control #(
  parameter int unsigned N  = 16,
  parameter int unsigned ZW = $clog2(N / 2)
) (
  input  logic [ZW-1:0] z1,
  input  logic [ZW-1:0] z2,
  output logic [ZW-1:0] shift1,
  output logic [ZW-1:0] shift2,
  output logic [ZW:0]   shift_sum
);
  assign shift1    = ~z1;
  assign shift2    = ~z2;
  assign shift_sum = {1'b0, shift1} + {1'b0, shift2};
endmodule
