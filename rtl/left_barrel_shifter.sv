// left_barrel_shifter: logarithmic left barrel shifter that widens its input (correction logic).
//
// Zero-extends the IW-bit truncated product to OW bits and shifts it left by `sh` places, the
// sum of the two operands' right shifts, restoring the product's scale. SW stages of 2:1
// multiplexers, stage k shifting by 2^k when sh[k] is set. Combinational. The published design gives the
// block's role; the stage structure is this design's choice.
module left_barrel_shifter #(
  parameter int unsigned IW = 16,
  parameter int unsigned SW = 5,
  parameter int unsigned OW = 32
) (
  input  logic [IW-1:0] in,
  input  logic [SW-1:0] sh,
  output logic [OW-1:0] out
);
  logic [OW-1:0] stage [SW+1];
  always_comb begin
    stage[0] = OW'(in);
    for (int k = 0; k < SW; k++) begin
      stage[k+1] = sh[k] ? (stage[k] << (1 << k)) : stage[k];
    end
  end
  assign out = stage[SW];
endmodule
