// right_barrel_shifter: logarithmic right barrel shifter with a narrower output.
//
// Shifts the IW-bit unsigned input right by `sh` places (zeros enter at the top) and keeps the
// low OW bits. In the approximate multipliers it truncates an N-bit operand to the N/2 bits that
// start at its leading one. Built as SW stages of 2:1 multiplexers, stage k shifting by 2^k when
// sh[k] is set. Combinational. The stage structure is this design's choice; the published design names
// the block only.
module right_barrel_shifter #(
  parameter int unsigned IW = 16,
  parameter int unsigned SW = 4,
  parameter int unsigned OW = 8
) (
  input  logic [IW-1:0] in,
  input  logic [SW-1:0] sh,
  output logic [OW-1:0] out
);
  logic [IW-1:0] stage [SW+1];
  always_comb begin
    stage[0] = in;
    for (int k = 0; k < SW; k++) begin
      stage[k+1] = sh[k] ? (stage[k] >> (1 << k)) : stage[k];
    end
  end
  assign out = stage[SW][OW-1:0];
endmodule
