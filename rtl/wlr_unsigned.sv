// wlr_unsigned: wordlength-reduction logic of the unsigned approximate multiplier.
//
// Cuts an N-bit unsigned operand down to the N/2 bits that begin at its leading one. A priority
// encoder finds the leading one p in the upper half A[N-1:N/2]; a binary-to-excess-one converter
// forms p+1; a 2:1 mux, selected by the OR of the upper half, passes p+1 or 0 as the shift; a
// right barrel shifter applies it. An operand that already fits in N/2 bits is passed unshifted
// and exactly. Outputs: the N/2-bit truncated operand and the shift (0..N/2), which the
// correction logic later undoes. Combinational. This chain of blocks is the published one.
module wlr_unsigned #(
  parameter int unsigned N   = 16,
  parameter int unsigned HW  = N / 2,
  parameter int unsigned PW  = $clog2(N / 2),
  parameter int unsigned SHW = $clog2(N / 2) + 1
) (
  input  logic [N-1:0]   a,
  output logic [HW-1:0]  a_trunc,
  output logic [SHW-1:0] shift
);
  logic [PW-1:0]  pos;
  logic           sel;
  logic [PW:0]    pos_p1;

  priority_encoder #(.W(HW), .PW(PW)) u_pe (
    .in   (a[N-1:HW]),
    .pos  (pos),
    .valid(sel)
  );

  excess_one_converter #(.W(PW)) u_x1 (
    .in (pos),
    .out(pos_p1)
  );

  // 2:1 mux: shift by p+1 only when the upper half holds a one
  assign shift = sel ? SHW'(pos_p1) : '0;

  right_barrel_shifter #(.IW(N), .SW(SHW), .OW(HW)) u_rbs (
    .in (a),
    .sh (shift),
    .out(a_trunc)
  );
endmodule
