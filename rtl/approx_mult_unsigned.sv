// approx_mult_unsigned: N x N unsigned approximate multiplier with a 2N-bit result.
//
// Each operand passes through wordlength-reduction logic that right-shifts it until it fits in
// N/2 bits, keeping the N/2 bits from its leading one down. One exact N/2 x N/2 Wallace-tree
// multiplier multiplies the two truncated operands, and a 2N-bit left barrel shifter moves the
// N-bit product back up by the sum of the two shifts. Operands below 2^(N/2) are not truncated,
// so products of two such operands are exact; otherwise the result is never above the exact
// product and lies within about 2^-(N/2-2) of it relatively. Fully combinational, no clock. The
// block structure is the published one (wordlength reduction, arithmetic unit, correction logic).
module approx_mult_unsigned #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   x,
  output logic [2*N-1:0] p
);
  localparam int unsigned HW  = N / 2;
  localparam int unsigned SHW = $clog2(N / 2) + 1;

  logic [HW-1:0]  a_t, x_t;
  logic [SHW-1:0] sh_a, sh_x;
  logic [N-1:0]   p_t;
  logic [SHW:0]   sh_sum;

  wlr_unsigned #(.N(N)) u_wlr_a (.a(a), .a_trunc(a_t), .shift(sh_a));
  wlr_unsigned #(.N(N)) u_wlr_x (.a(x), .a_trunc(x_t), .shift(sh_x));

  wallace_multiplier #(.W(HW)) u_mul (.a(a_t), .b(x_t), .p(p_t));

  assign sh_sum = {1'b0, sh_a} + {1'b0, sh_x};

  left_barrel_shifter #(.IW(N), .SW(SHW + 1), .OW(2 * N)) u_lbs (
    .in (p_t),
    .sh (sh_sum),
    .out(p)
  );
endmodule
