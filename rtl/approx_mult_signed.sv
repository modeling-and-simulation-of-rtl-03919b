// approx_mult_signed: N x N two's-complement approximate multiplier with a 2N-bit result.
//
// Each operand's sign is split off and its magnitude formed. A sign-extension encoder counts the
// zeros below the sign position in the magnitude's upper half; the inverter-based control logic
// turns the count into a right shift that leaves N/2 significant bits (none when the magnitude
// is already below 2^(N/2)). Two right barrel shifters truncate the magnitudes, an exact
// N/2 x N/2 Wallace-tree multiplier multiplies them, a left barrel shifter restores the scale by
// the sum of the shifts, and the sign-set stage negates the result when the operand signs
// differ. Example for N=16: -259 x 517 gives -133128 (exact -133903). The operand -2^(N-1) is
// outside the range and multiplies as 0. Fully combinational, no clock. The block structure is
// the published one; the shifter and adder circuits are this design's.
module approx_mult_signed #(
  parameter int unsigned N = 16
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   x,
  output logic signed [2*N-1:0] p
);
  localparam int unsigned HW = N / 2;
  localparam int unsigned ZW = $clog2(N / 2);

  logic          s_a, s_x;
  logic [N-1:0]  m_a, m_x;
  logic [ZW-1:0] z_a, z_x, sh_a, sh_x;
  logic [ZW:0]   sh_sum;
  logic [HW-1:0] t_a, t_x;
  logic [N-1:0]  p_t;
  logic [2*N-1:0] p_mag, p_signed;

  sign_twos_complement #(.N(N)) u_sa (.in(a), .sign(s_a), .mag(m_a));
  sign_twos_complement #(.N(N)) u_sx (.in(x), .sign(s_x), .mag(m_x));

  sign_ext_encoder #(.N(N)) u_ea (.hi(m_a[N-1:HW]), .zcount(z_a));
  sign_ext_encoder #(.N(N)) u_ex (.hi(m_x[N-1:HW]), .zcount(z_x));

  shift_control #(.N(N)) u_ctl (
    .z1(z_a), .z2(z_x), .shift1(sh_a), .shift2(sh_x), .shift_sum(sh_sum)
  );

  right_barrel_shifter #(.IW(N), .SW(ZW), .OW(HW)) u_rbs_a (.in(m_a), .sh(sh_a), .out(t_a));
  right_barrel_shifter #(.IW(N), .SW(ZW), .OW(HW)) u_rbs_x (.in(m_x), .sh(sh_x), .out(t_x));

  wallace_multiplier #(.W(HW)) u_mul (.a(t_a), .b(t_x), .p(p_t));

  left_barrel_shifter #(.IW(N), .SW(ZW + 1), .OW(2 * N)) u_lbs (
    .in(p_t), .sh(sh_sum), .out(p_mag)
  );

  sign_set #(.N(N)) u_ss (.mag(p_mag), .sign1(s_a), .sign2(s_x), .p(p_signed));

  assign p = signed'(p_signed);
endmodule
