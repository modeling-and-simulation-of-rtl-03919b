// sign_ext_encoder: counts the sign-extension zeros of a positive operand's upper half.
//
// Input is |A|[N-1:N/2], the upper half of an operand magnitude whose bit N-1 (the sign position)
// is zero. The output is the number of zeros immediately below that sign position, i.e. the
// leading-zero count of |A|[N-2:N/2], from 0 to N/2-1 (N/2-1 when the whole half is zero). It is a
// modified priority encoder, as the published design describes; the count is
// log2(N/2) bits wide. Combinational.
module sign_ext_encoder #(
  parameter int unsigned N  = 16,
  parameter int unsigned ZW = $clog2(N / 2)
) (
  input  logic [N/2-1:0] hi,
  output logic [ZW-1:0]  zcount
);
  logic found;
  always_comb begin
    zcount = ZW'(N / 2 - 1);
    found  = 1'b0;
    for (int i = N / 2 - 2; i >= 0; i--) begin
      if (!found && hi[i]) begin
        zcount = ZW'(N / 2 - 2 - i);
        found  = 1'b1;
      end
    end
  end
endmodule
