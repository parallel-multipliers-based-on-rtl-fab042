// hcm_top: the multipliers of the paper side by side on shared operands.
//
//   p_fig1 : first multiplier, 2FA array, unsigned operands (Fig. 1)
//   p_fig2 : first multiplier, 2FA array, two's complement (Fig. 2)
//   p_fig3 : second multiplier, 1FA halves, 2FA final adder tree (Fig. 3)
//   p_fig4 : second multiplier, 1FA halves, eq. (8) final adder (Fig. 4)
//
// All four are combinational n x n multipliers with a 2n-bit product; the
// operands a and b feed every one of them.  Bringing the variants together
// in one top is this design's own choice, for comparison and testing.
module hcm_top #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p_fig1,
  output logic [2*N-1:0] p_fig2,
  output logic [2*N-1:0] p_fig3,
  output logic [2*N-1:0] p_fig4
);
  hcm_mult1 #(.N(N), .SIGNED(1'b0)) u_fig1 (.a(a), .b(b), .p(p_fig1));
  hcm_mult1 #(.N(N), .SIGNED(1'b1)) u_fig2 (.a(a), .b(b), .p(p_fig2));
  hcm_mult2 #(.N(N), .SIGNED(1'b1), .FINAL(0)) u_fig3 (.a(a), .b(b), .p(p_fig3));
  hcm_mult2 #(.N(N), .SIGNED(1'b1), .FINAL(1)) u_fig4 (.a(a), .b(b), .p(p_fig4));
endmodule
