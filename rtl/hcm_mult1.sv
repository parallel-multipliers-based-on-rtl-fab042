// hcm_mult1: the first multiplier, an n x n parallel multiplier built only
// from 2FA horizontal compressors (Fig. 1 unsigned, Fig. 2 two's complement).
//
// The partial products are split by eq. (4) into an upper half (j >= i) and a
// lower half (j < i).  Each half is an array of 2FA cells (hcm_half2) whose
// columns are only about n/2 cells deep, and the two halves work in
// parallel.  A central row of n-1 2FA cells, the final adder, then adds the
// two half results two bits per cell: cell k takes bits 2k and 2k+1 of the
// upper result and of the lower result and yields product bits p[2k+1:2k].
// Product bit p0 is q[0][0]; p1 comes from a half adder on q[0][1] and
// q[1][0], whose carry enters the first final-adder cell.
//
// With SIGNED = 1 the operands are two's complement (eq. 5 to 7): the
// partial products of the sign row and column are formed with complemented
// inputs, a half adder on the two sign bits adds its XOR at weight n-1 (into
// the lower half) and its AND at weight n (into the upper half), and ones
// are added at weights 2n-2 and 2n-1, i.e. the correction
// (a[n-1]+b[n-1])*2^(n-1) + 3*2^(2n-2) modulo 2^(2n); the constant ones sit
// where Fig. 2 draws them.
//
// Interface: a, b are the operands, p the 2n-bit product.  The block is
// purely combinational.  The paper states its delay as n 2FA cells (plus one
// EX-OR when signed); hcm_pkg::mult1_depth gives n for this wiring.
module hcm_mult1
  import hcm_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N*N-1:0] q;
  logic           s_and;
  logic           s_xor;
  logic [2*N-1:0] ru;
  logic [2*N-1:0] rl;
  logic [N-1:0]   c;

  hcm_ppgen #(.N(N), .SIGNED(SIGNED)) u_pp (.a(a), .b(b), .q(q));

  if (SIGNED) begin : g_sign
    hcm_ha u_sign_ha (.a(a[N-1]), .b(b[N-1]), .s(s_xor), .c(s_and));
  end else begin : g_nosign
    assign s_xor = 1'b0;
    assign s_and = 1'b0;
  end

  hcm_half2 #(.N(N), .SIGNED(SIGNED), .KIND(HALF_UPPER)) u_upper (
    .q(q), .spec(s_and), .r(ru)
  );
  hcm_half2 #(.N(N), .SIGNED(SIGNED), .KIND(HALF_LOWER)) u_lower (
    .q(q), .spec(s_xor), .r(rl)
  );

  assign p[0] = q[0];
  hcm_ha u_lsb_ha (.a(q[1]), .b(q[N]), .s(p[1]), .c(c[0]));

  // Final adder: the central row of the array.
  for (genvar k = 1; k < N; k++) begin : g_final
    hcm_fa2 #(.M(2)) u_cell (
      .a(ru[2*k+1:2*k]), .b(rl[2*k+1:2*k]), .cin(c[k-1]),
      .s(p[2*k+1:2*k]), .cout(c[k])
    );
  end
endmodule
