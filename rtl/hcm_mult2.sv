// hcm_mult2: the second multiplier (Fig. 3 and Fig. 4 of the paper).
//
// It uses the same split of the partial products into an upper (j >= i) and
// a lower (j < i) half as the first multiplier, but each half is a carry
// save array of plain 1FA cells (hcm_half1) and so ends in two numbers.  The
// final adder must therefore add four numbers: the two carry-save results of
// each half.  FINAL selects how:
//
//   FINAL = 0 (Fig. 3): three rows of 2FA ripple-carry adders arranged as a
//     small tree: one row adds the two upper numbers, one the two lower
//     numbers, and the third adds their results.
//   FINAL = 1 (Fig. 4): one row of n-1 cells of eq. (8).  The cell of
//     weights (2k, 2k+1) takes the four bits of weight 2k and the carry s2 of
//     the cell to its right as its five weight-1 inputs, the four bits of
//     weight 2k+1 and that cell's s3 as its five weight-2 inputs, and gives
//     p[2k+1:2k] on s1:s0.
//
// As in the first multiplier p0 is q[0][0] and p1 comes from a half adder on
// q[0][1] and q[1][0], whose carry enters the final adder at weight 2.  The
// two's complement correction (SIGNED = 1, the paper's configuration) is
// the same as in hcm_mult1.  Purely combinational; the paper gives the delay
// as n cells for FINAL = 0 and n-1 cells for FINAL = 1, plus one EX-OR.
module hcm_mult2
  import hcm_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1,
  parameter int unsigned FINAL  = 0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N*N-1:0] q;
  logic           s_and;
  logic           s_xor;
  logic [2*N-1:0] us;
  logic [2*N-1:0] ut;
  logic [2*N-1:0] ls;
  logic [2*N-1:0] lt;
  logic           c1;

  hcm_ppgen #(.N(N), .SIGNED(SIGNED)) u_pp (.a(a), .b(b), .q(q));

  if (SIGNED) begin : g_sign
    hcm_ha u_sign_ha (.a(a[N-1]), .b(b[N-1]), .s(s_xor), .c(s_and));
  end else begin : g_nosign
    assign s_xor = 1'b0;
    assign s_and = 1'b0;
  end

  hcm_half1 #(.N(N), .SIGNED(SIGNED), .KIND(HALF_UPPER)) u_upper (
    .q(q), .spec(s_and), .rs(us), .rt(ut)
  );
  hcm_half1 #(.N(N), .SIGNED(SIGNED), .KIND(HALF_LOWER)) u_lower (
    .q(q), .spec(s_xor), .rs(ls), .rt(lt)
  );

  assign p[0] = q[0];
  hcm_ha u_lsb_ha (.a(q[1]), .b(q[N]), .s(p[1]), .c(c1));

  if (FINAL == 0) begin : g_tree
    logic [2*N-3:0] r1;
    logic [2*N-3:0] r2;
    logic           co1;
    logic           co2;
    logic           co3;
    hcm_rca2 #(.D(N-1)) u_row_upper (
      .a(us[2*N-1:2]), .b(ut[2*N-1:2]), .cin(c1), .s(r1), .cout(co1)
    );
    hcm_rca2 #(.D(N-1)) u_row_lower (
      .a(ls[2*N-1:2]), .b(lt[2*N-1:2]), .cin(1'b0), .s(r2), .cout(co2)
    );
    hcm_rca2 #(.D(N-1)) u_row_sum (
      .a(r1), .b(r2), .cin(1'b0), .s(p[2*N-1:2]), .cout(co3)
    );
  end else begin : g_cell8
    logic [3:0] cs [N];
    assign cs[0] = {1'b0, c1, 2'b00};  // HA carry enters as a weight-1 input
    for (genvar k = 1; k < N; k++) begin : g_cell
      hcm_cell8 u_cell (
        .x({us[2*k+1], ut[2*k+1], ls[2*k+1], lt[2*k+1], cs[k-1][3]}),
        .y({us[2*k],   ut[2*k],   ls[2*k],   lt[2*k],   cs[k-1][2]}),
        .s(cs[k])
      );
      assign p[2*k+1:2*k] = cs[k][1:0];
    end
  end
endmodule
