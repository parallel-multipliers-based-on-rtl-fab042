// hcm_half1: one n x (n/2) half of the second multiplier, a carry-save array
// of 1FA cells (Fig. 3 of the paper).
//
// KIND selects the upper (j >= i) or lower (j < i) partial products, with
// the same bit lists as the first multiplier (hcm_pkg::half_bit).  Column w
// is a chain of full adders: the first adds three input bits, each further
// one adds the sum of the adder above and two more bits.  The inputs of a
// column are its partial products followed by the carries of all adders of
// column w-1, so no carry ripples along a level and the half ends in carry
// save form: two numbers rs and rt with rs + rt equal to the sum of the
// half's bits modulo 2^(2n).  The paper gives the carry-save principle; the
// column-by-column placement of the adders is this design's own.
// Combinational; spec is the extra sign bit of a signed half (0 otherwise).
module hcm_half1
  import hcm_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1,
  parameter int          KIND   = HALF_UPPER
) (
  input  logic [N*N-1:0] q,
  input  logic           spec,
  output logic [2*N-1:0] rs,
  output logic [2*N-1:0] rt
);
  localparam int MAXM = 4*N + 4;

  function automatic logic pick(int code, logic [N*N-1:0] qv, logic sp);
    if (code >= 0)              return qv[code];
    else if (code == CODE_ONE)  return 1'b1;
    else if (code == CODE_SPEC) return sp;
    else                        return 1'b0;
  endfunction

  for (genvar w = 0; w < 2*N; w++) begin : g_col
    localparam int F  = fa1_cells(N, SIGNED, KIND, w);
    localparam int FP = (w == 0) ? 0 : fa1_cells(N, SIGNED, KIND, w-1);
    localparam int B  = half_bit(N, SIGNED, KIND, w, -1);

    logic [MAXM-1:0] comb;  // data bits of weight w, then carries of w-1
    for (genvar x = 0; x < MAXM; x++) begin : g_in
      if (x < B) begin : g_d
        assign comb[x] = pick(half_bit(N, SIGNED, KIND, w, x), q, spec);
      end else if (x - B < FP) begin : g_c
        assign comb[x] = g_col[w-1].g_cell[x - B].cc;
      end else begin : g_z
        assign comb[x] = 1'b0;
      end
    end

    for (genvar k = 0; k < F; k++) begin : g_cell
      logic fa;
      logic cs;  // sum of this adder
      logic cc;  // carry of this adder
      if (k == 0) begin : g_top
        assign fa = comb[0];
      end else begin : g_mid
        assign fa = g_cell[k-1].cs;
      end
      hcm_fa1 u_cell (
        .a(fa), .b(comb[2*k+1]), .cin(comb[2*k+2]),
        .s(cs), .cout(cc)
      );
    end

    if (F > 0) begin : g_out
      assign rs[w] = g_cell[F-1].cs;
      assign rt[w] = comb[2*F+1];
    end else begin : g_pass
      assign rs[w] = comb[0];
      assign rt[w] = comb[1];
    end
  end
endmodule
