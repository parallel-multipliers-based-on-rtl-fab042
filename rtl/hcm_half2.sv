// hcm_half2: one n x (n/2) half of the first multiplier, an array of 2FA
// cells (Fig. 1 and Fig. 2 of the paper).
//
// KIND = HALF_UPPER reduces the partial products q[i][j] with j >= i,
// KIND = HALF_LOWER those with j < i (eq. 4); the exact bit lists come from
// hcm_pkg::half_bit.  The array is organised in digit columns of two
// weights: column d of the upper half spans weights 2d and 2d+1, column d
// of the lower half weights 2d+1 and 2d+2, i.e. the lower half is the mirror
// of the upper one shifted one position.  The top cell of a column adds the
// first two rows of that column (the q[0][*] and q[1][*] bits in the upper
// half, as printed in Fig. 1); every further cell adds the two-bit sum from
// the cell above and one more row.  The columns are aligned at the bottom,
// next to the final adder, and each cell takes the carry of the cell at the
// same level in the column to its right, so every level is a ripple-carry
// chain and a column is only about n/2 cells deep.  The top cells of the
// growing columns receive no carry (Fig. 1 prints a 0 there).  The result
// bits of digit column d are then ready after d cell delays, just in time
// for the final adder, whose carry also reaches digit d after d cells; this
// is what gives the whole multiplier its delay of n cells.  Where the chains
// end at the left edge (a carry input with no incoming carry takes a data
// bit, and the topmost carries that find no cell at their level enter the
// next column as data bits) is this design's own choice.
//
// The result is one binary number r with a single bit per weight: the two
// bits leaving the bottom cell of each column.  Carries of weight 2n and
// above are dropped, so r equals the sum of the half's bits modulo 2^(2n).
// Combinational; spec is the extra sign bit of a signed half (0 otherwise).
module hcm_half2
  import hcm_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b0,
  parameter int          KIND   = HALF_UPPER
) (
  input  logic [N*N-1:0] q,
  input  logic           spec,
  output logic [2*N-1:0] r
);
  localparam int OFF  = fa2_off(KIND);
  localparam int MAXL = 2*N + 2;

  function automatic logic pick(int code, logic [N*N-1:0] qv, logic sp);
    if (code >= 0)              return qv[code];
    else if (code == CODE_ONE)  return 1'b1;
    else if (code == CODE_SPEC) return sp;
    else                        return 1'b0;
  endfunction

  // Digit 0 has no cells: the upper half has no bits there (q[0][0] and
  // q[0][1] are handled outside), the lower half passes q[2][0] through.
  if (KIND == HALF_UPPER) begin : g_d0u
    assign r[1:0] = 2'b00;
  end else begin : g_d0l
    assign r[0] = 1'b0;
    assign r[1] = 1'b0;
    assign r[2] = (half_bit(N, SIGNED, KIND, 2, -1) > 0) ?
                  pick(half_bit(N, SIGNED, KIND, 2, 0), q, spec) : 1'b0;
  end

  for (genvar d = 1; d < N; d++) begin : g_col
    localparam int C  = fa2_cells(N, SIGNED, KIND, d);
    localparam int WL = 2*d + OFF;
    localparam int L  = half_bit(N, SIGNED, KIND, WL, -1);
    localparam int H  = (KIND == HALF_LOWER && d == N-1) ? 0 :
                        half_bit(N, SIGNED, KIND, WL+1, -1);

    logic [MAXL-1:0] lcomb;  // low-weight data bits, then spare carries
    logic [MAXL-1:0] hcomb;  // high-weight data bits

    for (genvar x = 0; x < MAXL; x++) begin : g_in
      if (x < L) begin : g_ld
        assign lcomb[x] = pick(half_bit(N, SIGNED, KIND, WL, x), q, spec);
      end else if (x - L < fa2_extra(N, SIGNED, KIND, d)) begin : g_lc
        assign lcomb[x] = g_col[d-1].g_cell[x - L].cc;
      end else begin : g_lz
        assign lcomb[x] = 1'b0;
      end
      if (x < H) begin : g_hd
        assign hcomb[x] = pick(half_bit(N, SIGNED, KIND, WL+1, x), q, spec);
      end else begin : g_hz
        assign hcomb[x] = 1'b0;
      end
    end

    for (genvar k = 0; k < C; k++) begin : g_cell
      logic [1:0] ca;
      logic [1:0] cb;
      logic       ci;
      logic [1:0] cs;  // sum of this cell
      logic       cc;  // carry of this cell
      // Position in lcomb of the first low-weight slot of this cell, and the
      // cell of column d-1 at the same level, whose carry enters here.
      localparam int BASE = fa2_base(N, SIGNED, KIND, d, k);
      localparam int CSRC = fa2_cin_src(N, SIGNED, KIND, d, k);
      if (k == 0) begin : g_top
        assign ca = {hcomb[0], lcomb[0]};
        assign cb = {hcomb[1], lcomb[1]};
      end else begin : g_mid
        assign ca = g_cell[k-1].cs;
        assign cb = {hcomb[k+1], lcomb[BASE]};
      end
      if (CSRC >= 0) begin : g_cin
        assign ci = g_col[d-1].g_cell[CSRC].cc;
      end else begin : g_dcin
        // no carry arrives here: the carry input takes a data bit
        assign ci = lcomb[BASE + ((k == 0) ? 2 : 1)];
      end
      hcm_fa2 #(.M(2)) u_cell (
        .a(ca), .b(cb), .cin(ci), .s(cs), .cout(cc)
      );
    end

    if (C > 0) begin : g_out
      assign r[WL] = g_cell[C-1].cs[0];
      if (WL + 1 < 2*N) begin : g_hi
        assign r[WL+1] = g_cell[C-1].cs[1];
      end
    end else begin : g_pass
      assign r[WL] = lcomb[0];
      if (WL + 1 < 2*N) begin : g_hi
        assign r[WL+1] = hcomb[0];
      end
    end
  end
endmodule
