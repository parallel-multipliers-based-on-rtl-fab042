// hcm_cell8: the counter cell of eq. (8), used in the alternative final
// adder of the second multiplier (Fig. 4).
//
// It adds five bits of weight 2 (x) and five bits of weight 1 (y):
// s = 2*(x0+..+x4) + (y0+..+y4), 0 <= s <= 15, on four output bits.  In the
// final adder a cell at weights (2k, 2k+1) takes the four operand bits of
// each weight plus s2 and s3 of the cell to its right; s0 and s1 are product
// bits.  The paper gives only the arithmetic function; the insides here are
// a plain population count.  Combinational.
module hcm_cell8 (
  input  logic [4:0] x,
  input  logic [4:0] y,
  output logic [3:0] s
);
  logic [2:0] nx;
  logic [2:0] ny;
  always_comb begin
    nx = 3'(x[0]) + 3'(x[1]) + 3'(x[2]) + 3'(x[3]) + 3'(x[4]);
    ny = 3'(y[0]) + 3'(y[1]) + 3'(y[2]) + 3'(y[3]) + 3'(y[4]);
    s  = {nx, 1'b0} + {1'b0, ny};
  end
endmodule
