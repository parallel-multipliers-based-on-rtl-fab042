// hcm_fa2: m-bit full adder (mFA), the pure horizontal compressor.
//
// Adds two M-bit numbers a and b and a carry-in, giving an M-bit sum s and a
// carry-out: cout*2^M + s = a + b + cin (eq. 1 of the paper).  With the
// default M = 2 it is the 2FA cell of the arrays: two weights, two bits per
// weight, one carry in and one carry out two positions to the left.  The
// cell is purely combinational; how it is built inside (here a plain
// addition left to synthesis) is not fixed by the paper.
module hcm_fa2 #(
  parameter int unsigned M = 2
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         cout
);
  always_comb begin
    {cout, s} = {1'b0, a} + {1'b0, b} + {{M{1'b0}}, cin};
  end
endmodule
