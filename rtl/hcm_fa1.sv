// hcm_fa1: one-bit full adder (1FA), the cell of the carry-save halves of
// the second multiplier.  2*cout + s = a + b + cin.  Combinational.
module hcm_fa1 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
