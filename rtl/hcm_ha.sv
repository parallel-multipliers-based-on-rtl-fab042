// hcm_ha: half adder, drawn in the paper's arrays as a separate AND gate
// (carry) and EX-OR gate (sum).  2*c + s = a + b.  Combinational.
module hcm_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
