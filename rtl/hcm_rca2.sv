// hcm_rca2: ripple-carry adder of D 2FA cells, one row of the final adder
// of the multipliers.  cout*2^(2D) + s = a + b + cin.  The carry moves two
// bit positions per cell, so a row of 2D bits is D cells deep.
// Combinational.
module hcm_rca2 #(
  parameter int unsigned D = 7
) (
  input  logic [2*D-1:0] a,
  input  logic [2*D-1:0] b,
  input  logic           cin,
  output logic [2*D-1:0] s,
  output logic           cout
);
  logic [D:0] c;
  assign c[0] = cin;
  for (genvar k = 0; k < D; k++) begin : g_cell
    hcm_fa2 #(.M(2)) u_cell (
      .a(a[2*k+1:2*k]), .b(b[2*k+1:2*k]), .cin(c[k]),
      .s(s[2*k+1:2*k]), .cout(c[k+1])
    );
  end
  assign cout = c[D];
endmodule
