// hcm_ppgen: generator of the n*n elementary partial products.
//
// q[i*N+j] = a[i] & b[j] (eq. 3).  With SIGNED = 1 the two's complement
// form of eq. (7) is produced instead: the bits of row i = N-1 and column
// j = N-1 take the complement of the other operand's bit, and q[N-1][N-1]
// is the product of both complemented sign bits.  The paper's arrays draw
// these AND gates outside the cells; here they form one combinational block.
module hcm_ppgen #(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N*N-1:0] q
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        if (SIGNED && i == N-1 && j < N-1)      q[i*N+j] = a[i] & ~b[j];
        else if (SIGNED && i < N-1 && j == N-1) q[i*N+j] = ~a[i] & b[j];
        else if (SIGNED && i == N-1)            q[i*N+j] = ~a[i] & ~b[j];
        else                                    q[i*N+j] = a[i] & b[j];
      end
    end
  end
endmodule
