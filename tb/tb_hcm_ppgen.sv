// tb_hcm_ppgen: tests the partial product generator, unsigned and two's
// complement, for every pair of 6-bit operands.  Each bit is compared with
// its definition (eq. 3 and eq. 7), and for the signed form the identity
// a*b = sum(q'[i][j] 2^(i+j)) + (a[n-1]+b[n-1]) 2^(n-1) + 3*2^(2n-2)
// (mod 2^(2n)) is checked as well.
module tb_hcm_ppgen;
  localparam int N = 6;
  int checks = 0;
  int failures = 0;
  logic [N-1:0]   a, b;
  logic [N*N-1:0] qu, qs;

  hcm_ppgen #(.N(N), .SIGNED(1'b0)) dut_u (.a(a), .b(b), .q(qu));
  hcm_ppgen #(.N(N), .SIGNED(1'b1)) dut_s (.a(a), .b(b), .q(qs));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    longint sum;
    longint prod;
    for (int va = 0; va < (1 << N); va++) begin
      for (int vb = 0; vb < (1 << N); vb++) begin
        a = N'(va);
        b = N'(vb);
        #1;
        sum = 0;
        for (int i = 0; i < N; i++) begin
          for (int j = 0; j < N; j++) begin
            checks++;
            if (qu[i*N+j] != (a[i] & b[j])) failures++;
            if (i == N-1 && j == N-1)  e = ~a[i] & ~b[j];
            else if (i == N-1)         e = a[i] & ~b[j];
            else if (j == N-1)         e = ~a[i] & b[j];
            else                       e = a[i] & b[j];
            checks++;
            if (qs[i*N+j] != e) failures++;
            if (qs[i*N+j]) sum += longint'(1) << (i + j);
          end
        end
        sum += (longint'(a[N-1]) + longint'(b[N-1])) << (N-1);
        sum += longint'(3) << (2*N-2);
        prod = longint'($signed(a)) * longint'($signed(b));
        checks++;
        if (((sum - prod) & ((longint'(1) << (2*N)) - 1)) != 0) begin
          failures++;
          $display("FAIL identity a=%0d b=%0d", $signed(a), $signed(b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
