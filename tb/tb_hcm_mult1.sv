// tb_hcm_mult1: tests the first multiplier (2FA array).  At n = 8, unsigned
// (Fig. 1) and two's complement (Fig. 2), every operand pair is applied; at
// n = 4 every pair too; at n = 12 and n = 16 random pairs plus the extreme
// operands.  The reference is the product computed by the simulator.
// The arrays are combinational, so instead of a cycle count the test checks
// the delay of the wiring in 2FA cells, from the package's delay model,
// against the paper's figure of n cells (Table II), and the number of 2FA
// cells against the paper's (n^2/2) - 1, reported but not checked.
module tb_hcm_mult1;
  import hcm_pkg::*;
  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  a8, b8;
  logic [11:0] a12, b12;
  logic [15:0] a16, b16;
  logic [7:0]  p4u, p4s;
  logic [15:0] p8u, p8s;
  logic [23:0] p12u, p12s;
  logic [31:0] p16s;

  hcm_mult1 #(.N(4),  .SIGNED(1'b0)) d4u  (.a(a4),  .b(b4),  .p(p4u));
  hcm_mult1 #(.N(4),  .SIGNED(1'b1)) d4s  (.a(a4),  .b(b4),  .p(p4s));
  hcm_mult1 #(.N(8),  .SIGNED(1'b0)) d8u  (.a(a8),  .b(b8),  .p(p8u));
  hcm_mult1 #(.N(8),  .SIGNED(1'b1)) d8s  (.a(a8),  .b(b8),  .p(p8s));
  hcm_mult1 #(.N(12), .SIGNED(1'b0)) d12u (.a(a12), .b(b12), .p(p12u));
  hcm_mult1 #(.N(12), .SIGNED(1'b1)) d12s (.a(a12), .b(b12), .p(p12s));
  hcm_mult1 #(.N(16), .SIGNED(1'b1)) d16s (.a(a16), .b(b16), .p(p16s));

  task automatic cmp(string what, longint got, longint exp, int w);
    longint m;
    m = (longint'(1) << w) - 1;
    checks++;
    if ((got & m) != (exp & m)) begin
      failures++;
      if (failures <= 10) $display("FAIL %s got=%0h exp=%0h", what, got & m, exp & m);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 4; n <= 16; n += 4) begin
      for (int sg = 0; sg < 2; sg++) begin
        int dep;
        int cells;
        dep   = mult1_depth(n, sg[0]);
        cells = fa2_half_cells(n, sg[0], HALF_UPPER) + fa2_half_cells(n, sg[0], HALF_LOWER) + n - 1;
        $display("n=%0d signed=%0d: delay %0d cells (paper: n = %0d), %0d 2FA cells (paper: %0d)",
                 n, sg, dep, n, cells, n*n/2 - 1);
        checks++;
        if (dep != n) failures++;
      end
    end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        cmp("8u", longint'(p8u), longint'(i) * longint'(j), 16);
        cmp("8s", longint'(p8s), longint'($signed(a8)) * longint'($signed(b8)), 16);
        if (i < 16 && j < 16) begin
          cmp("4u", longint'(p4u), longint'(i) * longint'(j), 8);
          cmp("4s", longint'(p4s), longint'($signed(a4)) * longint'($signed(b4)), 8);
        end
      end
    end
    for (int t = 0; t < 20000; t++) begin
      a12 = 12'($urandom);
      b12 = 12'($urandom);
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      if (t < 4) begin
        a12 = (t[0]) ? 12'hfff : 12'h800;
        b12 = (t[1]) ? 12'hfff : 12'h800;
        a16 = (t[0]) ? 16'hffff : 16'h8000;
        b16 = (t[1]) ? 16'hffff : 16'h8000;
      end
      #1;
      cmp("12u", longint'(p12u), longint'(a12) * longint'(b12), 24);
      cmp("12s", longint'(p12s), longint'($signed(a12)) * longint'($signed(b12)), 24);
      cmp("16s", longint'(p16s), longint'($signed(a16)) * longint'($signed(b16)), 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
