// tb_hcm_mult2: tests the first multiplier (2FA array).  At n = 8, unsigned
// (Fig. 1) and two's complement (Fig. 2), every operand pair is applied; at
// n = 4 every pair too; at n = 12 and n = 16 random pairs plus the extreme
// operands.  The reference is the product computed by the simulator.
module tb_hcm_mult2;
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
  logic [15:0] p8uu;

  hcm_mult2 #(.N(4), .SIGNED(1'b1), .FINAL(0)) d4u  (.a(a4),  .b(b4),  .p(p4u));
  hcm_mult2 #(.N(4), .SIGNED(1'b1), .FINAL(1)) d4s  (.a(a4),  .b(b4),  .p(p4s));
  hcm_mult2 #(.N(8), .SIGNED(1'b1), .FINAL(0)) d8u  (.a(a8),  .b(b8),  .p(p8u));
  hcm_mult2 #(.N(8), .SIGNED(1'b1), .FINAL(1)) d8s  (.a(a8),  .b(b8),  .p(p8s));
  hcm_mult2 #(.N(12), .SIGNED(1'b1), .FINAL(0)) d12u (.a(a12), .b(b12), .p(p12u));
  hcm_mult2 #(.N(12), .SIGNED(1'b1), .FINAL(1)) d12s (.a(a12), .b(b12), .p(p12s));
  hcm_mult2 #(.N(16), .SIGNED(1'b1), .FINAL(1)) d16s (.a(a16), .b(b16), .p(p16s));
  hcm_mult2 #(.N(8),  .SIGNED(1'b0), .FINAL(0)) d8uu (.a(a8),  .b(b8),  .p(p8uu));

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
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        cmp("8 fig3", longint'(p8u), longint'($signed(a8)) * longint'($signed(b8)), 16);
        cmp("8s", longint'(p8s), longint'($signed(a8)) * longint'($signed(b8)), 16);
        cmp("8 unsigned", longint'(p8uu), longint'(i) * longint'(j), 16);
        if (i < 16 && j < 16) begin
          cmp("4 fig3", longint'(p4u), longint'($signed(a4)) * longint'($signed(b4)), 8);
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
      cmp("12 fig3", longint'(p12u), longint'($signed(a12)) * longint'($signed(b12)), 24);
      cmp("12s", longint'(p12s), longint'($signed(a12)) * longint'($signed(b12)), 24);
      cmp("16s", longint'(p16s), longint'($signed(a16)) * longint'($signed(b16)), 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
