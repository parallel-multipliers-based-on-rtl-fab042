// tb_hcm_rca2: tests the 2FA ripple-carry adder row with D = 7 (14 bits) on
// random operands and on all-ones operands (longest carry), and with D = 2
// exhaustively, against the integer sum.
module tb_hcm_rca2;
  int checks = 0;
  int failures = 0;
  logic [13:0] a, b, s;
  logic        cin, cout;
  logic [3:0]  a2, b2, s2;
  logic        c2, co2;

  hcm_rca2 #(.D(7)) dut  (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  hcm_rca2 #(.D(2)) dut2 (.a(a2), .b(b2), .cin(c2), .s(s2), .cout(co2));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      a = 14'($urandom);
      b = 14'($urandom);
      cin = 1'($urandom);
      if (t == 0) begin
        a = '1;
        b = 14'd0;
        cin = 1'b1;
      end
      #1;
      checks++;
      if (int'({cout, s}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        if (failures <= 10) $display("FAIL a=%0d b=%0d cin=%0d -> %0d", a, b, cin, {cout, s});
      end
    end
    for (int v = 0; v < 512; v++) begin
      {c2, b2, a2} = 9'(v);
      #1;
      checks++;
      if (int'({co2, s2}) != int'(a2) + int'(b2) + int'(c2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
