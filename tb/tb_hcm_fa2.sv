// tb_hcm_fa2: exhaustive test of the m-bit full adder at M = 2 (the 2FA,
// 32 input combinations) and at M = 3 (128 combinations), against the
// integer sum a + b + cin.  Combinational: each vector settles for one time
// unit before the check.
module tb_hcm_fa2;
  int checks = 0;
  int failures = 0;

  logic [1:0] a2, b2, s2;
  logic       c2, co2;
  logic [2:0] a3, b3, s3;
  logic       c3, co3;

  hcm_fa2 #(.M(2)) dut2 (.a(a2), .b(b2), .cin(c2), .s(s2), .cout(co2));
  hcm_fa2 #(.M(3)) dut3 (.a(a3), .b(b3), .cin(c3), .s(s3), .cout(co3));

  initial begin
    #100_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {c2, b2, a2} = 5'(v);
      #1;
      checks++;
      if (int'({co2, s2}) != int'(a2) + int'(b2) + int'(c2)) begin
        failures++;
        $display("FAIL 2FA a=%0d b=%0d cin=%0d -> %0d", a2, b2, c2, {co2, s2});
      end
    end
    for (int v = 0; v < 128; v++) begin
      {c3, b3, a3} = 7'(v);
      #1;
      checks++;
      if (int'({co3, s3}) != int'(a3) + int'(b3) + int'(c3)) begin
        failures++;
        $display("FAIL 3FA a=%0d b=%0d cin=%0d -> %0d", a3, b3, c3, {co3, s3});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
