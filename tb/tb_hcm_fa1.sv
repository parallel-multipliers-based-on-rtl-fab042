// tb_hcm_fa1: exhaustive test of the one-bit full adder against the
// integer sum a + b + cin.
module tb_hcm_fa1;
  int checks = 0;
  int failures = 0;
  logic a, b, cin, s, cout;

  hcm_fa1 dut (.*);

  initial begin
    #10_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cin, b, a} = 3'(v);
      #1;
      checks++;
      if (int'({cout, s}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
