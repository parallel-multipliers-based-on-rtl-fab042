// tb_hcm_ha: exhaustive test of the half adder against a + b.
module tb_hcm_ha;
  int checks = 0;
  int failures = 0;
  logic a, b, s, c;

  hcm_ha dut (.*);

  initial begin
    #10_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {b, a} = 2'(v);
      #1;
      checks++;
      if (int'({c, s}) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> %0d", a, b, {c, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
