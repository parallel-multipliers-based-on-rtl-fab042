// tb_hcm_cell8: exhaustive test of the eq. (8) counter cell: all 1024
// settings of its ten inputs, against 2 * (ones in x) + (ones in y).
module tb_hcm_cell8;
  int checks = 0;
  int failures = 0;
  logic [4:0] x, y;
  logic [3:0] s;

  hcm_cell8 dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int v = 0; v < 1024; v++) begin
      {x, y} = 10'(v);
      #1;
      exp = 0;
      for (int i = 0; i < 5; i++) exp += 2 * int'(x[i]) + int'(y[i]);
      checks++;
      if (int'(s) != exp) begin
        failures++;
        $display("FAIL x=%b y=%b -> %0d exp %0d", x, y, s, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
