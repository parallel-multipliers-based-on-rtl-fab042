// tb_hcm_top: end-to-end test of all four multipliers at the default size.
//
// Every pair of 8-bit operands is applied (65536 vectors).  The products
// are compared with a reference computed here from the operands: a * b for
// the unsigned array, $signed(a) * $signed(b) for the three two's
// complement arrays.  The test also counts how often the mechanisms of the
// arrays are exercised (sign correction with one or two negative operands,
// the half adder carry at weight 2, the largest products) and counts a
// failure for one that never happens.  The arrays are combinational: each
// vector is applied, allowed to settle for one time unit, then checked.  A
// watchdog ends the run if it has not finished in time.
module tb_hcm_top;
  localparam int unsigned N = 8;

  logic [N-1:0]   a;
  logic [N-1:0]   b;
  logic [2*N-1:0] p_fig1;
  logic [2*N-1:0] p_fig2;
  logic [2*N-1:0] p_fig3;
  logic [2*N-1:0] p_fig4;

  int checks   = 0;
  int failures = 0;
  int n_one_neg  = 0;
  int n_both_neg = 0;
  int n_ha_carry = 0;
  int n_max      = 0;

  hcm_top dut (.*);

  task automatic check(string what, logic [2*N-1:0] got, logic [2*N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s a=%0h b=%0h got=%0h exp=%0h", what, a, b, got, exp);
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
    logic [2*N-1:0] eu;
    logic [2*N-1:0] es;
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        eu = (2*N)'(i * j);
        es = (2*N)'($signed({{(32-N){a[N-1]}}, a}) * $signed({{(32-N){b[N-1]}}, b}));
        check("fig1", p_fig1, eu);
        check("fig2", p_fig2, es);
        check("fig3", p_fig3, es);
        check("fig4", p_fig4, es);
        if (a[N-1] ^ b[N-1]) n_one_neg++;
        if (a[N-1] & b[N-1]) n_both_neg++;
        if (a[0] & b[1] & a[1] & b[0]) n_ha_carry++;
        if (eu == (2*N)'((2**N-1) * (2**N-1))) n_max++;
      end
    end
    $display("one negative operand: %0d, both negative: %0d, lsb half adder carry: %0d, largest product: %0d",
             n_one_neg, n_both_neg, n_ha_carry, n_max);
    if (n_one_neg == 0)  failures++;
    if (n_both_neg == 0) failures++;
    if (n_ha_carry == 0) failures++;
    if (n_max == 0)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
