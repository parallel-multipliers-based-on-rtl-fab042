// tb_hcm_half1: tests the 1FA carry-save half arrays of the second
// multiplier, upper and lower, with and without the signed extra bits, at
// n = 8 and n = 12.  The half ends in two numbers; their sum is checked.
//
// The partial product vector q and the extra bit are driven with random
// values.  The reference is the sum, modulo 2^(2n), of the bits the half is
// meant to add, written out here from the split of eq. (4):
//   upper: q[i][j] 2^(i+j) for j >= i, except q[0][0], q[0][1], q[n-1][n-1];
//          signed adds spec 2^n + 2^(2n-2);
//   lower: q[i][j] 2^(i+j) for j < i, except q[1][0], plus q[n-1][n-1];
//          signed adds spec 2^(n-1) + 2^(2n-1).
module tb_hcm_half1;
  import hcm_pkg::*;
  int checks = 0;
  int failures = 0;

  logic [63:0]  q8;
  logic [143:0] q12;
  logic         sp;
  logic [15:0]  r8s [4];
  logic [15:0]  r8t [4];
  logic [23:0]  r12s [4];
  logic [23:0]  r12t [4];

  hcm_half1 #(.N(8),  .SIGNED(1'b0), .KIND(HALF_UPPER)) u8u  (.q(q8),  .spec(1'b0), .rs(r8s[0]), .rt(r8t[0]));
  hcm_half1 #(.N(8),  .SIGNED(1'b0), .KIND(HALF_LOWER)) u8l  (.q(q8),  .spec(1'b0), .rs(r8s[1]), .rt(r8t[1]));
  hcm_half1 #(.N(8),  .SIGNED(1'b1), .KIND(HALF_UPPER)) s8u  (.q(q8),  .spec(sp),   .rs(r8s[2]), .rt(r8t[2]));
  hcm_half1 #(.N(8),  .SIGNED(1'b1), .KIND(HALF_LOWER)) s8l  (.q(q8),  .spec(sp),   .rs(r8s[3]), .rt(r8t[3]));
  hcm_half1 #(.N(12), .SIGNED(1'b0), .KIND(HALF_UPPER)) u12u (.q(q12), .spec(1'b0), .rs(r12s[0]), .rt(r12t[0]));
  hcm_half1 #(.N(12), .SIGNED(1'b0), .KIND(HALF_LOWER)) u12l (.q(q12), .spec(1'b0), .rs(r12s[1]), .rt(r12t[1]));
  hcm_half1 #(.N(12), .SIGNED(1'b1), .KIND(HALF_UPPER)) s12u (.q(q12), .spec(sp),   .rs(r12s[2]), .rt(r12t[2]));
  hcm_half1 #(.N(12), .SIGNED(1'b1), .KIND(HALF_LOWER)) s12l (.q(q12), .spec(sp),   .rs(r12s[3]), .rt(r12t[3]));

  // Reference sum of one half; q is passed as an array of bits.
  function automatic longint ref_sum(int n, int sgn, int upper,
                                     logic [143:0] q, logic s);
    longint acc;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) begin
        logic take;
        if (upper != 0)
          take = (j >= i) && !(i == 0 && j == 0) && !(i == 0 && j == 1) &&
                 !(i == n-1 && j == n-1);
        else
          take = ((j < i) && !(i == 1 && j == 0)) || (i == n-1 && j == n-1);
        if (take && q[i*n+j]) acc += longint'(1) << (i + j);
      end
    end
    if (sgn != 0 && upper != 0) acc += (longint'(s) << n) + (longint'(1) << (2*n-2));
    if (sgn != 0 && upper == 0) acc += (longint'(s) << (n-1)) + (longint'(1) << (2*n-1));
    return acc & ((longint'(1) << (2*n)) - 1);
  endfunction

  task automatic cmp(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
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
    for (int t = 0; t < 20000; t++) begin
      for (int w = 0; w < 5; w++) q12[w*32 +: 32] = (w == 4) ? 32'($urandom & 32'hffff) : $urandom;
      q8 = {$urandom, $urandom};
      // every few vectors, all ones, to drive every carry
      if (t % 97 == 0) begin
        q8  = '1;
        q12 = '1;
      end
      sp = 1'($urandom);
      #1;
      cmp("8 upper",       ((longint'(r8s[0]) + longint'(r8t[0])) & 64'hffff),  ref_sum(8, 0, 1, 144'(q8), 1'b0));
      cmp("8 lower",       ((longint'(r8s[1]) + longint'(r8t[1])) & 64'hffff),  ref_sum(8, 0, 0, 144'(q8), 1'b0));
      cmp("8 upper sgn",   ((longint'(r8s[2]) + longint'(r8t[2])) & 64'hffff),  ref_sum(8, 1, 1, 144'(q8), sp));
      cmp("8 lower sgn",   ((longint'(r8s[3]) + longint'(r8t[3])) & 64'hffff),  ref_sum(8, 1, 0, 144'(q8), sp));
      cmp("12 upper",      ((longint'(r12s[0]) + longint'(r12t[0])) & 64'hffffff), ref_sum(12, 0, 1, q12, 1'b0));
      cmp("12 lower",      ((longint'(r12s[1]) + longint'(r12t[1])) & 64'hffffff), ref_sum(12, 0, 0, q12, 1'b0));
      cmp("12 upper sgn",  ((longint'(r12s[2]) + longint'(r12t[2])) & 64'hffffff), ref_sum(12, 1, 1, q12, sp));
      cmp("12 lower sgn",  ((longint'(r12s[3]) + longint'(r12t[3])) & 64'hffffff), ref_sum(12, 1, 0, q12, sp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
