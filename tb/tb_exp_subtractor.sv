// tb_exp_subtractor: self-checking test of the inexact exponent subtractor.
//
// Applies the main configuration (EXP_W=11, LOA_N=1) to every pair in a
// 50 x 50 band of exponents, to corners and to random pairs. Two kinds of
// checks:
//  * bit-exact: the expected difference is built from integers (upper
//    field ea_hi + (-eb)_hi, low bit ea0 | (-eb)0), the swap is the
//    inverted carry and the distance the magnitude;
//  * error bound: the signed approximate difference equals ea - eb, or
//    ea - eb - 1 when both exponents are odd.
// An exact instance (LOA_N=0) must match |ea - eb| and the true comparison.
// Combinational: sampled 1 ns after the inputs change.
module tb_exp_subtractor;

  int checks = 0, failures = 0;

  logic [10:0] ea, eb;
  logic        swap1, swap0;
  logic [10:0] el1, sh1, el0, sh0;

  exp_subtractor #(.EXP_W(11), .LOA_N(1)) dut1 (.ea, .eb, .swap(swap1), .e_large(el1), .shamt(sh1));
  exp_subtractor #(.EXP_W(11), .LOA_N(0)) dut0 (.ea, .eb, .swap(swap0), .e_large(el0), .shamt(sh0));

  task automatic check(input string what, input longint got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s ea=%0d eb=%0d: got %0d expected %0d", what, ea, eb, got, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, y);
    int nb, hi, cout, diff, swp, mag, exact, dapprox;
    ea = 11'(x); eb = 11'(y);
    #1;
    nb   = (-y) & 11'h7ff;
    hi   = (x >> 1) + (nb >> 1);
    cout = (hi >> 10) & 1;
    diff = ((hi & 10'h3ff) << 1) | ((x | nb) & 1);
    swp  = !cout;
    mag  = swp ? ((-diff) & 11'h7ff) : diff;
    check("swap", swap1, swp);
    check("shamt", sh1, mag);
    check("e_large", el1, swp ? y : x);
    // error bound: exact, or one too small when both exponents are odd
    if (y != 0) begin
      exact   = x - y;
      dapprox = swap1 ? -int'(sh1) : int'(sh1);
      check("bound", dapprox - exact, (x % 2 == 1 && y % 2 == 1) ? -1 : 0);
    end
    // exact instance; eb = 0 (a zero operand) is left to the special cases
    if (y != 0) begin
      check("exact swap", swap0, y > x);
      check("exact shamt", sh0, (x >= y) ? x - y : y - x);
      check("exact e_large", el0, (y > x) ? y : x);
    end
  endtask

  initial begin
    for (int x = 1000; x < 1050; x++)
      for (int y = 1000; y < 1050; y++) apply(x, y);
    apply(0, 2047); apply(2047, 0); apply(2047, 2047); apply(0, 0);
    for (int t = 0; t < 5000; t++) apply(int'($urandom_range(0, 2047)), int'($urandom_range(0, 2047)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
