// tb_floating_point_adder_variants: the adder in other approximation
// settings, checked against the fp_ref_pkg reference model.
//
//  * d1: all 53 significand-adder bits inexact (OR gates only) with an
//        exact exponent subtractor: the "all-bit inexact mantissa adder"
//        design point;
//  * d2: the default design point (inexact exponent LSB, 8 inexact
//        significand bits), for comparison;
//  * dm: a middle point, 2 inexact exponent bits and 26 inexact
//        significand bits.
// All three see the same random operands (same-sign and mixed-sign, close
// and distant exponents). Besides the bit-exact comparison the test prints
// the mean relative error of each against the real sum over same-sign
// operands, for information. Combinational: sampled 1 ns after each input.
module tb_floating_point_adder_variants;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_carry_dm = 0, n_sub = 0;

  logic [63:0] a, b, s1, s2, sm;
  fp_flags_t   f1, f2, fm;

  floating_point_adder #(.EXP_LOA_N(0), .MANT_LOA_N(53)) d1 (.a, .b, .sum(s1), .flags(f1));
  floating_point_adder                                   d2 (.a, .b, .sum(s2), .flags(f2));
  floating_point_adder #(.EXP_LOA_N(2), .MANT_LOA_N(26)) dm (.a, .b, .sum(sm), .flags(fm));

  real err_sum [3];
  int  err_n = 0;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string name, input logic [68:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s %h + %h: got %h expected %h", name, a, b, got, exp);
    end
  endtask

  function automatic real relerr(input logic [63:0] r, input real exact);
    real e;
    e = ($bitstoreal(r) - exact) / exact;
    return e < 0 ? -e : e;
  endfunction

  initial begin
    logic [63:0] x, y;
    ref_info_t   info;
    real         rs;
    for (int t = 0; t < 20000; t++) begin
      x = {1'($urandom), 11'($urandom_range(100, 1900)), 20'($urandom), $urandom};
      y = {1'($urandom), 11'(int'(x[62:52]) + $urandom_range(0, 60) - 30), 20'($urandom), $urandom};
      a = x; b = y;
      #1;
      cmp("d1", {f1, s1}, ref_add(x, y, 0, 53, info));
      cmp("d2", {f2, s2}, ref_add(x, y, 1, 8, info));
      cmp("dm", {fm, sm}, ref_add(x, y, 2, 26, info));
      if (info.carry) n_carry_dm++;
      if (info.eff_sub) n_sub++;
      if (x[63] == y[63]) begin
        rs = $bitstoreal(x) + $bitstoreal(y);
        err_sum[0] += relerr(s1, rs);
        err_sum[1] += relerr(s2, rs);
        err_sum[2] += relerr(sm, rs);
        err_n++;
      end
    end
    $display("mean relative error, same-sign operands (%0d): d1 %g, d2 %g, dm %g",
             err_n, err_sum[0] / err_n, err_sum[1] / err_n, err_sum[2] / err_n);
    checks++;
    if (n_carry_dm == 0 || n_sub == 0) begin
      failures++;
      $display("FAIL carry or subtraction never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
