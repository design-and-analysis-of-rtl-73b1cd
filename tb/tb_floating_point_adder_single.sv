// tb_floating_point_adder_single: the adder built for IEEE 754 binary32
// (EXP_W = 8, FRAC_W = 23), i.e. an 8-bit exponent subtractor and a 24-bit
// significand LOA with carry out (25 result bits).
//
// Instance 'ex' has its approximations switched off and is held against
// real arithmetic: the error must stay within 2^-22 of the larger operand
// magnitude, and x + (-x) must be zero. Instance 'ap' (inexact exponent
// LSB, 4 inexact significand bits) is checked for the bound that holds
// whatever the approximation: for same-sign operands with even exponents
// (where the exponent difference is exact) the relative error stays below
// 2^-18. Operands and results are converted to real numbers exactly by
// widening them to binary64. Combinational: sampled 1 ns after
// each input change.
module tb_floating_point_adder_single;
  import fp_pkg::*;

  int checks = 0, failures = 0;
  int n_zero = 0, n_sub = 0;

  logic [31:0] a, b, s_ex, s_ap;
  fp_flags_t   f_ex, f_ap;

  floating_point_adder #(.EXP_W(8), .FRAC_W(23), .EXP_LOA_N(0), .MANT_LOA_N(0)) ex (
    .a, .b, .sum(s_ex), .flags(f_ex));
  floating_point_adder #(.EXP_W(8), .FRAC_W(23), .EXP_LOA_N(1), .MANT_LOA_N(4)) ap (
    .a, .b, .sum(s_ap), .flags(f_ap));

  // A normal binary32 value is exactly representable in binary64: widen
  // the exponent (rebias 127 -> 1023) and pad the fraction.
  function automatic real to_real(input logic [31:0] v);
    logic [63:0] d;
    d = (v[30:23] == 0) ? {v[31], 63'd0}
                        : {v[31], 11'(int'(v[30:23]) + 896), v[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, y;
    real rx, ry, rs, err, big;
    int  ey;
    for (int t = 0; t < 20000; t++) begin
      x  = {1'($urandom), 8'($urandom_range(30, 220)), 23'($urandom)};
      ey = int'(x[30:23]) + int'($urandom_range(0, 8)) - 4;
      y  = {1'($urandom), 8'(ey), 23'($urandom)};
      if (t % 5 == 0) y = {~x[31], x[30:0]};
      a = x; b = y;
      #1;
      rx = to_real(x); ry = to_real(y); rs = rx + ry;
      big = (rx < 0 ? -rx : rx) > (ry < 0 ? -ry : ry) ? (rx < 0 ? -rx : rx) : (ry < 0 ? -ry : ry);
      if (x[31] != y[31]) n_sub++;
      if (f_ex.zero) n_zero++;
      err = to_real(s_ex) - rs;
      if (err < 0) err = -err;
      checks++;
      if (!(err <= big * 2.0 ** -22) || (y == {~x[31], x[30:0]} && s_ex != 32'd0)) begin
        failures++;
        if (failures < 20) $display("FAIL exact %h + %h -> %h", x, y, s_ex);
      end
      if (x[31] == y[31] && !x[23] && !y[23]) begin
        err = (to_real(s_ap) - rs) / rs;
        if (err < 0) err = -err;
        checks++;
        if (!(err < 2.0 ** -18)) begin
          failures++;
          if (failures < 20) $display("FAIL approx %h + %h -> %h, rel err %g", x, y, s_ap, err);
        end
      end
    end
    checks++;
    if (n_zero == 0 || n_sub == 0) begin
      failures++;
      $display("FAIL subtraction or zero result never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
