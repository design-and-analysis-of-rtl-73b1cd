// tb_floating_point_adder: end-to-end test of the inexact binary64 adder at
// its default configuration (inexact exponent LSB, 8 OR-gate bits in the
// mantissa adder).
//
// Every result is compared with the integer reference model of
// fp_ref_pkg, which follows the algorithm (approximate exponent difference,
// swap, truncating alignment, LOA add/subtract, approximate leading-zero
// count, exponent update, special cases) but not the RTL's structure. In addition, for operands of equal sign and exponents two or
// more apart (where neither approximation can change the operand order)
// the result is held against the real sum: its relative error must stay
// below 2^-44, plus 2^(1-d) for exponents d apart when the approximate
// exponent difference was off by one.
//
// Each mechanism of the adder is counted and a mechanism never exercised is
// a failure: swap, effective subtraction, negative difference, carry
// normalization, left normalization, approximate zero, exponent
// approximation error, overflow, underflow, NaN, infinity, zero operand,
// inexact. Combinational: sampled 1 ns after each input change.
module tb_floating_point_adder;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [63:0] a, b, sum;
  fp_flags_t   flags;

  floating_point_adder dut (.a, .b, .sum, .flags);

  typedef enum int {
    M_SWAP, M_EFF_SUB, M_NEG, M_CARRY, M_LSHIFT, M_APPROX_ZERO, M_EXP_ERR,
    M_OVERFLOW, M_UNDERFLOW, M_NAN, M_INF, M_ZERO_OP, M_INEXACT, M_NUM
  } mech_e;
  int seen [M_NUM];
  string mech_name [M_NUM] = '{"swap", "effective subtraction", "negative difference",
    "carry normalization", "left normalization", "approximate zero",
    "exponent approximation error", "overflow", "underflow", "nan", "infinity",
    "zero operand", "inexact"};

  function automatic logic [63:0] rnd_fp(input int emin, emax);
    return {1'($urandom), 11'($urandom_range(emin, emax)), 20'($urandom), $urandom};
  endfunction

  task automatic apply(input logic [63:0] x, y);
    logic [68:0] m;
    ref_info_t   info;
    real rx, ry, rs, re, bound;
    a = x; b = y;
    #1;
    m = ref_add(x, y, 1, 8, info);
    if (info.swap)        seen[M_SWAP]++;
    if (info.eff_sub)     seen[M_EFF_SUB]++;
    if (info.neg)         seen[M_NEG]++;
    if (info.carry)       seen[M_CARRY]++;
    if (info.lshift)      seen[M_LSHIFT]++;
    if (info.approx_zero) seen[M_APPROX_ZERO]++;
    if (info.exp_err)     seen[M_EXP_ERR]++;
    if (info.overflow)    seen[M_OVERFLOW]++;
    if (info.underflow)   seen[M_UNDERFLOW]++;
    checks++;
    if ({flags, sum} !== m) begin
      failures++;
      if (failures < 20) $display("FAIL %h + %h: got %h flags %b, expected %h flags %b",
                                  x, y, sum, flags, m[63:0], m[68:64]);
    end
    if (flags.nan) seen[M_NAN]++;
    if (x[62:52] == 11'h7FF || y[62:52] == 11'h7FF) seen[M_INF]++;
    if (x[62:52] == 0 || y[62:52] == 0) seen[M_ZERO_OP]++;
    if (flags.inexact) seen[M_INEXACT]++;
    // accuracy against the real sum
    if (x[63] == y[63] && x[62:52] != 0 && y[62:52] != 0 && x[62:52] < 11'd2040 && y[62:52] < 11'd2040) begin
      int dex;
      dex = int'(x[62:52]) - int'(y[62:52]);
      if (dex >= 2 || dex <= -2) begin
        rx = $bitstoreal(x); ry = $bitstoreal(y);
        rs = rx + ry;
        re = ($bitstoreal(sum) - rs) / rs;
        if (re < 0) re = -re;
        checks++;
        // A shift distance off by one changes the smaller operand by at
        // most its own value, which is below 2^(1-|dex|) of the sum.
        bound = 2.0 ** -44 + (info.exp_err ? 2.0 ** (1 - (dex < 0 ? -dex : dex)) : 0.0);
        if (!(re < bound)) begin
          failures++;
          $display("FAIL accuracy %h + %h rel err %g", x, y, re);
        end
      end
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] x;
    // directed cases
    apply(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000);   // 1 + 1
    apply(64'h3FF8_0000_0000_0000, 64'hBFF8_0000_0000_0000);   // 1.5 - 1.5
    apply(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF);   // overflow
    apply(64'h0010_0000_0000_0001, 64'h8010_0000_0000_0000);   // underflow
    apply(64'h0018_0000_0000_0000, 64'h8010_0000_0000_0000);   // small difference
    apply(64'h7FF0_0000_0000_0000, 64'hFFF0_0000_0000_0000);   // inf - inf
    apply(64'h7FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000);   // inf + 1
    apply(64'h7FF8_0000_0000_0000, 64'h3FF0_0000_0000_0000);   // NaN
    apply(64'h0000_0000_0000_0000, 64'h4000_0000_0000_0000);   // 0 + 2
    apply(64'h3FF0_0000_0000_0000, 64'hC000_0000_0000_0000);   // 1 - 2
    apply(64'h4000_0000_0000_0000, 64'h3FF8_0000_0000_0000);   // exp differ in LSB only
    // random: wide range, close exponents, equal exponents
    for (int t = 0; t < 20000; t++) begin
      x = rnd_fp(1, 2046);
      case (t % 4)
        0: apply(x, rnd_fp(1, 2046));
        1: apply(x, {1'($urandom), 11'(int'(x[62:52]) + $urandom_range(0, 6) - 3), 20'($urandom), $urandom});
        2: if (t % 8 == 2) apply(x, {~x[63], x[62:0]});            // x - x
           else apply(x, {~x[63], x[62:52], x[51:12], 12'($urandom)});
        default: apply(x, {1'($urandom), x[62:52], 20'($urandom), $urandom});
      endcase
    end
    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-30s seen %0d times", mech_name[i], seen[i]);
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
