// tb_floating_point_adder_exact: the adder with its approximations switched
// off (EXP_LOA_N = 0, MANT_LOA_N = 0), held against real arithmetic.
//
// With both LOAs exact, the only difference from an IEEE adder is that the
// result is truncated and no guard bits are kept. The absolute error is
// then below 2^-51 times the larger operand magnitude, and x + (-x) is
// exactly zero. Random operands over the full exponent range and close
// exponents; results that overflow or underflow are checked for their
// flags only. Combinational: sampled 1 ns after each input change.
module tb_floating_point_adder_exact;
  import fp_pkg::*;

  int checks = 0, failures = 0;
  int n_sub = 0, n_carry = 0, n_ovf = 0, n_zero = 0;

  logic [63:0] a, b, sum;
  fp_flags_t   flags;

  floating_point_adder #(.EXP_LOA_N(0), .MANT_LOA_N(0)) dut (.a, .b, .sum, .flags);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [63:0] x, y);
    real rx, ry, rs, rg, big, err;
    a = x; b = y;
    #1;
    rx = $bitstoreal(x); ry = $bitstoreal(y);
    rs = rx + ry;
    big = (rx < 0 ? -rx : rx) > (ry < 0 ? -ry : ry) ? (rx < 0 ? -rx : rx) : (ry < 0 ? -ry : ry);
    if (x[63] != y[63]) n_sub++;
    checks++;
    if (flags.overflow) begin
      n_ovf++;
      if (!(rs > 1.7e308 || rs < -1.7e308) || sum[62:0] != 63'h7FF0_0000_0000_0000) begin
        failures++;
        $display("FAIL overflow %h + %h -> %h", x, y, sum);
      end
    end else if (flags.underflow) begin
      if (!(rs < 2.3e-308 && rs > -2.3e-308)) begin
        failures++;
        $display("FAIL underflow %h + %h -> %h", x, y, sum);
      end
    end else begin
      if (flags.zero) n_zero++;
      if (sum[62:52] > x[62:52] && sum[62:52] > y[62:52]) n_carry++;
      rg  = $bitstoreal(sum);
      err = rg - rs;
      if (err < 0) err = -err;
      if (!(err <= big * 2.0 ** -51)) begin
        failures++;
        $display("FAIL %h + %h -> %h, error %g of %g", x, y, sum, err, big);
      end
    end
  endtask

  initial begin
    logic [63:0] x;
    int          ey;
    for (int t = 0; t < 20000; t++) begin
      x  = {1'($urandom), 11'($urandom_range(1, 2046)), 20'($urandom), $urandom};
      ey = int'(x[62:52]) + int'($urandom_range(0, 4)) - 2;
      ey = (ey < 1) ? 1 : (ey > 2046) ? 2046 : ey;
      case (t % 4)
        0: apply(x, {1'($urandom), 11'($urandom_range(1, 2046)), 20'($urandom), $urandom});
        1: apply(x, {1'($urandom), 11'(ey), 20'($urandom), $urandom});
        2: apply(x, {~x[63], x[62:0]});
        default: apply(x, {~x[63], x[62:52], x[51:16], 16'($urandom)});
      endcase
    end
    $display("effective subtractions %0d, carries %0d, overflows %0d, zero results %0d",
             n_sub, n_carry, n_ovf, n_zero);
    checks++;
    if (n_sub == 0 || n_carry == 0 || n_ovf == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
