// tb_exponent_update: self-checking test of the exponent update.
// Random and corner exponents, carry and shift counts; expected exponent
// e + carry - lz from integer arithmetic, overflow when that reaches 2047,
// underflow when it is 0 or below.
module tb_exponent_update;

  int checks = 0, failures = 0;
  logic [10:0] e_large, e_res;
  logic        carry, overflow, underflow;
  logic [5:0]  lz;

  exponent_update #(.EXP_W(11), .LZ_W(6)) dut (.e_large, .carry, .lz, .e_res, .overflow, .underflow);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int t = 0; t < 5000; t++) begin
      e_large = (t < 200) ? 11'(t % 70) : (t < 400) ? 11'(2047 - t % 10) : 11'($urandom_range(0, 2047));
      carry   = 1'($urandom);
      lz      = carry ? 6'd0 : 6'($urandom_range(0, 52));
      #1;
      v = int'(e_large) + int'(carry) - int'(lz);
      checks += 3;
      if (overflow !== (v >= 2047)) begin failures++; $display("FAIL ovf e=%0d c=%0d lz=%0d", e_large, carry, lz); end
      if (underflow !== (v <= 0)) begin failures++; $display("FAIL unf e=%0d c=%0d lz=%0d", e_large, carry, lz); end
      if (v > 0 && v < 2047 && e_res !== 11'(v)) begin failures++; $display("FAIL e_res"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
