// tb_mantissa_swap: self-checking test of the significand swap.
// Random 53-bit significands with both values of 'swap'; the larger-exponent
// significand must appear on m_large, the other on m_small.
module tb_mantissa_swap;

  int checks = 0, failures = 0;
  logic [52:0] ma, mb, ml, ms;
  logic        swap;

  mantissa_swap #(.SIG_W(53)) dut (.ma, .mb, .swap, .m_large(ml), .m_small(ms));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      ma = {21'($urandom), $urandom}; mb = {21'($urandom), $urandom}; swap = 1'(t);
      #1;
      checks += 2;
      if (ml !== (swap ? mb : ma)) begin failures++; $display("FAIL m_large"); end
      if (ms !== (swap ? ma : mb)) begin failures++; $display("FAIL m_small"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
