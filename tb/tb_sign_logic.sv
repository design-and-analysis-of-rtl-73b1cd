// tb_sign_logic: exhaustive test of the sign logic (16 input combinations).
// eff_sub must be sa XOR sb; the result sign is the sign of the operand
// with the larger exponent, flipped when the difference was negative.
module tb_sign_logic;

  int checks = 0, failures = 0;
  logic sa, sb, swap, neg, eff_sub, s_res;

  sign_logic dut (.sa, .sb, .swap, .neg, .eff_sub, .s_res);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic larger_sign;
    for (int i = 0; i < 16; i++) begin
      {sa, sb, swap, neg} = 4'(i);
      #1;
      larger_sign = swap ? sb : sa;
      checks += 2;
      if (eff_sub !== (sa != sb)) begin failures++; $display("FAIL eff_sub %b", 4'(i)); end
      if (s_res !== (neg ? !larger_sign : larger_sign)) begin failures++; $display("FAIL s_res %b", 4'(i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
