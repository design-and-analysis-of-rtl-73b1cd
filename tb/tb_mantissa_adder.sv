// tb_mantissa_adder: self-checking test of the inexact significand adder.
//
// The main configuration (SIG_W=53, LOA_N=8) is checked bit-exactly against
// an integer model of the LOA add/subtract followed by negation of a
// negative difference, and against an error bound: for an addition the
// result never exceeds the exact sum and is less than 2^8 below it. An
// exact instance (LOA_N=0) must return |a +/- b| and flag a<b in a
// subtraction as negative. Combinational: sampled 1 ns after each input.
module tb_mantissa_adder;

  int checks = 0, failures = 0;
  logic [52:0] ml, ms;
  logic        eff_sub, neg8, neg0;
  logic [53:0] mag8, mag0;

  mantissa_adder #(.SIG_W(53), .LOA_N(8)) dut8 (.m_large(ml), .m_small(ms), .eff_sub, .mag(mag8), .neg(neg8));
  mantissa_adder #(.SIG_W(53), .LOA_N(0)) dut0 (.m_large(ml), .m_small(ms), .eff_sub, .mag(mag0), .neg(neg0));

  localparam longint M53 = (64'd1 << 53) - 1;
  localparam longint M45 = (64'd1 << 45) - 1;

  task automatic check(input string what, input longint got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h sub=%b: got %h expected %h", what, ml, ms, eff_sub, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a, b, bb, lo, hi, cout, sum, mag, n, ex;
    for (int t = 0; t < 6000; t++) begin
      ml = {1'b1, 20'($urandom), $urandom};
      ms = {21'($urandom), $urandom} >> (t % 54);
      if (t % 11 == 0) ms = ml;                     // equal significands
      if (t % 13 == 0) ms = ml + 53'($urandom_range(1, 300));  // slightly larger
      eff_sub = 1'($urandom);
      #1;
      a  = longint'(ml); b = longint'(ms);
      bb = eff_sub ? (~b & M53) : b;
      lo = (a | bb) & 8'hff;
      hi = (a >> 8) + (bb >> 8) + longint'(eff_sub);
      cout = (hi >> 45) & 1;
      sum  = ((hi & M45) << 8) | lo;
      n    = eff_sub & !cout;
      mag  = !eff_sub ? ((cout << 53) | sum) : (n ? ((-sum) & M53) : sum);
      check("neg", neg8, n);
      check("mag", mag8, mag);
      if (!eff_sub) begin
        ex = a + b;
        checks++;
        if (!(mag8 <= ex && ex - mag8 < 256)) begin failures++; $display("FAIL add bound"); end
      end
      ex = eff_sub ? a - b : a + b;
      check("exact mag", mag0, ex < 0 ? -ex : ex);
      check("exact neg", neg0, ex < 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
