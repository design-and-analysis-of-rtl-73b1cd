// tb_right_shifter: self-checking test of the alignment shifter.
// Every distance 0..63 plus large ones (up to 2047) on random significands.
// Expected output: integer right shift (zero for distances of 53 or more);
// 'lost' is expected set exactly when the shifted-out bits, isolated with
// a mask, are nonzero.
module tb_right_shifter;

  int checks = 0, failures = 0;
  logic [52:0] m_in, m_out;
  logic [10:0] shamt;
  logic        lost;

  right_shifter #(.SIG_W(53), .SH_W(11)) dut (.m_in, .shamt, .m_out, .lost);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v, mask, exp_out;
    for (int t = 0; t < 4000; t++) begin
      m_in  = {1'b1, 20'($urandom), $urandom};
      if (t % 7 == 0) m_in = 53'(1) << (t % 53);
      shamt = (t < 2000) ? 11'(t % 64) : 11'($urandom_range(0, 2047));
      #1;
      v       = 64'(m_in);
      exp_out = (shamt >= 53) ? 64'd0 : v >> shamt;
      mask    = (shamt >= 64) ? '1 : ((64'd1 << shamt) - 1);
      checks += 2;
      if (64'(m_out) !== exp_out) begin failures++; $display("FAIL out sh=%0d", shamt); end
      if (lost !== ((v & mask) != 0)) begin failures++; $display("FAIL lost sh=%0d", shamt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
