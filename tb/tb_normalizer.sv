// tb_normalizer: self-checking test of the approximate normalizer.
//
// Main configuration (SIG_W=53, LOA_N=8). For each random magnitude, with
// its leading one placed at every position 0..53, the expected outputs are
// worked out from the position p of the leading one: p=53 -> right shift
// by one; 8<=p<=52 -> left shift by 52-p; p<8 (only inexact bits set) ->
// zero. Combinational: sampled 1 ns after each input.
module tb_normalizer;

  int checks = 0, failures = 0;
  logic [53:0] mag;
  logic [51:0] frac;
  logic        carry, is_zero, lost;
  logic [5:0]  lz;

  normalizer #(.SIG_W(53), .LOA_N(8), .LZ_W(6)) dut (.mag, .frac, .carry, .lz, .is_zero, .lost);

  task automatic check(input string what, input longint got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s mag=%h: got %h expected %h", what, mag, got, exp);
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
    logic [63:0] r, body;
    for (int t = 0; t < 4000; t++) begin
      int p;
      p    = t % 55 - 1;                         // -1 means all zero
      r    = {$urandom, $urandom};
      body = (p < 0) ? 64'd0 : ((r & ((64'd1 << p) - 1)) | (64'd1 << p));
      mag  = body[53:0];
      #1;
      if (p == 53) begin
        check("carry", carry, 1);
        check("frac", frac, body[52:1]);
        check("lost", lost, body[0]);
        check("zero", is_zero, 0);
      end else if (p >= 8) begin
        check("carry", carry, 0);
        check("lz", lz, 52 - p);
        check("frac", frac, (body << (52 - p)) & ((64'd1 << 52) - 1));
        check("zero", is_zero, 0);
      end else begin
        check("carry", carry, 0);
        check("zero", is_zero, 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
