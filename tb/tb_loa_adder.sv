// tb_loa_adder: self-checking test of the revised lower-part-OR adder.
//
// Three instances: the exponent configuration (K=11, N=1), the mantissa
// configuration (K=53, N=8) and an exact one (K=16, N=0). Random and corner
// operands are applied; the expected sum is formed bit by bit (OR below N,
// integer addition of the upper field with the carry-in at bit N) and, for
// N=0, checked against plain integer addition. Combinational: values are
// sampled 1 ns after the inputs change.
module tb_loa_adder;

  int checks = 0, failures = 0;

  logic [10:0] a1, b1, s1; logic c1, co1;
  logic [52:0] a2, b2, s2; logic c2, co2;
  logic [15:0] a3, b3, s3; logic c3, co3;

  loa_adder #(.K(11), .N(1))  dut1 (.a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1));
  loa_adder #(.K(53), .N(8))  dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));
  loa_adder #(.K(16), .N(0))  dut3 (.a(a3), .b(b3), .cin(c3), .sum(s3), .cout(co3));

  // Reference: up to 64-bit operands.
  function automatic logic [64:0] ref_loa(input logic [63:0] a, b, input logic cin,
                                          input int k, n);
    logic [63:0] lo, hi_a, hi_b, res;
    logic [64:0] hi;
    lo = 0;
    for (int i = 0; i < n; i++) lo[i] = a[i] | b[i];
    hi_a = a >> n; hi_b = b >> n;
    hi = {1'b0, hi_a} + {1'b0, hi_b} + 65'(cin);
    res = (hi[63:0] << n) | lo;
    for (int i = k; i < 64; i++) res[i] = 1'b0;
    // carry out of the upper (k-n)-bit field
    return {hi[k-n], res};
  endfunction

  task automatic check(input string what, input logic [64:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    logic [64:0] e;
    for (int t = 0; t < 3000; t++) begin
      a1 = 11'($urandom); b1 = 11'($urandom); c1 = 1'($urandom);
      a2 = {21'($urandom), $urandom}; b2 = {21'($urandom), $urandom}; c2 = 1'($urandom);
      a3 = 16'($urandom); b3 = 16'($urandom); c3 = 1'($urandom);
      if (t == 0) begin a1 = '1; b1 = '1; c1 = 1; a2 = '1; b2 = '1; c2 = 1; end
      if (t == 1) begin a1 = '1; b1 = '0; c1 = 1; a2 = '1; b2 = 53'd0; c2 = 1; end
      #1;
      e = ref_loa(64'(a1), 64'(b1), c1, 11, 1);
      check("k11n1", {co1, 64'(s1)}, e);
      e = ref_loa(64'(a2), 64'(b2), c2, 53, 8);
      check("k53n8", {co2, 64'(s2)}, e);
      e = ref_loa(64'(a3), 64'(b3), c3, 16, 0);
      check("k16n0", {co3, 64'(s3)}, e);
      e = 65'(a3) + 65'(b3) + 65'(c3);
      check("k16n0 exact", {48'b0, co3, s3}, e);
      // the inexact low bits never carry: they are exactly a|b
      check("k53n8 low OR", 65'(s2[7:0]), 65'(a2[7:0] | b2[7:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
