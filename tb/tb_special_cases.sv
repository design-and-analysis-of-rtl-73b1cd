// tb_special_cases: directed test of special operands, result select and
// flags. Operands are written as binary64 patterns (e.g. 7FF0... = +inf);
// each case states the expected result and flag set per IEEE 754 with
// flush-to-zero of subnormal operands.
module tb_special_cases;
  import fp_pkg::*;

  int checks = 0, failures = 0;
  logic [63:0] a, b, sum;
  logic        s_res, overflow, underflow, is_zero, lost;
  logic [10:0] e_res;
  logic [51:0] f_res;
  fp_flags_t   flags;

  special_cases #(.EXP_W(11), .FRAC_W(52)) dut (.a, .b, .s_res, .e_res, .f_res, .overflow,
                                               .underflow, .is_zero, .lost, .sum, .flags);

  localparam logic [63:0] PINF = 64'h7FF0_0000_0000_0000;
  localparam logic [63:0] NINF = 64'hFFF0_0000_0000_0000;
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] ONE  = 64'h3FF0_0000_0000_0000;
  localparam logic [63:0] MTWO = 64'hC000_0000_0000_0000;

  // flags order: overflow, underflow, zero, inexact, nan
  task automatic run(input string name, input logic [63:0] ia, ib,
                     input logic ov, un, z, l, input logic [63:0] exp_sum, input logic [4:0] exp_flags);
    a = ia; b = ib; overflow = ov; underflow = un; is_zero = z; lost = l;
    s_res = 1'b1; e_res = 11'h400; f_res = 52'hABCDE;
    #1;
    checks += 2;
    if (sum !== exp_sum) begin failures++; $display("FAIL %s sum %h expected %h", name, sum, exp_sum); end
    if (flags !== exp_flags) begin failures++; $display("FAIL %s flags %b expected %b", name, flags, exp_flags); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run("nan a",      64'h7FF0_0000_0000_0001, ONE, 0,0,0,0, QNAN, 5'b00001);
    run("nan b",      ONE, 64'hFFF8_0000_0000_1234, 0,0,0,0, QNAN, 5'b00001);
    run("inf-inf",    PINF, NINF, 0,0,0,0, QNAN, 5'b00001);
    run("inf+inf",    NINF, NINF, 0,0,0,0, NINF, 5'b00000);
    run("inf+x",      ONE, PINF, 0,0,0,0, PINF, 5'b00000);
    run("-inf+x",     NINF, MTWO, 1,0,0,0, NINF, 5'b00000);
    run("0+0",        64'h0, 64'h8000_0000_0000_0000, 0,0,0,0, 64'h0, 5'b00100);
    run("-0+-0",      64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 0,0,0,0, 64'h8000_0000_0000_0000, 5'b00100);
    run("0+x",        64'h0, MTWO, 0,0,1,0, MTWO, 5'b00000);
    run("x+0",        ONE, 64'h0, 0,0,0,0, ONE, 5'b00000);
    run("sub+x",      64'h0000_0000_0000_0005, ONE, 0,0,0,0, ONE, 5'b00010);
    run("overflow",   ONE, ONE, 1,0,0,0, NINF, 5'b10010);
    run("zero res",   ONE, 64'hBFF0_0000_0000_0000, 0,0,1,0, 64'h0, 5'b00100);
    run("underflow",  ONE, ONE, 0,1,0,0, 64'h8000_0000_0000_0000, 5'b01110);
    run("normal",     ONE, ONE, 0,0,0,0, {1'b1, 11'h400, 52'hABCDE}, 5'b00000);
    run("normal lost",ONE, ONE, 0,0,0,1, {1'b1, 11'h400, 52'hABCDE}, 5'b00010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
