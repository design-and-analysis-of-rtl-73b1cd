// special_cases: IEEE special operands, final result select and flags.
//
// Classifies both operands (NaN, infinity, zero; an operand with a zero
// exponent field, subnormal or zero, is treated as zero) and chooses the
// result in this priority:
//   NaN operand or inf + (-inf)   -> canonical quiet NaN, flag nan
//   an infinite operand           -> that infinity
//   both operands zero            -> zero, negative only if both are
//   one operand zero              -> the other operand
//   exponent overflow             -> signed infinity, flags overflow+inexact
//   datapath result zero          -> +0, flag zero
//   exponent underflow            -> signed zero, flags underflow+zero+inexact
//   otherwise                     -> datapath result {s_res, e_res, f_res}
// 'inexact' is raised when the datapath discarded nonzero bits during
// alignment or normalization ('lost'), or when a subnormal input was
// flushed. The flag set follows the source; the encodings and the priority
// are IEEE 754 conventions chosen here. Purely combinational.
module special_cases
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned FRAC_W = 52
) (
  input  logic [EXP_W+FRAC_W:0]  a,
  input  logic [EXP_W+FRAC_W:0]  b,
  input  logic                   s_res,
  input  logic [EXP_W-1:0]       e_res,
  input  logic [FRAC_W-1:0]      f_res,
  input  logic                   overflow,
  input  logic                   underflow,
  input  logic                   is_zero,
  input  logic                   lost,
  output logic [EXP_W+FRAC_W:0]  sum,
  output fp_flags_t              flags
);

  localparam logic [EXP_W-1:0] EMAX = '1;

  logic              sa, sb;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    a_nan  = (ea == EMAX) && (fa != '0);
    b_nan  = (eb == EMAX) && (fb != '0);
    a_inf  = (ea == EMAX) && (fa == '0);
    b_inf  = (eb == EMAX) && (fb == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);

    flags = '0;
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      sum       = {1'b0, EMAX, 1'b1, {(FRAC_W-1){1'b0}}};
      flags.nan = 1'b1;
    end else if (a_inf) begin
      sum = a;
    end else if (b_inf) begin
      sum = b;
    end else if (a_zero && b_zero) begin
      sum           = {sa & sb, {(EXP_W+FRAC_W){1'b0}}};
      flags.zero    = 1'b1;
      flags.inexact = (fa != '0) || (fb != '0);
    end else if (a_zero) begin
      sum           = b;
      flags.inexact = (fa != '0);
    end else if (b_zero) begin
      sum           = a;
      flags.inexact = (fb != '0);
    end else if (overflow) begin
      sum            = {s_res, EMAX, {FRAC_W{1'b0}}};
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else if (is_zero) begin
      sum        = '0;
      flags.zero = 1'b1;
    end else if (underflow) begin
      sum             = {s_res, {(EXP_W+FRAC_W){1'b0}}};
      flags.underflow = 1'b1;
      flags.zero      = 1'b1;
      flags.inexact   = 1'b1;
    end else begin
      sum           = {s_res, e_res, f_res};
      flags.inexact = lost;
    end
  end

endmodule
