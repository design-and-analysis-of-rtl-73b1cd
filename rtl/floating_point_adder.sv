// floating_point_adder: inexact IEEE 754 floating-point adder (binary64 by
// default).
//
// Adds two floating-point numbers a + b in one combinational pass. The
// critical path is shortened by approximation instead of by pipelining:
//  * the exponent subtractor is a revised lower-part-OR adder (LOA) whose
//    EXP_LOA_N least significant bits are OR gates (default 1, i.e. an
//    inexact exponent LSB);
//  * the mantissa adder is a revised LOA with MANT_LOA_N OR-gate bits
//    (default 8 of 53);
//  * the normalizer counts leading zeros only over the exact bits;
//  * there is no rounder: results are truncated.
// Dataflow: exponent subtractor -> mantissa swap -> right shifter ->
// mantissa adder -> normalizer -> exponent update -> special cases, with
// the sign logic fed by the operand signs, the swap decision and the
// adder's sign indication.
//
// Ports: a, b and sum are packed {sign, exponent, fraction} words; flags
// are overflow, underflow, zero, inexact and NaN. There are no clocks or
// registers; sum and flags are valid one combinational delay after a and b.
//
// The block structure, the use of the LOA in both adders, the inexact
// exponent LSB, the approximate leading-zero count and the omitted rounder
// follow the source. The mantissa LOA width, the subtractor carry-in, the
// flush-to-zero treatment of subnormals and the special-case encodings are
// this design's choices.
module floating_point_adder
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W      = DP_EXP_W,
  parameter int unsigned FRAC_W     = DP_FRAC_W,
  parameter int unsigned EXP_LOA_N  = 1,
  parameter int unsigned MANT_LOA_N = 8
) (
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  output logic [EXP_W+FRAC_W:0] sum,
  output fp_flags_t             flags
);

  localparam int unsigned SIG_W = FRAC_W + 1;   // significand with hidden bit
  localparam int unsigned LZ_W  = $clog2(SIG_W);

  // Unpacked operands. A zero exponent field means a zero (flushed) operand,
  // whose hidden bit is 0.
  logic              sa, sb;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic [SIG_W-1:0]  ma, mb;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    ma = {ea != '0, fa};
    mb = {eb != '0, fb};
  end

  logic             swap;
  logic [EXP_W-1:0] e_large, shamt;

  exp_subtractor #(.EXP_W(EXP_W), .LOA_N(EXP_LOA_N)) u_exp_sub (
    .ea, .eb, .swap, .e_large, .shamt
  );

  logic [SIG_W-1:0] m_large, m_small, m_aligned;

  mantissa_swap #(.SIG_W(SIG_W)) u_swap (
    .ma, .mb, .swap, .m_large, .m_small
  );

  logic align_lost;

  right_shifter #(.SIG_W(SIG_W), .SH_W(EXP_W)) u_rshift (
    .m_in(m_small), .shamt, .m_out(m_aligned), .lost(align_lost)
  );

  logic           eff_sub, neg, s_res;
  logic [SIG_W:0] mag;

  sign_logic u_sign (
    .sa, .sb, .swap, .neg, .eff_sub, .s_res
  );

  mantissa_adder #(.SIG_W(SIG_W), .LOA_N(MANT_LOA_N)) u_mant_add (
    .m_large, .m_small(m_aligned), .eff_sub, .mag, .neg
  );

  logic [FRAC_W-1:0] f_res;
  logic              carry, is_zero, norm_lost;
  logic [LZ_W-1:0]   lz;

  normalizer #(.SIG_W(SIG_W), .LOA_N(MANT_LOA_N), .LZ_W(LZ_W)) u_norm (
    .mag, .frac(f_res), .carry, .lz, .is_zero, .lost(norm_lost)
  );

  logic [EXP_W-1:0] e_res;
  logic             overflow, underflow;

  exponent_update #(.EXP_W(EXP_W), .LZ_W(LZ_W)) u_exp_upd (
    .e_large, .carry, .lz, .e_res, .overflow, .underflow
  );

  special_cases #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_special (
    .a, .b, .s_res, .e_res, .f_res, .overflow, .underflow, .is_zero,
    .lost(align_lost | norm_lost), .sum, .flags
  );

endmodule
