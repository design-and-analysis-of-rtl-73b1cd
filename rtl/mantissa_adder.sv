// mantissa_adder: inexact significand adder/subtractor.
//
// Adds (eff_sub = 0) or subtracts (eff_sub = 1) the aligned significands
// with a SIG_W-bit revised LOA whose LOA_N low bits are OR gates. For a
// subtraction the second input is inverted and the carry-in of 1 enters the
// exact upper part, so the upper part is an exact difference of the upper
// bits. The LOA carry out is the extra (SIG_W+1)-th result bit for an
// addition; for a subtraction a carry out of 0 means the difference is
// negative, which can happen only when the exponents were equal (or judged
// so by the inexact exponent subtractor). The magnitude is then formed by
// an exact two's-complement negation and 'neg' tells the sign logic to flip
// the result sign.
//
// Using a LOA as the mantissa adder follows the source; the width of its
// inexact part (LOA_N = 8) and the handling of negative differences are
// this design's choices. Purely combinational.
module mantissa_adder #(
  parameter int unsigned SIG_W = 53,
  parameter int unsigned LOA_N = 8
) (
  input  logic [SIG_W-1:0] m_large,
  input  logic [SIG_W-1:0] m_small,
  input  logic             eff_sub,
  output logic [SIG_W:0]   mag,   // result magnitude, bit SIG_W is the carry
  output logic             neg    // difference was negative
);

  logic [SIG_W-1:0] sum;
  logic             cout;

  loa_adder #(.K(SIG_W), .N(LOA_N)) u_loa (
    .a   (m_large),
    .b   (eff_sub ? ~m_small : m_small),
    .cin (eff_sub),
    .sum (sum),
    .cout(cout)
  );

  always_comb begin
    neg = eff_sub & ~cout;
    if (!eff_sub)  mag = {cout, sum};
    else if (neg)  mag = {1'b0, ~sum + 1'b1};
    else           mag = {1'b0, sum};
  end

endmodule
