// exp_subtractor: inexact exponent subtractor and comparator.
//
// Computes ea - eb as ea + (-eb) with a revised LOA: -eb is the exact
// two's complement of eb, the exact upper EXP_W-LOA_N bits of the LOA add
// the upper fields, and the LOA_N low bits are ea | (-eb) with no carry
// into the upper part. The carry out of the exact part is the comparison
// result: 1 means A is taken as the operand with the larger exponent, 0
// means B is (swap). The alignment distance 'shamt' is the approximate
// difference, negated when it is negative.
//
// For LOA_N = 1 (the main configuration) the approximate difference is
// exact unless both exponents are odd, in which case it is one too small:
// then equal exponents give swap = 1 and shamt = 1, and ea = eb + 2k gives
// shamt = 2k - 1.
//
// Using the LOA here and approximating only the least significant exponent
// bit follow the source; the exact negation of eb, the swap rule and the
// exact negation of a negative difference are this design's choices. A
// zero eb (a zero operand) is handled by the special-case logic.
// Purely combinational.
module exp_subtractor #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned LOA_N = 1
) (
  input  logic [EXP_W-1:0] ea,
  input  logic [EXP_W-1:0] eb,
  output logic             swap,     // B has the larger exponent
  output logic [EXP_W-1:0] e_large,  // exponent of the operand taken as larger
  output logic [EXP_W-1:0] shamt     // approximate |ea - eb|
);

  logic [EXP_W-1:0] eb_neg;
  logic [EXP_W-1:0] diff;
  logic             cout;

  assign eb_neg = ~eb + 1'b1;

  loa_adder #(.K(EXP_W), .N(LOA_N)) u_loa (
    .a   (ea),
    .b   (eb_neg),
    .cin (1'b0),
    .sum (diff),
    .cout(cout)
  );

  always_comb begin
    swap    = ~cout;
    e_large = swap ? eb : ea;
    shamt   = swap ? (~diff + 1'b1) : diff;
  end

endmodule
