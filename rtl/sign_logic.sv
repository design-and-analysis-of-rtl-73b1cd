// sign_logic: effective operation and result sign.
//
// The XOR of the two operand signs says whether the significands are to be
// added or subtracted (eff_sub). The result takes the sign of the operand
// with the larger exponent, inverted when the mantissa adder reports a
// negative difference. The inputs (the two signs, the swap decision and
// the adder's sign indication) are the connections the source draws into
// its sign logic; the equations are this design's. Purely combinational.
module sign_logic (
  input  logic sa,
  input  logic sb,
  input  logic swap,     // B has the larger exponent
  input  logic neg,      // mantissa difference was negative
  output logic eff_sub,
  output logic s_res
);

  always_comb begin
    eff_sub = sa ^ sb;
    s_res   = (swap ? sb : sa) ^ neg;
  end

endmodule
