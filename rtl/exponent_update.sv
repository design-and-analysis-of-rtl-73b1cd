// exponent_update: result exponent and range checks.
//
// e_res = e_large + carry - lz, computed exactly in a wider signed word.
// A value of 2^EXP_W - 1 or more is an overflow (the adder returns
// infinity); a value of 0 or less is an underflow (the adder returns zero,
// subnormal results are not produced). Only the exponent subtractor and the
// mantissa adder are approximate in this design, so this update is exact.
// Purely combinational.
module exponent_update #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned LZ_W  = 6
) (
  input  logic [EXP_W-1:0] e_large,
  input  logic             carry,
  input  logic [LZ_W-1:0]  lz,
  output logic [EXP_W-1:0] e_res,
  output logic             overflow,
  output logic             underflow
);

  localparam int unsigned W = (EXP_W > LZ_W ? EXP_W : LZ_W) + 2;

  logic signed [W-1:0] e_tmp;

  always_comb begin
    e_tmp     = signed'(W'(e_large)) + signed'(W'(carry)) - signed'(W'(lz));
    e_res     = e_tmp[EXP_W-1:0];
    overflow  = e_tmp >= signed'(W'({EXP_W{1'b1}}));
    underflow = e_tmp <= 0;
  end

endmodule
