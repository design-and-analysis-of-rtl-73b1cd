// mantissa_swap: operand swap ahead of alignment.
//
// Sends the significand (hidden bit included) of the operand with the
// larger exponent to 'm_large' and the other one to 'm_small', which the
// right shifter then aligns. 'swap' comes from the exponent subtractor.
// The block is two 2:1 multiplexers, the simplest circuit for the swap the
// source describes. Purely combinational.
module mantissa_swap #(
  parameter int unsigned SIG_W = 53
) (
  input  logic [SIG_W-1:0] ma,
  input  logic [SIG_W-1:0] mb,
  input  logic             swap,
  output logic [SIG_W-1:0] m_large,
  output logic [SIG_W-1:0] m_small
);

  always_comb begin
    m_large = swap ? mb : ma;
    m_small = swap ? ma : mb;
  end

endmodule
