// right_shifter: alignment shifter for the smaller significand.
//
// Shifts 'm_in' right by 'shamt' bit positions. Distances of SIG_W or more
// give zero. The bits shifted out are discarded (the design keeps no
// guard, round or sticky bits because it does not round); their OR is
// reported on 'lost' and only feeds the Inexact flag. The shifter is a
// logarithmic barrel shifter as synthesis infers it from '>>'.
// Purely combinational.
module right_shifter #(
  parameter int unsigned SIG_W = 53,
  parameter int unsigned SH_W  = 11
) (
  input  logic [SIG_W-1:0] m_in,
  input  logic [SH_W-1:0]  shamt,
  output logic [SIG_W-1:0] m_out,
  output logic             lost
);

  // m_in followed by SIG_W zeros: the lower half collects the shifted-out bits.
  logic [2*SIG_W-1:0] wide;

  always_comb begin
    wide = {m_in, {SIG_W{1'b0}}} >> shamt;
    if (shamt >= SH_W'(SIG_W)) begin
      m_out = '0;
      lost  = |m_in;
    end else begin
      m_out = wide[2*SIG_W-1:SIG_W];
      lost  = |wide[SIG_W-1:0];
    end
  end

endmodule
