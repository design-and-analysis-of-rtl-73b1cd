// normalizer: approximate normalization of the adder result.
//
// Input is the SIG_W+1 bit magnitude from the mantissa adder; bit SIG_W is
// the carry of an addition. Two cases:
//  * carry set: shift right by one ('carry' = 1, exponent +1, 'lz' = 0);
//    the dropped bit is reported on 'lost'.
//  * carry clear: shift left by the leading-zero count 'lz' so that the
//    hidden one lands in bit SIG_W-1 (exponent -lz).
// The leading-zero counter is approximate: it examines only bits
// SIG_W-1..LOA_N, because the LOA_N low bits of the LOA result are already
// inexact (at least bit SIG_W-1 is examined, so that a fully inexact
// adder, LOA_N = SIG_W, still yields normalized sums). When none of the examined bits is set, the result is reported as
// zero ('is_zero'); the low bits are treated as approximation residue. This
// makes x - x give zero although the OR part of the adder leaves ones there.
// 'frac' is the normalized significand without its hidden bit (the hidden
// bit itself, bit SIG_W-1 of the shifted value, is not output). No rounding
// is done. Approximate leading-zero counting follows the source; the zero
// rule is this design's choice. Purely combinational.
module normalizer #(
  parameter int unsigned SIG_W = 53,
  parameter int unsigned LOA_N = 8,
  parameter int unsigned LZ_W  = $clog2(SIG_W)
) (
  input  logic [SIG_W:0]   mag,
  output logic [SIG_W-2:0] frac,
  output logic             carry,
  output logic [LZ_W-1:0]  lz,
  output logic             is_zero,
  output logic             lost
);

  // Lowest bit the approximate counter examines.
  localparam int unsigned LZC_LO = (LOA_N < SIG_W) ? LOA_N : SIG_W - 1;

  logic [LZ_W-1:0]  lz_cnt;
  logic             found;
  logic [SIG_W-1:0] shifted;

  // Approximate leading-zero count over the exact bits only.
  always_comb begin
    lz_cnt = '0;
    found  = 1'b0;
    for (int i = SIG_W - 1; i >= int'(LZC_LO); i--) begin
      if (!found && mag[i]) begin
        found  = 1'b1;
        lz_cnt = LZ_W'(SIG_W - 1 - i);
      end
    end
  end

  always_comb begin
    carry   = mag[SIG_W];
    shifted = mag[SIG_W-1:0] << lz_cnt;
    if (carry) begin
      lz      = '0;
      frac    = mag[SIG_W-1:1];
      lost    = mag[0];
      is_zero = 1'b0;
    end else begin
      lz      = lz_cnt;
      frac    = shifted[SIG_W-2:0];
      lost    = 1'b0;
      is_zero = ~found;
    end
  end

endmodule
