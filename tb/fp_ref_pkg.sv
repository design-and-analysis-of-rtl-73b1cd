// fp_ref_pkg: reference model of the inexact binary64 adder for the
// testbenches.
//
// ref_add() computes the expected {flags, sum} of one addition in plain
// integer arithmetic, for any number of OR-gate bits in the exponent
// subtractor (exp_n) and the mantissa adder (mant_n). It follows the
// algorithm, not the RTL structure:
//   d      = revised-LOA sum of ex and the two's complement of ey
//   swap   = no carry out of the LOA's exact part; shift = |d|
//   align  = truncating right shift of the smaller significand
//   mant   = revised-LOA add, or subtract as m_large + ~m_small + 1 with
//            the +1 entering the exact part; a negative result is negated
//   normal = right shift on carry, else left shift by the leading-zero
//            count of the bits above mant_n (at least bit 52); none set
//            means zero
// 'info' reports which mechanisms the addition went through.
package fp_ref_pkg;

  typedef struct packed {
    logic swap;        // B taken as the larger-exponent operand
    logic eff_sub;     // signs differ
    logic neg;         // mantissa difference negative
    logic carry;       // right normalization
    logic lshift;      // left normalization by one or more
    logic approx_zero; // no one above the inexact bits
    logic exp_err;     // approximate exponent difference differs from exact
    logic overflow;
    logic underflow;
    logic special;     // NaN, infinity or zero operand
  } ref_info_t;

  localparam longint M53 = (64'd1 << 53) - 1;

  function automatic logic [68:0] ref_add(input logic [63:0] x, y, input int exp_n, mant_n,
                                          output ref_info_t info);
    logic   sx, sy, sl, s, lost, cy, zr;
    int     ex, ey, exl, nb, hi, cout, diff, sh, lz, e, me, lzc_lo;
    longint mx, my, ml, msm, al, bb, h, sm, mag, mm;
    info = '0;
    sx = x[63]; ex = int'(x[62:52]); mx = longint'(x[51:0]);
    sy = y[63]; ey = int'(y[62:52]); my = longint'(y[51:0]);
    info.special = 1'b1;
    if ((ex == 2047 && mx != 0) || (ey == 2047 && my != 0) || (ex == 2047 && ey == 2047 && sx != sy))
      return {5'b00001, 64'h7FF8_0000_0000_0000};
    if (ex == 2047) return {5'b0, x};
    if (ey == 2047) return {5'b0, y};
    if (ex == 0 && ey == 0) return {3'b001, (mx != 0 || my != 0), 1'b0, sx & sy, 63'd0};
    if (ex == 0) return {3'b000, mx != 0, 1'b0, y};
    if (ey == 0) return {3'b000, my != 0, 1'b0, x};
    info.special = 1'b0;
    mx |= 64'd1 << 52; my |= 64'd1 << 52;
    // exponent difference, 11-bit LOA with exp_n OR bits
    me   = 11 - exp_n;
    nb   = (-ey) & 11'h7ff;
    hi   = (ex >> exp_n) + (nb >> exp_n);
    cout = (hi >> me) & 1;
    diff = ((hi & ((1 << me) - 1)) << exp_n) | ((ex | nb) & ((1 << exp_n) - 1));
    info.swap = !cout;
    sh   = info.swap ? ((-diff) & 11'h7ff) : diff;
    exl  = info.swap ? ey : ex;
    info.exp_err = (sh != ((ex >= ey) ? ex - ey : ey - ex)) || (info.swap != (ey > ex));
    ml   = info.swap ? my : mx;
    msm  = info.swap ? mx : my;
    sl   = info.swap ? sy : sx;
    al   = (sh >= 53) ? 0 : (msm >> sh);
    lost = (sh >= 53) ? (msm != 0) : ((msm & ((64'd1 << sh) - 1)) != 0);
    info.eff_sub = sx ^ sy;
    // significand, 53-bit LOA with mant_n OR bits
    mm   = 53 - mant_n;
    bb   = info.eff_sub ? (~al & M53) : al;
    h    = (ml >> mant_n) + (bb >> mant_n) + longint'(info.eff_sub);
    sm   = ((h & ((64'd1 << mm) - 1)) << mant_n) | ((ml | bb) & ((64'd1 << mant_n) - 1));
    if (!info.eff_sub) begin
      mag = sm | (((h >> mm) & 1) << 53);
    end else begin
      info.neg = ((h >> mm) & 1) == 0;
      mag = info.neg ? ((-sm) & M53) : sm;
    end
    s  = sl ^ info.neg;
    cy = mag[53];
    zr = 1'b0;
    lz = 0;
    lzc_lo = (mant_n < 53) ? mant_n : 52;
    if (cy) begin
      info.carry = 1'b1;
      lost |= mag[0];
      mag >>= 1;
    end else begin
      if ((mag >> lzc_lo) == 0) zr = 1'b1;
      else while (((mag << lz) & (64'd1 << 52)) == 0) lz++;
      info.lshift = (lz > 0);
      mag <<= lz;
    end
    e = exl + int'(cy) - lz;
    if (e >= 2047) begin info.overflow = 1'b1; return {5'b10010, s, 11'h7FF, 52'd0}; end
    if (zr)        begin info.approx_zero = 1'b1; return {5'b00100, 64'd0}; end
    if (e <= 0)    begin info.underflow = 1'b1; return {5'b01110, s, 63'd0}; end
    return {3'b000, lost, 1'b0, s, 11'(e), 52'(mag)};
  endfunction

endpackage
