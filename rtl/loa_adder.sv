// loa_adder: revised lower-part-OR adder (LOA).
//
// A K-bit approximate adder split in two. The upper M = K-N bits are an
// exact ripple/carry adder whose carry out is 'cout'. The lower N bits are
// N two-input OR gates: sum[i] = a[i] | b[i]. Unlike the original LOA, no
// carry is formed from the lower part (the AND gate that would produce it is
// dropped), so the critical path is only the M-bit exact adder.
//
// 'cin' enters the exact part at bit N. This is this design's addition to
// the plain structure: it lets the same adder act as a subtractor
// (a + ~b with cin = 1), where the upper part then gives the exact
// difference of the upper bits. With N = 0 the block is an exact adder,
// with N = K it is all OR gates and cout equals cin.
//
// Purely combinational.
module loa_adder #(
  parameter int unsigned K = 11,  // total width
  parameter int unsigned N = 1    // inexact (OR) low bits, 0..K
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic         cin,
  output logic [K-1:0] sum,
  output logic         cout
);

  localparam int unsigned M = K - N;

  if (N > K) begin : g_bad_param
    $error("loa_adder: N must not exceed K");
  end

  // Lower part: OR gates only.
  if (N > 0) begin : g_lower
    assign sum[N-1:0] = a[N-1:0] | b[N-1:0];
  end

  // Upper part: exact M-bit adder.
  if (M > 0) begin : g_upper
    logic [M:0] upper;
    assign upper       = {1'b0, a[K-1:N]} + {1'b0, b[K-1:N]} + {{M{1'b0}}, cin};
    assign sum[K-1:N]  = upper[M-1:0];
    assign cout        = upper[M];
  end else begin : g_no_upper
    assign cout = cin;
  end

endmodule
