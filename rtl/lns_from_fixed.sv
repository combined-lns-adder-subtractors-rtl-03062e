// lns_from_fixed: fixed-point to LNS converter.
//
// A sample is split into sign and magnitude; the magnitude addresses a
// 2^M x (W-1) table holding round(2^F * log2(m)), and the sign becomes the
// LNS sign bit. The default M = 8 gives the 256 x 9-bit table per input that
// the document counts as the conversion overhead of the W = 10 DCT. A zero
// magnitude maps to the most negative exponent, the design's zero code.
//
// The input coding (two's complement, M+1 bits, -2^M clamped to -(2^M-1)) is
// this design's choice. Interface: v in, LNS word {sign, exponent} out.
// Purely combinational.
module lns_from_fixed
  import lns_pkg::*;
#(
  parameter int W = LNS_W,
  parameter int F = LNS_F,
  parameter int M = 8          // magnitude bits of the fixed-point input
) (
  input  logic [M:0]   v,      // two's complement sample
  output logic [W-1:0] l       // LNS word
);

  localparam int N = 1 << M;

  typedef logic [W-2:0] word_t;
  typedef word_t tab_t [N];

  function automatic tab_t build();
    tab_t t;
    t[0] = word_t'(exp_min(W));
    for (int m = 1; m < N; m++)
      t[m] = word_t'(clamp(round_real(log2_real(real'(m)) * real'(1 << F)), exp_min(W), exp_max(W)));
    return t;
  endfunction

  localparam tab_t LOG_TAB = build();

  logic [M:0] neg;
  logic [M-1:0] mag;

  always_comb begin
    neg = -v;
    if (!v[M])          mag = v[M-1:0];
    else if (neg[M])    mag = {M{1'b1}};      // -2^M has no M-bit magnitude
    else                mag = neg[M-1:0];
    l = {v[M] && (v != '0), LOG_TAB[mag]};
  end

endmodule
