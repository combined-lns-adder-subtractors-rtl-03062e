// lns_pkg: shared constants and elaboration-time functions of the LNS DCT.
//
// Number format. An LNS word of W bits holds a sign in bit W-1 (1 = negative)
// and the base-2 logarithm of the magnitude in bits W-2:0, as a two's
// complement fixed-point number with F fractional bits. The default W = 10,
// F = 4 gives exponents from -16 to +15.9375 in steps of 1/16. The sign/exponent
// split and the W and F values are the document's; the two's complement coding
// of the exponent is this design's choice. There is no separate zero flag:
// the most negative exponent (2^-16) stands for zero, and every adder
// saturates into the exponent range instead of wrapping.
//
// The functions below are evaluated only while parameters and localparams are
// elaborated (table contents and DCT constants); none of them becomes logic.
package lns_pkg;

  parameter int LNS_F = 4;          // fractional bits F of the exponent
  parameter int LNS_W = LNS_F + 6;  // word size W: sign, 5 integer bits, F fraction bits

  // Most negative and most positive exponent code of a W-bit word.
  function automatic int exp_min(int w);
    return -(1 << (w - 2));
  endfunction

  function automatic int exp_max(int w);
    return (1 << (w - 2)) - 1;
  endfunction

  function automatic int clamp(int v, int lo, int hi);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  // Round to nearest, ties away from zero.
  function automatic int round_real(real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  function automatic real log2_real(real r);
    return $ln(r) / $ln(2.0);
  endfunction

  // s_b(z) = log2(1 + 2^z) at z = -a/2^F, scaled by 2^F. It lies in (0, 1]
  // and the table keeps F bits, so s_b(0) = 1 is stored as (2^F-1)/2^F.
  function automatic int sb_entry(int a, int f);
    real z;
    z = -real'(a) / real'(1 << f);
    return clamp(round_real(log2_real(1.0 + $pow(2.0, z)) * real'(1 << f)), 0, (1 << f) - 1);
  endfunction

  // d_b(z) = log2|1 - 2^z| at z = -a/2^F, scaled by 2^F. d_b(0) is minus
  // infinity and is stored as the most negative code, as are all values
  // below it.
  function automatic int db_entry(int a, int w, int f);
    real z;
    if (a == 0) return exp_min(w);
    z = -real'(a) / real'(1 << f);
    return clamp(round_real(log2_real(1.0 - $pow(2.0, z)) * real'(1 << f)), exp_min(w), exp_max(w));
  endfunction

  // LNS code of a real constant c: {sign, round(2^F * log2|c|)}.
  function automatic logic [31:0] lns_const(real c, int w, int f);
    logic [31:0] e;
    real m;
    m = (c < 0.0) ? -c : c;
    e = 32'(clamp(round_real(log2_real(m) * real'(1 << f)), exp_min(w), exp_max(w)));
    e &= (32'(1) << (w - 1)) - 32'(1);
    if (c < 0.0) e |= 32'(1) << (w - 1);
    return e;
  endfunction

endpackage
