// lns_to_fixed: LNS to fixed-point converter.
//
// The W-1 exponent bits of an LNS word address a 2^(W-1) x B table holding
// round(2^(e/2^F)), the magnitude as an integer; the sign bit then negates
// it. The defaults W = 10, B = 11 give the 512 x 11-bit table per output that
// the document counts as the conversion overhead of the DCT. Magnitudes above
// 2^B - 1 are clamped and exponents below 2^-1 round to zero.
//
// The integer scaling (no fraction bits in the output) and the two's
// complement output coding are this design's choices. Interface: LNS word in,
// B+1-bit two's complement value out. Purely combinational.
module lns_to_fixed
  import lns_pkg::*;
#(
  parameter int W = LNS_W,
  parameter int F = LNS_F,
  parameter int B = 11         // magnitude bits of the fixed-point output
) (
  input  logic [W-1:0] l,      // LNS word
  output logic [B:0]   v       // two's complement value
);

  localparam int N = 1 << (W - 1);

  typedef logic [B-1:0] word_t;
  typedef word_t tab_t [N];

  function automatic tab_t build();
    tab_t t;
    int e;
    for (int a = 0; a < N; a++) begin
      e = (a >= N / 2) ? a - N : a;           // two's complement exponent
      t[a] = word_t'(clamp(round_real($pow(2.0, real'(e) / real'(1 << F))), 0, (1 << B) - 1));
    end
    return t;
  endfunction

  localparam tab_t EXP_TAB = build();

  logic [B:0] mag;

  always_comb begin
    mag = {1'b0, EXP_TAB[l[W-2:0]]};
    v   = l[W-1] ? -mag : mag;
  end

endmodule
