// lns_mul: LNS multiplier.
//
// In the logarithmic number system a product needs no multiplier: the
// exponents are added with a fixed-point adder and the signs are combined
// with an XOR gate. In the DCT one operand is always a cosine constant,
// supplied as an LNS word by the instantiating module.
//
// The exponent sum is saturated to the exponent range, so a product smaller
// than the smallest code becomes the zero code; the saturation is this
// design's choice. The fraction width F plays no part: the exponents are
// added as plain integers. Interface: LNS words {sign, exponent}, see lns_pkg.
// Purely combinational.
module lns_mul
  import lns_pkg::LNS_W, lns_pkg::exp_min, lns_pkg::exp_max;
#(
  parameter int W = LNS_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p    // a * b
);

  localparam int EMIN = exp_min(W);
  localparam int EMAX = exp_max(W);

  logic signed [W-1:0] s;

  always_comb begin
    s = W'($signed(a[W-2:0])) + W'($signed(b[W-2:0]));
    if (s < W'(EMIN))      p[W-2:0] = (W-1)'(EMIN);
    else if (s > W'(EMAX)) p[W-2:0] = (W-1)'(EMAX);
    else                   p[W-2:0] = s[W-2:0];
    p[W-1] = a[W-1] ^ b[W-1];
  end

endmodule
