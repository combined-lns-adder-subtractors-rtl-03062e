// lns_dual_add: two LNS adders, X1+Y1 and X2+Y2, sharing one s_b/d_b table.
//
// In the DCT two adders can be paired when their sign patterns guarantee
// that exactly one of them needs s_b (operands of equal sign) while the other
// needs d_b (operands of opposite sign), i.e. (x1_s ^ y1_s) != (x2_s ^ y2_s).
// One table then serves both: the s_b half is addressed by the adder that
// adds, the d_b half by the adder that subtracts. Compared with one LNS
// adder, the two subtract/negate/max paths and output adders are duplicated
// and one extra multiplexer sits in the critical path, in front of the table.
//
// Datapath, following the multiplexer numbering of the document's diagram:
//   MUX 1/2   max(x1,y1) and |z1| = |x1 - y1| (subtractor, negator)
//   MUX 3/4   |z2| = |x2 - y2| and max(x2,y2)
//   control   same1 = (x1_s == y1_s)
//   MUX 5     s_b address = same1 ? |z1| : |z2|
//   MUX 6     d_b address = same1 ? |z2| : |z1|
//   MUX 7     w1 = same1 ? s_b : d_b      MUX 8  w2 = same1 ? d_b : s_b
//   adders    exponents max1 + w1, max2 + w2 (saturated, this design's choice)
//   MUX 9/10  signs: borrow ? y_s : x_s for each adder
// Only same1 drives the routing, as in the document; an assertion flags any
// input where the two adders would need the same table, for which the
// second result is not valid.
//
// Interface: LNS words {sign, exponent}, see lns_pkg. Purely combinational.
module lns_dual_add
  import lns_pkg::*;
#(
  parameter int W = LNS_W,
  parameter int F = LNS_F
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] y1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] y2,
  output logic [W-1:0] t1,   // X1 + Y1
  output logic [W-1:0] t2    // X2 + Y2
);

  localparam int EMIN = exp_min(W);
  localparam int EMAX = exp_max(W);

  logic                same1, borrow1, borrow2;
  logic signed [W-1:0] d1, d2;
  logic [W-2:0]        z1, z2, sb_addr, db_addr;
  logic signed [W-2:0] m1, m2;
  logic [F-1:0]        sb;
  logic signed [W-2:0] db, sbx, w1, w2;
  logic signed [W:0]   s1, s2;

  always_comb begin
    d1      = W'($signed(x1[W-2:0])) - W'($signed(y1[W-2:0]));
    d2      = W'($signed(x2[W-2:0])) - W'($signed(y2[W-2:0]));
    borrow1 = d1[W-1];
    borrow2 = d2[W-1];
    z1      = borrow1 ? (W-1)'(-d1) : d1[W-2:0];
    z2      = borrow2 ? (W-1)'(-d2) : d2[W-2:0];
    m1      = borrow1 ? y1[W-2:0] : x1[W-2:0];
    m2      = borrow2 ? y2[W-2:0] : x2[W-2:0];
    same1   = (x1[W-1] == y1[W-1]);
    sb_addr = same1 ? z1 : z2;
    db_addr = same1 ? z2 : z1;
  end

  lns_sbdb_rom #(.W(W), .F(F)) u_table (
    .sb_addr(sb_addr),
    .db_addr(db_addr),
    .sb     (sb),
    .db     (db)
  );

  always_comb begin
    sbx = signed'({{(W-1-F){1'b0}}, sb});
    w1  = same1 ? sbx : db;
    w2  = same1 ? db : sbx;
    s1  = (W+1)'(m1) + (W+1)'(w1);
    s2  = (W+1)'(m2) + (W+1)'(w2);
    t1  = {borrow1 ? y1[W-1] : x1[W-1], (W-1)'(clamp_s(s1))};
    t2  = {borrow2 ? y2[W-1] : x2[W-1], (W-1)'(clamp_s(s2))};
  end

  function automatic logic signed [W:0] clamp_s(logic signed [W:0] v);
    if (v < (W+1)'(EMIN)) return (W+1)'(EMIN);
    if (v > (W+1)'(EMAX)) return (W+1)'(EMAX);
    return v;
  endfunction

  // The pairing rule that makes sharing the table legal.
  always_comb begin
    assert ((x1[W-1] ^ y1[W-1]) != (x2[W-1] ^ y2[W-1]) || $isunknown({x1, y1, x2, y2}))
      else $error("lns_dual_add: both additions need the same table");
  end

endmodule
