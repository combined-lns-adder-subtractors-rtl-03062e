// lns_addsub: combined LNS adder/subtractor, X+Y and X-Y from one table read.
//
// A DCT butterfly needs both X+Y and X-Y of the same two operands. Both use
// the same z = -|x - y| and the same larger exponent max(x,y); when X and Y
// have equal signs X+Y needs s_b(z) and X-Y needs d_b(z), and the other way
// round when the signs differ. One s_b/d_b table lookup therefore serves both
// results, at the cost of one extra (W-1)-bit multiplexer and one extra adder
// over a single LNS adder.
//
// Datapath, following the multiplexer numbering of the document's diagram:
//   subtractor  d = x - y (W bits); its sign bit 'borrow' means |Y| > |X|
//   MUX 1       table address |z| = borrow ? -d : d (negator on d)
//   MUX 2       max(x,y) = borrow ? y : x
//   control     same = (x_s == y_s)
//   MUX 3       w+ = same ? s_b : d_b      MUX 4  w- = same ? d_b : s_b
//   adders      |X+Y| exponent = max + w+,  |X-Y| exponent = max + w-
//   MUX 5       sign of X+Y = borrow ? y_s : x_s
//   MUX 6       sign of X-Y = borrow ? ~y_s : x_s
// The document draws the table address as z itself; here the table is
// indexed by |z| = -z, which is the same lookup. The W-bit difference and
// the saturation of the two output adders to the exponent range are this
// design's choices (the document gives no overflow behaviour).
//
// Interface: LNS words {sign, exponent}, see lns_pkg. Purely combinational,
// with the same critical path as a single LNS adder.
module lns_addsub
  import lns_pkg::*;
#(
  parameter int W = LNS_W,
  parameter int F = LNS_F
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] sum,   // X + Y
  output logic [W-1:0] diff   // X - Y
);

  localparam int EMIN = exp_min(W);
  localparam int EMAX = exp_max(W);

  logic              xs, ys, same, borrow;
  logic signed [W-2:0] xe, ye, emax;
  logic signed [W-1:0] d;
  logic [W-2:0]        zmag;
  logic [F-1:0]        sb;
  logic signed [W-2:0] db;
  logic signed [W-2:0] wp, wm;
  logic signed [W:0]   tp, tm;

  assign xs = x[W-1];
  assign ys = y[W-1];
  assign xe = x[W-2:0];
  assign ye = y[W-2:0];

  always_comb begin
    d      = W'(xe) - W'(ye);          // sign-extended subtraction
    borrow = d[W-1];
    zmag   = borrow ? (W-1)'(-d) : d[W-2:0];
    emax   = borrow ? ye : xe;
    same   = (xs == ys);
  end

  lns_sbdb_rom #(.W(W), .F(F)) u_table (
    .sb_addr(zmag),
    .db_addr(zmag),
    .sb     (sb),
    .db     (db)
  );

  always_comb begin
    wp = same ? signed'({{(W-1-F){1'b0}}, sb}) : db;
    wm = same ? db : signed'({{(W-1-F){1'b0}}, sb});
    tp = (W+1)'(emax) + (W+1)'(wp);
    tm = (W+1)'(emax) + (W+1)'(wm);
    sum[W-2:0]  = (W-1)'(clamp_s(tp));
    diff[W-2:0] = (W-1)'(clamp_s(tm));
    sum[W-1]    = borrow ? ys : xs;
    diff[W-1]   = borrow ? ~ys : xs;
  end

  function automatic logic signed [W:0] clamp_s(logic signed [W:0] v);
    if (v < (W+1)'(EMIN)) return (W+1)'(EMIN);
    if (v > (W+1)'(EMAX)) return (W+1)'(EMAX);
    return v;
  endfunction

endmodule
