// lns_sbdb_rom: the s_b(z)/d_b(z) lookup table of an LNS adder.
//
// An LNS addition t = log2|X +- Y| is computed as max(x,y) + s_b(z) when the
// operands have the same sign and max(x,y) + d_b(z) when they differ, with
// z = -|x - y| <= 0. s_b(z) = log2(1 + 2^z) lies in (0, 1], so its table is
// F bits wide; d_b(z) = log2|1 - 2^z| is negative and needs the full W-1
// exponent bits. Each table has 2^(W-1) entries, indexed by |z| (so entry a
// holds the value at z = -a/2^F), which gives the (2F+5)*2^(F+5) ROM bits the
// document counts for W = F+6.
//
// The two tables have separate read addresses so that the shared-table unit
// (lns_dual_add) can read s_b for one addition and d_b for the other in the
// same cycle; the combined adder/subtractor ties both addresses together.
//
// Contents are computed at elaboration from the formulas (round to nearest).
// s_b(0) = 1 does not fit in F fraction bits and is stored as 1 - 2^-F;
// d_b(0) = -inf is stored as the most negative exponent. Both are this
// design's choices. Purely combinational: outputs follow the addresses.
module lns_sbdb_rom
  import lns_pkg::*;
#(
  parameter int W = LNS_W,
  parameter int F = LNS_F
) (
  input  logic [W-2:0] sb_addr,  // |z| for the s_b table
  input  logic [W-2:0] db_addr,  // |z| for the d_b table
  output logic [F-1:0] sb,       // s_b(-sb_addr), unsigned, F fractional bits
  output logic [W-2:0] db        // d_b(-db_addr), two's complement
);

  localparam int N = 1 << (W - 1);

  typedef logic [F-1:0] sb_word_t;
  typedef logic [W-2:0] db_word_t;
  typedef sb_word_t sb_tab_t [N];
  typedef db_word_t db_tab_t [N];

  function automatic sb_tab_t build_sb();
    sb_tab_t t;
    for (int a = 0; a < N; a++) t[a] = sb_word_t'(sb_entry(a, F));
    return t;
  endfunction

  function automatic db_tab_t build_db();
    db_tab_t t;
    for (int a = 0; a < N; a++) t[a] = db_word_t'(db_entry(a, W, F));
    return t;
  endfunction

  localparam sb_tab_t SB_TAB = build_sb();
  localparam db_tab_t DB_TAB = build_db();

  always_comb begin
    sb = SB_TAB[sb_addr];
    db = DB_TAB[db_addr];
  end

endmodule
