// lns_dct8: 8-point DCT in the logarithmic number system, Chen's fast
// algorithm, with the 26 LNS adders of the flow graph merged into 13 units
// that share their s_b/d_b tables.
//
// Chen's flow graph for the 8-point DCT has 26 adders, numbered (1)..(26),
// and 16 constant multipliers. Adders come in pairs that share operands
// (butterflies: X+Y and X-Y) or, after the multipliers, pairs whose sign
// patterns guarantee that one adds magnitudes while the other subtracts
// them. The first kind is replaced by lns_addsub (10 units), the second by
// lns_dual_add (3 units), so each table serves two adders and half the
// table area of a plain LNS design is saved. Multiplications by constants are
// lns_mul instances (exponent addition, sign XOR).
//
// Data flow (g = even half, h = odd half; c_k = cos(k*pi/16)):
//   (1)/(13)..(4)/(16)  g_n = f(n) + f(7-n), h_n = f(n) - f(7-n), n = 0..3
//   (5)/(8)   a5 = g0 + g3, a8 = g0 - g3     (6)/(7) a6 = g1 + g2, a7 = g1 - g2
//   (9)/(10)  F(0) = sin(pi/4)(a5 + a6),     F(4) = cos(pi/4)(a5 - a6)
//   (11)/(12) F(2) = sin(pi/8) a7 + cos(pi/8) a8
//             F(6) = -cos(pi/8) a7 + sin(pi/8) a8           (shared table)
//   (17)/(18) m = cos(pi/4)(h1 + h2),  n = sin(pi/4)(h1 - h2)
//   (19)/(20) P = h0 + m, Q = h0 - m    (21)/(22) R = h3 - n, S = h3 + n
//   (23)/(26) F(1) = sin(pi/16) S + cos(pi/16) P
//             F(7) = -sin(7pi/16) S + cos(7pi/16) P         (shared table)
//   (24)/(25) F(5) = sin(5pi/16) R + cos(5pi/16) Q
//             F(3) = -sin(3pi/16) R + cos(3pi/16) Q         (shared table)
// Outputs are those of the flow graph: F(k) = sum_n f(n) cos((2n+1)k pi/16)
// for k > 0 and F(0) = sum_n f(n) / sqrt(2), i.e. twice the orthonormal DCT.
// In each shared pair the two sums differ only in the sign of one constant,
// so their sign parities always differ, as lns_dual_add requires.
// The adder pairing, the constants and the units follow the document's
// flow graph; which of h1 + h2 and h1 - h2 feeds the h0 branch was fixed by
// the DCT equations.
//
// Constants are LNS codes of the real values, computed at elaboration.
// Interface: eight LNS words in, eight out. Purely combinational: this is the
// one-cycle datapath; lns_dct8_top puts registers around it.
module lns_dct8
  import lns_pkg::*;
#(
  parameter int W = LNS_W,
  parameter int F = LNS_F
) (
  input  logic [W-1:0] f  [8],   // f(0)..f(7)
  output logic [W-1:0] Fo [8]    // F(0)..F(7)
);

  localparam real PI = 3.14159265358979323846;

  localparam logic [W-1:0] K_S4   = W'(lns_const($sin(PI / 4.0), W, F));
  localparam logic [W-1:0] K_C4   = W'(lns_const($cos(PI / 4.0), W, F));
  localparam logic [W-1:0] K_S8   = W'(lns_const($sin(PI / 8.0), W, F));
  localparam logic [W-1:0] K_C8   = W'(lns_const($cos(PI / 8.0), W, F));
  localparam logic [W-1:0] K_NC8  = W'(lns_const(-$cos(PI / 8.0), W, F));
  localparam logic [W-1:0] K_S16  = W'(lns_const($sin(PI / 16.0), W, F));
  localparam logic [W-1:0] K_C16  = W'(lns_const($cos(PI / 16.0), W, F));
  localparam logic [W-1:0] K_S5   = W'(lns_const($sin(5.0 * PI / 16.0), W, F));
  localparam logic [W-1:0] K_C5   = W'(lns_const($cos(5.0 * PI / 16.0), W, F));
  localparam logic [W-1:0] K_NS3  = W'(lns_const(-$sin(3.0 * PI / 16.0), W, F));
  localparam logic [W-1:0] K_C3   = W'(lns_const($cos(3.0 * PI / 16.0), W, F));
  localparam logic [W-1:0] K_NS7  = W'(lns_const(-$sin(7.0 * PI / 16.0), W, F));
  localparam logic [W-1:0] K_C7   = W'(lns_const($cos(7.0 * PI / 16.0), W, F));

  // ---- first butterfly stage: adders (1)..(4) with (13)..(16)
  logic [W-1:0] g [4];
  logic [W-1:0] h [4];

  for (genvar n = 0; n < 4; n++) begin : g_stage1
    lns_addsub #(.W(W), .F(F)) u_bf (.x(f[n]), .y(f[7-n]), .sum(g[n]), .diff(h[n]));
  end

  // ---- even half
  logic [W-1:0] a5, a6, a7, a8, a9, a10;

  lns_addsub #(.W(W), .F(F)) u_5_8  (.x(g[0]), .y(g[3]), .sum(a5), .diff(a8));
  lns_addsub #(.W(W), .F(F)) u_6_7  (.x(g[1]), .y(g[2]), .sum(a6), .diff(a7));
  lns_addsub #(.W(W), .F(F)) u_9_10 (.x(a5),   .y(a6),   .sum(a9), .diff(a10));

  lns_mul #(.W(W)) u_m_f0 (.a(a9),  .b(K_S4), .p(Fo[0]));
  lns_mul #(.W(W)) u_m_f4 (.a(a10), .b(K_C4), .p(Fo[4]));

  logic [W-1:0] p11a, p11b, p12a, p12b;

  lns_mul #(.W(W)) u_m_11a (.a(a7), .b(K_S8),  .p(p11a));
  lns_mul #(.W(W)) u_m_11b (.a(a8), .b(K_C8),  .p(p11b));
  lns_mul #(.W(W)) u_m_12a (.a(a7), .b(K_NC8), .p(p12a));
  lns_mul #(.W(W)) u_m_12b (.a(a8), .b(K_S8),  .p(p12b));

  lns_dual_add #(.W(W), .F(F)) u_11_12 (
    .x1(p11a), .y1(p11b), .x2(p12a), .y2(p12b), .t1(Fo[2]), .t2(Fo[6])
  );

  // ---- odd half
  logic [W-1:0] a17, a18, m, n, pp, q, r, s;

  lns_addsub #(.W(W), .F(F)) u_17_18 (.x(h[1]), .y(h[2]), .sum(a17), .diff(a18));

  lns_mul #(.W(W)) u_m_17 (.a(a17), .b(K_C4), .p(m));
  lns_mul #(.W(W)) u_m_18 (.a(a18), .b(K_S4), .p(n));

  lns_addsub #(.W(W), .F(F)) u_19_20 (.x(h[0]), .y(m), .sum(pp), .diff(q));
  lns_addsub #(.W(W), .F(F)) u_22_21 (.x(h[3]), .y(n), .sum(s),  .diff(r));

  logic [W-1:0] p23a, p23b, p26a, p26b, p24a, p24b, p25a, p25b;

  lns_mul #(.W(W)) u_m_23a (.a(s),  .b(K_S16), .p(p23a));
  lns_mul #(.W(W)) u_m_23b (.a(pp), .b(K_C16), .p(p23b));
  lns_mul #(.W(W)) u_m_26a (.a(s),  .b(K_NS7), .p(p26a));
  lns_mul #(.W(W)) u_m_26b (.a(pp), .b(K_C7),  .p(p26b));
  lns_mul #(.W(W)) u_m_24a (.a(r),  .b(K_S5),  .p(p24a));
  lns_mul #(.W(W)) u_m_24b (.a(q),  .b(K_C5),  .p(p24b));
  lns_mul #(.W(W)) u_m_25a (.a(r),  .b(K_NS3), .p(p25a));
  lns_mul #(.W(W)) u_m_25b (.a(q),  .b(K_C3),  .p(p25b));

  lns_dual_add #(.W(W), .F(F)) u_23_26 (
    .x1(p23a), .y1(p23b), .x2(p26a), .y2(p26b), .t1(Fo[1]), .t2(Fo[7])
  );
  lns_dual_add #(.W(W), .F(F)) u_24_25 (
    .x1(p24a), .y1(p24b), .x2(p25a), .y2(p25b), .t1(Fo[5]), .t2(Fo[3])
  );

endmodule
