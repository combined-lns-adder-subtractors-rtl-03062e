// lns_dct8_top: one-cycle 8-point DCT with LNS arithmetic and fixed-point
// input and output.
//
// Eight fixed-point samples are converted to LNS words by table lookup
// (lns_from_fixed), transformed by the combinational LNS Chen DCT (lns_dct8,
// whose 26 adders run on 13 shared-table units), and converted back to
// fixed point by antilog tables (lns_to_fixed). A new block of eight samples
// can be accepted every clock cycle.
//
// Timing (this design's choice; the document describes the DCT datapath as
// one-cycle hardware but gives no registers or handshake):
//   edge k    in_valid/in_f sampled; the converted LNS words are registered
//   edge k+1  the DCT result is registered; out_valid = 1, out_F and out_lns
//             hold F(0..7) until the next edge
// so the latency is two clock edges and the throughput one block per cycle.
// out_F is the output register passed through the antilog tables; out_lns
// is the LNS result itself, for a consumer that keeps LNS data (such as a
// coder that merges the conversion into variable-length coding).
// rst_n is synchronous and active low and clears only the valid flags.
//
// Outputs follow the flow graph scaling: F(k) = sum f(n) cos((2n+1)k pi/16),
// F(0) = sum f(n)/sqrt(2). With 9-bit samples (|f| <= 255) all outputs fit
// in the 12-bit result.
module lns_dct8_top
  import lns_pkg::*;
#(
  parameter int W = LNS_W,     // LNS word size
  parameter int F = LNS_F,     // fraction bits of the exponent
  parameter int M = 8,         // magnitude bits of an input sample
  parameter int B = 11         // magnitude bits of an output coefficient
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M:0]   in_f    [8],   // f(0)..f(7), two's complement
  output logic         out_valid,
  output logic [B:0]   out_F   [8],   // F(0)..F(7), two's complement
  output logic [W-1:0] out_lns [8]    // F(0)..F(7), LNS words
);

  logic [W-1:0] f_lns  [8];
  logic [W-1:0] f_q    [8];
  logic [W-1:0] dct    [8];
  logic         v_q;

  for (genvar i = 0; i < 8; i++) begin : g_in
    lns_from_fixed #(.W(W), .F(F), .M(M)) u_conv (.v(in_f[i]), .l(f_lns[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
  end

  // Data registers load only with valid data; they need no reset.
  always_ff @(posedge clk) begin
    if (in_valid) f_q <= f_lns;
    if (v_q)      out_lns <= dct;
  end

  lns_dct8 #(.W(W), .F(F)) u_dct (.f(f_q), .Fo(dct));

  for (genvar i = 0; i < 8; i++) begin : g_out
    lns_to_fixed #(.W(W), .F(F), .B(B)) u_conv (.l(out_lns[i]), .v(out_F[i]));
  end

endmodule
