// tb_lns_precision_sweep: the LNS DCT datapath at the four precisions of
// the area study, F = 2, 3, 4, 5 with W = F + 6 (W = 8, 9, 10, 11).
//
// One lns_dct8 per precision receives the same random 9-bit sample blocks,
// each converted to LNS at its own precision. Every output is compared bit
// for bit with the reference model at that precision, and the worst error
// against the exact DCT is reported per precision, which shows the accuracy
// gained per fraction bit. The error bound checked is 4 plus a fraction of
// the block's summed |f(n)| that depends on F (see TOL). Each precision's
// table size, (2F + 5) 2^(F+5) bits, is printed with the results.
module tb_lns_precision_sweep;
  import lns_ref_pkg::*;

  localparam int NCFG = 4;
  localparam int NBLK = 5000;
  // Relative error bounds per precision. Sums of equal operands come out
  // 2^(1 - 2^-F) instead of 2 (s_b(0) held at 1 - 2^-F), and F(0) passes
  // three of them, so a flat block loses 1 - 2^(-3/2^F) of its DC value:
  // 41% at F = 2, 23% at F = 3, 12% at F = 4, 6% at F = 5.
  localparam real TOL [NCFG] = '{0.35, 0.20, 0.10, 0.10};

  int checks = 0, failures = 0;
  int samples [8];
  real worst [NCFG];

  // Input words and outputs of each configuration, W at most 11.
  logic [10:0] fin  [NCFG][8];
  logic [10:0] fout [NCFG][8];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int F = c + 2;
    localparam int W = F + 6;
    logic [W-1:0] fi [8];
    logic [W-1:0] fo [8];
    for (genvar i = 0; i < 8; i++) begin : g_io
      assign fi[i] = fin[c][i][W-1:0];
      assign fout[c][i] = 11'(fo[i]);
    end
    lns_dct8 #(.W(W), .F(F)) dut (.f(fi), .Fo(fo));
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCFG; c++) worst[c] = 0.0;
    for (int b = 0; b < NBLK; b++) begin
      lw_t li [NCFG][8];
      real rv [8];
      int sumabs;
      sumabs = 0;
      for (int i = 0; i < 8; i++) begin
        samples[i] = (b == 0) ? 200 : int'($urandom_range(510)) - 255;
        rv[i] = real'(samples[i]);
        sumabs += (samples[i] < 0) ? -samples[i] : samples[i];
      end
      for (int c = 0; c < NCFG; c++)
        for (int i = 0; i < 8; i++) begin
          li[c][i] = from_real(rv[i], c + 8, c + 2);
          fin[c][i] = 11'(pack(li[c][i], c + 8));
        end
      #1;
      for (int c = 0; c < NCFG; c++) begin
        lw_t lo [8];
        bit ok;
        ok = dct8(li[c], lo, c + 8, c + 2);
        checks++;
        if (!ok) begin failures++; $display("FAIL pairing rule, F=%0d", c + 2); end
        for (int k = 0; k < 8; k++) begin
          real err, tol;
          checks += 2;
          if (fout[c][k] !== 11'(pack(lo[k], c + 8))) begin
            failures++;
            $display("FAIL F=%0d F(%0d): got %h expected %h", c + 2, k, fout[c][k], 11'(pack(lo[k], c + 8)));
          end
          err = fabs(to_real(unpack(32'(fout[c][k]), c + 8), c + 2) - dct_exact(rv, k));
          if (err > worst[c]) worst[c] = err;
          tol = 4.0 + TOL[c] * real'(sumabs);
          if (err > tol) begin
            failures++;
            $display("FAIL F=%0d F(%0d) error %f", c + 2, k, err);
          end
        end
      end
    end
    for (int c = 0; c < NCFG; c++)
      $display("F=%0d W=%0d: table %0d bits, worst |error| %f over %0d blocks",
               c + 2, c + 8, (2 * (c + 2) + 5) << (c + 7), worst[c], NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
