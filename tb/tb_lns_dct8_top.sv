// tb_lns_dct8_top: end-to-end test of the LNS DCT at its default size.
//
// Streams 3000 blocks of eight 9-bit samples through lns_dct8_top with
// in_valid high on most cycles and low on some, so that back-to-back blocks
// and idle cycles both occur. For each block the testbench predicts, with
// the reference model, the LNS output words (bit exact) and the fixed-point
// outputs, and checks that out_valid appears exactly two clock edges after
// in_valid and that the outputs hold while no new result arrives.
// The results are also held against the exact real-valued DCT: the error of
// each coefficient must stay within 4 + 10% of the block's summed |f(n)|
// (the worst error seen is printed). The bound is set by flat blocks: s_b(0)
// is held at 15/16, so X+X comes out 2^(15/16) X, 4% low, and F(0) passes
// three such additions.
//
// Mechanisms that must each occur at least once, counted and reported:
// s_b and d_b lookups, exact cancellation (d_b(0)), clamping at the smallest
// code, both routings of the shared-table pairs, back-to-back blocks and
// idle cycles. The watchdog is a cycle count.
module tb_lns_dct8_top;
  import lns_ref_pkg::*;

  localparam int W = lns_pkg::LNS_W;
  localparam int F = lns_pkg::LNS_F;
  localparam int NBLK = 3000;

  logic         clk = 0;
  logic         rst_n;
  logic         in_valid;
  logic [8:0]   in_f    [8];
  logic         out_valid;
  logic [11:0]  out_F   [8];
  logic [W-1:0] out_lns [8];

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_b2b = 0, n_idle = 0;
  real worst = 0.0;
  real err_sum = 0.0, rel_sum = 0.0;
  int  n_err = 0;

  lns_dct8_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20 * NBLK + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results, in the order blocks were accepted.
  typedef struct {
    logic [W-1:0] lns [8];
    int           fix [8];
    real          ref_val [8];
    int           sumabs;
  } exp_t;
  exp_t q [$];
  logic v_hist [2];   // in_valid at the previous edge and the one before
  logic [W-1:0] last_lns [8];

  task automatic predict(int s [8]);
    exp_t e;
    lw_t li [8], lo [8];
    real rv [8];
    bit ok;
    e.sumabs = 0;
    for (int i = 0; i < 8; i++) begin
      int m;
      m = (s[i] < 0) ? -s[i] : s[i];
      if (m > 255) m = 255;
      li[i] = from_real(real'(m), W, F);
      li[i].s = (s[i] < 0) ? 1 : 0;
      rv[i] = real'(s[i]);
      e.sumabs += m;
    end
    ok = dct8(li, lo, W, F);
    if (!ok) begin failures++; $display("FAIL pairing rule broken"); end
    for (int k = 0; k < 8; k++) begin
      int m;
      e.lns[k] = W'(pack(lo[k], W));
      m = rnd($pow(2.0, real'(lo[k].e) / real'(1 << F)));
      if (m > 2047) m = 2047;
      e.fix[k] = (lo[k].s != 0) ? -m : m;
      e.ref_val[k] = dct_exact(rv, k);
    end
    q.push_back(e);
  endtask

  int sent = 0;
  int s [8];

  initial begin
    rst_n = 0;
    in_valid = 0;
    for (int i = 0; i < 8; i++) in_f[i] = '0;
    v_hist = '{0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (sent < NBLK) begin
      @(negedge clk);
      if (sent > 0 && $urandom_range(7) == 0) begin
        in_valid = 0;
        for (int i = 0; i < 8; i++) in_f[i] = 9'($urandom);   // ignored
      end else begin
        case (sent)
          0: s = '{0, 0, 0, 0, 0, 0, 0, 0};
          1: s = '{255, 255, 255, 255, 255, 255, 255, 255};
          2: s = '{-256, 255, -256, 255, -256, 255, -256, 255};
          3: s = '{7, 7, 7, 7, -7, -7, -7, -7};
          4: s = '{1, 0, 0, 0, 0, 0, 0, 0};
          default:
            for (int i = 0; i < 8; i++)
              s[i] = (sent % 3 == 0) ? int'($urandom_range(255))
                                     : int'($urandom_range(511)) - 256;
        endcase
        in_valid = 1;
        for (int i = 0; i < 8; i++) in_f[i] = 9'(s[i]);
        predict(s);
        sent++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(negedge clk);
    finish_up();
  end

  // Checks at each rising edge, on the values the edge just produced.
  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      #1;
      checks++;
      // A block sampled at edge j-1 is in the output register after edge j.
      if (out_valid !== v_hist[0]) begin
        failures++;
        $display("FAIL out_valid %b, expected %b (latency 2)", out_valid, v_hist[0]);
      end
      if (v_hist[1] && v_hist[0]) n_b2b++;
      if (!v_hist[0]) n_idle++;
      if (out_valid && v_hist[0]) begin
        exp_t e;
        e = q.pop_front();
        for (int k = 0; k < 8; k++) begin
          real err;
          checks += 3;
          if (out_lns[k] !== e.lns[k]) begin
            failures++;
            $display("FAIL LNS F(%0d): got %h expected %h", k, out_lns[k], e.lns[k]);
          end
          if (int'($signed(out_F[k])) != e.fix[k]) begin
            failures++;
            $display("FAIL F(%0d): got %0d expected %0d", k, $signed(out_F[k]), e.fix[k]);
          end
          err = fabs(real'($signed(out_F[k])) - e.ref_val[k]);
          if (err > worst) worst = err;
          err_sum += err;
          if (e.sumabs > 0) rel_sum += err / real'(e.sumabs);
          n_err++;
          if (err > 4.0 + 0.10 * real'(e.sumabs)) begin
            failures++;
            $display("FAIL F(%0d) = %0d far from exact %f", k, $signed(out_F[k]), e.ref_val[k]);
          end
        end
        last_lns = out_lns;
      end else if (!v_hist[0] && cycles > 3) begin
        checks++;
        if (out_lns != last_lns) begin
          failures++;
          $display("FAIL outputs changed without a new result");
        end
      end
      v_hist[1] = v_hist[0];
      v_hist[0] = in_valid;
    end
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  task automatic finish_up();
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", q.size());
    end
    $display("blocks %0d, worst |error| against the exact DCT %f", sent, worst);
    $display("mean |error| %f, mean |error| / sum|f| %f", err_sum / real'(n_err), rel_sum / real'(n_err));
    need("s_b lookups (equal signs)", n_sb);
    need("d_b lookups (opposite signs)", n_db);
    need("exact cancellations, d_b(0)", n_cancel);
    need("clamps at the smallest code", n_sat_lo);
    need("shared pair, first adder on s_b", n_pair_sb1);
    need("shared pair, first adder on d_b", n_pair_db1);
    need("back-to-back blocks", n_b2b);
    need("idle cycles", n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
