// tb_lns_dct8: self-checking test of the combinational LNS Chen DCT.
//
// Applies directed blocks (all zero, constant, alternating signs, a single
// impulse) and 20000 random blocks, half of them LNS images of 9-bit samples
// and half arbitrary LNS words. All eight outputs are compared bit for bit
// with the reference model, which evaluates the same flow graph with LNS
// operations computed from their definitions. The sign-parity rule of the
// three shared-table pairs must hold for every block (it is also asserted
// inside lns_dual_add), and both routings of the pairs must occur.
// A time watchdog ends a hung run.
module tb_lns_dct8;
  import lns_ref_pkg::*;

  localparam int W = 10;
  localparam int F = 4;

  logic [W-1:0] f  [8];
  logic [W-1:0] Fo [8];
  int checks = 0, failures = 0;

  lns_dct8 #(.W(W), .F(F)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(lw_t blk [8]);
    lw_t exp [8];
    bit ok;
    for (int i = 0; i < 8; i++) f[i] = W'(pack(blk[i], W));
    #1;
    ok = dct8(blk, exp, W, F);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL pairing rule broken");
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (Fo[k] !== W'(pack(exp[k], W))) begin
        failures++;
        $display("FAIL F(%0d): got %h expected %h", k, Fo[k], W'(pack(exp[k], W)));
      end
    end
  endtask

  task automatic apply_samples(int s [8]);
    lw_t blk [8];
    for (int i = 0; i < 8; i++) blk[i] = from_real(real'(s[i]), W, F);
    apply(blk);
  endtask

  initial begin
    int s [8];
    lw_t blk [8];
    s = '{0, 0, 0, 0, 0, 0, 0, 0};           apply_samples(s);
    s = '{100, 100, 100, 100, 100, 100, 100, 100}; apply_samples(s);
    s = '{50, -50, 50, -50, 50, -50, 50, -50}; apply_samples(s);
    s = '{255, 0, 0, 0, 0, 0, 0, 0};         apply_samples(s);
    s = '{-255, -255, -255, -255, 255, 255, 255, 255}; apply_samples(s);
    for (int t = 0; t < 20000; t++) begin
      if (t % 2 == 0) begin
        for (int i = 0; i < 8; i++) s[i] = int'($urandom_range(510)) - 255;
        apply_samples(s);
      end else begin
        for (int i = 0; i < 8; i++) blk[i] = unpack($urandom, W);
        apply(blk);
      end
    end
    checks++;
    if (n_pair_sb1 == 0 || n_pair_db1 == 0) begin
      failures++;
      $display("FAIL a routing of the shared-table pairs never occurred");
    end
    $display("pairs: first adder on s_b %0d, on d_b %0d; cancellations %0d",
             n_pair_sb1, n_pair_db1, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
