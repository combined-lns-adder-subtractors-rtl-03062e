// tb_lns_addsub: self-checking test of the combined LNS adder/subtractor.
//
// Drives directed corner cases (equal operands of both sign combinations,
// the zero code, the extremes of the exponent range) and 200000 random
// operand pairs. Both outputs are compared bit for bit with the reference
// model (lns_ref_pkg: X+Y and X-Y computed from the definitions of s_b and
// d_b), and for operands well inside the range the decoded results are also
// compared with real-valued X+Y and X-Y within the format's rounding error.
// A time watchdog ends a hung run.
module tb_lns_addsub;
  import lns_ref_pkg::*;

  localparam int W = 10;
  localparam int F = 4;

  logic [W-1:0] x, y, sum, diff;
  int checks = 0, failures = 0;

  lns_addsub #(.W(W), .F(F)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] a, logic [W-1:0] b);
    lw_t xa, yb, es, ed;
    real rs, rd, gs, gd;
    x = a;
    y = b;
    #1;
    xa = unpack(32'(a), W);
    yb = unpack(32'(b), W);
    es = add(xa, yb, W, F);
    ed = sub(xa, yb, W, F);
    checks += 2;
    if (sum !== W'(pack(es, W))) begin
      failures++;
      $display("FAIL sum x=%h y=%h got %h expected %h", a, b, sum, W'(pack(es, W)));
    end
    if (diff !== W'(pack(ed, W))) begin
      failures++;
      $display("FAIL diff x=%h y=%h got %h expected %h", a, b, diff, W'(pack(ed, W)));
    end
    // Value check: results within 1/16 of an octave plus table rounding.
    if (xa.e > -120 && yb.e > -120 && xa.e < 200 && yb.e < 200) begin
      rs = to_real(xa, F) + to_real(yb, F);
      rd = to_real(xa, F) - to_real(yb, F);
      gs = to_real(unpack(32'(sum), W), F);
      gd = to_real(unpack(32'(diff), W), F);
      checks++;
      if (rs != 0.0 && (fabs(rs) > 0.2 * fabs(to_real(xa, F)) || fabs(rs) > 0.2 * fabs(to_real(yb, F)))
          && fabs(gs - rs) > 0.06 * fabs(rs)) begin
        failures++;
        $display("FAIL value of sum x=%h y=%h: %f vs %f", a, b, gs, rs);
      end
      checks++;
      if (rd != 0.0 && (fabs(rd) > 0.2 * fabs(to_real(xa, F)) || fabs(rd) > 0.2 * fabs(to_real(yb, F)))
          && fabs(gd - rd) > 0.06 * fabs(rd)) begin
        failures++;
        $display("FAIL value of diff x=%h y=%h: %f vs %f", a, b, gd, rd);
      end
    end
  endtask

  initial begin
    // X = Y = 1: sum exponent 15/16 (s_b(0) held below 1), difference zero code.
    apply({1'b0, 9'd0}, {1'b0, 9'd0});
    checks += 2;
    if (sum !== {1'b0, 9'd15}) begin failures++; $display("FAIL 1+1"); end
    if (diff !== {1'b0, 9'h100}) begin failures++; $display("FAIL 1-1"); end
    // 2 + (-1): exponent 32 and -1 sign: sum = 1 (exp 0), diff = 3 (exp 25.4 -> 25).
    apply({1'b0, 9'd16}, {1'b1, 9'd0});
    checks += 2;
    if (sum !== {1'b0, 9'd0}) begin failures++; $display("FAIL 2+(-1) got %h", sum); end
    if (diff !== {1'b0, 9'd25}) begin failures++; $display("FAIL 2-(-1) got %h", diff); end
    // 1 - 2 = -1: sign of -Y.
    apply({1'b0, 9'd0}, {1'b0, 9'd16});
    checks++;
    if (diff !== {1'b1, 9'd0}) begin failures++; $display("FAIL 1-2 got %h", diff); end
    // Range extremes and the zero code.
    apply({1'b0, 9'h0ff}, {1'b0, 9'h0ff});
    apply({1'b1, 9'h0ff}, {1'b0, 9'h100});
    apply({1'b0, 9'h100}, {1'b1, 9'h100});
    apply({1'b1, 9'h100}, {1'b0, 9'h0ff});
    for (int i = 0; i < 200000; i++)
      apply(W'($urandom), (i % 4 == 0) ? W'($urandom) ^ W'(1 << (W - 1)) : W'($urandom));
    $display("s_b uses %0d, d_b uses %0d, cancellations %0d, clamps low %0d high %0d",
             n_sb, n_db, n_cancel, n_sat_lo, n_sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
