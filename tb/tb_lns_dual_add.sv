// tb_lns_dual_add: self-checking test of the shared-table dual LNS adder.
//
// Operand quadruples are drawn at random and then given signs that satisfy
// the pairing rule ((x1_s ^ y1_s) != (x2_s ^ y2_s)), so that over the run
// both routings occur: adder 1 on s_b with adder 2 on d_b, and the reverse.
// Both sums are compared bit for bit with the reference model. Directed
// cases cover equal exponents (s_b(0) and d_b(0)) in each routing. The
// number of cases in each routing is counted and must be non-zero.
// A time watchdog ends a hung run.
module tb_lns_dual_add;
  import lns_ref_pkg::*;

  localparam int W = 10;
  localparam int F = 4;

  logic [W-1:0] x1, y1, x2, y2, t1, t2;
  int checks = 0, failures = 0;
  int n_route_sb1 = 0, n_route_db1 = 0;

  lns_dual_add #(.W(W), .F(F)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] a1, logic [W-1:0] b1, logic [W-1:0] a2, logic [W-1:0] b2);
    logic [W-1:0] e1, e2;
    x1 = a1; y1 = b1; x2 = a2; y2 = b2;
    #1;
    if (a1[W-1] == b1[W-1]) n_route_sb1++; else n_route_db1++;
    e1 = W'(pack(add(unpack(32'(a1), W), unpack(32'(b1), W), W, F), W));
    e2 = W'(pack(add(unpack(32'(a2), W), unpack(32'(b2), W), W, F), W));
    checks += 2;
    if (t1 !== e1) begin
      failures++;
      $display("FAIL t1 %h+%h: got %h expected %h", a1, b1, t1, e1);
    end
    if (t2 !== e2) begin
      failures++;
      $display("FAIL t2 %h+%h: got %h expected %h", a2, b2, t2, e2);
    end
  endtask

  initial begin
    // 1+1 = 2^(15/16) beside 1+(-1) = zero code, in both routings.
    apply({1'b0, 9'd0}, {1'b0, 9'd0}, {1'b0, 9'd0}, {1'b1, 9'd0});
    checks += 2;
    if (t1 !== {1'b0, 9'd15} || t2[W-2:0] !== 9'h100) begin failures++; $display("FAIL directed 1"); end
    apply({1'b0, 9'd0}, {1'b1, 9'd0}, {1'b1, 9'd0}, {1'b1, 9'd0});
    checks += 2;
    if (t1[W-2:0] !== 9'h100 || t2 !== {1'b1, 9'd15}) begin failures++; $display("FAIL directed 2"); end
    for (int i = 0; i < 200000; i++) begin
      logic [W-1:0] a1, b1, a2, b2;
      a1 = W'($urandom); b1 = W'($urandom); a2 = W'($urandom); b2 = W'($urandom);
      // Force the pairing rule by choosing y2's sign.
      b2[W-1] = ~(a1[W-1] ^ b1[W-1] ^ a2[W-1]);
      apply(a1, b1, a2, b2);
    end
    checks++;
    if (n_route_sb1 == 0 || n_route_db1 == 0) begin
      failures++;
      $display("FAIL a routing never occurred");
    end
    $display("routing: adder 1 on s_b %0d times, on d_b %0d times", n_route_sb1, n_route_db1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
