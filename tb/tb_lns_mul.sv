// tb_lns_mul: self-checking test of the LNS multiplier.
//
// Checks directed products (signs, 2 x 0.5 = 1, both saturation limits) and
// 100000 random operand pairs against the reference model (exponent sum,
// sign XOR, clamped to the exponent range). A time watchdog ends a hung run.
module tb_lns_mul;
  import lns_ref_pkg::*;

  localparam int W = 10;
  localparam int F = 4;

  logic [W-1:0] a, b, p;
  int checks = 0, failures = 0;

  lns_mul #(.W(W)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] ia, logic [W-1:0] ib, logic [W-1:0] exp);
    a = ia;
    b = ib;
    #1;
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %h * %h: got %h expected %h", ia, ib, p, exp);
    end
  endtask

  initial begin
    apply({1'b0, 9'd16}, {1'b0, -9'sd16}, {1'b0, 9'd0});      // 2 * 0.5 = 1
    apply({1'b1, 9'd16}, {1'b0, 9'd16},   {1'b1, 9'd32});     // -2 * 2 = -4
    apply({1'b1, 9'd5},  {1'b1, 9'd7},    {1'b0, 9'd12});     // signs cancel
    apply({1'b0, 9'd200}, {1'b0, 9'd100}, {1'b0, 9'h0ff});    // clamp high
    apply({1'b0, 9'h100}, {1'b1, 9'h1f0}, {1'b1, 9'h100});    // clamp low
    for (int i = 0; i < 100000; i++) begin
      logic [W-1:0] ra, rb;
      ra = W'($urandom);
      rb = W'($urandom);
      apply(ra, rb, W'(pack(mul(unpack(32'(ra), W), unpack(32'(rb), W), W), W)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
