// tb_lns_to_fixed: exhaustive test of the LNS to fixed-point converter.
//
// All 1024 LNS words are applied; the expected value is +-round(2^(e/16))
// clamped to 2047, computed in real arithmetic. Hand-worked cases:
// exponent 0 -> 1, 16 -> 2, {1, 160} -> -1024, 255 -> 2047 (clamped),
// zero code -> 0.
module tb_lns_to_fixed;
  import lns_ref_pkg::*;

  localparam int W = 10;
  localparam int F = 4;
  localparam int B = 11;

  logic [W-1:0] l;
  logic [B:0]   v;
  int checks = 0, failures = 0;

  lns_to_fixed #(.W(W), .F(F), .B(B)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_val(logic [W-1:0] word, int exp);
    l = word;
    #1;
    checks++;
    if (int'($signed(v)) != exp) begin
      failures++;
      $display("FAIL l=%h: got %0d expected %0d", word, $signed(v), exp);
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      lw_t r;
      int m;
      r = unpack(32'(i), W);
      m = rnd($pow(2.0, real'(r.e) / 16.0));
      if (m > 2047) m = 2047;
      expect_val(W'(i), (r.s != 0) ? -m : m);
    end
    expect_val({1'b0, 9'd0}, 1);
    expect_val({1'b0, 9'd16}, 2);
    expect_val({1'b1, 9'd160}, -1024);
    expect_val({1'b0, 9'd255}, 2047);
    expect_val({1'b0, 9'h100}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
