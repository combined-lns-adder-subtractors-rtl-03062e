// tb_lns_from_fixed: exhaustive test of the fixed-point to LNS converter.
//
// All 512 input codes are applied. The expected word is worked out from the
// sample: sign of the sample (zero is positive), exponent round(16 log2|v|)
// with |v| clamped to 255 and zero mapped to the most negative code.
// Hand-worked cases: 1 -> exponent 0, 2 -> 16, 255 -> 128, -3 -> {1, 25}.
module tb_lns_from_fixed;
  import lns_ref_pkg::*;

  localparam int W = 10;
  localparam int F = 4;
  localparam int M = 8;

  logic [M:0]   v;
  logic [W-1:0] l;
  int checks = 0, failures = 0;

  lns_from_fixed #(.W(W), .F(F), .M(M)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(int sample, logic [W-1:0] exp);
    v = (M+1)'(sample);
    #1;
    checks++;
    if (l !== exp) begin
      failures++;
      $display("FAIL v=%0d: got %h expected %h", sample, l, exp);
    end
  endtask

  initial begin
    for (int s = -(1 << M); s < (1 << M); s++) begin
      int mag;
      lw_t r;
      mag = (s < 0) ? -s : s;
      if (mag > (1 << M) - 1) mag = (1 << M) - 1;
      r = from_real(real'(mag), W, F);
      r.s = (s < 0) ? 1 : 0;
      expect_word(s, W'(pack(r, W)));
    end
    expect_word(1,   {1'b0, 9'd0});
    expect_word(2,   {1'b0, 9'd16});
    expect_word(255, {1'b0, 9'd128});
    expect_word(-3,  {1'b1, 9'd25});
    expect_word(0,   {1'b0, 9'h100});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
