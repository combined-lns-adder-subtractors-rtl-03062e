// tb_lns_sbdb_rom: exhaustive check of the s_b/d_b table.
//
// Every address of both tables is read, with the d_b address driven
// independently of the s_b address, and each entry is compared with
// round(2^F log2(1 +- 2^-a/2^F)) computed in real arithmetic (reference
// model lns_ref_pkg). A few entries are also checked against values worked
// out by hand for W = 10, F = 4. A time watchdog ends a hung run.
module tb_lns_sbdb_rom;
  import lns_ref_pkg::*;

  localparam int W = 10;
  localparam int F = 4;

  logic [W-2:0] sb_addr, db_addr;
  logic [F-1:0] sb;
  logic [W-2:0] db;
  int checks = 0, failures = 0;

  lns_sbdb_rom #(.W(W), .F(F)) dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int sx(logic [W-2:0] v);
    return int'($signed(v));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << (W - 1)); a++) begin
      sb_addr = (W-1)'(a);
      db_addr = (W-1)'((a * 37 + 11) % (1 << (W - 1)));
      #1;
      check($sformatf("sb[%0d]", a), int'(sb), sb_of(a, F));
      check($sformatf("db[%0d]", int'(db_addr)), sx(db), db_of(int'(db_addr), W, F));
    end
    // Hand-worked entries: s_b(0) = 1 held at 15/16; s_b(-1) = log2 1.5 =
    // 0.585 -> 9/16; d_b(0) -> -16; d_b(-1) = -1 -> -16/16; d_b(-1/16):
    // log2(1 - 2^-1/16) = -4.56 -> -73/16.
    sb_addr = 0;  db_addr = 0;  #1;
    check("sb(0)", int'(sb), 15);
    check("db(0)", sx(db), -256);
    sb_addr = 16; db_addr = 16; #1;
    check("sb(-1)", int'(sb), 9);
    check("db(-1)", sx(db), -16);
    db_addr = 1; #1;
    check("db(-1/16)", sx(db), -73);
    sb_addr = 511; db_addr = 511; #1;
    check("sb(-31.9)", int'(sb), 0);
    check("db(-31.9)", sx(db), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
