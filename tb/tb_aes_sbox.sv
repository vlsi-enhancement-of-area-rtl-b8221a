// tb_aes_sbox: checks both tables of aes_sbox against the reference S-Box
// (all 256 entries each), a few published FIPS-197 entries, and that the
// inverse table undoes the forward one.
module tb_aes_sbox;
  int checks = 0, failures = 0;
  logic [7:0] addr, fwd, inv;
  logic [7:0] sb [256], isb [256];

  aes_sbox #(.INVERSE(1'b0)) dut_f (.addr, .data(fwd));
  aes_sbox #(.INVERSE(1'b1)) dut_i (.addr, .data(inv));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%02h got=%02h exp=%02h", what, addr, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aes_ref_pkg::make_sbox(sb, isb);
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      check(fwd, sb[i], "sbox");
      check(inv, isb[i], "inv_sbox");
    end
    // FIPS-197 Figure 7 / Figure 14 spot values
    addr = 8'h00; #1; check(fwd, 8'h63, "sbox[00]");
    addr = 8'h53; #1; check(fwd, 8'hed, "sbox[53]"); check(inv, 8'h50, "inv_sbox[53]");
    addr = 8'hff; #1; check(fwd, 8'h16, "sbox[ff]"); check(inv, 8'h7d, "inv_sbox[ff]");
    addr = 8'hed; #1; check(inv, 8'h53, "inv_sbox[ed]");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
