// tb_sub_bytes: SubBytes and InvSubBytes on the FIPS-197 Appendix B round-1
// state and on random states against the reference model.
module tb_sub_bytes;
  int checks = 0, failures = 0;
  logic [127:0] din, fwd, inv;

  sub_bytes #(.INVERSE(1'b0)) dut_f (.din, .dout(fwd));
  sub_bytes #(.INVERSE(1'b1)) dut_i (.din, .dout(inv));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s din=%032h got=%032h exp=%032h", what, din, got, exp);
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
    // FIPS-197 Appendix B, round 1: start of round -> after SubBytes
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    #1;
    check(fwd, 128'hd42711aee0bf98f1b8b45de51e415230, "appendix B");
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1;
    check(inv, 128'h193de3bea0f4e22b9ac68d2ae9f84808, "appendix B inverse");
    for (int n = 0; n < 100; n++) begin
      din = aes_ref_pkg::rand128();
      #1;
      check(fwd, aes_ref_pkg::sub_bytes(din, 0), "fwd");
      check(inv, aes_ref_pkg::sub_bytes(din, 1), "inv");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
