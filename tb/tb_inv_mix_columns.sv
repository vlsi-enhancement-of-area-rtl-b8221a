// tb_inv_mix_columns: InvMixColumns undoing the FIPS-197 Appendix B round-1
// MixColumns, the classic test columns, and random states against the
// reference model.
module tb_inv_mix_columns;
  int checks = 0, failures = 0;
  logic [127:0] din, dout;

  inv_mix_columns dut (.din, .dout);

  task automatic check(logic [127:0] exp, string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s din=%032h got=%032h exp=%032h", what, din, dout, exp);
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
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    #1; check(128'hd4bf5d30e0b452aeb84111f11e2798e5, "appendix B");
    din = 128'h8e4da1bc9fdc589d01010101c6c6c6c6;
    #1; check(128'hdb135345f20a225c01010101c6c6c6c6, "test columns");
    for (int n = 0; n < 200; n++) begin
      din = aes_ref_pkg::rand128();
      #1; check(aes_ref_pkg::mix_columns(din, 1), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
