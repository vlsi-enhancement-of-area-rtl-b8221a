// tb_rcon_rom: the ten AES round constants (successive doublings of 1 in
// GF(2^8)) at addresses 0..9 and zero above.
module tb_rcon_rom;
  int checks = 0, failures = 0;
  logic [3:0] addr;
  logic [7:0] rcon, exp;

  rcon_rom dut (.addr, .rcon);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp = 8'h01;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
      checks++;
      if (rcon !== ((i < 10) ? exp : 8'h00)) begin
        failures++;
        $display("FAIL addr=%0d got=%02h", i, rcon);
      end
      exp = aes_ref_pkg::mul(exp, 8'h02);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
