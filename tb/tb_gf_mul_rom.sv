// tb_gf_mul_rom: checks the six multiplier tables used by MixColumns and
// InvMixColumns (x2, x3, x9, x11, x13, x14) for every address against the
// reference shift-and-add product.
module tb_gf_mul_rom;
  int checks = 0, failures = 0;
  logic [7:0] addr;
  logic [7:0] d [6];
  localparam logic [7:0] M [6] = '{8'h02, 8'h03, 8'h09, 8'h0b, 8'h0d, 8'h0e};

  for (genvar k = 0; k < 6; k++) begin : g_dut
    gf_mul_rom #(.MULT(M[k])) dut (.addr, .data(d[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (d[k] !== aes_ref_pkg::mul(addr, M[k])) begin
          failures++;
          $display("FAIL x%0d addr=%02h got=%02h", M[k], addr, d[k]);
        end
      end
    end
    // FIPS-197 4.2 example: {57}*{13} = {fe} is not a table here; {57}*{02} = {ae}
    addr = 8'h57; #1; checks++; if (d[0] !== 8'hae) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
