// tb_xor4_rom: all 16 addresses of the 4-input XOR ROM against the XOR of
// the address bits.
module tb_xor4_rom;
  int checks = 0, failures = 0;
  logic [3:0] addr;
  logic       data;

  xor4_rom dut (.addr, .data);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
      checks++;
      if (data !== (addr[0] ^ addr[1] ^ addr[2] ^ addr[3])) begin
        failures++;
        $display("FAIL addr=%b got=%b", addr, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
