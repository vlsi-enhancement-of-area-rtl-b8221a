// tb_aes_decipher: decrypts the FIPS-197 Appendix B and C.1 ciphertexts and
// random blocks under random keys, compares with the reference model, checks
// that done comes exactly 22 edges after start (11 to store the round keys,
// 11 to decrypt), that busy covers the operation, and that a start while busy
// (in either phase) is ignored.
module tb_aes_decipher;
  int checks = 0, failures = 0;
  int n_runs = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [127:0] data, key, text;
  logic done, busy;

  aes_decipher dut (.clk, .rst, .start, .cipher(data), .key, .text, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(logic [127:0] pt, logic [127:0] k, logic [127:0] exp, bit poke);
    int cycles = 0;
    data = pt; key = k; start = 1;
    @(posedge clk); #1 start = 0;
    check(busy, "busy after start");
    while (!done) begin
      if (poke && cycles == ((n_runs % 2) ? 4 : 15)) begin
        // start while busy with other inputs must be ignored
        data = ~pt; key = ~k; start = 1;
        @(posedge clk); #1 start = 0;
      end else begin
        @(posedge clk); #1;
      end
      cycles++;
      if (cycles > 60) break;
    end
    check(cycles == 22, $sformatf("latency %0d, expected 22", cycles));
    check(text === exp, $sformatf("text %032h expected %032h", text, exp));
    @(posedge clk); #1;
    check(!done && !busy && text === exp, "idle after done, text held");
    n_runs++;
  endtask

  initial begin
    data = '0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!busy && !done, "idle after reset");
    run(128'h3925841d02dc09fbdc118597196a0b32, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'h3243f6a8885a308d313198a2e0370734, 0);
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f,
        128'h00112233445566778899aabbccddeeff, 1);
    for (int n = 0; n < 30; n++) begin
      logic [127:0] p, k;
      p = aes_ref_pkg::rand128(); k = aes_ref_pkg::rand128();
      run(p, k, aes_ref_pkg::decrypt(p, k), n % 5 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
