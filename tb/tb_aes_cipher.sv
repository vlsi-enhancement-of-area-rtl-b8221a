// tb_aes_cipher: encrypts the FIPS-197 Appendix B and C.1 vectors and random
// blocks under random keys, compares with the reference model, checks that
// done comes exactly 11 edges after start, that busy covers the operation, and
// that a start while busy is ignored.
module tb_aes_cipher;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [127:0] data, key, cipher;
  logic done, busy;

  aes_cipher dut (.clk, .rst, .start, .data, .key, .cipher, .done, .busy);

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
      if (poke && cycles == 4) begin
        // start while busy with other inputs must be ignored
        data = ~pt; key = ~k; start = 1;
        @(posedge clk); #1 start = 0;
      end else begin
        @(posedge clk); #1;
      end
      cycles++;
      if (cycles > 40) break;
    end
    check(cycles == 11, $sformatf("latency %0d, expected 11", cycles));
    check(cipher === exp, $sformatf("cipher %032h expected %032h", cipher, exp));
    @(posedge clk); #1;
    check(!done && !busy && cipher === exp, "idle after done, cipher held");
  endtask

  initial begin
    data = '0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!busy && !done, "idle after reset");
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'h3925841d02dc09fbdc118597196a0b32, 0);
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    for (int n = 0; n < 30; n++) begin
      logic [127:0] p, k;
      p = aes_ref_pkg::rand128(); k = aes_ref_pkg::rand128();
      run(p, k, aes_ref_pkg::encrypt(p, k), n % 5 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
