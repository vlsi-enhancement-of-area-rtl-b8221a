// tb_securityenabled_NFT: end-to-end test of the encrypt -> decrypt -> store
// chain at its default parameters.
//
// Runs the block of the results waveform (text ...0123 under key ...0456),
// the FIPS-197 Appendix B and C.1 vectors and random blocks and keys; more
// passes than the buffer has words, so the write pointer wraps. For each pass
// it checks the ciphertext against the reference model, that the decrypted
// text equals the plaintext, that done arrives 38 edges after start, and that
// the memory holds every stored block at its address. It also counts how
// often each mechanism of the design ran and fails if one never did:
// last-round MixColumns bypass, first-round InvMixColumns bypass, round-key
// storing, memory wrap-around, a start ignored while busy, and a reset in the
// middle of a pass (everything returns to idle, the buffer empties, and the
// next pass works).
module tb_securityenabled_NFT;
  localparam int DEPTH = 16;
  localparam int PASSES = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [127:0] data_in, key, aes_encod, aes_decod, mem;
  logic [3:0] mem_rd_addr, mem_wr_ptr;
  logic mem_wrapped, busy, done;
  logic [127:0] model [DEPTH];
  int ptr = 0;
  int n_mc_bypass = 0, n_imc_bypass = 0, n_key_store = 0, n_wrap = 0, n_ignored = 0, n_reset = 0;

  securityenabled_NFT dut (
    .clk, .rst, .start, .data_in, .key, .mem_rd_addr,
    .aes_encod, .aes_decod, .mem, .mem_wr_ptr, .mem_wrapped, .busy, .done
  );

  always #5 clk = ~clk;

  initial begin
    repeat (PASSES * 60 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed inside the units
  always @(posedge clk) if (!rst) begin
    if (dut.aesc1.busy && dut.aesc1.count == 4'd9) n_mc_bypass++;
    if (dut.aesd1.phase == 2'd2 && dut.aesd1.count == 4'd0) n_imc_bypass++;
    if (dut.aesd1.phase == 2'd1) n_key_store++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pass(logic [127:0] pt, logic [127:0] k, bit poke);
    int cycles = 0;
    logic [127:0] exp_ct;
    bit was_wrapped;
    exp_ct = aes_ref_pkg::encrypt(pt, k);
    was_wrapped = mem_wrapped;
    data_in = pt; key = k; start = 1;
    @(posedge clk); #1 start = 0;
    while (!done && cycles < 100) begin
      if (poke && cycles == 20) begin
        start = 1; n_ignored++;      // must be ignored: a pass is running
      end else start = 0;
      @(posedge clk); #1;
      cycles++;
    end
    start = 0;
    check(cycles == 38, $sformatf("latency %0d, expected 38", cycles));
    check(aes_encod === exp_ct, $sformatf("cipher %032h expected %032h", aes_encod, exp_ct));
    check(aes_decod === pt, $sformatf("decoded %032h expected %032h", aes_decod, pt));
    model[ptr] = pt;
    ptr = (ptr + 1) % DEPTH;
    check(mem_wr_ptr === 4'(ptr), "memory write pointer");
    mem_rd_addr = 4'((ptr + DEPTH - 1) % DEPTH); #1;
    check(mem === pt, "stored word");
    if (mem_wrapped && !was_wrapped) n_wrap++;
    @(posedge clk); #1;
    check(!busy && !done, "idle after pass");
  endtask

  initial begin
    data_in = '0; key = '0; mem_rd_addr = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // block shown in the results waveform
    pass(128'h123, 128'h456, 0);
    $display("waveform vector: data_in=%032h key=%032h aes_encod=%032h aes_decod=%032h",
             128'h123, 128'h456, aes_encod, aes_decod);
    pass(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 0);
    check(aes_encod === 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 appendix B");
    pass(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 1);
    check(aes_encod === 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 appendix C.1");
    for (int n = 3; n < PASSES; n++)
      pass(aes_ref_pkg::rand128(), aes_ref_pkg::rand128(), n % 7 == 0);
    for (int i = 0; i < DEPTH; i++) begin
      mem_rd_addr = 4'(i); #1;
      check(mem === model[i], $sformatf("memory word %0d", i));
    end
    // reset in the middle of a pass, once during encryption, once during
    // decryption
    for (int w = 5; w <= 25; w += 20) begin
      data_in = aes_ref_pkg::rand128(); key = aes_ref_pkg::rand128(); start = 1;
      @(posedge clk); #1 start = 0;
      repeat (w) @(posedge clk);
      #1 rst = 1;
      @(posedge clk); #1 rst = 0;
      n_reset++;
      check(!busy && !done && !dut.aesc1.busy && !dut.aesd1.busy, "idle after reset");
      check(mem_wr_ptr === 0 && !mem_wrapped, "buffer pointer cleared by reset");
      check(aes_encod === '0 && aes_decod === '0, "outputs cleared by reset");
      for (int i = 0; i < DEPTH; i++) model[i] = '0;
      ptr = 0;
      repeat (3) @(posedge clk);
      #1;
      check(!done, "no done after an aborted pass");
      pass(aes_ref_pkg::rand128(), aes_ref_pkg::rand128(), 0);
    end
    $display("mechanisms: mixcolumns-bypass=%0d invmixcolumns-bypass=%0d key-store-cycles=%0d wrap=%0d ignored-start=%0d reset=%0d",
             n_mc_bypass, n_imc_bypass, n_key_store, n_wrap, n_ignored, n_reset);
    // the pass aborted during decryption had finished its encryption and
    // stored its keys
    check(n_mc_bypass == PASSES + 3, "last-round MixColumns bypass once per encryption");
    check(n_imc_bypass == PASSES + 2, "first-round InvMixColumns bypass once per decryption");
    check(n_key_store == 11 * (PASSES + 2) + 11, "11 round-key cycles per decryption");
    check(n_reset == 2, "reset during a pass exercised");
    check(n_wrap > 0, "memory wrapped");
    check(n_ignored > 0, "start while busy exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
