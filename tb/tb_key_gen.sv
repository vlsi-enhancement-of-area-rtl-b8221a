// tb_key_gen: loads the FIPS-197 Appendix A.1 key and steps through all ten
// round keys (one per enabled clock edge, rcon address = step), comparing
// with the published last key and with the reference key expansion; then
// repeats for random keys with stalls (en low) in between.
module tb_key_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0, en = 0;
  logic [3:0] step;
  logic [127:0] key_in, round_key;
  logic [127:0] rk [11];

  key_gen dut (.clk, .rst, .load, .key_in, .en, .step, .round_key);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] exp, string what);
    checks++;
    if (round_key !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, round_key, exp);
    end
  endtask

  task automatic run_key(logic [127:0] k, bit stalls);
    aes_ref_pkg::expand_key(k, rk);
    key_in = k; load = 1; step = 0;
    @(posedge clk); #1 load = 0;
    check(rk[0], "round key 0");
    for (int r = 1; r <= 10; r++) begin
      if (stalls) begin
        en = 0;
        repeat ($urandom % 3) begin @(posedge clk); #1; check(rk[r-1], "stall"); end
      end
      step = 4'(r - 1); en = 1;
      @(posedge clk); #1 en = 0;
      check(rk[r], $sformatf("round key %0d", r));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 0);
    check(128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 A.1 round key 10");
    for (int n = 0; n < 20; n++) run_key(aes_ref_pkg::rand128(), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
