// tb_control_logic: drives the sequencer with stand-in units that answer
// after random delays, and checks the order and timing of enc_start,
// dec_start, mem_we and done, busy, and that start while busy is ignored.
module tb_control_logic;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, enc_done = 0, dec_done = 0;
  logic enc_start, dec_start, mem_we, busy, done;

  control_logic dut (.clk, .rst, .start, .enc_done, .dec_done,
                     .enc_start, .dec_start, .mem_we, .busy, .done);

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

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!busy && !enc_start && !dec_start && !mem_we && !done, "idle after reset");
    for (int n = 0; n < 50; n++) begin
      int d;
      start = 1; @(posedge clk); #1 start = 0;
      check(enc_start && busy, "enc_start right after start");
      @(posedge clk); #1;
      check(!enc_start, "enc_start one cycle");
      d = $urandom % 8;
      repeat (d) begin
        start = (d % 2);       // start while busy is ignored
        check(!dec_start && !mem_we && !done && !enc_start, "quiet while encrypting");
        @(posedge clk); #1;
      end
      start = 0;
      enc_done = 1; @(posedge clk); #1 enc_done = 0;
      check(dec_start, "dec_start after enc_done");
      @(posedge clk); #1;
      d = $urandom % 8;
      repeat (d) begin
        check(!dec_start && !mem_we && !done && busy, "quiet while decrypting");
        @(posedge clk); #1;
      end
      dec_done = 1; @(posedge clk); #1 dec_done = 0;
      check(mem_we && !done && busy, "mem_we after dec_done");
      @(posedge clk); #1;
      check(!mem_we && done, "done one cycle after mem_we");
      @(posedge clk); #1;
      check(!done && !busy, "back to idle");
      repeat ($urandom % 3) begin @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
