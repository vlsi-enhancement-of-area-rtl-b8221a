// tb_mem13_and: fills the buffer past its depth with random words, checking
// the write pointer, the wrap flag, every stored word (read port) and that
// cycles without we store nothing; then checks reset.
module tb_mem13_and;
  localparam int DEPTH = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we = 0;
  logic [127:0] wdata, rdata;
  logic [3:0] raddr, wr_ptr;
  logic wrapped;
  logic [127:0] model [DEPTH];
  int ptr = 0, writes = 0;

  mem13_and dut (.clk, .rst, .we, .wdata, .raddr, .rdata, .wr_ptr, .wrapped);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic readall();
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 4'(i); #1;
      check(rdata === model[i], $sformatf("word %0d", i));
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    wdata = '0; raddr = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    readall();
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      we = ($urandom % 3) != 0; wdata = aes_ref_pkg::rand128();
      @(posedge clk); #1;
      if (we) begin model[ptr] = wdata; ptr = (ptr + 1) % DEPTH; writes++; end
      check(wr_ptr === 4'(ptr), "write pointer");
      check(wrapped === (writes >= DEPTH), "wrap flag");
      we = 0;
      raddr = 4'($urandom % DEPTH); #1;
      check(rdata === model[raddr], "random read");
    end
    readall();
    check(writes > DEPTH, "buffer wrapped during test");
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    check(wr_ptr === 0 && !wrapped, "reset pointer");
    readall();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
