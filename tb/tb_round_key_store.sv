// tb_round_key_store: writes 11 random keys, reads them back in reverse
// order, overwrites some and checks that writes without we change nothing.
module tb_round_key_store;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [3:0] waddr, raddr;
  logic [127:0] wdata, rdata;
  logic [127:0] model [11];

  round_key_store dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic readall();
    for (int i = 10; i >= 0; i--) begin
      raddr = 4'(i); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL key %0d", i); end
    end
  endtask

  initial begin
    for (int i = 0; i <= 10; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i); wdata = aes_ref_pkg::rand128(); model[i] = wdata;
    end
    @(negedge clk) we = 0;
    readall();
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      we = $urandom % 2; waddr = 4'($urandom % 11); wdata = aes_ref_pkg::rand128();
      if (we) model[waddr] = wdata;
    end
    @(negedge clk) we = 0;
    readall();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
