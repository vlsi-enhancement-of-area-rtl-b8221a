// tb_round_counter: reset, clear, counting while enabled, holding while not,
// the `last` flag at 10, clear priority over enable, and wrap at 15.
module tb_round_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clear = 0, en = 0;
  logic [3:0] count;
  logic last;
  int model;

  round_counter dut (.clk, .rst, .clear, .en, .count, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    checks += 2;
    if (count !== 4'(model)) begin failures++; $display("FAIL count=%0d exp=%0d", count, model); end
    if (last !== (model == 10)) begin failures++; $display("FAIL last at %0d", model); end
  end

  always @(posedge clk) begin
    if (rst || clear) model <= 0;
    else if (en)      model <= (model + 1) % 16;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      #1;
      en    = ($urandom % 4) != 0;
      clear = ($urandom % 23) == 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
