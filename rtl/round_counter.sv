// round_counter: the 4-bit counter that is the whole control unit of the
// cipher.
//
// One counter steps the key generation module and the round datapath
// together, so the encryption datapath needs no controller of its own.
// clear restarts it at 0 (clear wins over en); while en is high it advances by
// one per clock edge; last is high while count == LAST. The counter wraps at 15.
// Synchronous active-high reset to 0.
module round_counter #(
  parameter logic [3:0] LAST = 4'd10
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       en,
  output logic [3:0] count,
  output logic       last
);
  always_ff @(posedge clk) begin
    if (rst || clear) count <= '0;
    else if (en)      count <= count + 4'd1;
  end

  assign last = (count == LAST);
endmodule
