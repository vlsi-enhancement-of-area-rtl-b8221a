// round_key_store: the decryption unit's extra register for round keys.
//
// Decryption needs the round keys in reverse order (round key 10 first), while
// the key generation module produces them in forward order, so all NKEYS keys
// are written here first and read back afterwards. One synchronous write port
// (we/waddr/wdata) and one combinational read port (raddr/rdata). Addresses at
// or above NKEYS are ignored on write and read as zero. No reset: a key is
// always written before it is read.
module round_key_store #(
  parameter int unsigned NKEYS = 11
) (
  input  logic            clk,
  input  logic            we,
  input  logic [3:0]      waddr,
  input  aes_pkg::state_t wdata,
  input  logic [3:0]      raddr,
  output aes_pkg::state_t rdata
);
  aes_pkg::state_t keys [NKEYS];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < NKEYS)) keys[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < NKEYS) ? keys[raddr] : '0;
endmodule
