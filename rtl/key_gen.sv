// key_gen: AES-128 key generation module (one round key per clock).
//
// A 128-bit key register holds the current round key w0..w3. The next round
// key is
//   t  = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
//   w0' = w0 ^ t,  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
// RotWord costs nothing: the bytes of w3 are simply wired to the four S-Box
// ROMs in rotated order. rcon comes from the round-constant ROM addressed by
// the round counter value `step` (step = i while round key i is in the
// register). load (priority) writes key_in; en advances one round key per
// rising clock edge. round_key is the register itself. Synchronous
// active-high reset clears the register.
module key_gen (
  input  logic            clk,
  input  logic            rst,
  input  logic            load,
  input  aes_pkg::state_t key_in,
  input  logic            en,
  input  logic [3:0]      step,
  output aes_pkg::state_t round_key
);
  import aes_pkg::*;

  state_t key_reg;
  word_t  w0, w1, w2, w3, rot, sub, t;
  word_t  n0, n1, n2, n3;
  byte_t  rcon;

  assign {w0, w1, w2, w3} = key_reg;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    aes_sbox #(.INVERSE(1'b0)) u_sbox (.addr(rot[31 - 8*b -: 8]), .data(sub[31 - 8*b -: 8]));
  end

  rcon_rom u_rcon (.addr(step), .rcon(rcon));

  assign t  = sub ^ {rcon, 24'h0};
  assign n0 = w0 ^ t;
  assign n1 = w1 ^ n0;
  assign n2 = w2 ^ n1;
  assign n3 = w3 ^ n2;

  always_ff @(posedge clk) begin
    if (rst)       key_reg <= '0;
    else if (load) key_reg <= key_in;
    else if (en)   key_reg <= {n0, n1, n2, n3};
  end

  assign round_key = key_reg;
endmodule
