// gf_mul_rom: 256x8 ROM returning MULT * addr in GF(2^8) (AES polynomial
// x^8+x^4+x^3+x+1).
//
// The MixColumns hardware replaces each Galois multiplier by such a table:
// MULT = 2 and 3 for encryption, 9, 11, 13 and 14 for decryption. The table is
// computed at elaboration from aes_pkg::gf_mul. Combinational.
module gf_mul_rom #(
  parameter logic [7:0] MULT = 8'h02
) (
  input  logic [7:0] addr,
  output logic [7:0] data
);
  localparam logic [2047:0] ROM = aes_pkg::gf_mul_table(MULT);

  assign data = ROM[{addr, 3'b000} +: 8];
endmodule
