// xor4_rom: 16x1 ROM whose entry at address a is a[3]^a[2]^a[1]^a[0].
//
// MixColumns and InvMixColumns add four GF(2^8) products per output byte; bit
// by bit that is a 4-input XOR, which this architecture maps onto a 16x1 ROM
// (one 4-input LUT on an FPGA). The 16 entries form the constant 16'h6996
// (bit a of the constant = parity of a). Combinational.
module xor4_rom (
  input  logic [3:0] addr,
  output logic       data
);
  localparam logic [15:0] TABLE = 16'h6996;

  assign data = TABLE[addr];
endmodule
