// aes_sbox: 256x8 substitution ROM (S-Box, or inverse S-Box when INVERSE=1).
//
// The same lookup structure serves both directions; only the table entries
// differ, as the architecture intends for its inverse S-Box. The entries are
// filled at elaboration by aes_pkg::sbox_table, so synthesis sees a constant
// 256-word table (a LUT or ROM). Purely combinational: data follows addr in
// the same cycle.
module aes_sbox #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [7:0] addr,
  output logic [7:0] data
);
  localparam logic [2047:0] ROM = aes_pkg::sbox_table(INVERSE);

  assign data = ROM[{addr, 3'b000} +: 8];
endmodule
