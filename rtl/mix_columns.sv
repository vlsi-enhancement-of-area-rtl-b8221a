// mix_columns: AES MixColumns on the 128-bit state, built from ROMs.
//
// Each column (a0..a3) is replaced by b_r = 2*a_r ^ 3*a_(r+1) ^ a_(r+2) ^ a_(r+3)
// (indices mod 4, products in GF(2^8)). Following the architecture, each byte
// feeds two 256x8 multiplier ROMs (x2 and x3), and every output bit is the
// 4-input XOR of the matching product bits, taken from a 16x1 ROM (xor4_rom):
// 16 x2 ROMs, 16 x3 ROMs and 128 XOR ROMs in all. Combinational.
module mix_columns (
  input  aes_pkg::state_t din,
  output aes_pkg::state_t dout
);
  logic [7:0] a   [16];
  logic [7:0] a2  [16];
  logic [7:0] a3  [16];

  for (genvar i = 0; i < 16; i++) begin : g_byte
    assign a[i] = din[127 - 8*i -: 8];
    gf_mul_rom #(.MULT(8'h02)) u_x2 (.addr(a[i]), .data(a2[i]));
    gf_mul_rom #(.MULT(8'h03)) u_x3 (.addr(a[i]), .data(a3[i]));
  end

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int I0 = 4*c + r;
      localparam int I1 = 4*c + (r + 1) % 4;
      localparam int I2 = 4*c + (r + 2) % 4;
      localparam int I3 = 4*c + (r + 3) % 4;
      for (genvar k = 0; k < 8; k++) begin : g_bit
        xor4_rom u_xor (
          .addr({a2[I0][k], a3[I1][k], a[I2][k], a[I3][k]}),
          .data(dout[127 - 8*I0 - 7 + k])
        );
      end
    end
  end
endmodule
