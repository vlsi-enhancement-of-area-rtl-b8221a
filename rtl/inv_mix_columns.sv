// inv_mix_columns: AES InvMixColumns on the 128-bit state, built from ROMs.
//
// Each column (a0..a3) is replaced by
//   b_r = 14*a_r ^ 11*a_(r+1) ^ 13*a_(r+2) ^ 9*a_(r+3)   (GF(2^8), indices mod 4).
// As in the encryption MixColumns, the products come from 256x8 ROMs (four per
// byte: x9, x11, x13, x14) and each output bit is a 4-input XOR read from a
// 16x1 ROM. Combinational.
module inv_mix_columns (
  input  aes_pkg::state_t din,
  output aes_pkg::state_t dout
);
  logic [7:0] a   [16];
  logic [7:0] a9  [16];
  logic [7:0] a11 [16];
  logic [7:0] a13 [16];
  logic [7:0] a14 [16];

  for (genvar i = 0; i < 16; i++) begin : g_byte
    assign a[i] = din[127 - 8*i -: 8];
    gf_mul_rom #(.MULT(8'h09)) u_x9  (.addr(a[i]), .data(a9[i]));
    gf_mul_rom #(.MULT(8'h0b)) u_x11 (.addr(a[i]), .data(a11[i]));
    gf_mul_rom #(.MULT(8'h0d)) u_x13 (.addr(a[i]), .data(a13[i]));
    gf_mul_rom #(.MULT(8'h0e)) u_x14 (.addr(a[i]), .data(a14[i]));
  end

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int I0 = 4*c + r;
      localparam int I1 = 4*c + (r + 1) % 4;
      localparam int I2 = 4*c + (r + 2) % 4;
      localparam int I3 = 4*c + (r + 3) % 4;
      for (genvar k = 0; k < 8; k++) begin : g_bit
        xor4_rom u_xor (
          .addr({a14[I0][k], a11[I1][k], a13[I2][k], a9[I3][k]}),
          .data(dout[127 - 8*I0 - 7 + k])
        );
      end
    end
  end
endmodule
