// sub_bytes: SubBytes (INVERSE=0) or InvSubBytes (INVERSE=1) on the state.
//
// Sixteen S-Box ROMs (aes_sbox), one per byte, work in parallel.
// Combinational.
module sub_bytes #(
  parameter bit INVERSE = 1'b0
) (
  input  aes_pkg::state_t din,
  output aes_pkg::state_t dout
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox #(.INVERSE(INVERSE)) u_sbox (
      .addr(din[127 - 8*i -: 8]),
      .data(dout[127 - 8*i -: 8])
    );
  end
endmodule
