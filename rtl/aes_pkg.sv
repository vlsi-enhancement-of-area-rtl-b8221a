// aes_pkg: types and constant functions shared by the AES-128 datapath.
//
// The 128-bit state is held as a packed vector with byte 0 in bits [127:120]
// and bytes ordered column by column (byte index = row + 4*column), the byte
// order of the AES standard. The functions below are used only at elaboration
// time to fill the lookup ROMs (S-Box, inverse S-Box, GF multiplier tables),
// so the tables are computed from their definition instead of being typed in:
//   sbox(x)     = affine(inverse(x)),  affine(b) = b ^ rotl(b,1..4) ^ 8'h63
//   inv_sbox(x) = inverse(b), b = rotl(x,1) ^ rotl(x,3) ^ rotl(x,6) ^ 8'h05
// with inverse() the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1
// (inverse(0) = 0). Each table is a 2048-bit constant, entry x in bits
// [8*x +: 8]. shift_rows() is the (Inv)ShiftRows byte routing used as wiring
// inside the two cipher units.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned NROUNDS = 10;   // AES-128

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // Whole 256-entry S-Box (or inverse S-Box) table, entry x in bits
  // [8*x +: 8]. Inverses come from exp/log tables of the generator 3:
  // inverse(x) = 3^(255 - log3(x)).
  function automatic logic [2047:0] sbox_table(bit inverse);
    logic [2047:0] exp_t = '0;
    logic [2047:0] log_t = '0;
    logic [2047:0] tbl   = '0;
    byte_t e = 8'h01;
    byte_t x, b, inv;
    for (int i = 0; i < 255; i++) begin
      exp_t[8*i +: 8] = e;
      log_t[8*e +: 8] = 8'(i);
      e = e ^ xtime(e);                       // e * 3
    end
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      b = inverse ? (rotl8(x, 1) ^ rotl8(x, 3) ^ rotl8(x, 6) ^ 8'h05) : x;
      inv = (b == 8'h00) ? 8'h00 : exp_t[8*((255 - int'(log_t[8*b +: 8])) % 255) +: 8];
      tbl[8*i +: 8] = inverse ? inv
                    : inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return tbl;
  endfunction

  // Table of c * x for x = 0..255, entry x in bits [8*x +: 8].
  function automatic logic [2047:0] gf_mul_table(byte_t c);
    logic [2047:0] tbl = '0;
    for (int i = 0; i < 256; i++) tbl[8*i +: 8] = gf_mul(8'(i), c);
    return tbl;
  endfunction

  // ShiftRows (inverse = 0) or InvShiftRows (inverse = 1): row r of the state
  // rotated left (right) by r bytes. A fixed byte routing, no logic.
  function automatic state_t shift_rows(state_t s, bit inverse);
    state_t o;
    int     src_c;
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        src_c = inverse ? (c - r + 4) % 4 : (c + r) % 4;
        o[127 - 8*(r + 4*c) -: 8] = s[127 - 8*(r + 4*src_c) -: 8];
      end
    end
    return o;
  endfunction

endpackage
