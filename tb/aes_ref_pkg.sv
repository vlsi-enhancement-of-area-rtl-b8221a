// aes_ref_pkg: plain behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the S-Box is generated with the
// multiplicative-inverse walk p <- 3p, q <- q/3 (both sides of GF(2^8)), GF
// products by shift-and-add, and states are handled as byte arrays in
// FIPS-197 order (byte 0 = most significant byte of the 128-bit vector).
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p = p ^ a;
      b = b >> 1;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] rol(logic [7:0] x, int s);
    return (x << s) | (x >> (8 - s));
  endfunction

  // S-Box built from the p/q walk; entry 0 is the constant 0x63.
  function automatic void make_sbox(output logic [7:0] sb [256], output logic [7:0] isb [256]);
    logic [7:0] p = 1, q = 1, x;
    sb[0] = 8'h63;
    do begin
      p = p ^ (p << 1) ^ (p[7] ? 8'h1b : 8'h00);
      q = q ^ (q << 1);
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rol(q, 1) ^ rol(q, 2) ^ rol(q, 3) ^ rol(q, 4);
      sb[p] = x ^ 8'h63;
    end while (p != 1);
    for (int i = 0; i < 256; i++) isb[sb[i]] = 8'(i);
  endfunction

  function automatic bytes16_t to_bytes(logic [127:0] v);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127 - 8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(bytes16_t b);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = b[i];
    return v;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] v, bit inv);
    logic [7:0] sb [256], isb [256];
    bytes16_t b = to_bytes(v);
    make_sbox(sb, isb);
    for (int i = 0; i < 16; i++) b[i] = inv ? isb[b[i]] : sb[b[i]];
    return from_bytes(b);
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] v, bit inv);
    bytes16_t b = to_bytes(v), o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[r + 4*c] = b[r + 4*((c + r) % 4)];
        else      o[r + 4*((c + r) % 4)] = b[r + 4*c];
    return from_bytes(o);
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] v, bit inv);
    bytes16_t b = to_bytes(v), o;
    logic [7:0] m0, m1, m2, m3;
    {m0, m1, m2, m3} = inv ? {8'd14, 8'd11, 8'd13, 8'd9} : {8'd2, 8'd3, 8'd1, 8'd1};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[4*c + r] = mul(b[4*c + r], m0) ^ mul(b[4*c + (r+1)%4], m1)
                   ^ mul(b[4*c + (r+2)%4], m2) ^ mul(b[4*c + (r+3)%4], m3);
    return from_bytes(o);
  endfunction

  // Round keys 0..10 of AES-128.
  function automatic void expand_key(logic [127:0] key, output logic [127:0] rk [11]);
    logic [7:0] sb [256], isb [256];
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0] rc = 8'h01;
    make_sbox(sb, isb);
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]} ^ {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand_key(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s = s ^ rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand_key(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s = s ^ rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
