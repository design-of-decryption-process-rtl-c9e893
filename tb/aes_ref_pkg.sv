// aes_ref_pkg: reference model of AES-128 for the testbenches.
//
// Everything here is computed from the algebra of the cipher rather than
// from the tables of the design, so it can check them independently:
// ref_sbox is the multiplicative inverse in GF(2^8) (modulus 0x11B) followed
// by the affine map, ref_inv_sbox the inverse affine map followed by the
// field inverse,
// and gmul is a plain shift-and-add multiplier. The package also holds the
// key schedule, the inverse round steps and a forward encryption, so a test
// can encrypt random data and expect the decryptor to return it. Blocks use
// the same byte order as the RTL: byte 0 in bits 127:120, column-major.
package aes_ref_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef block_t       rk_t [11];

  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t ginv(input byte_t a);
    byte_t r = 8'h01;
    byte_t p = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, p);  // 254 = 0b11111110
      p = gmul(p, p);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t b, input int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t ref_sbox(input byte_t a);
    byte_t b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // Inverse affine map, then the field inverse.
  function automatic byte_t ref_inv_sbox(input byte_t a);
    return ginv(rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05);
  endfunction

  function automatic byte_t gb(input block_t b, input int i);
    return b[127 - 8*i -: 8];
  endfunction

  function automatic block_t ref_inv_shift_rows(input block_t s);
    block_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = gb(s, 4*c + r);
    return o;
  endfunction

  function automatic block_t ref_shift_rows(input block_t s);
    block_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*c + r) -: 8] = gb(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic block_t ref_inv_sub_bytes(input block_t s);
    block_t o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = ref_inv_sbox(gb(s, i));
    return o;
  endfunction

  function automatic block_t ref_sub_bytes(input block_t s);
    block_t o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = ref_sbox(gb(s, i));
    return o;
  endfunction

  // Column transform with first matrix row (m0, m1, m2, m3), circulant.
  function automatic block_t mix_with(input block_t s, input byte_t m0, input byte_t m1,
                                      input byte_t m2, input byte_t m3);
    block_t o;
    byte_t  m [4];
    m = '{m0, m1, m2, m3};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        byte_t acc = 8'h00;
        for (int k = 0; k < 4; k++) acc ^= gmul(m[(k - r + 4) % 4], gb(s, 4*c + k));
        o[127 - 8*(4*c + r) -: 8] = acc;
      end
    return o;
  endfunction

  function automatic block_t ref_inv_mix_columns(input block_t s);
    return mix_with(s, 8'h0E, 8'h0B, 8'h0D, 8'h09);
  endfunction

  function automatic block_t ref_mix_columns(input block_t s);
    return mix_with(s, 8'h02, 8'h03, 8'h01, 8'h01);
  endfunction

  function automatic rk_t ref_key_expansion(input block_t key);
    word_t w [44];
    rk_t   rk;
    byte_t rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      word_t t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  // One decryption round in the order InvShiftRows, InvSubBytes,
  // AddRoundKey, InvMixColumns (the latter skipped when last is set).
  function automatic block_t ref_dec_round(input block_t s, input block_t k, input bit last);
    block_t t = ref_inv_sub_bytes(ref_inv_shift_rows(s)) ^ k;
    return last ? t : ref_inv_mix_columns(t);
  endfunction

  function automatic block_t ref_encrypt(input block_t pt, input block_t key);
    rk_t    rk = ref_key_expansion(key);
    block_t s  = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s));
      if (r < 10) s = ref_mix_columns(s);
      s ^= rk[r];
    end
    return s;
  endfunction

endpackage
