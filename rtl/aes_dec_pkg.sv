// aes_dec_pkg: types, tables and GF(2^8) helpers shared by the AES-128
// decryption core.
//
// A 128-bit block holds the 16 state bytes in transmission order: byte 0 in
// bits 127:120, byte 15 in bits 7:0. The state matrix is filled column by
// column, so byte index i sits in row (i mod 4), column (i div 4), which is
// the S0..S15 layout of the standard.
//
// INV_SBOX is the 16x16 inverse substitution table: entry 16*x + y is the
// value printed in row x, column y. The forward S-box that SubWord needs in
// the key expansion is not given as a table of its own; SBOX is derived from
// INV_SBOX at elaboration time by inverting the permutation, so both tables
// come from the same 256 numbers. GF(2^8) arithmetic uses the AES reduction
// polynomial x^8 + x^4 + x^3 + x + 1.
package aes_dec_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef byte_t        sbox_table_t [256];

  localparam int unsigned NUM_ROUNDS = 10;  // AES-128
  localparam int unsigned NUM_WORDS  = 4 * (NUM_ROUNDS + 1);  // w[0..43]

  localparam sbox_table_t INV_SBOX = '{
    8'h52, 8'h09, 8'h6A, 8'hD5, 8'h30, 8'h36, 8'hA5, 8'h38, 8'hBF, 8'h40, 8'hA3, 8'h9E, 8'h81, 8'hF3, 8'hD7, 8'hFB,  // 0x
    8'h7C, 8'hE3, 8'h39, 8'h82, 8'h9B, 8'h2F, 8'hFF, 8'h87, 8'h34, 8'h8E, 8'h43, 8'h44, 8'hC4, 8'hDE, 8'hE9, 8'hCB,  // 1x
    8'h54, 8'h7B, 8'h94, 8'h32, 8'hA6, 8'hC2, 8'h23, 8'h3D, 8'hEE, 8'h4C, 8'h95, 8'h0B, 8'h42, 8'hFA, 8'hC3, 8'h4E,  // 2x
    8'h08, 8'h2E, 8'hA1, 8'h66, 8'h28, 8'hD9, 8'h24, 8'hB2, 8'h76, 8'h5B, 8'hA2, 8'h49, 8'h6D, 8'h8B, 8'hD1, 8'h25,  // 3x
    8'h72, 8'hF8, 8'hF6, 8'h64, 8'h86, 8'h68, 8'h98, 8'h16, 8'hD4, 8'hA4, 8'h5C, 8'hCC, 8'h5D, 8'h65, 8'hB6, 8'h92,  // 4x
    8'h6C, 8'h70, 8'h48, 8'h50, 8'hFD, 8'hED, 8'hB9, 8'hDA, 8'h5E, 8'h15, 8'h46, 8'h57, 8'hA7, 8'h8D, 8'h9D, 8'h84,  // 5x
    8'h90, 8'hD8, 8'hAB, 8'h00, 8'h8C, 8'hBC, 8'hD3, 8'h0A, 8'hF7, 8'hE4, 8'h58, 8'h05, 8'hB8, 8'hB3, 8'h45, 8'h06,  // 6x
    8'hD0, 8'h2C, 8'h1E, 8'h8F, 8'hCA, 8'h3F, 8'h0F, 8'h02, 8'hC1, 8'hAF, 8'hBD, 8'h03, 8'h01, 8'h13, 8'h8A, 8'h6B,  // 7x
    8'h3A, 8'h91, 8'h11, 8'h41, 8'h4F, 8'h67, 8'hDC, 8'hEA, 8'h97, 8'hF2, 8'hCF, 8'hCE, 8'hF0, 8'hB4, 8'hE6, 8'h73,  // 8x
    8'h96, 8'hAC, 8'h74, 8'h22, 8'hE7, 8'hAD, 8'h35, 8'h85, 8'hE2, 8'hF9, 8'h37, 8'hE8, 8'h1C, 8'h75, 8'hDF, 8'h6E,  // 9x
    8'h47, 8'hF1, 8'h1A, 8'h71, 8'h1D, 8'h29, 8'hC5, 8'h89, 8'h6F, 8'hB7, 8'h62, 8'h0E, 8'hAA, 8'h18, 8'hBE, 8'h1B,  // Ax
    8'hFC, 8'h56, 8'h3E, 8'h4B, 8'hC6, 8'hD2, 8'h79, 8'h20, 8'h9A, 8'hDB, 8'hC0, 8'hFE, 8'h78, 8'hCD, 8'h5A, 8'hF4,  // Bx
    8'h1F, 8'hDD, 8'hA8, 8'h33, 8'h88, 8'h07, 8'hC7, 8'h31, 8'hB1, 8'h12, 8'h10, 8'h59, 8'h27, 8'h80, 8'hEC, 8'h5F,  // Cx
    8'h60, 8'h51, 8'h7F, 8'hA9, 8'h19, 8'hB5, 8'h4A, 8'h0D, 8'h2D, 8'hE5, 8'h7A, 8'h9F, 8'h93, 8'hC9, 8'h9C, 8'hEF,  // Dx
    8'hA0, 8'hE0, 8'h3B, 8'h4D, 8'hAE, 8'h2A, 8'hF5, 8'hB0, 8'hC8, 8'hEB, 8'hBB, 8'h3C, 8'h83, 8'h53, 8'h99, 8'h61,  // Ex
    8'h17, 8'h2B, 8'h04, 8'h7E, 8'hBA, 8'h77, 8'hD6, 8'h26, 8'hE1, 8'h69, 8'h14, 8'h63, 8'h55, 8'h21, 8'h0C, 8'h7D  // Fx
  };

  // Invert a byte permutation: result[t[i]] = i.
  function automatic sbox_table_t invert_table(input sbox_table_t t);
    sbox_table_t r;
    for (int i = 0; i < 256; i++) r[t[i]] = byte_t'(i);
    return r;
  endfunction

  localparam sbox_table_t SBOX = invert_table(INV_SBOX);

  // Multiply by x (i.e. by 2) in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // Multipliers by the constants of the inverse MixColumns matrix.
  function automatic byte_t mul9(input byte_t a);
    byte_t a2, a4, a8;
    a2 = xtime(a); a4 = xtime(a2); a8 = xtime(a4);
    return a8 ^ a;
  endfunction

  function automatic byte_t mul11(input byte_t a);
    byte_t a2, a4, a8;
    a2 = xtime(a); a4 = xtime(a2); a8 = xtime(a4);
    return a8 ^ a2 ^ a;
  endfunction

  function automatic byte_t mul13(input byte_t a);
    byte_t a2, a4, a8;
    a2 = xtime(a); a4 = xtime(a2); a8 = xtime(a4);
    return a8 ^ a4 ^ a;
  endfunction

  function automatic byte_t mul14(input byte_t a);
    byte_t a2, a4, a8;
    a2 = xtime(a); a4 = xtime(a2); a8 = xtime(a4);
    return a8 ^ a4 ^ a2;
  endfunction

  // Byte i of a block (i = 0 is the most significant byte).
  function automatic byte_t get_byte(input block_t b, input int unsigned i);
    return b[127 - 8*i -: 8];
  endfunction

endpackage
