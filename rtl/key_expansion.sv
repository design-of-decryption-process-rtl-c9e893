// key_expansion: AES-128 key schedule, w[0..43] from the 16-byte key.
//
// The key gives w[0..3]. Every later word is w[i] = w[i-4] ^ t, where t is
// w[i-1] itself, except for i a multiple of 4, where
//   t = SubWord(RotWord(w[i-1])) ^ Rcon(i/4)
// RotWord turns (a0,a1,a2,a3) into (a1,a2,a3,a0), SubWord passes each byte
// through the forward S-box, and Rcon(j) = (x^(j-1), 0, 0, 0) in GF(2^8),
// i.e. 01, 02, 04, 08, 10, 20, 40, 80, 1B, 36 for j = 1..10.
//
// The whole schedule is unrolled and combinational: ten stages of four
// S-box lookups plus XORs, one stage per round key. round_keys[r] holds
// w[4r..4r+3] with w[4r] in the top 32 bits, so round_keys[10] is the key
// the decryption adds first and round_keys[0] the cipher key itself.
// round_keys[0] is therefore wired straight to the key input.
// Unrolled, combinational computation is this design's choice; the word
// recurrence, RotWord, SubWord and the Rcon values follow the worked key
// expansion of the document and the standard.
module key_expansion
  import aes_dec_pkg::*;
(
  input  block_t                  key,
  output block_t [NUM_ROUNDS:0]   round_keys
);

  word_t w [NUM_WORDS];

  for (genvar i = 0; i < 4; i++) begin : g_init
    assign w[i] = key[127 - 32*i -: 32];
  end

  for (genvar j = 1; j <= NUM_ROUNDS; j++) begin : g_round
    localparam int unsigned I = 4 * j;
    word_t rot, sub, temp;
    byte_t rcon;

    // Rcon(j) = xtime applied j-1 times to 01.
    always_comb begin
      rcon = 8'h01;
      for (int k = 1; k < j; k++) rcon = xtime(rcon);
    end

    assign rot = {w[I-1][23:0], w[I-1][31:24]};

    for (genvar b = 0; b < 4; b++) begin : g_sub
      sbox u_sbox (
        .in_byte  (rot[31 - 8*b -: 8]),
        .out_byte (sub[31 - 8*b -: 8])
      );
    end

    assign temp     = sub ^ {rcon, 24'h0};
    assign w[I]     = w[I-4] ^ temp;
    assign w[I + 1] = w[I-3] ^ w[I];
    assign w[I + 2] = w[I-2] ^ w[I + 1];
    assign w[I + 3] = w[I-1] ^ w[I + 2];
  end

  for (genvar r = 0; r <= NUM_ROUNDS; r++) begin : g_out
    assign round_keys[r] = {w[4*r], w[4*r + 1], w[4*r + 2], w[4*r + 3]};
  end

endmodule
