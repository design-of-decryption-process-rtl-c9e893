// dec_round: one round of AES decryption.
//
// The state passes, in this order, through InvShiftRows, InvSubBytes,
// AddRoundKey with the round's key and, unless LAST is set, InvMixColumns.
// Rounds 1 to 9 of AES-128 decryption use LAST = 0; round 10 uses LAST = 1
// and ends with the key addition. This is the order of the straightforward
// inverse cipher, with the key added before InvMixColumns, so round_key is
// the plain expanded round key (no InvMixColumns applied to it).
// Combinational; the critical path is one S-box lookup, one XOR and one
// InvMixColumns.
module dec_round
  import aes_dec_pkg::*;
#(
  parameter bit LAST = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t shifted, substituted, keyed;

  inv_shift_rows u_inv_shift_rows (
    .state_in  (state_in),
    .state_out (shifted)
  );

  inv_sub_bytes u_inv_sub_bytes (
    .state_in  (shifted),
    .state_out (substituted)
  );

  add_round_key u_add_round_key (
    .state_in  (substituted),
    .round_key (round_key),
    .state_out (keyed)
  );

  if (LAST) begin : g_last
    assign state_out = keyed;
  end else begin : g_mix
    inv_mix_columns u_inv_mix_columns (
      .state_in  (keyed),
      .state_out (state_out)
    );
  end

endmodule
