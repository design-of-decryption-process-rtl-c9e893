// add_round_key: AddRoundKey step of AES.
//
// The 128-bit state is combined with the 128-bit round key by a bitwise
// XOR, byte for byte; combinational. The same block serves the initial key
// addition (with w[40..43]) and the key addition inside every round.
module add_round_key
  import aes_dec_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
