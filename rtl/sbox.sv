// sbox: the forward AES S-box, used by SubWord in the key expansion.
//
// Purely combinational: out_byte = SBOX[in_byte]. The table is not stored as
// numbers of its own: aes_dec_pkg derives it at elaboration time by inverting
// the inverse S-box permutation, so the forward and inverse substitutions
// are guaranteed to be inverses of each other. Using a lookup table (rather
// than GF inversion plus the affine map) is this design's choice, in line
// with the table-based inverse S-box.
module sbox
  import aes_dec_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  assign out_byte = SBOX[in_byte];

endmodule
