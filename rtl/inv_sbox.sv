// inv_sbox: the AES inverse S-box as a 256-entry lookup table.
//
// Purely combinational: out_byte = INV_SBOX[in_byte], with the table held in
// aes_dec_pkg exactly as the 16x16 inverse substitution table lists it (high
// nibble selects the row, low nibble the column). Synthesis turns it into
// LUT logic or a ROM. The document implements the inverse S-box as a lookup
// table; the byte-wide interface is this design's choice.
module inv_sbox
  import aes_dec_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  assign out_byte = INV_SBOX[in_byte];

endmodule
