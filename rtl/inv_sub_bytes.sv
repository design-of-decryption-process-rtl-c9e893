// inv_sub_bytes: InvSubBytes step of AES decryption.
//
// Each of the 16 state bytes is replaced, independently, by its entry in the
// inverse S-box; sixteen inv_sbox lookup tables work in parallel, so the
// block is combinational with a delay of one table lookup. Byte i of
// state_in (bits 127-8i -: 8) maps to byte i of state_out.
module inv_sub_bytes
  import aes_dec_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    inv_sbox u_inv_sbox (
      .in_byte  (state_in[127 - 8*i -: 8]),
      .out_byte (state_out[127 - 8*i -: 8])
    );
  end

endmodule
