// inv_mix_columns: InvMixColumns step of AES decryption.
//
// Every column (a0, a1, a2, a3) of the state is multiplied over GF(2^8) by
// the circulant matrix with first row (0E, 0B, 0D, 09):
//   b0 = 0E*a0 ^ 0B*a1 ^ 0D*a2 ^ 09*a3
//   b1 = 09*a0 ^ 0E*a1 ^ 0B*a2 ^ 0D*a3
//   b2 = 0D*a0 ^ 09*a1 ^ 0E*a2 ^ 0B*a3
//   b3 = 0B*a0 ^ 0D*a1 ^ 09*a2 ^ 0E*a3
// The constant multiplications are built from repeated xtime (multiply by
// 2) and XORs. The document describes the step only as a Galois-field
// matrix product; the matrix is the standard AES one. Combinational.
module inv_mix_columns
  import aes_dec_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a0, a1, a2, a3;
    assign a0 = state_in[127 - 8*(4*c + 0) -: 8];
    assign a1 = state_in[127 - 8*(4*c + 1) -: 8];
    assign a2 = state_in[127 - 8*(4*c + 2) -: 8];
    assign a3 = state_in[127 - 8*(4*c + 3) -: 8];

    assign state_out[127 - 8*(4*c + 0) -: 8] = mul14(a0) ^ mul11(a1) ^ mul13(a2) ^ mul9(a3);
    assign state_out[127 - 8*(4*c + 1) -: 8] = mul9(a0)  ^ mul14(a1) ^ mul11(a2) ^ mul13(a3);
    assign state_out[127 - 8*(4*c + 2) -: 8] = mul13(a0) ^ mul9(a1)  ^ mul14(a2) ^ mul11(a3);
    assign state_out[127 - 8*(4*c + 3) -: 8] = mul11(a0) ^ mul13(a1) ^ mul9(a2)  ^ mul14(a3);
  end

endmodule
