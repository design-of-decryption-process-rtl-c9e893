// inv_shift_rows: InvShiftRows step of AES decryption.
//
// The state is a 4x4 byte matrix filled column by column (byte i is row
// i mod 4, column i div 4). Row 0 stays as it is; rows 1, 2 and 3 rotate
// cyclically to the right by 1, 2 and 3 byte positions, so the byte in
// row r, column c moves to column (c + r) mod 4. Only wiring, no logic;
// combinational.
module inv_shift_rows
  import aes_dec_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      // Output (r, c) comes from input (r, c - r mod 4).
      assign state_out[127 - 8*(4*c + r) -: 8] =
        state_in[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8];
    end
  end

endmodule
