// aes128_decrypt: AES-128 decryption core, all ten rounds unrolled.
//
// A 128-bit ciphertext block and the 128-bit cipher key are captured in
// input registers on a rising clock edge. From there the path is purely
// combinational: key_expansion produces the eleven round keys w[0..43]; the
// ciphertext is first XORed with w[40..43]; rounds 1 to 9 each apply
// InvShiftRows, InvSubBytes, AddRoundKey (with w[40-4r..43-4r]) and
// InvMixColumns; round 10 omits InvMixColumns and adds w[0..3]. The result
// is captured in the plaintext register on the next rising edge.
//
// Interface: clk, ciphertext[127:0], key[127:0] in, plaintext[127:0] out,
// first byte of each block in bits 127:120. There is no reset and no
// handshake: a new block (with its own key) can be presented every cycle,
// and its plaintext appears on the output after the second rising edge
// (latency 2 cycles, throughput one block per cycle). Until two edges have
// passed the output holds no meaningful value.
//
// The round structure, the key order and the table-based inverse S-box
// follow the document; the two register stages and the absence of reset
// and valid signals are this design's choices (its I/O is just clock plus
// three 128-bit buses). The intermediate states s[0] (after the first key
// addition) to s[9] (after round 9) are the values a waveform of the design
// shows as s0..s9, and round_keys[1..10] those shown as k1..k10.
module aes128_decrypt
  import aes_dec_pkg::*;
(
  input  logic   clk,
  input  block_t ciphertext,
  input  block_t key,
  output block_t plaintext
);

  block_t                ciphertext_q, key_q;
  block_t [NUM_ROUNDS:0] round_keys;
  block_t [NUM_ROUNDS:0] s;  // s[0]: after initial key add, s[r]: after round r

  always_ff @(posedge clk) begin
    ciphertext_q <= ciphertext;
    key_q        <= key;
  end

  key_expansion u_key_expansion (
    .key        (key_q),
    .round_keys (round_keys)
  );

  add_round_key u_initial_ark (
    .state_in  (ciphertext_q),
    .round_key (round_keys[NUM_ROUNDS]),
    .state_out (s[0])
  );

  for (genvar r = 1; r <= NUM_ROUNDS; r++) begin : g_round
    dec_round #(
      .LAST (r == NUM_ROUNDS)
    ) u_round (
      .state_in  (s[r-1]),
      .round_key (round_keys[NUM_ROUNDS - r]),
      .state_out (s[r])
    );
  end

  always_ff @(posedge clk) begin
    plaintext <= s[NUM_ROUNDS];
  end

endmodule
