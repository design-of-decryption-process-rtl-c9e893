// aes128_decrypt_tb: end-to-end test of the AES-128 decryption core at its
// default (and only) configuration.
//
// Inputs change on the falling clock edge; the plaintext for the block
// presented in cycle j must be on the output in cycle j + 2 (two rising
// edges: input register, then plaintext register). Each cycle the output is
// compared with the plaintext expected from two cycles earlier.
//
// Stimulus:
//  * four known-answer blocks: the worked example (key 0A1B2C3D...), a
//    second textbook example (key 0f1571c9...) and the two FIPS-197
//    examples; for the second one the intermediate states after the first
//    key addition and after rounds 1 to 9, and the round keys 1 to 10, are
//    compared inside the core as well;
//  * a single block after idle cycles, to measure the latency on its own;
//  * 2000 random blocks back to back, encrypted by aes_ref_pkg: runs that
//    share one key and runs where the key changes with every block.
// Events counted (each must occur): known-answer blocks, back-to-back
// blocks, blocks whose key differs from the previous block's, blocks that
// reuse the previous key, and the latency measurement.
module aes128_decrypt_tb;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  block_t ciphertext, key, plaintext;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes128_decrypt dut (
    .clk        (clk),
    .ciphertext (ciphertext),
    .key        (key),
    .plaintext  (plaintext)
  );

  // Expected plaintext and a "valid" flag per cycle, two deep.
  block_t exp_q [2];
  bit     vld_q [2];
  block_t prev_key;
  int     n_known = 0, n_back_to_back = 0, n_new_key = 0, n_same_key = 0, n_latency = 0;

  task automatic compare(input string what, input block_t got, input block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %032h, expected %032h", what, got, exp);
    end
  endtask

  // One cycle: at the falling edge check the output due now, then apply
  // the next input (or nothing when valid is 0).
  task automatic step(input bit valid, input block_t ct, input block_t k, input block_t pt);
    @(negedge clk);
    if (vld_q[1]) compare("plaintext", plaintext, exp_q[1]);
    if (valid && vld_q[0]) n_back_to_back++;
    if (valid) begin
      if (k != prev_key) n_new_key++;
      else               n_same_key++;
      prev_key = k;
    end
    exp_q[1]   = exp_q[0];
    vld_q[1]   = vld_q[0];
    exp_q[0]   = pt;
    vld_q[0]   = valid;
    ciphertext = ct;
    key        = k;
  endtask

  task automatic flush();
    repeat (3) step(1'b0, '0, '0, '0);
  endtask

  // Values of the second example as a waveform of the core shows them.
  localparam block_t FIG_S [10] = '{
    128'h4b857718b2cbac321679f263e23297cf, 128'h991897a71e153b0873308408f1afdd0c,
    128'hb93c30ac323d2f1641f4c203f5ad040e, 128'h679968faa7a60fb178d9612197356882,
    128'h406f652ff4484d631f2d373cf272b794, 128'h419a78658d36879bfe16e4fd29850688,
    128'ha386c6de52577a364ad3f7f3ff599293, 128'h4a40c7227f3ac9b86b3c8d14bf2118d2,
    128'h4dc69bde769be59dba705175e3921674, 128'hab40f0c48b7ffce489f1184e35053f2f
  };
  localparam block_t FIG_K [1:10] = '{
    128'hdc9037b09b49dfe997fe723f388115a7, 128'hd2c96bb74980b45ede7ec661e6ffd3c6,
    128'hc0afdf39892f6b675751ad06b1ae7ec0, 128'h2c5c65f1a5730e96f222a390438cdd50,
    128'h589d36ebfdee387d0fcc9bed4c4046bd, 128'h71c74cc28c2974bf83e5ef52cfa5a9ef,
    128'h37149348bb3de7f738d808a5f77da14a, 128'h48264520f31ba2d7cbc3aa723cbe0b38,
    128'hfd0d42cb0e16e01cc5d54a6ef96b4156, 128'hb48ef352ba98134e7f4d592086261876
  };

  initial begin
    vld_q    = '{1'b0, 1'b0};
    exp_q    = '{'0, '0};
    prev_key = '0;
    ciphertext = '0;
    key        = '0;
    flush();

    // Known answers, back to back.
    step(1'b1, 128'h9E756943661D7C5561F3F9781F5E32DE, 128'h0A1B2C3D4E5F6789ABCDEF0123456789,
               128'h0123456789ABCDEF0123456789ABCDEF);
    step(1'b1, 128'hff0b844a0853bf7c6934ab4364148fb9, 128'h0f1571c947d9e8590cb7add6af7f6798,
               128'h0123456789abcdeffedcba9876543210);
    step(1'b1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f,
               128'h00112233445566778899aabbccddeeff);
    // The second example is now in the input register: look inside.
    for (int r = 0; r < 10; r++) compare($sformatf("s%0d", r), dut.s[r], FIG_S[r]);
    for (int r = 1; r <= 10; r++) compare($sformatf("k%0d", r), dut.round_keys[r], FIG_K[r]);
    step(1'b1, 128'h3925841d02dc09fbdc118597196a0b32, 128'h2b7e151628aed2a6abf7158809cf4f3c,
               128'h3243f6a8885a308d313198a2e0370734);
    n_known = 4;
    flush();

    // Latency of a lone block: count rising edges until the output matches.
    begin
      automatic block_t k  = {$urandom, $urandom, $urandom, $urandom};
      automatic block_t pt = {$urandom, $urandom, $urandom, $urandom};
      automatic int     edges = 0;
      @(negedge clk);
      ciphertext = ref_encrypt(pt, k);
      key        = k;
      while (plaintext !== pt && edges < 10) begin
        @(posedge clk);
        edges++;
        #1;
        ciphertext = '0;
      end
      compare("latency in cycles", block_t'(edges), block_t'(2));
      n_latency++;
    end
    vld_q = '{1'b0, 1'b0};
    flush();

    // Random traffic, one block per cycle.
    for (int run = 0; run < 20; run++) begin
      automatic block_t k = {$urandom, $urandom, $urandom, $urandom};
      for (int n = 0; n < 100; n++) begin
        automatic block_t pt = {$urandom, $urandom, $urandom, $urandom};
        if (run % 2 == 1) k = {$urandom, $urandom, $urandom, $urandom};
        step(1'b1, ref_encrypt(pt, k), k, pt);
      end
    end
    flush();

    checks++;
    if (n_known == 0 || n_back_to_back == 0 || n_new_key == 0 || n_same_key == 0 || n_latency == 0) begin
      failures++;
      $display("FAIL an event never occurred");
    end
    $display("events: known-answer %0d, back-to-back %0d, new key %0d, same key %0d, latency %0d",
             n_known, n_back_to_back, n_new_key, n_same_key, n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
