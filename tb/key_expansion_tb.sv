// key_expansion_tb: self-checking test of key_expansion.
//
// Three kinds of checks: all 44 words of the worked key-expansion example
// (key 0A1B2C3D4E5F6789ABCDEF0123456789), the eleven round keys of a second
// known example (key 0f1571c947d9e8590cb7add6af7f6798), and 200 random keys
// against the key schedule of aes_ref_pkg, which uses an S-box computed
// from GF(2^8) arithmetic rather than the design's table.
module key_expansion_tb;
  import aes_ref_pkg::*;

  logic           clk = 1'b0;
  block_t         key;
  block_t [10:0]  round_keys;
  int             checks = 0, failures = 0;

  always #5 clk = ~clk;

  key_expansion dut (.key(key), .round_keys(round_keys));

  localparam block_t EXAMPLE_A [11] = '{
      128'h0a1b2c3d4e5f6789abcdef0123456789,
      128'h659e8b1b2bc1ec92800c0393a349641a,
      128'h5cdd2911771cc583f710c6105459a20a,
      128'h93e74e31e4fb8bb213eb4da247b2efa8,
      128'hac388c9148c307235b284a811c9aa529,
      128'h043e290d4cfd2e2e17d564af0b4fc186,
      128'ha0466d26ecbb4308fb6e27a7f021e621,
      128'h1dc890aaf173d3a20a1df405fa3c1224,
      128'h7601a687877275258d6f812077539304,
      128'h80dd547207af21578ac0a077fd933373,
      128'h6a1edb266db1fa71e7715a061ae26975
  };

  localparam block_t EXAMPLE_B [11] = '{
      128'h0f1571c947d9e8590cb7add6af7f6798,
      128'hdc9037b09b49dfe997fe723f388115a7,
      128'hd2c96bb74980b45ede7ec661e6ffd3c6,
      128'hc0afdf39892f6b675751ad06b1ae7ec0,
      128'h2c5c65f1a5730e96f222a390438cdd50,
      128'h589d36ebfdee387d0fcc9bed4c4046bd,
      128'h71c74cc28c2974bf83e5ef52cfa5a9ef,
      128'h37149348bb3de7f738d808a5f77da14a,
      128'h48264520f31ba2d7cbc3aa723cbe0b38,
      128'hfd0d42cb0e16e01cc5d54a6ef96b4156,
      128'hb48ef352ba98134e7f4d592086261876
  };

  task automatic check(input block_t k, input block_t exp [11]);
    key = k;
    #1;
    for (int r = 0; r <= 10; r++) begin
      checks++;
      if (round_keys[r] !== exp[r]) begin
        failures++;
        $display("FAIL key %032h round key %0d = %032h, expected %032h", k, r, round_keys[r], exp[r]);
      end
    end
  endtask

  initial begin
    check(128'h0A1B2C3D4E5F6789ABCDEF0123456789, EXAMPLE_A);
    check(128'h0f1571c947d9e8590cb7add6af7f6798, EXAMPLE_B);
    for (int n = 0; n < 200; n++) begin
      automatic block_t k = {$urandom, $urandom, $urandom, $urandom};
      check(k, ref_key_expansion(k));
    end
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
