// add_round_key_tb: self-checking test of add_round_key.
//
// Checks the first key addition of the worked example (ciphertext XOR
// w[40..43]), the key addition of its round 1, and 500 random state/key
// pairs, each result being compared with a byte-by-byte XOR.
module add_round_key_tb;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  block_t state_in, round_key, state_out;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  add_round_key dut (.state_in(state_in), .round_key(round_key), .state_out(state_out));

  task automatic check(input block_t s, input block_t k, input block_t exp);
    state_in  = s;
    round_key = k;
    #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL %032h ^ %032h = %032h, expected %032h", s, k, state_out, exp);
    end
  endtask

  function automatic block_t bytewise_xor(input block_t a, input block_t b);
    block_t o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = gb(a, i) ^ gb(b, i);
    return o;
  endfunction

  initial begin
    check(128'h9E756943661D7C5561F3F9781F5E32DE, 128'h6A1EDB266DB1FA71E7715A061AE26975,
          128'hf46bb2650bac86248682a37e05bc5bab);
    check(128'hba7871a69e05578adcaa3e0e3611dcbc, 128'h80dd547207af21578ac0a077fd933373,
          128'h3aa525d499aa76dd566a9e79cb82efcf);
    for (int n = 0; n < 500; n++) begin
      automatic block_t s = {$urandom, $urandom, $urandom, $urandom};
      automatic block_t k = {$urandom, $urandom, $urandom, $urandom};
      check(s, k, bytewise_xor(s, k));
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
