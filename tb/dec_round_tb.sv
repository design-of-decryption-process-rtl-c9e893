// dec_round_tb: self-checking test of dec_round, both variants.
//
// One instance is a middle round (InvMixColumns at the end), the other the
// last round (no InvMixColumns). All ten rounds of the worked example
// (ciphertext 9E756943661D7C5561F3F9781F5E32DE, key
// 0A1B2C3D4E5F6789ABCDEF0123456789) are replayed: the state at the start of
// each round goes in and the state at the start of the next must come out,
// through the middle-round instance for rounds 1 to 9 and the last-round
// instance for round 10. Then 300 random state/key pairs go through both
// instances and are compared with aes_ref_pkg.
module dec_round_tb;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  block_t state_in, round_key, mid_out, last_out;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  dec_round #(.LAST(1'b0)) dut_mid  (.state_in(state_in), .round_key(round_key), .state_out(mid_out));
  dec_round #(.LAST(1'b1)) dut_last (.state_in(state_in), .round_key(round_key), .state_out(last_out));

  // EXAMPLE_STATE[0]: ciphertext after the first key addition;
  // EXAMPLE_STATE[r]: state after round r; EXAMPLE_STATE[10] is the plaintext.
  localparam block_t EXAMPLE_STATE [11] = '{
      128'hf46bb2650bac86248682a37e05bc5bab,
      128'h505293ff5afa9ea67a8c1f32c57b33e4,
      128'h7953607d688762e1a752f86baab441b9,
      128'h2328f5796e830a4e3e8a5e2480bd653a,
      128'haf8d3f64bb69acd3359fef155eee144b,
      128'hf1ac0e074290db464eed601e06254cb9,
      128'h22c969eafffc95d1c81d8bcad6cce3a2,
      128'hbcf2751caa34dd57d3edc2f1437c6c63,
      128'h386fe207f666357da39a01b738fe461f,
      128'h2bbfac33c628acbeac28f933ac07ac33,
      128'h0123456789abcdef0123456789abcdef
  };

  task automatic compare(input string what, input block_t got, input block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %032h, expected %032h", what, got, exp);
    end
  endtask

  initial begin
    automatic rk_t rk = ref_key_expansion(128'h0A1B2C3D4E5F6789ABCDEF0123456789);
    for (int r = 1; r <= 10; r++) begin
      state_in  = EXAMPLE_STATE[r-1];
      round_key = rk[10 - r];
      #1;
      if (r < 10) compare($sformatf("example round %0d", r), mid_out, EXAMPLE_STATE[r]);
      else        compare("example round 10", last_out, EXAMPLE_STATE[r]);
    end
    for (int n = 0; n < 300; n++) begin
      state_in  = {$urandom, $urandom, $urandom, $urandom};
      round_key = {$urandom, $urandom, $urandom, $urandom};
      #1;
      compare("random middle round", mid_out, ref_dec_round(state_in, round_key, 1'b0));
      compare("random last round", last_out, ref_dec_round(state_in, round_key, 1'b1));
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
