// inv_mix_columns_tb: self-checking test of inv_mix_columns.
//
// Checks the worked decryption example (round 1 of the published trace,
// state before and after this step) and 500 random states against the
// reference model in aes_ref_pkg. It also checks that MixColumns undoes the step.
module inv_mix_columns_tb;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  block_t state_in, state_out;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  inv_mix_columns dut (.state_in(state_in), .state_out(state_out));

  task automatic check(input block_t s, input block_t exp);
    state_in = s;
    #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL in=%032h out=%032h expected %032h", s, state_out, exp);
    end
  endtask

  initial begin
    check(128'h3aa525d499aa76dd566a9e79cb82efcf, 128'h505293ff5afa9ea67a8c1f32c57b33e4);
    for (int n = 0; n < 500; n++) begin
      automatic block_t s = {$urandom, $urandom, $urandom, $urandom};
      check(s, ref_inv_mix_columns(s));
    end
    // MixColumns must restore the original state.
    for (int n = 0; n < 100; n++) begin
      automatic block_t s = {$urandom, $urandom, $urandom, $urandom};
      state_in = s;
      #1;
      checks++;
      if (ref_mix_columns(state_out) !== s) begin
        failures++;
        $display("FAIL MixColumns does not undo InvMixColumns for %032h", s);
      end
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
