// inv_sub_bytes_tb: self-checking test of inv_sub_bytes.
//
// Checks the worked decryption example (round 1 of the published trace,
// state before and after this step) and 500 random states against the
// reference model in aes_ref_pkg.
module inv_sub_bytes_tb;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  block_t state_in, state_out;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  inv_sub_bytes dut (.state_in(state_in), .state_out(state_out));

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
    check(128'hf4bca3240b6b5b7e86acb2ab05828665, 128'hba7871a69e05578adcaa3e0e3611dcbc);
    for (int n = 0; n < 500; n++) begin
      automatic block_t s = {$urandom, $urandom, $urandom, $urandom};
      check(s, ref_inv_sub_bytes(s));
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
