// inv_sbox_tb: exhaustive check of the inverse S-box table.
//
// All 256 inputs are applied and each output is compared with the inverse
// affine map followed by the GF(2^8) inverse (aes_ref_pkg). A few entries
// that appear in the published decryption trace are checked by value too.
// A free-running clock only paces the watchdog.
module inv_sbox_tb;
  import aes_ref_pkg::*;

  logic  clk = 1'b0;
  byte_t in_byte, out_byte;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  inv_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  task automatic check(input byte_t a, input byte_t exp);
    in_byte = a;
    #1;
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("FAIL inv_sbox(%02h) = %02h, expected %02h", a, out_byte, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) check(byte_t'(a), ref_inv_sbox(byte_t'(a)));
    // Entries used in round 1 of the worked decryption example.
    check(8'hF4, 8'hBA);
    check(8'h0B, 8'h9E);
    check(8'hBC, 8'h78);
    check(8'h65, 8'hBC);
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
