// sbox_tb: exhaustive check of the forward S-box used by SubWord.
//
// All 256 inputs are compared with the GF(2^8) inverse followed by the
// affine map (aes_ref_pkg), and the SubWord results of the published key
// expansion example are checked byte by byte.
module sbox_tb;
  import aes_ref_pkg::*;

  logic  clk = 1'b0;
  byte_t in_byte, out_byte;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  task automatic check(input byte_t a, input byte_t exp);
    in_byte = a;
    #1;
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", a, out_byte, exp);
    end
  endtask

  task automatic check_word(input word_t x, input word_t y);
    for (int b = 0; b < 4; b++) check(x[31 - 8*b -: 8], y[31 - 8*b -: 8]);
  endtask

  initial begin
    for (int a = 0; a < 256; a++) check(byte_t'(a), ref_sbox(byte_t'(a)));
    // subword(X_j) = Y_j from the key expansion example.
    check_word(32'h45678923, 32'h6E85A726);
    check_word(32'h49641AA3, 32'h3B43A20A);
    check_word(32'h3C1224FA, 32'hEBC9362D);
    check_word(32'h933373FD, 32'hDCC38F54);
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
