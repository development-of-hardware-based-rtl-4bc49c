// tb_aes_decrypter - checks AES-128 decryption: the worked example of the design, FIPS-197 Appendix B, and random blocks and keys against the reference inverse cipher.
module tb_aes_decrypter;
  import aes_ref_pkg::*;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(string what, logic [135:0] got, logic [135:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // watchdog: give up after a fixed number of clock cycles
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  logic [127:0] pt, key, ct;
  aes_decrypter dut (.ciphertext(ct), .key(key), .plaintext(pt));
  initial begin
    ct  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    key = 128'h000102030405060708090a0b0c0d0e0f; #1;
    check("worked example", 136'(pt), 136'(128'h00112233445566778899aabbccddeeff));
    ct  = 128'h3925841d02dc09fbdc118597196a0b32;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    check("FIPS-197 Appendix B", 136'(pt), 136'(128'h3243f6a8885a308d313198a2e0370734));
    for (int i = 0; i < 40; i++) begin
      ct  = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom}; #1;
      check($sformatf("random %0d", i), 136'(pt), 136'(ref_decrypt(ct, key)));
    end
    finish_tb();
  end
endmodule
