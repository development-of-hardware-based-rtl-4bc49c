// tb_aes_key_expansion - checks the AES-128 key schedule: FIPS-197 round keys 1 and 10 for key 000102..0f, and all eleven round keys for random keys against the reference schedule.
module tb_aes_key_expansion;
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
  logic [127:0] key;
  aes_pkg::aes_round_keys_t rk;
  aes_key_expansion dut (.key(key), .round_keys(rk));
  initial begin
    key = 128'h000102030405060708090a0b0c0d0e0f; #1;
    check("rk0", 136'(rk[0]), 136'(key));
    check("rk1", 136'(rk[1]), 136'(128'hd6aa74fdd2af72fadaa678f1d6ab76fe));
    check("rk10", 136'(rk[10]), 136'(128'h13111d7fe3944a17f307a78b4d2b30c5));
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    check("B rk10", 136'(rk[10]), 136'(128'hd014f9a8c9ee2589e13f0cc8b6630ca6));
    for (int i = 0; i < 30; i++) begin
      key = {$urandom, $urandom, $urandom, $urandom}; #1;
      for (int r = 0; r <= 10; r++)
        check($sformatf("random key %0d rk%0d", i, r), 136'(rk[r]), 136'(ref_round_key(key, r)));
    end
    finish_tb();
  end
endmodule
