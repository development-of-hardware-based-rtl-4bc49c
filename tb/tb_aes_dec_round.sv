// tb_aes_dec_round - checks a middle and a final decryption round (FINAL = 0 and 1) against FIPS-197 Appendix C.1 inverse-cipher values and the reference round for random inputs.
module tb_aes_dec_round;
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
  logic [127:0] si, rk, so_mid, so_fin;
  aes_dec_round #(.FINAL(1'b0)) dut_mid (.state_in(si), .round_key(rk), .state_out(so_mid));
  aes_dec_round #(.FINAL(1'b1)) dut_fin (.state_in(si), .round_key(rk), .state_out(so_fin));
  initial begin
    // C.1 inverse cipher: round[1].istart 7ad5fda789ef4e272bca100b3d9ff59f, ik_sch = round key 9
    si = 128'h7ad5fda789ef4e272bca100b3d9ff59f;
    rk = 128'h549932d1f08557681093ed9cbe2c974e; #1;
    check("C.1 inverse round 1", 136'(so_mid), 136'(128'h54d990a16ba09ab596bbf40ea111702f));
    // C.1 inverse round 10: istart 6353e08c0960e104cd70b751bacad0e7, key = cipher key
    si = 128'h6353e08c0960e104cd70b751bacad0e7;
    rk = 128'h000102030405060708090a0b0c0d0e0f; #1;
    check("C.1 inverse round 10", 136'(so_fin), 136'(128'h00112233445566778899aabbccddeeff));
    for (int i = 0; i < 100; i++) begin
      si = {$urandom, $urandom, $urandom, $urandom};
      rk = {$urandom, $urandom, $urandom, $urandom}; #1;
      check($sformatf("random mid %0d", i), 136'(so_mid), 136'(ref_dec_round(si, rk, 0)));
      check($sformatf("random final %0d", i), 136'(so_fin), 136'(ref_dec_round(si, rk, 1)));
    end
    finish_tb();
  end
endmodule
