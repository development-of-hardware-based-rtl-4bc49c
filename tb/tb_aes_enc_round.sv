// tb_aes_enc_round - checks a middle and a final encryption round (FINAL = 0 and 1): the FIPS-197 Appendix C.1 first round, and random state/key pairs against the reference round.
module tb_aes_enc_round;
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
  aes_enc_round #(.FINAL(1'b0)) dut_mid (.state_in(si), .round_key(rk), .state_out(so_mid));
  aes_enc_round #(.FINAL(1'b1)) dut_fin (.state_in(si), .round_key(rk), .state_out(so_fin));
  initial begin
    si = 128'h00102030405060708090a0b0c0d0e0f0;
    rk = 128'hd6aa74fdd2af72fadaa678f1d6ab76fe; #1;
    check("C.1 round 1", 136'(so_mid), 136'(128'h89d810e8855ace682d1843d8cb128fe4));
    // C.1 round 10: start bd6e7c3df2b5779e0b61216e8b10b689, key 13111d7f...
    si = 128'hbd6e7c3df2b5779e0b61216e8b10b689;
    rk = 128'h13111d7fe3944a17f307a78b4d2b30c5; #1;
    check("C.1 round 10", 136'(so_fin), 136'(128'h69c4e0d86a7b0430d8cdb78070b4c55a));
    for (int i = 0; i < 100; i++) begin
      si = {$urandom, $urandom, $urandom, $urandom};
      rk = {$urandom, $urandom, $urandom, $urandom}; #1;
      check($sformatf("random mid %0d", i), 136'(so_mid), 136'(ref_enc_round(si, rk, 0)));
      check($sformatf("random final %0d", i), 136'(so_fin), 136'(ref_enc_round(si, rk, 1)));
    end
    finish_tb();
  end
endmodule
