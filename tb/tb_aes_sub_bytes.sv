// tb_aes_sub_bytes - drives SubBytes with the FIPS-197 Appendix C.1 round-1 state and random states, compared with the reference model.
module tb_aes_sub_bytes;
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
  logic [127:0] si, so;
  aes_sub_bytes dut (.state_in(si), .state_out(so));
  initial begin
    si = 128'h00102030405060708090a0b0c0d0e0f0; #1 check("FIPS-197 round 1", 136'(so), 136'(128'h63cab7040953d051cd60e0e7ba70e18c));
    for (int i = 0; i < 200; i++) begin
      si = {$urandom, $urandom, $urandom, $urandom}; #1;
      check($sformatf("random %0d", i), 136'(so), 136'(ref_sub_bytes(si, 0)));
    end
    finish_tb();
  end
endmodule
