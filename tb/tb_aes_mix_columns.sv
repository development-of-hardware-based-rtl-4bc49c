// tb_aes_mix_columns - drives MixColumns with the FIPS-197 Appendix C.1 round-1 state and random states, compared with the reference model.
module tb_aes_mix_columns;
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
  aes_mix_columns dut (.state_in(si), .state_out(so));
  initial begin
    si = 128'h6353e08c0960e104cd70b751bacad0e7; #1 check("FIPS-197 round 1", 136'(so), 136'(128'h5f72641557f5bc92f7be3b291db9f91a));
    for (int i = 0; i < 200; i++) begin
      si = {$urandom, $urandom, $urandom, $urandom}; #1;
      check($sformatf("random %0d", i), 136'(so), 136'(ref_mix_columns(si, 0)));
    end
    finish_tb();
  end
endmodule
