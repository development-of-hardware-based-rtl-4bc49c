// tb_aes_inv_sbox - checks all 256 entries of the inverse S-box against a search over the reference forward S-box.
module tb_aes_inv_sbox;
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
  logic [7:0] a, y;
  aes_inv_sbox dut (.in_byte(a), .out_byte(y));
  initial begin
    a = 8'h63; #1 check("Si(63)", 136'(y), 136'(8'h00));
    a = 8'hed; #1 check("Si(ed)", 136'(y), 136'(8'h53));
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1;
      check($sformatf("Si(%02h)", i), 136'(y), 136'(ref_inv_sbox(8'(i))));
    end
    finish_tb();
  end
endmodule
