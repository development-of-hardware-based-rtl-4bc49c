// tb_hamming_decoder - checks the Hamming decoder: the worked example of the design, clean codewords, a single error at every one of the 136 positions (corrected, syndrome = position), double errors (always flagged) and syndromes above 136 (flagged uncorrectable, word left as received).
module tb_hamming_decoder;
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
  logic [135:0] cw;
  logic [127:0] d;
  logic [7:0]   syn;
  logic         det, cor, unc;
  hamming_decoder dut (.code_in(cw), .data_out(d), .syndrome(syn),
                       .err_detected(det), .err_corrected(cor), .err_uncorrectable(unc));

  function automatic logic [127:0] raw_data(logic [135:0] c);
    logic [127:0] r;
    int j = 0;
    for (int p = 1; p <= 136; p++)
      if ((p & (p - 1)) != 0) begin
        r[j] = c[p-1];
        j++;
      end
    return r;
  endfunction

  initial begin
    logic [127:0] data;
    logic [135:0] good;
    cw = 136'h6962706c353d82186cb36de01c9698d5db; #1;
    check("worked example", 136'(d), 136'(128'h69c4e0d86a7b0430d8cdb78070b4c55a));
    check("worked example flags", 136'({det, cor, unc}), 136'(3'b000));
    for (int t = 0; t < 4; t++) begin
      data = {$urandom, $urandom, $urandom, $urandom};
      good = ref_hamming_encode(data);
      cw = good; #1;
      check("clean data", 136'(d), 136'(data));
      check("clean flags", 136'({det, cor, unc, syn}), 136'(11'b000_00000000));
      for (int p = 1; p <= 136; p++) begin
        cw = good ^ (136'd1 << (p - 1)); #1;
        check($sformatf("single error at %0d: data", p), 136'(d), 136'(data));
        check($sformatf("single error at %0d: syndrome", p), 136'(syn), 136'(p));
        check($sformatf("single error at %0d: flags", p), 136'({det, cor, unc}), 136'(3'b110));
      end
      // double errors: always detected
      for (int i = 0; i < 50; i++) begin
        int a, b;
        a = 1 + ($urandom % 136);
        b = 1 + ($urandom % 136);
        if (a == b) b = (a % 136) + 1;
        cw = good ^ (136'd1 << (a - 1)) ^ (136'd1 << (b - 1)); #1;
        check($sformatf("double error %0d,%0d: detected", a, b), 136'(det), 136'(1));
        check($sformatf("double error %0d,%0d: syndrome", a, b), 136'(syn), 136'(a ^ b));
        check($sformatf("double error %0d,%0d: class", a, b), 136'({cor, unc}),
              136'(((a ^ b) > 136) ? 2'b01 : 2'b10));
      end
      // positions 136 and 1 give syndrome 137: no such position
      cw = good ^ (136'd1 << 135) ^ 136'd1; #1;
      check("syndrome 137: flags", 136'({det, cor, unc}), 136'(3'b101));
      check("syndrome 137: data left as received", 136'(d), 136'(raw_data(cw)));
    end
    finish_tb();
  end
endmodule
