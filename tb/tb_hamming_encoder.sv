// tb_hamming_encoder - checks the Hamming encoder: the worked example of the design (69c4e0d8.. -> 6962706c..db), random words against the reference position-list encoder, the zero syndrome of every codeword, and a (7,4) instance against the textbook code.
module tb_hamming_encoder;
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
  logic [127:0] d;
  logic [135:0] cw;
  logic [3:0]   d4;
  logic [6:0]   cw4;
  hamming_encoder dut (.data_in(d), .code_out(cw));
  hamming_encoder #(.K(4)) dut4 (.data_in(d4), .code_out(cw4));

  function automatic logic [7:0] syn_of(logic [135:0] c);
    logic [7:0] s = '0;
    for (int p = 1; p <= 136; p++) if (c[p-1]) s ^= 8'(p);
    return s;
  endfunction

  initial begin
    d = 128'h69c4e0d86a7b0430d8cdb78070b4c55a; #1;
    check("worked example", 136'(cw), 136'h6962706c353d82186cb36de01c9698d5db);
    d = '0; #1 check("all zero", 136'(cw), 136'h0);
    for (int i = 0; i < 300; i++) begin
      d = {$urandom, $urandom, $urandom, $urandom}; #1;
      check($sformatf("random %0d", i), 136'(cw), ref_hamming_encode(d));
      check($sformatf("random %0d syndrome", i), 136'(syn_of(cw)), 136'h0);
    end
    // Hamming(7,4): positions p1 p2 d0 p4 d1 d2 d3 (bit 0 = position 1)
    for (int v = 0; v < 16; v++) begin
      logic [3:0] x;
      logic p1, p2, p4;
      x  = 4'(v);
      d4 = x; #1;
      p1 = x[0] ^ x[1] ^ x[3];
      p2 = x[0] ^ x[2] ^ x[3];
      p4 = x[1] ^ x[2] ^ x[3];
      check($sformatf("(7,4) %0d", v), 136'(cw4), 136'({x[3], x[2], x[1], p4, x[0], p2, p1}));
    end
    finish_tb();
  end
endmodule
