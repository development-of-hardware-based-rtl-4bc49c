// tb_aes_ecc_link - end-to-end test of the protected link: plaintext is encrypted and encoded, sent through a modelled noisy channel that flips 0, 1 or 2 bits, then decoded and decrypted. It counts each channel case (clean, single error in a data bit, single error in a check bit, double error, syndrome outside the codeword) and fails if any never occurred. The top has no parameters, so this is also the full-size test.
module tb_aes_ecc_link;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  logic [127:0] tx_pt, tx_key, tx_ct, rx_key, rx_ct, rx_pt;
  logic [135:0] tx_cw, rx_cw;
  logic [7:0]   syn;
  logic         det, cor, unc;

  aes_ecc_link dut (
    .tx_plaintext(tx_pt), .tx_key(tx_key), .tx_ciphertext(tx_ct), .tx_codeword(tx_cw),
    .rx_codeword(rx_cw), .rx_key(rx_key), .rx_ciphertext(rx_ct), .rx_plaintext(rx_pt),
    .rx_syndrome(syn), .rx_err_detected(det), .rx_err_corrected(cor), .rx_err_uncorrectable(unc)
  );

  // the channel: XOR an error pattern onto the codeword
  logic [135:0] noise;
  assign rx_cw = tx_cw ^ noise;

  int n_clean = 0, n_data_err = 0, n_check_err = 0, n_double = 0, n_uncorr = 0;

  task automatic frame(logic [127:0] pt, logic [127:0] key, int e1, int e2);
    logic [127:0] ct;
    ct     = ref_encrypt(pt, key);
    tx_pt  = pt;
    tx_key = key;
    rx_key = key;
    noise  = '0;
    if (e1 > 0) noise[e1-1] = 1'b1;
    if (e2 > 0) noise[e2-1] ^= 1'b1;
    @(posedge clk);
    #1;
    check("tx ciphertext", 136'(tx_ct), 136'(ct));
    check("tx codeword", 136'(tx_cw), ref_hamming_encode(ct));
    if (e1 == 0 && e2 == 0) begin
      n_clean++;
      check("clean: flags", 136'({det, cor, unc}), 136'(3'b000));
      check("clean: plaintext", 136'(rx_pt), 136'(pt));
    end else if (e2 == 0) begin
      if ((e1 & (e1 - 1)) == 0) n_check_err++; else n_data_err++;
      check("single: flags", 136'({det, cor, unc}), 136'(3'b110));
      check("single: syndrome", 136'(syn), 136'(e1));
      check("single: ciphertext", 136'(rx_ct), 136'(ct));
      check("single: plaintext", 136'(rx_pt), 136'(pt));
    end else begin
      n_double++;
      check("double: detected", 136'(det), 136'(1));
      if ((e1 ^ e2) > 136) begin
        n_uncorr++;
        check("double: uncorrectable", 136'({cor, unc}), 136'(2'b01));
      end
      // the receiver still decrypts whatever it was handed
      check("double: decrypt of received", 136'(rx_pt), 136'(ref_decrypt(rx_ct, key)));
    end
  endtask

  initial begin
    noise = '0;
    // worked example of the design
    frame(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 0, 0);
    check("example ciphertext", 136'(tx_ct), 136'(128'h69c4e0d86a7b0430d8cdb78070b4c55a));
    check("example codeword", 136'(tx_cw), 136'h6962706c353d82186cb36de01c9698d5db);
    frame(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 77, 0);
    frame(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 128, 0);
    frame(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 136, 1);
    for (int i = 0; i < 60; i++) begin
      logic [127:0] pt, key;
      int kind, e1, e2;
      pt   = {$urandom, $urandom, $urandom, $urandom};
      key  = {$urandom, $urandom, $urandom, $urandom};
      kind = i % 3;
      e1   = (kind == 0) ? 0 : 1 + int'($urandom % 136);
      e2   = (kind == 2) ? 1 + int'($urandom % 136) : 0;
      if (e2 == e1) e2 = 0;
      frame(pt, key, e1, e2);
    end
    $display("channel cases: clean=%0d data-bit=%0d check-bit=%0d double=%0d uncorrectable=%0d",
             n_clean, n_data_err, n_check_err, n_double, n_uncorr);
    checks++; if (n_clean == 0)     begin failures++; $display("FAIL no clean frame"); end
    checks++; if (n_data_err == 0)  begin failures++; $display("FAIL no data-bit error"); end
    checks++; if (n_check_err == 0) begin failures++; $display("FAIL no check-bit error"); end
    checks++; if (n_double == 0)    begin failures++; $display("FAIL no double error"); end
    checks++; if (n_uncorr == 0)    begin failures++; $display("FAIL no uncorrectable syndrome"); end
    finish_tb();
  end
endmodule
