// Large-packet workload for phelix_top at its default parameters: one
// 1028-byte message (257 words, the last one 4 bytes) is encrypted and then
// decrypted with the same key and nonce, the size class (> 1024 bytes) on
// which throughput is usually compared. Checks every output word and both
// tags against the reference model, that the stream runs at exactly one
// word per four clocks with no stall (the whole message takes 4 * 257
// clocks from the first data slot to the last result), and that decryption
// returns the plaintext and the same tag.
module tb_phelix_large;
  import phelix_pkg::*;
  import phelix_ref_pkg::*;

  localparam int NW = 257;

  logic        clk = 0, rst_n = 1, en = 0, enc_dec = 0;
  logic [2:0]  info = 3'd4;
  logic [31:0] data_in = '0, data_out;
  int checks = 0, failures = 0;

  phelix_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic wait_ready();
    int n = 0;
    while (data_out !== 32'h1 && n < 400) begin tick(1); n++; end
    checks++;
    if (n >= 400) begin failures++; $display("FAIL no ready word"); end
  endtask

  // One message from the ready word on; returns outputs and tag, and the
  // number of clocks from the first data slot to the last data result.
  task automatic stream(w32_t din [MAXW], bit dec, w32_t exp [MAXW], w32_t etag [4],
                        output w32_t dout [MAXW], output w32_t tag [4], output int clocks);
    longint t0;
    enc_dec = dec;
    tick(4);
    t0 = $time;
    for (int k = 0; k < NW; k++) begin
      data_in = din[k];
      en      = (k != NW - 1);
      tick(4);
      chk($sformatf("word %0d", k), data_out, exp[k]);
      dout[k] = data_out;
    end
    clocks = int'(($time - t0) / 10);
    tick(37);
    for (int t = 0; t < 4; t++) begin
      chk($sformatf("tag %0d", t), data_out, etag[t]);
      tag[t] = data_out;
      if (t < 3) tick(4);
    end
  endtask

  w32_t raw [8], kw [8], n4 [4];
  w32_t pt [MAXW], ct [MAXW], back [MAXW], e1 [MAXW], e2 [MAXW];
  w32_t t1 [4], t2 [4], et1 [4], et2 [4];
  int clk_enc, clk_dec;

  initial begin
    for (int k = 0; k < 8; k++) raw[k] = $urandom;
    for (int k = 0; k < 4; k++) n4[k] = $urandom;
    for (int k = 0; k < MAXW; k++) pt[k] = $urandom;
    ref_keymix(raw, kw);
    ref_message(kw, n4, pt, NW, 1'b0, 0, e1, et1);
    #2 rst_n = 0;
    #10 rst_n = 1;
    tick(1);

    en = 1;
    tick(1);
    for (int k = 0; k < 8; k++) begin data_in = raw[k]; tick(1); end
    for (int k = 0; k < 4; k++) begin data_in = n4[k]; tick(1); end
    wait_ready();
    stream(pt, 1'b0, e1, et1, ct, t1, clk_enc);

    // same nonce again, decrypt
    tick(3);
    ref_message(kw, n4, ct, NW, 1'b1, 0, e2, et2);
    en = 1;
    tick(1);
    for (int k = 0; k < 4; k++) begin data_in = n4[k]; tick(1); end
    wait_ready();
    stream(ct, 1'b1, e2, et2, back, t2, clk_dec);

    for (int k = 0; k < NW; k++) chk("round trip", back[k], pt[k]);
    for (int t = 0; t < 4; t++) chk("tags agree", t2[t], t1[t]);
    checks++;
    if (clk_enc != 4 * NW || clk_dec != 4 * NW) begin
      failures++;
      $display("FAIL rate: %0d / %0d clocks for %0d words", clk_enc, clk_dec, NW);
    end
    $display("1028-byte message: encrypt %0d clocks, decrypt %0d clocks (%0d bits per clock)",
             clk_enc, clk_dec, (NW * 32) / clk_enc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
