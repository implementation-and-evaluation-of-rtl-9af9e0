// End-to-end testbench for phelix_top at its default parameters.
//
// Plays the attached device: no handshake, so every word is driven and read
// at the clock counts the core defines (see phelix_controller). Each message
// is compared word by word, and its 128-bit tag, with the reference model.
// Sequence:
//   1. key input aborted by en = 0 (core must fall back to IDLE);
//   2. full key + nonce input, key mixing, init, encryption of 5 words
//      (full last word); setup time and the ready word are checked;
//   3. done-wait, new nonce (5 clocks), encryption of 3 words ending in a
//      2-byte word;
//   4. new nonce equal to message 1's, decryption of message 1's ciphertext:
//      plaintext and tag must equal message 1's;
//   5. asynchronous reset in the middle of an encryption;
//   6. new key, decryption of random data with a 1-byte last word.
// Each mechanism (states, abort, reset, partial word) is counted and must
// occur at least once.
module tb_phelix_top;
  import phelix_pkg::*;
  import phelix_ref_pkg::*;

  logic        clk = 0, rst_n = 1, en = 0, enc_dec = 0;
  logic [2:0]  info = 3'd4;
  logic [31:0] data_in = '0, data_out;
  int checks = 0, failures = 0;

  phelix_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------- mechanism counters (state entries seen at the controller)
  int n_state [16];
  int n_abort = 0, n_reset = 0, n_partial = 0;
  fsm_state_e prev_state = ST_IDLE;
  always @(posedge clk) begin
    if (dut.u_ctrl.state != prev_state) n_state[dut.u_ctrl.state]++;
    prev_state <= dut.u_ctrl.state;
  end

  task automatic tick(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic chk_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Wait until data_out shows the ready word; 'done' ticks were already
  // spent since en rose; checks the total against 'expect_n'.
  task automatic wait_ready(int done, int expect_n);
    int n = done;
    while (data_out !== 32'h1 && n < 400) begin tick(1); n++; end
    chk_int("clocks from en to ready word", n, expect_n);
  endtask

  task automatic do_reset();
    @(negedge clk);
    en = 0;
    #2 rst_n = 0;
    #3;
    chk("data_out cleared by asynchronous reset", data_out, '0);
    checks++;
    if (dut.u_ctrl.state != ST_IDLE) begin failures++; $display("FAIL reset state"); end
    tick(2);
    rst_n = 1;
    tick(1);
    n_reset++;
  endtask

  task automatic key_in(w32_t raw [8], w32_t n4 [4]);
    en = 1;
    tick(1);
    for (int k = 0; k < 8; k++) begin data_in = raw[k]; tick(1); end
    for (int k = 0; k < 4; k++) begin data_in = n4[k]; tick(1); end
    wait_ready(13, 83);
  endtask

  task automatic nonce_in(w32_t n4 [4]);
    en = 1;
    tick(1);
    for (int k = 0; k < 4; k++) begin data_in = n4[k]; tick(1); end
    wait_ready(5, 35);
  endtask

  // Called at the first clock in which data_out reads the ready word.
  task automatic message(w32_t kw [8], w32_t n4 [4], w32_t din [MAXW], int nw,
                         bit dec, int info_v, output w32_t dout [MAXW],
                         output w32_t tag [4]);
    w32_t exp [MAXW];
    w32_t etag [4];
    ref_message(kw, n4, din, nw, dec, info_v % 4, exp, etag);
    checks++;
    if (dut.u_ctrl.state != ST_INIT) begin failures++; $display("FAIL not in INIT at ready"); end
    enc_dec = dec;
    tick(4);
    for (int k = 0; k < nw; k++) begin
      data_in = din[k];
      en      = (k != nw - 1);
      info    = 3'(info_v);
      tick(4);
      chk($sformatf("%s word %0d", dec ? "plaintext" : "ciphertext", k), data_out, exp[k]);
      dout[k] = data_out;
    end
    if (info_v != 4) n_partial++;
    tick(37);
    for (int t = 0; t < 4; t++) begin
      chk($sformatf("tag word %0d", t), data_out, etag[t]);
      tag[t] = data_out;
      if (t < 3) tick(4);
    end
    checks++;
    if (dut.u_ctrl.state != ST_DONE) begin failures++; $display("FAIL not in DONE after tag"); end
    tick(3);
    chk("tag word 3 held in DONE", data_out, etag[3]);
  endtask

  w32_t raw [8], kw [8], n1 [4], n2 [4], n3 [4];
  w32_t m1 [MAXW], c1 [MAXW], m2 [MAXW], o [MAXW], p1 [MAXW];
  w32_t tag1 [4], tag2 [4], tagx [4];

  initial begin
    for (int k = 0; k < 16; k++) n_state[k] = 0;
    for (int k = 0; k < 8; k++) raw[k] = $urandom;
    for (int k = 0; k < 4; k++) begin n1[k] = $urandom; n2[k] = $urandom; n3[k] = $urandom; end
    for (int k = 0; k < MAXW; k++) begin m1[k] = $urandom; m2[k] = $urandom; end
    ref_keymix(raw, kw);
    do_reset();

    // 1. aborted key input
    en = 1;
    tick(1);
    for (int k = 0; k < 5; k++) begin data_in = raw[k]; tick(1); end
    en = 0;
    tick(2);
    checks++;
    if (dut.u_ctrl.state != ST_IDLE) begin failures++; $display("FAIL abort did not return to IDLE"); end
    else n_abort++;
    tick(3);

    // 2. key + nonce, encrypt 5 words
    key_in(raw, n1);
    for (int k = 0; k < 8; k++) chk("working key after mixing", dut.u_ctrl.key[k], kw[k]);
    message(kw, n1, m1, 5, 1'b0, 4, c1, tag1);

    // 3. new nonce, encrypt 3 words, last word 2 bytes
    tick(6);
    nonce_in(n2);
    m2[2] = m2[2] & 32'h0000_ffff;
    message(kw, n2, m2, 3, 1'b0, 2, o, tag2);

    // 4. decrypt message 1 with nonce 1
    tick(2);
    nonce_in(n1);
    message(kw, n1, c1, 5, 1'b1, 4, p1, tagx);
    for (int k = 0; k < 5; k++) chk("decrypted = original", p1[k], m1[k]);
    for (int t = 0; t < 4; t++) chk("decryption tag = encryption tag", tagx[t], tag1[t]);

    // 5. reset in the middle of an encryption
    tick(2);
    nonce_in(n3);
    enc_dec = 0;
    tick(6);
    data_in = $urandom;
    tick(5);
    checks++;
    if (dut.u_ctrl.state != ST_ENCRYPT) begin failures++; $display("FAIL not encrypting before reset"); end
    do_reset();

    // 6. new key, decrypt random data, last word 1 byte
    for (int k = 0; k < 8; k++) raw[k] = $urandom;
    ref_keymix(raw, kw);
    enc_dec = 1;
    key_in(raw, n3);
    message(kw, n3, m2, 4, 1'b1, 1, o, tagx);

    // mechanisms
    begin
      automatic fsm_state_e sts [8] = '{ST_KEY_IN, ST_KEY_MIX, ST_INIT, ST_ENCRYPT, ST_DECRYPT,
                              ST_MAC, ST_DONE, ST_NONCE_IN};
      foreach (sts[k]) begin
        checks++;
        if (n_state[sts[k]] == 0) begin failures++; $display("FAIL state %s never entered", sts[k].name()); end
      end
      checks++;
      if (n_abort == 0 || n_reset == 0 || n_partial == 0) begin
        failures++; $display("FAIL abort/reset/partial word never exercised");
      end
      $display("mechanisms: key_in=%0d key_mix=%0d init=%0d encrypt=%0d decrypt=%0d mac=%0d done=%0d nonce_in=%0d abort=%0d reset=%0d partial_word=%0d",
               n_state[ST_KEY_IN], n_state[ST_KEY_MIX], n_state[ST_INIT], n_state[ST_ENCRYPT],
               n_state[ST_DECRYPT], n_state[ST_MAC], n_state[ST_DONE], n_state[ST_NONCE_IN],
               n_abort, n_reset, n_partial);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
