// Testbench for phelix_controller, run together with phelix_calc (the block
// it drives). It watches the controller's side of the internal interface
// rather than the cipher output:
//  - time spent in each state: KEY_IN 12, KEY_MIX 41, INIT 33, NONCE_IN 5,
//    ENCRYPT/DECRYPT 4 per word plus the transition step, MAC 48 clocks;
//  - ph_read pulses: 8 in key mixing, 1 at init, 1 (MAC start) per message;
//  - raw key/nonce capture, working key after mixing, nonce expansion and
//    the init words Z(j) = K(j+3) xor N(j), Z4 = K7 against the reference;
//  - key words X(i,0), X(i,1) on ph_d[0..1] in every block clock;
//  - data word on ph_d[2] in data blocks, l(P) mod 4 in MAC blocks;
//  - calculation block held (ph_en = 0) in the transition step and in DONE;
//  - en = 0 during key mixing returns to IDLE.
module tb_phelix_controller;
  import phelix_pkg::*;
  import phelix_ref_pkg::*;

  logic       clk = 0, rst_n = 1, en = 0, enc_dec = 0;
  logic [2:0] info = 3'd3;
  word_t      data_in = '0, data_out;
  logic       ph_en, ph_read;
  ph_mode_e   ph_ctrl;
  word_t      ph_d [5], fsm_d [4];
  int checks = 0, failures = 0;

  phelix_controller dut (.*);
  phelix_calc u_calc (.clk, .rst_n, .ph_en, .ph_read, .ph_ctrl, .ph_d, .fsm_d);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);  // zero-extended
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---- monitors
  fsm_state_e cur;
  int dur;
  int last_dur [16];
  int n_read [16];
  int n_hold_tr = 0;
  int n_xkey_checked = 0;
  int n_mac_p = 0;
  w32_t kw_ref [8], n8_ref [8];
  bit   ref_valid = 0;
  logic [2:0] info_exp = 3'd3;

  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.state != cur) begin
        last_dur[cur] = dur;
        cur = dut.state;
        dur = 1;
      end else dur++;
      if (ph_read) n_read[dut.state]++;
      // key words during block clocks
      if (ref_valid && (dut.state == ST_INIT || dut.state == ST_ENCRYPT ||
                        dut.state == ST_DECRYPT || dut.state == ST_MAC) &&
          dut.step >= 3'd1 && dut.step <= 3'd4) begin
        w32_t e0, e1;
        ref_xkey(kw_ref, n8_ref, dut.blk, 32, e0, e1);
        chk("X(i,0) on ph_d[0]", ph_d[0], e0);
        chk("X(i,1) on ph_d[1]", ph_d[1], e1);
        n_xkey_checked++;
        if (dut.state == ST_MAC) begin
          chk("MAC plaintext l(P) mod 4", ph_d[2], 64'(info_exp % 4));
          n_mac_p++;
        end
      end
      if ((dut.state == ST_ENCRYPT || dut.state == ST_DECRYPT) && dut.step == 3'd5) begin
        chk("calculation block held in transition step", ph_en, 0);
        n_hold_tr++;
      end
      if (dut.state == ST_DONE) chk("calculation block held in DONE", ph_en, 0);
    end
  end

  task automatic tick(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_state(fsm_state_e s);
    int n = 0;
    while (dut.state != s && n < 500) begin tick(1); n++; end
    #1;  // let the monitor account for this clock first
    chk($sformatf("reached state %s", s.name()), dut.state, s);
  endtask

  w32_t raw [8], n4 [4], nb [4];

  initial begin
    for (int k = 0; k < 16; k++) begin last_dur[k] = 0; n_read[k] = 0; end
    cur = ST_IDLE; dur = 0;
    for (int k = 0; k < 8; k++) raw[k] = $urandom;
    for (int k = 0; k < 4; k++) begin n4[k] = $urandom; nb[k] = $urandom; end
    ref_keymix(raw, kw_ref);
    ref_nonce(n4, n8_ref);
    #2 rst_n = 0;
    #10 rst_n = 1;
    tick(1);

    // en = 0 during key mixing: back to IDLE
    en = 1; tick(1);
    for (int k = 0; k < 12; k++) begin data_in = $urandom; tick(1); end
    tick(10);
    chk("in key mixing", dut.state, ST_KEY_MIX);
    en = 0; tick(1);
    chk("en=0 in key mixing returns to IDLE", dut.state, ST_IDLE);
    tick(2);
    for (int k = 0; k < 16; k++) n_read[k] = 0;

    // full key input
    en = 1; tick(1);
    for (int k = 0; k < 8; k++) begin data_in = raw[k]; tick(1); end
    for (int k = 0; k < 4; k++) begin data_in = n4[k]; tick(1); end
    for (int k = 0; k < 8; k++) chk("raw key word captured", dut.key[k], raw[k]);
    for (int k = 0; k < 4; k++) chk("nonce word captured", dut.nonce[k], n4[k]);
    wait_state(ST_INIT);
    chk("KEY_IN clocks", last_dur[ST_KEY_IN], 12);
    chk("KEY_MIX clocks", last_dur[ST_KEY_MIX], 41);
    chk("key-mix loads (ph_read)", n_read[ST_KEY_MIX], 8);
    for (int k = 0; k < 8; k++) chk("working key", dut.key[k], kw_ref[k]);
    for (int k = 0; k < 8; k++) chk("expanded nonce", dut.nonce[k], n8_ref[k]);
    // init load words
    chk("init load ph_read", ph_read, 1);
    chk("init load mode", ph_ctrl, PH_INIT);
    for (int k = 0; k < 4; k++) chk("Z(j) = K(j+3) ^ N(j)", ph_d[k], kw_ref[k+3] ^ n8_ref[k]);
    chk("Z4 = K7", ph_d[4], kw_ref[7]);
    ref_valid = 1;

    // encrypt three words
    wait_state(ST_ENCRYPT);
    chk("INIT clocks", last_dur[ST_INIT], 33);
    chk("init ph_read pulses", n_read[ST_INIT], 1);
    for (int k = 0; k < 3; k++) begin
      data_in = 32'hA000_0000 + k;
      en = (k != 2);
      tick(1);
      tick(1);
      chk("data word on ph_d[2]", ph_d[2], 32'hA000_0000 + k);
      chk("encrypt mode", ph_ctrl, PH_ENC);
      tick(2);
    end
    info_exp = 3'd3;
    wait_state(ST_MAC);
    chk("ENCRYPT clocks (3 words + transition)", last_dur[ST_ENCRYPT], 13);
    chk("MAC start ph_read pulses", n_read[ST_ENCRYPT], 1);
    wait_state(ST_DONE);
    chk("MAC clocks", last_dur[ST_MAC], 48);
    tick(5);

    // new nonce, decrypt two words with a full last word
    en = 1; tick(1);
    for (int k = 0; k < 4; k++) begin data_in = nb[k]; tick(1); end
    info = 3'd4; info_exp = 3'd4;
    enc_dec = 1;
    ref_nonce(nb, n8_ref);
    wait_state(ST_INIT);
    chk("NONCE_IN clocks", last_dur[ST_NONCE_IN], 5);
    for (int k = 0; k < 8; k++) chk("expanded new nonce", dut.nonce[k], n8_ref[k]);
    wait_state(ST_DECRYPT);
    for (int k = 0; k < 2; k++) begin
      data_in = $urandom;
      en = (k != 1);
      tick(2);
      chk("decrypt mode", ph_ctrl, PH_DEC);
      tick(2);
    end
    wait_state(ST_DONE);
    chk("DECRYPT clocks (2 words + transition)", last_dur[ST_DECRYPT], 9);
    for (int k = 0; k < 8; k++) chk("nonce discarded in DONE", dut.nonce[k], 0);
    chk("working key kept in DONE", dut.key[3], kw_ref[3]);

    checks++;
    if (n_hold_tr != 2 || n_xkey_checked == 0 || n_mac_p != 2 * 48) begin
      failures++;
      $display("FAIL transition steps=%0d key-word checks=%0d mac-p checks=%0d",
               n_hold_tr, n_xkey_checked, n_mac_p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
