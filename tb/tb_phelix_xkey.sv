// Testbench for phelix_xkey: random working keys, nonces and block counts
// (small ones and ones above 2^31, where the carry term floor((i+8)/2^31)
// matters) compared with the reference key-word formula.
module tb_phelix_xkey;
  import phelix_pkg::*;
  import phelix_ref_pkg::*;

  word_t       key [8], nonce [8];
  logic [63:0] blk;
  word_t       x0, x1;
  int checks = 0, failures = 0;
  int seen_mod [4];

  phelix_xkey dut (.key(key), .nonce(nonce), .blk(blk), .x0(x0), .x1(x1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w32_t e0, e1;
    w32_t kw [8], n8 [8];
    for (int k = 0; k < 4; k++) seen_mod[k] = 0;
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 8; k++) begin
        key[k] = $urandom; nonce[k] = $urandom;
        kw[k] = key[k]; n8[k] = nonce[k];
      end
      case (t % 3)
        0: blk = 64'($urandom_range(0, 40));
        1: blk = {32'd0, $urandom};
        default: blk = {$urandom, $urandom};
      endcase
      #1;
      ref_xkey(kw, n8, blk, 32, e0, e1);
      seen_mod[blk[1:0]]++;
      checks++;
      if (x0 !== e0 || x1 !== e1) begin
        failures++;
        if (failures < 10)
          $display("FAIL blk=%0h x0=%08h/%08h x1=%08h/%08h", blk, x0, e0, x1, e1);
      end
    end
    // one hand-worked value: blk = 1 (i = -7, i mod 4 = 1), all key/nonce 0
    for (int k = 0; k < 8; k++) begin key[k] = '0; nonce[k] = '0; end
    key[1] = 32'h11; key[5] = 32'h100; nonce[1] = 32'h5;
    blk = 64'd1;
    #1;
    checks++;
    // x0 = K1, x1 = K5 + N1 + 4*32 + 1 = 0x100 + 5 + 0x80 + 1
    if (x0 !== 32'h11 || x1 !== 32'h186) begin
      failures++; $display("FAIL hand value x0=%08h x1=%08h", x0, x1);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen_mod[k] == 0) begin failures++; $display("FAIL never saw blk mod 4 = %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
