// Testbench for phelix_calc, driven directly through its controller-side
// ports. Checks, against the reference block function:
//  - key-mix mode: one block on four loaded words with Z4 = 96, result on
//    fsm_d[0..3] exactly four clocks after the load, and nothing changes
//    afterwards (one turn only);
//  - init load with FIFO clear, then blocks in init, encrypt and decrypt
//    mode with random key words and data: keystream and output word appear
//    exactly three clocks into each block (four clocks per block);
//  - the MAC start (ph_read in the last clock of a block xors 0x912d94f1
//    into Z0), seen in the following blocks' keystream;
//  - ph_en = 0 holds the block in the middle of a block.
module tb_phelix_calc;
  import phelix_pkg::*;
  import phelix_ref_pkg::*;

  logic     clk = 0, rst_n = 1, ph_en = 0, ph_read = 0;
  ph_mode_e ph_ctrl = PH_KEYMIX;
  word_t    ph_d [5];
  word_t    fsm_d [4];
  int checks = 0, failures = 0;
  int n_keymix = 0, n_init = 0, n_enc = 0, n_dec = 0, n_macxor = 0, n_stall = 0;

  phelix_calc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  st_t  z, y;
  w32_t hist [4];

  initial begin
    for (int k = 0; k < 5; k++) ph_d[k] = '0;
    #2 rst_n = 0;
    #10 rst_n = 1;
    @(negedge clk);

    // ---------------- key-mix mode
    for (int t = 0; t < 10; t++) begin
      st_t s;
      ph_en = 1; ph_read = 1; ph_ctrl = PH_KEYMIX;
      for (int k = 0; k < 4; k++) begin ph_d[k] = $urandom; s[k] = ph_d[k]; end
      ph_d[4] = $urandom;         // must be ignored: Z4 is 96
      s[4] = 32'd96;
      s = ref_h(ref_h(s, 0, 0), 0, 0);
      @(negedge clk);
      ph_read = 0;
      for (int k = 0; k < 5; k++) ph_d[k] = $urandom;   // ignored in this mode
      repeat (3) @(negedge clk);
      checks++;
      if (fsm_d[0] === s[0]) begin failures++; $display("FAIL key mix result one clock early"); end
      @(negedge clk);
      for (int k = 0; k < 4; k++) chk("key mix", fsm_d[k], s[k]);
      repeat (5) @(negedge clk);
      for (int k = 0; k < 4; k++) chk("key mix hold", fsm_d[k], s[k]);
      n_keymix++;
    end

    // ---------------- init load, then init / encrypt / decrypt blocks
    ph_ctrl = PH_INIT; ph_read = 1;
    for (int k = 0; k < 5; k++) begin ph_d[k] = $urandom; z[k] = ph_d[k]; end
    for (int k = 0; k < 4; k++) hist[k] = '0;
    @(negedge clk);
    ph_read = 0;
    for (int b = 0; b < 24; b++) begin
      w32_t x0, x1, d, ks, p, outw, z4old;
      bit   dec, macx, stall;
      x0 = $urandom; x1 = $urandom; d = $urandom;
      if (b < 8)       ph_ctrl = PH_INIT;
      else if (b < 14) ph_ctrl = PH_ENC;
      else if (b < 20) ph_ctrl = PH_DEC;
      else             ph_ctrl = PH_ENC;
      dec   = (ph_ctrl == PH_DEC);
      macx  = (b == 19);
      stall = (b == 10 || b == 16);
      ph_d[0] = x0; ph_d[1] = x1; ph_d[2] = d;
      // reference
      z4old = z[4];
      y  = ref_h(z, 0, x0);
      ks = y[4] + hist[0];
      if (ph_ctrl == PH_INIT) begin p = '0; outw = '0; end
      else if (dec) begin p = d ^ ks; outw = p; end
      else begin p = d; outw = d ^ ks; end
      z = ref_h(y, p, x1);
      if (macx) z[0] = z[0] ^ 32'h912d94f1;
      hist[0] = hist[1]; hist[1] = hist[2]; hist[2] = hist[3]; hist[3] = z4old;
      // drive the four clocks of the block
      @(negedge clk);                 // phase 0 done
      if (stall) begin
        ph_en = 0;
        repeat (2) @(negedge clk);
        ph_en = 1;
        n_stall++;
      end
      @(negedge clk);                 // phase 1 done
      checks++;
      if (b > 0 && fsm_d[1] === ks) begin failures++; $display("FAIL keystream early, block %0d", b); end
      @(negedge clk);                 // phase 2 done: outputs registered
      chk($sformatf("keystream block %0d", b), fsm_d[1], ks);
      if (ph_ctrl != PH_INIT) chk($sformatf("data out block %0d", b), fsm_d[0], outw);
      if (macx) ph_read = 1;          // only in the last clock of the block
      @(negedge clk);                 // phase 3 done
      ph_read = 0;
      if (ph_ctrl == PH_INIT) n_init++;
      else if (dec) n_dec++;
      else n_enc++;
      if (macx) n_macxor++;
    end

    checks++;
    if (n_keymix == 0 || n_init == 0 || n_enc == 0 || n_dec == 0 || n_macxor == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL a mode was never exercised");
    end
    $display("modes: keymix=%0d init=%0d enc=%0d dec=%0d macxor=%0d stall=%0d",
             n_keymix, n_init, n_enc, n_dec, n_macxor, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
