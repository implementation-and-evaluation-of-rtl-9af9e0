// Testbench for phelix_fifo: random pushes and clears against a queue model.
// Checks that the visible word is always the one pushed four pushes ago (0
// after a clear or reset) and that nothing changes without push.
module tb_phelix_fifo;
  import phelix_pkg::*;

  logic  clk = 0, rst_n = 0, clear = 0, push = 0;
  word_t wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  word_t model [4];   // model[3] = oldest

  phelix_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(string what);
    checks++;
    if (rd_data !== model[3]) begin
      failures++;
      $display("FAIL %s: rd_data=%08h expected %08h", what, rd_data, model[3]);
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) model[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_out("after reset");
    for (int t = 0; t < 2000; t++) begin
      int r;
      r = $urandom_range(0, 99);
      clear   = (r < 3);
      push    = (r >= 3 && r < 70);
      wr_data = $urandom;
      @(negedge clk);
      if (clear) begin
        for (int k = 0; k < 4; k++) model[k] = '0;
      end else if (push) begin
        model[3] = model[2]; model[2] = model[1]; model[1] = model[0]; model[0] = wr_data;
      end
      check_out("random");
    end
    // four known pushes, then the first must appear
    clear = 0; push = 1;
    for (int k = 0; k < 4; k++) begin
      wr_data = 32'h1000_0000 + k;
      @(negedge clk);
    end
    push = 0;
    checks++;
    if (rd_data !== 32'h1000_0000) begin failures++; $display("FAIL order: %08h", rd_data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
