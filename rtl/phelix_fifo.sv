// Feedback FIFO of the Phelix calculation block: four 32-bit words.
//
// Phelix adds to the keystream of block i the Z4 word that started block i-4.
// The FIFO holds Z4 of the four previous blocks. Its oldest entry (Z4 of
// block i-4) is always visible on rd_data; at the end of block i a shift
// (push) drops that oldest word and inserts the Z4 of block i. Because the
// oldest word is read out before the new word is written, four registers
// are enough, as in the core description. A synchronous clear sets all four
// words to zero, which is the start value Phelix prescribes for the
// feedback words of the first four init blocks.
//
// Interface: clear has priority over push. rd_data is combinational from
// the registers. Asynchronous active-low reset clears the contents.
module phelix_fifo
  import phelix_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  push,
  input  word_t wr_data,
  output word_t rd_data
);

  word_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) mem[k] <= '0;
    end else if (clear) begin
      for (int k = 0; k < DEPTH; k++) mem[k] <= '0;
    end else if (push) begin
      // mem[DEPTH-1] is the oldest word; shift towards it.
      for (int k = DEPTH - 1; k > 0; k--) mem[k] <= mem[k-1];
      mem[0] <= wr_data;
    end
  end

  assign rd_data = mem[DEPTH-1];

endmodule
