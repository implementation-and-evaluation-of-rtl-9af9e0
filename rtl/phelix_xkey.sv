// Phelix block key-word generator (combinational).
//
// For block number i Phelix uses two key words:
//   X(i,0) = K[i mod 8]
//   X(i,1) = K[(i+4) mod 8] + N[i mod 8] + X'(i) + i + 8      (mod 2^32)
//   X'(i)  = floor((i+8) / 2^31)  if i mod 4 = 3
//          = 4 * l(U)              if i mod 4 = 1
//          = 0                     otherwise
// K[0..7] is the working key after key mixing, N[0..7] the expanded nonce and
// l(U) the raw key length in bytes. The first init block has i = -8, so this
// module takes the non-negative count j = i + 8 (blk) instead of i: since 8
// is a multiple of 4 and of 8, i mod 4 = j mod 4 and i mod 8 = j mod 8.
// The formula is that of the Phelix definition; the counter width CNT_W
// (64 bits, for messages of up to 2^64 bytes) and the combinational form are
// this design's choices.
module phelix_xkey
  import phelix_pkg::*;
#(
  parameter int unsigned KEY_BYTES = KEY_BYTES_DEFAULT,
  parameter int unsigned CNT_W     = 64
) (
  input  word_t            key   [8],
  input  word_t            nonce [8],
  input  logic [CNT_W-1:0] blk,
  output word_t            x0,
  output word_t            x1
);

  localparam word_t FOUR_LU = word_t'(4 * KEY_BYTES);

  word_t            blk_hi;
  word_t            xprime;
  logic [2:0]       idx, idx4;

  assign blk_hi = word_t'(blk >> 31);
  assign idx    = blk[2:0];
  assign idx4   = blk[2:0] + 3'd4;

  always_comb begin
    unique case (blk[1:0])
      2'd3:    xprime = blk_hi;
      2'd1:    xprime = FOUR_LU;
      default: xprime = '0;
    endcase
  end

  assign x0 = key[idx];
  assign x1 = key[idx4] + nonce[idx] + xprime + blk[31:0];

endmodule
