// Shared types, constants and the quarter-block functions of the Phelix
// encryption/decryption core.
//
// Phelix keeps five 32-bit working words Z0..Z4. One block (one 32-bit word
// of keystream) applies the half-block function H twice; each H is itself two
// halves, so a block consists of four "quarters":
//   quarter 0 : first half of H, key input 0
//   quarter 1 : second half of H, key input X(i,0)
//   quarter 2 : first half of H, key input P(i)   (plaintext word)
//   quarter 3 : second half of H, key input X(i,1)
// The core places a register row after each quarter, so one quarter is
// evaluated per clock (four clocks per block). The functions below are the
// two halves of H exactly as the Phelix definition gives them: add and xor
// chains with fixed left rotations (15, 25, 9, 10, 17 and 30, 13, 20, 11, 5).
//
// The mode encoding of ph_ctrl (0 key mix, 1 init, 2 encrypt/MAC, 3 decrypt)
// and the MAC constant 0x912d94f1 follow the Phelix core description; the
// FSM state encoding is this design's own.
package phelix_pkg;

  typedef logic [31:0] word_t;

  // The five working words Z0..Z4 of one register row.
  typedef struct packed {
    word_t z4;
    word_t z3;
    word_t z2;
    word_t z1;
    word_t z0;
  } zrow_t;

  // ph_ctrl: operating mode of the calculation block.
  typedef enum logic [1:0] {
    PH_KEYMIX = 2'd0,
    PH_INIT   = 2'd1,
    PH_ENC    = 2'd2,
    PH_DEC    = 2'd3
  } ph_mode_e;

  // Controller states (the nine states of the controller FSM).
  typedef enum logic [3:0] {
    ST_IDLE     = 4'd0,
    ST_KEY_IN   = 4'd1,
    ST_KEY_MIX  = 4'd2,
    ST_INIT     = 4'd3,
    ST_ENCRYPT  = 4'd4,
    ST_DECRYPT  = 4'd5,
    ST_MAC      = 4'd6,
    ST_DONE     = 4'd7,
    ST_NONCE_IN = 4'd8
  } fsm_state_e;

  // Value xored into Z0 after the last data block, before MAC generation.
  localparam word_t MAC_XOR = 32'h912d_94f1;

  // Default raw key length l(U) in bytes (256-bit key).
  localparam int unsigned KEY_BYTES_DEFAULT = 32;

  // Number of init blocks, MAC set-up blocks and MAC tag blocks.
  localparam int unsigned INIT_BLOCKS   = 8;
  localparam int unsigned MAC_PRE_BLOCKS = 8;
  localparam int unsigned MAC_TAG_BLOCKS = 4;

  function automatic word_t rotl(input word_t w, input int unsigned n);
    return (w << n) | (w >> (32 - n));
  endfunction

  // First half of H: w0 += w3 ^ k, ...
  function automatic zrow_t h_first(input zrow_t z, input word_t k);
    zrow_t r;
    word_t w0, w1, w2, w3, w4;
    w0 = z.z0; w1 = z.z1; w2 = z.z2; w3 = z.z3; w4 = z.z4;
    w0 = w0 + (w3 ^ k);  w3 = rotl(w3, 15);
    w1 = w1 + w4;        w4 = rotl(w4, 25);
    w2 = w2 ^ w0;        w0 = rotl(w0, 9);
    w3 = w3 ^ w1;        w1 = rotl(w1, 10);
    w4 = w4 + w2;        w2 = rotl(w2, 17);
    r.z0 = w0; r.z1 = w1; r.z2 = w2; r.z3 = w3; r.z4 = w4;
    return r;
  endfunction

  // Second half of H: w0 ^= w3 + k, ...
  function automatic zrow_t h_second(input zrow_t z, input word_t k);
    zrow_t r;
    word_t w0, w1, w2, w3, w4;
    w0 = z.z0; w1 = z.z1; w2 = z.z2; w3 = z.z3; w4 = z.z4;
    w0 = w0 ^ (w3 + k);  w3 = rotl(w3, 30);
    w1 = w1 ^ w4;        w4 = rotl(w4, 13);
    w2 = w2 + w0;        w0 = rotl(w0, 20);
    w3 = w3 + w1;        w1 = rotl(w1, 11);
    w4 = w4 ^ w2;        w2 = rotl(w2, 5);
    r.z0 = w0; r.z1 = w1; r.z2 = w2; r.z3 = w3; r.z4 = w4;
    return r;
  endfunction

endpackage
