// Phelix encryption/decryption core, top level.
//
// A 256-bit-key Phelix stream cipher with built-in MAC. The attached device
// writes the key and nonce over the 32-bit data_in bus, then streams
// plaintext (enc_dec = 0) or ciphertext (enc_dec = 1) words at one word per
// four clocks and reads the result on data_out one slot later. Dropping en
// ends the message; the core then computes and outputs the four 32-bit MAC
// tag words and waits. Raising en again takes a new nonce (5 clocks) and
// reuses the mixed key; a reset is needed to change the key.
//
// Structure: the controller (state machine, key and nonce registers, key
// word generation) drives the calculation block (the Phelix block function in
// four register stages plus the 4-word feedback FIFO) over five 32-bit buses
// and receives four 32-bit buses back, with the control signals ph_en,
// ph_read and ph_ctrl. The pins are those of the core description:
// clk, rst_n (asynchronous, active low), en, enc_dec, info (3 bits: number
// of bytes, 1..4, in the last data word), data_in and data_out (32 bits
// each), 71 in all. See phelix_controller for the exact clock-by-clock
// timing at the pins.
module phelix_top
  import phelix_pkg::*;
#(
  parameter int unsigned KEY_BYTES = KEY_BYTES_DEFAULT,
  parameter int unsigned CNT_W     = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        enc_dec,
  input  logic [2:0]  info,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);

  logic     ph_en, ph_read;
  ph_mode_e ph_ctrl;
  word_t    ph_d  [5];
  word_t    fsm_d [4];

  phelix_controller #(.KEY_BYTES(KEY_BYTES), .CNT_W(CNT_W)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .enc_dec  (enc_dec),
    .info     (info),
    .data_in  (data_in),
    .data_out (data_out),
    .ph_en    (ph_en),
    .ph_read  (ph_read),
    .ph_ctrl  (ph_ctrl),
    .ph_d     (ph_d),
    .fsm_d    (fsm_d)
  );

  phelix_calc #(.KEY_BYTES(KEY_BYTES)) u_calc (
    .clk     (clk),
    .rst_n   (rst_n),
    .ph_en   (ph_en),
    .ph_read (ph_read),
    .ph_ctrl (ph_ctrl),
    .ph_d    (ph_d),
    .fsm_d   (fsm_d)
  );

endmodule
