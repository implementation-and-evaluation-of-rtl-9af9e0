// Phelix controller: the Mealy state machine, the working-key and nonce
// registers and the block counter of the Phelix core.
//
// States and what they do (one clock per step):
//   IDLE      waits for en = 1; reached after reset and whenever en drops in
//             KEY_IN, KEY_MIX, INIT or NONCE_IN.
//   KEY_IN    12 clocks: data_in is stored as raw key words 0..7, then as
//             nonce words 0..3.
//   KEY_MIX   builds the working key K0..K7 from the raw key words
//             K32..K39 with (K4i..K4i+3) = R(K4i+4..K4i+7) xor (K4i+8..K4i+11),
//             i = 7..0, R being one block with zero key/plaintext and Z4 = 96.
//             Eight rounds over a 12-word window kept in 8 registers
//             (A = newest four words, B = the four before). Step 0 (only on
//             entry) loads A into the calculation block, steps 1..4 run the
//             block, step 5 stores A' = R(A) xor B, B' = A and loads A' for the
//             next round in the same clock: 1 + 8*5 = 41 clocks. The nonce is
//             expanded to eight words (N(k) = (k mod 4) - N(k-4)) in step 0.
//   INIT      loads Z(j) = K(j+3) xor N(j), Z4 = K7 and clears the feedback
//             FIFO (1 clock), then runs eight blocks with plaintext 0
//             (32 clocks). During the last init block data_out shows the
//             ready word 0x00000001. At its end enc_dec selects ENCRYPT (0)
//             or DECRYPT (1).
//   ENCRYPT / DECRYPT
//             one data word per block of four clocks. Step 1: data_in is
//             sampled. Steps 2, 3: wait. Step 4: the result (C or P) of this
//             block goes to data_out and en is sampled; if en = 0 this was
//             the last word, ph_read makes the calculation block xor
//             0x912d94f1 into Z0, and a fifth transition step follows
//             (calculation block held, info sampled) before MAC.
//   MAC       twelve blocks in encrypt mode with plaintext l(P) mod 4
//             (info mod 4, so info = 4 for a full last word gives 0). The
//             keystream words of the last four blocks are the 128-bit tag and
//             go to data_out one per block.
//   DONE      waits with the working key kept; the nonce is discarded;
//             en = 1 starts NONCE_IN.
//   NONCE_IN  5 clocks: four nonce words, then their expansion; then INIT.
//
// External timing (there is no handshake): a "slot" is one block of four
// clocks. data_out turns to 0x00000001 at the start of the last init block;
// the first data slot starts four clocks later. data_in is sampled at the
// first rising edge of each slot, en at the last; the slot's result is on
// data_out during the whole next slot. The tag words T0..T3 are written to
// data_out at the ends of MAC blocks 8..11 (37, 41, 45 and 49 clocks after
// the transition step begins); T3 stays until data_out changes again.
//
// The states, their order, the 12-clock key input, the 5-clock nonce input,
// the 4-clock data rate and the ready word follow the core description.
// The step layout of KEY_MIX and INIT, the exact edges at which inputs are
// sampled, the info sampling point and the block counter width are this
// design's own choices. Asynchronous active-low reset clears all registers.
module phelix_controller
  import phelix_pkg::*;
#(
  parameter int unsigned KEY_BYTES = KEY_BYTES_DEFAULT,
  parameter int unsigned CNT_W     = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  // External control and data
  input  logic       en,
  input  logic       enc_dec,
  input  logic [2:0] info,
  input  word_t      data_in,
  output word_t      data_out,
  // To and from the calculation block
  output logic       ph_en,
  output logic       ph_read,
  output ph_mode_e   ph_ctrl,
  output word_t      ph_d  [5],
  input  word_t      fsm_d [4]
);

  fsm_state_e       state;
  logic [2:0]       step;     // position inside a state / inside a block
  logic [3:0]       cnt;      // words taken in, mixing rounds or blocks done
  word_t            key   [8];
  word_t            nonce [8];
  logic [CNT_W-1:0] blk;      // i + 8, i being the Phelix block number
  word_t            p_reg;    // data word (or MAC plaintext) of this block
  word_t            dout_q;

  word_t x0, x1;

  phelix_xkey #(.KEY_BYTES(KEY_BYTES), .CNT_W(CNT_W)) u_xkey (
    .key   (key),
    .nonce (nonce),
    .blk   (blk),
    .x0    (x0),
    .x1    (x1)
  );

  // Next A of key mixing: R(A) xor B.
  word_t mix_new [4];
  always_comb begin
    for (int k = 0; k < 4; k++) mix_new[k] = fsm_d[k] ^ key[k+4];
  end

  logic last_step;           // last clock of a block (steps 1..4 -> step 4)
  assign last_step = (step == 3'd4);

  // ---------------------------------------------------------------- outputs
  always_comb begin
    ph_en   = 1'b0;
    ph_read = 1'b0;
    ph_ctrl = PH_KEYMIX;
    for (int k = 0; k < 5; k++) ph_d[k] = '0;
    unique case (state)
      ST_KEY_MIX: begin
        ph_ctrl = PH_KEYMIX;
        ph_en   = en;
        if (step == 3'd0) begin
          ph_read = 1'b1;
          for (int k = 0; k < 4; k++) ph_d[k] = key[k];
        end else if (step == 3'd5 && cnt != 4'd7) begin
          ph_read = 1'b1;
          for (int k = 0; k < 4; k++) ph_d[k] = mix_new[k];
        end
      end
      ST_INIT: begin
        ph_ctrl = PH_INIT;
        ph_en   = en;
        if (step == 3'd0) begin
          ph_read = 1'b1;
          for (int k = 0; k < 4; k++) ph_d[k] = key[k+3] ^ nonce[k];
          ph_d[4] = key[7];
        end else begin
          ph_d[0] = x0;
          ph_d[1] = x1;
        end
      end
      ST_ENCRYPT, ST_DECRYPT: begin
        ph_ctrl = (state == ST_ENCRYPT) ? PH_ENC : PH_DEC;
        ph_en   = (step != 3'd5);
        ph_read = last_step && !en;
        ph_d[0] = x0;
        ph_d[1] = x1;
        ph_d[2] = p_reg;
      end
      ST_MAC: begin
        ph_ctrl = PH_ENC;
        ph_en   = 1'b1;
        ph_d[0] = x0;
        ph_d[1] = x1;
        ph_d[2] = p_reg;
      end
      default: ;
    endcase
  end

  assign data_out = dout_q;

  // ------------------------------------------------------------ state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      step   <= '0;
      cnt    <= '0;
      blk    <= '0;
      p_reg  <= '0;
      dout_q <= '0;
      for (int k = 0; k < 8; k++) begin
        key[k]   <= '0;
        nonce[k] <= '0;
      end
    end else begin
      unique case (state)
        ST_IDLE: begin
          step <= '0;
          cnt  <= '0;
          if (en) state <= ST_KEY_IN;
        end

        ST_KEY_IN: begin
          if (!en) state <= ST_IDLE;
          else begin
            if (cnt < 4'd8) key[cnt[2:0]] <= data_in;
            else            nonce[{1'b0, cnt[1:0]}] <= data_in;
            cnt <= cnt + 4'd1;
            if (cnt == 4'd11) begin
              state <= ST_KEY_MIX;
              step  <= '0;
              cnt   <= '0;
            end
          end
        end

        ST_KEY_MIX: begin
          if (!en) state <= ST_IDLE;
          else if (step == 3'd0) begin
            for (int k = 0; k < 4; k++) nonce[k+4] <= word_t'(k) - nonce[k];
            step <= 3'd1;
          end else if (step == 3'd5) begin
            for (int k = 0; k < 4; k++) begin
              key[k]   <= mix_new[k];
              key[k+4] <= key[k];
            end
            cnt  <= cnt + 4'd1;
            step <= 3'd1;
            if (cnt == 4'd7) begin
              state <= ST_INIT;
              step  <= '0;
              cnt   <= '0;
            end
          end else begin
            step <= step + 3'd1;
          end
        end

        ST_INIT: begin
          if (!en) state <= ST_IDLE;
          else if (step == 3'd0) begin
            blk  <= '0;
            cnt  <= '0;
            step <= 3'd1;
          end else if (last_step) begin
            blk  <= blk + 1'b1;
            cnt  <= cnt + 4'd1;
            step <= 3'd1;
            if (cnt == 4'(INIT_BLOCKS - 2)) dout_q <= 32'h0000_0001;
            if (cnt == 4'(INIT_BLOCKS - 1)) begin
              state <= enc_dec ? ST_DECRYPT : ST_ENCRYPT;
              cnt   <= '0;
            end
          end else begin
            step <= step + 3'd1;
          end
        end

        ST_ENCRYPT, ST_DECRYPT: begin
          if (step == 3'd1) p_reg <= data_in;
          if (step == 3'd5) begin
            // Transition step: MAC plaintext is l(P) mod 4.
            p_reg <= {30'd0, info[1:0]};  // info mod 4; info[2] only marks a full word (4)
            state <= ST_MAC;
            step  <= 3'd1;
            cnt   <= '0;
          end else if (last_step) begin
            dout_q <= fsm_d[0];
            blk    <= blk + 1'b1;
            step   <= en ? 3'd1 : 3'd5;
          end else begin
            step <= step + 3'd1;
          end
        end

        ST_MAC: begin
          if (last_step) begin
            blk  <= blk + 1'b1;
            cnt  <= cnt + 4'd1;
            step <= 3'd1;
            if (cnt >= 4'(MAC_PRE_BLOCKS)) dout_q <= fsm_d[1];
            if (cnt == 4'(MAC_PRE_BLOCKS + MAC_TAG_BLOCKS - 1)) begin
              state <= ST_DONE;
              cnt   <= '0;
              for (int k = 0; k < 8; k++) nonce[k] <= '0;
            end
          end else begin
            step <= step + 3'd1;
          end
        end

        ST_DONE: begin
          step <= '0;
          cnt  <= '0;
          if (en) state <= ST_NONCE_IN;
        end

        ST_NONCE_IN: begin
          if (!en) state <= ST_IDLE;
          else begin
            cnt <= cnt + 4'd1;
            if (cnt < 4'd4) nonce[{1'b0, cnt[1:0]}] <= data_in;
            else begin
              for (int k = 0; k < 4; k++) nonce[k+4] <= word_t'(k) - nonce[k];
              state <= ST_INIT;
              step  <= '0;
              cnt   <= '0;
            end
          end
        end

        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
