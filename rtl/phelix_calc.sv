// Phelix calculation block: the block function in four register stages, the
// keystream adder and the 4-word feedback FIFO.
//
// How it works. Four register rows hold the five working words after each
// quarter of the block function (rows Z.0, Z.1, Z.2, Z.3). A 2-bit phase
// counter selects which quarter is evaluated in the current clock; the result
// is written into the next row, so one block takes four clocks and all rows
// keep their value for the rest of the block. Row 0 therefore holds the
// block's starting words for all four clocks, which is what lets the FIFO get
// by with four words: at the end of block i the Z4 word of row 0 (the Z4 that
// started block i) is pushed while row 0 is overwritten with the next block's
// words. In phase 2 row 2 holds Y4 (the output of the first H), and the
// keystream word is S = Y4 + (oldest FIFO word). This is the register
// placement of the core description; the design is not pipelined, because
// every block needs the output of the one before it.
//
// Modes (ph_ctrl), acted on only while ph_en is high:
//   0 key mix : ph_read loads Z0..Z3 from ph_d[0..3] and Z4 = l(U)+64 (96),
//               then exactly one block is run with all key and plaintext
//               inputs zero and the block stops; Z0..Z3 of the result appear
//               on fsm_d[0..3].
//   1 init    : ph_read loads Z0..Z4 from ph_d[0..4] and clears the FIFO;
//               blocks then run continuously with plaintext 0 and key words
//               X(i,0) = ph_d[0], X(i,1) = ph_d[1].
//   2 encrypt : continuous; plaintext P = ph_d[2]; C = S ^ P. Also used for
//               the MAC blocks (P = l(P) mod 4).
//   3 decrypt : continuous; C = ph_d[2], P = C ^ S is computed as soon as S
//               exists and fed into the third quarter.
//   In modes 2 and 3, ph_read in the last clock of a block xors 0x912d94f1
//   into the new Z0 (start of MAC generation).
//
// Timing: the key words are read in phase 1 (X(i,0)) and phase 3 (X(i,1)),
// the data word in phase 2. At the end of phase 2 the output word (C in
// mode 2, P in mode 3) is registered on fsm_d[0] and the keystream word on
// fsm_d[1]; both hold until the next block's phase 2. Outside key-mix mode
// fsm_d[2] and fsm_d[3] show Z0 and Z4 of row 0 for observation. Which bus
// carries what outside key-mix mode, and bringing the keystream out for the
// MAC tag, are this design's choices. Asynchronous active-low reset clears
// every register.
module phelix_calc
  import phelix_pkg::*;
#(
  parameter int unsigned KEY_BYTES = KEY_BYTES_DEFAULT
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ph_en,
  input  logic     ph_read,
  input  ph_mode_e ph_ctrl,
  input  word_t    ph_d  [5],
  output word_t    fsm_d [4]
);

  localparam word_t KEYMIX_Z4 = word_t'(KEY_BYTES + 64);

  zrow_t      row [4];
  logic [1:0] phase;
  logic       run;
  word_t      out_q, ks_q;

  word_t fifo_rd;
  logic  fifo_clear, fifo_push;

  // Keystream and the plaintext word that enters the third quarter.
  word_t ks, p_in, out_d;

  always_comb begin
    ks = row[2].z4 + fifo_rd;
    unique case (ph_ctrl)
      PH_ENC:  begin p_in = ph_d[2];      out_d = ph_d[2] ^ ks; end
      PH_DEC:  begin p_in = ph_d[2] ^ ks; out_d = p_in;         end
      default: begin p_in = '0;           out_d = '0;           end
    endcase
  end

  // Key inputs of quarters 1 and 3; zero during key mixing.
  word_t x0, x1;
  assign x0 = (ph_ctrl == PH_KEYMIX) ? '0 : ph_d[0];
  assign x1 = (ph_ctrl == PH_KEYMIX) ? '0 : ph_d[1];

  logic load;
  assign load = ph_en && ph_read && (ph_ctrl == PH_KEYMIX || ph_ctrl == PH_INIT);

  zrow_t next0;
  always_comb begin
    next0 = h_second(row[3], x1);
    if (ph_read && (ph_ctrl == PH_ENC || ph_ctrl == PH_DEC))
      next0.z0 = next0.z0 ^ MAC_XOR;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) row[r] <= '0;
      phase <= '0;
      run   <= 1'b0;
      out_q <= '0;
      ks_q  <= '0;
    end else if (load) begin
      row[0].z0 <= ph_d[0];
      row[0].z1 <= ph_d[1];
      row[0].z2 <= ph_d[2];
      row[0].z3 <= ph_d[3];
      row[0].z4 <= (ph_ctrl == PH_KEYMIX) ? KEYMIX_Z4 : ph_d[4];
      phase     <= '0;
      run       <= 1'b1;
    end else if (ph_en && run) begin
      unique case (phase)
        2'd0: row[1] <= h_first(row[0], '0);
        2'd1: row[2] <= h_second(row[1], x0);
        2'd2: begin
          row[3] <= h_first(row[2], p_in);
          out_q  <= out_d;
          ks_q   <= ks;
        end
        2'd3: begin
          row[0] <= next0;
          if (ph_ctrl == PH_KEYMIX) run <= 1'b0;
        end
      endcase
      phase <= phase + 2'd1;
    end
  end

  assign fifo_clear = load && (ph_ctrl == PH_INIT);
  assign fifo_push  = ph_en && run && !load && (phase == 2'd3) && (ph_ctrl != PH_KEYMIX);

  phelix_fifo #(.DEPTH(4)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (fifo_clear),
    .push    (fifo_push),
    .wr_data (row[0].z4),
    .rd_data (fifo_rd)
  );

  always_comb begin
    if (ph_ctrl == PH_KEYMIX) begin
      fsm_d[0] = row[0].z0;
      fsm_d[1] = row[0].z1;
      fsm_d[2] = row[0].z2;
      fsm_d[3] = row[0].z3;
    end else begin
      fsm_d[0] = out_q;
      fsm_d[1] = ks_q;
      fsm_d[2] = row[0].z0;
      fsm_d[3] = row[0].z4;
    end
  end

  // Interface rule: the MAC start (ph_read in modes 2 and 3) is only
  // meaningful in the last clock of a running block.
  a_macstart_last_clock: assert property (@(posedge clk) disable iff (!rst_n)
    (ph_en && ph_read && (ph_ctrl == PH_ENC || ph_ctrl == PH_DEC)) |-> (run && phase == 2'd3));

endmodule
