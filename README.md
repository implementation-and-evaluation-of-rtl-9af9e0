# Phelix stream-cipher core with built-in MAC

This is a hardware core for the Phelix stream cipher. Phelix encrypts and
authenticates in one pass. It takes a 256-bit key and a 128-bit nonce.
For every 32-bit word it produces a keystream word to XOR with the data. At the
end of a message it produces a 128-bit authentication tag (MAC) at almost no
extra cost. The core works in 32-bit words, not bytes. It takes one data word
every four clocks, which is one byte per clock. It encrypts and decrypts with
the same datapath. It can switch to a new nonce in five clocks without mixing
the key again.

The design is an RTL version of a small FPGA coprocessor for Phelix. It has two
parts: a controller and a calculation block. The controller is a state machine
that also holds the key and nonce registers. The calculation block evaluates
the Phelix block function in four register stages. Both are written in
synthesizable SystemVerilog and have self-checking testbenches.

## The cipher in a few lines

Phelix keeps five 32-bit working words Z0..Z4. It also remembers the Z4 values
of the last four blocks. Everything is built from 32-bit addition, XOR and
fixed rotations. The basic function `H(w0..w4, K0, K1)` has two halves:

```
first half  (key K0):  w0 += w3 ^ K0;  w3 <<<= 15    second half (key K1):  w0 ^= w3 + K1;  w3 <<<= 30
                       w1 += w4;       w4 <<<= 25                           w1 ^= w4;       w4 <<<= 13
                       w2 ^= w0;       w0 <<<= 9                            w2 += w0;       w0 <<<= 20
                       w3 ^= w1;       w1 <<<= 10                           w3 += w1;       w1 <<<= 11
                       w4 += w2;       w2 <<<= 17                           w4 ^= w2;       w2 <<<= 5
```

Block `i` computes `Y = H(Z, 0, X(i,0))` and then `Z' = H(Y, P(i), X(i,1))`.
The keystream word is `S(i) = Y4 + Z4(i-4)`, where `Z4(i-4)` is the Z4 that
started block i-4. Encryption outputs `C = P ^ S`. Decryption recovers
`P = C ^ S`. Either way, the plaintext goes back into the second H, so the state
depends on the message. That is what makes the MAC possible.

- **Key words** (`phelix_xkey`):
  - `X(i,0) = K[i mod 8]`
  - `X(i,1) = K[(i+4) mod 8] + N[i mod 8] + X'(i) + i + 8`
  - `X'(i)` is `4*l(U) = 128` when `i mod 4 = 1`. It is `floor((i+8)/2^31)` when `i mod 4 = 3`, and 0 otherwise.
  - The expanded nonce is `N[k] = (k mod 4) - N[k-4]` for k = 4..7.
- **Key mixing.** The raw key words are numbered K32..K39. Eight steps, for i = 7 down to 0, compute `(K4i..K4i+3) = R(K4i+4..K4i+7) xor (K4i+8..K4i+11)`. Here `R` is one block with Z4 = 96 (`l(U)+64`) and all key and plaintext inputs 0. K0..K7 is the working key.
- **Initialisation.** Set `Zj = K(j+3) xor Nj` for j = 0..3 and `Z4 = K7`. Set the four feedback words to 0. Then run eight blocks (i = -8..-1) with plaintext 0 and throw their keystream away.
- **MAC.** After the last data block, XOR `0x912d94f1` into Z0. Run eight blocks with plaintext `l(P) mod 4`, which is the number of bytes in the last word, mod 4. Then four more blocks. The keystream words of those last four blocks are the tag.

## The four-stage block datapath (`phelix_calc`)

This is the part that takes the most thought. One Phelix block is four
half-H "quarters". Each quarter is a chain of adds and XORs, too deep for one
FPGA clock at a useful frequency. So the block is cut into quarters, and each
has its own register row:

```
 row 0  Z(i)      --quarter 0: first half,  key 0      -->  row 1
 row 1            --quarter 1: second half, key X(i,0) -->  row 2
 row 2  Y(i)      --quarter 2: first half,  key P(i)   -->  row 3      S(i) = row2.Z4 + FIFO oldest
 row 3            --quarter 3: second half, key X(i,1) -->  row 0 = Z(i+1)
```

A 2-bit phase counter picks the quarter for each clock, so a block takes four
clocks. This is **not** a pipeline. The next block needs this block's result, so
only one row changes per clock.

The other rows keep their values, and this matters in two places:

- **Row 0 holds the block's starting words Z(i) for all four clocks.** In the
  last clock of the block, the FIFO pushes row 0's Z4 (the Z4 that started block
  i) while row 0 is overwritten with Z(i+1). During block i the FIFO therefore
  holds the Z4s of blocks i-4..i-1, and its oldest entry is exactly the
  `Z4(i-4)` that the keystream needs. The oldest word is read before the new
  one is written, so four 32-bit registers are enough.
- **The keystream exists in phase 2.** In phase 2, row 2 holds `Y4`, and
  `S = Y4 + fifo_oldest` is combinational. In decrypt mode, `P = C ^ S` is
  formed in the same clock and feeds quarter 2 at once, so decryption runs at
  the same rate as encryption. At the end of phase 2, the output word (C or P)
  and S are registered onto `fsm_d[0]` and `fsm_d[1]`.

The inputs are read at different times. `X(i,0)` on `ph_d[0]` is read in
phase 1, the data word on `ph_d[2]` in phase 2, and `X(i,1)` on `ph_d[1]` in
phase 3. While `ph_en` is low, every register holds.

The mode is set by `ph_ctrl`:

| ph_ctrl | mode | `ph_read` means | runs |
|---|---|---|---|
| 0 | key mix | load Z0..Z3 from `ph_d[0..3]` and set Z4 = 96 | one block with zero keys and plaintext, then stops. Z0..Z3 appear on `fsm_d[0..3]` |
| 1 | init | load Z0..Z4 from `ph_d[0..4]` and clear the FIFO | continuously, plaintext 0 |
| 2 | encrypt / MAC | in the last clock of a block, XOR 0x912d94f1 into the new Z0 | continuously, `C = P ^ S` |
| 3 | decrypt | as in mode 2 | continuously, `P = C ^ S` is fed back |

The MAC blocks always run in mode 2, also after a decryption, because their
plaintext is the byte count and not ciphertext. The tag is the keystream, not
`S ^ P`. For that reason the keystream has its own output bus, `fsm_d[1]`.

## Controller and operating sequence (`phelix_controller`)

The controller is a Mealy state machine with nine states. It holds eight
working-key registers, eight nonce registers and a 64-bit block counter
`j = i + 8`. The counter is large enough for the cipher's 2^64-byte message
limit. The controller computes the key words with `phelix_xkey` from the key,
the nonce and `j`.

| state | clocks | what happens |
|---|---|---|
| IDLE | - | waits for `en`. Reset lands here. So does `en = 0` in KEY_IN, KEY_MIX, INIT or NONCE_IN |
| KEY_IN | 12 | `data_in` = raw key words 0..7, then nonce words 0..3 |
| KEY_MIX | 41 | 1 entry clock, then 8 rounds of 5 clocks (4 block clocks + 1 store-and-reload clock). Also expands the nonce |
| INIT | 33 | 1 load clock, then 8 blocks |
| ENCRYPT / DECRYPT | 4 per word + 1 | one word per 4-clock slot; one extra transition clock after the last word |
| MAC | 48 | 12 blocks; the tag leaves during the last four |
| DONE | - | keeps the working key and clears the nonce. `en = 1` starts NONCE_IN |
| NONCE_IN | 5 | 4 nonce words, then expansion, then INIT |

Key mixing needs a window of 12 key words. Eight registers are enough: A holds
the newest four and B the four before. Each round computes
`A' = R(A) xor B, B' = A`. After eight rounds, A holds K0..K3 and B holds K4..K7.

## Using the core at the pins

Pins: `clk`, `rst_n` (asynchronous, active low), `en`, `enc_dec`,
`info[2:0]`, `data_in[31:0]` and `data_out[31:0]`, 71 pins in all. There is no
handshake. The attached device must drive and read words at fixed clocks.
Below, "edge n" means the n-th rising clock edge after the event named.

1. **Key and nonce.** Raise `en` (edge 0 sees it in IDLE). Drive key word k
   for edge k+1 (k = 0..7), then nonce word m for edge m+9 (m = 0..3). Keep
   `en` high until the message is over.
2. **Ready.** Set `enc_dec` (0 = encrypt, 1 = decrypt) before the end of
   initialisation. After edge 82 (counting the edge that first sees
   `en` as edge 0), `data_out` reads `0x00000001`. Call the first clock in which it
   reads 1 "clock r".
3. **Data slots.** Slot s takes clocks `r + 4 + 4s .. r + 7 + 4s`.
   - `data_in` is sampled at the first edge of each slot.
   - The slot's result (C or P) is on `data_out` during the whole next slot.
   - `en` is sampled at the last edge of each slot. If it is low there, that
     slot held the last word.
   - Drive `info` (1..4 bytes in the last word) by the edge after that slot.
4. **Tag.** The tag words T0..T3 are written to `data_out` at the 37th, 41st,
   45th and 49th edge after the last edge of the last slot. T3 stays there while the core waits in
   DONE.
5. **Next message with the same key.** Raise `en` in DONE. Drive the four
   nonce words for the next four edges. The ready word appears after edge 34,
   counting the edge that first sees `en` as edge 0. Then continue as in step 3.
6. **New key.** Assert `rst_n` low. It clears every register, including
   `data_out`, without waiting for a clock.

Bytes are packed least significant first. In a short last word, the valid
bytes are the low bytes and the rest are zero.

Decryption does not mask a short last word. It returns `C ^ S` for the whole
word. The receiver must therefore pass on the last ciphertext word exactly as
the encryptor produced it, all 32 bits, or the tag will differ.

## Performance

- **Throughput:** 32 bits per 4 clocks, i.e. 8 bits per clock. That is 648 Mb/s
  at 81 MHz and 1.46 Gb/s at 183 MHz, the slow and fast timing corners the
  original FPGA version reported. This RTL has not been timed on an FPGA.
- **Setup:** 12 + 41 + 33 = 86 clocks from the first key word to the first
  data slot. The original core needed 121 clocks. Its key-mixing step layout is
  not known, so this design uses its own, shorter one.
- **Nonce change:** 5 clocks, plus 33 clocks of initialisation.
- **Message end:** 1 + 48 clocks from the last data slot to the last tag word.
- **Size:** generic synthesis gives about 1490 flip-flop bits in total: 835 in
  the calculation block (four 160-bit rows, the 128-bit FIFO, output
  registers) and 656 in the controller (key, nonce, 64-bit counter, data
  registers).

## What follows the original core and what is this design's own

These parts follow the original core:

- the two-part structure and the 5 + 4 internal 32-bit buses with `ph_en`, `ph_read` and `ph_ctrl`;
- the four-mode calculation block;
- the register placement after each half of H;
- the 4-word feedback FIFO;
- the nine controller states and their transitions;
- the 12-clock key input and the 5-clock nonce input;
- the four-clock data rate;
- the `0x00000001` ready word;
- the asynchronous reset that clears everything;
- the pin list.

These parts are this design's own:

- the exact clocks at which `data_in`, `en`, `enc_dec` and `info` are sampled;
- the step layout of key mixing (41 clocks) and of initialisation (33 clocks);
- which internal bus carries which word outside key-mix mode;
- the keystream output bus used for the tag;
- the 64-bit block counter;
- clearing the nonce in DONE;
- treating `info` mod 4 as `l(P) mod 4`.

**How far to trust it.** The testbenches compare the RTL with a separate
behavioural model of Phelix (`tb/phelix_ref_pkg.sv`). That model is written
straight from the algorithm: H as a statement sequence, key mixing over a
40-word array, and a whole message in one function. It does not copy the
RTL's four-stage split, so errors in the staging, the timing, the FIFO or the
controller show up as mismatches. However, the RTL and the model come from the
same reading of the algorithm. Published Phelix test vectors were not
available to check against. A misreading shared by both, for example in key
mixing or in the `X(i,1)` formula, would not be caught. Check against the
official test vectors before you rely on interoperability with other Phelix
implementations.

## Files

| file | contents |
|---|---|
| `rtl/phelix_pkg.sv` | word and row types, mode and state enums, constants, the two halves of H |
| `rtl/phelix_fifo.sv` | 4 x 32-bit feedback FIFO |
| `rtl/phelix_calc.sv` | four-stage block function, keystream, modes, contains the FIFO |
| `rtl/phelix_xkey.sv` | key words X(i,0), X(i,1) |
| `rtl/phelix_controller.sv` | state machine, key and nonce registers, block counter, data output |
| `rtl/phelix_top.sv` | top level: controller + calculation block |
| `tb/phelix_ref_pkg.sv` | behavioural reference model used by the testbenches |
| `tb/tb_phelix_fifo.sv` | FIFO against a queue model |
| `tb/tb_phelix_xkey.sv` | key words against the formula, including counts above 2^31 |
| `tb/tb_phelix_calc.sv` | all four modes, output timing (result 3 clocks into a block), MAC XOR, stalls |
| `tb/tb_phelix_controller.sv` | state durations, `ph_*` sequencing, working key, nonce expansion, init words, key words |
| `tb/tb_phelix_top.sv` | end to end at default parameters: aborted key input, encrypt, nonce change, decrypt round trip, short last words, reset during a message, re-key |
| `tb/tb_phelix_large.sv` | 1028-byte message encrypted and decrypted, checks the rate of exactly 4 clocks per word |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It has
a watchdog in case the design hangs. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl \
  rtl/phelix_pkg.sv tb/phelix_ref_pkg.sv tb/tb_phelix_top.sv \
  --top-module tb_phelix_top -Mdir obj_top
./obj_top/Vtb_phelix_top
```

To run another testbench, swap the last file and the top module name. The
simulations use two-state logic. All registers are reset, so the results do
not depend on random initial values. Every testbench finishes in well under
a second.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `KEY_BYTES` | 32 | top, controller, calc, xkey | raw key length l(U). It sets Z4 = l(U) + 64 in key mixing and the 4·l(U) term in X(i,1). Shorter keys must be zero-padded to 8 words on input |
| `CNT_W` | 64 | top, controller, xkey | width of the block counter |
| `DEPTH` | 4 | fifo | feedback depth. Phelix needs exactly 4 |
