# HDLC link with Hamming-protected payload

This design carries the contents of a small 8 x 8-bit RAM from a
transmitter to a receiver over a one-bit serial line, inside a single
HDLC-style frame. Each of the eight bytes travels as a 12-bit Hamming code
word: the eight data bits plus four parity bits. The receiver can therefore
correct one flipped bit in every byte, which is up to eight bit errors in
one 64-bit payload, before it writes the bytes into its own 8 x 8 RAM.

The cost is 32 parity bits for 64 data bits. That is a bit overhead of 50 %
and a code rate of 64/96 = 66.7 %. Counting the flags, the address and the
control field, 64 of the 122 bits on the line are data.

```
 TX side                                              RX side
 +---------+  64   +--------------------+          +-------------------+
 | ram8x8  |------>| hdlc_frame_tx      |  tx_line | hdlc_frame_rx     |
 | (tx)    |   +-->| 122-bit shift reg. |---(^)--->| flag search,      |
 +---------+   |   +--------------------+   |      | field counters    |
      | 64     |32           ^ calc         |      +-------------------+
      v        |             |          chan_err      | 64 data, 32 par
 +--------------------+      |                        v
 | hamming_parity_gen |<-----+              +-------------------+   +---------+
 | 8 x hamming_enc +  |                     | hamming_corrector |-->| ram8x8  |
 | parity storage     |                     | 8 x hamming_dec   |64 | (rx)    |
 +--------------------+                     +-------------------+   +---------+
```

All blocks run on one clock, `clk`. There is no clock recovery: the
receiver samples the line on the same edges that the transmitter uses to
change it.

## The (12,8) code word

Bit positions are numbered 1 to 12. The parity bits sit at the
power-of-two positions, and the data bits fill the rest, MSB first:

| position | 1  | 2  | 3    | 4  | 5    | 6    | 7    | 8  | 9    | 10   | 11   | 12   |
|----------|----|----|------|----|------|------|------|----|------|------|------|------|
| content  | P3 | P2 | d[7] | P1 | d[6] | d[5] | d[4] | P0 | d[3] | d[2] | d[1] | d[0] |

Each parity bit makes its group of positions even:

* P3 (position 1) covers positions 3, 5, 7, 9, 11.
* P2 (position 2) covers positions 3, 6, 7, 10, 11.
* P1 (position 4) covers positions 5, 6, 7, 12.
* P0 (position 8) covers positions 9, 10, 11, 12.

So check bit *i* covers every position whose number has bit *i* set.

On reception, four check bits are recomputed over all 12 positions:
C0 covers 1,3,5,7,9,11; C1 covers 2,3,6,7,10,11; C2 covers 4,5,6,7,12; and
C3 covers 8..12. The syndrome {C3,C2,C1,C0} is zero for a clean word. After
a single error, the syndrome is the number of the bad position, and that
bit is inverted. The bad bit may be a data bit or a parity bit.

Worked example: data `10110011` becomes the code word `101101100011`
(written from position 1 to 12). Flipping position 2 gives syndrome `0010`.
Flipping position 6 gives syndrome `0110`.

Limits of the code, as built:

* Two errors in one word give a non-zero syndrome equal to the XOR of the
  two positions.
  * If that value is a real position (1..12), the decoder flips that bit.
    The word is then wrong and nothing flags it. This is what a plain
    Hamming code does.
  * If the value is 13..15, no bit is flipped. The word is stored as
    received and `rx_word_uncorr` marks it.
* An extended code exists that adds an overall parity bit (13 bits per
  word) to detect double errors. It is not built: the frame has room for
  only 4 parity bits per byte.

`hamming_enc` and `hamming_dec` implement one word. `hamming_parity_gen`
(eight encoders plus a 32-bit parity storage register) and
`hamming_corrector` (eight decoders) handle the whole RAM image.

## Frame layout

The frame is sent most significant bit first. Its fields:

| bits    | field      | width | value                                          |
|---------|------------|-------|------------------------------------------------|
| 121:114 | start flag | 8     | `01111110`                                     |
| 113:106 | address    | 8     | `tx_addr`; the receiver accepts `8'h01`        |
| 105:104 | control    | 2     | `00`                                           |
| 103:40  | data       | 64    | RAM word 0 in bits 103:96, ..., word 7 in 47:40 |
| 39:8    | parity     | 32    | word 0's {P3,P2,P1,P0} in 39:36, ..., word 7's in 11:8 |
| 7:0     | stop flag  | 8     | `01111110`                                     |

There is no bit stuffing and no CRC: every field has a fixed length, and
the parity field takes the place of the usual frame check sequence. The
package `hdlc_edac_pkg` holds these widths and the `hdlc_frame_t` struct.
The flag value is the usual HDLC flag. The source design names the flag
fields but does not give their value.

## Operating sequence

`tx_rx_en` selects between two phases.

**RAM access (`tx_rx_en` = 0).** Both RAMs behave like ordinary memories:

* `w_tx`=1, `r_tx`=0 writes `din_tx` to `waddr_tx`.
* `w_tx`=0, `r_tx`=1 reads `raddr_tx`. `dout_tx` is valid on the next clock.
* The receive RAM works the same way through `w_rx`, `r_rx`, `waddr_rx`,
  `raddr_rx`, `din_rx` and `dout_rx`.
* When both or neither of w and r are high, nothing happens.

**Transfer (`tx_rx_en` = 1).** Cycle 0 below is the first rising edge that
sees `tx_rx_en` high:

| cycle (edge) | transmitter                                          | receiver |
|--------------|------------------------------------------------------|----------|
| 0 → 1        | `calc`: the parity storage captures the parity of the TX RAM | searches for the flag |
| 1 → 2        | the 122-bit frame is loaded into the shift register  | |
| 2 → 124      | `tx_count` = 1..122; frame bit 122-k is on `tx_line` while `tx_count` = k | flag found, then address, control, data, parity, stop |
| 124          | `tx_count` returns to 0, `tx_done` rises             | last bit sampled; `frame_valid` pulses |
| 125          |                                                      | corrected bytes written into the RX RAM; `rx_done`, `rx_word_error` and `rx_syndromes` update |

So `tx_done` is high 125 clock edges after `tx_rx_en` is first seen, and
`rx_done` is high one edge later.

One frame is sent for each time `tx_rx_en` goes high. Both done flags stay
high until `tx_rx_en` goes low. Lowering `tx_rx_en` in the middle of a
frame abandons it on both sides.

The receiver (`hdlc_frame_rx`) works through the fields in order:

1. While its counter is 0, it watches the line for the flag.
2. It reads the address. If the address is not its own (`RX_OWN_ADDR`,
   default `8'h01`), it pulses `rx_addr_err` and lets the remaining bits of
   that frame pass unread. Only then does it search again, so a flag
   pattern inside foreign data cannot start a false frame.
3. It skips the two control bits.
4. It collects the 64 data bits and the 32 parity bits.
5. It checks the stop flag. If the stop flag is wrong, it pulses
   `rx_stop_err` and drops the frame. The receive RAM keeps its old
   contents.

The corrector is combinational. The receive RAM takes its output in the
cycle that `frame_valid` is high.

## Error injection

Between the two sides, the line passes through an XOR with the `chan_err`
input, which acts only while a frame is being sent. A test can therefore
flip frame bit *b* by raising `chan_err` while `tx_count` = 122 - *b*.
This is the only way to put errors into the link, and it is this design's
addition.

## Top-level ports (`hdlc_edac_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset that clears all registers and both RAMs |
| `tx_rx_en` | in | 1 | 0: RAM access; 1: send and receive one frame |
| `w_tx`, `r_tx`, `waddr_tx`, `raddr_tx`, `din_tx`, `dout_tx` | | 1,1,3,3,8,8 | transmit RAM access |
| `tx_addr` | in | 8 | address field placed in the frame |
| `chan_err` | in | 1 | flip the current line bit |
| `tx_line` | out | 1 | transmitter output before the XOR; 1 when idle |
| `tx_count` | out | 7 | 0 when idle, 1..122 while sending |
| `tx_done` | out | 1 | frame sent |
| `w_rx`, `r_rx`, `waddr_rx`, `raddr_rx`, `din_rx`, `dout_rx` | | 1,1,3,3,8,8 | receive RAM access |
| `rx_addr`, `rx_ctrl` | out | 8, 2 | address and control fields of the last stored frame |
| `rx_count` | out | 7 | receiver bit count, 0 while searching for the flag |
| `rx_done` | out | 1 | corrected frame is in the receive RAM |
| `rx_addr_err`, `rx_stop_err` | out | 1 | one-cycle pulses: foreign address; bad stop flag |
| `rx_word_error` | out | 8 | bit w: word w of the last frame had an error and was corrected |
| `rx_word_uncorr` | out | 8 | bit w: word w's syndrome was 13..15 |
| `rx_syndromes` | out | 32 | syndrome of each word, word 0 in bits 31:28 |

Sizes come from `hdlc_edac_pkg`:

* `WORDS` = 8 and `WORD_W` = 8 (the 8 x 8 RAM).
* `PAR_W` = 4.
* `FRAME_BITS` = 122.

The code and the frame layout assume these values. Changing them means
changing the code and the frame, not just the numbers.

## Where this design makes its own choices

The following come from the source design:

* the block structure;
* the RAM size;
* the (12,8) code, its bit placement and its equations;
* the frame fields and widths, the `00` control field and the receive
  address `01`;
* the 0..122 transmit counter and the MSB-first order;
* the order of the receive steps.

The following are choices of this implementation:

* **Flag value.** Both flags are `01111110`.
* **Field order inside the frame.** Word 0 comes first; the parity nibble
  of each word is sent as P3..P0.
* **Line idle level.** The idle line is 1.
* **Timing.** Parity is computed for all eight words in one cycle. There is
  one load cycle before the first bit. Reads are registered.
* **Done flags.** Both done flags are held until `tx_rx_en` falls. The
  `rx_done` flag itself is an addition.
* **Receiver on a foreign address.** It skips the rest of that frame.
* **Receiver on a bad stop flag.** It drops the frame and flags it.
* **Syndromes of 13..15.** The word is not changed and is flagged.
* **Reset.** It is asynchronous, and it clears the RAMs too.
* **Error-injection input.** `chan_err` is added.
* **Clock gating.** The source design mentions running the clock only when
  needed. Here, idle registers hold their value under enables; no clock is
  gated.

## Files

* `rtl/`:
  * `hdlc_edac_pkg.sv`: constants and the frame struct.
  * `hamming_enc.sv` and `hamming_dec.sv`: one word.
  * `hamming_parity_gen.sv` and `hamming_corrector.sv`: eight words.
  * `ram8x8.sv`.
  * `hdlc_frame_tx.sv` and `hdlc_frame_rx.sv`.
  * `hdlc_edac_top.sv`.
* `tb/`:
  * One self-checking testbench for each module, `tb_<module>.sv`.
  * `hamming_ref_pkg.sv`: a reference model written from the general
    Hamming rule, not from the RTL equations.
* `tb/tb_hdlc_edac_top.sv` runs the whole link at its default sizes:
  * fills the transmit RAM;
  * sends a clean frame;
  * sends a frame with one error in every word;
  * sends frames with parity-bit errors and random error patterns;
  * sends a frame for a foreign address;
  * sends a frame with a corrupted stop flag;
  * sends a word with an uncorrectable double error;
  * writes the receive RAM directly.

  It checks the receive RAM after every frame, checks the 125/126-cycle
  timing, and counts every mechanism.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hdlc_edac_pkg.sv tb/hamming_ref_pkg.sv tb/tb_hdlc_edac_top.sv \
    --top-module tb_hdlc_edac_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any of the others. Verilator finds the
modules each testbench uses in `rtl/` by file name. Lint one module with
`verilator --lint-only -Wall -Irtl rtl/hdlc_edac_pkg.sv rtl/<module>.sv`.

The whole link synthesizes to about 640 word-level cells and 600
flip-flops. Both RAMs are built from flip-flops because of their reset.
