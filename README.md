# Hamming SEC-DED link: encoder, serial channel and correcting decoder

A bit flipped on a noisy link, or in a memory word, turns good data into wrong
data without any sign that it happened. This design protects a 7-bit message
with a Hamming code plus one overall parity bit (SEC-DED: single error
correction, double error detection). It does three things:

- It encodes the message into a 12-bit word.
- It sends the word one bit per clock over a single line. A test input can
  invert chosen bits on that line.
- At the far end it puts the word back together, finds and inverts a single
  wrong bit, and marks the word as invalid when two bits are wrong.

All of it is synthesizable SystemVerilog. The widths are parameters. With
`DATA_W = 4, SECDED = 0` the same RTL builds the classic (7,4) Hamming code
without the overall parity bit.

## The code word

The code positions are numbered from 1. Positions that are powers of two carry
parity bits. The other positions carry the data bits, in rising order. For 7
data bits, the 12-bit word is:

| position | 12 | 11 | 10 | 9  | 8  | 7  | 6  | 5  | 4  | 3  | 2  | 1  |
|----------|----|----|----|----|----|----|----|----|----|----|----|----|
| bit      | P9 | D7 | D6 | D5 | P8 | D4 | D3 | D2 | P4 | D1 | P2 | P1 |

The number of parity bits P is the smallest one for which 2^P >= X + P + 1,
where X is the number of data bits. Seven data bits need P = 4. Parity bit Pj
gives even parity over every position whose index has bit j set:

    P1 = D1 ^ D2 ^ D4 ^ D5 ^ D7        (positions 3 5 7 9 11)
    P2 = D1 ^ D3 ^ D4 ^ D6 ^ D7        (positions 3 6 7 10 11)
    P4 = D2 ^ D3 ^ D4                  (positions 5 6 7)
    P8 = D5 ^ D6 ^ D7                  (positions 9 10 11)
    P9 = XOR of positions 1..11        (the whole word then has even parity)

Worked example: the message D7..D1 = 0110101 encodes to the word
`0 0110 0101 110` (position 12 first).

## How the receiver decides

This is the part that takes the most care.

The receiver recomputes each parity group over the received bits. This time
the parity bit of the group is included:

    C1 = R1^R3^R5^R7^R9^R11    C2 = R2^R3^R6^R7^R10^R11
    C3 = R4^R5^R6^R7           C4 = R8^R9^R10^R11

Here Rn is received position n. Read as a binary number, the syndrome
C = C4C3C2C1 is the position of a single flipped bit. It is 0 when every
group checks. A second check, the *overall parity check*, is the XOR of all 12
received bits, P9 included. It is 1 when an odd number of bits flipped.

Together the two checks give these outcomes (`hamming_pkg::status_e`):

| C    | overall | status            | valid | action                               |
|------|---------|-------------------|-------|--------------------------------------|
| 0    | 0       | `ST_NO_ERROR`     | 1     | word used as received                |
| != 0 | 1       | `ST_SINGLE`       | 1     | the bit at position C is inverted    |
| != 0 | 0       | `ST_DOUBLE`       | 0     | word passed on unchanged, invalid    |
| 0    | 1       | `ST_UNCLASSIFIED` | 0     | word passed on unchanged, invalid    |

Notes on this table:

- **The overall check covers all 12 bits.** A check over the 11 Hamming bits
  alone, without the received P9, cannot separate one error from two.
- **A flipped P9 alone is treated as invalid.** The decision procedure this
  design follows sends every word that matches none of the first three rows
  to "invalid". So a word whose only error is in P9 is rejected, even though
  its data is intact. A textbook SEC-DED decoder would accept that word. To
  get that behaviour, change one line in `secded_classifier.sv`.
- **Three or more errors are not caught reliably.** They can look like a
  single error. If C points past position 11 (C = 12..15), nothing is
  inverted, but the word is still reported as `ST_SINGLE`.

In hardware, a one-hot decoder (4-to-16, with output Y0 meaning "no error")
turns C into select lines. One XOR gate per code position inverts the selected
bit. The decision gates those XOR gates, so a word with a double error is
never "corrected" into a third wrong word.

Worked examples, position 12 first:

- `1 1101 1001 001` has C = 11 and overall = 1. Position 11 is inverted, which
  gives D7..D1 = 0101000.
- `0 0111 0110 111` has C = 8 and overall = 0. It is a double error and is
  marked invalid.

## The serial link

`hamming_link` joins the parts:

    d --> hamming_encoder --h--> serial_transmitter --mh--> error_injector --> serial_receiver --dmh--> hamming_decoder --> dh, data_out, status, valid
                                      (ten)                     (err)              (ren)                       |
                                                                                                               C --> seven_seg_display --> error

- **Transmitter.** While `ten` is high, a counter steps through positions
  1..12, one per clock. A multiplexer puts `h[position]` on the line. After
  position 12 the counter starts again at 1, so a steady `ten` sends the word
  over and over. While `ten` is low, the line is 0 and the counter goes back
  to 1.
- **Medium.** The line bit is inverted in every cycle in which `err` is high.
  A one-cycle pulse in the n-th cycle of a frame corrupts position n.
- **Receiver.** While `ren` is high, a matching counter stores the line bit
  into `dmh[position]` on each rising edge. `frame_done` is high for one
  cycle, the cycle after the edge that stored position 12.
- **Decoder and display.** The decoder and the display are combinational from
  `dmh`. The 7-segment output shows C as one hex digit: 0 means no error, and
  B is position 11. Segments are active high, `error[0]` = a through
  `error[6]` = g.

**Timing.** Raise `ten` and `ren` together on the same clock. A frame takes
12 cycles (`OUT_W` in general). `dh`, `data_out`, `status`, `valid` and
`error` are valid from the `frame_done` cycle until the next frame starts
overwriting `dmh`.

**Reset.** There is no reset port. Holding `ten` and `ren` low for one clock
initialises both counters. The receive register holds no meaningful value
before the first `frame_done`.

### Top-level ports (`hamming_link`)

| port         | dir | width        | meaning                                           |
|--------------|-----|--------------|---------------------------------------------------|
| `clk`        | in  | 1            | clock; all registers use the rising edge          |
| `d`          | in  | DATA_W       | message, `d[k-1]` is Dk                            |
| `ten`        | in  | 1            | transmitter enable                                |
| `err`        | in  | 1            | inverts the line bit in the current cycle         |
| `ren`        | in  | 1            | receiver enable                                   |
| `dh`         | out | OUT_W        | corrected word, `dh[n]` is position n (`dh[12]` = P9) |
| `error`      | out | 7            | 7-segment digit showing C                          |
| `data_out`   | out | DATA_W       | corrected message                                 |
| `status`     | out | 2            | `hamming_pkg::status_e`                           |
| `valid`      | out | 1            | no error, or a corrected single error             |
| `frame_done` | out | 1            | the receive register has just taken a whole frame |

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W`  | 7       | message bits. The parity count `PAR_W` and the word width `CODE_W = DATA_W + PAR_W` are derived from it. |
| `SECDED`  | 1       | appends P9 and enables double-error detection. With 0, every non-zero C is corrected. |

The display shows only the low four bits of C. That covers every position for
DATA_W <= 11.

## Modules

| file | role |
|------|------|
| `rtl/hamming_pkg.sv` | parity-count function, power-of-two test, status type |
| `rtl/hamming_encoder.sv` | parity bit generator and word assembly |
| `rtl/checker_bit_generator.sv` | syndrome C and overall parity check |
| `rtl/syndrome_decoder.sv` | binary to one-hot decoder (Y0 = no error) |
| `rtl/error_corrector.sv` | per-position XOR gates with a common enable |
| `rtl/secded_classifier.sv` | the decision table above |
| `rtl/hamming_decoder.sv` | the four receiver stages, plus data extraction |
| `rtl/serial_transmitter.sv` | parallel-to-serial multiplexer |
| `rtl/error_injector.sv` | channel model that inverts the line bit on `err` |
| `rtl/serial_receiver.sv` | serial-to-parallel demultiplexer, `frame_done` |
| `rtl/seven_seg_display.sv` | hex digit to segments |
| `rtl/hamming_link.sv` | top level |

Every file opens with a comment on its function, interface and timing.

## Simulating

Each testbench checks itself. It prints one line,
`TB_RESULT checks=N failures=M`, and then calls `$finish`. To build and run
one with Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/hamming_pkg.sv tb/tb_hamming_link.sv --top-module tb_hamming_link -o sim
    ./obj_dir/sim

Swap in another testbench name as needed. The package must be listed first.

| testbench | what it covers |
|-----------|----------------|
| `tb_hamming_encoder` | worked example, then all 128 messages against the parity equations; all 16 messages of the (7,4) code |
| `tb_checker_bit_generator` | the three worked received words, then all 4096 12-bit words; all 128 words of the (7,4) code |
| `tb_syndrome_decoder` | every select value of the 4-to-16 and 3-to-8 decoders |
| `tb_error_corrector` | random words with every select line, enable on and off |
| `tb_secded_classifier` | all four (C, overall) cases, with and without SECDED |
| `tb_hamming_decoder` | worked examples; every message with no error, all 12 single errors and all 66 double errors; (7,4) single errors |
| `tb_serial_transmitter` / `tb_serial_receiver` | bit order, wrap-around, restart, `frame_done` after exactly 12 edges, hold while disabled |
| `tb_error_injector`, `tb_seven_seg_display` | truth tables; the segment patterns are written as letter lists |
| `tb_hamming_link` | the whole link at default size. Every message is sent with no error, each single error and each double error (10,112 frames), with a 12-cycle frame latency check, plus a streaming run of four back-to-back frames. The clean, single, P9-only, double and streaming cases are counted, and a case that never occurred counts as a failure. |
| `tb_hamming_link_7_4` | the link at `DATA_W = 4, SECDED = 0`: all 16 messages with no error and with each of the 7 single errors, 7-cycle frames |

Every testbench finishes in a few seconds.

## Where this design makes its own choices

The coding scheme, the parity equations, the checker equations, the decision
conditions and the decoder/XOR-gate structure of the receiver are standard
Hamming SEC-DED practice. They are the substance of this design. These points
are this design's own choices:

- **The serial link.** The port set (`ten`, `err`, `ren`, `dh` and a 7-bit
  error display) comes from a reference implementation that multiplexes the
  word onto one line and demultiplexes it at the receiver. These choices are
  new here:
  - one bit per clock, position 1 first
  - free-running frames while enabled
  - an idle line at 0
  - `err` inverting the line bit
  - the `frame_done` pulse
  - no reset port
- **What the display shows** (C as a hex digit) and its segment polarity.
- **The extra ports** `data_out`, `status`, `valid` and `frame_done`.
- **The default width.** The defaults are the 7-bit SEC-DED configuration.
  The reference implementation's top-level entity has a 4-bit message and a
  7-bit code; `DATA_W = 4, SECDED = 0` reproduces those widths.
- **The two decision details** in the notes under the decision table: the
  overall check covers all 12 bits, and a P9-only error is rejected.
- **Gating of the XOR gates.** They are blocked for a word that is not a
  single error, so an invalid word comes out exactly as it was received.

## Resources

At the default size, synthesis gives about 150 word-level cells and 21
flip-flops: 12 in the receive register, two 4-bit counters and `frame_done`.
The 7-segment table is mapped as a 16 x 7 ROM.
