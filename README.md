# Balanced I/O switching for stacked-supply chips: 8B/10B coding with toggle conversion

## The problem

Two chips can share one supply by being stacked in series: the upper chip runs between
3.6 V and an intermediate node, the lower chip between that node and 0 V. Each sees about
1.8 V, and no step-down regulator has to burn off the difference. The intermediate node
stays at half the supply only while both chips draw the same current. If one chip draws
more, the node drifts toward its rail, and a supporting regulator has to hold it.

In these chips the core is an SRAM, whose current is almost independent of the data. The
current that depends on data comes from the output buffers, which draw a pulse every time a
pad line changes level. If the upper chip sends a pattern that flips all eight lines every
cycle while the lower chip sends a constant, the upper chip draws far more current and the
node moves.

## The idea

Make every chip switch the same number of output lines per word, whatever the data. This
takes two steps:

1. **8B/10B coding.** Each 8-bit word becomes a 10-bit code word with 4, 5 or 6 ones.
   The encoder keeps a running disparity, so an unbalanced word is always followed, sooner
   or later, by one unbalanced the other way. After *n* words the total number of ones is
   exactly 5n or 5n+1 (5n-1 or 5n if the encoder starts at positive disparity).
2. **"1"-to-toggle conversion.** A toggle flip-flop on each of the 10 lines flips the line
   for a 1 and leaves it for a 0. Each code word therefore causes exactly as many line
   transitions as it has ones.

Together these give each chip 4 to 6 transitions per word, and a cumulative transition
count that never strays more than one from 5 per word. Two chips sending completely
different data stay within one transition of each other (two if their encoders start at
opposite disparities). So their supply currents match and the node between them holds
without a regulator.

8B/10B alone is not enough. It balances the number of ones, but the lines switch whenever
consecutive code words differ, and that is still data-dependent. Bus-invert coding alone is
not enough either. It caps switching at 4 data lines plus the invert line per word, but a
chip sending a constant still switches nothing. Both are built here as alternative modes so
the three approaches can be compared on the same hardware.

At the receiving end, an XOR of each line with its value one clock earlier turns toggles
back into ones, and a 10B/8B decoder recovers the byte.

## One chip: `coding_tx`

```
             8            10                    10
  SRAM ──rdata──┬─> bus_invert_enc ─┐
                ├─> enc_8b10b ──────┼─ mode mux ─code─> toggle_tx ──pad[9:0]──> I/O buffers
                └─> (raw) ──────────┘                  (T-FF / register)
                      ^ pad[7:0] (present line state, for bus-invert)
```

| `mode` (`coding_pkg::mode_e`) | pad lines |
|---|---|
| `MODE_RAW` | `pad[7:0]` = byte, `pad[9:8]` = 0 |
| `MODE_BUS_INV` | `pad[8]` = invert line, `pad[7:0]` = byte or ~byte, `pad[9]` = 0 |
| `MODE_8B10B` | `pad[9:0]` = code word as levels |
| `MODE_8B10B_TOGGLE` | `pad[9:0]` flips where the code word has a 1 |

**Timing.** A read (`re`=1, `we`=0) sampled at clock edge *k* registers the SRAM word. The
coded word reaches `pad` at edge *k*+1, with `pad_valid` high for that cycle. A new word can
be read every clock. When no word is sent, the pads hold their level, so idle cycles cause
no switching.

**SRAM.** `sram` is a single-port synchronous RAM with a registered read. If `we` and `re`
are both high, the write wins. Its depth (256 × 8 by default, `ADDR_W` = 8) is this
design's choice. It is written as an array; a real chip would use a process-specific macro
in its place.

**Bus-invert rule.** The coder counts how many of the 8 data lines would change. If the count
is more than 4, it sends the complement and raises the invert line. A tie (exactly 4) is
not inverted, and the invert line itself is not part of the count.

## 8B/10B code details (`coding_pkg`, `enc_8b10b`, `dec_10b8b`)

The tables are the standard Widmer–Franaszek data characters D.x.y:

- the low five bits EDCBA go through the 5b/6b table to give `abcdei`;
- the high three bits HGF go through the 3b/4b table to give `fghj`;
- the alternate x.A7 form replaces x.P7 where P7 would make a run of five equal bits.

A code word is `{a,b,c,d,e,i,f,g,h,j}`, with `a` in bit 9 and `j` in bit 0. Only data
characters are supported; control (K) characters are not. The code table is not
stored: the package holds the 32 + 8 primary sub-blocks and the rule for choosing a
complement, and the encoder works from those.

- **Encoder.** The encoder is combinational from the byte and the running-disparity
  register. The register resets to RD- and advances on each `valid` word. It flips after
  every word whose weight is not 5.
- **Decoder.** The decoder inverts the sub-block tables, re-encodes the result at both
  disparities and compares:
  - a match at the tracked disparity is a good word;
  - a match only at the other disparity raises `disp_err`;
  - no match raises `code_err`.

  The decoder's disparity register follows the weight of whatever word arrives, so after an
  error it carries on from the received stream.

## Receiver: `coding_rx`

`toggle_rx` samples the lines on every clock and XORs them with the sample from the clock
before. In toggle mode this gives back the code word; in other modes the lines pass
straight through. Then, depending on the mode:

- 8B/10B modes: the code word goes to `dec_10b8b`;
- bus-invert mode: the byte is `pad[7:0]` XOR the invert line;
- raw mode: the byte is `pad[7:0]`.

A single output register makes the byte appear one edge after its word is on the lines. So
from read request to received byte there are three edges in all. After reset, the
receiver's line-state register and the transmitter's lines must both be 0; both reset that
way. Both ends must also use the same mode.

## The stacked pair: `stacked_vdd_top`

Two `coding_tx` chips are instantiated, upper and lower. They share the clock, reset and
mode, and each has its own SRAM port and its own `coding_rx`. The series power connection
and the pad buffers are analog, so they are not modelled. Instead, both chips' pad states
are brought out (`up_pad`, `lo_pad`), and their transition counts stand in for the I/O
current of each chip.

The end-to-end test streams 256 words from each chip in every mode, for three pairs of
patterns. The transition counts it prints:

| pattern (upper / lower) | RAW | BUS_INV | 8B10B | 8B10B_TOGGLE |
|---|---|---|---|---|
| alternating 00/FF / constant 00 | 2040 / 0 | 256 / 0 | 1025 / 5 | 1280 / 1280 |
| random / random | 1005 / 1010 | 856 / 853 | 1261 / 1277 | 1279 / 1279 |
| random / constant B5 | 1012 / 5 | 861 / 0 | 1279 / 6 | 1280 / 1280 |

Only the toggle mode keeps the two chips equal for every pattern. The per-run maximum
difference at any point is 0 or 1. The random patterns depend on the simulator seed; the
other rows do not.

## How far this follows the source design, and where it departs

These parts follow the described chip:

- the chain SRAM → 8B/10B encoder → per-line toggle flip-flop → 10 output lines;
- the receiver chain, a per-line flip-flop with XOR, then 10B/8B decoding;
- the 8-bit data and 10-bit line widths;
- bus-invert coding and plain 8B/10B as alternative paths on the same chip;
- two identical chips with a shared clock.

Choices made here because the description does not fix them:

- SRAM depth, port protocol and read latency.
- How the coding path is selected: a 2-bit `mode`, and toggle conversion offered only after
  8B/10B.
- Which lines carry raw and bus-invert data.
- The `pad_valid` strobe beside the 10 lines, and lines that hold when idle.
- The bus-invert tie rule.
- Use of the standard 8B/10B tables, data characters only.
- The decoder's error flags.
- Raw and bus-invert recovery in the receiver.
- Reset values: lines 0, disparity negative.

The source description says each code word switches exactly 5 lines. With the standard code
a single word switches 4, 5 or 6. The guarantee that holds is the cumulative one given
above, and the testbenches check exactly that. A coder that switches exactly 5 lines on
every word would need a constant-weight code (there are 252 ten-bit words of weight 5, not
enough for 256 bytes), so per-word exactness is not claimed.

For scale: the reference silicon implementation was reported at about 640 transistors for
bus-invert, 1160 for 8B/10B and 1480 for 8B/10B with toggle conversion. That is roughly
1–2.5 % of the power of 8-bit I/O buffers driving 30 pF.

## Files

| file | contents |
|---|---|
| `rtl/coding_pkg.sv` | mode enum, 8B/10B sub-block tables and encode/decode functions |
| `rtl/sram.sv` | data SRAM |
| `rtl/bus_invert_enc.sv` | bus-invert coder |
| `rtl/enc_8b10b.sv` | 8B/10B encoder with running disparity |
| `rtl/toggle_tx.sv` | "1"-to-toggle flip-flops / output register |
| `rtl/coding_tx.sv` | one chip |
| `rtl/toggle_rx.sv` | toggle-to-"1" converter |
| `rtl/dec_10b8b.sv` | 10B/8B decoder with error flags |
| `rtl/coding_rx.sv` | receiver |
| `rtl/stacked_vdd_top.sv` | upper and lower chip with receivers |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

Parameters: `sram` has `DATA_W` (8) and `ADDR_W` (8). `coding_tx` and `stacked_vdd_top` have
`ADDR_W` (8). `bus_invert_enc` has `DATA_W` (8). `toggle_tx` and `toggle_rx` have `W` (10).
The coder and receiver widths are fixed at 8 and 10 bits by the 8B/10B code.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/coding_pkg.sv tb/tb_stacked_vdd_top.sv --top-module tb_stacked_vdd_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `tb_stacked_vdd_top` uses the default
parameters and prints the transition table above; it runs in well under a second. The
simulator is two-state, so every register that is read is reset or initialised. Running with
`+verilator+rand+reset+2 +verilator+seed+N` varies the initial values and the random data.
