# Hamming-protected debug trace buffer

An on-chip trace buffer lets an engineer look back at what a circuit inside
an FPGA did over the last few dozen clock cycles: a chosen set of internal
signals is sampled into a small memory while the design runs, and read out
afterwards. If that memory itself is hit by glitches, the record of the bug
is wrong. This design stores every trace sample as a Hamming codeword, checks
each sample as it is written, corrects single-bit damage, flags what it
cannot correct, and keeps a separate log of every damaged sample. A second,
simpler checker, a two-state finite state machine, watches the same samples
and can only detect.

The circuit being traced is a small sequential benchmark (four inputs, three
flip-flops, one output). Its three flip-flop outputs are the traced signals.
To exercise the protection, a glitch injector flips one, two or three
adjacent codeword bits at a selectable divided clock frequency.

All RTL is SystemVerilog in `rtl/`, one module per file; testbenches are in
`tb/`.

## Data path of one trace sample

```
 A B C D                    clk ─► clk_divider ─► frequency_1..4 (enables)
    │                                     │ cut_freq_sel   │ glitch_freq_sel
    ▼                                     ▼                ▼
 cut_s27 ──{Q2,Q1,Q0}──► dec3to8 ──8──► hamming_enc ──12──► glitch_injector
    │                    (one-hot)        (12,8)               │ (1/2/3 adjacent flips)
    Y                                                          ▼
                                 trigger_unit ──capture──► trace_buffer (64 x 12)
                                                               │ port A: read back
                                                               ▼ every new word
          chk_state ◄── enc8to3 ◄──8── hamming_dec ◄──12───────┤
                                       │ syndrome, verdict     │
                                       ▼                       ▼
                                  error_memory           fsm_monitor
                                  (16 records)           (detect only)
```

1. **Circuit under debug** (`cut_s27`). Steps once per tick of the selected
   frequency (`cut_freq_sel`: 0 = system clock, k = frequency_k).
2. **3:8 decoder** (`dec3to8`). The 3-bit state `{Q2,Q1,Q0}` becomes a
   one-hot byte. A clean sample therefore always has exactly one bit set,
   which both checkers rely on.
3. **Hamming encoder** (`hamming_enc`). 8 data bits → 12-bit codeword.
4. **Glitch injector** (`glitch_injector`). Each tick of the glitch frequency
   arms it; the next word written is corrupted with the selected pattern.
5. **Trace buffer** (`trace_buffer`). Circular, 64 words; always holds the
   latest 64 samples. A second instance, written at the same address, keeps
   the circuit's pins `{A,B,C,D,Y}` for each sample (not protected).
6. **Read-back check.** The word just written is read back through buffer
   port A, decoded (`hamming_dec`), turned back into a 3-bit state
   (`enc8to3`) and presented on `chk_*`. Damaged words go to the error memory.
7. **FSM monitor** (`fsm_monitor`) scans the raw data bits of the same word.
8. **Host readout.** Port B of the buffer has its own decoder and 8:3 encoder,
   so a dump returns raw codeword, syndrome, verdict and corrected state per
   address (`host_*`), plus the pin record (`host_pins`).

## The (12,8) code

Codeword positions are numbered 1 to 12. Positions that are powers of two
(1, 2, 4, 8) hold check bits; the eight data bits fill 3, 5, 6, 7, 9, 10, 11,
12, with data bit 7 (MSB) at position 3 and data bit 0 at position 12. In the
RTL a codeword is `logic [1:12]` (`hd_pkg::code_t`), so index = position.

Check bit 2^r is the XOR of every other position whose binary number has bit
r set:

| check bit | covers positions      |
|-----------|-----------------------|
| 1         | 3, 5, 7, 9, 11        |
| 2         | 3, 6, 7, 10, 11       |
| 4         | 5, 6, 7, 12           |
| 8         | 9, 10, 11, 12         |

Equivalently, the parity-check matrix H has as column j the 4-bit binary value
of j, and the syndrome of a received word is the XOR of the position numbers
of all its set bits. A single flipped bit at position p gives syndrome p.

Worked example (checked in `tb_hamming_enc` and `tb_hamming_dec`): data
`01011100` encodes to `100010101100` (position 1 on the left). Flipping
position 5 gives `100000101100`, syndrome `0101` = 5, and the decoder restores
the word.

The decoder sorts syndromes into three classes:

| syndrome       | verdict (`dec_status_t`) | action                          |
|----------------|--------------------------|---------------------------------|
| 0000           | `DEC_OK`                 | none                            |
| 0001 … 1100    | `DEC_CORRECTED`          | flip the bit at that position   |
| 1101 … 1111    | `DEC_DETECTED`           | report, pass data uncorrected   |

The 8:3 encoder after the decoder also reports whether the corrected byte is
still one-hot (`chk_onehot_ok`); a word is logged as damaged if its syndrome
is non-zero or its byte is not one-hot.

## What the code really catches: adjacent errors

The design is named for "SEC-DAED-TAED" protection: single error correction,
double and triple adjacent error detection. With the plain position-numbered
H above, that promise does not hold, and anyone relying on the verdicts should
know why. Two adjacent errors at p and p+1 give syndrome p XOR (p+1), which
is 1, 3, 7 or 15; three give p XOR (p+1) XOR (p+2). Most of those values fall
in the "single error" range, so the decoder flips a third, healthy bit and
reports the word as corrected.

`tb_glitch_workloads` injects every adjacent pattern into a live sample and
prints the outcome. Summary:

| pattern                | detected only | mis-corrected | invisible (syndrome 0) |
|------------------------|---------------|---------------|------------------------|
| 2 adjacent (11 places) | 1 (positions 7–8)  | 10       | 0                      |
| 3 adjacent (10 places) | 1 (positions 10–12)| 8        | 1 (positions 1–3)      |

Single-bit errors are always corrected, at every position. The error memory
still records every mis-corrected adjacent error, because it logs any word
with a non-zero syndrome, whatever the verdict says. What is lost is the
sample's value, not the knowledge that it was damaged, except for the triple
error at positions 1–3, whose syndrome is 0 and which leaves no trace.

A code that truly detects adjacent doubles and triples needs a differently
chosen H (a dedicated SEC-DAED-TAED matrix). The decoder keeps the
position-numbered H and the three-class table, so changing the code means
replacing `hamming_enc`, `hamming_dec` and the position map in `hd_pkg`.

## The FSM monitor

A two-state machine, S1 and S2: an input 0 moves it to the other state, an
input 1 keeps it in place, S1 is the accepting state. So it ends in S1 after
an even number of zeros. A clean one-hot byte has seven zeros; the monitor
feeds one extra leading 0 and then the eight raw data bits (MSB first),
starting from S1, and accepts the word if it ends in S1.

* Any odd number of flipped data bits is flagged (`fsm_err`).
* An even number goes unseen; flips in check bits are never seen.
* Nothing is corrected.

It takes 9 clocks per word; `fsm_done` pulses in the 10th cycle after the
start. A word arriving while a scan runs is not scanned. At a capture rate of
frequency_4 (one sample every 16 clocks) every word is scanned; at the system
clock only about one in ten is. This is the design's "monitor at low
frequency" behaviour, and the reason the Hamming check, which checks every
word in one cycle, is the primary one.

## Clocks, glitches and the evaluated rates

`clk_divider` runs a 4-bit counter on the system clock. frequency_k is
clock/2^k, output as a square wave (`freq_o[k-1]`) and, for internal use, as a
one-cycle enable once every 2^k clocks. With a 16 MHz system clock,
frequency_3 = 2 MHz and frequency_4 = 1 MHz, the two glitch rates of the
original evaluation. Everything runs in the single `clk` domain; the divided
frequencies are enables, not clocks.

`tb_glitch_workloads` reproduces both runs: with capture at the system clock,
single-bit glitches arrive exactly every 500 ns (frequency_3) and every
1000 ns (frequency_4), and every hit sample comes back corrected to the state
that was captured.

## Trigger, error memory and readout

* **Trigger** (`trigger_unit`): after `trig_arm`, the first sample with
  `(state & trig_mask) == (trig_value & trig_mask)` fires; 32 more samples
  (`POST_SAMPLES`) are captured and then capture stops, so the buffer keeps
  the window around the event. Out of reset the unit is unarmed and capture
  runs freely.
* **Error memory** (`error_memory`): one 16-bit record per damaged sample,
  `hd_pkg::err_rec_t` = {trace address (8), syndrome (4), verdict (2),
  one-hot flag (1), captured-after-trigger flag (1)}. It keeps the first 16
  records; later ones are dropped and `err_overflow` is set. `err_clear`
  empties it. Read: `err_re`/`err_raddr`, data one clock later.
* **Counters**: `n_checked`, `n_corrected`, `n_detected`, `n_fsm_err`, 16-bit,
  saturating.

## Timing at a glance

| event                                   | cycle                         |
|-----------------------------------------|-------------------------------|
| sample written (`trace_wr`)             | t (a tick of `cut_freq_sel`)  |
| circuit steps                           | end of t                      |
| `chk_valid` with verdict, error logged  | t + 2                         |
| `fsm_done`                              | t + 11 (if the FSM was idle)  |
| host / error-memory read data           | one clock after the request   |

The sample written at t is the circuit state during t, before the step.

## Top-level parameters

| parameter      | default | meaning                          |
|----------------|---------|----------------------------------|
| `TRACE_DEPTH`  | 64      | trace buffer words (≤ 256)       |
| `ERR_DEPTH`    | 16      | error-memory records             |
| `POST_SAMPLES` | 32      | samples captured after a trigger |

The code widths (8 data, 12 code, 4 check bits) and the 3-bit traced state are
fixed by the structure; the sizes above are this implementation's choices, as
no sizes were given for them.

## Where this implementation chooses for itself

The chain 3:8 decoder → Hamming encoder → errors → Hamming decoder → 8:3
encoder, the (12,8) code with its syndrome table, the two-state FSM, the clock
divider with its 2 MHz and 1 MHz outputs, the separate error memory and the
traced circuit follow the published design. The following are choices made
here:

* **Traced circuit gates.** The circuit is the ISCAS-89 benchmark s27; the
  gate functions come from that benchmark's netlist, and the mapping of the
  pins A, B, C, D onto its inputs (D is the inverted input G0, B = G1,
  A = G2, C = G3; Q0 = G5, Q1 = G7, Q2 = G6) is this implementation's reading
  of the drawing.
* **Traced signals** are the three flip-flop outputs.
* **Placement of the trace buffer** between error injection and decoder, and
  the immediate read-back check of every written word.
* **How glitches are made**: arm on a tick, corrupt the next written word,
  patterns starting at `glitch_pos` and clipped at position 12.
* **How the FSM is applied** (leading 0, bit order, skip while busy).
* **Trigger condition** (value/mask), post-trigger window, error-record
  layout, keep-first overflow policy, counters, host port, the pin buffer.
* **System clock** of 16 MHz and the divide-by-two chain.
* **Reset**: asynchronous, active low, clears all control state; the memory
  arrays are not cleared.
* The top collects a few unused outputs of its sub-blocks (for example the
  corrected codeword of each decoder); lint reports them as unused.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl rtl/hd_pkg.sv tb/tb_hamming_trace_debug_top.sv \
    --top-module tb_hamming_trace_debug_top
./obj_dir/Vtb_hamming_trace_debug_top
```

Replace the testbench name for any other block. Simulation is two-state; all
registers that are read are reset.

* `tb_hamming_trace_debug_top` runs the whole design at its default sizes
  through seven phases (no glitches, single glitches at frequency_3, double
  glitches at frequency_4, FSM-paced capture, triple glitches, trigger, dump)
  against independent models of every block, and fails if any mechanism
  (buffer wrap, correction, detect-only verdict, mis-correction, FSM flag /
  miss / skip, trigger stop, error-memory overflow, readout) never occurs.
* `tb_glitch_workloads` runs the two glitch-rate scenarios and the adjacent
  error sweep described above.
* Leaf testbenches check exhaustively where that is cheap (decoders, encoder
  over all 256 bytes, decoder over every single and adjacent error of every
  byte) and with random stimulus otherwise.

Lint is clean apart from the unused sub-block outputs noted above and a style
note on the ascending `[1:12]` codeword range, which is intentional.
