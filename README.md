# Selective-capture trace buffer debug module

A trace buffer records a bundle of internal signals (here one 32-bit "data
word" per clock) while a chip runs at speed. It is small. A 4 KB buffer holds
the data bus for only 1024 cycles. When a bug is being chased in a repeatable
scenario, most of those cycles are error-free, and their contents are already
known from simulation. Only the cycles that carry errors need to be recorded.

This RTL is a debug module that sits in front of the trace buffer and finds
those cycles in three runs of the same scenario:

1. **Parity session.** The module stores one parity bit per cycle, packed 32
   to a buffer word, in a circular buffer. Comparing the bits with simulation
   gives a rough error rate: twice the parity mismatches (parity misses
   even-weight errors), divided by the bits stored. The largest window worth
   trying is `buffer_words / error_rate` cycles.
2. **Compaction session ("2-D compaction").** Over the chosen window, two
   compactors watch the same words. A MISR (multiple-input signature register)
   compacts runs of `window/k` consecutive words, one signature per run, into
   the lower half of the buffer. A cycling register XORs word *i* into location
   *i mod m* of the upper half, so each of its *m* signatures covers every m-th
   word. One erroneous word corrupts one MISR signature (a row) and one
   cycling-register signature (a column). Off-chip, the cycles at the
   intersections of mismatching rows and columns become the **suspects**.
3. **Capture session.** The host loads one tag bit per window cycle into the
   buffer: 1 marks a suspect. Each tag bit may cover a group of G cycles (tag
   compression). The module reads the tags back through a shift register. In
   every cycle whose tag is 1 it writes the data word into the buffer. Captured
   words may overwrite tag words that have already been read.

Example (15 cycles, k = m = 5): an error in cycle 13 corrupts MISR signature 5
(cycles 13 to 15) and cycling-register signature 3 (cycles 3, 8, 13). Their
intersection is cycle 13 alone. The buffer then captures 1 word out of 15.

With low error rates, the window covered by one buffer grows by one to two
orders of magnitude. The workload testbench reproduces windows of 19456 cycles
(512 B buffer) up to 132096 cycles (4 KB buffer) with every erroneous word
captured.

## Block structure

```
debug_module (top)
├── mode_ctrl          session FSM, qualified-cycle window counter
├── phase1_parity      parity packing, circular write pointer
│   └── parity_tree    XOR tree, optionally one pipeline stage
├── phase2_compactor   MISR run counter, signature storage
│   ├── misr           32-bit Galois MISR
│   └── cycling_register  mod-m read-modify-write into the buffer
├── phase3_capture     tag fetch, capture pointer, slack rule
│   └── tag_shift_reg  tag shift register + next-word register, group counter
└── trace_buffer       DEPTH x W, two banks with two write and two read ports
    └── trace_ram_bank (x2)  simple dual-port RAM
dbg_pkg                mode enum, config and status structs, MISR polynomial
```

Default parameters: `W = 32` (the observed data bus), `DEPTH = 1024` words
(4 KB, the largest buffer evaluated), `PIPE = 0` (combinational XOR tree).

## Using it

All settings are in the `cfg` struct (`dbg_pkg::dbg_cfg_t`). Keep them stable
while a session runs.

| field | meaning |
|---|---|
| `win_start` | qualified cycles to skip before the window |
| `win_len` | window length; 0 = run until `stop` (session 1) |
| `misr_interval` | cycles per MISR signature, `window/k`; 0 = one signature |
| `cr_len` | *m*; 0 or more than `DEPTH/2` means `DEPTH/2` |
| `tag_base`, `tag_words` | where the host put the tag words |
| `tag_group` | cycles per tag bit (1 = uncompressed) |
| `cap_base` | first word written with captured data |

A session:

1. Set `cfg` and `mode_sel` (`MODE_PARITY`, `MODE_COMPACT` or `MODE_CAPTURE`).
2. Pulse `start` for one clock.
3. The module spends 3 clocks arming. Then `status.running` goes high, and
   counting starts at the first clock with `dbg_valid` high.
4. The session ends after the last window cycle, or on `stop`. After 2 drain
   clocks (`PIPE + 2`) the module is in `status.done`.
5. Read or write the buffer through `host_re`/`host_we`/`host_addr`.
   Read data appears one clock after `host_re`. Host writes are ignored while
   `status.busy` is high.

Replay the scenario from the same starting point in every session. Start it
when `status.running` rises, or at a fixed offset from `start`. The window is
counted in qualified cycles (`dbg_valid` high), so it follows a trace trigger
that is not active every clock. It is not counted in raw clocks.

### Buffer layouts

- **Session 1.** Parity bit *n* of the session is in word `(n/32) mod DEPTH`,
  bit `n mod 32`. `status.p1_bit_total`, `p1_wr_ptr` and `p1_wrapped` locate
  the oldest bit still held. A partly filled last word is written with zeros
  above the valid bits.
- **Session 2.** MISR signature *j* (window cycles `j*I` to `j*I+I-1`, where I
  is `misr_interval`) is at word *j*. A last partial run is stored too.
  Cycling-register signature *r* is at word `DEPTH/2 + r`.
  `status.p2_sig_count` gives the number of MISR signatures.
  `p2_overflow` means some did not fit in the lower half. The MISR polynomial
  is x^32 + x^22 + x^2 + x + 1 in Galois form: `s' = {s[30:0],0} ^ (s[31] ?
  32'h00400007 : 0) ^ d`, starting from zero for every run. The workstation
  must use the same polynomial.
- **Session 3.** Tag bit *b* (window cycles `b*G` to `b*G+G-1`) is in word
  `tag_base + b/32`, bit `b mod 32`. Captured words are written in order from
  `cap_base` upward. `status.p3_cap_count` says how many were captured.

### Computing tag bits (off-chip)

Take the MISR signatures and the cycling-register signatures of the fault-free
simulation over the same window. Then, for each window cycle *j*:

`tag[j] = (MISR sig j/I mismatches) AND (cycling-register sig j mod m mismatches)`

To compress, OR the tags together in groups of G. If one tag bit covers one
cycle, the buffer limits the window to `32*DEPTH` cycles minus the capture
space. Choose G so that `ceil(window/G/32)` tag words plus the expected
captured words (suspects times G) fit in the buffer.

### Slack between tags and captured data

The capture pointer must never overwrite a tag word that has not been read.
The module enforces this rule. A capture is made only if the target word is
below the next tag word still to be fetched, or past the end of the tag area,
and inside the buffer. Otherwise the word is dropped, and
`status.p3_drop_count` and `p3_overflow` record it. The simplest safe layout
puts the tags at the top (`tag_base = DEPTH - tag_words`) and starts capture at
0. Then every free word below the tags is slack. Capture may continue into the
tag area as its words are used up. Tags at word 0 also work when suspects are
sparse, because each captured word then reuses a tag word already read.

The tag fetch keeps a second word ready behind the shift register. One tag
word lasts at least 32 cycles, so the fetch never falls behind.
`status.p3_starved` would flag it if it did.

## Timing and structure details

- **Trace buffer banking.** In session 2 two things happen every clock: the
  MISR may store a signature, and the cycling register reads one location and
  rewrites the location it read the clock before. The buffer is therefore two
  half-size banks, each a simple dual-port RAM. Two write ports and two read
  ports are routed by the address MSB. Two accesses of the same kind must go
  to different halves. An assertion checks this. Reads have one clock of
  latency.
- **Cycling register.** The m signatures live in the buffer, not in flip-flops.
  A read is issued in the clock a word arrives, and the XOR is written the next
  clock. During the first pass over the m words, the word is written as it is,
  so the area needs no clearing. With m = 1, the word being written is forwarded
  to the next update.
- **MISR restart.** At the end of each run, the signature including the run's
  last word is stored, and the register restarts from zero in the same clock.
  The signatures are independent, so one error affects only one of them.
- **Parity tree.** The tree is combinational by default. `PIPE = 1` registers
  8-bit partial parities, and the drain phase grows by one clock to match.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

| testbench | what it covers |
|---|---|
| `tb_debug_module` | All three sessions at default size (1024 x 32). A 40000-cycle stream with 15 errors, some of them even-weight. Parity bits checked bit by bit, and the parity mismatches must equal the odd-weight errors. All MISR and cycling-register signatures checked against models. Tags computed, compressed with G = 2, loaded. Capture checked in three layouts: tags on top; tags at word 0 and overwritten; every cycle tagged, so the buffer overflows. Each mechanism is counted: wrap, flush, stop, gaps, MISR restart, partial signature, cycling-register wrap, compression, tag refill, overwrite of read tags, drop, window offset, end at window. A mechanism that never happens is a failure. |
| `tb_table1` (+ `table1_row`) | Eight buffer-size / error-rate / window rows of the method's results table, 512 B to 4 KB: three sessions each, with k = m = half the buffer. Checks that the full expanded window is held with every erroneous word captured. One row runs with the pipelined parity tree (`PIPE = 1`). |
| `tb_trace_buffer` | Random dual-port traffic against an array model, including read-during-write. |
| `tb_parity_tree` | Combinational and pipelined parity, and the one-clock latency. |
| `tb_phase1_parity` | Packing, wrap, flush and counters, on a small buffer. |
| `tb_misr` | Bit-level model; restart on store; every single-bit error is detected. |
| `tb_cycling_register` | Several m (1, 2, 5, 7, 32), with gaps, against an XOR model. |
| `tb_phase2_compactor` | Signature contents; the 15-cycle example (an error in cycle 13 hits exactly MS5 and CR3); a 30-cycle example (errors in cycles 13 and 23 leave suspects 13, 18 and 23); signature overflow; clamping of m. |
| `tb_tag_shift_reg` | Group sizes 0, 1, 2, 3 and 5; starvation flag. |
| `tb_phase3_capture` | The 30-cycle example with tags compressed two cycles per bit (`000000101001000`): cycles 13, 14, 17, 18, 23 and 24 are captured. Random runs: exact capture order; tags overwritten; overflow; no unread tag word ever overwritten. |
| `tb_mode_ctrl` | Arming, window and `sample`, `win_idx`, drain/finish, `stop`, a start while busy. |

To simulate with Verilator (5.x), from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dbg_pkg.sv tb/tb_debug_module.sv \
          --top-module tb_debug_module -o sim && ./obj_dir/sim
```

Replace the testbench name to run another one. `tb_debug_module` takes well
under a second. `tb_table1` takes about 20 seconds.

In the workload rows, the errors come in short bursts of 3 to 4 consecutive
words, as a misbehaving unit on a data bus tends to produce. With errors
spread uniformly at random, more row/column intersections are false suspects.
The achievable window is then smaller than the one tested.

## Where this design chooses for itself

The method defines what each session stores and how suspects are derived.
The following are this design's own choices:

- The host port, the `start`/`stop`/`mode_sel` handshake, the 3-clock arming
  and 2-clock drain phases, and the config/status structs.
- The window as an offset and length in qualified cycles (`dbg_valid`).
- The parity bit order, and the flush of a partial parity word.
- The MISR polynomial and its Galois form. The method asks only for a wide
  MISR (32 bits gives aliasing of about 2^-32).
- Which half of the buffer holds which signatures. k and m are run-time
  settings bounded by half the buffer; the intended setting is k = m = DEPTH/2.
- The two-bank buffer, the read-modify-write pipeline of the cycling register,
  and its first-pass rule.
- The tag bit order, the double-buffered tag shift register, and the drop rule
  that enforces the slack between tags and captured data.

These are not in hardware:

- The comparison with fault-free simulation, the error-rate estimate, the
  choice of window, and the tag computation and compression. They are
  workstation software; the testbenches contain them as reference code.
- A tighter bound on the window, estimated from the average number of
  intersections and the tag group size, is also workstation arithmetic. It is
  not modelled.
- The system under debug is not included. Its data bus enters as `dbg_data`.
