# Low-power flexible Rake receivers for WCDMA

A Rake receiver collects one CDMA signal that reaches the antenna over several
paths with different delays. It despreads each path separately (one *finger*
per path) so the results can be combined. A *flexible* Rake keeps the whole
delay spread of received samples in a stream buffer, so a finger can pick any
path just by reading at the right offset. That buffer is an SRAM that is
written at the full sample rate, and it costs more power and area than the
rest of the receiver.

This RTL implements the three buffer organisations proposed in
*Low Power Flexible Rake Receivers for WCDMA* to cut that cost:

* **Architecture A: tag-buffered SRAM** (`rake_tagged_rx`). The 512-sample
  SRAM stays, but only the samples a finger will ever read are written into it.
  Each chip carries N_SPC = 4 samples (the *sample slots*), and a path with
  delay d samples only ever uses slot `d mod 4`. A 4-bit tag table marks the
  slots in use and gates the SRAM write enable and address bus. With three
  paths in three different slots, the SRAM takes 3 writes per 4 samples
  instead of 4. With three paths sharing two slots it takes 2 per 4.
* **Architecture B: no SRAM, parallel engines** (`rake_parallel_rx`). Each of
  three correlation engines keeps only the one sample per chip that belongs to
  its path, in an 8-bit register. It reaches the path's delay by running its
  own code generator at the matching code phase. A new path can only be
  decoded from the moment it is assigned, because no history is stored. In
  exchange, the whole stream buffer is three registers.
* **Architecture C: no SRAM, one switched correlator** (`rake_switched_rx`).
  This is the step between A and B. The stream buffer is four 8-bit sample
  registers, one per slot, holding the samples of the current chip. A single
  correlator and a single code generator serve all fingers. After each chip the
  code generator is reloaded with each finger's own code phase in turn.

`rake_top` places the three receivers side by side. They share only clock and
reset, and each has its own ports, prefixed `a_`, `b_` and `c_`. They are
alternatives: the source presents A for channels with many paths, and B and C
for channels whose path delays rarely change.

Default sizes: 4-bit I and Q components (one 8-bit sample word), 4 samples per
chip, a delay spread of 512 samples (33 µs at 4 × 3.84 Msample/s), 4 fingers
in A, 3 engines in B and 3 fingers in C.

## Time reference: samples, slots and chips

All receivers count incoming samples from reset. Sample `t` has slot
`t mod 4`. In A the slot is the low two bits of the circular write address. In
B and C a modulo-4 counter (`b_phase`, `c_phase`) provides it.

A transmitted chip `j` reaches the receiver over a path of delay `d` as the
four samples starting at `4j + d - 508`. The constant 508 = 512 − 4 comes from
A's read schedule (next section). A finger locked on that path uses one of
those samples, the one in slot `d mod 4`, and multiplies it by the conjugate
of code chip `j`.

## Architecture A: how the stream buffer is read

```
 samples ─┬─> SRAM 512 x 8 (single port) ──> time-shared correlator ──> FIFO ──> symbol dumps
          │      ^ we      ^ addr                ^ shared code chip
          │   tag buffer   circular address (+) offset address (delay+1)
          └──(slot = address mod 4)
```

* **Writes.** The circular address generator advances on every sample, so a
  sample's address is its arrival time modulo 512. A sample is written only if
  its slot is tagged. When no write happens the address bus holds its last
  value (`rake_circ_addr_gen`), so skipped samples do not toggle the bus
  either.
* **Reads.** After the last sample of each chip (slot 3, address `base`), the
  controller reads each finger once, in finger order, at `base + delay + 1`.
  Every finger then gets the sample of the same transmitted chip: the oldest
  sample in the buffer belongs to delay 0, the newest to delay 511. One code
  generator therefore serves all fingers, and it advances once per burst.
* **Single port.** A write takes priority over a read. The read burst of
  N_FINGERS reads must finish before the next sample arrives, or that sample
  would overwrite the word the delay-0 finger still has to read. The clock
  must therefore run at least N_FINGERS + 1 cycles per sample. For 4 fingers
  at 15.36 Msample/s that is 76.8 MHz. An assertion in `rake_tagged_rx` flags
  any violation.
* **Warm-up.** When a finger is given a new delay, its slot may not have been
  written yet, because its tag was clear. The finger reports not ready
  (`a_finger_ready`) for 128 chips, one full buffer. After that it starts
  integrating at the next symbol start.
* **Correlator.** `rake_tdm_correlator` holds an I/Q integration register
  pair per finger. On the last chip of a symbol it pushes
  `{finger, I sum, Q sum}` into an 8-entry FIFO (`a_sym_valid/a_sym_ready`). If
  the FIFO is full the dump is lost, and `a_sym_overflow` pulses.

Latency: the read burst starts the cycle after the slot-3 sample. A symbol
dump appears on the FIFO output at most N_FINGERS + 3 cycles after that
sample.

## Architecture B: engines and code phases

```
 samples ─┬─> slot register e (captures slot s_e) ──> ALU ──> I/Q integration ──> sym e
          │   code generator e ──> code buffer e ─────┘          ^ start/dump from OVSF counter
          └── x3 engines, each loaded with (slot, PN state, OVSF counter, code)
```

Loading an engine (`b_cfg_we`, `b_cfg_idx`) sets its slot, its OVSF code and
spreading factor, and its code phase. The code phase is the two 25-bit
scrambling-code register states and the 10-bit OVSF counter value of the chip
that belongs to the engine's next captured sample. For a path of delay `d`, if
the next sample to arrive is number `t`, the first captured sample is the
first `t1 >= t` with `t1 mod 4 = d mod 4`. Its chip is `j1 = (t1 + 508 - d) / 4`.
The loader must give the register states for chip `j1` and the counter value
`j1 mod SF`. Working out these values is the multipath tracker's job, and the
tracker is outside this RTL.

A load also throws away the engine's partly integrated symbol. An engine
dumps a symbol only if it saw that symbol's first chip since its last load.
`b_eng_en[e]` low powers an engine down: its register, code generator and
integrators stop. After power-up the engine needs a new load, because time
moved on while it was stopped.

Timing: a sample captured in cycle n is despread in cycle n+1. If it is the
symbol's last chip, `b_sym_valid[e]` pulses in cycle n+2 with the sums on
`b_sym_i[e]`/`b_sym_q[e]`.

## Architecture C: code-phase switching

```
 samples ──> slot registers 0..3 ──> mux (slot of finger f) ──> time-shared correlator ──> FIFO ──> symbol dumps
                                     code generator <── load/save ──> code-phase store (one entry per finger)
```

Loading a finger (`c_cfg_we`, `c_cfg_idx`) sets its slot, whether it is
active, and its code phase. The code phase is given for the chip the finger
processes next. If the next sample to arrive is number `t`, that chip is
`j = t/4 + (d mod 4 + 508 - d)/4` (integer division), and the loader gives the
register states for chip `j` and the counter value `j mod SF`. The OVSF code
and spreading factor (`c_code_idx`, `c_code_sf_log2`) are common to all
fingers.

After the last sample of a chip (slot 3) a burst runs. For each finger in
turn it takes one cycle to load that finger's saved phase into the code
generator (`c_code_switch` pulses) and one cycle to despread the finger's
slot register and step the generator. In the next cycle the stepped phase is
written back, overlapping the next finger's load. A burst therefore takes
2·N_FINGERS + 1 cycles, and the clock must run at least 2·N_FINGERS + 2
cycles per sample: 8 cycles, or 122.9 MHz, for 3 fingers. Assertions flag a
sample or a finger load that arrives during a burst. Integration and dumps
use the same `rake_tdm_correlator` and 8-entry FIFO as A. A finger dumps a
symbol only if it saw the symbol's first chip since its last load.

## Code generators

* **Scrambling (PN) code**, `rake_pn_gen`: two 25-bit registers running
  `x^25 + x^3 + 1` and `x^25 + x^3 + x^2 + x + 1`. These are the WCDMA long
  scrambling code polynomials. The I bit is `x(i) xor y(i)`. The Q bit is the
  same Gold sequence 16 777 232 chips later, taken from the registers through
  the masks `x(i+4)+x(i+7)+x(i+18)` and `y(i+4)+y(i+6)+y(i+17)`. The complex
  code is used as `c_I + j·c_Q`, with no uplink HPSK decimation and no
  truncation of the 38 400-chip frame. The code is changed by loading both
  registers.
* **OVSF code**, `rake_ovsf_gen`: a 10-bit chip counter modulo
  SF = 2^sf_log2, with sf_log2 up to 10. Chip i of code k is the parity of
  `i AND bitreverse(k)`, the closed form of the OVSF tree. Loading the counter
  changes the phase. The counter also gives the symbol start/end flags that
  control integration.
* `rake_code_gen` multiplies the two codes, which for ±1 values is an XOR of
  the sign bits, and outputs a `code_chip_t` with the symbol flags.

Despreading (`rake_despread_alu`) is `(s_I + j s_Q)(c_I − j c_Q)`, done with
adders only. The 6-bit products are integrated in 16-bit registers, which hold
a full 1024-chip symbol.

## Top-level ports (`rake_top`)

| group | ports | meaning |
|---|---|---|
| A input | `a_sample_valid`, `a_sample` | one I/Q sample (`iq_sample_t`: 4-bit I, 4-bit Q) |
| A fingers | `a_cfg_we`, `a_cfg_idx`, `a_cfg_delay` (9 b), `a_cfg_active` | delay of finger `idx` in samples; restarts its warm-up |
| A code | `a_code_load`, `a_code_x`, `a_code_y`, `a_code_cnt`, `a_code_idx`, `a_code_sf_log2` | code phase of the next read burst, OVSF code and spreading factor |
| A output | `a_sym_valid`, `a_sym_ready`, `a_sym_finger`, `a_sym_i`, `a_sym_q`, `a_sym_overflow` | symbol dumps via FIFO |
| A status | `a_sram_we`, `a_sram_re`, `a_tags`, `a_finger_ready` | buffer activity (count `a_sram_we` to measure the write saving) |
| B input | `b_sample_valid`, `b_sample`, `b_eng_en` | samples; per-engine power enable |
| B engines | `b_cfg_we`, `b_cfg_idx`, `b_cfg_slot`, `b_cfg_x`, `b_cfg_y`, `b_cfg_cnt`, `b_cfg_code_idx`, `b_cfg_sf_log2` | slot, code phase and code of one engine |
| B output | `b_phase`, `b_sym_valid[3]`, `b_sym_i[3]`, `b_sym_q[3]` | slot of the current sample; per-engine symbol dumps |
| C input | `c_sample_valid`, `c_sample` | samples |
| C fingers | `c_cfg_we`, `c_cfg_idx`, `c_cfg_active`, `c_cfg_slot`, `c_cfg_x`, `c_cfg_y`, `c_cfg_cnt` | slot, activity and code phase of one finger |
| C code | `c_code_idx`, `c_code_sf_log2` | common OVSF code and spreading factor |
| C output | `c_phase`, `c_sym_valid`, `c_sym_ready`, `c_sym_finger`, `c_sym_i`, `c_sym_q`, `c_sym_overflow`, `c_code_switch` | slot of the current sample; symbol dumps via FIFO; one pulse per code-phase reload |

Reset is asynchronous and active low. Types and constants are in
`rtl/rake_pkg.sv`.

## What follows the source and what is this design's own

Taken from the source: the three architectures and their block structure. For
A: a tag table of used sample slots gating the SRAM write and address bus,
circular and offset address generators with an adder, a single-port sample
SRAM, a correlator engine with code generators, integration registers and a
FIFO symbol buffer. For B: one 8-bit sample register, one code generator with
a code buffer, and one ALU with integration registers per engine, with three
engines, power-down of unused engines, and phase changes by loading the code
generators. For C: N_SPC sample registers instead of the SRAM, and one
correlator whose code generator is switched between the multipaths' code
phases. Also from the source: 4-bit samples, 4 samples per chip, a
512-sample delay spread, two 25-bit PN registers and a 10-bit OVSF counter.

This design's own choices:

* The read schedule of A (`base + delay + 1`, one burst per chip, one shared
  code chip), write priority on the single port, and the 128-chip warm-up.
* Four fingers in A. The source considers three and four paths.
* The PN polynomials, the Q-branch masks and the OVSF closed form, taken from
  the WCDMA standard.
* The configuration ports. The source only draws buses from the searcher.
* The rule that a partial symbol is dropped, the integration widths, and the
  FIFO depth and handshake.
* The burst schedule of C (load and compute per finger, overlapped write-back)
  and its per-finger code-phase store. The source gives only the principle of
  reloading the code generator for each path.
* The sample register per engine in B. One description of B speaks of N_SPC
  registers, while the three-engine figure shows one register per engine;
  this design follows the figure.

Not included: the multipath searcher (acquisition and tracking), the ADC, and
the channel compensation, Rake combining and decoding that consume the symbol
dumps. Their signals are top-level ports. Only one data channel (one OVSF
code) per finger is despread. The source notes that more orthogonal channels
are possible. With the defaults, B and C decode at most three paths. Four
paths need `B_ENGINES = 4` or `C_FINGERS = 4` (C then needs 10 cycles per
sample), and A needs more fingers (and a faster clock) beyond four paths.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. `tb/rake_tb_pkg.sv` holds the shared
reference models:

* the m-sequence recursions on plain bit arrays;
* the OVSF code tree;
* a transmitter and 4-path channel. Paths at delays 13, 130, 303 and 400
  carry pseudo-random QPSK symbols, spreading factor 16, with ±1 noise and
  4-bit saturation;
* the exact expected despread sum of any symbol on any path.

`tb_rake_top` runs all three receivers at their default sizes on that
channel. It checks every symbol dump of every receiver bit-exactly. It checks that A
makes exactly 3 SRAM writes per 4 samples with three paths in three slots. It
counts, and requires at least once:

* A: skipped and performed writes, finger warm-up, a newly tagged slot, dumps
  from every finger, FIFO overflow;
* B: code-phase reloads, discarded partial symbols, power-down, dumps from
  every engine;
* C: code-phase switches (it also checks exactly three per chip), a finger
  moved to another path, a finger switched off, dumps from every finger.

To simulate with Verilator, for example the end-to-end test (run from the
directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert --top-module tb_rake_top -y rtl -y tb \
  rtl/rake_pkg.sv tb/rake_tb_pkg.sv tb/tb_rake_top.sv
./obj_dir/Vtb_rake_top
```

Any other testbench builds the same way with its own `--top-module` and file.
It runs in well under a second. The PN testbench checks the Q bit against
the mask formula applied to the reference sequences. That those masks equal a
16 777 232-chip advance of the Gold sequence was checked separately against
the sequence definition, not in the testbench.
