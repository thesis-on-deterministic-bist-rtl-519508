# Variable-length reseeding: on-chip decompression of scan test patterns

A deterministic scan test set is mostly don't-care bits. A test cube for a
circuit with a few hundred scan flip-flops typically fixes a few dozen of
them. This design stores each cube as a *seed*: a short bit string. An LFSR
on the chip expands the seed into a full scan pattern that agrees with the
cube on every specified bit. Two ideas make the seeds small and the hardware
cheap:

* **Variable-length seeds.** If the LFSR is cleared before loading, a seed
  of length n only has to store its last n bits. The other stages are known
  to be zero. A cube with few specified bits therefore gets a short seed. A
  cube with many specified bits gets a long one. The length is chosen per
  cube, not for the worst cube of the set.
* **Borrowed flip-flops.** The LFSR needs at least as many stages as the
  hardest cube has specified bits, plus a margin. The design does not add
  those stages. It takes the 32-stage pseudo-random pattern generator
  (PRPG) that a BIST chip already has and chains it with the first
  flip-flops of the scan chains. Those flip-flops are overwritten by every
  pattern anyway, so using them for decompression costs one AND gate and a
  few XOR gates and multiplexers.

The same chip also runs ordinary pseudo-random BIST: with the extra
feedbacks disabled, the PRPG runs on its own. Responses are compacted into a
signature register (MISR).

A second, separate part of the design covers chips with an embedded
processor. There, decompression is a program. The RTL builds that program's
datapath as hardware: a two-dimensional LFSR, kept as a circular buffer of
words, that feeds one bit per word lane into each of 32 scan chains. The
responses are compacted by one's-complement addition.

## The stored test data

The memory holds one record per deterministic pattern. Records are sorted by
seed length:

```
| size | seed field (b + i*d bits)          |
| size | seed field                         |
...
```

* The seed field of the first record is `b` bits long.
* A size bit of 1 means the *next* field is `d` bits longer than this one.
* A seed shorter than its field is padded with leading zeros. This is
  harmless, because the LFSR is cleared before loading: zeros shifted in
  first leave it unchanged.
* The controller keeps the current field length in a counter
  (`seed_len_counter`), which is loaded with `b` at start and adds `d`.
* Only `b`, `d` and the number of records are configuration. Lengths are
  not stored per record.

`hw_sys_driver` in `tb/` shows how a stream is built. It picks the shortest
workable length for each cube, sorts the cubes, then assigns field lengths
from the longest down. Each step between consecutive fields is 0 or d, and
each field is at least as long as its own seed.

## How a seed becomes a pattern

After Reset, every decompressor state bit, and hence every bit that ends up
in the scan chains, is a fixed XOR of the seed bits. Encoding a cube is
therefore a linear system over GF(2). There is one equation per specified
bit, and the unknowns are the last n seed bits. The shortest n for which
the system is solvable gives the seed. As a rule of thumb, a cube with s
specified bits needs n ≈ s, which is why the decompressor is sized to
about `Smax + 20` stages.

The testbenches never write these equations by hand. They *probe* the real
RTL: for each seed position they load a unit seed, run a deterministic
pattern and record what lands in the chains. That gives the columns of the
matrix. Random cubes are then solved by Gauss–Jordan elimination, written
to memory in the record format and played back, and every applied pattern
must cover its cube. The check thus covers the decompressor's linearity,
the serial load path, the controller's timing and the record format
together.

## Three hardware decompressors

All three variants share the same `prpg` (type I / external XOR, P0 =
X^32+X^29+X^11+X^3+1 by default) and the same controls:

* **Shift** selects the seed multiplexer at the PRPG input.
* **Reset** clears the seed path.
* **Decompression** opens the AND gates of the extra feedbacks.

### One scan chain (`decomp_single`)

The PRPG and the first SEG flip-flops of the chain form one long shift
register (32 + SEG stages; the default is 32 + 96 = 128). The PRPG output
feeds the chain.

* **Decompression.** The last borrowed flip-flop is ANDed with
  Decompression and XORed into the PRPG feedback, so all 128 stages act as
  one LFSR.
* **Reset.** One clock clears the PRPG and, through `seg_clear`, the
  borrowed flip-flops.
* **Seed load.** The seed is shifted in through the multiplexer.

### Several chains, feedbacks into the PRPG (`decomp_multi`, the general form)

Each of the 2^r chains lends SEG flip-flops. The default is 4 × 24 = 96,
as in the single-chain case. The last lent flip-flop of chain i is fed
back, under Decompression, into the PRPG in front of stages
(i + 2^v) mod 2^r, for v = 0..r-1. Position p is read as "the D input of
PRPG stage p".

* **Outputs.** Chain 0 takes the PRPG output. Chains 1..3 take outputs of
  an XOR network (`phase_shifter`).
* **Seed load.** A multiplexer in front of chain j (j ≥ 1) takes the last
  lent flip-flop of chain j-1 through an AND gate with Reset. The serial
  path is then PRPG → chain 0 segment → chain 1 segment → … → chain 3
  segment, 128 stages in all.
* **Reset.** While Reset is high, those AND gates force zeros into chains
  1..3. Shifting for SEG+1 clocks with Reset high therefore zeroes every
  segment. No scan flip-flop needs a reset line.

### Several chains, extended LFSR plus phase shifter (`decomp_phase`)

This is the single-chain decompressor built on chain 0. Here chain 0 lends
all 62 of its flip-flops (a 94-stage LFSR), and an XOR tree feeds the
other chains. It is simpler than `decomp_multi`, but the LFSR can only grow
by one chain's length.

### The XOR network matters

If output j were the output stage XOR one more stage, it would be output
0 delayed by only 8·j clocks. Many triples of bits within one pattern
would then be linearly dependent. Measured on `decomp_multi`, about half of
random cubes with ~60–100 specified bits could not be encoded that way,
even though the probe matrix had full rank 128. Each output now XORs three stages,
`s[31] ^ s[t] ^ s[(t+16) mod 31]` with `t = 8j-1`. That makes each output
a far-shifted copy of the PRPG sequence, and the dependency rate drops
sharply. The taps are this design's choice; the source leaves the XOR
network unspecified.

## Session timing (`test_controller`)

A session is NRAND random patterns, then NDET seed records, then a flush.
Scan chains shift in every phase except the size-bit read and captures, so
each response leaves the chains (into the MISR) while the next pattern goes
in.

| phase | clocks | controls |
|---|---|---|
| random shift | LS | en (PRPG free-running) |
| random capture | 1 | scan enable low |
| read size bit | 1 | — |
| Reset | RESET_CYCLES: 1, or SEG+1 for `decomp_multi` | en, Shift, Reset |
| seed | current field length | en, Shift, seed bit = memory |
| decompress | DECOMP_CYCLES | en, Decompression |
| capture | 1 | scan enable low; a size bit of 1 adds d to the length |
| flush | LS | — |

`DECOMP_CYCLES` is `LS - SEG` when the lent flip-flops head the chains. The
decompressor then stops with the freshly loaded segment at the far end of
each chain and the newest LFSR output at the front. With the phase shifter
it is `LS`. Decompressing for the full LS clocks in `decomp_multi` would
shift the loaded seed bits out of the chains. With NS = 4 the feedback
sites (i+1, i+2) mod 4 form a singular map, so some seed information would
be lost. The testbench's clock-count check therefore checks exactly
`1 + NRAND·(LS+1) + NDET·(1 + RESET_CYCLES + DECOMP_CYCLES + 1) + Σ field lengths + LS`.

The memory is bit-serial with a one-clock read. The controller presents the
*next* pointer as the address, so the read data always equals the bit at
the current pointer and no clock is lost between records.

## The processor-based scheme (`sw2d_engine`, `sw_decomp_system`)

On a chip with a DSP or processor core, each bit lane of an N-bit ALU can
run one LFSR segment, so N segments run in parallel. N scan chains hang off
one N-bit scan register B. Independent segments could not encode much, so
they are linearly interconnected: segment i also feeds segments
(i + 2^v) mod N. With all taps at the same position, each connection is one
rotate and one XOR of a whole word.

`sw2d_engine` keeps the L×N decompressor the way the program does: a
circular buffer `M[0..L-1]` of N-bit words and a head pointer H. Word
`M[(H+i) mod L]` is stage i of every segment. One step:

1. `out = M[H]`. This is the word shifted into the N chains.
2. `M[H] ^= M[(H+f) mod L]` for every feedback term f, and
   `M[H] ^= rotl(M[(H+T) mod L], a)` for the tap T and every rotate a.
3. `H = (H+1) mod L`.

No word moves, so one step is one clock here. The program needs a few
dozen instructions for it.

Patterns are encoded by concatenation: one N·L-bit seed per group of G = 8
patterns. The decompressor then runs on without reseeding for the whole
group. This is possible because the buffer is not shared with the scan
chains.

`sw_decomp_system` sequences groups:

* **Load:** L words from the seed memory.
* **Patterns:** G times, LS steps and shifts, then a capture.
* **Flush:** LS clocks at the end.

`ones_comp_sig` adds every N-bit word shifted out of the chains with an
end-around carry.

The defaults are the 32-bit configuration for circuit s38584: L = 16,
polynomial X^16+X^9+X^5+1, tap 15, rotates 1 and 2, chains of 46, and
7 groups (112 words) in a 128-word memory.

## Module map

```
vlr_bist_top
├── u_single : hw_decomp_system  NS=1, LS=247, SEG=96    (decomp_single)
├── u_multi  : hw_decomp_system  NS=4, LS=62,  SEG=24    (decomp_multi)
├── u_phase  : hw_decomp_system  NS=4, LS=62,  SEG=62, PHASE_SHIFTER=1 (decomp_phase)
│     hw_decomp_system = test_data_memory + test_controller (+ seed_len_counter)
│                        + decompressor (prpg, phase_shifter) + NS × scan_chain + misr
└── u_sw     : sw_decomp_system  N=32, L=16, LS=46, G=8
      = test_data_memory (32-bit words) + sw2d_engine + 32 × scan_chain + ones_comp_sig
vlr_pkg: polynomials P0, P1, P5, controller phase enums, the decompressor control struct
```

The circuit under test is not part of the RTL. Each system brings out
`scan_q` (the chain contents, i.e. the circuit's inputs) and takes back
`cut_resp` (its response), which is captured at the end of each pattern.
The testbenches close this loop with a stand-in: the chain contents rotated
by one position and XORed with a constant.

## Where this design makes its own choices

These points are not fixed by the scheme as published and were decided
here:

* **Reset timing in `decomp_multi`.** Reset is a separate phase of SEG+1
  shift clocks before the seed, and it also clears the PRPG. The published
  scheme suggests asserting Reset *during* the first bits of the seed, so
  that no separate phase is needed. That saves clocks but requires per-seed
  timing of Reset. This design trades those clocks for a simpler controller.
* **Decompression length and XOR-network taps.** See above.
* **Feedback tap positions.** The extra feedback is taken from the *last*
  lent flip-flop of each chain. The feedback site numbering is read
  literally as PRPG stage numbers.
* **MISR.** 32 bits, P0 polynomial, chain k into stage k. Only the
  register's role is given.
* **Memory.** The organisation (1-bit × 8192 for each hardware system) and
  the synchronous read are this design's.
* **PRPG start state.** The PRPG resets to 1 (any non-zero start value would
  do). Scan chains clear on `rst_n`.
* **Processor not built.** The processor itself (register file, ALU,
  program) is not built. Its per-clock work is done by `sw2d_engine`, and
  register B is plain wiring.
* **Session order.** Random patterns first, then deterministic ones, then a
  flush. Counter widths: 10-bit field lengths (saturating) and 16-bit
  pattern counts.

## How far it is checked

Every module has a self-checking testbench in `tb/`. Each compares against
an independently written model, and each prints
`TB_RESULT checks=… failures=…`.

| testbench | what it compares |
|---|---|
| `tb_prpg` | published 3-bit LFSR seed/sequence table; period 15 of X^4+X+1; P0 recurrence on random seeds |
| `tb_phase_shifter` | tap equations on unit and random states |
| `tb_scan_chain`, `tb_misr`, `tb_seed_len_counter`, `tb_test_data_memory`, `tb_ones_comp_sig` | array/integer models, random stimulus |
| `tb_decomp_single`, `tb_decomp_multi`, `tb_decomp_phase` | flat bit-list models of PRPG + chains under random bursts of Reset / Shift / Decompression / random mode, every clock |
| `tb_test_controller` | clock-by-clock expected trace of phases and controls for 40 random sessions and memory contents |
| `tb_sw2d_engine` | N separate shift-register segments with explicit taps (two configurations) |
| `tb_hw_decomp_system` | probe, GF(2) encoding of random cubes, session playback, cube coverage, exact clock count, signature sensitivity |
| `tb_sw_decomp_system` | lock-step model of the program's loop: phase and all chain bits every clock, final signature |
| `tb_vlr_bist_top` | all four systems at full default size at once (see below) |
| `tb_hw_workloads` | the hardware system re-sized to the published circuits (below): probe, encode, play back, cover |

`tb_vlr_bist_top` runs the top with no parameter overrides. The three
hardware systems are exercised by `hw_sys_driver` (single chain: 128-bit
seed path, 151 decompression clocks; four chains: 128-bit path, 25 Reset
clocks, 38 decompression clocks; phase shifter: 94-bit path). The software
scheme is exercised by `sw_sys_driver` with 4 groups of 8 patterns.

Each driver counts the mechanisms it saw and fails if one never happened:

* random patterns;
* Reset phases;
* seed loads;
* decompression phases;
* seed-length growth by d;
* seed-word loads;
* patterns decompressed without reseeding;
* flush clocks.

Cube encoding is probabilistic. Random cubes have 5 to K−20 specified bits
placed uniformly. Over 360 encodings in the workload test, 6 cubes took 6
tries in 60 % of cases and 9 or fewer in 96 %; the worst case took 15. A cube that
does not encode is replaced, as an ATPG flow would regenerate it, and the
test requires at least a quarter to encode. The first cube of each run is cut
from the pattern of a random seed of at most 24 bits. The other cubes need
seeds close to K bits, because the lent scan flip-flops hold seed bits
directly. The short first cube makes sure the stored seeds span several
field lengths, so the length counter has to step.

The circuit stand-in is not a real netlist, so signatures say nothing about
fault coverage. They are checked only to be non-zero, to match the model
(software scheme) and to change when the response changes.

## Sizes of the published experiments

The defaults hold exactly two of the evaluated configurations:

* s9234 (1 chain of 247 or 4 chains of 62, 96 lent flip-flops, 5 346 /
  4 720 bits of test data in an 8 192-bit memory);
* s38584 for the processor scheme (7 groups × 16 words).

The other circuits need the parameters `LS`, `SEG` and `MEM_DEPTH` (and for
the processor scheme `L`, the masks and `SEED_DEPTH`) set from their chain
lengths and data sizes. s38417 needs 16 797 bits of test data, twice the
default memory.

`tb_hw_workloads` builds nine differently sized copies of the hardware
system side by side and runs the same encode-and-play-back test on each:

| configuration | chains × length | lent flip-flops | seed path |
|---|---|---|---|
| s9234 | 8 × 31, 16 × 16, 32 × 8 | 96 | 128 |
| s9234, polynomials P1 and P5 | 4 × 62 | 96 | 128 |
| s13207 | 4 × 175 | 192 | 224 |
| s15850 | 1 × 611 | 256 | 288 |
| s38417 | 1 × 1664 | 480 | 512 |
| s38584 | 32 × 46 | 224 | 256 |

Random cubes stand in for the real ones, so these runs show that the
decompressor, the controller and the seed-length mechanism work at those
sizes. They do not reproduce the published data volumes. The memory in each
copy is sized for the random cubes, not for the full published test set.

## Simulating

With Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert --top-module tb_vlr_bist_top \
    -y rtl -y tb +libext+.sv rtl/vlr_pkg.sv tb/tb_vlr_bist_top.sv
./obj_dir/Vtb_vlr_bist_top
```

Any other testbench is built the same way; replace the top module and file
name. The full-size top test takes well under a second of simulation time.
Random stimulus comes from `$urandom`, so `+verilator+seed+N` changes the
cubes and data.
