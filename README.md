# Partially parallel polar encoder

Polar codes approach channel capacity only when they are long: storage
controllers protect 4096-byte sectors (32768 bits), and 8- or 16-KiB sectors
are next. A polar encoder computes the transform of an N-bit vector through
log2(N) stages of N/2 two-bit kernels, so a fully parallel encoder needs
(N/2)·log2(N) kernel units. At those lengths that is far too much hardware.
It also wants all N message bits at once, while the bits usually come from a
memory a few dozen bits wide.

This RTL folds the transform. It takes **P message bits per clock**, in natural
order, and uses **P/2 kernel units per stage**, (P/2)·log2(N) in total. Each
unit is reused every N/P cycles. Bits that the schedule needs later sit in
**delay elements**: N − P bits in all, exactly as many as the schedule keeps
alive at one time. For the reference configuration, a 16-bit code at P = 4,
that comes to 8 kernel units and 12 delay bits. A fully parallel 16-bit
encoder would use 32 units.

## What is computed

The kernel is F = [[1,0],[1,1]]. One kernel unit maps the bit pair (a, b) to
(a xor b, b). `polar_kernel_fu` is this one XOR gate.

The generator matrix is taken as G_N = B_N · F^{⊗n}, where n = log2 N and B_N
is the bit-reversal permutation. The encoder computes the butterfly network

    y = u · F^{⊗n}:   for d = 1, 2, 4, …, N/2:  v[i] ^= v[i+d] for every i with bit d clear

Stage s of the network combines bits at distance d = 2^(s−1). Because
B_N commutes with F^{⊗n}, `y[j] = x[rev(j)]`: y is the codeword x in
bit-reversed order. The encoder does not reorder its output.

### Input and output words

* Input word t (t = 0 … N/P − 1) carries `u[t·P + i]` on bit i.
* Output word t carries, for k = 0 … P/2 − 1:
  * lane 2k   = y[t·P/2 + k]       = x[rev(t·P/2 + k)]
  * lane 2k+1 = y[t·P/2 + k + N/2] = x[rev(t·P/2 + k) + 1]

So each output word holds P/2 pairs of *adjacent* codeword bits. The pairs
come in bit-reversed order. For N = 16 and P = 4 the output pairs are
(x0,x1)(x8,x9) | (x4,x5)(x12,x13) | (x2,x3)(x10,x11) | (x6,x7)(x14,x15).
`out_idx` gives t. A consumer that needs natural order writes pairs to
address rev(t·P/2+k)/2 in its own buffer.

## The stages

Each stage issues its N/2 kernel operations P/2 per cycle, in ascending order
of the operations' lower bit position. Unit m of a stage drives output lanes
2m (the xor result) and 2m+1 (the passed bit). This fixed schedule decides
everything else.

### Stages with d < P: wiring only (`polar_direct_stage`)

The first log2(P) stages find both bits of every pair inside the current
word, so they need no storage. Each stage has P/2 units and constant wiring.
Two elaboration-time functions in `polar_pkg` resolve the wiring:
`low_pos(d, m)` gives the lower bit position of operation m, and
`lane_of(dprev, p)` gives the lane on which the previous stage left bit
position p. These stages add no latency.

### Stages with d ≥ P: delay elements and multiplexers (`polar_delay_stage`)

This is the core of the design. Count in *half-words* of P/2 bits. Each
cycle the previous stage delivers two half-words: F, its lower outputs (lanes
0,2,…), and S, its upper outputs (lanes 1,3,…). Let G = 2d/P. A block of G
input words holds the 2G half-words that this stage pairs as (t, t+G):

* In the first G/2 words of a block, F and S bring half-words 0 … G−1, which
  are all the lower operands.
* In the last G/2 words, they bring half-words G … 2G−1, the upper operands.

The stage issues operation t at block phase t + G/2, so its latency is
G/2 = d/P cycles. Two chains of G/2 half-words each hold the waiting
operands:

| block phase | lower operand | upper operand | chain Y loads | chain X |
|---|---|---|---|---|
| second half (≥ G/2), operation t = phase − G/2 | Y (F from G/2 cycles ago) | F now | S | holds |
| first half (< G/2), operation t = phase + G/2 of the previous block | X (S from G cycles ago) | Y (S from G/2 cycles ago) | F | shifts in S |

Chain Y shifts every cycle. Chain X shifts only in the first half of a block.
One 2:1 multiplexer per operand selects between them. A stage stores G
half-words, which is d bits. That equals the number of variables this
schedule keeps alive, so the allocation is minimal: stage 3 of the 16-bit
example holds 4 bits and stage 4 holds 8. Each stage derives its block phase
from the shared word counter as `(cnt − PHASE_OFS) mod G`, where PHASE_OFS =
d/P − 1 is the latency of the delay stages in front of it.

Totals: N − P delay bits, and N/P − 1 cycles of latency through the stages.

## Control and handshake (`polar_ctrl`)

The source describes the datapath only. The control scheme below is this
design's own.

* `in_valid`/`in_ready`: a codeword is N/P words offered in order. When
  codewords come back to back, the encoder takes one word per cycle without
  bubbles.
* **Stall:** when `in_valid` drops in the middle of a codeword, the whole
  pipeline holds (`adv` = 0), including the output of the previous codeword.
* **Flush:** the last codeword's results are still in the delay elements. If
  no new codeword starts at a codeword boundary while results are pending, the
  controller runs one *flush block* of N/P cycles. During it the pipeline
  advances on zeros and `in_ready` is low after the first cycle. `flushing`
  marks these cycles.
* `cnt` counts advances modulo N/P. It gives every delay stage its phase.
  A shift register of accepted-word flags, LAT = N/P − 1 deep, tells which
  words leaving the last stage are real.
* One output register follows the last stage. Latency is therefore N/P
  cycles from a codeword's last input word to its last output word, and its
  output words come out in N/P consecutive cycles.
* Reset is synchronous and active low. It clears the counter, the flags and
  the delay elements.

Two assertions in `polar_ctrl` check the handshake rules. No word is taken
inside a flush block, and a word is taken only on an advance.

## Parameters and cost

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | code length, a power of two |
| `P` | 4 | bits per cycle, a power of two, 2 ≤ P ≤ N |

| quantity | formula | N=16, P=4 | N=32768, P=64 |
|---|---|---|---|
| kernel units (XOR) | (P/2)·log2 N | 8 | 480 |
| delay bits | N − P | 12 | 32704 |
| cycles per codeword | N/P | 4 | 512 |
| stage latency | N/P − 1 (+1 output register) | 3 (+1) | 511 (+1) |

P = N gives the fully parallel encoder, with no delay stage and
`in_ready` always high.

## Files

| file | content |
|---|---|
| `rtl/polar_pkg.sv` | lane-mapping functions shared by the stages |
| `rtl/polar_kernel_fu.sv` | kernel unit F |
| `rtl/polar_direct_stage.sv` | delay-free stage (d < P) |
| `rtl/polar_delay_stage.sv` | stage with delay elements (d ≥ P) |
| `rtl/polar_ctrl.sv` | word counter, handshake, flush, valid tracking |
| `rtl/polar_encoder.sv` | top level: generates the log2 N stages |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_polar_encoder_sizes.sv`, `tb/polar_enc_harness.sv` | encoder at N = 32768/P = 64, 1024/16, 64/2 and 8/8 |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog.

* `tb_polar_encoder` uses the default size (N = 16, P = 4). It sends 60
  codewords, mixing back-to-back bursts, stalls inside codewords and idle gaps
  that force flushes. It checks every output word against x = u·G_N, computed
  directly from the generator matrix rather than from the butterfly. It also
  checks out_idx/out_last, the N/P-cycle latency, and N/P consecutive output
  words per codeword inside a burst. Each of stall, flush and back-to-back
  handover must happen at least once.
* `tb_polar_encoder_sizes` runs four sizes against a butterfly reference:
  a 32768-bit codeword (one 4096-byte sector) at P = 64, N = 1024 at P = 16,
  P = 2, and the fully parallel case P = N = 8.
* The unit testbenches check the kernel exhaustively and the direct stages
  against the Kronecker-product rule. The delay stage is checked on random
  streams with hold cycles against an independent model of the block
  schedule. The controller is checked against a model of its handshake rules.

To simulate with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/polar_pkg.sv \
        tb/tb_polar_encoder.sv --top-module tb_polar_encoder
    ./obj_dir/Vtb_polar_encoder

## Where this design goes beyond its source

The source gives the architecture through the 16-bit, 4-parallel example: the
folding sets, 8 kernel units, 12 delay elements found by lifetime analysis,
multiplexers before some units of stages 3 and 4, and P/2·log2 N units in
general. Its register allocation table and the stage schematics are not
reproduced here. The following points are therefore this design's own:

* The register allocation, as two half-word chains per delay stage, and
  the generalisation to any N and P. This allocation meets the same count
  of 12 delay bits for the example.
* The exact lane order between stages.
* The handshake, stall and flush behaviour, the reset and the output
  register.
* G_N is taken in the B_N·F^{⊗n} form, which is what makes the output
  bit-reversed in pairs as described.

Frozen-bit insertion is not included. Choosing which K of the N inputs carry
information and which carry fixed values depends on a reliability order that
is not given. The encoder takes the full N-bit vector u, with frozen
positions already set. The memory that feeds the message words is outside
the encoder.
