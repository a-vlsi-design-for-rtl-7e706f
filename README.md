# Parallel sliding-window LTE turbo decoder

LTE protects its data channels with a rate-1/3 turbo code. Two 8-state
recursive systematic convolutional (RSC) encoders are joined by a quadratic
permutation polynomial (QPP) interleaver, for block sizes K = 40 … 6144. Decoding
means running a soft-input soft-output (SISO) decoder for each encoder, over and
over, with the two passing "extrinsic" beliefs about every bit to each other.
Done one bit per cycle, a 6144-bit block with several iterations is far too slow
for LTE data rates.

This design splits the block into N equal windows and decodes them with N SISO
decoders running side by side. N is 1, 2, 4 or 8, depending on K. Running the
SISOs in parallel depends on a property of the QPP interleaver: it is
**contention free**. Store window n of the block in memory bank n. In the same
cycle, all SISOs then need the same local address, each in a different bank.
This holds in natural order and in interleaved order alike. So every bank needs
only one read port and one write port. The two constituent decoders share the
same N SISOs in time. A half-iteration in interleaved order (the "SISO2 cycle",
using parity2) alternates with one in natural order (the "SISO1 cycle", using
parity1).

All RTL is synthesizable SystemVerilog-2017. It is checked by self-checking
Verilator testbenches, including a full-size test: K = 6144 on 8 SISOs, with
6 and 8 iterations.

## Frame, windows and SISO count

| K              | SISOs N | window W = K/N |
|----------------|---------|----------------|
| K < 784        | 1       | K (≤ 768)      |
| 784 ≤ K < 1568 | 2       | 392 … 768      |
| 1568 ≤ K < 3136| 4       | 392 … 768      |
| 3136 ≤ K       | 8       | 392 … 768      |

Every LTE block size in each range is a multiple of 16 or more, so W is always a whole
number. The SISO count is computed as `siso_count()` in `td_pkg`. Window n
covers bits n·W … n·W+W−1. It is stored in bank n of four memory blocks of eight
banks each: systematic, parity1, parity2 and extrinsic. Each bank is 768 words
deep.

## One half-iteration, step by step

This is the core of the design. Every SISO walks its window twice. First it
goes backward, computing the backward metrics β and storing them in its own β
memory. Then it goes forward, computing the forward metrics α and, from α, the
branch metrics γ and the stored β, the a-posteriori LLR and the extrinsic value
of each bit. A SISO in the middle of the block does not know the state metrics
at its window edges. So each pass begins with **acquisition steps** over the
edge of the neighbouring window, started from all-equal metrics. The first
window instead starts α from the known state 0. The last window starts β from
state 0 at the end of the three termination (tail) steps. The controller
(`td_ctrl`) runs all SISOs in lockstep through five phases:

| phase | cycles | SISO n < N−1                      | last SISO (n = N−1)               | SISO 0           |
|-------|--------|-----------------------------------|-----------------------------------|------------------|
| BACQ  | OVL    | β over bits (n+1)W+OVL−1 … (n+1)W, from all-equal metrics | 3 tail steps from state 0, then idle | as n < N−1 |
| BMAIN | W      | β over its own window, last bit first; β stored | same                   | same             |
| FACQ  | OVL    | α over bits nW−OVL … nW−1, from all-equal metrics (n > 0) | same                  | α := state 0, idle |
| FMAIN | W      | α over its own window; Lk, Le and hard decision out | same               | same             |
| GAP   | 6      | pipeline drain                    |                                   |                  |

During BACQ, SISO n reads local addresses OVL−1 … 0 of bank n+1. During FACQ it
reads W−OVL … W−1 of bank n−1. Each bank is still read by only one SISO, so the
single shared read address still holds. The interleaved cycle reads the same
bit indices through π, and contention-freedom again gives one shared local
address and distinct banks. OVL = 32.

Each SISO writes its new extrinsic value back to the exact bank and address it
read the a-priori value from. In a SISO2 cycle that address is π(i), so the
values land in natural order without a de-interleaving memory. All reads of a
location come before its write in the same half-iteration, and the GAP phase
keeps the next half-iteration from reading a location still in flight. The
extrinsic memory is cleared while the block loads. Decoding starts with a SISO2
cycle and ends with a SISO1 cycle, so the final hard decisions come out in
natural order and can leave the decoder directly.

Cycle count: a frame takes **K + 5 + GAP + 2·iter·(2·(W + OVL) + GAP)** cycles,
counted from `start` to `done` with one input word per cycle. For K = 6144 and
6 iterations that is 25 427 cycles, or about 29 Mbit/s at 120 MHz.

## QPP addresses without multipliers

π(i) = (f1·i + f2·i²) mod K is never evaluated directly. Define
δ(i) = π(i+1) − π(i) mod K = (f1 + f2 + 2·f2·i) mod K. Then:

* forward step: π(i+1) = π(i) + δ(i), δ(i+1) = δ(i) + (2f2 mod K)
* backward step: δ(i−1) = δ(i) − (2f2 mod K), π(i−1) = π(i) − δ(i−1)

Each step needs only an add or subtract and one conditional correction by K.
While the block loads, a generator walks i = 0 … K−1 once and saves (π, δ) at
every SISO's backward and forward start index. Each SISO then has its own
stepper, which is reloaded at the start of each pass. The bank, π div W, is
found by comparing with the multiples of W; the local address is π − bank·W.
All of this is in `qpp_interleaver`. The coefficients f1 and f2 are inputs: the
host supplies them from the LTE table for the chosen K.

## SISO datapath

Sign convention: a positive LLR favours bit 1. The trellis is the LTE RSC code:
feedback 1 + D² + D³, parity 1 + D + D³. A state is {s1,s2,s3}, and termination
feeds u = s2 ⊕ s3.

* `gamma_unit` gives γ(u,p) = u·(La + Ls) + p·Lp. There are 16 branches, but
  only 4 distinct values. In a tail step La is left out.
* `acs_unit` runs the max-log add-compare-select for α (two predecessors per
  state) or β (two successors per state, or one in a tail step). It then
  subtracts the largest of the eight results, which keeps every metric ≤ 0,
  and clamps at −2048. The shift is common to all states, so it cancels in
  every LLR.
* `llr_unit` computes Lk = max over u=1 branches of α + γ + β, minus the same
  max over u=0 branches. It then forms Le = ¾·(Lk − La − Ls), floored and
  saturated to ±127, and the hard decision Lk > 0. It has one register stage.
* `siso` has one input register stage, the α/β register, the 768 × 96-bit β
  memory and the LLR unit. A step's result appears two clock edges after it
  enters. The SISO takes one step per cycle and never stalls.

Word widths: channel LLRs 6 bits, extrinsic 8 bits, branch metrics 10 bits,
state metrics 12 bits.

## Interface (`turbo_decoder`)

| signal | dir | meaning |
|---|---|---|
| `start`, `k_in`, `f1_in`, `f2_in`, `iter_in` | in | start a frame. Sampled in the `start` cycle while idle. `iter_in` = 0 means 1 |
| `in_ready`, `in_valid` | out/in | a word transfers on a cycle when both are high |
| `in_sys`, `in_par1`, `in_par2` | in | K data words: systematic, parity1, parity2 LLR of bit k |
| `in_sys2` | in | read only in the 3 tail words, which follow the K data words |
| `out_valid`, `out_addr`, `out_bits[N]` | out | last half-iteration: bit n·`out_w` + `out_addr` is `out_bits[n]`, for n < `out_nsiso` |
| `out_nsiso`, `out_w` | out | SISO count and window length of the current frame |
| `busy`, `done` | out | `done` pulses once at the end of the frame |

In a tail word, `in_sys`/`in_par1` carry encoder 1's tail bits
x_K+t, z_K+t, and `in_sys2`/`in_par2` carry encoder 2's x'_K+t, z'_K+t, for
t = 0, 1, 2. Reset is asynchronous and active low. The parity2 value of bit k is
encoder 2's parity at time k, which is the parity of c_π(k).

## Where this design departs from the architecture it implements

* **Throughput.** The reference implementation reports 75 Mbit/s with
  6 iterations at 120 MHz, which is about W cycles per half-iteration. This
  design runs the backward and forward passes one after the other, so a
  half-iteration takes 2·(W + OVL) + GAP cycles: 29 Mbit/s for K = 6144.
  Reaching the published figure would need β for the next sub-window computed
  while α runs over the current one, with a second read port per bank.
  The backward-then-forward order itself follows the architecture, which
  computes the LLRs once the β pass of a window is finished; the published
  throughput implies more overlap between the passes than that description gives.
* **No correction term.** The algorithm is plain max-log-MAP. The architecture
  mentions correction factors in the α/β and LLR calculations, but it names
  max-log-MAP as its algorithm.
* **Fixed iteration count.** There is no early stop on convergence.
* **Own choices** where the architecture gives no numbers: the word widths,
  the overlap OVL = 32, the extrinsic scale ¾, GAP = 6, max-subtraction
  normalisation, the handshake, and the tail-word format. All are in `td_pkg`.
* **Memories** are plain arrays (`sdp_ram`) with a registered read and
  read-before-write. A memory compiler macro is meant to replace them.
* f1/f2 come in on ports. There is no built-in table of the 188 LTE
  coefficient pairs.

## Simulating

Everything builds with plain Verilator 5. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/td_pkg.sv tb/tb_lte_pkg.sv \
    tb/tb_turbo_decoder.sv --top-module tb_turbo_decoder -y rtl -y tb
./obj_dir/Vtb_turbo_decoder
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The
reference models are in `tb/tb_lte_pkg.sv`: the LTE encoder with termination,
the direct QPP formula, a search for valid QPP coefficients (f1 coprime with K,
f2 a multiple of every prime factor of K), and a BPSK/AWGN channel with 6-bit
quantisation. `tb_modulation_fer` adds the QAM mapping and demapping itself.

Measured frame error rates (`tb_modulation_fer`, K = 1024, 8 iterations, 20 frames):

| SNR (dB) | −2.5 | −2 | −1 | 0 | 1 | 2 | 3 | 4 | 6 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| BPSK  | 0 % | 0 % |  | 0 % |  |  |  |  |  |  |  |
| QPSK  | 100 % |  | 5 % | 0 % | 0 % |  | 0 % |  |  |  |  |
| 16QAM |  |  | 100 % |  |  | 100 % | 95 % | 0 % | 0 % | 0 % |  |
| 64QAM |  |  |  |  |  | 100 % |  | 100 % | 100 % | 10 % | 0 % |

The ordering of the modulations and the error-free regions match the reference
measurements. The waterfalls here are steeper, and the frame size and SNR
definition behind those measurements are not known, so the curves are not expected to
line up point by point.

| testbench | what it establishes |
|---|---|
| `tb_turbo_decoder` | K = 40, 768, 784, 1536, 1568, 3072, 3136, 6144 (all four SISO counts) with 8 iterations, and 6144 with 6. Channel errors are corrected to zero, each bit is output exactly once, and the cycle count matches the formula. Counts the overlap, tail, SISO2 and correction events |
| `tb_modulation_fer` | frame error rate over BPSK, QPSK, 16QAM and 64QAM with Gray mapping, AWGN and a max-log demapper, K = 1024, 20 frames per SNR point; then 64QAM at 8.4 dB for every K above. Zero frame errors where the reference measurements have none (BPSK 0 dB, QPSK 3 dB, 16QAM 8 dB), most frames lost where they lose most; every frame takes the expected cycle count |
| `tb_siso` | Lk and Le match an un-normalised max-log-MAP model exactly: a terminated 40-bit frame, and a middle window with 32-step overlaps |
| `tb_qpp_interleaver` | every stepped address matches (f1·i + f2·i²) mod K over full backward and forward passes, for 1/2/4/8 SISOs. In the main phases, SISOs share the local address and use distinct banks |
| `tb_td_ctrl` | phase order and lengths, all commands, load addressing, the SISO2/SISO1 order |
| `tb_acs_unit`, `tb_llr_unit`, `tb_gamma_unit` | exact arithmetic against branch enumeration |
| `tb_sdp_ram`, `tb_llr_bank_group`, `tb_bank_xbar`, `tb_bank_wr_xbar` | storage and routing |

To change the parallelism or the sizes, edit `td_pkg` (KMAX, NSISO, widths,
OVL, GAP). The `N` and `WDEPTH` parameters of `turbo_decoder` must agree with it.

## Files

`rtl/td_pkg.sv` holds the types, constants and trellis functions. The top is
`turbo_decoder`, which contains `td_ctrl`, `qpp_interleaver`, four
`llr_bank_group` memory blocks (built from `sdp_ram`), read crossbars
`bank_xbar`, the extrinsic write crossbar `bank_wr_xbar`, and N `siso`
instances. Each `siso` holds a `gamma_unit`, an `acs_unit`, an `llr_unit` and an
`sdp_ram` β memory.
