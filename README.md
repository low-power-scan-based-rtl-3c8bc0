# Low-power scan BIST with a ring-oscillator true random number generator

Scan-based built-in self-test (BIST) usually burns far more power than normal
operation. Random patterns toggle every scan flip-flop on every shift cycle. This
design keeps test power down by clocking only part of the scan chains at any
time:

- **Pseudorandom phase.** This phase runs a series of *degraded sub-circuits*.
  In each one, only the chains selected by that sub-circuit's mask are clocked.
  Each clocked chain shifts or captures according to its own *weighted
  test-enable* signal, with weights chosen per sub-circuit.
- **Deterministic phase.** The LFSR is reseeded from a small on-chip seed
  store, and a few extra variables are injected into it. The patterns are
  shifted into one chain at a time.

A true random number generator (TRNG) can supply the seed of the pseudorandom
phase. It uses two multistage feedback ring oscillators (MSFRO) whose jitter
samples two PLL clocks. The BIST compresses the responses in a multiple-input
signature register (MISR), compares the signature with a golden value, and
raises a status line if they differ.

Everything is SystemVerilog (IEEE 1800-2017). The synthesizable blocks are in
`rtl/`. The two analog parts, the ring oscillator and the PLL, are behavioural
simulation models. The circuit under test (CUT) is not part of the design: it
connects through ports.

## Block diagram

```
            +-------- lp_scan_bist -------------------------------------------+
            |                                                                 |
            |  msfro u_osc1 --clk--> +------------------+                     |
            |  msfro u_osc2 --clk--> | trng_pre_process | rnd  +----------+   |--> trng_word[127:0]
            |  pll clk0/clk1 -data-> |  2 DFF + XOR     |----->| trng_128 |---|--> trng_valid
            |                        +------------------+      +----------+   |
            |                                                    | low 16 bits|
 start ---->|  +-----------------+  seed/load/step  +-----------+ v           |
 cfg_seed ->|  | bist_controller |----------------->| lfsr_prpg |<-- seed_store <- seed_we/addr/data
 chain_mask>|  |   (FSM)         |<--te_weighted--  +-----------+             |
 te_weight->|  +-----------------+   weighted_te_gen <--- q ---+              |
            |     | ce[i], te[i], test_mode              |     | q[7:0]       |
            |     v                                      |     v              |
 normal_pi->|  4 x scan_chain (8 cells)  <-- scan_in = q[i]   bist_input_mux --|--> cut_pi
 cut_next ->|     | cells                                            |        |--> cut_state[31:0]
            |     | scan_out & ce & te --> misr --> signature ==? golden_sig   |--> bist_done, bist_fault
            +-----------------------------------------------------------------+
```

## The test session

A rising edge on `start` in the IDLE or DONE state starts one session. The
controller (`bist_controller`) then runs these steps in order:

| step | cycles | chains clocked | chains' test enable | LFSR | MISR |
|---|---|---|---|---|---|
| SEED | 1, or until the next TRNG word | none | – | load `cfg_seed` or TRNG bits [15:0] | clear |
| PR | `PR_CYCLES` (64) per sub-circuit, `NUM_SUBCKTS` (4) sub-circuits | those in `chain_mask[sub]` | weighted by `te_weight[sub]` | step | compact |
| DET_LOAD | 1 per seed | none | – | load seed *s* | hold |
| DET_SHIFT | `NUM_CHAINS*CHAIN_LEN` per seed | one: chain 0 for 8 cycles, then chain 1, ... | shift | step; extra variables injected in the first 4 cycles | compact |
| DET_CAPT | 1 per seed | all | capture | hold | hold |
| UNLOAD | `CHAIN_LEN` | all | shift, scan input 0 | hold | compact |
| COMPARE | 1 | none | – | hold | hold |
| DONE | until next start | all (functional) | capture | – | – |

With the configuration seed, `bist_done` rises on clock edge
`2 + NUM_SUBCKTS*PR_CYCLES + NUM_SEEDS*(2 + NUM_CHAINS*CHAIN_LEN) + CHAIN_LEN`
after the edge that samples `start` (402 at the defaults). With the TRNG seed,
the SEED step waits for `trng_valid`, which comes every 128 clocks.

`bist_fault` is the status line: 1 if the signature differs from `golden_sig`.
It is set together with `bist_done` and holds until the next start. In IDLE and
DONE, `test_mode` is 0, so the multiplexer passes `normal_pi` to the CUT and
every chain captures `cut_next` each clock. In these states the scan cells are
simply the circuit's functional flip-flops.

### Degraded sub-circuits and weighted test enables (pseudorandom phase)

The pseudorandom phase is split into `NUM_SUBCKTS` sub-phases of `PR_CYCLES`
cycles. In sub-phase *u* (visible on `pr_subckt`), only the chains set in
`chain_mask[u]` are clocked. This keeps the rest of the circuit still, which is
what "degraded" means here: a sub-circuit is the circuit as seen with only some
of its flip-flops active. Each sub-circuit also brings its own weights,
`te_weight[u]`.

`weighted_te_gen` gives each clocked chain a test enable of 1 (shift) or 0
(capture) in every cycle. Chain *i* has a 2-bit weight code *w*. With *k = w+1*, the chain
captures when LFSR bits `(4i+j) mod 16`, for *j* = 0..k-1, are all 1. It
therefore captures with probability 2^-k (1/2, 1/4, 1/8 or 1/16) and shifts
otherwise. A chain does not follow a fixed "shift *n*, capture once" rhythm.
Instead, it captures whenever its weighted test enable drops. Its response bits
then leave through later shift cycles.

### What the MISR sees

Each cycle the MISR gets one bit per chain, `scan_out[i] & ce[i] & te[i]`. This
is the bit that actually leaves a chain during a shift. Chains that are not
clocked, or that capture, contribute 0. The MISR shifts one position towards the
MSB, feeds the bit leaving the MSB back through x^16+x^12+x^5+1, and adds the
four inputs modulo 2 into bits 3..0.

### Deterministic phase: reseeding with extra variables

Each 20-bit seed-store word is `{extra[3:0], seed[15:0]}`. For each of the
`NUM_SEEDS` words, the LFSR is loaded with `seed`. Then the chains are filled
one after another, each from its own LFSR bit (`q[i]`), while the previous
responses are shifted out. During the first `NUM_EXTRA` shift cycles, bit
`extra[c]` is XORed into the LFSR's MSB on step *c*. This adds free variables
to the linear system that the seed has to solve, so a short LFSR can encode
patterns with more care bits. One capture of all chains follows. Only one chain
in four toggles during filling.

The seeds and extra variables must be computed offline, by solving the linear
equations of the wanted care bits. Write them through
`seed_we/seed_waddr/seed_wdata` before `start`. A zero seed is loaded as 1.

### TRNG

Each of the two `msfro` instances clocks one flip-flop in `trng_pre_process`.
That flip-flop samples one of the PLL clocks (`clk0` = 4.0 ns, `clk1` = 3.3 ns
in the model). A single sampler returns long runs of equal values, because the
jitter window is narrow compared with the period. The two samples are
therefore XORed. `trng_128` synchronises the raw bit into `clk` with two
flip-flops and shifts one bit per clock into a 128-bit register, oldest bit in
the MSB. Every 128 clocks it copies the register to `trng_word` and pulses
`valid`. The top additionally gates `valid` with the PLL's `locked`.

Both analog parts are behavioural models:

- `msfro` toggles every `STAGES*STAGE_DELAY_PS` ps, plus a uniform random jitter
  of 0..`JITTER_PS` ps (defaults 5 x 700 ps + 0..60 ps and 7 x 530 ps + 0..60 ps).
- `pll` produces two fixed-period clocks and asserts `locked` after 8 reference
  edges.

In simulation the words are pseudorandom, because they come from `$urandom`.
On silicon the randomness comes from device noise.

## Interface of the top, `lp_scan_bist`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | system clock (also PLL reference), asynchronous active-low reset |
| `start` | in | 1 | rising edge starts a session |
| `use_trng_seed` | in | 1 | 1: seed the pseudorandom phase from the TRNG |
| `cfg_seed` | in | 16 | seed when `use_trng_seed` = 0 |
| `chain_mask` | in | 4 x 4 | per sub-circuit: chains clocked |
| `te_weight` | in | 4 x 4 x 2 | per sub-circuit and chain: weight code (capture probability 2^-(w+1)) |
| `seed_we`, `seed_waddr`, `seed_wdata` | in | 1, 2, 20 | seed store write port, word `{extra, seed}` |
| `golden_sig` | in | 16 | expected signature, sampled in COMPARE |
| `normal_pi` | in | 8 | functional primary inputs of the CUT |
| `cut_pi` | out | 8 | CUT primary inputs: `normal_pi`, or LFSR bits 7..0 in test mode |
| `cut_state` | out | 32 | scan-cell contents; chain *i* is bits `8i+7..8i`, cell 0 nearest scan-in |
| `cut_next` | in | 32 | CUT next-state values, captured into the cells |
| `test_mode`, `bist_done`, `bist_fault` | out | 1 | session running, finished, fault found |
| `signature` | out | 16 | MISR contents |
| `prpg_seed` | out | 16 | seed used by the last pseudorandom phase |
| `bist_state` | out | 4 | controller state (`lpbist_pkg::bist_state_e`) |
| `pr_subckt` | out | 2 | degraded sub-circuit under test in the pseudorandom phase |
| `trng_word`, `trng_valid` | out | 128, 1 | last TRNG word, one-cycle pulse when new |

Parameters (defaults in `lpbist_pkg`): `NUM_CHAINS`=4, `CHAIN_LEN`=8, `PI_W`=8,
`LFSR_W`=16, `MISR_W`=16, `NUM_SUBCKTS`=4, `PR_CYCLES`=64 (per sub-circuit),
`NUM_SEEDS`=4, `NUM_EXTRA`=4 (at most `CHAIN_LEN`), `TRNG_BITS`=128. The
LFSR must be at least as wide as both `NUM_CHAINS` and `PI_W`. The polynomials
in the package are written for 16 bits: change them together with the widths.

## Files

| file | content |
|---|---|
| `rtl/lpbist_pkg.sv` | default sizes, polynomials, weight type, controller state enum |
| `rtl/lp_scan_bist.sv` | top level |
| `rtl/bist_controller.sv` | session FSM, status line, assertions on chain clocking |
| `rtl/lfsr_prpg.sv` | reseedable Galois LFSR, x^16+x^14+x^13+x^11+1 |
| `rtl/weighted_te_gen.sv` | weighted test enables |
| `rtl/scan_chain.sv` | scan chain with clock enable |
| `rtl/bist_input_mux.sv` | functional/test input multiplexer |
| `rtl/misr.sv` | signature register |
| `rtl/seed_store.sv` | seed memory (register file) |
| `rtl/trng_pre_process.sv` | MSFRO-clocked samplers and XOR |
| `rtl/trng_128.sv` | synchroniser and 128-bit collector |
| `rtl/msfro.sv`, `rtl/pll.sv` | behavioural models (not synthesizable) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a
watchdog in case it hangs. For example, the end-to-end test at the default
sizes:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb \
    rtl/lpbist_pkg.sv tb/tb_lp_scan_bist.sv -y rtl +libext+.sv --top-module tb_lp_scan_bist
./obj_dir/Vtb_lp_scan_bist
```

Other testbenches are built the same way, with their own name.
`tb_lp_scan_bist` takes a few seconds. It uses a small sequential function as
the CUT and an independent cycle-level model of the whole session: LFSR,
per-sub-circuit masks and weights, reseeding with extra variables, captures,
unload and MISR. It runs three sessions:

1. Configuration seed with a fault-free CUT. The status must stay low and the
   session length must match the formula above.
2. The same seed with a stuck-at-0 on one CUT next-state bit. The status must
   go high, and the signature must equal the model's faulty signature.
3. TRNG seed with a different mask for one sub-circuit. The seed must equal the TRNG word's
   low bits.

It also checks that the TRNG words are balanced (35-65 % ones over all words)
and that no word repeats. It checks functional mode between sessions and counts
every mechanism:
weighted shifts and captures, masked chains, cycles per sub-circuit, reseeds,
seeds with extra variables, one-chain shifts, captures, unloads and TRNG
words.

## Where the design is its own

The published description gives the architecture: TRNG from two MSFROs and a
PLL, weighted test-enable pseudorandom testing with part of the chains disabled,
deterministic BIST with reseeding and few active flip-flops, input multiplexer,
MISR, status line, and 128-bit TRNG words. It does not give sizes, polynomials,
a weight set or a schedule. This design chose the following:

- All sizes except the 128-bit TRNG word.
- Both polynomials.
- The 2^-k weights and which LFSR bits make them.
- Direct LFSR-to-scan-input wiring, with no phase shifter.
- One chain at a time in the deterministic phase.
- Equal-length sub-circuit phases.
- Injecting the extra variables into the MSB in the first shift cycles.
- The SEED/PR/DET/UNLOAD/COMPARE order.
- Seeding the pseudorandom phase from the TRNG.

Clock disabling is written as a synchronous enable per chain. A netlist would
put an integrated clock-gating cell there. Not built:

- Selection of the degraded sub-circuits and of their weights. This is an
  offline procedure; here the masks and weights are inputs.
- Computation of the seeds, of the extra variables, and of how many extra
  variables are needed. This is also offline.

The ring oscillator model reproduces only the output of a multistage feedback
ring: a jittered square wave. It does not contain the stages or the feedback
paths between them, whose arrangement the published design does not spell out.
The published FPGA implementation reports 48 registers (40 flip-flops and 8
latches). This RTL is larger, at about 370 flip-flop bits plus 64 bits of seed
store. The 128-bit TRNG word register alone accounts for 128 of them, plus 137
more in the collector.

Because the TRNG seed is not known in advance, a golden signature for a
TRNG-seeded session must be computed after the seed appears on `prpg_seed`. The
end-to-end testbench does this. In a product one would use fixed seeds when a
pass/fail verdict is needed.
