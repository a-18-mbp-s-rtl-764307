# Radix-4, dual-path, parallel turbo decoder (8 states, rate 1/2, 212-bit blocks)

Turbo codes correct errors close to channel capacity, but a conventional
decoder is slow: two MAP (maximum a posteriori) decoders take turns, each one
sweeps the block forward and then backward, and this repeats for several
iterations. For real-time links the decoding latency is the problem. This RTL
implements a decoder that removes most of that latency with four measures
taken together:

1. **Radix-4 trellis** – two information bits are decoded per trellis step, so
   a 212-bit block is 106 steps instead of 212.
2. **Dual-path processing** – the forward (alpha) and backward (beta)
   recursions run at the same time from the two ends of the block. When they
   meet in the middle, each keeps going into the other half and produces LLRs
   there, using the metrics the other path stored on its way in.
3. **Parallel turbo decoding** – the two component decoders run at the same
   time, each using the extrinsic information the other produced in the
   previous iteration, instead of one after the other.
4. **Hard-decision-aided (HDA) early stop** – after each iteration the hard
   decisions of both decoders are compared; when they agree on the whole block,
   decoding ends.

The architecture, the unit partitioning (R4FBMu, R4BBMu, R4FSMu, R4BSMu,
FLLRu, BLLRu, ALU, RAMs), the memory sizes (128 x 32, 64 x 72, 128 x 36) and
the fixed-point widths (8-bit samples, 9-bit metrics and LLRs) follow the
published design "A 18-Mbp/s, 8-State, High-Speed Turbo Decoder" (Jung, Kim,
Jeong). That publication does not give the component code polynomials, the
interleaver, the arithmetic form, the cycle schedule or any interface; those
are choices made here and are listed in [Departures and own choices](#departures-and-own-choices).

With the defaults, one iteration takes N/2 + 2 = 108 clock cycles; three
iterations take 324 cycles, i.e. 0.65 bit per cycle.

## The code as the decoder sees it

Each component encoder is an 8-state recursive systematic convolutional code,
feedback 1 + D^2 + D^3 and parity 1 + D + D^3 (13/15 octal). The state is
`{r1, r2, r3}` with `r1` the newest register. The turbo code has two such
encoders. The second one is fed the information **symbols** (bit pairs) in
interleaved order; bits are never separated from their pair partner, which is
what lets both decoders work radix-4.

One radix-4 step consumes the pair `(d1, d2)`, `d1` first in time:

| name | meaning |
|------|---------|
| `p = 2*d2 + d1` | pair index, also the index of `Ex0..Ex3` and `LLR0..LLR3` |
| `c = {x1, y1, x2, y2}` | the four code bits of a branch; `bm0000` .. `bm1111` |
| `I1, I2` | received systematic samples of `d1`, `d2` |
| `Q1, Q2` | received parity samples of the two bits |

The radix-4 trellis is made by chaining two radix-2 steps (`r4_next`,
`r4_cw` in `turbo_pkg`). Each of the 8 states has 4 successors and 4
predecessors.

All arithmetic is the max-log form of the MAP algorithm:

```
bm[c]        = x1*I1 + y1*Q1 + x2*I2 + y2*Q2 + Ex[2*x2 + x1]          (9-bit sat.)
alpha_k+2(m) = max over (m', p) -> m  of  alpha_k(m') + bm[c(m', p)]
beta_k(m)    = max over p            of  beta_k+2(next(m, p)) + bm[c(m, p)]
lambda(p)    = max over m of alpha_k(m) + bm[c(m, p)] + beta_k+2(next(m, p))
LLR[p]       = lambda(p) - lambda(0)                                   (9-bit sat.)
```

A positive sample means "bit = 1 more likely". Only the 1-bits of a codeword
add their sample; this differs from the full correlation by a term common to
all branches, which max-log ignores. After every step the eight new state
metrics have their maximum subtracted (the best state is 0) and are saturated
to the 9-bit range, so all metrics lie in [-256, 0].

## Dual-path schedule (the core of `r4_map`)

A pass over a block of NS = N/2 symbols takes NS clock cycles, split into two
halves of H = NS/2 cycles:

```
symbol index      0 .................. H-1 | H .................. NS-1
first half        alpha  ---->  (stored)   |   (stored)  <----  beta
                  R4FSMu, R4FSM_RAM[t]     |   R4BSMu, R4BSM_RAM[H-1-t]
second half       <----  beta + LLR        |   alpha + LLR  ---->
                  BLLRu: beta running,     |   FLLRu: alpha running,
                  alpha from R4FSM_RAM     |   beta from R4BSM_RAM
```

* Cycle t of the first half: the forward path works on symbol t, writes the
  alpha it starts from into `R4FSM_RAM[t]`; the backward path works on symbol
  NS-1-t and writes the beta it starts from into `R4BSM_RAM[H-1-t]`.
* Cycle t of the second half: the forward path works on symbol H+t, reads
  beta from `R4BSM_RAM[t]` and the forward LLR unit outputs that symbol's LLRs;
  the backward path works on symbol H-1-t, reads alpha from `R4FSM_RAM[H-1-t]`
  and the backward LLR unit outputs that symbol's LLRs.

So every symbol gets its LLRs exactly once, two symbols per cycle, and each
state-metric RAM holds only half a block (53 of 64 words, 8 x 9 bits each).
Branch metrics are computed on the fly by the forward and backward branch
metric units from the sample and a-priori words read in that cycle; they are
never stored.

The forward recursion starts in state 0. The backward recursion starts in
state 0 for decoder 1 (encoder 1 is assumed terminated) and with all states
equal for decoder 2 (the second encoder is not terminated), chosen by the
`BETA_UNIFORM` parameter.

## One turbo iteration (`turbo_decoder_top`)

```
        rx_* ──► RAM 128x32 (fwd copy) ─┐                ┌─► ALU ─► ext RAM 128x36 (bank 0/1) ─┐
                 RAM 128x32 (bwd copy) ─┴─► MAP 1 ───────┤                                     │
                                               ▲         └─► ALU ─┘                            │
                                               └──────── a-priori from MAP 2's ext RAM ◄───────┼──┐
                                                                                               │  │
        rx_* ──► RAM 128x32 x2 ──(addresses pi(j))──► MAP 2 ──► ALUs ─► ext RAM 128x36 x2 ──────┘──┘
                                                        ▲            (addresses pi(j))
                                                        └── a-priori from MAP 1's ext RAM (addresses pi(j))
        LLRs and hard decisions of both MAPs ──► HDA compare, LLR-sum decision
```

* **Addressing.** All memories are in natural symbol order. Decoder 1 uses the
  schedule's symbol indices directly; decoder 2, working on its j-th symbol,
  reads and writes every memory at `pi(j)` (`sym_interleaver`). That single
  mapping performs both interleaving (reads) and deinterleaving (writes of its
  extrinsic output).
* **Received RAMs.** The receiver writes, for each natural-order symbol k, the
  two systematic samples, encoder 1's two parity samples, and the two parity
  samples encoder 2 produced when it consumed symbol k. Punctured samples are
  written as 0. Each decoder has two copies of its 128 x 32 RAM, one per path,
  so both paths read in the same cycle.
* **ALU "LLR - ICH - EX".** From each LLR set the ALU subtracts the
  systematic channel part (`p[0]*I1 + p[1]*I2`) and the a-priori value the
  decoder was given; the rest is the extrinsic value for the other decoder,
  four 9-bit values per symbol (36 bits, `Ex0` always 0).
* **Ping-pong extrinsic RAMs.** Each decoder owns two 128 x 36 RAMs. In
  iteration i it writes bank `i mod 2` while the other decoder reads bank
  `(i+1) mod 2`, written in iteration i-1. In the first iteration the a-priori
  input is forced to zero. Because both LLR units write in the same cycle and
  both paths of the other decoder read in the same cycle, each of these RAMs
  has two write and two read ports.
* **Early stop.** `hda_early_stop` keeps both decoders' hard pair decisions
  per symbol; after the last LLR of an iteration, `match` says whether they
  agree everywhere. With `early_stop_en` high, agreement ends decoding;
  otherwise the decoder always runs `MAX_ITER` iterations.
* **Decoded output.** `llr_sum_decision` keeps both decoders' LLRs; the
  decoded pair of a symbol is the `p` with the largest `L1(p) + L2(p)`.

## Interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `rx_we`, `rx_addr` | in | 1, 7 | write the received word of natural symbol `rx_addr` |
| `rx_i1`, `rx_i2` | in | 8 | systematic samples (two's complement) |
| `rx_p1a`, `rx_p1b` | in | 8 | encoder 1 parity samples of the two bits |
| `rx_p2a`, `rx_p2b` | in | 8 | encoder 2 parity samples of the step that took this symbol |
| `start` | in | 1 | start decoding (ignored while `busy`) |
| `early_stop_en` | in | 1 | allow HDA early stop |
| `busy`, `done` | out | 1 | running; one-cycle pulse at the end |
| `iters_used`, `early_stopped` | out | 8, 1 | result of the last block |
| `hda_mismatches` | out | 8 | symbols on which the two decoders currently disagree |
| `dec_addr`, `dec_pair` | in, out | 7, 2 | decoded pair `{d2, d1}` of symbol `dec_addr` (combinational) |
| `dec_llr_sum` | out | 4 x 10 | summed LLRs of that symbol |

Use: with `busy` low, write all NS symbols (one per cycle), pulse `start`,
wait for `done`, read the NS decoded pairs. `done` rises
`iterations x (NS + 2)` cycles after the clock edge that samples `start`
(108, 216 or 324 cycles for 212-bit blocks). Loading and reading are not
overlapped with decoding.

Parameters of the top: `N` (212, a multiple of 4, at most 256 with the default
RAM depths), `MAX_ITER` (3), `IL_A`/`IL_B` (interleaver, 31/7, `IL_A` coprime
with N/2), `RX_DEPTH`/`EXT_DEPTH` (128), `SM_DEPTH` (64, at least N/4). The
word widths (8/9/9/9 bits) and the code polynomials are constants in
`turbo_pkg`.

## Files

| file | unit |
|------|------|
| `rtl/turbo_pkg.sv` | widths, types, trellis functions, saturation |
| `rtl/turbo_decoder_top.sv` | the whole decoder |
| `rtl/turbo_ctrl.sv` | iteration / phase schedule |
| `rtl/r4_map.sv` | one radix-4 dual-path MAP decoder |
| `rtl/r4_bmu.sv` | branch metric unit (forward and backward instances) |
| `rtl/r4_fsmu.sv`, `rtl/r4_bsmu.sv` | forward / backward state metric units |
| `rtl/r4_llru.sv` | LLR unit (forward and backward instances) |
| `rtl/ext_alu.sv` | extrinsic ALU |
| `rtl/dp_ram.sv` | 1-write 1-read RAM (state metrics, received samples) |
| `rtl/ext_ram.sv` | 2-write 2-read extrinsic RAM |
| `rtl/sym_interleaver.sv` | symbol interleaver address |
| `rtl/hda_early_stop.sv` | decision stores and agreement check |
| `rtl/llr_sum_decision.sv` | LLR stores and summed decision |
| `tb/tb_ref_pkg.sv` | reference encoder and max-log model for the testbenches |
| `tb/tb_<unit>.sv` | one self-checking testbench per unit |
| `tb/tb_turbo_harness.sv` | parameterised end-to-end bench body used by the workload runs |
| `tb/tb_workload_early_stop.sv`, `tb/tb_workload_block_sizes.sv` | workload runs (below) |

## Verification

Every unit has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. The arithmetic units (`r4_bmu`, `r4_fsmu`,
`r4_bsmu`, `r4_llru`, `ext_alu`) and `r4_map` are compared exactly with a
reference written separately in `tb_ref_pkg`. That reference walks the
radix-2 encoder two bits at a time rather than using the RTL's radix-4
functions. `tb_r4_map` runs whole 106-symbol blocks through both starting
rules and checks every LLR from both LLR units.

`tb_turbo_decoder_top` runs the full-size decoder (no parameter overrides). It
contains its own turbo encoder, rate-1/2 puncturing and a noisy channel
(amplitude 32, approximately Gaussian noise). Results with the defaults, 25
blocks of 212 bits per point, three iterations:

| Eb/N0 | raw systematic bit errors | decoded bit errors |
|-------|---------------------------|--------------------|
| 4 dB  | 280 | 0 |
| 2 dB  | 523 | 12 |
| 1 dB  | 689 | 282 |

It also checks: noise-free blocks stop after one iteration with early stop
and run three without; the latency formula; that an early stop never leaves
disagreeing decisions. It counts that early stops, runs to the iteration
limit and errors removed by later iterations all occurred. These BER figures
are for the simple linear interleaver used here and are not comparable with
published curves for random interleavers.

Simulating with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl --top-module tb_turbo_decoder_top \
    rtl/turbo_pkg.sv tb/tb_ref_pkg.sv tb/tb_turbo_decoder_top.sv -o sim
./obj_dir/sim
```

Replace the top module and file for any other testbench (add `-y tb` for the
two workload testbenches, which share `tb/tb_turbo_harness.sv`). Each run
takes well under a second of simulation.

### Workload runs

`tb_workload_early_stop` repeats the early-stop experiment of the published
work: iteration limit 8 (`MAX_ITER = 8`), 212-bit blocks, 40 blocks per point.

| Eb/N0 | average iterations (this RTL) | published average | saving vs. 8 iterations |
|-------|-------------------------------|-------------------|-------------------------|
| 1 dB   | 6.07 | 6.21 | 25 % |
| 1.5 dB | 4.72 | 4.31 | 41 % |
| 2 dB   | 3.62 | 2.83 | 55 % |

The published block size for this experiment is not stated, and the
interleaver differs, so only the trend is expected to match.

`tb_workload_block_sizes` runs 100-bit, 256-bit and 512-bit blocks at 2 to
3 dB (sigma 25.42, 24.00, 22.65 for amplitude 32), 20 blocks per point, with
all checks of the harness (latency, early-stop consistency, noise-free
decoding). 256 bits is the largest block the default memories hold; the
512-bit run doubles them (`RX_DEPTH = EXT_DEPTH = 256`, `SM_DEPTH = 128`).
Decoded bit errors with 3 iterations:

| block | 2 dB | 2.5 dB | 3 dB |
|-------|------|--------|------|
| 100 bits | 29 / 2000 | 0 / 2000 | 0 / 2000 |
| 256 bits | 27 / 5120 | 0 / 5120 | 0 / 5120 |
| 512 bits | 19 / 10240 | 2 / 10240 | 0 / 10240 |

These sizes stand in for the interleaver-size study of the original work,
which used a 4-state (7, 5) code; this RTL is built for the 8-state code
only, so that code was not run.

## Departures and own choices

* **Arithmetic.** The published equations are in the probability domain; this
  RTL uses max-log (add-compare-select) with 9-bit saturation and
  max-normalisation. Log-MAP correction terms are not implemented.
* **Code.** The 8-state polynomials 13/15 octal are chosen here; the source
  gives polynomials only for a 4-state example.
* **Interleaver.** The source uses a random symbol interleaver without giving
  it. Here `pi(j) = (31 j + 7) mod 106` is computed by logic. A real
  deployment should substitute its own permutation (any bijection works as
  long as the encoder uses the same one); linear interleavers give a weaker
  code.
* **Extrinsic RAMs** have four ports and are used in ping-pong pairs. The
  source calls them dual-port and does not explain how two decoders read and
  write them in the same iteration.
* **Termination.** Encoder 1 is assumed terminated in state 0 (the last three
  information bits are chosen to reach it, as the testbench does); encoder 2
  is left open. The source starts every backward recursion in state 0.
* **Puncturing and modulation.** Rate 1/2 is reached by writing punctured
  parities as 0; the decoder accepts any pattern. QPSK is taken as I =
  systematic, Q = parity.
* **Speed.** One radix-4 step per cycle per path gives 324 cycles for three
  iterations. The published FPGA needs about 662 cycles at 18 ns (17.78 Mb/s)
  for the same case; its cycle schedule is not described, so no attempt is
  made to match it. The memories here are read asynchronously (distributed-RAM
  style), and the step logic is one long combinational path; a fast ASIC or
  FPGA implementation would pipeline it.
* **Channel scaling.** The parallel decoder structure of the source scales the
  systematic input by 2A/sigma^2 and delays decoder inputs to line them up
  with the outputs for the extrinsic subtraction. Max-log decoding is
  unaffected by a common scale, so no scaling is applied. The ALU gets the
  a-priori and channel values in the same cycle as the LLRs, so no delay
  line is needed.
* **Block sizes.** N must be a multiple of 4 and at most 256 bits with the
  default memory depths; larger blocks need deeper RAMs (`RX_DEPTH`,
  `EXT_DEPTH` >= N/2, `SM_DEPTH` >= N/4).
* **Not included:** the FPGA test board parts (clock generator, SRAM and DRAM
  chips) and the C-language test environment of the original work; the
  radix-2 and serial baseline decoders it was compared with.
