# Pipelined wide adders for FPGAs (1024 to 8192 bits)

Public-key cryptography needs additions thousands of bits wide. A plain ripple-carry adder
of that length is far too slow. A classically pipelined one, cut into short adders with
registers between them, costs a great deal of area and latency.
This design takes another route. It never builds a carry chain longer than the FPGA's own
carry-chain group, and it joins the groups with a small parallel-prefix network. The default
configuration is a 2048-bit adder with a 6-cycle latency that accepts a new addition every
clock.

## The idea: segments aligned to carry-chain groups

The operands are cut into *segments* one bit shorter than a carry-chain group of the target
FPGA. With the 20-bit groups of the default `CHAIN = 20`, a segment is 19 bits. The carry out
of a segment's adder then fits in the chain as a twentieth bit and leaves it like any other sum
bit. A 2048-bit operand gives 108 segments: 107 of 19 bits and a last one of 15 bits.

For each segment two bits are formed:

* **G (generate)**: the carry out of `a_seg + b_seg`.
* **P (propagate)**: the carry out of `a_seg + b_seg + 1`. The segment passes on an incoming
  carry exactly when P is set.

The carry into segment `k+1` is the group generate of segments `0..k`. A prefix network
computes all of these at once from the (G,P) pairs with the operator
`(G,P)_hi o (G,P)_lo = (G_hi | P_hi & G_lo, P_hi & P_lo)`. Three details follow from this:

* The first segment has no carry in, so its P is never needed and is tied off.
* The last segment's pair is not needed, because the adder has no carry out.
* There are therefore `NSEG - 1` prefix nodes (107 by default).

Each output segment then adds the carry it receives to its own segment sum. Every carry chain
in the design is at most one segment long. The only logic that spans the full width is the
prefix network, which works on one bit pair per segment and is about 20 times narrower than
the operands.

## Block structure

```
 a,b ──► segment_gp ×NSEG ──(G,P)──► prefix_network ──carries──► segment_output ×NSEG ──► sum
              │                                                        ▲
              └──────── forwarded word ──► pipe_delay ×NSEG ───────────┘
```

| module | role |
|---|---|
| `wide_adder_pkg` | prefix topology enum; elaboration-time functions for network shape, register placement, and per-architecture stage counts and widths |
| `segment_gp` | per-segment G, P and the word forwarded to the output (architecture-dependent) |
| `prefix_network` | pipelined Brent-Kung / Han-Carlson / Kogge-Stone / Sklansky network |
| `pipe_delay` | register delay line; it balances the forwarded words and supplies the prefix network's pipeline registers |
| `segment_output` | per-segment registered output: sum + carry, or a carry-selected mux |
| `wide_adder` | top: instantiates and wires the above, and carries the valid tag |

## Segment architectures (`ARCH`)

The segment stage can be built in six ways. They trade how many operand-width words travel to
the output stage against how much logic sits in the input stage. Architecture 2 is the default,
because it gives the smallest adder.

| ARCH | input stage | P formed from | forwarded to output | output stage | input regs |
|---|---|---|---|---|---|
| 1 | G adder, P adder | `a+b+1` | both operands | `a + b + c` | 1 |
| **2** | G adder (keeps its sum), P adder | `a+b+1` | G adder's sum | `sum + c` | 1 |
| 3 | G adder, then an incrementer on its sum | `sum+1` | sum | `sum + c` | 2 |
| 4 | G adder, then an AND of all sum bits | `&sum` | sum | `sum + c` | 2 |
| 5 | G adder, P adder | `a+b+1` | both sums | `c ? sum_P : sum_G` | 1 |
| 6 | P adder, then decrement by 1 for G and the sum | `a+b+1` | sum | `sum + c` | 2 |

In architectures 3 and 4, P is only set when the segment sum is all ones. This "exclusive"
propagate can never be set together with G, since a 19-bit sum with a carry out is at most
`2^19 - 2`. The prefix rule `G | P & c` therefore gives the same carries. An immediate assertion in `segment_gp` checks this
exclusivity in simulation.

Architectures 1 and 5 delay two operand-width vectors to the output stage. The others delay
one, which is why they are smaller.

## Pipeline and timing

`LATENCY` is the total number of register stages from operands to sum. It is split as follows:

* **Segment stage:** 1 register for architectures 1, 2 and 5, or 2 for 3, 4 and 6. There are
  no registers in front of the first logic level.
* **Prefix network:** `LATENCY - input_regs - 1` registers. There must be at least one,
  which is checked at elaboration.
* **Output stage:** 1 register.

The forwarded words wait in `pipe_delay` for exactly as many cycles as the prefix network
takes.

The prefix network has D logic levels:

* Brent-Kung: `2*ceil(log2 N) - 1` levels (13 for 107 nodes).
* Han-Carlson: `ceil(log2 N) + 1` levels.
* Kogge-Stone and Sklansky: `ceil(log2 N)` levels.

Its S registers are placed by logic depth. Level `k` (0-based) is followed by
`floor((k+1)S/D) - floor(kS/D)` registers, so the banks sit at evenly spaced depths. The last
bank always sits at the network output. In the default configuration (Brent-Kung, 107 nodes,
S = 4), the banks follow levels 4, 7, 10 and 13. When S exceeds D, some levels get more than
one register.

Interface timing: operands presented with `in_valid` in cycle `t` produce `sum` with
`out_valid` in cycle `t + LATENCY`. A new addition can start every cycle; there is no stall
input.

## Interface and parameters

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous reset, clears the valid pipeline only |
| `in_valid` | in | 1 | `a`/`b` hold an addition |
| `a`, `b` | in | WIDTH | operands |
| `out_valid` | out | 1 | `sum` holds the result issued LATENCY cycles earlier |
| `sum` | out | WIDTH | `(a + b) mod 2^WIDTH` |

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 2048 | operand width |
| `CHAIN` | 20 | carry-chain group size; segments are `CHAIN-1` bits |
| `LATENCY` | 6 | total pipeline depth |
| `ARCH` | 2 | segment architecture, 1 to 6 |
| `PREFIX` | `PFX_BRENT_KUNG` | also `PFX_HAN_CARLSON`, `PFX_KOGGE_STONE`, `PFX_SKLANSKY` |

The published comparison covers widths of 1024 to 8192 bits, depths of 4, 6 and 8, and
groups of 20, 30 and 40 bits. All of these are legal settings.

## Choices made in this implementation

These points are not fixed by the published architecture:

* **No carry in or carry out.** The result is modulo 2^WIDTH.
* **A valid bit travels with the data.** It is the only reset flop chain. Data registers have
  no reset, as is usual for FPGA datapaths.
* **Register placement.** The prefix retiming is a simple even spread over logic depth. A
  real flow would let the synthesis tool retime further.
* **Architecture 4** registers its AND-tree P one cycle after G, like architecture 3.
* **Architecture 6** registers `a+b+1` and decrements it in the next cycle.
* **Network shapes for node counts that are not powers of two** use the standard textbook
  definitions.
* **Physical mapping is left to the synthesis tool.** The segment adders are plain `W`-bit
  additions, and each is expected to map onto one carry chain. The published results depend on
  this alignment and on the fitter placing each chain inside one logic block. Portable RTL
  cannot force either.
* **Chip-filling designs** (dozens of independent adders on one device) are only replication
  of `wide_adder`, so no separate module is provided.

## Verification

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`, and a watchdog
stops it if results stop arriving.

* `tb_wide_adder`: the default 2048-bit adder, with no parameter overrides.
  * Stimulus: 3000 additions, mostly back to back with random idle cycles.
  * Checks: every sum against the simulator's own 2048-bit addition, and the arrival exactly
    6 cycles after issue.
  * Carry mechanisms: the bench counts each one and fails if any never occurs. They are
    segment generates, carries crossing propagating segments, chains of 8 or more segments,
    and a carry rippling through all 107 segments (all ones + 1).
* `tb_wide_adder_configs`: all 24 combinations of ARCH and PREFIX at 300 bits, plus mixed
  settings at 1024 bits (depths 4, 6 and 8; groups of 20, 30 and 40 bits).
* `tb_wide_adder_sweep`: architecture 2 with Brent-Kung at the published sweep sizes. These
  are 1024, 4096 and 8192 bits at depths 4, 6 and 8, and 2048 bits with 30- and 40-bit groups.
* Unit benches:
  * `tb_segment_gp`: all architectures; exhaustive at 5 bits, random at 19 bits.
  * `tb_prefix_network`: all four topologies, 1 to 107 nodes, against a serial scan. It
    includes a case with more registers than logic levels.
  * `tb_segment_output`
  * `tb_pipe_delay`

Each bench was also run against a copy of its module with a deliberate bug, and each one
failed.

Not verified: timing, area and placement. These are properties of an FPGA implementation
flow, not of this RTL.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/wide_adder_pkg.sv tb/tb_wide_adder.sv --top-module tb_wide_adder -o sim
./obj_dir/sim
```

Replace `tb_wide_adder` with any other testbench name. To try another configuration,
override the parameters on the instance, for example
`wide_adder #(.WIDTH(4096), .LATENCY(8), .PREFIX(wide_adder_pkg::PFX_KOGGE_STONE))`.
