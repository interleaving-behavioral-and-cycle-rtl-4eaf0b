# Statically scheduled pipelines: quadratic roots, Fibonacci with forwarding, Montgomery products, Gouraud spans

This is a set of small FPGA accelerators. Each is a datapath with a fixed,
compile-time schedule. Every operation has its own cycle (its *stage*, and
within a stage its *step*), and the controller simply follows the
schedule. There is no dynamic hazard detection. A pipeline with initiation
interval **II** takes a new input every II cycles and runs each of its
stages for II cycles.

The circuits follow the examples and case studies of Coutinho, Jiang and Luk,
*Interleaving Behavioral and Cycle-Accurate Descriptions for Reconfigurable
Hardware Compilation*. There, a source-level scheduler produces such
pipelines from C-like code. The techniques that scheduler uses are the ones
these circuits show in hardware:

| technique | where it appears here |
|---|---|
| fully pipelined schedule (II = 1) | `quadratic_solutions` (II = 1), `fib_pipe`, `montmult`, `gshade` |
| pipelined resources with a fixed latency | `pipe_mult` (6-cycle multiplier) |
| resource sharing: one unit used in two steps of a stage | `quadratic_solutions` with II = 2 |
| operation chaining: dependent operations in one cycle, no register between | `quadratic_solutions` with II = 2 (shift and subtract) |
| forwarding for a loop-carried dependency | `fib_pipe` |
| two loads of one array merged through a shift register | `fib_pipe` |

Everything is plain synthesizable SystemVerilog-2017, in `rtl/`, one module
per file.

## The quadratic-roots pipeline (`quadratic_solutions`)

It gives the number of real roots of a·x² + b·x + c, `num_sol` = 2, 1 or 0
as δ = b·b − 4·a·c is positive, zero or negative. The arithmetic is 32-bit
two's complement that wraps around, so very large coefficients give the
sign of the wrapped δ. The multiplications go to `pipe_mult` units with a
latency of 6. The parameter `II` selects one of two schedules of the same
computation.

**II = 1, two multipliers.** A new (a, b, c) every cycle. An input taken at
clock edge *k* moves through these stages:

| edge | stage | work |
|---|---|---|
| k | 0 | register a, b, c |
| k+1 … k+6 | 1–6 | multiplier 0 forms b·b, multiplier 1 forms a·c |
| k+7 | 7 | tmp0 ← b·b, tmp1 ← (a·c) << 2 |
| k+8 | 8 | tmp2 ← tmp0 − tmp1 (= δ) |
| k+9 | 9 | num_sol, delta, out_valid |

**II = 2, one shared multiplier.** Each stage now lasts two cycles (steps 0
and 1). The single multiplier takes b·b in the cycle after the input is
taken and a·c in the next cycle. The products leave it on consecutive
cycles. b·b is registered first. In the following cycle a·c is shifted
and subtracted from it, chained in one cycle with no register between the
shift and the subtraction. The decision is written at the next stage
boundary, edge k+10. An input is accepted at most every other cycle:
`in_ready` is low in the cycle after an input was taken. The shared version
needs half the multipliers and has half the throughput.

In general the result appears `align_up(LAT + 3, II)` edges after the input
(`haydn_pkg::align_up` rounds up to a multiple of II).

`in_valid`/`in_ready` on the input and a one-cycle `out_valid` pulse on the
output are this design's handshake. The output has no back-pressure, as
usual for a statically scheduled pipeline.

## The Fibonacci pipeline (`fib_pipe`, `dp_ram`)

The loop `x[i+2] = x[i+1] + x[i]` runs over an array held in **one**
dual-port block RAM (`dp_ram`, 32 × 512). The RAM is configured
*read-before-write*: a read of a word that is written at the same clock edge
returns the old word. A straightforward schedule needs two loads and a
store per iteration, three accesses for two ports. The pipeline starts one
iteration per cycle with two changes:

* **Load merging.** x[i+1], loaded by iteration i, is the x[i] of iteration
  i+1. So each iteration loads only x[i], and a one-word shift register keeps
  it for one more cycle. When iteration i reaches stage 2, the word just
  loaded is x[i+1] (from iteration i+1) and the shift register holds x[i].
  One extra load, of x[n], ends the run.
* **Forwarding.** The store of x[i+2] is in stage 2 and the load of x[i+2]
  (by iteration i+2) is in stage 0. The store-to-load distance of two stages
  equals the loop-carried distance of two iterations, so both meet in the
  same cycle at the same address. The RAM returns the old word there, so a
  forwarding register hands the stored sum to the load path one cycle later.
  After the first two words every load is forwarded. `fwd_count` reports how
  many loads were forwarded.

Timing, with `start` sampled at edge 0. Iteration i issues its load in
cycle i+1 (the cycle ending at edge i+1) and stores in cycle i+3. In the
steady state one cycle, say cycle t = i+3, holds three iterations:

| iteration | stage | what happens in cycle t |
|---|---|---|
| i+2 | 0 | port B address = i+2 (the word stored in this same cycle) |
| i+1 | 1 | load path carries x[i+1] (forwarded), shift register holds x[i] |
| i | 2 | port A stores x[i+2] = x[i+1] + x[i] at address i+2; forwarding register captures it |

Use: while `busy` is low the host port owns RAM port A. Write x[0] and x[1],
then pulse `start` with `n_iter` = n. `done` pulses n + 2 cycles after
`start` was sampled, and x[2] … x[n+1] can then be read back through the host
port (read data one cycle after the address). n must not exceed 510.
Values wrap at 32 bits.

## Montgomery multiplier (`montmult`)

It computes P = A·B·2⁻ᴺ mod M for an odd M and A, B < M, with N = 32 by
default (8 is the other operand size of the case study). It uses the radix-2
algorithm, fully unrolled. Stage j adds B if bit j of A is set, adds M if
the sum is odd, and halves. A final stage subtracts M once if the result
reached M. A product starts every cycle and leaves N edges later.

The algorithm variant is this design's choice. It uses plain ripple adders,
not the carry-save form of the complexity-reduced algorithm the case study
cites, and is about 3,700 flip-flops at N = 32. The original publication
gives only the operand sizes and performance figures.

## Gouraud span shader (`gshade`)

Along one horizontal span of a Gouraud-shaded polygon each colour channel
changes linearly. Each channel therefore has an accumulator with 8 integer
and 8 fraction bits, and it adds a signed per-pixel increment every cycle,
one pixel per cycle. `CH = 3` gives 24-bit RGB pixels (the default) and
`CH = 1` gives 8-bit pixels, the two sizes of the case study. The
interpolation scheme, fixed-point format and interface are this design's
own. The host supplies the start colour, the increment and the span length
(edge walking and triangle setup are not included). The accumulator wraps,
so the increment must keep the span in range.

## The multiplier resource (`pipe_mult`)

A fully pipelined multiplier (a new operand pair every cycle) with latency
`LAT` (default 6). Operands sampled at edge e give the product, low `WIDTH`
bits, after edge e + LAT − 1. The multiply sits in the first register stage
and the rest only delay it. The FPGA flow is expected to retime the registers
into the multiplier.

## Top level (`haydn_top`)

The four circuits sit side by side and share only `clk` and `rst_n`. Each
keeps its own ports, prefixed `quad_`, `fib_`, `mm_` and `gs_`. Nothing
connects them: in the original work each case study is a separate FPGA
configuration driven by a host program over PCI, and that host is not part
of this RTL. All resets are synchronous and active low.

Synthesised with all parameters at their defaults (generic coarse
synthesis, no FPGA mapping), the top has about 430 word-level cells, 4,100
flip-flop bits and 16,896 memory bits. Most of the flip-flops are in the
Montgomery pipeline. 16,384 of the memory bits are the Fibonacci RAM; the
rest are the multipliers' delay lines, which synthesis keeps as memories.

## Departures and limits

* The II = 2 quadratic schedule was reconstructed from the published stage
  listing. It matches the listed stages: b·b available at stage 3 step 1,
  the chained shift and subtract at stage 4, and the result at stage 5.
* The published listings store δ in a signed variable in one place and in an
  unsigned temporary compared with `> 0` in another. This RTL uses the
  signed comparison, which gives the meaning "two roots when δ > 0".
* Word width 32 and depth 512 of the Fibonacci RAM are choices. The width
  matches the reported throughput of one 32-bit word per cycle. The
  non-pipelined Fibonacci variant (II = 7) is not included.
* Interfaces, handshakes and reset behaviour are this design's own
  throughout.
* The free-form-deformation and 1-D DCT case studies are not included. Their
  algorithms, transform sizes and number formats are not given.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Results are compared with models written in
the testbench, and latencies and throughputs are checked. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/haydn_pkg.sv tb/tb_fib_pipe.sv --top-module tb_fib_pipe -o sim
./obj_dir/sim
```

| testbench | what it runs |
|---|---|
| `tb_pipe_mult` | random operands every cycle, latencies 6 and 3 |
| `tb_quadratic_solutions` | both schedules side by side; every root count; latency 9 / 10; throughput 1 / ½ per cycle |
| `tb_dp_ram` | random two-port traffic with same-address collisions, read-before-write on both ports |
| `tb_fib_pipe` | runs of 0, 1, 2, 10, 20 and 510 iterations; n + 2 cycles per run; forwarded-load count |
| `tb_montmult` | N = 32 and N = 8, random odd moduli, property P·2ᴺ ≡ A·B (mod M), P < M |
| `tb_gshade` | 3- and 1-channel spans of 1 to 40 pixels against exact integer interpolation |
| `tb_haydn_top` | two tops (II = 1 and II = 2) running all four circuits at once; every mechanism counted |
| `tb_haydn_full` | one top with every parameter at its default, a complete run of all four circuits |

`tb/haydn_top_driver.sv` is the host model and checker that the two top-level
testbenches share. `tb/haydn_top_bench.sv` pairs it with one top. They count
back-to-back pipeline inputs, inputs held off by the shared multiplier,
forwarded loads, Montgomery final subtractions and span ends, and fail if any
of them never occurred.

The simulator used has two-valued logic. Every register that is read is
reset. The memory is not reset, but it is only read after it has been
written.
