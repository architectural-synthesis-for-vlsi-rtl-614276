# A multiple-bus, multiple-unit neural network processor

A feed-forward neural network does the same work every time it runs: the same
weights meet the same neuron values in the same order. This processor relies
on that. A network is compiled ahead of time into a fixed schedule that says,
for every clock cycle, which register-file word goes onto which bus, which
functional unit (FU) computes what, and where each result is stored. The
hardware has no instruction decoding, branches or bus arbitration. It is a set
of busses, register files and arithmetic units driven by a microcode store that
plays the schedule back one cycle at a time.

One processor (PE) holds a small network. Larger or faster networks are cut
into partitions of the same shape, one per PE. The PEs sit in a ring, all run
the same microcode in lock step (SIMD), and pass neuron values to their
neighbour over a short systolic link.

The default configuration is the three-bus, two-MAC processor of the XOR
example, with the word sizes of the processor chip: 512 x 16-bit register
files, a 16 x 9-bit Booth multiplier and a 25-bit adder.

## The cycle: one read phase, one write phase

The architecture uses a two-phase clock. In phase 1 (read) each bus carries
one word from its register file into the input latches of the FUs. In phase 2
(write) each bus carries one FU result, or one word from an input unit, back
into a register file and/or out through an output unit. In this RTL the two
phases are folded into one synchronous clock cycle:

* the read path is combinational: microcode word → register-file address →
  bus → FU operand;
* the write happens at the clock edge that ends the cycle. A word written in
  cycle *t* can be read in cycle *t + 1*.

So a cycle is the read path, the FU's combinational part and the write-back
together. That matches the cycle-time budget of read time + write time + FU
delay.

Each bus carries one word per phase. Several FUs may take the same word in one
read phase, which is a **broadcast**: the XOR schedule reads the input x1 into
both MACs at once, and the threshold constant into both threshold steps.
The compiler, here the testbench assembler, must never put two words on one
bus in one phase.

### Microcode words

`ucode_controller` holds two RAMs of `UDEPTH = 2048` words, indexed by cycle.

| word | fields (per unit) |
|------|-------------------|
| read word `rd_word_t` | per FU: `op`, local register `lr`, bus selects `sel1`/`sel2` of its two input latches; per bus: register-file read `addr` and `idx` (add the comparator's offset); per input unit: `in_cap` |
| write word `wr_word_t` | per bus: source (`0` none, `1..NFU` an FU, `NFU+1..` an input unit), `we`, write `addr`; per output unit: `en` and the bus `sel` it captures |

A schedule is straight-line code. `start` runs words `0 .. prog_len-1` once,
one per clock. `busy` is high for exactly `prog_len` cycles and `done` pulses
once after them. While idle the controller issues all-zero words, which are
no-ops. The microcode and the register files are loaded through host ports
while the PE is idle.

## The multi-purpose MAC (`mac_unit`)

Each MAC has a Booth multiplier, one carry-lookahead adder and a threshold
block. It also has `NLR = 2` local accumulator registers, so two neurons can be
interleaved on one MAC.

| op | latency (issue cycle = 1) | result |
|----|---------------------------|--------|
| `ADD`, `SUB` | 1 | in1 ± in2, saturated |
| `THRESH` | 1 | 1.0 if in1 > in2, else 0 (hard threshold, strict) |
| `HLIM` | 1 | +in2 if in1 > 0, else −in2 (hard limiter) |
| `CLIP` | 1 | in1 limited to ±\|in2\| (linear region of a piecewise sigmoid) |
| `MULT` | 2 | in1 × coef(in2) |
| `MA_ACC` | 3 | lr += in1 × coef(in2), no output |
| `MA_OUT` | 3 | out = lr + in1 × coef(in2), lr cleared |
| `ACC_LD` | — | lr = in1 (for a bias or a partial sum) |

A one-cycle result goes onto a bus in the write phase of its issue cycle. A
`MULT` result appears in the next cycle, and an `MA_OUT` result two cycles
after issue. The multiplier has two pipeline stages, and the accumulation uses
the adder in a third stage. A neuron's sum is built by issuing `MA_ACC` for all
of its inputs but the last, then `MA_OUT` for the last one.

**Number formats.** Data words are Q8.8, which is 16 bits. A coefficient
(weight) is the low 9 bits of the second operand, read as Q2.7, so its range is
−2 .. +1.99. A product is Q10.15 in 25 bits, and so is the accumulator. Outputs
are scaled back to Q8.8 with saturation. The adder also saturates the
accumulator on overflow.

The scheduler must keep the shared adder free: an `ADD`/`SUB` may not be issued
in the cycle where an MA is in its accumulation stage. It must also produce at
most one result per cycle per MAC. The RTL checks both rules with assertions.

## Winner-take-all and indexed addressing (`wta_comparator`)

The comparator FU finds the largest of a set of neuron values, one per cycle.
`CMP_FIRST` starts a search with the first value and takes, in its second
operand, the block stride *n*. Each `CMP_NEXT` compares a new value. The
comparator tracks the winner's index *k* and outputs `k * n`, registered, as an
address offset. A register-file read with `idx = 1` adds that offset. The
weight block of the winning neuron, stored at `base + k * n`, can then be read
with a fixed microcode address. This is how competitive-learning layers select
a winner's weights without any branching. Ties keep the earlier candidate.

## I/O units and the systolic ring

* `in_port`: in a cycle where its capture bit is set, the unit passes its
  external word to a bus in that write phase, and holds it for later cycles.
* `out_port`: captures one write bus value. `ext_valid` pulses in the next
  cycle.
* `oi_link`: a `LINK_DELAY`-cycle pipeline from output unit 0 of PE *i* to input
  unit 0 of PE *(i+1) mod NPE*. A value captured for output in cycle *t* can be
  captured at the neighbour's input in cycle *t + 1 + LINK_DELAY*.
* Output and input unit 1 of every PE are brought out of the array as
  `ext_out[p]` and `ext_in[p]`.

`nn_systolic_array` (the top) broadcasts the microcode, `prog_len` and `start`
to all PEs, and addresses register-file loads to one PE with `host_pe`.

## Example: XOR in 10 cycles

This 2-2-1 threshold network runs on one PE, and both MACs work in parallel on
the hidden layer:

| cycle | MAC 0 | MAC 1 | write phase |
|-------|-------|-------|-------------|
| 0 | MA_ACC x1·w11 | MA_ACC x1·w12 (x1 broadcast) | |
| 1 | MA_OUT x2·w21 | MA_OUT x2·w22 | |
| 3 | | | xt1 → RF1, xt2 → RF2 |
| 4 | THRESH xt1 > c | THRESH xt2 > c (c broadcast) | t1 → RF0, t2 → RF1 |
| 5 | MA_ACC t1·v1 | | |
| 6 | MA_OUT t2·v2 | | |
| 8 | | | zt → RF2 |
| 9 | THRESH zt > c | | z → RF0 and output unit 1 |

The weights are w11 = −0.7, w21 = 0.5, w12 = 0.3, w22 = −0.8, v1 = 0.4,
v2 = 0.6 and c = 0. The threshold must be strict (a sum of exactly 0 gives 0),
or input (0,0) would give 1.

## Files

| file | block |
|------|-------|
| `rtl/nnp_pkg.sv` | sizes, number formats, FU op codes, microcode word layout |
| `rtl/booth_mult.sv` | radix-4 Booth multiplier, 16 x 9, two stages |
| `rtl/cla_adder.sv` | 25-bit parallel-prefix carry-lookahead adder |
| `rtl/mac_unit.sv` | multi-purpose MAC with local registers and threshold block |
| `rtl/wta_comparator.sv` | winner-take-all comparator, offset for indexed addressing |
| `rtl/regfile.sv` | 512 x 16 register file, one per bus, with a host port |
| `rtl/bus_interconnect.sv` | bus multiplexing between register files, FUs and I/O units |
| `rtl/ucode_controller.sv` | read/write-phase microcode store and sequencer |
| `rtl/in_port.sv`, `rtl/out_port.sv` | input and output units |
| `rtl/oi_link.sv` | systolic output-to-input link |
| `rtl/nn_processor.sv` | one PE |
| `rtl/nn_systolic_array.sv` | top: ring of `NPE` PEs |

Main parameters (`nnp_pkg`): `NB = 3` busses, `NMAC = 2`, `NCMP = 1`, `NLR = 2`,
`NIN = NOUT = 2`, `RF_WORDS = 512`, `UDEPTH = 2048`. The array parameters are
`NPE = 2` and `LINK_DELAY = 1`.

## Capacity

At its defaults a PE holds 3 × 512 = 1536 words and runs schedules of up to
2048 cycles. Counting weights, neuron values and constants, the following fit
in one PE, at a few hundred cycles each (measured below):

* 6-21-12-1 (about 460 words);
* 40-10-1 (about 470 words);
* 16-5-9-4 (about 210 words);
* 64-8-1 (about 600 words);
* 12-12-12 (about 340 words).

24-24-24 fits on the default two PEs, at about 650 words each. NETtalk
(203-60-26, 13 740 weights) needs the array built with `NPE = 16`, at about
1150 words per PE. At the default `NPE = 2` it does not fit.

## Where this RTL departs from or fills in the architecture

* **Clocking.** The two clock phases are folded into one edge-triggered cycle,
  with a combinational read and a write at the edge.
* **Threshold equality.** `THRESH` is strict (`>`). A `>=` threshold would make
  XOR(0,0) = 1 with the weights above.
* **Activation functions.** The sigmoid is not tabulated. A piecewise-linear
  sigmoid is built from `ADD`, `MULT` and `CLIP`, and a hard limiter is `HLIM`.
  A lookup-table unit is not included.
* **Separate multiplier and adder units.** The alternative of separate
  multiplier and adder FUs is not built. Only the combined MAC is.
* **Choices of this design.** The number formats (binary point positions),
  saturation, `ACC_LD`, the comparator's `CMP_FIRST`/`CMP_NEXT` protocol, the
  host load ports, the `start`/`busy`/`done` handshake and the ring wiring on
  I/O unit 0 are choices of this design.
* **Not built.** The chip pads, clock generation and the host computer.
* **Schedules.** There is no network compiler. Schedules are written with the
  small assembler in `tb/tb_asm_pkg.sv`, which flags bus conflicts.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_nn_systolic_array rtl/nnp_pkg.sv tb/tb_asm_pkg.sv tb/tb_nn_systolic_array.sv
obj_dir/Vtb_nn_systolic_array
```

* `tb_nn_systolic_array` is the end-to-end test, with the top at its default
  size.
  * It runs XOR on both PEs for all four input patterns, and checks values,
    the output cycle and the 10-cycle run length.
  * It then runs a mixed schedule that uses the ring transfer, an external
    input, interleaved local registers, a comparator search followed by
    indexed block reads, and `ADD`/`MULT`/`CLIP`/`HLIM`.
  * It counts each of these mechanisms and fails if one never occurred.
* `tb_nn_processor` runs XOR on a single PE.
* `tb_nn_workloads` generates schedules for fully connected networks and runs
  them on a single PE at its default size. The networks are 40-10-1, 6-21-12-1,
  64-8-1, 16-5-9-4 and 12-12-12, with random weights and a ±1.0 clipping
  activation.
  * The scheduler puts two neurons at a time on the two MACs and broadcasts
    each input to both.
  * The runs take 233, 274, 283, 129 and 192 cycles.
  * A tighter schedule that overlaps the activation steps with the next pair
    would be shorter.
* The unit testbenches (`tb_booth_mult`, `tb_cla_adder`, `tb_mac_unit`,
  `tb_wta_comparator`, `tb_regfile`, `tb_bus_interconnect`,
  `tb_ucode_controller`, `tb_in_port`, `tb_out_port`, `tb_oi_link`) compare
  random or exhaustive stimulus against independent reference models.
  `tb_mac_unit` also checks latencies cycle by cycle.
