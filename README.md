# Probabilistic SAD engine for stereo vision

Stereo vision finds how far each scene point shifts between a left and a right
image (its disparity). For every pixel and every candidate disparity, it
compares a small window of the left image with a shifted window of the right
image. The comparison is a sum of absolute differences (SAD). This is by far
the most expensive step of a rover's stereo pipeline, so it is the step worth
putting in dedicated hardware and running at lowered supply voltage.

This RTL is that hardware: a pipelined SAD engine for 8 x 8 pixel windows.
It is also a test bench for the idea behind it, *probabilistic computing*.
Lowering an adder's supply voltage saves energy, but a bit of the adder then
comes out wrong with some probability. With *bit-level voltage scaling*
(BIVOS), the low-order bits get the lowest voltages, so most errors land where
they matter least. In space, particle strikes (single-event transients) add
errors of their own. The stereo algorithm's later checks (peak filter,
left-right consistency, blob filter) are expected to catch most wrong matches.

Every adder in the engine is built down to NAND gates. This lets both kinds of
error be injected where they arise:

* **Bit errors** come in as XOR masks on each adder's sum bits and on the
  inverters of the absolute-value units.
* **Radiation strikes** act on one transistor of one NAND gate in one full
  adder.

With all injection inputs held at zero, the engine is an exact, synthesizable
SAD unit.

## Datapath

```
 pix_l[0..7] pix_r[0..7]      (one block of Q = 8 pixel pairs per cycle)
      |          |
 input registers (lanes past n_pix zeroed)
      |
 8 x abs_diff_unit  ->  registers
      |
 adder_tree: level 1 (4 adders) -> regs -> level 2 (2) -> regs -> level 3 (1) -> reg
      |
 sad_accumulator: acc <= acc + tree_sum   (the feedback adder)
      |
     sad
```

`Q = 2**K` absolute-value units work in parallel. A window of `n_pix` pixels
enters as `ceil(n_pix/Q)` blocks, one block per cycle. The tree has `K` levels,
with a register after every adder. The last adder adds each block's sum to a
register whose output is fed back. An 8 x 8 window is 8 blocks. The same
structure works for any power-of-two `Q`.

Adder count: the engine has `3Q` adders, all 16 bits wide. Each
absolute-value unit has 2, the tree has `Q-1` and the accumulator has 1. At
`Q = 8` that is 24 adders, or 384 full adders. Every one of them can receive
injected errors.

### Absolute difference with two adders

`abs_diff_unit` does not use a comparator or a subtractor. Both pixels are
zero-extended to 16 bits.

1. The first adder computes `A + ~B + 1 = A - B`. Only its sign bit is used:
   it is 1 when `A < B`.
2. The sign drives two multiplexers. One passes `A` or `~A`, the other passes
   `~B` or `B`.
3. The second adder, with carry-in 1, then computes `A - B` or `B - A`, which
   is always the non-negative result.

Because the comparison is itself an adder, an error in its sign bit makes the
unit subtract in the wrong order. A single bit error can therefore produce a
large error. The testbench checks exactly this case.

### The NAND-level adder

`ripple_adder` is a ripple-carry chain of `nand_full_adder` cells. Each cell is
the classic nine-NAND full adder:

```
g1 = ~(a & b)    g4 = ~(g2 & g3)  (= a ^ b)    g7 = ~(cin & g5)
g2 = ~(a & g1)   g5 = ~(g4 & cin)              g8 = ~(g6 & g7)  = s
g3 = ~(b & g1)   g6 = ~(g4 & g5)               g9 = ~(g5 & g1)  = cout
```

Every gate is a `rad_nand2`.

## Error injection (the part that needs care)

### Bit errors of voltage-scaled adders: `err_mask`

`err_mask[a][i] = 1` inverts sum bit `i` of adder `a` in the current cycle.
The mask is the logic-level stand-in for an analog effect: bit `i` of a
voltage-scaled adder is correct only with probability `p_i`. The mask only
changes the sum outputs; the carry chain stays exact.

The inverters of each ABS unit are voltage-scaled too. There are two
inverter banks per unit: `~A`, and `~B`, which the comparator and
multiplexer 2 share. `inv_mask[2u]` and `inv_mask[2u+1]` invert output bits
of the two banks of unit `u`. The multiplexers take no errors.

The engine does not draw the masks itself. `tb/bivos_error_model.sv` is a
simulation model that does. It uses the *bounded geometric* voltage
distribution:

    p_0 = P0,   p_i = min(1, p_(i-1) + A * R**(i-1)),   p_i = 1 for i >= NBITS

By default it uses `P0 = 0.91`, `A = 0.001`, `R = 2` and `NBITS = 6`. The
first three are one of the best-fit rows of the voltage study. `NBITS`, the
number of scaled low-order bits, is this model's own choice.

Adder numbering, used by both `err_mask` and `hit.adder`:

| adder id      | adder                                   |
|---------------|-----------------------------------------|
| `2u`          | comparator adder of ABS unit `u`        |
| `2u+1`        | difference adder of ABS unit `u`        |
| `2Q + t`      | tree adder `t` (level 1 first, left to right) |
| `3Q - 1`      | accumulating adder                      |

### Radiation strikes: `hit`

`hit` is a `set_hit_t` struct, defined in `pc_pkg`:

| field        | meaning                                            |
|--------------|----------------------------------------------------|
| `valid`      | a strike happens in this cycle                     |
| `adder`      | which adder is struck                              |
| `bit_idx`    | which full adder (bit) of that adder               |
| `gate`       | which NAND gate, 1..9                              |
| `transistor` | which transistor of that gate, 0..3                |
| `stages`     | how many gate delays the transient pulse lasts     |

Two rules decide the effect.

1. **What the struck gate outputs** (`rad_nand2`). This follows the strike
   truth table of a CMOS NAND gate:
   * inputs `00`: no strike changes the output.
   * inputs `01`: a strike on transistor 0 or 2 pulls the output to 0.
   * inputs `10`: a strike on transistor 1 or 3 pulls the output to 0.
   * inputs `11`: a strike on any transistor pulls the output to 1.

   A strike on an idle-state transistor has no effect.
2. **Whether the glitch reaches an output** (`nand_full_adder`). A transient
   that dies out before it reaches the full adder's output is never
   registered. This is modelled in whole gate stages: a strike changes `s`
   (or `cout`) only if `stages` is at least the shortest gate path from the
   struck gate to that output, the struck gate included.

   | gate | stages to `s` | stages to `cout` |
   |------|---------------|------------------|
   | 1    | 5             | 2                |
   | 2, 3 | 4             | 4                |
   | 4    | 3             | 3                |
   | 5    | 3             | 2                |
   | 6, 7 | 2             | unreachable      |
   | 8    | 1             | unreachable      |
   | 9    | unreachable   | 1                |

   For example, a strike on gate 6 lasting four stages flips `s`. A strike on
   gate 2 lasting two stages changes nothing.

To give each output its own threshold, the full adder computes an unstruck and
a struck copy of its NAND network, and each output picks one of the two. The
duplicate network exists only to model the strike. A plain adder would drop
it; with `gate = 0`, both copies are identical.

Once a wrong bit leaves a full adder, it ripples through the carry chain and
the later adders like any other value. A strike in the accumulator therefore
corrupts the rest of the window's sum. A strike in the comparator of an ABS
unit can swap the subtraction order.

The controller and all registers take no injected errors. An error in the
control logic would derail the whole computation rather than add noise to
one value, so it is kept deterministic.

## Control and timing

`sad_control` is a cycle counter. On `start` it latches `n_pix` and
`MaxCount = ceil(n_pix/Q) + K + 2`. While counting:

* While `cnt < ceil(n_pix/Q)`, `blk_rd` asks for block `cnt`, and
  `lane_valid` marks the lanes that hold selected pixels.
* `pipe_en` loads the input, ABS and tree registers. It is the inverse of the
  hold signal that marks the result cycle, so the early stages stop when the
  result is taken.
* The accumulator is cleared by `start` and adds in cycles `K+2` through
  `ceil(n_pix/Q)+K+1`.
* `done` is high for one cycle, at `cnt == MaxCount`. `sad` is valid in that
  cycle and stays valid until the next start.

**Latency.** `done` comes exactly `MaxCount` cycles after the clock edge that
takes `start`: 13 cycles for an 8 x 8 window, 6 cycles for 8 pixels. The
`+2` covers the input registers and the ABS registers.

**Throughput.** `start` may be raised again in the `done` cycle, so windows
can run back to back at `MaxCount + 1` cycles each (14 for 8 x 8). Windows do
not overlap in the pipeline: the counter finishes one window before the next
begins.

## Interface of `sad_engine`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | begin a window (taken when idle or in the `done` cycle) |
| `n_pix` | in | 7 | selected pixels, 1..64 (must not be 0; asserted) |
| `busy` | out | 1 | a window is being processed |
| `blk_rd`, `blk_idx` | out | 1, 4 | block `blk_idx` is read in this cycle |
| `pix_l`, `pix_r` | in | 8 x Q | pixels `blk_idx*Q .. blk_idx*Q+Q-1` of the two windows |
| `err_mask` | in | 16 x 3Q | per-adder XOR masks on sum bits |
| `inv_mask` | in | 16 x 2Q | XOR masks on the `~A`/`~B` inverter banks of each ABS unit |
| `hit` | in | `set_hit_t` | radiation strike |
| `done` | out | 1 | `sad` valid |
| `sad` | out | 16 | sum of absolute differences |

Pixels are supplied in the same cycle as `blk_rd`, as from a window buffer
with combinational read. The engine does not contain that buffer.

Parameters: `Q = 8`, `K = $clog2(Q)`, `NPIX_MAX = 64`, `W = 16` (adder width)
and `PW = 8` (pixel width). `W` can be at most 16, because the strike's bit
index is 4 bits wide. Sums cannot overflow while
`NPIX_MAX * (2**PW - 1) < 2**W`.

## Where this design departs from, or adds to, its source

* **Only SAD is built.** The method was also worked out for the
  sum of squared differences, with multipliers in place of the ABS units, but
  its evaluation used SAD. The multiplier variant and a first
  absolute-value unit design are not included.
* **Own choices:**
  * the pixel handshake (`blk_rd`/`blk_idx`);
  * 8-bit pixels;
  * synchronous reset;
  * clearing the accumulator on `start`;
  * restarting in the `done` cycle;
  * zeroing unused lanes of a partial last block.
* **Logic-level stand-ins for analog effects.** The radiation model is
  reduced to a per-gate strike table and a whole-stage pulse length. The
  analytical model of pulse charge, amplitude and width behind it (RC time
  constants and pulse degradation per stage) is analog and is not modelled.
  The bit-error model drives masks; per-bit supply voltages are not modelled.
  Bit errors enter at adder sum outputs and inverter outputs. They are not
  modelled as independent errors of every NAND gate.
* **Gate numbering.** The nine-NAND gate numbering is chosen so that the
  worked strike examples hold: gate 6 feeds gate 8, and gate 2 is four
  stages from both outputs.
* **Outside the engine.** The disparity search (finding the minimum SAD over
  the disparity range) and the rest of the stereo pipeline are software:
  downscaling, rectification, Laplacian filtering, the peak filter, the
  left-right check and the blob filter.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_rad_nand2` | all 32 input/strike combinations against the strike table |
| `tb_nand_full_adder` | every input, gate, transistor and pulse length against an independent model, plus the two worked examples |
| `tb_ripple_adder` | random sums, error masks, 2000 random strikes against the model, strikes aimed at another adder |
| `tb_abs_diff_unit` | all 65,536 pixel pairs exactly; adder and inverter masks; a flipped comparator sign |
| `tb_adder_tree` | one input set per cycle with 3-cycle latency; hold when `en` is low; a root-adder mask |
| `tb_sad_accumulator` | clear, add with enable gaps, wrap-around, a mask |
| `tb_sad_control` | `MaxCount` timing, block order, lane count and accumulate window for many `n_pix` |
| `tb_sad_engine` | end to end at default parameters (see below) |
| `tb_sad_engine_q4` | the engine built with 4 ABS units (`Q = 4`): exact SADs, `MaxCount` timing, an accumulator mask |
| `tb_error_distribution` | 5000 random 8-pixel SADs under five settings, with error histograms |
| `tb_disparity_search` | a 16-disparity search on synthetic shifted images |

`tb_sad_engine` checks each result against a reference SAD and each run's
cycle count against `MaxCount`. It also counts that each mechanism happened:

* a full window;
* a partial last block;
* a restart in the `done` cycle;
* a mask on the last accumulation;
* strikes filtered by their short pulse;
* strikes that changed the result;
* bit errors that changed the result.

`tb_error_distribution` runs five settings: no errors, bit errors, one strike
per calculation (probability 1/384 for each of the 384 full adders), two
strikes, and bit errors plus one strike. It prints histograms of the absolute
error in power-of-two bins. Errors from the bit-error model stay below 2**8.
Strikes occasionally reach the top bins.

`tb_disparity_search` checks that exact computing always finds the true
disparity, and that a window takes 14 cycles back to back. It also reports how
many windows are still matched with bit errors on.

The tests use synthetic data only. No real stereo image pairs are included.

## Simulating

Files are one module or package each. `rtl/pc_pkg.sv` must come first, and
`tb/tb_ref_pkg.sv` must come before the testbenches that import it. For
example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pc_pkg.sv tb/tb_ref_pkg.sv tb/tb_sad_engine.sv \
    --top-module tb_sad_engine -o sim
./obj_dir/sim
```

`-Irtl -Itb` lets verilator find the other modules by file name. The
end-to-end and workload testbenches each finish in well under a minute.

To change the parallelism, set `Q` on `sad_engine` (a power of two). `K`,
the adder count and the timing follow from it. Masks and strike ids then use
the `3Q` adder numbering above.
