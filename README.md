# Quantized systolic matrix multiply unit for field-coupled logic

This is a TPU-style matrix multiply unit (MXU) for signed 8-bit weights and
activations. Its processing elements (PEs) are split so that the part holding
all the logic has no state at all. The design targets field-coupled
nanocomputing, silicon dangling-bond (SiDB) quantum-dot logic in particular.
In that fabric a signal moves only through clock zones driven by electrodes,
and the layout tools accept only feed-forward, purely combinational netlists.
A PE that keeps its weight in a feedback loop therefore cannot be laid out as
one piece. The RTL solves this in two layers:

* **`pe_core`** is the combinational forward pass: a multiply-accumulate and
  a small memory controller. It is the unit that gets synthesised to gates.
* **`pe`** is the clocked shell. Its registers stand for the clock zones. It
  closes the weight loop (a *delay-line memory*) and carries each activation
  on to the next PE (the *return pass*).

The arithmetic is built from a ripple-carry adder and an array multiplier.
Both are regular arrays of full adders with only nearest-neighbour wiring,
which suits a planar fabric better than the fast adders and multipliers a
CMOS flow would pick.

The RTL is plain synthesizable SystemVerilog. It models the logical,
cycle-level behaviour. It does not model the physical SiDB layout, the clock
electrodes or the analog I/O.

## Array organisation

```
            w,c_w  s      w,c_w  s
              |    |        |    |
   a[0] --> [ PE(0,0) ] --> [ PE(0,1) ] --> ... --> a_out[0]
              |    |        |    |
   a[1] --> [ PE(1,0) ] --> [ PE(1,1) ] --> ... --> a_out[1]
              :    :        :    :
                   s_out[0]      s_out[1]
```

`mxu` is a `ROWS x COLS` grid of `pe` (8 x 8 by default). Data moves in
three directions:

| Signal | Direction | Per-PE delay |
|---|---|---|
| activation `a` | left to right along a row | `LOOP = 1 + RET_STAGES` cycles (2 by default) |
| partial sum `s` | top to bottom along a column | 1 cycle |
| weight word `w` with control `c_w = {mode, target row}` | top to bottom along a column | 1 cycle |

PE (r, c) holds one weight `W[r][c]`. Column c leaves the bottom with
`s_in[c] + sum_r W[r][c] * a[r]`, worked out modulo 2^24.

### Preloading weights

A weight word carries its own mode and target row, so preloading is a
stream on the same wires that the array uses later. Every PE compares the
target row with its own row index. If the mode is `PRELOAD` and the rows
match, the PE stores the word. Otherwise it keeps its weight and passes the
word on downwards.

To load a matrix, drive each row r in turn on every column for `LOOP`
consecutive cycles: `w_in[c] = W[r][c]`, `mode_in[c] = PRELOAD` and
`target_in[c] = r`. This takes `LOOP * ROWS` cycles in total. The word must
be held for `LOOP` cycles because the stored weight lives in a ring of
`LOOP` registers (see below). Every register of the ring must be written.
An assertion in `pe` reports a preload word that is held for fewer cycles.

Because the mode travels with each word, compute can start before the lower
rows hold their new weights. Row r has its weight from cycle `3r + 2` after
the start of the preload. The first activation for row r reaches PE (r, c)
at cycle `t0 + r + 2c`. So `t0 = 2 * ROWS` is early enough, and upper rows
already compute while the last preload words are still moving down the
columns.

### Streaming activations

Hold `mode_in = COMPUTE`. For an output vector that starts at cycle t0:

* drive `a_in[r] = a[r]` at cycle `t0 + r` (the usual systolic skew);
* drive `s_in[c]` (0, or a partial sum to continue) at cycle `t0 + LOOP*c`;
* `s_out[c]` holds the result `ROWS` cycles after its `s_in[c]` was driven.

A new vector can start every cycle, so all PEs do independent MACs at once.
Activations leave at `a_out[r]`, `LOOP * COLS` cycles after they entered.
This lets arrays be chained side by side.

While the array computes, `w_in` and `target_in` are ignored. Words with
mode `PRELOAD` for other rows may pass at any time; they never disturb a PE
whose row does not match.

## Inside a PE

```
        s_in   w_in,c_w
          |       |
 a_in --+-+-> pe_core (MAC + mem_ctrl) ---> forward-pass register --> s_out, w_out, c_w_out
        |         ^ w_mem                    |  written-back weight   |  activation
        |         |                          v                        v
        |   delay_line_memory (weight) <-----+   delay_line_memory (activation) --> a_out
```

* **Forward pass (`pe_core`).** `s_out = s_in + signExtend(w_mem * a, 24)`.
  In parallel the memory controller picks the weight to write back:
  `w_load` when `mode == PRELOAD` and `target_y == pe_y`, else `w_mem`. The
  MAC runs in both modes. During preload its result is simply not used. The
  row index is an input of the core rather than a parameter, so one netlist
  serves every PE.
* **Forward-pass register.** One register stage captures the new partial
  sum, the weight passed down, `c_w`, the written-back weight and the
  activation.
* **Return pass.** `RET_STAGES` registers (`delay_line_memory`) carry the
  written-back weight to the core's `w_mem` input. Together with the
  forward-pass register they form a ring of `LOOP` registers, and the weight
  keeps circulating through that ring. A second delay line carries the
  activation to `a_out`. This delay is what sets the 2-cycle-per-column skew
  above.

Latencies: `s` and `w/c_w` take 1 cycle, `a` takes `LOOP` cycles. Reset is
synchronous and active low. It clears all registers, so every stored weight
becomes 0, and sets the forwarded mode to `COMPUTE`.

## Arithmetic

* `ripple_carry_adder`: a chain of `full_adder` cells. It does the 24-bit
  accumulation, and also serves as the rows of the multiplier.
* `array_multiplier`: a signed `X_BITS x Y_BITS` multiplier. It uses
  Baugh-Wooley partial products:
  * bit `x[j] & y[i]` is inverted when exactly one of `j` and `i` is a sign
    bit;
  * the constant `2^(X+Y-1) + 2^(X-1) + 2^(Y-1)` is added;
  * everything is taken modulo `2^(X+Y)`.

  Row i adds its partial products into the running sum, from bit i upwards,
  with an `(X+Y-i)`-bit ripple-carry adder. The bits below i are already
  final. This gives a triangular array of full adders with no sign-extension
  rows.
* `mac`: multiplier, sign extension to `ACC_BITS`, then the adder. The
  result wraps modulo 2^24. Overflow handling was left open by the source
  design, so wrapping is this implementation's choice. For W8A8 the largest
  product magnitude is 2^14 (-128 x -128), so a column of up to 512 such
  products cannot wrap.

## Precision

Weight and activation widths are parameters of every module (`W_BITS`,
`A_BITS`; 8 by default). The source design evaluates W2A2, W4A4 and W8A8.
`tb_pe_core` checks the core at all three. The partial sum stays 24 bits in
every configuration, as in the reference algorithm.

## Parameters

| Module | Parameter | Default | Origin |
|---|---|---|---|
| `mxu` | `ROWS`, `COLS` | 8, 8 | this implementation's choice; the source gives no array size |
| all | `W_BITS`, `A_BITS` | 8, 8 | source (W8A8 main configuration) |
| all | `ACC_BITS` | 24 | source (sign extension to 24 bits) |
| `mxu`, `pe` | `RET_STAGES` | 1 | this implementation's choice |
| `pe` | `PE_Y` | 0 | set per instance by `mxu` |
| `mxu` | `Y_BITS` (local) | `clog2(ROWS)` | derived |

## What follows the source and what does not

Taken from the source design:

* the systolic array and the directions in which `a`, `w`, `c_w` and `s`
  move;
* the PE contents (MAC, memory controller, delay-line memory, return pass);
* the split into a combinational core and a clocked shell;
* the forward-pass equations and the preload rule;
* the mode encoding (`PRELOAD = 0`, `COMPUTE = 1`) and the 24-bit
  accumulator;
* the choice of ripple-carry adder and array multiplier.

Chosen here:

* the array size;
* the number of return-pass registers, and with it the need to hold a
  preload word for two cycles;
* `c_w` as a 1-bit mode plus a row index carried with every weight word;
* a partial-sum input at the top of each column;
* Baugh-Wooley for the signed array;
* wrap-around on overflow;
* synchronous reset to zero.

Not modelled:

* the four-phase clock electrodes (the registers stand for them);
* the electrostatic input and single-electron-transistor output interface;
* the SiDB gate tiles;
* the physical pin routing and return-bus layout.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ripple_carry_adder` | 5-bit exhaustive; 24-bit corner cases and random operands |
| `tb_array_multiplier` | exhaustive 2x2, 4x4, 8x8 and 3x5 signed products |
| `tb_mac` | extreme operands, wrap-around, random operands |
| `tb_mem_ctrl` | every mode/target/row combination |
| `tb_pe_core` | W2A2, W4A4 and W8A8 cores, sums and written-back weights |
| `tb_delay_line_memory` | 1- and 3-stage delays, reset |
| `tb_pe` | load, stream every cycle, a preload for another row, reload; checks all output latencies cycle by cycle |
| `tb_mxu` | the default 8x8 W8A8 array end to end (see below) |
| `tb_mxu_precisions` | 8x8 arrays at W2A2 and W4A4: one preload, 24 vectors each (driver in `mxu_runner`) |

`tb_mxu` runs two rounds. Each round loads a random matrix and then streams
24 back-to-back vectors. Odd-numbered vectors carry random incoming partial
sums. Compute begins while the lower rows are still preloading. Every column
result is checked at the exact cycle it is due against integer arithmetic,
and so is every activation leaving the right edge. The testbench also counts
preloads, reloads, mode switches, back-to-back vectors, non-zero partial-sum
inputs and preload/compute overlap, and fails if any of them never happened.

## Simulating

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mxu_pkg.sv tb/tb_mxu.sv --top-module tb_mxu
./obj_dir/Vtb_mxu
```

Replace `tb_mxu` with any other testbench name to run that one. `mxu_pkg.sv`
holds the mode enum and shared constants, and must be read first.
