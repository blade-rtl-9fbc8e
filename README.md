# BLADE: bitline computing in an L1 data cache

BLADE turns the SRAM arrays of a small L1 data cache into a wide SIMD engine.
Two wordlines of one array are opened at the same time; the precharged
bitlines then discharge if either cell holds a 0, so sensing the true bitline
gives the AND of the two cells and sensing the complement bitline gives their
NOR. A few gates under each bitline multiplexer turn that pair into XOR, a
ripple-carry adder stage and a shifter, and the result is written straight
back into the array. Every 256-bit-wide subarray therefore computes on a
64-bit word per operation, and the 16 subarrays of a 32 KiB cache together
perform 1024 bitwise or 128 8-bit operations per command, without moving the
data to a processor.

This repository holds synthesizable SystemVerilog for the digital behaviour of
that array: the storage with its local and global bitlines, the per-slice
bitline logic, the write path, and a controller that sequences the supported
operations. The electrical side (6T cells, precharge, sense amplifiers, low
voltage operation) is reduced to its logic function.

## Array organisation

A subarray (`blade_subarray`) has 256 bitlines and 64 wordlines.

* **Local groups.** The wordlines are split into two local groups of 32
  (`blade_local_group`): rows 0–31 and rows 32–63. Each group has its own
  short local bitlines, precharge and read/write periphery. On a read, a local
  bitline discharged by an active cell pulls the shared *global* read bitline
  (GRBL, or GRBLbar for the complement side) low. The global bitlines are
  precharged high, so GRBL ends up as the AND of all active cells and GRBLbar
  as their NOR.
  The point of local groups is electrical. Two cells that are opened together
  on *different* local bitlines cannot disturb each other, so no wordline
  underdrive is needed and the array can stay fast at low voltage. The rule
  this leaves for software is that **two operands read together must sit in
  different local groups**: one in rows 0–31, the other in rows 32–63. The
  controller checks this with an assertion.
* **Columns and slices.** Four adjacent bitlines share one slice through a
  4:1 multiplexer, giving 64 slices. Bitline `4*n + c` holds bit `n` of the
  64-bit word in column `c`, so a row stores four interleaved 64-bit words,
  and an operation works on one column of the chosen rows.
* **Wordline drivers** (`blade_wl_driver`) decode one or two read rows and
  one write row per cycle.

## The bitline-logic slice

Each of the 64 slices contains, in order:

1. `blade_mux_sa`: the GRBL multiplexer, two sense amplifiers and two
   latches. They hold `AND` (the sensed GRBL) and `NOR` (the sensed GRBLbar).
   With one wordline open they hold the cell value and its complement.
2. `blade_bl_logic`: the logic proper.
   * `XOR = NOR(AND, NOR)` is the bitwise sum of the two cells.
   * The carry out is `AND | (~NOR & Cin)` and the sum is `XOR ^ Cin`. The
     64 slices chain into a ripple-carry adder.
   * With only one wordline open the carry out equals the cell value. The
     carry line into the next slice therefore doubles as a one-bit left
     shift.
   * The writeback multiplexer picks one of Shift (the incoming carry line),
     Add, NOR, XOR, AND or Add(n-1). Add(n-1) is the sum of the slice below:
     an *add write-forward* that stores `(A + B) << 1` in a single operation.
3. `blade_write_amp`: the write amplifier. It chooses between the writeback
   value and external (host) data, and the GWrL multiplexer enables only the
   selected column.

**Lanes.** The carry chain is cut at every lane boundary, so independent lanes
of 8, 16, 32 or 64 bits can share the 64-bit word. The lowest slice of each
lane gets a common carry-in (`cin_lsb`: 0 for add and shift, 1 for subtract)
and reads 0 as its Add(n-1).

## Timing: read, writeback and their overlap

One elementary step takes two cycles:

| cycle | what happens |
|-------|--------------|
| read  | one or two wordlines are opened; GRBL/GRBLbar of the column are sensed and latched |
| write | the slice logic works on the latched values; the chosen result is written to the destination row at the rising edge |

Because the sense latches hold their values, the **write of one step can share
a cycle with the read of the next**, provided the next step does not read the
row being written. A read sees the array as it was before that cycle's write.
The micro-op type `blade_uop_t` (in `blade_pkg`) therefore carries a read half
and a write half. Dependent steps still need two cycles each. Independent
steps overlap, which is how the compare below fits into 10 cycles.

## Commands and their sequences

`blade_controller` accepts one command at a time (`blade_cmd_t`) and drives
one micro-op per cycle. All subarrays execute that micro-op in lock step.
Command lengths are counted from the cycle after acceptance to the cycle in
which `done` is high:

| command | result in each lane | cycles |
|---------|---------------------|--------|
| `OP_AND`, `OP_NOR`, `OP_XOR` | bitwise A op B | 2 |
| `OP_NOT`, `OP_COPY` | ~A, A (one wordline) | 2 |
| `OP_SHL` | A << n, by n one-bit shifts | 2n (n = 0 copies, 2) |
| `OP_ADD` | A + B | 2 |
| `OP_SUB` | A − B | 4 |
| `OP_GT`, `OP_LT` | top bit of the lane = (A > B), (A < B), unsigned | 10 |
| `OP_MUL` | A × scalar mod 2^W | 1 + 2W |
| `OP_WRITE` | host writes a 64-bit word into one subarray | 1 |
| `OP_READ` | host reads a 64-bit word (`rd_data` in the done cycle) | 2 |

The hardest sequences are these:

* **Subtract**: `T = NOT B`, then `D = A + T` with carry-in 1.
* **Greater than** (`x > y`; `OP_LT` swaps the operands). Let `S = y − x`.
  * If the top bits of x and y are equal, the top bit of `S` is the answer.
  * If they differ, the top bit of `x` is the answer.

  Both cases are covered by `D = S ^ ((x ^ y) & (S ^ x))`. The six steps are
  `T = ~x`, `X = x ^ y`, `S = y + T + 1`, `Y = S ^ x`, `Z = X & Y` and
  `D = S ^ Z`. The first three overlap, which gives 10 cycles. Only the top
  bit of each lane is meaningful; the lower bits are left over from the
  sequence.
* **Multiply by a scalar**: Horner's scheme over the scalar's bits, starting
  with the most significant.
  * The accumulator P is first cleared through the external-data path
    (1 cycle).
  * For every bit but the last, the step is `P = (P + A) << 1` using the add
    write-forward when the bit is 1, or a plain shift of P when it is 0. Each
    step takes 2 cycles.
  * The last bit adds or copies P into the destination.

  The multiplier is a scalar carried in the command. That fits the filter
  coefficients and convolution weights BLADE targets, because the slices have
  no per-lane predication for a vector-by-vector product.

**Scratch rows.** Temporaries live in the top two rows of each local group:
rows 30, 31, 62 and 63. Commands must not use them as operands or
destinations. The sequences place each temporary so that every pair they read
still comes from two different local groups.

## Top level and interface

`blade_top` has one controller and `NUM_SUB = 16` subarrays (16 × 2 KiB =
32 KiB). `NUM_SUB = 64` builds a 128 KiB array.

* `cmd_valid` / `cmd_ready`: a command is taken when both are high. The
  controller raises `cmd_ready` again in the `done` cycle, so commands can be
  issued back to back.
* `cmd` fields:
  * `op`, `dst`, `src_a`, `src_b`: the operation and its rows.
  * `col`: the column, 0–3.
  * `lane`: 8/16/32/64 bits.
  * `shamt`: the shift count.
  * `scalar`: the multiplier.
  * `sub` and `wdata`: the subarray and data of host access.
* `done`, `cycles`: `done` is high in the last cycle of a command, and
  `cycles` then gives its length.
* `rd_data`: the word returned by `OP_READ`.
* The reset `rst_n` is active low and asynchronous. It clears the controller
  and the sense latches; the array contents are not reset.

## Where this RTL departs from the original design or fills gaps

* **Multiply length.** The original operation table gives 1 + 2W + 6 cycles
  for multiplication. The sequence here needs no final three steps and takes
  1 + 2W. The original sequences for multiply and compare are not published.
  The ones above are this design's own and match the published lengths for
  compare, subtract, shift, add and bitwise operations.
* **Design choices of this RTL.** These are not taken from the original:
  * lane widths other than 8 bits;
  * the carry-in control;
  * the scratch rows;
  * the valid/ready command port;
  * host access by 64-bit word;
  * lock-step broadcast to all subarrays;
  * the bit order inside a row.
* **Pipelining.** Read and write in the same cycle follows the stated purpose
  of the sense latches (pipelined add/shift steps). The electrical feasibility
  of that overlap is not modelled. The writeback latch of the original slice is
  merged into the synchronous array write.
* **Ways.** The original places operands "in ways 0 and 1" of an interleaved
  4-way cache. How ways map onto the 4:1 column multiplexer is not given, so
  the column is simply a command field.
* **Not included:**
  * the L1 cache controller, which serves the BLADE controller's data requests
    and reports evictions;
  * the tag array;
  * the processor;
  * any analog behaviour: voltage/frequency limits and leakage.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. Two
packages are shared: `rtl/blade_pkg.sv` holds the design types, and
`tb/blade_ref_pkg.sv` holds the integer reference model used by the
command-level tests. A typical run:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/blade_pkg.sv tb/blade_ref_pkg.sv tb/tb_blade_top.sv \
  --top-module tb_blade_top -Mdir obj_top
obj_top/Vtb_blade_top
```

Replace the top module for the other tests: `tb_blade_controller`,
`tb_blade_subarray`, `tb_blade_local_group`, `tb_blade_mux_sa`,
`tb_blade_bl_logic`, `tb_blade_write_amp`, `tb_blade_wl_driver` and
`tb_blade_kernels`. Verilator
finds the other modules by file name through `-Irtl`.

* `tb_blade_top` runs the full 16-subarray array at default parameters. It
  fills every user row through host writes, then issues 260 random commands
  covering all operations and lane widths. It reads back the destination from
  all 16 subarrays and checks each command's cycle count. It also checks that
  each of these happened at least once:
  * a lane carry stopped at a lane boundary;
  * an add write-forward;
  * a shift writeback;
  * a read/write overlap;
  * back-to-back acceptance;
  * a host write that changed only its own subarray.
* `tb_blade_kernels` runs the three kinds of kernel BLADE was built for on
  the full array. Each kernel's BLADE cycle count is printed. The host places
  data in lanes and lays out shifted copies, because BLADE cannot move data
  between lanes; the array does all the arithmetic. The three kernels are:
  * a SHA-3-style bitwise kernel on 4096 bytes: rounds of `a ^= ~b & c` and
    `b <<= 1`;
  * an 8-tap FIR filter (horizontal, then vertical) on a 16×16 tile with
    16-bit lanes;
  * a 3×3, stride-1, zero-padded convolution on 16×16 planes, with 32-bit
    data and 8-bit signed weights, for two input and two output planes.
* `tb_blade_controller` runs the same command mix on the controller with one
  subarray.
* The lower-level tests check:
  * every input combination of the slice logic and the write amplifier;
  * the wordline decode;
  * the sense latches;
  * the wired AND/NOR of a local group, against a reference memory.
