# Majority-gate CAM cell (QCA-style) in SystemVerilog

A content-addressable memory (CAM) finds data by value rather than by address.
You present a search word, and every stored word is compared with it in
parallel. The result is the set of words that match, or the location of one of
them. This RTL models a one-bit CAM cell designed for quantum-dot cellular
automata (QCA). In QCA the only native logic primitives are the **majority
gate** and the **inverter**. The cell is therefore built from six three-input
majority gates and one **five-input minority gate**, the complement of a
five-input majority gate. Its QCA layout has a latency of two clock cycles.

The RTL reproduces the cell's logic gate for gate. Around it sits a small
word-organised CAM: an argument register, a key (mask) register, a
`WORDS x WIDTH` array of cells, a match register, and an encoder for the match
address. The whole design is synthesizable, ordinary synchronous logic. It does
not simulate QCA physics. The QCA-specific aspects (cell counts, area, the
four-phase clock and crosstalk) are outside what RTL can express. They are
listed under [What is not modelled](#what-is-not-modelled).

## Majority logic

| module | function |
|---|---|
| `maj3` | `y = ab + bc + ac`. With one input tied to `0` it is an AND gate. With one input tied to `1` it is an OR gate. |
| `qca_inv` | `y = ~a` |
| `maj5` | 1 when three or more of `a..e` are 1. It is written as the OR of the ten three-input products. |
| `min5` | `maj5` followed by `qca_inv`: 1 when at most two inputs are 1 |

One property of `min5` matters for the cell. With two inputs tied to `0`, it
reduces to a three-input NAND:
`min5(x, 0, 0, y, z) = ~(x & y & z)`.

## The CAM cell

The cell (`cam_cell`) has four inputs and three outputs. They are carried in
the `qca_cam_pkg` structs `cam_cell_in_t {rw, i, a, k}` and
`cam_cell_out_t {f, o, m}`.

| signal | meaning |
|---|---|
| `rw` | 0 = write, 1 = read |
| `i` | data to write |
| `a` | argument bit to search for |
| `k` | key bit: 1 = compare this bit, 0 = don't care |
| `f` | cell content after the operation |
| `o` | read output |
| `m` | match |

### Memory half (`cam_memory_unit`)

This half is a 2:1 multiplexer built from majority gates. Its output is fed
back so that it holds the stored bit:

```
keep = maj(F_stored, 0, rw)    // F_stored AND rw
load = maj(~rw,      0, i)     // i AND NOT rw
F    = maj(keep,     1, load)  // keep OR load
O    = maj(rw,       0, F)     // F AND rw
```

| op | rw | F | O |
|---|---|---|---|
| write | 0 | `i` | 0 |
| read | 1 | stored bit | stored bit |

In QCA the feedback is a loop of wire whose length is one clock period. The
RTL uses a flip-flop (`f_q`) instead, which loads `F` on every rising edge. A
read therefore rewrites the same value, and a write replaces it.

### Matching half (`cam_match_unit`)

This half is the least obvious part of the cell:

```
or1 = maj(F,  A,  1)                // F | A
or2 = maj(~F, ~A, 1)                // ~F | ~A
M   = min5(or1, 0, 0, or2, K)       // ~(or1 & or2 & K)
```

`or1 & or2` is 1 exactly when F and A differ, so `or1 & or2 = F ^ A`. The
minority gate then gives `M = ~(K & (F ^ A))`:

| K | A | F | M |
|---|---|---|---|
| 0 | x | x | 1 |
| 1 | 0 | 0 | 1 |
| 1 | 0 | 1 | 0 |
| 1 | 1 | 0 | 0 |
| 1 | 1 | 1 | 1 |

The match is computed from `F` *after* the current operation. A write with
`K = 1` therefore compares `A` with the newly written bit.

### Cell timing

The QCA layout needs two clock cycles from inputs to outputs. In the RTL, one
cycle of `clk` stands for one full four-phase QCA clock period. The two cycles
of latency are modelled as follows:

- The stored bit is updated at the **first** rising edge after the inputs are
  applied. The next operation, issued one cycle later, already sees it.
- `{F, O, M}` pass through a `LATENCY`-deep register pipeline. The default of
  2 comes from `qca_cam_pkg::CAM_CELL_LATENCY`. The outputs of an operation
  sampled at edge *n* appear after edge *n + 2*.

A new operation can be issued every cycle. How the real layout divides the
delay among its gates is not modelled. Only the end-to-end latency is kept.

## The CAM array (`cam_array`, top)

```
 arg_in ─► [argument reg] ─┐
 key_in ─► [key reg] ──────┤      WORDS x WIDTH cam_cells          ┌► match_q
 data_in, write, wr_sel ───┴──►  (word match = AND of cell m) ─► [match reg]
                                                                   └► priority encoder ─► match_addr / valid / multi
                              cell o outputs ─────────────────────────► rd_data
```

- **Cell inputs.** Every cell of word `w` gets the following inputs:
  - `rw = ~(write & wr_sel[w])`
  - `i = data_in[b]`
  - `a = argument register bit b`
  - `k = key register bit b`
- **Writes.** A write stores `data_in` in every selected word. Several words
  may be selected at once.
- **Reads.** Every word that is not written is read. Its content appears on
  `rd_data[w]`. A word that is being written shows 0 there.
- **Searches.** A search runs every cycle, with no separate command.
- **Word match.** A word matches when every unmasked bit equals the argument.
  The match register captures one bit per word.
- **Match address.** `cam_priority_encoder` returns the lowest-numbered
  matching word. `match_valid` says whether any word matched, and `match_multi`
  says whether more than one did.

Timing, with all registers clocked on the rising edge of `clk`:

| edge | event |
|---|---|
| 0 | The argument and key registers load, and the written words are updated. |
| 2 | The cell outputs for that operation are valid. `rd_data` changes. |
| 3 | `match_q`, `match_addr`, `match_valid` and `match_multi` hold the result. |

The reset is asynchronous and active low. It clears the registers, every
stored bit and the cell pipelines. After reset the key is all zeros, so every
word matches until a key is loaded.

Parameters:

| parameter | default | meaning |
|---|---|---|
| `WORDS` | 8 | number of words |
| `WIDTH` | 8 | bits per word |
| `cam_cell.LATENCY` | 2 | cell latency in clock cycles |

The source gives no array size, so 8 x 8 is only a working default.

## Where this departs from the original design

- **The array is not the original design's.** The original work designs only
  the single cell, and places it in a generic CAM block diagram (argument
  register, key register, array, match register). The following are choices
  made here:
  - AND-ing the cell matches into a word match
  - the word-select write port
  - reading every unwritten word on every cycle
  - lowest-index priority on multiple matches
  - the reset
  - the 8 x 8 size
- **Clocking is synchronous.** The four-phase QCA clock and its clock zones
  are replaced by one ordinary clock. Only the two-cycle cell latency is kept.
- **Gates have no delay.** In QCA every gate sits in a clock zone. In the RTL
  all gates are combinational, and the latency comes only from the pipeline
  registers.

## What is not modelled

- QCA cell geometry, cell counts and area. The proposed five-input majority
  gate uses 14 QCA cells. The CAM cell uses 87 QCA cells and about
  0.11 µm². These numbers cannot be reproduced or checked in RTL. In CMOS the
  same function synthesises to about 25 generic gates for `maj5` and about
  24 cells, 6 of them flip-flops, for `cam_cell`.
- The single-layer, crossover-free layout and its robustness to crosstalk.
- The four-phase clock signal, and the 90° and 45° QCA wires. These have no
  logic function.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and includes a watchdog.

| testbench | what it checks |
|---|---|
| `tb_maj3`, `tb_qca_inv`, `tb_maj5`, `tb_min5` | All input combinations, checked against counted ones rather than the gate equations. `tb_maj5` applies the 32 combinations with `a` toggling slowest and `e` fastest. |
| `tb_cam_memory_unit` | The four read/write cases, holding a value over 20 reads, and 500 random operations checked against a behavioural bit. |
| `tb_cam_match_unit` | The eight rows of the match truth table. |
| `tb_cam_cell` | A sweep of all 16 combinations of K, R/W, I and A (K slowest, A fastest), then 1000 random operations. Every output is compared with the operation issued exactly two cycles earlier, which checks the latency. |
| `tb_cam_priority_encoder` | All 256 match vectors. |
| `tb_cam_array` | End to end at the default 8 x 8 size, over 4000 random cycles. It checks `rd_data`, `match_q` and the match address against a reference model, at the exact latency. It counts each of the following and fails if any never happened: writes, reads, argument loads, key loads, single matches, multiple matches, no match, matches that are due only to masked bits, and a word matching in the same cycle it is written. |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/qca_cam_pkg.sv tb/tb_cam_array.sv --top-module tb_cam_array
./obj_dir/Vtb_cam_array
```

For the other testbenches, replace the testbench name in the command. Each
testbench finishes in well under a second.

## Files

- `rtl/qca_cam_pkg.sv`: cell latency constant and the cell input/output structs
- `rtl/maj3.sv`, `rtl/qca_inv.sv`, `rtl/maj5.sv`, `rtl/min5.sv`: gates
- `rtl/cam_memory_unit.sv`, `rtl/cam_match_unit.sv`, `rtl/cam_cell.sv`: the CAM cell
- `rtl/cam_priority_encoder.sv`: the match address encoder
- `rtl/cam_array.sv`: the top level
- `tb/tb_*.sv`: one testbench per module
