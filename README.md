# Low power logical element with separated 0 and 1 data paths

A logical element (LE) is the cell an FPGA fabric is tiled from: a small
truth table that can be programmed to compute any function of a few input
bits, plus a little storage. This LE takes two data bits and a carry-in
(D0, D1, Cin), produces a Sum and a Carry from two 8-entry SRAM truth
tables, and can keep Sum in four flip-flops.

The low power idea is architectural, not a circuit trick. Most operations
an LE runs (AND, OR, XOR, ADD, equality compare, one-bit multiply) give the
same result whatever order their input bits come in. For those, the three
data bits can be sorted before they reach the truth-table read muxes:

| D0 D1 Cin in | sorted D0 D1 Cin |
|--------------|------------------|
| 000          | 000              |
| any one 1    | 100              |
| any two 1s   | 110              |
| 111          | 111              |

After sorting, the D0 line is almost always 1 and the Cin line almost
always 0. The mux select lines, and the nodes of the muxes behind them,
therefore switch less often, while the LUT output is unchanged. The
sorting costs three small gates in front of the LUTs:

    D0_new  = D0 | D1 | Cin
    D1_new  = D0&D1 | Cin&(D0 ^ D1)     (majority)
    Cin_new = D0 & D1 & Cin

In the reference 0.5 um implementation this approach saved about 18 % to
29 % of the LE's power, depending on the operation. It added roughly 11 %
area and 18 % delay. RTL cannot reproduce those numbers. What it can show is
the switching on the select lines: with random data, the separated paths
switch 19 % to 37 % less than the unsorted ones.

## Block structure

```
 data {D0,D1,Cin} ──► le_data_reorg ──┐
        │                              ├─ reorg_en mux ─► lut_sel ─┬─► le_sram_lut (Sum)   ─► sum ─┬─► le_storage ─► out
        └──────────────────────────────┘                           └─► le_sram_lut (Carry) ─► carry │   (4 flops + output select)
                                                                                                    └─ direct Sum
```

| File | What it is |
|------|------------|
| `rtl/le_pkg.sv` | Types (`le_data_t`, `le_cfg_t`, `le_osel_e`, `le_op_e`), the sizes, and `op_cfg()`, which gives the configuration of each supported operation |
| `rtl/le_data_reorg.sv` | The sorting network above, combinational |
| `rtl/le_sram_lut.sv` | One 8-bit truth table with its 8:1 read mux |
| `rtl/le_storage.sv` | Four storage flip-flops fed from Sum, and the output select mux |
| `rtl/lp_le.sv` | Top: the sorting network, its bypass, two LUTs and the storage |

## When the sorting is allowed, and the bypass

Sorting is only correct for a function that does not depend on the order
of its inputs. The LE also has to run order-dependent operations: INV,
less-than, greater-than, shift left and shift right. So this design adds a
configuration bit, `reorg_en`, which sends the original data to the LUTs
when it is clear. With `reorg_en = 0` the element is a conventional LE.

There is one more condition, and it is easy to miss. The sorting network
always sorts all three bits. A two-input operation (AND, OR, NAND, NOR, XOR,
XNOR, EQ, MULT) ignores Cin, but the sorting would move a 1 on Cin into
D0 or D1. **When `reorg_en` is set for a two-input operation, Cin must be
held at 0.** ADD uses all three bits symmetrically and needs no such
restriction.

## Configuration and operations

The LE is configured by one write of `le_cfg_t` (17 bits) with `cfg_we`
high on a rising clock edge:

- `sum_lut[7:0]`: bit *i* is Sum for data word *i*.
- `carry_lut[7:0]`: bit *i* is Carry for data word *i*.
- `reorg_en`: turns the sorting on.

The data word is packed `{D0, D1, Cin}` with D0 as the most significant bit.
The word is the LUT address, so entry *i* is row *i* of the usual truth
table. `le_pkg::op_cfg(op)` returns the configuration for each operation:

| Operation | Sum | Carry | `reorg_en` |
|-----------|-----|-------|------------|
| AND OR NAND NOR XOR XNOR | f(D0, D1) | 0 | 1 (Cin = 0) |
| INV | ~D0 | 0 | 0 |
| ADD | D0^D1^Cin | majority | 1 |
| CMP_EQ | D0 == D1 | 0 | 1 (Cin = 0) |
| CMP_LT / CMP_GT | D0 < D1 / D0 > D1 | 0 | 0 |
| SHL | Cin (bit from the lower neighbour) | D0 (to the upper neighbour) | 0 |
| SHR | D1 (bit from the upper neighbour) | D0 (to the lower neighbour) | 0 |
| MULT | D0 & D1 | 0 | 1 (Cin = 0) |

The names of the operations come from the original design. The exact truth
tables of the compare, shift and multiply elements are choices of this RTL;
only ADD's is fully specified. Because the tables are plain SRAM bits, any
other 3-input function can be loaded instead. Set `reorg_en` only if the
function is symmetric over the bits actually driven.

## Storage and output select

On a rising edge with `store_en` high, the four flip-flops shift: flip-flop 0
takes Sum and each of the others takes the value of the one before it.
`osel` 0–3 puts flip-flop 0–3 on `out`, `osel` 4 puts Sum on it directly,
and 5–7 give 0. The flip-flops clear on the asynchronous active-low
`rst_n`, which also clears `reorg_en`. The truth tables are not reset.

The original design has four storage elements and an output select over
them and the direct LUT output. The shift-chain loading, the store enable
and the select encoding are choices of this RTL.

## Ports of `lp_le`

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| cfg_we, cfg | in | 1, 17 | configuration write |
| data | in | 3 | {D0, D1, Cin} |
| store_en | in | 1 | store Sum |
| osel | in | 3 | output select |
| sum, carry | out | 1 | LUT outputs, combinational from `data` |
| ff_q | out | 4 | storage flip-flops, [0] newest |
| out | out | 1 | selected output |
| lut_sel | out | 3 | select word actually seen by the LUT muxes, exposed so its switching can be measured |

Timing: `data` → `sum`/`carry`/`out` (osel 4) is combinational, through
at most three gate levels of sorting, a 2:1 bypass mux and the 8:1 LUT mux.
A configuration write or a store takes effect at the next rising edge.

## What is not modelled

- Power, delay and area. These are properties of the transistor circuit.
  The testbenches count transitions on `lut_sel` as a stand-in.
- The physical layout and the test chip.
- A separate conventional LE. It is `lp_le` with `reorg_en = 0`.

## Simulation

Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`:

| Testbench | Covers |
|-----------|--------|
| `tb/tb_le_data_reorg.sv` | all 8 inputs against a count-of-ones reference; adder Sum/Carry unchanged by sorting |
| `tb/tb_le_sram_lut.sv` | walking-one and random tables; write timing; hold with `we` low |
| `tb/tb_le_storage.sv` | random stores against a model; all 8 select codes; reset |
| `tb/tb_lp_le.sv` | end to end: all 14 operations, random data, storage, every select source, sorted and bypassed words; fewer select-line transitions |
| `tb/tb_le_switching.sv` | the power-comparison workload: 500 random words per operation for AND, OR, NAND, NOR, XOR, ADD, MULT, EQ, with sorting off and then on; prints the reduction per operation |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    -Irtl -Itb --top-module tb_lp_le rtl/le_pkg.sv tb/tb_lp_le.sv
./obj_dir/Vtb_lp_le
```

Typical output of `tb_le_switching` (transitions on the three select lines
over 500 words):

```
OP_ADD     select-line transitions: conventional 723, separated 453, 37 % fewer
OP_XOR     select-line transitions: conventional 474, separated 380, 19 % fewer
```

With uniform random data, the expected reduction is 37.5 % for ADD
(15/16 against 3/2 transitions per word) and 25 % for the two-input
operations (3/4 against 1).
