# Low power RISC-V ALU: data driven clock gating combined with data gating

A RISC-V integer ALU wastes power in two ways. First, its registers are clocked even when no
instruction needs them. Second, all of its computation circuits (adder, subtractor, shifters,
comparators, logic) compute on every operand pair, although only one result is used. This ALU
reduces both:

* **Clock gating.** Every register of the ALU runs on a gated clock `clk_g`. A *data driven*
  clock gate makes `clk_g`. Its enable is the OR of the five `alu_selection` bits, so the whole
  ALU gets no clock while the selection code is zero (idle).
* **Data gating.** The registered selection is decoded into a one-hot select of the ten
  computation circuits. A pair of AND gates in front of each circuit passes the operands only to
  the selected circuit. The other nine see zeros and do not toggle.

The RTL is plain synthesizable SystemVerilog. The published evaluation of the technique was done
on an FPGA, where it reports 46.67 % less dynamic ALU power than an ungated ALU. In exchange it
uses 33 more LUTs, 2 more registers and a lower maximum frequency (343.5 MHz instead of
400 MHz). Those figures are quoted for context only. This RTL was checked for function in
simulation, not for power or timing.

## Block structure

```
                 alu_selection ──┬──────────────► [sel FF] ─► alu_decoder ─► dec (one-hot, arith, invert)
                                 │                                   │
                                 └─► OR ─► enable ─► ddcg ─► clk_g    ▼
 reg_op1 ─► [op1 FF] ─┐                              (clocks  alu_data_gate ─► alu_units ─► alu_result_mux ─► [alu_out FF]
 reg_op2 ─► [op2 FF] ─┴──────────────────────────────  all FFs)   ▲ ten gated operand pairs      ten results
```

| Module | File | Role |
|---|---|---|
| `alu_hybrid` | `rtl/alu_hybrid.sv` | Top. Holds the input/output registers and wires the rest together. |
| `ddcg` | `rtl/ddcg.sv` | Data driven clock gate: FF1, FF2, one XOR and two ANDs. |
| `alu_decoder` | `rtl/alu_decoder.sv` | Maps the 5-bit code to one of ten circuits plus `arith` and `invert` flags. |
| `alu_data_gate` | `rtl/alu_data_gate.sv` | AND gates that give operands only to the selected circuit. |
| `alu_units` | `rtl/alu_units.sv` | The ten circuits: sub, add, shl, shr, eq, lts, ltu, and, or, xor. |
| `alu_result_mux` | `rtl/alu_result_mux.sv` | One-hot AND-OR multiplexer, plus the comparison inversion. |
| `alu_pkg` | `rtl/alu_pkg.sv` | Widths, the selection code enum, the circuit index enum, the decoder struct. |

## The data driven clock gate

This is the part that takes most care to understand. A plain `clk & enable` gate glitches when
`enable` changes while `clk` is high. A latch-based gate needs a latch. The data driven gate uses
two rising-edge flip-flops instead:

* **FF1** holds the enable that is currently in force (`Q1`). The gated clock is
  `clk_g = clk & Q1`.
* **FF2** samples `enable ^ Q1` on every rising edge of `clk`. So `Q2` is 1 in exactly the
  cycles in which the requested enable differs from the one in force.
* FF1 is clocked not by `clk` but by `clk_en = clk & Q2`. FF1 therefore only switches when the
  enable has changed. In the other cycles its clock is quiet too.

Cycle behaviour, taking `enable` as stable around each rising edge:

* When `enable` is first sampled high at edge *k*, `Q2` rises and then `Q1` rises, both right
  after edge *k*. `clk_g` then gives a (slightly delayed) pulse in that same period.
* While `enable` stays high, `Q2` returns to 0 and `clk_g` follows `clk`.
* At the first edge where `enable` is sampled low, `clk` rises while `Q1` is still 1. So `clk_g`
  has one more rising edge. After that `Q1` falls and `clk_g` stays low.

In a zero-delay simulation this last edge is a zero-width pulse that still clocks the flip-flops.
In silicon it is a pulse about two flip-flop clock-to-output delays plus an AND delay wide.
Idealised timing diagrams of this gate leave that pulse out. This RTL treats it as part of the
behaviour, because it is what moves the last result into `alu_out` (see below). Anyone taking the
design to silicon should examine this pulse. Two options are to keep it wide enough to clock
reliably, or to extend the enable by one cycle (`|alu_selection | |sel_q`), which gives the same
register behaviour with full-width pulses.

FF1 and FF2 reset asynchronously to 0 through `rst_n`. The gate starts with both at 0; the reset
pin is an addition of this design.

## ALU timing as seen at the ports

All registers (`reg_op1`, `reg_op2`, the selection and `alu_out`) load at rising edge *k*
**exactly when `alu_selection` was non-zero at edge *k* or at edge *k−1***. As a result:

* The operands and code present at edge *k* are loaded at edge *k*. Their result appears on
  `alu_out` after edge *k+1*, a latency of one clock.
* In a run of back-to-back operations, `alu_out` shows a new result every cycle.
* At the first idle edge the last result is loaded into `alu_out`, and a zero code is loaded into
  the selection register. From then on the ALU receives no clock and `alu_out` holds.
* When work resumes, the first edge loads the result of the stored zero code, which is 0. The new
  results follow from the next edge on.

Drive the inputs away from the rising edge; the testbenches change them on the falling edge. The
gate's enable is combinational from the `alu_selection` port, as in the original circuit. So
`alu_selection` must meet setup to the clock edge like any register input.

## Selection codes

The encoding below is the published one. The grouping onto circuits follows the published
function table.

| Code | Instruction | Circuit | Result |
|---|---|---|---|
| 0 | nop | none | 0, and the ALU goes idle |
| 1 | sub | alu_sub | op1 − op2 |
| 2, 3 | sra, srai | alu_shr, arithmetic | `$signed(op1) >>> op2[4:0]` |
| 4 / 5 | beq / bne | alu_eq | op1 == op2 / its inverse |
| 6 | bge | alu_lts, inverted | signed op1 ≥ op2 |
| 7 | bgeu | alu_ltu, inverted | unsigned op1 ≥ op2 |
| 8, 9, 10 | slti, blt, slt | alu_lts | signed op1 < op2 |
| 11, 12, 13 | sltiu, bltu, sltu | alu_ltu | unsigned op1 < op2 |
| 14–19 | lui, auipc, jal, jalr, addi, add | alu_add | op1 + op2 |
| 20, 21 | xor, xori | alu_xor | op1 ^ op2 |
| 22, 23 | or, ori | alu_or | op1 \| op2 |
| 24, 25 | and, andi | alu_and | op1 & op2 |
| 26, 27 | sll, slli | alu_shl | op1 << op2[4:0] |
| 28, 29 | srl, srli | alu_shr, logical | op1 >> op2[4:0] |
| 30, 31 | unassigned | none | 0, but the clock keeps running (code is non-zero) |

Comparison results are a single bit in bit 0, with the other bits zero. The caller supplies the
operands. For lui the caller passes op1 = 0, for auipc/jal the PC, and for I-type instructions
the immediate as op2. The ALU itself is unaware of instruction formats.

## Where this design makes its own choices

The published design fixes the structure: registered inputs and output, the ten circuits, the
multiplexer, the AND-gate data gating, the FF1/FF2/XOR/AND clock gate, and the OR of the
selection bits as its enable. Its widths (32-bit operands, 5-bit code) and code table are also
published. The following are choices of this implementation:

* The asynchronous active-low reset `rst_n` on every register.
* beq/bne mapped to the equality circuit. The `invert` flag that turns less-than into
  greater-or-equal for bge/bgeu, and equality into inequality for bne, so that the ALU returns
  the RISC-V branch condition.
* Result 0 for the nop code and for the unassigned codes 30 and 31.
* Zero-extended one-bit comparison results.
* The one-hot AND-OR form of the result multiplexer. A separate decoder module, with the
  shifter's arithmetic flag gated like the operands.

The ALU has 101 data register bits (two 32-bit operands, the 5-bit code, the 32-bit result)
plus the gate's two flip-flops. The published FPGA figures show the same increase of two
registers over an ungated ALU, on a larger base count (125) that this RTL does not try to match.

The published work also places the ALU in a small CPU (memory, control unit, ALU) to measure
system power. That CPU is not described beyond its name, so it is not part of this RTL. Neither
are the alternative gating schemes it was compared against (plain AND gate, latch-based gate,
data driven gate alone, data gating alone).

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ddcg` | 600 random enable cycles. In each high phase `clk_g` equals the sampled enable. The number of `clk_g` edges per cycle equals `enable[k] \| enable[k-1]`. `clk_g` is never high while `clk` is low. `clk_en` fires only around enable changes. |
| `tb_alu_decoder` | All 32 codes against an independent table. |
| `tb_alu_data_gate` | Every one-hot select and the empty select, with random operands. Only the selected circuit receives data. |
| `tb_alu_units` | 2000 random and corner operand sets for each of the ten circuits. |
| `tb_alu_result_mux` | Every select, with and without inversion. |
| `tb_alu_hybrid` | End to end at the default sizes: 20,000 cycles of random operation bursts and idle periods against a cycle model. It checks `alu_out`, the `clk_g` edge count per cycle, and the data gating of the nine idle circuits. Every code and every circuit is exercised. It also counts, and requires, gated idle cycles, flush edges, resumptions after idle and inverted comparisons. |

`tb_alu_ref_pkg.sv` holds the reference model, which is the RISC-V meaning of each code. It is
written without reference to the RTL.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_alu_hybrid \
    rtl/alu_pkg.sv tb/tb_alu_ref_pkg.sv rtl/ddcg.sv rtl/alu_decoder.sv rtl/alu_data_gate.sv \
    rtl/alu_units.sv rtl/alu_result_mux.sv rtl/alu_hybrid.sv tb/tb_alu_hybrid.sv
./obj_dir/Vtb_alu_hybrid
```

The top has an assertion that at most one computation circuit is selected. `tb_alu_hybrid`
observes the internal `clk_g` and gated operand signals hierarchically (`dut.clk_g`,
`dut.op1_g`, ...).

## Changing the design

`alu_pkg` holds `XLEN`, `SEL_W` and `NUNITS`. The shifters take their shift-amount width from
`$clog2(XLEN)`. A new operation needs four changes: an entry in `unit_e`, one line in
`alu_units`, a case arm in `alu_decoder`, and a larger `NUNITS`. The data gate and the
multiplexer follow `NUNITS` by themselves. Lint warnings that remain are expected: `clk_en` is
unused at the top, and each of the data gate and the multiplexer uses only some of the decoder
struct's fields. The registers run on a generated clock (`clk_g`) on purpose.
