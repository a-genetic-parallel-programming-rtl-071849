# GPP logic-circuit synthesizer: evaluation hardware

Genetic parallel programming (GPP) evolves combinational logic circuits as
programs for a small MIMD processor, the Multi-Logic-Unit Processor (MLP).
Every logic unit of the MLP is a K-input lookup table (LUT), so a program
*is* a LUT netlist: each sub-instruction names one LUT function and the K
registers that feed it. An evolution engine (EE) breeds candidate programs;
each candidate has to be run on every row of the target truth table to
count how many output bits it gets wrong. That evaluation is the bottleneck
of the whole search, and it is what this RTL does in hardware.

Two evaluators are provided, side by side in the top module `gpplcs_top`:

* **`mlp_pilchard`**: one 4-LUT MLP behind a 64-bit memory-mapped host bus.
  A host program writes a candidate, starts it, and reads back the outputs
  of all rows, eight rows per bus word.
* **`mmgpplcs`**: ten MLPs fed from a FIFO of children (the EMFIFO) and
  returning `{id, U}` results through a second FIFO (the MEFIFO), where U is
  the number of unmatched training cases. The EE keeps breeding while the
  MLPs evaluate.

The EE is software and is not part of this RTL. Its side of the two FIFOs
is brought out as ports of `gpplcs_top`.

## The MLP

### Registers

| registers | kind | written by |
|-----------|------|-----------|
| R0-R15    | variable, cleared to 0 before every row | PEi writes only Ri |
| R16-R31   | constant during a row | loaded from the row number and `const_bits` |
| R0-R7     | also the program outputs | |

The inputs occupy the top of the constant bank. R31 holds bit 0 of the row
number, R30 holds bit 1, and so on down to R(32-n_in). The first-named input
of a problem (the lowest register) is therefore the most significant row
bit. Constant register R16+j below the inputs holds `const_bits[j]`. This
is how logic 0 and logic 1 are supplied. Outputs are read from R0 up to
R(n_out-1).

### Sub-instruction (SI) format

A parallel instruction (PI) has 16 SIs. SIj goes to PEj. For K=4 an SI has
37 bits; for K=2 it has 15:

```
 [36]      [35:20]        [19:15] [14:10] [9:5] [4:0]      (K = 4)
 nop   LUT contents T     A       B       C     D          operand register numbers
```

The LUT address is `{A,B,C,D}` with A as the most significant bit. Bit i of
T is the output for address i. So `0xF000` is A AND B (C and D ignored),
and `0x0FF0` is A XOR B. When the nop bit is set, the PE keeps the value of
its register. The helper `make_si()` in `tb/tb_gpp_pkg.sv` builds SIs in
this layout.

### Execution and timing

The control unit (`mlp_cu`) runs the whole program once per truth-table
row:

```
ROW  : clear R0-R15, load R16-R31 for this row, capture R0-R7 of the previous row
SEL  : every PE copies its K operand registers into its operand register (IOR)
LUT  : every PE writes T[IOR] into its own Ri          (SEL+LUT repeated L times)
...
FINAL: capture R0-R7 of the last row, flush the output buffer
```

All 16 PEs read the registers in the same SEL cycle, so every SI of a PI
sees the values left by the previous PI. That is what makes the PI
parallel. While a PI executes, the next PI is already read from the
synchronous program memory into the sub-instruction registers.

* Cycles per row: `2L + 1`.
* Cycles from `start` to `done` for N = 2^n_in rows: `N(2L+1) + 2`.
* For example, MUX6 with L = 25 takes 64 × 51 + 2 = 3266 cycles.

`mlp_outbuf` packs the outputs into 64-bit words. Byte b of word w holds
R7..R0 of row 8w+b. A table of N rows therefore needs ⌈N/8⌉ words, and a
partly filled last word is padded with zeros.

## Host-attached MLP (`mlp_pilchard`)

`mlp_host_if` decodes a word-addressed bus. Each access is a single-cycle
`host_we` or `host_re` strobe with a 14-bit address and 64-bit data. Read
data appears one cycle after `host_re`.

| address        | access | meaning |
|----------------|--------|---------|
| 0x0000-0x1FFF  | write  | SI: `addr[8:4]` = PI index, `addr[3:0]` = SI index, `wdata[36:0]` = SI |
| 0x2000         | r/w    | CONFIG: `[5:0]` L, `[11:8]` n_in, `[31:16]` const_bits |
| 0x2001         | write  | CTRL: start an evaluation (ignored while busy) |
| 0x2001         | read   | STATUS: bit 0 busy, bit 1 done |
| 0x3000 + w     | read   | output word w |

A typical run on the host side:

1. Write the SIs and CONFIG.
2. Write CTRL.
3. Poll STATUS until done.
4. Read ⌈2^n_in/8⌉ result words and compare them with the expected table.

Program writes are blocked while the MLP is busy; an assertion in
`mlp_core` checks this.

## Multi-MLP evaluator (`mmgpplcs`)

```
 EE --em_wr--> EMFIFO --> mm_dispatch --> mlp_eval_unit x10 --> mm_collect --> MEFIFO --me_rd--> EE
```

* **Child entry** (`em_data`): `{id[15:0], L, PI[24] … PI[0]}`. PI i sits in
  bits `[i*592 +: 592]`, and SI j of a PI in `[j*37 +: 37]`. That is
  14 821 bits for the default sizes.
* **`mm_dispatch`** offers the EMFIFO head to the lowest-numbered idle unit
  and holds that grant until the unit pops the entry. `all_busy` is high
  while a child waits because no unit is free.
* **`mlp_eval_unit`** copies the L PIs into its MLP one per cycle, popping
  the EMFIFO with the last copy. It then starts the MLP, and its
  `mlp_fitness` compares each output word with the shared expected table and
  counts U. The unit holds `{id, U}` until the collector takes it.
  From the grant to a valid result takes `1 + L + 1 + N(2L+1) + 2 + 1` cycles.
* **`mm_collect`** moves one result per cycle into the MEFIFO, serving
  units round-robin. `me_stall` is high while a result waits for MEFIFO
  room. Results come out in completion order. The `id` tells the EE which
  child a result belongs to.
* The problem configuration (`n_in`, `n_out`, `const_bits`) and the expected
  table (`exp_we/exp_addr/exp_wdata`, same layout as the output words) are
  shared by all units. Write them before issuing children, and do not change
  them while children are in flight.

The EE computes the design-phase fitness as `U / (2^n_in · n_out)`.

## Parameters

| parameter  | default | meaning |
|------------|---------|---------|
| `K`        | 4       | LUT inputs per logic unit (2 gives the 2-LUT MLP) |
| `LMAX`     | 25      | maximum program length in PIs |
| `MAX_IN`   | 8       | maximum number of circuit inputs (256 rows) |
| `N_MLP`    | 10      | MLPs in the multi-MLP evaluator |
| `EM_DEPTH`, `ME_DEPTH` | 16 | FIFO depths |

Fixed sizes are in `rtl/gpp_pkg.sv`: 16 logic units, 32 registers, 8 output
registers, a 64-bit bus, a 14-bit address, a 16-bit child id and a 12-bit U.
The six benchmark sizes used with this kind of synthesizer fit the defaults:
up to 8 inputs and 7 outputs (a 2-digit BCD-to-binary decoder: 256 rows,
1792 cases), and 3-bit multiplication (6 inputs, 6 outputs).

## Where this RTL makes its own choices

These points are choices made for this RTL, not part of the original
architecture description:

* the order of the input bits in R16-R31, and `const_bits` as the source of
  the constant registers;
* the extra housekeeping cycle per row, which gives 2L+1 cycles per row
  instead of 2L;
* the nop encoding as a single flag bit above the 16 LUT bits;
* the host address map and the one-cycle read latency;
* the program memory layout (one PI per word, with per-SI write enables);
* the child-entry layout and the 16-bit id;
* the FIFO depths;
* lowest-index dispatch and round-robin collection;
* counting U next to each MLP, so that only `{id, U}` travels back. The
  host-attached MLP instead returns raw outputs, and the host counts U.

Resets are active-low and asynchronous (`rst_n`). The design uses a single
clock. The original board ran the MLP at 100 MHz. Timing closure of this
RTL has not been checked.

## Files

* `rtl/gpp_pkg.sv`: shared constants, SI/PI width functions, control-unit
  state type and the MEFIFO entry struct.
* MLP: `rtl/mlp_pe.sv`, `rtl/mlp_progmem.sv`, `rtl/mlp_cu.sv`,
  `rtl/mlp_outbuf.sv`, `rtl/mlp_core.sv`.
* Host-attached MLP: `rtl/mlp_host_if.sv`, `rtl/mlp_pilchard.sv`.
* Multi-MLP evaluator: `rtl/mlp_fitness.sv`, `rtl/gpp_fifo.sv`,
  `rtl/mlp_eval_unit.sv`, `rtl/mm_dispatch.sv`, `rtl/mm_collect.sv`,
  `rtl/mmgpplcs.sv`.
* Top: `rtl/gpplcs_top.sv`.
* `tb/tb_<module>.sv`: one self-checking testbench per module, plus
  `tb/tb_mlp_core_k2.sv` (2-LUT MLP with a full-adder program) and
  `tb/tb_gpp_pkg.sv`. The latter holds a software model of the MLP
  (`ref_row`) and of the fitness count, which the testbenches compare
  against.

`tb_gpplcs_top` runs the top at its default parameters. It drives the
host-attached MLP through two complete runs. It also pushes a stream of
random and hand-written MUX6 children through the ten-MLP evaluator. While
it does so, it counts how often the EMFIFO fills, children wait for busy
MLPs, the MEFIFO stalls, and results return out of order. It fails if any of
these never happens. It finishes in a few seconds.

`tb_gpplcs_workloads` runs eight benchmark problem sizes through both
evaluators at the default parameters. The problems are a 6-input
multiplexer, a 2-bit adder with carry in, a 3-bit comparator, a 6-bit
priority selector, 7-input majority, a 2-digit BCD-to-binary decoder, a 3-bit
multiplier and a 6-bit one's counter. For each problem the testbench:

* runs one random program on the host-attached MLP and checks the
  `N(2L+1)+1`-cycle busy time, every output row, and U;
* sends twelve random children through the ten-MLP evaluator and checks
  every returned U.

The truth tables are computed from each function's arithmetic definition.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_gpplcs_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/gpp_pkg.sv tb/tb_gpp_pkg.sv tb/tb_gpplcs_top.sv
./obj_dir/Vtb_gpplcs_top
```

Replace the top module and testbench file to run any other testbench. Each
one ends by printing `TB_RESULT checks=<n> failures=<m>`, and each has a
watchdog that stops a hung simulation and counts it as a failure.
