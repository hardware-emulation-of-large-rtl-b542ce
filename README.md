# PRUS: a lock-step network of single-bit processors for emulating Boolean equations

PRUS emulates a large digital design by running its Boolean equations on many
very small processors rather than mapping gates onto programmable fabric. A design
is first turned into a set of logic equations. Each equation is then written in
reverse Polish order: operands first, then the operation. The equations are spread
over a grid of identical *sequencers*. A sequencer is a single-bit processor with
its own program memory and a 1-bit-wide data memory.

Sequencers have no jumps or branches. A single address counter feeds every program
memory in the grid, so all sequencers execute instruction *n* in the same clock.
A compiler therefore knows in advance the exact clock in which each result appears
on a link between processors, and it schedules the matching read on the
neighbour. No handshake is needed. One full pass through the program is one
*emulation cycle*. Its length in clocks is the number of program words, and it is
the worst-case response time of the emulated circuit. No timing analysis of the
emulated design is needed.

This repository holds synthesizable SystemVerilog for the network (`prus_matrix`),
the sequencer and each of the sequencer's parts. It also holds self-checking
testbenches, including a 40,000-gate workload that runs on the full 64-processor
network.

## The network

`prus_matrix` is a `ROWS x COLS` grid of sequencers. The default is 8 x 8, which
gives 64 processors. The grid is a torus: each sequencer is linked to its eight
neighbours, and the edges wrap in both directions. For example, in a 4 x 4 grid the
upper-left processor's north-west neighbour is the lower-right one.

Each sequencer has a one-bit *Output Buffer*, which it offers to all eight
neighbours. A sequencer reads its neighbours' buffers as `NP(0..7)`, in the order
N, NE, E, SE, S, SW, W, NW.

| port | width | meaning |
|---|---|---|
| `clk`, `rst` | 1 | clock; synchronous reset, which clears data memories, registers and outputs but not programs |
| `run` | 1 | the common address counter advances only while `run` is high |
| `prog_we`, `prog_sel`, `prog_addr`, `prog_data` | 1, log2(ROWS·COLS), 11, 13 | write one instruction word into sequencer `prog_sel = row*COLS + col` |
| `ext_in[p]` | 8 per sequencer | external inputs `IN(0..7)` of sequencer p |
| `ext_out[p]` | 16 per sequencer | latched outputs `OUT(0..15)` of sequencer p |
| `pc` | 11 | the common program address |
| `cycle_done` | 1 | high in the clock where END executes, which is the last clock of an emulation cycle |

How to use it:
1. Load the programs with `run` low.
2. Pulse `rst` for one clock.
3. Raise `run`.
4. Hold `ext_in` steady during each emulation cycle, and sample `ext_out` when
   `cycle_done` is high.

Every sequencer's END resets the common counter (the END signals are ORed).
Programs must therefore place END at the same address in every sequencer.

## Inside a sequencer

```
 program_memory[pc] ──> instr_decoder ──> controls
        │ B(9..0)/B(3..0)
        v
 data_memory ─┐
 IN(0..7) ────┼─> in_mux ──┬──> single_bit_processor ──(AND, XOR)──┐
 NP(0..7) ────┘            │    (True/Inv mux, AND, XOR blocks)     │
                           └────────────────────────────────────> sbp_mux ──> result bit
 result bit ──> data_memory (DM_WE) / output_decoder OUT(B(3..0)) (Out_Dec_EN)
            └─> output_buffer ──> To NP (all eight neighbours)
```

* **program_memory**: holds 2048 words of 13 bits. It is read asynchronously at
  `pc` and written through the programming port. Reset does not clear it.
* **instr_decoder**: combinational. It produces DM_WE, Out_Dec_EN, Mux_EN,
  End_Instr, the operand-read controls and the output-buffer load.
* **data_memory**: holds 1024 one-bit words, read asynchronously and written
  synchronously. Reset clears it. The emulated nets and the emulated flip-flops
  live here. Because of the reset, any address that is never written reads as a
  constant 0.
* **in_mux**: on an external access it selects `IN(k)` for k = 0..7 or `NP(k-8)`
  for k = 8..15. Otherwise it passes the data-memory bit.
* **single_bit_processor**: does the arithmetic of one equation:
  * **True/Inv mux**: passes each operand straight or inverted.
  * **AND register**: the first operand of an equation loads it. Each later operand
    ANDs into it, so the first 0 clears it. Reset sets it to 1.
  * **XOR block**: a 3-stage shift register of the last three operands. Its output
    is the XOR of the three stages. It has no reset and needs no initialisation.
  * **OR block**: built instead of the XOR block when `SECOND = SBP_OR`. It is loaded
    by the first operand and ORs in the later ones.
* **sbp_mux**: chooses the result bit from four sources: AND (ANDT), inverted AND
  (ANDI), XOR, or the input-mux bit (PASS, for forwarding straight to the
  neighbours).
* **output_buffer**: a 1-bit register that feeds the neighbours. Every result
  write loads it, and it holds its value until the next write.
* **output_decoder**: 16 latched output bits. A write to `OUT(k)` changes only bit
  k, and the bit keeps its value until it is written again.
* **address_counter**: the common `pc`. It counts while `run` is high, END returns
  it to 0, and it wraps at the end of the program memory if no END is found.

## Instruction set

The figures of the sequencer fix the bit fields below:
* `B(9..0)` is the data-memory address.
* `B(3..0)` selects the input-mux line and the output line.
* `B(10)` is the True/Inv select.
* `B(12..10)` is the SBP-mux code.
* `B(12)`, the top bit, starts a new equation.

The rest of the encoding is this design's own.

| B(12) | B(11) | B(10) | B(9..0) | instruction |
|---|---|---|---|---|
| init | 0 | inv | source | **READ**: feed source (inverted if `inv`) to the AND and XOR blocks; `init` starts a new equation |
| 0 | 1 | 0 | destination | **ANDT**: write the AND register |
| 0 | 1 | 1 | destination | **ANDI**: write the inverted AND register |
| 1 | 1 | 0 | destination | **XOR**: write the XOR of the last three operands |
| 1 | 1 | 1 | source | **PASS**: copy the source bit to the Output Buffer only |
| 1 | 1 | 1 | `0x3E0`, `0x3E2`, … (B(0)=0) | **NOOP** |
| 1 | 1 | 1 | `0x3E1`, `0x3E3`, … (B(0)=1) | **END**: the common counter returns to 0 |

The 10-bit address space is used as follows:
* `0x000-0x3EF` are data-memory bits.
* `0x3F0-0x3FF` are external lines:
  * a READ or PASS from `0x3F0+k` takes `IN(k)` for k < 8 and `NP(k-8)` for k ≥ 8;
  * an ANDT, ANDI or XOR to `0x3F0+k` writes `OUT(k)`.
* A PASS cannot read data-memory bits `0x3E0-0x3EF`, because a PASS from those addresses is NOOP or END. READ and the write instructions can reach them.
* Every ANDT, ANDI, XOR and PASS also loads the Output Buffer.

`prus_pkg` has helper functions that build instruction words: `i_read`,
`i_write`, `a_in`, `a_np` and `a_out`. It also defines the constants `I_NOOP` and
`I_END`.

### Compiling gates

| gate | words |
|---|---|
| `y = a & b` | `READ+init a`, `READ b`, `ANDT y` |
| `y = ~(a & b)` | `READ+init a`, `READ b`, `ANDI y` |
| `y = a \| b` | `READ+init ~a`, `READ ~b`, `ANDI y` (De Morgan) |
| `y = ~(a \| b)` | `READ+init ~a`, `READ ~b`, `ANDT y` |
| `y = a ^ b` | `READ a`, `READ b`, `READ zero`, `XOR y` (the XOR block always combines the last three operands; `zero` is any data-memory bit that is never written) |
| AND of *n* terms | one READ per term, then one write |
| flip-flop | store the next state in a data-memory bit; it keeps its value across emulation cycles |

### Timing

Each instruction takes one clock. A READ updates the AND and XOR registers at the
end of its clock, so a write in the very next word already sees the new values.
Results written in clock *t* can be read from clock *t+1* on: from the data
memory, from the outputs, or by a neighbour from `NP`.

There is no handshake. A producer must not overwrite its Output Buffer before the
consumer has read it, and the compiler fills the gap with NOOPs. The end-to-end
testbench shows this with a ripple-carry adder. Column *c* of each row works only
in time slot *c*, and reads its carry from its west neighbour's buffer. That buffer
was written in slot *c-1* and stays untouched while column *c* reads it.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| prus_matrix | `ROWS`, `COLS` | 8, 8 | the 64-processor network; 4x4 and 16x16 are the other sizes named |
| prus_matrix, sequencer, program_memory, address_counter | `PM_DEPTH` / `DEPTH` | 2048 | not given; chosen so that a 40,000-gate design fits on 64 processors |
| prus_matrix, sequencer, data_memory | `DM_DEPTH` / `DEPTH` | 1024 | the sequencer's 1024-bit data memory; more cannot be addressed by a 13-bit word |
| prus_matrix, sequencer | `N_IN` | 8 | eight input bits per sequencer |
| prus_matrix, sequencer, output_decoder | `N_OUT` | 16 | not given; the 4-bit output select |
| prus_matrix, sequencer, single_bit_processor | `SECOND` | `SBP_XOR` | XOR block; `SBP_OR` is the OR-block variant |

At the defaults the network has 1.7 Mbit of program memory and 64 Kbit of data
memory. It holds about 43,000 two-input gates at three words per gate.

## Where this design makes its own choices

These are the points where the RTL goes beyond what the architecture description
gives, or departs from it:

* **Instruction encoding.** Only the bit fields listed above are given. The
  READ/write split on `B(11)`, the reserved external and special addresses, and the
  codes for NOOP and END are this design's.
* **True/Inv select.** The block diagrams put it on `B(10)`, and the RTL follows
  them. A prose description that places it on the second-highest bit (`B(11)`) was
  not followed.
* **XOR block.** The 3-stage shift register is given, but not how its stages are
  combined. Here the output is the XOR of all three stages, so an XOR equation reads
  exactly three operands. A 2-input XOR uses a constant 0 as its third operand.
* **Register count.** Each sequencer here has more registers than the "two
  flip-flops per processor" the concept describes: the three-stage XOR window, the
  Output Buffer and the 16 output bits.
* **Reset values.** Reset sets the AND and OR registers, clears the data memory,
  the Output Buffer and the outputs, and leaves the program memory and the XOR
  window alone.
* **Memories.** Each sequencer has its own program memory. The concept allows the
  program memories to be merged into one wide memory at the common address, which
  behaves the same. Program-memory depth and single-cycle asynchronous reads are
  assumptions.
* **Data-memory size.** The data memory is limited to 1024 bits. Versions with
  larger data memories (up to 16,384 bits) would need a wider instruction word.
* **Links and END.** The neighbour order, the ORing of the END signals, the
  programming port and the `run` input are this design's choices.
* **Not built.** Other link patterns (chains, honeycomb, asymmetric links) are not
  built; only the eight-neighbour torus is. The software flow (HDL to equations,
  optimisation, partitioning, scheduling) and the test-stimulus interface of the
  prototype are not hardware, and are not here.

## Verification

Every module has a testbench in `tb/` that checks it against values computed
independently inside the testbench:

* `tb_instr_decoder`: a bit-level reference decode of 4,000 random words and all
  special words.
* `tb_program_memory`, `tb_data_memory`: reference arrays; reset clearing.
* `tb_in_mux`, `tb_sbp_mux`: exhaustive and random selection.
* `tb_output_buffer`, `tb_output_decoder`: holding and loading, including
  only-the-selected-bit behaviour.
* `tb_address_counter`: run/hold, END reset, wrap-around, `cycle_done`.
* `tb_single_bit_processor`: random RPN equations on both the XOR and the OR
  variant.
* `tb_sequencer`: random 64-word programs compared clock by clock with an
  instruction-level model (data memory, AND register, XOR window, buffer,
  outputs, END).
* `tb_prus_matrix`: the full-size 8x8 network at default parameters. It runs
  a neighbour exchange in all eight directions across the torus wrap, a
  PASS, inverted reads, one 8-bit ripple-carry adder per row spread over eight
  processors, and a toggle flip-flop held in data memory. It checks the
  154-clock emulation cycle and counts that each mechanism occurred.
* `tb_prus_matrix_4x4`: a 4x4 network with the OR-block variant. It identifies
  every neighbour of every processor over four emulation cycles, and checks the
  corner processor against the wrap-around drawing of the matrix (its
  neighbours are the far row and column). It also evaluates a three-input OR
  with an inverted term.
* `tb_prus_workload_40k`: 64 random netlists of 625 gates (40,000 gates) compiled
  with the table above. It runs 4 emulation cycles of 2001 clocks on the
  full-size network and checks all outputs against direct evaluation of the
  netlist.

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/prus_pkg.sv tb/tb_prus_matrix.sv --top-module tb_prus_matrix
./obj_dir/Vtb_prus_matrix
```

All testbenches run in seconds, including the full-size ones.

## Limits

* Data memory and outputs are not readable from the top level, apart from the 16
  `OUT` bits per sequencer. Visible results must be written to `OUT`.
* Nothing checks that neighbour reads are well scheduled. Reading a neighbour's
  buffer in the wrong clock gives wrong results silently. An assertion in
  `prus_matrix` does flag END reached by only some sequencers.
* The XOR window is not reset, so an XOR result is valid only after three reads
  since reset.
