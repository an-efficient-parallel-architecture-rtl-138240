# Register-in-logic DSP array

A conventional processor keeps its working registers in a central register
file: every operation reads operands through the file's read ports and writes
its result back through a write port. With many parallel units the file's
ports and routing grow quickly, and results that feed the next operation must
make the write-back/read round trip, which is where data dependencies stall a
pipeline.

This design removes the register file. Its 32 working registers are spread
over 16 small processing elements, two registers per element, placed right
next to the ALU, multiplier and shifters that use them. An element keeps its
own result in place and hands it to a neighbour through a configurable router;
there is no write-back stage. The elements form a 4x4 grid, and the data path
between them is reconfigured every clock cycle by the program, so a kernel
such as a FIR filter becomes a spatial pipeline: one column multiplies, the
next columns add, the last accumulates.

## The register-in-logic element (`rl_le`)

```
          xR0 ──►[mux]──► R0 ─┬──────────────┬─────────────┐
                    ▲         │              │             │
                    │      ┌──▼──┐ ┌─────┐ ┌─▼──────┐ ┌────▼────┐
                    ├──────┤ ALU │ │ MUL │ │Shift R0│ │Shift R1 │
                    │      └──▲──┘ └──▲──┘ └────────┘ └────▲────┘
          xR1 ──►[mux]──► R1 ─┴───────┴────────────────────┘
                                 unit results ──► out0 mux, out1 mux
```

* R0 and R1 are 32-bit registers. Each loads, at every clock edge, one of:
  hold, its input (xR0 for R0, xR1 for R1), the ALU result, the product,
  shifter 0 (R0 shifted) or shifter 1 (R1 shifted).
* ALU: `R0 op R1` with add, subtract, reverse subtract, and, or, xor, signed
  min and max.
* Multiplier: signed `R0 * R1`, low 32 bits. Only a **RegMUL** element has
  one. A **RegALU** element has only ALU and shifters. `MUL_MASK` on the top
  picks which of the 16 elements are RegMUL. The default is all of them.
* Two output ports, each showing R0, R1 or any unit result.

All units read only R0 and R1. The outputs therefore depend on the registers
and the configuration, never combinationally on xR0/xR1. Any pattern of
element-to-element connections is loop-free. A value loaded at one edge is
processed and visible on the outputs in the next cycle, so one column of the
grid is one pipeline stage.

## Grid and routers (`rl_le_array`, `rl_router`)

Column `c` of four elements is fed by router `c`. Each of the column's eight
inputs (xR0/xR1 of four rows) selects independently from a 5-bit source
number:

| source | meaning |
|---|---|
| 0-7   | output `2*row+port` of the previous column (column 0 takes column 3: a ring) |
| 8-15  | output of an element in the router's own column |
| 16-23 | data scheduler read port 0-7 |
| 24-31 | zero |

Any element reaches any element of the next column in one cycle, and any
element of the grid in a few cycles. Elements are numbered `col*4+row`. Their
outputs are numbered `2*element+port` when the data scheduler collects them.

## Program execution

A **program step** (`rl_pkg::instr_t`, 891 bits) describes one cycle of the
whole machine:

* `arr`: the configuration of all 16 elements (`le_cfg_t`: ALU op, shift ops
  and amounts, register and output selects) and of all 4 routers;
* `sched`: per read port a base address and signed stride; per write port
  (four of them) an enable, the LE output to store, base, stride and a `skip`;
* `ctrl`: `rep`, the step is issued `rep+1` times, and `halt`.

The main controller issues step iterations `iter = 0..rep` back to back, one
per cycle, moving to the next step with no bubble. Each iteration passes
through two stages:

1. **issue** (cycle *t*): the data scheduler reads word
   `base + iter*stride` for each read port. The LE configurator latches the
   array configuration.
2. **apply** (cycle *t+1*): the read words reach the routers, the
   configuration drives the grid, the element registers update at the end of
   the cycle, and each enabled write port stores its chosen LE output at
   `base + (iter-skip)*stride`. Iterations below `skip` write nothing.

`skip` is how a pipelined kernel lines up its results. A result whose operands
entered column 0 in iteration *n* leaves column *k* some cycles later, and
the write port of the same streaming step picks it up with `skip` equal to
that delay. When nothing is issued, the configurator drives the all-zero
configuration, in which every register holds.

After the last iteration of a halting step the controller waits one drain
cycle, so that step is applied, then raises `done` and stops the cycle
counter. It counts from start to done.

### Example: streaming 4-tap FIR

One step, `rep = N+3`:

* column 0, rows 0-3: R0 ← h(k) (read port 2k, stride 0), R1 ← x(n-k) (read
  port 2k+1, stride 1); out0 = product;
* column 1: rows 0 and 2 add pairs of products;
* column 2: row 0 adds the two partial sums;
* column 3: row 0 loads the sum into R1, and its output shows
  `R1 >>> 2` (fixed-point rescale by shifter 1). The write port stores that
  with `skip = 4`.

N outputs take N+5 cycles: N+4 issues plus the drain cycle. In steady state
that is one output per cycle. Setting column 3's R0 select to ALU (R0 ← R0+R1)
accumulates instead. This is how filters longer than four taps, or dot
products, are built over several passes.

### Example: 4th-order IIR filter

`y(n) = sum_{k=0..4} c(k) x(n-k) - sum_{k=1..4} d(k) y(n-k)` has a recursion:
y(n-1) is needed before y(n) can finish. So this kernel cannot stream like
the FIR. Each sample is a fixed sequence of eight one-cycle steps:

| step | column 2 (multipliers, coefficient in R0, data in R1) | column 3 |
|---|---|---|
| 0 | load c0..c3 with x(n)..x(n-3) | - |
| 1 | load c4 x(n-4), d1 y(n-1), d2 y(n-2), d3 y(n-3) | rows 1, 2 take pairs of step-0 products |
| 2 | load d4 y(n-4) | rows 1, 2 take the step-1 products; row 0 takes the two pair sums |
| 3 | - | row 0: R0 <- R0+R1, R1 <- c4 x(n-4) - d1 y(n-1); row 3 keeps d4 y(n-4) |
| 4 | - | row 0: add, takes d2 y(n-2) + d3 y(n-3) |
| 5 | - | row 0: subtract, takes d4 y(n-4) |
| 6 | - | row 0: subtract, R0 = y(n) |
| 7 | - | write y(n) to memory |

The accumulating element changes its ALU operation from step to step. The
value written in step 7 is read back as y(n-1) in step 1 of the next sample.
The 64-step program buffer holds eight samples.

### Example: radix-2 FFT

One complex butterfly `X0 = a + w b`, `X1 = a - w b` enters per cycle, with
twiddles in Q14:

* column 0 forms `wr*br`, `wi*bi`, `wr*bi` and `wi*br`. The router gives the
  same scheduler word to several inputs.
* column 1 subtracts and adds these products into w*b, scaled by 2^14.
* column 2 rescales the real and imaginary parts with its two shifters.
* column 3 adds and subtracts a. The read ports for a use a base address
  three strides back, so a arrives in the same cycle as w*b.
* four write ports store the four result words, with `skip = 4`.

A stage reads one buffer and writes the other. Within a stage the butterflies
form arithmetic sequences, either across groups or across the butterflies of
one group, so a stage is one or a few strided steps. Stages are separated by
a one-cycle gap step. The gap is needed because a word written in the last
apply cycle of a step cannot yet be read in that same cycle. A 16-point
transform takes 9 steps and 60 cycles.

## Data scheduler, configurator, controller, host port

* `rl_data_scheduler`: 1024 x 32 data memory with 8 strided read ports, 4
  strided write ports and a host port. When writes collide in one cycle, write
  the higher-numbered write port wins, and every write port beats the host.
* `rl_le_configurator`: the register stage for the array configuration. It
  also guards RegALU elements. A request for a product there is replaced by
  hold / R0 and sets the sticky `cfg_err`.
* `rl_program_buffer`: 64 steps, written as 28 32-bit chunks each (chunk *k*
  = bits `32k+31:32k`), read a whole step at a time, asynchronously.
* `rl_main_controller`: the sequencer described above.
* `rl_system_interface`: the host port. A write is one cycle with `req=we=1`.
  A read is one cycle with `req=1, we=0`, and `rdata` is valid with `rvalid`
  in the next cycle. Word addresses:

| address | access |
|---|---|
| `0x0000-0x03FF` | data memory |
| `0x1000 \| step<<5 \| chunk` | program buffer (write only) |
| `0x2000` | write: bit0 start, bit1 clear `cfg_err`; read: bit0 busy, bit1 done, bit2 `cfg_err` |
| `0x2001` | read: cycles of the last run |

Data memory and program buffer writes are ignored while a program runs.

## Where this design stands against the architecture it implements

Taken from the architecture:

* 16 elements with two 32-bit registers each, in 4 columns of 4.
* Inside an element: ALU, optional multiplier and two shifters, with RegALU
  and RegMUL variants.
* One router per column, with any-to-any connection between neighbouring
  columns.
* The surrounding blocks: data scheduler, LE configurator, main controller,
  program buffer and system interface.
* The layered multiply / add / accumulate mapping of filters.

Choices of this implementation, which the architecture leaves open:

* all operation sets and encodings;
* the two-stage issue/apply timing;
* the program-step format, with its repeat count, strided addressing and
  write skip;
* the port counts (8 read, 4 write) and the memory sizes;
* the ring from the last column back to the first;
* same-column routing from any element (the architecture shows only links
  between vertical neighbours);
* the host bus;
* final results go to the data memory through the write ports. A separate
  small set of result registers is not provided;
* reset of all registers to zero;
* the default of a multiplier in every element.

Not built:

* There is no branch or data-dependent control flow. Programs are straight
  sequences of repeated steps.
* The reference cycle counts quoted for FIR, IIR and FFT kernels cannot be
  reproduced, because the kernel sizes behind them are not known.
* The IIR mapping above does not overlap consecutive samples. It runs at
  8 cycles per sample, and a software-pipelined schedule would be faster.

## Changing sizes

The word width, grid shape, port counts, memory sizes and field widths are
localparams in `rl_pkg`. The program-step layout, and with it the number of
32-bit chunks per step, follows from them automatically. `rl_router` decodes
its source number assuming four rows and eight read ports (3-bit fields).
`rl_system_interface` decodes the step number from address bits 10:5,
assuming at most 32 chunks per step. Change both if those sizes change.
`MUL_MASK` is the only parameter of the top.

## Verification

Every module has a self-checking testbench that compares against values
computed independently in the testbench. These reference values are random
operand sweeps, memory models, and the filter and FFT arithmetic itself. The
system-level tests also check cycle counts: N+5 cycles for an N-output
streaming FIR, 8 cycles per IIR sample plus one, and 60 cycles for the
16-point FFT. Everything was run with Verilator in two-state simulation with
random initial values. No gate-level, timing or FPGA results exist.

## Files and simulation

`rtl/rl_pkg.sv` holds the shared types. Each other `rtl/` file is one module.
`rl_top` is the system. Every module has a self-checking testbench
`tb/tb_<module>.sv`, and `tb/rl_tb_pkg.sv` builds configurations for them.
`tb_rl_top` drives the full-size system through the host port. It runs a
64-output FIR (checking the N+5 cycle count and that host writes are refused
while busy), a 16-term dot product that also moves the result around the ring
and down a same-column link, and 16 butterflies through two write ports.
`tb_rl_iir` (16 samples of a 4th-order IIR filter) and `tb_rl_fft` (16-point
complex FFT) run the other two kernels on the full-size system. They check
every output against a reference computed in the testbench, and check the
cycle count. `tb_rl_top_mixed` builds the system with RegALU elements in
columns 1 and 3. It checks that the FIR still runs and that a product request
on a RegALU element is refused and reported.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rl_pkg.sv tb/rl_tb_pkg.sv tb/tb_rl_top.sv --top-module tb_rl_top
./obj_dir/Vtb_rl_top
```

Each testbench prints `TB_RESULT checks=N failures=M`.
