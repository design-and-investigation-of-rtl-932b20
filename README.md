# Multi-core system on chip for all-pairs shortest paths

This design solves the all-pairs shortest-path problem on a weighted directed
graph with the Floyd–Warshall algorithm. It spreads the work over up to four
small 8-bit processor cores that share one data memory. It reimplements, in
SystemVerilog, a published FPGA system: five KCPSM3-style soft processors, a
shared memory with one read port and one write port per compute core, an
RS232 link to a host, a clock-pulse timer, and a character LCD.

The main idea is that Floyd–Warshall step *k* updates every element
`A[i][j] = min(A[i][j], A[i][k] + A[k][j])` independently. Row *k* and
column *k* do not change during step *k*. So each core can relax its own rows
in parallel, as long as all cores finish step *k* before step *k+1* starts.
The cores need no locks on the data. They only need this barrier, plus a
memory that serves all of them in the same instruction time. The published
measurements show speed-ups of about 2 on two cores and about 3.9 on four.
This RTL gets 1.99 and 3.81 on a 50-node graph.

## System structure

```
             RS232                                       LCD (4-bit)
   host <----------> uart_rx / uart_tx                       ^
                          |                                  |
                        Core1 ---- timer control       Core5 (display)
                          |             |                    ^
                          |        cycle_timer --snapshot----+
                          |
        Core1   Core2   Core3   Core4        (each: kcpsm3 + prog_rom + core_io)
          |       |       |       |
        port1   port2   port3   port4        (one read + one write port each)
          \_______\_______/_______/
                 shared_mem (4096 x 8)
```

* **Core1..Core4** (`mc_core` + `core_io`) run the same Floyd–Warshall
  program. They branch on their core number. Core1 is also the master: it
  receives the task, starts and stops the timer, runs the barrier and sends
  the result back.
* **Core5** runs a separate program. It keeps copying the timer value to
  the LCD as eight hex digits.
* **shared_mem** is the common data memory. It has four write ports and
  four read ports.
* **uart_rx / uart_tx** form the input-output controller. Only Core1 reaches
  them.
* **cycle_timer** counts clocks while Core1 has it running. Core1 starts it
  after the matrix has arrived and stops it before sending the result, so
  the count covers computation only.

`N_CORES` (1, 2 or 4) sets how many compute cores are built. These are the
three configurations that were measured. Core5 is always present.

## The four-port shared memory

This is the part that makes the parallel speed-up possible, and the least
obvious one.

A memory with four independent write ports and four read ports is costly.
Instead, one inner memory with two write ports and two read ports is
time-multiplexed. A divide-by-two phase signal, `clkdiv2`, selects a pair of
external ports on the input multiplexers (`we_for`, `waddr_for`, `din_for`,
`raddr_for`) and on the output demultiplexer:

| `clkdiv2` | ports served |
|-----------|--------------|
| 0         | 1 and 2      |
| 1         | 3 and 4      |

Each port is served once every two clocks. That matches the processor,
because every instruction takes exactly two clocks. All cores leave reset
together, so their instruction phases stay aligned with `clkdiv2`.

Two details let a core treat the memory as an ordinary port:

* **Reads.** The inner read ports are asynchronous. `dout[p]` passes the
  inner read data straight through during port *p*'s own phase, and holds
  the value captured at the end of that phase otherwise. A read address held
  for one whole instruction therefore gives current data when `INPUT`
  samples at the end of the instruction's second clock, whichever phase the
  port uses.
* **Writes.** The processor strobes an `OUTPUT` for only one clock. So
  `core_io` latches the address and data and keeps `we` high for the next
  two clocks. One of those clocks is the port's phase. Writing the same word
  twice does no harm.

Consequences a programmer must respect:

* A read of the word written by the immediately preceding instruction may
  return the old value. The programs never do this.
* If two ports of one pair write the same word in the same phase, the
  higher-numbered port wins. Across pairs, the later phase (ports 3 and 4)
  wins.
* The array starts zeroed, as FPGA block RAM does after configuration. The
  barrier flags depend on this.

## Processor core (`kcpsm3`)

An 8-bit core in the style of the KCPSM3 soft processor:

* 16 registers `s0..sF`
* a 64-byte scratch pad
* an ALU for add/subtract with carry, AND/OR/XOR, TEST (parity into the
  carry flag), COMPARE, and ten shifts and rotates
* ZERO and CARRY flags, with shadow copies for interrupts
* a 10-bit program counter with a 32-entry return stack
* 18-bit instructions from a private 1024-word ROM (`prog_rom`)

The instruction encoding is the published KCPSM3 one, listed in `mcsoc_pkg`.

Timing: each instruction has two clocks, T0 and T1. `PORT_ID` and
`OUT_PORT` are valid in both clocks. `WRITE_STROBE` and `READ_STROBE` are
high in T1. `INPUT` samples `IN_PORT` at the end of T1, and all state
updates at the end of T1. The ROM reads synchronously: the core shows the
current PC in T0 and the next PC in T1.

Interrupts are implemented (vector `0x3FF`, `RETURNI` restores the flags)
but this system does not use them.

## Port map and memory layout (`mcsoc_pkg`, `core_io`)

| port | R/W | meaning |
|------|-----|---------|
| 0x00 | W | shared-memory row register |
| 0x01 | W | shared-memory column register |
| 0x02 | R/W | shared memory at `{row[5:0], col[5:0]}` |
| 0x03 | R | core number (0 = Core1 … 4 = Core5) |
| 0x04 | R | number of compute cores |
| 0x05 | R | UART status: bit0 byte received, bit1 transmitter busy |
| 0x06 | R/W | UART data (read pops the byte, write sends one) |
| 0x07 | W | timer: bit0 run, bit1 clear (Core1); bit2 snapshot (Core5) |
| 0x08–0x0B | R | timer snapshot, bytes 0–3 |
| 0x10 | W | LCD pins `{DB7..DB4, 0, RW, RS, E}` |

Matrix element (i, j) is stored at row i, column j. Row 63 holds control
words:

| column | content |
|--------|---------|
| 0 | N |
| 1 | current k |
| 1 + w | `Hint_w` of compute core w (w = 1..3) |

A graph can therefore have at most 63 nodes.

## Programs and the barrier (`fw_prog_pkg`)

The program images are built in SystemVerilog at elaboration time. Small
assembler functions in `mcsoc_pkg` (`ld_k`, `add_r`, `jcc`, …) encode the
instructions, and the `EMIT`/`LABEL` macros in `asm_macros.svh` place them.
Each image is built twice so that forward labels resolve. The Floyd–Warshall
image is 132 words long and the LCD image 82.

Task protocol on RS232 (8N1):

1. The host sends N.
2. The host sends the N×N matrix, row by row. Each element is one byte, with
   `0xFF` meaning "no edge".
3. The system answers with the N×N distance matrix in the same order.

Sums saturate at `0xFF`, so a distance of 255 or more reads as "no path".

For each k, the barrier follows the original flow chart:

* Core1 writes k, then sets `Hint_w = 1` for every other compute core.
  It then relaxes its own rows and polls until every `Hint_w` is back to 0.
* Core w polls until `Hint_w = 1`, reads N and k, relaxes its rows and
  clears `Hint_w`.

Core c takes rows c, c+P, c+2P, … (P = number of compute cores). The inner
loop is 12 to 14 instructions per element. It sets the row and column
registers, reads `A[k][j]`, adds `A[i][k]`, reads `A[i][j]`, compares, and
writes only when the new path is shorter.

Core5 initialises the LCD in 4-bit mode. It then repeats: request a timer
snapshot, move the cursor home, and write the eight hex digits. `LCD_WAIT`
scales its delay loops. One unit is about 1020 clocks, and the default of 2
gives waits of about 41 µs, 1.7 ms and 15 ms at 50 MHz.

## Measured behaviour

Clock counts of the pure computation phase on random graphs, from
`tb_fw_workloads`:

| nodes | 1 core | 2 cores | 4 cores | speed-up 2 / 4 | original measurement |
|------:|-------:|--------:|--------:|---------------:|---------------------:|
| 5  | 3 776     | 2 542     | 2 210   | 1.49 / 1.71 | 1.45 / 2.58 |
| 10 | 27 646    | 14 688    | 9 748   | 1.88 / 2.84 | 1.98 / 3.88 |
| 20 | 213 686   | 108 666   | 56 496  | 1.97 / 3.78 | 1.99 / 3.86 |
| 50 | 3 194 470 | 1 603 062 | 839 152 | 1.99 / 3.81 | 1.98 / 3.92 |

For 20 and 50 nodes the speed-ups match the original measurements closely.
For small graphs on four cores, whole-row partitioning leaves the busiest core
with ⌈N/4⌉ rows (2 of 5, 3 of 10), which caps the speed-up below the original
one. The absolute counts are far below the original ones (about 400 million
timer counts for 50 nodes on one processor there). The original program was not
published, so only the ratios are comparable.

An alternative partition was tried and measured. Each core took an equal
run of the row-major element order (indices c·N²/P up to (c+1)·N²/P), with
the bounds computed once per task. On four cores this raises the speed-up to
3.07 for 10 nodes and 3.94 for 50 nodes. On two cores it lowers the
small-graph figures to 1.39 for 5 nodes and 1.84 for 10 nodes: the latency
of a worker noticing its Hint flag then lands on the critical path, and
per-row bookkeeping grows. The simpler interleaved row split was kept.

## Where this RTL departs from, or adds to, the original

These parts follow the original design:

* the five cores and their roles
* the processor's block structure, its 1024-word program memory and its two
  clocks per instruction
* the 4-port memory built from a 2-port memory multiplexed by `CLKdiv2`,
  with the signal names of the original scheme
* the UART controlled by Core1
* a timer that measures computation only and is shown by Core5
* the Hint-flag barrier

These are this design's own choices:

* the instruction encoding (taken from the published KCPSM3 one) and the
  stack depth of 32
* the port map, the row/column addressing and the 4096-byte memory depth
* which port pair uses which phase, the pass-through read and the
  two-clock write hold
* the priority rule when two ports write the same word
* the row partitioning
* the 8-bit saturating weights
* the 115200-baud 8N1 UART with a one-byte receive buffer
* the 32-bit timer with a snapshot register
* the LCD text format
* the RS232 task protocol

Other differences:

* In the original flow chart each worker counts k itself and stops after the
  last step. Here workers read k from the shared memory and then go back to
  waiting, so the system can accept further tasks.
* The clock generator (a vendor DCM) is left out: the clock input drives the
  logic directly.
* The LCD and the host are outside the chip. Testbench models stand in for
  them.
* Interrupts are built into the core but not connected.

## Simulating

All sources are in `rtl/` (packages `mcsoc_pkg.sv` and `fw_prog_pkg.sv`
first; `asm_macros.svh` is included from `rtl/`). The testbenches and their
models are in `tb/`. Example with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/mcsoc_pkg.sv rtl/fw_prog_pkg.sv rtl/*.sv \
  tb/lcd_model.sv tb/serial_sink.sv tb/tb_mcsoc_top.sv \
  --top-module tb_mcsoc_top
./obj_dir/Vtb_mcsoc_top
```

Every testbench ends with one line `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_mcsoc_full` | The system at its default parameters (4 cores, 115200 baud at 50 MHz). It solves the 6-node example graph, checks the answer against the known result matrix, and checks that the LCD ends up showing the timer count (2940 clocks). About 1.3 M clocks. |
| `tb_mcsoc_top` | Systems with 1, 2 and 4 cores side by side, with a fast UART. They solve the example graph, then a 12-node and a 20-node random graph. The test checks results against a reference, speed-ups and the LCD. It counts the mechanisms: Hint set and clear, cores spinning at the barrier, memory writes in both phases and through all four ports, improving writes, saturated sums, timer start and stop. |
| `tb_fw_workloads` | Random 5-, 10-, 20- and 50-node graphs on 1, 2 and 4 cores, producing the table above. |
| `tb_kcpsm3`, `tb_prog_rom`, `tb_mc_core`, `tb_core_io`, `tb_shared_mem`, `tb_uart_rx`, `tb_uart_tx`, `tb_cycle_timer` | Unit tests of the blocks. |

## Changing the design

* **Serial rate:** `CLKS_PER_BIT` = clock frequency / baud rate.
* **Clock frequency for the LCD:** scale `LCD_WAIT`. It is limited to 6,
  because the long delay is 41 × `LCD_WAIT` loops in an 8-bit register.
* **Number of compute cores:** `N_CORES` may be 1 to 4 (1, 2 and 4 are
  tested; 3 is untested). The program reads
  the count from port 0x04. More than four would need more memory ports and
  more Hint columns.
* **Graph size:** up to 63 nodes with the current row/column addressing.
  Larger graphs need a wider row register in `core_io` and a larger
  `MEM_AW`.
* **Programs:** edit `fw_image()` or `lcd_image()` in `fw_prog_pkg.sv`. Add
  a label to the function's enum, then use `` `LABEL `` and `` `EMIT ``.
