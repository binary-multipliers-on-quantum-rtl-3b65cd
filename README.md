# Pipelined binary multipliers for quantum-dot cellular automata

Quantum-dot cellular automata (QCA) compute with cells that hold one bit as
the position of charges, and with a clock that sweeps across the chip in
zones. Each zone latches its cells in turn. On QCA, every cell sits in a
clock zone, so every wire and gate is a pipeline stage. Distance becomes
delay: a bit that must travel further arrives more clock cycles later. A
multiplier for this technology therefore has to be designed as a pipeline
from the start, with every signal arriving at its gate in the right cycle.

This library holds cycle-accurate, synthesizable SystemVerilog models of two
such multipliers for unsigned n-bit operands, giving a 2n-bit product:

| unit | structure | latency (cycles) | throughput | cells |
|------|-----------|------------------|------------|-------|
| `array_multiplier` | n x n systolic array | 4n - 1 (63 for n = 16) | 1 product per cycle | n² |
| `serial_parallel_multiplier` | chain of n cells, A fed bit-serially | 3n + 2 (50 for n = 16) | 1 product per 2n cycles | n |

In these models, **one QCA clock cycle is one flip-flop stage**. The delays
that the QCA layouts get from their clock zones become registers. Each
model's timing therefore matches the QCA circuit cycle for cycle, and an
ordinary synchronous clock drives it. The physical clock-zone mechanism and
the wire crossings are not modelled; they are layout, not logic.

Both units use the QCA gate set and nothing else. That set is the
three-input majority gate and the inverter (`qca_pkg`). AND is a majority
gate with one input tied to 0. The full adder (`maj_full_adder`) uses three
majority gates and two inverters:

    carry = MAJ(x, y, z)
    sum   = MAJ(NOT carry, z, MAJ(x, y, NOT z))

The top level, `qca_multipliers_top`, holds one unit of each kind side by
side. The two units share only the clock and reset. The parameter `N`
(default 16) sets the operand width everywhere.

## The array multiplier

### The lattice

`arr_core` lays the paper-and-pencil multiplication out as a grid. Cell
(i, j) is in column i and row j. It computes a_i·b_j, of weight i + j:

- a summand `a_i AND b_j`;
- a full adder that adds the summand, the sum from the cell above, and the
  carry from the cell on its right.

The sum from above comes from cell (i+1, j-1), the cell of the same weight
in the row above. Each row adds one partial product `A·b_j` to the row above
with a ripple carry, running from column 0 on the right to column n-1 on the
left. Row 0 gets zero sums and column 0 gets zero carries. The result leaves
the array in three places:

- bits m_0 .. m_{n-2} come from the right column, one per row;
- bits m_{n-1} .. m_{2n-2} come from the bottom row;
- m_{2n-1} is the final carry of the bottom-left cell.

### Why it pipelines: the cell delays

`arr_mult_cell` gives each output a fixed register delay:

| path | delay |
|------|-------|
| sum out | 2 cycles |
| carry out | 1 cycle |
| a_i to the cell below | 3 cycles |
| b_j to the cell on the left | 1 cycle |

Take cell (i, j) to work at cycle `i + 3j`. Then every input reaches it in
exactly that cycle:

- the carry from (i-1, j): `(i-1+3j) + 1`;
- the sum from (i+1, j-1): `(i+1+3(j-1)) + 2`;
- a_i, coming down column i at 3 cycles a row;
- b_j, moving left along row j at 1 cycle a column.

The computation is a wavefront. It runs from the top-right corner to the
bottom-left corner, and a new wavefront can start every cycle. The array
therefore produces one product per clock with no stalls, and every cell is
busy every cycle.

### Skewing the operands and lining up the result

For the timing above to hold, each operand bit must enter the array at the
right cycle. `arr_operand_skew` delays a_i by i cycles and b_j by 3j cycles.
The pair (a_0, b_0) enters at once.

The result bits then leave the array at different cycles. Counted from the
cycle the operands enter:

| result bit | valid at cycle |
|------------|----------------|
| m_k, k < n-1 | 3k + 2 |
| m_k, n-1 <= k <= 2n-2 | k + 2n |
| m_{2n-1} | 4n - 3 |

`arr_result_sync` delays each bit so that all of them line up at cycle
4n - 2:

- a sum bit from the cell in row j, at weight i, is delayed by
  `4(n-1) - 2j - i` cycles;
- the MSB is delayed by 1 cycle.

A final register holds the whole word. The product therefore appears on the
port 4n - 1 cycles after the operands (11 cycles for n = 3, 63 for n = 16).
A valid bit runs through a matching 4n - 1 stage shift register.

### A detail the lattice needs

The leftmost cell of row j needs the carry-out of row j-1 as its sum input.
That carry has a latency of 1, but the sum path it replaces has a latency of
2. It therefore goes through two extra registers (`g_s_rowend` in
`arr_core`). Without them the leftmost column would add a carry from the
wrong product.

## The serial-parallel multiplier

### The cell chain

`sp_chain` is a row of n `sp_mult_cell`s:

- each cell holds one bit of the parallel operand B;
- the serial operand A enters at the left, LSB first;
- A moves one cell to the right per cycle;
- partial sums move one cell to the right every two cycles.

Each cell works like a serial adder. It adds `a AND b`, the sum from its left
neighbour, and its own carry from the previous cycle. The carry loop is one
register, and the sum leaves through two registers.

Because sums move at half the speed of A, a sum meets A bits one position
later at each cell. For the weights to match, cell k (counting from the
left) must hold b_{n-1-k}: the leftmost cell holds the MSB of B, and the
rightmost cell holds b_0 and emits the product bit-serially. A is followed
by n zero bits, which push the remaining carries out. After 2n bits every
carry is provably zero, because a product of two n-bit numbers fits in 2n
bits. The next product can start right away, with no reset in between.

### The converters and the B wiring

- `sp_ps_converter` loads A and shifts it out LSB first, shifting in zeros.
  It supplies the n trailing zeros for free.
- `sp_b_distribution` holds B and delays the bit for cell k by k cycles.
  Each cell's share of a product starts k cycles after cell 0's, and B
  changes exactly at that boundary. This wiring, fed from one compact bus,
  is what gives the practical serial-parallel unit a quadratic area.
- `sp_sp_converter` shifts the serial product into a register. In the cycle
  the MSB arrives, it copies the whole 2n-bit word to the output.

### Interface and timing

`start` is accepted only while `ready` is high; a start while busy is
ignored. An accepted start samples `a` and `b` and drops `ready` for 2n
cycles. After those 2n cycles `ready` is high again, so products can follow
each other every 2n cycles. Counted from the start cycle:

- m_0 enters the output converter after n + 3 cycles;
- the full product is on `m`, with a one-cycle `out_valid` pulse, after
  3n + 2 cycles (11 for n = 3, 50 for n = 16);
- `m` holds the product until the next one.

## Where this model departs from, or adds to, the QCA design

The structure, the cell delays, the operand and result delays, the
latencies and the throughputs follow the published QCA design. The
following are choices of this model:

- **Clock and reset.** One flip-flop per QCA clock cycle, one global clock,
  and a synchronous active-high `rst` that clears every register. A QCA
  circuit has no reset.
- **Full adder.** The QCA cells use a minimal majority-gate full adder whose
  exact form is not reproduced here. The three-gate form above is a standard
  one with the same function.
- **Row-end carry.** The two extra registers on the carry between rows of
  the array (see above) are this model's way of making the stated cell
  timing consistent.
- **Array latency.** With the published operand and result delays, all
  result bits line up 4n - 2 stages after the operands. One output register
  on the product word brings the port-to-port latency to the stated 4n - 1.
- **Handshakes.** The array unit's `in_valid`/`out_valid` and the
  serial-parallel unit's `start`/`ready`/`out_valid` are additions. Both
  units sample their operands once, in the start or valid cycle; the caller
  need not hold them.
- **Not modelled.** The four-phase clocking fields, the coplanar wire
  crossings, the layouts' area, and the power figures (bit erasures,
  power density). The serial-parallel unit's idle cycles, when cells
  compute with zero inputs, do happen in the model, but they are not
  counted.

## Files

`rtl/`, one module or package per file:

| file | contents |
|------|----------|
| `qca_pkg.sv` | majority gate, inverter, and majority AND |
| `maj_full_adder.sv` | majority-logic full adder |
| `delay_line.sv` | generic shift register, used for every multi-cycle wire |
| `arr_mult_cell.sv`, `arr_core.sv`, `arr_operand_skew.sv`, `arr_result_sync.sv`, `array_multiplier.sv` | the array multiplier |
| `sp_mult_cell.sv`, `sp_chain.sv`, `sp_ps_converter.sv`, `sp_b_distribution.sv`, `sp_sp_converter.sv`, `serial_parallel_multiplier.sv` | the serial-parallel multiplier |
| `qca_multipliers_top.sv` | both units side by side |

For a `delay_line` of depth 0, `clk` and `rst` are unused. The last chain
cell's serial-operand output is also unused. Lint reports both; they are
harmless.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus
two more:

- `tb_word_lengths.sv` runs both units at several widths through the helper
  `mult_width_check.sv`;
- `tb_array_wide.sv` runs the array at 64 bits, using the same helper;
- `tb_qca_multipliers_top.sv` runs both units at the default N = 16 and
  counts that each mechanism occurs: full-rate streaming, pipeline bubbles,
  back-to-back serial starts, starts ignored while busy, and idle cycles.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y tb rtl/qca_pkg.sv \
        tb/tb_qca_multipliers_top.sv --top-module tb_qca_multipliers_top -Mdir obj
    ./obj/Vtb_qca_multipliers_top

Replace the testbench name to run any other one. `-y tb` is needed only for
`tb_word_lengths` and `tb_array_wide`.

## What has been verified, and how far to trust it

- **Array multiplier.** Exhaustive for n = 3 (all 64 pairs, back to back).
  Random streams with bubbles at n = 16, plus random operands at n = 2, 4,
  8, 32 and 64. Every product and its exact cycle of arrival are checked.
- **Serial-parallel multiplier.** Exhaustive for n = 3. Random operands at
  n = 2, 4, 8, 16, 32, 64 and 128, checking the product, the latency and the
  `ready` period.
- **Sub-blocks.** Each has its own testbench. Each testbench was also run
  against a deliberately broken copy of its block, and every one caught the
  fault.
- **Not simulated.** The array at n = 128. `N` is fully generic, but a
  128-bit array has 16384 cells, and building it for simulation takes over
  a quarter of an hour (the 64-bit array takes about four minutes).

Only logical behaviour and cycle timing are modelled. Nothing here says
anything about QCA noise coupling, layout, area or power.
