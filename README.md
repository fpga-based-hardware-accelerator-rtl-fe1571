# Sum-product accelerator for a discrete factor graph

Belief propagation on a discrete factor graph spends most of its time at the
factor nodes. There, every outgoing message is a sum over all entries of the
factor's table, each weighted by the incoming messages. This RTL moves that
step into programmable logic next to an embedded processor. The processor keeps
the graph, the message schedule and the learning loop. It hands one factor node
at a time to the accelerator:

* it loads the factor's table once, through a dedicated memory port;
* it writes the incoming messages over AXI4-Lite and starts an operation;
* it takes the outgoing message back when an interrupt (or a polled done bit)
  says the operation is finished.

The values are single-precision floats. Each variable is discretised into C
states, which act as a population code: a real value, such as a robot's
heading, becomes a bell-shaped distribution over C neurons with Gaussian
tuning curves. The value is read back as the distribution's centre of mass.
Encoding and decoding run on the host. The accelerator sees only the
C-element messages and the C^n-entry factor tables.

The design follows the accelerator of Sugiarto et al., "FPGA-based Hardware
Accelerator for an Embedded Factor Graph with Configurable Optimization". The
main example there is a Zynq-7020 that fuses a robot's gyroscope and compass
readings into an estimate of its heading. That design was written in C++ for
high-level synthesis. This is a hand-written SystemVerilog version of its
datapath, built from the published description. The register map, the memory
layout, the pipeline details and the arithmetic corner cases were chosen here;
they are listed under "Departures and choices" below.

## The two operations

Take a factor f(x0, x1, ..., x(n-1)) over n scope variables, each with C states,
and incoming messages m_s(x_s). The accelerator has two operations, and both
target one variable t:

    factor product    W(x)     = f(x) * PROD over s != t, s < n of m_s(x_s)
    marginalization   out(x_t) = SUM over all x with that x_t of W(x)

A full factor-to-variable message is a product followed by a marginalization.
The host can also call the two steps separately. Each completion raises the
interrupt. The product goes into a separate work table, so the factor table
stays loaded across calls. The output message is not normalised; the host does
that if it needs it.

The number of states C is fixed when the design is built (`N_STATES`). The
number of scope variables n (1 to `MAX_SCOPE`) and the target t are run-time
arguments. A factor with fewer states runs if the host pads it with zeros: set
every factor entry that has a state >= K to 0. Those outgoing states then come
out exactly 0, and the others are unchanged. `tb_sensor_fusion` runs 5-, 10-
and 15-state networks this way.

## Table layout and the row sweep

Everything else follows from how the table is laid out. The flat index of an
entry, with variable 0 changing fastest, is

    i = x0 + C*x1 + C^2*x2 + ...

The datapath has L **lanes** (`LANES`, the unroll factor; L must divide C).
The table is split into L banks (cyclic partitioning): entry i is in bank
i mod L, at row i div L. So a **row** is L consecutive entries, all readable in
the same clock: L neighbouring states of x0 at fixed (x1, x2, ...). At the
default, L = C = 20, and a row holds every state of x0. With L < C, x0 is
covered by C/L rows, called **chunks**. A factor with n variables uses
R = (C/L) * C^(n-1) rows. The row number counts the chunk, then x1, then x2,
in mixed radix. The sequencer keeps these **digits** in a counter, so no
division is needed.

Each row goes through the L lanes:

* **Product.** Lane j holds state x0 = chunk*L + j. It multiplies its entry by
  m_0[x0], then by m_1[x1], then by m_2[x2]. The row's digits give x1 and x2,
  which are the same for every lane. A variable that is not used (the target,
  or one outside the scope) multiplies by 1.0, which is exact. Multiplications
  are chained in variable order.
* **Marginalization onto x0.** There are C accumulators. Lane j adds its entry
  into accumulator chunk*L + j.
* **Marginalization onto any other variable.** An adder tree first sums the
  row pairwise: the L words are padded with +0 to the next power of two (32 at
  the default) and added in pairs (0,1), (2,3) and so on. The row's digit of
  the target then picks the one accumulator that adds this sum.

Floating-point addition is not associative, so the exact result depends on
this order: the tree order first, then the rows in increasing order. It
therefore depends on L. The testbenches model that order bit for bit. They
also compare against a double-precision sum, with a relative tolerance.

## Pipeline and timing

`sp_ctrl` moves rows through three stages:

| stage | clock | product | marginalization |
|---|---|---|---|
| p1 read    | t   | factor table row r is read | work table row r is read |
| p2 compute | t+1 | lanes multiply, result registered | tree sum / row registered |
| p3 write   | t+2 | work table row r written | accumulators updated |

With `PIPELINE = 1` (the default), rows overlap: a new row is read every clock,
while earlier ones are computed and written. An operation then takes
**R + 3 clocks**, counted from the clock in which the start is taken to the
`done` pulse. With `PIPELINE = 0`, the next row is read only after the
previous one has been written, so an operation takes **3R + 1 clocks**, with
less logic active at a time. The two settings give the same bit-exact results.

Both `LANES` and `PIPELINE` are build-time parameters, and together they give
the optimization levels that the design is named for:

| build | LANES | PIPELINE | rows R (C = 20, n = 3) | clocks per operation |
|---|---|---|---|---|
| optimized (default) | 20 | 1 | 400 | 403 |
| unrolling only | 20 | 0 | 400 | 1201 |
| partial unrolling | 4 | 1 | 2000 | 2003 |
| unoptimized | 1 | 0 | 8000 | 24001 |

At the default that is 403 clocks for the product and 403 for the
marginalization, or about 8 µs per message at 100 MHz. The accumulator loop (an
fp_add whose output feeds its own input) is a single-cycle path, and so is the
chain of three fp_mul per lane. The arithmetic is combinational and nothing is
retimed. Closing timing at a high clock rate would need fp units with pipeline
stages and a matching change to the sequencer.

## Number format

`fp_mul` and `fp_add` are IEEE-754 single precision with round to nearest, ties
to even. To keep the units small:

* subnormal inputs are read as zero;
* results below the normal range flush to signed zero;
* overflow gives infinity;
* invalid operations (inf - inf, 0 x inf, any NaN) give the quiet NaN
  0x7fc00000;
* an exact cancellation gives +0.

Messages are probabilities, and values below 1e-38 do not matter here.

## Host interface

Ports of `sum_product_acc`: `clk`, `rst_n` (active-low, asynchronous), an
AXI4-Lite slave `s_axi_*` (16-bit address, 32-bit data), `factor_porta_*` and
`irq`.

**factor_PORTA** is a plain block-RAM port for the factor table: `en`, `we`,
`addr` (the flat index i above, 13 bits at the default size), `din`, and `dout`
one clock after `en`. Load the table before the first product. Do not write it
while a product runs.

**AXI4-Lite register map** (byte addresses). Its layout follows the control
block that HLS tools generate:

| address | name | meaning |
|---|---|---|
| 0x0000 | AP_CTRL | bit0 ap_start (write 1, clears when taken), bit1 ap_done (cleared by reading AP_CTRL), bit2 ap_idle, bit3 ap_ready |
| 0x0004 | GIE | global interrupt enable |
| 0x0008 | IER | bit0 enables the done interrupt |
| 0x000C | ISR | bit0 done status; writing 1 toggles it (clears) |
| 0x0010 | OP | 0 factor product, 1 marginalization |
| 0x0018 | N_SCOPE | number of scope variables n |
| 0x0020 | NODE_IDX | target variable t |
| 0x1000 + 0x100*s + 4*j | MSG_IN | incoming message of variable s, state j (read/write, full-word writes only) |
| 0x2000 + 4*j | MSG_OUT | outgoing message, state j (read only) |

`irq = GIE & IER & ISR`. Write responses come one clock after both AWVALID and
WVALID are high. Read data comes one clock after ARVALID. Both are held until
they are accepted. Assertions in the RTL check the hold rule.

A typical message to variable t:

1. Write MSG_IN of every scope variable except t.
2. Write OP = 0, N_SCOPE = n, NODE_IDX = t, then AP_CTRL = 1.
3. Wait for `irq`, then write ISR = 1.
4. Write OP = 1, then AP_CTRL = 1.
5. Wait for done, then read MSG_OUT[0 .. C-1].

## Blocks

| module | role |
|---|---|
| `fg_pkg` | float32 type, operation codes, command struct |
| `fp_mul`, `fp_add` | single-precision arithmetic (combinational) |
| `row_table` | L-bank table: host element port and datapath row port; used twice (factor table, work table) |
| `msg_in_buf` | incoming messages in flip-flops, all words visible at once (reset to 1.0) |
| `product_lanes` | L lanes x MAX_SCOPE multipliers, one output register |
| `marginalizer` | L-input adder tree, C accumulators, outgoing message |
| `sp_ctrl` | sequencer: command latch, row/digit counters, pipeline valids, done |
| `axi_lite_ctrl` | AXI4-Lite registers, message windows, interrupt |
| `sum_product_acc` | top level |

Parameters of the top: `N_STATES = 20`, `MAX_SCOPE = 3`, `LANES = N_STATES`,
`PIPELINE = 1`, `ADDR_W = 16`. With
these defaults each table holds 8000 words, 256 kbit. Two tables come to 64 KB
of block RAM, well within the 560 KB of a Zynq-7020.

## Sizes

| network | fits the default build? |
|---|---|
| 3-variable fusion factor, 5 / 10 / 15 states | yes, zero-padded (simulated) |
| 3-variable fusion factor, 20 states | yes, exact size (simulated) |
| 3-variable factor, 25 or 50 states | no: needs `N_STATES = 25` / `50`; at 50 states the two tables (8 Mbit) exceed a Zynq-7020 |
| 4-variable fusion factor, 10 / 20 states | no: needs `MAX_SCOPE = 4` (the 10-state build is simulated); at 20 states the two tables (10 Mbit) exceed a Zynq-7020 |
| 3-variable factor, unoptimized or unrolling-only build | same tables; rebuild with `LANES` / `PIPELINE` (4-lane, 1-lane and unpipelined builds simulated) |
| two independent 3-variable networks at the same time | no: one accelerator holds one factor table; two instances would need 1 Mbit of block RAM, or one instance can serve both in turn |

## Departures and choices

* **Unrolling.** The default is one lane per state (20), so a row covers all of
  x0 and is consumed per clock. This follows the reported hardware, which used
  10 to 20 parallel instances that scale with the cardinality. The original
  code listing used an unroll factor of 4; `LANES = 4` builds that.
* **Optimization switches.** The original chose unrolling and pipelining with
  high-level-synthesis directives and compared builds with and without them.
  Here `LANES` and `PIPELINE` play that role. The unpipelined build simply
  waits for each row to finish; it does not model the original's scheduling.
* **Latency.** The original reports high-level-synthesis latency estimates
  for its whole program (hundreds to hundreds of thousands of clocks). This
  design's latency is the exact R + 3 or 3R + 1 clocks per operation given
  above. The two are not comparable number for number.
* **One factor table.** The original's factor memory could hold a number of
  factor functions that depends on the network. Here the factor table holds
  one factor of up to C^MAX_SCOPE entries. To work on another factor node, the
  host reloads it through factor_PORTA (8000 writes at the default).
* **Arithmetic.** The original used the FPGA vendor's floating-point cores.
  This design has its own units instead, with the rounding and flush-to-zero
  rules above.
* **Work table.** Keeping the product in a second table, and splitting the
  message into two host calls, is this design's reading of "interrupt when the
  factor product or the marginalization is completed".
* **Not included.** The EM parameter learning, with its Kullback-Leibler
  stopping test, and the message normalisation stay on the host. So do the
  processor system, the AXI interconnect, the reset block and the board's DDR3,
  flash and Ethernet. The accelerator never touches external memory.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `fp_ref_pkg` is the
reference arithmetic: it computes in double precision, where products, and sums
of operands less than 29 binades apart, are exact, then rounds to single.

| testbench | what it shows |
|---|---|
| `tb_fp_mul`, `tb_fp_add` | ~70k random and corner-case operations against the reference |
| `tb_row_table` | host and row ports against a flat model, 1-clock read latency |
| `tb_msg_in_buf` | reset value, writes, out-of-range writes ignored |
| `tb_product_lanes` | random rows, digits and masks, with 20 and with 4 lanes |
| `tb_marginalizer` | both accumulation modes with 20 and with 4 lanes, clear, completion 2 clocks after the last row |
| `tb_sp_ctrl` | row order, digits, masks, write-back timing, R + 3 latency |
| `tb_axi_lite_ctrl` | register map, message windows, AXI back-pressure, start/done/interrupt |
| `tb_sum_product_acc` | whole accelerator at the default size: messages to every variable for 3-, 2- and 1-variable scopes, compared bit for bit; checks the cycle counts and that every mechanism (product, both marginalization modes, interrupt, polling, overlapped pipeline) happened |
| `tb_sensor_fusion` | gyroscope + compass -> heading inference with Gaussian population codes at 5, 10, 15 and 20 states; bit-exact, within 1e-4 of a double-precision marginal, and decoded heading near the mean of the two readings |
| `tb_four_variable_fusion` | the network extended by a wheel-odometry sensor, one factor over four variables, on a build with `MAX_SCOPE = 4` and 10 states: bit-exact messages to T and to G, within 1e-4 of double precision, 1003 clocks per operation, decoded heading near the mean of the three readings |
| `tb_acc_configs` | whole accelerator built three more ways (4 lanes pipelined, 20 lanes unpipelined, 1 lane unpipelined), through `acc_config_harness`: bit-exact messages, R + 3 or 3R + 1 clocks per operation, rows overlapping only when pipelined |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fg_pkg.sv tb/fp_ref_pkg.sv tb/tb_sum_product_acc.sv \
        --top-module tb_sum_product_acc -o sim
    ./obj_dir/sim

Swap in another testbench name for the others. Each testbench finishes in a few
seconds at most. `tb_acc_configs` uses the helper module `acc_config_harness`,
which Verilator finds through `-Itb`. `tb_sum_product_acc` and
`tb_sensor_fusion` run the top with all parameters at their defaults.

To change the size, override `N_STATES` and `MAX_SCOPE` on `sum_product_acc`;
for another optimization level, `LANES` and `PIPELINE`. The table depth and
address widths follow from them. The message windows assume at most 64 states
and 16 scope variables.
