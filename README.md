# Low-power reconfigurable controller for wireless sensor nodes

A sensor node's controller has to switch between many small control tasks
(sampling a sensor, running a CRC, driving the radio) while spending as little
energy as possible, both while it works and while it waits. A microcontroller
is flexible but burns energy fetching and decoding instructions; a dedicated
ASIC FSM per task is frugal but fixed. This design sits in between: each task
runs on a **reconfigurable microtask**, a LUT-based finite state machine that
steers a small 16-bit datapath, and everything that is not needed at a given
moment is **power-gated**, down to individual look-up tables.

The main idea is in how the FSM is built. Its next-state and output functions
are split by Shannon expansion: a decoder turns some of the FSM's variables into
minterms, and each minterm selects one small LUT that evaluates the rest. Since
exactly one minterm is true, exactly one LUT per function has to be powered, and
the decoder output that selects it is also its wake-up signal. No separate
power controller is needed.

## Structure

```
wsn_controller                      top: system monitor + NT microtasks
├── system_monitor                  runs the task flow graph, one microtask awake
└── recon_microtask  x NT           one control task
    ├── reconfig_fsm                LUT-based Moore FSM (N, n, m) = (7, 4, 23)
    │   ├── rfsm_config_mem         always-on truth tables, 270 x 64 bits
    │   ├── minterm_decoder  x 2    next-state (5-to-32) and output (1-to-2)
    │   └── rfsm_unit  x (N + m)    one Boolean function each
    │       └── pg_lut_cluster      6-LUT + minterm AND, own sleep domain
    │           └── iso_cell
    ├── pg_prefix_adder             32-bit, 4 power-gated 8-bit clusters
    │   └── adder_cluster  x 4
    │       └── iso_cell
    └── register_file               16 x 16 bits
```

`rwsn_pkg` holds the shared sizes, the adder precision type `prec_e` and the
datapath control word `mt_ctrl_t`.

## The reconfigurable FSM

The FSM is described by the triplet (N, n, m): N state bits `s`, n primary
inputs `x`, m outputs `y`. The default (7, 4, 23) is the smallest fabric that
holds all four benchmark tasks the design was sized for:

| task        | (N, n, m)  | state transitions per run |
|-------------|------------|---------------------------|
| Crc8        | (6, 3, 16) | 71                        |
| receiveData | (6, 3, 23) | 332                       |
| Crc16       | (7, 4, 19) | 73                        |
| firBasic    | (7, 3, 21) | 168                       |

### Next-state logic

Put the FSM's variables in one sequence `v = (x_0 .. x_{n-1}, s_0 .. s_{N-1})`.
With K-input LUTs (K = 6), the first `D = n + N - K` variables (here 5: all four
inputs and `s_0`) are decoded into 2^D = 32 minterms `m_k`, and the last K
variables (`s_1 .. s_6`) drive the LUTs:

```
s_i(t+1) = OR over k of ( m_k AND f_i,k(v_D .. v_{n+N-1}) )
```

Each of the N state bits has its own **unit** (`rfsm_unit`) of 32 LUT clusters
and one OR gate; the decoder is shared by all units. Table sizes: N x 2^D = 224
next-state LUTs, 7 x 2^11 = 14336 configuration bits.

### Output logic

The outputs are Moore outputs, functions of the state alone. With output LUTs of
K_op = 6 inputs and N = 7 > K_op, the first `N - K_op = 1` state bit is decoded
into 2 minterms and each output unit has 2 LUTs of `s_1 .. s_6` (23 x 2 = 46
LUTs, 23 x 128 = 2944 bits). If N <= K_op, each output is one LUT of the whole
state and the output decoder disappears (parameter `KOP`).

### Power gating

Every LUT cluster (`pg_lut_cluster`: LUT plus its minterm AND gate) is a power
domain with

```
SLEEP_k = power_gate_i OR NOT m_k
```

`power_gate_i` switches a whole unit off (one bit per unit: bits [N-1:0] for
the state bits, [N+m-1:N] for the outputs). With all units on, exactly N + m =
30 of the 270 clusters are awake in any cycle. A sleeping cluster's output is
clamped to 0 by isolation cells (`iso_cell`), so a gated unit reads as 0 and a
gated state bit goes to 0. The configuration memory and the state register are
not gated. A task that uses fewer state bits or outputs than the fabric offers
(Crc8 needs 6 of the 7 state bits and 16 of the 23 outputs) keeps the unused
units off through the microtask's unit gate mask, so only the mapped units
draw power. In RTL the sleep transistors themselves are not modelled: the
`SLEEP` signals are exported (`ns_sleep`, `out_sleep`) so that a power flow or
a power estimate can pick them up, and the isolation clamp gives the logical
behaviour of a sleeping domain.

### Configuration layout

One 64-bit word (a 6-LUT truth table) per cluster, written one word per clock:

| address                       | cluster                                   |
|-------------------------------|-------------------------------------------|
| `i * 2^D + k`                 | next-state bit i, minterm k (k = v[D-1:0]) |
| `N*2^D + l * 2^DO + j`        | output l, minterm j (j = s[DO-1:0])        |
| `NLUT` (= 270, microtask only)| adder precision, bits [1:0]                |
| `NLUT + 1` (microtask only)   | unit gate mask, one bit per FSM unit       |

Bit `r` of a word is the function's value when the LUT inputs equal `r`, with
`v_D` (or `s_DO` for outputs) as the least significant bit. So to map an FSM
with next-state table `ns[s][x]` and output table `out[s]`:

```
next-state word (i, k), bit r:  v = (r << D) | k;  x = v mod 2^n;  s = v >> n;  bit = ns[s][x][i]
output word (l, j), bit r:      s = (r << DO) | j;                                 bit = out[s][l]
```

`tb/rfsm_prog_pkg.sv` does exactly this and can serve as a configuration
generator.

## The microtask datapath

`recon_microtask` wires the FSM to a datapath. The 23 FSM outputs form a
horizontal control word (`mt_ctrl_t`, LSB first):

| bits    | field  | meaning                                          |
|---------|--------|--------------------------------------------------|
| [3:0]   | `ra`   | register read as operand A, and shown on `dout`  |
| [7:4]   | `rb`   | register read as operand B                       |
| [11:8]  | `rw`   | register written                                 |
| [12]    | `we`   | write enable                                     |
| [13]    | `wsel` | write `din` (1) or the adder sum (0)             |
| [14]    | `cin`  | adder carry in                                   |
| [21:15] | `ext`  | control lines to sensors / radio (`ext_out`)     |
| [22]    | `done` | task finished                                    |

FSM input `x[3]` is a carry flag, loaded with the adder's carry out whenever a
sum is written; `x[2:0]` are external status lines (`ext_in`). The register file
is 16 x 16 bits with two read ports and one write port. The adder is 32 bits in
four 8-bit clusters; the microtask uses it at 8, 16, 24 or 32 bits, chosen by a
configuration register (default 16 bits, so two clusters sleep). Operands are
zero-extended, the low 16 bits of the sum are written back, and the carry flag
is the carry out of the top active cluster.

One cycle is one FSM transition: the registers are read, added and written in
the same cycle the state advances.

With `power_gate` high the FSM and the adder sleep, the state returns to 0 so
the task restarts from the beginning when woken, and all outputs read 0 (so
`dout` shows register 0, where a task can leave its result). The register file
and the configuration keep their contents.

## The variable-precision adder

`pg_prefix_adder` is a parallel-prefix adder whose four 8-bit clusters are
separate power domains. Inside a cluster (`adder_cluster`), operands pass an
isolating input stage, a Kogge-Stone tree forms group generate/propagate for
every bit, and an isolating output stage clamps sum and group signals while the
cluster sleeps. Across clusters a second Kogge-Stone level combines the
clusters' group signals into each cluster's carry in:

```
C_0 = cin,   C_{j+1} = G[j:0] OR (P[j:0] AND cin),   sum bit = p XOR c
```

`prec` (0..3 = 8..32 bits) keeps clusters `0 .. prec` awake; the others sleep
and read 0. `cl_sleep` exports the four sleep controls.

## Scheduling: the system monitor

A node's work is a task flow graph. `system_monitor` keeps, for each task, its
successor and a `last` flag; task t runs on microtask t. After `run`, it opens
the power gate of `first_task` only; the microtask runs until its `done`
output rises (run to completion). The monitor then gates all microtasks for one
cycle, which also returns the finished FSM to state 0, and opens the
successor's gate, or ends with a one-cycle `graph_done` pulse. Assertions check
that at most one microtask is awake and that a task is never left before it is
done.

Timing per task: the FSM's own transitions, then one cycle in its `done` state
(where the monitor sees `done`), then one gap cycle, then the next task's first
cycle.

## Top level

`wsn_controller` has NT = 4 microtasks (one per benchmark task) side by side.
The configuration port is shared and `cfg_sel` picks the microtask; the task
flow graph has its own write port. `ext_in` and `din` go to all microtasks;
since a sleeping microtask's outputs are 0, `ext_out` is the OR of all
microtasks' lines. `dout` has one word per microtask. State, awake-cluster count
and adder sleep per microtask are brought out for observation.

Sizes at the defaults: 4 x 270 x 64 = 69120 configuration flip-flops,
4 x 256 register bits. An application of many more tasks than NT is handled by
reloading microtasks through the configuration port between tasks (272 words
each); nothing in the RTL automates that.

## Where this RTL departs from or adds to the original design

Taken from the design: the (N, n, m) / K parametrisation, the Shannon split
between decoder and LUTs, one shared next-state decoder, SLEEP = power_gate +
m', N + m awake clusters, always-on configuration memory, 6-LUTs, the 32-bit
adder of four power-gated 8-bit parallel-prefix clusters used at 16 bits, the
16 x 16 register file, the system monitor scheduling by the task flow graph with
run-to-completion and gating of idle microtasks.

Choices made here, where the design leaves details open:

- Output logic decodes only the first N - K_op state bits with its own small
  decoder (the output equation); a shared decoder with the next-state logic is
  the alternative reading.
- Configuration is loaded word by word through an address/data port, with
  read-back; state, configuration and registers reset to 0.
- The control-word layout, the carry-flag FSM input, the `done` output and the
  restart at state 0 on wake-up.
- A configuration register (the unit gate mask) as the source of the per-unit
  `power_gate` bits inside a microtask.
- Isolation clamps to 0; sleep transistors and their sizing (about 10% of the
  gated width) are physical and not modelled.
- Kogge-Stone as the prefix topology; operand isolation as the adder's input
  stage; 2-bit precision encoding.
- The monitor's table is a chain (one successor per task, no branches) and
  inserts one all-gated cycle between tasks.
- NT = 4 microtasks and the node-side wiring of the top.

The benchmark tasks themselves (Crc8, receiveData, Crc16, firBasic) are not
included: only their sizes are known. Their datapaths may have needed more than
an adder; this fabric holds their FSMs, and the datapath is adder plus
registers only.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=<n> failures=<f>` and has a watchdog. Highlights:

- `tb_reconfig_fsm`: a random FSM over all 128 states x 16 inputs is mapped to
  the LUTs by `rfsm_prog_pkg`, loaded, read back and run for 2000 cycles against
  the tables; it checks 30 awake clusters, gated units and standby.
- `tb_benchmark_fsms`: FSMs of the four benchmark sizes in the table above
  (random tables standing in for the real ones, which are not part of this
  release) mapped onto one default-size fabric with their unused units gated,
  each run for the benchmark's number of transitions.
- `tb_pg_prefix_adder`: all four precisions, long carry chains, sleep pattern.
- `tb_recon_microtask`: an accumulate program (sum a sample stream, count
  carries through the carry-flag branch) at 16-bit and then 8-bit precision,
  with exact cycle counts (4 cycles per sample, 5 when the sum carries).
- `tb_wsn_controller`: the whole controller at its default size with four
  programs and two passes over a task flow graph; it counts each mechanism
  (idle gating, gap cycles, LUT gating, both precisions, carry branch, waiting
  on an input, retention, configuration read-back, masked-off FSM units) and
  fails if one never happens. It runs in well under a minute.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rwsn_pkg.sv tb/rfsm_prog_pkg.sv tb/tb_wsn_controller.sv \
    --top-module tb_wsn_controller -Mdir obj -o sim
./obj/sim
```

Lint: `verilator --lint-only -Wall -Irtl rtl/rwsn_pkg.sv rtl/wsn_controller.sv`.
The remaining lint warnings are unused package constants, the unused upper half
of the 32-bit sum in the 16-bit microtask, and `rst_n` appearing both as an
asynchronous reset and in the assertions' `disable iff`.
