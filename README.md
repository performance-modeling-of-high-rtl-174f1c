# Shared-memory ATM switch with built-in performance measurement

This is a cell-level, synthesizable model of an N x N non-blocking ATM switch. All inputs
share one output buffer. The model also contains the bursty traffic sources that load
the switch and the counters that measure it. It is built to answer three questions about
one output port under bursty, correlated traffic:

- How often is a cell lost because the buffer is full?
- How long does a cell wait?
- How long is the queue on average?

The switch is split into two parts, in the usual controller/datapath style:

- The **datapath** moves cells. It has a serial-to-parallel converter (S/P) and a header
  converter (HD CNV) per input, then a multiplexer (MUX), the shared buffer and a
  demultiplexer (DMUX), and a parallel-to-serial converter (P/S) per output.
- The **controller** is a finite state machine. It carries out the switching protocol
  one cell at a time: `idle`, `receive_cell`, `process_cell`, `switch_cell` and
  `transmit_cell`.

The default configuration is the 8 x 8 switch with a 100-cell buffer.

```
 traffic_source x8 --serial--> sp_conv x8 --> hdr_cnv x8 --> cell_mux --> shared_buffer --> cell_dmux --> ps_conv x8 --serial-->
                                  |  cell_arrived    ^ cnv_load    ^ mux_load   ^ write / buffer_full  ^ read         ^ ready
                                  +------------------+-------------+------------+--------------------- switch_ctrl (FSM)
                                                   perf_monitor: arrivals, losses, delays, queue length
```

## Cells, lines and slots

- **Cells.** A cell is the standard 53-byte ATM cell. It has a 5-byte UNI header (GFC 4
  bits, VPI 8, VCI 16, PT 3, CLP 1, HEC 8) and a 48-byte payload: 424 bits in all
  (`atm_pkg::atm_cell_t`). Inside the switch a cell moves in parallel as one packed struct.
- **Lines.** Every line, input or output, is bit-serial: one bit per clock, most
  significant bit first. It has three signals: `*_valid`, `*_data`, and `*_soc`, which
  marks a cell's first bit.
- **Slots.** A slot is the time one cell takes on a line: **424 clocks**. The top level
  pulses `slot_tick` in the first clock of every slot.

The controller spends five clocks on an arriving cell. So in one slot the buffer can
accept a cell from every input and still start a cell on every output. This is the
"output buffer eight times faster than a port" assumption that makes the switch
non-blocking.

## The controller protocol (`switch_ctrl`)

Each state lasts one clock:

| state | what happens |
|---|---|
| `idle` | Waits for `cell_arrived` from any S/P, chosen round robin. If no cell waits but some output has a queued cell and a free P/S, it goes straight to `transmit_cell`. |
| `receive_cell` | The chosen input's header converter captures the cell from its S/P (`cnv_load`, one-hot). The S/P is released in the same clock. |
| `process_cell` | The routed cell (output port and translated header) is latched into the MUX register (`mux_load`, `mux_sel`). |
| `switch_cell` | A cell with a bad HEC or an unknown VPI/VCI is discarded (`drop_header`). Otherwise, if `buffer_full` is set, the cell is **lost** (`drop_full`). Otherwise it is written to its output's queue (`write`). |
| `transmit_cell` | If some output has a queued cell and its P/S is ready, the head cell is read (`read`, `rd_port`, round robin over outputs) and loaded into that P/S in the same clock. Then the FSM returns to `idle`. |

A cell arriving at an empty switch is read from the buffer 5 clocks after its last bit
has been received. Its first bit leaves on the output line 6 clocks after that last bit.

Two rules are checked by assertions. `switch_cell` must always have a cell from the MUX.
`receive_cell` must only be entered for an input that holds a cell.

## The shared buffer (`shared_buffer`)

This is the least obvious part of the design. `BUF_CELLS` cell locations are shared by
all outputs. Each output's FIFO queue is a linked list:

- A `next` pointer is kept per location, and a head pointer, tail pointer and length
  per output.
- Each location stores the cell and its 32-bit arrival time stamp (`buf_entry_t`).
- Free locations are kept on a stack.
- Locations never used since reset are handed out by a down-counter. This makes reset
  instantaneous, with no pass to initialise a free list.

**Write.** A write takes the top of the free stack, or a fresh location, and appends it
to the queue.

**Read.** A read is asynchronous. `rd_data` shows the head of queue `rd_port` in the same
clock, so the P/S can load the cell at the edge that dequeues it. The freed location is
pushed onto the stack.

**Write and read together.** A write and a read in the same clock are allowed. If they
use the same queue and that queue holds one cell, the new cell becomes the head directly.

`full` (`buffer_full`) means every location is in use. In the tagged-output experiments
below, only one output receives traffic, so this is the same as that output's queue
being full. Writing when full and reading an empty queue are protocol errors and are
caught by assertions.

## Header conversion and the management interface (`hdr_cnv`)

Each input has a translation table of `TBL_DEPTH` entries (`vc_entry_t`). Each entry
holds:

- `valid`
- the incoming VPI and VCI
- `out_port`
- the outgoing VPI and VCI

The table is searched associatively, and the lowest matching index wins. Routing (which
output) and translation (the new VPI/VCI and a regenerated HEC) are done in the same
clock.

The HEC is CRC-8 with generator x^8+x^2+x+1, XORed with 0x55. A cell is discarded with
status `CNV_HEC_ERR` if its incoming HEC is wrong. It is discarded with `CNV_NO_ROUTE` if
no entry matches or the entry names a port that does not exist.

The management system sits outside the switch. It writes table entries through
`mgmt_we`, `mgmt_port` (which input's table), `mgmt_idx` and `mgmt_entry`. Tables may be
rewritten while traffic flows.

## Bursty traffic (`traffic_source`)

Each input has its own source. A source alternates between active and silent periods,
measured in slots. The length of a period follows a mixture of two geometric
distributions:

    p(n) = a (1-p1) p1^(n-1) + (1-a) (1-p2) p2^(n-1),   n >= 1

For a period of mean `m` and squared coefficient of variation `c2`:

    a  = 0.5 (1 + sqrt(((c2-1) m + 1) / ((c2+1) m + 1)))
    p1 = (m - 2a) / m
    p2 = (m - 2(1-a)) / m

The hardware does not compute these formulas. Software (the testbench function
`tb_pkg::make_cfg`) computes them and writes `traffic_cfg_t`:

- `alpha`, `p1` and `p2` for the active and for the silent periods, as Q0.16 fractions
- `k_a`, the number of slots between cells in an active period
- the VPI and VCI the source puts in its cells
- `enable`

On each slot tick the source does three things, using random numbers from a 64-bit
xorshift generator (one seed per source):

1. It ends the previous slot's period with probability `1 - p`.
2. If the period ended, it starts the other kind and chooses the new period's branch
   with probability `a`.
3. If the new slot is active and a free-running counter modulo `k_a` is zero, it sends
   a cell.

So cells in an active period are exactly `k_a` slots apart, and a source offers
`m(A) / (m(A) + m(S)) / k(A)` cells per slot. With `m(A) = 25`, `m(S) = 37` and
`k(A) = 4`, each source offers 0.1008, and eight sources offer 0.806. To set a total
load `rho` on one output from eight sources, use `m(S) = 25 (2 / rho) - 25`.

The payload of every cell carries the source number and a sequence number, so a receiver
can check order and count losses.

## What is measured (`perf_monitor`)

| counter | meaning |
|---|---|
| `arrived` | cells completely received by the S/Ps |
| `lost_full` | cells lost in `switch_cell` because the buffer was full |
| `lost_header` | cells discarded for a bad HEC or no route |
| `lost_overrun` | cells lost because an S/P still held its previous cell (does not happen at line rate) |
| `departed`, `delay_sum` | cells read for transmission; sum of (read time - arrival time) in clocks |
| `slots`, `qlen_sum` | slot ticks; buffer occupancy summed once per slot |

From these counters:

- cell loss probability = `lost_full / arrived`
- mean delay in slots = `delay_sum / departed / 424`
- mean queue length = `qlen_sum / slots`

`stats_clear` restarts all counters, so that averages can exclude the warm-up.

## Parameters

| parameter | default | where |
|---|---|---|
| `N_PORTS` | 8 | `atm_perf_top`, `atm_switch`, and the blocks inside |
| `BUF_CELLS` | 100 | shared buffer size in cells. The loss experiment sweeps 30 to 100; the other two experiments use 100. |
| `TBL_DEPTH` | 16 | translation-table entries per input (this design's choice) |
| `CELL_BYTES` | 53 | `atm_pkg` constant |

At the defaults, the top synthesises to about 4,900 word-level cells, 27k flip-flop bits
and 47k memory bits. Almost all the memory bits are the cell buffer.

## Where this model departs from the original study, and what it leaves out

- **Sources.** The original experiments fed the tagged output with one aggregate cell
  stream. Here, eight independent on/off sources send to that output. Mixing eight
  independent streams smooths the bursts, so losses are lower than published curves for
  the same parameters.
- **Loss before the buffer.** The original model also lost cells through "failure rates"
  of the components ahead of the buffer, with no rate given. Here the only losses before
  the buffer are header errors and S/P overrun.
- **Design choices.** The following are this design's own choices:
  - the line format
  - the cell format
  - the table organisation and HEC check
  - the one-clock controller states
  - the round-robin arbitration
  - the direct `idle` -> `transmit_cell` path
  - the linked-list buffer
  - the reference points for delay
- **Output timing.** Output cells leave as soon as the controller reads them. They are
  not realigned to slot boundaries. An output carries at most one cell per 424 clocks.

Results from `tb_workloads` (3,000 slots per point after 200 slots of warm-up; 8 sources
to output 0, `m(A) = 25`, `k(A) = 4`):

| buffer | rho | c^2 | offered | loss | delay (slots) | mean queue |
|---|---|---|---|---|---|---|
| 100 | 0.8 | 1.1 | 0.785 | 0 | 4.6 | 3.5 |
| 30 | 0.8 | 1.1 | 0.785 | 0 | 4.6 | 3.5 |
| 100 | 0.8 | 2.7 | 0.833 | 0 | 9.5 | 7.7 |
| 30 | 0.8 | 2.7 | 0.833 | 0.008 | 7.5 | 6.1 |
| 100 | 0.8 | 4.5 | 0.826 | 0 | 15.4 | 12.6 |
| 30 | 0.8 | 4.5 | 0.826 | 0.024 | 9.1 | 7.1 |
| 100 | 0.1 | 1.1 | 0.090 | 0 | 0.18 | 0.02 |
| 100 | 0.3 | 1.1 | 0.337 | 0 | 0.56 | 0.19 |
| 100 | 0.5 | 1.1 | 0.493 | 0 | 1.27 | 0.61 |
| 100 | 0.7 | 1.1 | 0.683 | 0 | 3.2 | 2.1 |
| 100 | 0.9 | 1.1 | 0.873 | 0 | 6.9 | 6.0 |
| 100 | 0.5 | 2.7 | 0.455 | 0 | 1.03 | 0.46 |
| 100 | 0.9 | 2.7 | 0.980 | 0.003 | 26.6 | 25.9 |

"offered" is the measured number of arrivals per slot. It differs from rho because the
runs are short and the periods are long.

The trends match the published ones: delay and queue length grow with load, and loss
grows with c^2 and as the buffer shrinks. At equal load, a larger c^2 gives a longer
delay; the 0.5 / 2.7 point is below the 0.5 / 1.1 point only because its offered load
came out lower. The absolute values do not match, for the
reasons above. The runs are also far shorter than would be needed to estimate loss
probabilities near 0.01 with confidence.

## Files

`rtl/`:

- `atm_pkg.sv`: types, constants and HEC function
- `atm_perf_top.sv`: top level, made of the sources, the switch and a slot timer
- `atm_switch.sv`: the switch
- `sp_conv.sv`, `hdr_cnv.sv`, `cell_mux.sv`, `shared_buffer.sv`, `cell_dmux.sv`,
  `ps_conv.sv`, `switch_ctrl.sv`, `perf_monitor.sv`, `traffic_source.sv`: the blocks

`tb/`: one self-checking testbench per block (`tb_<block>.sv`), plus:

- `tb_atm_perf_top.sv`: full-size end-to-end test. It covers overload, header discard,
  a table update, a counter clear and cell-by-cell output checks.
- `tb_workloads.sv`: the experiment sweep above.
- `tb_pkg.sv`: reference HEC, test-cell builder and traffic-parameter calculator.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/atm_pkg.sv tb/tb_pkg.sv tb/tb_atm_perf_top.sv --top-module tb_atm_perf_top -o sim
./obj_dir/sim
```

Replace `tb_atm_perf_top` with any other testbench name. Approximate run times:

- `tb_atm_perf_top`: about 10 s of simulation. Building it takes a couple of minutes,
  because the design is wide.
- `tb_workloads`: under two minutes.
- the block testbenches: seconds.

To study other traffic, change the `make_cfg(m_a, m_s, c2_a, c2_s, k_a, vpi, vci)` calls,
or set `BUF_CELLS` on the top.
