# Predictable shared DDR2 SDRAM: priority-budget arbitration, bank interleaving, scheduled refresh

Several processing cores share one off-chip DDR2 SDRAM. For hard real-time
software, each core's worst-case execution time (WCET) must be bounded. A shared
SDRAM makes that hard for three reasons:

- The latency of an access depends on which row happens to be open.
- It depends on what the other cores are doing.
- It depends on when the controller decides to refresh.

This design removes or bounds each of these sources of variation:

1. **Bank interleaving with auto-precharge.** Every cache-line access is split
   over all four banks and closes its rows itself. An access therefore never
   depends on an open row left behind by an earlier one. What remains is a small,
   measurable set of worst-case widths: 10 cycles for a write line, 13 cycles for a
   read line, plus 6 cycles of read latency.
2. **Priority Based Budget Scheduling (PBS).** Each master has a fixed priority
   (its latency need) and a fixed budget of line accesses per replenishment period
   (its bandwidth need). The interference a master can suffer from higher-priority
   masters is therefore bounded by their budgets.
3. **User-controlled refresh.** Refresh is taken away from the controller and
   issued on a fixed tREFI grid. Before each refresh the port is closed, so the
   controller queue is empty when the refresh starts.

With these three in place, a WCET bound for a core can be computed offline from
its own memory trace, its budget, its priority and the replenishment period. The
WCET analysis itself is software and is not part of this RTL. What is here is the
hardware that makes such an analysis valid. Six traffic generators stand in for
the cores, and they measure each core's observed execution time.

```
 traffic_gen x6 (master1..master6)
   | req / line_req_t          ^ read line (routed by master id)
   v                           |
 pbs_arbiter  --gnt_id--> [mux] --> bi_splitter --chunk cmds--> | SDRAM controller |--> DDR2
   ^ hold                                 ^ rd chunks <--------- |  (external)      |
   |                                                             |                  |
 refresh_ctrl ------------------ ref_req / ref_ack ------------->|                  |
```

Everything left of the controller is in `pbs_mem_system`. The controller user
port, shown as `|` above, is the top's external interface.

Besides that port, the top has status outputs:

- each master's done flag, execution time, access count and read checksum;
- the arbiter state: budgets, eligibility, the replenish pulse and the
  port-closed flag;
- `trace_*` ports, which expose the requests, every grant with its line, and
  every returned read line with its master.

The `trace_*` ports are the natural place to attach a latency monitor.

## Priority Based Budget Scheduling (`pbs_arbiter`)

The rules are simple. The timing details matter, because the WCET analysis relies
on them.

- **Eligibility.** A master is *eligible* while its budget counter is non-zero.
- **Grant.** Among the masters that request and are eligible, the one with the
  smallest `PRIO` value is offered the port (`gnt_valid`, `gnt_id`). `PRIO = 1` is
  the highest priority. Between equal priorities, the lower index wins.
- **Transfer.** The grant fires when the splitter is ready (`gnt_ready`). The
  one-hot `gnt` then pulses for one cycle and the master's budget drops by one.
  One transfer is one whole cache line (four chunk commands).
- **No work conservation.** A master with zero budget is not served, even if the
  port is idle, until the period ends. This is intentional: it is what bounds the
  interference seen by lower-priority masters.
- **Replenishment.** A free-running counter counts periods of
  `RP = CMD_WD * sum(BUDGET)` cycles from reset. `CMD_WD` is the worst-case width
  of one line access, averaged over a read and a write:
  `ceil((13 + 10) / 2) = 12`. On the last cycle of each period `replenish` is
  high, and at that clock edge every budget is restored to its full value. A
  grant in that same cycle is still served. The restore takes precedence, so the
  new period starts with full budgets.
- **Sizing.** `RP` is long enough for every master to spend its whole budget even
  if every access takes the worst-case width. In the default configuration
  RP = 12 x 24 = 288 cycles. With budgets 32,16,8,4,2,1 it is 12 x 63 = 756 cycles.
- **Hold.** `hold` blocks every grant. It is driven by the refresh controller.

`gnt_valid`, `gnt_id` and `gnt` are combinational from `req` and the budget
registers. Requests are level signals and must stay high until granted. Three
assertions check:

- a grant is one-hot;
- a grant only goes to a requesting, eligible master;
- no grant happens under `hold`.

The intended use is to give low budgets to latency-critical masters with high
priority, and large budgets to bandwidth-hungry masters with low priority. The
default priorities follow that: master6 (index 5) is the highest and master1
(index 0) the lowest.

## Bank interleaving and the controller port (`bi_splitter`)

A 32-byte line is split into four 8-byte chunks. Chunk *k* goes to bank *k*, and
all four chunks use the same row and burst-aligned column. The line address is
`{row[12:0], chunk_column[7:0]}` (21 bits, 64 MiB). The DDR2 column is
`{chunk_column, 2'b00}`, because a burst of 4 x 16-bit words is one chunk.

Each chunk becomes one `chunk_cmd_t` with these fields:

- `write`
- `autopch` (always 1)
- `bank`, `row`, `col`
- 64 bits of write data

Commands are issued in bank order 0, 1, 2, 3, at most one per cycle, with a
valid/ready handshake. A command stays stable until it is accepted. The splitter
takes the next line in the same cycle that the last chunk of the current line is
accepted, so lines go out back to back.

Reads are pipelined. When a read is granted, the master id is pushed into a tag
FIFO (`TAG_DEPTH` = 8). Read chunks must come back in command order. Every four
chunks form one line, which is returned as a one-cycle `line_rvalid` pulse, with
the id taken from the head of the FIFO. While the tag FIFO is full, no further
line is taken.

**What the external controller must provide:**

- accept chunk commands in order;
- execute them with the given auto-precharge;
- return read chunks in order on `rd_valid` / `rd_data`;
- perform a refresh when `ref_req` is high, and answer with a one-cycle `ref_ack`.

The worst-case numbers above (10 / 13 / 6 cycles) are properties of the
controller and device at this port, measured under alternating read/write
traffic. They are not produced by this RTL. They enter only through `CMD_WD`.
The DDR2 timing they come from:

| parameter | AL | CL | tRCD | tRAS | tRP | tWR | tWTR | tRRD | tCCD | tRTP | BL | tRTW |
|-----------|----|----|------|------|-----|-----|------|------|------|------|----|------|
| cycles    | 2  | 3  | 2    | 5    | 2   | 2   | 2    | 2    | 2    | 2    | 4  | 4    |

With interleaving, a continuous stream of reads keeps the command and data buses
fully busy, at 8 cycles per line. Direction changes insert turnaround gaps, and
the worst cases are 10 cycles for a write line after a read and 13 + 6 cycles for
a read line after a write.

## Refresh on a fixed grid (`refresh_ctrl`)

A controller left to itself refreshes at roughly tREFI. The exact moment shifts
by tens of cycles, depending on the traffic in flight. This block takes over:

- A free-running timer counts `TREFI` cycles (975 cycles, which is 7.8 us at 125 MHz).
- `GUARD` (48) cycles before the timer expires, `close` goes high and holds the
  arbiter. Accesses already granted finish, and the controller queue drains.
- On expiry, `ref_req` rises. It stays high until `ref_ack`, and `close` drops in
  the cycle after that.

Because the timer never stops, requests are exactly `TREFI` cycles apart. The
cost of refresh is then a known `tRFC` plus the guard window in every interval.

`GUARD` must cover the longest granted line (13 + 6 cycles) plus whatever the
controller may still hold in its queue. 48 cycles suits a queue of up to two
lines. Resize it for a deeper controller FIFO.

## Traffic generators and execution time (`traffic_gen`)

Each generator models a core running an application. After `start`, it repeats
two steps until `TOTAL` accesses are done:

1. *On-chip processing*: an idle gap of `1 + (r mod 2*AVG_OCP)` cycles, so the
   mean is `AVG_OCP + 0.5`. `AVG_OCP` must be a power of two.
2. *One line access*: accesses alternate write and read, starting with a write,
   and go to pseudo-random addresses (32-bit xorshift, `SEED` per master).

A write is complete when it is granted, because the core proceeds while the data
drains into the controller. A read is complete when its line returns, and the
core stalls until then.

The generator reports these outputs:

- `exec_cycles`: the observed execution time, counted from the `start` cycle to
  the cycle the last access completes, both included.
- `acc_count`: the number of completed accesses.
- `rd_checksum`: the XOR of every 32-bit word read, for end-to-end data checks.

## Configurations and measured behaviour

The top's defaults are the *equal-density* configuration:

- budget 4 for every master;
- priorities 6,5,4,3,2,1 for master1..master6;
- mean gap 8 cycles;
- 2048 accesses per master.

The *incremental-density* configuration gives each master traffic in proportion
to its budget:

- budgets 32,16,8,4,2,1;
- mean gaps 1,2,4,8,8,16;
- 3200,1600,800,400,200,100 accesses.

Both configurations fit the default hardware: budgets ≤ 255, `RP` ≤ 756, and
32-bit counters.

Both were simulated to completion against the behavioural controller model in
`tb/sdram_ctrl_model.sv`, which uses the worst-case widths above:

| configuration | observed execution time (cycles) |
|---------------|----------------------------------|
| equal density | 147 300 – 149 000 for every master (memory saturated; all masters finish together) |
| incremental   | master1 84 400, master2..6 74 900 – 75 400 |

In the incremental case, the lowest-priority master finishes last even though
its traffic matches its budget. This is expected from PBS: master1 carries the
largest budget, and it is served only after every higher-priority master has
used its share in a period.

These numbers come from a model controller that always charges worst-case
widths, so they are not FPGA measurements.

## Departures and choices

These follow the source design: the PBS rules, the `RP` formula and the 12-cycle
command width, the four-bank split with auto-precharge, the close-early refresh
scheme, the 32-byte line, the six masters and both traffic tables.

These are this implementation's own choices:

- **Device geometry.** The data width (x16 DDR2) and the row and column widths
  assume a 512 Mb x16 part.
- **Refresh timing.** tREFI = 975 cycles and tRFC = 14 cycles.
- **Refresh guard.** The guard length (48 cycles).
- **Interfaces.** The valid/ready handshakes. The command format also differs
  from a real vendor port: one command carries a whole 4-beat chunk, where the
  vendor's user port transfers bursts beat by beat.
- **Read return.** The in-order tag FIFO that routes read data back to masters.
- **Period start.** The replenishment period runs free from reset.
- **Traffic details.** The gap distribution, the address generator and the data
  pattern.
- **Reset.** All registers use a synchronous, active-low reset.

Not built:

- the SDRAM controller and the DDR2 device (a behavioural model is used for
  simulation);
- the WCET calculation, which is offline software.

## Simulating

No vendor libraries are needed. Testbenches end by printing
`TB_RESULT checks=N failures=M`.

```
# whole system, default parameters (about 150k cycles, well under a second)
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pbs_pkg.sv tb/tb_pbs_mem_system.sv --top-module tb_pbs_mem_system
./obj_dir/Vtb_pbs_mem_system
```

To run other tests, replace the testbench and top-module name in the command
above.

| testbench | what it checks |
|-----------|----------------|
| `tb_pbs_mem_system` | Whole system, default configuration. `tb/pbs_monitor.sv` checks every grant against its own PBS model, every chunk command, every read line (against a shadow memory), and refresh spacing. It fails any mechanism that never occurred: priority conflict, exhausted budget, replenishment, refresh, closed port, read/write switch, back-to-back lines, controller back-pressure, overlapping reads. |
| `tb_workload_incr` | The same checks with the incremental-density parameters. |
| `tb_pbs_arbiter` | Cycle-by-cycle comparison with a reference scheduler; period of exactly 756 cycles. |
| `tb_bi_splitter` | Bank order, row, column, data slices, auto-precharge, read reassembly and routing, back-to-back issue. |
| `tb_refresh_ctrl` | Close window, exact request spacing, request held until acknowledged, count. |
| `tb_traffic_gen` | Alternation, gap range and mean, request stability, access count, execution-time count, checksum. |

To change the sharing policy, set `BUDGET` and `PRIO` on `pbs_mem_system`. Both
are unpacked arrays, with index 0 = master1. `RP` follows automatically. If the
controller's worst-case widths differ, change `WC_RD_CMD_WD` / `WC_WR_CMD_WD` in
`rtl/pbs_pkg.sv`.
