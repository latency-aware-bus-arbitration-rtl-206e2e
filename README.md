# Latency-aware bus arbitration

A shared bus in an embedded SoC is usually arbitrated for bandwidth: round
robin, fixed priority or TDMA decide who gets the bus, and latency is at best
a side effect. Masters with real-time needs do not want the *lowest*
latency, though; they want their requests finished *within a given number of
cycles*. This arbiter adds a small latency scheduler on top of any
bandwidth-conscious arbiter. The scheduler tracks how much time every waiting
request still has before its deadline (its *slack*). As long as every slack is
comfortable, the ordinary arbiter decides alone, and the bandwidth split stays
the ordinary arbiter's. When a slack drops to or below a programmed
threshold, the scheduler steps in and the request with the least slack gets
the bus next. Requests are only reordered; none is dropped or added. The
aim is that every master's latency comes close to its own constraint, with
overruns short and evenly spread. Each master's share of the bus should
change much less than its latency. How far this holds depends on the load;
see the measurements below.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The testbenches
are self-checking and run under Verilator.

## The slack of a request

Each latency-critical master *i* owns a latency register holding its
constraint L<sub>i</sub> in cycles. The master writes it and may rewrite it
whenever its operation changes. When the master raises a request for a burst
of B<sub>i</sub> beats to slave *j*, the channel computes

    Slack_i = L_i - B_i * T - S_j

with two subtractors. T is the transfer time per beat, a parameter; at the
usual T = 1 no multiplier is built. S<sub>j</sub> is the *worst-case*
latency of the target slave, held in a programmable register per slave.
Worst case is used because real slaves such as DRAM controllers have variable
latency. The result is loaded into the master's slack counter, which then
counts down by one every clock cycle while the request waits. Slack is
therefore the number of cycles the request can still spend waiting for the
grant and still complete within L<sub>i</sub>. A comparator flags the request
*urgent* when `slack <= threshold`. The threshold is a single global register.

Example, with the numbers used throughout the tests: L = 26, an 8-beat burst
and an 8-cycle slave give slack 26 - 8 - 8 = 10. With the threshold at 26, the
request is urgent from its first cycle. With L = 60, the slack starts at 44
and the request becomes urgent after 18 cycles of waiting.

Details chosen in this design:

* The slack is signed (11 bits) and keeps counting below zero while a request
  overruns its constraint. It saturates at -1024.
* In the request's first cycle the freshly computed value is used directly,
  before it is in the counter. This lets the scheduler act in that same
  cycle.
* A write to the latency register applies to the master's *next* request.
  The waiting request keeps its deadline.
* Masters not marked in the `CRIT` parameter get no channel (no register,
  counter or comparator) and are never urgent.

Cost per latency-critical master: a 10-bit latency register, an 11-bit
counter, two subtractors and a comparator. Add one smallest-slack selector
for the whole arbiter.

## Two-level decision

```
                +------------------- latency_scheduler -------------------+
 lat_we/wdata ->| slack_channel x N  --urgent,slack-->  min_slack_select   |--enable, next_id--+
 req,burst_len->| threshold register, slave-latency registers              |                   |
                +---------------------------------------------------------+                   v
 req ---------->  rr_arbiter / fp_arbiter / tdma_arbiter --(base_mode)--> choice --> [ grant register ] --> gnt, hgrant, hmaster
```

* **Second level (scheduler).** If any active request is urgent, `enable` is
  high and `next_id` names the urgent request with the smallest slack. Ties
  go to the lowest master index. That master is granted, whatever the first
  level would have chosen. When several requests are urgent at once, not all
  of them can meet their deadlines. Serving the tightest first spreads the
  overruns evenly. The scheme therefore targets soft real-time traffic, or
  masters whose buffers can absorb short overruns.
* **First level (bandwidth-conscious arbiter).** This level decides when no
  request is urgent. Three are built, and the `base_mode` input chooses one
  at run time:
  * `BASE_RR`: round robin. The rotation follows the master actually
    granted, so a master that was pushed ahead by the scheduler goes to the
    back.
  * `BASE_FP`: fixed priority. The order is an input, `prio_order[rank]` =
    master index, with rank 0 highest.
  * `BASE_TDMA`: a cyclic table of slots. One slot is one bus transfer. The
    slot's owner wins if it requests. Otherwise the slot goes round-robin to
    the other requesters (best-effort fill) instead of being wasted. The
    pointer advances on every grant, including grants forced by the
    scheduler. The default 10-slot table `{0,1,0,1,2,0,1,0,1,3}` gives shares
    of 4:4:1:1.

  All three arbiters see every grant and keep their state consistent, so
  `base_mode` may change at any time.
* **No preemption of transfers.** Arbitration happens only while the bus is
  free. An urgent request that arrives during a burst waits for the burst to
  finish.

Writing the threshold to -1024 in practice switches the scheduler off: it then
acts only for a request that has already waited about a thousand cycles past
its slack, because the saturated slack then equals the threshold. This gives
the plain first-level arbiters for comparison.

## Bus-side protocol and timing

All signals are synchronous to `clk`. `rst_n` is an asynchronous, active-low
reset.

* A master raises `req[i]` with `burst_len[i]` (beats) and `req_slave[i]`
  valid, and holds it until it sees `gnt[i]`. In the cycle after `gnt[i]`,
  `req[i]` must be low, unless the master is issuing a new request. The cycle
  in which `gnt[i]` is high ends the request in the scheduler.
* In a cycle where `bus_busy` is low and some request is active, the arbiter
  decides. The decision is registered: `gnt[i]` pulses in the next cycle.
  From that cycle, `bus_busy` is high and `hgrant` (one-hot) and `hmaster`
  name the owner.
* The bus or slave raises `xfer_done` in the cycle of the owner's last beat.
  The bus is free in the following cycle, so the next decision is taken
  there.

With an 8-cycle slave and 8 beats, an uncontested request arriving in cycle
*r* is granted in *r+1*, gets its first beat in *r+9* and its last in *r+16*:
17 cycles in all. The latency that the constraint bounds is taken to be this
request-to-last-beat time, which is what the equation above assumes. Back to
back, one transfer occupies the bus for 17 cycles.

`preempted` pulses with `gnt` when the scheduler overrode the first level.
`tdma_fill` pulses when, in TDMA mode, the first level itself gave a slot to
a non-owner. `threshold`, `lat_limit`, `pending`, `urgent` and `slack` show
the scheduler's state.

Configuration ports:

| port | effect |
|---|---|
| `lat_we[i]`, `lat_wdata[i]` | master *i*'s latency constraint, cycles (10 bits) |
| `thr_we`, `thr_wdata` | global threshold, signed 11 bits (reset 26) |
| `slv_we`, `slv_idx`, `slv_wdata` | worst-case latency of a slave, cycles (reset 8) |
| `base_mode`, `prio_order` | first-level scheme and fixed-priority order |

The latency registers reset to 1023. Until a master has written its
constraint, its requests only become urgent after waiting about a thousand
cycles.

Assertions in the top check that a grant only goes to an active requester,
that at most one grant pulse is high, and that `xfer_done` only comes while
the bus is owned.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | masters |
| `NSLV` | 1 | slaves with their own worst-case latency register |
| `CRIT` | all ones | masters that get a slack channel |
| `TBEAT` | 1 | cycles per beat |
| `THR_RESET` | 26 | threshold after reset |
| `SLV_RESET` | 8 | slave latency after reset |
| `NSLOT`, `SLOT_OWNER` | 10, `{0,1,0,1,2,0,1,0,1,3}` | TDMA table |

Widths live in `la_pkg`: latency 10 bits, slack 11 bits signed, burst length
5 bits, slave latency 8 bits.

## Files

| file | contents |
|---|---|
| `rtl/la_pkg.sv` | widths, types, `base_mode_e` |
| `rtl/slack_channel.sv` | latency register, slack subtractors, slack counter, comparator |
| `rtl/min_slack_select.sv` | smallest-slack selection among urgent requests |
| `rtl/latency_scheduler.sv` | channels, threshold and slave-latency registers, selector |
| `rtl/rr_arbiter.sv`, `rtl/fp_arbiter.sv`, `rtl/tdma_arbiter.sv` | first-level arbiters |
| `rtl/latency_aware_arbiter.sv` | top: both levels, grant register, bus ownership |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the design against a model written separately inside
the testbench. Each ends with a `TB_RESULT checks=… failures=…` line.

* `tb_slack_channel`: every cycle of random requests, checked with T = 1 and
  T = 3. It covers overruns of 900 cycles and saturation.
* `tb_min_slack_select`: random urgent sets with many ties and extreme
  values.
* `tb_latency_scheduler`: four masters, one of them not latency-critical,
  and two slaves. It checks slack, urgency, enable and next grant every cycle
  while the threshold and the latency registers are reprogrammed.
* `tb_rr_arbiter`, `tb_fp_arbiter`, `tb_tdma_arbiter`: random requests with
  grants overridden as the scheduler would. The tests also cover fairness,
  both fixed-priority orders and an exact 4:4:1:1 split.
* `tb_latency_aware_arbiter` (default parameters): the testbench plays four
  masters and an 8-cycle slave. Each master keeps one 8-beat read
  outstanding. The constraints are 26, 60, 26 and 60 cycles, and the offered
  load is 60 %, 60 %, 15 % and 15 % of the bus (150 % in total). The test
  runs 60 000 cycles per scheme with the scheduler (R-S, FP1-S, FP2-S,
  TDMA-S) and without it (R-R, F-P1, F-P2, TDMA). An independent reference
  predicts every grant and the flags. The test also checks the 17-cycle
  uncontested service time. It checks that every mechanism occurred: both
  decision levels, several simultaneous urgent requests, an urgent request
  waiting for a burst, negative slack, TDMA fill, mode and order switches,
  and reprogrammed constraints and threshold. It checks that the scheduler
  shortens the worst overrun of the starved master under fixed priority. The
  whole run takes well under a second.

Results of one end-to-end run. Each cell gives four numbers: average latency
(cycles) / requests over the constraint (%) / longest overrun (cycles) /
share of all transfers (%).

| scheme | M1 (L=26) | M2 (L=60) | M3 (L=26) | M4 (L=60) |
|---|---|---|---|---|
| R-R | 45.5 / 95 / 42 / 36 | 45.8 / 15 / 8 / 36 | 41.9 / 80 / 42 / 15 | 40.9 / 12 / 8 / 14 |
| R-S | 31.7 / 68 / 42 / 45 | 62.3 / 67 / 42 / 27 | 37.1 / 78 / 42 / 15 | 66.4 / 68 / 42 / 14 |
| F-P1 | 22.5 / 30 / 24 / 52 | 37.3 / 11 / 76 / 39 | 249 / 95 / 909 / 6 | 979 / 97 / 1040 / 2 |
| FP1-S | 31.5 / 67 / 42 / 45 | 62.4 / 66 / 42 / 27 | 37.5 / 79 / 42 / 15 | 68.1 / 72 / 42 / 14 |
| F-P2 | 22.4 / 30 / 24 / 52 | 52.5 / 32 / 227 / 30 | 38.4 / 70 / 123 / 14 | 512 / 96 / 1029 / 3 |
| FP2-S | 31.7 / 68 / 42 / 45 | 61.4 / 67 / 42 / 27 | 37.0 / 80 / 42 / 15 | 69.4 / 79 / 42 / 14 |
| TDMA | 39.7 / 97 / 38 / 40 | 39.9 / 1 / 7 / 40 | 153 / 99 / 158 / 10 | 153 / 97 / 119 / 10 |
| TDMA-S | 31.7 / 68 / 42 / 45 | 62.1 / 67 / 42 / 27 | 37.5 / 80 / 42 / 15 | 67.8 / 74 / 42 / 14 |

The intended effect is visible. Without the scheduler, some master overruns
by hundreds of cycles while another is served far below its constraint. With
the scheduler, every master's longest overrun is bounded to one burst plus
grant and slave latency. The latencies move toward each master's own
constraint, and the result hardly depends on the first-level scheme. The
figures are not a reproduction of any published measurement. The traffic
model (uniform gaps, one outstanding request per master, 150 % offered load)
is this testbench's. At this load the bus is saturated, so the loose masters
also end up urgent most of the time, and violation ratios are high for
everyone. Plain TDMA delivers its table's 40/40/10/10 split. With the
scheduler, bandwidth moves from M2 to M1. The reason is that M1's requests
are urgent from their first cycle, while M2's requests only become urgent
after 18 cycles of waiting. So under saturation the scheduler does change
the bandwidth split noticeably, and it does so for every first-level scheme.
The threshold is the knob: a lower threshold leaves more decisions, and
therefore more of the split, to the first level.

## Design choices beyond the scheme

The scheme fixes the equation, the per-master counter and comparator, the
global threshold, smallest-slack-first among urgent requests, and preemption
of the first-level arbiter without cutting a running transfer. This design
adds the following choices:

* the signal protocol, the registered grant and the ownership tracking
  (modelled on AHB request/grant, but not an AHB arbiter);
* the widths, reset values, saturation, first-cycle use of the computed
  slack, and lowest-index tie-break;
* the worst-case slave latency as a register per slave, chosen by a
  target-slave index that comes with each request;
* three run-time selectable first-level arbiters, with a programmable
  fixed-priority order;
* the TDMA slot length (one transfer), slot order, and round-robin
  best-effort fill;
* latency measured from request to last beat.

Not provided: a lottery-based first-level arbiter (the scheduler would attach
to one the same way), and use of split or retry responses to improve latency
further.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/la_pkg.sv rtl/*.sv tb/tb_latency_aware_arbiter.sv \
    --top-module tb_latency_aware_arbiter -Mdir obj_e2e
./obj_e2e/Vtb_latency_aware_arbiter
```

Any other testbench runs the same way. Replace the testbench file and top
module name. Only `la_pkg.sv` and the modules that the testbench uses are
needed. The end-to-end test prints the statistics table above. To study
other workloads, change the `LAT`, `SHARE`, `BURST`, `SLV` and
`PHASE_CYCLES` constants at the top of it.
