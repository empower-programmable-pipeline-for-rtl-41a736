# Stateful processing across pipeline stages with a backward ring

A switch pipeline is a chain of match-action stages. Each stage sees a packet once, and only
at a fixed time. That is a problem for stateful functions whose read and write are far apart:
a firewall that reads a flow's state early in the pipeline, computes a new state over a few
stages, and writes it back later. Between the read and the write, more packets of the same
flow enter the pipeline and read a value that is about to change.

This RTL handles that case without stalling the pipeline for every packet. Packets run
optimistically. The first processor of the function, **P_R**, holds the flow state table and
reads it. The last processor, **P_W**, computes the new state. When P_W changes a flow's
state, it marks the flow *dirty* and sends the new value backward to P_R over a ring. Packets
that already read the old value are caught at P_W and sent back to P_R too (*resubmitted*).
Meanwhile P_R parks the flow's new packets. It releases them, in order, once the writeback has
arrived and every packet that could still be resubmitted has come back.

Flows that are not dirty pass through at full rate. The cost falls only on flows that update
their state often.

```
 in_phv ──► [ P_R: rd_sched ─ state table ─ stage ] ─► [ P_W: stage ─ wr_sched ] ─► [stage] ─► [stage] ─► out_phv
                 ▲  writebacks, resubmitted PHVs            │  cancel_dirty ▲
                 │                                          ▼               │
              node 0 ◄──────── node 1 ◄──────── node 2 ◄──────── node 3 ◄──┘   (ring runs backward)
```

## Files

All RTL is in `rtl/`, one module or package per file; testbenches are in `tb/`.

| module | role |
|---|---|
| `rapid_pkg` | PHV layout, ring flit and slot formats, consistency levels, counters |
| `rapid_top` | 4 stages, 4 ring nodes, one stateful function from stage 0 (P_R) to stage 1 (P_W) |
| `rd_sched` | read-side scheduler at P_R: dirty-flow table, packet parking, release |
| `wr_sched` | write-side scheduler at P_W: stale-read detection, writebacks, consistency levels |
| `ring_node` | one node of the backward ring: delivery, priorities, merging, heartbeats |
| `block_queue` | FIFO of blocked flows with the two-clock wait timer |
| `phv_buffer` | PHV storage (PB) with per-flow linked lists |
| `dtable_cam` | 64-entry CAM of dirty flow keys |
| `hash_unit` | CRC-64 of the masked five-tuple: the flow index |
| `flow_state_table` | 4096 x 128-bit state SRAM |
| `stage_proc` | 18-cycle stage; the stateful stage applies a small transition table |
| `sync_fifo` | show-ahead FIFO used for RB, the Suspend and Schedule queues, ring buffers |

## The PHV and the ring flit

The PHV is 4096 bits (512 bytes). Its low bits carry the five-tuple, a packet tag, a
resubmission count, the 64-bit flow index, the state read at P_R (`cur_state`), the state
computed by the function (`new_state`), a `state_upd` flag and a `drop` verdict. The rest is
opaque header space carried along.

A ring flit is 4114 bits:

- `dst1`: an 8-bit heartbeat bitmap;
- `dst2`: an 8-bit one-hot destination;
- a 2-bit tag: none, control, resubmitted PHV, or heartbeat only;
- a 4096-bit payload.

A control payload is sixteen 256-bit slots. Each slot is one writeback (flow index, new
state, and whether P_R must register the flow) or one *cancel_dirty*. A source always writes
the slot numbered by its own ring node. Two control flits from different sources therefore
never collide, and merging them is a bitwise OR.

## Write side: P_W (`wr_sched`)

`wr_sched` keeps a 64-entry CAM of the flows it has marked dirty. For each packet leaving the
function's last stage:

- **Flow dirty and expired:** the packet read stale state. It is sent to P_R as a resubmitted
  PHV, with its resubmission count incremented, and does not continue down the pipeline.
- **Flow dirty but within its staleness budget:** the packet continues. This happens only
  under bounded staleness, and the budget is decremented.
- **Flow clean, state changed:** P_W sends a writeback slot to P_R. Unless the level is WEAK,
  it also registers the flow as dirty.

The consistency level is an input, `cons_mode`:

| level | what a packet may see |
|---|---|
| STRICT | never a stale state: every packet behind an update is resubmitted |
| BS(K) | up to K packets after an update may read the old state; then the flow expires |
| WEAK | stale reads are allowed; flows are never registered and nothing is resubmitted |

A cancel_dirty from P_R removes the flow from P_W's CAM. P_R sends it when it releases the
flow, once nothing more can be resubmitted.

## Read side: P_R (`rd_sched`)

A packet at P_R is hashed (1 cycle) and looked up in the dirty-flow CAM (next cycle):

- **Miss:** the packet is issued at once. The state table is read and the PHV goes on.
- **Hit:** the PHV is stored in PB (the PHV Buffer, 32 entries) and appended to one of the
  flow's two linked lists.

Each dirty flow has a *resubmitted* list and a *new* list. Resubmitted packets are older than
any new packet of the same flow, so on release the resubmitted list is spliced in front of the
new list. Order within a flow is kept.

A resubmitted PHV from the ring enters RB (16 entries). RB is drained into the hash unit in
cycles with no new packet. If the flow is still registered, the packet joins its resubmitted
list. Otherwise it is counted as `late` and issued.

A writeback from the ring writes the state table and, if requested, registers the flow in the
CAM with state BLOCK. A writeback for a flow that is already registered re-blocks it and
counts one *resubmit cycle*.

### Waiting for in-flight packets: the Block queue

This is the subtle part. After a writeback, P_R must wait until every packet of that flow still
between P_R and P_W has reached P_W and, if stale, come back. The wait is
`T_WAIT = M*18 + M + 2 + 5 = 45` ticks, where M = 2 processors and 18 cycles is the stage
latency. The `+5` covers this design's own scheduler and ring registers.

Time must not pass when the ring is congested. If it did, a resubmitted packet that is stuck
in a ring buffer could arrive after its flow was released. So the timer counts **heartbeats**,
not clock cycles. P_W sets its bit in `dst1` of whatever flit leaves its ring node, or sends a
heartbeat-only flit. A ring node withholds the heartbeat while a local flit of its own is
waiting to enter the ring. A missing heartbeat therefore freezes every blocked flow's timer.

Blocked flows wait in `block_queue` in arrival order, so they also expire in order. Only the
head needs a live counter:

- **I.clk** counts ticks since the last push.
- Each entry stores its expiry offset relative to the entry before it.
- **D.clk** counts down the head's remaining wait.

This gives 64 timers for the price of two counters.

### Release: Suspend and Schedule queues

When the head of the Block queue expires:

- **Resubmitted packets still expected** (the flow's RB count is non-zero): the flow moves to
  the **Suspend queue**. It leaves that queue once those packets have arrived.
- **Otherwise:** the two lists are merged and the flow goes to the **Schedule queue**. A
  cancel_dirty is sent to P_W.

The Schedule queue is served round robin, in cycles with no new packet to issue. Each turn
releases one packet of a flow. The flow is then requeued if it has more packets, or removed
from the CAM if its lists are empty.

New packets of a dirty flow may take a PB entry only while more than a quarter of PB is free.
The rest is kept for resubmitted packets, so a suspended flow can always receive what it is
waiting for. If PB is full anyway, the packet is dropped and counted.

### Blocking mode

A flow is moved to blocking mode when it is re-blocked more than `resub_th` times, or when one
of its packets has been resubmitted more than `resub_th` times. Like every release, its release sends a cancel_dirty to P_W.
From then on its packets are no longer resubmitted. P_R releases them one at a time:
after each released packet the flow goes back into the Block queue. It costs one wait per
update, but removes the repeated resubmissions.

Each CAM entry carries a 4-bit generation number, and every queue element records it. A queue
element whose flow has since been re-blocked or deleted is skipped.

## Ring nodes (`ring_node`)

There is one node per stage. Flits travel against the pipeline, from node i+1 to node i.

Each node has two 8-entry buffers: one for its own processor and one for the upstream node.
On arrival, the node strips whatever is addressed to it and delivers it to its processor:
heartbeat bits, its control slots, or a resubmitted PHV.

The node then chooses what leaves, in this order:

1. A control flit goes before a PHV flit.
2. Two control flits whose slots do not overlap are merged into one.
3. A heartbeat-only flit merges with anything.
4. Between two PHVs, the upstream one goes first.

An empty upstream buffer is bypassed, so one hop costs one cycle.

## Top level (`rapid_top`)

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_phv` | in | one parsed PHV per cycle, no back-pressure |
| `out_valid`, `out_phv` | out | every packet leaves; `out_phv.drop` is the verdict |
| `cons_mode`, `bs_k` | in | consistency level and K for BS(K) |
| `resub_th` | in | re-blocks allowed before blocking mode |
| `key_mask` | in | selects the 104-bit five-tuple bits that form the flow key |
| `cfg_we`, `cfg_addr`, `cfg_data` | in | writes the stateful stage's transition table |
| `init_done` | out | the state table has finished clearing after reset |
| `stats` | out | 16-bit event counters (`stats_t` in `rapid_pkg`) |

Keep `in_valid` low until `init_done` is high, which takes 4096 cycles after reset.

A packet of a clean flow takes 76 cycles from input to output:

| step | cycles |
|---|---|
| hash | 1 |
| classify | 1 |
| state table read | 1 |
| rest of stage 0 | 17 |
| stage 1 | 18 |
| `wr_sched` | 1 |
| stages 2 and 3 | 36 |
| egress register | 1 |

The stateful stage's function is a 256-entry table indexed by
`{cur_state[3:0], dst_port[3:0]}`. Each entry gives `{drop, next_state[7:0]}`. It stands in for
the match-action logic a compiler would place there.

Main parameters, with defaults: `N_STAGES=4`, `STAGE_LAT=18`, `R_STAGE=0`, `W_STAGE=1`,
`DT_ENTRIES=64`, `PB_DEPTH=32`, `RB_DEPTH=16`, `QDEPTH=64`, `RBUF_DEPTH=8`, `ST_DEPTH=4096`.
For a function spanning more stages, raise `W_STAGE` and `M_STAGES` together; `T_WAIT` is
derived from `M_STAGES`. That configuration has not been simulated.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and has a watchdog.
For example, with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rapid_pkg.sv tb/tb_rapid_top.sv \
          --top-module tb_rapid_top -Mdir obj && ./obj/Vtb_rapid_top
```

| testbench | what it checks | result |
|---|---|---|
| `tb_sync_fifo` | random push/pop against a queue model, full/empty/count | passes |
| `tb_dtable_cam` | insert/delete/lookup against a model, lowest-free insert | passes |
| `tb_hash_unit` | CRC-64 against a table-driven reference | passes |
| `tb_flow_state_table` | reads against a model, write-first bypass, clearing | passes |
| `tb_block_queue` | each flow leaves exactly T_WAIT ticks after entry, with and without heartbeat gaps | passes |
| `tb_rapid_top` | end to end, see below | passes (about 37500 checks) |

`tb_rapid_top` runs a port-knocking firewall over 32 flows. A flow's state advances when the
low nibble of its destination port is the next knock, and any wrong port resets and drops it.
The test runs four phases: STRICT with a back-to-back burst, STRICT with a low `resub_th` and
flapping flows, BS(2), and WEAK.

It checks the following:

- per-flow packet order;
- that under STRICT every packet reads exactly the state a serial execution would give;
- every transition and verdict;
- that no packet is lost;
- the latency of a lone packet;
- that each mechanism actually happened: writebacks, resubmissions, PB parking, RB to PB,
  Suspend queue, release, cancel_dirty at both ends, re-blocking, drop verdicts.

## Known limits and departures

- **Load in the end-to-end test is modest** (10-30%). Under STRICT, every update holds its flow
  for about 80 cycles. With heavier load and this many updates PB overflows, and the dropped
  packets are counted.
- **One flow leaves the Block queue per cycle.** Flows pushed with no heartbeat between them
  expire on the same tick, and all but the first are handled one cycle later, or one tick late
  if that cycle carries a heartbeat. Late is the safe side.
- **Only a two-stage function at the defaults.** The 3- and 4-processor functions need other
  `W_STAGE`/`M_STAGES` values, and have not been simulated.
- **Ring merging of two control flits** is implemented, but it never happens in the
  end-to-end test, because only P_R and P_W send control.
- **No unit testbenches** for `rd_sched`, `wr_sched`, `ring_node`, `phv_buffer` or
  `stage_proc`. They are exercised only through `tb_rapid_top`, which does catch a seeded fault
  in each of them.
- **One PHV per cycle.** At 100 MHz that is 100 Mpps: enough for 4 x 100G with 1500-byte
  packets, not with 64-byte packets.
- **Not included:** parsing and deparsing, packet I/O, and the compiler that places stateful
  functions. The PHV enters and leaves as ports, and the transition table is written through
  `cfg_*`.
- **Own choices, not from the original design:** the PB reserve for resubmitted packets, the
  slot-per-node control payload, the +5 in `T_WAIT`, the CRC-64 hash, the generation numbers,
  and the transition-table form of the stateful stage.
