# Ordered round-robin packet scheduling for a network processor

A network processor often spreads incoming packets over several identical (or not so
identical) processing engines to reach line rate. The hard part is the way out: the engines
finish at different times, and a plain round-robin lets packets of one flow overtake each
other. Reordering them afterwards costs buffers and per-packet sequence numbers.

Ordered round-robin (ORR) avoids reordering by scheduling rather than repairing. A single
*dispatcher* p_d gives the packets to M *workers* p_1..p_M in rounds. In every round p_1 gets
its share first, then p_2, and so on up to p_M. The shares are sized from each worker's speed
so that the workers also *finish* in that order. A single *transmitter* p_t then collects
p_1's packets, then p_2's, and so on. Because collection follows the dispatch order, packets
leave in exactly the order they arrived. No packet needs a sequence number of its own.

Three pieces make this work with real traffic:

* **Variable packet lengths (P-ORR).** A share cannot be cut at an exact byte count. The
  dispatcher gives a packet to the current worker only if at least half of the packet fits
  into what is left of the share. Whatever is over or under is carried into the worker's
  next share.
* **Flows with reserved bandwidth.** Packets wait in one queue per flow. A second set of
  balances gives every flow its reserved fraction of each round.
* **Round IDs.** Each packet carries the low bits of its round number. The transmitter uses
  them to tell when it has taken the last packet of a round from a worker, without knowing
  how many there were.

This repository holds the synthesizable scheduling hardware in SystemVerilog: the
dispatcher, the transmitter, the queues between them and the workers, and the
parameter-initialisation unit. The workers' own packet processing is application-specific.
It is not part of the design and connects through ports.

## Cost model and rounds

All timing is in clock cycles per byte, and every worker has its own three costs:

| cost | meaning |
|------|---------|
| `z_r,i` | dispatcher to worker i transfer (the D-step), per byte |
| `w_i` | processing on worker i (the P-step), per byte |
| `z_s,i` | worker i to transmitter transfer (the T-step), per byte |

Within one round, worker i receives `Q_i` bytes (`D_i = Q_i·z_r,i`), processes them
(`P_i = Q_i·w_i`) and sends them out (`T_i = Q_i·z_s,i`). Worker i+1 only starts receiving
when worker i's D-step is done. The shares are chosen so that worker i+1 begins sending
exactly when worker i has finished sending:

    α_i · (w_i + z_s,i) = α_{i+1} · (z_r,i+1 + w_{i+1}),   Σ α_i = 1,   Q_i = α_i · B

With equal workers all `α_i` are `1/M`.

Two rounds must not overlap on any worker or on the transmitter. When the workers are too
slow to keep the dispatcher busy, the dispatcher therefore idles `Gap_d` cycles after the
last share of a round. The smallest safe gap is

    Gap_d = max(0, max_i(D_i + P_i + T_i) − Σ D,  P_M + T_M − D_1 − P_1)

For M equal workers with all `z_r,i = z_s,i = z` this becomes `(w + 2z − zM)·Q`. It reaches zero at
`M_sat = w/z + 2` workers. For `w = 6, z = 1` that is 8 workers. Below `M_sat` the
throughput is `M/(w + 2z)` bytes per cycle. From `M_sat` on it stays at the dispatch rate
`1/z`, and extra workers only sit idle part of the time.

The batch B is the number of bytes in one round. Each worker's share and each flow's share
must hold at least one maximal packet of L bytes. Hence `B = m · C · L`, with
`C = ⌈1 / min(min α_i, min r_j)⌉` and a batch multiplier `m ≥ 1`. A larger m means longer
rounds, so loss of a single packet is absorbed more easily, but gaps and latency grow.

## Parameter initialisation (`orr_param_calc`)

Pulse `start` with the costs `cfg_w[i]`, `cfg_zr`, `cfg_zs`, the maximal length `cfg_maxlen`
(L), the multiplier `cfg_m` and the flow reservations `cfg_r[j]`. The unit then computes the
quanta `Q_i`, the flow shares `F_j = r_j·B`, `B`, `C` and `Gap_d`, and raises `done`. The top
level holds all packets in their flow queues until this has finished.

How the numbers are formed:

* Fractions are kept as unnormalised integer weights. The last worker gets `a_M = 2^16`, and
  each earlier one gets `a_i = a_{i+1}·(z_r,i+1 + w_{i+1}) / (w_i + z_s,i)`. With `S = Σ a_i`,
  `α_i = a_i / S`.
* `C = max(⌈S / min a_i⌉, ⌈2^16 / min r_j⌉)`.
* `Q_i = ⌊a_i·B / S⌋` and `F_j = ⌊r_j·B / 2^16⌋`.
* Reservations are unsigned fractions with 16 fraction bits, so 65536 means 1.0. A flow with
  `r_j = 0` is unused and does not enter the minimum.
* The gap uses the formula above on the rounded integer quanta. It adds one further term,
  `Σ T − Σ D`. For exact fractions this term equals the transmitter condition, and with
  rounding it keeps that condition true.
* The weights are 48 bits wide and must stay below 2^40, and B must stay below 2^23 bytes.
  That holds for up to 8 workers as long as the per-worker sums `z_r,i + w_i` and
  `w_i + z_s,i` lie within a factor of eight of each other. Very uneven workers need wider
  weights.
* One sequential restoring divider (`orr_div`) does all divisions: 2M+1 of them, about 65
  cycles each. For eight workers, initialisation takes roughly 1100 cycles.

## Shares and carries (`porr_proc_balance`)

This block keeps the worker side of the schedule:

* the pointer `which` to the worker now receiving;
* its remaining balance;
* one signed carry per worker;
* the round counter.

The balance is computed each cycle as `Q_which + carry_which − spent`. It is not stored, so
new quanta take effect at once. `fits` answers the half-packet rule `2·balance ≥ size`.
Under that rule a share never misses its target by more than half a packet, which is the
best a whole-packet decision can do.

When the dispatcher ends a share (`advance`), the leftover balance becomes that worker's
carry. The leftover can be negative: a packet may overshoot by up to half its length. The
worker's next share is `Q_i + carry`, so long-run loads follow `α_i` exactly. A wrap from the
last worker to the first increments the round counter.

`restart` is the idle case: all flow queues are empty. It drops all carries and returns to
worker 1. If the interrupted round had dispatched anything, `restart` also starts a new
round number.

## Flow shares (`porr_flow_balance`)

This block keeps the same bookkeeping for flows: the pointer `j` to the flow under service,
`FBalance_j`, and one carry per flow. A flow that ends its turn because its next packet does
not fit keeps its leftover as carry. A flow that is *skipped* because its queue is empty
loses its carry and starts its next turn from a clean `F_j`. Flows only get fairness while
they are backlogged.

## The dispatcher (`porr_dispatcher`)

The dispatcher combines both balances. Each decision looks at the head packet of flow j and
takes exactly one of these actions:

| condition | action | cost |
|-----------|--------|------|
| no flow queue holds a packet | restart at worker 1 (idle case) | 1 cycle |
| flow j is empty | skip to flow j+1 | 1 cycle |
| the packet does not fit the worker's balance, the flow's balance, or either | end the turn of whichever side failed (both, if both fail) | 1 cycle |
| both fit, but the worker's input queue is full or the round window is exhausted | wait | 1 cycle per retry |
| both fit | dispatch: pop the flow queue, stamp the round ID, send to `which` | `len·z_r,which` cycles |

During a dispatch the descriptor is written to the worker's input queue in the last cycle
of the transfer. That is when the last byte has crossed the link.

After the last worker's share the dispatcher waits `Gap_d` cycles (state `S_GAP`). It also
waits after an idle-case restart, if that restart closed a round that had dispatched
packets. In the monitoring output, a `gap_start` event marks each gap.

**Round window.** The round ID is only `RID_W = 2` bits. If the dispatcher ran `2^RID_W`
rounds ahead of the transmitter, a new packet would carry the same ID as the round the
transmitter is still collecting, and order would be lost. The dispatcher therefore takes the
transmitter's round number (`tx_round`) and waits while it is `2^RID_W` rounds ahead
(`stall_window` event). With correctly programmed costs this never happens. It only happens
when a worker stalls or is slower than it was declared to be.

The `disp_events` port exposes one bit per mechanism: `dispatch`, `proc_adv`, `round_wrap`,
`flow_adv`, `flow_skip`, `restart`, `gap_start`, `stall_full` and `stall_window`.

## The transmitter and the round-ID rule (`orr_transmitter`)

The transmitter has its own round number and a worker pointer, starting at round 0 and
worker 1. In each cycle that it is not busy sending, it looks at the head of the current
worker's output queue:

* **Round ID matches its own round:** it takes the packet and sends it
  (`len·z_s,i` cycles for worker i; `tx_valid` in the last cycle).
* **Round ID differs (`ev_mismatch`):** the worker has started on a later round, so the
  transmitter moves to the next worker. After the last worker it increments its round
  number.
* **Queue is empty:** the round-ID rule alone cannot tell "not processed yet" from "got
  nothing in this round". This design adds a **drain rule** (`ev_drain`). The pointer also
  moves on when all three conditions hold:
  * the queue is empty;
  * every packet dispatched to this worker has been collected, tracked by a per-worker
    count of dispatched minus collected packets;
  * the dispatcher's `(round, which)` position is already past this worker in the
    transmitter's current round.

  Without this rule the transmitter would stop at the end of the traffic, or on a worker
  whose share was empty. Otherwise it waits.

Packet order is preserved for any worker speed. If the programmed costs are wrong, only the
throughput suffers. Phase 4 of the end-to-end test runs workers five times slower than
declared, and the output is still exactly in order.

**Discarded and lost packets.** A worker that discards a packet (a filter, an error)
pulses `wk_drop[i]`. That reduces the worker's outstanding count just as collecting the
packet would. The round-ID rule itself never needs to know about the gap: the packets that
follow still carry their own round IDs.

A loss that is *not* reported leaves the count above zero for good. The drain rule then
never fires for that worker again, and the transmitter falls back to the pure round-ID rule:
it waits until the worker delivers a packet of a later round and moves on at the mismatch.
A stream that keeps flowing survives this. At the very end of the traffic, however, the
transmitter would wait on that worker until more packets arrive.

## Top level (`orr_np_top`)

    in_valid/in_desc/in_ready ─► flow queue ×NUM_FLOWS ─► porr_dispatcher ─► input queue ×NUM_PROC ─► wk_in_*
                                                                            (worker engines, outside)
    out_valid/out_desc ◄── orr_transmitter ◄── output queue ×NUM_PROC ◄── wk_out_*
    orr_param_calc ─► quanta, flow shares, Gap_d

Packet contents are not carried. A descriptor `pkt_desc_t` holds:

| field | width |
|-------|-------|
| `len` | 16 bits |
| `flow` | 3 bits |
| `rid` | 2 bits, filled in by the dispatcher |
| `tag` | 16 bits, free for the user |

The interfaces:

* **Input:** `in_ready` is low while the queue of `in_desc.flow` is full.
* **Worker input queues:** show-ahead. A worker reads `wk_in_desc[i]` while `wk_in_valid[i]`
  is high, and pops with `wk_in_pop[i]`.
* **Worker output queues:** the worker writes with `wk_out_push[i]` while `wk_out_full[i]` is
  low. A packet the worker discards instead is reported with a one-cycle `wk_drop[i]`.
* **Output:** `out_proc` tells which worker carried each packet.
* **Costs:** `cfg_zr[i]` and `cfg_zs[i]` describe the links of worker i. The design itself
  spends `len·cfg_zr[i]` and `len·cfg_zs[i]` cycles per packet on them, so the programmed
  model and the hardware agree. `cfg_w[i]` is the declared processing cost of worker i.

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_PROC` | 8 | workers; 8 is the saturation point for w = 6, z = 1 |
| `NUM_FLOWS` | 6 | flows |
| `FLOW_Q_DEPTH` | 64 | descriptors per flow queue |
| `WK_Q_DEPTH` | 128 | descriptors per worker input and output queue |

Package constants in `orr_pkg`:

| constant | value | meaning |
|----------|-------|---------|
| `LEN_W` | 16 | packet length width |
| `RID_W` | 2 | round-ID width |
| `BAL_W` | 24 | signed balance width: batches up to 8 MB |
| `RND_W` | 16 | round counter width |

A worker queue of 128 descriptors holds one share of 1500–1875 bytes even in 20-byte
packets. Much larger batches (large L or m) need deeper queues, or the dispatcher will wait
on full queues (`stall_full`) and lose throughput. Order is still kept.

## Differences from the published algorithm

* **Carry rule.** The published pseudo-code updates the share as `Q ← Q + Balance` at the end
  of a turn. Taken literally, every deviation would stay in all later rounds. Here the next
  share is `α_i·B + leftover`, which is the stated purpose of the carry: no drift over
  rounds. Flows are handled the same way.
* **Both sides in one step.** When the worker's share and the flow's share both fail for the
  same packet, both turns end in the same cycle. The packet is then decided again in the next
  cycle. The published loop instead dispatches right after moving to the new worker.
  Because a fresh share always holds at least half a maximal packet, both give the same
  packet sequence.
* **Idle case.** After an idle-case restart, Gap_d is only inserted if the interrupted round
  sent something. Otherwise an empty system would keep restarting gaps. The flow pointer is
  not reset on restart.
* **Drain rule, drop report and round window** in the transmitter and dispatcher (described
  above). All three are additions. They keep the round-ID scheme working with empty shares,
  discarding workers and slow workers.
* **Links are modelled, not built.** A packet's transfer is modelled as a wait of `len·z`
  cycles, and only the descriptor moves. Real packet buffers and link interfaces would replace
  this timing.
* **Extra term in Gap_d.** The `Σ T − Σ D` term is added for rounded quanta, as described
  above.
* **Decision costs.** Each non-dispatching decision costs a cycle. At the saturation point
  the measured rate is therefore about 0.9–0.93 bytes/cycle rather than the ideal 1.0.
* **Not built.** The workers themselves, and the RR, SRR and SRR-ORR schedulers that ORR was
  compared with, are not part of this design. Fixed-point reservations limit fairness to a
  resolution of 2^-16.

## Verification and how far it goes

Each block has a self-checking testbench in `tb/` that compares it with an independent
model. All of them print `TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|-----------|----------------|
| `tb_orr_fifo` | queue against a queue model, random push/pop, full and empty |
| `tb_porr_proc_balance` | balances, carries, wrap and restart against a behavioural model, random commands, quanta changed while running |
| `tb_porr_flow_balance` | flow balances, carry versus skip |
| `tb_porr_dispatcher` | exact cycle of every push into the worker queues, round IDs, gaps, stalls on full queues and on the round window |
| `tb_orr_transmitter` | exact output cycles for preloaded rounds, mismatch and drain moves, dynamic traffic with one packet in eight discarded |
| `tb_orr_param_calc` | quanta, shares, C, B and Gap_d against a real-valued reference and the closed forms for equal workers |
| `tb_orr_np_top` | whole design at default size (8 workers, 6 flows, behavioural workers): every output packet against a decision-level model, checking order, round ID and worker; output rate; a phase where workers discard every seventh packet; every mechanism must occur |
| `tb_orr_scaling` | 4, 8, 9 and 10 equal workers and 8 mixed workers side by side: one flow stays in order, the gap formula, the rate, and the saturation of throughput |
| `tb_orr_fairness` | default size, six backlogged flows with reservations 0.3, 0.3, 0.1 ×4 and exponential lengths: each flow's share of the output and its order |

Rates measured with z = 1 and uniform 20–1500-byte packets (w = 6 unless stated):

| configuration | measured | ideal |
|---------------|----------|-------|
| M = 4 | 0.49 bytes/cycle | 0.5 |
| M = 8 | 0.93 | 1.0 |
| M = 9, M = 10 | 0.92, 0.92 | 1.0, flat past saturation |
| M = 8, w = 4, 6, 8, 10 repeating | 0.84 | B/(B + Gap_d) = 0.91 |
| M = 8, w = 12, six flows | 0.54 | 0.57 |

With six flows at reservations 0.3, 0.3, 0.1 ×4, all backlogged and offered at equal rates,
the measured output shares were 0.301, 0.299, 0.0997, 0.100, 0.0997 and 0.101. Packet
lengths were exponential with mean 512 bytes, and the total was 0.99 bytes/cycle.

Every one of these runs delivers every flow strictly in order. The round-ID collection
makes this hold by construction, even where a share deviates from its ideal size.

`worker_model.sv` is a behavioural worker for the testbenches. It spends `len·w` cycles on
each packet, can be held to provoke stalls, and can discard packets by tag.

Not covered:

* Losses that are not reported on `wk_drop`.
* Links of different speed per worker are tested in the parameter unit, the dispatcher, the
  transmitter and one end-to-end phase, but throughput has not been measured for them.
* Batches whose shares exceed the queue depth, other than through the stall path.
* Timing closure: the parameter unit's 64-bit divider and the `len·z` multiplies have not
  been synthesized.

## Simulating

With Verilator 5 (the package must come first):

    RTL="rtl/orr_pkg.sv rtl/orr_fifo.sv rtl/orr_div.sv rtl/orr_param_calc.sv \
         rtl/porr_proc_balance.sv rtl/porr_flow_balance.sv rtl/porr_dispatcher.sv \
         rtl/orr_transmitter.sv rtl/orr_np_top.sv"
    verilator --binary --timing --assert -Irtl -Itb $RTL tb/worker_model.sv \
        tb/tb_orr_np_top.sv --top-module tb_orr_np_top -o sim
    ./obj_dir/sim

The same command runs any other testbench: replace the last file and `--top-module`. Add
`tb/scaling_bench.sv` for `tb_orr_scaling`. The end-to-end test takes a few seconds. To
change the configuration, override the `orr_np_top` parameters and widen `orr_pkg` if
batches exceed 2^23 bytes or more than 8 flows are needed.
