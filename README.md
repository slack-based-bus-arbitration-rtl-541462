# Slack-based latency-aware bus arbiter

On a shared bus, some masters must finish each transfer within a latency
constraint: for example, a video block that must see its burst complete
within 30 cycles of asking. Many latency-aware arbiters try to make such
requests as *fast as possible*, and other masters pay for it. This arbiter
aims instead to finish each request *just in time*. It keeps a running
**slack** for every pending request: how many more cycles the request can
wait and still meet its constraint. The scheduler steps in only when a slack
runs low. The rest of the time the ordinary bandwidth-oriented arbiter
(round robin by default) decides.

The RTL is SystemVerilog 2017, synthesizable, with four masters and a single
slave of latency 8 by default.

## How a request is tracked

When master *i* raises a request for a burst of *B* beats, its slack counter
loads

    slack = L_i - B - S

Here `L_i` is the master's latency constraint in cycles, and `S` is the
worst-case slave latency (the `SLAVE_LAT` parameter, default 8). One beat
takes `BEAT_CYCLES` cycles, 1 by default, so no multiplier is built. The
counter then
decreases by one every clock cycle until the burst has completely finished.
It keeps counting through a preemption. Below zero it keeps going (the
request is already late) and saturates at -512.

The timing is exact, and it matters for picking thresholds:

* The request is first seen high in cycle `t`, and its loaded slack appears
  in cycle `t+1`.
* Suppose the bus is granted to it in cycle `g` (the grant register output).
  The slave then returns data from cycle `g+S` on, and the last beat falls
  in cycle `g+S+B-1`.
* The latency, counted from `t` through the last beat inclusive, is
  therefore

      latency = L - slack(g) + 1

So **a request meets its constraint exactly when its slack is at least 1 in
the cycle it is granted**. An unhindered request (granted at `t+1`) has a
latency of `1 + S + B`: one cycle for the grant, S for the slave, B for the
data. The end-to-end testbench checks this identity for every burst that was
not preempted.

## Three urgency states

Each cycle, the scheduler looks at the slacks of all *waiting* requests (the
bus owner is left out). It picks the smallest, and compares that slack with
two programmable thresholds, T(W) and T(E):

| smallest slack          | State | arbiter behaviour |
|-------------------------|-------|-------------------|
| > T(W), or nothing waits | `00` safe | base arbiter decides |
| ≤ T(W)                  | `01` warning | the scheduler's master gets the bus as soon as the current transfer ends |
| ≤ T(E)                  | `10` emergency | the current transfer is aborted at once (unless locked); the scheduler's master gets the bus and its transfer is **locked** |

The scheduler sends the arbiter only two signals: `State` (2 bits) and
`Next grant` (the master ID, log2 N bits). It never grants the bus itself.

**Preemption and retry.** In the emergency state, the current owner gets a
one-cycle `retry` pulse in the same cycle that the grant moves to the urgent
master. The aborted master keeps its request up, and it later resends the
*whole* burst. Its slack keeps running, so it can itself become urgent. A
transfer granted in the emergency state is locked: no other emergency can
abort it. While it runs, a second emergency just waits, and the arbiter
raises `ev_lock_hold`. Without the lock, two urgent masters could keep
aborting each other. Transfers granted by the base arbiter, or in the warning
state, are not locked.

**Thresholds.** The reset values are T(W) = 21 and T(E) = 1.
* T(E) = 1 follows from the identity above: a request with slack 1 misses
  unless it is granted in this very cycle.
* T(W) = 21 is the average service time (1 + 8 + 12 beats) of the reference
  workload below.

Both values are a starting point and can be changed at run time. Nothing
enforces T(W) > T(E); if T(E) ≥ T(W), the warning state is simply skipped.

**Ties.** Among equal slacks the lower master index wins. Because slack
saturates at -512, several requests that are hopelessly late end in a tie.
With the fixed-priority base arbiter under extreme overload, the highest
index can then starve (see Results).

## Block structure

```
                    +-------------------- slack_arb_top --------------------+
 AHB-lite cfg port ->  sched_cfg_slave --(write strobes)--+                   |
                    |                                     v                   |
 req, burst_len --->|  slack_scheduler                                        |
                    |    slack_counter x N --> slack_min_select --+           |
                    |                              (min slack) -> urgency_    |
                    |                                             comparator  |
                    |        Next grant, State  |                             |
                    |                           v                             |
 xfer_done -------->|  latency_aware_arbiter  (bus-winner select, owner,      |
                    |    base_arbiter           lock, preemption)             |--> grant, retry
                    +---------------------------------------------------------+
```

| module | role |
|---|---|
| `slack_arb_pkg` | `urgency_e` State encoding, `policy_e`, default widths, register addresses |
| `slack_counter` | constraint register, and a slack register with a valid MSB. One subtractor, with operand muxes that pick (L, B+S) on a new request and (slack, 1) otherwise |
| `slack_min_select` | combinational minimum over the candidate slacks |
| `urgency_comparator` | T(W)/T(E) registers and the three-way classification |
| `slack_scheduler` | N slack counters plus the two comparators; mode gating |
| `base_arbiter` | round robin (default) or fixed priority |
| `latency_aware_arbiter` | picks the bus winner, tracks the owner, preempts and locks; holds assertions for one-hot grant, completion only by the owner, and locked transfers never preempted |
| `sched_cfg_slave` | register access over an AHB-lite subset |
| `slack_arb_top` | wires the above together |

The slack counter, the scheduler's composition and the State encoding
follow the published scheme. The following are choices made for this RTL,
which the scheme leaves open:
* how the minimum search is done;
* the base arbiters;
* the handover timing;
* the locking rule;
* the register map;
* the mode register.

## Interface of `slack_arb_top`

All signals are synchronous to `clk`. `rst_n` is an active-low asynchronous
reset.

| signal | dir | meaning |
|---|---|---|
| `req[i]` | in | master *i* has a burst pending. Raise it and hold it until the cycle after `xfer_done` for that burst. If it is still high then, it counts as a new request, so drop it for at least one cycle between bursts. |
| `burst_len[i]` | in | beats of the pending burst (1..31); sampled when the request is first seen |
| `grant[i]` | out | one-hot, registered: master *i* owns the bus |
| `xfer_done` | in | the owner's last beat completes in this cycle. It comes from the bus or slave; the arbiter does not count beats itself. |
| `retry[i]` | out | one-cycle pulse: master *i*'s transfer was aborted, and the master must resend the whole burst |
| `owner_valid`, `owner`, `locked` | out | current ownership |
| `next_grant`, `state`, `slack_valid`, `slack` | out | scheduler status (observation) |
| `ev_warn_grant`, `ev_emerg_grant`, `ev_preempt`, `ev_lock_hold` | out | one-cycle event strobes |
| `hsel haddr htrans hwrite hwdata hready` / `hrdata hreadyout hresp` | in/out | configuration slave |

The grant decision is combinational in cycle `t` and appears on `grant` in
`t+1`. The next owner follows a completing transfer with no idle cycle.

### Configuration registers

The configuration port is an AHB-lite subset: a write's address phase is
followed by its data phase. It has no wait states, and the response is always
OKAY. A constraint change takes a single write transfer. It applies to
requests that are loaded after the write; requests already counting keep
their slack.

| address | register | reset |
|---|---|---|
| `0x00 + 4*i` | latency constraint of master *i* (9 bits, cycles) | 30, 72, 30, 72 |
| `0x20` | T(W), signed 10 bits | 21 |
| `0x24` | T(E), signed 10 bits | 1 |
| `0x28` | bit 0: scheduler enable; bit 1: emergency enable | `11` |

The mode register selects between three variants:
* `00`: plain base arbitration;
* `01`: warning state only (emergencies are reported as warnings, so
  nothing is ever preempted);
* `11`: full scheme.

### Parameters

| parameter | default | note |
|---|---|---|
| `N_MASTERS` | 4 | up to 8 with this register map |
| `LAT_WIDTH` | 9 | constraints are at most a few hundred cycles |
| `SLACK_WIDTH` | 10 | signed; the valid bit comes on top |
| `BURST_WIDTH` | 5 | bursts up to 31 beats |
| `SLAVE_LAT` | 8 | worst-case slave latency S |
| `BEAT_CYCLES` | 1 | cycles per data beat, T in `L - B*T - S` |
| `COUNT_BURST` | 1 | 0 drops the `B*T` term |
| `POLICY` | `POLICY_ROUND_ROBIN` | or `POLICY_FIXED_PRIORITY` |
| `LAT_INIT` | {72,30,72,30} (packed, master 0 in the low bits) | reset constraints |
| `TW_INIT`, `TE_INIT`, `MODE_INIT` | 21, 1, `2'b11` | reset thresholds and mode |

Every master has a slack counter. To make a master effectively
non-latency-critical, give it a large constraint.

## Reference workload

The defaults match a four-master, single-slave system with the following
masters:

| master | bandwidth share | burst | constraint |
|---|---|---|---|
| M1 (0) | 35 % | 8 | 30 |
| M2 (1) | 35 % | 8 | 72 |
| M3 (2) | 35 % | 16 | 30 |
| M4 (3) | 35 % | 16 | 72 |

The total demand is 140 % of the ideal data bandwidth. The slave latency is
8 cycles. The hardware needs are small: 4 counters, constraints ≤ 72 (well
inside 9 bits), and bursts ≤ 16 beats (5 bits). Other scenarios need no
hardware changes:
* constraints changed at run time (M2 72→51, M3 30→51) take one write each;
* a master raising its share to 50 % only changes the traffic.

## Results with the included traffic model

In the testbenches, each master computes for a random time, then issues one
burst and waits for it (closed loop). The think time is set so that the
master alone would use its share of the data cycles. The slave holds the bus
for its 8-cycle latency, so the bus tops out at about 60 % data
utilisation, and the reference load is heavy overload.

From `tb_workload_sweep`, with round robin and 8000 cycles per point:

| total demand | mean latency M1/M3: off / warning / warning+emergency | longest violation: off / W / W+E | bursts retried (W+E) |
|---|---|---|---|
| 40 % | 27.1 / 26.2 / 27.1 | 41 / 20 / 34 | 11 % |
| 80 % | 44.9 / 34.6 / 37.8 | 49 / 37 / 64 | 18 % |
| 140 % | 66.2 / 51.2 / 54.3 | 56 / 49 / 64 | 6 % |

At 140 % with round robin, the mean violation per burst (cycles over the
limit, averaged over all bursts) for M1–M4 is:
* scheduler off: 44.5, 2.9, 27.8 and 0.8;
* warning only: 23.3, 24.0, 19.0 and 14.1.

The scheduler therefore spreads the overrun over all masters, instead of
letting the tight-constraint masters carry it. With fixed priority and the
scheduler off, M4 is never served at that load.

What the sweep shows:
* The warning state clearly helps the 30-cycle masters and costs no
  bandwidth.
* Under this traffic model, the emergency state costs more than it saves:
  * it retries 6–18 % of bursts, more than the few percent the scheme was
    reported to need;
  * its longest violation is above the warning-only variant.

  How much the emergency state helps depends strongly on T(E), on the
  traffic, and on how expensive a retry is. The reset values were not tuned.
  Moving T(E) down to -20 did not change the picture here.
* With fixed priority, the scheduler removes the base arbiter's very long
  starvation at moderate loads. At 140 %, however, the warning-only variant
  suffers from the saturation ties described above.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Run them from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/slack_arb_pkg.sv tb/tb_slack_arb_top.sv --top-module tb_slack_arb_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_slack_counter` | Against an integer model: load value, countdown, saturation, clear on completion, constraint writes. |
| `tb_slack_min_select` | Against an independent search over random candidates. |
| `tb_urgency_comparator` | Classification sweep around both thresholds, before and after reprogramming. |
| `tb_slack_scheduler` | Random traffic and reconfiguration against a model of all counters, Next grant and State. All three states must occur. |
| `tb_base_arbiter` | Round-robin and fixed-priority choices against a model; fairness under full load. |
| `tb_latency_aware_arbiter` | Random advice and completions against a rule model of grant, lock and retry. Each mechanism must occur: warning grant, emergency grant, preemption, lock hold. |
| `tb_sched_cfg_slave` | Writes, reads, back-to-back transfers, `hready` low, mode register. |
| `tb_slack_arb_top` | The full design at default parameters with the reference workload, run in four phases: full scheme, plain round robin, warning only, then the full scheme after a constraint change. Every cycle, every slack is checked against the testbench's own count. Every non-preempted burst is checked against the latency identity. The scheduler variants must lower the mean latency of the 30-cycle masters. Warning grants, emergency grants, preemptions, resent bursts, lock holds, constraint writes and mode switches must all occur. |
| `tb_workload_sweep` | The bandwidth sweep above, for both base policies and all three modes, plus the 50 % traffic-variation run. |

`tb/bus_env_model.sv` is the behavioural model of the masters and the slave
that the last two testbenches use. It is not part of the design.

## Limits and departures

* **Outside this RTL:** the masters, the AHB address/data fabric and the
  slave.
  * The fabric has to turn `retry` into an aborted transfer.
  * The slave, or the fabric, must report `xfer_done`.
* **Fixed slave latency.** The slave latency is one constant, the worst
  case. A slave that is faster than `SLAVE_LAT` makes the scheduler more
  cautious than it needs to be, never less.
* **Slack is counted to the last beat** by default. To care only about the
  first data beat, set `COUNT_BURST = 0`; the counter then loads `L - S`.
  The latency identity above then holds for the first beat instead of the
  last.
* **A return path is added.** The scheduler takes the one-hot bus owner
  (`in_service`, N bits) so that it never names the master that already
  has the bus. This is the only path from the arbiter back to the
  scheduler.
* **Lock rule.** Only transfers granted in the emergency state are locked.
* **Example scenario not simulated.** The small three-master example that
  motivates the scheme (service times 4, 8 and 2 cycles) is not reproduced,
  because its latency limits are only drawn, not given as numbers.
