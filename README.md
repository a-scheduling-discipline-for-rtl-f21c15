# ALG link: latency and bandwidth guarantees on a shared NoC link

Several virtual channels (VCs) of a network-on-chip share one physical link.
Each VC carries a connection that needs a guarantee. Fair sharing, such as TDM
or round-robin, ties the two guarantees together: a connection waits for every
other VC, so low latency needs a large bandwidth share. ALG (Asynchronous
Latency Guarantee) scheduling separates the two:

* VC number *i* has a fixed **priority level Q = i+1** (VC 0 is the highest).
* A flit on level Q is **granted the link within Q flit-times** of arriving.
* This holds as long as flits on that VC arrive at least
  **N + Q - 1 flit-times apart** (the *interval condition*). So the VC has a
  guaranteed bandwidth of **1/(N+Q-1)** of the link.

So VC 0 gets one-flit-time access with only 1/N of the bandwidth. An
interrupt-like connection can get minimum latency without reserving a large
share of the link. On an 8-VC link the guarantees are:

| Q (VC index+1) | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| access bound (flit-times) | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
| min. interval N+Q-1 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
| guaranteed bandwidth | 1/8 | 1/9 | 1/10 | 1/11 | 1/12 | 1/13 | 1/14 | 1/15 |

The guaranteed shares add up to about 73 % of the link. The rest is left for
best-effort traffic and for VCs that send faster than their guarantee.

This repository holds synthesizable SystemVerilog for one complete ALG link
in the reference configuration: 8 VCs, 16-bit flits and a physical link
pipelined in 3 stages. It comes with self-checking testbenches, including a
three-link connection test.

## One flit-time = one clock cycle

The scheme was conceived for clockless (asynchronous) circuits. There, a
*flit-time* is one handshake cycle on the physical link, and the original
circuits use C-elements, RS latches and a pulse generator. **This RTL is
synchronous.** Every block is clocked, and one clock cycle is one flit-time.
Each cycle the link carries at most one flit. The scheduling rules, the
bounds and the block structure are the same as in the original. The circuits
that implement them are this design's own clocked equivalents (see
*Departures* below).

## Path of a flit

```
            per VC                                 shared                         per VC
in_* --> sharebox --> admission --> SPQ slot --> merge --> link pipeline --> split --> unsharebox --> out_*
            ^         control       (priority)            (3 registers)                    |
            |                                                                              |
            +------------------------------- unlock (toggle) -----------------------------+
```

| block | file | what it does |
|---|---|---|
| sharebox | `rtl/sharebox.sv` | passes one flit, then locks until the unlock wire toggles |
| admission control | `rtl/alg_admission_ctrl.sv` | holds a VC back until the lower-priority flits it delayed are served |
| static priority queue (SPQ) | `rtl/spq.sv` | one slot per VC; each cycle grants the highest-priority full slot |
| scheduler | `rtl/alg_scheduler.sv` | N admission controls + SPQ |
| merge | `rtl/link_merge.sv` | multiplexes the granted slot onto the link, adds the VC number |
| link pipeline | `rtl/link_pipeline.sv` | `LINK_STAGES` register stages, never stalls |
| split | `rtl/link_split.sv` | steers the flit to its VC by the VC number |
| unsharebox | `rtl/unsharebox.sv` | one-flit register, the destination VC buffer; toggles unlock when emptied |
| link | `rtl/alg_link.sv` | top level: all of the above for `N_VC` channels |
| package | `rtl/alg_pkg.sv` | default sizes and the lower-priority mask function |

## The static priority queue and why it needs admission control

The SPQ alone gives the bound only when flits are sparse. A flit entering slot
Q waits for at most one flit from each of the Q-1 higher slots, plus its own
cycle. But a VC that sends in bursts could take the link again and again, and
the lower slots would starve. Bursts arise naturally in a network: a flit that
was fast on earlier hops arrives ahead of its schedule.

**The rule:** a higher-priority flit may delay each lower-priority flit at
most once. Each VC's admission control keeps one *status bit* per VC of lower
priority:

1. When the VC's own flit is granted the link, the status bits are loaded
   with the SPQ *occupancy* of the lower VCs. This is a snapshot of exactly
   the flits that this grant has just delayed.
2. Each bit clears when its VC is granted the link.
3. While any bit is set, no new flit of this VC enters the SPQ.

Set and reset never happen in the same cycle for the same bit, because only
one VC is granted per cycle. In `alg_admission_ctrl`, admission uses the bits
as they will be after this cycle's update (`status_d`). So a VC can re-enter
the SPQ in the very cycle that the last flit it delayed is granted. If its
snapshot was empty, it can re-enter in the cycle of its own grant. That
timing gives the interval N+Q-1 exactly. After a grant in cycle g, at most
N-Q lower flits must be served. At most Q-1 higher flits can be served in
between, because each of them is held by the same rule. So the VC is free
again by cycle g+N-1, and a flit arriving N+Q-1 cycles after the previous one
is admitted at once.

### Worked example (4 VCs, A highest)

`tb_alg_scheduler` replays this sequence and checks every step:

| cycle | arrivals | SPQ grant (on link next cycle) | notes |
|---|---|---|---|
| 0 | A1, C1 | – | both enter the SPQ |
| 1 | | A1 | A's snapshot = {C} |
| 2 | A2, B1 | C1 | C served, so A is released and A2 enters; B1 enters |
| 3 | A3, C2 | A2 | A's snapshot = {B}; **A3 is held**; C2 enters |
| 4 | | B1 | B1 waited 2 cycles, the bound for Q=2; A released, A3 enters |
| 5 | | A3 | snapshot = {C} |
| 6 | | C2 | |

Link order: A1 C1 A2 B1 A3 C2. VC A is sending faster than its guarantee, so
it is slowed down. B and C still meet their bounds.

## VC control: sharebox, unsharebox and the unlock wire

The bounds hold only if a flit never stalls on the shared link. A flit may
therefore enter the scheduler only when the far end has room for it. Each VC
uses one wire back from the receiver:

* The **sharebox** keeps a phase bit that flips on every flit it passes. It is
  *locked* while the phase bit differs from the unlock wire.
* The **unsharebox** is a one-flit register. When its flit leaves at
  `out_valid/out_ready`, it flips the unlock wire.

So each VC has at most one flit between its sharebox and its unsharebox.
The merge, pipeline and split have no backpressure at all. A single-flit
destination buffer is enough as long as the round trip stays shorter than the
admission interval (*link cycle condition*: t_link + t_unlock < N-1). In this
RTL, t_link is 4 cycles from grant to `out_valid` (3 pipeline stages plus the
unsharebox register). The sharebox reopens one cycle after the flit leaves.
So with the destination ready, a VC can send every 6 cycles, well inside the
minimum interval of 8 for N=8.

## Timing of `alg_link`

With the destination ready (`out_ready=1`), a flit offered in cycle *a* on
VC *i* behaves as follows:

* It is accepted at the end of cycle *a* if its sharebox is unlocked, its
  admission control is open and its SPQ slot is free.
* It is granted in cycle *g*, with a < g <= a + (i+1). It is on `link_*` in
  cycle g.
* It is valid at `out_*[i]` in cycle g + LINK_STAGES + 1.

So the per-hop bound is **Q + LINK_STAGES + 1 cycles** from arrival to
delivery. That is 5 cycles for VC 0 and 12 for VC 7 at the defaults. For VC 0
this bound is also the fixed latency.

Reset is synchronous and active low (`rst_n`). It empties the SPQ, the link
and the unshareboxes, and clears all status and phase bits. Data registers
are not reset.

### Ports of `alg_link`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (one flit-time), synchronous active-low reset |
| `in_valid`, `in_ready`, `in_data` | in/out/in | N_VC, N_VC, N_VC x FLIT_W | per-VC flits from the source VC buffers |
| `out_valid`, `out_ready`, `out_data` | out/in/out | N_VC, N_VC, N_VC x FLIT_W | per-VC flits to the destination |
| `link_valid`, `link_vc`, `link_data` | out | 1, clog2(N_VC), FLIT_W | the flit entering the link pipeline this cycle |
| `grant`, `occupancy` | out | N_VC | one-hot SPQ grant; SPQ slots holding a flit |
| `adm_blocked`, `vc_locked` | out | N_VC | admission control holding a VC; sharebox locked |

Parameters: `N_VC` (8), `FLIT_W` (16) and `LINK_STAGES` (3). All of them can
be changed. `N_VC` must be at least 2 and at most 32 (the width of the mask
function in `alg_pkg`).

## Connections over several links

A connection reserves one VC on every link of its path. The routers between
links are assumed to be non-blocking: a flit leaving a link's VC goes straight
to its reserved VC on the next link. Then the end-to-end bound is the sum of
the per-hop bounds, and the source needs to respect only the interval
N + Q_max - 1, where Q_max is the worst priority on the path. The admission
control of each link absorbs the jitter the network adds. One-flit buffers
per VC suffice under the link cycle condition.

`tb_alg_three_links` chains three `alg_link`s. A *fast* connection uses VC 0
on every link and sends every 8 cycles. A *slow* connection uses VC 7 and
sends every 15 cycles. Random background traffic runs on VCs 1–6 of each
link, at a total link load of 50, 80, 90, 95 and 100 %. Over at least 10 000
slow-connection flits per load, the run gave:

| load | fast max / bound | slow mean | slow max / bound |
|---|---|---|---|
| 50 % | 15 / 15 | 18.9 | 24 / 36 |
| 80 % | 15 / 15 | 26.8 | 34 / 36 |
| 90 % | 15 / 15 | 24.9 | 36 / 36 |
| 95 % (92 % reached) | 15 / 15 | 26.0 | 36 / 36 |
| 100 % | 15 / 15 | 35.6 | 36 / 36 |

As the load rises, the slow connection's latencies move up against the bound
but never pass it. The fast connection always takes exactly 5 cycles per hop.

## Departures from the asynchronous original

* **Clocked circuits.** The sharebox's C-element lock and pulse generator
  become a phase bit compared with the unlock wire. Its output decoupling
  latch becomes the SPQ slot register. The admission control's RS latches
  become registers, and its C-element in the request path becomes a
  valid/ready handshake, which also keeps the request up until it is taken.
  The unsharebox latch becomes a register.
* **SPQ circuit.** The original uses an asynchronous priority arbiter from
  other work. Here the SPQ is a register per VC and a fixed-priority encoder.
* **VC number on the link.** The merge sends `clog2(N_VC)` bits of VC number
  with each flit, and the split decodes them. How the original identifies the
  VC on the link is not specified.
* **Latency in cycles, not nanoseconds.** The forward latency of the link
  (sharebox, merge, pipeline, split, unsharebox) is a fixed 4 cycles here. The
  asynchronous link's speed (about 700 M flits/s in 0.12 µm CMOS, 1.42 ns per
  flit-time) and its area have no counterpart in this model.
* **Observation ports.** `link_*`, `grant`, `occupancy`, `adm_blocked` and
  `vc_locked` are brought out for testing and debug.

Not included: the router around the link (the non-blocking GS switch, the
best-effort router), the network adapters with their OCP interfaces, and the
cores. The testbenches model the router as fixed wiring.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops itself, with a watchdog.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_alg_link \
    -y rtl -y tb +libext+.sv rtl/alg_pkg.sv tb/tb_alg_link.sv -o sim
./obj_dir/sim
```

Change the top module to run another testbench:

| testbench | what it checks |
|---|---|
| `tb_alg_link` | full-size link (defaults): in-order data per VC, conforming flits accepted on arrival and delivered within Q+4 cycles, guaranteed bandwidth of all 8 VCs at the minimum interval, and that admission hold, priority wait, lock stall, backpressure and a fully busy link all occur |
| `tb_alg_three_links` | three chained links, fast and slow connections under background load (table above) |
| `tb_alg_scheduler` | the worked example; random greedy/conforming traffic on 8 VCs with the Q-cycle bound |
| `tb_alg_admission_ctrl`, `tb_spq`, `tb_sharebox`, `tb_unsharebox`, `tb_link_merge`, `tb_link_pipeline`, `tb_link_split` | each block against a reference model |

All testbenches finish in seconds.
