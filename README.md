# Slotted queuing-network emulator: Geo/Geo/1/k queue and two-stage 4×4 ATM switch

Cell-loss probabilities of 1e-8 to 1e-9 in a buffered ATM switch are rare events. Software
simulation cannot reach them in reasonable time. This RTL turns a discrete-time (slotted)
queuing network into a synchronous circuit instead. Each queue is a register or a small memory,
each traffic source is a random-number generator with a comparator, and counters collect the
statistics. Run on an emulator or an FPGA at a few MHz, the circuit plays out millions of
slots per second and can count losses that are far too rare to simulate.

The design follows the architecture in *"Emulation on a Versatile Architecture for discrete time
Queuing Network: Application to High Speed Network"* (Labbé, Olive, Vincent). It covers the two
networks studied there:

| network | module | what it measures |
|---|---|---|
| Geo/Geo/1/k queue, kept as a customer count | `geo_geo_1k` | P0 (probability the queue is empty), losses; convergence to M/M/1/k as the slot shrinks |
| two-stage 4×4 switch of 2×2 output-buffered switches, with cells in memories | `switch_emulator` | global and per-stage loss rate against the buffer sizes K1, K2; jitter of a periodic flow through background traffic |

`emulator_top` places both side by side. They share only the clock and reset.

## Building blocks

```
emulator_top
├── geo_geo_1k                 one slot = one clock cycle
│   ├── geo_source (arrivals)  ── gfsr_rng
│   ├── geo_source (service)   ── gfsr_rng
│   └── count_queue
└── switch_emulator            one slot = three clock cycles
    ├── slot_ctrl
    ├── geo_source ×4          ── gfsr_rng each
    ├── periodic_source        replaces source 0 when s_periodic_en = 1
    ├── switch_4x4
    │   └── switch_2x2 ×4      (2 first stage, 2 second stage)
    │       └── cell_queue ×2
    └── iat_histogram
```

`qnet_pkg` holds the shared types. The main one is the cell record `cell_t`: `valid`, `probe`
(marks the observed periodic flow), a 2-bit `src` and a 2-bit `dst`. The package also holds
the enum `order_e` (`ARRIVAL_FIRST` or `DEPARTURE_FIRST`).

## Random traffic

**`gfsr_rng`**: a 16-bit word every clock cycle. It is a generalised feedback shift register
on the trinomial 1 + X + X^127. Each of the 16 bit columns is a maximal-length sequence of that
polynomial, so the word obeys `w[n] = w[n-127] xor w[n-126]`. The last 127 words are kept in a
127×16 memory. Each cycle the two oldest entries are read, and their xor is output and written
over the oldest. After reset the memory is filled from a 32-bit xorshift sequence started at
`SEED`, one word per cycle. `ready` rises after 127 cycles. Every generator in the design has
its own seed.

**`geo_source`**: a cell is emitted in a slot when `w <= theta`. That happens with probability
(theta+1)/2^16, so a load ρ is set with `theta = ρ·2^16 − 1` (52429 gives 0.8). Decisions in
successive slots are independent, so the gaps between cells are geometric. The destination is
drawn from two bits of the previous cycle's word, which makes it uniform over the four ports.

**`periodic_source`**: one cell with `probe = 1` every `PERIOD` = 4 slots, to a fixed port
(`periodic_dst`).

## Queue without contents: `count_queue`

When customers are identical, a queue is only its count. Once per slot the register is
updated in one of two orders:

```
arrival first:   s = n + a; lost = max(s-k,0); s = min(s,k); served = min(s,c); n' = s - served
departure first: served = min(n,c); s = n - served + a; lost = max(s-k,0); n' = min(s,k)
```

Here a is the number of arrivals, c the consumption (what the server can take) and k the
buffer size. This is the chain add → compare with buffer size → subtract → compare with zero,
taken in either order. `losses` and `departures` are combinational and valid in the cycle the
update happens.

In `geo_geo_1k`, one clock cycle is one slot. Arrivals come with probability λ and service
completions with probability μ. The counters hold slots, slots that began empty, arrivals,
losses and departures. P0 = `empty_slots / slots`. Shrinking the slot by a factor n means
using λ/n and μ/n. As n grows, P0 tends to the M/M/1/k value.

## Queue with contents and the three-cycle slot

This part needs the most care. When cells carry information, each queue is a memory as deep
as its capacity, and several cells may reach the same queue in one slot. In a 2×2 switch,
both inputs can send to the same output. The memory takes one write per cycle, so a slot
is spread over `N_IN + 1` = 3 clock cycles. `slot_ctrl` supplies the cycle number `phase`
and the `slot_end` strobe on the last cycle. `cell_queue` does the following in each slot:

```
phase            0                1                2 (slot_end)
ARRIVAL_FIRST    store in_cells[0] store in_cells[1] serve head -> out_cell
DEPARTURE_FIRST  serve head       store in_cells[0] store in_cells[1]; out_cell <= served cell
```

- **Storing:** an arriving cell is stored if fewer than `capacity` cells are queued. Otherwise
  it is lost, and `loss` pulses in that cycle. Input 0 is always stored first. So when one
  place is left and both inputs send a cell, input 1's cell is the one lost.
- **Serving:** the server takes the head cell when `serve` is high and the queue is not empty.
  In the switch, `serve` is tied high: a deterministic server that sends one cell per slot.
- **Output:** `out_cell` is registered at `slot_end` and held through the whole next slot,
  which is when the next queue stores it. A cell can therefore cross at most one queue per slot.
- **Capacity:** the memory is `DEPTH` cells deep and `capacity` (1..DEPTH) is a run-time
  input. One build therefore covers every buffer size up to `DEPTH`.
- **Order:** with a deterministic server, arrival-first and departure-first lose exactly the
  same cells. Only the output timing differs. Assertions check that the count never exceeds
  `DEPTH` and that `capacity` fits the memory while running.

All sources and queues change their outputs only at `slot_end`. So everything a queue reads
is stable for the whole slot, whatever order it processes its inputs in.

## The four-by-four switch

```
           stage 1 (K1, route on dst[1])     stage 2 (K2, route on dst[0])
in0 ─┐              ┌ q0 ───────────────────── in0 ┐
in1 ─┴─ switch s1a ─┤                                 ├─ switch s2a ─ q0 → port 0, q1 → port 1
                    └ q1 ─────────╲ ╱──────────── in1 ┘
                                   ╳
in2 ─┐              ┌ q0 ─────────╱ ╲──────────── in0 ┐
in3 ─┴─ switch s1b ─┤                                 ├─ switch s2b ─ q0 → port 2, q1 → port 3
                    └ q1 ───────────────────────── in1 ┘
```

First-stage output o of switch s feeds input s of second-stage switch o. Routing on `dst[1]`,
then `dst[0]`, puts every cell on output port `dst`. Latency: a cell offered during slot t is
stored in stage 1 in slot t, in stage 2 in slot t+1, and is on `out_cells` during slot t+2.
`loss1`/`loss2` pulse per queue.

`switch_emulator` wraps the switch with four sources and the counters listed below, all
`STAT_W` = 48 bits:

- `emitted`, `lost1`, `lost2`, `delivered`;
- `probe_emitted`, `probe_delivered` for the tagged flow;
- `iat_hist[0..8]`: gaps between tagged cells at the outputs, in slots, with the last bin
  counting gaps of 8 or more; `iat_samples` is the number of gaps recorded.

The whole-switch loss rate is `(lost1 + lost2) / emitted`. `s_src_en` low stops the sources
so the switch can drain. After a drain, `emitted == lost1 + lost2 + delivered`.

## Using the top level

1. Hold `rst_n` low for a cycle.
2. Wait for `g_ready` / `s_ready`: 127 cycles of generator seeding.
3. Set the thresholds and capacities.
4. Raise `g_run` / `s_run` and `s_src_en`. Pulling `*_run` low freezes the network.
5. Read the counters whenever needed.

| parameter | default | meaning |
|---|---|---|
| `DEPTH1`, `DEPTH2` | 30, 50 | cell memories per first/second-stage queue (largest K1, K2 studied) |
| `PERIOD` | 4 | period of the tagged flow |
| `NBINS` | 9 | inter-arrival histogram bins (0..8 slots) |
| `G_CNT_W` | 16 | width of the Geo/Geo/1/k count and buffer size |
| `G_ORDER`, `S_ORDER` | `ARRIVAL_FIRST` | order of events in a slot |
| `STAT_W` | 48 | statistics counters (2.8e14 events) |

At default parameters, synthesis gives about 660 word-level cells, 1 600 flip-flops and
14 kbit of memory: 6 generators of 127×16 bits and 8 cell queues of 6-bit cells.

## What the simulations show

Each figure below was measured by a testbench with every parameter at its default:

- **Slot scaling** (`tb_wl_slot_scaling`, λ = 0.6/n, μ = 0.8/n, k = 10, arrival first).
  Measured P0 for n = 1, 2, 4, 40, 1000 is 0.63, 0.35, 0.31, 0.265, 0.258. It agrees with the
  exact stationary value of the same chain within about 0.01 and falls towards the M/M/1/10
  value 0.261. λ, μ and k were chosen because they give this curve. They are an inference:
  the published figure does not state them.
- **Loss against capacity** (`tb_wl_loss_vs_capacity`, `tb_emulator_top`, load 0.8).
  - K1 = K2 = 10 loses about 5e-4 of the cells. K1 = 10 with K2 ≥ 20 loses about 7e-5,
    all in the first stage. These are the plateau and merging effects of the
    published curves, with the same order of magnitude: about 3e-4 and 8e-5 there.
  - Points with rates below about 1e-6 need more cells than simulation allows. They read
    as 0 here.
- **Jitter of a period-4 flow** (`tb_wl_periodic_jitter`, K1 = 20, K2 = 30, tagged flow on
  input 0, Bernoulli background on the other three inputs). Share of inter-arrival gaps at
  the output:

  | background load | 2 slots | 3 | 4 | 5 | 6 |
  |---|---|---|---|---|---|
  | 0.2 | 0.00 | 0.01 | 0.99 | 0.01 | 0.00 |
  | 0.4 | 0.00 | 0.04 | 0.92 | 0.04 | 0.00 |
  | 0.6 | 0.02 | 0.10 | 0.76 | 0.10 | 0.02 |
  | 0.8 | 0.05 | 0.17 | 0.54 | 0.16 | 0.05 |
  | 0.9 | 0.08 | 0.21 | 0.42 | 0.19 | 0.07 |

  The mean gap stays at 4 and no tagged cell is lost. The spread grows with the load.

## Where this design departs from the source, or fills gaps

- The emulation platform itself is not part of this RTL: its FPGA fabric, its memory models,
  its trace buffer of the last cycles and its compile flow. Neither are two options described
  only as possibilities: replaying stored real traffic, and cells tagged with priorities or
  time stamps. Nothing here measures end-to-end delay.
- **Generator.** The source names the polynomial and a "memory-based" generator. The GFSR
  organisation and the xorshift seeding are this design's.
- **Cell queues.** The three-cycle slot, storing input 0 before input 1, and the one-slot hop
  between stages are all this design's choices.
- **Routing.** The source fixes the topology. Which destination bit each stage routes on is
  this design's choice.
- **Capacities** are run-time inputs limited by `DEPTH1`/`DEPTH2`. The source sizes each
  memory to its capacity.
- **Queue model in the loss study.** The source suggests the loss study may have used
  queues without contents. Here both switch studies use cell queues, because routing through
  two stages needs the destination.
- **Service in Geo/Geo/1/k** is a Bernoulli completion per slot, drawn from a second
  generator.
- The periodic flow replaces source 0. Its destination is a run-time input.
- The loss rate at K1 = K2 = 10 is about 1.5× the published value. The published model
  probably differs in a detail it leaves open, such as the storing order or the hop timing.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/qnet_pkg.sv tb/qnet_ref_pkg.sv tb/tb_switch_4x4.sv --top-module tb_switch_4x4
./obj_dir/Vtb_switch_4x4
```

Substitute the testbench name. `tb/qnet_ref_pkg.sv` is needed only by `tb_cell_queue`,
`tb_switch_2x2` and `tb_switch_4x4`; they use it for a slot-level reference FIFO.

| testbench | what it checks |
|---|---|
| `tb_gfsr_rng` | every word against the recurrence; seeding time; bit balance |
| `tb_geo_source` | emission decision per slot, rate for three loads, uniform destinations |
| `tb_periodic_source`, `tb_slot_ctrl` | period, phase, freeze |
| `tb_count_queue` | both orders against a reference model, multiple arrivals/services |
| `tb_cell_queue` | both orders, loss per cycle, departing cell per slot, random server |
| `tb_switch_2x2`, `tb_switch_4x4` | every output cell and loss count against a slot-level model; 2-slot latency |
| `tb_iat_histogram` | histogram of a random arrival pattern; clear |
| `tb_geo_geo_1k` | conservation; P0 and loss fraction against the exact chain (both orders) |
| `tb_switch_emulator` | losses in both stages; drain balance; undisturbed and disturbed periodic flow |
| `tb_emulator_top` | end-to-end at default parameters; counts every mechanism (stage-1 and stage-2 loss, drain, periodic mode, jitter, queue full/empty/loss, freeze) |
| `tb_wl_slot_scaling`, `tb_wl_loss_vs_capacity`, `tb_wl_periodic_jitter` | the three parameter sweeps above (about 15 s, 25 s and 2 s) |

Some results are statistical. Change the seeds (`SEED`, `SEED_A`, `SEED_S`, or the `SEEDS`
table in `switch_emulator`) and the numbers move within the tolerances the testbenches allow.
