# Fine-grained DVFS for accelerator tiles

Accelerator-rich SoCs waste energy when accelerators wait on a congested
network or on memory at full voltage and frequency. This RTL applies dynamic
voltage and frequency scaling (DVFS) per *VF domain*: a small group of
accelerator tiles that shares one clock and one voltage regulator. Each
domain has its own controller. The controller watches two hardware probes
in every tile: is the accelerator idle, and is the tile getting
back-pressure from the network-on-chip (NoC)? Every *window* of cycles it
decides whether to step the domain's operating point down or up. It then
performs the change in a sequence that is safe for the regulator and the
clocks: the tiles are frozen, the voltage reference is moved, the
regulator is given time to settle, and the clock is switched without
glitches. A third probe, whether the accelerator is enabled, lets the
controller ask for the whole domain to be switched off while none of its
accelerators has work.

The RTL targets an FPGA prototype. On the FPGA, frequency scaling is
emulated by selecting one of four fixed clocks. The voltage exists only as
a digital reference code, `vctrl`. Probe counters record how many cycles
each domain spent at each operating point. Software multiplies these
counts by the per-cycle energy of each accelerator at each point, obtained
from a separate ASIC power characterisation. The result is the energy
estimate E = Σᵢ Eᵢ · Cᵢ.

## Structure

```
dvfs_domain                    one VF domain (top)
├── dvfs_ctrl                  the domain's DVFS controller
│   ├── clk_mux4               glitch-free 4:1 clock select  -> outclk
│   ├── pll_ctrl_fsm           refclk domain: applies a new point, waits for lock
│   ├── sync_2ff  x2           request into refclk, acknowledge into outclk
│   ├── dvfs_fsm               policy evaluation and VF transition sequencing
│   ├── dvfs_regs              memory-mapped configuration/status
│   ├── window_counter x2      idle and back-pressure cycles of the window
│   ├── clock_gate             outclk -> clk_logic, stopped by freeze
│   └── perf_counters          DVFS probe: cycles per operating point, frozen, off
└── acc_tile  x N_TILES        one accelerator tile shell each
    ├── acc_ctrl               accelerator configuration registers, start, irq
    ├── dmac                   DMA requests <-> NoC packets
    ├── dc_fifo x2             tile <-> NoC clock crossing (tx and rx)
    └── perf_counters          ACC probe: enabled, computing, transferring, both, back-pressure
```

`dvfs_pkg` holds the shared types: operating point, policy and state
enums, the configuration struct, the register addresses and the flit
format.

The accelerators are not part of this RTL. Neither are the NoC routers,
the CPU, I/O and DDR tiles, the regulator with its DAC, and the PLLs. Their
connections are ports of `dvfs_domain`:

- the accelerator interface of each tile;
- each tile's NoC local port, on `clk_noc`;
- `vctrl`, the regulator reference;
- the four operating-point clocks `clk_op[3:0]`.

The default of three tiles per domain corresponds to a 4×4 mesh SoC with
twelve accelerators in four domains. A full SoC instantiates one
`dvfs_domain` per domain.

## Operating points

| index | voltage | silicon clock | FPGA clock | `vctrl` code |
|------:|--------:|--------------:|-----------:|-------------:|
| 0     | 1.00 V  | 1.0 GHz       | 100 MHz    | 100          |
| 1     | 0.90 V  | 0.9 GHz       | 90 MHz     | 90           |
| 2     | 0.80 V  | 0.8 GHz       | 80 MHz     | 80           |
| 3     | 0.75 V  | 0.6 GHz       | 60 MHz     | 75           |

Index 0 is the fastest point. "Step down" means moving to a higher index.
`vctrl` is the voltage in 10 mV units; that encoding is this design's
choice, because the DAC is not specified. `clk_op[i]` must carry the clock
of point i. Only the order matters to the RTL; the testbenches use the
FPGA frequencies.

## Deciding: windows, counters, policies

`dvfs_fsm` counts a *window* of cycles in `S_IDLE`. The window is at least
64 cycles; smaller programmed values are clamped to 64. The default after
reset is 131072 cycles. While the window runs, two `window_counter`s
accumulate:

- **idle count**: cycles in which at least one tile's accelerator is not
  computing. That is, it is disabled or waiting for data.
- **traffic count**: cycles in which at least one tile is getting
  back-pressure. A request flit is waiting to enter the network, or a
  read is waiting for its response.

When the window ends, the FSM spends one cycle in `S_EVAL` and decides:

```
override enabled?            -> go to the override point (if different)
PL enabled and cur faster than budget?   ("budget OK?"  No)
                             -> step down one point, unless already lowest
policy PN                    -> go to the PN set point (limited to the budget
                                point under PL), otherwise stay
policy PT:  slow = traffic >= thr_traffic
policy PB:  slow = traffic >= thr_traffic  or  idle >= thr_burst ("long burst")
  slow                       -> step down one point, unless already lowest
  not slow                   -> step up one point, unless already at the
                                highest point allowed (budget point under PL,
                                point 0 otherwise)
```

If nothing changes, the counters are cleared and a new window starts.
Windows therefore follow each other every window + 1 cycles.

The policy settings used to explore temporal granularity fit the
registers directly:

- windows from 131072 down to 64 cycles;
- traffic thresholds from 4096 down to 32;
- burst thresholds of 7/8 of the window, e.g. 114688 or 56.

**PL (limit)** does not act on its own. A supervisor, normally software,
writes the `BUDGET` register: the fastest point this domain may use.
The supervisor rotates budgets among domains so that they do not all run
at full power at once. The FSM only enforces the budget.

## Changing the operating point

After the decision, `S_STEP_DOWN` or `S_STEP_UP` starts a transition:

1. `S_FREEZE`: `freeze` rises. From the next rising edge, `clk_logic`,
   the clock of all tiles in the domain, stops. Accelerators, DMACs and
   the tile side of the FIFOs keep their state. The NoC side of the
   FIFOs keeps running.
2. The voltage and the frequency change in a safe order:
   - **going faster**: the voltage goes first. `vctrl` moves, and
     `S_VOLT` waits `VR_CYCLES` (64) cycles as a watchdog for the
     regulator's transient. Then the frequency changes (`S_FREQ_REQ`,
     `S_FREQ_REL`).
   - **going slower**: the frequency is lowered first, then `vctrl`
     moves and the watchdog runs.
3. `S_RELEASE`: `freeze` falls, `cur_op` takes the new point, the
   transition counter increments, and a fresh window starts.

Step-up and step-down move one point at a time. A PN set point or an
override jumps straight to its target in one transition.

`dvfs_fsm` runs on `outclk`, the ungated domain clock. It never waits on
`clk_logic`, so freezing cannot deadlock it. It does wait on the PLL side,
which is clocked by `refclk`.

### The frequency handshake and clock domains

The frequency change crosses clock domains with a four-phase handshake:

1. `dvfs_fsm` holds `pll_target` and raises `pll_req`.
2. `sync_2ff` carries `pll_req` into `refclk`.
3. `pll_ctrl_fsm` loads the target into `fctrl` and pulses `fchange` for
   one cycle. It waits `SETTLE` (3) `refclk` cycles, then waits for the
   synchronised `lock`, then raises `ack`.
4. `ack` returns through a second `sync_2ff` into `outclk`.
5. `dvfs_fsm` drops `pll_req`, and `pll_ctrl_fsm` drops `ack`.

The target is bundled data. It is stable while `pll_req` is high, and an
assertion in `dvfs_fsm` checks that.

`pll_ctrl_fsm` runs on `refclk` on purpose: the clock it controls may stop
or change frequency in the middle of a switch.

On the FPGA, `fctrl` is the select of `clk_mux4`. Each input clock has a
two-flop enable chain in its own domain: the first flop on the rising
edge, the second on the falling edge. An input may enable only when its
select matches and every other enable is off (break before make).

`clk_out` is the OR of the gated inputs. An enable changes only while its
own clock is low. Every high or low phase of `outclk` is therefore a
whole phase of one of the input clocks, with no runt pulses. A switch
holds `outclk` low for roughly two cycles of the old clock plus two of
the new one.

`lock` is high when exactly the selected input is enabled. It combines
several clock domains, and `pll_ctrl_fsm` synchronises it. With a real
PLL, `fctrl`, `fchange` and `lock` would connect to the PLL's
reconfiguration logic instead.

### Clock gating

`clock_gate` is a latch-based gate. A latch, transparent while `outclk`
is low, holds `!freeze`, and the latch output is ANDed with `outclk`. A
change of `freeze` therefore only affects whole clock pulses. Synthesis
reports one latch bit for it; that latch is intended.

### Timing summary

At the defaults, a transition takes about:

- 1 cycle to decide and 1 cycle to freeze;
- 64 cycles of regulator watchdog;
- the frequency handshake: two synchronisers, 3 `refclk` settle cycles,
  the mux switch and the lock synchroniser. This is about 10 `refclk`
  cycles plus a few `outclk` cycles.

In the end-to-end testbench, with `refclk` at 50 MHz, the domain is frozen
for 87 `outclk` cycles per transition on average. The testbench checks
that the average lies between 64 and 200.

## Accelerator tiles

**CTRL (`acc_ctrl`)** holds the accelerator's memory-mapped registers:

| address | register | contents |
|--------:|----------|----------|
| 0 | CMD | write bit 0 to start (ignored while busy) |
| 1 | STATUS | bit 0 busy, bit 1 done (write 1 to clear) |
| 2 | IRQ_EN | bit 0 interrupt enable |
| 4–11 | parameters | eight 32-bit parameters, driven on `acc_cfg` |

`acc_start` pulses for one cycle. "Busy" is the *enabled* probe, and lasts
until the accelerator pulses `acc_done`. `irq` is `done & irq_en`.

**DMAC (`dmac`)** turns read and write requests (word address, length
1–32767 words) into packets of 34-bit flits: a 2-bit type (BODY, HEAD,
TAIL) and 32 bits of payload.

| packet | flits |
|--------|-------|
| request | HEAD `{dest[31:24], src[23:16], write[15], len[14:0]}`, then the address flit (TAIL for a read), then for a write `len` data flits with TAIL on the last |
| read response | HEAD, then `len` data flits with TAIL on the last; these go to the accelerator on `in_*` |

One transfer is in flight at a time. Pending reads and writes take turns.
Data moves one flit per cycle when the network accepts it, so a write of
n words occupies the DMAC for n + 2 cycles.

**Dual-clock FIFOs (`dc_fifo`)** sit between the tile and its router's
local port, eight entries each way. They use Gray-coded pointers with
two-flop synchronisers, and `wready` low is the back-pressure. Full and
empty flags are seen two to three cycles late across the crossing, which
is safe.

**Probes.** `acc_idle` (not computing) and `noc_bp` (back-pressure) feed
the controller. The ACC probe counters count five events:

| index | event |
|------:|-------|
| 0 | enabled |
| 1 | computing |
| 2 | transferring |
| 3 | computing and transferring |
| 4 | back-pressure |

The accelerator reports "computing" on `acc_computing`.

## DVFS register map (`dvfs_regs`, on `outclk`)

| addr | name | fields |
|-----:|------|--------|
| 0 | STATUS (RO) | `[1:0]` cur_op, `[2]` busy, `[3]` freeze, `[7:4]` FSM state, `[15:8]` vctrl, `[16]` switched off |
| 1 | OVERRIDE | `[0]` enable, `[5:4]` operating point |
| 2 | POLICY | `[1:0]` 0 = PN, 1 = PT, 2 = PB (3 reads back as PN), `[2]` PL enable, `[5:4]` PN set point |
| 3 | THR_TRF | traffic threshold (reset 4096) |
| 4 | THR_BST | burst threshold (reset 114688) |
| 5 | WINDOW | window in cycles, minimum 64 effective (reset 131072) |
| 6 | BUDGET | `[1:0]` fastest point allowed under PL (reset 0) |
| 7 | IDLE_CNT (RO) | idle count of the last window |
| 8 | TRF_CNT (RO) | traffic count of the last window |
| 9 | NTRANS (RO) | transitions completed |

Bus protocol: one access per cycle while `req` is high. A write happens at
the clock edge when `we` is high. A read returns `rdata` combinationally
in the same cycle.

## Switching a domain off

A domain may be powered down only when every accelerator in it is
inactive. A single running accelerator keeps its neighbours powered.

- `dvfs_ctrl` registers `vr_off = no accelerator enabled` once per
  `outclk` cycle. It is the regulator's off request, also shown in STATUS
  bit 16.
- "Enabled" is the CTRL busy flag: it is set by the start command and
  cleared by the accelerator's done.
- The request rises the cycle after the last accelerator finishes, and
  falls the cycle after any accelerator is started.
- The clocks and the DVFS FSM keep running while the domain is off, so
  software can still reach the tiles' CTRL registers to start new work.
  That choice is this design's own. A silicon implementation would keep
  those registers in an always-on area.

## Probes and energy

The DVFS probe is a `perf_counters` bank on `outclk`:

| counter | counts |
|--------:|--------|
| 0–3 | cycles spent powered at each operating point: the Cᵢ of the energy formula |
| 4 | cycles spent frozen |
| 5 | cycles switched off |

Counters 0–3 and 5 add up to the elapsed cycles.

A snapshot input copies all counters at once, so a reader can take a
consistent frame while they keep counting. The probe ports of
`dvfs_domain` (`dprb_*` and `aprb_*`) are where a profiling interface such
as an Ethernet monitor would connect.

All counters are 32 bits. They wrap after 43 s at 100 MHz, far longer than
an experiment of under a second.

## Clocks, reset and port timing of `dvfs_domain`

- `refclk`: the reference clock, used only by `pll_ctrl_fsm`.
- `clk_op[3:0]`: the fixed operating-point clocks.
- `clk_noc`: the network side of the FIFOs.
- `outclk`: the domain clock, and the clock of the DVFS register bus and
  the `dprb_*` ports.
- `clk_logic`: the gated domain clock, and the clock of the tiles' `ctl_*`
  buses, the accelerator ports and the `aprb_*` ports.
- `rst_n`: asynchronous, active low, shared by all domains. After release,
  `outclk` starts within a few cycles of `clk_op[0]`.

Per-tile ports are packed arrays indexed by tile.

## Simulating

Every testbench in `tb/` checks itself. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/dvfs_pkg.sv tb/tb_dvfs_domain.sv --top-module tb_dvfs_domain -o sim
./obj_dir/sim
```

Replace `tb_dvfs_domain` with any other `tb_<block>` to test one block.

`tb_dvfs_domain` runs the top at its default parameters, with three
tiles. Each tile has an accelerator model (`tb_acc_model`) and a
memory-tile model (`tb_noc_mem`). The memory model's acceptance rate sets
the congestion. The test runs these phases:

1. PT under congestion drives the domain down to point 3.
2. A free network brings it back to point 0.
3. PB with slow computation steps it down on long bursts.
4. PL with a budget of 2 climbs to point 2 and holds there.
5. An override and then PN return the domain to point 0.
6. Software then holds every restart. The domain must ask to be switched
   off, and switch on again when the accelerators are restarted.

It checks every accelerator result word in memory. It also checks that
each mechanism occurred: step-down, step-up, freeze with `clk_logic`
stopped, back-pressure, a full FIFO, the budget hold, the override,
interrupts, time at every point, and time switched off. Finally it checks
that the per-point and switched-off cycle counts add up to the elapsed
cycles. It takes a few seconds.

`tb_policy_sweep` is a workload test. One domain does the same work under
twelve policy settings, against a congested memory that accepts 20 % of
request flits:

- PN at each point;
- PT and PB with windows of 64, 256 and 1024 cycles;
- PT and PB with a budget.

The work is four runs of 32 words per tile. Per setting, the test prints
the execution time and the energy estimate. The estimate uses per-cycle
energies of a 2-D FFT, a filter and an image-warp accelerator at the four
points. One run gave:

```
setting      time/pn0  energy/pn0
pn1             1.022      0.737
pn3             1.234      0.546
pt w64          1.943      1.123
pt w256         1.287      0.854
pt w1024        1.114      1.034
pb w256         1.378      0.852
pt w64 +pl      1.900      1.029
```

Fixed low points save energy on memory-bound work at a small cost in
time. A 64-cycle window is shorter than one transition, which takes about
90 frozen cycles. The domain then keeps switching and pays for it in both
time and energy. Windows that suit the traffic do better. A budget trims
the energy of the same policy.

The test checks the data and the PN accounting. It also checks the
direction of the PN results, the step-downs under congestion, the effect
of the budget, and the cycle sums. Which PT or PB setting wins is
reported, not checked.

Other testbenches to know:

- `tb_dvfs_fsm` walks every branch of the decision with a scripted PLL.
  It checks the window length, the 64-cycle clamp, the watchdog length
  and the voltage/frequency order.
- `tb_clk_mux4` switches randomly among the four clocks. It checks that
  no phase of the output is shorter than half the fastest period.

## Where this design makes its own choices

The following follows the source description:

- the operating points;
- the window, threshold and budget registers;
- the decision flow;
- the watchdog and the 64-cycle minimum;
- the idle and back-pressure probes;
- the two-flop synchronisers between the controller and the PLL control;
- the `refclk`-clocked PLL control;
- latch-based clock gating;
- the glitch-free 4:1 clock mux;
- dual-clock FIFOs at the tile/NoC boundary;
- cycles-per-point accounting;
- switching a domain off only when all its accelerators are inactive.

The following is this design's own, because the source does not give it:

- **Voltage/frequency order:** voltage first when going up, frequency
  first when going down.
- **Step size and jumps:** one point per step; PN set points and
  overrides jump directly.
- **Thresholds and "long burst":** thresholds compare with `>=`. Policy
  PB weighs computation time against communication time. Here that is
  measured by the idle count of the window: cycles in which an
  accelerator is not computing. A "long burst" is that count reaching
  the burst threshold.
- **Budget:** the budget is encoded as the fastest allowed point.
- **Encodings:** the register map and bus, the `vctrl` code, the
  handshake, and the `SETTLE` time.
- **Clock mux internals.**
- **Tile interfaces:** the CTRL register map, the DMAC packet format and
  arbitration, FIFO depth, node identifiers, and 32-bit counters.
- **Idle:** "idle" means "not computing", so a disabled accelerator
  counts as idle.
- **Switch-off:** the domain's clocks keep running while it is off, and
  the off state is a request on a port (`vr_off`).

Not modelled:

- the PLL's feedback clock and the global clock buffers, which are FPGA
  primitives;
- the accelerators themselves, the NoC routers, CPU, I/O and DDR tiles,
  the regulator and its DAC;
- the software supervisor of policy PL, of which only the register side
  is here.

Full-system experiments, such as the ten- and twelve-accelerator
workloads, need those parts around this RTL.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| dvfs_domain | N_TILES | 3 | tiles in the domain |
| dvfs_domain | N_CFG | 8 | accelerator parameters per tile |
| dvfs_domain | FIFO_AW | 3 | FIFO depth 2^AW (AW ≥ 2) |
| dvfs_domain | VR_CYCLES | 64 | regulator transient watchdog |
| dvfs_domain | CNT_W | 32 | probe counter width |
| dvfs_domain | SRC_BASE, MEM_ID | 4, 1 | NoC identifiers of tile 0 and of the memory tile |
| dvfs_regs | RST_WINDOW, RST_THR_TRF, RST_THR_BST | 131072, 4096, 114688 | reset configuration |
| pll_ctrl_fsm | SETTLE | 3 | `refclk` cycles before lock is trusted |

Lint notes: Verilator reports `SYNCASYNCNET` because `rst_n` is both an
asynchronous reset and the `disable iff` of the assertions. It also notes
that the two type bits of response flits are not used by the DMAC. Both
are expected.
