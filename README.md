# Self-managed power-state machines for a power-management unit

A power-management unit (PMU) stays powered while the rest of a chip sleeps,
so in devices that spend most of their life asleep (battery-powered sensors,
wearables) its own leakage becomes a noticeable share of the sleep power.
This RTL applies power management to the PMU itself. Each power-state machine
(PSM) of the unit compares the power state it currently drives with the state
it is asked to reach. While the two match, which is nearly always, it switches
off the supply of its own next-state logic and stops the clock of its state
flip-flops. Only the flip-flops, which hold the control signals, and a small
comparator stay alive.

## The unit

`pmu` holds one PSM per power domain, three by default (`NUM_PD = 3`). Two
system blocks that always share a supply form one domain and need only one
PSM. Power-mode determination sits outside this RTL. It picks a system power
mode from on-chip monitors, software and user preferences, and hands each
domain its target power state on `target[i]`. The PSM of domain *i* then
walks the domain to that state and drives its power-management elements with
`pd_ctrl[i]`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | PMU clock; real PMUs often run from a 32.768 kHz real-time clock |
| `rst_n` | in | 1 | asynchronous, active low; every domain goes to OFF |
| `target[NUM_PD]` | in | 2 each | requested power state (`psm_pkg::target_state_e`) |
| `pd_ctrl[NUM_PD]` | out | 3 each | `{iso, vsel[1:0]}`: isolation enable and supply-level select of the domain |
| `tl_sleep[NUM_PD]` | out | 1 each | 1 = switch off the supply of that PSM's transition logic |
| `psm_clk_en[NUM_PD]` | out | 1 each | state-clock enable of each PSM, for observation |

`tl_sleep` is meant for the power switch of each PSM's transition logic. That
switch, the domains' own switches and isolation cells are placed by the power
intent (UPF), not by this RTL.

## The power states of a domain

A domain can be asked for four states: off, low, normal and high supply
voltage. From any state it may be sent to any other. Its inputs and outputs
must be isolated before its supply is cut, and must stay isolated until the
supply is back. So there is a fifth state, ISO, which the PSM passes through
but which can never be requested.

The PSM is a *Medvedev* machine. Its state flip-flops are the control signals
themselves, with no output logic behind them. All control signals therefore
change together on one clock edge, without glitches, and they can be observed
and set directly through a scan chain. The five states need three bits: two
select one of four supply levels and one enables isolation.

| state | `iso` | `vsel` | domain |
|---|---|---|---|
| OFF | 1 | 00 | supply off, isolated (reset state) |
| LOW | 0 | 01 | low voltage |
| NORMAL | 0 | 10 | normal voltage |
| HIGH | 0 | 11 | high voltage |
| ISO | 1 | 10 | isolated, supply at normal voltage |

Routes, one step per enabled clock edge:

* between LOW, NORMAL and HIGH: directly, 1 step;
* an on-state to OFF: on → ISO → OFF, 2 steps;
* OFF to an on-state: OFF → ISO → target, 2 steps;
* from ISO: 1 step to whatever is requested now.

If the target changes during a sequence, the machine heads for the new target
from wherever it is. The three unused codes lead back into these routes. In
particular, `{iso=0, vsel=00}` (supply off but not isolated) is never
produced, and an assertion in `self_managed_psm` guards this.

## How a PSM manages itself

`self_managed_psm` has three parts:

* **Transition logic** (`psm_transition_logic`): combinational next state
  from `target` and the current state. It is the part that gets powered down.
* **State logic** (`psm_state_logic`): three always-powered flip-flops
  behind a latch-based clock gate (`clock_gate`).
* **Comparator** (`psm_comparator`): decides when the PSM is idle.

The comparator works cycle by cycle:

1. **Idle.** The current state equals the target's state. `tl_sleep = 1`, so
   the transition logic loses its supply, and `clk_en = 0`, so the state
   clock is stopped. The flip-flops keep driving the domain.
2. **Wake.** The target changes. `tl_sleep` drops in the same cycle and the
   transition logic starts to power up. A counter on the free-running clock
   holds `clk_en` low for `WAKE_CYCLES` rising edges (default 1). This gives
   the supply time to settle.
3. **Step.** `clk_en = 1`. The state register loads the transition logic's
   output on each edge until it matches the target. Then `tl_sleep` rises
   again and the counter is cleared.

There is no isolation between the powered-down transition logic and the state
flip-flops, and none is needed. A flip-flop looks at its D input only on a
clock edge, and no edge reaches it while the logic is off. The testbenches
check this by forcing random values onto the transition logic's output
whenever the state clock is off.

If a new target arrives in the same cycle in which the old one was reached,
`tl_sleep` is high for less than a cycle. No rising edge sees the PSM idle,
so the wake-up delay is not applied again. Set `WAKE_CYCLES = 0` to enable
the clock in the same cycle as the comparison.

### Latency

Take a request presented to an idle PSM just after a rising edge and held
until it completes. The domain reaches the new state `WAKE_CYCLES + steps`
rising edges later, with 1 or 2 steps as listed above. With the defaults this
is 2 edges for a voltage change and 3 for switching a domain on or off.
Throughput is not an issue: a PSM accepts a new target in any cycle.

### When it pays off

Self-management adds a comparator, a clock gate, a small counter and the
power switch. It saves leakage and clock power only while the PSM is idle, so
it suits systems whose power mode changes rarely. Gate-level power estimates of this
architecture in a 45 nm cell library show a saving once the PSM is idle for more than roughly
70 % of the time. The saving is about 30 % of the PSM's power when changes
are very rare, and more at high clock frequencies. When the target changes
several times per clock cycle, the PSM is almost never idle and a plain PSM
uses less power. `tb_psm_workloads` reproduces those traffic patterns and
reports how often the transition logic was powered (see below). It does not
estimate power.

## Files

| file | contents |
|---|---|
| `rtl/psm_pkg.sv` | state types, codes, `target_ctrl()` |
| `rtl/psm_transition_logic.sv` | next-state function |
| `rtl/clock_gate.sv` | latch-based clock gate; the latch is intended |
| `rtl/psm_state_logic.sv` | gated state register |
| `rtl/psm_comparator.sv` | idle detection, sleep, wake-up counter, clock enable |
| `rtl/self_managed_psm.sv` | one self-managed PSM |
| `rtl/pmu.sv` | top: `NUM_PD` PSMs |
| `tb/psm_ref_pkg.sv` | reference model, written from the state table, shared by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_psm_workloads` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs. With Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/psm_pkg.sv tb/psm_ref_pkg.sv \
          tb/tb_pmu.sv --top-module tb_pmu -Mdir obj_tb_pmu
obj_tb_pmu/Vtb_pmu
```

Replace `tb_pmu` with any other testbench. The testbenches are:

* `tb_psm_transition_logic`: all 8 × 4 input combinations; every route's
  length; no power-off without passing through isolation.
* `tb_psm_state_logic`: loads only when enabled; an enable pulse confined to
  the high clock phase gives no edge; asynchronous reset.
* `tb_psm_comparator`: three wake-up delays (0, 1, 3) against a counter model,
  with the measured delay.
* `tb_self_managed_psm`: 20,000 cycles against a cycle model; request
  latencies; powered-down logic driven with random values.
* `tb_pmu`: the whole unit at its default size for 60,000 cycles. The
  domains see request rates between 1 in 2 and 1 in 2,000 cycles. It counts
  sleep, wake-up delay, direct level changes, power-down and power-up through
  ISO, new targets in mid-sequence, requests of the current state, several
  domains busy at once and a fully idle unit, and fails if any of them never
  happened.
* `tb_psm_workloads`: six traffic patterns, each a clock frequency, a run
  time and a toggle rate. They run for 250, 250, 250, 500,000, 2,500 and 25
  cycles. The last one makes four requests inside every clock period. For
  each case it prints the toggle rate and the share of cycles in which the
  transition logic was powered.

Verilator has two states only. Everything that is read is reset or
initialised.

## Choices made in this RTL

The following are not fixed by the architecture and were chosen here. Each is
easy to change:

* **State codes**: the level numbering and ISO sitting at normal voltage. Only
  the split into two supply-select bits and one isolation bit is given.
* **Routes**: always through ISO for off and on; ISO releases isolation and
  moves to the requested level in one step.
* **Wake-up delay**: `WAKE_CYCLES`, default 1. The architecture only allows
  for "a few cycles" of wake-up overhead, depending on the power switch.
* **Reset**: asynchronous, active low, to OFF.
* **Clock gate**: a latch-based clock gate, the usual glitch-free cell.
* **Timing of sleep and enable**: `tl_sleep` and `clk_en` are combinational
  from the comparison. `target` is expected to be synchronous to `clk`.

## Not included

* **Power-mode determination**: its strategy algorithm is not specified. Drive
  `target` from your own logic.
* **Power switches and isolation cells**: for the PSM transition logic and for
  the domains. These are physical cells placed from power intent.
* **Other PSM styles**: the plain PSM without self-management, and a
  traditional Moore PSM with output logic. These serve only as comparison
  points for this architecture.
