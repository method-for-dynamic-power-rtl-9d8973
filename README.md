# Run-time dynamic power monitor for FPGA systems-on-chip

An FPGA system-on-chip rarely has a way to measure its own power. Adding
analog sensors costs area and is often impossible, and external meters do
not help a system that has to adapt by itself. This monitor estimates
dynamic power from switching activity instead. It watches a few carefully
chosen nets and counts how often each toggles during a fixed interval. At
the end of each interval it turns those counts into an estimate with a
linear model:

    P_dyn = P0 + w_0*Ev_0 + w_1*Ev_1 + ... + w_{N-1}*Ev_{N-1}

`Ev_i` is the number of toggles on net `i` during the interval. `P0` and the
weights `w_i` come from an off-line regression (see "Where the nets and
weights come from").

The method behind it was published for a 32-bit Wishbone SoC with a
processor, caches, UART, timer, interrupt controller and RAM. In that SoC,
four nets were enough for about 4% average error against a vendor power
estimate. Those four nets are on the instruction cache's bus port and the
RAM's data port. The SoC itself is not part of this RTL: the monitor is a
separate block with one input per watched net and a Wishbone slave port.

## Block structure

```
 mon_sig[0] ──► event_counter ──┐ ev[0]
 mon_sig[1] ──► event_counter ──┤ ev[1]        ┌──────────────┐
   ...                          ├─────────────►│ power_model  │── power
 mon_sig[N-1]─► event_counter ──┘ ev[N-1]      │ P0 + Σ w·Ev  │── valid
          sample[0] (interval end) ───────────►└──────────────┘
                                        ▲ w, P0          │
                              ┌─────────┴────────────────▼──┐
  Wishbone slave ◄──────────► │      wb_monitor_regs        │──► irq_o
                              └─────────────────────────────┘
```

| module            | role |
|-------------------|------|
| `power_monitor`   | top: NUM_EC event counters, the model unit and the register file |
| `event_counter`   | counts the toggles of one net per interval and holds the last count |
| `power_model`     | evaluates P0 + Σ w_i·Ev_i, one counter per clock cycle |
| `wb_monitor_regs` | Wishbone classic slave: counts, estimate, P0, weights, interrupt |
| `pm_pkg`          | shared widths, defaults, register indices and types |

Parameters of `power_monitor`, with their defaults:

| parameter   | default | meaning |
|-------------|---------|---------|
| `NUM_EC`    | 4       | number of watched nets (1 to 16); 4 is the reference selection |
| `EC_W`      | 12      | width of each counter and of the count register (the reference EC width) |
| `TI_CYCLES` | 1024    | interval length in clock cycles (2 .. 2**EC_W−1, at least NUM_EC+2) |

## What an event is and how an interval works

An event is one change of a net's value, as seen at consecutive rising clock
edges. Rising and falling changes count alike. Each `event_counter` holds
the net's value from the previous edge and adds one whenever the net differs
from it. A second counter measures the interval. In the interval's last
cycle, the count (including that cycle's event) is copied into the count
register `ev_o`, both counters restart, and `sample_o` pulses.

A net can toggle at most once per cycle, so a count never exceeds
`TI_CYCLES`. That is why `TI_CYCLES` must fit in `EC_W` bits. With 12 bits,
any interval up to 4095 cycles is safe and no overflow logic is needed. The
reference EC is exactly two 12-bit counters and one 12-bit register. This
implementation adds one flop for the previous net value and one for the
`sample_o` pulse: 38 flip-flops per counter.

All counters share reset and interval length, so they close at the same
edge. Timing, counted in rising edges after reset is released (edge 1 is the
first counting edge):

| edge            | what happens |
|-----------------|--------------|
| k·TI            | last edge of interval k: every `ev_o` takes its count, `sample_o` goes high |
| k·TI + 1        | STATUS interval number increments; `power_model` loads P0 |
| k·TI + 2 … +N+1 | one term w_i·Ev_i added per edge |
| k·TI + N + 1    | estimate written to POWER, `valid` pulses |
| k·TI + N + 2    | ready flag (STATUS[31]) set; `irq_o` rises if enabled |

The counts of interval k stay readable until edge (k+1)·TI. Software that
answers the interrupt therefore has almost a whole interval to read a
consistent set of counts and the estimate.

A net that is 1 when reset ends counts one event in the first interval,
because the stored previous value resets to 0.

### Choosing the interval

The interval is a sampling period for power. Sampling power too slowly
averages away short phases. In the reference system, a UART print routine
of about 7500 cycles dropped out of the trace when the interval was longer
than that. Following Nyquist, the interval should be at most half the
shortest program phase worth seeing, which gave an upper bound of 3750
cycles there. The default of 1024 cycles (20.48 µs at 50 MHz) is the
interval behind the reference regression data, whose samples are 20480 ns
apart. Any value from `NUM_EC+2` up to 4095 works with 12-bit counters.
Longer intervals (the 7312- and 29250-cycle settings that were explored
off-line) need a larger `EC_W`.

## The model unit

`power_model` is a small sequential multiply-accumulate. `start_i` loads P0.
Each of the next `NUM_EC` cycles adds `w[idx] * Ev[idx]` through a single
multiplier. The result is ready `NUM_EC+1` cycles after `start_i`. In the
reference system the processor evaluated the model in software, taking about
26 cycles per counter (1 multiplication and 1 addition). Here it costs 5
cycles for four counters and no processor time. The counts stay readable, so
software can still evaluate the model itself if preferred.

Number formats are this design's choice:

- `Ev_i`: unsigned, `EC_W` bits, zero-extended before the multiply.
- `w_i`: signed 16-bit integers (regression weights may be negative).
- `P0` and the estimate: signed 32-bit integers in one unit that software
  picks. Example: P0 in microwatts and w_i in microwatts per event per
  interval.
- The sum wraps modulo 2^32. Choose a scale that keeps it in range.
  12-bit counts times 16-bit weights need at most 28 bits per term, so there
  is ample headroom for NUM_EC ≤ 16 and a moderate P0.

The unit reads the counts, weights and P0 while it works, without copying
them. The counts are stable for a whole interval. A weight written during
the 5-cycle evaluation can give one mixed result.

## Register map

The Wishbone classic slave has 32-bit data and an 8-bit byte address; each
register is one word. A request is acknowledged in the next cycle, and
`wb_sel_i` applies to writes. Unmapped words read as 0, and writes to them
are ignored.

| word | byte addr | name   | access | contents |
|------|-----------|--------|--------|----------|
| 0    | 0x00      | STATUS | RO     | [15:0] completed intervals (wraps), [23:16] NUM_EC, [31] ready flag |
| 1    | 0x04      | POWER  | RO     | latest estimate (signed); reading it clears the ready flag |
| 2    | 0x08      | P0     | RW     | constant term (signed 32-bit) |
| 3    | 0x0C      | IRQEN  | RW     | [0]: drive `irq_o` from the ready flag |
| 16+i | 0x40+4i   | EV[i]  | RO     | count of net i in the last completed interval |
| 32+i | 0x80+4i   | W[i]   | RW     | weight of net i, low 16 bits, sign-extended on read |

`irq_o` is a level: ready flag AND IRQEN. Typical use:

1. After reset, write P0 and W[0..N-1], then IRQEN = 1.
2. On each interrupt, read POWER. This clears the interrupt. Optionally read
   the EV registers and STATUS first, for logging or for software-side
   models.
3. To recalibrate, rewrite P0 and the weights at any time. They take effect
   from the next interval. For example, scale them all when a board
   measurement disagrees with the model. On the reference board, measured
   power differed from the tool estimate by about 15% on average.

## Where the nets and weights come from

The hardware only counts and multiplies. Everything that makes the estimate
accurate is decided at design time, outside this RTL:

1. **Power per interval.** Simulate the placed-and-routed netlist with a
   realistic test program. Cut the trace into intervals of `TI_CYCLES`, and
   run the vendor power estimator on each slice. The result is a dynamic-power
   value per interval.
2. **Events per interval.** Simulate the RTL with the same program and count
   the toggles of every single-bit net per interval, exactly as
   `event_counter` does.
3. **Selection and fit.** Build a table with one row per interval, the
   toggle counts of all nets as columns, and the power value. A greedy
   stepwise search adds, at each step, the net that most improves the fit,
   and stops when no remaining net is significant or the budget of counters
   is reached. A linear regression on the chosen nets gives P0 and w_i.

In the reference system, 213 candidate nets and 131 intervals of an
AES/DES/NOP test program gave the following four nets:

| net                  | meaning |
|----------------------|---------|
| `Wb_master_i_s_2`    | MSB of the data bus from the instruction cache to the Wishbone bus |
| `Wb_master_o_s_13`   | an address bit of the bus towards the instruction cache |
| `Wb_master_o_s_4`    | bit 2 of the byte selects on the instruction cache's bus port |
| `Wb_slave_o_s_0`     | MSB of the data bus from the Wishbone bus to the RAM |

Connect them, or your own selection, to `mon_sig[0..3]`. They must be
synchronous to `clk`. The weights must be scaled to the number format above
and to the chosen interval, because a regression fitted for one interval
length does not carry over to another. With fewer than four counters, the
reference model could no longer tell the NOP loop's power level from the
others. Going beyond four gained little accuracy, while area and read-out
time grew linearly.

## What follows the published method and what is this design's own

Taken from the published method:

- counting value changes per net over fixed intervals;
- four counters of 12 bits, each two counters plus a register;
- the linear model P0 + Σ w_i·Ev_i;
- reading the counts over the SoC's Wishbone bus;
- recalibrating the model.

This design's own choices:

- the 1024-cycle default interval (inferred from the spacing of the
  reference samples);
- evaluating the model in hardware rather than on the processor;
- the number formats;
- the register map, the ready flag and `irq_o`;
- a shared interval for all counters;
- synchronous active-low reset;
- the previous-value reset to 0.

Not included: the SoC and its processor; the off-line estimation, extraction
and regression tools; any temperature or process sensing for
self-calibration. Self-calibration with on-chip sensors was left as future
work in the reference.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_event_counter`         | Default size, 12 intervals of random, full-toggle and idle activity: count and `sample_o` timing every cycle. A second instance at 4095 cycles with a net toggling every cycle (largest count). |
| `tb_power_model`           | 4 and 16 counters, 300 random evaluations each with extreme counts and weights; result and exact NUM_EC+1 latency, against a 64-bit reference; a `start_i` during an evaluation is ignored. |
| `tb_wb_monitor_regs`       | One-cycle acknowledge; byte-select writes; read-back and sign extension; interval number; ready flag and interrupt; read-only and unmapped words. |
| `tb_power_monitor`         | Whole monitor at default parameters for 40 intervals of NOP-, AES- and DES-like activity plus an idle and a full-toggle interval. Driven through the bus, it checks every count, interval number and estimate, the NUM_EC+2-cycle interrupt latency and the interrupt clear. It recalibrates midway, checks that the mean estimate ranks DES > AES > NOP, and fails if any of these mechanisms never occurred. The activity densities are synthetic. |
| `tb_power_monitor_configs` | The monitor with 1, 2, 8 and 16 counters, and with intervals of 100, 1250 and 2500 cycles; every count and estimate of six intervals. |

`wb_master_bfm` (a Wishbone master with `read`/`write` tasks) and
`pm_config_unit` are testbench helpers.

To simulate with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/pm_pkg.sv tb/tb_power_monitor.sv --top-module tb_power_monitor
./obj_dir/Vtb_power_monitor
```

Replace the testbench name to run another. Each runs in well under a second.
Lint with `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/pm_pkg.sv
rtl/power_monitor.sv`. The remaining warnings are unused package constants
and the two byte-offset bits of the word-addressed bus.

What is not verified: the estimate's accuracy. That depends entirely on the
nets and weights from the off-line flow, which lies outside this RTL. The
testbenches prove that the hardware counts and computes exactly. They do not
prove that the counts track power in any particular system.
