# Thermal-aware block-level power management unit

In a system-on-chip built from voltage islands, each island can run at its own supply
voltage, clock, body bias and power-gating setting. Temperature makes this harder. In the
high and middle supply range, an island slows down as it heats up: a 100 nm inverter ring
at 1.0 V loses about 13 % of its frequency between 0 and 125 °C. Two islands that share a
performance level but differ in temperature therefore drift apart in speed. Leakage also
grows steeply with temperature.

This unit handles that with a per-island look-up table indexed by **temperature** as well
as by performance level and power state. A hot island gets a slightly higher supply than a
cool one at the same level, so both reach the target frequency, and neither carries the
worst-case margin all the time. The same table also drives the standby techniques:

* clock gating in HALT;
* power gating (sleep transistor off) in Sleep;
* reverse body bias in Deep Sleep;
* lowest supply plus reverse body bias in Deeper Sleep.

The RTL is the digital unit only: bus interface, status registers, look-up tables, control
logic, state machines and the islands' clock gates. The DC-DC converters, frequency
synthesizers, body-bias charge pumps, thermal sensors and sleep transistors are analog.
They sit outside, and the unit talks to them through plain ports.

```
            APB bus ──┐        Mode port ──┐
                      ▼                    ▼
              ctapm_bus_if ──► ctapm_status_regs (mode, FBB enable, status copies)
                      │                    │ mode[i], fbb_en
                      ▼                    ▼
   ┌────────────── ctapm_island (one per island) ────────────────────────┐
   │ temp_i ─► ctapm_temp_step ─► step, sub-step                         │
   │ mode   ─► ctapm_state_fsm ─► state                                  │
   │ state, level, step ─► ctapm_lut ──┐                                 │
   │ level, step, sub  ─► ctapm_fbb_lut┴► ctapm_ctrl ─► VDDID VBBID      │
   │                                                    CLKSP CKTSP freq │
   └─────────────────────────────────────────────────────────────────────┘
        CLKSP + island_clk_i ─► ctapm_clock_gate ─► gclk_o
```

## The look-up table

Everything the unit decides comes out of one table per island (`ctapm_lut`), so this is the
part to understand first.

**Columns: temperature steps.** There are eight steps:

| step | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| °C | −40~−25 | −25~0 | 0~25 | 25~50 | 50~75 | 75~100 | 100~125 | 125~150 |

`ctapm_temp_step` counts how many of the edges −25, 0, 25, … 125 lie at or below the sensor
reading. A reading that falls exactly on an edge therefore goes to the hotter step.
Readings outside −40…150 °C go to the first or last step. The sensor reading is a signed
9-bit integer in °C. The encoder also gives the 5 °C sub-step (0–4) within the step, counted
from the step's lower edge. It is used only by the forward-body-bias table. The first step
counts from −50 °C, so its sub-steps are 5 °C wide too, and values past 4 clamp to 4.

**Rows: what the island is doing.** The first five rows are the Normal state at
performance levels 0…4 (600, 500, 400, 300, 200 MHz). Four more rows follow, one for each of
HALT, Sleep, Deep Sleep and Deeper Sleep. In Normal the row is the requested level. In the
other states the row is `5 + state − 1`, and the level is ignored.

**A cell** (`lut_entry_t`, 14 bits) holds:

| field | bits | meaning |
|---|---|---|
| `vddid` | 6 | supply code; the reset table uses VDD = 500 mV + 10 mV × VDDID |
| `vdd_keep` | 1 | 1 = leave the supply as it is |
| `vbbid` | 4 | body bias code: 0XXX forward, 1XXX reverse, 0000 none |
| `vbb_keep` | 1 | 1 = leave the body bias as it is |
| `clksp` | 1 | 0 = local clock off, 1 = on |
| `cktsp` | 1 | 0 = sleep transistor off (island unpowered), 1 = on |

The keep bits express "don't change" cells. HALT and Sleep keep the supply and the bias of
the last Normal level. Deep Sleep keeps the supply and applies reverse bias.

**Reset contents.** The supply rows come from a characterisation of a 100 nm process for
the inverter-ring island:

| VDD (mV) | −40 | −25 | 0 | 25 | 50 | 75 | 100 | 125 °C |
|---|---|---|---|---|---|---|---|---|
| 600 MHz | 860 | 870 | 890 | 910 | 930 | 940 | 960 | 980 |
| 500 MHz | 780 | 780 | 790 | 800 | 810 | 820 | 830 | 840 |
| 400 MHz | 700 | 700 | 700 | 710 | 710 | 710 | 720 | 720 |
| 300 MHz | 630 | 630 | 620 | 620 | 610 | 610 | 600 | 600 |
| 200 MHz | 570 | 560 | 550 | 530 | 520 | 510 | 500 | 500 |

The table shows three supply zones:

* At the top level (600 MHz), a hotter island needs more supply.
* At 500 and 400 MHz (about 700–800 mV), it needs slightly more.
* At 300 and 200 MHz the trend reverses. Near threshold, the falling threshold voltage
  outweighs the lost mobility, so a hotter island needs *less* supply.

In every zone the table holds the minimum supply that still meets the level at that
temperature. Without the temperature axis the island would need 980 mV all the time to be
safe. All rows use body-bias code 0000 (no bias), for the reasons given under *Forward body
bias* below.

Reset contents of the standby rows:

| row | VDDID | VBBID | CLKSP | CKTSP |
|---|---|---|---|---|
| HALT | keep | keep | 0 | 1 |
| Sleep | keep | keep | 0 | 0 |
| Deep Sleep | keep | RBB(step) | 0 | 0 |
| Deeper Sleep | 000000 | RBB(step) | 0 | 0 |

RBB(step) is 1111 for steps 0–2, then 1110, 1101, 1100, 1010, 1001 for steps 3–7. The
characterised values start at 0 °C, so the two sub-zero steps reuse the 0~25 °C code.

The table is registers, so software can rewrite every cell. That is the point of the
software-feedback approach: measure each chip and load its own table, absorbing die-to-die
and within-die process variation. The package function `lut_default` computes the reset
image from the constant arrays `VID_TABLE`, `RBB_TABLE` and `FBB_TABLE` in `ctapm_pkg`.

## Power states

`ctapm_state_fsm` keeps one state per island:

```
Normal ⇄ HALT ⇄ Sleep ⇄ Deep Sleep ⇄ Deeper Sleep
```

The island moves one state per clock toward the depth that the request bits in its mode
register ask for:

* `stpclk` requests HALT;
* `slp` requests Sleep (it counts only together with `stpclk`);
* `dpslp` requests Deep Sleep (only with the two above);
* `dprslp` requests Deeper Sleep (only with all three).

Clearing a bit makes the island climb back, one state per clock. The chain and the first
three requests follow the classic mobile-processor scheme (STPCLK#, SLP#, DPSLP#), and here
they are active-high register bits. This design adds the separate `dprslp` request.

What decides *when* to sleep is outside the unit: counting HALT instructions, idle timers,
the OS scheduler. Software writes the requests over the bus, or a controller outside the
unit writes them through the Mode port.

## From a cell to the pins

`ctapm_ctrl` reads, every clock, the cell for (current state, current level, current
temperature step) and registers:

* `vddid_o`: the supply code, to the island's DC-DC converter, unless the cell says keep.
* `vbbid_o`: the bias code, to the body-bias generator, unless the cell says keep.
* `clksp_o`: the clock control, which also drives the island's clock gate.
* `st_ctrl_o` (CKTSP): the sleep transistor's gate.
* `freq_sel_o`: the level, to the frequency synthesizer. It is updated only in Normal and
  held in the standby states.

Because the temperature step is part of the address, a change in temperature alone is enough
to move the supply. No software action is needed for thermal tracking.

**Timing.** All of the unit except the clock gates runs on `clk`. A mode register written in
cycle *n* (the APB access cycle) changes the state at the edge that ends cycle *n+1*, and the
controls one edge later. A temperature change reaches the controls on the next edge. After
reset, before the first look-up, the controls are 980 mV (VDDID 48), no bias, clock on,
sleep transistor on and level 0.

**Not sequenced.** The unit changes the supply code and the frequency selection in the same
clock. A real system must either raise the voltage before raising the frequency, or stall the
island while a transition settles. That sequencing needs the converters' and synthesizers'
transition times, which are not known here. The same limit applies to the minimum time the
sleep transistor must stay off to save net energy.

## Forward body bias

Forward bias can speed an island up instead of raising its supply. The architecture allows
for it with an extra fine table per temperature step (`ctapm_fbb_lut`). That table gives a
4-bit forward-bias code per level in 5 °C sub-steps. In the reset image each level starts at
0000, 0011, 0010, 0001, 0000 (600…200 MHz) and rises by one code per 5 °C. These are the
architecture's example codes for the 0~25 °C step; this RTL repeats them in every step, since
no others are given. Expect to reprogram the table for a real process. When bit 0 of the GLOBAL register is set, the Normal-state body bias comes from this
table instead of the main one.

The bit is **off after reset**. For the characterised 100 nm process, forward bias recovered
too little frequency at high supply. At middle supply it cost more leakage than a 10–20 mV
supply margin does. So the reset tables use supply margins alone, and forward bias is there
for processes where it pays off.

## The simplified unit

Reverse bias needs charge pumps and, for NMOS bias at block level, a triple-well process. Where
these do not pay off, the architecture shrinks to supply scaling, clock gating and power gating.
Setting `BODY_BIAS = 0` builds that unit:

* `vbbid_o` stays 0000, whatever the table cells hold;
* the islands have no forward-body-bias table;
* the FBB bus window answers with `pslverr`;
* CONFIG bit 24 reads 0.

Deep Sleep then differs from Sleep only in its state code. Deeper Sleep still drops the supply
to its lowest code. Everything else is the same RTL.

## Clock gating

`ctapm_clock_gate` ANDs the island clock with an enable that changes only on falling clock
edges. A pulse that has started always completes, and no short pulses appear. CLKSP comes from
the `clk` domain, so it first passes a two-flop synchronizer on the island clock. The gated
clock stops, or restarts, within three island clock periods.

## Register map (APB, 32-bit, byte addresses, no wait states)

| address | name | access | contents |
|---|---|---|---|
| 0x0000 | GLOBAL | RW | [0] forward body bias enable |
| 0x0004 | CONFIG | RO | [7:0] islands, [15:8] levels, [23:16] temperature steps, [24] body bias present |
| 0x0100+16·i | MODE | RW | [2:0] level, [8] stpclk, [9] slp, [10] dpslp, [11] dprslp |
| 0x0104+16·i | STATUS | RO | [2:0] state, [10:8] temperature step, [24:16] temperature |
| 0x0108+16·i | CTRL | RO | [5:0] VDDID, [11:8] VBBID, [16] CLKSP, [17] CKTSP, [22:20] level |
| 0x4000+1024·i+4·k | LUT | RW | cell k = row·8 + step: [5:0] VDDID, [6] keep, [11:8] VBBID, [12] keep, [16] CLKSP, [17] CKTSP |
| 0x8000+1024·i+4·k | FBB | RW | code k = (step·5 + level)·5 + sub-step, [3:0] |

Details of the map:

* The STATUS and CTRL words are copies taken one clock earlier.
* State encoding: 0 Normal, 1 HALT, 2 Sleep, 3 Deep Sleep, 4 Deeper Sleep.
* An unmapped or misaligned address, an index beyond a table, or a write to a read-only
  register returns `pslverr` and changes nothing.
* The Mode port (`mode_valid_i`, `mode_island_i`, `mode_i`) writes an island's MODE register
  directly. If it and the bus write the same island in the same cycle, the Mode port wins.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_ISLANDS` | 2 | voltage islands (1–16) |
| `NUM_LEVELS` | 5 | performance levels of the Normal state |
| `NUM_TSTEPS` | 8 | temperature steps |
| `ADDR_W` | 16 | bus address width |
| `BODY_BIAS` | 1 | 1 = full unit; 0 = simplified unit without body bias (see below) |

`ctapm_temp_step` also takes `FIRST_EDGE` (−25 °C), `STEP_WIDTH` (25 °C) and `SUB_WIDTH`
(5 °C). If you give the tables more levels or steps than the characterised 5 × 8, the extra
cells reset to the last characterised row or column. Reprogram them over the bus.

## Where this RTL makes its own choices

The architecture fixes the blocks, the states and their order, the table's rows, columns and
cell fields, the codes in the tables, and the clock-gating scheme. This RTL chooses the
following:

* **Bus and registers:** the APB protocol, the register map and the Mode port's shape.
* **Number of islands:** two by default.
* **Table:** the keep bits, the 0000 body-bias code in the performance rows, and the RBB
  codes below 0 °C.
* **Temperature:** the signed 9-bit format, and the rule that edge readings go to the hotter
  step.
* **State machine:** the separate Deeper Sleep request, the active-high requests, and moving
  one state per clock.
* **Clock gate:** the synchronizer and the falling-edge enable register.
* **Timing:** the register timing, the reset values, and the missing voltage/frequency
  sequencing.

The architecture's overview diagram of the table divides temperature into six steps from
0 °C, and fills its cells with example codes, some of them forward-bias codes. The
characterised table, which this RTL follows, uses the eight steps and the codes above.

## How far to trust it

Checked:

* Every module passes its own self-checking testbench under Verilator, with all state that is
  not reset starting at random values.
* Each testbench was shown to fail on a copy of its module with one deliberate bug, for
  example a swapped table index, an ignored keep bit, the wrong priority between the Mode port
  and the bus, or the clock gate driven by the wrong control.
* The whole unit runs end to end at its default size, in both the full and the simplified
  configuration.
* All modules synthesize with Yosys without latches. The full unit at default size comes to
  about 1800 cells and 3700 flip-flop bits, most of them the two tables of each island.

Not checked:

* Gate-level timing. Nothing has been done on silicon or against real converters, charge
  pumps or sensors.
* The reset tables. They come from circuit simulation of one 100 nm process and one inverter
  ring, and are meant to be replaced by per-chip values.
* Transition behaviour. Settling of the supply, the order of voltage and frequency changes,
  and the minimum residency in a sleep state are open.
* Crossings into the analog parts. The VDDID, VBBID, frequency and sleep-transistor outputs
  are plain registered levels in the `clk` domain. Any synchronization or handshake on the
  peripheral side is left to the integration.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/ctapm_pkg.sv tb/tb_ctapm_unit.sv --top-module tb_ctapm_unit -o sim
./obj_dir/sim
```

Replace `tb_ctapm_unit` with any other testbench (`tb_ctapm_lut`, `tb_ctapm_state_fsm`, …)
to run that one instead. `tb_ctapm_unit_simple` runs the same kind of end-to-end test on the
unit with `BODY_BIAS = 0`.

`tb_ctapm_unit` runs the unit at its default size. It performs these steps:

1. Sweeps all 40 level × temperature cells on both islands against the mV table.
2. Puts the two islands at 10 °C and 140 °C at the same level and checks their supplies.
3. Walks one island down to Deeper Sleep and back while the other keeps running, checking
   that the gated clock really stops.
4. Uses the Mode port.
5. Turns forward bias on.
6. Reprograms a cell and reads it back.
7. Provokes bus errors.
8. Ends with 400 random mode, temperature and FBB changes, compared with a reference model of
   the settled outputs.

It counts each mechanism and fails if any of them never happened. The block testbenches check:

* every temperature from −256 to 255 °C in the step encoder;
* the state machine against a depth model, under random requests;
* the reset image and random rewrites of both tables;
* the control logic against a model, with random cells;
* pulse integrity of the clock gate under asynchronous enables;
* the register layout and priorities;
* the whole address map of the bus interface.

The state machine and the bus interface carry assertions: the state never skips, and the APB
setup/access rules hold. Run with `--assert` to check them.
