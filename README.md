# Traffic light controllers: a fixed-time T-junction controller and a programmable four-road controller

This repository holds synthesizable SystemVerilog for two traffic light controllers
that come from one published design study:

* **The T-junction controller** (`traffic_light_controller`). This is the small
  fixed-time circuit that the study simulated and synthesized for a 45 nm
  standard-cell library. A six-state ring drives four lamp groups at a T-shaped
  junction. Each state lasts a fixed number of clock cycles, counted by a 4-bit
  dwell counter. A mux-scan chain runs through its flip-flops.
* **The four-road controller** (`atlc`). This is a programmable controller for one
  main street crossed by three side streets. The user sets four timing parameters
  with switches and can read them back on hex LEDs. The controller runs a
  nine-state light sequence that lengthens a side-street green while traffic
  waits, serves a walk light on request, and has a blinking night mode.

The two controllers do not depend on each other. The top level,
`traffic_light_top`, places them side by side. They share only the clock and the
reset.

All lamp groups use one 3-bit code, `{red, yellow, green}`:

| code | lamp   |
|------|--------|
| 100  | red    |
| 010  | yellow |
| 001  | green  |
| 000  | dark   |

The type is `tlc_pkg::lamp_t`.

---

## 1. The T-junction controller

### Lamp groups and states

The junction has four lamp groups:

* `light_M1` and `light_M2`: the two directions of the main road.
* `light_MT`: the main-road turn into the side street.
* `light_S`: the side street.

The state register `ps` (3 bits) steps through a fixed ring S0 → S1 → … → S5 → S0:

| state (`ps`) | M1     | M2     | MT     | S      | stays while     |
|--------------|--------|--------|--------|--------|-----------------|
| S0 (000)     | green  | green  | red    | red    | count < `T_S0`  |
| S1 (001)     | green  | yellow | red    | red    | count < `T_S1`  |
| S2 (010)     | green  | red    | green  | red    | count < `T_S2`  |
| S3 (011)     | yellow | red    | yellow | red    | count < `T_S3`  |
| S4 (100)     | red    | red    | red    | green  | count < `T_S4`  |
| S5 (101)     | red    | red    | red    | yellow | count < `T_S5`  |

The traffic flow is simple. Both main directions run first. Then M2 is stopped, so
that main-road traffic can turn into the side street. Then the main road stops and
the side street gets its turn.

### Dwell rule and timing

On every clock edge in a state:

* If `count < T_Sn`, the counter increments.
* Otherwise the machine moves to the next state and clears the counter.

State *n* therefore lasts exactly `T_Sn + 1` cycles. The lamps are decoded from
`ps` alone (a Moore machine), so they change on the edge that changes the state.

The default limits (15, 3, 3, 15, 3, 3) are the ones printed on the study's state
diagram. With these limits, one full ring is 16+4+4+16+4+4 = 48 cycles.

The study's own simulation trace was run with shorter limits for S0, S1 and S5 (7,
2, 2). That trace shows S0 counting 0000…0111 and S1 and S5 counting 0000…0010.
Those values also match its synthesis report of 6 flip-flops: 3 state bits plus 3
counter bits, because the counter never exceeded 7. To reproduce that
configuration, instantiate the controller with these parameters:

```systemverilog
traffic_light_controller #(.T_S0(7), .T_S1(2), .T_S5(2)) u_tj (...);
```

With them, `tb_traffic_light_controller` reproduces the printed trace cycle for
cycle.

At the defaults, the counter needs all 4 bits. The block then has 7 flip-flops,
and the scan chain is 7 bits long.

### Reset and scan

* **Reset.** `rst` is asynchronous and active high. It forces S0 with the counter
  at 0.
* **Scan shift.** With `se` high, every functional update is replaced by a shift
  along the chain:
  `si → count[0] → … → count[3] → ps[0] → ps[1] → ps[2] → so`.
  The study's netlist has the `SE`/`SI`/`SO` ports and a single chain clocked on
  the rising edge. The chain order here is this design's own choice.
* **Unused codes.** A scan load can leave `ps` at one of the unused codes 110 or
  111. All lamps then show red, and the next functional clock goes to S0.

---

## 2. The four-road controller

### Parts

`atlc` is built from the parts that the design description lists:

| part | module | role |
|------|--------|------|
| synchronizers | `synchronizer` | Two flip-flops on every switch, button and sensor input. |
| latch | `walk_latch` | Holds a walk-button press until the controller serves it. |
| divider | `clk_divider` | Makes a one-second tick. `DIV` = 714286 gives 1 s from a 1.4 µs clock. |
| timer | `phase_timer` | Counts a phase length, in seconds, down on the tick. |
| D_RAM | `timing_ram` | Four 5-bit words holding TBASE, TEXT, TYEL and TBLINK. |
| FSM | `atlc_fsm` | Runs the user functions and the light sequences. |
| hex LEDs | `hex7seg` (two instances) | Show the parameter being read back, as two hex digits. |

The design description names these parts, but it gives no block diagram. The
interfaces between the parts, and the wiring, are this design's own.

### User interface

| input | meaning |
|-------|---------|
| `func_sw` (F1,F0) | 00 write a parameter, 01 read a parameter, 10 normal mode, 11 blinking mode |
| `lsel_sw` (L1,L0) | 00 TBASE, 01 TEXT, 10 TYEL, 11 TBLINK |
| `c_sw` (C4..C0) | value to write, 0–31 seconds |
| `go_btn` | starts the selected function on its rising edge |
| `walk_btn` | walk request |
| `sensor[2:0]` | waiting traffic on side streets 2, 3 and 4 |

The four functions, the four parameters and the switch names come from the
description. Which binary code selects which function or parameter is this
design's choice. The codes follow the order in which the description lists them.

After reset the controller is **idle**: every lamp and the walk light are dark.
It stays idle until GO is pressed. On GO it runs the selected function:

* **write.** Stores `c_sw` into the parameter selected by `lsel_sw`, in one cycle,
  then returns to idle.
* **read.** Shows the selected parameter on `disp_value` and on the two hex digits
  `hex_hi`/`hex_lo` (segments `{g..a}`, active high). The display follows `lsel_sw`
  until the function switches change.
* **normal** and **blink.** Run until the function switches change. The controller
  then returns to idle.

Each function needs a new GO press.

### Normal sequence

Road 1 is the main street; roads 2–4 are the side streets. `lamps[0]` is road 1.

| state | lamps                           | length |
|-------|---------------------------------|--------|
| N0    | all red                         | TYEL   |
| N1    | road 1 yellow                   | TYEL   |
| N2    | road 1 green (walk green if requested) | TEXT |
| N3/N4 | road 2 yellow / green           | TYEL / TBASE (+ TBASE while sensor) |
| N5/N6 | road 3 yellow / green           | TYEL / TBASE (+ …) |
| N7/N8 | road 4 yellow / green           | TYEL / TBASE (+ …) |

After N8 the sequence continues at N1. In every state that is not green, the
roads not listed show red.

The rules that take the most care are these:

* **Side-street extension.** When a side street's TBASE runs out, the controller
  checks that street's sensor. If it reports traffic, the green is reloaded with
  another TBASE. This repeats until the sensor is clear, so a side street stays
  green while cars keep arriving. Each extension pulses `extend` for one cycle.
* **Walk light.** A press is latched. It is served only when the main-street yellow
  (N1) ends. The walk light is then green for the whole main green (N2), and the
  request is cleared. A press made during that walk phase is kept for the next
  cycle. At all other times while running, the walk light is red.
* **Blinking mode.** The controller alternates two patterns, each for TBLINK:
  * main street yellow with the side streets red;
  * main street red with the side streets yellow.

  The walk light stays red.

### Timing

* **Input latency.** Inputs pass two synchronizer flops. A switch change therefore
  reaches the state machine two cycles later, and the machine reacts on the
  following edge.
* **Exact phase lengths.** The divider restarts whenever the timer is loaded. So a
  phase of N seconds lasts exactly `N × DIV` clock cycles, with no jitter from a
  free-running divider.
* **Zero length.** A parameter of 0 is treated as 1 second, so that no phase can
  hang.

### Default parameters

| parameter | value | origin |
|-----------|-------|--------|
| TYEL   | 5 s  | the study's nine-state light table |
| TEXT   | 25 s | the study's nine-state light table |
| TBASE  | 25 s | the study's nine-state light table |
| TBLINK | 1 s  | this design's choice |

The table gives the same 25 s to every green. The prose, however, says that a
side street normally has a shorter green than the main street. Write a smaller
TBASE to get that behaviour.

---

## 3. Where this design fills gaps or departs from the source

* **T-junction dwell limits.** The state diagram and the simulation trace disagree.
  The defaults follow the diagram; the trace's configuration is reachable by
  parameters (section 1). As a result, the default block has one flip-flop more
  than the synthesized circuit (7 against 6).
* **Idle state against the all-red state.** The description says the lamps are off
  in the reset/idle state. Its light table shows all red at reset. Here, idle is
  dark, and the normal sequence *starts* with an all-red state N0. N0 is given
  the yellow time, because the table gives it no length.
* **No red+yellow.** The description mentions red and yellow together as a
  "get ready" signal, but its light table never uses it. Yellow is shown alone.
* **One walk request and one walk light.** The intersection sketch has several
  walk buttons and walk lights. They are treated as one request input and one
  light pair, driven in parallel.
* **The study's own choices are not described.** The switch codes, the exit from a
  running function when the switches change, the divider ratio, the synchronizer
  depth and the hex display format are all choices made here.
* **Outside the RTL.** The synthesis results of the study (area, leakage and
  switching power in a 45 nm library) are properties of a cell library, not of
  the RTL. They are not modelled. The lamps, buttons and sensors themselves are
  off-chip parts.

---

## 4. Top level

`traffic_light_top` has one parameter, `DIV` (default 714286), which it passes to
the four-road controller.

Its ports are `clk` and `rst` (asynchronous, active high), plus:

* the T-junction ports, prefixed `tj_`: `se`, `si`, `so`, the four lamp groups,
  `state` and `count`;
* the four-road ports, prefixed `fr_`: switches, buttons, sensors, `lamps`, walk
  light, display, `extend` and `state`.

---

## 5. Simulating

Everything runs with plain Verilator 5. The package must be read first. Example:

```sh
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/tlc_pkg.sv tb/tb_traffic_light_top.sv --top-module tb_traffic_light_top
./obj_dir/Vtb_traffic_light_top
```

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_traffic_light_controller` | Both dwell configurations against a reference model, the printed trace, and scan shift-in/out. |
| `tb_clk_divider`, `tb_synchronizer`, `tb_walk_latch`, `tb_timing_ram`, `tb_phase_timer`, `tb_hex7seg` | The individual parts. |
| `tb_atlc_fsm` | The state machine with modelled store and timer: write, read, two normal cycles with extension and walk, and blink. |
| `tb_atlc` | The whole four-road controller through its switches, with `DIV` = 10. Every phase is checked to the cycle. |
| `tb_traffic_light_top` | End to end, both controllers, `DIV` = 20. It counts every mechanism (all six T-junction states, scan, write, read, full normal cycle, extension, walk, blink, return to idle) and fails if one never occurs. |
| `tb_traffic_light_top_full` | The top at its default parameters. It covers one complete normal cycle of 125 s: 89,285,750 clock cycles, about a minute of simulation. |

---

## 6. Changing it

* **T-junction timing.** Change `T_S0`…`T_S5`. Keep every limit below
  `2**COUNT_W`; elaboration stops with an error otherwise.
* **Four-road clock.** Set `DIV` to the clock frequency in Hz. Change the
  `INIT_*` parameters of `atlc` for other power-up timings.
* **Function and parameter codes.** The switch codes live in `tlc_pkg`.
