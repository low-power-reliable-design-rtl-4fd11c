# Pulsed-latch register files and registers

A pulsed latch is an ordinary level-sensitive latch opened by a very short pulse instead of a clock half-period. The pulse comes from a small *pulser* that many latches share. The latch is much smaller than a flip-flop and uses less power. Because the pulse is short, the latch behaves almost like an edge-triggered register.

This RTL uses the idea in three ways:

1. **A register file with virtual ports** (`pl_rf_vp`), the main design. It is a 32-word × 32-bit file with four read ports and two write ports (4R2W), running at 500 MHz. It has only **one** read multiplexer and **one** write decoder. Pulsers cut each clock cycle into slots, and every port gets its own slot on the shared path. Pulsed latches hold each port's address and result. Adding a port therefore costs a few pulsers and one row of latches, not another 32-to-1 multiplexer or decoder.
2. **A plain pulsed-latch register file** (`pl_rf_1r1w`): one read port and one write port (1R1W), 32 × 32 bits.
3. **16-bit pulsed-latch registers that protect their own reliability or power:**
   - **Two reconfigurable registers** (`recon_pl_register`). Their pulse widens when the supply voltage is scaled down, so writes stay reliable at low voltage. One variant uses header switches in the pulser (PL-SW); the other uses a multiplexed delay unit (PL-MUX). A shared supply detector (`ctrl_gen`) drives both.
   - **A self-gated register** (`pl_register_selfgated`). Its pulser fires only when at least one input bit differs from the stored bit.

The top module `pl_top` places all of these side by side. Each has its own ports, and no signals pass between them.

## Building blocks

| Module | Role |
|---|---|
| `pl_pkg` | Shared constants: clock period 2000 ps, pulser-kind enum |
| `delay_buffer` | Behavioural buffer chain: an inertial delay of `DELAY_PS` |
| `clock_gate` | Latch-based clock gating cell: enable latched while `clk` is low, `gclk = clk & en_l` |
| `pulser_2clk` | Pulser with enable, fed by a clock and a delayed clock. `pulse = en & clk & ~clk_del`, so a pulse can be placed between any two clock edges. One delay chain can serve many pulsers. |
| `enable_pulser` | Pulser with its own delay chain and an enable, gated through a NOR in the clock path |
| `pl_latches` | B latches sharing one pulse |
| `pulser_sw`, `pulser_mux` | The two reconfigurable pulsers (behavioural: their widths are delays) |
| `ctrl_gen` | Supply detector: `ctrl = 1` when `vdd_mv` < 870 |
| `rf_write_decoder`, `rf_read_mux`, `pl_data_array` | Decoder, W-to-1 multiplexer, and array of pulsed-latch rows (one pulser per row) |
| `phase_clock_gen` | Gated clock plus a delay chain that produces N phase-shifted copies |
| `addr_priority_mux`, `vp_read_logic`, `vp_write_logic` | The virtual-port control |

## The virtual-port register file (`pl_rf_vp`)

This is the hardest part to follow, because all of its behaviour comes from where pulse edges fall inside one clock period. The numbers below are for the default configuration: T = 2000 ps, M = 4 read ports, P = 2 write ports, row pulse `PULSE_PS` = 100 ps.

### Input capture

All port inputs pass through pulsed-latch registers. Their pulser (`pulser_2clk`, always enabled) opens them during [0, 100 ps) after each rising edge of `clk`. From then on, the rest of the cycle works from stable copies. Inputs must therefore be stable from the low phase before the edge until 100 ps after it.

Two clock gating cells look at the *raw* enables during that low phase:
- the read cell sees `|rd_en`;
- the write cell sees `|wr_en`.

In a cycle with no enabled read port, the read phase clocks do not toggle at all. The same holds for writes.

### Phase clocks

`phase_clock_gen` gates the clock, then delays it by equal steps:
- read side: STEP = T/(2M) = 250 ps, giving 4 phases;
- write side: STEP = T/(2P) = 500 ps, giving 2 phases.

With a 50 % duty clock, the 2M rising and falling edges of the M phases split the period into 2M equal intervals. Inside the read logic:
- `lvl[j]` is the phase level that rises at edge j;
- `lvl[j] = ph[j]` for j < M;
- `lvl[j] = ~ph[j-M]` for j ≥ M.

A window from edge a to edge b is a `pulser_2clk` with `clk = lvl[a]` and `clk_del = lvl[b]`. This is the same circuit as a pulser whose "delayed clock" comes from the phase chain instead of a private delay chain.

### Read schedule (M = 4)

| Interval (ps after the edge) | 0–250 | 250–500 | 500–750 | 750–1000 | 1000–1250 | 1250–1500 | 1500–1750 | 1750–2000 |
|---|---|---|---|---|---|---|---|---|
| address latch loads | port 0 | | port 1 | | port 2 | | port 3 | |
| output latch open | | port 0 | | port 1 | | port 2 | | port 3 |

For each port k:
- In interval 2k, the port's address-sampling pulse (enabled by `rd_en[k]`) opens the shared address latch. All sampling pulses are ORed into `address_pulse`.
- For k ≥ 1, a selector pulse covering intervals 2k and 2k+1 steers the priority address multiplexer to port k's address. Port 0 has the highest priority and is also the default input, so its sampling pulse is its selector.
- The latched address (`rd_address_current`) drives the single `rf_read_mux`.
- In interval 2k+1, port k's B-bit output latch opens and catches the multiplexer output.

A disabled port keeps its last result, because none of its pulsers fire. Port k's result is valid about (2k+1)·T/(2M) after the edge plus the path delay. Port 3's result settles by the end of the cycle.

### Write schedule (P = 2)

The cycle has P slots of T/P = 1000 ps each, one per port. Each slot has two intervals.

1. **First interval.** The port selector passes that port's enable, address and data to the decoder and the array (`wr_*_current`). For P = 2 the select is simply the gated write clock: port 0 while it is high, port 1 while it is low.
2. **Second interval.** This starts at 500 ps for port 0 and 1500 ps for port 1. An AND-OR gate raises `clkw_data_array = wr_en_current & |trig`.

A shared delay chain makes `clkw_data_array` delayed by 100 ps. Each row's `pulser_2clk`, enabled by its decoder output, opens that row for 100 ps: at [500, 600) for port 0 and [1500, 1600) for port 1.

### Rules that follow from the schedule

- A write captured at edge N is visible to reads from cycle N+1.
- A read of a word written in the same cycle may return either value.
- If both write ports write one word in the same cycle, port 1 wins, because it is written last.
- `PULSE_PS` must be shorter than T/(4P), and `clk` must have the period given by `CLK_PERIOD_PS`. The delay chains are sized from it, so a different clock frequency needs a different parameter.
- The hold margin when an output latch closes is the delay from the address latch through the multiplexer. This is the edge at which the next port's address is sampled. In silicon that margin has to be checked after layout; here it is assumed to be positive.

### Fewer ports

The 4R2W file also serves 1R1W, 2R1W, 2R2W and 4R1W traffic: hold the unused enables low. Unused ports cost no multiplexer activity, because their pulsers never fire. Smaller builds are also possible with M ∈ {1, 2, 4} and P ∈ {1, 2}. With P = 1 the write slot is the whole cycle.

## The 1R1W register file (`pl_rf_1r1w`)

- Each write goes through the decoder into one row of pulsed latches. Each row has its own `pulser_2clk`, and all rows share one delay chain of `PULSE_PS`. Row r opens for `PULSE_PS` after the rising edge when `wr_en` is high and `wr_address == r`.
- The rows can use either of two pulser styles, chosen by `SHARED_DELAY`. With 1 (the default), every row pulser takes the clock and a delayed clock from one shared chain. With 0, every row has an `enable_pulser` with its own delay buffers. The own-delay style is more robust to a failing delay chain. The shared style saves the buffers, but it needs the skew between the two clocks to be controlled.
- The read address is captured at the rising edge by a small pulsed-latch register, enabled by `rd_en`, and selects the output row. With `rd_en` low, the held address keeps reading. The output then follows any later write to that word.

## Reconfigurable registers (PL-SW, PL-MUX) and the supply detector

Each register is one pulser driving 16 latches. The pulser is the usual delay-path type: a delayed, inverted clock is NANDed with the clock, and an inverter produces the pulse.

- **PL-SW:** the delay inverters run from a virtual rail fed by two PMOS headers. `ctrl = 1` turns one header off, so the delay path slows down and the pulse widens. The model gives 60 ps (ctrl = 0) or 90 ps (ctrl = 1).
- **PL-MUX:** a multiplexer chooses between the plain clock and the clock after two extra inverters. The result is 60 ps, or 60 + 30 ps with ctrl = 1. When unused, the extra inverters are held idle.
- **`ctrl_gen`:** stands in for a voltage divider, a pseudo-NMOS inverter and two inverters. It sets `ctrl = 1` when the supply (`vdd_mv`, in millivolts) is below 870 mV. That places 1.05 V (nominal) on the short pulse and 0.7 V (scaled) on the long one.

All pulse widths and the threshold are placeholders. In silicon they are set by transistor sizing, and only their order matters to the logic.

## Self-gated register

The register compares every input bit with its stored bit: `PulseEnable = |(d ^ q)`. That signal is the enable of an `enable_pulser`, so an unchanged input produces no pulse, which saves the pulser's switching power.

The path q → compare → pulser → latch → q is a real combinational loop. Lint and synthesis report it.
- Once a pulse has started, its end is fixed by the pulser's delay chain.
- After the latches close, `d == q` keeps the pulser quiet.

In silicon the wired-OR is a precharged node pulled down by two transistors per bit. That precharge timing is not modelled.

## How far to trust it

- **Function.** Every module has a self-checking testbench, and each testbench was shown to fail on a deliberately broken copy of its module.
  - `tb_pl_rf_vp` runs 1500 random cycles against a reference memory. It covers four reads and two writes in one cycle, gated cycles, held ports, both writes to one word, and read-after-write.
  - `tb_pl_top` runs the full-size top, with every parameter at its default, through every mechanism. It counts each mechanism and fails if one never happens: virtual-port reads and writes, gated cycles, held outputs, 1R1W reads, short/long pulse selection at 1.05 V and 0.7 V, and self-gating skips and fires.
- **Workloads.** Three testbenches run the traffic these circuits are usually judged by:
  - `tb_wl_vp_port_configs` uses the full-size 4R2W file as 1R1W, 2R1W, 2R2W, 4R1W and 4R2W, 200 random cycles each. It also checks a dedicated 2R1W build (`M = 2`, `P = 1`).
  - `tb_wl_rf1_sizes` runs the 1R1W file at 32 to 1024 words of 32 bits, 200 random cycles each.
  - `tb_wl_selfgate_activity` runs the self-gated register at 20, 25, 40 and 50 % data activity and reports how many pulses were saved. Activity here means the share of cycles in which the word changes.
- **Timing.** Simulation has no gate delays apart from the explicit buffer chains, so every timing margin is ideal. The delay values (pulse widths, phase steps) are chosen to make the schedule work. They are not extracted from a process.
- **Synthesis.** The decoders, multiplexers and latches synthesize to ordinary cells and D-latches. The delay chains do not: a synthesis tool ignores `#` delays, so `delay_buffer` becomes a wire. Every pulser of the form `clk & ~delayed clk` then collapses to a constant 0, and in a zero-delay netlist most of `pl_rf_vp` is optimized away. A physical build must replace `delay_buffer` with sized delay cells that the flow is told not to touch, and it must check the pulse widths after layout.
- **Not included:**
  - the SRAM and flip-flop register files that the pulsed-latch files are normally compared with;
  - any power or failure-probability result.

### Where this design makes its own choices

- The exact slot schedule of the read and write ports.
- Capturing all virtual-port inputs at the rising edge.
- Gating from the raw enables.
- The winner when two write ports write the same word.
- The supply threshold of 870 mV.
- All delay values.
- The 16-bit width of `vdd_mv`.

The block structure follows the published architecture. That covers the input sampling, the selector, sampling, hold and output-latch groups of the read logic, the port selector and AND-OR clock generator of the write logic, the pulser circuits, and the detector chain.

## Simulating with Verilator

Every testbench is self-contained. It prints `TB_RESULT checks=<n> failures=<n>` and stops; a watchdog ends it if it hangs. For example:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/pl_pkg.sv tb/tb_pl_rf_vp.sv --top-module tb_pl_rf_vp
./obj_dir/Vtb_pl_rf_vp +verilator+rand+reset+2
```

Replace `tb_pl_rf_vp` with any file in `tb/`:
- `tb_pl_top` is the end-to-end test;
- the others are unit tests named `tb_<module>`.

`--timing` is required, because the pulsers depend on real delays. `-Wno-fatal` keeps the expected warnings from stopping the build: the self-gating loop, and the unused `pulse_b` observation outputs. All modules use a 1 ps time unit.

To change a size, edit the parameters on `pl_rf_vp`, `pl_rf_1r1w` or `pl_top`:
- W, B: words and bits;
- M, P: read and write ports;
- `CLK_PERIOD_PS`: must match the clock you drive;
- `PULSE_PS`.
