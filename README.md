# Digital emulator of intracellular calcium oscillations

This design emulates, in real time, sixteen independent cells whose cytosolic calcium
oscillates according to the Calcium-Induced Calcium Release (CICR) model. It is a small,
low-clock-rate digital chip built around one idea: **biology is slow, so one datapath can serve
many cells**. The chip does not evaluate the model's nonlinear rate laws in hardware. Instead,
the model's phase plane is cut into a 32 x 32 grid of cells. The velocity of the system at
every grid cell is computed ahead of time and stored in two tables. Advancing a calcium unit by
one Euler step is then only an address computation, two table reads and two additions. With
sixteen units in a ring of shift registers, one unit is advanced per clock, and the whole
network keeps pace with biological time at a core clock of only 2880 Hz.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable, apart from the testbenches.
It compiles without errors under Verilator's lint and the slang front end.

## The model being emulated

Two state variables describe each cell: `x`, the free calcium in the cytosol, and `y`, the
calcium in the IP3-insensitive store, both in uM. The continuous model is

    dx/dt = F(x, y) + IN          dy/dt = G(x, y)
    F = z0 - z2(x) + z3(x, y) + kf*y - k*x
    G = z2(x) - z3(x, y) - kf*y
    z2 = VM2 * x^n / (K2^n + x^n)
    z3 = VM3 * y^m / (KR^m + y^m) * x^p / (KA^p + x^p)

`IN` is the stimulus, the IP3-driven release `z1*beta`. It can differ from cell to cell. The
hardware implements the set of Hill coefficients `m = n = 2, p = 4`, with the following
constants (all in `ca_pkg`):

| constant | value | | constant | value |
|---|---|---|---|---|
| z0  | 1 uM/s   | | KR | 2 uM |
| VM2 | 65 uM/s  | | KA | 0.9 uM |
| VM3 | 500 uM/s | | kf | 1 /s |
| K2  | 1 uM     | | k  | 10 /s |

Two other Hill sets are studied with the same equations. They can be run only on the
reconfigurable build (see "Behaviour worth knowing before use"):

| set | z1*beta | VM2 | VM3 | K2 | KR | KA | kf | k |
|---|---|---|---|---|---|---|---|---|
| m = n = p = 1 | 2 uM/s | 250 | 2000 | 1 | 30 | 2.5 | 0.1 | 5 |
| m = n = p = 2 | 6 uM/s | 100 | 700 | 1 | 15 | 2.5 | 0 | 8 |

A single cell driven with `IN = 3 uM/s` oscillates with a period of about 1.2 s. Between
spikes, `y` climbs slowly from about 0.7 to 2 uM while `x` rests near 0.3 uM. Then `y`
collapses and `x` spikes to about 1.4 uM.

## The cellular update

**The grid.** Both axes span [-0.1, 1.9) uM in 32 cells of 0.0625 uM. A state value `v` lies in
cell `floor((v - v_min) / 0.0625)`.

**The number format.** States and velocities are 14-bit signed fixed point with 4 integer bits
and 10 fraction bits (4.10). The LSB is 1/1024 uM and the range is -8 to +7.999 uM. One grid
cell is exactly 64 LSB. The cell index is therefore `(v - v_min) >>> 6`, one subtraction and
one shift (module `addresser`). `v_min = -0.1` is not representable and is rounded to
-102/1024. Values outside the grid are clamped to the first or last cell. The source design
gives the subtract-and-shift; the clamping is this design's choice, because the source does
not say what happens outside the grid.

**The stored velocities.** Two tables hold the velocity at each grid cell, premultiplied by the
Euler step `Dt`:

    X storage[X][Y] = round(1024 * Dt * F(x_min + X*0.0625, y_min + Y*0.0625))
    Y storage[X][Y] = round(1024 * Dt * G(x_min + X*0.0625, y_min + Y*0.0625))

The velocity is evaluated at the lower corner of each cell. `velocity_rom` builds each table
from this formula at elaboration time, with a constant function over the `ca_pkg` constants.
The 2 x 1024 words are therefore fixed logic ("hard-wired", as on the chip), and no data file
is involved. The optional reconfigurable build replaces them with writable tables (see
"Loading other tables"). The largest stored magnitude is 956 LSB.

**The update.** For each unit, with `X` and `Y` the cell indices of its current state:

    x <- x + Xstorage[X][Y] + IN_ext        (IN_ext = Dt * IN, per unit)
    y <- y + Ystorage[X][Y]

Each sum saturates at the 4.10 limits (`sat_adder`); the source does not discuss overflow. A
velocity can move the state by several cells in one step. During a spike `x` jumps up to 15
cells per update.

**The time step.** `Dt = 1/180 s`. The chip's measured set-up uses a 2880 Hz core clock for 16
units, which is 180 updates per unit per second. Choosing `Dt = 1/180 s` makes one emulated
second equal one second of wall time. The source does not state the `Dt` of its stored
tables. To run at another time step, change `DT` in `ca_pkg` (or load new tables into the
reconfigurable build) and scale the core clock to `16 / Dt`. The datapath does not change,
only the table contents do. The source relates time
step, unit count and clock as `f = units / dt`.

## The pipeline: sixteen units on one datapath

`calcium_network` holds `x` and `y` of all sixteen units in two 16-stage, 14-bit shift
registers (`shift_reg`). The results of the adders re-enter stage 0, so each register is a
ring. The addressers are clocked: a unit's cell index is computed while the unit is in stage
14 and registered as it moves to stage 15.

```
  stage 0 -> stage 1 -> ... -> stage 14 -> stage 15
     ^                            |            |
     |                        addressers       |
     |                            v            |
     |                      cell register      |
     |                            v            v
     |                      X / Y storage -> adders <- IN_ext[u] (x only)
     |                                         |
     +-----------------------------------------+      stage 0 drives x_out / y_out
```

Timing, counting core clock edges after reset:

* Edge `t` advances unit `t mod 16` (unit 0 first). Each unit is therefore updated once every
  16 core clocks.
* After edge `t` the updated unit's state sits in stage 0. It is shown on `x_out` / `y_out`,
  and its index on `out_unit`, for one full core cycle.
* There are two register-to-register paths. One is the subtract-and-shift of the addressers.
  The other is a table lookup, a three-input addition and a saturation. The design adds no
  further pipeline registers, because a unit's next update is 16 clocks away anyway.
* After reset every unit starts at `x = y = 0`, and the cell register holds the cell of 0.

The inputs table (`inputs_table`) holds one 14-bit `IN_ext` per unit. It is read with the same
unit index as the ring.

## Clocks and the chip's pins

The chip (`cicr_chip`) runs on three clocks, as the fabricated part did:

| clock | role | relation |
|---|---|---|
| `clk_core` | advances one unit per cycle | 2880 Hz for real time |
| `clk_serial1` | UART baud rate of the serial output | 40 x `clk_core` (115200 baud) |
| `clk_serial2` | samples the serial input | 8 x `clk_serial1` |

Pins: three clocks, `rst_n`, `load_en`, `cfg_en`, `in_serial` as inputs; `out_serial` and two
6-bit parallel outputs (13 output pins) as outputs. `cfg_en` is used only when the chip is built
with the reconfiguration path (below).

**Serial output.** Each core cycle, the state of the unit just advanced is sent as four UART
packets: `x[13:7]`, `x[6:0]`, `y[13:7]`, `y[6:0]`. Each packet has one start bit, seven data
bits LSB first and two stop bits, so one frame is 40 bits. This is why the baud clock must be
exactly 40 times the core clock. Frames follow each other without idle bits. The receiver finds
the unit by counting: frame `f` after reset belongs to unit `f mod 16`. `uart_tx` brings the
core's "new data" toggle into its own clock domain with a two-flop synchroniser. It then
captures the pair, so each frame starts two to three baud periods after its core edge.

**Parallel output.** `out_parallel_x` / `out_parallel_y` show the same state as the serial
frame at 6-bit resolution: `(v - v_min) >> 5`, clamped to 0..63. That is a step of 1/32 uM over
the grid's range. They change once per core cycle. The source gives the 6 pins per variable
but not the coding; this coding is this design's choice.

**Loading the inputs.** Inputs arrive only through `in_serial`, as 14-bit words of two
packets, high seven bits first. The packets use the same 10-bit format as the output, sampled
at 8x by `uart_rx`. While `load_en` is high, each received word is written into the next entry
of the inputs table, starting at unit 0 and wrapping after 15. Dropping `load_en` returns the
write pointer to 0, and words that arrive while it is low are ignored. Words cross from
`clk_serial2` into `clk_core` through a toggle synchroniser. **A sender must therefore leave at
least three core periods between words.** At the real-time clock that is about 1 ms. The
values are `Dt * IN` in 4.10; for example `IN = 3 uM/s` is sent as 17. The load protocol and
the `load_en` pin are this design's reading of the source's "Controlling Signals".

**Loading other tables (optional).** Built with the parameter `RECONFIG = 1`, the chip gets
writable storage blocks (`velocity_ram`) in place of the hard-wired tables, and a
`storage_loader` that fills them from `in_serial`. The published chip left this option out to
save area. While `cfg_en` is high, each received word goes to the next table address: the 1024
words of the X table first, then the 1024 words of the Y table. Within each table the address
is `{X, Y}`, counting up. Dropping `cfg_en` returns the pointer to the start of the X table. The
words use the same format and the same three-core-period spacing as the inputs, so a full load
takes about 2.5 s at the real-time clock. The tables are not cleared by reset and hold nothing
useful at power-up, so they must be loaded before the outputs mean anything. Pulse `rst_n`
afterwards to restart the units from 0; the tables survive it. Any rate law or time step can be
loaded this way, for example the same model with `Dt = 1/90 s`, which runs the cells twice as
fast as real time at the same clock. The default build (`RECONFIG = 0`) is the chip as
fabricated and ignores `cfg_en`. The pin and the load order are this design's choices.

**Reset.** `rst_n` is asynchronous, active low, and goes to all three clock domains. It clears
the states (to 0), the unit counter, the inputs table (to 0) and both UARTs. The source does
not describe reset.

## Behaviour worth knowing before use

* **Stimulus threshold.** On this 32 x 32 grid, a unit oscillates only if its stored input is
  17 LSB or more, which means `IN` of about 2.90 uM/s or higher (inputs round to the nearest LSB). With 15 or 16 LSB
  (2.7-2.9 uM/s), `y` climbs past the top of the grid. The clamped top cell still has a
  positive `y` velocity, so `y` keeps rising. It reaches the 4.10 limit of 7.999 after about
  13 s (15 LSB) or 19 s (16 LSB), and the adder's saturation then holds it there.
  The continuous model does oscillate at 2.7 uM/s, but its peak `y` (about 1.96 uM) lies just
  above the grid's 1.9 uM edge. The published network experiment uses inputs
  `0.27*eta + 2.7 uM/s` with `eta` uniform in [0, 1). With this design's tables, only about a
  quarter of such units oscillate. Widening the grid, or evaluating the velocities at cell
  centres, would change this; both are departures from the published cellular model.
* **Period.** The emulated oscillation (1.20 s at `IN = 3 uM/s`) is about 20 % slower than
  the continuous model's (0.99 s). The lower-corner velocities and the coarse grid cause this.
* **Resolution.** Slow velocities below half an LSB (`|F| < 0.09 uM/s` at `Dt = 1/180 s`) are
  stored as 0. A state then stays put in that cell until the input moves it.
* The default chip only has the tables for `m = n = 2, p = 4`. The other two Hill sets
  (`m = n = p = 1` and `m = n = p = 2`) oscillate over up to 11 and 20 uM, beyond the grid and
  the 4.10 word. With `RECONFIG = 1` they still run, if the loaded tables describe scaled
  variables `x/s` and `y/s`. Cell `(X, Y)` then stands for `x = s * (-0.1 + X/16)`, and its
  words are `round(1024 * Dt * F(x, y) / s)` and the same for `G`. The input is scaled the same
  way, and the outputs are read as `s` times their value. With `s = 7` and `s = 16` the
  emulated periods are 1.63 s and 3.53 s, against 1.67 s and 3.44 s for the continuous model.
  The scale is a property of the tables, not of the hardware.
* **Faster or slower biology.** The time step is folded into the tables, so the core clock sets
  how fast the emulated cells run: `clk_core = 16 / Dt`. A study of power against biological
  timescale keeps `Dt / timescale = 1/64` and clocks the chip at 1024 Hz to 16384 Hz. The chip
  goes through the same states in every case, only faster. With tables built for `Dt = 1/64 s`
  (`RECONFIG = 1`) a cell at `IN = 3 uM/s` oscillates with a period of 1.09 emulated seconds,
  i.e. 1.09 s at 1024 Hz and 68 ms at 16384 Hz. Dynamic power grows in proportion to the
  clock.

## Modules

| file | block | what it does |
|---|---|---|
| `rtl/ca_pkg.sv` | - | widths, number format, model constants, `Dt` |
| `rtl/cicr_chip.sv` | chip top | the three clock domains and pins |
| `rtl/calcium_network.sv` | pipelined network | ring of 16 units, one update per core clock |
| `rtl/addresser.sv` | Addresser, parallel output coder | `(v - v_min) >>> SHIFT`, clamped |
| `rtl/velocity_rom.sv` | X / Y storage | 32 x 32 x 14-bit velocity table, built at elaboration |
| `rtl/sat_adder.sv` | Adder | `prev + vel + in`, saturating |
| `rtl/shift_reg.sv` | Shift Reg X / Y | 16 x 14-bit shift register |
| `rtl/inputs_table.sv` | Inputs | per-unit `IN_ext`, loaded from the UART |
| `rtl/uart_rx.sv` | UART receiver | 8x oversampling, 7 data + 2 stop bits, word assembly |
| `rtl/uart_tx.sv` | UART transmitter | four packets per core cycle |
| `rtl/velocity_ram.sv` | writable X / Y storage | 32 x 32 x 14-bit table with a write port (`RECONFIG = 1` only) |
| `rtl/storage_loader.sv` | reconfiguration path | writes received words into the two tables (`RECONFIG = 1` only) |

Synthesized with yosys' generic flow, the chip has about 800 flip-flops. The two velocity
tables become constant logic.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends with `$finish`. Each
has a watchdog that counts a failure if the run hangs. Run from the repository root:

```
verilator --binary --timing --assert -y rtl rtl/ca_pkg.sv tb/tb_cicr_chip.sv \
          --top-module tb_cicr_chip -Mdir obj_tb_cicr_chip -o sim
./obj_tb_cicr_chip/sim
```

Substitute any other testbench name. The simulator is two-state. All state that is read is
reset, except the writable tables, which the testbenches load before use. Results therefore do
not depend on initial values (`+verilator+rand+reset+2` is a useful check).

| testbench | checks |
|---|---|
| `tb_cicr_chip` | Full design at its default size, through the pins only. It loads 16 inputs over `in_serial` and decodes every serial frame for 5 emulated seconds (900 updates per unit). Every frame is compared bit-exactly with a reference model, and every parallel sample with the 6-bit code. Frame timing (40 bits, no gaps, one per core cycle) is checked. It counts cell moves up, down and none in X and Y, multi-cell moves, edge clamping, spikes and input loading, and fails if any never occurs. It prints each unit's input and spike count. Runs in a few seconds. |
| `tb_parallel_only` | The chip with only `clk_core` running and both serial clocks stopped, which the parallel interface allows. With no inputs loaded, every parallel sample is compared for 400 updates per unit with the 6-bit code of a reference model, and `out_serial` must stay idle. |
| `tb_single_calcium` | The single-cell workload (`IN = 3 uM/s` in all 16 units) for 10 emulated seconds, against the continuous model integrated in floating point. Every unit must spike as often as unit 0; the oscillation must be regular; the peak `y` must fall between 1.8 and 2.1 uM. The emulated period (1.20 s) must lie within 35 % of the continuous model's (0.99 s). It prints the periods and the RMS difference of the `x` traces. |
| `tb_calcium_network` | The network from reset (unit order, first 64 updates), then 5 s after loading inputs, against the same kind of reference model. |
| `tb_reconfig` | The chip built with `RECONFIG = 1`, through its pins. It loads both tables over `in_serial` (the `m = n = 2, p = 4` model with `Dt = 1/90 s`), then the inputs scaled to the same `Dt`, and checks 450 updates per unit bit-exactly against a reference model that reads the tables it sent. It counts the same mechanisms as `tb_cicr_chip`, plus the 2048 table words. |
| `tb_loaded_tables` | Workloads that need loaded tables, on the network with `RECONFIG = 1`: the two other Hill sets (tables scaled by `s = 7` and `s = 16`), and `m = n = 2, p = 4` with a 1/64 s step. For each, it loads the tables and runs 30 emulated seconds against the continuous model, which it integrates in floating point. The period must lie within 15 % of the continuous model's, the spikes must be regular, the x peak and y range must be close, and all units must agree. It prints periods, peaks and ranges. |
| `tb_velocity_rom` | All 2048 table words against the rate laws computed in floating point (1 LSB tolerance). |
| `tb_addresser`, `tb_sat_adder`, `tb_shift_reg` | Corner cases and random operands against integer models. |
| `tb_velocity_ram`, `tb_storage_loader` | Write and read-back of every cell and address order; load order X then Y, wrap-around, pointer restart and one write per word, across clock domains. |
| `tb_inputs_table` | Ignored words, fill order, wrap-around and pointer restart, across clock domains. |
| `tb_uart_rx` | 120 packets at random phase, word assembly, glitch rejection, framing error, latency. |
| `tb_uart_tx` | 100 frames decoded and compared, back-to-back timing. |

In the three chip and network testbenches, unit 0 gets `IN = 3 uM/s`, the single-cell stimulus, so that
spikes occur whatever the random inputs. Units 1-15 get `0.27*eta + 2.7 uM/s`.

## Where this design departs from, or adds to, the published chip

* The time step `Dt = 1/180 s`, the table rounding (to nearest) and the saturation of the
  adders are chosen here.
* The packet order on the serial link, the input-loading protocol and `load_en`, and the
  6-bit parallel coding are chosen here.
* The reset pin is chosen here. The published pin list counts six inputs including supplies,
  which would not leave room for it. The same holds for `cfg_en`.
* The reprogrammable-storage option is built, but only with `RECONFIG = 1`. It was described
  for the published chip but not fabricated, and no interface for it was given. The `cfg_en`
  pin, the load order and the writable tables' lack of reset are chosen here.
* The three clocks are treated as unrelated and crossed with synchronisers. The published
  set-up derived them from one source, so a simpler design could rely on the fixed 40:1 and
  8:1 ratios.
* The storage tables are computed from the rate laws when the design is elaborated, rather than
  written as an external table.
* The addressers are registered, as the published block diagram clocks them. The table read
  is combinational, so the path from the cell register through the table and the adder is
  longer than the single subtractor that the published design names as its critical path.
* **Not included:**
  * The ADC and DAC that would connect the emulator to living tissue.
  * The pads and the analog front end that shared the die.
