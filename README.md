# HC-SR04 distance-sensor core and small hardware accelerators for a soft-core I/O bus

A small processor system spends most of its time waiting when it talks to a
timing-driven device in software. The HC-SR04 ultrasonic distance sensor is a
typical case. The processor has to raise a pin for 10 µs, poll another pin
until it rises, time how long it stays high, and then keep away from the sensor
for 60 ms. To keep the 3 mm resolution of the sensor, the polling loop must
react within 17 µs. That is a hard real-time demand on a processor that also
has other work to do.

This RTL moves that work into hardware. A small controller, an FSM with one
counter and one register, runs the whole measurement cycle. Software sees four
memory-mapped registers: mode, start, ready and elapsed time. In continuous mode
software writes the mode register once and from then on only reads the latest
echo time. The controller sits in the accelerator slot of a simple
memory-mapped I/O platform, beside a timer, general-purpose input and output
ports and a UART. The same slot can instead take one of the other small
accelerators in this repository: two GCD units, a Fibonacci unit, a
finite-difference polynomial evaluator, an 8-tap multiply-accumulate filter and
a DDFS generator with a square-wave output and a sine-table output. All of them
are built from the same register wrapper.

Everything is synchronous to one clock. 100 MHz is assumed throughout, so a
count of 1 is 10 ns. The reset is synchronous and active high.

## The sensor and its timing

| signal | direction (seen from the sensor) | behaviour |
|---|---|---|
| `trig` | input | a pulse of at least 10 µs starts a measurement |
| `echo` | output | high for the round-trip time of the ultrasonic burst |

The distance is `echo_time * 34000 cm/s / 2`. At 100 MHz:

* 2 cm is 11 764 cycles.
* 100 cm is 588 235 cycles.
* 400 cm, the top of the sensor's range, is 2 352 941 cycles (23.5 ms).

Triggers must be at least 60 ms apart, or echoes of one burst disturb the next.

## The controller (`sr04_ctrl`)

The data path has two parts:

* a counter `c`, which counts every cycle and is cleared when a measurement starts;
* a register `t`.

The control path is a five-state FSM:

| state | output | leaves when | action on leaving |
|---|---|---|---|
| `IDLE` | `ready = 1` | `start = 1` | clear `c` |
| `PING` | `trig = 1` | `c == TRIG_CYCLES` (1000, i.e. 10 µs) | |
| `WAIT1` | | `echo = 1` | `t <= c` |
| `TIME` | | `echo = 0` | `t <= c - t`: now `t` holds the echo time |
| `WAIT2` | | `c >= CYCLE_TIME` (6 000 000, i.e. 60 ms) | |

The same counter times three things:

* the trigger pulse;
* the echo, by taking the difference of two snapshots of `c`;
* the 60 ms turn-around.

`c` is cleared only when `start` is accepted, so the next trigger comes no
sooner than 60 ms after the previous one, however long the echo lasts.

Timing details worth knowing:

* **Trigger width.** `trig` comes from a flip-flop. It rises at the clock edge
  that accepts `start` and stays high while `c` runs from 0 to 1000. That is
  1001 cycles, or 10.01 µs.
* **Echo input.** `echo` passes a two-flip-flop synchronizer (`SYNC_STAGES`).
  Both edges are delayed alike, so `t` is exactly the number of cycles `echo`
  was high.
* **`t` mid-measurement.** While the echo is high, `t` holds the counter value
  at its start, not a result. The extra output `done` pulses in the one cycle
  after which `t` holds a finished measurement.
* **Return to idle.** `ready` comes back `CYCLE_TIME + 1` cycles after `start`
  was accepted. If the echo outlasts the cycle time, `ready` comes back one
  cycle after the echo ends: `WAIT2` uses `>=`, so a very long echo cannot hang
  the FSM.
* **No answer.** `WAIT1` has no timeout. A sensor that never answers leaves the
  controller waiting in `WAIT1`.

## The sensor core (`sr04_core`) and how software uses it

Each sensor `i` (0 ≤ i < `N_SENSORS`) has four registers, at word offset `4*i + n`:

| n | access | meaning |
|---|---|---|
| 0 | write | mode: bit 0 = 1 continuous, 0 single measurement |
| 1 | write | start one measurement (data ignored) |
| 2 | read | bit 0 = ready (controller idle) |
| 3 | read | echo time of the last finished measurement, in clock cycles |

* **Continuous mode.** This mode holds the controller's `start` at 1, so a new
  measurement begins as soon as the previous one's 60 ms are over.
* **Single mode.** A write to register 1 gives `start` a one-cycle pulse. A
  start that arrives while the controller is busy is dropped. Ready reads 0
  from the cycle right after a start write, so a poll just after the write
  cannot see a stale 1.
* **Register 3.** This register is loaded only on `done`. A read therefore never
  returns the half-finished value that `t` holds during an echo.

With `N_SENSORS = 4` one core serves four sensors, for example one per side of
a robot. They all run at once, and software only reads four registers. One slot
has room for eight sensors.

Software in continuous mode, with `HA` the base address of the slot:

```c
io_wr(HA + 0, 1);                        /* once */
cycles = io_rd(HA + 3);                  /* whenever a distance is needed */
distance_cm = cycles * 10e-9 * 34000 / 2;
```

## The bus and the register wrapper (`mmio_pkg`, `mmio_interconnect`, `ha_wrap`)

A bus request (`bus_req_t`) has these fields:

* `cs`, `wr` and `rd`;
* an 8-bit word address, made of a 3-bit slot and a 5-bit register number;
* 32-bit write data.

Bus timing:

* A write takes effect at the clock edge where `cs` and `wr` are high.
* Read data is combinational and valid in the same cycle as `cs` and `rd`.
* `mmio_interconnect` decodes the slot, raises that slot's `cs` and
  multiplexes the read data back.
* Slots without a core read 0.

| slot | core |
|---|---|
| 0 | `timer_core`: 64-bit cycle counter. Reg 0/1 read low/high word; reg 2 write bit 0 = stop, bit 1 = clear |
| 1 | UART, outside this RTL (`uart_req`/`uart_rdata` ports) |
| 2 | `gpi_core`: reg 0 reads the synchronized input pins |
| 3 | `gpo_core`: reg 0 drives (and reads back) the output pins |
| 4 | accelerator slot: `sr04_core` |

Every core is built from `ha_wrap`, the wrapping circuit that turns custom
logic into memory-mapped registers:

* **Write side.** A decoder selects one of `N_REG` write registers. The
  wrapper also gives a one-cycle strobe (`wstb`) per register, one cycle after
  the bus write, so a register can act as a command.
* **Read side.** Every cycle, `N_REG` read registers sample the values that the
  custom logic presents. A multiplexer then picks one by address. A value read
  is therefore one cycle old.

## The other accelerators

Each accelerator is a unit plus a `*_core` wrapper. In `hwsw_top` each core has
its own bus port (`gcd_req`/`gcd_rdata`, and so on), beside the platform.

| core | unit | registers | timing |
|---|---|---|---|
| `gcd_core` | `gcd_unit`: gcd by repeated subtraction (`a=b → a`, `a>b → gcd(a-b,b)`, `b>a → gcd(a,b-a)`) | 0 a, 1 b, 2 start / ready, 3 result | one subtraction per cycle, `done` after steps + 1 |
| `bgcd_core` | `bgcd_unit`: binary (Stein) GCD, shifts and subtractions | same as `gcd_core` | at most about 3·W cycles |
| `fib_core` | `fib_unit`: F(n) by iteration, two registers and an adder | 0 n, 2 start / ready, 3 F(n) | n + 1 cycles; exact up to F(47) in 32 bits |
| `fdiff_core` | `fdiff_unit`: cubic p(x) at successive x by Newton's forward differences, all four difference registers updated at once with 3 adders | 0 difference index, 1 initial difference, 2 start with step count / ready, 3 p(x) | one x per cycle, `done` after steps + 1 |
| `fir_core` | `fir_mac`: y = Σ k_i·x(i), 8 taps, `N_MUL` multipliers | 0 coefficient index, 1 coefficient value, 2 push sample / ready, 3 y | 8/`N_MUL` + 1 cycles per output |
| `ddfs_core` | `ddfs`: phase accumulator, square wave = phase MSB; `ddfs_lut`: sine table on the top 8 phase bits | 0 frequency control word | f = fcw·f_clk/2³², up to f_clk/2; sine samples one cycle behind the phase |

Notes on these units:

* **Zero operands.** Both GCD units return the other operand when one operand
  is 0. The subtraction form would otherwise never end.
* **The finite-difference unit.** Load p(0), Δp(0), Δ²p(0) and Δ³p(0). Each
  step then adds every difference into the one below it, so d[0] moves from
  p(x) to p(x+1) without a multiplier. The registers keep their state between
  runs.
* **The filter.** `fir_mac` keeps the last 8 samples in a shift register. x(0)
  is the newest sample. Pushing a sample starts a computation, and a push while
  busy is ignored.
  * `N_MUL` (1, 2, 4 or 8) trades multipliers for cycles. It is 8 by default,
    so a whole output takes a single step.
  * `fir_core` uses 12-bit signed samples and coefficients, so the
    full-precision 27-bit result fits one register.
* **The DDFS.** The square wave is the phase MSB, on `ddfs_sq`. The top 8
  phase bits also address `ddfs_lut`, a 256-entry table of 8-bit sine samples.
  * The samples are offset binary: 0 is the negative peak, 255 the positive
    peak, 127/128 the middle.
  * The table is computed from `$sin` when the design is elaborated, so there
    is no memory file.
  * The samples leave the top on `ddfs_wave`, for a DAC outside this design.
    Above roughly f_clk/4 the sine has too few samples per period to be
    useful; the square wave goes up to f_clk/2.

## What is not here

Several parts of the system are outside this RTL:

* **Processor and RAM.** The soft-core processor and its RAM are vendor IP. The
  processor's bus is the top's `bus`/`bus_rdata` port pair.
* **UART.** The UART core is vendor IP, on ports `uart_req`/`uart_rdata`.
* **The sensor.** The HC-SR04 is an external device. `tb/sr04_model.sv` is a
  behavioural model of it for simulation. It returns an echo of a set width
  after a set delay.
* **The DAC.** The digital-to-analog converter that would turn `ddfs_wave`
  into an analog sine is an external part.
* **Other sensor controllers.** There are no controllers for other one-off
  sensor interfaces (1-wire thermometers, DHT22, WS2812 LEDs). Their timing is
  not specified here.

## Where this RTL makes its own choices

The controller's states, its counter limits and the sensor core's four
registers and two modes are the reference design. The following are choices
made here:

* the bus signals and timing, the slot map and the 32-bit register width;
* the write strobes in the wrapper;
* the echo synchronizer, the `>=` exit from `WAIT2` and the added `done`
  output;
* the separate result register of the sensor core, and the "not ready while a
  start is pending" rule;
* the register layout for more than one sensor;
* all register maps, widths and handshakes of the timer, GPIO and accelerator
  cores;
* the filter's default of eight multipliers;
* the binary GCD, Fibonacci and finite-difference units, which the reference
  only names and which follow the textbook algorithms. The finite-difference
  unit's cubic order is also a choice made here;
* the DDFS phase width, and the sine table's shape, depth (256) and sample
  width (8 bits). The reference only says a lookup table and a DAC can be
  added.

## Parameters (`hwsw_top`)

| parameter | default | meaning |
|---|---|---|
| `N_SENSORS` | 1 | sensors on the SR04 core (up to 8) |
| `TRIG_CYCLES` | 1000 | trigger length in cycles (10 µs at 100 MHz) |
| `CYCLE_TIME` | 6 000 000 | minimum trigger spacing in cycles (60 ms) |
| `GPIO_W` | 8 | width of the GPI and GPO ports |
| `FIR_N_MUL` | 8 | multipliers in the filter (1, 2, 4 or 8) |

## Simulation

Each module in `rtl/` has a self-checking testbench in `tb/`. Every testbench
ends by printing `TB_RESULT checks=N failures=M`. Build and run one with
Verilator 5, for example:

```sh
verilator --binary --timing -y rtl -y tb rtl/mmio_pkg.sv tb/tb_hwsw_top.sv \
          --top-module tb_hwsw_top -Mdir obj && ./obj/Vtb_hwsw_top
```

The testbenches:

* **`tb_hwsw_top`**: the whole design at its default sizes, about 20 million
  cycles and half a minute of simulation. Acting as the processor, it runs:
  * a bit-bang driver on GPO/GPI timed by the timer;
  * single measurements at 2, 100 and 400 cm, including a start while busy;
  * continuous mode with an object that moves;
  * UART and unused-slot accesses;
  * every accelerator.

  It counts each of these and fails any that never happened.
* **`tb_hwsw_quad`**: four sensors on one core, with the counter limits scaled
  down.
* **One testbench per unit**: `tb_sr04_ctrl`, `tb_sr04_core`, `tb_ha_wrap`,
  `tb_mmio_interconnect`, `tb_timer_core`, `tb_gpi_core`, `tb_gpo_core`,
  `tb_gcd_unit`, `tb_bgcd_unit`, `tb_fib_unit`, `tb_fdiff_unit`, `tb_fir_mac`,
  `tb_ddfs` and `tb_ddfs_lut`.
  They check results against independent reference models, and check cycle
  counts where the design defines them. `tb_fir_mac` runs all four multiplier
  counts side by side.

The Verilator build is two-state. The testbenches reset everything that the
design reads.
