# Two-channel programmable pulse synthesizer

A full-bridge resonant inverter, such as those used for induction heating,
needs two gate-drive signals in opposite phase: channel A switches one
diagonal of the bridge, channel B the other. Two rules constrain them:

* the two transistors of one bridge leg must never be on at the same time,
  so each half period has to start with a short *dead time* during which
  both channels are off;
* the output power falls as that dead time grows, so a dead time you can
  program is also a way to regulate power.

This RTL makes both signals from one fast clock using direct digital
synthesis (DDS). You can reprogram the output frequency and the dead time
while it runs, through a three-wire serial port. With a 50 MHz clock the
dead time is set in 80 ns steps. It can cover 0 to 50 % of the half
period, so the power regulation factor

    k_r = 2·tau_I / T_C = 1 − 2·tau_r / T_C

spans about 50 % to 100 %. Here T_C is the output period, tau_I the width of
one channel's pulse, and tau_r the dead time.

## How the waveform is built

Two numerically controlled oscillators (NCOs) run from the system clock
`clk`. Each NCO is a 32-bit phase accumulator that adds a frequency word
every cycle. Its most significant bit is a square wave:

    f = k · f_clk / 2^32

* **NCO1** (word `k2`) is the fine timebase. Each rising edge of its MSB is
  a *tick*. All output timing moves on this tick grid. With the built-in
  word `k2 = 2^30` the tick rate is f_clk/4 = 12.5 MHz, so one tick is 80 ns.
* **NCO2** (word `k3`) sets the output frequency. Its MSB `q2` runs at twice
  the output frequency: f_C = f_NCO2 / 2, so T_C = 2^33 / (k3 · f_clk). The
  built-in `k3 = 6871948` gives f_NCO2 = 80 kHz and a 40 kHz output.

Every rising edge of `q2` starts a new half period of the output. Here is
what happens on the ticks that follow, with `k0` the pause constant:

```
q2      ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____________________/‾‾‾‾‾‾‾‾‾
phase   ‾‾‾\___________________________________________/‾‾‾‾‾‾‾‾
pause   ___/‾‾‾‾‾‾‾\__________________________________/‾‾‾‾‾‾‾\_
          |<tau_r ->|                                 |<tau_r->|
ChA     ‾‾‾\____________________________________________________/‾
ChB     ____________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__________
```

1. The phase flip-flop toggles. It chooses which channel owns this half
   period (phase = 1 → ChA, phase = 0 → ChB).
2. The 12-bit pause counter was held at `k0` while `q2` was low. It now
   counts down one step per tick and stops at zero. While `q2` is high and
   the counter is not zero, `pause` is high and both outputs are forced low.
3. When the counter reaches zero, the channel that owns the half period
   turns on. It stays on until the next `q2` rising edge, when it turns off.

This gives a dead time of `tau_r = k0 · T_NCO1` and a pulse of
`tau_I = T_C/2 − tau_r`.

**The dead-time ceiling.** The pause window is ANDed with `q2`, so it also
ends when `q2` falls, a quarter of the output period after it started.
Dead time therefore saturates at T_NCO2/2 = T_C/4, no matter how large `k0`
is. That caps k_r at a minimum of 50 %. At 40 kHz the cap is 6.25 µs, reached
at k0 = 78. At 3 kHz it is 83.3 µs, reached at k0 ≈ 1041. The 12-bit counter
itself could time up to 4095 ticks, which is 327 µs at 80 ns per tick.

**Resolution.** Every output edge falls on a tick, so widths and the period
as measured can differ from the formula by up to one tick (80 ns). The dead
time is exact when 2^32/k2 is a whole number of clock cycles.

## Programming it

### Serial port (`pps_input_data`)

| pin         | use                                                       |
|-------------|-----------------------------------------------------------|
| `data_clk2` | serial clock; a bit is taken on each rising edge          |
| `reg_cnt`   | 1: the bit goes into the 2-bit address register; 0: it goes into the addressed data register |
| `data_in`   | the bit, MSB first                                        |

To write a register, shift in two address bits with `reg_cnt = 1`, then
shift in the data bits with `reg_cnt = 0`:

| address | register | width | reset value          | use                 |
|---------|----------|-------|----------------------|---------------------|
| 0       | `k2`     | 32    | 1073741824 (2^30)    | NCO1 word, sets the tick |
| 1       | `k3`     | 32    | 6871948              | NCO2 word, sets T_C |
| 2       | `k0`     | 12    | 10                   | dead time in ticks  |
| 3       | `mng`    | 4     | 0                    | spare control bits, brought out on `mng` |

The data registers are plain shift registers and drive the datapath
directly. While a word is being written, the datapath therefore sees each
partly shifted value in turn. Shifting in fewer bits than the register
width moves the old contents up. `k0` is taken directly from its register.
`k2` and `k3` go through the multiplexers described below, so the safe way
to load a new frequency is:

1. select the built-in word;
2. load the new word;
3. switch the select pin back to the loaded word.

All three pins are synchronized into `clk`. Hold `data_clk2` high and low for
at least 2 `clk` cycles each. Keep `reg_cnt` and `data_in` steady from 3
cycles before each rising edge of `data_clk2` until 1 cycle after it. A bit
reaches its register 3 `clk` cycles after that rising edge.

### Frequency-word selects (`pps_kword_mux`)

`sel_pin3` picks `k2` and `sel_pin2` picks `k3`. For each pin, 0 selects the
built-in word and 1 selects the serially loaded one. The selected word is
registered before it reaches the NCO.

### Output enables

* `en_out`: enables both channels. When it is low, both outputs are held low.
* `twoch_en`: enables channel B. When it is low, ChA runs alone.

The NCOs and the phase keep running while the outputs are disabled.

### Worked numbers at f_clk = 50 MHz

| target                     | word                                  |
|----------------------------|---------------------------------------|
| 80 ns tick                 | k2 = 2^30 = 1073741824                |
| 40 kHz output (T_C = 25 µs) | k3 = 2^33 · 40 kHz / 50 MHz = 6871948 |
| 3 kHz output (T_C = 333 µs) | k3 = 515396                          |
| 0.8 µs dead time           | k0 = 10                               |

## Module map

```
pps_top
├── pps_sync            2-FF synchronizers for sel_pin2/3, en_out, twoch_en
├── pps_input_data      serial port and the k2/k3/k0/mng registers
│   └── pps_sync
├── pps_kword_mux ×2    built-in or loaded word for k2 and for k3
├── pps_nco ×2          NCO1 (tick, q1_out) and NCO2 (q2, q2_out)
├── pps_pause_counter   12-bit down counter → pause
└── pps_output_synth    phase flip-flop and gating → ChA, ChB
pps_pkg                 widths, built-in words, register address enum
```

Everything runs on the single clock `clk` with a synchronous, active-low
reset `rst_n`. NCO1's tick is a clock enable, not a clock. `q1_out` and
`q2_out` bring the NCO MSBs out for test. `pps_output_synth` carries an
assertion that ChA and ChB are never high at the same time.

Parameters of `pps_top`:

* `N = 32`: accumulator width.
* `CNT_W = 12`: pause counter width.
* `MNG_W = 4`: width of the spare control word.

The built-in words are constants in `pps_pkg`.

## What is taken from the original design and what is not

These follow the published design:

* the block structure: serial input block, two DDS NCOs, a cascaded 12-bit
  down counter for the pause, and flip-flop/gate output logic;
* the 32-bit accumulators and the 12-bit counter;
* the use of NCO1 as the timebase for the counter and the output logic;
* f_C = f_NCO2/2;
* the built-in words;
* the pin names and their roles.

These are this implementation's own choices:

* **Single clock domain.** The original clocked its counters and output
  flip-flops directly from the NCO1 MSB. Here that edge is a clock enable.
  The behaviour on the tick grid is the same.
* **Pause wiring.** The counter is held at `k0` while `q2` is low, counts
  while `q2` is high, stops at zero, and the pause is gated by `q2`. The
  published description says only that the counters are initialized with
  k0 and set the pause. This reading reproduces the published dead times,
  the T_NCO2/2 ceiling and the ~50 % lower limit of k_r.
* **Multiplexer inputs.** Each multiplexer chooses between a built-in
  constant and the serially loaded word.
* **Serial port details.** The register map, the MSB-first bit order and the
  reset values are this implementation's choices. So is the 4-bit width of
  the spare `mng` word; what those bits control is not defined, so they are
  simply brought out.
* **Enables.** `en_out` gates both channels and `twoch_en` gates only
  channel B.
* **Synchronizers and registers.** The asynchronous pins are synchronized,
  and the outputs come from flip-flops rather than from gates, so they do
  not glitch.

Not included:

* **The controller that drives the serial port.** The testbenches model it
  with a task.
* **The inverter itself.**
* **The variant with a wider regulation range (about 1–99 %).** It is
  mentioned as a possible modification but is not described. In this RTL,
  removing the `q2` term from `pause` (and widening the counter where
  needed) is the starting point for it.

## Agreement with the published operating points

`tb/tb_pps_workloads.sv` runs the published operating points at default
sizes and 50 MHz, and checks every row:

* 40 kHz with k0 = 10, 40, 50, 60, 70, 72;
* 3 kHz with k0 = 10, 50, 70, 100, 300, 500, 700, 1000, 1030.

For each row it checks tau_I, tau_r, tau_P = 2·tau_r + tau_I, the duty
cycle and k_r against the published values. It also checks the dead-time
ceiling. Some rows:

| f_out  | k0   | tau_r (µs) measured / published | tau_I (µs) measured / published | k_r (%) measured / published |
|--------|------|---------------------|---------------------|------------------|
| 40 kHz | 10   | 0.800 / 0.772       | 11.680 / 11.683     | 93.60 / 93.61    |
| 40 kHz | 72   | 5.760 / 5.759       | 6.720 / 6.721       | 53.92 / 53.85    |
| 3 kHz  | 10   | 0.800 / 0.758       | 165.880 / 165.922   | 99.52 / 99.55    |
| 3 kHz  | 1030 | 82.400 / 82.357     | 84.280 / 84.323     | 50.56 / 50.59    |

Every row agrees to within one 80 ns tick. The remaining offsets are about
as large as the uncertainty in reading the published values off waveform
cursors.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Each has a
watchdog.

| testbench              | what it covers |
|------------------------|----------------|
| `tb_pps_top`           | whole design at default sizes: built-in and loaded words, dead times that are uncapped, capped and zero, a 160 ns tick, single-channel mode, ENOUT off, the mng bits; counts each of these mechanisms |
| `tb_pps_workloads`     | the published operating points (above) |
| `tb_pps_nco`           | accumulator and tick count against k·t mod 2^32 |
| `tb_pps_pause_counter` | pause length = min(k0, ticks while q2 high), no wrap |
| `tb_pps_output_synth`  | period, pulse width, dead time, alternation, enables |
| `tb_pps_input_data`    | serial writes against a register model, latency |
| `tb_pps_kword_mux`     | select and latency |

`tb_pps_channel_monitor` is a measurement helper used by the top-level
tests.

Example for the whole design (run from the directory that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/pps_pkg.sv rtl/*.sv \
    tb/tb_pps_channel_monitor.sv tb/tb_pps_top.sv --top-module tb_pps_top -o sim
./obj_dir/sim
```

The unit tests need only `rtl/pps_pkg.sv`, the module under test (plus
`rtl/pps_sync.sv` for `pps_input_data`) and their testbench. Every run
takes well under a second.

## Limits worth knowing

* A write to `k0` takes effect bit by bit. During the write, one half
  period can get an intermediate dead time, but never less than zero, and
  the channels never overlap.
* `k0 = 0` gives no dead time at all: one channel falls on the same clock
  edge on which the other rises. Choose k0 for the transistors you drive,
  with a safety margin on their turn-off time.
* If `k2` is not a power of two, the tick period jitters by one clock cycle.
  The dead time then varies by that much between half periods.
