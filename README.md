# One PWM unit, several BLDC motors: time-shared PWM with per-motor buffers

A motor-control processor usually has one three-phase PWM generation unit.
That unit has six outputs (AH, AL, BH, BL, CH, CL), one high-side and one
low-side switch per inverter leg, so it can drive one three-phase motor. This
design lets the same PWM unit drive two motors, or more. The motors' control
tasks take turns on the PWM unit. A small buffer chip next to it keeps one
6-bit register per motor. A select line `cs` says which motor the PWM unit is
working for at the moment. That motor's register follows the PWM lines. Every
other register holds the last switch state it took, so every inverter is
driven at all times.

The RTL covers the whole digital path of one such system: two torque (current)
control loops, one per motor, the shared PWM unit, the task/select sequencer
and the buffer chip. It is written in synthesizable SystemVerilog. The
defaults give a two-motor system clocked at 160 MHz, with 8000-cycle task
slots.

## The time-sharing scheme

Time is cut into slots of `TASK_CYCLES` clocks (8000 by default, 50 us at
160 MHz). This is the time one motor's control task is allowed to take.
Slots go to the motors round-robin, and `cs` carries the number of the
current slot's owner:

```
clock     0        8000       16000      24000      32000
cs        |   0     |    1     |    0     |    1     | ...
PI 1      ^ sample                ^ sample
PI 2                ^ sample               ^ sample
datain    |motor 1  |motor 2   |motor 1   |motor 2   |     (shared PWM bus)
dato[0]   |follows  |held      |follows   |held      |     (inverter 1)
dato[1]   |held     |follows   |held      |follows   |     (inverter 2)
```

- **Sampling.** At the first clock of its slot, a motor's PI controller takes
  its current set point `i_ref[k]` and feedback `i_fb[k]`. The new output
  `u[k]` appears one clock later, with the strobe `u_valid[k]`. Each motor is
  therefore updated once per round of `N_MOTORS * TASK_CYCLES` clocks
  (16000 clocks = 100 us for two motors).
- **PWM unit.** For the rest of the slot the shared PWM unit runs with the
  owner's duty `u[cs]` and the owner's commutation pattern. Its counter runs
  freely. The default period of 1600 clocks divides the slot exactly, so
  every slot holds five whole PWM periods.
- **Buffers.** Buffer `k` loads `datain` at each rising edge while `cs == k`.
  So `dato[k]` follows the bus with one clock of delay while motor k owns the
  slot. At other times it keeps the value of the last clock of motor k's slot.

Be aware of one consequence of this scheme. During another motor's slot, an
inverter does not see PWM: it keeps one fixed switch state. That state can
have a high-side switch on if the slot ended in the on-phase of a PWM period.
With two motors, each inverter gets real PWM for half of the time. The effective
voltage in the held half depends on where the last PWM period stopped. At
the default settings a slot ends at the end of a PWM period (counter 1599).
The held state then has the high side on only for a duty of 100 %, and the
held slot acts like 0 % duty otherwise. Whoever sets the PWM period and slot
length controls this effect.

## Blocks

| module | role |
|---|---|
| `tmcs_pkg` | `pwm_sig_t` (the six lines as a packed struct, AH in bit 5 down to CL in bit 0) and the default constants |
| `tmcs_top` | the system: `N_MOTORS` current loops, one `pwm_unit`, `cs_task_scheduler`, `fpga_buffer_chip` |
| `cs_task_scheduler` | slot counter; drives `cs` and marks the first clock of each slot |
| `current_pi` | incremental PI controller with a clamped, wind-up-free output |
| `six_step_commutation` | hall code → which phase is switched high and which low |
| `pwm_unit` | 16-bit edge-aligned PWM counter, chops the high-side switches |
| `fpga_buffer_chip` | CS decode and one `motor_buffer` per motor |
| `motor_buffer` | one 6-bit load/hold register |

### Buffer chip (`fpga_buffer_chip`, `motor_buffer`)

Ports: `clk`, `rst_n`, `cs`, `datain[5:0]`, and `dato[N_MOTORS]` of 6 bits
each. With two motors, `cs` is a single bit: 0 selects buffer 1 (`dato[0]`,
the chip's "datol" output), 1 selects buffer 2 (`dato[1]`, "dator"). With
more motors, `cs` is a binary index, and an index past the last buffer loads
nothing. Each buffer is one register with a load enable. An assertion checks
that the decode never enables two buffers at once.

Example (100 ns clock; datain counts 0, 1, 2, …; cs alternates 0, 1, 0, …):
after the eight steps the outputs read datol = 0, 0, 2, 2, 4, 4, 6, 6 and
dator = 0, 1, 1, 3, 3, 5, 5, 7. The testbench replays this sequence.

### Current loop (`current_pi`)

```
e(n) = i_ref - i_fb
u(n) = u(n-1) + K0·e(n) + K1·e(n-1)       K0 = Kp + Ki·T/2,  K1 = -Kp + Ki·T/2
```

This is the trapezoidal (Tustin) PI controller in incremental form. `T` is
the sampling period, which is one round of slots in `tmcs_top`. The
gains are inputs, in signed Q3.12 (`KFRAC` = 12 fraction bits). The currents
are signed 16-bit values in ADC counts. `u(n-1)` is stored with its 12
fraction bits, so that small corrections add up instead of rounding away. It
is clamped to `0 .. U_MAX`, where `U_MAX` is the PWM period. Because the stored
value is the clamped one, the integral part cannot wind up while the output
is saturated. The output `u` is the integer part, used directly as the PWM
duty in counts.

Example gains: Kp = 0.5, Ki·T = 0.25 gives K0 = 0.625 (2560) and K1 = −0.375
(−1536). The testbenches use these values.

### Commutation (`six_step_commutation`)

`hall = {Ha, Hb, Hc}`. The inputs first pass a two-flop synchroniser, and the
decoded pattern is registered. A hall change therefore reaches `en` three
clock edges later.

| hall | high | low |
|---|---|---|
| 100 | A | B |
| 110 | A | C |
| 010 | B | C |
| 011 | B | A |
| 001 | C | A |
| 101 | C | B |
| 000, 111 | – (all off, `hall_fault` = 1) | – |

This is the usual table for sensors spaced 120° apart. Motors with another
sensor placement need the table changed. An assertion forbids both switches
of one leg being on together.

### PWM unit (`pwm_unit`)

A 16-bit counter counts 0 … `PERIOD-1` and wraps. The PWM level is
`cnt < duty`, so a duty of 0 gives 0 % and a duty of `PERIOD` or more gives
100 %. Each high-side line is its enable AND the PWM level. Each low-side line
is its enable, on for the whole sector. The outputs are decoded from registers
with no extra register stage. This is why a new owner's duty and sector
reach the bus in the same clock as `cs` changes.

## Scaling to more motors

`N_MOTORS` sets the number of current loops and buffers. The processor budget
sets the limit. At 160 MHz, 0.5 ms is 80000 clocks. If every motor must be
updated within 0.5 ms and each task takes 8000 clocks, ten motors fit. With
`N_MOTORS = 10` the select is 4 bits wide. The buffer chip then needs
6 + 60 + 4 + 1 = 71 I/O pins. `tb_tmcs_ten_motors` runs that configuration.

## How far the RTL follows the reference system, and where it does not

Taken from the reference system:
- one PWM unit shared by per-motor tasks
- a select line that is 0 for motor 1 and 1 for motor 2
- clocked 6-bit buffers that load when selected and hold otherwise
- the input/output names and widths of the buffer chip
- two motors, and 8000-cycle tasks at 160 MHz
- the PI difference equation, with its K0/K1 definitions
- a six-step commutation stage fed by three hall sensors
- a 16-bit three-phase PWM unit

Choices made here, where the reference gives nothing:
- **Hardware control loops.** In the reference system the PI controller,
  the commutation, the slot timing and the toggling of the select pin are
  software on a dual-core DSP. Only the buffer chip is external logic there.
  Here all of them are hardware, so the whole system can be simulated. The
  buffer chip alone (`fpga_buffer_chip`) is the part that matches the
  reference hardware one for one.
- **Reset.** The reference design has no reset; its buffers start
  undefined. Here every register is reset asynchronously (active low) to
  zero, which leaves all inverter switches off.
- **Line order.** The AH … CL bit order on the 6-bit buses.
- **Task hand-over.** The moment a task hands its result to the PWM unit:
  one clock after the first clock of its slot.
- **PWM details.** The PWM mode and period (edge-aligned, 1600 clocks =
  100 kHz at 160 MHz), and chopping of the high side only.
- **Number formats.** The number formats, and the PI output clamp.
- **Commutation extras.** The hall table, the synchroniser and the
  fault output.
- **Select for more than two motors.** The binary select code.

Not modelled:
- the processor itself
- the inverters and their power stages
- the motors
- the hall sensors
- the current sensor with its scaling and ADC
- any dead time between the high- and low-side switches; the reference
  gives none, and none is inserted here

The current feedback and hall codes enter as ports, and the switch signals
leave as ports.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_motor_buffer` | load/hold against a model; reset value |
| `tb_fpga_buffer_chip` | the eight-step datol/dator example above; random traffic on two- and three-buffer instances |
| `tb_current_pi` | 600 random samples against a 64-bit model; one-clock latency; both clamps reached; a closed loop settles on its set point |
| `tb_six_step_commutation` | all six sectors twice, plus random and illegal codes; the expected pattern is computed arithmetically from the sector number; three-edge latency; fault flag |
| `tb_pwm_unit` | every output bit in every clock for duties 0, 1, half, PERIOD−1, PERIOD, beyond PERIOD and random; on-time per period |
| `tb_cs_task_scheduler` | 8000-cycle slots and `cs` toggling at the defaults; a three-motor wrap |
| `tb_tmcs_top` | the whole two-motor system at default parameters, for 70 rounds (1.12 M clocks), against a clock-by-clock reference model of select, PI outputs, commutation, PWM bus and both buffers |
| `tb_tmcs_ten_motors` | ten motors at default slot length for 40 rounds (3.2 M clocks): select sequence, buffer load/hold, commutation on the bus, an update period of exactly 80000 clocks, and all ten currents settling |

In `tb_tmcs_top` each motor's current comes from a first-order model,
i ← i + (4u − i)/8, and the hall code steps through the sectors at a fixed
rate. The test applies set-point steps, a set point too high to reach (upper
clamp), a step to zero (lower clamp), a load disturbance on motor 2 and a
burst of an illegal hall code. It counts each of these events, plus `cs`
toggles, buffer holds and PWM chopping, and fails if any count is zero. It
also requires both currents to end within 15 counts of their set points.

Each testbench was also run against a copy of its block with one deliberate
bug. Every such run failed.

## Simulating

Each testbench is its own top. With Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    --top-module tb_tmcs_top rtl/tmcs_pkg.sv tb/tb_tmcs_top.sv
./obj_dir/Vtb_tmcs_top
```

Put `rtl/tmcs_pkg.sv` first on the command line; the other files are found
through `-y`. Lint one module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/tmcs_pkg.sv rtl/<module>.sv`.
`tb_tmcs_top` takes a few seconds. `tb_tmcs_ten_motors` takes about half a
minute.

Things to change: `N_MOTORS`, `TASK_CYCLES`, `PWM_PERIOD` and `KFRAC` on
`tmcs_top`, and the gains at run time through `k0` and `k1`. When the
slot length is changed, keep it a multiple of the PWM period, so that a slot
never ends partway through a PWM period (see the consequence above).
Lint notes: Verilator reports that the package constants are unused
in the modules that do not need them. It also reports `rst_n` as used both
synchronously and asynchronously, because the assertions disable on it. Neither
affects the logic.
