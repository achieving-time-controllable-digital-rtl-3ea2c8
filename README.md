# Time-controllable digital lung mockup

A ventilator under development normally has to be tested against a computer
model on a PC or against a mechanical test lung. This design puts a
**digital lung** in logic instead: a two-compartment respiratory model that
the ventilator talks to over plain serial lines, as if the lines came from its
own pressure, flow and volume transducers. Because the lung is a model that
advances in discrete **time steps** (2^-8 s of simulated time each), time
itself becomes something a developer can control: freeze it, let it run in
real time, slower or much faster, or advance it by exactly N steps and look at
the lung's state in between, or set a breakpoint at a step number. The
debug commands work on simulated time, not on instructions.

```
            PC debugger                                   ventilator
  uart_rx ──► uart_rx ─► debug_cmd ─► uart_tx ──► uart_tx       ▲  ▲
                            │  ▲                                │  │
                 start/stop/step/rate   READ/PROFILE data       │  │
                            ▼  │                                │  │
   buttons ─────────────► time_ctrl ◄── stall ── links busy     │  │
                            │ step_en                           │  │
                            ▼                                   │  │
   pair_in ─────────────► resp_mockup ── step_done ──► 4 x bypass_link ─┘  │
   (airway pressure)   (resp_model + 4 integrators)  └─► sync_channel ─────┘
```

## Simulated time: how a step is made

Everything revolves around one signal, `step_en`, a one-clock pulse from
`time_ctrl`. One pulse is one simulated time step: all four integrators of the
lung update together on that clock edge, so the model is lock-stepped by
construction and no state can see a half-updated neighbour.

`time_ctrl` has three modes:

| mode  | entered by                                    | steps issued                                   |
|-------|-----------------------------------------------|------------------------------------------------|
| IDLE  | reset, STOP, end of a STEP count, breakpoint  | none: simulated time is frozen                 |
| RUN   | START                                         | one every `rate` clock cycles, until STOP      |
| STEP  | STEP n (n > 0)                                | n steps at the same spacing, then back to IDLE |

`rate` is the number of clock cycles between steps. Its reset value,
`RATE_DEFAULT = CLK_HZ / 256`, makes simulated time run at wall-clock speed.
A smaller value runs faster than real time, a larger one slower. `rate = 0`
means "full speed".

A step is only taken when two conditions hold:

1. **The interval has elapsed.** There are also at least `MIN_GAP = 3` cycles
   since the previous step. The gap gives the step's consumers time to raise
   `stall` before the next decision is made.
2. **`stall` is low.** `stall` is the OR of the busy flags of the four bypass
   links and the sync channel. A step is held until the ventilator has
   received the whole previous sample. Mockup and ventilator therefore always
   sample at the same rate, however fast time is asked to run.

At full speed the serial links, not the model, set the pace. The model needs
one clock per step. At 115200 baud the four-byte samples bound it to about
2,900 steps/s, which is 11x real time at the default sizes.

Commands that arrive in the same cycle are ordered: stop wins over step, and
step wins over start. A STOP in the middle of a STEP count cancels the rest of
the count. `time_ctrl` also keeps three profile counters:

- time steps taken;
- clock cycles with time running;
- cycles a due step spent waiting on `stall`.

**Breakpoint.** A BREAK command arms a breakpoint at a value of the step
counter. Time freezes right after the step that makes the counter equal to
it. This works in RUN mode and inside a STEP count, and looks to the
ventilator like a STOP. The breakpoint then disarms itself. BREAK 0 disarms
it without a hit. The usual pattern is:

1. read the step count with PROFILE;
2. set a break a few steps ahead and START;
3. step from there one step at a time.

If a command arrives in the same cycle as the break step, the command wins.

## The lung model

`resp_model` is one combinational block. `resp_mockup` wraps it with four
`integrator`s. The states are the gas quantity Q and the volume V of a
bronchial (br) and an alveolar (alv) compartment. Each step does
`state <= state + derivative * dt` with `dt = 1`, so derivatives are
expressed per time step.

```
Cbr  = Qbr / Vbr                 Calv = Qalv / Valv
Pbr  = (Vbr  - VBR_0)  / COM_BR   Palv = (Valv - VALV_0) / COM_ALV
Fbr  = (Pair - Pbr)  / RBR        Falv = (Pbr - Palv) / RALV
dQbr  = Fbr*(CAIR + Cbr) + Falv*(Calv - Cbr)
dQalv = Falv*(Cbr + Calv)
dVbr  = Fbr - Falv                dValv = Falv
```

Where the equations come from:

- **Published lung model.** Cbr, Fbr, dQbr, dQalv and Pbr are its equations
  as published. VBR_0 = 0x9600 and COM_BR = 0x100 are its constants.
- **By analogy.** The alveolar concentration, pressure and flow mirror the
  bronchial ones.
- **Volume balance.** The two volume derivatives follow from conserving volume
  between the compartments.
- **Not built.** The full model has 13 equations, including gas exchange.
  Those not listed above are not available, so this is a reduced model.

**Number format.** All values are signed 32-bit fixed point with 8 fractional
bits (Q23.8). In this format 0x100 is 1.0 and 0x9600 is 150.0. `dm_pkg`
provides the product `fmul` (floor after the shift) and the quotient `fdiv`
(truncates toward zero; dividing by zero returns 0).

**Constants.** VALV_0 = 2500.0, COM_ALV = 16.0, RBR = 8.0, RALV = 4.0 and
CAIR = 1.0 are choices. They give time constants of about 8 and 64 steps, so
the forward-Euler update is stable.

**Reset state.** Both compartments start at their rest volume, with
concentration 1.0.

**Pressure equation.** The published pressure line reads
`vbr - VBR_0 / COM_BR`, which in C binds as `vbr - (VBR_0/COM_BR)`. This
design uses the compliance form `(V - V0) / C`.

With 10.0 of airway pressure for 300 steps, the lung volume goes from 2650.0
to about 2783.0. It falls back when the pressure is released. Both
compartments update in one clock cycle.

The four **transducer values** (`dm_pkg::obs_t`) are:

- airway pressure = `pair_in`;
- lung pressure = Palv;
- flow = Fbr;
- volume = Vbr + Valv.

## Debug protocol (PC serial link)

The link is 8N1 at `BAUD` (115200 by default). Multi-byte fields are sent
least significant byte first.

| opcode | name    | argument bytes      | reply                                               |
|--------|---------|---------------------|-----------------------------------------------------|
| 0x01   | START   | -                   | -                                                   |
| 0x02   | STOP    | -                   | -                                                   |
| 0x03   | STEP    | n (16 bit)          | -                                                   |
| 0x04   | READ    | -                   | 6 words: airway p, lung p, flow, volume, Cbr, Calv   |
| 0x05   | PROFILE | -                   | 3 words: steps, active cycles, stall cycles          |
| 0x06   | RATE    | cycles/step (32 bit)| -                                                   |
| 0x07   | BREAK   | step count (32 bit) | - (0 clears the breakpoint)                         |

A reply is captured when its opcode arrives. While a reply is being sent,
`debug_cmd` ignores incoming bytes, and it ignores unknown opcodes. STEP 0 has
no effect.

## What the ventilator sees

- **`bypass_tx[3:0]`** carries airway pressure, lung pressure, flow and volume.
  There is one line per transducer. After every step each line sends its
  32-bit Q23.8 value as four 8N1 bytes, least significant first. A sample
  takes 4 x (10 x `CLKS_PER_BIT` + 1) clock cycles.
- **`sync_tx`** is the synchronization channel. It sends one byte per event:
  0x54 after every time step, 0x53 when time starts running and 0x50 when it
  freezes. Every change of the step rate (a RATE command, or button 3
  pressed or released) is announced as 0x52 followed by the new
  clock-cycles-per-step value, four bytes, LSB first. The ventilator thus
  knows the rate both sides run at. Each event is held pending until sent.
  A rate written twice before it goes out is announced once, with the latest
  value. Pending events go out in the order rate, start, tick, stop, and a
  rate message is never split. A STEP 1 therefore appears as 0x53 0x54 0x50.
  If a stop and a restart are both pending while the line is busy, they can
  go out in the wrong order.

## Board interface (`mockup_top`)

| port        | dir | width | meaning                                                        |
|-------------|-----|-------|----------------------------------------------------------------|
| clk, rst_n  | in  | 1     | clock; synchronous active-low reset                            |
| buttons     | in  | 4     | [0] start, [1] stop, [2] step one, [3] full speed while held   |
| uart_rx/tx  | in/out | 1  | debug serial link to the PC                                    |
| pair_in     | in  | 32    | airway pressure applied by the ventilator, Q23.8               |
| bypass_tx   | out | 4     | transducer bypass lines, see above                             |
| sync_tx     | out | 1     | synchronization channel                                        |
| leds        | out | 4     | {toggles each step, stalled, stepping, running}                |

The buttons pass through a two-flop synchronizer and act on their rising
edge. They are not debounced.

Releasing button 3 restores the rate that was last programmed.

| parameter    | default          | meaning                                 |
|--------------|------------------|-----------------------------------------|
| CLK_HZ       | 100,000,000      | clock frequency (choice)                |
| BAUD         | 115,200          | rate of every serial line (choice)      |
| CLKS_PER_BIT | CLK_HZ/BAUD      | bit time in clocks                      |
| RATE_DEFAULT | CLK_HZ/256       | cycles per step at reset: real time     |

## Files

`rtl/`, one module or package per file:

- `dm_pkg` holds the types, fixed-point helpers and codes.
- `mockup_top` is the top.
- `resp_mockup` contains `resp_model` and `integrator`.
- `time_ctrl` and `debug_cmd` implement time control and the debug protocol.
- `uart_rx` and `uart_tx` are the serial primitives.
- `bypass_link` and `sync_channel` drive the ventilator-side lines.

`tb/` holds one self-checking testbench per module, named `tb_<module>`. It
also holds two shared helpers:

- `lung_ref_pkg` is a 64-bit integer reference of the lung model.
- `tb_uart_mon` is a serial-line decoder.

There are three whole-design tests:

- `tb_mockup_top` runs a whole debug session with short bit times. It steps at
  rest and runs at a set rate, checking the exact spacing and the rate
  announcement on the sync line. It runs at full speed with stalls and
  exercises READ, PROFILE, BREAK and every button. It compares every sample
  the ventilator receives with the reference model.
- `tb_mockup_full` runs STEP 1 and READ at the default sizes.
- `tb_breathing` closes the loop with a pressure-controlled ventilator. The
  testbench counts sync ticks and switches the airway pressure: 1 s at 10.0,
  then 2 s at 0.0, for three breaths. That is 2,304 steps, or 9 s of
  simulated time at full speed. A breakpoint freezes time in the middle of
  breath 2, and the test steps 10 by hand from there. It checks every sample
  against the reference model, checks that each breath fills and empties the
  lung, and checks that breaths 2 and 3 reach the same tidal volume (about
  116.6 volume units).

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dm_pkg.sv tb/lung_ref_pkg.sv tb/tb_mockup_top.sv \
  --top-module tb_mockup_top -o sim && obj_dir/sim
```

To run another test, replace `tb_mockup_top` with its name. Run with
`+verilator+rand+reset+2` to start from random register contents. The tests
only rely on reset.

## Where this departs from the original system, and what is missing

- **Logic instead of an interpreted model.** The original system ran the lung
  as a compiled SystemC description on an emulation engine: an event kernel
  and a bytecode virtual machine on a soft processor with accelerators, at
  about 1.6 ms per step. Here the model is fixed logic and takes one clock per
  step. Nothing of the engine is built: kernel, bytecode VM, accelerators,
  engine memories, USB bytecode download and the "send file" command.
- **Reduced lung model.** Only part of the 13-equation model is available. The
  rest is completed by analogy, and gas exchange is missing. The second,
  first-order non-linear lung model is not built because its equations are not
  available.
- **Sync channel content.** The original sync channel was used to agree a
  common rate between the two devices. Here the mockup announces its rate and
  sends a tick per step and start/stop events, and it waits for the links.
  The channel is one-way, so the ventilator cannot propose a rate.
- **Choices made for this design:**
  - the number format and signedness (the original used unsigned 32-bit);
  - the constants listed above;
  - the serial framing of every line and the debug byte protocol;
  - button and LED assignment, clock and baud rate;
  - the meaning of PROFILE;
  - the 16-bit STEP count;
  - a breakpoint given as a step count, used once;
  - the `pair_in` port. The original top has no input for the airway
    pressure. Here the ventilator drives it directly as a Q23.8 word and
    the model samples it at each step.
- **Ports left out.** The framebuffer ports of the original top and its
  input/output memory ports are not provided.
