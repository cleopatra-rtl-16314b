# Cleopatra — 12-channel recycling-integrator current digitizer

Cleopatra reads out hydrogenated amorphous silicon (a-Si:H) dosimetry
sensors, whose currents span more than four decades (about 100 pA to a few
µA). Each channel is a current-to-frequency converter built on the
*recycling integrator* principle. The input current charges an integrator.
Each time the integrator output crosses a threshold, the channel takes back
one fixed charge quantum and emits one count. The number of counts in a
time window, times the quantum, is the charge that flowed in that window.
The output is digital from the start, and the gain does not depend on the
amplifier offset or on the comparator threshold.

This repository holds SystemVerilog for the whole chip:

* the digital logic, synthesizable: pulse generator, up/down counters,
  readout registers, readout multiplexer, configuration registers, serial
  command decoder and output serializer;
* a behavioural model of the analog front end, so that the chip can be
  simulated end to end from input currents to serial output words.

The original chip is a 28 nm CMOS prototype with 12 channels. The prototype
was measured at 500 MHz and is meant to run at up to 640 MHz.

## 1. The converter channel

```
 iin ──►┬──[C_INT]──┐                       clock
        │  (reset)  │                         │
        └──(-) amp ─┴─ V_A ──► clocked ── V_B ──► pulse ──► cnt_up / cnt_dn
           (+) V_REF          comparator(V_TH)     generator
        ▲                                          │   │
        └──◄── gate ◄── C_INJ ◄── V_PULSE (V_QP / V_QN) ◄┘   │
                 └──► V_REF  ◄── !gate ◄──────────────┘
```

The charge quantum is

    Q_INJ = C_INJ · (V_QP − V_QN)          count rate f = I_in / Q_INJ

Switching `V_PULSE` between `V_QP` and `V_QN` pushes `+Q_INJ` through
`C_INJ` on one edge and `−Q_INJ` on the other. `V_GATE` decides which edge
reaches the integrator input. The other edge goes to `V_REF`. Which edge
goes to the input depends on the channel's polarity, so each channel can
measure either current direction.

`C_INT` and `C_INJ` can each be set from 20 to 140 fF in 20 fF steps, with
code `n` giving `n × 20 fF`. With the 600 mV step used here, one count is
12 fC per injection code.

### Pulse generator (`cleo_pulse_gen`)

This is a 4-state Moore FSM. The comparator output is clocked, so `cmp` is
already synchronous:

| state | V_PULSE | V_GATE (polarity 0 / 1) | count strobe | next |
|-------|---------|-------------------------|--------------|------|
| IDLE  | 0 | 1 / 0 (ready for the rising edge) | – | RISE if `cmp` |
| RISE  | 1 | 1 / 0 | `cnt_up` (pol 0) or `cnt_dn` (pol 1) | SWAP |
| SWAP  | 1 | 0 / 1 | – | FALL |
| FALL  | 0 | 0 / 1 | – | IDLE |

For polarity 0 the rising edge, which removes charge, goes to the input. For
polarity 1 the falling edge, which adds charge, goes to the input. The gate
never changes in the same cycle as a `V_PULSE` edge.

Because a sequence lasts four cycles, a channel saturates at **f_clk/4**.
That is 125 MHz at a 500 MHz clock, which matches the behaviour measured on
the chip. Above that current the channel counts exactly one pulse every 4
cycles. The maximum measurable current is therefore

    I_MAX = f_clk/4 · Q_INJ       (1.5 µA for 20 fF at 500 MHz)

To measure a larger current, raise `C_INJ`: resolution goes down and range
goes up.

### Analog front-end model (`cleo_frontend_model`, behavioural)

This model is not synthesizable. It is discrete in time and updates once per
rising clock edge:

1. `q += iin · T_clk`, where `q` is the charge on `C_INT`.
2. If `v_gate` is 1 and `V_PULSE` has changed since the last edge:
   `q −= Q_INJ` on a rising edge, `q += Q_INJ` on a falling edge.
3. `V_A − V_REF = q / C_INT` is clipped to ±`VSAT_MV`.
4. The comparator registers its decision:
   * polarity 0: `V_A − V_REF > VTH_MV`;
   * polarity 1: `V_A − V_REF < −VTH_MV`.

The units are chosen so that everything stays integer:

| quantity | unit |
|----------|------|
| current `iin_fa` | fA (signed, 40 bits) |
| time | ps |
| charge | 1e-27 C |
| capacitance | fF |
| voltage | mV; the observation port `va_uv` is in µV |

Positive current is the direction that makes `V_A` rise. A polarity-0
channel measures positive current; a polarity-1 channel measures negative
current.

The amplifier is ideal: infinite gain and bandwidth, with clipping as the
only non-ideality. The chip has three amplifier variants, four channels
each:

| variant | DC gain | GBW | power |
|---------|---------|-----|-------|
| feed-forward two-stage | 92 dB | 900 MHz | 100 µW |
| current mirror | 42 dB | 240 MHz | 30 µW |
| current mirror with gain boost | 74 dB | 260 MHz | 90 µW |

All twelve channels use the same ideal model. The model has no parasitic
capacitance and no process spread either. On silicon the effective charge
quantum comes out noticeably lower than `C_INJ · ΔV` and needs per-channel
calibration; the model gives the nominal value.

The model's own choices:

| parameter | value | meaning |
|-----------|-------|---------|
| `VTH_MV` | 100 mV | comparator threshold (the count rate does not depend on it) |
| `VSAT_MV` | ±750 mV | clipping level |
| code 0 | treated as code 1 | capacitor codes |

The clipping level is wide enough for one full 600 mV quantum at
`C_INJ = C_INT`. Below that swing, large `C_INJ/C_INT` ratios would lose
charge in the clipping and read high.

## 2. Counting and snapshots

Each channel's strobes drive a 24-bit up/down counter
(`cleo_updown_counter`):

* `cnt_up` adds 1 and `cnt_dn` subtracts 1;
* the counter runs freely and wraps modulo 2^24;
* only reset clears it.

The `latch` input is common to all channels. In the clock cycle where it is
high, every readout register (`cleo_ro_register`) copies its counter. All
twelve channels are therefore sampled at the same instant, and the registers
hold that snapshot while the counters keep running.

To get the charge in a window, take the difference of two snapshots modulo
2^24. For a polarity-1 channel, use the negated difference. At the largest
rate, 125 MHz, the counter wraps every 134 ms, so take snapshots more often
than that.

## 3. Serial interface

There are two serial lines, `din` and `dout`. Both run at half the clock
rate: one bit lasts two clock cycles.

### Command link (`cleo_control_unit`)

**Bit timing.** An internal phase bit starts at 0 on reset and toggles every
cycle. `din` is sampled on edges where the phase is 1, which are the 2nd,
4th, … rising edges after reset is released. The host holds each bit for two
cycles, aligned to that phase.

**Words.** Commands are 16-bit words, MSB first: a 4-bit opcode followed by a
12-bit field.

| opcode | name | action |
|--------|------|--------|
| `0xA` | SEL | chip select. The full word must be `0xA5C3`. |
| `0x1` | REG_SEL | `field[2:0]` becomes the register address for writes |
| `0x2` | REG_WR | writes `field` to the selected configuration register |
| `0x3` | REG_RD | sends the register named by register 6 on `dout` |
| `0x5` | DESEL | chip deselect |
| `0x0` | NOP | no operation. Unknown opcodes also act as NOP. |

**Framing.** While the chip is deselected, the receiver compares the last 16
bits with `0xA5C3` after every bit. A match selects the chip and fixes the
word boundary. From then on the stream is cut into 16-bit words until a
DESEL word arrives.

**Keep the stream continuous.** The link does not pause while the chip is
selected. A host that stops sending inserts bits and breaks the word
framing, so idle time must be filled with NOP words.

**Timing.** A command takes effect in the clock cycle after its last bit is
sampled. A word lasts 32 clock cycles.

### Configuration registers (`cleo_config_regs`)

There are seven registers, each 12 bits wide:

| reg | contents | reset value |
|-----|----------|-------------|
| 0 | channel polarity, bit *i* for channel *i* (1 = negative current) | `0x000` |
| 1 | `[2:0]` C_INT code, `[5:3]` C_INJ code (shared by all channels) | `0x00F` (C_INT 140 fF, C_INJ 20 fF) |
| 2–5 | analog bias tuning words, output on `bias_tune[0..3]` | `0x800` |
| 6 | readout pointer | `0x000` |

A write to address 7 is ignored.

### Readout (`cleo_readout_mux`, `cleo_serializer`)

Register 6 selects what the next REG_RD sends:

| pointer | source |
|---------|--------|
| `0x010 + n` | readout register of channel *n* (0…11) |
| `0x000`–`0x006` | configuration register, zero-extended to 24 bits |
| anything else | 0 |

Each REG_RD sends one 32-bit word on `dout`, MSB first:

    [31:28] header 0xA   [27:4] 24-bit data   [3:0] trailer 0x5

The word takes 64 clock cycles. Its first bit appears in the cycle after the
read command takes effect. `dout` is 0 between words.

The serializer ignores a read command that arrives while it is still sending
a word. Leave at least one NOP after each REG_RD. A typical read of channel
*n* is:

    REG_SEL 6 · REG_WR (0x010+n) · REG_RD · NOP · …

## 4. Module map

```
cleopatra                      top: 12 channels + control
├─ cleo_control_unit           serial command receiver / decoder
├─ cleo_config_regs            7 × 12-bit configuration registers
├─ g_ch[0..11]
│  ├─ cleo_itof                one I→f converter
│  │  ├─ cleo_frontend_model   analog model (behavioural)
│  │  └─ cleo_pulse_gen        4-state recycling FSM
│  ├─ cleo_updown_counter      24-bit
│  └─ cleo_ro_register         24-bit snapshot
├─ cleo_readout_mux            register-6 addressed multiplexer
└─ cleo_serializer             32-bit framed output, half rate
cleo_pkg                       widths, opcodes, register map, framing
```

The top module is `cleopatra`. Its parameters are:

| parameter | default | meaning |
|-----------|---------|---------|
| `N_CH` | 12 | number of channels, at most 12 (register 0 is 12 bits wide) |
| `CNT_W` | 24 | counter and readout register width |
| `CLK_PERIOD_PS` | 2000 | clock period the analog models integrate over |

Its ports:

| port | direction | description |
|------|-----------|-------------|
| `clk` | in | clock |
| `rst_n` | in | asynchronous reset, active low; also closes the integrator reset switches |
| `din` | in | serial command link |
| `latch` | in | snapshot strobe |
| `iin_fa[12]` | in | input current of each channel, in fA |
| `dout` | out | serial output link |
| `bias_tune[4]` | out | registers 2–5 |
| `selected` | out | chip is selected on the command link |

`iin_fa` is how the analog world enters the simulation.

Everything except `cleo_frontend_model` synthesizes. The top is
synthesizable only if the front-end model is replaced by the real analog
macro. For synthesis, use each channel's `cleo_pulse_gen`, counter and
register as the digital part of the channel.

## 5. What is not modelled

The following parts of the chip have no RTL here:

* **The three amplifier variants.** They are transistor-level circuits, and
  all channels use the ideal amplifier model instead.
* **The bias current DACs.** Their structure and transfer function are not
  known; their tuning words leave the top on `bias_tune`.
* **The SLVS drivers and receivers.** These are I/O cells taken from an
  external library. Plain single-ended ports stand in for them.

Several details of this design are its own choices rather than known
properties of the silicon:

* opcode values, the select key, and header/trailer values;
* bit order, sampling phase, and how word alignment is found;
* the configuration register map and reset values;
* the readout pointer map;
* the order of gate and pulse transitions inside the 4-cycle sequence;
* treating the counter's two inputs as up and down strobes;
* the reaction to a read while the serializer is busy;
* the front-end threshold and clipping level.

Any of these may differ from the fabricated chip. The register map, opcodes
and framing constants are collected in `cleo_pkg`, so they are easy to
change.

## 6. Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. They
need Verilator 5 with `--timing`. Example:

```
verilator --binary --timing --assert -Irtl rtl/cleo_pkg.sv \
    rtl/cleo_frontend_model.sv rtl/cleo_pulse_gen.sv rtl/cleo_itof.sv \
    rtl/cleo_updown_counter.sv rtl/cleo_ro_register.sv rtl/cleo_readout_mux.sv \
    rtl/cleo_config_regs.sv rtl/cleo_control_unit.sv rtl/cleo_serializer.sv \
    rtl/cleopatra.sv tb/tb_cleopatra.sv --top-module tb_cleopatra -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_cleopatra` | Full chip at default parameters: select, configure, two snapshot windows read over the serial link for every channel, and a change of C_INJ. It checks every channel's count against `I·t/Q_INJ` (±2), including saturated channels and negative-polarity channels. It also checks configuration readback, that a snapshot holds, and deselect. |
| `tb_cleo_transfer_function` | One channel swept over 0–100 nA and 0–3.5 µA for all seven C_INJ codes (182 points), checked against the ideal transfer function with saturation at f_clk/4. |
| `tb_cleo_itof` | One channel at selected currents, both polarities, rate limit. |
| `tb_cleo_frontend_model` | Ramp slope, threshold, gated and ungated injection, clipping, reset. |
| `tb_cleo_pulse_gen` | Cycle-exact V_PULSE / V_GATE / strobe sequence, 4-cycle rate, latency. |
| `tb_cleo_updown_counter`, `tb_cleo_ro_register`, `tb_cleo_readout_mux`, `tb_cleo_config_regs`, `tb_cleo_control_unit`, `tb_cleo_serializer` | Each block against an independent reference: random stimulus, protocol corner cases, bit timing. |

The command-link testbenches show how to drive `din`. Hold each bit for two
cycles, never pause while the chip is selected, and fill idle time with
NOPs. Take a snapshot *during* a NOP word, as `tb_cleopatra` does.
