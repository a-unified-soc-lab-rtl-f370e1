# Audio peripheral for a small RISC-V SoC

This design is an audio output peripheral for a small microcontroller-class
RISC-V system. The CPU writes stereo 24-bit samples into a FIFO through a few
memory-mapped registers. The samples leave the FIFO at the audio sampling rate
by one of two routes:

- **I2S**, to an external stereo DAC chip (a CS4344 or similar);
- **on-chip DAC**, an 8-bit current-steering DAC: a thermometer encoder switches
  255 equal current sources, and an amplifier turns their summed current into
  the line voltage.

When the FIFO runs low, an interrupt asks the CPU for more data.

Everything runs in one clock domain. The main clock is 98.304 MHz, which is
exactly 2048 × 48 kHz. Every audio clock is therefore an integer division of
it, so no PLL is needed. There is no clock-domain crossing: the audio rate
exists only as one-cycle enable strobes.

The CPU itself is not part of this RTL. Its side of the bus (Wishbone), its
interrupt input and its reset are ports of the top level.

## Structure

```
              audio_soc_top
 arst ──► reset_sync ──► rst ─────────────────────────────────────► rst_o (to CPU)
                          │
 wb_req_i ──►┌────────────┴─ audio_ip ───────────────────────────────────┐
 wb_rsp_o ◄──┤ audio_control ──push {L,R}──► audio_fifo ──rdata──► MODE mux│
             │   CTRL0, STAT0, FIFO_LOW,        │ level,full         │   │ │
             │   FIFO_LEVEL, AUDIO_L/R          ▼                    │   │ │
 low_o ◄─────┤            level < FIFO_LOW ──► low                   │   │ │
             │                                                       ▼   │ │
             │ i2s_clock_divider ──ticks──► i2s_tx ──► MCLK SCLK LRCK SDATA │
             │                                       (rd once per frame)   │
             │ audio_dac: dac_clock_divider ──strobe──► thermometer_encoder │
             │                   (strobe = FIFO rd)          │ 255 lines   │
             └───────────────────────────────────────────────┼────────────┘
                                 dac_current_sources (model) ◄┘
                                          │ current
                                 dac_buffer_amp (model) ──► line_o (volts)

 sine_i2s_system (beside it): sine_generator ─► audio_fifo ─► i2s_tx ─► tone_* pins
```

| File | Role |
|---|---|
| `rtl/audio_pkg.sv` | Register offsets, bit positions, `ctrl0_t`, Wishbone `wb_req_t` / `wb_rsp_t` |
| `rtl/audio_soc_top.sv` | Platform top: reset block, peripheral, DAC analog models, standalone tone system |
| `rtl/reset_sync.sv` | External reset: asynchronous assertion, release two clocks later |
| `rtl/audio_ip.sv` | The peripheral: the blocks below, plus the MODE multiplexer and the low comparator |
| `rtl/audio_control.sv` | Wishbone responder and register file |
| `rtl/audio_fifo.sv` | 48-bit first-word-fall-through FIFO with level/full/empty |
| `rtl/i2s_clock_divider.sv` | MCLK and SCLK toggle strobes |
| `rtl/i2s_tx.sv` | I2S transmitter |
| `rtl/audio_dac.sv` | Digital part of the on-chip DAC |
| `rtl/dac_clock_divider.sv` | DAC sampling strobe |
| `rtl/thermometer_encoder.sv` | 8-bit code to 255-line thermometer code |
| `rtl/dac_current_sources.sv` | Behavioural model (analog): 255 switched unit currents, summed |
| `rtl/dac_buffer_amp.sv` | Behavioural model (analog): current-to-voltage stage and output buffer |
| `rtl/sine_generator.sv`, `rtl/sine_i2s_system.sv` | Standalone tone system |

## Programming model

All registers are 32 bits wide. The peripheral decodes only address bits [7:2].

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x00 | CTRL0 | RW | [3] I2S_EN, [2] DAC_EN, [1] MODE (1 = on-chip DAC, 0 = I2S), [0] RST |
| 0x04 | STAT0 | R | [2] FULL, [1] EMPTY, [0] LOW |
| 0x08 | FIFO_LOW | RW | Low threshold, in FIFO words |
| 0x0C | FIFO_LEVEL | R | Words currently in the FIFO |
| 0x10 | AUDIO_LEFT | W | [31] COMMIT, [23:0] left sample (two's complement) |
| 0x14 | AUDIO_RIGHT | W | [31] COMMIT, [23:0] right sample |

**Writing samples.** Write AUDIO_LEFT and AUDIO_RIGHT in either order. Set
COMMIT only on the second write. That write pushes the pair into the FIFO as
one 48-bit word `{left, right}`. The committing write's own sample goes straight
into the word, so the pair is complete in the same cycle. A write without COMMIT
only updates that channel's buffer. If the FIFO is full, a commit is dropped.
Software should check FULL or FIFO_LEVEL first.

**Low interrupt.** `low_o` is high while `FIFO_LEVEL < FIFO_LOW`. The same bit
appears as STAT0.LOW. It is meant for an external-interrupt input of the CPU.
A driver's refill routine runs on it and tops the FIFO up. After reset
FIFO_LOW is 0, so `low_o` stays low until software sets a threshold.

**Control bits.**
- **RST** holds the FIFO, the clock divider, the I2S transmitter and the DAC in
  reset for as long as it is set. The FIFO empties, and commits made meanwhile
  are lost. The registers themselves keep their values.
- **I2S_EN** and **DAC_EN** switch each output on or off.
- **MODE** picks which of the two outputs the FIFO feeds. The other output gets
  all-zero data, and the FIFO ignores its read strobes. So an enabled but
  unselected I2S port sends silence.

**Bus timing.** The bus is classic Wishbone with 32-bit data. An access
(`cyc & stb`) is acknowledged exactly one clock later, with registered read
data. Byte selects are ignored. `err` is never raised. Unmapped and write-only
offsets read as zero. An assertion in `audio_control` checks that an
acknowledge always answers a request from the previous cycle.

## How samples are paced

The consumer sets the rate. The CPU side only fills the FIFO, and whichever
output is selected pulls one word per sample period:

- **I2S path.** `i2s_clock_divider` sends a strobe every 4 clocks (MCLK half
  period) and every 16 clocks (SCLK half period). `i2s_tx` toggles MCLK and
  SCLK on these strobes, giving MCLK = 12.288 MHz (256 Fs) and
  SCLK = 3.072 MHz (64 Fs).
  - A frame is 64 SCLK periods, which is 2048 clocks or 48 kHz. It is a
    32-bit left slot (LRCK low) followed by a 32-bit right slot (LRCK high).
  - LRCK and SDATA change on the falling SCLK edge.
  - Each 24-bit sample is sent MSB first, starting one SCLK after the LRCK
    change (standard I2S). The rest of the slot is zeros.
  - On the falling edge that starts a frame, `rd` is high for one clock. The
    transmitter takes the FIFO's fall-through output in that same clock.
  - When I2S_EN is off, all four lines are low. The first frame after enable
    has no LRCK falling edge before its left slot, so a receiver picks up only
    its right sample.
- **On-chip DAC path.** `dac_clock_divider` raises a one-clock strobe every 2048
  clocks. The strobe is both the FIFO read and the clock enable of the
  thermometer encoder's output register. In one clock the FIFO advances and the
  encoder loads the new code. On silicon this strobe gates the encoder's clock,
  so the DAC's sampling rate is set without a second clock domain.
- **Underrun.** If the FIFO is empty, its output reads as zero. Either path
  then plays silence: a zero I2S frame, or mid-scale on the DAC.

## On-chip DAC

The encoder's bus to the FIFO is 8 bits wide. It takes the top 8 bits of the
**left** sample. The sign bit is inverted, which turns two's complement into
offset binary:

- −full scale gives code 0;
- 0 gives code 128;
- +full scale gives code 255.

For code N, lines 0 to N−1 of the 255-line thermometer code are on. Each code
step switches exactly one more unit source, so the output is monotonic by
construction. After reset the encoder holds code 128, so the output rests at
mid-scale.

The current sources and the amplifiers are analog circuits. They are written
as behavioural models with `real` ports, and they are not synthesizable:

- `dac_current_sources`: i_out = 10 µA × (number of lines on);
- `dac_buffer_amp`: v_line = 1 kΩ × i_in, clipped to 0…3.3 V.

So `line_o` spans 0 to 2.55 V, in steps of 10 mV. The unit current, the
resistance, the supply and the 1 ns delays are placeholder values. They are not
properties of a real cell. These two models are the only part of the top that
a synthesis tool cannot read. `audio_ip`, which ends at the thermometer code,
is fully synthesizable.

## Standalone tone system

`sine_i2s_system` is the CPU-less first form of the same audio path: a sine
generator fills the FIFO, and the I2S transmitter plays it. It is useful for
bringing up a board before the bus interface exists. In the top it stands beside
the peripheral with its own pins (`tone_*`) and shares only clock and reset.

The generator is a "magic circle" oscillator. It rotates the integer pair (x, y)
by a fixed angle w each step:

    x ← x − (E·y) >>> 16
    y ← y + (E·x_new) >>> 16,      E = 2·sin(w/2)·2^16

It needs no table and two multiplies per step. With E = 8572, w = 2π/48, which
gives a 1 kHz tone at 48 kHz. Its amplitude is 2^22, half of full scale.
Starting from x = 2^22, y = 0, the output follows 2^22·sin(n·w) to within 0.5 %.
The generator offers a word whenever the FIFO is not full and steps when the
word is taken. The FIFO and the I2S reads therefore set its pace.

## Parameters

| Module | Parameter | Default | Origin |
|---|---|---|---|
| all | main clock | 98.304 MHz | platform choice: an exact multiple of 48 kHz |
| `audio_ip`, `audio_fifo` | FIFO width | 48 | two 24-bit samples |
| `audio_ip`, `audio_fifo` | `FIFO_DEPTH` / `DEPTH` | 512 | this design's (10.7 ms at 48 kHz) |
| `i2s_clock_divider` | `MCLK_DIV`, `SCLK_DIV` | 8, 32 | this design's (256 Fs, 64 Fs) |
| `i2s_tx` | `SAMPLE_W`, `SLOT_W` | 24, 32 | 24 from the sample format; slot width this design's |
| `audio_dac`, `dac_clock_divider` | `DIV` | 2048 | this design's (48 kHz) |
| `thermometer_encoder` | `IN_W`, `N` | 8, 255 | DAC architecture |
| `dac_current_sources` | `I_UNIT` | 10 µA | placeholder |
| `dac_buffer_amp` | `R_TI`, `VDD` | 1 kΩ, 3.3 V | placeholder |

The FIFO depth must be a power of two. `MCLK_DIV` and `SCLK_DIV` must be even.

## What is given and what is chosen

This RTL implements the audio peripheral of the teaching platform described
in "A Unified SoC Lab Course: Combined Teaching of Mixed Signal Aspects, System
Integration, Software Development and Documentation" (Pfau et al.). That
description gives the block structure and the register table but few
implementation details.

These parts follow the published description:

- the three-block platform (reset, CPU, peripheral);
- the register map up to AUDIO_LEFT, with its bit positions and access kinds;
- the COMMIT protocol and the 48-bit FIFO word;
- CTRL0.RST as a software reset of the audio blocks;
- the MODE multiplexer;
- the low comparison against FIFO_LOW, used as an interrupt;
- the single 98.304 MHz clock domain with divided I2S clocks;
- the on-chip DAC: a strobe that both reads the FIFO and enables the encoder,
  an 8-bit input, 255 current sources, and a current-to-voltage stage followed
  by a buffer;
- the sine → FIFO → I2S standalone system.

These are this design's own choices:

- AUDIO_RIGHT at 0x14, with the same layout as AUDIO_LEFT;
- classic Wishbone with a one-clock acknowledge;
- ignoring byte selects;
- dropping a commit when the FIFO is full;
- the FIFO depth, and zero output on underrun;
- 48 kHz for both outputs, and the I2S format details;
- feeding the DAC from the left channel, with offset-binary conversion;
- mid-scale reset of the encoder;
- the oscillator inside the sine generator;
- all analog values.

The low interrupt uses "level strictly below threshold". A driver that expects
the interrupt once the level *reaches* the threshold has to set FIFO_LOW one
higher.

Not included:

- the CPU and its peripherals (GPIO, JTAG, SPI, I2C, UART, execute-in-place
  flash, external interrupt controller);
- the external stereo DAC chip, the clock oscillator and the board components;
- any transistor-level behaviour of the DAC: mismatch, settling, noise.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Two helpers are shared:

- `tb/i2s_rx_model.sv` is an independent I2S listener. It decodes frames from
  the four lines the way a DAC chip would.
- `tb/wb_bfm_tasks.svh` holds Wishbone master tasks. Testbenches include it.

Run one testbench with Verilator 5 from the repository root:

    verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_audio_soc_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/audio_pkg.sv tb/tb_audio_soc_top.sv
    ./obj_dir/Vtb_audio_soc_top

`tb_audio_soc_top` runs the whole platform at its default parameters, in a few
seconds. It goes through these steps:

- an asynchronous reset;
- filling all 512 FIFO words, then a dropped commit;
- 20 I2S frames, checked word by word and for the 2048-clock period;
- the low interrupt, which rises as the level passes below 500;
- a software reset, and an underrun;
- a switch to the on-chip DAC, checking the line voltage of each sample;
- the standalone tone against a reference sine.

It counts each of these mechanisms and fails if any of them never happened.
`tb_audio_ip` runs the same steps at register level with a 16-word FIFO. The
block testbenches cover the rest:

- `tb_i2s_tx`: I2S timing, enable and disable;
- `tb_audio_control`: all registers and both commit orders;
- `tb_audio_fifo`: the FIFO, with random traffic against a queue model;
- `tb_thermometer_encoder`: all 256 codes;
- `tb_audio_dac`, `tb_dac_clock_divider`: DAC rate and codes;
- `tb_dac_current_sources`, `tb_dac_buffer_amp`: the analog models;
- `tb_reset_sync`: reset timing;
- `tb_sine_generator`, `tb_sine_i2s_system`: the tone against `$sin`.

`tb_audio_streaming` plays 1000 frames of a known sample sequence on the
default-size platform. It drives the peripheral the way a driver would, first
polling STAT0.FULL and then refilling from the low interrupt. It checks every
frame for loss, repetition or reordering, and checks that the FIFO never runs
dry.
