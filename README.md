# Adaptive noise canceller for a WM8731 audio CODEC

A microphone picks up speech mixed with background noise. A second input, the
reference, picks up the noise alone. The noise reaches the microphone through
an unknown acoustic path: delayed, filtered, scaled. This design learns that
path in real time with an LMS adaptive FIR filter. It predicts the noise part of
the microphone signal from the reference and subtracts it. The difference, which
is ideally the speech alone, goes straight back out to the headphones.

The whole per-sample loop runs in FPGA logic at 48 kHz with a 50 MHz clock:
serial audio in, filter, serial audio out. A host processor (the ARM side of an
FPGA SoC) only adjusts the filter through a small memory-mapped register file.
It can also read snapshots of the signals and take an interrupt per sample. It
is never in the sample path.

```
            I2C (startup only)
  WM8731  <------------------- i2c_controller --init_done--+
  CODEC                                                    v
          --I2S ADC (x: left, d: right)--> audio_codec_interface --mic/ref/sample_valid--> lms_filter
          <--I2S DAC (e on both channels)-                 ^                                  |
                                                           +--------------- audio_out (e) ----+
                                                                                               |
  HPS  <== Avalon-MM, IRQ ==>  avalon_regs  --step_size, tap_count, bypass, filter_reset-->---+
                                            <--busy, snapshots--------------------------------+
```

## Signal path and timing of one sample

1. The CODEC is the I2S master. It sends a 64-BCLK frame every 20.8 us: the
   left half carries the reference x[n] and the right half the microphone d[n].
   Each half holds a 16-bit two's-complement word (Q1.15), MSB first, starting
   one BCLK after the LR clock changes.
2. `audio_codec_interface` passes BCLK, both LR clocks and ADCDAT through
   two-flop synchronisers. It detects the edges in the 50 MHz domain and samples
   ADCDAT on BCLK falling edges. When the right word is complete it presents
   both words and pulses `sample_valid` for one clock.
3. On that pulse `lms_filter` captures d[n] and shifts x[n] into its delay
   line. It also captures the step size and tap count, so a register write
   takes effect on the next sample. It then computes the new output in
   2L+1 clocks, where L is the number of active taps (129 clocks at L = 64).
   About 1,041 clocks are available per sample.
4. `audio_out` (e[n]) is registered at the end of that computation and holds
   until the next one. At the next DAC LR-clock change the interface loads it
   into the DAC shift register. It sends e[n] on both channels and changes
   DACDAT on BCLK rising edges. The output of sample n therefore leaves in the
   frame after sample n arrived.
5. On the same `sample_valid` pulse, `avalon_regs` sets STATUS.sample_ready and
   latches the microphone, reference and output snapshots.

Nothing in the audio path runs until `i2c_controller` has finished configuring
the CODEC and raised `init_done`. Until then there is no `sample_valid` and
DACDAT stays low.

## The LMS engine (`lms_filter`)

The filter implements the textbook LMS recursion over L = `tap_count` taps:

```
y[n]  = sum_{k=0}^{L-1} w[k] * x[n-k]
e[n]  = d[n] - y[n]
w[k] <- w[k] + mu * e[n] * x[n-k]        for k = 0 .. L-1
```

It uses a single signed 24x17 multiplier (one DSP block) and a four-state
controller:

| state   | clocks | multiplier computes   | other work                              |
|---------|--------|-----------------------|-----------------------------------------|
| IDLE    | -      | -                     | waits for `sample_valid`                |
| PREDICT | L      | w[k] * x[n-k]         | accumulates y                           |
| SUB     | 1      | mu * e                | e = sat(d - y), drives `audio_out`      |
| UPDATE  | L      | (mu*e) * x[n-k]       | w[k] + delta, saturated, written back   |

`busy` is high from the first PREDICT clock to the last UPDATE clock. That is
exactly 2L+1 clocks.

**Memories.** The weights live in `coeff_ram`, a 64x24 simple dual-port RAM
that maps onto one FPGA block RAM. Its read port has one clock of latency. The
filter hides that latency by always reading one address ahead. It reads k+1
while it uses w[k], and it reads address 0 while idle and during SUB. So w[0]
is already at the RAM output on the first PREDICT and the first UPDATE clock.
In UPDATE the new w[k] goes out through the write port in the same clock that
w[k+1] is read. The two addresses never collide. The reference samples live
in `ref_delay_line`, a 64x16 register shift register with a combinational
read mux, so tap k is x[n-k] directly.

**Number formats.** These are this design's choice; only the widths (16-bit
samples, 24-bit weights, 16-bit step) come from the specification.

| quantity        | format                     | notes                                   |
|-----------------|----------------------------|-----------------------------------------|
| x, d, e, y      | Q1.15 signed               |                                         |
| mu (STEP_SIZE)  | Q0.16 unsigned             | 0x0100 = 0.0039                         |
| w[k]            | Q2.22 signed               | weights between -2 and +2               |
| accumulator     | 46 bits, 37 fraction bits  | cannot overflow for 64 taps             |
| mu*e            | 18 bits, Q2.16             | taken from the SUB product, >>> 15      |
| weight delta    | (mu*e * x) >>> 9           | lands on the Q2.22 grid                 |

Every product is truncated (arithmetic shift). e saturates to 16 bits and
each weight saturates to 24 bits.

**Clearing the weights in one clock.** CONTROL.filter_reset must zero all 64
weights in a single clock, which a block RAM cannot do. The filter therefore
keeps a 64-bit register of "written" flags beside the RAM. A reset clears all
the flags. A weight whose flag is clear reads as zero until UPDATE writes it
again. A reset that arrives mid-computation abandons that sample: `audio_out`
keeps its previous value, and the next sample starts from zero weights.

**Bypass.** With CONTROL.bypass set, each `sample_valid` copies d[n] straight
to `audio_out`. The controller stays in IDLE and `busy` never rises. The delay
line keeps shifting, so the filter resumes with current data when bypass is
cleared. The weights are neither cleared nor adapted.

**Tap count and step size.** Both are sampled on `sample_valid`. Weights above
the active tap count are neither used nor changed. The register file only
accepts tap counts 1..64. The filter also treats 0 as 1 and values above N
as N.

Rough convergence guide, from LMS theory: with reference power Px the
adaptation time constant is about 1/(mu * Px) samples. The filter is stable for
mu < 2/(L * Px). The end-to-end test uses mu = 0x2000 (0.125), L = 16 and
x uniform in +-0.5. There the residual noise falls by more than 20 dB within
800 samples (17 ms). The reset value 0x0100 adapts about 32 times slower.

## I2S framing details (`audio_codec_interface`)

- LR clock low = left = reference x[n] (line input). LR clock high = right =
  microphone d[n].
- ADC: the first BCLK falling edge after an LR change is the alignment slot.
  The next 16 falling edges carry bits 15..0. The design assumes the CODEC
  changes the LR clocks and ADCDAT on BCLK rising edges, so they are stable at
  the falling edge.
- DAC: the shift register loads `dac_sample` at each DAC LR change. The MSB is
  driven on the following BCLK rising edge, which is the second BCLK period of
  the half frame. After the LSB the line goes low.
- All four CODEC inputs pass through identical synchronisers, so their
  relative timing is kept. An edge takes effect about three system clocks after
  it occurs. At 50 MHz there are about 16 system clocks per BCLK period.

## CODEC configuration (`i2c_controller`, `i2c_cmd_rom`)

After reset the controller sends the 16 entries of `i2c_cmd_rom`. Each entry
is a write of three bytes: 0x34 (device address 0x1A, write), then
{reg_addr[6:0], data[8]}, then data[7:0]. Each bit occupies 125 system clocks
(400 kHz). SCL is low for the first half of the bit and high for the second.
SDA changes a quarter bit after SCL falls. A START, the 27 data and acknowledge
bits, a STOP and one idle bit make 30 bit times per write. The whole sequence
takes 60,000 clocks (1.2 ms), after which `init_done` stays high.

SDA is open drain. The controller has an `sda_oe` output, and the
three-state pad driver is in the top level. The acknowledge bit is released
but not checked, and there is no retry.

The table contents are this design's choice for the WM8731. The specification
gives only the count and the record layout. The sequence is:

1. Reset.
2. Power up everything except the outputs.
3. Set the line-in and headphone gains to 0 dB.
4. Route the microphone to the ADC and the DAC to the output.
5. Select I2S, 16-bit words, with the CODEC as master.
6. Select 48 kHz from a 12.288 MHz MCLK.
7. Activate the interface and power up the outputs.

Entries 12-15 repeat the four gain writes to make up 16 writes. Edit
`i2c_cmd_rom.sv` for a different board setup. Note that the WM8731 has a single
stereo ADC with an input selector. Getting microphone and line signals on
separate channels may need a different analogue setup from the one encoded
here.

## Register map (`avalon_regs`)

Avalon-MM slave, 32-bit data, 5-bit word address, zero wait states.
`readdata` is combinational from `address`, and reads have no side effects.
Unused addresses (8-31) and unused bits read 0 and ignore writes.

| word | offset | name       | access | contents                                                          |
|------|--------|------------|--------|-------------------------------------------------------------------|
| 0    | 0x00   | STATUS     | R/W    | [0] sample_ready: set per sample, write 1 to clear; [1] busy (RO) |
| 1    | 0x04   | CONTROL    | R/W    | [0] bypass; [1] filter_reset: write 1 for a one-clock pulse, reads 0 |
| 2    | 0x08   | STEP_SIZE  | R/W    | [15:0] mu, Q0.16, reset 0x0100                                     |
| 3    | 0x0C   | TAP_COUNT  | R/W    | [7:0] active taps, reset 32; writes outside 1..64 ignored          |
| 4    | 0x10   | MIC_SAMPLE | R      | [15:0] d[n] snapshot                                               |
| 5    | 0x14   | REF_SAMPLE | R      | [15:0] x[n] snapshot                                               |
| 6    | 0x18   | OUT_SAMPLE | R      | [15:0] output snapshot                                             |
| 7    | 0x1C   | IRQ_ENABLE | R/W    | [0] irq_en, reset 0                                                |

`irq` is a level signal: sample_ready AND irq_en. Software clears it by writing
1 to STATUS[0]. If a new sample arrives in the same clock as that clear, the
new sample wins.

All three snapshots are latched on the same `sample_valid` pulse. At that
moment the filter has not yet produced e[n], so OUT_SAMPLE holds the output of
the previous sample (e[n-1]). The snapshots read back zero-extended, so
software should cast them to a signed 16-bit value.

## Where this RTL departs from, or adds to, the specification

- Number formats, truncation and saturation, and the flag-based one-clock
  weight clear are this design's choices (see above).
- `busy` is also high during the single SUB clock. The specification says
  PREDICT and UPDATE. Including SUB gives one clean 2L+1 clock pulse.
- I2S one-bit alignment, the CODEC edge convention, and sending e[n] on both
  DAC channels are assumptions.
- The specification calls the reference delay line a circular buffer, but
  also says it shifts. It is a shift register here.
- The I2C command record is 23 bits: {dev_addr[6:0], reg_addr[6:0], data[8:0]}.
  That is the field list the specification gives. Its stated ROM width of 25
  bits does not match it.
- The 12.288 MHz CODEC master clock (AUD_XCK) needs a PLL, which is outside
  this RTL. It enters the top on `aud_xck_pll` and is passed to the pin.
- The I2C SDA three-state driver sits in the top level rather than inside
  `i2c_controller`.
- Resets are asynchronous and active low, without a reset synchroniser.
- The CODEC itself, the ARM processor with its Linux software (keyboard
  handling, `/dev/mem` driver), the audio PLL and the USB keyboard are not
  part of this RTL.

## Files

| file | contents |
|------|----------|
| `rtl/nc_pkg.sv` | register addresses and bits, reset values, widths, FSM state type, I2C command record |
| `rtl/noise_cancel_top.sv` | top level: the four blocks, pins, SDA pad |
| `rtl/i2c_controller.sv`, `rtl/i2c_cmd_rom.sv` | CODEC start-up configuration |
| `rtl/audio_codec_interface.sv` | I2S receiver and transmitter |
| `rtl/lms_filter.sv`, `rtl/coeff_ram.sv`, `rtl/ref_delay_line.sv` | LMS engine and its memories |
| `rtl/avalon_regs.sv` | HPS register file and interrupt |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/wm8731_i2c_model.sv`, `tb/wm8731_i2s_model.sv` | behavioural CODEC models for the testbenches |

Parameters: `lms_filter` has N = 64, DATA_WIDTH = 16 and COEFF_WIDTH = 24.
`i2c_controller` has CLK_DIV = 125. `coeff_ram` and `ref_delay_line` take
DEPTH and WIDTH. The top uses these defaults.

## Verification

Every testbench checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. They use a 1 ns time unit. For example, with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/nc_pkg.sv tb/tb_noise_cancel_top.sv --top-module tb_noise_cancel_top
./obj_dir/Vtb_noise_cancel_top
```

- `tb_lms_filter` runs a bit-exact integer model of the recursion beside the
  filter, at 64 taps. It covers random data, random tap counts and step sizes
  (including saturation), a plant the filter must learn, bypass, filter_reset
  (also mid-sample) and mu = 0. Every output is checked, and so is the busy
  length of 2L+1 clocks and the clock on which `audio_out` changes.
- `tb_audio_codec_interface` runs against the I2S CODEC model at the real
  3.072 MHz and 48 kHz rates. It checks the words in both directions, one
  sample_valid per frame, the frame spacing, and silence before `init_done`.
- `tb_i2c_controller` decodes the bus with an acknowledging CODEC model. It
  checks all 16 writes byte for byte, the SCL period, the bus protocol, and the
  `init_done` timing.
- `tb_avalon_regs`, `tb_coeff_ram`, `tb_ref_delay_line` and `tb_i2c_cmd_rom`
  check their blocks against independent expectations.
- `tb_noise_cancel_top` drives only the top-level pins, at the default sizes
  and real CODEC timing. It takes the design through CODEC configuration, 800
  interrupt-driven samples of adaptation (residual noise down by more than
  20 dB), a too-short filter (4 taps cannot cancel a 6-sample path), bypass,
  filter_reset (the first output after it must equal d[n] exactly),
  re-convergence, and polling mode. It checks the snapshots, busy length and
  IRQ behaviour on every sample. It runs in a few seconds.

Not verified: behaviour against a real WM8731 (the models encode the timing
assumptions above), timing closure, and the analogue quality of the result.
