# Guitar effector: a real-time effects pedal in FPGA logic

An electric guitar is plugged into an AK4565 audio codec on an FPGA board.
The codec turns the guitar into one 16-bit sample every 20.48 µs (a 48.8 kHz
frame), the FPGA applies an effect, and the codec plays the result back. There
are six effects:

| code | effect | what the logic does |
|------|--------|---------------------|
| 000 | clean | passes the sample through |
| 001 | distortion | folds negative samples up (bitwise inversion of negative values) |
| 100 | delay | x/2 plus x/4 from 0.5 s earlier |
| 110 | echo | recursive: y = x/2 + y(0.5 s earlier)/2 |
| 101 | flange | x/2 plus an earlier copy, with the delay sweeping 0–3 ms |
| 111 | flange with feedback | the recursive form of the flange |

The three delay-based effects share one idea. The board's external 256K × 16
SRAM is used as a circular buffer of past samples. A write pointer advances by
one each frame, and the delayed sample is read `d` words behind it. A
processor on the same FPGA runs a small menu program. It writes the 3-bit
effect code into a bus register. The hardware in this repository is
everything between that register, the codec pins and the SRAM pins.

This RTL reproduces a published student design, referred to below as "the
original". Where this RTL differs from it, the text says so.

## Signal flow

```
 codec ─sdto0─► ak4565 ─adc_dtout─► sample_latch ─latch16bit─┬─► distortion ──┐
   ▲            (clocks,                ▲                    ├─► sram_fx ◄──► SRAM
   │             serial I/O,            │ snd_output         └─ clean ──────┐ │
   └──sdti──────  control port)◄dac_dtin┘◄──────── fx_mux ◄─────────────────┴─┘
                     ▲  ▲                             ▲
             codec_init  gen_trigger ─trigger─► sram_fx   opb_fx_reg (effect code)
```

All the effects run on every sample, and `fx_mux` picks the one that is
heard. The SRAM unit therefore keeps filling its buffer even while clean or
distortion is selected. Switching to delay or echo then plays the last 0.5 s
at once.

## Frame timing: the part to understand first

Everything runs on the 50 MHz system clock. A frame lasts 1024 clocks.

* **Codec clocks.** A 2-bit counter divides 50 MHz by 4 to get 12.5 MHz.
  Its inverse is the codec master clock `mclk`, at 256 × fs. An 8-bit counter
  stepped at 12.5 MHz gives the other clocks from its bits:
  * bit 1 is the control clock, 3.125 MHz;
  * bit 2 is the bit clock `bclk`, 1.5625 MHz, which is 32 bits per frame;
  * bit 7 is the frame clock `lrclk`.

  All of them are registered on the same 12.5 MHz edge. The codec needs that
  alignment with `mclk`.
* **Input.** While `lrclk` is 0, the codec shifts the mono sample out MSB
  first, 16 bits. This is the opposite half to the one the board manual names.
  The receiver samples `sdto0` on the rising bit clock. When `lrclk` goes to 1,
  it copies the word to `adc_dtout` and raises `adcdone`.
* **Output.** A second 8-bit counter runs 4 steps (half a bit period) ahead of
  the first. Its bit 2 is therefore the inverted bit clock, so the output bits
  change on the falling `bclk` and the codec reads them on the rising one. Its
  bit 7 (`da_stream`) opens the output half of the frame. While `da_stream`
  is 1, the serialiser reloads `dac_dtin` on every bit and `dacload` is 1.
  While `da_stream` is 0, it shifts the word out MSB first.
* **The window.** `adcdone` and `dacload` are both 1 for about 500 clocks of
  each frame. The window opens when `lrclk` rises, halfway through the frame,
  and closes just before the output counter starts the next word. During
  that window:
  * `sample_latch` copies `adc_dtout` to `latch16bit` on every clock, and the
    effect output to `dac_dtin`;
  * `gen_trigger` starts the SRAM unit exactly once. An arming flag is set
    outside the window and cleared when the unit reports `done`.

  The SRAM unit needs 3 clocks, and distortion needs 1.
* **Latency.** A sample received in frame *r* is played during frame *r+1*.
  That is one frame, 20.5 µs.

Instead of using the divided clocks as flip-flop clocks, as the original does,
`ak4565_clkgen` raises one-clock enable strobes. A strobe comes one clock
after each divided clock rises: `sb_rise`, `snb_rise`, `fs64_rise` and
`lr_rise`. All logic acts on those strobes. The pins see the same waveforms.

## The SRAM effects unit (`sram_fx`)

Each processed sample runs through three states:

| state | SRAM | what happens |
|-------|------|--------------|
| IDLE | read at `c_addr - d` | on `trigger`, capture the read word (halved) and go to S1 |
| S1 | read | `snd_out <= x/2 + read/2`; load the address register with `c_addr` |
| S2 | write at `c_addr` | store `feedback ? snd_out : x/2`; `done = 1`; `c_addr++` |

* **Fixed delay.** With `effect_sel = 0`, `d` is `delay_len`. The top level
  sets it to 0x05DC0, which is 24000 samples or 0.49 s. The subtraction wraps
  modulo 2^18, so the buffer needs no start or end handling.
* **Halving.** Both the input and the word read back are halved by an
  arithmetic shift right before they are added, so the sum always fits in
  16 bits.
  * Without feedback, the buffer holds x/2. A delay therefore hears its
    repeat at a quarter of the original level.
  * With feedback, the buffer holds y, and each repeat is half the one
    before it.
* **Flanger sweep.** The delay comes from `flange_lfo`, which divides 50 MHz
  by 2^10 and then by 2^7. That gives 381 Hz, one step every 2.6 ms. Each
  step moves a 12-bit counter up or down by one. The direction turns after
  the count passes 0x08F going up and 0x001 going down. The delay therefore
  sweeps 0…144 samples (0–3 ms) and back, one full cycle in about 0.75 s. The
  sweep runs freely and is not tied to the codec frame.
* **SRAM timing.** The address is registered. The SRAM is asynchronous and
  read combinationally, so read data is valid in the clock after the address
  changes. A write is the single clock in S2 with `sram_rnw = 0`.
  Assertions in `sram_fx` check that a write lasts one clock and goes to the
  write pointer.

## Codec control and power-up (`ak4565_ctrl_tx`, `codec_init`)

The codec's control port takes 16-bit words: a 3-bit opcode, a 5-bit address
and 8 data bits, MSB first.

1. `codec_init` counts 2^15 frames after reset (0.67 s).
2. It holds `c_wr` for one bit-clock period, which loads the word 0xE020
   (opcode 111, address 0, data 0x20).
3. `ak4565_ctrl_tx` pulls `au_cs` low for exactly 16 control clocks. It
   changes the data on the falling control clock, and raises `c_done` on the
   16th.
4. `codec_init` then enters its normal state for good.

On the board, the codec's control clock and data run over SRAM data lines 0
and 1. Until the normal state is reached:

* the top drives the SRAM data pins with `{14'b0, cdti, cclk}`;
* the SRAM is disabled;
* the effects unit is not started.

This RTL hands the pins to the SRAM only when the normal state is reached
*and* `au_cs` is high again. The original switches as soon as initialisation
reports done, one control clock before the chip select rises. In simulation,
that let the first SRAM write clock a 17th bit into the codec.

## Effect register on the processor bus (`opb_fx_reg`)

This is a slave on the processor's OPB bus. OPB bit 0 is the MSB, which is
bit 31 here.

* The address is compared with `SEL_ADDR`, default 0xFEFF1001. That is the
  value the original decodes. Its system description assigns the peripheral
  0xFE100000–0xFE1FFFFF instead.
* The code travels in OPB data bits 0..2, which are `opb_dbus[31:29]`.
* The inputs are registered. A four-state machine (IDLE, SELECTED, READ,
  XFER) is encoded so that only XFER has its top bit set. That bit is the
  acknowledge:
  * a write is acknowledged at the second clock edge after select;
  * a read is acknowledged at the third edge, with the code in
    `sln_dbus[31:29]`.
* After reset, the code is 000 (clean).

## Files

| file | contents |
|------|----------|
| `rtl/gfx_pkg.sv` | widths, effect-code enum, default delay and control word |
| `rtl/gdsp.sv` | top level and SRAM/codec pin logic |
| `rtl/ak4565.sv` | codec controller, wrapping `ak4565_clkgen`, `ak4565_adc_rx`, `ak4565_dac_tx` and `ak4565_ctrl_tx` (one file each) |
| `rtl/codec_init.sv` | power-up wait and control-word sequencing |
| `rtl/sample_latch.sv`, `rtl/gen_trigger.sv` | per-frame sample exchange and effect start |
| `rtl/distortion.sv`, `rtl/sram_fx.sv`, `rtl/flange_lfo.sv`, `rtl/fx_mux.sv` | effects |
| `rtl/opb_fx_reg.sv` | OPB slave holding the effect code |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/gdsp_checker.sv` | end-to-end stimulus, reference model and mechanism counters |
| `tb/ak4565_model.sv`, `tb/sram_model.sv` | behavioural codec serial port and SRAM |

### Top-level parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DELAY_LEN` | 18'h05DC0 | fixed delay of delay and echo, in samples |
| `CTRL_WORD` | 16'hE020 | word sent to the codec control port |
| `INIT_BITS` | 16 | power-up wait is 2^(INIT_BITS-1) frames |
| `SEL_ADDR` | 32'hFEFF1001 | bus address of the effect register |
| `LFO_LR_BITS`, `LFO_RATE_BITS` | 10, 7 | flanger step is every 2^(sum) clocks; lower them only to shorten simulations |

## What is not here

The following are outside this RTL:

* the processor, the bus arbiter, the UART, the interrupt controller and the
  program memory (vendor IP);
* the menu program;
* the codec and SRAM chips;
* the pad buffers.

The SRAM data bus is brought out as `pb_d_o`, `pb_d_oe` (1 = drive) and
`pb_d_i`, to be joined by a bidirectional pad at the board level. The OPB
byte enables and sequential-address input are accepted but not used. Error,
retry and timeout-suppress are tied to 0.

### Choices made here

These are this design's own choices rather than the original's:

* **Clocking.** There is a single clock domain with enable strobes in place
  of ripple-clocked logic. Reset is synchronous.
* **Effect codes.** The codes for delay, echo and the flanges are this
  design's own. Only two points are fixed by the original: bit 1 of the code
  means feedback and bit 0 means the flanger delay.
* **SRAM read latch.** The unit captures SRAM read data only on the trigger
  clock. The original's listing, through a comparison typo, captures it on
  every clock. The result is the same, because the address does not change
  in between.
* **Pin hand-over.** The chip-select wait described above.

## Simulating

Each testbench ends by printing `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gfx_pkg.sv tb/sram_fx_tb.sv --top-module sram_fx_tb -Mdir obj_sram_fx
obj_sram_fx/Vsram_fx_tb
```

Replace `sram_fx_tb` with any testbench in `tb/`. The block testbenches
compare against values computed inside the testbench. A few examples:

* `sram_fx_tb` keeps its own circular buffer. It covers delay, echo, both
  flanges and the 24000-sample delay wrapping below address 0.
* `flange_lfo_tb` follows the triangle sweep and checks the 2^17-clock step
  period.
* `ak4565_tb` runs the controller against the codec model.

Two testbenches cover the whole design:

* **`gdsp_tb`** runs the top at reduced sizes. It uses an 8-frame power-up
  wait, a 5-sample delay and a fast sweep, and finishes in about a second.
* **`gdsp_full_tb`** runs it with every parameter at its default. That is
  about 10^8 clocks, or 2 s of audio, and takes about 80 s. It covers:
  * the full power-up wait;
  * 24200 frames of 0.5 s delay;
  * a whole 0…144…0 flanger sweep;
  * all other effects.

Both use `gdsp_checker`. It plays random samples through the codec model and
compares every played sample with a sample-level reference model. It also
counts these mechanisms and fails if any never happens:

* codec initialisation;
* each of the six effects;
* feedback writes;
* the buffer wrap;
* both sweep turns;
* bus reads and writes.
