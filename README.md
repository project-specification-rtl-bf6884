# ABCD3T: binary readout chip for silicon strip detectors

ABCD3T reads 128 silicon strips at a 40 MHz beam crossing rate. The chip does
not digitise pulse heights. Each strip's discriminator gives one bit per
crossing: hit or no hit. The chip has three jobs:

1. Hold every crossing's hit bits until the trigger decision arrives, 132
   clocks later.
2. On a trigger (L1), keep the three crossings around the triggered one.
3. Send only the strips that were hit. They go as short serial packets on a
   chain of chips that share one optical link.

This repository holds the digital part of the chip as synthesizable
SystemVerilog. The analogue parts are outside the RTL: amplifiers,
discriminators, DACs, the calibration delay line (modelled behaviourally) and
the pads. The top
module brings their digital controls out as ports.

## Signal path

```
 hits[127:0] --> input_register --> pipeline (132 x 128) --L1--> readout_buffer (24 x 128)
                  (latch, edge,      (+ accumulator)               (8 events, overflow count)
                   mask, test)                                           |
                                                                  data_compression
                                                                 (criterion, next hit)
                                                                         |
 datain (from next chip) --> readout_logic (packets, token) --> readout_controller --> dataout
                                                               (master: header, event FIFO,
                                                                end chip: trailer)  --> datalink
 com/clk --> clk_cmd_select --> command_decoder --> config / mask / DAC / trim / delay registers
```

All logic runs on one clock, chosen from two differential clock pairs by the
`select` pin. The commands come on a serial line, also chosen from two pairs.
Nothing in the chip is parallel-loaded from outside. Every setting, every
trigger and every reset arrives as a bit string on that command line.

## The trigger path

- **Input register.** It samples `hits` every clock and ANDs the result with
  the 128-bit mask.
  - With edge detection on, a channel gives a 1 only in the first clock of a
    hit. A long discriminator pulse is then still counted once.
  - In test mode the mask contents replace the hits.
  - The "pulse input register" command sets every unmasked channel for one
    clock.
- **Pipeline.** It delays each sample by exactly 132 clocks. It is written as
  a circular memory that is read and then written at the same address. The
  accumulator is a register that ORs in every word leaving the pipeline. It
  is cleared only by reset. The pipeline memory itself is never cleared, so
  two resets at least 132 clocks apart are needed to empty the accumulator.
- **Capture.** An L1 command makes the decoder raise `level1` for one clock
  and `level3` for three clocks.
  - During `level3`, the pipeline output register takes the three crossings
    centred on the triggered one. In accumulator mode it takes the
    accumulator three times instead.
  - One clock later the three words are written into the readout buffer.
  - The capture window is fixed. It lies 132 clocks plus the command latency
    after the sample entered the input register.
- **Readout buffer.** It holds 24 words, which is 8 events of 3 samples.
  - If a trigger arrives while 8 events are stored, the oldest event is
    overwritten and a 4-bit overflow counter counts up.
  - Every event read counts the counter down by one.
  - While the counter is non-zero, the next event read is reported as an
    overflow instead of being scanned.
  - If the counter wraps (16 lost events), a sticky buffer-error flag is set.

## Data compression

An event is 128 patterns of 3 bits, oldest sample first. The readout mode
(configuration bits 1:0) says which patterns are worth sending:

| mode | name  | pattern sent      |
|------|-------|-------------------|
| 00   | hit   | any bit set       |
| 01   | level | middle bit set    |
| 10   | edge  | `01x` (new hit)   |
| 11   | test  | every channel     |

A priority encoder finds the lowest matching channel in one clock. Each
`next` pulse from the readout logic moves to the next match above it. With
each hit the block also reports:

- `adj`: the next hit is on the neighbouring channel;
- `end`: this is the last hit of the event.

These two signals let the readout logic choose the packet format.

## The readout chain

This is the part that needs the most care. The chips of one module side form
a chain.

- **Master.** One chip is the master. It is selected by the `masterB` pin
  and configuration bit 11.
  - It keeps an event FIFO of {4-bit L1 count, 8-bit crossing count} tags,
    24 deep, pushed on every L1.
  - For each tag it sends a header on the datalink:
    `11101 0 nnnn bbbbbbbb 1`.
  - It then starts the token.
- **Token passing.** A chip that gets the token sends its packets for the
  oldest event and passes the token on.
- **End chip.** The last chip, configuration bit 12, appends the trailer
  `1000 0000 0000 0000`.
- **Data forwarding.** A chip that is not sending forwards the data from its
  `datain` to its `dataout` through one register. The master's link output
  is therefore one continuous stream: header, chip 0, chip 1, …, trailer.
- **End of event.** The master watches its own output for the trailer. After
  the trailer it pops the next tag.

Packets, most significant bit first, where `aaaa` is the chip address
(ID<3:0>):

| packet                   | bits                                              |
|--------------------------|---------------------------------------------------|
| physics                  | `01 aaaa ccccccc 1 ddd`, then `1 ddd` per adjacent hit |
| no hit                   | `001`                                             |
| no data (token, no event)| `000 aaaa 001 1`                                  |
| buffer overflow          | `000 aaaa 010 1`                                  |
| buffer error             | `000 aaaa 100 1`                                  |
| configuration (Send_ID)  | `000 aaaa 111 cccccccc 1 cccccccc`                |

A run of hits on neighbouring channels costs 4 bits per extra channel instead
of 17. An event with all 128 channels in test mode is 17 + 127 × 4 = 525 bits
per chip.

**Gapless timing.** The token is a one-clock pulse given together with the
last-but-one bit of the chip's own data. The next chip takes the token at the
following edge and puts its first bit on its output at once. That bit passes
through this chip's forwarding register and lands right after this chip's
last bit. The master's header uses the same rule, so no idle bits appear
anywhere between header and trailer. This matters because the receiver finds
packet boundaries only from the bit patterns. The end chip's trailer is timed
the same way from its own token output.

**Bypass.** Every token and data port exists twice: normal and bypass (`BP`).

- Configuration bit 10 (output bypass) moves a chip's token and data outputs
  to the bypass pins.
- Configuration bit 9 (input bypass) makes it listen on its bypass inputs.

With bypass links wired two chips apart, a dead chip can be skipped. The
end-to-end test does exactly this with the middle of three chips.

**Send_ID.** After power-up, and after any command whose register code
starts with 0, a chip answers every trigger with its configuration packet
instead of hit data. This identifies the chips on the chain. The "enable data
taking" command (`101000`) returns it to normal readout.

## Commands

The idle line is 0, and every command begins with a 1.

| bits                                     | action                                |
|------------------------------------------|---------------------------------------|
| `110`                                    | L1 trigger                            |
| `101 0100`                               | soft reset (data path, counters)      |
| `101 0010`                               | beam crossing counter reset           |
| `101 0111 <n:8> <addr:6> <reg:6> <data>` | register command; n = bits after `<n>` |

Chip addresses are `1` followed by ID<4:0>. The address `1x1111` is a
broadcast. A register command has a 12-bit body plus 0, 16 or 128 data bits
(n = 12, 28 or 140). Every chip decodes every command, so that all chips stay
aligned on the bit stream.

Register codes:

| code     | target                                   |
|----------|------------------------------------------|
| `000000` | configuration (16 bits)                  |
| `001000` | mask (128 bits)                          |
| `010000` | strobe delay                             |
| `011000` | threshold and calibration DACs           |
| `100000` | pulse input register                     |
| `101000` | enable data taking                       |
| `110000` | calibration pulse                        |
| `111000` | bias DACs                                |
| `000100` | trim DAC (`ccccccc tttt`)                |

Configuration word, bit 15 first:

| bits  | field               | bits | field              |
|-------|---------------------|------|--------------------|
| 15:14 | unused              | 8    | accumulator mode   |
| 13    | clock feed-through off (1 = data on link) | 7 | test (mask) input mode |
| 12    | end of chain        | 6    | edge detection     |
| 11    | not master          | 5:4  | trim DAC range     |
| 10    | output bypass       | 3:2  | calibration group  |
| 9     | input bypass        | 1:0  | readout mode       |

The configuration resets to 0. A master therefore powers up with its
datalink carrying the clock divided by two (clock feed-through). Bit 13 must
be set before any data comes out.

## Calibration and analogue controls

A calibration command makes the logic raise a one-clock strobe two clocks
later. The strobe reaches the front end on `cal_strobe`:

- `cal_group` selects one of four calibration lines. Mode 00 drives channels
  3, 7, …, 127; mode 11 drives channels 0, 4, ….
- The strobe first passes a delay line of 1 ns + code × 0.8 ns, with a 6-bit
  code, so the injected charge can be scanned across the clock period.
- The delay line is analogue. In the RTL it is a behavioural model
  (`strobe_delay_line`), a transport delay built from two delayed toggle
  flags. Synthesis keeps only those flags, so a netlist needs the real delay
  line in their place.
- The threshold/calibration, bias and trim registers drive the DAC codes:
  `threshold`, `calamp`, `ish`, `ipre`, `trim[128][4]` and `trim_range`.

## Choices made in this RTL

These points are not fixed by the chip specification. They are this design's
own choices:

- **Header length.** The module header is 19 bits as laid out above. A
  shorter length is also quoted for it; the field layout was followed.
- **Buffer write timing.** The readout buffer is written one clock after
  `level3`.
- **Overflow handling.** An overflow overwrites the oldest event. The read
  pointer is not moved.
- **Soft reset scope.** A soft reset clears the data path and the L1/BC
  counters. It does not clear the configuration, mask, DAC or trim registers,
  or the Send_ID state.
  A readout in progress stops at once. Bits still in the chain drain in one
  clock per chip, because each chip forwards data through a single register.
- **Calibration strobe.**
  - It is issued on every calibration command; the configuration has no
    enable bit for it.
  - Its latency, 2 clocks, is a parameter.
- **Edge detection.** It marks the onset of a hit. The alternative, marking
  the end of the hit, would also give one 1 per hit, but one crossing late
  relative to the hit's start.
- **Test input mode.** The mask pattern reaches the pipeline as loaded, not
  inverted.
- **Calibration bits in test mode.** The calibration group bits do not take
  part in test input mode.
- **Mask reset.** The mask resets to all-masked.
- **Mask command bits.** A mask or configuration command shifts its data
  bits into the target register as they arrive, one clock after sampling.
  The register's load pulse follows one clock after the last bit.
- **Differential inputs.** Each input pair is decoded as `p & ~p_B`. Each
  complement output is the inverse of its true output.

## Not in the RTL

- the front end (preamplifier, shaper, discriminator);
- the threshold, calibration, bias and trim DACs;
- the calibration chopper;
- the LVDS and current-mode pads;
- the power-up reset circuit;
- the ID pull-ups.

These have no logic function to write. Their digital interfaces are ports of
`abcd3t`.

## Files

- `rtl/abcd_pkg.sv`: shared constants (command codes, packet codes, header,
  trailer), the configuration struct `config_t`, the readout mode enum and the
  hit criterion function.
- `rtl/<block>.sv`: one module per block. `rtl/abcd3t.sv` is the chip top.
- `tb/tb_<block>.sv`: self-checking testbench per block. Each prints
  `TB_RESULT checks=… failures=…`.
- `tb/tb_abcd3t_module.sv`: the end-to-end test.

The end-to-end test uses three full-size chips: a master, a middle chip and
an end chip, with both normal and bypass links. All traffic goes through the
serial command line. A decoder turns the master's datalink back into events.
The test checks, and counts:

- clock feed-through after power-up;
- Send_ID configuration packets;
- soft reset (the L1 count restarts);
- BC reset (crossing-count differences);
- physics packets with adjacent-hit continuations in all four readout modes;
- no-hit packets;
- buffer overflow during a 14-trigger burst;
- edge detection (each hit appears in exactly one sample across a trigger
  burst that covers every crossing);
- the pulse input register command (every unmasked channel set for one
  clock);
- the accumulator;
- test input mode;
- bypass of the middle chip;
- DAC and trim loads;
- the calibration strobe, its group and its delay (checked to the
  picosecond).

The test fails if any of these never happened.

`tb/tb_abcd3t_rate.sv` runs one side of a detector module at the operating
point the chip is sized for:

- six chips on one chain;
- about 1% strip occupancy per crossing;
- random L1 triggers averaging 100 kHz (one per 400 clocks).

It checks that every trigger gives one complete event with consecutive L1
numbers and a packet from every chip, and that at most 1% of chip events are
lost to buffer overflow. A typical run of 300 triggers loses none. Events
average about 170 bits on the link, and the longest is about 400 bits.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -Irtl \
    rtl/abcd_pkg.sv tb/tb_abcd3t_module.sv --top-module tb_abcd3t_module
obj_dir/Vtb_abcd3t_module
```

Any other testbench works the same way, with its own name in place of
`tb_abcd3t_module`. The sizes are module parameters with the specified
values as defaults:

- `NCH` = 128 channels;
- pipeline `DEPTH` = 132;
- readout buffer `WORDS` = 24, `EVENT_WORDS` = 3, `OVF_BITS` = 4;
- event FIFO depth 24.

The end-to-end test runs at these defaults in a few seconds.
