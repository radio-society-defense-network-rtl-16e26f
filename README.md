# Keyup fingerprinting for an FM repeater

Every FM handheld or mobile radio makes a short, characteristic wobble in
frequency when its transmitter is keyed. The synthesizer PLL has to lock, and
while it settles, the carrier swings in a way that depends on the radio's
model and often on the individual unit. An FM receiver turns that frequency
swing into a voltage. So the first few tens of milliseconds of a receiver's
audio output after someone keys up hold a waveform that identifies the
transmitter.

This design listens to a repeater receiver's discriminator output and works as
follows:

1. It notices the moment a transmission begins.
2. It records that keyup.
3. It compares the recording with a bank of stored fingerprints, all at the
   same time.
4. It names the closest one.

If the closest radio is on a ban list, the `tx_enable` output goes low, so a
repeater controller can refuse to retransmit that user. Fingerprints are read
from a microSD card at power-up by a small dedicated processor. Every
recording can also be sent over a UART so a computer can collect new
fingerprints.

The whole design is synchronous to one clock (100 MHz nominal) and is written
in synthesizable SystemVerilog. The only external parts it needs are:

- an MCP3008 ADC with a simple op-amp level shifter in front of it;
- a microSD card;
- optionally, a UART cable and a logic analyser or scope for the debug ports.

```
 receiver audio -> [op-amp offset/scale] -> MCP3008 --SPI--> mcp3008_adc
                                                               |  10-bit samples, 52.63 kSps
                                  +----------------------------+------------------+
                                  v                                               v
                          trigger_detector --trigger--> capture_buffer (N samples)
                          (50-sample min/max,                  | read port (shared)
                           Schmitt trigger)              +-----+-----------------+
                                                         v                       v
 microSD --SPI--> sd_cpu + sd_rom --bytes--> filter_manager              uart_reporter --> UART
                                               | broadcast, 3 passes
                                               v
                                   matched_filter x NF  --scores--> filter_manager
                                                                     | lowest score
                                        tx_enable, led_id, best_idx, debug SPI dump
```

## 1. Catching the keyup

A single matched filter needs hundreds of thousands of clock cycles per
comparison (see section 2). So the filters cannot run continuously on a
sliding window of live samples. Instead the system waits for a transmission to
start, records a fixed-length capture, and then classifies that capture
offline.

### Detecting the start of a transmission (`trigger_detector`)

The detector relies on *FM quieting*:

- On an idle channel the discriminator puts out loud, broadband noise.
- As soon as a carrier captures the receiver, the noise collapses.

The detector keeps the last 50 samples in a small RAM used as a ring buffer.
After each new sample it reads the whole ring back, one entry per clock, and
finds the minimum and maximum. Their difference (the *range*) is a rough
envelope of the audio.

A Schmitt trigger on the range turns this into a single event:

- The detector **arms** (becomes "noisy") when the range exceeds
  `HIGH_THRESH` (256 codes).
- Once armed, it **fires** a one-cycle trigger when the range falls below
  `LOW_THRESH` (64 codes), and then disarms.

The hysteresis is why a single quiet patch in the noise does not produce a
stream of triggers.

Timing and start-up behaviour:

- The scan takes `DEPTH + 2` = 52 clocks per sample, against a 1900-clock
  sample period.
- After reset, nothing is judged until the ring has been filled once.
- The detector starts disarmed, so a carrier that is already present at reset
  is not reported.

The trigger also goes out on `trigger_out`, so a scope can trigger on it.

Because the range only falls once the whole 50-sample window is quiet, the
trigger arrives roughly 50 samples (about 1 ms) after the carrier appears. The
capture therefore starts about 1 ms into the keyup. Fingerprints must be
recorded through the same path, so that they are aligned the same way. The
correlation step in section 2 absorbs any remaining offset.

### Recording (`capture_buffer`)

The capture buffer is a RAM of `N` 10-bit samples with three states:

- `ARMED`: a trigger starts recording.
- `REC`: the next `N` samples are written; triggers are ignored.
- `FULL`: the buffer is frozen until `release_buf` returns it to `ARMED`.

It has one read port with a registered output (data one clock after the
address). In the top level this port is shared between two users:

- The filter manager owns the port while it is classifying (`cap_reading`).
- The UART reporter owns it otherwise.

The buffer is released only once both have finished, so a new keyup can
never overwrite a capture that is still being read.

## 2. Scoring a capture against a fingerprint (`matched_filter`)

This is the core of the design and the part that needs the most care.

Each filter holds one fingerprint `f[0..M-1]` of signed 16-bit samples in its
own RAM. Fingerprints are prepared off-line to have zero mean. The capture
`c[0..N-1]` holds unsigned 10-bit ADC codes.

The score is computed in three steps.

**1. Mean removal.** The filter subtracts the capture mean

    mu = (sum_j c[j]) >> log2(N)

from every sample (which is why `N` must be a power of two). This turns the
unsigned codes into a signed, zero-mean signal.

**2. Correlation, to find the alignment.** For every lag `k = 0 .. N-M` the
filter forms the dot product

    D(k) = sum_{i=0..M-1} f[i] * (c[k+i] - mu)

and keeps the lag `k*` with the largest `D`. On a tie the earliest lag wins.
A large dot product alone is a poor match measure: a strong but differently
shaped signal can still produce a large `D`. So the correlation is used only
to decide *where* the fingerprint sits in the capture.

**3. Alignment, to measure similarity.** With the fingerprint placed at `k*`,
the filter computes the sum of squared differences

    S = sum_{i=0..M-1} (f[i] - (c[k*+i] - mu))^2

`S` is the *similarity score*. It is small when the capture has the same
shape *and* amplitude as the fingerprint, and grows quickly otherwise. Between
matching and non-matching radios the scores typically differ by an order of
magnitude or more, so picking the smallest `S` is a robust decision.

### How the work is scheduled

The filters do not store the capture. The filter manager reads the capture
buffer once and broadcasts each sample to all `NF` filters together, in three
passes. Each sample is tagged with a phase (`rsdn_pkg::phase_t`) and a
"last" flag.

| pass       | samples sent                                   | filter does                              | cycles (defaults)   |
|------------|------------------------------------------------|------------------------------------------|---------------------|
| `PH_MEAN`  | `c[0..N-1]`                                    | accumulates the sum, derives `mu`        | 2048                |
| `PH_CORR`  | for each lag k: `c[k..k+M-1]`, last flag on `c[k+M-1]` | `D(k)`; keeps the best `D` and `k*` | 1537 x 512 = 786,944 |
| `PH_ALIGN` | `c[0..N-1]`                                    | accumulates `S` over `c[k*..k*+M-1]`     | 2048                |

Inside a filter the pipeline has three stages:

1. The sample arrives and the fingerprint RAM is read.
2. One registered multiplier.
3. Accumulation.

The multiplier is shared by all phases: its operands are selected by phase.
In `PH_CORR` it computes `f[i] * (c - mu)`; in `PH_ALIGN` it computes
`(f[i] - (c - mu))^2`. This gives one multiplier per filter and a throughput
of one sample per clock in every pass.

Widths:

- The accumulators and the score are `SCORE_W` = 48 bits wide.
- The worst case is `512 * (32767 + 1023)^2 ≈ 5.8e11`, far below `2^48`.

Interface and timing:

- `start` clears the filter before a capture.
- `score_valid` rises at the end of the ALIGN pass and stays high until the
  next `start`.
- The filter also outputs `best_dot`, `best_lag` and `mean_out` for debugging.

A full classification takes about 791,000 clocks, or **7.9 ms at 100 MHz**,
whatever the value of `NF`. Recording takes `N / 52.63 kSps` = 38.9 ms. So a
keyup is identified about 47 ms after the trigger. That is well before anyone
starts speaking.

## 3. The filter manager (`filter_manager`)

The filter manager has three jobs.

### At boot: loading the fingerprints

It takes the SD card's byte stream and pairs the bytes, high byte first, into
16-bit samples. Sample `w` is written to filter `w / M` at address `w % M`
over a shared write bus, with one write-enable per filter. After `NF * M`
samples it raises `loaded`; any further bytes are dropped.

The card image is therefore simply:

    byte 2*(r*M + i)     = f_r[i][15:8]
    byte 2*(r*M + i) + 1 = f_r[i][7:0]      r = 0..NF-1, i = 0..M-1

starting at card address 0. There is no file system. With the defaults this
is 10,240 bytes, which is 20 sectors.

### Per capture: running the passes and picking the result

1. When the capture is full and the fingerprints are loaded, the manager
   pulses `start` to the filters.
2. It runs the three passes. It reads the capture buffer with a registered
   address, so each sample's phase tag is delayed two clocks to stay aligned
   with its data.
3. It waits for every `score_valid`.
4. It scans the `NF` scores for the lowest one. On a tie the lower index
   wins.
5. It pulses `result_valid` with `best_idx` and `best_score`.

`tx_enable` and the LEDs then follow the result:

- `tx_enable` is high after reset. After each result it equals
  `!BANNED[best_idx]` until the next result.
- `led_id` lights the identified radio's LED (one-hot).

### Reporting: the debug SPI dump

After each classification the manager sends all `NF` scores over a write-only
SPI port:

- `dbg_cs_n` stays low for the whole dump.
- Each score is 6 bytes, most significant byte first, filter 0 first.
- The clock is `DBG_HALF` = 5, i.e. 10 MHz.

The manager then holds until the capture buffer has been released, and
re-arms when the buffer leaves `FULL`.

## 4. The SD card loader: a tiny dedicated processor

Initialising a microSD card in SPI mode involves:

- several commands with CRCs;
- response polling;
- long time-outs;
- two alternative initialisation sequences, because some cards accept only
  `ACMD41` and others only `CMD1`.

Doing this in one hand-written state machine is unwieldy. Instead `sd_cpu`
is a small processor with:

- 11 registers of 32 bits (`r0`..`r10`);
- no data memory;
- a ROM of 32-bit instructions (`sd_rom`);
- 16 instructions, several of them specific to SD cards.

### Instruction set (`sd_isa_pkg`)

Encoding: `[31:28]` opcode, `[27:24]` rd, `[23:20]` ra, `[19:16]` rb,
`[15:0]` imm.

| op | mnemonic | effect |
|----|----------|--------|
| 0 | `LDI rd, imm`      | rd = zero-extended imm |
| 1 | `HALT`             | stop, `done` = 1 |
| 2 | `ADD rd, ra, rb`   | rd = ra + rb |
| 3 | `ADDI rd, ra, imm` | rd = ra + sign-extended imm |
| 4 | `AND rd, ra, rb`   | rd = ra & rb |
| 5 | `OR rd, ra, rb`    | rd = ra \| rb |
| 6 | `XOR rd, ra, rb`   | rd = ra ^ rb |
| 7 | `SHF rd, ra, imm`  | shift ra by imm[4:0]: left if imm[5] = 0, right if 1 |
| 8 | `BEQ ra, rb, imm`  | branch to imm if equal |
| 9 | `BNE ra, rb, imm`  | branch to imm if not equal |
| A | `JMP imm`          | jump |
| B | `SPI rd, ra`       | exchange one byte: send ra[7:0], rd = received byte |
| C | `CMD rd, ra, imm`  | send SD command imm[5:0] with argument ra and its CRC7, then poll with 0xFF until a byte with bit 7 clear arrives (at most 8 bytes); rd = that R1 byte, or 0xFF if none |
| D | `CS imm`           | chip select = imm[0]; imm[1] selects the fast SPI clock |
| E | `LED imm`          | show imm[7:0] on `led_sd` |
| F | `OUT ra`           | hand ra[7:0] to the output byte stream, waiting for `ready` |

Execution:

- Each instruction takes one fetch cycle (the ROM read is registered) and one
  execute cycle.
- `SPI`, `CMD` and `OUT` then wait for their transfer or handshake.
- The SPI clock is 400 kHz during initialisation (`SLOW_HALF` = 125) and
  25 MHz after `CS` selects the fast clock (`FAST_HALF` = 2).
- An assertion checks that the output byte stays stable while
  `m_tvalid && !m_tready`.

### Firmware

The firmware is built at elaboration time by a SystemVerilog function in
`sd_rom.sv`. That function works as a two-pass assembler: the first pass
collects label addresses, the second emits the final code. The program is
about 80 instructions long and does the following:

1. With CS high, it sends 80 clocks on the slow clock, then selects the card.
2. It sends `CMD0` until the card answers `0x01` (up to 100 tries).
3. It sends `CMD8` with argument `0x1AA`. If the card answers `0x01`, it
   reads the four remaining R7 bytes (version 2 cards).
4. It repeats `CMD55` + `ACMD41` (HCS set) until the card answers `0x00`. If
   that times out (`INIT_RETRIES` tries), it repeats `CMD1` instead.
5. For byte-addressed cards it sends `CMD16` with argument 512.
6. It switches to the fast clock. For each of `NUM_BLOCKS` blocks it:
   - sends `CMD17`;
   - waits for the `0xFE` data token;
   - outputs the 512 data bytes;
   - discards the two CRC bytes.
7. It raises CS, shows `0x80` on the LEDs and halts.

Error codes on `led_sd`:

| code | meaning |
|------|---------|
| 0x01 | no answer to `CMD0` |
| 0x03 | both `ACMD41` and `CMD1` timed out |
| 0x04 | `CMD16` rejected |
| 0x05 | `CMD17` rejected |
| 0x06 | no data token |

Addressing mode:

- Cards up to 2 GB (SDSC) take byte addresses.
- Larger cards (SDHC) take block numbers.
- The ROM parameter `BLOCK_ADDR` (top: `SD_BLOCK_ADDR`) selects the mode, as
  a firmware build option. The default, 0, suits SDSC cards.

To change the firmware, edit the `assemble` function. Labels are entries of
its `label_t` enum, and each `` `EMIT `` line is one instruction.

## 5. External interfaces

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst` | in | clock (100 MHz nominal); synchronous active-high reset |
| `adc_sclk`, `adc_mosi`, `adc_miso`, `adc_cs_n` | | MCP3008. One 17-bit SPI transfer per sample: `{0, start, SGL/DIFF, D2..D0, 11 x 0}` out, 10-bit result in the last bits. 10 MHz SCLK; MOSI changes on the falling edge. A new sample every `SAMPLE_PERIOD` = 1900 clocks (52.63 kSps). |
| `sd_sclk`, `sd_mosi`, `sd_miso`, `sd_cs_n` | | microSD card in SPI mode |
| `sd_mirror[3:0]` | out | copy of `{cs_n, sclk, mosi, miso}` of the card bus, for a logic analyser with SD protocol decoding |
| `uart_txd` | out | 115200 baud (868 clocks per bit), 8 data bits LSB first, odd parity, 1 stop bit |
| `dbg_sclk`, `dbg_mosi`, `dbg_cs_n` | out | debug SPI dump of all scores (section 3) |
| `tx_enable` | out | 0 while the last identified radio is banned |
| `trigger_out` | out | one-clock pulse when a keyup is detected |
| `led_id[NF-1:0]` | out | identified radio, one-hot |
| `led_sd[7:0]` | out | SD loader status / error code (0x80 = loaded) |
| `fingerprints_loaded` | out | all fingerprints are in the filters |
| `result_valid`, `best_idx[7:0]`, `best_score[47:0]` | out | classification result (one-clock pulse) |

**UART packet.** After each classification, `uart_reporter` sends:

1. `0xA5` as a frame marker;
2. `best_idx`;
3. the `N` capture samples, two bytes each: `{6'b0, s[9:8]}`, then `s[7:0]`.

With the defaults this takes 0.39 s. New keyups are ignored until the capture
buffer is released afterwards.

Internally, blocks talk over valid/ready byte or sample streams (`s_t*` and
`m_t*`). Events such as triggers, starts and results are one-clock pulses.
`spi_controller` and `uart_tx` raise ready only when idle, which gives a
"finished, send the next byte" handshake.

## 6. Parameters

Top-level parameters of `rsdn_top` and their defaults:

| parameter | default | notes |
|-----------|---------|-------|
| `NF` | 10 | number of matched filters / fingerprints |
| `N` | 2048 | capture length in samples (power of two), 38.9 ms |
| `M` | 512 | fingerprint length in samples, 9.7 ms |
| `BANNED` | `10'b1` | bit r = radio r is denied |
| `SAMPLE_PERIOD` | 1900 | clocks per ADC sample (52.63 kSps at 100 MHz) |
| `ADC_SPI_HALF` | 5 | ADC SCLK half period (10 MHz) |
| `CLKS_PER_BIT` | 868 | UART bit time (115200 baud) |
| `LOW_THRESH`, `HIGH_THRESH` | 64, 256 | Schmitt trigger thresholds on the 50-sample range (codes of 1024) |
| `SD_BLOCK_ADDR` | 0 | 1 for block-addressed (SDHC) cards |
| `SD_SLOW_HALF`, `SD_FAST_HALF` | 125, 2 | card SCLK half periods (400 kHz, 25 MHz) |

Derived from these:

- The number of blocks the loader reads is `ceil(NF * M * 2 / 512)`.
- Each filter uses one `M x 16` RAM (8 Kbit) and one multiplier of about
  17 x 17 bits.

Resources and time as the parameters grow:

- The number of filters only costs area; classification time does not change.
- Classification time grows as `(N - M + 1) * M`.

## 7. Relation to the original design report

This RTL implements the fingerprinting system described in a student FPGA
project report.

**What follows the report:**

- The signal chain: ADC, 50-sample min/max trigger with a Schmitt trigger,
  capture buffer, parallel matched filters, lowest score wins.
- The matching algorithm: mean removal in the filter, maximum dot product to
  find the phase shift, then the sum of squared differences at that shift.
- The filter count of 10 and the 100 MHz clock.
- The ADC interface: 17-bit transfers at 10 MHz, 52.63 kSps, MOSI changing on
  the falling SCLK edge.
- The UART format: 115200 baud, 8 data bits, odd parity, 1 stop bit.
- The UART export of captures and results, the debug SPI port for scores, the
  identity LEDs, the scope trigger pin and `tx_enable`.
- Fingerprints stored raw from card address 0, without a file system.
- The SD loader as a register-only processor with:
  - 16 instructions and 11 registers;
  - 32-bit instructions in ROM;
  - SPI and SD-command instructions that compute their own CRC;
  - direct chip-select control and LED error codes.
- The ACMD41-then-CMD1 fallback, the byte/block addressing switch as a
  firmware option, and the mirror of the card's SPI lines.
- Throughput of one sample per clock in the filters.

**Where this design makes its own choices or departs from the report:**

- **Sizes.** The report does not give the capture or fingerprint lengths.
  2048 and 512 samples were chosen so that recording plus classification
  (about 47 ms) is close to the roughly 40 ms the report quotes.
- **Trigger thresholds.** The report gives none; 64 and 256 are this design's
  values.
- **Fingerprint sample format.** 16-bit signed, big-endian, filter after
  filter.
- **One multiplier per filter.** The report's implementation used two
  multipliers per filter, because its synthesis tool duplicated the
  multiplier across states. It notes that one would suffice, and here one is
  shared explicitly between the correlation and alignment phases.
- **Score.** The report mentions both a "sum" and a "mean" of squared
  differences. This design uses the sum; the two differ only by the constant
  factor `M`, so the decision is the same.
- **Passes.** Broadcasting the capture from a single buffer in three passes,
  and the tie rules, are this design's own structure.
- **Firmware.** The report's firmware was 144 instructions, produced by an
  external assembler. Here it is about 80 instructions, assembled inside the
  ROM module. Its encoding, retry counts, error codes and clock speeds are
  this design's own. It uses single-block reads (`CMD17`), does not check the
  `CMD8` echo or the data CRC, and does not read the OCR (`CMD58`): the
  addressing mode is fixed at build time, as in the report.
- **Output framing.** The UART packet format and the debug dump format are
  this design's own.
- **Stream interfaces.** Internal "AXI" connections are simple valid/ready
  streams, not full AXI.
- **Not part of the RTL.** These are outside the digital design:
  - the analog front end (an op-amp adding a DC offset and gain, which
    inverts the signal);
  - the ADC and card chips themselves;
  - the off-line tools that prepare fingerprints.

  The testbenches contain behavioural models of the MCP3008 and of a microSD
  card in SPI mode (`tb/mcp3008_model.sv`, `tb/sd_card_model.sv`).
- **Reloading.** The report considered reloading filters with further
  fingerprints at run time and rejected it. It is not built here either: to
  support more radios, raise `NF`.

## 8. Simulating

Every testbench is self-checking. At the end it prints

    TB_RESULT checks=<n> failures=<n>

Each testbench also has a watchdog that fails the run if it hangs. The
testbenches need Verilator 5 with `--timing`. Compile the two packages first
and let Verilator find the other modules in `rtl/` and `tb/`:

```sh
verilator --binary --timing -Irtl -y rtl -y tb \
    rtl/rsdn_pkg.sv rtl/sd_isa_pkg.sv tb/tb_rsdn_top.sv --top-module tb_rsdn_top
./obj_dir/Vtb_rsdn_top
```

Replace `tb_rsdn_top` with any other testbench name:

| testbench | what it checks |
|-----------|----------------|
| `tb_spi_controller` | random words of several widths against a SPI slave model; bit timing and SCLK period |
| `tb_mcp3008_adc` | sample values, command word and sample rate, against the MCP3008 model |
| `tb_uart_tx` | frames, odd parity, bit time, ready handshake |
| `tb_trigger_detector` | range values against a software ring, arming and triggering, latency |
| `tb_capture_buffer` | triggers while armed, recording, full, release, and ignored triggers |
| `tb_matched_filter` | mean, best dot product, best lag and score against a reference model, for matching and random captures |
| `tb_filter_manager` | fingerprint loading, pass sequence, lowest-score pick, `tx_enable`, LEDs, debug dump |
| `tb_uart_reporter` | packet contents decoded from the pin, `done` timing |
| `tb_sd_rom` | firmware structure (decoded instructions, block count, addressing) |
| `tb_sd_cpu` | full card bring-up and block reads with three card models: byte-addressed, block-addressed, and CMD1-only |
| `tb_rsdn_top` | whole system, reduced sizes (4 filters, 256/128 samples, fast UART): three keyups, banned and allowed radios, every score checked against a reference; each mechanism (busy retries, loading, arming, trigger, capture, classification, export, dump, re-arm) must happen |
| `tb_rsdn_top_full` | the same with every parameter at its default (10 filters, 2048/512 samples, 115200 baud); about two minutes |

**Test signals.** The testbenches synthesise keyups as decaying oscillations,
each radio with its own period and decay, on a background of loud noise that
collapses when the carrier appears. Each fingerprint is the mean-free version
of its radio's waveform. Real fingerprints come from captures exported over
the UART.

**Random initial values.** Verilator simulates with two states. Registers
that are reset synchronously hold random values until the first clock edge
with `rst` high, so monitors in the testbenches ignore outputs while `rst` is
high.

## 9. How far it has been checked

- All modules and testbenches pass Verilator's default lint with no warnings. Under `-Wall`, the only remarks are about debug outputs that the top leaves unconnected, such as each filter's best lag and dot product.
- All modules are synthesizable.
- Every testbench above passes, including the full-size system test.
- Each unit testbench was also run against a deliberately broken copy of its
  module, and it detected the fault.

What has **not** been checked:

- The design has not been run on an FPGA.
- It has not been run against a real MCP3008 or real microSD cards. The card
  model covers the commands the firmware uses, but not every real card's
  quirks: busy periods, extra bytes before the R1 response, and so on.
- The thresholds and the sizes should be tuned on real receiver audio.

## 10. Files

```
rtl/rsdn_pkg.sv          shared types: pass phase enum, score width, helpers
rtl/sd_isa_pkg.sv        SD processor opcodes, instruction struct, encoder, CRC7
rtl/spi_controller.sv    SPI master for one word, valid/ready, run-time clock divider
rtl/mcp3008_adc.sv       periodic MCP3008 sampling
rtl/uart_tx.sv           UART transmitter with odd parity
rtl/trigger_detector.sv  50-sample min/max ring and Schmitt trigger
rtl/capture_buffer.sv    triggered N-sample recorder
rtl/matched_filter.sv    correlation + alignment + similarity score
rtl/filter_manager.sv    fingerprint loading, passes, decision, debug dump
rtl/uart_reporter.sv     UART export of result and capture
rtl/sd_rom.sv            firmware ROM and its assembler function
rtl/sd_cpu.sv            SD card processor
rtl/rsdn_top.sv          the complete system
tb/mcp3008_model.sv      behavioural MCP3008
tb/sd_card_model.sv      behavioural microSD card (SPI mode)
tb/tb_*.sv               testbenches
```
