# Pulse-peak-detection RF-ID reader in SystemVerilog

A passive RF-ID tag answers the reader with a 128 kb/s stream of short energy
pulses. Each bit period holds one pulse. If the pulse sits in the first quarter of
the period, the bit is a ONE; if it sits in the third quarter, the bit is a ZERO.
Once the radio front end has demodulated it, the reader sees a noisy baseband
signal. It has to find those pulses, turn them into the tag's 64-bit ID and check
the ID's CRC.

This RTL reads tags with the *pulse-peak detection* (PPD) algorithm. It does no
correlation or matched filtering. It only compares peak heights at the two places
where the next pulse can be. The algorithm was first written as processor code that
worked on buffers of samples. Here it is a *point-processing* pipeline: every stage
handles one ADC sample and hands its result on before the next sample arrives. No
sample is ever dropped between buffers, and the whole reader fits in a few hundred
logic cells.

The design runs from one 18.432 MHz clock:

- the ADC samples every 6 clocks, giving 3.072 MS/s, so one tag bit is N = 24
  samples;
- the host serial link runs at 18.432 MHz / 160 = 115 200 bit/s, 8N1.

## The tag packet

```
| 8 start bits (ZERO) | 2 dead bits | sync (ONE) | 64 ID bits, bit 63 first |
```

The packet is 75 bit periods, 1800 samples, about 0.59 ms. The 64 ID bits are 48
data bits followed by a 16-bit CRC (x^16 + x^15 + x^2 + 1, start value 0xFFFF,
MSB first). A correct ID leaves a remainder of zero.

Pulse positions relative to the start of their bit period, at N = 24:

| bit  | pulse in samples |
|------|------------------|
| ONE  | 0 .. 5 (first quarter) |
| ZERO | 12 .. 17 (third quarter) |

## Block map

```
            +-------------+   sample    +--------------------------------------------+
 THS1206 <->| adc_control |------------>| ppd_algorithm                              |
   ADC      +-------------+             |  avg_filter -> threshold_limiter           |
                                        |      |              | threshold            |
                                        |      |        pulse_detect --stop--+       |
                                        |      |              | ps_pulse     |       |
                                        |      +-------> start_sync_detect   |       |
                                        |      |              | startid, countbias   |
                                        |      +-------> id_extract                  |
                                        +---------------------|----------------------+
                                             syncerr, idready | id
                                        +---------------------v---+
                                        | main_control            |--algo_rst--> all PPD stages
                                        +---------------------|---+
                                                     id_av, id |
                                        +---------------------v---+
                                        | crc16_check             |
                                        +---------------------|---+
                                                  crc_correct  |
                                        +---------------------v------------------------+
                                        | host_comms: packet_packer -> byte_fifo ->    |
                                        |             uat_control -> uat_transmitter   |---> txd
                                        +----------------------------------------------+
```

| file | role |
|------|------|
| `rfid_pkg.sv` | shared widths, types, packet header, one CRC-16 step |
| `detector.sv` | top level: ADC pins, reset, serial output |
| `adc_control.sv` | converter set-up sequence, conversion clock, sample read-out |
| `avg_filter.sv` | 5-point moving sum (no division), 15 bits |
| `threshold_limiter.sv` | noise-floor maximum over 100 values + offset, follows the noise floor |
| `pulse_detect.sv` | first filtered value above the threshold |
| `ppd_lookahead.sv` | the two-window peak comparison used by the next two stages |
| `start_sync_detect.sv` | confirms 8 start bits, finds the sync bit |
| `id_extract.sv` | decides the 64 ID bits |
| `ppd_algorithm.sv` | wires the five PPD stages together |
| `main_control.sv` | algorithm reset and ID hand-off to the CRC check |
| `crc16_check.sv` | serial CRC over the 64 ID bits, 65 clocks |
| `packet_packer.sv` | 0xAA header + 8 ID bytes, most significant first |
| `byte_fifo.sv` | 8 x 8092 show-ahead FIFO (899 packets) |
| `uat_control.sv` | moves bytes from the FIFO to the transmitter |
| `uat_transmitter.sv` | divide-by-160 baud generator, 8N1 shift register, LSB first |
| `host_comms.sv` | packer + FIFO + serial control |

## How a bit is decided: the look-forward comparison

This is the heart of the design, and the part that most needs a careful read.

### Reasoning from the last accepted peak

The detector never tries to find the start of a bit period. Instead it remembers the
position of the last pulse peak it accepted, called the *anchor*, and reasons from
there. If the last bit was a ONE, the anchor sits early in its period:

- the next ONE is one full period away: **N = 24** samples;
- the next ZERO is one and a half periods away: **N + N/2 = 36** samples.

If the last bit was a ZERO, the anchor sits in the third quarter:

- the next ONE is half a period away: **N - N/2 = 12** samples;
- the next ZERO is one period away: **N = 24** samples.

So after every decision there are exactly two candidate positions.

### The two windows and the decision

`ppd_lookahead` counts samples from the anchor and keeps a window of ±3 samples
around each candidate position. In each window it records the largest filtered
value and where it occurred. One sample after the later window closes, it compares
the two peaks:

- candidate A (the ONE position) wins only if its peak is **strictly** larger;
- otherwise candidate B (the ZERO position) wins.

### Re-anchoring

The winning peak's position becomes the new anchor. The count is re-based, so it
now counts from that peak, and the next bit is looked for from there. Because every
bit re-anchors on a real peak, small differences between the tag's bit clock and
the reader's sample clock never build up over the 75 bits.

The decision needs no threshold, only a comparison. That is why the detector still
works at low signal-to-noise ratios, once the packet has been found.

### Stages that use the comparison

`start_sync_detect` uses the same comparison with fixed candidates:

1. **First start bit.** The peak of the pulse that crossed the threshold is taken
   from samples 0..6 after the crossing.
2. **Start bits 2..8.** Candidate A is N/2 ahead (a ONE would be there) and
   candidate B is N ahead (the expected ZERO). If A wins for any start bit, the
   candidate packet is rejected with `syncerr`.
3. **Sync bit.** After the eighth start bit, the single window at 3N - N/2 = 60
   samples must hold a peak above the threshold. That distance is the ZERO-to-ONE
   step plus two dead bits.

After the sync bit:

- `startid` rises;
- `countbias` hands the ID stage the number of samples already counted past the
  sync peak (4 in normal operation). The ID stage then starts on the right grid
  position.

`id_extract` runs 64 decisions. It chooses the candidate distances from the
previous bit, shifts each decision in from the right and pulses `idready` when all
64 bits are in.

### Worked example

The last bit was a ONE, anchored at count 0. The ONE window is samples 21..27 and
the ZERO window is samples 33..39. The decision falls at count 40.

- If the ZERO window wins with its peak at 35, the next bit is decided from there,
  using distances 12 and 24.
- If the ONE window wins with its peak at 25, the next windows are 46..52 and
  58..64 counted from the old anchor.

## Finding a packet: filter, threshold, pulse

- **`avg_filter`** adds each new 12-bit sample to the four before it. The sum is
  used without dividing, which keeps full resolution. Its output is one clock
  after the sample.
- **`threshold_limiter`** takes the maximum of the first 100 filtered values and
  adds `OFFSET` (100). That sets the threshold and raises `ready`. It then takes the
  maximum of every further 100 values and swaps it in, with a one-clock `swap`
  pulse, so the threshold follows a drifting noise floor. When a pulse is found
  (`stop`), it freezes until the algorithm reset. After the reset it starts again
  from an empty window.
- **`pulse_detect`** raises `ps` at the first filtered value strictly above the
  threshold. It gives one `ps_pulse` to start the start/sync stage.
- **`main_control`** sends a one-clock `algo_rst` to every PPD stage after a
  rejected candidate (`syncerr`) or a finished ID (`idready`). A finished ID is
  captured and handed to the CRC check. If the check is still busy, the ID waits.
  The filter is not reset: its five-sample history stays valid.

## Sending an ID to the host

**CRC check.** `crc16_check` shifts the 64 bits through the CRC register, one bit
per clock. It reports `correct` or `fail` 65 clocks after `id_av`. Only correct IDs
are sent.

**Packet.** `packet_packer` writes nine bytes into the FIFO: `AA` followed by the
ID, most significant byte first. It pauses 4 clocks before each byte and waits
while the FIFO is full. Tag ID 0x058000000B631F97 goes out as:

```
AA 05 80 00 00 0B 63 1F 97
```

**Serial control.** `uat_control` reads the show-ahead FIFO with a small state
machine:

- IDLE → GET_DATA, when the FIFO is not empty and the transmitter is clear to send;
- GET_DATA → SET_DTR, popping one byte, while clear to send;
- SET_DTR → IDLE, strobing the byte into the transmitter.

**Transmitter.** `uat_transmitter` loads the byte and shifts it out LSB first
behind a start bit. The shift register moves right and fills with ones. It raises
`cts` as the stop bit begins, so back-to-back bytes take exactly 10 bit times. One
packet takes 90 bit times, 0.78 ms, so the link carries up to about 1280 IDs per
second. The FIFO holds 899 packets.

## ADC control

`adc_control` drives a THS1206 converter. After reset it writes four words, each
with a one-clock `adc_wr` strobe:

| word | meaning |
|------|---------|
| `0x401` | reset |
| `0x400` | release reset |
| `0x000` | CR0 |
| `0x4A0` | CR1: 3 MS/s, unsigned 12-bit, FIFO trigger level 1 |

It then enters its sampling state:

- `adc_convclk` starts running with a period of `CONV_DIV` = 6 clocks;
- each `adc_data_av` from the converter is answered with a one-clock `adc_rd`
  strobe;
- the bus is latched in the following clock and delivered as `sample`,
  `sample_valid`.

The converter's bidirectional bus is split into three signals:

- `adc_data_i`, the read path;
- `adc_data_o`, the write path;
- `adc_data_oe`, high while the FPGA drives the bus.

Tie them to one tri-state pad at the chip boundary.

## Timing summary (default parameters)

| quantity | value |
|----------|-------|
| clock | 18.432 MHz |
| sample period | 6 clocks (3.072 MS/s) |
| samples per tag bit | 24 |
| tag packet | 1800 samples = 10 800 clocks |
| last ID sample → `idready` | up to about 25 samples (the last look-ahead window) |
| `idready` → CRC result | 66 clocks |
| CRC result → first serial bit | at most 1 bit time (160 clocks) |
| serial packet | 9 × 10 × 160 = 14 400 clocks |

The PPD stages need samples at least two clocks apart. At the default rate there are
six.

## Where this RTL departs from, or fills in, the original design

The original design is a VHDL design for an Altera FPGA, with a processor version
of the same algorithm beside it. Where its description left a point open or gave
two answers, this RTL made the following choices:

- **Look-ahead distances.** The original text quotes 32 and 8, and also 32 and 12,
  for the ONE→ZERO and ZERO→ONE distances, and 52 or 54 for the sync distance.
  This RTL uses the distances given by its own formula: 36, 12 and 60. They are
  the only ones that keep ONE→ZERO + ZERO→ONE equal to two bit periods. The 60 also
  matches the counter value printed in its simulation. All of them are parameters
  of `start_sync_detect` and `id_extract`.
- **Threshold offset.** The FPGA version adds 100 and the processor version adds
  200. `OFFSET` defaults to 100.
- **Conversion clock.** The original counter toggled its output once every six
  clocks, which would give half the stated 3.072 MS/s. This RTL produces one
  conversion clock period per 6 clocks, matching the stated rate.
- **Set-up order.** CR0 is written before CR1, following the converter's set-up
  flow. One state diagram lists them the other way round; the order does not matter
  to the converter.
- **Reset and FIFO.** Reset is synchronous everywhere. The original used an
  asynchronous clear on the FIFO and the conversion counter. The FIFO is a plain
  memory array instead of a vendor FIFO.
- **Blocks defined only by function.** The original says what these do but not how;
  they are the simplest logic that does it:
  - `main_control`'s capture register;
  - the packer's 4-clock gap;
  - the one-clock strobes to the ADC;
  - the transmitter raising `cts` at the stop bit.
- **Not included.** The analogue front end, the converter and the host PC. The
  testbenches contain behavioural models of the converter and of a serial
  receiver.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>`. The expected values are computed
independently of the RTL:

- a reference moving sum and running maximum;
- a bit-serial CRC written from the polynomial;
- a software serial receiver;
- a synthetic tag waveform generator (`tb/tag_wave_pkg.sv`): pseudo-random noise
  plus 6-sample pulses at the ONE or ZERO position of each bit.

The known tag ID 0x058000000B631F97 passes the CRC. `make_id()` builds further IDs
with a valid CRC.

`tb_detector` runs the whole reader at its default parameters. The converter
model (`tb/ths1206_model.sv`) checks the set-up writes, then plays four tag packets
on a noisy baseline:

| packet | content | expected result |
|--------|---------|-----------------|
| 1 | good tag | sent to the host |
| 2 | ZERO start bit replaced by a ONE | rejected with `syncerr` |
| 3 | one CRC bit flipped | detected, dropped by the CRC |
| 4 | second good tag | sent to the host |

The serial receiver must deliver exactly the two expected 9-byte packets. The
testbench also counts threshold swaps, pulses, sync errors, CRC passes and failures,
and FIFO activity, and fails if any of them never happened. It takes a few seconds
of simulation.

`tb_detector_tag_stream` is a throughput test, also at the default size. Six tags
answer in turn: 24 packets, one every 2100 samples, about 1460 per second. That is
faster than the serial link can send them, so the FIFO fills (34 bytes at its peak)
and drains afterwards. The pulse height steps through 700, 350, 180 and 100 counts
over a noise floor of ±20, like a tag moving away from the antenna. Every packet
must arrive, in order, with no false start and no CRC failure.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/rfid_pkg.sv tb/tag_wave_pkg.sv \
    tb/tb_detector.sv --top-module tb_detector
./obj_dir/Vtb_detector
```

Replace `tb_detector` with any other `tb_<block>` to run one block's test.
`--assert` also enables the assertions on the ADC strobes.

## Changing it

- **Other tag bit rates.** Set `N` on `ppd_algorithm`. The look-ahead distances
  follow from it. A 64 kb/s tag at 3.072 MS/s needs `N = 48`. Its largest
  look-ahead, 124 samples, still fits the 7-bit counter (`CNT_W` in `rfid_pkg`).
  A 256 kb/s tag would give only 12 samples per bit. The ±3 windows of the two
  candidates would then touch, so it needs a faster sample rate (`CONV_DIV`).
- **Other clocks.** Set `CONV_DIV` and `BAUD_DIV` on `detector`.
- **Noise tracking.** `WINDOW` and `OFFSET` on `ppd_algorithm` set how the
  threshold tracks the noise.
- **FIFO.** `FIFO_DEPTH` sets the buffer size; any depth works, it need not be a
  power of two.
