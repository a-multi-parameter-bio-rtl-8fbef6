# Intelligent Electrode ASIC: bio-signal front-end, SAR ADC and 2-wire electrode network

A wearable recorder for ECG, EMG and EEG is built from many identical
"intelligent electrodes". Each electrode carries the same chip: a
programmable amplifier for the electrode potential, an 8-bit SAR ADC, and a
digital core. All electrodes hang on one shared cable carrying power, ground,
a reference electrode, and the two lines SCL and SDA of a serial bus.

One pin, `mode`, decides what a chip does:

- `mode = 1` makes it the **Main Electrode (ME)**. It runs the bus. It finds
  which electrodes are present, starts their ADCs at the same instant, and
  collects their samples at a fixed rate. It buffers the data in a 12 kbit
  RAM and hands it to an external radio.
- `mode = 0` makes it a **Sensing Electrode (SE)**. It amplifies and digitises
  its own electrode at 3.3 kS/s. It keeps the samples in two 1 kbit RAMs used
  as a ping-pong pair, and answers the ME over the bus.

Up to 14 SEs share one bus. Only two signal wires run from electrode to
electrode, so the cable stays the same however many channels are fitted.

The digital logic is synthesizable SystemVerilog. The amplifier and the
analog half of the ADC are behavioural models with `real` ports. They exist so
that the whole chip can be simulated from electrode voltage to radio bytes.

## Chip structure

```
 vin, vref ──► afe_model ──► adc_in[4]
 aux_in[0..5] ──────────────► adc_in[others]  ──► sar_adc_analog ◄──► sar_logic
                                                      (comp)          (dac, code)
                                                                          │
 mode ──► digital_core ┬─ sensing_block (SE): serial_slave + id_checker,
                       │      sensing_fsm, ad_interface, 2 × spram(128×8)
                       └─ main_block (ME):   main_fsm, serial_master, addr_buffer,
                              package_controller, spram(1536×8), wireless_tx_if
 SCL/SDA: open drain, scl_oe/sda_oe = 1 pulls the line low; scl_i/sda_i read it
```

| file | role |
|---|---|
| `bio_pkg.sv` | frame field widths, command codes, acknowledge pattern, frame struct |
| `bio_asic_top.sv` | the chip: front-end model, ADC, digital core |
| `digital_core.sv` | role selection by `mode`, bus driver muxing, power-down of the unused part |
| `main_block.sv`, `sensing_block.sv` | the ME and SE halves |
| `serial_master.sv`, `serial_slave.sv`, `id_checker.sv` | the 2-wire protocol |
| `main_fsm.sv`, `addr_buffer.sv` | network schedule and table of present SEs |
| `package_controller.sv`, `wireless_tx_if.sv` | ME buffering and output to the radio |
| `sensing_fsm.sv`, `ad_interface.sv` | SE state, ping-pong storage, ADC control |
| `sar_logic.sv`, `sar_adc_analog.sv` | ADC successive-approximation control and analog model |
| `afe_model.sv` | analog front-end model |
| `spram.sv` | single-port synchronous RAM |

The unused role is switched off. Its logic is held in reset
(`rst_n && mode` for the ME half, `rst_n && !mode` for the SE half). In the ME
role the front-end is disabled and the ADC is kept asleep.

## The 2-wire bus

This is the least conventional part of the design, and the one that decides
the timing of everything else.

### Frame

Every transaction is started by the ME with one 31-bit command frame, sent
MSB first:

| bits | field | meaning |
|---|---|---|
| 4 | SE address | 0 = broadcast, 1..14 = one SE, 15 unused |
| 10 | memory start | first SE memory address to read |
| 10 | memory stop | last SE memory address to read |
| 4 | command | `IDLE`=0, `SYN_SAMPLE`=1, `SLEEP`=2, `COLLECT`=3 |
| 3 | acknowledge | driven by the addressed SE: `010` |

The first 28 bits come from the ME (`cmd_frame_t` in `bio_pkg`). The last
three are bit slots in which the ME releases SDA. The addressed SE drives the
pattern `010`. A missing SE leaves the bus pulled up, so the ME reads `111`
and knows nothing answered. Broadcast frames are not acknowledged.

For a `COLLECT` command the frame does not end after the acknowledge. The SE
goes on sending its memory bytes from *start* to *stop*, MSB first. The ME
clocks exactly `stop - start + 1` bytes and then ends the frame.

### Signalling

The bus works like I2C without per-byte acknowledges:

- **Lines.** Both are open drain with pull-ups. The ME drives SCL. SDA is
  driven by whoever is sending.
- **Start.** SDA falls while SCL is high.
- **Stop.** SDA rises while SCL is high.
- **Data.** A bit changes one system clock after SCL falls. It is sampled at
  the end of the SCL high phase.
- **Rate.** Each SCL half period is `HALF` system clocks (default 4). One bit
  takes 8 µs at 1 MHz, so the bus runs at 125 kbit/s.

The SE synchronises SCL and SDA with two flip-flops each and detects edges in
its own clock domain. It is therefore meant to work from its own 1 MHz
oscillator, although the testbenches run all chips from one clock.
Each SE fetches the next memory byte from its RAM while the current byte is
still being shifted out. That fetch takes a few clocks, well inside one bit
time. An assertion in `serial_slave` checks this margin.

### Time budget

One addressed command costs start + 31 bits + stop, about 34 bit times or
270 µs. A scan of all 14 addresses therefore takes about 3.8 ms. Reading 128
bytes from one SE takes about 35 + 1024 bit times, roughly 8.5 ms.

## Main Electrode schedule (`main_fsm`)

After reset the ME does the following:

1. **SE-Chain Scan.** It sends `IDLE` to addresses 1..14 in turn. Each
   acknowledged address is marked present in `addr_buffer`, a 14-bit mask.
   The buffer also reports whether any SE joined (`new_se`) or left
   (`gone_se`) since the previous scan.
2. **Syn-Sample.** It broadcasts `SYN_SAMPLE`. Every SE restarts its ADC
   timing and its storage pointer on the same frame, so all channels sample
   in step from then on.
3. **Run.** Two timers now run:
   - Every `COLLECT_PERIOD` clocks (100,000 = 0.1 s) it collects from each
     present SE, lowest address first. Each collection reads one whole bank
     (`SE_BANK_DEPTH` bytes).
   - Every `RESCAN_PERIOD` clocks (5,000,000 = 5 s) it scans again. If a new
     SE appeared, it sends Syn-Sample again so the newcomer is in step. An SE
     that left simply drops out of the mask.

   A timer that expires while the ME is busy is remembered and served
   afterwards.
4. **Sleep.** While the `sleep_req` pin is high, the ME broadcasts `SLEEP`
   once and waits. When the pin drops it scans again and resynchronises.

### Bank alternation

The ME never tells an SE which bank is full. Instead, both sides count the
same way.

- **SE side.** After Syn-Sample, the SE writes bank 0 first and then
  alternates banks. In the SE's collection address space, bank *b* is the
  range `b·DEPTH .. b·DEPTH+DEPTH-1`.
- **ME side.** The ME's bank index starts at 0 at every Syn-Sample. It
  flips after each collection round.

The data stream has no gaps when the collection period equals the bank fill
time. The fill time is `DEPTH × CONV_CYCLES × ADC_CLK_DIV` clocks, which is
38.4 ms at the defaults. The default 0.1 s period is longer than that, so
banks are overwritten between collections (see "Limits").

### Buffering and output (`package_controller`, `wireless_tx_if`)

Each burst is stored in the ME's 1536-byte RAM as one header byte followed by
the data bytes. The header is `{SE address[3:0], 3'b000, bank}`.

Before a burst is collected, the controller checks
`fill + len + 1 <= DEPTH`. If the burst does not fit, `wireless_tx_if` first
streams the whole buffer to the radio and the buffer is emptied. The radio
interface is a plain `tx_valid`/`tx_data`/`tx_ready` byte stream. The data
must stay stable until it is accepted; an assertion checks this.

## Sensing Electrode (`sensing_fsm`, `ad_interface`)

An SE has three states:

- **STANDBY** after reset: front-end on, ADC asleep.
- **ACQ** on `SYN_SAMPLE` from any state: ADC restarted, write pointer to
  bank 0, address 0.
- **SLEEP** on `SLEEP`: front-end and ADC off.

Samples fill bank 0, then bank 1, then bank 0 again. `bank_full[b]` is set
when bank *b* has been filled. It is cleared when writing into that bank
starts again.

A collection read of the bank being written waits one clock if it collides
with a sample write. The RAM is single port.

`ad_interface` divides the 1 MHz clock by `ADC_CLK_DIV` (10) into a 100 kHz
clock enable for the ADC. It holds the ADC asleep while acquisition is off or
being restarted. It passes each finished code on as `sample_valid`/`sample`.

## SAR ADC (`sar_logic`, `sar_adc_analog`)

One conversion lasts `CONV_CYCLES` = 30 ADC clocks, giving 100 kHz / 30 =
3.33 kS/s:

- **Track.** For 21 clocks the input is tracked (`sample = 1`).
- **Search.** Over 8 clocks the code is found by binary search, MSB first.
  Each trial code goes out on `dac`. `comp` answers 1 when the input is above
  the trial level.
- **Result.** In the last clock the result is latched into `code` and `done`
  pulses.

The analog model picks one of six inputs through the select code (6 and 7
pick the reference). It holds the input at the end of tracking and compares
it with `dac/256 · VREF`, where VREF = 0.8 V is the on-chip bandgap value.
Input 5 (index 4) is the front-end output.

## Analog front-end model (`afe_model`)

The front-end is a three-stage amplifier, modelled as gains and first-order
filters:

- **Stage 1.** Instrumentation amplifier with gain 7.5 (a 300 kΩ / 40 kΩ
  resistor ratio).
- **Stage 2.** Capacitive amplifier with gain 12.5, AC-coupled with a
  0.3 Hz high-pass.
- **Stage 3.** Switched-capacitor gain with eight settings. This design
  spaces them evenly from 2 to 19 (`gain_sel`), giving 45.5 to 65 dB overall.
- **Output.** A low-pass of 80, 260, 400 or 1500 Hz (`bw_sel`). The output
  is centred on 0.4 V, the middle of the ADC range, and clipped to 0..0.8 V.

The model is only meant to feed the ADC realistic voltages. It says nothing
about noise, CMRR or power.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `HALF` | 4 | system clocks per SCL half period (125 kbit/s at 1 MHz) |
| `SE_BANK_DEPTH` | 128 | bytes per SE bank (1 kbit) |
| `ADC_CLK_DIV` | 10 | 1 MHz → 100 kHz ADC clock |
| `CONV_CYCLES` | 30 | ADC clocks per conversion (3.3 kS/s) |
| `COLLECT_PERIOD` | 100,000 | clocks between collection rounds (0.1 s) |
| `RESCAN_PERIOD` | 5,000,000 | clocks between scans (5 s) |
| `PKG_DEPTH` | 1536 | ME buffer bytes (12 kbit) |

## Where this design makes its own choices

The frame layout, the 14-SE limit, the ping-pong storage, the memory sizes,
and the rates are taken from the published description of the chip:

- 1 MHz system clock
- 100 kHz ADC clock, 3.3 kS/s
- 0.1 s collection, 5 s rescan
- scan within 6 ms
- 800 mV reference

The following are this design's own:

- **Bus electrical and timing rules.** Start/stop, bit order, sampling
  point, 125 kbit/s instead of the quoted 120 kbit/s. 1 MHz does not divide
  evenly to 120 kHz.
- **Codes.** The command codes, the acknowledge pattern `010`, and address 0
  as broadcast.
- **Addressing.** How an SE learns its address. Here it is the `se_id` pins.
- **Collection.** Which range is collected (one whole bank, alternating),
  the ME header byte, and the radio handshake.
- **Sleep.** The `sleep_req` pin that triggers the sleep broadcast, and
  wake-up by scan plus Syn-Sample.
- **ADC timing.** The 21 + 9 clock split of a conversion.
- **Front-end.** The individual Stage-3 gains and which `bw_sel` code gives
  which bandwidth.

## Limits

- **Throughput.** The quoted rates do not add up for a full network.
  - 14 SEs at 3.3 kS/s × 8 bit produce 370 kbit/s, three times what the bus
    carries.
  - One SE produces 330 samples per 0.1 s, but holds only 256.
  - At the default parameters, a 0.1 s collection reads 128 of the roughly
    330 samples each SE took. A complete round over 14 SEs takes about
    123 ms in simulation, longer than the period itself, so rounds then run
    back to back.
  - For a lossless stream, set `COLLECT_PERIOD` to the bank fill time and
    keep the network small enough that a round fits in it. With
    `SE_BANK_DEPTH` = 128 that is about four SEs.
- **Analog models.** The front-end and analog ADC are behavioural models,
  not circuits. The bandgap, pads and cable are not modelled.
- **Measured bandwidths.** The ECG (0.3–200 Hz) and EEG (0.37–85 Hz)
  settings used in measurements are not among the four bandwidths the model
  offers; 260 Hz and 80 Hz are the nearest.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Highlights:

- **`tb_bio_asic_top`.** Four chips (one ME, SEs 2, 5 and 9) on a wired-AND
  bus, at reduced sizes (bank 64, ME buffer 200 bytes, collection period
  equal to the bank fill time, rescan every 0.1 s). SE 9 joins late and is
  resynchronised; SE 5 leaves. The ME sleeps and wakes. The test checks:
  - every received sample against the voltage applied to that electrode;
  - sample alignment between SEs;
  - buffer flushes and packet headers.

  It counts each mechanism (scans, Syn-Samples, collections, bank switches,
  flushes, sleep, unanswered scan slots) and fails if one never happened.
- **`tb_bio_asic_top_full`.** The chip at default parameters: one ME and two
  SEs through a scan, Syn-Sample and six 0.1 s collections, until the ME
  buffer fills and is forwarded (11 packets of 129 bytes). It checks the
  scan time against 6 ms, the sample and collection periods, the bus bit
  time, and every forwarded byte.
- **`tb_network_14`.** The largest network at default parameters: one ME
  and all 14 SEs. It checks that the scan finds every SE in 3.8 ms, that
  all 14 start sampling on the same clock, the order and range of the
  collection frames, the forwarded data, and the length of one collection
  round against its bit count.
- **`tb_biosignal_workloads`.** Three SEs set up for ECG, EMG and EEG
  recording (gain codes 2, 2 and 4; bandwidths 260 Hz, 1.5 kHz and 80 Hz)
  convert test tones through the front-end model and the ADC. It checks
  the code amplitude against the gain and filter formulas, the mean code,
  the 3.33 kS/s rate, and that nothing clips.
- **`tb_digital_core`.** Both roles of `digital_core`, including swapping
  roles by `mode`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/bio_pkg.sv \
          tb/tb_bio_asic_top.sv --top-module tb_bio_asic_top -o sim
./obj_dir/sim
```

Replace the testbench name for any other. `tb_bio_asic_top_full` simulates
about 0.6 s of chip time and takes a few seconds.
