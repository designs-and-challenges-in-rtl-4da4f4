# Single-channel GPS L1 C/A baseband receiver

This RTL is the FPGA half of a GPS receiver that finds one satellite, tracks
it and confirms its navigation message. An RF front end mixes the 1575.42 MHz
L1 signal down to a 20.4 MHz intermediate frequency, and an ADC samples that
signal at 37.5 MHz. The logic here does the following:

- decimates the samples to 6.25 MHz and quantises them to 4 bits;
- records 2 ms blocks in a ping-pong buffer;
- searches one (code phase, Doppler) cell per block with a single serial-search
  correlator and confirms hits with a Tong detector;
- tracks the satellite with early/prompt/late correlators and hardware loop
  discriminators;
- recovers 50 bit/s navigation bits and locks onto the subframe preamble,
  checking TLM/HOW parity.

An embedded processor closes the loops. It sits on a register port, picks the
cells to search, filters the discriminator outputs and writes the NCO words
back. Everything runs in one 75 MHz clock domain.

```
adc_data ─ adc_decimator ─ sample_quantizer ─┬─ pingpong_buffer ─ serial_search ─ tong_detector
 (37.5 MHz strobe)  (÷6)       (4 bit)       │        (2 x 12500)    (1 correlator)   (2 → 6 / 0)
                                             └─ tracking_channel ─ loop_discriminators
                                                 (E/P/L, I/Q)   │   (DLL, FLL/PLL)
                                                                └─ nav_bit_sync ─ nav_frame_sync (+ gps_parity)
                                   receiver_regs ── processor bus, irq
```

## Clocking and sample rate

The system clock is 75 MHz. The ADC clock (37.5 MHz) is exactly half of it,
so the ADC interface is a data word plus an `adc_valid` strobe every second
clock, not a second clock domain.

- `adc_decimator` keeps the first sample of every six. That gives 6.25 MHz,
  a sample strobe every 12 system clocks. There is no anti-alias filter: the
  front end's band-pass filter does that job.
- At 6.25 MHz the 20.4 MHz IF aliases to 20.4 − 3 × 6.25 = 1.65 MHz. That is
  the nominal carrier the NCOs are set to:
  `CARR_FW_NOMINAL = round(1.65e6 / 6.25e6 × 2^32)`.
- `sample_quantizer` takes a programmable arithmetic right shift
  (`REG_CTRL[13:10]`) and saturates to a 4-bit signed sample (−8..7).

## Acquisition: ping-pong buffer, serial search, Tong detector

**Ping-pong buffer** (`pingpong_buffer`)

- Two blocks of `BUF_DEPTH = 12500` four-bit samples (2 ms each).
- One block records at the sample rate. The other plays back at the full
  75 MHz clock.
- The roles swap on the clock after the last sample is written, so no sample
  is lost. The buffer pulses `swap` at that moment.

**Serial search** (`serial_search`): one cell per 2 ms buffer

- A search waits for the next `swap`, then reads the new playback block, one
  sample per clock.
- Each sample is multiplied by the local C/A chip and by the 3-bit local
  carrier: sine for I, cosine for Q.
- The code NCO counts half chips. The search phase (`REG_ACQ_PHASE`, 0..2045)
  is given in half chips, so the cell grid is 0.5 chip.
- Each 1 ms half of the block is summed separately (N = 6250). The value
  reported is the larger of the two I²+Q² results.
- Why two halves: a navigation-bit edge can cancel the correlation inside one
  millisecond, but it cannot fall inside both halves of a 2 ms block.
- A pass takes about 12 500 clocks, less than one tenth of the 150 000
  clocks between swaps.

**Tong detector** (`tong_detector`)

- Each new cell starts a counter at 2.
- Each pass above `THRESHOLD = 9 000 000` adds 1; each pass below subtracts 1.
- 6 declares the satellite acquired; 0 declares failure.
- Anything in between makes the top restart the search on the same cell at
  the next buffer, with no processor involvement.
- A strong cell therefore takes 4 passes (8 ms). An empty cell takes 2 passes.
- The compare is strictly "greater than".

Sweeping cells (phases × Doppler bins of ±5 kHz) is left to the processor:
it writes `REG_ACQ_PHASE` and `REG_ACQ_CARR_FW`, pulses `acq_start` and waits
for the "acquisition decided" interrupt.

## Tracking: early/prompt/late from a half-chip clock

This is the least obvious part of the design. `tracking_channel` uses one
C/A generator and one code NCO. The NCO steps a half-chip counter `hc`
(0..2045) by `REG_TRK_CODE_FW` per sample. The generator is kept on the
**early** chip, chip index (hc+1)/2, and a register holds the previous chip.
With early and late half a chip either side of prompt:

| hc     | early        | prompt       | late         |
|--------|--------------|--------------|--------------|
| even   | current chip | current chip | previous chip |
| odd    | current chip | previous chip | previous chip |

So three replicas come from one generator and one flip-flop.

- **Dump:** the six accumulators (IE, IP, IL, QE, QP, QL, 24 bits each) are
  dumped and cleared when prompt wraps from hc 2045 to 0. That is once per code
  period, 1 kHz.
- **Start:**
  1. `trk_start` loads the generator and advances it to the early chip of
     `REG_TRK_PHASE`, one chip per clock (at most 1023 clocks).
  2. The channel arms.
  3. It begins integrating on the next buffer swap.
- Because tracking starts on a buffer swap, the code phase found by
  acquisition is measured from the same sample and can be written straight
  into `REG_TRK_PHASE`. It stays valid at later swaps, because each 2 ms block
  holds exactly two code periods at the nominal code rate. Only the code
  Doppler drift builds up, about 0.002 chip per block at 1.5 kHz.

`loop_discriminators` turns each dump into the two loop errors:

| Error | Formula | Notes |
|---|---|---|
| Code (DLL) | (IE²+QE²) − (IL²+QL²) | non-coherent early-minus-late power |
| Carrier, FLL | sign(dot) · cross | cross = IP[k−1]·QP[k] − QP[k−1]·IP[k]; dot is the same with `+` of the like terms. Measures frequency error and ignores data-bit flips. |
| Carrier, PLL | IP · QP | Costas product; zero at lock, whatever the bit sign |

The carrier error is FLL or PLL, chosen by `REG_CTRL[8]`. The intended use is
to pull in with FLL, then switch to PLL once the frequency is close. Errors
are 50 bits wide. The registers return the upper 32 bits (`>>> 18`).

## Navigation message: bit sync, parity, frame sync

- **Bit sync** (`nav_bit_sync`)
  - Watches the sign of IP at every dump and counts sign changes in 20 bins
    (dump index mod 20).
  - Bits last 20 ms, so all true transitions land in one bin. The first bin to
    reach `BIT_LOCK_COUNT = 8` changes sets the bit boundary.
  - After that, each bit is the sign of the sum of its 20 IP values. Noise
    glitches average out.
- **Parity** (`gps_parity`): the standard GPS (32,26) Hamming check of one
  30-bit word, using D29/D30 of the previous word. It is combinational.
  Data bits are un-inverted by D30*.
- **Frame sync** (`nav_frame_sync`)
  - Shifts bits into a 62-bit window: the previous word's D29/D30, TLM and HOW.
  - Looks for the preamble `10001011` or its inverse. A Costas loop has a 180°
    ambiguity, so the whole stream may be inverted.
  - A preamble with TLM and HOW parity both good is a candidate (state VERIFY).
  - A second candidate exactly 300 bits (one 6 s subframe) later locks the
    frame and fixes the polarity.
  - A missed subframe while locked drops back to hunting.
  - The HOW data bits of the last confirmed subframe are readable in
    `REG_HOW`.

## Register port and interrupts

`receiver_regs` is a plain word-addressed register slave:

- `bus_addr[4:0]`, `bus_wr`/`bus_wdata` and `bus_rd`;
- read data and `bus_rvalid` one clock after `bus_rd`;
- `irq` is the OR of three latched causes: acquisition decided, 1 ms dump and
  subframe confirmed. Write 1s to `REG_IRQ_CLR` to clear them.

The addresses are in `gps_pkg::reg_addr_e`.

| Addr | Name | Access | Contents |
|---|---|---|---|
| 0x00 | CTRL | W | [0] acq start, [1] track start, [2] track stop (pulses); [8] carrier mode 0 FLL / 1 PLL; [13:10] quantiser shift |
| 0x01 | STATUS | R | [0] search busy, [1] acquired, [2] failed, [7:4] Tong counter, [8] tracking, [9] mode, [12:10] pending irqs |
| 0x02 | PRN | RW | satellite 1..32 (reset 1) |
| 0x03 | ACQ_PHASE | RW | half chips 0..2045 |
| 0x04 | ACQ_CARR_FW | RW | carrier word, f / 6.25 MHz · 2³² |
| 0x05/06 | ACQ_MAG_LO/HI | R | last I²+Q² (49 bits) |
| 0x07 | TRK_CARR_FW | RW | tracking carrier word |
| 0x08 | TRK_CODE_FW | RW | half chips per sample · 2³² (nominal 1406000494) |
| 0x09 | TRK_PHASE | RW | tracking start phase, half chips |
| 0x0A–0x0F | IE IP IL QE QP QL | R | last dump, sign-extended |
| 0x10 | DLL_ERR | R | code error, upper 32 bits |
| 0x11 | CARR_ERR | R | carrier error, upper 32 bits |
| 0x12 | NAV_STATUS | R | [0] bit lock, [5:1] boundary, [8] frame lock, [9] inverted, [10] verifying |
| 0x13 | NAV_WORDS | R | [7:0] preambles, [15:8] parity failures, [23:16] subframes |
| 0x14 | DUMP_COUNT | R | dumps since tracking start |
| 0x15 | IRQ_CLR | W | write 1 to clear: [0] acq, [1] dump, [2] subframe |
| 0x16 | HOW | R | 24 data bits of the last confirmed HOW |
| 0x17 | ACQ_CODE_FW | RW | acquisition code word (for code Doppler) |

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `ADC_W` | 14 | ADC word width |
| `DECIM` | 6 | 37.5 → 6.25 MHz |
| `BUF_DEPTH` | 12500 | samples per buffer block (2 ms) |
| `THRESHOLD` | 9 000 000 | acquisition threshold on I²+Q² of a 1 ms sum |
| `TONG_INIT` / `TONG_ACQ` | 2 / 6 | Tong counter start and acquire value |
| `BIT_LOCK_COUNT` | 8 | transitions in one bin before bit lock |

The threshold was set by experiment for one front end's gain. With a
different quantiser shift or front end, scale it with the square of the
signal level.

## Where this design departs from the original receiver

The original system ran the following in processor software, which is not
part of this RTL:

- the cell sweep;
- the loop filters;
- the choice of when to switch from FLL to PLL;
- logging the accumulators to DDR2 and sending them to a host over Ethernet.

The front end, ADC, clock synthesis and processor bus are likewise outside it.

Three choices here are this design's own:

- **Tong detector in hardware.** The original ran it in software. Here the
  hardware retries a cell by itself, so the processor handles one interrupt
  per cell instead of one per pass.
- **"Larger of two halves".** The original only asked that 2 ms be collected
  so that one clean millisecond exists. Taking the larger of the two 1 ms
  results is this design's reading of that.
- **Choices where the original gives nothing:** the quantiser, the replica
  amplitude (3-bit, 16-phase table), the early/late spacing (½ chip), the
  discriminator formulas, the bit-sync method and the register map.

Only one satellite channel is built, matching the single correlator of the
original.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv` that compares
against independent reference models. The shared models are in
`tb/gps_tb_pkg.sv`:

- the C/A code in G2-delay form, checked against the published first-ten-chip
  values for all 32 PRNs;
- the parity encoder in mask form;
- subframe generation.

Three end-to-end testbenches drive the top only through its ADC and register
ports, playing the processor. All three use the scenario in
`tb/gps_top_scenario.sv`. The two tracking runs follow these steps:

1. synthesise PRN 19 with +1.5 kHz Doppler, a 1500 half-chip code offset,
   noise and a navigation message;
2. search a wrong cell and expect failure in two passes;
3. search the right cell and expect acquisition in four;
4. start tracking and run a Costas loop on the dumps, first FLL, then PLL from
   dump 100;
5. check each dump's discriminator registers against the accumulators;
6. check the recovered bits against the transmitted ones, up to polarity.

Each of these also counts every mechanism: buffer swaps, Tong retries, acquired and
failed cells, dumps in each carrier mode, bits, preambles, parity-checked
candidates, subframes and interrupts. A mechanism that never occurs is a
failure.

- `tb_gps_receiver_top` leaves the top at its default parameters too but
  speeds up the stimulus:
  - the ADC strobe is asserted every clock;
  - the code is 2.5 times faster, so one code period is 2500 samples and a
    12500-sample buffer still holds whole periods.

  It tracks for about 8000 dumps (about 380 bits) until frame lock and checks
  the decoded HOW word. It takes about 90 s with verilator.
- `tb_gps_cold_search` is a cold-start acquisition on the same stimulus,
  with a weaker signal (true cell about 3.5 times the threshold).
  - The processor sweeps 500 Hz Doppler bins from −5 kHz upward. In each bin
    it searches a 16-phase window, where a full search would cover all 2046
    half-chip phases.
  - It stops at the first acquired cell, which must be within one bin and one
    half chip of the truth.
  - In a typical run it searches 205 cells on 412 buffers in about 20 s.
  - The first cell to pass is the one 500 Hz below the true Doppler. This
    shows that the Tong detector accepts a cell one bin away. The tracking
    loop's FLL must then pull in the remaining frequency error.
- `tb_gps_receiver_full` runs the top at its default parameters with the real
  rates: 37.5 MHz ADC strobe, 12500-sample buffers, 6250 samples per code
  period. It acquires, tracks through the FLL→PLL switch, gets bit lock and
  checks 30 recovered bits. It takes about 1 minute. A full subframe at this
  size (about 7 s of signal, more than 5×10⁸ clocks) was not simulated.

To run one, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gps_receiver_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/gps_pkg.sv tb/gps_tb_pkg.sv tb/tb_gps_receiver_full.sv
./obj_dir/Vtb_gps_receiver_full
```

Each testbench ends with `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

Three assertions in the RTL guard rules that the surrounding logic relies
on. They are enabled with verilator's `--assert`.

- The register bus never reads and writes in the same cycle.
- The Tong counter stays within 0..6.
- The ping-pong buffer swaps only on the write that fills a block.

The design lints clean of errors in verilator and elaborates in yosys/slang.
Coarse synthesis of the top gives about 800 cells, 1460 flip-flop bits and
100 000 memory bits (the two buffer blocks).
