# Ethernet fronthaul endpoints with PTP clock recovery

A radio base station split into a baseband unit (BBU) and a remote radio unit
(RRU) normally joins the two with CPRI, a synchronous serial link that also
carries the clock. This design replaces that link with ordinary switched
Gigabit Ethernet. Two things then have to be rebuilt in logic:

1. **The IQ stream.** CPRI basic frames are collected into raw layer-2
   Ethernet frames (no IP header), sent through the switch and cut back into
   basic frames at the far end.
2. **The clock.** Ethernet does not carry a clock. The RRU therefore keeps a
   real-time clock (RTC) and disciplines it to the BBU's RTC with IEEE 1588
   (PTP) messages that share the same link as the IQ traffic. From the
   disciplined RTC it derives an 8 kHz reference. An external jitter-attenuating
   PLL multiplies that reference to the converter clock (40 MHz in the
   reference testbed; the PLL is not part of this RTL).

Packet delay variation (PDV) in the switch is what limits the clock. A PTP
frame that arrives just after a 526-byte IQ frame waits up to 4.2 µs. The
filters in the servo exist to average that noise away. Two modes let you see
the effect on the clock: smoothing off, and servo off (free running).

The top, `fh_top`, holds one BBU node and one RRU node (`fh_node`, in master
and slave roles), each running on its own clock. They meet only at their MAC
byte streams. The MAC, PHY, DMA engine, ADC/DAC interface, processor and PLL
are external parts. Their signals are ports of `fh_top`.

## Basic frames and Ethernet frames

- **Basic frame.** A CPRI basic frame has 16 words: word 0 is the control
  word and words 1–15 are IQ samples. With the default 8-bit words
  (`WORD_BITS`, CPRI profile 1) it is 128 bits. At the 3.84 MHz basic-frame
  rate that is 491.52 Mbit/s, carried without 8b/10b coding.
- **Control word.** This design puts a basic-frame counter (mod 256) in the
  control word. The receiver counts breaks in that sequence (`cw_errors`), so
  basic frames lost anywhere on the path show up there.
- **Packing** (`cpri_packer`). Takes one IQ word per handshake. It emits a
  128-bit basic frame, word k in bits `[8k +: 8]`, every 15 accepted words.
- **Ethernet frame** (`eth_packer`). Holds `BF_PER_FRAME` (32) basic frames:
  - 14-byte header: destination MAC, source MAC, EtherType 0x88B5;
  - then 512 payload bytes, each basic frame sent least-significant byte
    first.
  - A frame is started only when 32 basic frames are waiting in the transmit
    queue, so a frame never stalls half-way.
  - Preamble, FCS and padding are the MAC's job.
- **Link load.** With 38 bytes of header and line overhead per frame, the IQ
  stream needs 528 Mbit/s of the 1000 Mbit/s link.
  - CPRI profile 2 (983.04 Mbit/s) would need 1019.5 Mbit/s, so it does not
    fit. The packer and unpacker accept `WORD_BITS = 16`, but the link cannot
    carry it.
- **Unpacking** (`eth_unpacker`). Reads the header and sorts frames:
  - fronthaul frames addressed to this node are cut back into basic frames;
  - PTP frames (EtherType 0x88F7, to the PTP multicast address or to this
    node) go to the PTP engine, with a start-of-frame strobe;
  - everything else is dropped.
  - A fronthaul frame that ends early counts as `bad_frames`.

## One node

```
 IQ in ─► cpri_packer ─► fh_queue (tx) ─► eth_packer ─┐
                                                      ├► eth_tx_arbiter ─► MAC tx
                     ptp_engine (framer) ─────────────┘
 MAC rx ─► eth_unpacker ─┬► fh_queue (rx) ─► cpri_unpacker ─► IQ out
                         └► ptp_engine (parser)
 ptp_rtc ◄─ step / increment ─ ptp_servo ◄─ t1..t4 ─ ptp_engine      (slave only)
 ptp_rtc ─► clk8k_gen ─► 8 kHz out                                    (slave only)
```

- **Transmit flow control.** When the transmit queue is full, `iq_in_ready`
  drops and the IQ source is held off. Each refused cycle is counted in
  `txq_stalls`.
- **Receive overflow.** The receive queue cannot push back on the network.
  When the IQ sink is too slow, basic frames are dropped and counted
  (`rxq_overflows`). The break then also shows as a control-word error.
- **Arbitration.** `eth_tx_arbiter` hands the MAC whole frames.
  - When both sources wait, a PTP frame goes first.
  - A PTP frame never interrupts an IQ frame: it waits, and this is counted in
    `ptp_waits`. That wait comes before the transmit timestamp, so it does not
    bias the measurement.
  - The same wait inside a switch is the PDV that the servo filters.

## PTP: messages and timestamps

`ptp_engine` implements the delay request–response exchange of IEEE 1588.
Its frames are built by `ptp_tx_framer` and decoded by `ptp_rx_parser`, using
the standard 34-byte header.

- **Timestamp point.** Every timestamp is the RTC value in the cycle where
  the first byte of the PTP frame crosses the node's MAC stream interface. For
  transmitted frames that is the first accepted byte; for received frames it
  is the start-of-frame strobe.
- **Master (BBU).**
  - Sends SYNC every `SYNC_INTERVAL_CYC` cycles: 976,562 cycles of 8 ns, which
    is 128 per second.
  - In one-step mode (default) SYNC carries its own transmit time t1, written
    into the frame while it is sent. With `TWO_STEP = 1` a FOLLOW_UP carries
    t1 instead.
  - Takes t4 for each DELAY_REQ it receives. It answers with DELAY_RESP, which
    carries t4, the request's sequenceId and the requester's port identity.
- **Slave (RRU).**
  - Takes t2 for each SYNC and reports the pair (t1, t2).
  - On every `DREQ_EVERY`-th SYNC (16, so 8 exchanges per second) it sends a
    DELAY_REQ at once and keeps its transmit time t3.
  - Accepts a DELAY_RESP only if both of these match the request still
    outstanding; otherwise it counts it in `resp_mismatch`:
    - `requestingPortIdentity` is its own port identity;
    - `sequenceId` is the request's.
  - Then reports t1..t4.
  - A request whose response never comes is abandoned at the next exchange.
- **Timestamp format.** 48-bit seconds plus 32-bit nanoseconds (`ptp_ts_t`).
  Differences are taken as signed 64-bit nanoseconds (`fh_pkg::ts_diff`).

### The RTC

`ptp_rtc` adds an increment to {nanoseconds, 32-bit fraction} every clock
cycle.

- The increment is nominally 8 ns, held as Q8.32.
- Seconds are carried at 10⁹ ns.
- Frequency is corrected by loading a new increment.
- Time is corrected by a signed step (|step| < 1 s), applied in one cycle
  together with that cycle's increment.
- Software loads the time with `rtc_set_*`.

## The servo: from timestamps to corrections

`ptp_servo` (slave only) works in signed nanoseconds.

| quantity | formula | when |
|---|---|---|
| one-way delay | d = ((t4 − t1) − (t3 − t2)) / 2 | each accepted delay exchange |
| time offset | x = t2 − t1 − d | each SYNC, once a delay is known |
| frequency offset | y = ((t2′ − t1′) − (t2 − t1)) / (t1′ − t1) | each pair of SYNCs |

How each quantity is computed and used:

- **Frequency offset y.** Computed in Q0.32 (units of 2⁻³² ≈ 0.23 ppb) by a
  65-cycle sequential divider (`seq_divider`). It then feeds a 128-sample
  moving average (`freq_ma_filter`, a circular buffer with a running sum).
- **Rate correction.** When the average window is full, the RTC increment is
  multiplied by (1 − ȳ). The window is then emptied, so the next average is
  measured at the new rate.
- **Time offset x.** Feeds the estimation buffer (`time_offset_filter`).
  Once 256 samples have arrived, their mean x̄ is selected and the RTC is
  stepped by −x̄. The buffer is a running sum, so no sample memory is needed.
- **Smoothing off** (`smooth_en = 0`). The buffer passes every raw x straight
  through, so each SYNC steps the clock.
- **Servo off** (`servo_en = 0`). Nothing is applied, so the RRU clock runs
  free, while the estimates are still computed and reported.

Details that are easy to get wrong, and how they are handled:

- **No estimate spans a correction.** After any step or rate change, the
  previous SYNC is forgotten. A frequency sample taken across a step would
  report the step as a huge frequency error.
- **A step inside a delay exchange.** The SYNC that opens a delay exchange
  can also complete a time-offset buffer, so the step lands between t2 and t3.
  Uncorrected, d is then wrong by half the step, and the loop rings.
  - The engine raises `t3_stamp` in the cycle after t3 was taken.
  - The servo adds back any steps made after the SYNC and before t3.
- **Delay is not filtered.** The latest d is used; only x and y are filtered.
- **Step limit.** Steps are clamped to ±(10⁹ − 1) ns. Larger offsets are for
  software to fix with `rtc_set_*`.

At the default sizes the loop is slow on purpose:

- one time correction every 256 SYNCs (2 s);
- one rate correction about every 1 s.

## The 8 kHz output

`clk8k_gen` makes the output high or low according to bit 0 of
floor(ns / 62,500).

- Edges therefore fall on every multiple of 62.5 µs of RTC time.
- They follow every step and rate change of the RTC, and that is exactly the
  noise the external PLL must clean up.
- The division uses a multiply by a rounded-up reciprocal, which is exact for
  ns < 10⁹.
- The output is registered: one cycle behind the RTC.

## Top-level interface (`fh_top`)

| group | signals |
|---|---|
| clocks, resets | `bbu_clk`, `bbu_rst`, `rru_clk`, `rru_rst` (synchronous, active high) |
| software control | `*_ptp_en`, `*_rtc_set_valid`, `*_rtc_set_time`, `rru_servo_en`, `rru_smooth_en` |
| IQ | `*_iq_in_{data,valid,ready}` and `*_iq_out_{data,valid,ready}`, 8-bit words |
| MAC | `*_mac_tx_{tdata,tvalid,tready,tlast}`, `*_mac_rx_{tdata,tvalid,tlast}`, one byte per cycle |
| status | `*_time`, `*_stats` (`node_stats_t` counters), `rru_servo` (`servo_status_t`) |
| clock out | `rru_clk_8k` |

`*_` stands for `bbu_` and `rru_`. Every parameter default is the full-size
configuration:

| parameter | default |
|---|---|
| `WORD_BITS` | 8 |
| `BF_PER_FRAME` | 32 |
| `TXQ_DEPTH` | 64 |
| `RXQ_DEPTH` | 64 |
| `SYNC_INTERVAL_CYC` | 976562 |
| `DREQ_EVERY` | 16 |
| `TWO_STEP` | 0 |
| `TIME_BUF_LEN` | 256 |
| `FREQ_MA_LEN` | 128 |
| `CLK_PERIOD_NS` | 8 |
| `OUT_HZ` | 8000 |

## Where this design departs from the testbed it models

- **Estimation in hardware.** In the original testbed, delay, offset and
  frequency estimation and filtering ran as processor firmware. Here they are
  RTL (`ptp_servo`), so the loop can be simulated and synthesized as one
  piece.
- **Rates and the exchange rule.** The original used SYNC at 128/s and a
  delay mechanism at 8/s. Elsewhere it also describes the slave answering
  every SYNC with a DELAY_REQ.
  - This design keeps 128/8 per second, with a DELAY_REQ on every 16th SYNC.
  - The peer-delay message set is not built.
- **Choices of this design**, unspecified in the original:
  - the number of basic frames per Ethernet frame;
  - the EtherType and MAC addresses;
  - queue depths;
  - the control-word content;
  - the arbitration rule;
  - the timestamp point at the MAC stream;
  - the fixed-point formats and the correction law;
  - the 125 MHz clock.
- **Selection algorithm.** Only the sample-mean selection is built. The
  original allowed others.
- **Not included:**
  - Ethernet MAC/PHY;
  - DMA and memory;
  - ADC/DAC interface and RF board;
  - processor;
  - jitter-attenuator PLL;
  - the switch. A behavioural model of the switch exists for simulation.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5, for
example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fh_pkg.sv tb/tb_fh_top.sv --top-module tb_fh_top
./obj_dir/Vtb_fh_top +verilator+rand+reset+2
```

Random initial register values (`+verilator+rand+reset+2`) are part of the
test: everything that is read is reset.

- **Block testbenches.** Each of these checks its module against an
  independent reference model:
  - `tb_cpri_packer`, `tb_cpri_unpacker`, `tb_fh_queue`, `tb_eth_packer`,
    `tb_eth_unpacker`, `tb_eth_tx_arbiter`;
  - `tb_ptp_rtc`, `tb_clk8k_gen`, `tb_freq_ma_filter`,
    `tb_time_offset_filter`.
- **`tb_ptp_engine`.** Two engines over a delay line, in one-step and
  two-step mode, with one corrupted DELAY_RESP. Checks:
  - the timestamps against the known link delay;
  - the SYNC interval;
  - the rejection of the corrupted response;
  - that `t3_stamp` lines up with t3.
- **`tb_ptp_servo`.** A closed loop: a servo-driven RTC against a reference
  clock that runs 50 ppm fast and starts 40 µs ahead. Checks:
  - eq. values exactly;
  - lock to within 40 ns and 1 ppm;
  - corrections on every SYNC with smoothing off;
  - drift when free running.
- **`tb_fh_node`.** A master node and a slave node back to back on one clock,
  with the slave starting 0.25 s behind. Checks:
  - IQ in order both ways;
  - lock to within 16 ns;
  - the delay estimate exactly;
  - the 8 kHz period.
- **`tb_fh_top`.** End to end at reduced sizes:
  - two clocks 50 ppm apart;
  - a switch model with 2 µs latency and PDV in each direction;
  - IQ at the profile-1 rate.

  It steps through these phases, and counts a failure for any mechanism that
  never occurred:
  1. lock;
  2. IQ load;
  3. transmit back-pressure;
  4. smoothing off;
  5. servo off;
  6. receive overflow.
- **`tb_fh_top_full`.** `fh_top` at its defaults, about 24 ms of traffic
  (3 SYNC intervals, 1.3 M IQ words each way). Checks:
  - the first delay exchange;
  - each offset estimate against the true clock difference;
  - the SYNC interval;
  - frame integrity.

  At full size the first time correction comes only after 2 s of simulated
  time. Locking at full size is therefore shown only by the reduced-size
  tests.

- **`tb_fh_top_modes`.** Four copies of the design run side by side. There is
  no IQ traffic, and each switch adds 0–400 ns of random delay. The jitter of
  the 8 kHz period stands in for phase noise. A typical run gives:

  | configuration | 8 kHz period jitter (rms) | time error after 64 ms |
  |---|---|---|
  | smoothing on | 25 ns | −169 ns |
  | smoothing off | 98 ns | −68 ns |
  | free running | 0 ns | −3.2 µs (grows with 50 ppm) |
  | two hops, smoothing on | 30 ns | 62 ns; delay estimate 5.2 µs vs 2.6 µs |

  The testbench checks the ordering of these results. The lesson is that
  disciplining the clock costs jitter, and that averaging the offsets before
  stepping buys most of it back.

The switch model (`tb/eth_switch_model.sv`) delays each frame by a fixed
latency plus a random amount. It serializes frames at line rate with a 24-byte
gap, and never reorders them.
