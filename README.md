# FPGA front end for fluorescence-lifetime droplet sorting

Droplets in a microfluidic channel pass a detection spot at up to about a
thousand per second. Each one has to be classified by the **fluorescence
lifetime** (FLT) of its content, and then steered by an actuator further
down the channel. The lifetime is measured by time-correlated single photon
counting (TCSPC). A pulsed laser excites the droplet many millions of times
per second. A single-photon avalanche diode (SPAD) reports the few photons
that come back. For every photon the FPGA measures the delay between the
laser pulse and the photon. The histogram of those delays is the
fluorescence decay, and the lifetime is fitted to it.

This RTL is the FPGA half of such a system, built on a SoC FPGA where an ARM
processor does the histogramming and fitting. Its central idea is the
**packetized photon stream**. Time is cut into short packets, and the FPGA
counts the photons in each one. From those counts it decides in hardware
which packets belong to a droplet and which to the background between
droplets. It tags the stream with that decision. The processor then only has
to sum tagged packets into histograms. It never has to search the raw stream
for droplets. The stream also runs at a constant word rate, so a fixed DMA
transfer size always covers the same stretch of time, whatever the photon
count.

## Signal flow

```
              START_LASER (to laser driver)
                  ^
 freq_divider ----+--START--> tdc <--taps-- tdl_delay_line <-- STOP (SPAD)
      |                        | hit, coarse, fine
      +------PACKET-------> write_data_control ----32-bit words----> sync_fifo (data) --> dma_* (to DMA / processor memory)
                               |  (droplet_detector inside)
                               | packet_number, packet_tick
                               v
 sort_wr_* (from processor) -> sync_fifo (sorting) -> sorting_control --> CONTROL (to actuator)
```

Everything runs on one 200 MHz clock (`clk`) with an asynchronous active-low
reset (`rst_n`). The top module is `flt_top`.

| file | role |
|---|---|
| `rtl/flt_pkg.sv` | word formats (`photon_word_t`, `packet_word_t`), packet classes, sorting entry |
| `rtl/freq_divider.sv` | START and PACKET pulse generators |
| `rtl/tdl_delay_line.sv` | **behavioural model** of the tapped delay line (simulation only) |
| `rtl/tdc.sv` | hit detection, fine code, START-relative coarse counter |
| `rtl/droplet_detector.sv` | packet classification and droplet/background flags |
| `rtl/write_data_control.sv` | builds the word stream; packet and photon counters |
| `rtl/sync_fifo.sv` | show-ahead FIFO, used for the data stream and for the sorting entries |
| `rtl/sorting_control.sv` | CONTROL pulse timing |
| `rtl/flt_top.sv` | wiring |

## Photon time stamps

`freq_divider` produces START, a one-cycle pulse every `cfg_start_div` clocks.
START triggers the laser and defines the histogram window. A divisor of 2
gives the maximum rate of 100 MHz. The TDC has two parts:

* **Coarse**: an 8-bit counter of 5 ns clock periods since START. It is 0 in
  the period in which START is high, and it saturates at 255.
* **Fine**: a tapped delay line of 255 taps at 19 ps, sampled on every clock
  edge. A STOP edge that arrives t before a clock edge has travelled about
  t/19 ps taps. The fine code is the **number of ones** in the sample. A
  ones count tolerates isolated bubbles in the thermometer code. A new photon
  is recognised when tap 0 rises between two samples.

If the laser fires at the START rising edge at time Ts, a photon reported as
`(coarse, fine)` arrived at

    t  =  Ts + (coarse + 1) * 5 ns  -  fine * 19 ps     (within one tap)

So a *larger* fine code means an *earlier* photon inside its clock period.
255 taps at 19 ps cover 4.85 ns of the 5 ns period. A photon in the first
0.15 ns of a period therefore reads as fine = 255. This dead zone, and the
real non-uniform tap delays of an FPGA carry chain, are corrected by a bin
calibration in software, not in this RTL.

The delay line itself is device-specific: on an FPGA it is a carry chain
with a row of capture flip-flops. `tdl_delay_line` is a simulation model of
that line. It uses `$realtime`, so synthesis tools reject it. Replace it with
a carry-chain macro of the same ports (`clk`, `stop`, `taps`) for hardware.
The rest of the design is synthesizable.

## The word stream

Every word written into the 32-bit data FIFO is one of three kinds:

```
photon word   31........16 15.....8 7......0
              0 (unused)    coarse   fine            fine >= 1, so never zero
packet word   31......24  23   22   21......16  15..........0
              packet no.  BG   DR   droplet no.  0xFFFF (packet stamp)
zero word     0x00000000
```

**Constant rate.** The SPAD has a 50 ns dead time, so it can deliver at most
one photon per 10 clock cycles. `write_data_control` divides time into
10-cycle *write slots*. In a slot with no photon word it writes a zero word.
The stream therefore carries exactly one photon-or-zero word per slot
(20 Mword/s), plus one packet word per packet. If the DMA transfer size is
set to slot rate / droplet rate, one transfer holds about one droplet period.
While one buffer fills, the processor works on the other. The zero words are
simply skipped by the reader.

**Packet words are trailers.** At each PACKET pulse (every `cfg_packet_div`
clocks) a packet word is written *after* the photon words of the packet that
has just ended. It carries that packet's number, its flags and the current
droplet number. A photon reported in the very cycle of the PACKET pulse
belongs to the ending packet. The FIFO has a single write port, so ordering
is enforced by a small arbiter. Photons of the ending packet go first, then
the packet word. A photon that arrives after the pulse waits until the
packet word is written. Zero words go last.

**Error counters.** Photons can only collide when two of them arrive within
three cycles around a packet boundary, which the dead time rules out. A
photon that finds the one-word buffer still occupied is dropped and counted
in `lost_photons`. If the FIFO is full, words are dropped and counted in
`dropped_words`. The time `{coarse,fine} = 0xFFFF` could be mistaken for a
packet stamp, so it is written as `0xFFFE`. Only a photon at the saturated
coarse code and the full fine code can have that time.

## Droplet detection (packets and flags)

This is the part of the design that most needs explaining. The photon count
of each packet is classified against two thresholds that the processor sets
from measurements:

* **droplet packet**: count > `cfg_thr_droplet`
* **background packet**: count < `cfg_thr_background`
* **unclassified**: anything in between (droplet edges, noise)

Single packets are unreliable. A background stretch can contain one bright
packet, and a droplet can contain a dark one. A two-state machine in
`droplet_detector` therefore filters the classes:

| state | event | result |
|---|---|---|
| BACKGROUND | 3rd droplet packet in a row | go to DROPLET; droplet number + 1; this packet is the first with DR = 1 |
| BACKGROUND | any other packet | DR = 0; BG = 1 for a background packet, 0 otherwise |
| DROPLET | background packet directly after >= 2 unclassified packets in a row | go to BACKGROUND; this packet has DR = 0, BG = 1 |
| DROPLET | any other packet (including an isolated dark one) | DR = 1, BG = 0 |

Any packet of another class breaks a run. The droplet number is 6 bits and
wraps. After reset the detector is in BACKGROUND with droplet number 0. The
first droplet is therefore number 1.

Example, with thresholds 100 and 20 (counts per packet):

```
count : 5  150  6 | 40  70  120 130 140 160  10 150 | 60  30   5 |  4 200  3
class : B   D   B |  U   U   D   D   D   D   B   D  |  U   U   B |  B  D   B
DR    : 0   0   0 |  0   0   0   0   1   1   1   1  |  1   1   0 |  0  0   0
BG    : 1   0   1 |  0   0   0   0   0   0   0   0  |  0   0   1 |  1  0   1
```

The isolated 150 in the background and the isolated 10 in the droplet do not
change the state. The processor builds a droplet's histogram from the photon
words of the packets flagged DR. It builds the background histogram from the
packets flagged BG, and subtracts its mean from the droplet's histogram.

## Sorting

When the processor has estimated a droplet's lifetime, it writes a 15-bit
entry `{action, droplet number, first packet number}` into the sorting FIFO
through `sort_wr_valid` / `sort_wr_entry`. The *first packet number* is the
packet number in the trailer of the droplet's first DR packet.
`sorting_control` uses the 8-bit packet number as its clock for the droplet's
position. The droplet reaches the actuator `cfg_sort_delay` packets after its
first packet. For an entry with `action = 1` the block waits until the packet
in progress is `first_packet + cfg_sort_delay` (mod 256). It then raises
CONTROL for `cfg_sort_width` packets. Other entries are handled as follows:

* An entry with `action = 0` is consumed without a pulse (`sort_passed`).
* An entry that arrives after its firing packet is discarded (`sort_missed`),
  so a late entry never fires on whichever droplet has reached the actuator
  by then.

Elapsed packets are computed modulo 256. `cfg_sort_delay` must therefore be
below 256 packets, and an entry must arrive less than 256 packets after its
first packet. The delay and width are expressed in packets because the packet
number is the only time base shared by the FPGA and the processor.

## Top-level ports (`flt_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 200 MHz clock, async active-low reset |
| `stop` | in | 1 | SPAD output |
| `start_laser` | out | 1 | laser trigger (= START) |
| `control` | out | 1 | actuator drive |
| `cfg_start_div`, `cfg_packet_div` | in | 32 | START and PACKET periods in clock cycles (values < 2 act as 2) |
| `cfg_thr_droplet`, `cfg_thr_background` | in | 16 | photon-count thresholds |
| `cfg_sort_delay`, `cfg_sort_width` | in | 8 | sorting delay and pulse width, in packets (width 0 acts as 1) |
| `dma_data`, `dma_valid`, `dma_ready` | out/out/in | 32/1/1 | word stream, valid/ready handshake (show-ahead FIFO) |
| `sort_wr_valid`, `sort_wr_entry`, `sort_full` | in/in/out | 1/15/1 | sorting entries from the processor |
| `packet_number`, `droplet_start` | out | 8/1 | packet in progress, pulse at each droplet start |
| `lost_photons`, `dropped_words` | out | 16 | error counters |
| `sort_fired`, `sort_passed`, `sort_missed` | out | 16 | sorting counters |
| `data_fifo_level`, `sort_fifo_level`, `sort_active_droplet` | out | 11/7/6 | status |

The configuration inputs are meant to come from processor-written registers,
and they should be held steady while the system runs. Example settings used in
the end-to-end test are a 50 MHz laser (`cfg_start_div = 4`), 10 µs packets
(`cfg_packet_div = 2000`) and thresholds 40 / 12.

## Parameters

| parameter | default | origin |
|---|---|---|
| clock | 200 MHz | published design (5 ns coarse step) |
| `TAP_PS` | 19 | published fine resolution |
| `NTAPS` | 255 | own choice, so that the ones count fits the 8-bit fine field |
| coarse / fine / packet number / droplet number widths | 8 / 8 / 8 / 6 bits | published word formats |
| droplet start run / end run | 3 droplet packets / 2 unclassified packets | published detection rule |
| `SLOT_CYCLES` | 10 | 50 ns SPAD dead time at 200 MHz |
| `CNT_W` (photon counter, thresholds) | 16 | own choice |
| `DATA_FIFO_DEPTH` | 1024 | own choice (51 µs of stream) |
| `SORT_FIFO_DEPTH` | 64 | own choice (one entry per droplet number) |

## What is outside this RTL

* The laser driver and laser diode.
* The SPAD.
* The actuator.
* The hard ARM processor and its SDRAM.
* The vendor scatter-gather DMA, FPGA-to-SDRAM bridge and register (PIO)
  cores.
* All processor software: double-buffered DMA descriptors, histogramming, TDC
  calibration, background subtraction, maximum-likelihood lifetime fit and
  the sorting decision.

These parts connect through the top-level ports.

## Design choices beyond the published description

The published system fixes the word formats, the counters and their widths,
the packet stamp, the zero-word rate scheme and the droplet/background rules.
The following details are this design's own:

* One clock for all FPGA logic.
* One-cycle START/PACKET pulses from integer dividers.
* The TDC details: hit detection on tap 0, the ones-count encoder, the
  saturating coarse counter and a 255-tap line.
* Trailer placement of packet words, the write arbiter and its ordering
  rules, the one-word photon buffer, and the `0xFFFF`-to-`0xFFFE`
  substitution.
* Which packet first carries each flag: the third bright packet carries the
  new droplet flag, and the packet that ends a droplet already carries the
  background flag.
* FIFO depths and their show-ahead valid/ready read side.
* The whole timing model of the sorting control: delay and width in packets,
  and the skip and miss rules.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_tdl_delay_line` | edge placed 19·m+7 ps before a clock edge gives exactly m+1 ones; full line while STOP is high; falling edge |
| `tb_tdc` | hit only on fresh edges, fine = ones count (with bubbles), coarse against cycles since START, saturation |
| `tb_freq_divider` | START and PACKET periods for several divisors, including the clamp |
| `tb_droplet_detector` | scripted trace with noise packets and hand-written flags, then about 3000 packets against a reference model |
| `tb_write_data_control` | whole word stream against an independently built expected stream; one photon-or-zero word per slot; packet-word latency; lost photon; `0xFFFF` substitution; full FIFO |
| `tb_sync_fifo` | random traffic against a queue model, through full and empty |
| `tb_sorting_control` | CONTROL present exactly in the expected packets; pass and miss counters |
| `tb_flt_top` | end-to-end run at default parameters (see below) |
| `tb_flt_workloads` | the three published flow rates (1000, 200, 5 droplets/s) at default parameters |

`tb_flt_top` emulates 1000 droplets/s with a 50 MHz laser and 10 µs packets.
Each laser pulse yields a photon with a probability set by the scene (droplet,
edge or background, plus noise packets). The photon delay is 1 ns plus an
exponential decay with a 1 ns lifetime. A SPAD model applies the 50 ns dead
time. The reader side stalls `dma_ready` at random. The testbench checks:

* every photon word against the true photon delay, within one tap;
* the packet numbers;
* the droplet flag of every packet against the scene;
* the count of photon and zero words per packet (200 ± 1);
* a lifetime estimate (mean delay) within 15 % of 1 ns for every droplet;
* that CONTROL rises exactly 40 packets after the first packet of each droplet
  that is to be sorted.

It also counts how often each mechanism occurs, and a mechanism that never
occurs counts as a failure. The mechanisms are: droplet start and end, ignored
noise packets, background flag, packet-number wrap, DMA stall, and sorting
fire, pass and miss. It simulates about 4.1 ms of system time, in a few
seconds.

`tb_flt_workloads` runs the full design at 1000, 200 and 5 droplets/s. The
droplet takes 30 % of each period, and packets are 1 % of the period (10 µs,
50 µs, 2 ms). While a droplet is in the spot the laser yields a photon on 45 %
of its pulses. After the dead time this gives about 10.6 million detected
photons per second, which matches the published photon counts per droplet at
all three rates. The run reproduces them: about 3.2e3, 1.6e4 and 6.5e5
photons per droplet. The testbench checks the following from the word stream
alone:

* every photon time;
* the slot count per packet;
* one detection per droplet;
* the photon count per droplet, within 20 % of the published count;
* the lifetime estimated from the coarse/fine codes, within five standard
  errors of 1 ns;
* the CONTROL timing.

The 5 droplets/s case simulates 0.2 s of system time (about 40 million
clock cycles). The whole run takes under a minute.

Example with plain Verilator (any testbench):

```
verilator --binary --timing --assert -Irtl rtl/flt_pkg.sv tb/tb_flt_top.sv \
          --top-module tb_flt_top -Mdir obj_tb_flt_top
obj_tb_flt_top/Vtb_flt_top
```

Verilator works with two-state values. The designs reset every register they
read, and the testbenches initialise everything they drive.

## Limits and trust

* The three flow rates differ only in register settings (packet length,
  thresholds) and in the size of the processor's DMA buffers. The 16-bit
  photon counter allows packets of up to 3.2 ms at the 20 MHz maximum
  detection rate. The 8-bit packet number limits the sorting delay to 255
  packets.
* The lifetime estimate in the testbenches is a plain mean delay, used only
  as a consistency check. The maximum-likelihood fit, the TDC calibration and
  the background subtraction belong to the processor software and are not
  part of this RTL.
* The delay-line model has uniform 19 ps taps. A real carry chain does not,
  and needs the software calibration.
* Timing closure at 200 MHz on a real device was not examined. The 255-input
  ones count is a single combinational stage and may need pipelining.
