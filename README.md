# MAPS-DAQ: FPGA logic of a VME readout card for a four-output pixel sensor

A monolithic active pixel sensor (MAPS) of the MIMOSA-V kind has one million
pixels. They are read out as four independent quadrants of 262,144 pixels. Each
quadrant output is digitised by a 12-bit A/D converter at 20 MHz, so one frame
takes 262,144 x 50 ns = 13.1 ms. A particle shows up as a step between two
successive readings of the same pixel. The card therefore keeps every pixel's
recent history in external SRAM and forms the *correlated double sample* (CDS),
the difference of two consecutive frames, while the data stream in.

This RTL is the card's FPGA logic. It does three jobs:

* **Continuous acquisition.** Every pixel is updated in its SRAM word once per
  frame, with no dead time.
* **Zero-suppressed readout.** On a trigger, the card reports only the pixels
  whose CDS, after pedestal subtraction, is above a per-pixel threshold. It does
  not stop acquisition to do so.
* **Full-frame readout.** For debugging and pedestal studies, the card can
  instead send the raw samples of three whole frames.

The data leave through a VME64x slave with MBLT (64-bit block transfer).
Triggers arrive on a simple bus (strobe and 16-bit trigger number). The card
answers on that bus with BUSY and XOFF.

## The pixel word and the revolving buffer

Each quadrant has a 256k x 48 synchronous SRAM. All four share one 18-bit
address bus, because the four quadrants are sampled in lock-step. Location
`pix_ID` holds:

| field | bits  | content                                            |
|-------|-------|----------------------------------------------------|
| E     | 47:36 | sample of frame N-3                                |
| D     | 35:24 | sample of frame N-2                                |
| C     | 23:12 | sample of frame N-1                                |
| B     | 11:6  | CDS pedestal, two's complement                     |
| A     | 5:0   | noise threshold, unsigned                          |

(`maps_daq_pkg::pix_word_t`.) The exact bit boundaries of C, D and E are this
design's choice: three 12-bit samples packed above the two 6-bit fields.

Each 50 ns A/D period (`DIV` = 4 clocks of an 80 MHz system clock) does one
read-modify-write of one pixel on all four SRAMs (`acq_ctrl`):

| clock | action                                                                   |
|-------|--------------------------------------------------------------------------|
| 0     | read of `SRAM[pix_ID]`; the A/D samples are captured at the end          |
| 1     | read data captured (one-clock synchronous SRAM)                          |
| 2     | `pixel_update` shifts C to D and D to E, puts the new sample in C, and forms the CDS |
| 3     | write-back. The pixel update is reported to the trigger processors (`upd_valid`) |

The update computes `cds = sample_N - C - B` and flags a hit when `cds > A`.
This is the same as requiring the CDS to exceed pedestal plus noise. The
reported 12-bit value is clamped to 0..4095. `pix_ID` wraps after 262,143.
StartOfFrame marks pixel 0, and an 8-bit frame counter advances at every wrap.

## Dead-time-free triggers: the scan window

The key idea is in `trigger_proc`. Suppose a trigger arrives while frame N is
being sampled, at pixel `pix_ID_Trig`. The processor then stores the hits of
exactly one frame's worth of pixel updates:

* From `pix_ID_Trig` to the end of frame N. Here the CDS is
  `sample_N - sample_N-1`, because field C still holds frame N-1.
* After the wrap, from pixel 0 to `pix_ID_Trig - 1` of frame N+1. Field C has
  been refreshed by then, so the same formula yields `sample_N+1 - sample_N`.

Every pixel is evaluated once, within 262,144 A/D periods (13.1 ms) of the
trigger. Acquisition never stops. Each processor has one hit FIFO per quadrant
(`sync_fifo`, 1024 entries by default). A hit that finds its FIFO full is
dropped and counted. The FIFOs only need to absorb the hits that arrive while
the output is slow or while an older trigger's packet is still going out.

There are `NPROC` = 2 processors, used in strict rotation so that packets leave
in trigger order (`trigger_if`):

* The first trigger raises **BUSY**.
* A second trigger, arriving while the first is being served, takes the other
  processor and raises **XOFF**. XOFF means no more triggers can be accepted.
* A trigger that arrives under XOFF is refused and counted.

With `NPROC = 1`, XOFF follows the first trigger. A processor stays busy until
its packet has been written to the output FIFO.

## Packet formats (zero-suppressed mode)

The packet of a trigger is built while its scan runs. `packet_builder` writes
the header as soon as the trigger is taken. It then moves each hit out of the
hit FIFOs as soon as it is there, taking the lowest non-empty quadrant first,
and writes the trailer after the scan's last pixel. The order of hits inside a
packet is therefore not fixed; a hit is identified by its address. Packets
still leave in trigger order. The builder writes 64-bit words:

| word               | 63:56        | 55:24            | 23:16         | 15:0           |
|--------------------|--------------|------------------|---------------|----------------|
| header             | `'H'` (0x48) | 0                | frame counter | trigger number |
| trailer            | `'T'` (0x54) | hit count (32 b) | frame counter | trigger number |

Compact mode carries two hits per word:

| part of the word | CDS   | pixel index | quadrant |
|------------------|-------|-------------|----------|
| first hit        | 31:20 | 17:0        | 19:18    |
| second hit       | 61:50 | 49:32       | 63:62    |

* A 20-bit pixel address is the quadrant followed by the 18-bit index.
* If the hit count is odd, the last word's upper half is zero.
* Bits 63:62 are left unassigned by the format. This design puts the second
  hit's quadrant number there.

Extended mode carries one hit per word, with both raw samples so that the CDS
can be redone off-line:

| 63:56 | 55:44    | 43:32      | 31:26    | 25:20 | 19:0          |
|-------|----------|------------|----------|-------|---------------|
| 0     | sample N | sample N-1 | pedestal | noise | pixel address |

## Full-frame readout

In full-frame mode (CSR bit 1), a trigger in frame N makes `acq_ctrl` finish
frame N and frame N+1. At that point fields E, D and C hold frames N-1, N and
N+1. Recording then stops, and the SRAM is read back address by address. Each
pixel address produces three words (frames N-1, N, N+1). Each word carries the
four quadrants' samples, padded to 16 bits, quadrant q in bits 16q+15:16q. That
is 3 x 262,144 x 8 bytes = 6.3 MB per event. The readout waits whenever the
output FIFO has fewer than 8 free places. Afterwards DetectorReset is pulsed
and acquisition restarts at pixel 0. BUSY and XOFF stay high throughout.

## VME access

The board answers when A31..A24 equals `base_addr`. Accepted address
modifiers: A32 single cycles (0x09/0x0D) and A32 MBLT reads (0x08/0x0C). The
slave is synchronous: AS* and DS* pass two flip-flops.

| offset | access | content                                                                 |
|--------|--------|-------------------------------------------------------------------------|
| 0x00   | R/W    | CSR: bit 0 run, bit 1 full-frame mode, bit 2 extended packets           |
| 0x04   | R      | status 0: bit 0 BUSY, bit 1 XOFF, bit 2 full-frame busy, 15:8 frame counter, 31:16 output FIFO words |
| 0x08   | R      | output FIFO head, bits 31:0                                             |
| 0x0C   | R      | output FIFO head, bits 63:32, and pop                                   |
| 0x10   | R      | status 1: 15:0 triggers refused, 31:16 hits lost to full hit FIFOs      |
| 0x14   | R/W    | pixel-load address: 17:0 pixel, 25:24 quadrant                          |
| 0x18   | W      | pixel-load data: 11:6 pedestal, 5:0 threshold; writes the pixel's SRAM word, then advances the address |
| 0x1C   | R      | status 2: triggers accepted                                             |

**MBLT reads.** An MBLT read at any offset streams the output FIFO, one 64-bit
word per data strobe:

* bits 63:33 go on A31..A1, bit 32 on LWORD*, bits 31:0 on D31..D0;
* a strobe that finds the FIFO empty gets BERR*, which ends the block.

**Loading pedestals and thresholds.** These are loaded through 0x14/0x18 while
run is off. Each load uses that quadrant's own chip select and clears the
pixel's sample fields. The `tap_*` outputs present every pixel update's new
samples, for an on-board processor that computes pedestals and noise.

Change the mode bits only while BUSY is low.

## Sizes and rates

| quantity                         | value                                                     |
|----------------------------------|-----------------------------------------------------------|
| frame time                       | 262,144 x 4 clocks at 80 MHz = 13.1072 ms                 |
| zero-suppressed processing       | one frame (13.1 ms) after the trigger; the packet is written during the scan |
| embedded memory                  | 8 hit FIFOs x 1024 x 66 bit + 2048 x 64 bit output FIFO = 671,744 bits; the target FPGA (EP2C70) has about 1 Mbit |
| MBLT beat with the test master   | about 112 ns per 64-bit word, about 71 MB/s               |

The VME64 peak of 160 MB/s needs a 50 ns beat. This slave, which spends 4
clocks from strobe to DTACK* and 3 clocks to release at 80 MHz, does not reach
that. A faster clock or a pre-fetching slave would be needed.

## Modules

| file                  | role                                                         |
|-----------------------|--------------------------------------------------------------|
| `maps_daq_pkg.sv`     | word and hit types, packet field helpers                      |
| `pixel_update.sv`     | field shift, CDS, threshold test (combinational)              |
| `acq_ctrl.sv`         | pixel/frame timing, SRAM read-modify-write, pixel load, full-frame readout and restart |
| `sync_fifo.sv`        | embedded FIFO (hit buffers, output buffer)                    |
| `trigger_if.sv`       | trigger strobe synchroniser, processor allocation, BUSY/XOFF  |
| `trigger_proc.sv`     | one trigger's scan window                                     |
| `packet_builder.sv`   | header / compact or extended data / trailer                   |
| `vme_slave.sv`        | VME64x A32 D32 + MBLT slave, registers                        |
| `maps_daq_top.sv`     | the card: everything wired together                           |

**Parameters of `maps_daq_top`:**

* `NQUAD` = 4
* `NPIX` = 262144
* `DIV` = 4
* `NPROC` = 2
* `HIT_DEPTH` = 1024
* `OUT_DEPTH` = 2048

**Not in the RTL.** The A/D daughter cards, the pixel SRAMs and the VME
transceivers are outside the FPGA and connect through the top's ports. Split
in/out/enable signals replace the bidirectional buses. The on-board processor,
its memories, USB 2.0, RS-232, the configuration devices and the diagnostic
LEDs are not part of this RTL.

## Simulation

Every testbench in `tb/` checks itself. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_maps_daq_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/maps_daq_pkg.sv tb/tb_maps_daq_top.sv
    ./obj_dir/Vtb_maps_daq_top

The testbenches are:

* `tb_<module>`: one per module.
* `tb_maps_daq_top`: the whole card at 64 pixels per quadrant. It loads
  pedestals over VME and runs two overlapping triggers (XOFF), a refused
  trigger, compact and extended packets, an odd hit count, a hit-FIFO overflow,
  a full-frame readout under output back-pressure, the restart, and MBLT reads
  ended by BERR*. Each of these events is counted, and the test fails if one
  never happens.
* `tb_maps_daq_full`: the same scenario with every parameter at its default. It
  moves the full 6.3 MB frame readout and takes about 20 s.

The sensor model is a formula: a base level per pixel, plus a step on
pseudo-randomly chosen pixels and frames. The expected hits of every packet are
computed from that formula. Each packet must carry each of them exactly once,
in any order. In the overflow case it may miss some, and the number missed must
equal the lost-hit counter. `tb/pixel_sram_model.sv` models the external SRAM. The VME
master is in `tb/vme_master_tasks.svh`.

## How far to trust it

**Verified.** Everything above, in simulation only:

* data formats and the CDS window, at full size;
* the SRAM and VME handshakes, against the models in `tb/`, not against
  datasheets.

**Not done.** No timing closure on the target FPGA. The 80 MHz system clock is
an assumption.

**Own choices.** The following were filled in here because the specification
does not give them:

* the A/D pipeline latency (a sample is assumed valid by the end of the first
  clock of its period);
* the register map;
* the hit-FIFO depth, since the expected occupancy is not known;
* the overflow policy (drop and count);
* the full-frame word order;
* the reset length.

**Given by the specification.** The following are taken from it:

* the SRAM word fields;
* the CDS rule and its wrap-around window;
* the two packet formats;
* the three-frame full-frame mode with its stop and restart;
* the BUSY/XOFF meaning;
* the 20 MHz, four-quadrant, 262,144-pixel timing.
