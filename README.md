# Upstream Tracker front-end data format: formatter, e-port framer and back-end decoder

The Upstream Tracker is a silicon-strip detector read out by front-end ASICs
(SALT) of 128 strips each. Every ASIC must report every bunch crossing (BX),
in order, over a handful of 320 Mbps e-links, yet most crossings carry no hits
at all. The data format solves this with variable-length packets: a 6-bit
header for the common empty crossing, a 12-bit header plus 12-bit hits for an
occupied one, and a 12-bit "truncated" header when an event is too big. The
packets of one ASIC are laid end to end across all of its e-ports as one
continuous stream, and short 6-bit idle packets fill the e-ports whenever no
complete packet is waiting. A passive concentrator board then gives each ASIC
a fixed slice (a sub-frame) of an 80-bit GBT frame, and the back end cuts the
frame apart and parses each ASIC's stream on its own.

This repository holds synthesizable SystemVerilog for that chain: the packet
formatter and e-port framer of the ASIC, the fixed sub-frame placement of the
passive concentrator, and a back-end sub-frame decoder, plus a top level that
joins four ASICs into one GBT link, and self-checking testbenches.

## Packet format

All fields are sent most significant bit first.

| Packet | Bits | Layout |
|---|---|---|
| header only (BX veto, empty event) | 6 | `BXID[4] 1 0` |
| idle | 6 | `0000 1 1` |
| normal event, 1..threshold hits | 12 + 12·N | `BXID[4] 0 0 N[6]`, then N × `chan[7] adc[5]` |
| truncated event | 12 | `BXID[4] 0 1 N/4[6]`, no hits follow |
| non-zero-suppressed (NZS) | 12 + 804 | `BXID[4] 0 1 111111`, `nASIC[4] NumChanCM[8] NumChanSignal[8] NumChanRecover[8] CMValue[8]`, 128 × `adc[6]` |
| synch | 12 | fixed pattern (`12'hA5C` here) |

The flag pair after the BXID separates the short packets from the long
ones: `NoData=1` means 6 bits in total; `NoData=0` means a 6-bit Length field
follows. `NoData=1, IsTrunc=1` is only legal with BXID 0 and is the idle
packet, so idles can be recognised at any packet boundary. With `IsTrunc=1`,
the Length value 63 cannot be a real NumHits/4 (an ASIC has at most 128
hits, so at most 32) and marks the NZS packet. ZS and NZS data are never
mixed: the run mode (`ut_mode_e`) is a configuration input, not something
the stream announces.

An event is truncated if it has more hits than the configurable threshold
(default 63, the largest a 6-bit Length can carry; it can be tightened), or if
its whole packet would not fit in the free space of the ASIC's buffer. The
truncated header keeps NumHits/4 for monitoring.

## Data path

```
 events, hits  +-------------------+ items  +-------------+ NPORTS bytes  passive   80-bit   +---------------------+ headers,
 ------------->| ut_salt_formatter |------->| ut_eport_tx |-----+------> placement ------->  | ut_subframe_decoder | hits,
 (per ASIC)    +-------------------+ commit +-------------+     |        (wiring)  GBT frame | (one per ASIC)      | NZS info
                        ^ buf_free               |              |                            +---------------------+
                        +------------------------+              +--> ut_eport_ser x NPORTS --> serial e-links
```

`ut_link_top` instantiates one formatter, framer and decoder per ASIC, and
one serializer (`ut_eport_ser`) per e-port, whose serial lines come out as
`elink`. In the real system the concentrator's GBT transceiver deserialises
these e-links and sends the frame over an optical fibre; neither is modelled.
`gbt_tx_frame` is formed directly from the e-port bytes (the same bits the
e-links carry, 8 clocks earlier), and `gbt_rx_frame` is where the fibre
would deliver it, so the two port pairs are connected outside the top
(directly or through a register).

### Formatter (`ut_salt_formatter`)

Takes one event per handshake (`ev`: BXID, NoData, number of hits) and then
exactly that many samples (`smp`). It writes the packet into the framer's
buffer as a sequence of items of up to 16 bits, one item per clock: the
header in the cycle the event is accepted, then one 12-bit hit per cycle. A
normal event of N hits therefore takes N+1 clocks, an NZS event 134. The
decision between normal and truncated is made at acceptance, from the hit
count and `buf_free`; because only the framer's reads change the free space
afterwards, a packet that was started always fits. If not even the 12-bit
truncated header fits (or, in NZS mode, the full 816 bits), `ev_ready` stays
low until it does. Hits of truncated events and samples in synch mode are
read and discarded. The last item of each packet carries `wr_commit`.

### Framer and idle insertion (`ut_eport_tx`)

This is the least obvious part. The framer holds a circular bit buffer
(`DEPTH` = 2048 bits) with three pointers: write, commit and read. The
formatter advances the write pointer with every item and the commit pointer
at the end of every packet. On each `bx_stb` the framer builds one frame of
`8*NPORTS` bits and puts byte k of it on e-port k (e-port 0 carries the first
8 bits in the stream):

1. if the previous frame ended inside an idle packet, it first sends the
   remaining bits of that idle packet;
2. then as many committed bits as are waiting and fit;
3. then idle packets to the end of the frame, the last one possibly cut
   off and finished in step 1 of the next frame.

Because only committed bits are read, an idle packet can never land inside
a packet that the formatter is still writing, even when the hits of an event
trickle in over many crossings. The receiver therefore only ever has to look
for idles at packet boundaries. The frame register changes one clock after
`bx_stb` and `frame_valid` marks that clock.

### Serializer (`ut_eport_ser`)

Loads an e-port's byte with the framer's `frame_valid` and shifts it out MSB
first over the next 8 clocks. The clock must therefore run at the e-link bit
rate, 320 MHz, with `bx_stb` every 8 clocks.

### Passive concentrator (inside `ut_link_top`)

ASIC a owns e-ports `port_offset(a)` to `port_offset(a)+NPORTS[a]-1`,
counted from the MSB end of the GBT frame; each e-port is 8 bits of the frame.
The default split, 4+2+2+2 e-ports, fills the 80-bit frame exactly; with
`GBT_W` = 112 the frame takes 14 e-ports, for example 5+4+3+2 (five is the
most one ASIC uses). Unused frame bits are zero. No logic is involved: the placement is fixed wiring,
and the sub-frames stay independent.

### Decoder (`ut_subframe_decoder`)

Appends each received sub-frame behind the bits it still holds in a
left-aligned accumulator (`2*8*NPORTS + 48` bits) and parses one item per
clock from its top: a 6-bit prefix, then, depending on it, the Length field,
hits, the 36-bit NZS parameter block or 6-bit NZS samples. Idle packets are
dropped. It produces registered one-clock records: `hdr` (kind, BXID,
Length), `hit` (channel and ADC; for NZS, the channel index and the raw
6-bit value) and `info` (NZS parameters). It also checks the stream:
`bxid_err` when an event's BXID is not the previous one plus 1 (every
crossing is sent, in order), `fmt_err` for the illegal prefix
`BXID≠0, 1, 1`, `sync_err` for a wrong synch pattern, and a sticky
`overflow` if a sub-frame arrives when it cannot be stored. Since every item
is at least 6 bits, the decoder keeps up as long as sub-frames come no more
often than every `ceil(8*NPORTS/6)+1` clocks (7 clocks for four e-ports).

Synch packets have no distinguishing flags, and their pattern is a
placeholder, so the decoder recognises them only when `cfg_mode` is
`MODE_SYNC`.

## Clocking and throughput

Everything runs on one clock with a one-cycle `bx_stb` per crossing. The
crossing rate is 40 MHz: one 80-bit frame per crossing makes the 3.2 Gbps
link rate (and a 112-bit frame the 4.48 Gbps one). The testbenches use 8
clocks per crossing (the 320 MHz e-link bit clock for 40 MHz crossings); the
formatter needs N+1 clocks for an event with N hits,
and the decoder the rate given above. An e-port carries 8 bits per crossing,
so an ASIC with two e-ports sends 16 bits per crossing: it keeps up while an
average event needs fewer. With 88.2% of crossings sending a 6-bit header and
11.8% a normal packet, that holds while non-empty events average fewer than
about 6.5 hits; beyond that the buffer fills and events are truncated.
An occupied 63-hit packet (768 bits) and an NZS packet (816 bits) both fit the
2048-bit buffer.

## Parameters

| Module | Parameter | Default | Origin |
|---|---|---|---|
| `ut_link_top` | `NASIC` | 4 | own choice; 4192 ASICs over about 1000–1200 links is about 4 per link |
| `ut_link_top` | `NPORTS` | `'{4,2,2,2}` | own example; 1 to 5 e-ports per ASIC allowed |
| `ut_link_top` | `GBT_W` | 80 | GBT frame width for the passive concentrator |
| `ut_link_top`, `ut_eport_tx` | `DEPTH` | 2048 | own choice (power of two) |
| `ut_eport_tx`, `ut_subframe_decoder` | `NPORTS` | 4 | |
| `ut_pkg` | `SYNC_PATTERN` | `12'hA5C` | placeholder, the real pattern was never fixed |
| input | `cfg_trunc_thr` | 63 after configuration | configurable, 63 by default |

## What follows the format definition and what does not

Taken from the format definition: all packet layouts and codes, the 5-bit
ZS and 6-bit NZS ADC widths, the NumHits/4 length of truncated events, the
truncation rule (threshold or full buffer) with default threshold 63, idle
filling, the coherent use of several e-ports by one ASIC, 8 bits per e-port
per crossing, MSB-first order, sequential BXIDs, one fixed sub-frame per
ASIC in an 80-bit frame.

This design's own choices: the valid/ready handshakes, the buffer size and
its commit pointer, "buffer full" meaning "this packet would not fit", the
decision to make the NZS and synch runs wait for space rather than truncate,
the synch pattern and the synch run mode, the asynchronous active-low reset,
the single clock with a crossing strobe, the decoder's output records and its
BXID and format checks, and the 4-ASIC, 4+2+2+2 link configuration.

Not implemented: the analog front end and ADC of the ASIC; its digital
signal processing (pedestal and common-mode subtraction, zero suppression),
whose results the formatter takes as inputs; the SLVS line drivers of the
e-links and the flex cable; the GBT transceiver and optical link; and the back-end hit
clustering and spill-over correction. Also not implemented is the
alternative of an active concentrator that would repack up to eight ASICs
into a 112-bit frame with 24-bit error-protected headers and 16-bit hits:
its error-correction code is not specified.

## Files

| File | Contents |
|---|---|
| `rtl/ut_pkg.sv` | widths, codes, `ut_mode_e`, event, sample, NZS-info and header types |
| `rtl/ut_salt_formatter.sv` | event-to-packet formatter |
| `rtl/ut_eport_tx.sv` | packet buffer and e-port framer with idle insertion |
| `rtl/ut_eport_ser.sv` | e-port serializer, one e-link bit per clock, MSB first |
| `rtl/ut_subframe_decoder.sv` | back-end sub-frame parser |
| `rtl/ut_link_top.sv` | one GBT link: formatters, framers, passive placement, decoders |
| `tb/ut_tb_pkg.sv` | reference model that builds expected packet bit streams |
| `tb/tb_ut_*.sv` | one self-checking testbench per module, plus `tb_ut_link_lumi` and `tb_ut_link_wide`, two occupancy workloads |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal rtl/ut_pkg.sv tb/ut_tb_pkg.sv \
  rtl/ut_salt_formatter.sv rtl/ut_eport_tx.sv rtl/ut_eport_ser.sv \
  rtl/ut_subframe_decoder.sv rtl/ut_link_top.sv tb/tb_ut_link_top.sv \
  --top-module tb_ut_link_top -o sim
./obj_dir/sim
```

Replace the last testbench and top-module name to run another one; each
needs only the packages and the modules it instantiates.

- `tb_ut_salt_formatter`: 300 random ZS events (header-only, normal,
  truncated by threshold, truncated for space, threshold tightened to 20
  halfway), a wait for space, NZS and synch events; compares every written
  bit and packet boundary with the reference model and checks N-cycle and
  133-cycle commit latencies.
- `tb_ut_eport_tx`: 400 packets written in random pieces at random times,
  crossings every 1 to 12 clocks; the concatenated e-port bytes must be the
  packets, intact and in order, separated only by whole idle packets.
- `tb_ut_subframe_decoder`: a reference stream with random idles, one BXID
  jump, one illegal prefix and one bad synch pattern, fed at the fastest
  supported rate; compares all decoded records and error counts.
- `tb_ut_link_top`: the full design at its default parameters, four ASICs
  in a loop-back link through ZS (800 crossings, including a burst that fills
  a buffer and a threshold change), NZS and synch runs; compares every
  decoded record per ASIC and fails if any mechanism (header only, normal,
  both truncations, idle insertion and removal, NZS, synch, threshold change,
  mode switch) never occurred, and compares every serial e-link bit with the
  GBT frame. It runs in well under a minute.
- `tb_ut_eport_ser`: 500 bytes shifted out back to back, MSB first.
- `tb_ut_link_lumi`: 6000 crossings of the event mix at the nominal
  luminosity (88.2% header-only, 11.8% with hits, 1 to 4 hits each, rare
  events above 63 hits); checks that every event and hit arrives and that no
  buffer overflows, and prints the bits per crossing (about 10, against 16 for
  a two-e-port ASIC) and the peak buffer fill (about 200 of 2048 bits).
- `tb_ut_link_wide`: the link top with a 112-bit frame and ASICs on 5, 4,
  3 and 2 e-ports (14 e-links), each loaded to 80-87% of its e-port
  capacity for 4000 crossings; checks that every event and hit arrives with
  no buffer-full truncation or error flag, including at the five-e-port
  decoder's fastest sub-frame rate.
