# A deep-pipeline protocol processor for Ethernet / IP / TCP / UDP reception

Receiving a packet means checking and stripping a stack of headers: the Ethernet
CRC and destination, the IP version, header checksum, destination address and
lengths, IPv6 extension headers, fragment reassembly, and the TCP or UDP checksum.
Done in software, each of these tests touches every byte. This design does them
in hardware while the frame streams in, one 32-bit word per clock, so that only
the payload and a short notification reach the processor that runs the
application.

The central idea is a **register chain with one functional page (FP) per
protocol check**. A frame is shifted word by word down a chain of twelve
registers. Each FP is a small, independent unit wired to one stage of the chain:
it waits for the frame to arrive at its stage, picks out the header field it is
responsible for (its position is known from the byte counter and from lengths
other FPs have already found), and raises flags. A single controller watches
all the flags and decides, per frame, which FPs are enabled and whether the
frame is kept. Because every FP looks at its own chain stage, no FP needs to
drive a long wire across the whole design, and a new protocol check is added by
adding one stage and one FP.

This RTL covers the hardware part (the "deep pipeline"). The microcontroller
that configures it, owns the data buffer and talks to the host processor is not
included; every connection to it is a port of the top module.

## Block diagram

```
 rxd/rx_dv/rx_er   +-----+  beat   +----------------- C&C ------------------+
 ---(MII/GMII)---->| PSU |-------->| counter: stamps byte position, delays   |
                   +-----+         | start along the chain                   |
                                   +----+------------------------------------+
                                        | beat_o         ^ flags   | enables/starts
                                        v                |         v
   stage: 0     1     2     3     4     5     6     7     8     9     10    11
         ECC   EDA   ELT   IVF   IHL   IHC   IDA   ITL   IPN   IRA   TUC   TUL
                                                                        |
                               last stage ---> C&C payload writer ---> mem_* (data buffer)
                                               C&C decision -------> desc_* (notification)
                           cfg_* <---> C&C registers
```

| Stage | Module  | Job |
|-------|---------|-----|
| 0  | `eccfp` | Ethernet CRC-32 over the whole frame including the FCS |
| 1  | `edafp` | destination MAC: own address, broadcast, multicast, promiscuous |
| 2  | `eltfp` | length/ethertype field, classification, end-of-payload counter |
| 3  | `ivffp` | IP version (4 or 6) |
| 4  | `ihlfp` | IP header length (IHL x 4, or 40 for IPv6), header-end pulse |
| 5  | `ihcfp` | IPv4 header checksum |
| 6  | `idafp` | IPv4/IPv6 destination address: own, multicast, broadcast |
| 7  | `itlfp` | IP total length (IPv6: payload length + 40) |
| 8  | `ipnfp` | protocol / next header, walks IPv6 extension headers |
| 9  | `irafp` | fragment fields, reassembly table, duplicates, time-out |
| 10 | `tucfp` | TCP/UDP checksum with pseudo header, per-packet partial sums |
| 11 | `tulfp` | upper-layer length and byte count, UDP length check |

Other files: `gppp_pkg` (types and shared functions), `psu` (serial-to-parallel
unit), `reg_chain` (the pipeline registers), `cc` (controller and counter),
`field_grab` (helper that captures a field at a run-time byte offset), and
`gppp_top`.

## The beat and the byte counter

Everything in the chain is a `beat_t`: 32 data bits with the first received
byte in bits 31:24, the number of valid bytes (1..4), start-of-frame and
end-of-frame marks, a receive-error mark, and the **byte position** of the first
byte of the word, counted from the first byte of the destination address.

The position stamp is what lets the FPs be simple. An FP that needs bytes 30..33
(the IPv4 destination address of an untagged frame) compares the stamp of the
beat in its stage with 30 and takes the bytes it covers; a field that straddles
two words is assembled over two beats. Offsets that depend on earlier headers
(where the TCP header starts, where an IPv6 fragment header sits) are computed
by the FP that knows them and passed as a position to the FPs further down.
Since a downstream FP sees each word later than the upstream one, such a value
is always ready in time.

The PSU keeps a complete word until it knows whether another byte follows, so
that the end-of-frame mark is on the last word itself. The last word therefore
leaves the PSU two clocks after `rx_dv` falls.

## Start signals and stale flags

The controller delays the start-of-frame mark by one clock per stage, so FP
*k* gets a one-cycle `start` exactly when the first word of a frame reaches
stage *k*. An FP clears its state on `start`.

Until that moment, an FP still shows the flags of the previous frame. The
controller therefore keeps a "fresh" bit per FP, set by its start pulse, and
ignores the flags of an FP that is not fresh yet. This matters in one case
only: the discard flag of a stale FP must not drop the new frame.

## Enabling and disabling FPs

FPs are grouped by layer: Ethernet (ECC, EDA, ELT), IP (IVF, IHL, IHC, IDA,
ITL, IPN, IRA) and upper layer (TUC, TUL). The controller changes the enables
while the frame flows:

* **Layer-transparent shutdown**: as soon as any enabled, fresh FP raises
  discard, every FP is disabled and the frame is dropped; only the PSU keeps
  running, to find the next frame.
* **Layer-dependent disabling**: an ARP or RARP ethertype disables the IP and
  upper-layer FPs; ICMP, IGMP or ICMPv6 disables the upper-layer FPs. The frame
  is then delivered whole (ARP/RARP) or as IP payload to the host software.
* The configuration register `fp_mask` can switch individual FPs off
  permanently.

A frame is dropped if any discard was seen, if `rx_er` was raised during it, if
the ethertype is neither ARP/RARP nor IPv4/IPv6 (an 802.3 length field
included), or if the upper-layer protocol is not TCP, UDP, ICMP, IGMP or ICMPv6.

## Reassembly of IP fragments

This is the most involved part. `irafp` keeps a table of `SLOTS` packets
being reassembled (default 4). A packet is identified by its IP
identification, the low 32 bits of its source address and its protocol. Each
slot records up to `FRAGS` fragment offsets (default 8), whether the last
fragment (more-fragments = 0) has arrived, and the total length it implies.

* The lookup happens while the fragment's header passes stage 9; its result is
  frozen when the frame ends, so that the controller's commit after the end
  updates the entry that was looked up.
* A fragment whose offset is already recorded is a **duplicate** and raises
  discard.
* A fragment of a new packet takes a free slot. If no slot is free, or its
  slot has no free offset record, it raises discard.
* When the bytes recorded reach the total length, the slot reports `complete`
  and is freed.
* Each slot has a timer, started by its first fragment; when it reaches
  `TIMEOUT` cycles the slot is freed and `ra_timeout` / `ra_timeout_slot`
  tell the microcontroller so it can release the buffer space.

`tucfp` cannot check a fragment's checksum on its own. It keeps one **back-up
accumulator** per slot: the ones-complement sum of every fragment's upper-layer
bytes is added into the slot's accumulator, the pseudo header is added exactly
once (with the first fragment to arrive), and the upper-layer length is added
at completion. The controller waits after each committed fragment for
`reasm_ok` or `reasm_bad`, and on `reasm_ok` issues a descriptor of kind
`DK_REASM` for the whole packet. Only TCP and UDP fragments are reassembled;
other fragments go to the host as plain IP payload.

Fragment payload is written to `RING_BYTES + slot*SLOT_BYTES + offset`, so
fragments land in their final place whatever order they arrive in.

## Interfaces of `gppp_top`

| Port group | Meaning |
|---|---|
| `mii_mode`, `rx_dv`, `rx_er`, `rxd[7:0]` | MII (nibbles on `rxd[3:0]`, low nibble first) or GMII receive side; the preamble is skipped up to the `0xD5` start delimiter |
| `cfg_we`, `cfg_addr[3:0]`, `cfg_wdata`, `cfg_rdata` | register port for the microcontroller, see below |
| `mem_we`, `mem_addr`, `mem_be[3:0]`, `mem_wdata` | write port into the data buffer; `mem_addr` is the byte address of bits 31:24, `mem_be[3]` enables that byte |
| `desc_valid`, `desc` | one-cycle notification per delivered packet: kind, buffer address, length, protocol |
| `ra_timeout`, `ra_timeout_slot` | a reassembly slot timed out |
| `fp_discard`, `fp_en` | per-FP discard flags and enables, for observation |

Registers (32-bit words): 0 = MAC[47:32], 1 = MAC[31:0], 2 = IPv4 address,
3..6 = IPv6 address (3 most significant), 7 = {FP mask in bits 27:16,
accept-multicast in bit 1, promiscuous in bit 0}; read-only 8 = frames
received, 9 = frames dropped, 10 = discard flags of the last dropped frame.

Descriptor kinds: `DK_TCP` and `DK_UDP` (upper-layer header and data),
`DK_IP_PAYLOAD` (ICMP/IGMP and unreassembled fragments), `DK_ETH_PAYLOAD`
(ARP/RARP: the whole Ethernet payload without FCS), `DK_REASM` (a reassembled
packet, address of its slot).

Whole packets go into a ring of `RING_BYTES` bytes (default 16384) that wraps
to 0 when fewer than 2048 bytes remain. Freeing ring space is the
microcontroller's job; there is no back-pressure from the data buffer.

Parameters of `gppp_top`: `SLOTS` = 4, `FRAGS` = 8, `RING_BYTES` = 16384,
`SLOT_BYTES` = 65536, `TIMEOUT` = 3,750,000,000 cycles (30 s at 125 MHz).

## Timing

One clock per GMII byte (125 MHz for Gigabit Ethernet) or per MII nibble. A
word enters the chain every fourth byte and reaches the last stage 12 clocks
later. The keep/drop decision is taken two clocks after the last word has left
the chain, and the descriptor comes one clock after that; a reassembled
packet's descriptor follows up to five clocks later.

Only one frame is in the chain at a time. At GMII and MII rates this always
holds: the descriptor comes 18 clocks after the last byte on `rxd`, and the
next frame's first byte cannot arrive sooner than 20 clocks later (12 idle
bytes and 8 bytes of preamble). The FPs themselves accept one word per clock, so
the datapath would also run back to back at 32 bits per clock, but the
controller as written would need about 15 idle clocks between frames for that.

## How far this follows the original architecture

Taken from the architecture: the split into PSU, register chain, FPs and
controller-and-counter; one chain register per FP; the twelve FPs, their jobs and
their order along the chain; the 32-bit width; the FP interface (clock, enable,
start, data, discard flag, optional flags and controls); the
layer-transparent shutdown on discard and the layer-dependent disabling for
ARP/RARP and ICMP/IGMP; the duplicate-fragment discard, reassembly timers and
the per-packet back-up accumulators of the checksum unit with the pseudo header
added once; the 32-bit CRC that ends on a fixed residue.

Choices of this design: the beat format and byte-position stamp; the order of
`ihlfp` in the chain; the register map, the descriptor, the buffer layout and
ring size; the table size, key and time-out of reassembly; acceptance rules for
broadcast and multicast; the rules that drop unknown ethertypes, unknown
protocols, IP versions other than 4/6, IHL < 5, truncated frames and UDP length
mismatches. The microcontroller, its program and the host interface are not
part of this RTL.

Known limits:
* No VLAN tags, no IPv4 options beyond skipping them by IHL, no TCP option
  handling (none is needed for the checksum).
* IPv6 fragments: offsets and the more-fragments bit are taken from the
  fragment header; hop-by-hop, routing, destination-options and AH headers are
  skipped; ESP or unknown next headers drop the packet.
* Reassembly completes by byte count; overlapping fragments with different
  offsets are not detected.

## Verification

Every module has a self-checking testbench in `tb/` that computes expected
values independently (a bit-serial reference CRC, a reference ones-complement
sum, frames built byte by byte in `gppp_tb_pkg`) and ends with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog.

`tb_gppp_top` sends about 30 frames through the whole design over GMII and
MII and checks every descriptor and every payload byte written to a model of
the data buffer: TCP and UDP over IPv4 and IPv6 (with extension headers), ARP,
ICMP, multicast and broadcast, bad CRC, wrong MAC, wrong IP, bad header
checksum, bad TCP checksum, unknown IP version and protocol, IHL below 5, IP
total length below 20, a frame shorter than its IP length, a UDP length field
that disagrees with the IP length, receive error, duplicate fragments, two
reassemblies in and out of order, a reassembly with a
bad checksum, and a time-out (it sets `TIMEOUT` to 2000 cycles). It counts
each mechanism (discard per FP, shutdown, IP set off, upper-layer set off,
reassembly, time-out) and fails if one never happened. `tb_gppp_full` runs the
same scenarios on `gppp_top` with default parameters, without the time-out.

`tb_gppp_linerate` sends 40 frames at Gigabit line rate (12 idle clocks
between frames, the minimum), minimum- and maximum-size, IPv4 and IPv6, with
every fifth FCS corrupted. All good frames must be delivered in order, and the
time from the last byte to the descriptor must stay below the 20 clocks of gap
plus preamble; it is 18.

Running a testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb \
    rtl/gppp_pkg.sv tb/gppp_tb_pkg.sv rtl/*.sv tb/tb_gppp_top.sv \
    --top-module tb_gppp_top -o sim
./obj_dir/sim
```

Replace `tb_gppp_top` with any other testbench name. The end-to-end testbench
runs in under a minute.
