# HyperPlane: an intelligent free-space optical backplane in SystemVerilog

Electrical backplanes run out of pins long before they run out of logic. An
optoelectronic chip can instead carry thousands of optical bits, giving it
about 8 to 40 times more optical than electrical I/O bandwidth. The
HyperPlane uses that mismatch. Each board
(PCB) is a node. It reaches a large set of bit-parallel optical channels
that run past every board. It joins in through a few electrical *injector*
and *extractor* channels. Smart pixel arrays (SPAs) stand between the two
sides. Each pixel can pass its optical bit on, replace it with an injected
bit, copy it to an extractor, or both replace and copy. So a channel can
cover the whole backplane or be split into separate segments. Rings,
meshes, hypercubes and groups of buses can be embedded, and changed at run
time by writing a few control bytes. In *intelligent* mode every channel
reads packet headers as they pass. It extracts only the packets addressed
to its board, so channels become broadcast-and-select buses.

This RTL models the logic of that backplane: pixels, slices, arrays, the
two optical rings and the control path. It follows the architecture of
"Architecture of a Terabit Free-Space Intelligent Optical Backplane"
(1998), in the configuration that article calls the *conservative* SPA.
The optics, the message processors and the PCB logic are outside the RTL,
and the module ports stand in for them.

## Structure and default sizes

```
hyperplane                     16 PCBs, 2 streams (downstream, upstream), ring with wrap-around
 └ hyperplane_stream  x2       one ring: PCB k feeds PCB k+1 (stream 0) or k-1 (stream 1)
    └ spa            x16x2     2 smart pixel arrays per PCB per stream
       ├ address_latch         one-hot PCB address, loaded bit-serially
       ├ config_loader         one control byte per cycle into the channel control units
       ├ inj_gearbox  x4       64-bit electrical word -> two 32-bit optical words
       ├ ext_gearbox  x4       32-bit optical words -> 64-bit electrical word
       └ slice        x2       16 optical channels, 2 injectors, 2 extractors
          ├ smart_pixel x16    one channel row: 32 data + 2 framing pixels
          ├ channel_control_unit x16
          └ extractor_arbiter
```

| quantity | default | parameter |
|---|---|---|
| PCBs | 16 | `N` |
| arrays per PCB per stream | 2 | `SPAS` |
| slices per array | 2 | `S` |
| optical channels per slice | 16 (32 per array, 64 per stream) | `C` |
| injector / extractor channels per slice | 2 / 2 (8 / 8 per PCB per stream) | `NI` / `NE` |
| optical channel width | 32 bits + 2 framing bits | `W` |
| electrical channel width | 64 bits (`2*W`) | - |
| PCB address | 16 bits, one-hot | `A` |
| programmable delay | 1 to 4 register stages | `DLY_STAGES` |

At the intended rates, 500 MHz optical and 250 MHz electrical, an optical
channel and an electrical channel both carry 16 Gb/s. So an array has
512 Gb/s of optical and 64 Gb/s of electrical bandwidth. A stream has
64 channels, or 1 Tb/s, and the two streams together carry 2 Tb/s. The
shared constants are in `rtl/hp_pkg.sv`.

## The smart pixel and its four states

A pixel (`smart_pixel.sv`) has five parts:

- **Programmable delay.** The optical input goes through a chain of
  registers, and the `dly` field picks 1 to 4 stages. Every array latches
  the data passing through it, so the backplane is pipelined. The extra
  stages give the address logic time to settle at high optical clock
  rates.
- **Concentrator cell.** Copies the delayed bit onto extractor line `e`
  when `conc_en[e]` is set. In silicon this is a tri-state driver on a
  shared line. Here the line is an OR of the enabled cells, and an
  assertion in `slice.sv` checks that no line has two drivers.
- **Expander cell.** An (NI+1)-to-1 multiplexor that chooses the optical
  output. `exp_sel = 0` passes the delayed input on. `exp_sel = k` sends
  injector `k-1`.
- **Address comparator cell.** ANDs a header bit with the matching PCB
  address bit. The slice ORs the results of a row in a reduction tree.
- **Optical input and output ports.** In the RTL these are plain logic
  bits.

All pixels of one row get the same control signals, so one `smart_pixel`
instance holds the whole row (`W` bits). The four states are settings of
the two cells:

| state | `exp_sel` | `conc_en` | effect |
|---|---|---|---|
| transparent | 0 | 000 | the channel passes through |
| transmitting | k | 000 | injector k-1 replaces the channel downstream of this PCB |
| receiving | 0 | one-hot | the channel is copied to an extractor and also passes through |
| receiving and transmitting | k | one-hot | the upstream segment is extracted, and a new segment starts here |

A PCB that transmits on a channel overwrites whatever reaches it on that
channel. A broadcast packet that goes all the way round the ring is
therefore removed at its sender. The same rule splits a channel into
independent segments.

## Channel control word

Each optical channel has an 8-bit control word in its
`channel_control_unit` (type `hp_pkg::ccu_cfg_t`):

| bits | field | meaning |
|---|---|---|
| 7:6 | `dly` | extra delay stages (total latency 1 + dly cycles) |
| 5 | `filter` | 0: reconfigurable mode, 1: intelligent mode |
| 4:2 | `conc_en` | one-hot static extractor enable (reconfigurable mode) |
| 1:0 | `exp_sel` | 0: pass-through, k: transmit injector k-1 of the slice |

The 3-bit enable and the 2-bit select can name up to three extractors and
three injectors per slice. An elaboration-time assertion enforces that
limit.

## Packets and intelligent-mode reception

This is the least obvious part of the design.

**Framing.** Every channel word is `{vld, sop, data[W-1:0]}`. `vld` marks a
word that belongs to a packet, and `sop` marks the first word, the header.
A packet is the header plus the following words with `vld=1, sop=0`. It
ends when `vld` falls or when the next header arrives. Packets can be any
length, and back-to-back packets need no idle word between them. In the
header, bit k of the data lines up with bit k of the PCB address. With
one-hot addresses, a header that sets several bits is a multicast.

**Recognition.** In a channel with `filter = 1`, the unit looks at the word
leaving the delay chain. If it is a header (`vld & sop`) and any of its
address bits hits the PCB address, the unit raises its *Receive Request*.

**Arbitration.** A slice has only `NE` extractors for its `C` channels.
`extractor_arbiter` first marks as busy every extractor that is held by a
packet in progress or assigned statically. It then gives the free
extractors, in ascending order, to the requesting channels in ascending
order. The grant is combinational. A granted channel drives the header
onto its extractor in the same cycle. It keeps the extractor, recorded in
a register, for every following word of the packet.

**Drops.** A request that gets no extractor is not extracted at this PCB.
`rx_drop` pulses for one cycle. The packet still travels on along the
channel to the other PCBs. There is no flow control or retry.

**Static extraction** (`filter = 0`, `conc_en` set) copies every word of the
channel, idle words included. The extractor's demultiplexor only keeps
words with `vld` set.

## Electrical side

`inj_gearbox` accepts a 64-bit word when `e_vld & e_rdy` are both high. It
sends the low half, with the word's `sop`, one cycle later and the high
half the cycle after that. `e_rdy` is low while the high half goes out, so
a continuous stream is accepted every second cycle. That is exactly the
bandwidth of the optical channel. `ext_gearbox` pairs extracted words,
first word in the low half. A packet with an odd number of words ends with
a zero-padded word. Each 64-bit word is presented for one cycle with
`e_vld`.

The whole design runs on one clock, the optical clock. The electrical
channels are ready/valid streams in that clock domain, not a separate
250 MHz domain. A real array would add clock-domain crossings at the
gearboxes.

## Configuring the backplane

1. **Address.** For each PCB, hold `addr_shift` high for `A` cycles with
   the address on `addr_sdi`, most significant bit first. Then pulse
   `addr_load`. The shift register is separate from the latch, so the old
   address stays in use while the new one is shifted in. All arrays of a
   PCB share the one address port.
2. **Control words.** For each array, send `S*C` bytes on
   `cfg_vld/cfg_byte`, one per cycle, with `cfg_first` on byte 0. Byte j
   becomes the control word of optical channel j, which is row `j % C` of
   slice `j / C`. `cfg_done` rises after the last byte. All arrays load in
   parallel, so the whole backplane is reconfigured in 32 cycles. Writing a
   channel's word ends any packet it is receiving.

Examples of embeddings, all used in the testbenches:

- **Broadcast channel owned by PCB p.** On that channel, PCB p sets
  `exp_sel` to one of its injectors and every other PCB sets `filter = 1`.
- **Point-to-point segment from a to b.** PCB a sets `exp_sel`, PCB b sets
  `conc_en`, and the PCBs between them stay transparent.
- **Split channel.** PCB b sets both `conc_en` and `exp_sel`. It receives
  the segment from a and starts a new segment towards c.

The optical channel numbers in a stream are (array m, channel j) =
m·S·C + j. Array m of every PCB serves the same channels.

## Timing summary

| path | cycles |
|---|---|
| optical input to optical output of an array (one hop) | 1 + `dly` |
| electrical word accepted to first optical half on the channel | 1 |
| optical word at the delay output to the extractor line | 0 (combinational) |
| second half on the extractor line to 64-bit electrical word | 1 |
| injector to extractor through one hop (`dly = 0`) | 3 after the accepting edge |
| full configuration of all arrays | `S*C` = 32, plus `A` + 1 for the address |

## Capacity against the evaluated embeddings

Sizes are at the default parameters. "Needs" figures come from the
architecture's own analysis unless marked as derived.

| embedding | needs | fits |
|---|---|---|
| single ring / pipelined bus | 8 channels per edge, 8 injectors per PCB per stream | yes |
| 4x4 mesh with wrap-around | 10 edges × 2 channels = 20 of 64; 8 injectors and 8 extractors per PCB | yes |
| 16-node binary hypercube | 4 edges × 2 channels per PCB; 15 × 2 = 30 channels (derived) | yes |
| 8 buses of 8 channels (1D HyperMesh) | all 64 channels; 8 injectors to drive one bus | yes; at most 2 packets per slice are received at once, others are dropped |
| 64-workstation network, 32 Gb/s bus each | 128 channels (derived) | yes, 64 per stream |
| advanced SPA (256 optical / 32 electrical channels per array) | 512 channels per stream | not at the defaults; raise `S`, `C`, `NI`, `NE` |
| 2-D 16 × 16 HyperPlane | 256 nodes in rows and columns of 1-D backplanes | no; it would take 32 instances of `hyperplane` |

## What is modelled and what is not

Where this RTL departs from the architecture or fills in a gap:

- **Framing bits.** The `vld` / `sop` bits are this design's choice. The
  architecture only says that packets of any length arrive at any time.
- **Arbitration.** Fixed priority, lowest channel first. No fairness.
- **Per-channel mode.** Reconfigurable and intelligent mode are chosen per
  channel by the `filter` bit, so both can run side by side on one
  backplane.
- **Control-word layout.** The 8-bit layout and the meaning of `exp_sel`
  codes above 0 are choices. The pass-through code 0 and the one-hot
  concentrator codes follow the pixel-state drawings of the architecture.
- **Array-to-channel mapping.** The mapping of the two arrays of a PCB onto
  a stream's 64 channels, and which stream counts as "downstream", are
  choices.
- **Outside the RTL.** The optical devices and optics, the message
  processor (an FPGA in the architecture), the PEs and the optional output
  queue on the array are not modelled. Their signals are the top-level
  ports.
- **Not implemented.** TDM and WDM variants, the transparent
  (non-pipelined) backplane, error and flow control, and the 2-D and 3-D
  extensions.

## Simulation

Files: `rtl/` holds one module or package per file. `tb/` holds a
self-checking testbench per module, and each prints
`TB_RESULT checks=N failures=M`. Build any of them with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/hp_pkg.sv tb/tb_slice.sv -y rtl --top-module tb_slice
./obj_dir/Vtb_slice
```

| testbench | what it covers |
|---|---|
| `tb_smart_pixel` | delay, expander, concentrator and comparator against a history model |
| `tb_channel_control_unit` | static and filtered extraction, packet hold, drop, reconfiguration |
| `tb_extractor_arbiter` | grant pattern against a list-pairing model |
| `tb_address_latch`, `tb_config_loader` | serial address load; byte download, timing, `done` |
| `tb_inj_gearbox`, `tb_ext_gearbox` | word order, framing, the 2:1 rate, padding, latency |
| `tb_slice` | the four pixel states, then random packet traffic on all rows in intelligent mode against a cycle model |
| `tb_spa` | address load, control download, electrical-to-optical-to-electrical loop, latency, static channel |
| `tb_hyperplane` | 4-PCB backplane: multicast, filtering, removal at the source, contention drop, split channel, reconfiguration |
| `tb_hyperplane_full` | the default 16-PCB, 4096-optical-bit backplane: full configuration, then a multicast on one stream and a packet on the other |
| `tb_broadcast_select` | the default backplane with all 128 channels used as reserved broadcast buses, 4 per PCB per stream; 3072 random 512-bit unicast packets, each checked for intact delivery, exact latency (2 + hops cycles after the accepting edge) or a counted drop when both extractors of the slice are busy |

The two full-size testbenches take a few minutes to compile, because
Verilator expands all 2048 channel rows, and seconds to run. Every
testbench has a watchdog that ends the run with a failure if it hangs.
