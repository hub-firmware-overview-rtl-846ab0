# Hub FPGA firmware: shelf-wide TTC and link-control distribution

In an ATCA shelf of the trigger's feature extractors (FEX modules in slots
3 to 14), the Hub module is where timing, trigger and link-control
information comes together and is spread out again. Its FPGA:

* receives the **Readout_Ctrl** stream from the ROD (the readout driver on the
  Hub). That stream carries the "ROD busy" flag, a global link reset
  (Aurora_Init), per-slot link resets and the channel-up state of each FEX
  readout link;
* merges these with the TTC information (Level-1 Accept, bunch-counter reset,
  event-counter reset, L1ID, ECRID);
* sends a **Combined_TTC/DATA** stream to every FEX slot, to its own ROD and to
  the other Hub of the shelf;
* receives the other Hub's Combined_TTC/DATA stream;
* is controlled over **IPbus**: one IPbus controller, reached through either of
  two Ethernet MACs, and a small register file.

This repository holds synthesizable SystemVerilog for the logic of those
functions, a self-checking testbench for every module, and an end-to-end
testbench of the whole Hub.

## The control-register link idea

Readout_Ctrl and Combined_TTC/DATA are built the same way. The sender has four
32-bit **control registers**, Word_0 to Word_3, and sends them over and over.
The receiver has a copy of those four registers, the **shadow registers**, which
always hold the last message that arrived intact. No packets, requests or
acknowledgements are involved. Whatever the sender writes into a control
register shows up in the receiver's shadow register about one LHC clock later.

Line budget: 6.4 Gb/s with 8b10b coding gives 5.12 Gb/s of payload. That is
128 bits per 25 ns LHC bunch crossing, hence four 32-bit words per message.
In this RTL the words move on the transceiver user clock, which runs at four
times the LHC clock (160.32 MHz). One message is one four-clock frame.

```
 user clock   | 0      | 1      | 2      | 3      | 0      | ...
 TXDATA       | Word_0 | Word_1 | Word_2 | Word_3 | Word_0 |
 TXCHARISK    | 0001   | 0000   | 0000   | 0000   | 0001   |
              ^ frame_start: all four control registers are sampled here
```

Each frame has two guards:

* **Comma.** Word_0[7:0] is always the K28.5 comma (0xBC), the only
  control character in the frame. The receiver uses it to find Word_0, so the
  four shadow registers cannot slip against the four control registers.
* **CRC.** Word_3[31:23] holds a 9-bit CRC over the other 119 bits.

### Transmitter (`ctrl_link_tx`)

A free-running 2-bit counter selects the word. In the Word_0 cycle the
transmitter copies all four control registers into a snapshot, and Words 1
to 3 come from that snapshot. Each frame is therefore one consistent message,
even if the registers change in the middle of it. Byte 0 of Word_0 is
overwritten with K28.5. Outputs are registered, so Word_0 appears one clock
after `frame_start`.

### Receiver (`ctrl_link_rx`)

The receiver takes 32-bit words and K flags from the transceiver. It assumes
the transceiver's comma alignment has already put the comma into byte 0.

* A word with K flags `0001` and 0xBC in byte 0 opens a frame. The next three
  words are buffered.
* When Word_3 arrives, the CRC is recomputed.
* If the CRC matches and no 8b10b code error was seen, all four shadow
  registers are loaded in the same clock and `shadow_valid` pulses.
* A frame with a bad CRC is dropped, and the shadow registers keep the last
  good message. Setting `crc_check_en` low accepts frames whatever their CRC;
  the bring-up patterns need this.
* Three cases count as alignment errors:
  * a comma where a data word is due;
  * a K flag inside a frame;
  * no comma where one is due while locked.
* `locked` rises after four good frames in a row and falls on any error.
* CRC errors and alignment errors each have a saturating 16-bit counter.

Shadow update latency: one clock after Word_3 is at the input. In the
end-to-end test, a change in the ROD's control registers reaches the Hub's
outgoing Combined_TTC/DATA frames within 13 user clocks, or four LHC clocks.
That figure includes a three-clock model of the serial link.

### CRC (`crc9`)

The CRC is MSB-first over `msg[118:0]`, comma byte included. Flat bit *b* is
Word_(b/32) bit b%32. The generator is x^9+x^8+x^4+x^3+1 and the register
starts at all ones. The link specification fixes only the 9-bit width and the
position, so **the polynomial and preset are this design's choice**. Both are
parameters of `crc9` (defaults `hub_pkg::CRC9_POLY` / `CRC9_INIT`) and must
match whatever sits at the other end of the link.

## Message layouts

Readout_Ctrl (ROD → Hub), decoded by `rdctrl_decode`:

| Word | Bits | Field |
|---|---|---|
| 0 | 7:0 | K28.5 |
| 0 | 11:8 | version |
| 0 | 14 | ROD_BUSY (to all slots) |
| 0 | 15 | Aurora_Init: reset of all data links |
| 0 | 27:16 | channel up, slot 3 (bit 16) to slot 14 |
| 1 | 23:0 | link reset, 4 bits each for slots 3–8 |
| 1 | 29:24 | link reset, 1 bit each for slots 9–14 |
| 3 | 31:23 | CRC |

Combined_TTC/DATA (Hub → FEX, ROD, other Hub), built by `cttc_encode`:

| Word | Bits | Field |
|---|---|---|
| 0 | 7:0 | K28.5 |
| 0 | 11:8 | version (held at 0) |
| 0 | 15:12 | reset[3:0] |
| 0 | 16–19 | L1A, BCR, ECR, privileged readout |
| 1 | 23:0 | L1ID |
| 1 | 31:24 | ECRID |
| 2 | 31:0 | control channel |
| 3 | 3:0 | link reset |
| 3 | 4 | ROD busy |
| 3 | 5 | link enable |
| 3 | 6 | ROD 0 channel up |
| 3 | 7 | ROD 1 channel up |
| 3 | 22:20 | shelf number |
| 3 | 31:23 | CRC |

All other bits are reserved and sent as zero. The field layouts are in
`hub_pkg` (`cttc_fields_t`, `rdctrl_fields_t`, `cttc_pack`, `cttc_unpack`).

## How the Readout_Ctrl fields reach the FEX slots

`rdctrl_decode` makes four link-reset bits per FEX slot:

* Slots 3–8 have four bits each in the message.
* Slots 9–14 have one bit each. This design copies it to all four.
* Aurora_Init, the global link reset, is OR-ed into every slot's bits.

`cttc_fanout` then builds fourteen messages.

| Destination (index) | link_reset | ROD 0 channel up | ROD 1 channel up |
|---|---|---|---|
| FEX slot *s* (0–11) | slot *s*'s bits | slot *s* channel-up from this ROD | `other_rod_channel_up[s]` input |
| ROD (12) | Aurora_Init on all four bits | 0 | 0 |
| other Hub (13) | Aurora_Init on all four bits | 0 | 0 |

Every destination gets the same ROD busy, TTC fields, reset[3:0],
link enable, control channel and shelf number. The three choices below are
this design's own:

* what the ROD and other-Hub links carry;
* the source of ROD 1 channel up (an input);
* using one reset[3:0] for all slots.

The specification defines these fields per FEX slot and leaves their
sources open.

All fourteen transmitters share clock and reset, so their frames stay in
phase. An assertion checks this. Their common `frame_start` goes out of the
top as `cttc_frame_start`. The TTC source and the other field sources must
present new values at `frame_start` and hold them for the LHC clock period.

### Bring-up modes

Two modes replace the live messages on every Combined_TTC/DATA link. They
follow the order in which the links are brought up: first a fixed pattern,
then a loop-back of the ROD's own message, then live data.

**Pattern mode** (`hub_control[0]`) sends a bring-up pattern from
`ctrl_pattern_gen`:

* Word_0 = `a50f00bc`;
* Word_1 = 0;
* Word_2 = a counter that steps once per frame;
* Word_3 = `be800000`.

These are the words used to bring up the Readout_Ctrl link. The Word_3 value
is not a valid CRC, so a receiver must have CRC checking off
(`hub_control[6]` on a Hub).

**Retransmit mode** (`hub_control[7]`, when pattern mode is off) sends the
Readout_Ctrl shadow registers, exactly as received from the ROD, on every
link. This lets the ROD check its own message after a round trip through
the Hub. The top also brings the raw shadow registers out as `rdctrl_shadow`
for monitoring.

## IPbus side

`mac_mux` connects the two MACs' byte streams (AXI-stream style:
`axis8_t` = tdata/tvalid/tlast/tuser, plus tready) to the single IPbus
controller. It works in three states:

* **IDLE.** Grants the next MAC that has data. When both have data, the MACs
  take turns.
* **REQUEST.** Forwards that MAC's packet up to its tlast.
* **REPLY.** Takes no new request and sends the controller's reply to the same
  MAC.

Some requests never get a reply, for example a packet the controller
discards. So if no reply byte has appeared `REPLY_TIMEOUT` (4096) clocks after
the request ended, the mux returns to IDLE. The packet-level pairing and the
timeout are this design's own reading of "one controller, two MACs, a mux".

`hub_regs` is an IPbus slave using the standard IPbus bus signals
(`ipb_wbus_t`, `ipb_rbus_t`):

| Address | Register | Access | Contents |
|---|---|---|---|
| BASE+0 | hub_module | RO | {module ID[7:0], HW version[7:0], FW version[15:0]} (parameters) |
| BASE+1 | hub_address | RO | {address given to the ROD[15:0], shelf pins[7:0], slot pins[7:0]} |
| BASE+2 | hub_alerts | RO | external alert inputs; all zero in normal operation |
| BASE+3 | hub_control | RW | zero after reset |

Register behaviour:

* The address given to the ROD (`rod_geo_addr`) is the Hub's own
  {shelf, slot}.
* Pins and alerts pass through two-flop synchronisers.
* A strobe is answered one clock later with `ack`. It gets `err` instead for
  a write to a read-only register or for an address outside the block.

`hub_control` bits, as assigned by `hub_top`:

| Bit(s) | Use |
|---|---|
| 0 | pattern mode |
| 1 | link enable bit sent to all destinations |
| 5:2 | reset[3:0] sent to all destinations |
| 6 | disable CRC checking on both receivers |
| 7 | retransmit mode |
| 31:8 | unused |

## Top level (`hub_top`)

```
 Readout_Ctrl RX words --> ctrl_link_rx --> rdctrl_decode --+
                                                            |
 TTC fields, control channel, other-ROD channel up -------> cttc_fanout --> 14 x (32-bit word + K flags)
 hub_control (modes, link enable, reset[3:0]) ------------->     (12 FEX, ROD, other Hub)
 other-Hub Combined_TTC RX words --> ctrl_link_rx --> ohub_fields
 IPbus bus <--> hub_regs            MAC streams <--> mac_mux <--> IPbus controller streams
```

`hub_top` has no parameters, and its ports are plain signals and packed
structs. Everything runs on one clock, the transceiver user clock. A real
build with IPbus on its own clock needs a synchroniser on `hub_control`.

Parts of the Hub firmware that are not logic described here appear only as
ports of `hub_top`:

* the multi-gigabit transceivers (8b10b coding, comma alignment, serialisation);
* the Ethernet MACs and PHYs;
* the IPbus controller itself;
* the TTC receiver;
* the Aurora 8b10b readout cores;
* the vendor debug and monitoring cores.

The readout-data paths (FEX readout into the Hub FPGA, and the Hub's own
readout lanes to the ROD and to the other Hub) are not part of this RTL.

## Files

| File | Contents |
|---|---|
| `rtl/hub_pkg.sv` | constants, field structs, IPbus and stream types, pack/unpack |
| `rtl/crc9.sv` | 9-bit message CRC (combinational) |
| `rtl/ctrl_link_tx.sv` | control registers → 4-word frames |
| `rtl/ctrl_link_rx.sv` | frames → shadow registers, CRC, lock, error counters |
| `rtl/rdctrl_decode.sv` | Readout_Ctrl field decoding, link-reset merging |
| `rtl/cttc_encode.sv` | Combined_TTC/DATA packing with CRC |
| `rtl/ctrl_pattern_gen.sv` | bring-up pattern |
| `rtl/cttc_fanout.sv` | 14 Combined_TTC/DATA transmitters |
| `rtl/hub_regs.sv` | IPbus register file |
| `rtl/mac_mux.sv` | two MACs to one IPbus controller |
| `rtl/hub_top.sv` | top level |
| `tb/tb_ref_pkg.sv` | independent reference CRC (polynomial long division) and bit-by-bit message builders |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_hub_bringup.sv` | link bring-up sequence on the full top |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
also has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hub_pkg.sv tb/tb_ref_pkg.sv tb/tb_hub_top.sv --top-module tb_hub_top
./obj_dir/Vtb_hub_top
```

Swap `tb_hub_top` for any other `tb_*` module.

`tb_hub_top` runs the whole Hub at its default sizes. In one run it goes
through these steps:

* IPbus configuration, including a rejected write;
* Readout_Ctrl and other-Hub lock;
* a field-by-field check of all fourteen output links;
* an L1A;
* the global Aurora_Init;
* the ROD-busy latency measurement;
* an injected CRC error and a short frame, then relock;
* pattern mode and retransmit mode;
* MAC-mux traffic from both MACs, including an unanswered request that uses
  the reply timeout.

At the end it prints how often each of these mechanisms happened, and fails
any that never did.

`tb_hub_bringup` runs the link bring-up sequence on the full top:

1. The Hub sends its test pattern, and a ROD-side receiver checks it.
2. The ROD sends its pattern (`a50f00bc`, `00000000`, counter, `be800000`).
   The Hub locks with CRC checking off, and its shadow registers show those
   words.
3. The ROD's message comes back on the links to the ROD and to slot 3.
4. Normal operation with CRC checking on.

## Limits and departures

* CRC polynomial and preset are assumed (see above). Interoperation with other
  modules needs their real values.
* One clock domain. TTC inputs are assumed to be already decoded and aligned
  to `cttc_frame_start`.
* Field sources that the specification leaves open are this design's own
  choice:
  * reset[3:0], shared by all slots;
  * link enable;
  * control channel;
  * ROD 1 channel up;
  * the contents of the ROD and other-Hub links.
* The fields received from the other Hub are only brought out to ports. Their
  use is not specified.
* Version numbers are fixed at 0, the value for the debug phase. The
  Readout_Ctrl version is compared against it (`rdctrl_version_ok`) but not
  acted on.
* Register field widths and addresses are this design's own.
* Retransmit mode applies to all fourteen links at once. The bring-up plan
  only needs the links to the ROD and to slot 3.
