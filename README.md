# Hit finder for liquid-argon TPC wire readout

A liquid-argon time projection chamber reads out thousands of wires at
2 MS/s with 12-bit ADCs. Most of what it sees is baseline noise. This
firmware finds "trigger primitives" (hits) in that stream as it arrives, so
that the data-acquisition system gets a compact list of hits instead of raw
waveforms.

Each hit is reported as:
- start time and stop time,
- peak time and peak height,
- summed charge.

The data come from an anode plane over ten optical fibres. Each fibre
carries 256 wires. The design runs one independent *link processor* per
fibre, so ten of them sit side by side in the top level, `hf_apa_top`.
Their hit streams are merged five at a time into two output links.
Everything runs on one 250 MHz clock.

The idea behind each link processor is a transposition. A fibre delivers
one time tick of all 256 channels at a time. Filtering and hit finding want
many ticks of one channel at a time. The link processor:
1. buffers 64 ticks of every channel;
2. re-reads them channel by channel;
3. pushes each channel's 64 samples through a pedestal-subtraction, FIR and
   threshold chain.

The chain serves 64 channels in turn. It therefore saves its per-channel
state at the end of every packet and restores it when that channel's next
packet arrives.

```
           one link processor (hf_link_processor), x10 in hf_apa_top
 link  +-------------------------- data_router --------------------------+
 words |  wib_decoder -> dpram_writer -> dpram (circular) -> unpacker    |
 ----->|  (data_reception)     ^  write pointer / read pointer  |        |
       +--------------------------------------------------------|--------+
                                         4 x 16-bit AXI4-Stream v
        tpg_block 0 | tpg_block 1 | tpg_block 2 | tpg_block 3   (channels 4g+k)
        header_stripper_combiner -> pedsub -> fir_filter -> hit_finder -> back
                                         4 x 64-bit hit packets v
                         arbitrator (4 FIFOs, whole packets, round-robin)
                                                                v
                 cr_if: sync_fifo -> hit_packet_filter -> crif_packer -> CR words
                                                          |
        hf_apa_top: links 0..4 -> cr_mux -> hit output 0,  links 5..9 -> cr_mux -> hit output 1
   axi_probe monitors on the six buses of each TPG block, the arbitrator output
   and inside cr_if; cr_probe on the CR words; link_regs: threshold, channel
   masks and monitoring words on a register bus
        hf_apa_top also: ipbus_wupper_bridge (host registers <-> request/reply
   RAMs of the IPbus master that drives the ten register buses)
```

## Link input and the data router

### Link words and frames

The input of a link processor is a stream of 33-bit link words: 32 data
bits, a k-character flag and a valid strobe. One WIB frame holds one tick
of all 256 channels. It is 118 words long:

| word    | content                                                     |
|---------|-------------------------------------------------------------|
| 0       | k-character SOF, `0x3C` (K28.1) in bits 7:0                 |
| 1..4    | frame id, timestamp bits 31:0, timestamp bits 63:32, spare   |
| 5..116  | 4 COLDATA blocks, each of 4 header words and 24 data words  |
| 117     | k-character EOF, `0xDC` (K28.6)                             |

Between frames the link may send idle k-characters (`0xBC`, K28.5).

Each COLDATA block carries 64 channels as 12-bit samples, packed LSB first.
Three 32-bit words hold eight samples. The four blocks share one layout, so
the decoder (`wib_decoder`) runs one small set of counters and re-uses it
for each block.

The decoder widens the samples to 16 bits. It emits 64 "Imm" words of
64 bits per tick. Imm word `g` holds channels `4g..4g+3`; channel `4g+k`
sits in bits `16k+15:16k`.

A frame is rejected, and counted as damaged, in any of these cases:
- it has the wrong number of data words;
- a second SOF or an unknown k-character appears inside it.

A rejected frame is never committed to the buffer.

### Circular buffer and pointers

`dpram_writer` writes the Imm words into `dpram`, a simple dual-port RAM
with synchronous read. The RAM holds `BUF_BLOCKS` (default 2) blocks of 64
ticks x 64 words: 8192 x 64 bits. The write address is
`{tick mod 128, group}`.

A tick counts as written only when its frame ended cleanly. The writer then
advances `wr_tick`, the write pointer.

The unpacker watches `wr_tick`. Once a whole block of 64 ticks is in the
RAM, it reads it out. When it has finished a block it increments
`rd_block`, which goes back to the writer as the read pointer.

### Overflow

If the block the next frame belongs to has not yet been read, the writer
drops the whole frame and counts it in `drop_count`. This can happen when
the downstream logic keeps the router waiting for long enough. The first
block written after a drop is marked as having a gap. Its packets carry
flag bit 0 to the TPG blocks, and the hit packets get `INERR` set. Only
whole frames are ever lost; unread data are never overwritten.

### Packets on the TPG lanes

The unpacker (`unpacker`) walks a block group by group. For each group it
sends one packet per channel on each of four 16-bit AXI4-Stream lanes at
once. Lane `k` carries channel `4g+k`, so TPG block `k` serves channels
`k, k+4, k+8, ...`.

A lane packet is 69 beats long:

| beat  | content                                       | flags          |
|-------|-----------------------------------------------|----------------|
| 0     | `{flags[7:0], channel[7:0]}`                  |                |
| 1..4  | timestamp of tick 0, bits 15:0 first          | `tuser` on 4   |
| 5..68 | samples of ticks 0..63                        | `tuser`, `tlast` on 68 |

`tuser` marks the end of a frame (header frame, data frame). `tlast` marks
the end of the packet.

The four lanes advance in lock step. A lane whose beat has already been
taken drops `tvalid` until the other lanes catch up. The RAM read address
is issued one cycle ahead, so a beat can move every clock.

## TPG block

A `tpg_block` serves 64 channels. It is four stages around one
packet-sequencing unit.

### Header stripper / combiner

`header_stripper_combiner` accepts one lane packet. It keeps the header
(channel, flags, timestamp) and feeds the 64 samples to the chain with
`tdest = channel`. It then holds `tready` low, stalling the data router,
until the hit finder has delivered all hits of that packet and the complete
hit packet has left on the 64-bit output.

Hits are collected first, up to `MAX_HITS = 32`, so that the header can
state the length of the packet. Re-opening `tready` is the "send the next
packet" signal to the router.

A channel whose mask bit is set still goes through pedestal subtraction and
filtering, so its state stays current. It simply reports no hits.

### Pedestal subtraction (`pedsub`)

The output sample is `x - pedestal`. After each sample the pedestal
estimate is nudged by a counter:
- if `x > pedestal`, the accumulator goes up by 1;
- if `x < pedestal`, it goes down by 1;
- when it reaches +10 (or -10), the pedestal moves up (or down) by one and
  the accumulator returns to 0.

The pedestal and accumulator of each channel are saved at the end of every
packet and restored at the first sample of the channel's next packet. The
store is a 64-entry array, small enough for LUT RAM.

A channel seen for the first time takes its first sample as the pedestal
estimate.

The pedestal and accumulator at the start of the packet are passed to the
combiner. When `SEND_PED` is set (the default), they go into the packet as
a validation word, but only for packets that contain hits.

### FIR filter (`fir_filter`)

The filter is a direct-form 32-tap low-pass:

```
y(n) = ( sum_{k=0..31} c[k] * x(n-k) ) >>> 8,   saturated to 16 bits
c[k] = min(k+1, 32-k)      (triangle 1,2,...,16,16,...,2,1; sum 272)
```

The coefficients are fixed in `tpg_pkg::fir_coef`; change that function to
use a different set. Across packets the filter behaves as if each channel
had its own filter. It does this by saving the 31 previous inputs of each
channel at the end of a packet and loading them back with the first sample
of the next one. The store is 64 x 496 bits. A new channel starts from a
zero history.

### Hit finder (`hit_finder`)

Samples are compared, signed, with the `threshold` register (default 20,
strictly greater).

A hit opens when two consecutive samples are above the threshold. It
starts at the first of the two and lasts while the samples stay above.

For each hit the block reports:
- the start tick;
- the stop tick (the last tick above the threshold);
- the peak tick and value (the first maximum);
- the sum of all samples above the threshold.

A hit still open at sample 63 is closed there and gets the *continue* flag.
The hit finder carries nothing from one packet to the next. Each packet
ends with a trailer beat carrying the hit count.

### Hit packet (64-bit words)

| beat | content |
|------|---------|
| 0 | header: `magic[63:56]=0xA5`, `flags[55:48]` (bit 0 pedestal word present, bit 1 input damaged), `channel[31:24]`, `n_words[15:0]` = beats after the timestamp |
| 1 | 64-bit timestamp of the packet's first tick; `tuser` set |
| 2 | optional pedestal word: `0xBEDE[63:48]`, `pedestal[47:32]`, `accumulator[31:16]` (signed) |
| ... | one word per hit: `start[63:58]`, `stop[57:52]`, `peak_time[51:46]`, `continue[45]`, `peak[39:24]`, `sum[23:0]` |

`tlast` is set on the last beat. A packet without hits is just beats 0 and
1 with `n_words = 0`; the CR interface removes it.

## Merging and shipping

### Arbitrator

`arbitrator` gives each TPG block its own 64-deep FIFO. It counts the
complete packets in each FIFO and forwards only complete packets. It picks
an input round-robin and stays on it until that packet's `tlast`. A TPG
block is therefore never blocked by another block's slow packet.

### CR interface (`cr_if`)

The CR interface has three stages.

1. **FIFO wrapper** (`sync_fifo`, 512 deep, first-word fall-through). It
   absorbs the readout side's flow control so that the arbitrator keeps
   running.
2. **Hit packet filter** (`hit_packet_filter`). It stores each packet in a
   64-word frame memory and checks it while it arrives:
   - header magic;
   - `tuser` on beat 1 only;
   - exactly `2 + n_words` beats;
   - it fits in the memory.

   Good packets are forwarded. Packets with `n_words = 0` are dropped as
   empty, and failing ones are dropped as corrupt. All of these cases are
   counted.
3. **CRIF packer** (`crif_packer`). It turns a packet into 32-bit Central
   Router words:
   - k-character `0x3C` (start of packet);
   - for every 64-bit word, bits 31:0 and then bits 63:32;
   - k-character `0xDC` (end of packet).

   The output uses a valid/ready handshake (`cr_valid`, `cr_ready`).

### Two hit outputs for ten links (`cr_mux`)

In `hf_apa_top`, each `cr_mux` takes the CR word streams of five link
processors and forwards whole packets, one at a time. It picks the next
input round-robin, starting after the input it served last. It stays on
that input until its EOP has been accepted. Selecting costs one idle cycle.

Output 0 carries links 0..4 and output 1 carries links 5..9. The hit packet
itself names only the channel, not the fibre. The multiplexer therefore
writes the link number into bits 15:8 of every SOP word.

## Monitoring and configuration

`axi_probe` watches one AXI4-Stream bus without touching it. Each probe
counts the packets that pass and the protocol errors it sees: a stalled beat
that is withdrawn or changed. It also shows the live `{tready, tvalid,
tuser, tlast}` bits.

All counters are 32 bits wide and wrap. At full rate a TPG lane passes 2
million packets per second, so its probe counters wrap after about 36
minutes. The link-level packet counters wrap after about 9 minutes. A long
run must sample them more often than that.

Probes sit at these points:
- six inside every TPG block (numbered below);
- one on the arbitrator output;
- two inside the CR interface, on the FIFO output and on the packer input.

The six TPG-block probes are:

| probe | bus |
|-------|-----|
| 0 | router to combiner |
| 1 | combiner to `pedsub` |
| 2 | `pedsub` to FIR |
| 3 | FIR to hit finder |
| 4 | hit finder to combiner |
| 5 | combiner to CR interface |

The sample buses inside the chain have no `tuser`. Their probes treat
`tlast` as the end of the frame.

`cr_probe` watches the 32-bit CR word output. It counts packets and CR
protocol errors:
- a stalled word that is withdrawn or changed;
- SOP/EOP out of order;
- data outside a packet;
- an odd number of data words;
- an unknown k-character.

`link_regs` is a register slave on an IPbus-style bus. The request is
`addr`, `wdata`, `strobe` and `write`. The reply is `rdata` with `ack` or
`err`, one cycle after the strobe. Addresses are 32-bit word addresses:

| address      | access | content |
|--------------|--------|---------|
| `0x00`       | R/W    | hit threshold, bits 15:0 (reset 20) |
| `0x08+2k`    | R/W    | channel mask of TPG block k, channels `4g+k`, g = 0..31 (bit g) |
| `0x09+2k`    | R/W    | same, g = 32..63 |
| `0x40`       | R      | ticks written (write pointer) |
| `0x41`       | R      | frames dropped on overflow |
| `0x42`       | R      | damaged frames rejected |
| `0x43..0x46` | R      | CR interface: packets in, empty dropped, corrupt dropped, sent |
| `0x47`       | R      | CR FIFO fill level |
| `0x48+6k+j`  | R      | packets seen by probe j of TPG block k |
| `0x60+6k+j`  | R      | that probe's `{tready, tvalid, tuser, tlast}` in bits 19:16, its error count in bits 15:0 |
| `0x78`       | R      | packets out of the arbitrator |
| `0x79`       | R      | arbitrator probe: bus bits 19:16, errors 15:0 |
| `0x7A`       | R      | AXI4-Stream protocol errors summed over all probes |
| `0x7B`       | R      | bit 2: a CR packet is open; bits 1:0: input selected by the arbitrator |
| `0x7C`       | R      | CR packets sent |
| `0x7D`       | R      | CR protocol errors |
| `0x7E`, `0x7F` | R    | packets seen by the CR interface's probes (FIFO output, packer input) |

A write to a read-only word, or any access to an unlisted address, gets
`err`.

### IPbus-Wupper bridge

On the readout card the host cannot issue IPbus transactions itself. It
only reads and writes registers of the card's register map.
`ipbus_wupper_bridge` in `hf_apa_top` provides five such registers, which
the top brings out as `br_reg_write`, `br_reg_sel`, `br_reg_wdata` and
`br_reg_rdata`:

| `br_reg_sel` | register | access | content |
|---|---|---|---|
| 0 | `IPBUS_WRITE_ADDRESS` | R/W | request RAM address, bits 31:0 |
| 1 | `IPBUS_WRITE_DATA` | W (trigger) | each write stores bits 63:0 in the request RAM at the write address |
| 2 | `IPBUS_READ_ADDRESS` | R/W | reply RAM address, bits 31:0 |
| 3 | `IPBUS_READ_DATA` | R | reply RAM word at the read address, valid 2 clocks after the address write |
| 4 | `IPBUS_PKT_DONE` | R | bit 0: reply packet ready |

An IPbus master works between the two RAMs and the ten register buses. It
reads the request packet (`br_req_addr`, with `br_req_data` one clock
later). It runs the transactions, writes the reply (`br_rsp_we`,
`br_rsp_addr`, `br_rsp_data`) and raises `br_pkt_done`. Both RAMs are 512
x 64 bits. The master and its packet format are not part of this design.
`hf_apa_top_tb` uses a behavioural master with a simple packet format of
its own.

## Throughput

| quantity | value |
|----------|-------|
| one tick at 2 MS/s | 125 clocks at 250 MHz |
| one frame | 118 words, 1 word per clock |
| one block (64 ticks) arrives in | 8000 clocks |
| unpacker needs, per block | 64 groups x 69 beats = 4416 clocks |

A merged output moves at most one CR word per clock. That is 8000 words per
block time, or 1600 per link. A hit packet with `h` hits is
`2 + 2*(3 + h)` words, pedestal word included. So about 160 of a link's 256
channels can send a one-hit packet per block before the output becomes the
limit. Denser activity backs up through the FIFOs into the router.

Each TPG block takes in one sample per clock. While the combiner sends a
hit packet (2 to 35 beats) the router waits. With sparse hits a link
therefore runs at a bit over half load. Dense hits on many channels can use
up the margin. The router then stalls, and after the second buffer block
fills, whole frames are dropped and counted.

## Parameters

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `N_LINKS` | `hf_apa_top` | 10 | link processors (fibres) |
| `LINKS_PER_OUT` | `hf_apa_top` | 5 | links merged into one hit output (`N_LINKS / LINKS_PER_OUT` outputs) |
| `SEND_PED` | top, link, `tpg_block` | 1 | add the pedestal validation word to packets with hits |
| `BUF_BLOCKS` | link, router | 2 | 64-tick blocks in the circular buffer |
| `MAX_HITS` | combiner | 32 | hits kept per packet |
| `DEPTH` | `arbitrator` | 64 | FIFO words per TPG input |
| `FIFO_DEPTH` | `cr_if` | 512 | CR FIFO words |
| `MAX_WORDS` | `hit_packet_filter` | 64 | frame memory words (largest packet) |
| `THRESH_RESET` | `link_regs` | 20 | threshold after reset |
| `AW` | `ipbus_wupper_bridge` | 9 | address bits of the request and reply RAMs |

The fixed constants (256 channels, 4 lanes, 64 ticks per packet, 32 taps,
accumulator limit 10, frame layout, word layouts) are in `rtl/tpg_pkg.sv`.

## What is fixed by the original design and what is not

These features come from the hit-finder firmware this RTL follows:
- the block structure: data reception, data storage and unpacker in the
  router; four TPG blocks; arbitrator; a CR interface made of a FIFO
  wrapper, a hit packet filter and a packer;
- the packet organisation: 64 samples per channel, with a header frame of
  timestamp, channel and flags;
- the AXI4-Stream convention (`tuser` at the end of a frame, `tlast` at the
  end of a packet);
- the pedestal algorithm with its limit of 10;
- a hard-wired 32-tap low-pass FIR;
- the hit rule and the reported quantities, including the continue flag;
- state save/restore for pedestal and filter, and none for the hit finder;
- the validation pedestal word;
- threshold and channel masking over the register bus;
- the IPbus-Wupper bridge and its five registers;
- probes that count packets and protocol errors;
- 10 links at 250 MHz, merged five at a time into two hit outputs.

Choices made here, which the original does not specify:
- the WIB frame layout and the k-character codes;
- the order in which samples are packed;
- the lane header layout and all 64-bit word layouts;
- the FIR coefficients and scaling;
- the buffer depth;
- the read-pointer return and frame dropping on overflow;
- the corruption checks of the decoder and of the packet filter;
- the arbitration order, in the arbitrator and in `cr_mux`;
- the link tag in the SOP word;
- the CR word format;
- the register map;
- the bridge's RAM depth, read timing and register-select encoding.

Points where this RTL differs in detail:
- The FIR saves 31 past inputs per channel; the 32nd never reaches the
  output of a 32-tap filter.
- "Until the values drop below threshold" is read as "until a sample is not
  above the threshold". A sample equal to the threshold ends a hit.
- The hit packet filter is a single module. The original splits it into a
  switcher, a hit frame manager and a hit frame memory.
- The chain's internal sample buses carry no `tuser`.
- The link transceivers, the readout card's Central Router and DMA, and
  the IPbus master are outside this design. The top brings their
  signals out as ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:
- prints `TB_RESULT checks=<n> failures=<m>`;
- stops itself with a watchdog if the design hangs;
- computes its expected values independently of the RTL.

`tb/tpg_model_pkg.sv` is a behavioural reference of the whole chain:
- WIB frame builder;
- pedestal, FIR and hit-finder model with per-channel state;
- hit-packet builder.

The end-to-end testbenches compare the RTL against this reference word for
word.

| testbench | what it covers |
|-----------|----------------|
| `hf_apa_top_tb` | all 10 links and both merged outputs at default parameters, 3 blocks of 64 ticks each, per-link data with pulses, baseline shifts, one damaged frame, one masked channel, random CR flow control; checks every hit packet and the monitoring registers (every probe of every TPG block), sets and reads back the thresholds through the IPbus-Wupper bridge, and counts bridge transactions, stalls, router holds, continue flags, pedestal words and steps, dropped empties and the rejected frame |
| `hf_link_processor_tb` | the same for one link, 4 blocks |
| `threshold_scan_tb` | one link, the same two blocks at five thresholds written at run time; every packet checked, hit packet count must fall as the threshold rises |
| `data_router_tb` | tick-to-channel transposition, and frame dropping and gap flags under long backpressure |
| `unpacker_tb` | lane packet format and the 4416-cycle block time |
| `data_reception_tb`, `dpram_tb` | decoder, corruption checks, buffer writes; RAM |
| `pedsub_tb`, `fir_filter_tb`, `hit_finder_tb` | each algorithm against the model, with interleaved channels for save/restore |
| `header_stripper_combiner_tb`, `tpg_block_tb` | packet assembly, router hold, masking, validation word |
| `arbitrator_tb`, `sync_fifo_tb`, `hit_packet_filter_tb`, `crif_packer_tb`, `cr_if_tb` | merging, FIFO, filtering, CR framing, flow control |
| `cr_mux_tb` | whole-packet merging of five inputs, link tags, fairness |
| `ipbus_wupper_bridge_tb` | request RAM writes through the address/data registers, reply read-back, address read-back, packet-done flag |
| `axi_probe_tb`, `cr_probe_tb`, `link_regs_tb` | packet and error counting on both bus types; register map, ack/err timing |

To run a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/tpg_pkg.sv tb/tpg_model_pkg.sv $(ls rtl/*.sv | grep -v tpg_pkg) \
  tb/hf_apa_top_tb.sv --top-module hf_apa_top_tb -Mdir obj
./obj/Vhf_apa_top_tb
```

Replace `hf_apa_top_tb` with any other testbench name. The full ten-link
test runs in well under a minute. The simulator has no X state, so every
register that is read is reset.
