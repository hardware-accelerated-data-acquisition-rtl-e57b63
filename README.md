# Authenticated, redundant GigE Vision video in programmable logic

Cameras in a vehicle send uncompressed video over Gigabit Ethernet. This RTL
adds two things to such a setup without putting the processor in the data
path:

* **Authentication.** A keyed Keccak (SHA3) message authentication code is
  computed over every video packet, in-stream, as the packet moves through the
  logic.
* **Redundancy.** Besides its own link to the central ECU (a star), each camera
  node also has a link to its neighbour (a line). A *parity stream* travels
  along that line. Each node XORs its own video packet into the parity and
  appends its MAC. The last node delivers the parity to the ECU. As with RAID 5,
  the ECU can rebuild the video of any one failed link from the parity and the
  other streams, with no recovery time.

The main design is `auth_gateway_top`. It is the programmable-logic part of
one node on a Zynq-class device, sitting between the processor's DRAM and an
Ethernet transmitter. Beside it, in the same top but independent of it, are
two receive-side units. `gvsp_filter` splits received GigE Vision video
traffic from other traffic in hardware. `mac_verify` is the check a receiving
node runs: it recomputes a packet's MAC and drops the packet if the tag does
not match.

The architecture follows the paper *Hardware-accelerated Data Acquisition and
Authentication for High-speed Video Streams on Future Heterogeneous
Automotive Processing Platforms* (Geier, Franzen, Chakraborty). That paper
describes the units and how data flows between them. It does not describe
their internals, widths, formats or register interface. All of those are
choices made here; they are listed in the section on departures near the end.

## How one parity frame is made

The operating system receives both the camera's video packets and the
neighbour's parity packets into DRAM as usual. The driver finds each one and
writes a *descriptor* for it (address, length) into one of two descriptor
queues: one for video, one for parity. From then on the hardware works alone.

```
             M-GP (AXI4-Lite)
                  |
              conf_regs ---- key, addresses, EtherType, enable
               |     |
        video DQ     parity DQ          (desc_queue x2)
               \     /
               job_ctrl   -- waits until both queues hold a descriptor
               /     \
   video DMA (S-GP0)   parity DMA (S-GP1)      (dma_reader x2, AXI3 reads)
      |        \              |
  keccak_mac   FIFO          FIFO              (stream_fifo x2)
      |          \           /
      |           xor_unit                     XOR region ^= video
      |              |
      |          header_gen                    16-byte header in front
      |              |
      +-------> trailer_gen                    own MAC appended at the end
                     |
                 tx stream  -> Ethernet controller -> neighbour / ECU
```

1. `job_ctrl` waits until the video queue and the parity queue each hold a
   descriptor. It pops one from each and starts both DMA cores in the same
   cycle.
2. Each DMA core reads its packet over its own AXI3 port, in bursts of at most
   16 beats that never cross a 4 KiB page.
3. Each video word goes to the MAC unit and to the video FIFO at the same time.
   The word is only taken when both can accept it.
4. `xor_unit` XORs the video words into the XOR region of the parity packet.
   It then passes the MACs that earlier cameras left in the parity packet
   through unchanged.
5. `header_gen` sends the 16-byte header as soon as the job starts. It does not
   wait for the parity data.
6. `trailer_gen` passes everything through. At the end of the frame it waits
   for the MAC unit's tag, appends it, and ends the frame.

Only one job is in flight at a time. The next pair starts once the previous
frame's last word has left.

**Optional second MAC.** With the top's parameter `SECONDARY_MAC = 1`, a
second `keccak_mac` hashes the parity packet as the parity DMA reads it. The
trailer then appends two tags per camera: first the video MAC, then this
parity MAC. Both use the same key. Each camera then adds 64 bytes instead of
32. The parameter is off by default. `tb_auth_gateway_top_mac2` tests the
parameter switched on.

### Parity frame format

All multi-byte fields in the header are in network byte order. Everything
after the header is a byte stream in memory order; on the 32-bit bus, byte 0 of
a word is bits [7:0].

| bytes                  | content                                                   |
|------------------------|-----------------------------------------------------------|
| 0-5                    | destination MAC address (register)                        |
| 6-11                   | source MAC address (register)                             |
| 12-13                  | EtherType (register, default 0x88B5)                      |
| 14-15                  | X = length of the XOR region in bytes (a multiple of 4)   |
| 16 .. 16+X-1           | XOR region: running parity of all video packets so far    |
| then 32 bytes each     | MAC of camera 1, MAC of camera 2, ... MAC of this camera   |

The frame check sequence is left to the Ethernet controller.

**Length rule.** Packets of different lengths are XORed as if the shorter one
were padded with zero bytes. The new XOR region is
`max(roundup4(video length), X_in)` bytes.

**Rebuilding a lost packet.** The receiver has the final XOR region, the first
camera's parity input, and the other cameras' packets. To rebuild the lost
packet it XORs all of these together, byte by byte, and keeps the first
`length` bytes. It knows `length` from the video stream's own protocol. The
end-to-end testbench does exactly this.

**Frame size.** A parity frame holds `16 + X + 32·n` bytes for n cameras. To
stay inside a standard 1514-byte Ethernet frame, X must be at most
`1498 − 32·n`. Nothing in the logic limits this: lengths are 16-bit byte
counts and every unit streams. Keeping the frame within what the network
accepts is left to the software that chooses packet sizes.

### What the driver sees: registers (AXI4-Lite, 32-bit)

| offset    | name        | meaning |
|-----------|-------------|---------|
| 0x00      | CTRL        | bit0 enable; writing bit1 = 1 clears both overflow flags |
| 0x04      | STATUS      | [7:0] video queue level, [15:8] parity queue level, bit16/17 video/parity queue overflow, bit18 DMA read error |
| 0x08      | ETHERTYPE   | [15:0] |
| 0x0C/0x10 | DST_LO/HI   | destination address [31:0] / [47:32] |
| 0x14/0x18 | SRC_LO/HI   | source address [31:0] / [47:32] |
| 0x1C      | FRAMES      | parity frames sent (read only) |
| 0x20-0x3C | KEY0-7      | MAC key, word i = key[32i+31:32i] (write only) |
| 0x40      | VDQ_ADDR    | address of the next video packet |
| 0x44      | VDQ_LEN     | [15:0] its length; **the write pushes the descriptor** |
| 0x48      | PDQ_ADDR    | address of the next parity packet (its XOR region) |
| 0x4C      | PDQ_LEN     | [15:0] total length (XOR region + MACs), [31:16] XOR-region length; **the write pushes** |

The driver must follow these rules:

* Packet addresses must be 4-byte aligned.
* A parity packet must have a whole number of 32-byte MACs after its XOR
  region.
* A push into a full queue (16 entries) is dropped and sets the overflow flag.
* The key is sampled when a packet's first word reaches the MAC unit. A key
  change therefore takes effect from the next packet.

## The MAC unit

`keccak_mac` computes `SHA3-256(key ‖ packet)`: the 32-byte key is absorbed
ahead of the packet. A keyed prefix is a sound MAC for a sponge function,
because Keccak, unlike SHA-2, does not allow length extension. The tag is
256 bits (32 bytes).

`keccak_f1600` runs one round per clock. A permutation takes 25 cycles,
counting the load. The MAC unit collects a 136-byte rate block, one 32-bit
word per cycle, then permutes.

* **Padding.** The unit adds the SHA3 padding (0x06 … 0x80) itself, at the byte
  after the packet's last valid byte. The byte mask of the last word sets where
  that is. When the key and packet fill the last block exactly, one extra
  padding block is run.
* **Cost.** For an N-byte packet, the MAC unit takes about
  `ceil((N+33)/136) × 59` cycles.
* **Speed.** A 1500-byte packet takes 689 cycles. At 100 MHz that is 6.9 µs,
  about 1.7 Gbit/s.

The result is held (`mac_valid`) until the trailer takes it. That is what lets
the trailer append it after the data that streamed past.

The testbenches check the permutation and the MAC in three ways:

* against a separately written reference model;
* against SHA3-256 digests computed beforehand by an independent
  implementation;
* against the known SHA3-256 digest of the empty string.

## Acquisition filter (`gvsp_filter`)

The filter sits after an Ethernet receiver, which has already removed the FCS.
It buffers the first 44 bytes of each frame, enough to see the Ethernet, IPv4
and UDP headers. A frame counts as video when all of these hold:

* EtherType is 0x0800;
* version/IHL is 0x45;
* the protocol is UDP;
* the UDP destination port equals `gvsp_port`.

Video frames leave on the video port as their UDP payload, which is the GVSP
header followed by image data. The payload is shifted by two bytes so that it
starts on a word boundary. All other frames leave unchanged on the forward
port, meant for the processor's IP stack.

The first payload word appears 11 cycles after the frame's first word, which is
88 ns at 125 MHz. After that the filter moves one word per cycle. Frames of 44
bytes or less, IPv4 with options, and fragments are forwarded, not filtered.
Ethernet padding of short frames is not removed.

## Receive-side check (`mac_verify`)

A node that receives authenticated packets must not pass on a packet before
its whole tag has been checked, because the tag covers every byte. The unit
therefore stores each packet while hashing it:

* Words go into a packet buffer (512 words by default) and into a
  `keccak_mac` at the same time.
* The buffer has three pointers: read, end of verified data, and write. The
  reader sees only words up to the end of verified data.
* After the packet's last word, the unit waits for the computed tag and for the
  expected tag on its `tag` input. These are then compared.
* On a match, the end of verified data moves up to the write pointer, so the
  packet becomes visible. On a mismatch, the write pointer is moved back and
  the packet is gone.
* A packet longer than the buffer is read to its end and dropped.

The expected tag is a separate input. For the gateway's parity frames it is
the camera's 32-byte slot in the trailer. The end-to-end testbench uses it
like that: it checks a camera's packet against the tag taken from the final
parity frame. The intact packet passes; a copy with one flipped byte is
dropped.

Each packet costs its MAC time plus one cycle for the compare; the reader can
drain earlier packets meanwhile. The unit uses the gateway's key register.

## Measured behaviour

These figures come from the end-to-end testbench, run at the default sizes,
with an assumed 100 MHz clock.

* **Throughput.** Four 1500-byte jobs back to back take 3640 cycles, 910
  cycles per job. That is about 1.3 Gbit/s. Gigabit line rate needs at most
  1200 cycles per job, and the testbench checks this bound. The DRAM model
  inserts random wait states on 30 % of cycles.
* **Limit.** The MAC unit sets the speed limit. DMA and XOR run ahead of it as
  far as the FIFO allows.
* **Added latency.** The logic adds about one packet time, a few µs, from
  descriptor to last frame word.
* **In-stream.** The header leaves at once. The first XOR word of every frame
  leaves while the video packet is still being read from DRAM, so the frame
  is never buffered whole. The end-to-end testbench checks this for every
  frame.

## Departures and open points

**Taken from the source paper:**

* the units and how data flows between them;
* starting both transfers once a video and a parity packet are both
  available;
* the in-stream XOR and the cached MAC;
* appending the MAC after the existing ones;
* Keccak as the primitive;
* the line/star topology with one shared parity link.

**Chosen here:**

* the 32-bit datapath;
* the frame header format and the zero-extension rule for lengths;
* the SHA3-256 prefix-key MAC and the 256-bit key and tag;
* the descriptor content and the register map;
* the queue depth (16) and FIFO depth (512 words);
* one job in flight at a time;
* AXI burst handling;
* the GVSP matching rule of the filter;
* the input of the optional second MAC (the parity packet as read) and the
  order of the two tags;
* the receive-side check's store-and-forward buffer, and the expected tag
  given on a separate input.

**Not built:**

* The filter's **replication of the Ethernet controller's receive buffer
  descriptors**, which lets it sit behind the controller's scatter-gather DMA
  without processor help. Its format depends on the controller.
* The processor system itself: CPUs, caches, DDR controller, interconnect and
  Ethernet controllers. The top brings out the AXI ports and streams where
  these connect.

**Not handled:**

* Unaligned packet addresses.
* A DMA read error: the sticky STATUS bit is set, but the data are still
  forwarded.

## Files

`rtl/`:

| file | role |
|------|------|
| `auth_pkg.sv` | shared types (`beat_t` stream word, `desc_t`, `job_t`) and constants |
| `auth_gateway_top.sv` | top: gateway, acquisition filter and receive-side check side by side |
| `conf_regs.sv` | AXI4-Lite register block |
| `desc_queue.sv` | descriptor queue |
| `job_ctrl.sv` | pairs video and parity descriptors, starts the DMAs |
| `dma_reader.sv` | AXI3 read DMA, packet to stream |
| `stream_fifo.sv` | stream FIFO |
| `keccak_f1600.sv` | Keccak-f[1600], one round per cycle |
| `keccak_mac.sv` | keyed SHA3-256 MAC |
| `xor_unit.sv` | parity update |
| `header_gen.sv` | frame header |
| `trailer_gen.sv` | MAC append |
| `gvsp_filter.sv` | video/other traffic split |
| `mac_verify.sv` | receive-side MAC check, drops tampered packets |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. It also
holds `tb_auth_gateway_top_mac2.sv`, which tests the top with the second MAC
switched on, and two helpers:

* `tb_sha3_ref.sv`: a reference SHA3 model;
* `axi_rd_mem.sv`: a DRAM model behind an AXI3 read port, with random wait
  states and AXI rule checks.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a cycle
watchdog.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/auth_pkg.sv tb/tb_sha3_ref.sv tb/tb_auth_gateway_top.sv \
    --top-module tb_auth_gateway_top
./obj_dir/Vtb_auth_gateway_top
```

Any other testbench runs the same way: replace the last file and the top
module name. `tb_sha3_ref.sv` is needed only by the Keccak, MAC, MAC-check and
top testbenches.

The top testbench runs the gateway at its default parameters. It:

* chains five cameras, feeding each output frame back in as the next parity
  input, and checks every frame byte for byte;
* rebuilds one camera's packet from the parity;
* lets video descriptors wait for their parity partners;
* measures throughput;
* overflows a descriptor queue;
* passes a video frame and an ARP frame through the filter;
* checks a camera's packet against its tag from the parity frame, intact and
  tampered.

It counts each of these mechanisms and fails if any of them never happened.
