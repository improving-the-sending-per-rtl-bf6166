# Large-send offload engine for a 40-100 Gb/s network interface (sending side)

When a host sends a large TCP or UDP datagram (up to 64 KiB), someone has to
cut it into packets that fit the link's MTU and give each packet a correct
header. Large-send offload (LSO) moves that work from the host's operating
system into the network interface. At 100 Gb/s, however, a 1500-byte packet
leaves the wire every 123 ns. The per-packet work in the interface therefore
has to be small and has to overlap with the data movement.

This RTL implements such a sending path around three ideas:

* **Rewrite the header in place.** The host leaves the datagram in a
  *Sending Buffer* (SB) with its IP and TCP/UDP headers in front. For each
  packet a small specialised RISC core, the *Sending Embedded Processor*
  (SEP), rewrites only the few header fields that change. These are the IP
  total length, plus either the TCP sequence and acknowledgment fields or the
  IP fragment offset and more-fragments flag. The core never copies a header.
* **Let a DMA do all data movement.** For every packet the SEP starts two DMA
  transfers into the *Sending Buffer Interface* (SBI): the header, then
  the packet's slice of the payload. While the payload moves, the SEP
  computes the next packet's fields.
* **Clock the DMA faster than the core.** The DMA and buffers run at five
  times the SEP's clock (2115 MHz against 423 MHz in the reference
  configuration), which hides most of the core's idle time.

The SystemVerilog is synthesizable and parameterised. Its defaults are the
reference configuration's sizes: a 64 KiB SB, a 64-bit local bus,
1500-byte SBI packet buffers and a 5:1 clock ratio.

## Block diagram

```
        host                          packet processing                       line side
  ------------------   +-------------------------------------------------+   ----------------
  SB port (64-bit) --> | sb_ram (64 KiB, dual port)                      |
                       |      ^ port B                                   |
  FIFO2 push  --> msg_fifo -->|                                          |
  FIFO1 pop   <-- msg_fifo <--|        local_bus (64-bit)                |
                       |      |  <-- sep_core <-- imem (LSO program)     |
                       |      |  <-- dma ---------------------------------+--> sbi (2 x 1500 B) --> MAC
                       |  ce_gen: SEP advances 1 clock in 5              |      (valid/ready stream)
                       +-------------------------------------------------+
```

`lso_send_ni` is the top level. The DMA owns the local bus while it
transfers. During that time any SEP load or store waits, but the SEP's
instruction fetch does not, because it comes from its own memory (`imem`).

## How a message becomes packets

The host writes the message into the SB and pushes two 32-bit words into
FIFO2: the message's byte address in the SB (SHAP, 4-byte aligned) and the
MTU. The IP header's protocol field selects TCP (6) or UDP (anything else).
Its total-length field (TL) gives the datagram size.

| Case | Condition | What goes out |
|------|-----------|---------------|
| SSM (single-segment message), small | TL <= 64 bytes | the message unchanged, copied word by word by the SEP into the SBI (programmed I/O); this covers 40-byte empty signalling packets |
| SSM | 64 < TL <= MTU | the message unchanged, in one DMA transfer |
| BOM, COM, EOM (beginning, continuation, end of message) | TL > MTU | one packet per chunk: the rewritten header, then the chunk |

Per-packet header length HL and chunk size:

* **TCP**: HL = 40 (IP + TCP). Chunk = MTU - 40, which is an MSS of 1460 at
  MTU 1500. For each segment the IP total length becomes 40 + len and the
  sequence field becomes the initial sequence number + offset. The
  acknowledgment field (TCP bytes 8-11) is written with sequence + len, and
  the next segment's sequence number equals it. *Read this rule before
  using the RTL with a real TCP stack.* It is this design's reading of its
  source: a standard stack puts the peer's acknowledgment number there and
  leaves it unchanged.
* **UDP**: each fragment is a 20-byte IP header plus the next
  `(MTU - 20) rounded down to a multiple of 8` bytes of the IP payload. The
  UDP header is part of that payload, so it travels in the first fragment
  only, which then carries 1472 data bytes at MTU 1500. Each fragment's IP
  total length, fragment offset (in 8-byte units) and more-fragments flag
  (set on all but the last) are rewritten.
* The IP header checksum is **not** recomputed. Leave it to the MAC side,
  or add it to the program.

When the whole message has gone to the DMA and the last transfer has
finished, the SEP pushes the message's SB address into FIFO1 as its
"sent" report.

## The SEP core (`sep_core`)

A 32-bit RISC with 16 registers (r0 reads as zero), no cache and no floating
point. It has three stages: **fetch** from `imem`, **decode/execute**
(register read, ALU, branch decision, local-bus access) and **write-back**.

* The fetch address is computed in decode/execute. A taken branch therefore
  fetches its target directly and costs no extra step.
* The write-back result is forwarded to decode/execute, so dependent
  instructions can follow each other directly.
* A load or store holds the whole pipeline until the local bus answers.
  Under DMA traffic, this is where the core idles. `idle_count` counts
  such steps and `instr_count` counts executed instructions.
* The core steps only when `ce` is high, one clock in `CLK_RATIO`. A bus
  access needs at least one clock after its grant before the core can take
  the data, so with `CLK_RATIO = 1` every access costs one extra step.

Instruction format, 32 bits: `[31:26] op | [25:22] rd | [21:18] rs1 | [17:0] imm18`
(for register-register operations rs2 is `imm18[17:14]`).

| op (hex) | instruction | effect |
|----|----|----|
| 00-07 | add sub and or xor sll srl sltu | rd = rs1 op rs2 |
| 08, 0A-0F | addi, andi ori xori, slli srli, sltiu | rd = rs1 op imm (addi/sltiu sign-extend; logic ops zero-extend) |
| 10 | lui | rd = imm18 << 14 |
| 18 / 19 | lw / lhu | rd = mem32 / zero-extended mem16 at rs1 + simm |
| 1A / 1B | sw / sh | mem32 / mem16 at rs1 + simm = rd |
| 20-23 | beq bne bltu bgeu | if rd ==, !=, < or >= rs1 (unsigned) then pc = pc + simm |
| 28 / 29 | jal / jr | rd = pc + 1, pc = pc + simm / pc = rs1 |

Memory is big-endian: byte address 8w+i is bits `[63-8i -: 8]` of 64-bit
word w. Header fields therefore load with their most significant byte first.

## The LSO program (`rtl/lso_fw.hex`)

`rtl/lso_fw.hex` holds the program below, one instruction per line in the
encoding above. Registers: r1 register base, r3 SHAP, r5 protocol,
r7 per-packet header length, r9 TCP sequence, r10 bytes still to send,
r11 chunk size, r12 SPP (start of the next payload slice), r13 fragment
offset, r14 the DMA end-of-packet bit.

```
  0            addi r1, r0, 0x10000
  1            addi r14, r0, 1
  2            slli r14, r14, 16
  3            addi r8, r0, 6
  4  wait:     lw r2, 8(r1)             ; FIFO2 not empty?
  5            andi r2, r2, 1
  6            beq r2, r0, wait
  7            lw r3, 0(r1)             ; message location (SHAP)
  8            lw r4, 0(r1)             ; MTU
  9            lhu r5, 8(r3)            ; TTL, protocol
 10            andi r5, r5, 255
 11            lhu r6, 2(r3)            ; datagram total length
 12            addi r7, r0, 20          ; UDP: IP header only per fragment
 13            bne r5, r8, nottcp
 14            addi r7, r0, 40          ; TCP: IP + TCP header per segment
 15            lw r9, 24(r3)            ; initial sequence number
 16  nottcp:   sub r10, r6, r7          ; bytes after the per-packet header
 17            sub r11, r4, r7          ; chunk per packet (MSS)
 18            beq r5, r8, tcpmss
 19            andi r11, r11, 0x3FFF8   ; UDP: fragment data is a multiple of 8 bytes
     tcpmss:  
 20            add r12, r3, r7          ; SPP
 21            addi r13, r0, 0
 22            bltu r4, r6, seg         ; TL > MTU: segment / fragment
 23  ssm:      addi r2, r0, 64          ; SSM: send as is
 24            bltu r2, r6, ssmdma      ; more than 64 bytes: by DMA
 25  pio:      lw r2, 0x20(r1)          ; small: programmed I/O, wait for a free SBI buffer
 26            andi r2, r2, 1
 27            beq r2, r0, pio
 28            addi r15, r0, 0
 29  pcopy:    add r2, r3, r15
 30            lw r2, 0(r2)             ; word from SB
 31            addi r4, r15, 0x18000
 32            sw r2, 0(r4)             ; word into the SBI window
 33            addi r15, r15, 4
 34            bltu r15, r6, pcopy
 35            sw r6, 0x24(r1)          ; close the SBI buffer, length TL
 36            beq r0, r0, fin
 37  ssmdma:   sw r3, 0x10(r1)
 38            sw r0, 0x14(r1)
 39            or r15, r6, r14
 40            sw r15, 0x18(r1)
 41            beq r0, r0, fin
 42  seg:      bltu r11, r10, notlast
 43            add r4, r10, r0          ; EOM: what remains
 44            addi r6, r0, 1
 45            beq r0, r0, havlen
 46  notlast:  add r4, r11, r0          ; BOM / COM: a full chunk
 47            addi r6, r0, 0
 48  havlen:   add r2, r4, r7
 49            sh r2, 2(r3)             ; IP total length
 50            bne r5, r8, udpf
 51            sw r9, 24(r3)            ; TCP sequence number
 52            add r15, r9, r4
 53            sw r15, 28(r3)           ; acknowledgment field
 54            beq r0, r0, hdrok
 55  udpf:     srli r15, r13, 3         ; fragment offset in 8-byte units
 56            bne r6, r0, lastf
 57            ori r15, r15, 0x2000     ; more fragments
 58  lastf:    sh r15, 6(r3)
 59  hdrok:    sw r3, 0x10(r1)          ; DMA header: SB[SHAP] -> SBI[0] (DMA waits for a free SBI buffer)
 60            sw r0, 0x14(r1)
 61            sw r7, 0x18(r1)
 62            sw r12, 0x10(r1)         ; DMA payload: SB[SPP] -> SBI[HL], end of packet
 63            sw r7, 0x14(r1)
 64            or r15, r4, r14
 65            sw r15, 0x18(r1)
 66            sub r10, r10, r4         ; overlapped with the transfer: bytes left
 67            add r9, r9, r4           ; next sequence number
 68            add r12, r12, r4         ; next SPP
 69            add r13, r13, r4         ; next fragment offset
 70            beq r6, r0, seg
 71  fin:      sw r3, 4(r1)             ; report the message as sent (FIFO1)
 72            beq r0, r0, wait
```

The four instructions after the payload DMA start (66-69) run while the DMA
moves the payload. The next bus access (the header update at 49, or the
report at 71) then waits for the DMA to release the bus. In steady state a
packet costs 22-24 instructions.

## DMA (`dma`)

It has one channel, programmed with three registers: source byte address in
the SB, destination byte offset in the SBI buffer, and a control word
(length in bytes, bit 16 = end of packet) whose write starts the transfer.
Each 64-bit word takes **two clocks**: a read into the DMA's data register,
then a write to the SBI. A 1460-byte segment from an aligned address thus
takes 183 reads and 183 writes, and the DMA is busy for 2*183 + 2 clocks.

Because a 1460-byte MSS puts every later segment off a word boundary, source
and destination may sit at any byte offset. When their offsets within a word
differ, one extra read primes a second data register. Each output word is
then taken from the two registered words through a byte funnel, and byte
enables trim the first and last words. Before its first write the DMA waits
until the SBI has a free buffer; it holds the bus meanwhile. A transfer
marked end-of-packet commits the SBI buffer with length `dst + len`.

## SBI (`sbi`)

The SBI has two 1500-byte (188-word) buffers and a small sequential machine.
Exactly one buffer is open for filling, and it stays open until the DMA
commits a packet into it. The machine then switches to the other buffer,
while the MAC side drains the full one. `fill_free` is low while both
buffers hold packets. The MAC side is a valid/ready stream of 64-bit
big-endian words with `m_keep` (valid bytes) and `m_last`.

## Local bus and register map (`local_bus`, `lso_pkg`)

Byte addresses are 17 bits. Bit 16 clear addresses the SB; bit 16 set
addresses these 32-bit registers:

| address | access | register |
|---------|--------|----------|
| 0x10000 | R | pop the next FIFO2 word |
| 0x10004 | W | push a FIFO1 word |
| 0x10008 | R | bit 0: FIFO2 not empty, bit 1: FIFO1 not full |
| 0x10010 | W | DMA source (SB byte address) |
| 0x10014 | W | DMA destination (SBI byte offset) |
| 0x10018 | W | DMA length [15:0], end of packet [16]; starts the DMA |
| 0x10020 | R | bit 0: an SBI buffer is free |
| 0x10024 | W | close the SBI buffer filled by programmed I/O; bits [15:0] = packet length |
| 0x18000 + n | W | programmed I/O: byte n of the SBI buffer being filled |

The SBI's fill port normally belongs to the DMA. While the DMA is idle, the
window at 0x18000 routes SEP stores there instead.

SEP handshake: the request stays steady in decode/execute. `rdy` rises one
clock after the grant, with registered read data. The SEP then pulses
`done` for one clock, and in that clock stores are written and FIFO words
are pushed or popped. There is no grant while the DMA is busy.

## Measured performance

The numbers come from `tb_lso_workloads` at default parameters: twelve-packet
messages and a MAC that never stalls. Time per packet is converted at a
2115 MHz fast clock (SEP at 423 MHz). The 40/100 Gb/s budgets assume 38
bytes of Ethernet framing per packet.

| packet | clocks/packet (TCP / UDP) | ns/packet | SEP instr./packet | rate | budget at 40 / 100 Gb/s |
|---|---|---|---|---|---|
| 1500 B | 442.5 / 444.4 | 209 | 23.5 | 57 Gb/s | 308 / 123 ns |
| 1024 B | 320.0 / 324.4 | 152 | 22 | 54 Gb/s | 212 / 85 ns |
| 512 B  | 195.0 / 194.4 | 92 | 22 | 44 Gb/s | 110 / 44 ns |

All three sizes meet 40 Gb/s. None meets 100 Gb/s, and the DMA itself
explains why. At two clocks per 64-bit word it moves 32 bits per clock, which
is 67.7 Gb/s at 2115 MHz, before any per-packet overhead. Reaching 100 Gb/s
takes a wider bus or a one-clock-per-word DMA. The rest of each packet's
time is the SEP's serial work between two DMA transfers: about 12
instructions of 5 clocks each, which cannot start until the previous payload
is out of the bus.

## What comes from the reference design and what is this design's own

Following the reference description:

* The three-part structure (host interface with SB and two FIFOs;
  packet processing with local bus, DMA and RISC; line interface with the SBI).
* The dual-ported SB.
* The 64-bit local bus that the SEP releases to the DMA.
* The single-channel DMA at two clocks per word.
* The two alternating one-packet SBI buffers.
* The three-stage RISC with only load, store, ALU and branch instructions.
* The BOM/COM/EOM/SSM cases.
* In-place header update followed by a DMA of header and payload.
* Overlapping the SEP's next-packet work with the transfer.
* The 5:1 DMA-to-SEP clock ratio.
* Choosing between the DMA and programmed I/O by data size.

This design's own choices:

* The instruction set and its encoding, and the program.
* The register map and the bus handshake.
* FIFO depth (16) and width (32 bits), and FIFO pointers kept in the FIFO
  rather than in SEP registers.
* The FIFO2 message format (address, then MTU).
* Byte-unaligned DMA.
* A single clock with an SEP clock enable, instead of two clocks.
* Big-endian byte lanes.
* The MAC handshake.
* The acknowledgment-field rule above.
* UDP fragment sizing.
* The 64-byte threshold for programmed I/O.
* Active-low asynchronous reset of all control state. Memories are not
  cleared.

Not included:

* IP checksum update.
* The receiving side.
* The MAC.
* The unnamed "memory manage" unit of the reference block diagram, whose
  function is not described.

## Files

| file | contents |
|------|----------|
| `rtl/lso_pkg.sv` | address map, opcodes, instruction and bus-request types |
| `rtl/lso_send_ni.sv` | top level |
| `rtl/sep_core.sv`, `rtl/imem.sv`, `rtl/lso_fw.hex` | SEP core, its instruction memory, the LSO program |
| `rtl/dma.sv`, `rtl/local_bus.sv`, `rtl/ce_gen.sv` | DMA, local bus, SEP clock enable |
| `rtl/sb_ram.sv`, `rtl/msg_fifo.sv`, `rtl/sbi.sv` | Sending Buffer, host FIFOs, Sending Buffer Interface |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_lso_send_ni.sv` | end to end: seven mixed TCP/UDP/SSM messages under MAC back-pressure, then a 65000-byte datagram; every byte checked against a reference model, and every mechanism counted |
| `tb/tb_lso_workloads.sv` | the packet-size workloads and their throughput |

## Simulating

Run from the repository root, because `imem` loads `rtl/lso_fw.hex` by that
relative path. For any testbench:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_lso_send_ni rtl/lso_pkg.sv tb/tb_lso_send_ni.sv -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A
watchdog ends a hung run with a failure. `tb_lso_workloads` also prints one
`WORKLOAD` line per case.

## Changing it

* The top-level parameters are `CLK_RATIO`, `SB_BYTES`, `PKT_BYTES` (SBI
  buffer size; keep it at least the MTU you post), `FIFO_DEPTH`, `IM_DEPTH`
  and `FW_FILE`.
* To change the program, edit the listing and re-encode it with the table
  above (one 8-digit hex word per line). Branch offsets are relative to the
  branch's own address.
* Every 32-bit load or store must be 4-byte aligned, and every halfword
  access 2-byte aligned. Assertions in `sep_core` catch violations in
  simulation, so message addresses (SHAP) must be 4-byte aligned.
