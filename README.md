# Packet classification and termination in a programmable protocol processor

A network terminal spends much of its receive effort on two jobs:

- checking every packet (CRC, checksums, addresses, lengths);
- looking up per-connection and per-fragment state for it.

This design splits that work in two:

- **Fast path.** A programmable protocol processor (PPP) inspects each packet *while it streams through a register chain*, one 32-bit word per clock. It decides whether the packet is discarded or delivered before the packet leaves the chain.
- **Slow path.** A general-purpose micro controller (µC) handles connection set-up and other control-intensive work. It is not part of this RTL.

The two share a **control memory** that holds inter-packet state. The PPP gets to that state through the **Control Memory Access Accelerator (CMAA)**. The CMAA recognises a packet in two content-addressable look-up engines:

- the fragment table (PLUE);
- the connection table (SLUE).

It then hands the PPP the addresses of the packet's reassembly buffer and connection buffer a fixed, small number of cycles after the packet arrives:

| Packet | Cycles to `packet_ready` |
|---|---|
| New IPv4 packet | 9 |
| New IPv6 packet | 11 |
| Further fragment of a known packet | 4 |

Because that latency is bounded, the PPP can finish its per-packet work, including updating the reassembly state, before the packet leaves the chain.

```
 32-bit words      +---------------------------------------------+  words + decision
 ----------------> | input_buffer_chain (32 stages)              | ----------------->
                   +--+------+------+------+------+------+-------+
                      | taps | taps | taps | taps | taps |
                   +--v--+ +-v--+ +-v-+ +--v--+ +-v-+ +--v---------+
                   | CRC | |XACx| |LEN| |CSUMx| |GADD| |   CMAA    |
                   +--+--+ +-+--+ +-+-+ +--+--+ +-+-+ | PLUE SLUE |
                      |flags |      |      |      |   | bufgen sel|--- ctrl_mem (2^20 x 32)
                   +--v------v------v------v------v---+-----------+        |
                   | cc_ctrl: PC, program memory, decoder,         |   micro controller
                   | four-way jump decision, word counter          |   (ports of ppp_top)
                   +-----------------------------------------------+
```

## The register chain and the functional pages

`input_buffer_chain` is a plain shift register of 32 words. Each word carries:

- valid, start of packet and end of packet;
- four byte enables;
- 32 data bits.

Every functional page (FP) reads one chain stage, its *tap*, chosen by the last command it received. So a command issued in cycle *t* with tap *k* operates on the word that entered the chain *k* cycles earlier. Alternatively, a page can read **data bus 2**, the last word read from the control memory; bit 15 of the command's immediate selects this.

| Page | Module | Work |
|---|---|---|
| CRC | `crc_fp` | Ethernet CRC-32 over the frame, byte enables honoured. `crc_ok` checks the residue `0xDEBB20E3` once the FCS is included. |
| XAC 0/1 | `xac_fp` | Extract-and-compare. Three commands:<br>• compare `(data & mask)` with a reference;<br>• compare with another page's value;<br>• extract `(data & mask) >> shift`.<br>Reference, mask and shift are configuration registers. |
| LEN 0/1 | `len_counter` | 16-bit accumulator. Commands: load, add upper/lower half-word, subtract an immediate, add the other counter, clear. |
| CSUM 0/1 | `csum_adder` | Ones-complement sum of both half-words of a given number of words (or up to end of packet). Also has load and add commands for partial sums. `ok` = sum is `0xFFFF`. |
| GADD | `generic_adder` | Registered add/subtract. In the top it computes `fragment offset * 8 + payload length`, the total length of a fragmented datagram. |

In `ppp_top` the pages are connected as follows:

- Each length counter sees the other counter as its second operand.
- XAC 0 can compare with LEN 0, and XAC 1 with LEN 1.
- XAC 1 is the header-flag extractor. Its extracted value gives the fragment flags that steer the program:
  - bit 13 = more fragments;
  - bits 12:0 = fragment offset.

  These are the 16 low bits of IPv4 header word 1.

A discard decision stops the CRC and checksum pages at once.

## The Counter and Controller

`cc_ctrl` is a small sequencer. It waits for a start of packet in chain stage 0, then runs its program from address 0, one instruction per cycle. The first instruction runs in the same cycle as the start of packet.

Instructions (`cc_instr_t`, fields `op sel cmd tap a imm`):

| op | meaning |
|---|---|
| `OP_FP` | send command `cmd` with `imm` to page `sel`, data from stage `tap` |
| `OP_CMAA` | CMAA instruction `sel[2:0]`, configuration `a`, `cmd[0]` = last key word, data from stage `tap` |
| `OP_JMP4` | `pc = a + {flag[sel], flag[cmd]}`: a four-way branch in one cycle; with both selects on the constant-0 flag it is a plain jump |
| `OP_WAITW` | stall until the word counter reaches `a` |
| `OP_WAITF` | stall until `flag[sel] == cmd[0]` |
| `OP_MEMRD` | read word `a` of the packet (`sel[0]=0`) or connection (`sel[0]=1`) buffer onto data bus 2 |
| `OP_MEMWR` | write source `sel[3:1]` to word `a` of that buffer. Sources: LEN0, LEN1, CSUM0, CSUM1, GADD, XAC0 value, XAC1 value, zero. |
| `OP_DEC` | decision `imm[1:0]`: discard / to host / to control memory |
| `OP_END` | back to idle |

The flags the jump decision can test are listed in `ppp_pkg` (`FLG_*`):

- page results: CRC ok, the two XAC matches, the two checksums ok;
- the fragment flags: fragmented, first fragment, more fragments;
- CMAA state: packet ready, discarded, PLUE hit, settled;
- the constant 0;
- checksum page 1 idle (its sum to the end of the packet is finished).

Decisions go into a two-entry queue. The entry at its head tags the packet as its start of packet leaves the chain (`dout_dec`). If a packet leaves before its program made a decision, `late_decision` is raised and the packet is tagged discard. A start of packet that arrives while the program still runs raises `overrun`: the gap between packets was too short, and that packet is not processed.

## The Control Memory Access Accelerator

`cmaa` is driven by the C&C with six instructions:

- **NEW_PACKET.** Configuration = internal packet type. The data word carries the 16-bit IP identification. Flags say whether the packet is a fragment and whether it holds the layer-4 header.
- **LOAD_REG.** Loads one word of the connection key (ports or one address word). The word marked *last* starts the SLUE search.
- **ID_CAM and PA_CAM.** Read, write or remove in the PLUE and in the SLUE.
- **RELEASE.** Hands the packet to the µC. With `cfg[0]=1` it aborts instead: no buffer is consumed, no µC notification is sent, and a PLUE entry made for this packet is removed.
- **SET_MEMBUF.** The packet takes its buffer from another region, for example a control-protocol packet whose payload goes to the control memory.

### Control procedure

| State | What happens |
|---|---|
| WAIT | The µC owns the memory. A NEW_PACKET latches type and ID. For a fragment it starts the 2-cycle PLUE search. An unfragmented packet takes a fresh packet buffer straight away. |
| LOAD | The key words are loaded while the PLUE searches. On a hit, the stored buffer address becomes the packet address. On a miss, a fresh buffer is taken, and the ID is entered into the PLUE when READY is reached. |
| CHECK | The 3-cycle SLUE search. It is skipped for fragments without the layer-4 header. A miss raises `discard` and returns to WAIT. |
| STORE | The matching connection's buffer address (data bus 1) is written into word 0 of the packet buffer. |
| READY | `packet_ready`. The PPP reads and writes `packet buffer + offset` and `connection buffer + offset` through the accelerator. |
| UPDATE | The lock is released, used buffer pointers advance, and `uc_new_packet` tells the µC the packet and connection buffer addresses. Both look-up engines search for the next free entry, one entry per cycle, before WAIT. |

Latency, counting the NEW_PACKET cycle as 1 (checked in `tb_cmaa`):

| Case | Cycles |
|---|---|
| IPv4 packet loading three key words | 9 |
| IPv6 with five key words | 11 |
| Further fragment of a known packet | 4 |

With a 4-cycle SLUE (`SLAT=4`) the first two become 10 and 12.

### Look-up engines

- **`cam`**: a binary CAM with a valid bit per entry and a combinational match vector. It is built from flip-flops here; a real chip would use a custom CAM cell.
- **`plue`**: one 16-bit CAM of M=16 entries and a W=20-bit result memory holding the packet-buffer address. The key and results are registered; results are valid `LAT`=2 cycles after `search`.
- **`stcam`**: three CAMs whose match vectors are ANDed. Each CAM can be masked as a whole (a wildcard per field, not per bit).
- **`slue`**: two STCAMs, N=64 entries each:
  - type 8 + source port 16 + destination port 16 bits;
  - address words of 32 + 32 + 64 bits.

  It also holds the result memory of connection-buffer addresses. Mask bits come from a 16-entry table indexed by the packet type, written by the µC. For example, an IPv4 type masks the upper 64 address bits, leaving source and destination address in the two 32-bit words. Because the internal type keeps entries from overlapping, no priority logic is needed; the lowest matching index is taken anyway.

### Buffers and memory sharing

`mem_buffer_gen` keeps one pointer per region:

- packet (reassembly) buffers;
- connection buffers;
- control-packet buffers.

Each region has a base, a limit and a stride set by the µC. A pointer steps by the stride and wraps to the base when the next buffer would pass the limit.

`mem_access_sel` gives the accelerator side absolute priority over the µC. The µC is granted only when the FSM is in WAIT or UPDATE.

`ctrl_mem` is a 2^20 x 32-bit single-port RAM with a one-cycle read.

Packet buffer layout (word offsets, `PB_*` in `ppp_pkg`):

| Word | Contents |
|---|---|
| 0 | connection buffer address |
| 1 | payload bytes received so far |
| 2 | total payload length (0 until the last fragment is seen) |
| 3 | ones-complement sum of the payload received so far (not complemented) |

## A receive program

The end-to-end test `tb/tb_ppp_top.sv` loads a 71-instruction program for UDP/IPv4 over Ethernet. Frames arrive with two bytes of padding in front of the Ethernet header, so the IP header starts on a word boundary. The program:

1. Starts the CRC at the start of packet.
2. At word 5, extracts the fragment flags, starts the header checksum over words 4..8, compares the destination address, and computes the payload length and `offset*8 + length`.
3. Branches four ways on *address ok / checksum ok*, then on *fragmented / first fragment*.
4. Issues NEW_PACKET and the key loads with the taps that fit its path, and waits for the CMAA to settle.
5. On a discard, decides *discard* and ends. Otherwise it decides *host*.
6. For a fragment:
   - reads the received and total lengths from the packet buffer and adds this fragment's length;
   - if this is the last fragment, stores the total;
   - if received equals total, removes the ID from the PLUE, which completes reassembly;
   - in every case writes the new received length back, so the µC sees received = total for a complete datagram;
   - sums the fragment's payload with checksum page 1, from the first payload word up to, but not including, the last word of the frame (the FCS). It waits for the end of the packet, adds the partial sum from word 3 if the buffer already existed, and writes the result back to word 3. When the datagram is complete, word 3 holds the ones-complement sum of its whole payload, so the µC only has to add the pseudo-header to check the UDP or TCP checksum.
7. Releases the packet to the µC.

The decision is made before the checksum wait, so it is never delayed by it. The program takes 15 cycles for a discarded packet and at most 47 cycles for a fragment of a 64-byte frame (17 words), so a gap of roughly 30 idle cycles is needed after such a fragment. After a long fragment, the program ends about 8 cycles after its last word. A shorter gap is caught as an overrun.

## Where this design departs from, or fills in, the published architecture

Taken from the architecture:

- the four-part PPP;
- the page mix;
- the CMAA state sequence and instruction set;
- the latencies;
- M=16, N=64, W=20;
- the 2- and 3-cycle searches;
- whole-CAM wildcards;
- PPP priority on the control memory;
- µC access only in WAIT/UPDATE.

This implementation's own choices:

- all binary encodings and the C&C instruction word (program memory of 128 words);
- the chain length of 32;
- the page operand wiring;
- the byte-enable word format;
- the packet buffer layout;
- the abort form of RELEASE;
- the mask table per packet type;
- writing a new PLUE entry only when the packet reaches READY.

The free-entry search uses a small incrementer inside the CMAA instead of borrowing the PPP's generic adder. The page stays free for the program, and the search needs one cycle per occupied entry.

Not included:

- the µC, the network interface and the host DMA (only their signals are ports of `ppp_top`);
- transmit processing;
- host-memory address calculation;
- a receive program for control protocols (ARP, ICMP) or IPv6;
- the final layer-4 checksum comparison with the pseudo-header, which is left to the µC.

The control-protocol and IPv6 programs are program matters, not missing hardware: SET_MEMBUF (a buffer from the control-packet region) and five-word IPv6 connection keys are tested in the CMAA unit test.

The payload sum in the test program assumes payloads that are a whole number of 32-bit words, and frames that end with the 4-byte FCS in a word of their own. Other lengths would need byte-enable masking of the last payload word, which the checksum page does not do.

The CAMs are behavioural flip-flop arrays, so their timing and area say nothing about a full-custom CAM.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ppp_pkg.sv tb/tb_ppp_top.sv --top-module tb_ppp_top
obj_dir/Vtb_ppp_top
```

Replace `ppp_top` with any block name to run its unit test:

- `cam`, `plue`, `stcam`, `slue`, `cmaa`, `mem_buffer_gen`, `mem_access_sel`, `ctrl_mem`;
- `crc_fp`, `xac_fp`, `len_counter`, `csum_adder`, `generic_adder`;
- `input_buffer_chain`, `cc_ctrl`.

`tb_ppp_top` runs the top at its default sizes and exercises:

- unfragmented packets;
- in-order and out-of-order fragments;
- reassembly completion;
- PLUE hits and misses;
- unknown connections;
- wrong addresses;
- bad header checksums;
- bad FCS;
- µC lock-out;
- a too-short packet gap.

It also checks four datagrams whose fragments arrive interleaved in random order. It counts each of these mechanisms and fails if any never occurred.

`tb_cmaa_slue4` builds the CMAA with a 4-cycle SLUE and checks the slower latencies: 10, 12 and 4 cycles.
