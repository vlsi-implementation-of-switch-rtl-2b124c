# A two-port ATM cell switch with a shared cell memory

This is a small ATM switch. Each input port takes packets as 32-bit words. Each packet is cut into
48-byte payloads, and each payload becomes an ATM cell: a 40-bit (5-byte) header that names a virtual
path, plus the payload. Cells are carried as fourteen 32-bit words. The header steers each
cell through one shared cell memory to one of two output ports. The data path is one word wide
throughout, and every hop of a cell takes exactly 14 clock cycles: 2 for the header and 12 for the
payload. The latency is therefore fixed and easy to reason about: with a 1 ns clock, a cell crosses
the switch in a few tens of nanoseconds.

Ports 0 and 1 are inputs and ports 2 and 3 are outputs. Four virtual path connections are defined:

| connection | first header word | VPI (header bits 35:28) |
|-----------|-------------------|--------------------------|
| 0 → 2 | `01400000` | `0x14` |
| 0 → 3 | `01900000` | `0x19` |
| 1 → 2 | `02800000` | `0x28` |
| 1 → 3 | `05000000` | `0x50` |

The second header word is always `00000000`. The switch routes on the VPI alone. A cell whose VPI is
not in the table is discarded.

## Data path

```
            input port i (i = 0, 1)                         shared                output port o
 env_pkt32_in ─► segmentation ─► atm_host_interface ─► sii ─┐                 ┌─► msf ─► env_pkt32_out[o]
 env_pkt_start   (packet store,   (adds header of      (1-cell  │  mmf  ─► mmc  │   (14-cycle
                 48-byte cells)    connection i→dest)   buffer) │ (moves  (cell  │    read)
                                                          │     │  cells)  memory│
                                                          hvf ──┘         + per- ┘
                                                      (VPI → port)       output queues)
```

| module | role |
|--------|------|
| `segmentation` | Stores one packet, up to 36 payload words. Hands it out 12 words at a time. |
| `atm_host_interface` | Frames each 12-word payload into a 14-word cell with the connection's header. |
| `sii` | Switch incoming interface. Buffers one cell and slices out its 40-bit header. |
| `hvf` | Header validation. Looks up the VPI and gives a valid flag and the output port. |
| `mmf` | Main memory FSM. Moves complete cells from the two SIIs into the shared memory, taking turns. |
| `mmc` | Main memory control. Holds 16 cell slots shared by both outputs, with one FIFO of slot numbers per output. |
| `msf` | Main switch FSM, one per output. Reads queued cells out, one word per cycle. |
| `atm_switch_top` | Wires two input chains, the shared memory and two outputs together. |
| `atm_pkg` | Shared constants, types, the connection table and the routing function. |

## Packet format at the inputs

For input `i`, hold `env_pkt_start[i]` at 1 for the whole packet and present one word per cycle on
`env_pkt32_in[i]`:

- word 0 is the packet identifier. Bits [1:0] give the destination port, 2 or 3. Any other value has
  no connection, so the packet's cells are discarded inside the switch.
- words 1 to N are the payload, at most 36 words (144 bytes). Further words are dropped and
  `env_seg_overflow_out[i]` is set.

The packet ends when `env_pkt_start[i]` falls. The payload is sent as ⌈N/12⌉ cells, and the last
cell is padded with zero words. `env_pkt_over_out[i]` rises when the last cell has left the
segmentation module. Start the next packet only after that. The first packet after reset needs no
wait.

Each output `o` delivers whole cells, 14 words with `atm_pkt_active_out[o]` high. The cell keeps
its header, so the first word identifies the source port. `cell_drop_out` pulses once for each
discarded cell.

## How a cell moves: handshakes and timing

Every stage holds at most one cell, and a stage hands a cell on only when the next stage can take
all of it. As a result, no stage ever stalls in the middle of a cell. Words move at full rate once a
transfer starts.

1. **Segmentation → host interface.** The segmentation module sends cells only once the whole
   packet is stored. While a complete unread cell remains, `cell_rdy_out` is 1. The host interface
   starts a cell when that flag is 1 and the SII's `ready_out` says it is empty. It then drives 14
   words with a valid flag:
   - the connection header;
   - the zero word;
   - the 12 payload words.

   Segmentation reads are registered, so the host interface raises `seg_rd_en` from the second
   header cycle to the 13th cycle. Each payload word then arrives in the cycle it is sent.
2. **Host interface → SII.** The SII writes the 14 words as they come.
   - It shifts the two header words through a 64-bit register, `CELL_HDR_OUT_TEMP`. The first word
     enters the low half, then moves to the high half as the second word enters.
   - Bits [63:24] of that register are the 40-bit header.
   - `hvf` decodes the header combinationally, so the valid flag and output port are ready when
     the cell is complete.
3. **SII → shared memory (`mmf`).** The SII's `cell_rdy_out` is already 1 in the cycle the 14th
   word is written. The FSM's two-bit state is `MEM_CURR_STATE`:
   - `00`: idle. The FSM makes its choice here, round robin starting after the input served last.
     For a lone cell, this decision overlaps the SII's last write.
   - `10`: transfer. It starts in the cycle after the decision. For 14 cycles the FSM raises that
     SII's `inc_rd_en` and the memory's `mem_wr_en` together. The SII reads its array
     combinationally, so each word is written to the memory in the same cycle.
   - `11`: discard. Used when the header is invalid. The SII is read out for 14 cycles and nothing
     is written.
   - `01`: wait. Used when the memory has no free slot. No cell is lost.
4. **Shared memory → output (`mmc`, `msf`).**
   - On a cell's first word, `mmc` takes the lowest free slot.
   - After the 14th word, it appends the slot number to the queue of the cell's output.
   - `cell_avail_out[o]` is 1 while that queue holds a cell, and also in the cycle the last word of
     a cell for `o` is written.
   - The output's `msf` decides in that cycle. From the next cycle it reads the head cell for 14
     cycles through its own read port. The slot is freed after the last word.

The rule throughout is that a ready or available flag rises during the last word of a transfer.
The receiving FSM then decides in that cycle, and the next transfer starts in the following cycle.
To change one of these handshakes, keep that rule, or the cycle counts below move.

**Latency.** Take a cell that enters an empty switch. Its last word leaves 42 cycles after its
first header word entered the SII:

- 14 cycles to write the SII;
- 14 cycles to move the cell into the shared memory;
- 14 cycles to read it out.

The three transfers run back to back.

**Throughput.** All cells pass through the single `mmf` transfer path. Each FSM idles for one cycle
between two cells, so that path admits one cell every 15 cycles from the two inputs together: 48
payload bytes per 15 ns at 1 GHz, or 3.2 GB/s. An output also takes 15 cycles per cell, so the two
outputs never read in the same cycle. The shared memory can still hold several cells when traffic
arrives in bursts.

The memory-full wait (`mmf` state `01`) cannot occur inside `atm_switch_top`, because every output
drains cells at the rate `mmf` writes them. The state is there so that `mmf` and `mmc` stay correct
when used with a slower consumer, and `tb_mmf` tests it.

## Parameters

| where | parameter | default | meaning |
|-------|-----------|---------|---------|
| `atm_switch_top` | `NCELLS` | 16 | cell slots in the shared memory |
| `atm_switch_top` | `SEG_WORDS` | 36 | payload words a segmentation module can store (144 bytes) |
| `atm_pkg` | `PAYLOAD_WORDS`, `HDR_WORDS`, `CELL_WORDS` | 12, 2, 14 | cell layout |

The two-input, two-output arrangement and the connection table live in `atm_pkg`. To add ports,
change `NUM_IN`/`NUM_OUT` and extend `conn_header` and `route` together. `mmf` and `mmc` are already
parameterised in the number of inputs and outputs.

## Design decisions

These parts of the design follow its original description:

- the module partition;
- the 32-bit, 14-word cell with 2 header and 12 payload cycles;
- the four header words;
- the SII's header slicing through `CELL_HDR_OUT_TEMP`;
- `MEM_CURR_STATE = 10` as the state that raises the SII read and memory write enables;
- the 14-cycle transfers.

These are this design's own choices:

- The format of the packet identifier, with the destination in bits [1:0].
- Store-and-forward segmentation, zero padding of a short last cell, and the 36-word segmentation
  memory.
- The VPI position (standard UNI layout) and routing on the VPI alone. There is no HEC check: the
  second header word is zero, so it carries no valid HEC.
- The ready/valid handshakes between stages, and one-cell buffering in the SII.
- Round-robin input choice, and discarding cells with an unknown VPI.
- The shared memory: 16 slots, per-output FIFO queues, two read ports.
- Ready flags that look one cycle ahead, and one idle cycle between cells in `mmf` and `msf`.
- The header is passed through unchanged. There is no VPI translation at the output.

Not included:

- The serial line interfaces. The switch takes and gives 32-bit words.
- Any physical implementation.

## Simulation

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops, with a watchdog in case it hangs. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/atm_pkg.sv \
          tb/tb_atm_switch_top.sv --top-module tb_atm_switch_top -o sim
./obj_dir/sim
```

The same pattern works for `tb_segmentation`, `tb_atm_host_interface`, `tb_sii`, `tb_hvf`, `tb_mmf`,
`tb_mmc` and `tb_msf`.

`tb_atm_switch_top` runs the switch at its default sizes. It does three things:

- It measures the 42-cycle single-cell latency and checks that every output cell lasts 14 cycles.
- It sends a 144-byte packet from port 0 to port 2, which gives three cells.
- It runs random traffic on both inputs at once. This traffic includes oversize packets and packets
  to a port with no connection.

A scoreboard predicts every cell for each output and source and compares it word by word. The test
fails if any of these never happens:

- multi-cell segmentation;
- padding;
- overflow;
- each of the four connections;
- an invalid-header discard;
- both SIIs full at once;
- an SII holding off its host interface;
- several cells held in the shared memory.

The module testbenches check their block against independent models:

| testbench | checks |
|-----------|--------|
| `tb_segmentation` | packet lengths 1 to 40 words, padding, flags and overflow |
| `tb_atm_host_interface` | all source and destination pairs, read-enable timing, and hold-off while the SII is busy |
| `tb_sii` | writes and reads with gaps in the enables, and the header slice |
| `tb_hvf` | all 256 VPIs |
| `tb_mmf` | round robin, 14-cycle windows, discard, and the wait state |
| `tb_mmc` | fill to full, then concurrent random writes and reads against a FIFO model |
| `tb_msf` | 14-cycle cells, separated by one idle cycle |
