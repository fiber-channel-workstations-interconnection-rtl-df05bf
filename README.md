# FCS/ATM interworking unit

Two Fibre Channel workstations can talk to each other across an ATM network
if each is plugged into an interworking unit (IWU). Each unit acts as the
workstation's Fibre Channel fabric port. It cuts every Fibre Channel frame
into ATM cells and rebuilds the frames at the far end. The frames are carried
whole, SOF and EOF delimiters included, so the end-to-end Fibre Channel
protocol runs unchanged between the two workstations. The IWUs take part in
only three things:

- buffer-to-buffer flow control (R_RDY);
- link recovery (Link Reset);
- the login of a workstation to its own port.

Cutting and rebuilding follow a small segmentation protocol called FAP. FAP
takes 2 bytes of each 48-byte cell payload for a header. That header says
what kind of cell it is, where in the cell the frame's EOF is, and which
frame and cell of the sequence this is.

The Fibre Channel link runs at 265.625 Mbaud and the ATM link at
155.52 Mbit/s, so the ATM side is the bottleneck. The design therefore puts a
4 Mbyte segmentation buffer in front of the segmenter. By default that buffer
works as a FIFO, and cells leave while the frame is still arriving. A
maximum-length frame (2112 data bytes) takes 47 cells. At one cell byte per
clock this gives 2112 × 8 bits per 47 × 53 byte times, which is
**131.9 Mbit/s of user data**. That is the most this link can carry with this
format, and the RTL reaches it.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, and runs on a
single clock.

## The FAP cell

Each cell is a standard UNI header followed by the FAP header and 23 words of
frame data:

```
 byte 0..3   GFC=0 | VPI (8) | VCI (16) | PT = 0 0 PT2 | CLP = 0
 byte 4      HEC = CRC-8 (x^8+x^2+x+1) of bytes 0..3, XOR 0x55
 byte 5      SI[2:0] | EOF pointer[4:0]
 byte 6      frame counter[1:0] | cell counter[5:0]
 byte 7..52  23 16-bit frame words, upper byte first
```

`PT2` is the last bit of the payload-type field. It is 1 on the cell that
ends a frame. Together with the Special Information code `SI` it gives the
cell type:

| PT2 | SI  | cell |
|-----|-----|------|
| 0   | 000 | first cell of a frame, more follow |
| 0   | 001 | the whole frame is in this cell |
| 0   | 010 | Link-Reset notification (no frame data) |
| 0   | 011 | middle cell |
| 0   | 100 | one-cell frame ending in EOFdt (an ACK that closes a Class 1 connection) |
| 0   | 101 | first cell of a frame opened with SOFc1 (connection request) |
| 0   | 110 | first cell of a P_RJT frame |
| 1   | 000 | last cell of a frame |
| 1   | 001 | last cell holding only the second half of a split EOF |

Some rules the table does not show:

- **EOF pointer.** It gives the word offset (0..22) of the EOF's first word
  in the cell. The value 31 means the cell holds no EOF.
- **Split EOF.** An EOF is two 16-bit words. If its first word lands in the
  last slot of a cell (pointer 22), its second word goes alone into one more
  cell of type `PT2=1, SI=001`.
- **Counters.** The frame counter counts frames modulo 4. The cell counter
  counts cells within a frame modulo 64 and restarts at 0 on each first
  cell. A frame has at most 47 cells.
- **Several special types at once.** If more than one special first-cell type
  applies to a one-cell frame, the order is SOFc1, then P_RJT, then EOFdt.

The reassembler uses the counters to spot problems:

- **Cell loss.** A gap in the cell counter discards the frame.
- **Frame loss.** A gap in the frame counter is reported as a lost frame,
  and the new frame is still taken.
- **Missing EOF.** A first cell arriving while a frame is open discards the
  open frame.

## Inside one unit

```
 FC rx words ─► fcs_filter ─┬─► seg_buffer (4 Mbyte) ─► fap_segmenter ─► cell FIFO ─► atm_driver ─► ATM tx bytes
                            │                                                              ▲
                            │                                                        atm_hdr_gen
                            ├─► frame_fifo (local rx) ─► control-unit ports
                            └─► link_recovery_fsm ──┐
                                                    ▼
 FC tx words ◄── fcs_sender ◄─┬─ frame_fifo (reassembled) ◄─ fap_reassembler ◄─ atm_receiver ◄─ ATM rx bytes
                              └─ frame_fifo (local tx) ◄── control-unit ports
```

The unit has four parts:

- **FCS1** (FC receive side): the filter, the link FSM and the local receive
  buffer.
- **SAR1** (segmentation): segmentation buffer, segmenter, header/HEC
  generator, cell FIFO and driver.
- **SAR2** (reassembly): receiver, reassembler and the FIFO of rebuilt
  frames.
- **FCS2** (FC transmit side): the sender and the local transmit buffer.

`fcs_atm_iwu` wires one unit together. Two of these back to back through an
ATM connection join two workstations.

### Filtering

The filter reads the decoded 16-bit words from the Fibre Channel receiver. A
flag `k` marks a word whose upper byte is K28.5; that word starts a
4-character ordered set. The filter does four things:

- **Reports ordered sets.** It classifies each ordered set on its second word
  (SOF, EOF, Idle, R_RDY, NOS, OLS, LR, LRR) and reports it to the link FSM.
- **Routes frames.** It sends each frame either to the segmentation buffer
  or to the local receive buffer. A frame whose destination address is the
  fabric port's own address (`IWU_DID`, default FFFFFE) goes to the local
  buffer. A login is such a frame.
  - To make this choice it must first see the D_ID, which is in the first
    two header words. So words pass through a 3-word delay line.
  - Local frames are committed at their EOF and raise `cu_irq`.
- **Tags words.** Words bound for the segmenter carry five flags: SOF,
  SOFc1, P_RJT, EOF, EOFdt. The segmenter needs nothing else to choose cell
  types.
- **Requests R_RDY.** It asks the sender for one R_RDY after each frame that
  needs buffer-to-buffer credit back. That is every frame opened with a SOF
  other than SOFi1/SOFn1 (so not inside a Class 1 connection), and every
  frame closed by EOFdt.

A primitive signal or sequence arriving inside a frame means the EOF was
lost, so the frame ends there.

### Segmentation buffer: FIFO or store and forward

`seg_buffer` holds 2^21 tagged words (4 Mbyte of frame data). It has two
disciplines:

- **`STORE_FWD = 0` (FIFO, the default).** The segmenter may read a word as
  soon as it is written. Segmentation runs on the fly and the ATM link never
  idles while frames are queued.
- **`STORE_FWD = 1` (store and forward).** Reading is held until
  `SF_FRAMES` whole frames are stored (1985 by default, a 4 Mbyte block of
  maximum-length frames). The buffer then drains completely before it waits
  again. This is the simpler static-RAM arrangement.

Store and forward costs throughput, because receiving a block and sending it
no longer overlap. For blocks of maximum-length frames the expected rate is
2112 × 8 × N / ((1.5 × 1074 + 2491) × N) clocks ≈ **80 Mbit/s**, against
132 Mbit/s for the FIFO. `tb_iwu_throughput` measures both: 131.7 and
80.0 Mbit/s for a 32-frame block, and 131.8 Mbit/s for a 1985-frame
(4 Mbyte) block.

For the 4 Mbyte block in FIFO mode, the buffer's peak fill is about
0.75 Mword, well inside its 2 Mword. In store-and-forward mode the same block
does not fit. 1985 frames of 1074 words, delimiters and headers included, is
2,131,890 words, 1.6 % more than the buffer holds. By the same count, a
store-and-forward block of up to 1952 maximum-length frames would fit.

### Segmenter

`fap_segmenter` copies each frame word by word into 23-word payloads and sets
the FAP header as described in [The FAP cell](#the-fap-cell). Unused payload
words are zero.

The segmenter needs a timeout because the FIFO discipline lets a frame start
before its end has arrived, and the end may never come. A frame is closed
with an EOFa (abort) delimiter made by the segmenter itself, and `seg_abort`
pulses, in two cases:

- no word has arrived for `SEG_TIMEOUT` clocks (256) since the frame
  started;
- a new SOF arrives first.

The far end then delivers an aborted frame that the workstation discards.
The reassembler keeps no half-built frame.

A Link-Reset notification cell is inserted between frames as soon as the
link FSM asks for one.

### Reassembler

`fap_reassembler` accepts the cells `atm_receiver` hands over:

- The receiver collects 53 bytes per cell.
- It drops a cell whose HEC is wrong, with no correction attempted.
- It drops a cell of another VPI/VCI.

The reassembler writes frame words into a frame FIFO and commits the frame
with its last word, so the sender never starts a frame it cannot finish.

A frame is discarded in four cases:

- on a cell-counter gap;
- when a new first cell arrives while the frame is open (missing EOF);
- when the reassembly timeout expires;
- when the frame does not fit in the FIFO.

The timeout runs from the first cell. It is 1.5 times the time a
maximum-length frame takes when its cells arrive back to back:
1.5 × 47 × 53 = **3737 clocks** (192 µs at 19.44 MHz). A ratio of 1.5 is
enough to lose no frame behind one ATM switch. The minimum reassembly time
published with that result is 122 ms, but one frame at line rate needs
128 µs; this design bases its timeout on the 128 µs.

### Sender

Every word the Fibre Channel transmitter sends comes from `fcs_sender`. At
each ordered-set boundary it picks one thing to send, in this order:

1. the primitive sequence the link FSM asks for, while the link is not
   active;
2. a pending R_RDY;
3. a whole frame, once at least 6 ordered sets have gone out since the last
   frame. Frames from the control unit's transmit buffer go before
   reassembled ones.
4. otherwise an Idle.

### Link recovery

`link_recovery_fsm` is a reduced form of the Fibre Channel link-recovery
state machine:

- States: active, LR transmit, LR receive, LRR receive, link failure and
  offline.
- A sequence counts after 3 identical ordered sets.

A Link Reset from the workstation does two things:

- **Locally.** The unit answers with LRR and returns to active on Idles.
- **Across the network.** The FSM pulses `lr_rx`, and the segmenter sends a
  Link-Reset cell. When the far unit receives that cell, it starts a Link
  Reset towards its own workstation, which answers LRR as usual.

A received Link Reset therefore travels end to end, the way it would inside
one fabric. `cu_lr_req` and `cu_offline` let the control unit start a reset
or take the link offline.

### Control-unit ports

The control unit is a processor board that handles login and sets up the
connection. It does not exist as RTL here. It reaches the unit through plain
ports:

- **Receiving.** `cu_irq` pulses when a frame lands in the local receive
  buffer. `cu_rx_*` reads that buffer word by word; `last` marks each frame's
  end.
- **Transmitting.** `cu_tx_*` writes frames (for example an ACK and the
  login accept) into the transmit buffer. `cu_tx_commit` releases each frame
  to the sender.
- **Connection set-up.** `cfg_tx_vpi/vci` and `cfg_rx_vpi/vci` hold the
  connection chosen at set-up.
- **Events.** `ev` is a struct of one-clock event pulses (frames, cells,
  losses, timeouts, HEC errors, link resets).
- **Performance counters.** `iwu_monitor` counts each kind of event in a
  32-bit counter that stops at its maximum. The control unit puts the
  event's bit number in `iwu_events_t` on `mon_addr` and reads the count on
  `mon_data` one clock later. `mon_clear` zeroes all counters. The cell and
  frame losses found through the FAP counters are among the counted events.

## Clock, rates and interfaces

Everything runs on one clock, taken to be the 19.44 MHz ATM byte clock:

- **ATM side.** 53-byte cells, 8 bits per clock, with a start-of-cell flag
  (`atm_tx_soc`, `atm_rx_soc`). `atm_tx_en` lets the physical layer pace the
  transmit side.
- **Fibre Channel side.** Decoded 16-bit words with a K28.5 flag, one per
  clock in which `rx_valid` or `tx_en` is high. The line rate of
  13.28 Mword/s is about two words in three clocks, and the testbenches use
  that strobe.
- **Reset.** Asynchronous, active low (`rst_n`).
- **Outside the RTL.** Serialisers, 8b/10b coding, the optical module and
  open-fibre control sit outside and deliver decoded words. The CRC is left
  to the end stations.

Parameters of `fcs_atm_iwu` and their defaults:

| parameter | default | meaning |
|---|---|---|
| `SEG_DEPTH` | 2097152 | segmentation buffer, 16-bit words (4 Mbyte) |
| `STORE_FWD` | 0 | 0 = FIFO, 1 = store and forward |
| `SF_FRAMES` | 1985 | frames per store-and-forward block |
| `SEG_TIMEOUT` | 256 | clocks without a word before a frame is closed with EOFa |
| `REASM_TIMEOUT` | 3737 | reassembly timeout in clocks (1.5 × 47 × 53) |
| `LOC_DEPTH`, `REM_DEPTH` | 2048 | local buffers and reassembly FIFO, words (one maximum frame is 1074) |
| `CELL_FIFO` | 4 | cells between segmenter and driver |
| `IWU_DID` | FFFFFE | address of the unit itself |

## What is this design's own choice

These points are not fixed by the cell format and the block structure above.
They were chosen here:

- **Word classification.** Decoded 16-bit words with a K28.5 flag are the
  entry point. Ordered sets are classified from their third and fourth
  characters.
- **Split EOF and EOF pointer.** The split-EOF rule (pointer 22, then a cell
  carrying word 0 only) and the EOF-pointer value 31 for "no EOF".
- **Cell type priority.** The priority among the special first-cell types.
- **Single-cell frames.** A frame that fits in one cell is sent as `PT2=0`
  with SI 001, 100, 101 or 110. It is not marked as a last cell.
- **Local frames.** What counts as a local frame (D_ID = FFFFFE), and the
  R_RDY rule.
- **Segmentation timeout.** Its value and the EOFa closing.
- **Link FSM.** The states and transitions, and the threshold of three
  ordered sets.
- **Sizes.** The sizes of the local buffers and of the cell FIFO.
- **Error handling.** Dropping cells with a bad HEC rather than correcting
  them.
- **Sender.** Its priorities and the 6-ordered-set gap.
- **Performance monitoring.** The counter bank: which events, the width,
  saturation and the read port.

## Verification

Each module has a self-checking testbench in `tb/`. Each one:

- compares outputs against values worked out independently of the RTL
  (`tb_fc_pkg` builds frames and computes the expected cells and HEC on its
  own);
- uses a watchdog;
- prints `TB_RESULT checks=<n> failures=<n>` at the end.

The testbenches at the system level are these:

- **`tb_fcs_atm_iwu`** runs two units at default parameters back to back.
  - Around them are two workstation models, a control-unit model on one
    side, and an ATM link model that can drop, corrupt or delay chosen
    cells.
  - Traffic covers a login answered by the control unit, frames of every
    cell type including a maximum-length frame, and an ACK with EOFdt in
    each direction. It checks that the 47 cells of the maximum-length frame
    leave back to back: 46 × 53 clocks from the first start of cell to the
    last.
  - Fault cases: cell loss, frame loss, missing EOF, reassembly timeout, a
    HEC error, a frame whose EOF never comes, and a Link Reset carried to
    the far workstation.
  - It checks every delivered frame word for word, and the exact number of
    R_RDYs each side sends. Any mechanism that never occurred counts as a
    failure.
  - At the end it reads both units' performance counters and compares them
    with the event pulses and with the cells the link model saw.
- **`tb_iwu_throughput`** measures FIFO against store-and-forward throughput
  for blocks of 32 and 1985 maximum-length frames, as described above. It
  runs about five million clocks.

To run one testbench with Verilator 5 from the top of the tree:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fap_pkg.sv tb/tb_fc_pkg.sv rtl/*.sv tb/tb_fcs_atm_iwu.sv \
  --top-module tb_fcs_atm_iwu -o sim
./obj_dir/sim
```

Change the testbench file and `--top-module` for the others. Add
`-Wno-fatal` if warnings should not stop the build. `tb_fap_pkg` needs only
`rtl/fap_pkg.sv` and `tb/tb_fc_pkg.sv`.

## Files

| file | block |
|---|---|
| `rtl/fap_pkg.sv` | shared types, ordered-set codes, FAP header, SI codes, HEC function |
| `rtl/fcs_filter.sv` | filtering |
| `rtl/link_recovery_fsm.sv` | primitive-sequence FSM |
| `rtl/frame_fifo.sv` | whole-frame FIFO with commit/discard (local buffers, reassembly FIFO) |
| `rtl/seg_buffer.sv` | 4 Mbyte segmentation buffer, FIFO or store and forward |
| `rtl/fap_segmenter.sv` | segmenter |
| `rtl/atm_hdr_gen.sv` | ATM header and HEC |
| `rtl/sync_fifo.sv` | small FIFO (cells between segmenter and driver) |
| `rtl/atm_driver.sv` | ATM transmit interface |
| `rtl/atm_receiver.sv` | ATM receive interface, HEC and VPI/VCI check |
| `rtl/fap_reassembler.sv` | reassembler |
| `rtl/fcs_sender.sv` | FC transmit word selection |
| `rtl/iwu_monitor.sv` | performance counters |
| `rtl/fcs_atm_iwu.sv` | one complete unit (top) |
| `tb/tb_fc_pkg.sv` | frame builder and reference segmentation for the testbenches |
| `tb/tb_*.sv` | one testbench per module, plus the two system-level ones |
