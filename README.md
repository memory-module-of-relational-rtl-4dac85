# Controller for a bubble memory module with an on-chip buffer loop

This is synthesizable SystemVerilog for the controller of a bulk memory module built from
magnetic bubble chips that have a two-level storage hierarchy, as used in the data-stream
generator of the hash-based relational algebra machine GRACE. The module stores records
tagged with a 12-bit key (a hash bucket number or a logical address) and reads them back
*bucket by bucket*: the host names a list of keys, and the controller streams out all
records of the first key, then all of the second, and so on, in whatever physical order
is fastest.

The bubbles themselves are not here: the chips, their drive coils and sense amplifiers are
analog parts. The top level brings out the signals a bubble memory unit needs (field
rotation timing, gate pulses, 32 generator bits, 32 detector bits), and `tb/` contains a
behavioural model of that unit so the whole design can be simulated end to end.

## The chip and why the controller looks the way it does

Each subchip has many minor loops (140 are used), and every minor loop has two levels:

* a short **buffer loop** (128 bits, i.e. 64 record slots) that touches the **major line**
  through a block replicate/transfer gate (**BR/T gate**), and
* a long **main loop** (4092 bits, 2046 slots) that only touches its buffer loop, through
  a **swap gate** that exchanges the bit in the buffer loop with the bit in the main loop.

All loops of all 32 subchips (16 chips x 2) turn in lock-step, one bit position per field
rotation. A record occupies the same two adjacent bit positions (a **slot**) in every loop it
uses, so one slot holds `2 x loops x 32` bits, minus the bits of defective loops. One gate
pulse moves or swaps a whole record. The swap gate is the same for every loop, so swapping
exchanges whole records between the two levels.

Reading a record means transferring it from the buffer loop onto the major line, where it
travels to the detector. Writing means generating it on the major line and transferring it
into an empty buffer slot. The main loop is only reachable through the buffer loop.
Three ideas make set-oriented access fast:

1. **Look-ahead swapping.** While one record streams out, every slot that passes the swap
   gate is examined. If the main-loop record there belongs to a bucket that is needed
   sooner than the buffer record, the two are swapped. The buffer loop then fills with the
   records about to be read, and they can leave back to back.
2. **Contiguous transfer.** The next record may go onto the major line as soon as the
   previous one has cleared the stretch of major line over the used loops (RL rotations).
   It does not have to wait until the previous one reaches the detector. With short
   records several are on the line at once.
3. **Dynamic placement.** A record being written can go to any empty place. The controller
   knows which buffer slot the new record will reach, and also which main-loop slots that
   buffer slot will meet at the swap gate before then (the **shadows**). It starts
   generation only if at least one of them is free.

None of this works with fixed addresses. The controller keeps a **record descriptor memory
(RDM)**: one 16-bit entry per buffer slot (64) and per main-loop slot (2048 words, 2046
used). Each entry says whether the slot is occupied, which key it holds, and whether the
record was already copied out in this read. The address registers of the RDM count with the
rotation, so that at every slot time they point at the slots that are under the gates.

## Structure

```
grace_mm_top
 |- central_control_unit  command decode, rotation/slot timing, bucket sequencing
 |- interface_unit        host byte queues (write data, write descriptors, read data)
 |   '- sync_fifo x3
 |- access_control_unit   decides gate and generator actions, slot by slot
 |   |- rdm_control       RDM address registers and per-slot RAM sequence
 |   |   '- rdm_ram x2    buffer map (64 x 16), main map (2048 x 16)
 |   |- swap_ctrl         16 search operands, serial priority compare, swap decision
 |   |- brt_ctrl          comparand, transfer-out / copy-out / transfer-in decision
 |   |- gen_ctrl          generation condition from the shadows
 |   |- major_line_delay  record length counters, read and write delay lines
 |   |- sync_fifo         descriptors of records between generator and buffer loop
 |   '- gate_pulse_gen x2 swap and BR/T gate pulse timing
 '- data_control_unit     record bytes <-> 32 bits per rotation, defect skipping
     |- defect_rom        good/bad map of every loop of every subchip
     |- defect_mgmt       fetches one 32-bit good-loop mask per rotation
     |- write_conv        bytes -> generator words
     '- read_conv         detector words -> bytes
```

`grace_mm_pkg` holds the geometry constants, the RDM entry struct, and the mode, gate
operation and command enums.

## Timing: rotations and slots

`central_control_unit` divides the clock by `ROT_CYCLES` (64) to get one field rotation.
`field_tick` is the last clock of each rotation, and every second one is also a
`slot_tick`. With a 125 kHz rotating field this means an 8 MHz clock. `ROT_CYCLES` must stay
at least about 40, because the serial data conversion needs 32+ clocks per rotation.

All gate decisions are made once per slot, in a fixed sequence that `rdm_control` starts
after each `slot_tick`:

1. It reads the RDM entries under the BR/T gate (TB), and at the swap gate on both levels
   (WB, WM).
2. `swap_ctrl` compares both records with the 16 search operands, one operand per clock,
   in NOPS+1 = 17 clocks. `brt_ctrl` decides in the same time. The gate pulses are then
   issued after the programmed phase, with the programmed width.
3. The new TB, WB and WM entries are written back.
4. It reads the shadow entries SB, SM0, SM1 and SM2, and `gen_ctrl` decides whether
   generation may start.

The sequence uses about 30 clocks of the 128 in a slot. The bubble side applies a pulse at
the end of the rotation in which it arrives.

### Address registers

| register | points at | moves |
|---|---|---|
| AR0 | TB, buffer slot under the BR/T gate | starts BL0/2 = 20 slots behind WB |
| AR1 | WB and WM, slot pair at the swap gate | reset to 0 |
| AR2 | SB and SM0, where a record generated now will land | `WM + loops`, loaded by GEOMETRY |
| AR3 | SM1 = SM0 - 64 | reached one buffer revolution later |
| AR4 | SM2 = SM0 - 128 | reached two buffer revolutions later |

Main-loop addresses count modulo `ML` = 2046 and buffer addresses modulo 64.

### Generation condition

A record of length RL rotations (RL = 2 x loops) may start when

```
(!SB && !SJ) || !SM0 || (!SM1 && RL >= BL) || (!SM2 && RL >= 2*BL)
```

SB and SM0..SM2 are the "occupied" bits of the shadow entries. BL = 128 is the buffer loop
length. SJ says that a record already on the major line will be transferred into the same
buffer slot. A record that finds SB occupied is not lost: the swap-gate rule for writing
(swap when the buffer slot is occupied and the main slot is empty) moves a buffer record
down into a free main slot before the new one arrives.

### Major line bookkeeping (`major_line_delay`)

* **Read enable.** After a transfer-out, the next one is held back for RL rotations.
* **Read delay line.** This is a DL-stage shift register (`DL` = 300 rotations from the
  leftmost loop to the detector), clocked by the rotation. It marks where each record is.
  It raises `ds` when a record's first bit reaches the detector and `de` when its last bit
  does.
* **Write enable.** While RL rotations of generation are running, no new generation may
  start.
* **Write delay line.** This is a GL-stage shift register (GL = 40 from the generator to the
  leftmost loop). It raises `ti`, so the BR/T gate transfers the new record in GL+RL
  rotations after generation began. It also gives SJ for records that are still in flight.

## Data path and defective loops

A record's bit stream is spread over the 32 subchips. At each rotation the 32 generators
receive one bit each (`gen_word[i]` goes to subchip i), and 2 x loops rotations carry one
record. The bit order and the defect handling are:

* **Subchip order.** Bits 0..15 are the right subchips of chips 0..15. Bits 16..31 are the
  left subchips.
* **Skipping bad loops.** A loop marked bad in the defect map gets a 0 and is skipped. The
  record's bits move on to the next good loop.
* **Bit order within a byte.** Bytes are taken least significant bit first. Bit k of the
  record stream is bit k%8 of byte k/8.
* **Padding.** After the record's bytes, the remaining positions are filled with zeros.

**Defect map.** `defect_rom` stores the map 8 bits per word. For loop N (1-based), addresses
8N..8N-3 describe the first row and 8N-4..8N-7 the second. Each group of four bytes covers
subchips 0..31, most significant bit first, and 1 means good. `defect_mgmt` walks the table
downward from 8 x loops, one 32-bit mask per rotation. `write_conv` prepares each generator
word one rotation ahead, with a two-word look-ahead so generation can start at any
slot. `read_conv` loads the detector word, shifts it out serially, keeps the bits of good
loops, and delivers exactly `rec_bytes` bytes per record.

The ROM powers up all ones (no defects) and is loaded through `rom_we/rom_waddr/rom_wdata`.

## Using it

### Host interface

| command (`cmd`) | `arg` | effect |
|---|---|---|
| GEOMETRY (1) | [7:0] loops per record, [23:8] bytes per record | set record format, reload shadow registers |
| OPERAND (2) | [3:0] index, [15:4] key, [31:16] number of records | load one search operand / bucket |
| READ (3) | [4:0] number of operands, [5] replicate | stream out the buckets in operand order |
| WRITE (4) | [15:0] number of records | store records from the write queues |
| CLEAR (5) | [0] 1 = only reset the "copied" marks | empty the RDMs (or re-arm replicated records) |
| ABORT (6) | - | back to idle |
| PULSE (7) | [7:0] phase, [15:8] width in clocks | gate pulse timing (default 4 / 8) |

* **Commands.** A command is accepted only while `busy` is low, except ABORT.
* **Writing.** For each record, push `bytes` bytes on `h_wr_*` and one 14-bit descriptor
  `{tag, key}` on `h_desc_*`.
* **Reading.** Read data appears on `h_rd_*`, a record after a record, with the buckets in
  operand order. Records within a bucket come in any order.
* **Replicate.** A read with replicate set copies records out and leaves them stored. A
  later CLEAR with arg 1 makes them readable again.
* **Power-up.** Issue CLEAR (arg 0) once after power-up. The RDM RAMs are not reset.

The bit ordering of `gen_word`/`det` and the slot/rotation ticks are described above. A
pulse on `sw_pulse` swaps the slot at the swap gate. A pulse on `brt_pulse` acts on the slot
at the BR/T gate as given by `brt_op` (1 transfer out, 2 replicate out, 3 transfer in).

### Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -Itb rtl/grace_mm_pkg.sv tb/tb_grace_mm_top.sv \
          --top-module tb_grace_mm_top -o sim && ./obj_dir/sim
```

For the unit testbenches, replace the file and the top name (`-Irtl` is enough).

**End-to-end test.** `tb_grace_mm_top` runs the controller at its default sizes against
`tb/bubble_unit_model.sv` for about 24,000 rotations (a few seconds). It does the following:

* programs a defect map;
* writes 24 records of 3 loops;
* reads three buckets in a different order, copies a fourth one out with replicate, clears
  the marks and reads it again;
* then writes and reads back records of 50 and 70 loops.

It checks every byte, checks the GL+RL transfer-in latency, and checks that nothing collides
in the buffer loop. It counts each mechanism and fails if one never happens: write and read
swaps, shadow-based placement, SJ, held transfers, several records on the line,
defect-loop skipping, bucket changes, and replicate. Pass `+wd=N` to change its watchdog
(in clocks).

**Near-capacity test.** `tb_grace_mm_dense` runs the same test with the main loop cut to 126
slots. 170 one-loop records fill most of the 190 slots, so generation often has to wait for a
free shadow. All records are then read back in four buckets.

The unit testbenches shrink the main map only where that keeps the run short:
`tb_rdm_control` (250 slots) and `tb_access_control_unit` (254 slots). They also use
shorter rotations.

## Where this design departs from, or adds to, the original description

* **Main loop length.** The main loop has 2046 slots, but the RDM for it has 2048 words.
  Main addresses therefore count modulo 2046, and the buffer half of each swap-point register
  is a separate modulo-64 counter instead of the low bits of the main address.
* **Counted by rotation.** The delay lines and record-length counters are shift registers
  and counters clocked by the rotation. The original builds them from RAM and counters.
* **DL.** The detector distance DL (300) is an assumption. Set it to the real chip's value.
* **SJ ranges.** SJ is taken at the end of generation, so its ranges are
  BL-GL < RL <= BL and 2BL-GL < RL <= 2BL.
* **Descriptor queue.** The descriptor of each record in flight waits in a queue until its
  transfer-in. Only then is the RDM entry written. The queue has 32 entries: one-loop records
  can start every slot, so up to about 22 are in flight. Generation pauses while it is full.
* **Own choices.** These are not given by the original description:
  - the priority rule: the first matching operand wins, and equal priority means no swap;
  - the command set, host queues and their depths;
  - the bit order within bytes;
  - the pulse defaults;
  - the programmable defect ROM.
* **Not built.** The bubble chips, drivers and sense amplifiers are analog. The link to a
  monitoring PC and the rest of GRACE are not described in enough detail to build.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ROT_CYCLES` | 64 | clocks per field rotation |
| `NB` | 64 | buffer-loop slots (RDM words) |
| `NM` | 2048 | main-loop RDM words |
| `ML` | 2046 | main-loop slots actually used (<= NM) |
| `DL` | 300 | rotations from the leftmost loop to the detector |
| `FIFO_DEPTH` | 2048 | bytes in each host data queue |

BL = 128, BL0 = GL = 40, 16 search operands and 12-bit keys are package constants.
