# BusyBox busy logic

A particle-physics detector cannot take a new trigger while its front-end electronics
(FEE) are still full of earlier events. The BusyBox raises a single BUSY line to the
central trigger system whenever that could happen. It combines three pieces of
knowledge:

- how many FEE event buffers are taken, counted from the trigger sequence;
- a fixed dead time after each L0 trigger;
- which events every readout receiver card (D-RORC) has actually shipped.

The last point is the unusual part. The BusyBox does not trust the trigger count
alone. For each triggered event it asks every D-RORC over a dedicated serial link
which event it has received last. A buffer is given back only when all enabled
D-RORCs answer with that event's ID.

This repository holds the logic of one BusyBox FPGA, `busylogic_top`, with up to 120
serial channels, in synthesizable SystemVerilog, plus self-checking testbenches for
every module.

## Clocks and reset

- `clock_b`, 40 MHz: the LHC bunch-crossing clock. The control side runs on it:
  registers, event verification and busy logic.
- `clock_a`, 200 MHz: derived from `clock_b`. It runs the serial links, at five
  clock_a cycles per bit (40 Mbit/s).
- `areset`: asynchronous and active high. It returns every register to its idle value.
  BUSY is high during reset.

The two clocks are related, but the design does not rely on that. Every crossing goes
through a two-flop synchroniser, a toggle handshake, or the Gray-coded dual-clock FIFO
`drorc_inbox_buffer`.

## The serial link

Each D-RORC has one line in each direction. A word travels in a 20-bit frame, sent MSB
first:

| bits | start 1 | start 2 | data | parity | stop |
|------|---------|---------|------|--------|------|
| value | 0 | 1 | 16 bits, MSB first | even parity of data | 0 |

The line idles high.

**Sending** (`serial_encoder`, `piso`). The frame is loaded into a shift register and
each bit is held for 5 clock_a cycles.

**Receiving** (`serial_decoder`).
- The line is synchronised, then every sample goes into a 98-entry shift register.
  That is one frame without its first and last sample.
- A frame is taken when two conditions hold at once:
  - the window shows four low samples followed by four high ones, at the boundary
    between start 1 and start 2;
  - the three middle samples of the stop bit are low.
- Each bit is the majority of its three middle samples, so one bad sample per bit is
  tolerated.
- After a capture the register is refilled with ones. This stops data bits of the
  consumed frame from looking like a new start pattern.

**Commands** (BusyBox to D-RORC) are one word, built by `command_word` in `busybox_pkg`:

| 15:12 | 11:8 | 7:4 | 3:0 |
|-------|------|-----|-----|
| command | request ID | Hamming check bits of command | Hamming check bits of request ID |

The four command codes are:

| Code | Meaning |
|------|---------|
| 0100 | request event ID |
| 0101 | resend last |
| 0110 | force pop |
| 0111 | force request ID |

The Hamming check bits are an extended (8,4) code per nibble: P1 = D1^D2^D4,
P2 = D1^D3^D4, P3 = D2^D3^D4, and P4 is the parity of the other seven bits.

**Replies** (D-RORC to BusyBox) are 48 bits, sent as three words, most significant
word first:

| 47:44 | 43:32 | 31:8 | 7:0 |
|-------|-------|------|-----|
| request ID | bunch-crossing ID | orbit ID | D-RORC ID |

`single_channel_receiver` puts the three words together. It drops a reply that has a
parity error, or whose words are more than `WORD_TIMEOUT` clock_a cycles apart. When
that happens, the next word starts a new reply.

## Receiving from 120 channels

`multi_channel_receiver` has three levels:

1. One `single_channel_receiver` per channel. Each holds one finished reply. A newer
   reply overwrites an older one that was not collected.
2. Eight `branch_controller`s. Each scans 15 receivers one per cycle and buffers one
   reply.
3. One `backbone_controller`. It scans the branches and sends out each reply with a
   single-cycle `write_req` and its channel number: channel = branch × 15 + index.

A channel whose `CHEN` bit is low is kept idle.

Each reply goes to two places:

- **RX memory** (`rx_memory_module`): 1024 entries, each holding the reply plus its
  channel number. It is written through `rx_mem_filter`, and the write pointer wraps
  around. The filter stores a reply only if its channel number matches a pattern on
  the bits chosen by a mask. A mask of 0 stores everything.
- **D-RORC inbox** (`drorc_inbox_buffer`): a 128-deep dual-clock FIFO into the
  `clock_b` domain, read by the event verification.

## Event verification

`event_validator` holds the central loop. It is made of four parts:

- **`trigger_eventid_queue`**
  - `eventid_extractor` reads each 9-word Common Data Header (CDH) record from the
    trigger receiver's FIFO.
  - It keeps the bunch-crossing ID (header word 1, bits 11:0) and the orbit ID
    (header word 2, bits 23:0).
  - `eventid_fifo` queues these IDs. It is 8 deep, which is the largest FEE buffer
    count.
- **`eventid_control`**: the state machine. For each queued event ID it:
  1. clears the match flags and steps the 4-bit request ID;
  2. sends "request event ID" to every enabled channel;
  3. reads replies from the inbox until all enabled channels have matched;
  4. if the re-request timeout (`req_timeout`, in clock_b cycles) runs out first,
     sends the same request again, and only to the channels that have not matched. It
     counts these retries. Because the request ID is unchanged, a D-RORC that already
     answered simply answers again.
  5. when everything has matched, pulses `event_valid_out` and pops the ID.
- **`event_processor`**: keeps one EIDOK flag per channel.
  - A reply sets its channel's flag only when the request ID, the bunch-crossing ID and
    the orbit ID all match.
  - `tx_mask` is the set of enabled channels that have not matched yet.
  - The event is valid when `tx_mask` is empty.
- **Halt and force**
  - Setting `halt` parks the state machine: no more re-requests are sent.
  - Writing `force` while it is halted accepts the current event as if it had been
    verified.

The transmit side is `transmitter_module`. It takes requests from two sources:

- the event verification, with a channel mask;
- the DCS register 0x0001, with one channel or a broadcast.

The DCS source wins if both are pending. A 120-bit mask selects the channels, and one
shared encoder drives all selected lines with the same frame.

## Busy

`busy_controller` raises `busy_out` if any of these holds:

1. The TTCrx is not ready.
2. The L0 dead time is running. It lasts `trig_timeout` × `TICK_CYCLES` clock_b cycles;
   the default of 400 cycles gives 10 µs steps.
3. All FEE buffers are taken.
4. The trigger receiver is busy.

The buffer count works like this:

- It goes up on every L1a trigger (`BUFFER_ON_L1 = 1`, as for the TPC) or on every L0
  trigger (`BUFFER_ON_L1 = 0`).
- It goes down on L2 reject, on L2 timeout, and when an event is verified.
- L2 accept leaves the count alone. That buffer is only freed by verification.

`busy_time` counts the clock_b cycles that BUSY is high.

## Register interface

`dcs_arbit_addr_dec` turns the DCS board's asynchronous strobe/acknowledge bus into a
one-cycle access on an internal register port.

**Address fields:**

| Bits | Selects |
|------|---------|
| 15 | FPGA. Cycles for the other FPGA are ignored and not acknowledged. |
| 14:12 | module |
| 11:0 | register |

The modules are:

| Module | Block |
|--------|-------|
| 0 | transmitter |
| 1 | RX memory |
| 2 | control/status |
| 3 | trigger receiver, brought out as ports |

**Handshake:**

- `dcs_ack_n` goes low once write data has been taken, or read data is on
  `dcs_data_out`.
- It stays low until the strobe is released.
- The strobe must stay high for at least three clock_b cycles between cycles.

**Register map (`ctrl_regs`, module 2; addresses are full DCS addresses):**

| Address | Access | Content |
|---------|--------|---------|
| 0x0001 | W | transmit: bits 7:0 command byte {request ID, command}, bits 15:8 channel (>= channel count: all) |
| 0x1000 + 4·entry + bank | R | RX memory: bank 0 reply 47:32, 1 reply 31:16, 2 reply 15:0, 3 channel in 15:8 |
| 0x2000 | R | RX memory write pointer |
| 0x2001 | R | event IDs waiting |
| 0x2002–0x2004 | R | event ID being verified, {bunch-crossing 12 bits, orbit 24 bits} split high to low (bits 35:32, 31:16, 15:0) |
| 0x2005–0x2007 | R | newest event ID, same layout |
| 0x2008 | RW | L0 dead time in 10 µs steps (reset 10 = 100 µs) |
| 0x2009 | RW | FEE buffers (reset 4) |
| 0x200A | RW | halt verification |
| 0x200B | W | force: accept the halted event |
| 0x200C | RW | re-request timeout in clock_b cycles (reset 1000) |
| 0x200D | R | current request ID |
| 0x200E | R | retries for the current event |
| 0x2010 / 0x2011 | R | busy time, bits 31:16 / bits 15:0 |
| 0x2012 | RW | RX memory filter: 7:0 pattern, 15:8 mask (1 = compare) |
| 0x2015 | R | firmware version (0x0101) |
| 0x2100 + channel | RW | bit 0 CHEN (channel enable, reset 0), bit 1 EIDOK (read only) |

## Where this design departs from its source, or fills gaps

- **Hamming check bits.** The source design says the command and request ID are
  Hamming coded, and also that the low byte of the command word is unused. Here the
  check bits go in that low byte.
- **L0 dead time.** Register 0x2008 is read as 10 µs units. One description of it says
  clock cycles; the 10 µs reading, with its 100 µs example, was followed. The 32-bit
  dead-time offset at 0x2013/0x2014 is not built, because its relation to 0x2008 is not
  defined.
- **L2 timeout** frees a buffer, the same as an L2 reject. The source lists only reject
  and verification as freeing a buffer, but also says a timeout overwrites the FEE buffers.
- **Smaller differences.**
  - The event ID count at 0x2001 is 4 bits wide, enough for the 8-deep queue. The source
    gives 9 bits.
  - A transmit written to 0x0001 goes to the selected channel whether or not its CHEN bit
    is set. Only requests from the event verification are limited to enabled channels.
  - `eventid_control` has no channel-count input, because the channel set comes from CHEN.
- **Choices made in this design.** These are not given by the source:
  - even parity;
  - MSB-first bit order;
  - inbox depth 128 and event ID queue depth 8;
  - word timeout of 200 cycles;
  - channel numbering branch × 15 + index;
  - register read latency and DCS handshake timing;
  - the CDH read timing (data one cycle after `read_enable`, with `DAQ_read_counter`
    giving the word index);
  - the state sequence of `eventid_control`.
- **Not included:**
  - the trigger receiver, which decodes the TTC stream into trigger pulses and CDH
    records. Its ports are on `busylogic_top`.
  - the FPGA wrappers: differential I/O buffers, clock manager, DCS pad drivers, and the
    OR of the two FPGAs' BUSY lines.
  - the D-RORC firmware.

  A TPC needs 216 channels. On the original board that means two `busylogic_top`
  instances (120 + 96 channels) with their BUSY lines ORed together. Smaller detectors
  (20, 24 or 3 channels) fit in one instance.

## Simulation

Every module `X` has a self-checking testbench `tb/tb_X.sv`. Each one:

- prints `TB_RESULT checks=N failures=M` and finishes;
- has a watchdog;
- checks against independent models, not against the RTL.

Two behavioural models live in `tb/`:

- `drorc_model`: a D-RORC link end. It decodes commands, keeps a queue of event IDs
  and answers requests or resends.
- `cdh_fifo_model`: the trigger receiver's CDH FIFO.

`tb_busylogic_top` runs the whole FPGA at its default size (120 channels) through DCS
configuration and a stream of triggers. The D-RORC models answer, some late and some
muted. It counts how often each mechanism happened, and a mechanism that never happened
counts as a failure. The mechanisms are:

- each busy cause;
- verified events;
- L2 reject and L2 timeout;
- re-requests;
- force;
- single and broadcast DCS transmits;
- RX memory and filter;
- the trigger-receiver register port;
- disabled channels;
- busy time.

The package must be compiled first. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_busylogic_top \
  rtl/busybox_pkg.sv $(ls rtl/*.sv | grep -v busybox_pkg) \
  tb/drorc_model.sv tb/cdh_fifo_model.sv tb/tb_busylogic_top.sv
./obj_dir/Vtb_busylogic_top
```

Replace the top module and the last file to run another testbench. Several testbenches
override parameters to keep the run short. For example, `tb_busy_controller` uses a
4-cycle dead-time step.

The same scenario runs at other channel counts. `tb_busylogic_96`, `tb_busylogic_24` and
`tb_busylogic_20` size the design for the second TPC FPGA, the FMD and the PHOS. Each
instantiates `tb_busylogic_sized`, the same scenario with the channel count as a
parameter, so compile `tb/tb_busylogic_sized.sv` along with it. These benches count buffers on L1a, as the TPC does. The L0-buffering mode
of the smaller detectors is checked at block level by `tb_busy_controller_l0`. The
3-channel configuration is not simulated, because the scenario needs at least eight
channels.
