# AGATA digitiser control bus

An AGATA digitiser box has two modules. Module 1 ("Core/Segment") holds
three Virtex ADC FPGAs and the main-board control registers. Module 2
("Segment") holds four Virtex ADC FPGAs and its own registers. Each module has
a Control Spartan FPGA that receives commands from a host and carries them
out. The host either writes registers, streams bulk data (EEPROM images,
look-up tables) into a Virtex, or reads data back.

Every hop inside the box uses the same simple serial link: one CLOCK, one
DATA and one FRAME wire in each direction. This covers Spartan to each Virtex,
and Core Spartan to Segment Spartan over the backplane. One extra trick makes
the link flow-controlled. While the far end is sending, the FRAME wire
pointing back towards it becomes a "please pause" line. The sender checks it
at each byte boundary. This lets a slow Virtex take a long EEPROM load at its
own pace without any buffer of the full size.

This repository is synthesizable SystemVerilog for that control bus:
- the host-stream parser and router (Control Spartan);
- the serial link in both directions;
- the Virtex-side command handler;
- the main-board registers and the read-reply buffer;
- the watchdog and the shared I/O-reset line;
- a top level that wires up one complete box.

## Command streams

The host sends one stream per transaction.

| Byte | Contents |
|---|---|
| Destination | bit 7: module (0 = Core/Segment, 1 = Segment); bit 6: read; bit 5: long write; bits 4..0: zero |
| Length 0, 1, 2 | 24-bit count of the bytes that follow. Length 0 is the most significant byte |
| Command 0 | bits 7..5 repeat the Destination's top bits; bits 4..2 = SM (which item); bits 1..0 zero |
| Command 1 | address or command number inside the item (0..255) |
| Data 0, Data 1 | a 16-bit value, Data 0 = high byte |

**SM codes.**

| SM | Core/Segment module | Segment module |
|---|---|---|
| 0 | segment card 1 | segment card 1 |
| 1 | segment card 2 | segment card 2 |
| 2 | core ADCs | segment card 3 |
| 3 | main board | segment card 4 |
| 4 | reserved | main board |

In both modules the main board is SM = number of Virtex devices. The
controller uses that rule.

**Stream kinds.**
- **Simple write:** one or more 4-byte commands chained in one stream. Length
  = 4 × number of commands. The commands are executed in order.
- **Long write:** Command 0, Command 1, then Length − 2 data bytes. The data
  go to one Virtex as one frame.
- **Read:** exactly one 4-byte command. The data word is a qualifier. Here it
  means "this many further consecutive registers".

Example: `C0 00 00 04 C8 05 00 00` is a read of command 5 on segment card 3
of module 2.

**Replies** always start with the Destination byte and a 24-bit Length.
- **Good write:** Length 0.
- **Failed write or read:** Length 2, then Command 0 and Command 1 of the
  command that failed.
- **Good read:** Length N + 2, Command 0, Command 1, then the N data bytes.

A command fails if any of these is true:
- its top bits disagree with the Destination;
- a reserved bit is set;
- the SM code is reserved;
- it is a long write to the main board;
- the target Virtex answers "failed";
- the read reply does not fit the reply buffer.

After the first failure the rest of the stream is read and dropped. One
failed reply is sent.

## The link

`link_tx`, `link_rx` and `link_port` implement one end of a link.

**Framing.**
- FRAME is active low and encloses a whole transfer.
- DATA changes while CLOCK is low. It is sampled on the rising CLOCK edge.
- Bits are sent MSB first. The bit order is this design's choice and a
  parameter (`MSB_FIRST`).
- At the default `HALF_PERIOD = 5` with a 100 MHz system clock, the link runs
  at 10 MHz, the highest rate allowed. That is 100 ns per bit and 800 ns per
  byte.
- FRAME falls at least 150 ns before the first clock edge.
- FRAME rises 150 ns after the last edge.
- A 100 ns gap follows every frame.

**Flow control.** While a frame is coming in, the receiver drives its
outgoing FRAME wire as an inhibit: low means "pause".
- The receiver asks for a pause when its 8-entry FIFO has fewer than three
  free places. That covers the byte on the wire plus one more that may
  already have started.
- The sender looks at the inhibit only between bytes, after two synchroniser
  flops. A byte that has started is always finished.
- The sender acts only on an inhibit that is low at a byte boundary. A
  pause request that rises and falls again inside one byte is not seen. The
  receiver here never makes one: it holds the inhibit low until its FIFO has
  room.
- The inhibit means something only while the forward FRAME is low. Outside a
  transfer the same wire is that end's own FRAME output.

**Direction turn-around.** The receiver is disabled while its own end is
sending. `link_port` also holds back a new outgoing frame while an incoming
frame is still open. So a reply or ACK always starts after the request frame
has ended. If it did not, the far end would read the reply as an inhibit.

**Empty frame.** FRAME low for 300 ns with no clock is the Virtex's "good
write" acknowledgement.

`link_rx` puts an end-of-frame token into its byte FIFO. Upper layers
therefore see frame boundaries in order with the data. It also reports
overflow (byte lost) and a frame ending in the middle of a byte.

## Virtex command handler

`virtex_cmd_port` stands in for the Virtex side. The real Virtex command set
belongs to each ADC firmware, so a bank of `NUM_REGS` 16-bit registers
(256, one per Command 1 value) takes its place. The handler decodes a request
only after its frame has ended, then answers in one of three ways.

- **Empty frame:** the simple write or long write was accepted.
- **Command 0 and Command 1 only:** not understood. This covers:
  - wrong module or SM;
  - a reserved bit set;
  - a register out of range;
  - a wrong frame length;
  - an odd number of long-write data bytes.
- **Command 0, Command 1 and data words (high byte first):** a read.

Long-write data leave as they arrive on the `lw_*` valid/ready byte stream.
When `lw_ready` is low, the link FIFO fills and the Spartan is paused.

## Control Spartan

`control_spartan` has one `link_port` per Virtex and one for the backplane.
It parses the host stream and executes each command in turn.

- **Simple write to a Virtex:** sends a 4-byte frame and waits for the ACK.
- **Long write:** copies host bytes straight into the Virtex frame. The
  Virtex's pauses stall the host stream through its `ready`.
- **Read:** sends the request and stores the reply frame in `resp_buffer`
  (4096 bytes by default). It then sends the header with the now-known
  length, followed by the buffered bytes. The buffer exists because the reply
  Length comes before the data.
- **Main-board commands:** go to `local_ctrl_regs` directly, with no link.

**Forwarding.** When `FORWARD_EN = 1` (the Core Spartan), a stream whose
Destination names module 2 is sent whole, as one frame, over the backplane.
The Segment Spartan's reply frame is relayed back to the host.
- The controller reads the relayed Length to set `h_out_last`.
- In the top, the Segment Spartan's host input is the receive side of its
  backplane link.
- Its replies go out as one frame on the transmit side.

The backplane protocol is this design's choice. The specification draws the
backplane link but does not define what travels on it.

## Watchdog and I/O reset

Each of the nine FPGAs has a `watchdog_timer`. It fires if that device's
state machine stays busy for 3,000,000,000 cycles (30 s at 100 MHz). A common
case is a host stream that stops short of its Length, or a Virtex that stops
taking long-write data.

The timer triggers `io_reset_ctrl`, which pulls the shared open-drain,
active-low RESET line for 20,000,000 cycles (200 ms). The top models the line
as the AND of all drivers.

While the line is low, every device resets its links and command state
machines. It keeps its registers (`rst_n` and `io_rst_n` are separate). The
line is brought out as `io_reset_n` for the Ethernet bridge.

## Top level

`agata_digitiser_top` holds:
- the Core Spartan (forwarding on);
- 3 Virtex handlers and main-board registers;
- the backplane link;
- the Segment Spartan (forwarding off);
- 4 Virtex handlers and its registers;
- nine watchdog / reset pairs.

**Ports.**
- Host command stream in and reply stream out, as valid/ready bytes.
- Each Virtex's long-write stream and register-write strobe.
- The I/O-reset line.

There is one system clock. On real hardware each FPGA has its own clock. The
link inputs are synchronised, so this is allowed.

**Not modelled:**
- the Ethernet bridge (XPORT);
- the FLASH memory;
- the ADC data paths in the Virtex devices;
- LVDS/LVCMOS pads.

The host ports stand where the bridge would connect.

## Assumptions and departures

The specification is silent on the following points. Each was chosen here:
- system clock (100 MHz);
- bit order on the wire (MSB first);
- receiver FIFO depth (8) and inhibit threshold;
- frame lead, tail and gap (150, 150 and 100 ns);
- byte order of the 16-bit data word (Data 0 high);
- meaning of the read qualifier;
- size of the main-board register bank (16) and the read buffer (4096 bytes);
- what happens to commands after a failing one;
- what travels on the backplane;
- the Segment module's Ethernet bridge, which is left unconnected.

The largest read that fits the buffer returns 4094 data bytes. Long writes
are streamed, so only the 24-bit Length limits them.

## Files and simulation

- `rtl/agata_pkg.sv`: byte layouts and link wire bundle. Compile it first.
- `rtl/<block>.sv`: one module per file, as named above.
- `tb/tb_<block>.sv`: a self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_agata_digitiser_top` runs the box end to end at reduced sizes and counts
each mechanism:
- Virtex writes and empty ACKs;
- good and failed replies;
- long-write bytes;
- link pauses;
- forwarded streams;
- main-board writes;
- a watchdog-triggered I/O reset.

It uses a 60,000-cycle watchdog, a 2,000-cycle reset stretch, 16 Virtex
registers and a 256-byte buffer.

`tb_agata_digitiser_top_full` runs the top at its default parameters through
a write, a read and a forwarded transaction.

`tb_agata_workloads` runs the transfer sizes the bus is meant for, at the
default parameters:
- a 600-byte EEPROM-style long write into a slow Virtex sink;
- a 200-byte long write forwarded to the Segment module;
- 32 chained register writes in one stream;
- a read of all 256 registers of one Virtex. That is 512 data bytes and
  takes about 425 µs at 10 MHz;
- the same full read from a Segment Virtex, forwarded over the backplane to
  a host that takes bytes slowly. Here the Core Spartan must pause the
  Segment Spartan's reply, which is flow control in the read direction.

Run a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/agata_pkg.sv tb/tb_control_spartan.sv --top-module tb_control_spartan
    ./obj_dir/Vtb_control_spartan

Timing constants are parameters in system-clock cycles. To run from a
different clock, change `HALF_PERIOD`, `LEAD_CYCLES`, `TAIL_CYCLES`,
`TIMEOUT_CYCLES` and `STRETCH_CYCLES`.
