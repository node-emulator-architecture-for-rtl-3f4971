# Protocol Workroom link layer controller

This is the link layer controller board of the Protocol Workroom node emulator, written in
SystemVerilog. The board sits between a host single-board computer (a 68010 board on a private
P2 bus) and a network channel emulator. An MC68020 on the board runs protocol software. Dedicated
hardware does everything that must happen within one bit period at 10 Mb/s:

- move packets between memory and the serial channel, with a CRC;
- recognise bit patterns;
- make fast MAC decisions;
- record time-stamped events.

The top module is `pw_link_controller` (`rtl/pw_link_controller.sv`). It has three port groups:

- the P2 host bus;
- the 68020 local bus, plus its interrupt and reset lines;
- the channel emulator lines.

The 68020, the host board and the channel emulator are not part of the design. The testbenches
model them.

Everything runs on one board clock `clk` with an active-low asynchronous reset `rst_n`. The
channel's receive clock, transmit clock and global clock are sampled and turned into one-cycle
ticks. The board clock must therefore run at least four times faster than the channel bit clock.

```
            P2 bus                                      68020 local bus
              |                                               |
         +---------+   port A    +---------+   port B   +-----------+   +-----------+
         | pw_p2_if|-------------| pw_dpram|------------| pw_bus_arb|---| pw_lc_regs|
         +---------+             +---------+            +-----------+   +-----------+
              | doorbells, reset, shadow ptr               |    |            |  set-up, flags,
              |                                   pw_rx_hw  pw_tx_hw         |  programming
              |                                       |       |              |
              |   pw_pattern_matcher --> pw_decision_fsm (rx) / (tx) <--> pw_timer x2
              |                                  |       |
              |                            pw_event_fifo (codes + time stamps)
              |                                          |
              +-------------------------- pw_chan_if -- channel emulator lines
```

## Mailbox dual-port RAM (`pw_dpram`)

The host and the board exchange all data and control messages through a 32K x 16 dual-port RAM.
The host uses port A; the board's local bus uses port B. Both ports are synchronous and return
read data one cycle after the read. If both ports write the same word in the same cycle, port B's
data is kept. Software avoids this case because every region has one owner at a time.

The word map is in `pw_pkg`:

| Words | Use |
|---|---|
| 0x0000-0x3FFF | receive cyclic queue, 16K words |
| 0x4000-0x4FFF | four transmit buffers of 1024 words (two for the host, two for the 68020) |
| 0x5000-0x6FFF | monitoring mailbox |
| 0x7000-0x7FFF | control mailboxes |

## P2 host interface (`pw_p2_if`)

The host bus is a simple synchronous bus (`h_sel`, `h_we`, `h_addr`, `h_wdata`). Read data comes
back with `h_rvalid` one cycle later. Addresses below 0x8000 reach the RAM. Addresses from 0x8000
up are registers:

| Address | Write | Read |
|---|---|---|
| 0x8000 | doorbell to the 68020, message code in bits 7:0 | {68020 request pending, host request pending} |
| 0x8001 | acknowledge the host interrupt | pending bit and message code from the 68020 |
| 0x8002 | bit 0 holds the 68020 in reset (set at power-up) | reset state |
| 0x8003 | shadow pointer: last receive-queue word the host has read | shadow pointer |

A message is data placed in a mailbox followed by a doorbell interrupt carrying an 8-bit code.
`h_irq` stays high until the host acknowledges it.

## Local bus arbiter (`pw_bus_arb`)

Port B of the RAM is shared by three masters. Priority is fixed: reception hardware, then
transmission hardware, then the 68020. A serial stream is therefore never stalled by software.
The grant is combinational in the request cycle, and read data is valid one cycle later.

## Channel emulator interface (`pw_chan_if`)

The interface has:

- data in and data out;
- valid in and valid out;
- receive clock, transmit clock and global clock;
- two control lines in each direction.

Every input passes through a two-flop synchronizer. Rising clock edges become `rx_tick`,
`tx_tick` and `gtick`. `rx_bit`, `rx_valid` and `rx_end` (valid just dropped) line up with
`rx_tick`.

The outgoing data and valid lines change on `tx_tick`. Their source depends on two controls:

- Normally they carry the transmission hardware's output.
- With `couple` on, the received bit is repeated to the output (receive-to-transmit coupling).
- With `overwrite` also on, the transmitter's own bit replaces the repeated bit while the
  transmitter is sending.

## Transmission hardware (`pw_tx_hw`)

The 68020 sets:

- the start word address;
- the byte length;
- whether a CRC is appended;
- how many leading bytes (a preamble) are left out of the CRC.

The transmit state machine then issues `go`. The block reads the buffer through the arbiter one
word ahead. It sends each word high byte first and each byte LSB first, one bit per `tx_tick`.
When enabled, it appends the 32-bit FCS. `done` pulses after the last bit.

`stop` aborts the packet and sets the sticky `aborted` flag. If a word is not ready in time, the
block sets `underrun`.

## Reception hardware (`pw_rx_hw`)

On `go` from the receive state machine, the block captures bits while the channel valid line is
high. It packs them into words, high byte first, and writes them into the cyclic queue. A trailing
odd byte is written padded. When the packet ends, it latches:

- the packet's start index;
- the byte length;
- whether the CRC-32 residue was correct.

The queue is full when the write pointer reaches the host's shadow pointer, so one word always
stays free. After reset the shadow pointer points at the last word. When the queue is full, `full`
is raised and further words are dropped, and a sticky `overflow` flag is set. The 68020 then
tells the host.

## CRC (`pw_crc32`)

This is a bit-serial IEEE 802.3 CRC-32 (reflected polynomial 0xEDB88320, preset to all ones). The
transmitter sends the complemented register LSB first as the FCS. The receiver runs the same
register over data plus FCS and checks the constant residue 0xDEBB20E3.

## Pattern recognizer (`pw_pattern_matcher`)

This is the first kind of state machine. It searches the incoming bit stream for patterns of up to
64 bits. It keeps a 64-bit shift register, with the newest bit in bit 0, and compares it every bit
time against table entries of `{value, care mask, next}`. A zero in the care mask is a don't-care
bit.

The table holds 32 entries. Four slots search at the same time, each starting at its own table
entry when armed. When a slot finds a match, it pulses `match`. It then moves to the `next` entry,
so up to 32 different patterns can follow one another. A slot only compares as many bits as have
arrived since it was armed.

## Decision state machines (`pw_decision_fsm`)

This is the second kind of state machine. There are two instances, one for reception and one for
transmission, so the two directions run independently. Each state is one programmable entry:

| Field | Bits | Meaning |
|---|---|---|
| cond | 4 | condition to test (see below) |
| inv | 1 | invert the condition |
| next_t / next_f | 5 + 5 | next state if the condition is true / false |
| act | 8 | action pulses while the condition is true |
| lvl | 4 | output levels held while in the next state |
| code | 8 | event / interrupt code |

The conditions are:

- 0: always;
- 1-4: pattern match 0-3;
- 5: own timer done;
- 6: transmission done;
- 7: receive valid;
- 8: receive end;
- 9: the other machine's coupling flag;
- 10-13: the 68020's four status flags;
- 14: receive queue full;
- 15: channel control input 0.

The action bits are:

- 0: record an event;
- 1: interrupt the 68020;
- 2: start the timer;
- 3: start the data hardware (go);
- 4: stop the data hardware;
- 5: arm the pattern search;
- 6: set the coupling flag;
- 7: clear the coupling flag.

Actions are decided combinationally from the current state, so the machine responds within one
board clock. The state and the levels update on the next clock. Level bits 1:0 drive the channel
control outputs, bit 2 turns on coupling and bit 3 turns on overwrite. The outputs of the two
machines are ORed. When `run` is low, the machine is held in state 0 with all levels low.

## Programmable timers (`pw_timer`)

Each decision machine has a 16-bit down counter for deferring actions. The 68020 writes its load
value. The machine's timer action starts it. It counts transmit-clock ticks, so delays are in bit
times. It gives a one-cycle `expired` pulse and a `done` level that holds until the next start.

## Event FIFO and time stamp (`pw_event_fifo`)

A 32-bit time stamp counts global clock ticks. When either machine records an event, its code is
stored in the FIFO (64 entries by default) with the current time stamp. If both machines record in
the same cycle, both events are stored, reception first. When the FIFO is full, new events are
dropped and a sticky overflow flag is set. The 68020 reads the head and pops it. From these records
it builds the monitoring records in the monitoring mailbox.

## 68020 local registers (`pw_lc_regs`)

The 68020 bus holds a request until the acknowledge. Addresses below 0x8000 go to the RAM through
the arbiter. The registers are:

| Address | Register |
|---|---|
| 0x8000 | transmit start address |
| 0x8001 | transmit byte length |
| 0x8002 | transmit control: bit 0 CRC enable, bits 7:4 bytes skipped by the CRC, write bit 1 resets the transmitter |
| 0x8003 | transmit status {underrun, aborted, busy} |
| 0x8004 | status flags to the state machines |
| 0x8005 | run bits {tx, rx} of the decision machines |
| 0x8006 / 0x8007 | receive / transmit timer load |
| 0x8008 | interrupts: read {host pending, host code, tx pending, tx code, rx pending, rx code}; write bits 0/1/2 clear rx/tx/host |
| 0x8009 | doorbell to the host, message code in bits 7:0 |
| 0x800A | event FIFO head {count, overflow, empty, code} |
| 0x800B | event FIFO head time stamp |
| 0x800C | pop the event FIFO |
| 0x800D | clears: bit 0 event overflow, bit 1 time stamp, bit 2 receive overflow |
| 0x800E | receive status {crc_ok, overflow, full, busy} |
| 0x800F | last received packet byte length |
| 0x8010 | last received packet start index |
| 0x8011 | receive write pointer |
| 0x8012 | pattern slots: bits 3:0 enable, 5-bit start entries from bit 4; write bit 31 arms |
| 0x8014-0x8017 | pattern entry staging: value low/high, care low/high |
| 0x8018 | write pattern entry: bits 4:0 entry, bits 12:8 next |
| 0x8019 | decision entry bits 31:0 staging |
| 0x801A | write decision entry: bits 2:0 entry bits 34:32, bits 12:8 state, bit 16 selects the transmit machine |

`c_irq` is high while any interrupt is pending.

## Top level (`pw_link_controller`)

The top instantiates every block above and connects them:

- The transmission "done" becomes a sticky flag for the decision machines, cleared by the next go
  or stop.
- Each machine's coupling flag feeds the other machine.
- The event FIFO's two write ports are the event actions of the two machines.
- The 68020 interrupt latches the code of the machine that raised it.

Parameters: `RX_WORDS` (receive queue size, 16384) and `EV_DEPTH` (event FIFO depth, 64).

Not included:

- the MC68020 with its code memory and timers;
- the host board;
- the channel emulator;
- the P3 and P4 buses of the multiport configuration. They are only named, with no signals or
  protocol.

## What is fixed by the board description and what is chosen here

The board description fixes the following:

- The block structure above.
- Mailbox communication through a dual-port RAM, with interrupts both ways.
- Host control of the 68020 reset.
- A cyclic receive queue of 16K words, with a host-updated shadow pointer and a full indication.
- A pool of four transmit buffers.
- CRC generation and checking in hardware.
- Two kinds of state machine: pattern recognition, and decision making.
- Pattern recognition with patterns of up to 64 bits, don't-care fields, 32 consecutive
  patterns and four simultaneous searches.
- Separate receive and transmit decision machines with coupling between them.
- Receive-to-transmit coupling with overwrite.
- Programmable delay timers.
- Status flags from the 68020 and interrupts to it.
- An event FIFO storing event codes with a time stamp taken from the channel's global clock.
- Response within one bit period at 10 Mb/s.

Everything else is this design's own choice:

- all widths and the word size;
- the RAM word map and the transmit buffer size;
- both register maps;
- the bus handshakes;
- the CRC polynomial (IEEE 802.3 CRC-32);
- the bit and byte order on the channel;
- the decision-table format, with its conditions, actions and levels;
- the number of channel control lines;
- the event FIFO depth and the time stamp width;
- the fixed-priority arbitration of the local RAM port.

Several functions are carried out by software on the 68020 and the host, using the hardware
above. They include:

- queuing transmit requests (one packet on the channel, one waiting in the second buffer);
- building monitoring records from the event FIFO;
- record filtering;
- retransmission policies such as binary exponential backoff;
- address filtering.

In a multiport set-up, up to eight boards share one host bus. `h_sel` then acts as each board's
select. The inter-board data bus (a TDMA bus) and the peer control bus are not described in enough
detail to build and are left out.

## Testbenches

Each block has a self-checking testbench in `tb/` named `tb_<module>`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_pw_link_controller` runs the complete board at its default sizes. It includes a host model, a
68020 software model and a channel model. It runs three phases:

1. Packet traffic with double-buffered transmission and a collision. The decision machines stop
   the transmitter on the collision line, and the software retries after a timer delay.
2. Receive-queue overflow and recovery through the shadow pointer.
3. Receive-to-transmit coupling.

It counts each mechanism and fails if any of them never happened.

To run one testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/pw_pkg.sv tb/tb_pw_link_controller.sv --top-module tb_pw_link_controller
./obj_dir/Vtb_pw_link_controller
```

Replace the testbench name to run any other testbench. The board-level test takes a few seconds.
Several unit testbenches shrink their block (for example a 64-word receive queue or an 8-entry
event FIFO) so that wrap-around and overflow are reached quickly. The board-level test runs at the
full default sizes.
