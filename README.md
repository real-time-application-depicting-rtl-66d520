# Master/slave data sharing architecture

Two processors share one 256-byte memory. One of them, the **master**, has a
cut-down PCI interface with a multiplexed address/data bus. The other, the
**slave**, is a small microcontroller with a separate address bus and a
bidirectional data bus. Either may read or write any byte. When both want the
memory, the **master always goes first**. The architecture sits in an FPGA
between the two processors. Each processor runs a simple bit-banged bus
sequence: request the bus, wait for the grant, then do one handshaked
transfer per byte.

All of it is synthesizable SystemVerilog. It is small: a few dozen flip-flops
plus a 2048-bit memory.

## Blocks

```
            pci_brq_n / pci_busy            pro_brq_n / pro_busy
   master ───────────────┐                ┌─────────────── slave
                         ▼                ▼   (2-FF synchronisers on the
                   ┌─────────────────────────┐  slave's request and enable)
                   │    conflict_resolver    │
                   └────────────┬────────────┘
                                │ owner
   pci_ad, frame#, irdy#,  ┌────▼────────────────────┐  pro_address, pro_data,
   trdy#, en#, wr_rd ────► │ interactive_controller  │ ◄── pro_en_n, pro_wr_rd
   pci_dtack_n, pci_data ◄─│  (one ic_xfer per side) │ ──► pro_ack_n
                           └───┬─────────────────┬───┘
                         port A│                 │port B
                           ┌───▼─────────────────▼───┐
                           │      dual_port_ram      │  256 x 8
                           └─────────────────────────┘
```

| File | Role |
|---|---|
| `rtl/dsa_pkg.sv` | widths (8/8), `owner_e`, handshake state enum |
| `rtl/data_sharing_top.sv` | top level: pins of both processors, synchronisers, the three blocks |
| `rtl/conflict_resolver.sv` | master-first arbiter, drives both busy lines |
| `rtl/interactive_controller.sv` | decodes the master's PCI phases; runs both handshakes; drives the memory ports |
| `rtl/ic_xfer.sv` | one side's enable/acknowledge handshake (used twice) |
| `rtl/dual_port_ram.sv` | 256 x 8 memory, two synchronous read/write ports |
| `rtl/dsa_sync2.sv` | two-flip-flop synchroniser |

## Pins and polarities

Every control line is active low except `busy` and `wr_rd`:

| Signal | Meaning |
|---|---|
| `*_brq_n` | low = this processor wants the memory |
| `*_busy` | high = wait; low = go ahead (the memory is yours) |
| `pci_en_n`, `pro_en_n` | low = do one transfer now |
| `pci_dtack_n`, `pro_ack_n` | low = transfer done, read data valid |
| `*_wr_rd` | low = write, high = read |

The master also supplies `clk` and `rst_n`. Reset is active low and
asserts asynchronously. The slave's bidirectional data bus is split into
`pro_data_i`, `pro_data_o` and `pro_data_oe`. The tri-state pad goes
outside the top level: drive the bus with `pro_data_o` while `pro_data_oe`
is high. The master gets read data on its own output bus, `pci_data`. The
value stays there after the transfer, because that bus drives the master
board's LEDs.

## The master's bus cycle

The master has no separate address bus. It sends the address and the data
over `pci_ad` one after the other. The levels of FRAME#, IRDY# and TRDY#
tell the two apart:

| Phase | `pci_frame_n` | `pci_irdy_n` | `pci_trdy_n` | What is latched from `pci_ad` |
|---|---|---|---|---|
| address | 0 | 1 | 1 | address register |
| data (writes only) | 1 | 0 | 0 | write-data register |
| any other combination | – | – | – | nothing |

A register is loaded at each clock edge where its pattern is present, but
only while the master owns the memory. A full master write is:

1. `pci_brq_n` low, then wait for `pci_busy` low;
2. address phase;
3. data phase;
4. set `pci_wr_rd` low, pull `pci_en_n` low, and wait for `pci_dtack_n` low;
5. raise `pci_en_n`. `pci_dtack_n` goes back high.

A read skips the data phase and sets `pci_wr_rd` high. The byte appears on
`pci_data` by the time `pci_dtack_n` falls. Repeat steps 2–5 for each byte.
Raise `pci_brq_n` to release the memory.

## The slave's bus cycle

The slave sets `pro_address` and `pro_wr_rd`. For a write it also puts the
byte on the data bus. Then it pulls `pro_en_n` low, waits for `pro_ack_n`
low, raises `pro_en_n` again, and waits for `pro_ack_n` to return high. For
a read, the architecture drives the data bus only while the acknowledge is
low. Outside that window the bus is the slave's.

## Arbitration: what "master first" means here

This is the part that needs the most care. `conflict_resolver` holds one
of three owners: none, master or slave.

* With no owner, a master request wins. A slave request is granted only
  when the master is not asking.
* An owner keeps the memory as long as its request stays low. It lets go
  once the request is high **and** it has no transfer in progress.
* **The master can take the memory from the slave.** This happens when the
  master requests while the slave owns it. The hand-over waits until the
  slave is between transfers: its enable is high and its handshake is idle.
  A transfer the slave has already started always finishes. After that,
  `pro_busy` goes high. If the slave lowers its enable again, it gets no
  acknowledge. It sits in a wait state until the master releases the bus and
  the slave is granted again. So a slave that checks `pro_busy` only once,
  at the start of a long burst, still works.
* The master is never interrupted.

Only one busy line can be low at a time. An assertion in the arbiter checks
this, and another checks that the master takes over on time.

## Timing

Counted from the clock edge at which the architecture sees the input:

| Event | Master side | Slave side |
|---|---|---|
| request → busy low (bus free) | 1 clock | 3 clocks (2 for the synchroniser) |
| enable → acknowledge low | 2 clocks | 4 clocks (2 for the synchroniser) |
| enable high → acknowledge high | 1 clock | 3 clocks |

Each enable/acknowledge pair costs two clocks. In the first, the access is
issued to the synchronous memory. In the second, the read data is captured
and the acknowledge is registered. The memory has one port per side, so
neither side's data path is multiplexed.

The slave microcontroller runs from its own oscillator. So its request and
enable pass through two-flip-flop synchronisers. Its address, data and
`wr_rd` are not synchronised. They are set before the enable falls and held
until the acknowledge returns, so they are stable by the time they are
used. A slave that breaks that order would need more synchronisation. The
master's pins change in step with the clock it supplies, so they are used
directly.

## Where this design makes its own choices

The sources for this architecture give its blocks, its pins, their
polarities, the order of each bus sequence, the 8-bit buses and the master
priority rule. They leave several points open, and these choices are this
design's own:

* the acknowledge latency (2 clocks) and when the acknowledge is released
  (when the enable rises again);
* arbitration details: the master may take over between slave transfers,
  and an owner keeps the bus while it requests;
* the address phase is decoded as FRAME# **low** with IRDY#/TRDY# high, as
  in PCI. One description of the sequence shows all three lines high
  instead. With the three lines all high, this design latches nothing;
* TRDY# is an input from the master, used only to decode the phases (real
  PCI has the target drive it);
* the synchronisers, the reset polarity and the split data bus;
* if both ports write the same address in the same clock, port A (the
  master) wins. The arbiter prevents that case in normal use;
* the memory contents are not reset;
* the slave always has separate address and data buses. The architecture
  also allows a slave on a multiplexed bus like the master's, but this
  RTL does not provide that option.

The microcontrollers and the FPGA board are not part of the RTL. The
testbench has behavioural models of the two processors' bus sequences
(`tb/avr_master_model.sv`, `tb/avr_slave_model.sv`).

## Simulation

Every testbench checks itself. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. Build
and run one with plain Verilator, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --top-module tb_data_sharing_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/dsa_pkg.sv tb/tb_data_sharing_top.sv
./obj_dir/Vtb_data_sharing_top
```

| Testbench | What it covers |
|---|---|
| `tb_dual_port_ram` | fill and read back all 256 bytes through both ports at once; read latency; hold; same-address write collision |
| `tb_conflict_resolver` | directed cases plus 4000 random cycles against a reference model of the priority rules |
| `tb_interactive_controller` | both sides' full cycles against a memory model; 2-clock acknowledge; phases and enables ignored without the grant; a waiting slave served once granted |
| `tb_data_sharing_top` | whole design at full size, using the processor models |

`tb_data_sharing_top` runs five board-level tests. Each one covers all 256
addresses, 00 to FF in order. The data is the address XOR a key that differs
per test, so one test cannot pass on what the previous test left in memory:

1. The master writes continuously and the slave reads behind it. The master
   requests the bus once per byte, so the two keep handing the memory back
   and forth. About 250 take-overs happen.
2. The master writes, then reads back.
3. The slave writes, then reads back.
4. The master writes, then the slave reads.
5. The slave writes, then the master reads.

Every read is compared with what was written. The master's 2-clock
acknowledge is checked on every transfer. The testbench also counts address
phases, data phases, reads and writes on each side, slave read-data drive,
master grant waits, take-overs and slave wait states. It counts a failure
for any of these that never happened. The whole run takes well under a
second.

## Changing it

`ADDR_W` and `DATA_W` on `data_sharing_top` set the bus widths. The memory
depth follows as `2**ADDR_W`. The master's multiplexed bus is `DATA_W` bits
wide and carries the address in its low `ADDR_W` bits, so keep
`ADDR_W <= DATA_W`. The testbenches are written for the 8/8 default.
