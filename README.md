# Multi-master AHB system with a multiprocessor interface

Several AMBA AHB processors need to reach the same peripherals: control and
status registers, a shared memory, a FIFO, a UART, a PCI interface and a
network link. This design puts all of them on one AHB. A multi-mode arbiter
decides which processor owns the bus. A single AHB slave, the
*multiprocessor interface*, then carries each transfer onto a simple
APB-style target bus, where an address decoder selects the target area. The
arbitration algorithm (fixed priority, round robin, fair chance or random)
can be changed at run time with a 2-bit select input.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It compiles
cleanly with Verilator 5 lint and with the Yosys slang front end. Every
block has a self-checking testbench.

## System structure

```
 master 0 ─┐ HBUSREQ/HGRANT   ┌────────────┐
 master 1 ─┼──────────────────│ ahb_arbiter│── HMASTER[3:0], DEFAULT
 master 2 ─┘                  └────────────┘
     │ HADDR/HTRANS/HWRITE/HWDATA      │ HMASTER
     ▼                                 ▼
 ┌──────────────────────────────────────────┐
 │ ahb_bus_mux: address+control mux,        │◄── HSEL ── ahb_decoder
 │ write data mux, read data mux,           │
 │ default slave                            │── HRDATA/HREADY/HRESP to all masters
 └──────────────────────────────────────────┘
     │ shared AHB
     ▼
 ┌──────────────────────────────────────────────┐
 │ mp_interface                                 │
 │  bridge_fsm  apb_addr_ctrl_gen               │
 │  apb_addr_decoder  write_output_gen          │
 │  read_output_gen   ahb_xfer_out_gen          │
 └──────────────────────────────────────────────┘
     │ PSEL[5:0] PENABLE PWRITE PADDR PWDATA / PRDATA
     ├── apb_csr     (control & status registers)
     ├── apb_memory  (shared RAM)
     ├── apb_fifo    (FIFO)
     ├── apb_uart    (UART)
     ├── PCI interface   ─┐ outside this design:
     └── network link    ─┘ their ports are top-level ports
```

`multi_amba_top` is the top. Each master's signals are arrays indexed by
master number (`m_hbusreq`, `m_hgrant`, `m_haddr`, `m_htrans`, `m_hwrite`,
`m_hwdata`). `HRDATA`, `HREADY` and `HRESP` are shared by all masters. The
processors themselves are not part of the RTL.

### Memory map

| Address                       | Target                                 |
|-------------------------------|----------------------------------------|
| `0x4000_0000` – `0x4000_FFFF` | control and status registers (PSEL[0]) |
| `0x4001_0000` – `0x4001_FFFF` | memory (PSEL[1])                       |
| `0x4002_0000` – `0x4002_FFFF` | FIFO (PSEL[2])                         |
| `0x4003_0000` – `0x4003_FFFF` | UART (PSEL[3])                         |
| `0x4004_0000` – `0x4004_FFFF` | PCI interface port (`pci_psel`)        |
| `0x4005_0000` – `0x4005_FFFF` | network link port (`net_psel`)         |
| `0x4006_0000` – `0x400F_FFFF` | no target: writes are dropped, reads return 0 |
| anything else                 | default slave: zero-wait OKAY, reads return 0 |

The interface window is set by `MP_BASE`/`MP_MASK` in `amba_pkg`. The target
field is `PADDR[18:16]` (`TGT_LSB`).

## Arbitration

`ahb_arbiter` has three states: idle, arbitrate and operate. When any
`HBUSREQ` is high in idle, it moves to *arbitrate*. There the algorithm
chosen by `ARBITRATION[1:0]` picks a winner, and `HMASTER` is loaded with it.
In *operate* the winner's `HGRANT` is high. The owner keeps the bus as long
as it holds `HBUSREQ` high; there is no pre-emption. When the owner drops
`HBUSREQ` and `HREADY` is high, the arbiter goes back to *arbitrate*, or to
*idle* if nobody is requesting. So there is always one cycle without a grant
between two owners. `DEFAULT` is high whenever no master is granted.

| `ARBITRATION` | Algorithm | Rule |
|---|---|---|
| `00` | fixed priority | lowest-numbered requester wins |
| `01` | round robin | search starts one past the last winner |
| `10` | fair chance | requester granted least often wins; ties go to the lower number. Each master has a 4-bit grant counter (`CNT_W`). When a counter would overflow, all counters restart at zero |
| `11` | random | search starts at a position taken from a free-running 16-bit LFSR |

A grant takes two cycles from a request in idle: one cycle to reach
*arbitrate*, one to grant. `HMASTER` is 4 bits wide, so up to 16 masters can
be named. The arbiter module defaults to 4 request lines. The system top
defaults to 3 masters (`NUM_MASTERS`) and sizes the arbiter to match.

**SPLIT.** The arbiter watches `HRESP` for the first cycle of a SPLIT
response (`HRESP = SPLIT` with `HREADY` low). When it sees one, it masks the
request of the master that owns that data phase, and that master loses the
bus when the response ends. The master stays masked, even while it keeps
`HBUSREQ` high, until a slave raises its bit of `HSPLIT`. No slave in this
system ever answers SPLIT, so the top ties `HSPLIT` low. The mechanism is
there for slaves that are added later.

**Master protocol this arbiter expects.** A master drives transfers only
while it sees its `HGRANT`, and it drives IDLE at all other times. It keeps
`HBUSREQ` high until its last address phase has been accepted. The
address/control mux follows `HMASTER` directly. `HMASTER` changes only at the
end of an arbitration cycle, so the previous owner's IDLE stays on the bus
while the next owner is being chosen.

## The multiprocessor interface

`mp_interface` is an AHB slave made of six small blocks:

* **`bridge_fsm`** – a 3-bit state machine. It forms its next state from
  the current state, `accept`, `HWRITE`, and `reg_write` (the `HWRITE` that
  was registered when the transfer was accepted). `accept` is
  `HSEL & HREADYIN & HTRANS[1]`.
* **`apb_addr_ctrl_gen`** – registers `HADDR` and `HWRITE` on `accept` and
  drives them out as `PADDR` and `PWRITE`. Drives `PENABLE` in the access
  cycle.
* **`apb_addr_decoder`** – drives one `PSEL` line per target, from
  `PADDR[18:16]`, in the setup and access cycles.
* **`write_output_gen`** – a flip-flop that copies `HWDATA` to `PWDATA` in
  the write-data cycle.
* **`read_output_gen`** – a flip-flop that copies `PRDATA` to `HRDATA` at
  the end of a read access cycle.
* **`ahb_xfer_out_gen`** – drives `HREADYOUT` from the state. `HRESP` is
  always OKAY (`00`).

### Timing

The interface always inserts exactly two wait states. Every transfer has a
three-cycle AHB data phase:

```
write:  addr phase | WWAIT (HWDATA->PWDATA) | SETUP (PSEL) | ENABLE (PSEL,PENABLE, HREADYOUT=1)
read:   addr phase | SETUP (PSEL)           | ENABLE (PSEL,PENABLE, PRDATA->HRDATA) | RDONE (HREADYOUT=1)
```

| State | Code | HREADYOUT | Next state |
|---|---|---|---|
| IDLE   | 0 | 1 | `accept` ? (`HWRITE` ? WWAIT : SETUP) : IDLE |
| WWAIT  | 1 | 0 | SETUP |
| SETUP  | 2 | 0 | ENABLE |
| ENABLE | 3 | `reg_write` | read: RDONE; write: `accept` ? (`HWRITE` ? WWAIT : SETUP) : IDLE |
| RDONE  | 4 | 1 | `accept` ? (`HWRITE` ? WWAIT : SETUP) : IDLE |

A new transfer can be accepted in any cycle where `HREADYOUT` is high, so
transfers run back to back with no idle cycle between them. `PADDR`,
`PWRITE` and `PWDATA` are registers. They cannot change during an APB
transfer, because they load only at acceptance or in the write-data cycle.
The targets have no wait states; there is no `PREADY`. A transfer whose
target number has no target still runs the setup and access cycles, with
every `PSEL` low. Its read data is zero.

## Target areas

All targets take writes, pushes and pops in the access cycle
(`PSEL & PENABLE`). Their registers reset asynchronously.

**`apb_csr`** – control and status registers:

| Word offset | Register |
|---|---|
| 0–3 | read/write control registers, driven out on `csr_ctrl_o` |
| 4–7 | read-only status words |
| 8 and up | read as 0 |

At the top, status word 4 reads the FIFO flags `{full, empty}`, and words
5–7 read `csr_status_i[0..2]`.

**`apb_memory`** – a 1024 × 32-bit single-port RAM (`MEM_DEPTH`). It reads
synchronously in the setup cycle and holds the word through the access
cycle. Its contents are not reset.

**`apb_fifo`** – a 16-word FIFO (`FIFO_DEPTH`), built as a circular buffer.

| Word offset | Register | Behaviour |
|---|---|---|
| 0 | DATA | A write pushes; a write when full is dropped and sets the sticky *overflow* flag. A read pops; a read when empty returns 0 and sets the sticky *underflow* flag |
| 1 | STATUS | `[15:8]` count, `[3]` underflow, `[2]` overflow, `[1]` full, `[0]` empty |
| 2 | CLEAR | any write empties the FIFO and clears both flags |

**`apb_uart`** – 8N1 frames, LSB first.

| Word offset | Register | Behaviour |
|---|---|---|
| 0 | TXDATA | a write starts a frame; ignored while busy |
| 1 | RXDATA | a read returns the last byte and clears *valid* and *overrun* |
| 2 | STATUS | `[2]` overrun, `[1]` rx valid, `[0]` tx busy |
| 3 | DIVISOR | clock cycles per bit, minimum 2, reset value `UART_DIV` = 16 |

The receiver synchronises `rx` with two flip-flops. It re-checks the start
bit half a bit after the falling edge, then samples each bit in its middle.
Frames with a zero stop bit are dropped.

**PCI interface and network link** – these are outside this design. Each
has its own select (`pci_psel`, `net_psel`) and read-data input
(`pci_prdata`, `net_prdata`). They share `p_enable`, `p_write`, `p_addr` and
`p_wdata`, with the same APB timing as the internal targets.

## Relation to the original description

These parts follow the source design description:

* the three-processor system with six target areas
* the AHB structure: arbiter, address/control mux, write data mux, read
  data mux and decoder
* the four arbitration modes, selected by `ARBITRATION[1:0]`, with fixed
  priority = 0 and round robin = 1
* the arbiter signals `HBUSREQ3..0`, `HGRANT3..0`, `DEFAULT` and
  `HMASTER[3:0]`, and its idle → arbitration → master → operation sequence
* the interface's ports and sub-blocks, its 3-bit state driven by `HWRITE`,
  the registered `HWRITE` and `accept`, the flip-flop write and read data
  paths with asynchronous reset, and `HRESP` fixed at OKAY
* 32-bit address and data buses

These are this design's own choices:

* **Arbiter:** the encodings `10`/`11`, the fair and random algorithms,
  the priority order, holding the grant without pre-emption, and the way
  SPLIT masking works.
* **Interface:** the state set and its timing (two wait states). One `PSEL`
  per target, where the description shows a single `PSEL`. Load enables on
  the data flip-flops.
* **Addresses:** the memory map and the default slave.
* **Targets:** the sizes and register maps of the CSR block, memory, FIFO
  and UART, and all of the UART.
* **Reset:** active low, named `HRESETn`.
* **Transfers:** single 32-bit transfers only. There is no `HSIZE` or
  `HBURST`; NONSEQ and SEQ are treated alike.

Not built:

* The PCI and network-link controllers.
* The processors.

The description gives three processors in its architecture and four bus
masters in its results. The top defaults to three. The arbiter defaults to
four request lines, and `tb_four_masters` runs the whole system with
`NUM_MASTERS = 4`.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `multi_amba_top` | `NUM_MASTERS` | 3 | AHB masters (up to 16) |
| | `MEM_DEPTH` | 1024 | memory words |
| | `FIFO_DEPTH` | 16 | FIFO words |
| | `UART_DIV` | 16 | UART reset bit period, in clock cycles |
| `ahb_arbiter` | `NUM_REQ` | 4 | request lines |
| | `CNT_W` | 4 | fair-chance grant counter width |
| `ahb_decoder` | `NUM_SLAVES`, `BASE`, `MASK` | 1, `MP_BASE`, `MP_MASK` | slave windows |
| `ahb_bus_mux` | `NM`, `NS` | 3, 1 | masters, slaves |

## Verification

Each testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* **System tests.** `tb_multi_amba_top` runs the top at its default
  parameters; `tb_four_masters` runs it with four masters.
  * Behavioural masters (`tb/ahb_master_model.sv`) issue random traffic to
    every target, to the empty target numbers and outside the window. The
    arbitration mode is switched every few hundred transfers.
  * A reference model, fed only from the top-level ports, checks every read,
    every PCI/network write, the CSR outputs and `HRESP`. It also checks the
    data-phase length: 3 cycles through the interface, 1 cycle at the
    default slave.
  * It checks that only the granted master drives the bus.
  * A directed phase sends a byte out of the UART and receives one.
  * These mechanisms are counted, and each must happen at least once: each
    arbitration mode, bus handover, contended arbitration, wait states,
    back-to-back transfers, default slave, unmapped target, FIFO
    full/overflow/underflow, UART transmit and receive, no-grant cycles,
    and service of every master.
* **Block tests.**
  * `tb_ahb_arbiter` compares the winners with a model in fixed-priority,
    round-robin and fair modes. In random mode it checks that the winners
    are legal and spread over all masters. It also checks grant latency,
    grant hold and release, and SPLIT masking and release.
  * `tb_mp_interface` checks the APB sequence, PSEL decoding, the order and
    contents of each APB transfer, read data, and the three-cycle data
    phase.
  * The remaining block tests cover the decoder (including overlapping
    windows), the bus muxes (pipelined owner registers, default slave),
    each state-machine transition, each interface sub-block, and each
    target against a model.

To simulate with Verilator, for example the system test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_multi_amba_top rtl/amba_pkg.sv tb/tb_multi_amba_top.sv
./obj_dir/Vtb_multi_amba_top
```

Replace the top module and file name to run any other testbench. The
package `rtl/amba_pkg.sv` must come first. It holds the HTRANS/HRESP and
arbitration-mode enums, the state encoding, the target numbers and the
memory-map constants.
