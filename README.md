# Caronte: a processor that reconfigures the FPGA it runs on

Caronte is a small system architecture for *embedded* partial dynamic
reconfiguration. One FPGA holds a processor, a memory full of partial bitstreams, and a
few reconfigurable areas called **BlackBoxes**. While the application runs, the
processor rewrites one BlackBox with a new processing element through the device's
internal configuration access port (ICAP). The rest of the chip keeps working during
the rewrite, and that includes the other BlackBoxes. No external PC or configuration
device is involved.

The application is seen as a sequence of **static system photos (HW-SSPs)**. Each photo
is one assignment of processing elements to BlackBoxes on top of a fixed part that
never changes. Going from one photo to the next means reconfiguring one BlackBox. The
example application is MD5, split into six elements PE-A to PE-F and run on two
BlackBoxes:

| HW-SSP | BlackBox 0 | BlackBox 1 |
|-------:|------------|------------|
| 0      | empty      | empty      |
| 1      | PE-A       | PE-B       |
| 2      | PE-C       | PE-B       |
| 3      | PE-C       | PE-D       |
| 4      | PE-E       | PE-D       |
| 5      | PE-E       | PE-F       |
| 6      | empty      | PE-F       |

This repository gives synthesizable SystemVerilog for the fixed part and the BlackBox
shells. It also gives the six MD5 elements and a model of the device configuration
logic, so that the whole sequence above can be simulated from end to end.

## System map

```
 processor port ──► PLB bus_decoder ──┬─ bit_mem        partial bitstreams (64 KiB)
 (cpu_req/cpu_rsp,                    ├─ icap_ctrl      ICAP module: 512-word RAM + streamer/reader
  cpu_irq)                            │     │ 8-bit ICAP port
                                      │     ▼
                                      │  icap_cfg_model  configuration logic (model)
                                      │     │ cfg_pe[i], cfg_reconf[i]
                                      └─ plb2opb_bridge  │
                                            │            ▼
                      OPB bus_decoder ──────┼─ blackbox[0..N_BB-1]
                                            ├─ uart_rs232 (RS232)
                                            └─ intc ──► cpu_irq
```

`caronte_top` wires all of this together. The processor itself is not part of the RTL:
it is a hard PowerPC 405 core running the controller and the scheduler. Its bus master
port and its interrupt input are the top's ports. The testbenches play its program.

Top parameters (defaults): `N_BB=2` BlackBoxes, `SPOOL_DEPTH=16`, `MEM_WORDS=16384`,
`MEM_READ_WAIT=2`, `MEM_WRITE_WAIT=14`, `ICAP_BRAM_WORDS=512`, `ICAP_BUSY_PERIOD=30`,
`UART_CLKS_PER_BIT=868`. The architecture drawing this design follows shows three
BlackBoxes. The MD5 system uses two, so that is the default. Any `N_BB` of 1 or more
elaborates, and `tb_caronte_three` runs the system with three.

## The BlackBox shell: why it has a spooler

This part of the design is the least obvious. A BlackBox (`blackbox.sv`) is two things:

* **the processing-element logic** (`md5_pe`). Partial reconfiguration replaces this
  part.
* **the communication interface** (`bb_comm_if`). It is never reconfigured, so the
  bus always sees the same slave at the same address whatever element is loaded. It
  holds the bus slave (the "IPIF/PSelect"), the **spooler**, and an output
  multiplexer.

Rewriting one area can disturb the traffic of its neighbours. Before a
reconfiguration, the processor therefore puts every BlackBox that keeps running into
**spool mode** (CTRL bit 0). In spool mode an element's output words go into the
spooler, a 16-word FIFO, and not to the bus. When the spooler is full, the interface
raises the **logic-lock** signal. This freezes the element completely: no input, no
output, no computation step. The element is stalled, but nothing is lost. When the
reconfiguration is over, the processor clears spool mode and reads the results. The
output multiplexer, switched by the spooler's own management signal, serves spooled
words first. New output
keeps going through the spooler until it is empty, so the word order is always the
order in which the element produced the words.

While its own area is being rewritten (`cfg_reconf` high), a BlackBox holds its element
in reset. The interface keeps its registers and spooler contents.

BlackBox registers (base `0x8000_0000 + 0x100*i`):

| offset | name   | meaning |
|-------:|--------|---------|
| 0x00   | DATA   | write: word to the element (dropped, and ERR set, if the element is not ready). Read: next output word, spooler first; 0 if none. |
| 0x04   | STATUS | [0] element ready for input, [1] output word available, [2] spool mode, [3] logic lock, [4] ERR, [5] element busy, [15:8] words in spooler, [23:16] loaded element |
| 0x08   | CTRL   | [0] spool mode (read/write); writing [1]=1 clears ERR |

A BlackBox raises its interrupt when the last word of a packet leaves its element. This
is the "end of execution" event that tells the controller the area may now be
reconfigured.

## A reconfiguration, step by step

This is the controller's sequence, as `tb/tb_caronte_top.sv` runs it:

1. The BlackBox in area *a* finishes (its interrupt), and the processor has read its
   output.
2. The processor sends that packet to the element in the other area *b*.
3. The processor copies the next element's partial bitstream, word by word, from
   `bit_mem` into the RAM of the ICAP module (`0x4000_1000 + 4*i`).
4. The processor sets spool mode in BlackBox *b*.
5. The processor writes the length to `LEN` (`0x4000_0004`) and starts the module with
   `CTRL=1` (`0x4000_0000`).
6. `icap_ctrl` streams the words to the ICAP, one byte per transfer, most significant
   byte first, and holds each byte while the port signals busy. When the last byte is
   taken, it raises its interrupt (interrupt controller bit `N_BB`).
7. The processor clears spool mode in *b*, reads *b*'s results, and sends them to the
   new element in *a*.

Measured in the default system with 68-word test bitstreams: streaming takes about 357
cycles, that is 5 cycles per word plus busy stalls. The copy in step 3 costs each word
one memory read (2 cycles) plus one ICAP-RAM write. In that time the running element
(started in step 2) fills its spooler and sits in logic lock.

## Partial bitstreams and the configuration model

The real ICAP and the configuration memory are hard parts of the FPGA and use the
vendor's bitstream format. `icap_cfg_model` stands in for both, with a simplified,
word-oriented format:

```
SYNC   = 0xAA995566
HEADER = {8'h30, 8'h00, area index, pe_id}
COUNT  = number of payload words
payload words (frame data; their content is ignored apart from the check)
CHECK  = XOR of the payload words
```

While the payload of an area is being written, that area reads as empty and its
`cfg_reconf` is high. A correct CHECK loads the element (`cfg_pe[area] = pe_id`) and
counts it in `cfg_loads`. A wrong CHECK, or a header that names a missing area, leaves
the area empty and sets `cfg_err`. The model raises busy for one cycle after every 30
bytes. This only exercises the flow control. A bitstream with `pe_id = PE_EMPTY`
blanks an area, as in HW-SSP 6. `caronte_pkg::bs_header()` builds the header word.

**Readback.** The ICAP module can also read a configuration back into its RAM. The
processor writes a read command into the RAM (`SYNC`, `{8'h28, 8'h00, area, 8'h00}`,
`COUNT`). It sets `LEN` to the command's length and `RBLEN` (`0x4000_000C`) to the
number of words to read, then starts the module. The module sends the command and
leaves `ce_n` high for one cycle to turn the port round. It then reads `RBLEN` words,
with `write_n` high, into RAM words `LEN` to `LEN+RBLEN-1`, and raises the same end
interrupt. The model answers with `{16'h0, area, pe_id}`, then the payload length and
the CHECK word of that area's last good load, then zeros. `bs_read_header()` builds
the command word. Set `RBLEN` back to 0 for the next write-only run.

In the RTL, all six MD5 elements sit inside every BlackBox and `cfg_pe` selects one.
This models what reconfiguration does to behaviour. It is not how the area would be
built in silicon, where each element is a separate partial design.

## The MD5 processing elements

The six elements pass one 24-word **packet** along the chain:

| words | content |
|------:|---------|
| 0-3   | chaining value H0..H3 |
| 4-7   | working state a, b, c, d |
| 8-23  | the 512-bit message block M0..M15 (little-endian words, already padded) |

| element | work | cycles after the last input word |
|---------|------|-----------------------------------:|
| PE-A | a,b,c,d := H | 1 |
| PE-B, PE-C, PE-D, PE-E | MD5 round 1, 2, 3, 4: one step per clock | 16 |
| PE-F | H := H + (a,b,c,d) | 1 |

Every element takes 24 words, computes, and returns 24 words. Padding, and the chaining
across the blocks of a longer message, belong to the software. The round constants are
the standard MD5 table (`md5_pkg`, K[i] = floor(|sin(i+1)|·2^32)).

Reconfiguration takes far longer than one execution, so each element can be iterated
over a batch of data sets before its area is rewritten. With the measured times of the
original system (about 2.2 to 2.9 ms per reconfiguration against 431 µs per block),
more than 8 iterations are needed before the computation outweighs the
reconfiguration. An element accepts packets back
to back for as long as it stays loaded. `tb_caronte_batch` runs nine sets per element.

## Buses, memory and peripherals

* **Bus protocol** (`caronte_pkg::bus_req_t/bus_rsp_t`). A master raises `req` with
  `we/addr/wdata` and holds them until a one-cycle `ack` arrives, which carries
  `rdata` for reads. A slave ignores `req` in its ack cycle. This simple transfer
  replaces the CoreConnect PLB and OPB protocols, which are not modelled.
* **`bus_decoder`**: the lowest matching `(addr & MASK) == BASE` wins. An unmapped
  address gets `ack` one cycle later with data 0 and sets the sticky `bus_miss` flag.
* **`plb2opb_bridge`**: handles one transfer at a time and adds 2 cycles.
* **`bit_mem`**: a read takes 2 cycles and a write 14. These are the measured 0.020 µs
  and 0.135 µs per 32-bit word, converted at a 100 MHz clock.
* **`intc`**: a rising edge on a source sets ISR. Registers: ISR 0x00 (read), IER 0x04,
  IAR 0x08 (write 1 to clear), IPR 0x0C. Sources: bit i = BlackBox i, bit `N_BB` = ICAP
  module, bit `N_BB+1` = RS232 byte received.
* **`uart_rs232`**: 8N1, 868 clocks per bit (115200 baud at 100 MHz). Registers: RX 0x00,
  TX 0x04, STATUS 0x08 ([0] received, [1] transmitter busy, [2] overrun).

Address map: memory `0x0000_0000` (64 KiB), ICAP module `0x4000_0000` (registers) and
`0x4000_1000` (RAM), BlackBox *i* `0x8000_0000 + 0x100*i`, UART `0x8000_1000`,
interrupt controller `0x8000_2000`.

## What follows the source architecture and what does not

Taken from the source architecture:
* the block structure: processor, memory, ICAP module, PLB, bridge, OPB, BlackBoxes,
  RS232 interface and interrupt controller;
* the BlackBox shell: bus interface, spooler, output multiplexer, logic lock, and a
  fixed interface around exchangeable element logic;
* an ICAP module that both writes and reads back configurations through its RAM;
* the controller's reconfiguration sequence: the end-of-execution event, the copy from
  memory to the ICAP RAM, spooling in the neighbours, the ICAP end interrupt, and the
  release of the spool;
* two BlackBoxes and the HW-SSP table for MD5. The source's text speaks of five
  processing elements, but its table uses six (PE-A..PE-F). The table is what is built;
* the memory access times.

Choices of this design, where the source says nothing:
* the bus protocol and all register maps and addresses;
* the spooler depth;
* how MD5 is divided among PE-A..PE-F;
* the packet format;
* the bitstream format and the configuration model;
* the ICAP byte order and the readback protocol;
* the 100 MHz clock used to convert the access times;
* the memory and ICAP RAM sizes;
* the UART and interrupt-controller details.

Not reproduced:
* **Element execution time.** The source measured about 431 µs per block. Here a round
  takes 16 cycles.
* **Reconfiguration times.** The source reports 2.16 to 2.93 ms for an embedded
  reconfiguration. Those times depend on bitstream sizes that are not known. At 50 ns
  per word, 2.2 ms of pure streaming would mean roughly 43,000 words. That is larger
  than the default memory, so real bitstreams need a larger `MEM_WORDS` and several
  refills of the ICAP RAM.
* **The controller and scheduler software.** This includes the deadline watching and
  the list-based rescheduling. Both run on the processor, which is outside the RTL.
  There is no timer block; the processor would use its own.
* **Real configuration data.** Readback returns three status words that stand in for
  frame data. The model keeps no frames.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. Each one has a watchdog.
Example with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_caronte_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/caronte_pkg.sv rtl/md5_pkg.sv \
  tb/tb_caronte_top.sv -o sim && ./obj_dir/sim
```

| testbench | what it covers |
|-----------|----------------|
| `tb_caronte_top` | All defaults. MD5("abc") through HW-SSP 0..6. Checks the area contents at each photo, the digest, 7 reconfigurations, 6 end-of-execution and 8 ICAP end interrupts (7 reconfigurations and one readback), spooling with logic lock in 5 reconfigurations, ICAP busy stalls, the memory wait states, an unmapped access, the RS232 loopback, and a readback of the area holding PE-F. Under a second. |
| `tb_caronte_three` | `N_BB=3`, the size of the architecture drawing. Two BlackBoxes spool and lock at the same time while the third is rewritten; the full A..F chain across three areas; readback. |
| `tb_caronte_batch` | All defaults. 9 data sets per element, checked against a reference MD5 compression in the testbench. |
| `tb_blackbox` | Empty-message digest through one BlackBox, reconfiguration during a computation, spool and lock. |
| `tb_bb_comm_if`, `tb_spooler` | Interface registers, order kept across spooling, lock, error flag; FIFO against a queue model. |
| `tb_md5_pe` | The six elements against a reference, the cycle counts, lock. |
| `tb_icap_ctrl`, `tb_icap_cfg_model` | Byte stream and busy handling, rate of 5 cycles per word, readback into the RAM; bitstream parsing, check errors, readback words. |
| `tb_bus_decoder`, `tb_plb2opb_bridge`, `tb_bit_mem`, `tb_intc`, `tb_uart_rs232` | Decoding and latency, bridge latency, 2/14-cycle memory timing, interrupt registers, UART framing and overrun. |

To add an element, give it a new `pe_id_t` value, implement its behaviour in `md5_pe`
(or in a sibling module selected in `blackbox`), and give the configuration model a
bitstream whose header names it.
