# Single-channel AHB DMA controller

A small DMA controller for an AMBA 2.0 AHB system with one processor. It was
made for a satellite on-board computer built around a SPARC V8 processor. There
it moves data between memory and peripherals without stealing processor time,
and it can walk through memory for periodic error "washing". The controller is
both an AHB slave and an AHB master:

* as a **slave** it holds three write-only registers: source base address,
  destination base address and transfer length in bytes;
* as a **master** it copies the block one 32-bit word at a time. Each word is
  read into a buffer register, then written to the destination at the same
  offset;
* a pulse on **DMAREQ** starts a transfer and a one-cycle **DMAACK** ends it;
* **DMA_DISABLE** takes the controller off the bus completely.

The RTL is plain synthesizable SystemVerilog with no vendor primitives. The
default configuration has 32-bit words and its register window at address 0.

## Blocks

| module | role |
|---|---|
| `dma_controller` | top level: all blocks below, plus the bus arbiter |
| `dma_addr_decoder` | AHB slave front end; gives each transfer register its write enable |
| `dma_config_regs` | source, destination and length registers (three `dma_reg32`) |
| `dma_reg32` | 32-bit D register with clock enable and clear; also used as the word buffer |
| `dma_offset_counter` | byte offset within the transfer; steps by 4 and wraps at 2^32 |
| `dma_timing_control` | the transfer state machine (AHB master) |
| `dma_ahb_buffer` | output drivers: output enables per signal group, and DMA_DISABLE |
| `dma_arbiter` | combinational arbiter between the processor and the DMA |
| `dma_pkg` | HTRANS/HRESP encodings and the state type |

Data path: HRDATA → buffer register → HWDATA. The address the master drives is
`SRC_BASE + offset` for reads and `DST_BASE + offset` for writes. The state
machine reads the offset from the counter. Its only other inputs are the three
registers, the grant, and the HREADY/HRESP of the bus.

## Register map

The controller decodes its 16-byte window at `BASE_ADDR` (default `0x0000_0000`)
by itself. There is no HSEL input.

| offset | register | note |
|---|---|---|
| 0x0 | source base address | byte address of the first word read |
| 0x4 | destination base address | byte address of the first word written |
| 0x8 | transfer length | in **bytes**; 0 means nothing to do |
| 0xC | — | ignored |

The registers are write only. Reads complete with OKAY and no data. Writes
take effect at the end of the AHB data phase, and the slave never inserts wait
states. When a transfer ends, all three registers, the counter and the buffer
are cleared.

The controller's own master writes are also seen by its slave port. So a
transfer whose destination overlaps the register window rewrites the
registers while it runs. The end-to-end testbench uses this on purpose, in its
"to address 0" case.

## The transfer state machine

This is the part that needs the closest reading. Each word goes through the
same loop of states:

```
 RESET --1 clk--> IDLE --DMAREQ & LENGTH!=0--> WAIT_READ
 WAIT_READ   --HGRANT & HREADY-->  PAUSE_READ      (bus request high in WAIT_*)
 PAUSE_READ  --HREADY-->           READING         (read address phase)
 READING     --HREADY & OKAY-->    WAIT_WRITE      (word into buffer)
 READING     --HRESP != OKAY-->    WAIT_READ       (read again)
 WAIT_WRITE  --HGRANT & HREADY-->  PAUSE_WRITE
 PAUSE_WRITE --HREADY-->           WRITING         (write address phase)
 WRITING     --HREADY & OKAY-->    TEST            (offset += 4 on this edge)
 WRITING     --HRESP != OKAY-->    WAIT_WRITE      (write again)
 TEST        --done-->             IDLE            (DMAACK, registers cleared)
 TEST        --else-->             WAIT_READ
```

`done` means the offset has reached the length (`offset >= LENGTH`), or an
**address overrun**. An overrun is when the next word's source or destination
address would lie past `FFFF_FFFF`, which is a carry out of `base + offset`.
An overrun ends the transfer early, with the normal DMAACK. For example, a
12-byte transfer to `FFFF_FFF8` writes two words and stops.

Things to know when using it on a real bus:

* **Ownership.** The controller takes the address bus in the cycle after it
  sees its grant together with HREADY high. That cycle is the PAUSE state.
  PAUSE lasts as long as HREADY stays low, so a slow previous data phase only
  delays the address phase.
* **One transfer per grant.** Every AHB access is a single NONSEQ word
  transfer (HSIZE = word, HBURST = SINGLE). The bus request drops as soon as
  the address phase starts, so the processor can get the bus between the read
  and the write of every word.
* **Errors.** Any response other than OKAY (ERROR, RETRY or SPLIT) makes the
  controller repeat the same read or write, with no retry limit. It leaves
  the data phase on the first cycle that shows the non-OKAY response. A
  two-cycle ERROR therefore ends while the controller is already requesting
  the bus again. A slave that never answers OKAY keeps the controller busy
  until the bus is reset.
* **Timing.** With an immediate grant and zero-wait slaves, one word takes
  exactly 7 clock cycles, counted from the cycle that samples DMAREQ. A
  transfer of N words ends with DMAACK in cycle 7N. Each wait state, denied
  grant cycle or retried access adds to this.
* **DMAREQ** is sampled only in IDLE and is not stored. A request while a
  transfer is running is lost.

The document this design follows advances the counter on the falling clock
edge, so that the completion test sees the new offset one cycle earlier. This
design uses one clock edge. It advances the counter on the rising edge that
ends a successful write, and tests the new value in TEST. The cycle count is
the same.

## Bus interface of the top level

`dma_controller` does not contain the AHB multiplexers or any memory. Its ports:

* shared bus **inputs**: `haddr, htrans, hwrite, hwdata` (what the slaves
  see) and `hrdata, hready, hresp` (what the master sees);
* **driven outputs**, each group with an enable:
  * `m_addr_oe` with `m_haddr, m_htrans, m_hwrite, m_hsize, m_hburst`;
  * `m_data_oe` with `m_hwdata`;
  * `s_resp_oe` with `s_hready, s_hresp`.

  A value whose enable is low reads as 0 (HTRANS IDLE, HRESP OKAY). The
  surrounding bus uses the enables as the select of its multiplexer, or as
  tri-state enables;
* arbitration: `hbusreq_leon` in; `hgrant_leon`, `hbusreq_dma`, `hgrant_dma`
  out;
* control: `dmareq`, `dma_disable` in; `dmaack` out;
* observation only: `curr_state`, `current_position` (the offset) and
  `transfer_length`.

The arbiter is combinational. The DMA gets the bus only while it requests it,
the processor does not, and DMA_DISABLE is low. At all other times the
processor holds the grant, as the default master. Its `hclk` input is unused
and is there for a future registered arbiter.

When DMA_DISABLE is raised, all enables and the request and DMAACK outputs go
low at once. The state machine is not told about it. A running transfer waits
in a WAIT state, because the arbiter no longer grants it, and carries on when
the controller is enabled again.

Everything runs on the rising edge of `hclk`. `hresetn` is an asynchronous,
active-low reset. It puts the state machine in RESET, which clears the
registers for one cycle and then moves to IDLE.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. Each
one also has a watchdog. Example, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl rtl/dma_pkg.sv tb/tb_dma_controller.sv \
          --top-module tb_dma_controller -o sim
./obj_dir/sim
```

Each unit test has the same form: `tb/tb_<module>.sv` with
`--top-module tb_<module>`.

* `tb_dma_controller` runs the whole design at its default parameters. It
  surrounds the controller with:
  * a processor-side master that programs the registers and competes for the
    bus;
  * the bus multiplexer;
  * a memory slave that can add wait states and give ERROR responses.

  A reference model replays every transfer on its own copy of memory. It
  models the controller's register window too. After each DMAACK the
  testbench compares:
  * the two memories;
  * the number of words moved;
  * the cleared registers;
  * the cycle count, in the cases without contention.

  The directed cases are: single word, three words, overrun past `FFFF_FFFF`,
  destination at address 0, errors on a read and a write, wait states,
  DMA_DISABLE during a transfer, processor contention and back-to-back
  transfers. Twenty random transfers follow. The test counts each of these
  mechanisms and fails if any of them never happened. It also checks on every
  cycle that the controller drives the bus only in phases it owns, and never
  while disabled.
* `tb_dma_timing_control` runs the state machine against a scripted bus. It
  predicts every address phase and checks the 7-cycle word, the overrun of
  source and of destination, and lengths that are not a multiple of 4.
* `tb_dma_addr_decoder`, `tb_dma_config_regs`, `tb_dma_reg32`,
  `tb_dma_offset_counter`, `tb_dma_ahb_buffer` and `tb_dma_arbiter` test the
  small blocks against models, with random or exhaustive stimulus. The
  counter test also uses an 8-bit copy of the counter to show the wrap.

Concurrent assertions in the RTL check that DMAACK is a one-cycle strobe, that
there is never a bus request while the controller drives an address, that an
address phase starts only from a grant seen with HREADY, and that at most one
register enable is active. They are enabled with `--assert`.

## Where this design departs from, or adds to, its source

* **Completion test.** The original state diagram says "offset > length".
  This design stops at `offset >= length`, which gives the behaviour the
  original tests show: a length of 4 moves one word, a length of 12 moves
  three. A length that is not a multiple of 4 is rounded up to whole words.
* **Overrun** is checked on both the source and the destination address. The
  original describes only the destination case.
* **No tri-states inside.** The original register has an output enable that
  floats its output, and the bus buffer uses tri-state drivers. Here the
  registers always drive, and the buffer block produces output enables
  instead.
* **Clears are synchronous.** The state machine clears the registers, counter
  and buffer synchronously. The original calls this reset asynchronous.
* **PAUSE waits for HREADY.** The original state diagram leaves the pause
  states after one clock unconditionally.
* **Chosen here**, where the original says nothing:
  * the register window size and the self-decoding without HSEL;
  * the zero-wait OKAY slave;
  * the processor as default master in the arbiter;
  * the state encoding (only the names "idle" and "wait_write" are the
    original's);
  * the exact cycle in which the bus request falls.
* **Not built**, because they are only proposed as future improvements:
  * burst transfers with a larger buffer;
  * queues of transfer descriptors;
  * several preconfigured channels on separate DMAREQ lines;
  * a retry limit with error reporting;
  * an APB register interface.

  The processor, the system memory and the memory-washing logic are outside
  this design.

After synthesis, a few outputs are constant: `m_hburst` and `s_hresp` always,
and some bits of `m_hsize` whenever they are driven. This follows from the
single-transfer, zero-wait design.
