# PCIe-to-DDR3 backbone for an LLRF digitizer board

This is the FPGA-side plumbing of a digitizer card used in accelerator
radio-frequency control. A host CPU talks to the card over PCI Express (x4, Gen 1,
125 MHz user clock). Over that link the host can:

* read and write a small bank of control/status registers,
* move blocks of data from host memory into the card's DDR3 memory (**DMA write**),
* move blocks from DDR3 back to host memory (**DMA read**).

The card's ADCs write sample blocks into the same DDR3 memory. An arbiter decides
who gets the memory when both software and the ADCs want it.

The vendor pieces are not included:

* the PCIe hard block,
* the DDR3 memory controller and PHY,
* the DRAM itself.

The design meets those pieces at standard interfaces. The PCIe side is a 64-bit
AXI4-Stream receive/transmit pair. The memory side is a 256-bit AXI4 master port.
Everything here is therefore the transaction-layer logic between them:

* building and decoding TLPs,
* the register file,
* the DMA engine and its read FIFO,
* AXI width conversion, arbitration and clock conversion,
* the ADC block writer,
* the DDR3 command encoding fix used inside the memory controller.

```
 PCIe core rx ──► ingress ──► reg_file ──────────────┐ (register values, start pulses)
   (64-bit         │  │                               ▼
    AXI4-Stream)   │  └─ read request ──► egress ──► PCIe core tx
                   │                        ▲
                   └─ CplD payload ──► dma_engine ──► AXI4 64-bit ─┐
                                          │                        ▼
                    sync_fifo ◄── read data                axi_interconnect ──► AXI4 256-bit
                   (DMA read FIFO) ──► egress (MWr)         (up/down sizer,        to memory
                                                              arbiter, 1:2          (mem_clk)
                                                              clock converter)
                          adc_daq ──► AXI4 256-bit ──────────────┘
```

Top module: `ess_backbone_top`. Two clocks drive the design:

* `clk`, the 125 MHz PCIe user clock, for everything except the memory port;
* `mem_clk`, the memory interface's AXI clock at twice that rate (250 MHz), for
  the `m_*` port only.

All resets are synchronous and active low. `mem_rst_n` is the interconnect reset
brought into `mem_clk`.

## How a TLP sits on the 64-bit stream

Every TLP here has a 3-DW header, since only 32-bit addresses are used. On a
64-bit stream this puts the payload half a word out of phase:

| beat | bits 63:32            | bits 31:0                      |
|------|-----------------------|--------------------------------|
| 0    | DW1 (requester ID, tag, byte enables / completer ID, byte count) | DW0 (fmt, type, TC, attr, length) |
| 1    | payload DW 0          | DW2 (address / requester ID, tag, lower address) |
| 2    | payload DW 2          | payload DW 1                   |
| …    | …                     | …                              |
| last | unused (`tkeep=0x0F`) | payload DW n-1                 |

Within a DW, the PCIe header layout is kept: byte 0 of the header is in bits
31:24. The `{fmt,type}` codes used are MRd 0x00, MWr 0x40 and CplD 0x4A.

Two consequences drive the design:

* **Ingress realigns incoming payload.** For a CplD carrying DMA-write data, each
  64-bit word the DMA engine receives is `{low DW of this beat, high DW of the
  previous beat}`. The payload therefore reaches memory as whole 64-bit words, in
  order.
* **Egress misaligns outgoing payload.** An MWr carrying 16 FIFO words (128 bytes)
  needs 18 beats:
  * H1: `{DW1,DW0}`
  * H2: `{word0.lo, address}`
  * 15 beats of `{word[k].lo, word[k-1].hi}`
  * a final half beat `{–, word15.hi}`

  The final half beat is sent from `BUBBLE_STATE` when another packet follows. At
  125 MHz, 128 bytes every 18 cycles is 847 MiB/s. That is the read throughput
  this architecture is known for, and `tb_egress` checks the 18-cycle spacing.

## Ingress (`rtl/ingress.sv`)

Ingress is a state machine with states `RST_STATE`, `MEM_WR32`, `MEM_RD32`,
`W8_STATE` and `DMA_RECEIVE_DATA`. It decodes the first beat of each TLP and acts
on three kinds:

* **MWr with length 1** is a register write. The index is the BAR byte address
  bits [13:2]. The write enable reaches the register file one cycle after the
  second beat. The FSM then spends one cycle in `W8_STATE`.
* **MRd** is a register read. The index and the requester fields (ID, tag, TC,
  attributes, lower address) go to egress with `req_comp`. Ingress stalls the
  stream in `W8_STATE` until egress reports `comp_done`.
* **CplD** is DMA-write payload. Words are passed to the DMA engine until
  `tlast`. The stream stalls whenever the DMA engine stalls.

Every other TLP is drained and ignored, including MWr longer than 1 DW and 4-DW
headers.

## Egress (`rtl/egress.sv`)

Egress builds every upstream TLP. It has three jobs:

1. **Completions.** In `RST_STATE` the register file is already being read at the
   requested index. The first completion beat goes out in the same cycle as
   `req_comp`. `CPL_STATE_QWS` sends `{data, DW2}` and pulses `comp_done`. A
   pending completion is always served before a pending DMA start.
2. **DMA read, memory to host** (write 0x1 to 0x204).
   * `DMA_TRAN_H1` waits until the FIFO holds the whole next payload
     (`min(remaining, 128)` bytes). Once a header is sent, data follows without a
     gap.
   * The host address advances by 128 bytes per packet.
   * After the last packet, `rd_dma_done` sets IRQ status bit 0.
3. **DMA write, host to memory** (write 0x1 to 0x214). One MRd asks the host for
   the whole DMA WRITE LEN. The completion returns through ingress.

Register 0x205 bit 0 swaps the two bytes of every 16-bit sample on the way out.
`tx_tvalid` and the beat contents never depend on `tx_tready`.

## DMA engine and read FIFO (`rtl/dma_engine.sv`, `rtl/sync_fifo.sv`)

The DMA engine is a five-state machine: `RST_STATE`, `DMA_READ_TO_ROOT`,
`DMA_W8_STATE`, `DMA_AW_STATE` and `DMA_WR_FROM_ROOT`.

**Reads.** `DMA_READ_TO_ROOT` issues one 64-bit INCR burst of at most 128 bytes
per future MWr packet. Several bursts may be in flight at once. `pipe_counter`
counts bursts whose last beat has not arrived, and `DMA_W8_STATE` waits for it to
reach zero. Read data goes straight into the DMA read FIFO. R is stalled while the
FIFO is full. The FIFO is 512 × 64 bits with first-word fall-through and a fill
count.

**Writes.** `DMA_AW_STATE` issues a single AW for the whole length.
`DMA_WR_FROM_ROOT` forwards ingress words onto W, with `wlast` taken from a beat
count. Each B response raises IRQ status bit 1.

Limits:

* Lengths must be multiples of 8 bytes.
* A DMA write is one MRd and one burst, so a write longer than the 128-byte
  maximum payload would need the host to split the completion. This is not
  supported.
* Software does large writes in 64-byte pieces, re-arming 0x210–0x214 each time.

## Register map (`rtl/reg_file.sv`)

The index is the byte offset / 4. Reads are combinational, so completions cost
no wait state. All registers reset to 0 unless noted.

| index | access | meaning |
|-------|--------|---------|
| 0x000 | R | firmware ID, 0x83012808 |
| 0x010 | R/W | write 0x1: start an ADC acquisition. Read: bit 0 = acquisition busy |
| 0x011 | R/W | ADC sample control: bits [9:0] enable channels 1–10 |
| 0x020 | R/W | memory manual reset: bit 0 holds the interconnect (and `mem_reset`) in reset until 0 is written |
| 0x021 | R | bit 2 memory init done, bit 1 link up, bit 0 bus master enable |
| 0x0FF | W | write 0x1: every register back to its reset value |
| 0x120–0x129 | R/W | ADC channel 1–10 start block (256-bit block number) |
| 0x12A | R/W | 256-bit blocks per channel per acquisition |
| 0x200 / 0x201 | R/W | DMA read: host address low / high (high half unused) |
| 0x202 | R/W | DMA read: DDR3 source address |
| 0x203 | R/W | DMA read: length in bytes |
| 0x204 | R/W | write 0x1: start DMA read |
| 0x205 | R/W | bit 0: swap bytes of 16-bit samples on DMA read |
| 0x210 / 0x211 | R/W | DMA write: host source address low / high (high half unused) |
| 0x212 | R/W | DMA write: DDR3 destination address |
| 0x213 | R/W | DMA write: length in bytes |
| 0x214 | R/W | write 0x1: start DMA write |
| 0x220 | R/W | IRQ enable |
| 0x221 | R | IRQ status: bit 15 user, bit 14 DAQ done, bit 1 write DMA done, bit 0 read DMA done |
| 0x222 | W | IRQ clear: write 1s to clear status bits |
| 0x400–0x4FF | R/W | 256 user registers |

`irq` is the OR of the enabled status bits. A status bit that is set and cleared
in the same cycle stays set. An unmapped index reads 0.

## Memory side: width conversion and arbitration

`axi_interconnect` has two parts.

**Port S0 (DMA, 64-bit)** passes through two converters:

* `axi_upsizer` packs 64-bit write beats into 256-bit beats by address lane, with
  strobes for the lanes actually filled.
* `axi_downsizer` splits 256-bit read beats back into 64-bit beats. It runs at one
  64-bit beat per cycle in steady state.

Both converters re-issue the burst 32-byte aligned with size 5 and handle one
burst at a time.

**Port S1 (256-bit)** has two uses:

* its write channel belongs to the ADC writer;
* its read channel is a spare port, brought out of the top as `aux_*`.

Both ports meet in `axi_arbiter`. Writes and reads are arbitrated separately.
The policy is `ROUND_ROBIN = 1` (equal priority, alternating when both wait) or
fixed priority for `PRIO_MASTER`. A grant is held until the write's B response,
or the read's last R beat, has gone back. The loser waits with its ready signals
low, and `arb_delayed` shows which master is being held back.

**Clock conversion.** The granted 256-bit port then crosses to the memory clock in
`axi_clock_converter`. Each of the five AXI channels gets its own `async_fifo`:

* 8 entries deep;
* Gray-coded pointers behind two-flop synchronizers;
* valid on the far side while the FIFO is not empty, ready on the near side
  while it is not full.

The converter works for any clock ratio. The memory side's reset is the
interconnect reset through a two-flop synchronizer. It therefore starts and ends
two `mem_clk` cycles after the PCIe side's. Apply it (through register 0x020 or
`rst_n`) only while no transfer is in flight. In the middle of a burst the two
halves can briefly disagree on the FIFO contents.

## ADC writer (`rtl/adc_daq.sv`)

An acquisition starts when 0x1 is written to register 0x010. For each of
`blk_len` blocks, the writer:

* collects 16 consecutive 16-bit samples from every channel on the common
  `adc_valid` strobe (sample *i* in bits [16*i*+15:16*i*]);
* writes the block of each enabled channel as one 256-bit beat to byte address
  `(start_blk[ch] + block) * 32`.

Samples that arrive while blocks are being written are not stored. They are
counted in `adc_dropped`, so memory latency sets the gaps between blocks. At the
end, `daq_done` sets IRQ status bit 14. The ADC clock domains of the board are
taken to be already synchronised to the system clock.

## DDR3 command encoder (`rtl/ddr3_cmd_encoder.sv`)

This block registers the CS#/RAS#/CAS#/WE#/A10 pins for the DDR3 command set. On
this board CS# is tied low, so the "command inhibit" state cannot be driven. With
`CS_TIED_LOW = 1` the encoder sends NOP instead, which has the same effect on the
DRAM. In a real build this sits inside the vendor memory controller. Here it is
a stand-alone block with its pins brought out of the top.

## Where this design departs from, or fills in, the original

* **Interconnect built from scratch.** The original uses the vendor's AXI
  interconnect for width conversion, arbitration and the 1:2 clock conversion.
  Here all three are separate blocks of this design. The clock crossing sits
  after the arbiter, on the 256-bit side.
* **Register-level conflicts resolved.**
  * DMA reads start from 0x204 and DMA writes from 0x214.
  * 0x210 is the host address and 0x212 the DDR3 address. The register summary of
    the original swaps those names, but its register descriptions do not.
* **Register behaviour added.** The original leaves these unspecified:
  * the busy bit in 0x010;
  * the channel enables in 0x011;
  * the byte-swap lane order;
  * the IRQ set-over-clear rule.
* **`BUBBLE_STATE`.** The original names this egress state without describing
  it. Here it sends the half-filled last beat of every non-final packet, which
  produces the documented 18-cycle packet period.
* **ADC writer internals** (sample width, block packing, write order, dropping
  samples while writing) are this design's own. The original gives only the
  registers and the interrupt.
* **Not included.** The vendor parts are left out: the PCIe core, the memory
  controller/PHY with its initialisation and calibration sequence, and the DRAM.
  Their signals are ports of the top.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a cycle-count watchdog.
`tb/axi_mem_model.sv` is a behavioural 256-bit AXI memory that stalls at random,
used in place of the DDR3 interface. In the interconnect, converter and top tests
it runs on its own, faster clock. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ess_pkg.sv tb/tb_ess_backbone_top.sv --top-module tb_ess_backbone_top -o sim
./obj_dir/sim
```

Substitute any other `tb_*` for a single block.

`tb_ess_backbone_top` runs the top at its default parameters, with a 125 MHz
`clk` and a 250 MHz `mem_clk`. A host model sends
register TLPs, answers read requests from a host memory array and collects MWr
data. The test covers:

* register access and the master reset;
* a 64-byte DMA write;
* a 512-byte (4-packet) DMA read under transmit back-pressure, plus a swapped read;
* a 10-channel ADC acquisition competing with a DMA write;
* a read on the spare port;
* interrupts, the memory reset and the NOP substitution.

Each of these mechanisms is counted, and one that never happens is a failure.

The unit testbenches compare against models written independently of the RTL:

* `tb_egress`: packet-by-packet expected beats, including the 18-cycle cadence;
* `tb_ingress`: mixed and ignored TLPs;
* `tb_dma_engine`: burst addresses, several bursts in flight, queued starts;
* `tb_axi_upsizer` and `tb_axi_downsizer`: byte-level reference memory, full-rate
  check;
* `tb_axi_arbiter`: both policies, alternation and fixed-priority wins;
* `tb_axi_interconnect`: both ports at once, memory on an unrelated clock;
* `tb_axi_clock_converter`: bursts at a 1:2 clock ratio, with slow readers that
  fill the read-data FIFO;
* `tb_async_fifo`: data order and full/empty, with either clock the faster;
* `tb_adc_daq`: sample continuity and the dropped-sample count;
* `tb_reg_file`: register-map model;
* `tb_sync_fifo`: FIFO model;
* `tb_ddr3_cmd_encoder`: the command table.

Not verified here:

* behaviour against the real PCIe core and memory controller;
* completions split by the host into several TLPs;
* any timing closure, or the clock crossing under metastability (simulation
  only shows that the pointer protocol is right).
