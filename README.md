# Seven-channel DMA with layered clock gating

A DMA controller's registers are clocked on every cycle, but most of them are idle most of
the time. This happens when no transfer is running, when six of the seven channels are
unused, and when a register is not being loaded. This design is a seven-channel DMA built so
that none of those registers sees a clock edge it does not need. It uses three
clock-gating schemes, nested one inside the other:

| scheme | what it stops | opened by |
|---|---|---|
| **GCG**: global clock gating | the clocks of all channels and of the controller | software enable, a transfer still in flight, a channel being armed, reset |
| **CCG**: channel clock gating | the clock of each unused channel; the controller's clock when no channel requests | arming, requesting or stepping that channel; any request or a busy controller; reset |
| **m-FGCG**: modified fine-grain clock gating | the clock of each individual register | that register's load condition **or reset** |

The "modified" part of m-FGCG is the last column. A register under ordinary fine-grain
gating gets no clock edge unless its load enable is high. If that register also has a
synchronous reset, the reset would then be lost. Here the reset is ORed into every gate
enable, so a reset always reaches every register, whatever its load enable.

Functionally the DMA is conventional. The CPU programs a source address, a destination
address and a word count into a channel, then arms it. The controller then takes the
single memory bus from the CPU, copies the block and raises a done flag and an interrupt.

## Clock tree

```
clk ──┬─────────────────────────────── dma_regs (every register m-FGCG gated), bus_switch
      │
      └─[ICG: GCG]── clk_dma ──┬─[ICG: CCG ch0]── clk_ch[0] ── dma_channel 0 (registers m-FGCG gated)
                               ├─ ...                              ...
                               ├─[ICG: CCG ch6]── clk_ch[6] ── dma_channel 6
                               └─[ICG: CCG dmac]─ clk_dmac ─── dmac (arbiter + transfer FSM)
```

Each gate is an `icg_cell`: a latch that is transparent while the clock is low, followed by
an AND. The enable is therefore frozen during the high phase and the gated clock cannot
glitch. It rises on the same edge as `clk`, in every cycle whose enable was high just
before that edge. The rules that follow from this:

* All gated flops share the rising edge of `clk`. Data passes between gated and ungated
  flops as in a single-clock design. Signals that feed a gate enable must settle during
  the low phase.
* The register file and the bus switch stay on the free clock, behind their own m-FGCG
  gates. Software can therefore always write the global enable, even while GCG has
  stopped the rest of the DMA.
* GCG stays open while the controller is busy. Clearing the global enable during a
  transfer lets the transfer finish and then stops the clock. The controller never freezes
  while it owns the bus.
* Writing a channel's CTRL register opens GCG and that channel's CCG gate for the write
  cycle. A channel can therefore be armed while the DMA is disabled. It then waits, armed,
  until the DMA is enabled.
* Every gate is open during reset, so all synchronous resets take effect.

The `dma_top` outputs `dma_clk_on`, `dmac_clk_on` and `ch_clk_on[6:0]` are the gate
enables. Counting the cycles each is low gives the fraction of gated cycles per domain,
which is the usual first estimate of the clock power saved.

## Moving data

`dmac` runs this state machine on the controller clock:

```
IDLE ──any request──> HOLD ──hlda──> READ ──> WRITE ──┬─ same channel still requests, words left ─> READ
                                                        └─ otherwise ─> DONE ──> IDLE
```

* **Arbitration.** Only one channel moves data at a time. In IDLE, `dma_arbiter` picks the
  lowest-numbered requesting channel (fixed priority, channel 0 highest). The controller
  serves that channel until its block ends.
* **Bus sharing.** Memory has one address bus and one data bus. The controller raises
  `hold`. The bus switch answers with `hlda` one clock later and routes the controller's
  requests to memory. While `hlda` is high, a CPU access gets `cpu_wait` and must be held.
* **Per word.** READ drives the source address. Memory returns the word one cycle later,
  and WRITE stores it at the destination address and steps the channel. This takes two
  cycles per word, with the bus held for the whole block (block mode).
* **Device pacing.** A channel with `hw_req` set requests only while its `dreq` input is
  high. If `dreq` drops in the middle of a block, the controller finishes the current word,
  releases the bus and arbitrates again. The CPU can use memory in the meantime.
* **Fixed addresses.** Clearing `src_inc` or `dst_inc` keeps that address fixed. This is
  how a device data register is read or written for an I/O-to-memory or memory-to-I/O
  transfer.

### Timing

For a block of *n* words on an otherwise idle DMA:

* The controller is busy for 2*n* + 3 cycles: two HOLD cycles, 2*n* transfer cycles and one
  DONE cycle.
* The done flag, and `irq` if enabled, is set by the (2*n* + 3)-th rising edge after the
  edge that wrote CTRL.

The testbenches check both numbers.

## Programming model

Registers are 32 bits wide and addressed by word. They are read combinationally and written
in a single cycle.

| address | name | fields |
|---|---|---|
| `0x00` | GCTRL | bit 0: global enable (opens GCG) |
| `0x01` | STATUS | bits 6:0: done flag per channel. Write 1 to clear. A flag set in the same cycle as a clear wins. |
| `0x02` | IRQEN | bits 6:0: `irq` = OR of (STATUS & IRQEN) |
| `0x10 + 4i` | SRC *i* | source word address |
| `0x11 + 4i` | DST *i* | destination word address |
| `0x12 + 4i` | CNT *i* | word count, 16 bits |
| `0x13 + 4i` | CTRL *i* | bit 0: start (write 1 to arm), bit 1: `src_inc`, bit 2: `dst_inc`, bit 3: `hw_req`. A read returns bit 4 = busy. |

The usual sequence is: write SRC, DST and CNT, then write CTRL with bit 0 set. Arming
copies the setup into the channel's working registers, so the CPU may reprogram SRC, DST
and CNT for the next block at once. Arming with a count of 0 sets the done flag
immediately.

## Where the RTL comes from and how far to trust it

The following are taken from the design this RTL describes:

* seven channels, with only one moving data at a time;
* one address bus and one data bus, which the CPU and the DMA use in turn;
* the three gating schemes and their conditions: reset as an extra gate enable; a channel's
  clock gated while it is unused; the controller's whole clock gated while no channel is
  requested; a global gate over everything.

The description did not define everything. These are this implementation's own choices:

* the register map;
* the 32-bit address and data widths and the 16-bit count;
* the hold/acknowledge bus handshake;
* one-cycle memory reads;
* the state sequence, block mode and fixed priority;
* the exact terms that open each gate;
* synchronous reset.

The controller this design is modelled on may differ in any of these. In particular, it
may support more transfer modes (single-word and demand modes, for example) or a different
priority scheme. The power reductions reported for the original controller cannot be
reproduced from this RTL, because they depend on a gate-level power flow.

Each module has a self-checking testbench in `tb/`. Every testbench has also been run
against a deliberately broken copy of its module, and each broken copy failed. Assertions
check the bus rules: the DMA drives the bus only while it owns it, and at most one channel
is stepped per cycle.

## Files

| file | role |
|---|---|
| `rtl/dma_pkg.sv` | widths, register map, `ch_cfg_t`, `mem_req_t`, controller states |
| `rtl/icg_cell.sv` | latch-based clock gate |
| `rtl/mfgcg_reg.sv` | register with its own gate, opened by load enable or reset |
| `rtl/gcg_unit.sv` | global gate |
| `rtl/ccg_unit.sv` | seven channel gates and the controller gate |
| `rtl/dma_regs.sv` | CPU register file |
| `rtl/dma_channel.sv` | per-channel working addresses, count and request |
| `rtl/dma_arbiter.sv` | fixed-priority channel choice |
| `rtl/dmac.sv` | transfer state machine |
| `rtl/bus_switch.sv` | CPU/DMA bus multiplexer with hold/hlda |
| `rtl/dma_top.sv` | the whole DMA |
| `tb/mem_model.sv` | behavioural memory used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. To run the
end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dma_top \
    rtl/dma_pkg.sv tb/tb_dma_top.sv tb/mem_model.sv -y rtl
./obj_dir/Vtb_dma_top
```

`tb_dma_top` drives the default configuration end to end. It covers:

* reset opening every gate;
* CPU memory traffic while GCG has stopped the DMA;
* a channel armed while the DMA is disabled;
* timed blocks of 1, 5 and 9 words, with the CPU stalled meanwhile;
* three channels pending at once, served in priority order;
* a device-paced transfer from a fixed address, during which the bus is released;
* a zero-length arm;
* a reset in mid-transfer.

It counts how often each of these happened and fails if one never did. To run a
single-module testbench, replace the top module and testbench file in the command above.
`tb_dmac` and `tb_dma_top` also need `tb/mem_model.sv`.

The latches in `icg_cell` are intended: they are the storage of the clock gates. Lint and
synthesis tools report one latch per gate.
