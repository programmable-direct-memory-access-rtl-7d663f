# Eight-channel programmable DMA controller with AHB ports

This controller moves data between memory-mapped locations without the CPU doing the work.
Eight independent channels each watch a trigger source. When a trigger comes, the
controller halts the CPU, takes the system bus as an AHB master and copies bytes or 16-bit
words from a source address to a destination address. It then gives the bus back. The CPU
only programs the registers (through an AHB slave port) and handles the interrupt at the end.

The programming model is the MSP430-style DMA module: per channel a control word
(`DMAxCTL`), a 20-bit source address (`DMAxSA`), a 20-bit destination address (`DMAxDA`) and a
transfer count (`DMAxSZ`). On top of that come global trigger selects, fixed or round-robin
priority, and a prioritised interrupt vector (`DMAIV`). There are eight channels, and both ports are
AMBA AHB.

## Block structure

```
            AHB slave (CPU)                                    AHB master (memory)
                 |                                                    ^
          dma_ahb_slave --reg bus--+--------------------+             |
                 |                 |                    |             |
          dma_global_regs      dma_channel x8 <--take-- dma_ahb_master
          (DMACTL0..4)           ^    | req/hold/xfer        ^
                 | tsel          |    v                      | grant
                 +--> dma_trigger x8  dma_arbiter -----------+
 dma_trig[8][32] ---->  (edge/level)        (fixed / round robin)
                                     dma_halt_ctrl --> halt_cpu   (DMARMWDIS, NMI)
                                     dma_iv        --> DMAIV, dma_irq
```

| Module | Role |
|---|---|
| `dmac_pkg` | Shared types: the `DMAxCTL` bit fields as a packed struct, the transfer-mode and increment enums, the transfer descriptor, and the address-step helper. |
| `dma_trigger` | Selects one of 32 lines with the channel's 5-bit `DMAxTSEL`, registers it once, and reports a rising edge or a high level. |
| `dma_channel` | The channel's registers, its temporary registers and its transfer-mode state machine. |
| `dma_arbiter` | Chooses the channel for the next transfer. |
| `dma_ahb_master` | The bus engine: one read and one write per transfer, two cycles per transfer. |
| `dma_ahb_slave` | The register port for the CPU. |
| `dma_global_regs` | `DMACTL0..3` (trigger selects) and `DMACTL4` (`DMARMWDIS`, `ROUNDROBIN`, `ENNMI`). |
| `dma_iv` | Interrupt vector and the combined interrupt line. |
| `dma_halt_ctrl` | Halt-CPU line, the read-modify-write hold-off and NMI abort. |
| `dma_cntrl` | The top level. It wires all of the above together. |

## Register map

The register port decodes `haddr[7:0]`. The registers are 16 bits wide and little endian.
Two of them share each 32-bit bus word. Byte, halfword and word accesses all work.

| Address | Register | Contents |
|---|---|---|
| 00h | DMACTL0 | bits 12:8 DMA1TSEL, bits 4:0 DMA0TSEL |
| 02h / 04h / 06h | DMACTL1..3 | DMA3/2TSEL, DMA5/4TSEL, DMA7/6TSEL |
| 08h | DMACTL4 | bit 2 DMARMWDIS, bit 1 ROUNDROBIN, bit 0 ENNMI |
| 0Eh | DMAIV | read only: 00h none, 02h channel 0 ... 10h channel 7 |
| 10h+16n + 00h | DMAnCTL | see below |
| 10h+16n + 02h/04h | DMAnSA | bits 15:0 at 02h, bits 19:16 at 04h |
| 10h+16n + 06h/08h | DMAnDA | bits 15:0 at 06h, bits 19:16 at 08h |
| 10h+16n + 0Ah | DMAnSZ | number of transfers, 0 = none |

Writing the low half of `SA` or `DA` clears bits 19:16. To load a 20-bit address, write the
low half first and then the high half.

`DMAxCTL` bits:

| Bits | Field | Meaning |
|---|---|---|
| 14:12 | DMADT | 000 single, 001 block, 01x burst-block, 100 repeated single, 101 repeated block, 11x repeated burst-block |
| 11:10 | DMADSTINCR | 0x unchanged, 10 decrement, 11 increment |
| 9:8 | DMASRCINCR | same encoding, for the source |
| 7 / 6 | DMADSTBYTE / DMASRCBYTE | 1 = byte, 0 = 16-bit word |
| 5 | DMALEVEL | 0 rising edge, 1 high level |
| 4 | DMAEN | enable |
| 3 | DMAIFG | interrupt flag |
| 2 | DMAIE | interrupt enable |
| 1 | DMAABORT | set by an NMI abort |
| 0 | DMAREQ | write 1 for a software trigger; always reads 0 |

Addresses step by 1 for bytes and by 2 for words. Because increment and decrement are
chosen separately for source and destination, there are four addressing modes: fixed to
fixed, fixed to block, block to fixed and block to block. A byte copied into a word is padded
with zeros. A word copied into a byte keeps its low byte.

### Programming a transfer

To copy 64 words from 01000h to 02000h on channel 0, started by trigger line 3:

1. Write 0003h to `DMACTL0` (`DMA0TSEL` = 3).
2. Write 1000h to 12h, then 0000h to 14h (`DMA0SA`). Write 2000h to 16h, then 0000h to
   18h (`DMA0DA`).
3. Write 64 to 1Ah (`DMA0SZ`).
4. Write 1F14h to 10h (`DMA0CTL`): block mode, both addresses increment, words, rising edge,
   `DMAEN` and `DMAIE`.

A rising edge on line 3 then starts the block. When it is done, `dma_irq` rises and
`DMAIV` reads 02h.

## How a channel runs

This is the core of the design, in `dma_channel`.

1. **Enable.** Setting `DMAEN` copies `SA`, `DA` and `SZ` into the hidden registers
   `T_SourceAdd`, `T_DestAdd` and `T_Size`. The channel goes to WAIT. If `DMAxSZ` is 0, the
   channel never transfers.
2. **Trigger.** In WAIT the channel takes a rising edge of its selected line when
   `DMALEVEL=0`, or a high level when `DMALEVEL=1`. A software `DMAREQ` also counts. While
   `DMAABORT` is set, the channel ignores triggers.
3. **Transfer.** In ACTIVE the channel requests the bus. Each accepted transfer (`take`)
   steps the temporary addresses and decrements the visible `DMAxSZ`.
   - *Single* modes return to WAIT after every transfer, so each transfer needs its own trigger.
   - *Block* modes stay ACTIVE until the count is used up. Triggers that arrive during the
     block are ignored.
   - *Burst-block* modes behave like block, but after every 4 transfers the channel enters
     SLOT. It stays there until the CPU has owned the bus for 2 cycles, so the CPU keeps about
     20 % of the bus.
4. **End of count.** When `DMAxSZ` reaches zero, the channel sets `DMAIFG`.
   - `DMAxSZ` is reloaded from `T_Size`.
   - The temporary addresses are reloaded from `SA`/`DA`.
   - The non-repeated modes clear `DMAEN`.
   - Repeated single and repeated block go back to WAIT.
   - Repeated burst-block starts again at once, and runs until software clears `DMAEN`.
5. **Level pause.** A level-sensitive block or burst-block pauses while its trigger is low.
   It keeps all of its state and resumes where it stopped.
6. **NMI.** With `ENNMI=1`, a rising edge on `nmi` lets the transfer already on the bus
   finish. It then stops every active channel and sets their `DMAABORT`. The channels stay
   enabled, but take no trigger until software clears `DMAABORT`.

The channel updates its counters when the engine *accepts* a transfer. It does not wait
for the transfer to finish. This early update is what lets the next transfer be chosen while
the current write is still on the bus.

## Bus engine timing

Each transfer is one AHB read and one AHB write. Both are `SINGLE`/`NONSEQ`, 8 or 16 bits
wide. The engine overlaps them using the AHB address/data pipeline:

```
cycle        1            2                    3                    4
address      RD src(k)    WR dst(k)            RD src(k+1)          WR dst(k+1)
data                      read data k          write data k         read data k+1
```

A block of N transfers therefore needs 2·N cycles from the first read address to the last
write. That is the "two clock cycles per transfer" (2 × MCLK × DMAxSZ) rate of the design.
The end-to-end test measures 128 cycles for 64 transfers.

The first read of a block comes 2 to 3 cycles after the trigger line rises: one cycle for the
synchroniser and one for the channel state. Wait states (`hready_i` low) stretch any phase.
If a read address phase is stalled, the engine latches the channel it chose, so the address
stays stable; an assertion checks this rule. `do_hmasterlock` is held across the read and
write of one transfer. Write data is copied onto every byte lane.

## Priority, halting and interrupts

- **Priority** (`dma_arbiter`): with `ROUNDROBIN=0`, channel 0 is highest and channel 7
  lowest. With `ROUNDROBIN=1`, the channel just served becomes the lowest. A channel in the
  middle of a block or burst-block keeps the bus against all others. During a level pause or
  a CPU slot, other channels may be served.
- **Halt** (`dma_halt_ctrl`): `halt_cpu` is high while the engine has a transfer in flight
  or a channel requests one. With `DMARMWDIS=1`, no transfer starts while the CPU raises
  `cpu_rmw` (a read-modify-write in progress). With `DMARMWDIS=0`, the CPU is halted at once.
- **Interrupts** (`dma_iv`): `dma_irq` is high while any channel has both `DMAIFG` and
  `DMAIE` set. `DMAIV` shows the lowest-numbered such channel as 2·(n+1). Any read or write
  of `DMAIV` clears that channel's flag. The CPU's global interrupt enable is left to the CPU.

## Departures from the description, and choices made here

- The register blocks sit at fixed addresses: 00h for the global registers, and 10h + 16·n
  for channel n. The original only gives offsets within each block.
- The pin list of the original has no `hwrite`, `hready` or `hresp`. They are added
  because AHB needs them.
- Several pins are dropped because no function is given for them: `hmaster`, `hmasterlock`
  (as inputs), `do_hmaster`, `do_hsel`, `do_hrdata`, and the single-bit `dma_source`,
  `dma_destination`, `dma_beat_count` and `dma_enb`. Source, destination, count and enable
  are set through registers instead.
- `cpu_rmw` and `nmi` are new inputs. They carry the CPU information that `DMARMWDIS` and
  `ENNMI` need.
- A "word" is 16 bits (addresses step by 2), so word transfers use `hsize`=1.
- Any trigger line may be used level-sensitively. The original recommends this only for
  the external trigger.
- The original's clock system details (restarting MCLK in low-power modes, the extra cycles
  of its cycle-time table) are not modelled. The controller runs on `hclk`.
- The block hold in the arbiter, the early counter update, the write-lane replication and
  the reset-to-zero of every register are this design's own choices.
- The FPGA area and timing figures published for the original cannot be compared: they
  belong to another implementation, device and tool.

## Simulating

Every testbench is self-checking. It ends by printing `TB_RESULT checks=N failures=M`.
Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/dmac_pkg.sv \
          tb/tb_dma_cntrl.sv --top-module tb_dma_cntrl -o sim
./obj_dir/sim
```

| Testbench | What it covers |
|---|---|
| `tb_dma_cntrl` | The whole controller at its default size: an AHB CPU model programs it and an AHB memory model (`tb_ahb_mem`) serves the master port. It checks block timing, single with edge triggers, burst-block CPU slots, every byte/word and fixed/block address combination, wait states, repeated block with a level pause, fixed against round-robin priority, NMI abort, the DMAIV sequence and DMARMWDIS. It counts each of these mechanisms and fails if any never occurred. |
| `tb_dma_workloads` | The largest loads: one 65535-word block (all data checked; it must take exactly 131070 cycles), and all eight channels triggered at once under fixed priority (whole blocks in channel order) and round robin (strict rotation). |
| `tb_dma_channel` | All DMADT modes, edge and level triggers, abort, DMAxSZ = 0 and DMAREQ, with address checks on every transfer. |
| `tb_dma_ahb_master` | The two-cycle block rate, plus 300 random mixed-width transfers with random wait states. |
| `tb_dma_ahb_slave` | Random byte/halfword/word register traffic against a byte model. |
| `tb_dma_trigger`, `tb_dma_arbiter`, `tb_dma_iv`, `tb_dma_global_regs`, `tb_dma_halt_ctrl` | Each unit against a reference model. The DMAIV test is exhaustive. |

The testbenches use `$urandom` only, so no constraint solver is needed.

## Changing the design

- `NCH`, `NTRIG`, `BURST_LEN` and `CPU_SLOT` live in `dmac_pkg`.
- The register decode in `dma_cntrl` assumes at most 15 channels (4 block-select bits of
  `haddr[7:4]`). For more channels, widen `RA_W` and the block decode.
- The global register layout assumes `NCH <= 8`.
