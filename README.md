# Quentin SoC fabric: a 520 KB heterogeneous L2 for a near-threshold microcontroller

Quentin is a single-core PULPissimo microcontroller built in 22 nm FD-SOI for IoT end nodes.
Its central idea is a **heterogeneous L2 memory**. Most of the 520 KB are SRAM. 16 KB are
**standard-cell memory (SCM)**, which is memory built from ordinary logic cells. The SCM stays
on the logic supply, works at the low voltages where the SRAM cannot, and runs faster there.
The SRAM cuts have a supply of their own. An off-chip power manager can turn them off. The chip
then runs small programs from the 16 KB of SCM alone, which is its most energy-efficient mode.

This repository holds synthesizable SystemVerilog for the SoC's memory and I/O fabric:
- the L2 banks, split into SRAM and SCM parts;
- the two L2 interconnects;
- the boot ROM;
- the APB bridge;
- a DMA engine for the peripherals (the uDMA);
- a JTAG debug bridge.

The RISC-V core, the peripheral controllers and the analog parts are not
included. Each of them attaches through ports of the top module `quentin_soc`.

## Memory organisation

| Region | Base | Size | Banks | SCM part | SRAM part |
|---|---|---|---|---|---|
| private bank 0 | `0x1C00_0000` | 32 KB | 1 | first 8 KB (3-read/2-write) | 24 KB |
| private bank 1 | `0x1C00_8000` | 32 KB | 1 | none | 32 KB |
| interleaved | `0x1C01_0000` | 456 KB | 4 x 114 KB | first 512 rows of each bank = first 8 KB of the region | 4 x 112 KB |
| boot ROM | `0x1A00_0000` | 8 KB | | | |
| APB | `0x1A10_0000` | 1 MB | | uDMA config at `0x1A10_2000` | |

The sizes and the SRAM/SCM split follow the published chip: 504 KB of SRAM and 16 KB of SCM.
The base addresses, the ROM size and the placement of the SCM inside each bank are this
design's choices. The SCM is placed so that it forms two contiguous 8 KB windows, at
`0x1C00_0000` and `0x1C01_0000`. These two windows are the memory a program may use when the
SRAMs are off.

**Interleaving.** In the interleaved region, consecutive 32-bit words go to consecutive banks:
bank = address bits [3:2], row = (address - base) / 16. Masters that stream through memory,
such as the core and the two uDMA ports, therefore rarely need the same bank in the same
cycle. The four banks can serve four accesses per cycle, which is four times the bandwidth of
one single-port memory.

**Private bank 0 and its multi-ported SCM.** The core uses the private banks for code, stack and
private data, away from the traffic on the interleaved banks. The 8 KB SCM of bank 0 is a
register file with 3 read ports and 2 write ports (`scm_3r2w`):

| port | used by |
|---|---|
| read 0 | core instruction fetch |
| read 1 + write 0 | core data |
| read 2 + write 1 | every other master, through the low-latency interconnect |

So the core's instruction port, its data port and one more master are all served in the same
cycle, with no arbitration. When both write ports hit the same word in the same cycle, the core's
write wins. A read sees the word as it was before that cycle's writes. The 24 KB SRAM part of the
bank has a single port. When several of the three bank ports want it in the same cycle, a
round-robin arbiter serves one per cycle.

**Power gating.** `sram_pwr_on_i` stands for the SRAM supply switch. While it is low:
- every SRAM read returns zero and every SRAM write is dropped;
- the SCM parts keep working.

The model keeps the SRAM contents across a power cycle. Real SRAM loses them, so software must
not rely on them.

## Interconnect

`l2_interconnect` has five masters:
- core instruction;
- core data;
- uDMA TX;
- uDMA RX;
- debug (the JTAG bridge).

It contains two crossbars built from one generic module (`tcdm_xbar`):

- the **multiport interleaved** crossbar, with the four interleaved banks as slaves;
- the **low-latency** crossbar, with these slaves: bank 0's system port, private bank 1, the ROM,
  the APB bridge, and an error responder for unmapped addresses (it grants at once and reads
  `0xBADA_CCE5`).

Each master's address selects exactly one of the two crossbars. Requests from the core's
instruction and data ports to private bank 0 skip both crossbars and go straight to the bank's
dedicated ports. Each slave has its own round-robin arbiter (`rr_arbiter`). Masters that target
different slaves are served in the same cycle.

**Bus protocol.** The protocol is this design's choice, in the style of the PULP memory
interconnects. It uses the structs `tcdm_req_t` and `tcdm_rsp_t` from `quentin_pkg`.
- A master raises `req` with `addr`, `we`, `be` and `wdata`, and holds them until `gnt`.
- `gnt` is combinational, in the cycle of the request.
- Every granted request, read or write, is answered by `rvalid` exactly one cycle later. For a
  read, `rdata` comes with it.
- Memories never stall. The APB bridge stalls until its transfer completes.
- While a slave stalls, its arbiter keeps the same winner, so the slave sees a stable request.

**Latency:**
- memories, ROM, error responder: gnt in the request cycle, data 1 cycle later;
- APB with a zero-wait slave: gnt 2 cycles after the request (setup cycle, then access cycle),
  data 1 cycle later.

## uDMA

The uDMA moves peripheral data to and from L2 without the core. It has two 32-bit master ports
on the interconnect: TX reads L2 for the peripherals, RX writes peripheral data into L2. It has
`NB_CH` channels (8 by default) in each direction. Each channel presents a 32-bit valid/ready
word stream to its peripheral.

A channel holds a one-word buffer. On each side a round-robin arbiter picks one channel per
cycle:
- a TX channel asks for the port when its buffer is empty and no read is in flight;
- an RX channel asks when its buffer is full.

One port can therefore move a word every cycle as long as different channels take turns. Two
ports of 32 bits are 64 bits per cycle. At 57 MHz that is 3.6 Gbit/s, well above the
1.6 Gbit/s that the full peripheral set needs. A channel raises its event output for one cycle
when its last word has reached the peripheral (TX) or L2 (RX).

Registers, on APB at `0x1A10_2000 + {dir, ch, reg}`, where `dir` is 0x100 for TX and 0 for RX,
`ch` is 0x10 x channel, and `reg` is one of:

| offset | register |
|---|---|
| 0x0 | SADDR: start address in L2 |
| 0x4 | SIZE: length in bytes, a multiple of 4 |
| 0x8 | CFG: write bit 0 = start (ignored while busy); read bit 0 = busy |
| 0xC | remaining bytes (read only) |

Only word transfers exist. The peripheral protocols (SPI, I2C, I2S, camera, UART, HyperBus)
are not part of this RTL. Their controllers would connect to the streams.

## JTAG debug bridge

`jtag_dbg_bridge` lets a debugger read and write any address in the memory map over JTAG,
including the memory-mapped registers. It is a standard TAP controller with a 4-bit
instruction register:

| IR | register | length |
|---|---|---|
| `0001` (after reset) | IDCODE, `0x1000_0001` by default | 32 |
| `0010` | ACCESS | 66 |
| `1111` | BYPASS | 1 |

The ACCESS register holds `{valid, we, addr[31:0], data[31:0]}`, shifted in LSB first. When
Update-DR is reached with `valid` set, the bridge performs one bus access as the
interconnect's debug master. The next Capture-DR of ACCESS loads the read data into bits
[31:0] and a "done" flag into bit 32, so a read takes two scans: one to start it, one to
collect the result.

The JTAG pins are sampled with the system clock through two-flop synchronizers, and TCK edges
are detected in that clock domain. TCK must therefore run at most at 1/6 of the system clock.
TDO changes on the falling edge of TCK. This avoids a second clock domain at the cost of a
slow JTAG clock.

## Boot ROM

The ROM is 8 KB. Its first three words are an RV32I stub:
`lui t0, 0x1C008; addi t0, t0, 0x080; jalr x0, 0(t0)`. It jumps to `0x1C00_8080` in private
bank 1. All other words are `nop`. The contents are computed by a function in `boot_rom.sv`.
Replace that function to provide a real boot loader.

## Files

| file | content |
|---|---|
| `rtl/quentin_pkg.sv` | bus structs, sizes, address map, decode functions |
| `rtl/quentin_soc.sv` | top: everything wired together |
| `rtl/l2_interconnect.sv`, `rtl/tcdm_xbar.sv`, `rtl/rr_arbiter.sv` | interconnect |
| `rtl/l2_il_bank.sv`, `rtl/l2_priv_bank0.sv`, `rtl/l2_sram_bank.sv` | L2 banks |
| `rtl/sram_cut.sv`, `rtl/scm_1rw.sv`, `rtl/scm_3r2w.sv` | memory cuts |
| `rtl/boot_rom.sv`, `rtl/apb_bridge.sv`, `rtl/udma.sv` | ROM, APB bridge, DMA |
| `rtl/jtag_dbg_bridge.sv` | JTAG debug bridge |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/jtag_driver.svh` | JTAG tasks shared by the testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each one has a
watchdog. Build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/quentin_pkg.sv tb/tb_quentin_soc.sv \
          --top-module tb_quentin_soc -o sim
./obj_dir/sim
```

`tb_quentin_soc` runs the whole fabric at its full size (520 KB of L2). It takes a few seconds.
It stands in for the core, a JTAG debugger, an APB peripheral, a uDMA TX sink, a uDMA RX source
and the power manager. It goes through these steps:
1. reads and decodes the boot stub;
2. writes and reads every bank;
3. has both core ports and the JTAG bridge hit the bank-0 SCM in one cycle;
4. forces a conflict on an interleaved bank;
5. runs a TX and an RX uDMA transfer while the core keeps working;
6. accesses an external APB register and an unmapped address;
7. gates the SRAMs and runs from the SCM.

The JTAG debugger checks the IDCODE, then makes some of the reads and writes, among them
one uDMA register and the reads in SCM-only mode. The testbench counts each of these mechanisms
and fails if any of them never happened.

Three more testbenches measure the fabric under the loads it was built for:
- **`tb_udma_bandwidth`** runs all 8 TX and 8 RX uDMA channels at once through the real L2. It
  measures about 62 bits per cycle (3.5 Gbit/s at 57 MHz). It requires at least 28.1 bits per
  cycle, which is 1.6 Gbit/s at 57 MHz.
- **`tb_l2_bandwidth`** keeps four masters streaming through the interleaved banks at once: the
  core's instruction and data ports and both uDMA ports. It counts 3.0 bank accesses per cycle
  on average, against 1 for a single-port memory. All four banks serve an access in the same
  cycle in 59 of 730 cycles. The rest is lost to conflicts between the streams.
- **`tb_matmul_setups`** stands in for the core and runs the memory traffic of an 8x8 32-bit
  matrix multiplication. For each instruction it makes one fetch, plus a load or store where
  the instruction needs one. It runs the kernel in three setups:
  - code in SRAM;
  - code and data in SCM with the SRAMs on;
  - code and data in SCM with the SRAMs gated.

  In all three the product is correct and the kernel takes the same 2112 cycles with no stall.
  This shows that the SCM modes cost nothing in cycles. Their advantage lies in voltage and
  frequency, which RTL does not model.

The module-level testbenches compare against reference models (for example, `tb_l2_interconnect` works out the
target slave of every random access on its own).

Every module in `rtl/` passes Verilator's `-Wall` lint without errors. The remaining warnings
are unused address bits and unused fields of the bus structs, and `SYNCASYNCNET` on `rst_ni`
where the bus assertions use the asynchronous reset in `disable iff`.

## How far the RTL follows the published design

Taken from the published design:
- the L2 sizes, bank counts and SRAM/SCM split;
- the 3-read/2-write SCM and how its ports are assigned;
- word interleaving over four banks;
- the separate SRAM supply and the SCM-only mode;
- the two interconnects and the blocks on them;
- a uDMA with two dedicated 32-bit L2 ports, configured over APB;
- debug over JTAG through a bridge that is one more master.

This design's own choices:
- the address map;
- the bus protocol and the arbitration;
- where the SCM sits inside each bank;
- collision rules in the SCM;
- ROM size and contents;
- the whole inside of the uDMA: channels, buffers, registers, events (the published text gives
  only what the uDMA does);
- APB3 for the peripheral bus;
- the JTAG instructions, the ACCESS register and the sampling of JTAG by the system clock.

Not included:
- the RV32IMFC core and its FPU;
- the core's own debug unit (halt, single step, breakpoints);
- the peripheral controllers (Quad SPI, I2C, 2 x I2S, camera interface, UART, GPIO, HyperBus);
- the pad frame and pad multiplexer;
- the FLL and clock unit;
- body-bias generation;
- the off-chip power manager.

Each one connects through ports of `quentin_soc`. The timing and power results of the silicon
(up to 670 MHz without body bias, 938 MHz with forward body bias, 6 uW/MHz with the SRAMs off)
come from the physical implementation. This RTL cannot reproduce them.
