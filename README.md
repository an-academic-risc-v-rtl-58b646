# preDRAC: a single-core RV64 SoC whose main memory lives across a cable

preDRAC is a small Linux-class RISC-V system on chip built for a 65 nm
test chip. Its main problem is that the chip has no DDR3 interface. Main
memory sits on an FPGA board, and the chip reaches it over a 32-bit FMC
cable that runs at a quarter of the 200 MHz core clock. Everything else
follows from that:

- The core and its caches run at 200 MHz.
- Every cache miss becomes a short packet of 32-bit words on the cable,
  one word per 50 MHz link clock.
- A debug ring lets a host computer stop the core, load a program into
  memory, set the PC and start it again. This is also how the chip is
  brought up.

This repository holds synthesizable SystemVerilog for the on-chip
digital logic: a five-stage in-order RV64IMA core ("Lagarto") with a
bimodal branch predictor, two L1 caches, an inclusive L2 cache, the link
packetizer and clock divider, AXI4-Lite UART and SPI controllers, a performance monitoring
unit and the debug ring. It also holds the FPGA end of the link. Each
module has a self-checking testbench, and one testbench runs the whole
SoC end to end.

```
             host (JTAG bridge, not included)
                    | 16-bit words
             +------v------+
             | debug_ring  |--core reset / halt / regs / PC
             +------+------+                    |
                    | memory access (while halted)
                    v                           v
  +-----------+   +-----------------------------------+
  | icache    |<--|         lagarto_core              |
  | 4w 16 KiB |   | F -> D -> R -> E -> W             |
  | 2-cycle   |   | bimodal_bp, regfile, muldiv       |
  +-----+-----+   +---------------+-------------------+
        |            data port    |   addr >= 0x8000_0000 ?
        |          +--------------+-------------+
        |          v                            v
        |   +-----------+                +-------------+
        |   | dcache    |                | mmio_bridge |--AXI4-Lite--axil_demux
        |   | 4w 16 KiB |                +-------------+          |          |
        |   | 3-cycle   |                                    uart_axil   spi_axil
        |   +-----+-----+
        v         v
      +-------------+    +-------------+
      | mem_arbiter |--->| l2_cache    |---> invalidate line (to both L1s)
      +-------------+    | 8w 64 KiB   |
                         | 3-cycle, WB |
                         +------+------+
                                v
                         +------------+  32-bit words @ clk/4   +-----------------+
                         | packetizer |<=======================>| fpga_packetizer |--> DDR3 / boot RAM
                         +------------+   (clk_div tick)        +-----------------+
                                                                  (FPGA board)
```

## The Lagarto pipeline

`lagarto_core` is a single-issue, in-order pipeline with five stages.
There is no separate memory stage: loads, stores and atomics run in
execution.

| stage | name | work |
|---|---|---|
| F | fetch | sends the PC to the instruction cache and looks the same PC up in the branch predictor; the predicted next PC becomes the next fetch PC |
| D | decode | turns the instruction into a `decoded_t` record (`predrac_pkg`) |
| R | read-registers | reads the two-bank register file |
| E | execution | ALU, branch resolution, loads/stores/atomics on the data port, multiply/divide, CSR reads |
| W | write-back | writes the register file; the instruction counts as retired |

The pipeline is hard to follow in three places.

**Fetch is one request at a time.** The instruction port uses a pulse
protocol. The core sends `i_req` for one cycle, and the cache answers
with `i_ack` some cycles later. A new fetch starts only when the
previous one has answered and the decode slot is free. With a 2-cycle
instruction cache, the core fetches at most one instruction every three
cycles. Throughput is therefore bounded by fetch, not by the pipeline
depth. Measured on three small benchmark kernels, the
IPC is 0.24 to 0.33. The original chip reports 0.33. On a misprediction, a fetch still in
flight is marked "killed" and its answer is dropped.

**Hazards: one interlock and one bypass.** The register file is read in
R. Its write happens at the end of W.

- When R reads a register that W writes in the same cycle, a bypass
  supplies the new value.
- When R needs the result of the instruction now in E, R waits one
  cycle (the interlock). The value then comes through the W bypass.
- There is no bypass from E to R.

So a dependent instruction directly behind its producer costs one extra
cycle. Loads are no worse than ALU results, because E holds every
instruction until it completes.

**Branches.** `bimodal_bp` has 1024 entries. Each entry holds a 2-bit
saturating counter and a BTB slot. The BTB slot stores a 28-bit tag
(PC bits 39:12) and a 40-bit target. A fetch PC is predicted taken when
its BTB slot hits and the counter is 2 or 3.

E computes the true next PC of every instruction and compares it with
the PC that fetch predicted. A mismatch flushes F, D and R and restarts
fetch at the right address. E compares every instruction this way, not
only branches, so a stale BTB hit on a non-branch also repairs itself.
Every resolved branch and jump trains the predictor.

**Execution stage details**

- *Loads and stores* send one aligned 64-bit access with byte enables,
  then wait for `d_ack`. Load data is shifted and sign- or zero-extended
  in E. Misaligned accesses are not supported.
- *Atomics.* LR sets a single reservation (address). SC stores only if
  the reservation matches; it returns 0 on success and 1 on failure, and
  clears the reservation. Each AMO (swap, add, and, or, xor, min, max,
  minu, maxu; .W and .D) is a read followed by a write on the data port.
  This is atomic because the system has a single core and one
  outstanding access.
- *Multiply/divide.* `muldiv` takes 2 cycles for a multiply (one 64x64
  product, registered). A divide takes 66 cycles: a restoring
  shift-subtract loop on the magnitudes. Divide by zero and signed
  overflow give the RISC-V results.
- *CSRs.* `cycle`, `time` and `instret`, plus `hpmcounter3`…`hpmcounter11`,
  read the nine PMU counters. The machine CSRs `mstatus`, `mtvec`,
  `mscratch`, `mepc`, `mcause` and `mtval` are read/write. `misa` reads
  RV64IMA, and `mstatus.MPP` always reads as machine mode. Every other CSR
  (`mhartid` included) reads as zero and ignores writes. CSRRS and CSRRC
  write only when their source field is nonzero.
- *Traps.* ECALL (cause 11), EBREAK (cause 3) and illegal instructions
  (cause 2) trap in E. An illegal instruction is an unknown opcode or a
  16-bit compressed encoding. The trap writes the instruction's PC to
  `mepc`, the cause to `mcause` and zero to `mtval`. It also copies MIE
  into MPIE and clears MIE. The trapping instruction does not retire.
  The next PC is `mtvec` (direct mode only), and it is reached through the
  same redirect as a mispredicted branch. MRET redirects to `mepc`,
  restores MIE from MPIE and sets MPIE.

**Not implemented.** Only machine mode exists: there are no interrupts,
no supervisor or user mode, and no page tables or TLB. Misaligned
accesses do not trap. WFI, SRET, SFENCE.VMA, FENCE and FENCE.I execute as
no-ops. The core therefore runs bare-metal code with its own trap
handlers, but it cannot boot an operating system such as Linux.

**Debug port.** Raising `dbg_halt_req` stops fetch. When every stage is
empty, `dbg_halted` rises. While halted, register read port 1 and the
write port belong to the debug port, and the fetch PC can be overwritten.
Dropping `dbg_halt_req` resumes execution.

## Caches and the memory path

Both L1 caches are instances of `l1_cache`, with the same geometry:

| property | value |
|---|---|
| ways | 4 |
| size | 16 KiB |
| line | 64 B |
| sets | 64 |
| tag | 20 bits of a 32-bit physical address |

They differ in hit latency. The instruction cache answers a hit 2
cycles after the request, the data cache 3 cycles after.

Each access first spends its lookup time. A read miss then fetches the
line as four 128-bit beats, places it in a way, and answers. The way is
chosen from the low bits of a 16-bit LFSR (`lfsr16`, polynomial
x^16 + x^14 + x^13 + x^11 + 1). Replacement is therefore random, and it
can evict a valid line even when another way is empty.

Stores are **write-through with no allocation**:

- each store becomes one 128-bit write with byte strobes to memory;
- a store hit also updates the cached line.

The L2 below is therefore always current. A program loaded through the
data side is visible to the instruction cache once that cache is
flushed. The debug ring's resume command flushes it.

`mem_arbiter` merges the two caches' memory requests. The data cache has
priority, and the winner keeps the port until its answer.

### The L2 cache

`l2_cache` is a unified write-back cache:

| property | value |
|---|---|
| ways | 8 |
| size | 64 KiB |
| line | 64 B |
| sets | 128 |
| tag | 19 bits |
| hit latency | 3 cycles |

It receives the L1s' 128-bit beats, so an L1 refill is four L2
accesses. The first access misses, and the other three hit.

A miss is handled in three steps:

1. Pick a victim way. An invalid way is used if the set has one;
   otherwise the LFSR picks a way at random.
2. Write the victim back as four beats if it is dirty.
3. Refill the line as four beats, then serve the request as a hit.

Stores allocate too. A store merges its byte strobes into the line and
marks the line dirty. Dirty data therefore reaches the FPGA memory only
when a line is evicted. To see a result in the FPGA memory directly, a
test must evict the line. The host can also read it through the debug
ring, which always sees current data.

**Inclusion.** Every line an L1 holds is also in the L2. When the L2
evicts a valid line, it pulses `inv` with the line address, and both
L1 caches drop their copy. A corner case arises when the L1 is refilling
that very line at that moment, because its four beats are separate L2
accesses. The L1 then still answers its request but does not keep the
line. The original design also has a MESI coherence directory in the
L2. With one core and write-through L1 caches, it would have nothing to
track, so it is left out.

## The FMC link

`clk_div` divides the core clock by 4 into `fmc_clk`. It also produces
`tick`, a one-cycle enable in the core cycle before each rising edge of
`fmc_clk`. Both ends of the link stay in the core clock domain and move
one 32-bit word per `tick`. No clock-domain-crossing FIFO is needed,
because the link clock is derived from, and aligned with, the core clock.

`packetizer` (chip side) sends each 128-bit memory transaction as
follows:

```
SoC -> FPGA   word 0   {write, 15'b0, strobe[15:0]}
              word 1   address[31:0]
              word 2-5 write data, bits 31:0 first          (writes only)
FPGA -> SoC   4 words  read data, bits 31:0 first           (reads)
              1 word   32'h0000_0001 acknowledge            (writes)
```

`fpga_packetizer` is the matching FPGA end. It rebuilds the transaction,
runs it on a memory port (the FPGA's DDR3 controller or boot RAM) and
sends the answer.

A read needs 6 link words and a write 7. A read therefore takes at
least 24 core cycles plus the FPGA's access time. An L2 line refill
(four reads) costs about 100–150 core cycles, and writing back a dirty
line costs as much again. This cost dominates the run time of anything
that misses in the L2.

## Peripherals

The core's data accesses below `0x8000_0000` go to `mmio_bridge`. The
bridge turns each access into one 32-bit AXI4-Lite transaction. Only
8-, 16- and 32-bit accesses are supported. `axil_demux` then routes the
transaction by address bit 12:

| base | device |
|---|---|
| `0x4000_0000` | UART (`uart_axil`) |
| `0x4000_1000` | SPI (`spi_axil`) |
| `0x8000_0000` and up | main memory (cached) |

`axil_slave_port` is the shared AXI4-Lite front end. It turns each bus
transaction into one-cycle register reads and writes, and assertions
check that address channels stay stable while they wait for ready.

**UART registers** (32-bit, byte offsets). A frame has 11 bits: start,
8 data bits LSB first, parity, stop. Parity can be turned off (10 bits),
and a second stop bit can be added (12 bits). The bit time is
programmable; a value of 67 gives 3 MBaud at 200 MHz. The receiver
samples each bit in its middle.

| offset | register |
|---|---|
| 0x00 | TXDATA (write) |
| 0x04 | RXDATA (read; clears "received") |
| 0x08 | STATUS: busy, received, parity error, framing error |
| 0x0C | CTRL: parity enable, odd, two stop bits |
| 0x10 | BAUD: bit time in cycles, at least 4 |

**SPI registers.** The SPI master exchanges 8 bits per transfer in
mode 0, MSB first, for an SD card. The half period of `sck` is
programmable. Its minimum of 4 core cycles gives 25 MHz at 200 MHz.

| offset | register |
|---|---|
| 0x00 | TXDATA (write starts a transfer) |
| 0x04 | RXDATA |
| 0x08 | STATUS: busy, done |
| 0x0C | CTRL: chip select |
| 0x10 | CLKDIV |

**PMU.** `pmu` holds nine 64-bit counters, numbered by `pmu_event_e`:

| counter | event |
|---|---|
| 0 | cycles |
| 1 | retired instructions |
| 2 | branches |
| 3 | mispredictions |
| 4 | loads |
| 5 | stores |
| 6 | I-cache misses |
| 7 | D-cache misses |
| 8 | stall cycles |

Software reads counter *i* as CSR `hpmcounter(3+i)`.

## Debug ring

The host sends 16-bit words through a JTAG bridge. That bridge is not
included; the SoC exposes its word stream as the `dbg_*` ports. Words
pass through an input FIFO to a command decoder, and answers return
through an output FIFO.

Commands are `{op[3:0], arg[11:0]}`. 64-bit operands and results travel
as four words, least significant first:

| op | command | operands | answer |
|---|---|---|---|
| 1 | HALT | – | ack |
| 2 | RESUME (also flushes the I-cache) | – | ack |
| 3 | READ_REG r | – | 4 words |
| 4 | WRITE_REG r | 4 words | ack |
| 5 | WRITE_MEM | 4 addr + 4 data words | ack |
| 6 | READ_MEM | 4 addr words | 4 words |
| 7 | SET_PC | 4 words | ack |
| 8 | CORE_RESET (arg bit 0 holds the core in reset) | – | ack |
| 9 | STATUS | – | `{core_reset, halted}` |

An ack is `16'hA000 | op`, and an unknown op gets `16'hE000`. Register
and PC commands take effect only while the core is halted. Memory
commands use the data-cache port, which the SoC hands to the debug ring
while the core is halted.

A typical bring-up runs HALT, then WRITE_MEM for each doubleword of the
program, then SET_PC, then RESUME.

## How far this follows the original chip

These parts follow the original design:

- the five named pipeline stages and the RV64IMA instruction set;
- the 1024-entry bimodal predictor, with table widths read from the
  chip's memory sizes;
- the L1 geometry and latencies, and random replacement with the given
  LFSR polynomial;
- the L2 geometry and latency, and inclusion with invalidation of the
  L1 copies;
- the 128-bit to 4 x 32-bit split of the memory link;
- the divide-by-4 link clock;
- the UART and SPI features (AXI4-Lite, 11-bit frames, parity and stop
  options, 3 MBaud, 8-bit SPI up to 25 Mbps);
- the nine-counter PMU;
- the debug ring's three jobs.

These are choices of this design:

- the hazard scheme, the memory protocols, the CSR subset and the
  machine-mode-only trap handling;
- write-through L1 caches and a write-back L2;
- the link framing, register maps, address map, PMU events and debug
  command encoding.

Missing compared with the chip:

- the MESI coherence directory in the L2;
- the TLBs, supervisor mode and interrupts (so no Linux);
- the lowRISC TileLink/NASTI interconnect, replaced by the arbiter and
  the AXI4-Lite bridge;
- the JTAG/GLIP bridge;
- the FPGA's DDR3 controller;
- the foundry SRAM macros. Memories are plain arrays here.

The original chip's FPGA side ran at 100 MHz behind asynchronous FIFOs.
Here `fpga_packetizer` shares the chip's clock and link enable.

The original chip's SPI controller misbehaved and was moved to the FPGA
board. Here it stays on chip, as in the original block diagram.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
with a watchdog. To build and run one with Verilator, name the packages
first:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/predrac_pkg.sv tb/rv_asm_pkg.sv rtl/*.sv tb/fpga_board_model.sv \
    tb/tb_predrac_soc.sv --top-module tb_predrac_soc -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_predrac_soc` | whole SoC at default parameters. The host loads a program through the debug ring and starts it. The program drives UART, SPI, caches, atomics, mul/div and PMU CSRs, then forces an L2 write-back. Registers and memory are then checked, and each mechanism (L1 and L2 misses, hits, evictions, back-invalidations, mispredictions, stalls, bypasses, link reads and writes, AXI reads and writes, flush, debug accesses) must occur |
| `tb_lagarto_core` | RV64IMA program against an ideal memory; register results, debug write, PC change, resume |
| `tb_l1_cache` | random traffic against a reference memory, 2-cycle hit latency, 4-beat refill, flush, single-line invalidation (also during a refill) |
| `tb_l2_cache` | random strobed traffic over four times its size; 3-cycle hits, 4-beat refills; after a sweep, every evicted line must be in memory correctly; every invalidation names a line it held |
| `tb_malardalen` | three bare-metal kernels (bubble sort of 100, iterative Fibonacci, 10x10 matrix product) booted from the board memory; checks results and reports IPC |
| `tb_isa_tests` | self-checking tests of add, mul, sd/ld, amoand, bne and jal over 100 operand pairs, including corner values; then a handler in `mtvec` takes ECALL, EBREAK and an illegal word and returns with MRET (checks `mcause`, `mstatus`, `mepc`, `misa`) |
| `tb_torture` | whole SoC at default parameters: 16 random RV64IM programs (ALU and W forms, every multiply/divide, byte/word/doubleword loads and stores, all AMOs, forward branches) checked register by register against a reference model built into the bench as the program is generated |
| `tb_packetizer` | both link ends plus memory; random reads and writes with strobes, words per transaction, link timing |
| `tb_uart_axil`, `tb_spi_axil` | line-level decoding, parity, loopback, `sck` rate |
| `tb_bimodal_bp`, `tb_lfsr16`, `tb_muldiv`, `tb_regfile`, `tb_pmu`, `tb_clk_div`, `tb_debug_ring` | each block against a reference model |

`tb/rv_asm_pkg.sv` holds small instruction encoders for writing test
programs. `tb/fpga_board_model.sv` is the FPGA end of the link with a
behavioural memory.

The simulator runs with two-state logic. Everything the design reads is
reset, except memory arrays, whose contents are guarded by valid bits.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `predrac_soc` | `IC_HIT_LAT` / `DC_HIT_LAT` | 2 / 3 | L1 hit latencies in cycles |
| | `L1_BYTES`, `L1_WAYS` | 16384, 4 | L1 size and associativity |
| | `L2_BYTES`, `L2_WAYS`, `L2_HIT_LAT` | 65536, 8, 3 | L2 size, associativity, hit latency |
| | `BP_ENTRIES` | 1024 | predictor entries |
| | `FMC_DIV` | 4 | link clock divider. The FPGA board model assumes 4 |
| `l1_cache` | `LINE_BYTES`, `PADDR_W` | 64, 32 | line size, physical address width |
| `debug_ring` | `FIFO_DEPTH` | 8 | host FIFOs |
| `uart_axil` | `BAUD_RESET` | 1736 | reset bit time (115200 Bd at 200 MHz) |
| `spi_axil` | `CLKDIV_RESET` | 250 | reset half period (400 kHz) |
