# ScalableCore: cycle-accurate emulation of a mesh many-core, one node per FPGA

This RTL emulates a 2D-mesh many-core processor (the M-Core architecture: MIPS
cores with a router, a DMA controller and a private 512 KB memory per node).
The emulation is cycle by cycle and spreads over many small FPGA boards. Each
board emulates exactly one node and is wired only to its four mesh neighbours
by serial lines. Every board runs from its own oscillator, and no clock or
barrier spans the whole system. Even so, the emulated processor behaves as one
synchronous chip.

Two ideas make this work:

- **Virtual cycle.** A board spends many of its own clocks to emulate one clock
  of the target. In that time it can fit a 4-port node memory into a 1-port
  SRAM chip and move the node's link state to its neighbours over a serial
  line.
- **Local barrier.** A signal produced in target cycle N can only reach the
  neighbouring nodes by cycle N+1. So before advancing, a board waits only for
  its four neighbours, never for the whole system. The simulated-cycle rate
  then does not depend on how many boards are connected.

Beside the mesh, the top also holds three building blocks of a later,
tool-generated approach to the same problem (flipSyrup):

- a cache that makes a large external memory look like a one-cycle memory;
- a controller that stalls the simulated design while that cache is busy;
- a FIFO-based link that looks like a shared register to the design.

## The simulated cycle

`sc_vcycle_ctrl` sequences every unit through the same five steps. All
registers of the emulated node (core, router, DMA controller) are ordinary
synchronous RTL with one rule: they update only when `en` is high.

| step  | what happens |
|-------|--------------|
| START | The memory multiplexer captures the four memory requests of the node. The router outputs facing each present neighbour are pushed into that link's transmit FIFO. |
| BUSY  | Lets the previous `mem_done` clear. |
| WAIT  | Waits until the memory work is done, no transmit FIFO is full, and one frame has arrived from every present neighbour. This is the local barrier. Clocks spent here are counted in `wait_cycles`. |
| LATCH | Each received frame is popped into the interface register feeding the router input from that side. |
| EN    | One clock with `en` high: every target register takes its next value. The memory read data also appears now, as from a 1-cycle RAM. |

The frame on each link carries that side's whole router output for the cycle:
the valid bit, the flit and the credit returns (`link_t`, 41 bits). It is sent
every cycle, even when idle, so the frame itself is the barrier token. No
separate handshake exists.

Consider two neighbours whose boards run at the same frequency but different
phases. Each sees the other's cycle-N outputs in its own cycle N+1. That is
exactly what a direct wire through a register would give, so the emulated mesh
is cycle-exact whatever the phases. A unit can run at most one cycle ahead of a
neighbour. Edge units get `nbr_present` so they wait only for neighbours that
exist.

Speed: the unit runs the memory round and the link round in parallel.

- The memory round costs about 10 clocks per active port (8 clocks per 32-bit
  word on the 8-bit SRAM).
- The link round costs a 43-bit frame at 2 bits per unit clock, plus the
  synchronisers of the asynchronous FIFOs.

A lone unit, with no neighbours to wait for, needs at most 40 clocks per simulated cycle. A 4 × 4 mesh in
simulation runs about 62, which is about 645 kHz at a 40 MHz board clock. The
reference boards reach about 35 clocks (1.14 MHz). Shortening the frame is the
obvious lever: for example, send only valid flits plus credits, or use a wider
line.

## Node memory: four ports on one SRAM

The node memory has four ports, each with a 1-cycle latency:

- instruction fetch;
- load/store;
- DMA read;
- DMA write.

The board has one 8-bit × 512K asynchronous SRAM. `sc_mem_mux` serves the
ports in the order fetch, load/store, DMA read, DMA write. It uses
`sc_sram_ctrl`, which moves a word as four byte accesses of two clocks each.

Read results are staged and copied to the port outputs at `en`. The target
therefore sees the data in the cycle after the request, as from a synchronous
RAM. If two ports touch the same word in one cycle, the later port in the order
above sees the earlier port's write.

Addresses from byte 0x80000 upward are memory-mapped registers, not memory
(`sc_pkg`, word offsets):

| offset | register | use |
|--------|----------|-----|
| 0 | DMA_DST   | destination node `{x[3:0], y[3:0]}` |
| 1 | DMA_LADDR | local word address |
| 2 | DMA_RADDR | remote word address |
| 3 | DMA_LEN   | words |
| 4 | DMA_CTRL  | write 1 = PUT, 2 = GET; read = busy |
| 5 | DMA_RCNT  | words received by this node; a write clears it |
| 6 | NODE_ID   | `{x, y}` of this node |
| 7 | RESULT    | word for the host (`result` output) |
| 8 | HALT      | any write stops the core (`halted` output) |

Programs are loaded by writing each unit's SRAM from outside; the testbenches
do this through the SRAM model's back door. The core starts at address 0.

## Board-to-board links

Each direction has one line each way. `sc_serdes_tx` sends a frame:

- a start bit;
- the payload, LSB first;
- an even-parity bit.

Every bit is NRZI coded (a 1 toggles the line) at one bit per `clk_ser`.
`clk_ser` is twice the unit clock, matching the reference's 40 MHz and
80 Mbit/s.

`sc_serdes_rx` does the following:

- synchronises the line with two flops;
- decodes NRZI;
- samples one bit per clock;
- checks parity.

A bad frame is dropped and counted in `link_errors`. The receiver assumes both
boards' SerDes clocks have the same frequency, because there is no clock
recovery. A dropped frame stalls the barrier for good, because there is no
retransmission. `sc_async_fifo`, with Gray pointers and depth 4, moves frames
between `clk_ser` and `clk` in both directions.

## The emulated node

**Core (`mcore_core`).** A 5-stage MIPS32 pipeline (IF, ID, EX, MEM, WB) with:

- one branch delay slot, with branches and jumps resolved in EX;
- forwarding from MEM and WB;
- one stall cycle for a load-use hazard.

It implements an integer subset:

- ALU: ADDU SUBU AND OR XOR NOR SLT SLTU;
- shifts: SLL SRL SRA SLLV SRLV;
- multiply: MUL;
- immediates: ADDIU SLTI SLTIU ANDI ORI XORI LUI;
- memory: LW SW;
- branches and jumps: BEQ BNE BLEZ BGTZ J JAL JR JALR.

It has no byte or halfword memory access, no HI/LO, no exceptions and no
coprocessor 0.

**Router (`mcore_router`).** It has 5 ports: local, north (y-1), east, south
and west. Other properties:

- `NVC` virtual channels (2 by default), each with a `DEPTH`-flit FIFO (4);
- credit-based flow control;
- X-then-Y dimension-order routing.

The pipeline has four stages: NRC+VA, SA, ST, LT.

- NRC+VA: a head flit at the front of an input VC computes its output port and
  claims the first free VC there.
- SA: separable round-robin, one VC per input, then one input per output,
  gated by credits.
- ST: the switch register.
- LT: the output register on the link.

The zero-load head latency is four cycles from arrival to the output link
register, and the testbench checks it. An output VC stays claimed from head to
tail. A credit returns one cycle after a flit leaves an input FIFO.

**DMA controller (`mcore_dmac`).**

- **PUT.** Reads `LEN` local words through the DMA-read port. It sends them as
  one packet: a head flit (destination, source, command, length), a
  remote-address flit, then the data words. It moves one word every two
  cycles, because the read port has a one-cycle latency and is not pipelined.
- **GET.** Sends a two-flit request. The remote controller answers it with a
  PUT from its own memory, served before its local command.
- **Receiving.** Arriving data is written through the DMA-write port at one
  word per cycle, so credits always come back the next cycle. Reassembly state
  is kept per VC.
- **Sending** always uses VC 0.

**Interface registers (`sc_ifreg`)** hold the received link state between
LATCH and the next LATCH. **`sc_reset_sync`** releases the board reset
separately in the `clk` and `clk_ser` domains.

## flipSyrup parts

These three blocks share no signal with the mesh. Their ports are brought out
of the top with the prefix `fs_`.

- **`syrup_memory`.** A direct-mapped, write-back, write-allocate cache with
  16-byte lines (1024 lines by default). The tag RAM entry holds the tag,
  valid, dirty and accessed bits. The data RAM is four byte-wide banks, so byte
  writes need no read-modify-write. A round-robin arbiter puts `NP` request
  ports onto the single cache port.
  - A request is held until `rdy`.
  - A hit answers one clock after the port wins arbitration.
  - A miss writes back a dirty victim line, refills the line through a simple
    line request/acknowledge port (`m_*`), then serves the request. Only one
    miss is outstanding at a time.
- **`cycle_accuracy_manager`.** Produces `drive`, the enable of the simulated
  design, so that a memory taking several clocks looks like an ideal 1-cycle
  memory.
  - A request made in the current simulated state goes to the cache at once.
  - If the design advances before the cache answers, the request is kept in
    RWAIT registers and held on the cache port.
  - `drive` stays low until every kept request is answered. A ready arriving in
    the same clock counts.
  - Read data are held in DONE registers for the next simulated cycle.
  - With two reads issued in clock 1, port 0 ready in clock 2 and port 1 ready
    in clock 3, `drive` is high, high, low, high in clocks 0 to 3. The
    testbench checks exactly this sequence.
- **`syrup_channel`.** In each simulated cycle it pushes the value the design
  writes into a transmit FIFO towards the neighbour. It reports `ok` once that
  is done and the neighbour's value for the cycle is waiting. On the clock
  where it is told to advance, it pops that value onto `u_rdata`. To the design
  it is a register shared with the neighbour and delayed by one cycle.

## Top level and parameters

`scalablecore_system` (`NX`, `NY`, `NVC`, `DEPTH`) builds the NX × NY mesh.
Per-unit signals are unpacked arrays indexed `y*NX + x`:

- clocks `clk[i]` and `clk_ser[i]`;
- the SRAM pins;
- status outputs: `vcycle`, `retired`, `result`, `halted`, `link_errors`,
  `wait_cycles`.

`run` and `halt_cycle` (0 means never) are shared.

| parameter | default | meaning |
|-----------|---------|---------|
| NX, NY | 4, 4 | mesh size; coordinates are 4 bits, so up to 16 × 16 |
| NVC | 2 | router virtual channels (the flipSyrup-on-ScalableCore setup used 1) |
| DEPTH | 4 | flits per VC buffer, a power of two |
| MEM_AW (sc_pkg) | 17 | word address of the 512 KB node memory |
| LINE_B, NLINE (syrup_memory) | 16, 1024 | cache line bytes, lines |

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/sc_pkg.sv tb/mips_asm.sv tb/tb_scalablecore_system.sv \
  --top-module tb_scalablecore_system -Mdir obj -o sim && obj/sim
```

`tb/mips_asm.sv` is a small MIPS instruction encoder. `tb/sram_model.sv` is a
behavioural 8-bit SRAM with back-door `poke`/`peek`.

`tb_scalablecore_system` runs the full 4 × 4 default mesh, about 30 s of
simulation. Each unit has its own clock phase. Every node runs the same
program:

- compute a value from its coordinates;
- PUT four words to its east neighbour (wrapping around);
- GET two words from its south neighbour;
- PUT four words to node (0,0), a deliberate hot spot;
- wait for its incoming words, sum them into RESULT, and halt.

The testbench checks every result and the hot-spot words. It also counts each
mechanism and fails if one never happened:

- barrier waits;
- load-use stalls;
- cycles in which the memory multiplexer served several ports;
- flits on VC 1;
- flits held back for lack of credit;
- GET replies;
- flipSyrup `drive` stalls, cache refills and write-backs;
- Syrup channel cycles (the channel is looped back).

The other testbenches check single blocks:

- `tb_mcore_core`: programs with forwarding, load-use, branches and delay
  slots, plus the issue rate;
- `tb_mcore_router`: random traffic with per-packet ordering, the 4-cycle
  latency and credit limits;
- `tb_mcore_dmac`: PUT, GET, and the 2-cycles-per-word rate;
- `tb_sc_mem_mux` and `tb_sc_sram_ctrl`: data and clock counts;
- `tb_sc_serdes`: frames, rate and parity errors;
- `tb_sc_async_fifo`, `tb_sc_ifreg`, `tb_sc_reset_sync`, `tb_sc_vcycle_ctrl`:
  their own blocks;
- `tb_sc_unit`: one unit with a DMA loop-back program;
- the three flipSyrup testbenches.

## Where this departs from the reference system, and what is missing

- **Not built:**
  - the memory unit (a board that emulates a DRAM controller behind a
    DRAM-latency model at the mesh edge);
  - the multifunction router for dual-modular-redundant execution;
  - the host USB-serial link for loading programs.
- **Core.** Only the integer subset above. The DMA register map, packet format
  and GET command are this design's own.
- **Speed.** About 62 board clocks per simulated cycle in a 4 × 4 mesh,
  against about 35 on the reference boards (see above).
- **Link robustness.** Links detect but do not recover from bit errors. Both
  ends' clocks must have the same frequency.
- **flipSyrup parts.** They stand beside the mesh rather than replacing the
  hand-built virtual-cycle machinery inside each unit. The Syrup memory's
  external port is a plain line request/acknowledge port, not a bus such as
  AXI4. Its cache size (16 KB) is this design's choice.
- **Configurations with more nodes** (64, 100 or 128) need only larger `NX` and
  `NY`. Their simulation has not been run here; the largest simulated is the
  4 × 4 default.
