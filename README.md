# Twelve-way double-precision matrix-vector accelerator

This design offloads one small, very frequent kernel from a weather and climate model
to programmable logic. In the model's Helmholtz solver, each vertical column of the grid
needs a batched matrix-vector product:

    lhs[df][k] = sum over j = 0..5 of  x[j][k] * m[df][j][k]      df = 0..7, k = 0..39

That is 8 x 6 x 40 = 1920 multiply-adds, or 3840 double-precision flops, per column.
The column data for one call is 19,840 bytes:

| Array  | Elements   | Bytes  |
|--------|------------|--------|
| matrix | 1920       | 15,360 |
| x      | 240        | 1,920  |
| lhs    | 320        | 2,560  |

The system has twelve identical accelerator blocks. Each block has its own 256 kB
block-RAM bank. The host CPU does three things:

1. It fills the twelve banks with up to 13 columns each (3 MB in all).
2. It starts every block once per column.
3. It copies the results back.

A block works only on its own bank. It never reaches off-chip memory, so the twelve blocks
run fully in parallel.

## System structure (`matvec_system`)

```
 host port 0 ─┐                       ┌─ protocol converter ─ 1x12 crossbar ─► 12 register ports
              ├─ 2x2 interconnect ────┤
 host port 1 ─┘                       └─ 1x12 crossbar ─► bank crossbar i (host side)

 for i = 0..11:
   accelerator i ── register port ◄── (above)
                 └─ memory master ─► bank crossbar i (2x1) ─► BRAM controller i ─► 256 kB BRAM i
```

- **Interconnect.** It is an `axi_crossbar` with 2 masters and 2 slaves. It routes two
  256 MB host regions:
  - 0x00_A000_0000 goes to the control registers.
  - 0x00_B000_0000 goes to the banks.
- **Register path.** A protocol converter splits host bursts into single 64-bit beats.
  A 1x12 crossbar then selects the block, with 8 kB per block.
- **Memory path.** A 1x12 crossbar selects the bank, with 256 kB per bank.
- **Bank crossbars.** Each bank has a 2x1 crossbar in front of it:
  - Master 0 is the host.
  - Master 1 is that bank's accelerator.
  - An accelerator address outside its own bank gets a DECERR response.

Address map, as seen from the host:

| Region                        | Base (block i)                 | Size   |
|-------------------------------|--------------------------------|--------|
| Control registers of block i  | 0x00_A000_0000 + i * 0x2000    | 8 kB   |
| Memory bank i                 | 0x00_B000_0000 + i * 0x4_0000  | 256 kB |

Each accelerator has a 32-bit master address. It sees its own bank at the same address the
host uses, 0xB000_0000 + i * 0x4_0000. So the host can write array pointers into the
registers without translating them.

Other pieces of the top:

- **Reset.** `proc_sys_reset` synchronises the host reset and the clock generator's lock
  signal. It drives one reset for the interconnect and one for the peripherals.
- **Outside the RTL.** The clock generator and the processor system are not part of it.
  The top brings out `clk`, `dcm_locked`, the two host AXI ports and the twelve
  interrupt lines.

## Accelerator block (`matvec_8x6x40`)

The block is a register file (`matvec_ctrl_regs`) plus a compute engine (`matvec_engine`).

### Register protocol

Registers are 32 bits wide. On the 64-bit bus, a register at offset `o` sits in
byte lane `o[2]`. Reads return the value in both halves.

| Offset | Name      | Meaning |
|--------|-----------|---------|
| 0x00   | CTRL      | bit 0 ap_start, bit 1 ap_done (clear on read), bit 2 ap_idle, bit 3 ap_ready, bit 7 auto_restart |
| 0x04   | GIER      | bit 0 global interrupt enable |
| 0x08   | IP_IER    | bit 0 done interrupt enable, bit 1 ready interrupt enable |
| 0x0C   | IP_ISR    | bit 0 done, bit 1 ready; write 1 to clear |
| 0x10   | ap_return | always 0 |
| 0x18   | matrix    | byte address of the matrix (write only, reads 0) |
| 0x20   | x         | byte address of x |
| 0x28   | lhs       | byte address of lhs |

To run one call:

1. Write the three addresses.
2. Write 1 to CTRL.
3. Either poll until `ap_idle` is 1 again, or enable the interrupts and wait for `irq`.

`ap_start` clears itself when the call completes, unless `auto_restart` is set.

### Engine dataflow

- **Memory layout.** The matrix is stored transposed, as `m[df][j][k]` with k fastest.
  Both the matrix and x are then read in address order.
- **Read phase.** The engine reads x (240 words) and then the whole matrix (1920 words) as
  one stream of bursts. Rules for the bursts:
  - at most 64 beats each;
  - never crossing a 4 kB boundary;
  - at most 8 outstanding.
- **x storage.** x goes into a local array.
- **Matrix data.** Matrix beats are not stored. Each beat goes straight into the
  multiplier, together with the matching x element. The product then goes into the adder,
  together with the running sum `l1[df][k]`.
- **Summation order.** The sum for each output element starts from 0.0 at j = 0 and adds
  j = 1..5 in order. A software loop with that order gives the same bits.
- **No hazard.** An element's sum comes back from the adder 40 beats before the next term
  for that element arrives. The 40 is the length of the k loop, and the adder latency is
  only 3. So the read-modify-write on `l1` never collides. An elaboration check enforces
  `ADD_LAT + 1 <= NK`.
- **Write phase.** After the last sum, the engine writes the 320 results back as
  64-beat bursts. `done` pulses when the last write response arrives.
- **Arithmetic.** The multiplier and adder are full IEEE 754 double precision with round
  to nearest even. Subnormal inputs and results are flushed to zero. Infinities and NaN
  are handled.

### Timing

The matrix stream sets the run time of one call:

- The BRAM controller returns one beat per cycle.
- The engine keeps 8 bursts in flight.
- The bank crossbar and the controller chain back-to-back read bursts from the same master
  without a bubble.

A call then takes about 2505 cycles from `ap_start` to `ap_done`. That is 3840 / 2505 =
1.53 flops per cycle per block. About 2160 of those cycles are read beats, 320 are write
beats, and the rest are pipeline fill and handshakes.

At clock frequency f, the twelve blocks give at most 12 x 1.53 x f flops per second,
before host overhead. At 333 MHz that is 6.1 Gflop/s.

The testbenches check the cycle count against a budget of 2520 cycles for the engine and
2530 cycles for the whole block.

## Interconnect building blocks

- **`axi_crossbar`** (NM masters, NS slaves, a base and a region size per slave).
  - Each slave has round-robin arbitration and its own read and write ownership.
  - Write side: one burst per slave at a time.
  - Read side: the owning master may chain up to `MAX_RD` bursts, as long as no other
    master asks for that slave. This chaining is what lets the accelerator stream at one
    beat per cycle.
  - Unmapped addresses go to an internal error slave, which answers DECERR and returns
    the right number of read beats.
- **`axi_protocol_converter`.** Turns each beat of an AXI4 burst into a separate
  single-beat transfer. It increments the address for INCR bursts. A burst's write
  responses are merged, and the worst one wins.
- **`axi_bram_ctrl`.** An AXI4 slave for a single-port synchronous BRAM:
  - It serves INCR and FIXED bursts of 64-bit beats.
  - A two-entry read buffer holds data when the master applies back-pressure. That keeps
    `RDATA` stable while `RREADY` is low.
  - Reads and writes alternate when both are waiting.
- **`bram_sp`.** A 64-bit, single-port, read-first memory with byte write enables and a
  one-cycle read. The default is 32768 words, which is 256 kB.

The AXI bundles are packed structs from `axi_pkg`, with 40-bit addresses and 64-bit data.
There are no ID signals, because every crossbar keeps responses in order by construction.

## Departures and choices

**Run time.** The block's run time matches what was measured on the real hardware:
1.53 flops per cycle, about 2505 cycles per call. It does not match the tool estimate
for the original high-level-synthesis kernel, which is about 2334 cycles.

**Engine structure.** The original kernel first copies each 240-element matrix slice into
a local array, then computes. This engine multiplies matrix data as it arrives instead.
The arithmetic and the summation order are the same.

**Inside the library blocks.** The crossbars, protocol converter, BRAM controller and
reset generator here are simple, purpose-built versions. They are not feature-complete
AXI components:

- There are no IDs, no WRAP bursts and no narrow transfers.
- One write burst is in flight per slave.

**Choices of this design.** The following were chosen here:

- floating-point latencies of 3 cycles each;
- subnormals flushed to zero;
- the reset hold time of 16 cycles;
- the IP_ISR write-1-to-clear behaviour;
- the lane placement of 32-bit registers;
- the host data width of 64 bits;
- the split of the two host ports across the two 256 MB regions.

**Not modelled.** The clock generator, the processor system and any debug probes are not
modelled.

## Simulation

Each block has a self-checking testbench in `tb/`. It prints a line of the form
`TB_RESULT checks=N failures=M`. A watchdog ends a run that hangs.
`tb/axi_master_bfm.sv` is a small bus-master model used by the testbenches. It has
adjustable `RREADY` back-pressure.

`tb_matvec_system` runs the top at its default size. For each of the 12 banks it:

1. writes 13 columns of random data;
2. runs 13 calls per block, all blocks at once;
3. checks every result bit-exactly against a software model;
4. reads the results back.

It drives the registers through host port 0 and the banks through host port 1.
Both ports can reach both regions.

It also counts several mechanisms and fails if any of them never happens:

- burst splitting in the protocol converter;
- host/accelerator contention on a bank;
- chained read bursts;
- `RREADY` stalls;
- DECERR responses;
- interrupts.

A run takes about 450k cycles, a few seconds of simulation.

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_matvec_system \
    -y rtl -y tb +libext+.sv rtl/axi_pkg.sv tb/tb_matvec_system.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the top module and testbench file to run any other testbench. The
`+verilator+rand+reset+2` option starts all state at random values. The design resets
everything it reads, so results do not depend on that.

To change the configuration, use these parameters:

- `matvec_system`: `NBLK`, `BANK_BYTES`, `REG_BASE`, `MEM_BASE`.
- The accelerator: `MAX_BURST`, `MAX_OUTSTANDING`, `MUL_LAT`, `ADD_LAT`.

The kernel sizes `NDF1`, `NDF2` and `NK` are parameters too. The register map and the
address arithmetic follow from them.
