# Wheel-rail contact-law accelerator

A railway vehicle simulation spends most of its time on the contact forces between wheels
and rails. For each of the four wheel-rail contact patches of a two-axle vehicle, and at every
simulation step, two laws are evaluated:

* **Hertz**: the contact ellipse, with semi-axes
  `a = m * (3N(1-nu^2) / (2E(A+B)))^(1/3)` and `b = n * (same)^(1/3)`.
* **Fastsim** (Kalker's simplified theory): the ellipse is cut into `m0 x n0` slices
  (10 x 10). Along each row the tangential traction is carried from slice to slice,
  `p_H = p' - dx * gamma(x, y) / L`. Where `|p_H|` exceeds the traction bound
  `t_b = 3*mu*N*sqrt(1 - x^2/a^2 - y^2/b^2) / (2*pi*a*b)` the slice slips and the traction
  is scaled back onto the bound. The patch force is the sum of `dx*dy*p` over all slices.

The goal is a real-time step of 1 ms for the vehicle model running on a PC. This accelerator
computes the contact model on one FPGA. Its main idea is that **the rows of a Fastsim patch are
independent**. Only the slices inside one row depend on each other. So the rows are spread over
several processors, and their forces are added at the end. Hertz runs on a processor of its own,
so patch *k+1*'s ellipse is computed while Fastsim integrates patch *k*.

The arithmetic is all single-precision floating point. It runs in hardware FPUs that sit on the
processors' bus. Operands are written to an FPU and the result is read back later, so different
FPUs work at the same time. The Fastsim processors share one FPU set. They take each FPU in a
fixed rotation: a processor uses the FPU, then informs the next processor.

This repository holds the on-chip hardware around the processors: FPUs, sharing logic, memories,
FIFOs and bus decoding. The processors are soft cores with their own programs and are not
included. Each processor's bus master port is a port of the top module. The end-to-end testbench
drives those ports with a behavioural program that does the full Hertz + Fastsim computation.

## Architecture

```
            Hertz side                              Fastsim side
  cpu0_req/rsp                fs_req[0]/rsp ... fs_req[4]/rsp   (CPU1 ... CPU5)
       |                            |   |   |   |   |
   cpu_bus (HAS_DM)             cpu_bus x5 (CPU1 also HAS_DM)
    |      |                        |             |  FIFO ring (sync_fifo x5):
    |   dual_port_mem  <--- port b -+ (CPU1)      |  CPU1 -> CPU2 -> CPU3 -> CPU4 -> CPU5 -> CPU1
    |   port a                                    |
  fpu_unit x4 (dedicated)              fpu_token_ring x4 (one per shared FPU)
  add  mul  div  sqrt                             |
                                      fpu_unit x4 (shared): add  mul  div  sqrt
```

| module | role |
|---|---|
| `wrc_accel_top` | wires both sides together; parameters `N_FS` (5), `FIFO_DEPTH` (16), `DM_WORDS` (512), `FPU_QDEPTH` (4) |
| `fpu_unit` | one bus-attached FPU: operand FIFO, arithmetic core, result FIFO |
| `fp_add`, `fp_mul`, `fp_div`, `fp_sqrt` | the arithmetic cores, fixed latency 7, 12, 35, 35 cycles, a new operation every 3, 8, 31, 31 |
| `fpu_token_ring` | shares one FPU among the Fastsim processors in strict rotation |
| `cpu_bus` | one processor's address decoder |
| `dual_port_mem` | hands patch data from Hertz to Fastsim and the forces back |
| `sync_fifo` | the inter-processor FIFOs, and the queues inside each FPU |
| `wrc_pkg` | number format, latencies, bus structs, address map, rounding |

Everything runs on one clock, `clk`, with an asynchronous active-low reset, `rst_n`.

## Sharing an FPU round a ring

This is the part most likely to surprise a user.

Each of the four shared FPUs has its own `fpu_token_ring`. The ring holds a one-hot token.
After reset the token is with the first Fastsim processor (CPU1).

* The holder's bus requests go straight to the FPU.
* Any other processor that accesses the FPU window is held with `waitrequest` until the token
  reaches it. Its request waits in place, and nothing reaches the FPU.
* The holder passes the FPU on by writing the window's `INFORM` register (offset 5). The token
  moves to the next processor at the end of that write, wrapping from the last to the first.
  An `INFORM` from a processor without the token is held like any other access.
* `TOKEN` (offset 6) can be read at any time, without waiting. It reads 1 when the reader holds
  the FPU.
* The output `fpu_grant[u]` of the top shows the token of shared FPU `u`.

The rotation is strict. A processor is never skipped, even if it does not need the FPU now.
Programs that share an FPU therefore **must issue the same sequence of operations on that FPU**.
Each processor gets every FPU once per round. If one processor needed an FPU more often than the
others, all of them would sooner or later wait on each other for good. The testbench program
keeps to this rule in two ways:

* Every Fastsim processor handles the same number of rows.
* Each slice always computes the clipped traction, and the program then picks the clipped or the
  unclipped value in software. This costs one divide and two multiplies per slice, but there is
  no data-dependent branch on an FPU.

A typical access by a sharing processor is: write `A`, write `B_GO`, read `RESULT` (held until
the result exists), write `INFORM`.

The gain comes from overlap. A processor spends most of its time preparing operands and using
results, not on the FPU. `tb_fpu_share_timing` models that with a loop of 28 cycles of
preparation, one access and 10 cycles of use:

* With an adder of its own, the processor gets one result per 49 cycles.
* Three processors sharing one adder get one result per 16.6 cycles between them.

## Floating point units

Each `fpu_unit` is an 8-word window on the bus:

| offset | name | access |
|---|---|---|
| 0 | `A` | write: first operand (the square root ignores it) |
| 1 | `B_GO` | write: second operand (the radicand for the square root); queues `A op B` |
| 2 | `B_GOSUB` | write: as `B_GO`, but the adder computes `A - B` |
| 3 | `RESULT` | read: oldest result, removed from the queue; held while there is none |
| 4 | `STATUS` | read: `{8'b0, operations in the core[7:0], results waiting[7:0], operations queued[7:0]}` |
| 5 | `INFORM` | write: pass a shared FPU on (handled by `fpu_token_ring`) |
| 6 | `TOKEN` | read: 1 when this processor holds a shared FPU |

* **Queueing.** `B_GO` puts `{A, B, sub}` into a 4-deep operand FIFO. A write to a full FIFO is
  held. The core starts an operation whenever it can take one, one is queued and the 4-deep
  result FIFO is sure to have room: every operation inside the core has a result slot reserved.
* **Latency.** A result can be read `LAT + 2` cycles after the `B_GO` write completes:
  `LAT = 7, 12, 35, 35` for add/sub, multiply, divide and square root. With operations queued
  back to back, the core takes a new one every `II = 3, 8, 31, 31` cycles, the figures the
  source table gives in parentheses for pipelined operation. The adder and multiplier form
  the result at once and pass it down a `LAT`-stage delay line. The divider and square root
  need 27 cycles for their bit-serial engine and then hold the rounded result until its
  `LAT` cycles are up, so the engine is free again after `II` cycles.
* **Overlap.** The bus access overlaps the computation, so a program can queue several
  operations and collect them later. The Hertz program does this for `a = m*r` and `b = n*r`.

Number format and datapaths:

* Numbers are IEEE-754 single precision, rounded to nearest, ties to even.
* There are no subnormals. A subnormal input reads as zero, and a result below `2^-126` becomes
  a signed zero.
* Infinities and NaNs follow IEEE-754. Every NaN produced is `0x7FC00000`.
* The adder and the multiplier compute their result in one combinational pass. The result then
  waits out the fixed latency in a delay line.
* The divider is a restoring divider that retires one quotient bit per cycle.
* The square root is found digit by digit, one result bit per cycle.
* The divider and the square root both produce 26 bits: 24 significant bits, a guard bit and a
  sticky bit from the remainder.

## Bus and address map

Each processor has one master port. It is a plain struct bus: `bus_req_t` is
`{addr[9:0], read, write, writedata[31:0]}` and `bus_rsp_t` is `{readdata[31:0], waitrequest}`.

* A request is held until `waitrequest` is low.
* Read data is valid in that same cycle.
* Addresses are word addresses.

| word address | slave |
|---|---|
| `0x000-0x007` | adder/subtractor |
| `0x008-0x00F` | multiplier |
| `0x010-0x017` | divider |
| `0x018-0x01F` | square root |
| `0x020` | write: push into the outgoing FIFO (held while full) |
| `0x021` | read: pop from the incoming FIFO (held while empty) |
| `0x022` | read: `{in FIFO not empty, out FIFO not full}` |
| `0x200-0x3FF` | dual-port memory (CPU0 and CPU1 only); a read takes one wait cycle |

Other addresses read as zero and ignore writes.

* CPU0's FPU windows reach its dedicated set. It has no FIFOs.
* Fastsim processor `k`'s windows reach the shared set through the token rings.
* Processor `k` writes FIFO `k`, which processor `k+1` reads. The last processor's FIFO feeds
  CPU1.

## The program the testbench runs

`tb/tb_wrc_accel_top.sv` is the best guide to using the design. Six concurrent processes stand in
for the processors.

**CPU0 (Hertz).** For each patch, CPU0:

1. computes `c = 3N(1-nu^2)/(2E(A+B))` and its cube root, using eight Newton steps on its FPUs;
2. computes `a`, `b` and `K = 3*mu*N/(2*pi*a*b)`;
3. writes seven words to the patch's 16-word slot in the dual-port memory: `a, b, xi, eta, phi,
   L, K`;
4. writes a ready flag and moves straight on to the next patch.

At the end CPU0 collects the four forces.

**CPU1 (Fastsim).** CPU1:

1. polls the ready flag;
2. reads the seven words and pushes them round the FIFO ring (CPU2...CPU5 each forward them);
3. integrates its rows;
4. starts the running sum of the patch force;
5. gets the total back from CPU5 and writes it to the memory with a done flag.

**CPU2...CPU5.** Processor `k` integrates rows `k-1` and `k+4`. It pops the running sum, adds its
own rows and pushes the sum on. The x component goes round first, then y. In the strict rotation
of the shared adder, CPU1 must add y after CPU2 has added x.

The slice loop follows the row algorithm. The loop runs exactly `m0` times rather than testing
`x <= -a(y)`, because a floating point test could add a slice. The creepage
`gamma = (xi - phi*y, eta + phi*x)` and the traction bound are both evaluated at the slice
centre.

In the run, every FPU result is compared with the same operation done in single precision in
the testbench. The four patch forces are also compared with a double-precision Fastsim.
Measured results:

* The first patch's ellipse is a = 3.0 mm, b = 2.5 mm.
* 14 of 400 slices slip.
* The four patches take **121,099 cycles** (2.0 ms at 60 MHz).

This processor model has no instruction overhead and waits for its strict turn at every shared
FPU access. Real processor code would set the time differently.

## What is not here, and where this design chooses for itself

Not included:

* The soft processors and their programs.
* The bridge to the off-chip program flash, and the flash itself.
* The JTAG/Ethernet link to the host PC.

The processors' bus ports are ports of the top.

This design's own choices:

* The bus protocol and address map.
* The register interface of the FPUs.
* The FPU datapaths. Only their function and cycle counts are given by the architecture.
* Reading each FPU's two cycle counts as the latency of one operation and the start-to-start
  interval of operations that follow each other.
* How the "inform" is signalled, and holding a waiting processor with `waitrequest`.
* The sizes of the memory (512 words), the ring FIFOs (16 words) and the FPU queues (4).
* The memory's synchronous read. When both ports write the same word in the same cycle, port a
  (CPU0) wins.
* Flush-to-zero for subnormal numbers.

The original system uses a generated multi-master bus fabric. Here each processor has a simple
decoder instead, and shared-FPU ownership comes from the token rings rather than from bus
arbitration.

One alternative is not built: an FPU set with two dividers, which shortens one scheduling
example by 17%. Each set here has one unit of each kind.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each has a
watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/wrc_pkg.sv tb/tb_fp_pkg.sv tb/tb_wrc_accel_top.sv --top-module tb_wrc_accel_top
./obj_dir/Vtb_wrc_accel_top
```

Replace the last file and the top name for the other testbenches: `tb_fp_add`, `tb_fp_mul`,
`tb_fp_div`, `tb_fp_sqrt`, `tb_fpu_unit`, `tb_fpu_token_ring`, `tb_cpu_bus`, `tb_sync_fifo`,
`tb_dual_port_mem` and `tb_fpu_share_timing`. `tb_fp_pkg` provides the reference arithmetic. It rounds a double-precision
result to single precision, which gives the correctly rounded answer for these five operations.

* The core testbenches run thousands of random operands plus the special cases. They check
  the result bits and the exact latency. They then start 500 operations back to back and check
  that a new one starts every `II` cycles and that each result arrives `LAT` cycles after its
  start.
* `tb_fpu_unit` also checks the `LAT + 2` bus latency, queueing with a held `B_GO`, and that
  three queued operations finish `LAT + 2*II + 2` cycles after the first is queued.
* The top-level testbench runs at the default parameters. It takes about half a second. It
  fails if any mechanism never happened: a processor waiting for a shared FPU, an FPU handed
  on, FIFO traffic, a read waiting on an empty FIFO, a memory hand-over, Hertz working ahead of
  Fastsim, queued FPU operations, slip slices and adhesion slices.

To change the number of Fastsim processors, set `N_FS`. The program in the testbench assumes 5
(rows `k-1` and `k+4`).
