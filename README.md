# Streaming single-precision matrix multiplier (128 x 128, AXI4-Stream / AXI4-Lite)

This RTL multiplies two square matrices of IEEE-754 single-precision numbers,
C = A x B, inside the programmable logic of a Zynq-class SoC. The processor
keeps the matrices in DDR. A DMA engine streams A and B into the accelerator
over one 512-bit AXI4-Stream and takes C back over another. The processor starts
and monitors the accelerator through a small AXI4-Lite register block.

The accelerator reads both matrices into on-chip buffers and multiplies them
with 32 floating-point multiply-accumulate lanes. It then streams the result
out. Each element of C is summed in the order of the plain triple loop,

    for m, for n: sum = 0; for k = 0..N-1: sum += A[m][k] * B[k][n]

with every multiply and every add rounded separately. The result is therefore
bit-identical to that loop compiled for `float`, not just close to it.

Defaults: N = 128, stream width 512 bits (16 floats per beat), 32 lanes.

## Parts

| Module | Role |
|---|---|
| `design_matmult_accel` | System top: reset block, control interconnect, accelerator. The processor and DMA connections are ports. |
| `matmult_accel` | The accelerator IP: stream loader, buffers, kernel, stream writer, control registers. |
| `mm_ctrl_regs` | AXI4-Lite control/status registers and the completion interrupt. |
| `mmult_kernel` | Schedules the multiplication over the buffers and drives the lanes. |
| `mac_lane` | One pipelined multiply-accumulate lane. |
| `fp32_mul`, `fp32_add` | Combinational binary32 multiplier and adder. |
| `sdp_ram` | Buffer with one write port (per-segment enables) and one asynchronous read port. Used for A, B and C. |
| `axil_interconnect` | Routes AXI4-Lite register traffic by address. Unmapped addresses get DECERR. |
| `proc_sys_reset` | Synchronises the processor's reset to the fabric clock. |
| `mm_pkg` | Shared types, defaults, register offsets, phase encoding. |

## One run, as the host sees it

1. Put A and B in DDR, back to back, row-major, as float32.
2. Optionally enable the interrupt: write 1 to GIE (0x04) and 1 to IER (0x08).
3. Arm the DMA: send 2·N·N floats and receive N·N floats.
4. Write CTRL (0x00) = 0x81, which is ap_start plus auto_restart. Use 0x01 for a
   single run.
5. Wait for the DMA receive to finish, or for the interrupt. Clear the interrupt
   by writing 1 to ISR bit 0 (0x0C).

With auto_restart set, the accelerator goes back to waiting for the next A and B
as soon as C has left. A stream of products then needs only DMA transfers.

### Control registers (`mm_ctrl_regs`)

Offsets are relative to the accelerator's window (0x4000_0000 in the system
map).

| Offset | Bits | Meaning |
|---|---|---|
| 0x00 CTRL | 0 ap_start | R/W. A run starts while it is 1. Cleared at the end of a run unless auto_restart is set. |
| | 1 ap_done | R. Set at the end of a run. Cleared when CTRL is read. |
| | 2 ap_idle | R. 1 while the accelerator waits for ap_start. |
| | 3 ap_ready | R. Set at the end of a run. Cleared when CTRL is read. |
| | 7 auto_restart | R/W |
| 0x04 GIE | 0 | Global interrupt enable. |
| 0x08 IER | 0, 1 | Interrupt enable for done and for ready. |
| 0x0C ISR | 0, 1 | Latched done / ready events, only when enabled in IER. Writing 1 toggles a bit. |

`interrupt = GIE & |(IER & ISR)` and is a level. All responses are OKAY. Write
strobes are ignored. Unknown offsets read as 0.

## Stream format

The input stream `in_r` (`s_axis_mm2s_*` on the top) carries N·N/16 beats of A
and then N·N/16 beats of B. Each beat holds 16 consecutive elements in row-major
order. Element j of a beat sits in bits 32j+31 .. 32j. TLAST, TKEEP and TSTRB of
the input are not looked at: the accelerator counts beats. TREADY is held high
throughout both load phases, so the input runs at one beat per cycle whenever
the DMA offers data.

The output stream `out_r` (`m_axis_s2mm_*`) carries C in the same packing. TLAST
is set on the last beat only, and TKEEP/TSTRB are all ones. TVALID stays high
for the whole output phase. A beat held back by TREADY stays unchanged until it
is taken; an assertion checks this.

The accelerator does not start computing until both matrices are in. It offers
no output before the computation is complete.

## The kernel: 32 lanes that sum in loop order

This is the part that needs the most care. Floating-point addition is not
associative. Two common ways to speed up a dot product would both change the
result bits:

- adder trees, which sum the k terms in a different order;
- splitting one sum across several lanes.

`mmult_kernel` avoids both. Each lane owns one output element for the whole of
its k loop. The parallelism comes from computing 32 different outputs side by
side.

**Schedule.** The kernel goes through C row by row (m). Within a row it works on
groups of LANES = 32 adjacent columns (g). For one (m, g) it runs k = 0 .. N-1,
one k per cycle:

- The element A[m][k] is read once and sent to all 32 lanes.
- The row segment B[k][32g .. 32g+31] is read as one word. Lane l gets column
  32g+l.
- Lane l accumulates C[m][32g+l].

When k reaches N-1, the next group starts on the following cycle, with no
bubble. A product therefore takes N³/32 issue cycles, which is 65,536 at
N = 128.

**Buffer layout.** The loader writes the buffers in this shape so that each read
above is a single word:

| Buffer | Word | Holds | Shape at N = 128 |
|---|---|---|---|
| A | (m·N+k)/16 | 16 consecutive elements of row m, one input beat per word | 1024 x 512 bit |
| B | k·(N/32)+g | B[k][32g .. 32g+31] | 512 x 1024 bit |
| C | m·(N/32)+g | C[m][32g .. 32g+31] | 512 x 1024 bit |

A B word is two input beats. The loader writes it in two halves, using the
segment enables of `sdp_ram`. On output, C is read back the same way, one half
per beat.

**Pipeline.** The kernel has four register stages:

1. The issue counters (m, g, k) address the buffers.
2. The read data is registered: the selected A element and the B word, together
   with first/last flags and the C address.
3. Each lane multiplies and registers the product.
4. Each lane adds the product to its running sum and registers the new sum. On
   the first term the product is added to +0, as the loop's `sum = 0` does.

When the last term of a group has been added, all 32 sums are written to C as
one word in the next cycle. `done` follows one cycle after the final write, that
is N³/32 + 4 cycles after `start`. Because each lane adds only one term per
cycle and that add is single-cycle, there is no loop-carried hazard. The cost is
a combinational floating-point add in the accumulate stage, which is the
critical path.

## Floating-point units

`fp32_mul` and `fp32_add` are combinational and round to nearest even.

- `fp32_mul` forms the 24 x 24-bit significand product. It normalises by at most
  one place, rounds on guard and sticky bits, and renormalises if rounding
  carries out.
- `fp32_add` orders the operands by magnitude and shifts the smaller one right,
  folding shifted-out bits into a sticky bit. It adds or subtracts on 27 bits,
  normalises with a leading-zero count, then rounds.
- Exact cancellation gives +0. Adding -0 to -0 gives -0.

Special values:

- Subnormal inputs are read as zero.
- Results below the normal range are flushed to a signed zero. This is the usual
  behaviour of FPGA floating-point cores, and it makes the design differ from
  full IEEE only where subnormals are involved.
- Overflow gives a signed infinity.
- Any NaN input gives the quiet NaN 0x7FC00000. So do infinity times zero and
  infinities of opposite sign added together.

## System wrapper

`design_matmult_accel` wires the fabric side of the system.

**Clock.** Everything runs on `FCLK_CLK0`, the processor's fabric clock. The
target system clocks it at 50 MHz.

**Reset.** `proc_sys_reset` takes `FCLK_RESET0_N`:

- Assertion is asynchronous.
- Release is synchronous: two synchroniser stages, then a hold of 16 clean
  cycles, then all outputs leave reset together.
- The interconnect gets `interconnect_aresetn`. The accelerator gets
  `peripheral_aresetn`, which is also a top-level port for the DMA.

**Control routing.** `axil_interconnect` connects the processor's AXI4-Lite
master to two windows:

| Target | Base | Size |
|---|---|---|
| Accelerator control registers | 0x4000_0000 | 64 KiB |
| DMA registers (`dma_lite_*` port) | 0x41E0_0000 | 64 KiB |

Other addresses answer DECERR and reach neither target. The interconnect
handles one write and one read at a time. That costs a few cycles per register
access and nothing else.

## Performance

| Quantity | Cycles at N = 128 |
|---|---|
| Load | 2048 beats (1 per cycle when the DMA keeps up) |
| Compute | 65,536 issue cycles; 65,542 cycles from the last input beat to the first output beat |
| Output | 1024 beats |
| Whole run, from the ap_start write to the last beat of C | 68,614 (simulated) |

At 50 MHz the whole run is about 1.37 ms. Fifty back-to-back products with
auto_restart take 68,614 to 68,615 cycles each; the accelerator's timing does
not depend on the data. The same product measured end to end
on a board with this architecture took about 3.4 ms against about 5.9 ms for
NumPy on the ARM cores. That measurement also includes DMA set-up and Python
overhead.

Resource-wise, 32 lanes correspond to 32 float multipliers and 32 float adders.
On 7-series DSP slices (3 + 2 per lane) that is 160 DSPs. The three buffers hold
exactly 3 · 128² · 32 = 1,572,864 bits.

## Where this departs from, or goes beyond, the reference design

- **Dimension registers.** The reference host code also writes registers named
  `k`, `m` and `n`. The accelerator it describes has a fixed size, and so does
  this one: N is a parameter and there are no dimension registers.
- **Parallelism and schedule.** The reference implementation is high-level
  synthesis of the triple loop. The lane count, schedule and buffer shapes here
  are this design's reading of it. The lane count comes from its 160 DSPs. Its
  exact cycle count is not known, so the timing above is this design's own.
- **Register bits.** Only CTRL at offset 0 with ap_start (bit 0) and
  auto_restart (bit 7) is fixed by the reference host code. The other CTRL bits
  and GIE/IER/ISR follow the usual HLS control layout.
- **Buffer reads.** Buffers are read asynchronously (distributed-RAM style). A
  block-RAM mapping would add one read stage in the kernel and a prefetch on the
  output.
- **Reset block.** This is a simple reset synchroniser with the vendor block's
  port names. It releases all outputs together instead of in sequence.
- **Not part of this RTL:** the processor, the DMA engine, and the full AXI4
  interconnect that joins the DMA's memory masters to the processor's DDR port.
  Their connections are ports of the top, and the testbenches play their part.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself via a watchdog if it hangs.
The float reference (`tb/tb_fp_ref_pkg.sv`) works through double-precision
reals: it converts operands exactly, does one operation, and rounds once to
single precision by bit manipulation. For a single add or multiply this gives
the correctly rounded single result, so results are compared bit for bit.

Example, the full-size run (all defaults, one 128 x 128 product):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/mm_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_full_size_matmult.sv \
        --top-module tb_full_size_matmult -Mdir obj_full
    ./obj_full/Vtb_full_size_matmult

Replace the testbench file and top for the others:

| Testbench | What it covers |
|---|---|
| `tb_fp32_mul`, `tb_fp32_add` | ~75k directed and random operand pairs each: specials, ties, overflow, underflow, cancellation. |
| `tb_mac_lane` | 400 back-to-back sums of random length; result timing. |
| `tb_sdp_ram` | Segment writes, read-during-write. |
| `tb_mmult_kernel` | N = 32, 16 lanes, 4 floats per word. Bit-exact C, each C word written once, exact `done` latency. |
| `tb_mm_ctrl_regs` | ap_start/done/idle/ready, auto_restart, interrupt registers. |
| `tb_axil_interconnect` | Routing to both windows with random slave delays; DECERR. |
| `tb_proc_sys_reset` | All four reset sources, asynchronous assertion, hold count. |
| `tb_matmult_accel` | N = 32. Exact compute gap, one output beat per cycle, auto-restart with stalls on both streams. |
| `tb_design_matmult_accel` | N = 32, end to end through the top. Counts and requires each mechanism: input stalls, output back-pressure, auto-restart, interrupt, DMA register access, decode error, reset recovery. |
| `tb_full_size_matmult` | Defaults, one 128 x 128 product. Runs in well under a second. |
| `tb_benchmark_runs` | Defaults, 50 back-to-back 128 x 128 products after a single start write. Each one is checked, and the cycles per product are reported (about 16 s of simulation). |

Helpers in `tb/`:

- `tb_axil_master`: the processor's register accesses.
- `tb_axil_slave`: a register slave standing in for the DMA's registers.
- `tb_axis_mm_host`: the DMA's two streams, with optional random stalls and
  protocol checks.

## Changing the design

Parameters of `design_matmult_accel` / `matmult_accel`:

- `N`: matrix size.
- `DWIDTH`: stream width, a multiple of 32.
- `LANES`: number of MAC lanes.

Constraints, checked at elaboration:

- LANES must be a multiple of DWIDTH/32.
- N must be a multiple of LANES and of DWIDTH/32.

Compute time scales as N³/LANES. Buffer size scales as 3·N²·32 bits.

Changing the summation order, for example to an adder tree over k, would be
faster but would no longer match the sequential loop bit for bit. The
testbenches would then need a tolerance instead of exact comparison.
