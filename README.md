# Modal plate reverberator for FPGA

A plate reverb can be simulated as a bank of independent damped
oscillators, one per vibration mode of the plate. Dry audio excites every
mode, each mode rings at its own frequency and decays at its own rate, and
the wet signal is a weighted sum of all the modes. A convincing plate needs
tens of thousands of modes, and every mode must be updated at every 48 kHz
sample. This RTL is a hardware modal processor of that kind. It updates
30,000 modes per sample in IEEE-754 single precision. It processes audio in
buffers of 64 samples and fits each buffer in 73% of its real-time budget.

The architecture follows a published FPGA implementation that was built
with high-level synthesis. That study compared CPUs, GPUs and FPGAs on
modal reverberation. Its structure is reproduced here by hand: a pipelined
mode loop, an unrolled sample loop, coefficients streamed from external
memory and the mode state kept on chip. Its default sizes are one of the
published FPGA builds: a Zynq-7020 with 30,000 modes, buffers of 64
samples, and a 122.88 MHz clock. The operators, the control logic and the
interfaces are this design's own. Each file's header comment says which
parts follow the original design and which do not.

## The recursion

Each mode m is a two-pole resonator:

    u_m[n+1] = c1_m * u_m[n] + c2_m * u_m[n-1] + c3_m * f[n]
    y[n]     = sum over m of  w_m * u_m[n+1]

Here `f` is the dry input and `y` the wet output. The host computes the
four coefficients per mode once, before runtime. For a mode of angular
frequency ω, loss σ = 3 ln(10) / T60, sample period T, and plate mode shape
U_m evaluated at the input point x_f and the output point x_o:

    c1 = 2 cos(ωT) e^(−σT)
    c2 = −e^(−2σT)
    c3 = T² e^(−σT) U_m(x_f)
    w  = U_m(x_o)

This is the exact (impulse-invariant) discretisation of a damped
oscillator. It does not warp frequencies and it is stable for any ω. For a
simply supported rectangular plate, ω and U_m have closed forms. The
hardware does not care where the coefficients come from, so measured modal
data works as well. A Störmer–Verlet discretisation also fits the same
recursion, with c1 = (2 − ω²T²)/(1 + σT), c2 = −(1 − σT)/(1 + σT) and
c3 = T² U_m(x_f)/(1 + σT). It is cheaper for the host to compute, but it
warps frequencies and is only stable for ω < 2/T.

## Swapped loops and the stage chain

The obvious order updates every mode for one sample, forms the dot product,
and moves on to the next sample. This design swaps the two loops. It takes
one mode at a time and runs that mode through a whole buffer of B samples
before it fetches the next mode. Each mode's coefficients are then read
once per buffer instead of once per sample. Output sample n becomes a
running sum that collects one contribution from every mode.

In hardware, the sample loop is unrolled into a chain of B `mode_stage`
units. Stage n holds input sample x[n] and the accumulator for output
sample y[n]. A *mode record* holds the four coefficients, the state (u,
uPrev) and the mode index. The record enters stage 0 and moves one stage
per clock:

    coef_fetch ──► [state read] ──► stage 0 ──► stage 1 ──► … ──► stage B−1 ──► [state write-back]
                                     x[0],y[0]   x[1],y[1]         x[B−1],y[B−1]

At stage n the record computes `uNext = (c1·u + c2·uPrev) + c3·x[n]` and
adds `uNext·w` to y[n]. It leaves with its state shifted (`uPrev ← u`,
`u ← uNext`). Successive modes follow each other down the chain, so up to B
modes are in flight at once, each at a different sample. When a record
leaves the last stage it holds the mode's state at the end of the buffer,
and that state is written back to `state_ram`. Each mode is visited once per
buffer, so a mode is never read while its own write-back is pending.

The float operations follow the order of the C code the original design was
synthesised from. Each y[n] sums the modes in index order. As a result, the
output equals bit for bit a plain sequential float program that runs the
swapped loops. The testbenches rely on that.

## Time budget

At 122.88 MHz and 48 kHz, one sample period is 2,560 clock cycles, so a
64-sample buffer has 163,840 cycles. The coefficients arrive as one 4-beat
AXI4 burst per mode, and up to four bursts are in flight. A kernel run
therefore takes about

    4 · num_modes + memory latency + B   cycles

For 30,000 modes that is 120,074 cycles in simulation (73% of the budget).
The simulated runs of three published build sizes compare as follows. The
last column is the share of the budget that the original HLS builds
reported for the same sizes:

| modes | buffer | budget (cycles) | kernel run (cycles) | share | HLS build |
|---:|---:|---:|---:|---:|---:|
| 12,000 | 24 | 61,440 | 48,034 | 78% | 98% |
| 30,000 (default) | 64 | 163,840 | 120,074 | 73% | 92% |
| 45,000 | 80 | 204,800 | 180,090 | 87% | 88% |

The largest mode count that meets the budget is about 640·B, which is
40,960 at B = 64. The state memory limits a build to `MAX_MODES`. The
original HLS build reported about 10 cycles per mode.

Each float operator here is combinational, and one stage chains three
levels of operators (multiply, add, add, then multiply and add for the
output) within one clock. No timing closure at 122.88 MHz is claimed.
Fetching a mode takes four cycles, so the stages could be pipelined deeper
with no loss of throughput, but that is not done here.

## Buffering and deadlines (`frame_buffer`, `sample_tick`)

`sample_tick` divides the clock by 2,560 into a 48 kHz strobe. On each
strobe, `frame_buffer` stores `audio_in` and advances `audio_out`. After B
strobes the input buffer is full. If the kernel is idle, `frame_buffer`
does three things at once:

- it hands the buffer to the kernel as `x_frame`, which stays constant
  during the run;
- it copies the previous result into the playback buffer;
- it starts the kernel.

The output therefore lags the input by exactly two buffers. If the kernel
is still running when the next buffer is full, the deadline was missed. In
that case the new buffer is dropped, the next buffer played is silence, and
`overrun_count` goes up. `kernel_cycles` reports the length of the last
run, to compare against `BUFFER*CLK_PER_SAMPLE`.

## Coefficient table in external memory

The host stores the table at `coef_base`. Each mode takes 16 bytes, in this
order:

    base + 16m + 0 : c1     base + 16m + 8  : c3
    base + 16m + 4 : c2     base + 16m + 12 : w (output weight)

`coef_fetch` reads the table with INCR bursts (ARLEN = 3, ARSIZE = 4 bytes),
all on one ID. It holds RREADY high and sets `coef_resp_err` on any
non-OKAY response. Only the read channels exist, because the processor
never writes external memory. `num_modes` and `coef_base` are sampled at
the start of each buffer, so the host can change the mode count between
buffers. A request above `MAX_MODES` is clipped.

## Floating point

`fp32_mul` and `fp32_add` are combinational single-precision operators
that round to nearest, ties to even. To keep them small, subnormal inputs
count as zero and subnormal results are flushed to signed zero. Overflow
gives infinity, and NaN is not produced. The signal levels of a decaying
resonator stay far from both ends of the float range. Apart from these
simplifications, the results are correctly rounded, and the testbenches
check them bit for bit against double-precision reference arithmetic.

## After reset

The kernel first writes zero to all `MAX_MODES` state words, which takes
30,000 cycles at the default size. During that time `ready` is low.
`ready` going high starts the sample strobe.

## Files

| file | contents |
|---|---|
| `rtl/modal_pkg.sv` | float type, mode coefficient and state structs |
| `rtl/fp32_mul.sv`, `rtl/fp32_add.sv` | float operators |
| `rtl/mode_stage.sv` | one unrolled sample step for one mode |
| `rtl/state_ram.sv` | on-chip u/uPrev memory, one 64-bit word per mode |
| `rtl/coef_fetch.sv` | AXI4 burst reader for the coefficient table |
| `rtl/modal_kernel.sv` | mode loop: fetch, state read, stage chain, write-back, FSM |
| `rtl/frame_buffer.sv` | input/output buffers, kernel start, overrun |
| `rtl/sample_tick.sv` | 48 kHz strobe |
| `rtl/modal_reverb_top.sv` | top level |
| `tb/fp_ref_pkg.sv` | reference float arithmetic, mode coefficient generator |
| `tb/axi_mem_model.sv` | behavioural external memory with latency and random stalls |
| `tb/tb_*.sv` | one self-checking testbench per module, plus three end-to-end ones |
| `tb/reverb_harness.sv` | end-to-end checker for one build size |

Top-level parameters: `MAX_MODES` (30000), `BUFFER` (64), `CLK_PER_SAMPLE`
(2560), `ADDR_W` (32) and `MAX_OUTSTANDING` (4, the number of bursts in
flight).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits. For
example, to run the end-to-end test at reduced size (8 modes, 4-sample
buffers):

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/modal_pkg.sv tb/fp_ref_pkg.sv tb/tb_modal_reverb_top.sv \
        --top-module tb_modal_reverb_top -o sim && ./obj_dir/sim

This test covers normal buffers, a change of mode count, a clipped
request, memory back-pressure and overruns. It fails if any of these never
happens. `tb_modal_reverb_full` runs the default build: 30,000 modes and
four buffers, with the first two results compared sample by sample. It
builds in about 15 s and runs in about 15 s. `tb_modal_reverb_workloads`
runs the same check on the 12,000-mode/24-sample and the
45,000-mode/80-sample builds side by side, using the helper
`tb/reverb_harness.sv`. The module testbenches
(`tb_fp32_mul`, `tb_fp32_add`, `tb_mode_stage`, `tb_state_ram`,
`tb_coef_fetch`, `tb_modal_kernel`, `tb_frame_buffer`, `tb_sample_tick`)
build the same way. Files read only by the testbenches are found through
`-y tb`. Run the commands from the folder that holds `rtl/` and `tb/`.

## What is not here

- The host software that computes the coefficients.
- The external DRAM and its controller. The top exposes the AXI4 read
  channels instead.
- The audio codec interface. The top exposes float samples and a strobe.
  Converting to and from the codec's integer format is left to that
  interface.
- A control-register interface. `num_modes` and `coef_base` are plain
  ports.
- Sample-by-sample operation with no buffering (`BUFFER = 1`, the lowest
  possible latency) is allowed by the parameters but has not been
  simulated. At four cycles per mode it would hold about 640 modes.
