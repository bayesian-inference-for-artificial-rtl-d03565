# Exact Bayesian grid localisation on an FPGA

This RTL computes exact Bayesian inference for a grid-localisation problem of the kind used in robot perception. A boat sits somewhere on a square grid of N = 2^b × 2^b cells. It measures its distance to three landmarks (D1..D3) and its bearing to each of them (B1..B3). Each reading is a small integer. Given the six readings, the posterior of every cell m is

    y_m = P(M_m) · Π_k P(E_k | M_m)            (k = D1, D2, D3, B1, B2, B3)

normalised over all cells afterwards.

The engine does no modelling at run time. For every cell, every sensor and every value that sensor can read, `P(E_k | M_m)` is computed offline and stored in global memory as a likelihood look-up table. Each new set of readings then costs, per cell, six table reads, six floating-point multiplications and one store. Cells are independent, so any number of compute units can work on different cells without synchronising. The hardware leaves the posterior **unnormalised**. The host divides by the sum, which for grids up to 128×128 is cheaper on a CPU than synchronising all work items on the device. All arithmetic is IEEE-754 double precision.

## Memory layout: the part to get right

Everything lives in a word-addressed global memory, one floating-point value per 64-bit word. The host provides three buffers, each with its own base address:

| buffer | contents | size (words) |
|---|---|---|
| likelihood vector | one prior per cell; the run overwrites it with the posterior | N |
| distance table | for each cell, 3 rows (D1, D2, D3) of `maxDist+1` likelihoods | N · 3 · (maxDist+1) |
| bearing table | for each cell, 3 rows (B1, B2, B3) of `maxBear+1` likelihoods | N · 3 · (maxBear+1) |

The word read for cell `i`, sensor `s` and reading `v` is

    distance, s = 0..2:  base_dist + i·3·(maxDist+1) + s·(maxDist+1)     + v
    bearing,  s = 3..5:  base_bear + i·3·(maxBear+1) + (s−3)·(maxBear+1) + v

For the benchmark, a grid with b bits per coordinate has `maxDist+1 = 2^(b+1)` and `maxBear+1 = 2^(b+2)`. The tables therefore grow as N·(3·2^(b+2) + 3·2^(b+1)) words, about the fourth power of the grid side:

| grid | cells | table words | bytes (double) |
|---|---|---|---|
| 8×8 | 64 | 9 216 | 72 KiB |
| 16×16 | 256 | 73 728 | 576 KiB |
| 32×32 | 1 024 | 589 824 | 4.5 MiB |
| 64×64 | 4 096 | 4 718 592 | 36 MiB |
| 128×128 | 16 384 | 37 748 736 | 288 MiB |

Addresses are 32-bit word addresses (4 G words), so every size in the table fits. The tables are written once. Between runs only the six sensor registers change, and the posterior of one run is the prior of the next.

## The compute unit (`posterior_cu`)

A compute unit takes one cell index (the OpenCL global ID) and runs the kernel loop `n_iter` times:

```
pass 0:       L = Π six likelihoods;  y = prior · L
pass 1..n-1:  L = Π six likelihoods;  y = y + y · L
store y into the likelihood vector
```

With `n_iter = 0` the loop does not run and 0 is stored. Only the first pass computes the Bayesian update. Later passes compute `y·(1+L)`, exactly as the kernel loop is written. They exist to repeat the work for timing and power measurement and do not refine the result. The likelihoods are fetched again on every pass. The source's pseudo-code resets its sensor counter only once, before the pass loop, so read to the letter it would fetch them in the first pass only and reuse the product afterwards. Both readings store the same value, because tables and readings do not change during a run. Fetching every pass keeps the memory traffic that the repeated passes are meant to measure.

Inside the unit, a state machine issues the loads of a pass back to back: slots 0–5 for the sensors, plus slot 6 for the prior on the first pass. Each load is tagged with its slot number. Responses may come back in any order and are parked in a register per slot. Once all have arrived, one shared `fp_mul` walks the product, and `fp_mul`/`fp_add` update `y`. Finally the unit issues the store and waits for its acknowledgement. With a memory that never stalls and has latency R:

- a one-pass cell takes **32 + 2R cycles** from hand-over to `cell_done`;
- each further pass adds **29 + R cycles**.

The testbench checks 40 and 33 cycles at R = 4.

## Kernel, interconnect and memory port

`posterior_kernel` holds `NUM_CU` (default 4) compute units. It hands cell indices 0, 1, 2, … to the lowest-numbered idle unit, at most one per cycle. The run ends when every cell's store has been acknowledged.

`global_interconnect` merges the units onto the single memory port with round-robin arbitration. No waiting unit is passed over more than `NUM_CU−1` times. It prepends the unit index to the tag; responses are steered back by that index and may arrive in any order.

The memory port (`mem_req_*`, `mem_rsp_*`, types in `bayes_pkg`) works as follows:

- Requests use a valid/ready handshake. A request must stay valid and unchanged until accepted; assertions check this.
- Every request, load or store, gets exactly one response carrying its tag. A store's response is its acknowledgement.
- Responses cannot be back-pressured.

This port is where the board's own memory system (PCIe and DDR3 controller, not part of this design) would connect.

With four units and an 8-cycle memory that refuses 5 % of requests, a full 128×128 run takes 220 537 cycles, about 13.5 cycles per cell. Each cell makes 7 loads and 1 store.

Cycle counts with four units and an 8-cycle memory that never stalls, from `tb_bayes_workloads`:

| grid | 1 pass | 10 passes | 100 passes | 1000 passes |
|---|---|---|---|---|
| 16×16 | 4 164 | 34 116 | 333 636 | 3 328 836 |
| 32×32 | 16 644 | 136 452 | 1 334 532 | – |
| 64×64 | 66 564 | 545 796 | 5 338 116 | – |
| 128×128 | 266 244 | 2 183 172 | – | – |

That is 16.25 cycles per cell for one pass and 13 cycles per cell for each further pass. On its own, a unit needs 29 + R = 37 cycles per pass, which would be 9.25 cycles per cell with four units. The remaining cycles are queueing: the units fall into step and issue their six loads at the same moment, so they take turns on the single memory port. A memory that stalls now and then knocks the units out of step, which is why the 5 %-stall run above needs fewer cycles (220 537) than the 128×128 single pass here (266 244). The combinations marked – were not simulated because they are long. They scale the same way.

## Host interface (`kernel_csr`)

The 32-bit register bus has word addresses, combinational reads and writes taking effect at the clock edge.

| addr | register | |
|---|---|---|
| 0x0 | CTRL | write bit 0 = start; read bit 0 = busy, bit 1 = done (cleared by the next start) |
| 0x1 | N_CELLS | number of cells |
| 0x2 / 0x3 | MAX_DIST / MAX_BEAR | largest distance / bearing reading |
| 0x4 | N_ITER | passes per cell |
| 0x5 / 0x6 / 0x7 | BASE_VEC / BASE_DIST / BASE_BEAR | buffer word addresses |
| 0x8–0xD | SENSOR0..5 | readings D1, D2, D3, B1, B2, B3 |
| 0xE | CYCLES | clock cycles of the last run |

A grid can be split over several accelerators, each taking a contiguous range of cells. For a range starting at cell `c0`, set N_CELLS to the range length and offset the three bases:

- BASE_VEC by `c0`;
- BASE_DIST by `c0·3·(MAX_DIST+1)`;
- BASE_BEAR by `c0·3·(MAX_BEAR+1)`.

The unit then counts cells from 0 within its range. This follows directly from the index formula above; no testbench runs a split grid.

Argument writes and start requests made while the kernel is busy are ignored, so a run always sees stable arguments. `irq` pulses when a run ends.

A typical session:

1. Load the tables and priors into memory.
2. Program all registers and start.
3. Wait for done, then read and normalise the vector.
4. For each new observation, write SENSOR0..5 and start again.

## Floating point

`fp_mul` and `fp_add` are two-stage pipelines, one operation per cycle, with latency 2. They default to double precision (1/11/52 bits); `EXP_W=8, FRAC_W=23` gives single precision.

- Rounding is to nearest, ties to even. Results match IEEE-754 bit for bit for normal operands and results.
- Subnormal inputs are read as zero, and results below the normal range are flushed to zero. With likelihoods and priors of ordinary size this never matters: a product of seven values ≥ 2^-8 is far from the subnormal range.
- `fp_add` only handles non-negative operands, since it only ever adds probabilities. An assertion checks this.

With single precision a value occupies the low 32 bits of a memory word. `tb_bayes_single` builds the whole accelerator that way and checks 16×16 and 32×32 runs of up to 1000 passes bit for bit, against a reference that rounds every double operation to single.

## What follows the source design and what is this design's own

Taken from the source design:

- the posterior formula;
- the table layout and index formulas;
- the pass loop, including `y + y·L` and the zero-pass case;
- one cell per work item;
- double precision as the main format;
- normalisation on the host;
- the split into kernel, global interconnect and board interface.

Where the source is inconsistent or silent, this design chose:

- **Bearing table.** The kernel's argument list names a separate bearing table, but its loop body indexes the distance table for the bearing sensors too. Here bearing reads use the bearing table at its own base address. Pointing BASE_BEAR at the right part of a single buffer gives the same result.
- **Sensor array.** Sensor values are one array of six, distance first.
- **Product start.** The running product starts at 1.0 in every pass.
- **Own choices:** `NUM_CU = 4`, the dispatch order, the round-robin arbiter, the tagged memory protocol, the register map, the 2-cycle arithmetic units with flush-to-zero, and asynchronous active-low reset on all state.

Not included: the board interface (PCIe, DDR3 controller), the memory itself and the host software, including normalisation. The register bus and memory port are the boundaries where they connect.

## Files

- `rtl/bayes_pkg.sv` – widths, request/response structs, kernel-argument struct.
- `rtl/fp_mul.sv`, `rtl/fp_add.sv` – floating-point units.
- `rtl/lut_addr_gen.sv` – table address of (cell, slot).
- `rtl/posterior_cu.sv` – one compute unit.
- `rtl/posterior_kernel.sv` – compute units and cell dispatcher.
- `rtl/global_interconnect.sv` – arbiter and response router.
- `rtl/kernel_csr.sv` – host registers.
- `rtl/bayes_accel_top.sv` – top level.
- `tb/tb_lut_pkg.sv` – test data and reference model. Table words are a hash of their address, mapped to a double in [2^-8, 1), so no table files are needed and a wrong address almost surely gives a wrong value. The reference redoes the arithmetic with the simulator's IEEE doubles.
- `tb/ddr_model.sv` – behavioural global memory with latency, random stalls and optional out-of-order responses.
- `tb/tb_*.sv` – one self-checking testbench per module:
  - `tb_bayes_accel_top` runs several grids end to end. It checks that stalls, reordering, arbitration conflicts, later passes, zero-pass runs, writes ignored while busy and re-runs on the previous posterior all occur.
  - `tb_bayes_full` runs one complete 128×128 inference at default parameters and checks all 16 384 posteriors bit for bit.
  - `tb_bayes_single` runs the accelerator in single precision (see below).
  - `tb_bayes_workloads` runs the benchmark combinations of grid size and pass count (table below) at default parameters and checks every posterior and a lower bound on each run's cycle count.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bayes_pkg.sv tb/tb_lut_pkg.sv tb/tb_bayes_accel_top.sv --top-module tb_bayes_accel_top
./obj_dir/Vtb_bayes_accel_top
```

Replace the testbench name to run another one. The full 128×128 run takes well under a second of simulation time. To change the number of compute units or the number format, override `NUM_CU`, `EXP_W` and `FRAC_W` on `bayes_accel_top`. `NUM_CU` may go up to 32, the limit of the 5-bit unit index in the memory tag (`CUID_W` in `bayes_pkg`).
