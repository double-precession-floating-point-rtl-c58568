# Double precision arithmetic accelerator with a Schönhage–Strassen significand multiplier

Multiplying two IEEE-754 double precision numbers comes down to one large integer product.
The two 53-bit significands (hidden bit included) give a 106-bit result. This design computes
that product with the Schönhage–Strassen algorithm (SSA) instead of a partial-product array:

1. cut each operand into digits;
2. transform both digit vectors with a number theoretic transform (NTT), an FFT over integers modulo `2^32 + 1`;
3. multiply the two transforms point by point;
4. transform back;
5. propagate the carries.

The multiplier sits in the processing elements (PEs) of a small accelerator. A control unit (CU)
takes add and multiply tasks over from a host CPU, hands each task to a free PE and returns the
results.

The architecture follows the paper *Double Precision Floating Point Multiplier using
Schönhage–Strassen Algorithm used for FPGA Accelerator* (IJETER 7(11), 2019):

- the CPU / CU / PE split;
- the request–ready exchanges;
- the port widths (16-bit address, 32-bit write data, 64-bit result);
- the order of the SSA datapath blocks.

The paper gives no sizes for the transform, no register map, no rounding rules and no timing.
Those are choices made here, marked as such below and in the header comment of each file.

## The SSA significand multiplier (`ssa_multiplier`)

### Arithmetic

| quantity | value | why |
|---|---|---|
| operand width | 53 bits | double precision significand |
| digit width `k` | 14 bits, base `R = 2^14` | 4 digits cover 56 ≥ 53 bits |
| transform length `N` | 8 | 4 digits of data plus 4 digits of zero padding |
| ring | integers mod `q = 2^32 + 1` | a Fermat-type modulus, so powers of two are roots of unity |
| root of unity | `g = 2^8` (`g^8 = 2^64 ≡ 1`, `g^4 = 2^32 ≡ −1`) | every twiddle multiplication is a shift |
| `N^-1` | `2^61` (because `2^64 ≡ 1`) | the inverse transform's scaling is a shift too |

Zero padding the upper half makes the transform's cyclic convolution equal to the ordinary
product's convolution. The coefficients `z_i = Σ x_j·y_(i−j)` are at most `4·(2^14−1)^2 < 2^30`.
That is below `q`, so the inverse transform returns them exactly. The final step walks up the
8 coefficients: it adds the incoming carry, keeps the low 14 bits as a digit of the product and
passes the rest upward.

A residue needs 33 bits, because `2^32 ≡ −1` is a legal value. Reduction mod `q` uses
`2^32 ≡ −1`: a wide value is the alternating sum of its 32-bit chunks, `c0 − c1 + c2 − c3`,
followed by at most three conditional subtractions of `q` (`ssa_pkg::mod_reduce`). Shifts,
additions and subtractions mod `q` are functions in `ssa_pkg`.

The modulus `2^32 + 1` is not prime (641 × 6700417). SSA does not need a prime. It only needs
`g` to be a principal 8th root of unity and 8 to be invertible, and both hold.

### Datapath and schedule

The blocks come in this order:

1. operand registers;
2. digit extraction (`ssa_extract_digit`);
3. a mux that feeds one operand at a time into a single shared forward transform (`fermat_ntt`);
4. three small register-file RAMs (`ssa_ram`);
5. one modular multiplier (`fermat_modmul`), stepped over the 8 points by a 3-bit counter;
6. the inverse transform (`fermat_ntt #(.INVERSE(1))`);
7. the carry recombination (`ssa_recombine`).

Cycle by cycle, after a one-cycle `start_i`:

| state | cycles | work |
|---|---|---|
| FFT_X | 1 | NTT of x's digits → RAM A |
| FFT_Y | 1 | NTT of y's digits → RAM B |
| MUL | 8 | `C[cnt] = A[cnt]·B[cnt] mod q`, `cnt` = 0..7 |
| IFFT | 1 | inverse NTT of C, times `2^61` → RAM A (reused) |
| REC | 1 | carry recombination → `prod_o` |

`done_o` pulses 12 cycles after the start edge (`ssa_pkg::SSA_LATENCY`). One operation is in
flight at a time, and `start_i` is ignored while `busy_o` is high.

The transforms are radix-2, decimation in time: the inputs are taken in bit-reversed order,
followed by three butterfly stages. Both transforms are combinational, so the FFT_X, FFT_Y and
IFFT cycles are the long paths of the design. The datapath is not pipelined across those stages.

## Floating point units

Both units handle numbers the same way (`fp64_pkg`):

- rounding is to nearest, ties to even;
- subnormal inputs count as zero, and results below the normal range become a signed zero (flush-to-zero);
- every NaN result is `0x7FF8_0000_0000_0000`.

Flags: `invalid` (NaN operand, ∞·0 or ∞−∞), `overflow` (rounded to ∞) and `underflow` (flushed
to zero). For normal operands and results, the outputs are bit-exact IEEE results.

- **`dpfp_multiplier`**:
  - Computes sign and exponent when started and sends the significands to `ssa_multiplier`.
  - When the product arrives, it normalises (the product is in [1,4), so at most one right
    shift), rounds with a guard and a sticky bit, and handles overflow, underflow and special
    values.
  - Latency is 13 cycles.
- **`dpfp_adder`**:
  - Two pipeline stages that accept a new operation every cycle.
  - Stage 1 puts the larger magnitude first and aligns the smaller one into a 56-bit field with
    guard, round and sticky bits.
  - Stage 2 adds or subtracts, normalises by a leading-zero count and rounds.
  - An exact zero sum is +0 unless both operands are negative.

## Accelerator (`fpga_accelerator`, `control_unit`, `processing_element`)

### CPU hand-over

1. While the CPU has arithmetic work (`cpu_task_i`), the CU raises `cpu_req_o`.
2. The CPU answers with `cpu_ack_i` and holds it for as long as it hands work over.
3. While `cpu_ack_i` is high, the CU accepts 32-bit writes. Addresses are byte offsets from
   `ADDR_BASE`; other addresses are ignored:

| offset | register |
|---|---|
| 0x00 / 0x04 | operand A, low / high word |
| 0x08 / 0x0C | operand B, low / high word |
| 0x10 | command: bit 0 = 0 add / 1 multiply, bits 15:8 = tag; writing it launches the task |

Operands stay in their registers, so a series of commands can reuse them. A command may only be
written while `cpu_ready_o` is high; an assertion checks this. Each result appears for one cycle
on `accel_out_o` with `accel_valid_o`, its tag and its flags. Results can come back out of order,
because each PE finishes on its own schedule. Dropping `cpu_ack_i` ends the hand-over; tasks
already running still complete.

### CU ↔ PE

The exchange follows the paper's order:

1. the CU raises `req` to a PE;
2. an idle PE answers with `ready`;
3. only then does the CU send the whole operation, with a one-cycle `op_valid` on a bus shared by all PEs;
4. a PE holds its result (`res_valid`) until the CU acknowledges it.

The CU sends requests ahead of time: it keeps the lowest-numbered free PE waiting in `ready`, so
a command goes out the cycle after the CPU writes it. Each further task that arrives while others
run takes one more PE, up to `NUM_PE` (4 by default); `active_pes_o` shows how many are in use.
Results are collected round robin, one per cycle.

With a free PE, timing is counted in clock edges after the edge that takes the command write:

- an add result appears after 4 edges;
- a multiply result appears after 16 edges (12 for the SSA core, 1 for rounding, 3 for dispatch and collection).

When every PE is busy, `cpu_ready_o` stays low and the CPU waits.

## Files

| file | content |
|---|---|
| `rtl/ssa_pkg.sv` | SSA sizes, modular arithmetic functions, `SSA_LATENCY` |
| `rtl/fp64_pkg.sv` | binary64 fields, flags, PE operation and result records |
| `rtl/ssa_extract_digit.sv`, `fermat_ntt.sv`, `fermat_modmul.sv`, `ssa_ram.sv`, `ssa_recombine.sv` | SSA building blocks |
| `rtl/ssa_multiplier.sv` | sequenced 53×53 SSA multiplier |
| `rtl/dpfp_multiplier.sv`, `rtl/dpfp_adder.sv` | double precision units |
| `rtl/processing_element.sv`, `rtl/control_unit.sv`, `rtl/fpga_accelerator.sv` | accelerator |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_pe_model.sv` | behavioural PE used to test the CU on its own |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog counts a
failure if the testbench hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/ssa_pkg.sv rtl/fp64_pkg.sv tb/tb_fpga_accelerator.sv \
    --top-module tb_fpga_accelerator -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. The floating point testbenches check against the
simulator's own double arithmetic (`$bitstoreal` / `$realtobits`), adjusted for flush-to-zero.
The SSA testbenches check against wide integer arithmetic.

`tb_fpga_accelerator` runs the design at its default size. It sends over 300 mixed tasks through
the CPU port, including bursts of back-to-back commands. It requires each of these to happen at
least once:

- a CPU stall;
- all four PEs busy at once;
- both operations;
- overflow, underflow and invalid results;
- release and renewed hand-over.

It also times an isolated add and an isolated multiply.

## How far to trust it

- Every module has a testbench, and all pass. Each testbench also fails against a deliberately
  broken copy of its module, so its checks can catch a fault.
- The SSA multiplier passes for all tested 53-bit operands: corner values, all single-bit
  operands and several hundred random pairs.
- The adder has been compared bit for bit with IEEE results on several thousand operations. The
  multiplier has been compared on several hundred.
- Known gaps against full IEEE-754:
  - no subnormals;
  - one NaN encoding;
  - underflow is judged after rounding to 53 bits, so a result that rounds up to the smallest
    normal number is returned as that number. Anything smaller becomes zero.
- The paper reports a very small FPGA footprint for its multiplier (16 flip-flops, 327 LUTs,
  230 MHz on Virtex-5). This RTL does not reproduce that: it keeps the transform vectors in
  registers (about 1000 flip-flop bits for the SSA core) and makes no frequency claim.
- The paper's claim that SSA pays off for integers of 2^15 to 2^17 bits does not apply to this
  53-bit instance. Larger operands would need a larger `N`, a wider digit and a larger Fermat
  modulus in `ssa_pkg`. The modules are written in terms of those constants, but only the 53-bit
  configuration has been tested.

## Choices made here

- The transform size, digit width and modulus are chosen here. The paper's 3-bit counter
  suggests 8 points.
- The product is 106 bits wide; the paper also mentions 105.
- The number of PEs is 4. The paper bounds it only by the device's I/O.
- Also chosen here:
  - the register map, tag and flags;
  - the result handshake and round-robin collection;
  - requesting a PE ahead of time;
  - all latencies;
  - the active-low asynchronous reset.
- Each PE runs one operation at a time, and the add or multiply is chosen per task. The paper's
  "addition and multiplier blocks ordered as pipelined" is read as two units side by side, not
  as a fused multiply-add.
