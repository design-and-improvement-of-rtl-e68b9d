# GEMM convolution accelerator with a 16 x 16 systolic array

This accelerator computes the convolution layers of a CNN such as VGG16 as
matrix products. The host rewrites each convolution as a matrix product (im2col):

```
A  (filters x Cin*3*3)      one row per filter, the 3x3 weights of every
                            input channel flattened, channel after channel
B  (Cin*3*3 x H*W)          one column per output pixel, the 3x3 input patch
                            around it, flattened in the same order
C  = A x B  (filters x H*W) one row per output channel: reshaped, the output image
```

The host cuts this product into pieces of a fixed size. Each piece multiplies
a **16 x 576** block of A by a **576 x 16** block of B, and the result is one
**16 x 16** block of C. The hardware multiplies such blocks and nothing else.

- 16 is the array size.
- 576 = 64 * 3 * 3 is the depth. Every VGG16 layer after the first has a
  depth that is a whole multiple of 576.
- When the depth is longer than 576, the host splits it into chunks of 576
  and adds the partial results itself.
- The first layer has a depth of 27. The host pads it with zeros up to 576.

There are two identical compute units. Each has its own memory port, meant for
its own DDR bank, and they run independently. A compute unit works like this:

1. It bursts one A block into on-chip RAM.
2. It keeps that A block and, for each of `n_tiles` B blocks:
   - bursts the B block into on-chip RAM,
   - streams both blocks through a 16 x 16 grid of multiply-accumulate
     elements,
   - copies the 16 x 16 result out of the grid,
   - bursts the result back to memory.

## Files

| file | what it is |
|---|---|
| `rtl/cnn_accel_pkg.sv` | default sizes, the job descriptor `job_t`, the state enum |
| `rtl/accel_top.sv` | top: `NUM_CU` compute units side by side, all ports as per-unit arrays |
| `rtl/mmult_cu.sv` | one compute unit: wiring of everything below |
| `rtl/cu_ctrl.sv` | phase sequencer of a compute unit |
| `rtl/systolic_array.sv` | N x N grid of PEs with input skew registers |
| `rtl/mac_pe.sv` | processing element: one multiply and one add per cycle |
| `rtl/tile_buffer.sv` | input block RAM, one bank per array row (or column) |
| `rtl/result_buffer.sv` | local copy of the N x N result, read out as memory beats |
| `rtl/burst_reader.sv`, `rtl/burst_writer.sv` | burst read and write masters |
| `tb/ddr_bank_model.sv` | behavioural burst memory with random stalls (testbench only) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_vgg_conv_slice` and `tb_vgg_layer` |

## The systolic array and its timing

The array is **output-stationary**. PE(i,j) owns C[i][j] and adds
A[i][k]·B[k][j] into its 48-bit accumulator once per k. Values of A enter each
row from the left and move one PE to the right per cycle. Values of B enter
each column from the top and move one PE down per cycle.

A[i][k] and B[k][j] must meet in the same PE in the same cycle. For that, row
i of A is delayed by i cycles before it enters the grid, and column j of B by j
cycles. These delays are the skew registers in `systolic_array`. The caller
never skews anything: every cycle it presents one whole "k-slice", that is
`a_col[i] = A[i][k]` for all rows and `b_row[j] = B[k][j]` for all columns.
The pair for slice k reaches PE(i,j) i + j cycles later.

Cycle by cycle, one COMPUTE phase of a compute unit runs like this:

| cycle of COMPUTE | what happens |
|---|---|
| 0 | `arr_clr` zeroes all accumulators. Beat 0 of every bank is read. |
| 1 .. K | slice k = cycle - 1 enters the array. Both buffers are read one cycle ahead. |
| K + 1 .. K + 2N - 2 | zeros enter. The last slice travels to PE(N-1, N-1). |
| K + 2N - 1 (CAPTURE) | all accumulators are final and are copied into `result_buffer`. |

So computing one block takes **K + 2N - 1 = 607 cycles**, plus one cycle to
capture it. Zero operands leave an accumulator unchanged, so the grid idles and
drains by feeding zeros. No enable signal is needed.

## Operand layout in memory and in the buffers

Memory is addressed in **beats** of `MEM_W` = 512 bits. One beat holds
`EPB` = 32 operands of 16 bits, element 0 in the low bits. A row of K = 576
operands is therefore `WPR` = 18 beats.

- **A block:** row i starts at `a_base + i*WPR`.
- **B blocks:** stored *transposed*. Column j of tile t is stored as one row
  of memory, starting at `b_base + (t*N + j)*WPR`. Then each array column reads
  contiguous memory, just as each array row does.
- **C blocks:** tile t is stored at `c_base + t*N*N/RPB`, in row-major order.
  Each result is sign-extended into a 64-bit slot, so there are `RPB` = 8
  results per beat and a 16 x 16 block is 32 beats.

Each tile buffer is split into N banks, one per row of A (or per column of B).
Each bank holds whole beats. Beat n of an incoming block goes to bank
`n / WPR`, word `n % WPR`. The sequencer tracks this with two counters, so it
needs no divider. During COMPUTE all banks read the same word, `k / EPB`. The
compute unit then selects operand `k % EPB` out of every bank's beat. This
gives the array 2 x 16 operands per cycle, with only one read port per bank.

## Jobs and the per-unit interface

A job is a `job_t`:

| field | meaning |
|---|---|
| `a_base` | where the A block starts |
| `b_base` | where the first B block starts |
| `c_base` | where the first result block goes |
| `n_tiles` | how many B blocks to run against this A block (at least 1) |

- **Starting a job:** the job is taken on `cmd_valid && cmd_ready`. `cmd_ready`
  is high only while the unit is idle. `busy` stays high until the last write
  response of the last tile has come back, and `done` pulses for one cycle at
  that point.
- **A reuse:** A is read once per job, not once per tile. For a VGG layer a
  job naturally covers one 16-filter group and one 576-deep chunk, across all
  output pixels (up to 3136 tiles).
- **Phase order:** the phases of a unit never overlap. Reading, computing and
  writing follow each other.
- **Per-tile cost:** about 288 read beats, 608 compute cycles and 32 write
  beats, plus memory latency.

The memory port uses AXI-like channels, simplified:

| channel | signals | meaning |
|---|---|---|
| read request | `ar_valid/ar_ready/ar_addr/ar_len` | start a read burst |
| read data | `r_valid/r_ready/r_data/r_last` | read beats, returned in request order |
| write request | `aw_valid/aw_ready/aw_addr/aw_len` | start a write burst |
| write data | `w_valid/w_ready/w_data/w_last` | write beats |
| write response | `b_valid/b_ready` | one response per write burst |

- The `len` fields hold the burst length minus 1. Bursts are at most 16 beats
  long.
- The reader issues all of a block's read requests back to back, without
  waiting for data. It accepts every returned beat at once, because the
  buffer never stalls.
- For each write burst, the writer sends the address and then the data beats.
  It collects the write responses while it goes on with later bursts.
- Assertions check that a request or data beat stays stable while it waits
  for ready, and that no read data arrives unasked.

`accel_top` brings out every port of unit u as element u of an unpacked
array, for example `cmd[u]` and `ar_addr[u]`.

## Where this design is its own

The following are not specified by the architecture this RTL implements. They
are choices made here. Change them through the parameters where one exists.

- **Number format.** Operands are 16-bit signed integers (fixed point) and
  accumulators are 48 bits. The reference software flow uses 32-bit floats.
  To run a float model on this RTL, quantise it first, or replace `mac_pe`
  with a floating-point multiply-add.
- **Memory width and burst length.** 512-bit beats, bursts of up to 16 beats,
  and addresses counted in beats rather than bytes.
- **Job format and A reuse.** The data reuse is part of the architecture, but
  the descriptor is this design's choice.
- **Depth is fixed at K.** The unit always multiplies over the full depth
  K = 576. There is no accumulate-into-C mode: partial results of longer
  depths are added by the host.
- **Reset.** The reset is synchronous and active-low, on all control state.
  The RAMs are not reset.
- **Not in hardware.** Im2col, the transposes, bias addition, reshaping C
  back into images and the choice between the two units all happen on the
  host.
- **One memory port per unit.** Each unit has one memory port, with
  independent read and write channels. A and B share the read channel, one
  after the other. The architecture only says that several memory ports and
  DDR banks are used. A unit with separate ports per operand would need a
  second reader.
- **No overlap.** There is no double buffering, so loading the next B block
  never overlaps with computing the current one. The architecture keeps the
  phases sequential, and so does this RTL.

## Sizes and workloads

Default parameters (`accel_top`): `NUM_CU=2, N=16, K=576, D_W=16, A_W=48,
SLOT_W=64, M_W=512, BURST=16`. Per unit this is:

- 256 PEs,
- two 16-bank buffers of 18 x 512 bits each,
- a 256 x 48-bit result register file.

With 16-bit operands each PE needs one hardware multiplier, so a unit uses
256 DSP blocks. The intended budget is 1024 per unit.

`K` must be a multiple of `M_W/D_W` and at least two beats long. `N*N` must be
a multiple of `M_W/SLOT_W`. An elaboration-time `$error` enforces both.

Every VGG16 convolution layer (224 x 224 input) fits in the block size. The
whole network needs 116,608 block products per image, for example:

| layer | blocks of A | depth chunks | column tiles | block products |
|---|---|---|---|---|
| layer 0 | 4 | 1 | 3136 | 12,544 |
| layer 19 | 32 | 8 | 49 | 12,544 |

A complete layer 24 (512 to 512 channels, 14 x 14) has been simulated. It
takes 1.79·10^6 cycles for 3,328 block products on the two units. The
memories in that run stall about one cycle in four, which comes to roughly
1,080 unit-cycles per block product. At that rate a whole image needs about
6·10^7 cycles. The clock rate is not fixed by this RTL.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog stops it with a failure if it hangs. With plain Verilator, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/cnn_accel_pkg.sv tb/tb_accel_top.sv --top-module tb_accel_top -Mdir obj
./obj/Vtb_accel_top
```

Replace `tb_accel_top` with any other testbench. The ones with the most
coverage are:

- **`tb_accel_top`** runs both units at the default size against two
  randomly stalling memories. Unit 0 runs a two-tile job and then a second
  job. Unit 1 runs a three-tile job at the same time. Every result element is
  compared with an integer reference. The testbench also counts the
  mechanisms the design depends on and fails if one never occurs:
  - both units busy at once,
  - A reused across tiles,
  - multi-burst blocks,
  - stalls on every channel,
  - a back-to-back job,
  - negative results.

  It takes about a minute to build and well under a second to run.
- **`tb_vgg_conv_slice`** acts as the host. It builds random 6 x 6 images and
  sixteen 3 x 3 filters for three input-channel counts:
  - 128: two depth chunks, one on each unit, with the partial results added
    by the testbench,
  - 64: exactly one chunk,
  - 3: zero-padded up to 576.

  It does im2col and the layout described above, and compares every output
  pixel with a direct convolution.
- **`tb_vgg_layer`** runs the complete VGG16 layer 24 the same way, with 8-bit
  random data:
  - 32 filter groups and 8 depth chunks give 256 jobs.
  - Each job covers 13 pixel tiles.
  - The testbench hands each unit its next job as soon as the unit is ready.
  - It adds the partial results of the chunks and checks all 100,352 outputs
    against a direct convolution.
  - It prints the layer's cycle count.

  It takes about 80 s to build and 15 s to run. The other layers differ only
  in the sizes at the top of the file.
- **`tb_mmult_cu`, `tb_cu_ctrl`, `tb_systolic_array`** use small parameters
  (N = 4, K = 32 or 64). They check the exact cycle counts given above, and
  that the last result is *not* ready one cycle early.

## How far it has been checked

Every module has a testbench that compares it with independently computed
values. Each testbench has also been shown to fail against a deliberately
broken copy of its module. The whole design passes Verilator lint and elaborates
in a second SystemVerilog front end. What is **not** covered:

- timing closure on an FPGA,
- a real DDR controller: the memory model is a simple in-order burst memory,
- floating-point arithmetic.
