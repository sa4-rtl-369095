# SA4: a 4-bit convolution systolic array with fully packed multipliers

SA4 is a weight-stationary systolic array for convolution layers with 4-bit
activations and 4-bit weights. Its central trick is to make every multiplier
do six 4-bit multiplications at once. Two activations and three weights are
packed into the operands of one wide (18 x 27 bit) multiplication, in a
scheme known as 4-bit fully DSP packing ("4bF"). The array is organised to
suit that packing. Each processing element (PE) holds one row of a 3x3 kernel
(three weights). In every clock it receives two neighbouring pixels of one
input channel. PE results move down a column as packed sums, and are unpacked
only once per column, at its bottom. An ordinary 16 x 20 array of such PEs
thus delivers 320 x 6 multiply-accumulates per clock.

This repository holds synthesizable SystemVerilog of the array and of the
on-chip logic around it:

- the SAU (systolic array unit), a 4 x 4 tile of PEs;
- an array of SAUs;
- the input-feature-map (IFM) row cache that turns a once-read IFM into the
  sliding-window stream;
- the weight and activation distribution;
- the two-level accumulator that produces finished output rows.

It also holds self-checking testbenches for every module and for complete
layers.

The architecture follows the published SA4 design (an HLS design for AMD
Ultra96-V2 FPGAs). This RTL is a register-transfer re-implementation of that
design, and is not the authors' code. Where it had to fill gaps or chose
differently, this is said below and in the opening comment of each file.

## 1. The packing arithmetic

One PE multiplies

    A_pk = a0 + a1 * 2^11                       (a0, a1: unsigned 4-bit, 18-bit port)
    W_pk = w3 + w2 * 2^11 + w1 * 2^22           (w1..w3: signed 4-bit, 27-bit port)

and the product falls into four 11-bit slots:

    A_pk * W_pk = p1 + p2 * 2^11 + p3 * 2^22 + p4 * 2^33
    p1 = w3 a0    p2 = w3 a1 + w2 a0    p3 = w2 a1 + w1 a0    p4 = w1 a1

A 4 x 4 product needs 8 bits. The 11-bit slot leaves 3 guard bits, so a slot
can absorb the sum of at most four such products without spilling into its
neighbour. This is why an SAU column has only four PEs: four input channels
are summed in packed form, and then the column's result must be unpacked.
The slots are signed, so a negative lower slot "borrows" one from the slot
above it. The unpacker (`data_splitter`) undoes this from the bottom up:
`r1 = (S - p1) >>> 11`, `p2 = r1[10:0]`, and so on, each slot taken as a
signed 11-bit value.

For a row of activations a[0..C-1] streamed two at a time (step k carries
a[2k], a[2k+1]), the slots of consecutive steps combine into a 1x3 row
convolution:

    out[2k]   = p4(k-1) + p2(k)  = w1 a[2k-1] + w2 a[2k]   + w3 a[2k+1]
    out[2k+1] = p3(k)   + p1(k+1) = w1 a[2k]   + w2 a[2k+1] + w3 a[2k+2]

The splitter keeps p4 of the previous step and waits for p1 of the next step.
At the ends of a row the missing terms are zero, which is exactly "same"
padding of one column on each side. So a pass of C/2 steps yields C/2 output
pairs. Pair k leaves when step k+1 arrives, or one clock after the last step.
The three kernel rows (KR) and the input-channel tiles are then summed by the
accumulators.

`sa4_pkg.sv` holds the constants (slot 11, ports 18/27, partial sum 48 bits,
splitter output 12 bits) and the packing functions.

## 2. Inside an SAU (`sau.sv`)

    in_act[0..3] --> IFM fetcher (triangle of 1+2+3+4 registers) --> PE row skew
    in_w[0..3]   --> weight fetcher (same triangle, + one selector per row)
                              |
               PE(0,0) -> PE(0,1) -> PE(0,2) -> PE(0,3)     activations move right
                  |          |          |          |        packed sums move down
               PE(3,0) -> ...                  PE(3,3)
                  |          |          |          |
               splitter   splitter   splitter   splitter    one per column
                  |          |          |          |
               de-skew: column j delayed 3-j clocks --> out_even/out_odd[4]

- **Rows are input channels; columns are output channels.** PE (i, j) holds
  the kernel row of input channel i and output channel j.
- **IFM fetcher (`ifm_fetcher.sv`).** Row i of the array must see step k at
  clock k + i, the usual systolic skew. The fetcher is a triangle of shift
  registers (10 for four rows) and contains no address logic or buffer.
- **Weight fetcher (`weight_fetcher.sv`).** Weights use the same triangle.
  During the first four steps of a pass the input carries the weights of PE
  column 0, 1, 2, 3, one per clock. They travel down-right alongside the
  activations, together with their column number. A selector in each row
  decodes the column number and raises `w_load` of exactly the PE that the
  matching first activation of the pass is reaching. A PE therefore swaps
  its weights in the very clock that the first step of the new pass arrives.
  No cycles are set aside for weight loading. This only works if a pass is at
  least four steps long (C/2 >= 4, i.e. C >= 8).
- **One FSM (`sau_fsm.sv`)** per SAU counts the steps of a pass. It marks
  each step with a tag {valid, first, last}, and the tag travels with the
  data through the grid to the splitters. The PEs themselves have no control
  logic.
- **PE (`pe4bf.sv`).** It has an activation register, a tag register, the
  stationary weight register and `psum_out <= psum_in + A_pk * W_pk`. The
  multiply-add is written as plain arithmetic. Mapping it onto a DSP slice
  with its cascade input is left to synthesis.
- **Output de-skew.** It is a small register triangle so that all four
  columns of a pair leave in the same clock.

Timing: pair k appears ROWS + COLS + 3 = 11 clocks after step k entered the
SAU. A pass must have no gaps; the level above guarantees this.

## 3. The array and its dataflow (`sa4_top.sv`)

The top level has (X/4) x (Y/4) SAUs. The default is X = 16 input channels
by Y = 20 output channels, i.e. 4 x 5 SAUs and 320 PEs. SAU (sr, sc) works on
input channels 4sr..4sr+3 and output channels 4sc..4sc+3 of the current
tile. The order of work is row-temporal weight stationary:

    for r  < R                 output row
      for mt < ceil(M/Y)       output-channel tile
        for kr < K             kernel row (IFM row r+kr-K/2)
          for nt < N/X         input-channel tile
            pass: C/2 steps    two IFM columns per step, weights fixed

K is the kernel height, 3 or 1, set per layer. The ideal run time is
R * ceil(M/Y) * K * N/X * C/2 clocks. With streams that keep up, a 3x3
layer finishes about 17 clocks (the pipeline fill) after that. A 1x1 layer
also waits at the start for its first IFM row to load, since no zero
padding row comes first to hide that load.

Data moves along this chain:

- **`ifm_constructor.sv`** reads the IFM from off-chip memory exactly once,
  as a valid/ready stream of DRAM_W = 256-bit words.
  - It cuts each word into packets of X x 2 x 4 = 128 bits: two IFM columns
    of X channels.
  - It stores the packets in a cache of KR + 1 = 4 IFM rows with up to
    N_MAX = 512 channels and C_MAX = 320 columns (20480 x 128 bits).
  - From the cache it generates the pass stream above. Rows above and below
    the image read as zero.
  - The fourth cache row lets the next IFM row load while the current output
    row is computed.
  - A pass whose source row is not yet fully loaded is held, and `stall_ifm`
    marks each clock lost that way.
- **`ifm_weight_distributor.sv`** passes the activations of input channels
  4sr.. to every SAU of row sr. It hands each SAU only the weights of its own
  input channels and output channels.
  - Weights arrive as a valid/ready stream of beats and wait in a small FIFO
    (WF_DEPTH = 8 beats).
  - A pass starts only when its four weight beats are present, so it never
    breaks in the middle. `stall_w` marks each clock lost waiting.
- **`array_accumulator.sv`** adds the X/4 SAU rows of each output column.
  These are the partial sums of the X input channels of the tile.
- **`row_cached_accumulator.sv`** adds the 3 x N/X passes that make one
  output row of one channel tile.
  - It uses a row cache of C/2 x Y pairs of accumulators.
  - The first pass writes, the middle passes read-add-write, and the last
    pass sends its sums out directly.
  - Finished rows therefore stream out while the array works on the next
    tile.

## 4. Interfaces and formats

All ports are on `sa4_top`. The clock is `clk`. The reset `rst_n` is active
low and asynchronous.

- **Layer set-up.** Pulse `start` for one clock with these inputs valid:
  - `cfg_rows` = R;
  - `cfg_n_tiles` = N/X;
  - `cfg_half_cols` = C/2;
  - `cfg_m_tiles` = ceil(M/Y);
  - `cfg_kr` = K, the kernel height (odd, at most KR).

  `busy` stays high until `done` pulses with the last output. N must be a
  multiple of X, C must be even and at least 8, and C/2 <= C_MAX/2. The
  kernel is K x 3, with stride 1 and "same" padding. For a 1x1 layer, set
  K = 1 and give each kernel row only a centre tap (w1 = w3 = 0).
- **IFM words (`dram_valid/ready/data`).**
  - The layer is one continuous sequence of 128-bit packets. The order is
    row by row; within a row, column pair by column pair; within a pair,
    channel tile by channel tile.
  - Packet p of a word sits in bits [p*128 +: 128].
  - Byte x of a packet holds channel x: column 2c in the low nibble, column
    2c+1 in the high nibble.
  - Activations are unsigned.
- **Weight beats (`w_valid/ready`, `w_data[Y/4][X]`).** Each pass needs four
  beats, k = 0..3.
  - In beat k, `w_data[sc][x]` is the kernel row of input channel x and
    output channel 4sc + k, with w1 in bits [11:8], w2 in [7:4] and w3 in
    [3:0].
  - Beats follow the pass order above. Weights are signed.
  - Output channels beyond M get zero weights.
- **Results (`ofm_valid`, `ofm_even[Y]`, `ofm_odd[Y]`, `ofm_row`, `ofm_mt`,
  `ofm_c2`).** Each valid clock carries OFM columns 2c2 and 2c2+1 of row
  `ofm_row`, for channels `ofm_mt*Y + y`. The values are signed ACC_W = 32-bit
  sums. This port has no back-pressure: a receiver must take one pair per
  clock.
- **`stall_ifm`, `stall_w`.** Each is high in a clock that the array lost
  waiting for IFM data or for weights.

## 5. Parameters

| Parameter | Default | Meaning |
|-----------|---------|---------|
| X | 16 | input channels per tile (array rows), multiple of 4 |
| Y | 20 | output channels per tile (array columns), multiple of 4 |
| KR | 3 | largest kernel height (the kernel width is fixed at 3 by the packing) |
| N_MAX | 512 | largest input channel count held in the row cache |
| C_MAX | 320 | largest IFM width |
| DRAM_W | 256 | off-chip word width |
| DIM_W | 10 | width of the size counters |
| ACC_W | 32 | output accumulator width |
| WF_DEPTH | 8 | weight FIFO depth in beats |

The SAU itself is fixed at 4 x 4. Its four rows come from the guard bits:
four products per slot. Its four columns come from the weight load: a pass
must be at least as long as the number of columns, and passes as short as
C/2 = 4 (8-pixel-wide maps) should still run without stalls. The published
evaluation uses 16 x 20 (1153 GOPS at about 300 MHz: 320 PEs x 12 operations
per clock) and 12 x 12. A UltraNet deployment uses 16 x 8, and a
spatial-size study uses 8 x 8. All of these are reached by setting X and Y.

## 6. Verification

Every module has a self-checking testbench in `tb/`. It compares the module
against values computed independently in the testbench and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

Layer-level tests compare every OFM value with a direct 3x3 convolution:

| Testbench | Array | Layers | Gap to ideal clocks |
|-----------|-------|--------|---------------------|
| `tb_sa4_top` (default parameters) | 16 x 20 | 3x8 16->20, 4x10 32->24 and 5x16 48->45 with throttled streams, a 6x12 32->40 1x1 layer, 56x56 64->64 at full rate | 75,281 vs 75,264 (0.02%) on 56x56 |
| `tb_sa4_spatial_sweep` | 8 x 8 | 32x32 64->64, 16x16 64->64, 8x8 512->512 | 0.02%, 0.07%, 0.00% |
| `tb_sa4_12x12` | 12 x 12 | 14x14 36->24, 28x28 24->30 | 0.96%, 0.24% |
| `tb_sa4_ultranet` | 16 x 8 | 4-bit UltraNet layer shapes, 80x160 16->32 down to 10x20 64->64, and a 1x1 64->36 | at most 0.18%; 2.75% on the small 1x1 layer |

`tb_sa4_top` also counts the mechanisms of the design and fails if any of
them never occurred:

- IFM-row stalls;
- weight stalls;
- zero-padded border rows;
- multi-pass accumulation;
- several output-channel tiles;
- 1x1 layers.

The layer tests share `tb/sa4_layer_harness.sv`, which generates random
data, drives the streams (optionally throttled) and checks the results.

What is not verified: timing closure and resource use on an FPGA, and
behaviour with wider weights or activations than 4 bits.

To run one test with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/sa4_pkg.sv -y rtl -y tb \
        tb/tb_sa4_top.sv --top-module tb_sa4_top
    ./obj_dir/Vtb_sa4_top

Substitute any `tb_*.sv` for the unit tests. The full-size test runs in a few
seconds.

## 7. Where this RTL departs from, or adds to, the published design

- **Implementation style.** The published SA4 is written in HLS with FIFO
  links between its top-level modules. Here the links are valid/ready
  handshakes with registered outputs. The only FIFO is the weight FIFO.
- **Multiplier.** The packed multiply is inferred arithmetic rather than an
  instantiated DSP48E2 primitive. The 18 x 27 operand sizes and the 48-bit
  partial sum match that primitive.
- **Splitter boundary handling.** Emitting each pair one step late, and
  padding the ends of a row with zeros, is this design's way of producing
  exactly C/2 pairs per pass.
- **Output de-skew.** The output triangle in the SAU is an addition, so that
  each SAU hands a whole pair of columns to the accumulator at once.
- **Kernel and layer shapes.** The kernel width is fixed at 3, with stride 1
  and "same" padding. Wider kernels (multiples of 3 in width) and strides are
  not supported. A 1x1 layer runs with K = 1 and a 1x3 kernel row whose only
  non-zero tap is the centre, so it uses a third of each multiplier.
- **Formats.** The off-chip IFM layout, the weight beat format and the
  32-bit output width are this design's choices.
- **Back-pressure.** The OFM output has no back-pressure.
- **Parts outside the array.** The 8-bit first layer, max-pooling,
  BatchNorm and activation units of the UltraNet deployment are not part of
  this RTL. Neither is the memory controller that supplies the IFM and
  weight streams.

## 8. Files

`rtl/` (one module or package per file):

- `sa4_pkg` (constants, types, packing functions);
- `pe4bf`;
- `ifm_fetcher`;
- `weight_fetcher`;
- `sau_fsm`;
- `data_splitter`;
- `sau`;
- `ifm_constructor`;
- `ifm_weight_distributor`;
- `array_accumulator`;
- `row_cached_accumulator`;
- `sa4_top`.

`tb/`:

- `tb_<module>` for each module;
- the layer tests `tb_sa4_top`, `tb_sa4_spatial_sweep`, `tb_sa4_12x12` and
  `tb_sa4_ultranet`;
- their shared `sa4_layer_harness`.
