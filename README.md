# A tiled 3D-convolution accelerator with a repartitionable on-chip memory

3D convolutional networks (C3D, for example) slide a T×R×S kernel over a
video volume of D frames of H×W pixels. The number of channels C and filters M
grows in later layers while H, W and D shrink. This accelerator never tiles
the spatial or temporal dimensions. The H×W×D data of one channel (a *chunk*)
stays contiguous, so there is no overlap between tiles. All tiling happens
over channels (C) and filters (M). Three loop orders decide what is done in
parallel and where partial sums (psums) are accumulated:

| Order | Parallel over | Window data | Filters | Psums accumulated in |
|---|---|---|---|---|
| **IC** (input channel first) | input channels | unicast, one channel per array | the same filter for all | the psum bus from array to array, then the last array's ALU buffer |
| **OC** (output channel first) | filters | broadcast to all arrays | one filter per array | each array's ALU buffer, channel by channel |
| **NP** (no partial sum) | filters | broadcast to all arrays | one filter per array | the PE's own MAC, over all C·T·R·S products |

Fully connected layers use the same arrays the other way round. The input
vector is shared by every PE, and each PE gets its own weights (see
[Fully connected layers](#fully-connected-layers)).

The default configuration has 48 PE arrays of 7×7 PEs (2352 MACs). The L2
is 1.125 MB, as 32 blocks of eight 36 Kb block RAMs. Inputs and weights are
8-bit signed; psums are 32-bit. Only stride 1 is built. Padding is done by
whoever places the data in the L2.

```
          fill_* (from DRAM)                          out_* (to DRAM)
               |                                           ^
        +------v-------+   64-bit   +-------+  7x32-bit    |
cfg_* ->|   L2 SRAM    |----------->|  NoC  |---------------+
        | 32 blocks    |  rd words  | ucast/|<--------------+
        | cfg regs,FSM |            | bcast |  psum bus     |
        +------^-------+            +---+---+  n-1 -> n     |
               | rd cmds                | ld words (masked) |
        +------+-------+    passes  +---v-------------------+---+
job  -->|  controller  |----------->| PE array x 48            |
        +--------------+            |  dispatch -> 7x7 PEs ->   |
                                    |  To-ALU queue -> 7 ALUs ->|
                                    |  output buffer            |
                                    +---------------------------+
```

## The PE array: a sliding window with a shared weight

Each array computes one **7×7 output tile** (RA×CA) of one output plane.
Every PE in the array gets the *same weight* each cycle. PE (i,j)
accumulates the output at tile position (i,j). So the feature each PE needs
is the window pixel offset by the current kernel tap. Neighbouring PEs need
the same pixels one step apart, and the array moves them between PEs instead
of loading each one from memory.

Each PE (`pe.sv`) has three operand buffers:

- **Temporal buffer.** A small FIFO (4 deep) that is preloaded with the PE's
  pixel of the *next* kernel plane (t+1) while the current plane is
  computing.
- **Row buffer.** Holds the operand of the current step.
- **Column buffer.** Remembers the operand used at the start of the current
  kernel row.

The kernel taps of one plane are walked row by row, r = 0..R-1, and in each
row s = 0..S-1. Each step is one of three kinds:

| Step | When | Operand |
|---|---|---|
| TEMPORAL | first tap of a plane | popped from the temporal buffer |
| ROW | next tap in the same kernel row | the right neighbour's row buffer; the last PE column gets a fresh pixel from the dispatch unit |
| COLUMN | first tap of the next kernel row | the column buffer of the PE below; the last PE row gets a fresh pixel |

So per step only RA + CA − 1 new pixels enter an array of RA·CA PEs. The
operand is multiplied by the broadcast weight and added to the accumulator,
which is cleared on the first step of a pass and kept otherwise.

On the last step each PE copies its accumulator into its **output
register**. The output registers form one shift chain per column. RA cycles
move the tile into the ALU row, last PE row first. The next pass can step
meanwhile.

### Dispatch unit

`dispatch.sv` is the array's local store (L1). It holds:

- the input window of up to KT_MAX = 3 planes of (RA+K_MAX−1)×(CA+K_MAX−1)
  bytes;
- the filter, up to 3×11×11 bytes.

A load descriptor places the incoming 64-bit words, 8 bytes each, into the
window or the filter store. Any row length, first column and column count
can be given. So the controller can send whole contiguous rows of the
chunk, and each array keeps only the columns it needs.

The pass sequencer issues one step per cycle. With each step it issues:

- the weight w[t][r][s];
- the edge pixels for the last PE column or row;
- one PE row of temporal-buffer loads per cycle, filling the buffers for
  later planes.

**Timing.** A pass of T·R·S steps takes RA + T·R·S cycles when R·S ≥ RA:

- RA cycles preload plane 0 into the temporal buffers;
- after that, loading plane t+1 is hidden behind the R·S steps of plane t.

Two stalls exist. Both are brought out as events:

- **Temporal stall.** A plane starts before its temporal buffers are
  loaded. This happens when R·S < RA, or while the window is still
  arriving.
- **Output stall.** The last step waits, because the output registers are
  still draining or the To-ALU queue has no room for another tile.

### ALUs and output buffer

Drained psums go into a To-ALU queue of 2·RA rows. Each row carries the ALU
operation of its pass and its row index. The 7 ALUs (`alu.sv`), one per
column, form

`sum = PE psum (+ psum bus) (+ local buffer[row])`

The local buffer has one 32-bit entry per tile row. It holds a running sum
across the passes of several channels (OC), or across channel groups (IC).
A pass whose result is final then applies, in order:

1. optional relu;
2. optional downscale: an arithmetic right shift by `shift`, saturated to
   −128..127;
3. optional max pooling over `pool` consecutive rows.

The result goes into a 16-deep output buffer (`sync_fifo.sv`). From there
it goes either to the DRAM result port or onto the psum bus, to the next
array.

## Loop orders as the controller runs them

The host gives the controller (`controller.sv`) one **job** (`job_t` in
`acc_pkg.sv`) per output tile. A job holds:

- the loop order;
- the arrays used (`n_arr`);
- the channel count;
- the first filter `m0`;
- the kernel size;
- the chunk dimensions h×w×d;
- the tile origin (d0,h0,w0);
- the post-operations.

The data in the L2 must be laid out like this (bytes, relative to the
start of each region):

- **Features:** `[c][d][h][w]`. Each channel's chunk is contiguous.
- **Weights:** `[m][c][t][r][s]`.

For each kernel plane t, the controller reads rows h0 … h0+RA+R−2 of input
plane d0+t in one L2 burst. For each channel it does the following:

- **NP:** the window is broadcast to arrays 0..n_arr−1, and filter m0+n is
  unicast to array n. All channels run as one long accumulation (first pass
  clears, last pass latches). Each array drains one finished tile.
- **OC:** the traffic is the same, but each channel is its own pass. The
  ALU adds it into its local buffer. The last channel's pass applies the
  post-operations and sends the tile.
- **IC:** array n gets channel g·n_arr+n (its own window, unicast) and
  filter m0. Array n adds the psum arriving from array n−1 on the psum bus
  and passes the sum on. The last array keeps a running sum over the groups
  g. It sends the output on the last group. `chans` must be a multiple of
  `n_arr`.

### Fully connected layers

An FC job (`ORDER_FC`) computes RA·CA = 49 neurons per array. It reuses the
convolution datapath:

- The *input vector* is the shared data. It is stored in the feature
  region. T inputs at a time are broadcast to all arrays, into the filter
  store, and reach every PE through the shared-weight port.
- The *weights* differ per PE. They are stored in the weight region as
  `[neuron block][input][RA][CA]`. Array n receives, unicast, the T planes
  of 7×7 weights of its neuron block m0+n. Each plane is one "window plane"
  and reaches its PE through the temporal buffer.
- Each pass is a 1×1×T kernel, so every step is a temporal step.
  Accumulation stays in the MACs over all `chans` = inputs/T slices, as
  under NP. relu and downscale apply as usual.

Only the inputs are reused, so FC is memory-bound. Each input costs a
temporal-buffer load of RA cycles per array, and every weight is loaded
from the L2 exactly once. With 9216 inputs (AlexNet fc6), the weights of 2
arrays (2 × 49 × 9216 B) fill most of the L2. The job fields `chans` and
`c_total` are 14 bits, which allows up to 16383 inputs.

### Output routing

Which array's output goes to DRAM and which goes onto the psum bus is a
register. It is changed only when the arrays concerned are empty, so
results of the previous job are never rerouted.

## The reconfigurable L2

`l2_sram.sv` contains:

- 32 blocks of 4096×64 bits (`block_sram.sv`);
- configuration registers (`l2_config_regs.sv`): a first block and a block
  count for each of the three data types, which are features, weights and
  psums;
- a read engine and a write engine (`l2_rw_fsm.sv`);
- two address generators (`l2_addr_gen.sv`).

The regions are set per layer, so a layer with a large input chunk and
small filters can give most blocks to features, and the next layer can give
them to weights.

Each command carries a type, a base, a burst length, a burst count and a
stride. It produces word offsets inside the type's region. The generator
turns each offset into block = base + offset/4096 and row = offset mod
4096. An offset beyond the region sets a sticky `l2_err`, and the access is
not performed. `l2_overlap` flags two regions that share a block. Read data
arrives one cycle after the address.

## NoC

`noc.sv` has three jobs:

- It registers each L2 word once and delivers it to every array selected
  by a destination mask. One bit set is a unicast; more than one is a
  broadcast.
- It chains the output buffers into a psum bus, array n−1 → n.
- It collects the outputs routed to DRAM with a round-robin arbiter. Each
  result row carries its array number.

## Using the top

`accel_top.sv` has these parameters, with these defaults:

| Parameter | Default |
|---|---|
| `N_ARRAYS` | 48 |
| `RA`, `CA` | 7, 7 |
| `K_MAX` | 11 |
| `KT_MAX` | 3 |
| `L2_BLOCKS` | 32 |
| `BLOCK_DEPTH` | 4096 |

To run a layer:

1. Write the region of each data type: `cfg_we`, `cfg_type`, `cfg_base`,
   `cfg_num`.
2. Fill features and weights. Send a command on `fill_cmd_*` with the
   offset and length in 64-bit words, then stream the words on `fill_*`
   (valid/ready).
3. Submit jobs on `job_valid`/`job_ready`.
4. Take the results from `out_*` (valid/ready). `job_done` pulses when the
   arrays have finished the job's last pass. Results may still be on their
   way through the ALU queue and the output buffers.

The `ev_*` outputs pulse once for each of these events:

- temporal stall;
- output stall;
- broadcast word;
- unicast word;
- psum-bus transfer.

Reset is synchronous and active-low (`rst_n`).

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/acc_pkg.sv rtl/*.sv tb/tb_alu.sv --top-module tb_alu
./obj_dir/Vtb_alu
```

There are two end-to-end testbenches. Both include `tb/tb_accel_body.svh`.
It plays the DRAM side and checks every output row against a direct
convolution computed in the testbench. It runs NP, OC (with relu and
downscale), IC with 2 arrays and with all arrays (with relu and pooling), a
phase with the result port held back, a 2D layer (T = 1), and a fully
connected layer of 6 inputs (checked against the matrix-vector product). It fails if
any of these ever failed to happen:

- a temporal stall;
- an output stall;
- a broadcast;
- a unicast;
- a psum-bus transfer;
- any of the three loop orders;
- a fully connected layer;
- the post-operations;
- pooling;
- the 2D layer.

| Testbench | Top parameters | Data | Checks | Time |
|---|---|---|---|---|
| `tb_accel_top` | 4 arrays of 4×4 PEs, 8 L2 blocks of 512 words | 4 channels, 9×11×4 | 199 | fast |
| `tb_accel_full` | defaults, nothing overridden | 4 channels, 14×14×4, 48 filters | 3095 | about 3 min to build, about 1 s to run |

## Where this design departs from the described architecture, and what is its own

**Taken from the description:**

- the three loop orders and their parallelism;
- chunk tiling over C and M only;
- the PE with temporal, row and column buffers and a shared weight;
- output registers cascaded down each column, draining in RA cycles;
- one ALU per column, for accumulation, relu, pooling and downscaling to
  8 bit;
- the L2 of contiguously allocated blocks of 36 Kb BRAMs, set per layer
  through configuration registers, with an access-pattern FSM and address
  generators;
- unicast/broadcast distribution;
- FC layers with the input shared among the PEs and weights sent to each
  PE individually;
- the sizes: 48 arrays of 7×7 PEs, 32 L2 blocks, 8/32-bit data.

**This design's own choices.** The description does not give the following,
so they are chosen here:

- the step order in the window walk and which neighbour each step reads;
- the load descriptor and the job format;
- the L2 data layout, including the FC layout;
- the word width (64 bit);
- the To-ALU queue and its depth;
- the downscale method (shift and saturate);
- max pooling;
- the psum-bus chain topology;
- round-robin collection;
- all handshakes and the reset.

**Not built or reduced:**

- **Stride.** Stride 1 only. AlexNet's first layer (11×11, stride 4)
  cannot run.
- **Pooling** works only along one column of a tile: 1-D, inside a tile. A
  pooling group that does not finish inside the tile is dropped.
- **Window loads.** The window of the next channel is loaded after the
  current pass has finished with the window store. It is not
  double-buffered, so that load is not hidden. Only the loading of later
  kernel planes, inside a pass, overlaps with computing.
- **Psums** of the IC order travel on the psum bus between arrays, not
  through the L2 psum region. The L2 region can be allocated, but the top
  writes the L2 only from the DRAM fill port.
- **The local store** of an array is about 1.4 KB at the defaults: window
  867 B, filter 363 B, temporal buffers 196 B. The described L1 is 96 KB in
  total for 48 arrays, about 2 KB each.
- **The DRAM and the host** that computes the per-layer tiling are outside
  the design.

**Trust.** Every module passes its own testbench with random stimulus
against an independent model. Each testbench has been shown to fail on a
deliberately broken copy of its module. The complete accelerator matches a
direct reference (convolution or matrix-vector product) in every job listed above, at the reduced size and at the default size. Throughput has been
checked only as the per-pass cycle count (RA + T·R·S). Synthesis has not
been run to timing closure at 160 MHz.
