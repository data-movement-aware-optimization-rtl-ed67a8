# Online-softmax attention engine for a Gemmini-style accelerator

Transformer attention computes `O = softmax(Q K^T) V`. On a Gemmini-style
accelerator the two matmuls run on a 16x16 systolic array. Both operands come
from a byte-wide scratchpad, and the results land in an int32 accumulator.
The built-in softmax sits on the accumulator read-out (mvout) path. It needs
the whole score row resident in the accumulator. It needs three read-out
passes per row. Its int8 result normally goes out to DRAM and comes back as
the A operand of the PV matmul.

This design adds a dedicated engine, **OnlineAttention**, between the
accumulator and the scratchpad. It is driven by one RoCC function (funct 23).
It scans the int32 score tiles left by QK^T one 16-wide column chunk at a
time. For every query row it keeps a running maximum `m` and a running sum
`l` (the FlashAttention-style "online" softmax). It then writes the int8
softmax weights straight into scratchpad tiles, where the PV matmul reads
them. The N x N attention matrix never leaves the chip. One command can
handle a whole Q-block of up to 256 rows.

The RTL in `rtl/` is the attention datapath around that engine:

| module | role |
|---|---|
| `oa_pkg` | sizes, command/opcode enums, request structs, tile address function |
| `online_attention` | the engine: per-row state, 7-state FSM, 16 iexp lanes, max tree, divider |
| `iexp` | integer exponential (I-BERT second-order polynomial), one lane |
| `seq_divider` | restoring divider shared by the engine's rescale and reciprocal |
| `accumulator` | 2048 x 16 x int32 SRAM with accumulate-on-write, raw and scaled/ReLU/int8 read |
| `scratchpad` | 4 banks x 4096 rows x 16 bytes, masked writes |
| `systolic_array` | 16x16 weight-stationary int8 mesh, 31-clock latency |
| `ws_executor` | one 16x16x16 tile matmul: preload B (optionally transposed), stream A, write/accumulate C |
| `acc_port_arbiter` | gives the accumulator port to the engine while it is busy |
| `sp_write_mux` | scratchpad write port; engine writes beat DMA writes |
| `gemmini_oa_top` | wires the above together and enforces the sharing rules |

The rest of the accelerator is outside the top. That is the controller
(dependency tracking, DMA engine, TLB, and the loops that turn a large matmul
into tile commands), the host core and the memory system. Their connections
are ports of `gemmini_oa_top`.

## The online softmax recurrence

For query row `i` and column chunk `c` with scores `x_j`:

```
m' = max(m, max_j x_j)
l' = sum_j iexp(x_j - m')                          first chunk of the row
l' = l * iexp(m - m') / iexp(0) + sum_j iexp(x_j - m')   if m' > m
l' = l + sum_j iexp(x_j - m')                      otherwise
```

After the last chunk, a second scan of the same scores computes the weights:

```
w_j = min(127, (iexp(x_j - m) * floor(127 * 2^24 / l)) >> 24)
```

A worked row with three chunks: the chunk maxima are 4, 7 and 5. The first
chunk sets `m = 4` and starts `l`. The second raises `m` to 7, so the old `l`
is rescaled by `iexp(4 - 7)` before the new chunk's terms are added. The
third leaves `m` at 7 and just adds.

Two arithmetic details are choices of this design:

* `iexp` returns `exp(x)` scaled by `iexp(0) = qb^2 + qc`, not by 1. The
  rescale factor is therefore divided by `iexp(0)`. A 64-bit sequential
  divider does this in 65 clocks. It only runs when a chunk raises the
  maximum of a row that already has state.
* Normalisation uses one reciprocal per row. It is computed on the row's
  first WEIGHTS chunk with the same divider, so each weight needs only a
  multiply and a shift. Weights are clamped to [0, 127].

Sums saturate at 2^32-1. Lanes beyond `total_cols` in the last chunk are left
out of `m` and `l` and written as 0.

### iexp

Each of the 16 lanes is combinational. It uses the I-BERT form with four
programmable coefficients:

```
z    = floor(-x * qln2_inv / 2^16)      (x <= 0; positive x is treated as 0)
p    = x + z * qln2
y    = ((p + qb)^2 + qc) >> z
y    = 0 when z >= 32
```

With a score scale of S = 0.05, the testbenches use qln2 = 13,
qln2_inv = 5041, qb = 27 and qc = 383. That gives iexp(0) = 1112.

## OnlineAttention command and FSM

The engine receives a RoCC command whose funct is 23. Bit layout:

| field | bits | meaning |
|---|---|---|
| op | rs1[2:0] | 0 CONFIG, 1 BATCH_UPDATE, 2 BATCH_WEIGHTS, 3 FUSED_BATCH |
| cfg slot | rs1[9:8] | CONFIG only: 0 qln2, 1 qln2_inv, 2 qb, 3 qc |
| sp_addr | rs1[31:16] | scratchpad row of the first weight tile |
| scores_addr | rs1[63:32] | accumulator row of the first score tile |
| num_rows | rs2[31:0] | rows in the Q-block (clamped to MAX_ROWS); CONFIG: the value |
| total_cols | rs2[63:32] | columns per row (number of keys) |

* **CONFIG** writes one coefficient. Four of them program the exponential
  once per layer.
* **BATCH_UPDATE** clears all row state and runs the UPDATE scan over every
  row and chunk.
* **BATCH_WEIGHTS** runs the WEIGHTS scan using that state.
* **FUSED_BATCH** does UPDATE and then WEIGHTS for each row in turn, all in
  one command.

The FSM has seven states: `idle`, `read_req`, `read_wait`, `compute`,
`update`, `write`, `done`.

1. `read_req` holds the request until the accumulator port accepts it.
2. `read_wait` waits for the row to come back.
3. `compute` runs the 16-input max tree. The signed compare uses an
   MSB-flipped unsigned compare. It also runs the 16 iexp lanes against the
   new maximum, and uses lane 0 for the rescale exponent.
4. `update` merges into `sum_state`. `write` emits one 16-byte scratchpad
   row in a single clock.

With the 1-clock accumulator, a chunk takes 4 clocks, plus 65 for a rescale
or a row's reciprocal. A fused 1x16 command takes 1 + 4 + 4 + 66 + 1 clocks
from acceptance to idle. The testbench checks this count.

Per-row state is held in flip-flop arrays of MAX_ROWS = 256 entries:
`max_state`, `sum_state`, `rescale_mul` (int32 each) and `state_valid`.

## Memory layout

Both scores and weights are stored as 16x16 tiles. Row `r`, chunk `c` of a
block with `n_chunks` chunks per row lives at:

```
base + ((r / 16) * n_chunks + c) * 16 + (r % 16)
```

So one accumulator row holds one row of one tile (16 int32 lanes).
`oa_pkg::tile_row_addr` computes this. The same layout is used by the
testbench when it issues the QK^T and PV tile matmuls. The weight tiles
written by the engine are therefore directly the A tiles of PV.

Accumulator reads return two things:

* the raw int32 row, which is the path the engine uses;
* the mvout form: `sat8(relu?((x * scale + 2^15) >>> 16))`, with `scale`
  in unsigned Q16.16.

## Sharing rules in the top

The engine and the matmul executor share the accumulator and the scratchpad.
Correctness depends on explicit mutual exclusion:

* **Accumulator port.** `acc_port_arbiter` gives the port to the engine
  whenever it is busy. Engine requests are forced to raw reads. Responses
  are steered by who owned the port when the request was accepted, not by
  who owns it now. Otherwise the last read of a command could go to the
  wrong side. On the other side, the executor has the port while it is busy
  and the DMA port has it otherwise.
* **Commands.** A funct-23 command is held while the executor is busy or
  has a command waiting. An executor command is held while the engine is
  busy. This is the hardware version of the fence that software puts
  between QK^T, softmax and PV. An assertion checks that the two are never
  busy together.
* **Scratchpad writes.** The engine's writes always win. A DMA write in the
  same clock sees `ready` low and retries.
* **Scratchpad reads.** The executor reads while busy, otherwise the DMA
  engine does.

Every funct other than 23 is passed unchanged to the `ctrl_cmd` port for the
controller. Funct 24 is reserved for a future macro-sequencer and is not
decoded.

## Tile executor and array

`ws_executor` takes one tile command `{a_addr, b_addr, c_addr, accumulate,
transpose_b}` and does the following:

1. It reads 16 B rows from the scratchpad and preloads them into the array.
   If `transpose_b` is set, each row is loaded as a column, which is how
   `K^T` is formed for QK^T.
2. It streams 16 A rows through the array.
3. It writes the 16 C rows to `c_addr + i`, overwriting or accumulating.

A tile takes 4*16 + 1 clocks. The array is a 16x16 weight-stationary mesh.
It has input skew and output de-skew registers, so row `i` of C appears
31 clocks after row `i` of A. A matmul larger than one tile is a loop of
these commands, which the controller issues (K-loop with accumulate).

## Sizes

| parameter | default | where |
|---|---|---|
| DIM | 16 | `oa_pkg` |
| scratchpad | 4 banks x 4096 rows x 16 B | `oa_pkg`, `scratchpad` |
| accumulator | 2048 rows x 16 x int32 | `oa_pkg`, `accumulator` |
| MAX_ROWS | 256 | `online_attention`, `gemmini_oa_top` |
| iexp lanes | 16 (= DIM) | `online_attention` |

For one BERT-base head (d = 64), a 128-row Q-block against 128 keys needs:

* scores: 1024 accumulator rows;
* output: 512 accumulator rows;
* Q, K, V and the weights: 2560 scratchpad rows.

All of these fit. Larger blocks need the score block to be split over
several commands. For example, a 256x256 score block needs 4096 accumulator
rows, twice the accumulator. A head at N = 256 therefore runs as four
Q-blocks of 64 rows: 1024 score rows plus 256 output rows. A head at N = 512
runs as sixteen Q-blocks of 32 rows: 1024 score rows plus 128 output rows.
Each Q-block takes one softmax command.

## Simulation

Every module has its own self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference model for the softmax
(`tb/oa_ref_pkg.sv`) is a bit-exact chunk-wise model of the arithmetic
above, plus a floating-point softmax used as a sanity bound. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/oa_pkg.sv tb/oa_ref_pkg.sv rtl/*.sv tb/tb_gemmini_oa_top.sv \
    --top-module tb_gemmini_oa_top -o sim
./obj_dir/sim
```

`tb_gemmini_oa_top` runs the whole design at its default sizes. Acting as
host, controller and DMA engine, it runs two cases:

* N = 40, d = 32, with separate UPDATE and WEIGHTS commands and a partial
  last chunk;
* N = 128, d = 64, with one FUSED_BATCH command for the whole Q-block.

It checks the scores, the weights (bit-exact) and the raw and scaled outputs
against values it computes itself. It also counts that each mechanism
occurred:

* a sum rescale;
* iexp saturation;
* a partial chunk;
* each side waiting for the other;
* a held DMA write;
* accumulating and transposed tiles;
* commands passed to the controller.

The 128-row fused case takes about 65k clocks for QK^T, softmax and PV
together.

`tb_attention_seq` runs complete heads at the two longer sequence lengths,
also at the default sizes. It uses the Q-block split described under Sizes.
Every weight and every output element is checked. The N = 256 head takes
about 235k clocks and the N = 512 head about 831k clocks, both including
the testbench's read-back. The run takes a few seconds.

`tb_online_attention` also replays the three-chunk row from the worked
example above, with scores in steps of 20 (1.0 at score scale 0.05). It
checks that exactly one rescale happens and that the command takes the
expected number of clocks.

## Where this RTL is its own

* The command bit layout, all handshakes (valid/ready), reset behaviour and
  the tile layout order are choices of this design.
* The rescale and normalisation arithmetic (divide by iexp(0), 24-bit
  reciprocal) and the sequential divider are this design's way of realising
  the recurrence in integers.
* The built-in three-pass softmax/LayerNorm unit on the mvout path is not
  included. The accumulator's read path has only the scale/ReLU/int8
  narrowing. The stand-alone transposer is replaced by the transposed
  preload.
* The array preloads weights by address rather than shifting them in. It has
  no weight double buffering.
* Splitting blocks that exceed the accumulator, and the loops over heads and
  Q-blocks, are left to software and the controller.
