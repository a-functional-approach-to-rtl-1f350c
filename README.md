# A programmable LeNet-5 accelerator built from one shared datapath

A layer-by-layer neural-network accelerator usually gets one hardware
pipeline per layer, or one per call site of a shared function. Each copy
brings its own control logic and its own path to memory. On an FPGA, those
copies and the wires that multiplex them make the design hard or impossible
to route long before the DSP blocks run out.

This design does the opposite. There is **one** datapath, **one** controller
and **one** memory interface. The network is a program: a list of
instructions in host memory, one per layer. The controller is a reduction
over that instruction stream. Each step runs the whole datapath once with the
current instruction's addresses, lengths and mode bits, and waits until that
layer's results are written before starting the next. Inside the datapath,
*SwitchApply* stages select per instruction which of two functions a stream
goes through. For example, the same dot-product array serves convolutions
and fully connected layers; only the data generators feeding it differ. Sizes
vary from layer to layer, so every stream has a *run-time* length under a
compile-time upper bound rather than a fixed size.

The RTL is configured for LeNet-5: 28x28 grayscale digits, two convolutions
each followed by 2x2 average pooling, then three fully connected layers. Any
network whose layers fit the bounds in [Sizes and limits](#sizes-and-limits)
runs on the same hardware by changing only the program.

## Streams, handshakes and the upper-bounded stream primitives

Every connection between units is a stream with a `valid`/`ready` handshake.
An element moves in a cycle where both are high. A `last` flag marks the
final element. Streams have a run-time length up to a parameter bound. A few
small primitives convert between streams and vectors; the rest of the design
is built from them:

| Module | What it does |
|---|---|
| `ucounter` | Emits 0, 1, ..., n-1 with `last` on n-1. n is given at start and is at most `N`. If n = 0, only `done` pulses. |
| `mustm_read` | A UCounter mapped onto host reads: it requests lines `base .. base+len-1` and streams the responses back. It issues a request only when its FIFO has a free slot, because the host cannot be stalled. |
| `ustm_to_vec` | Gathers up to `N` stream elements into a vector. A flag per slot marks the valid ones, and a shift register of flags fills as elements arrive. A long stream is cut into consecutive vectors of `N`. |
| `vec_to_ustm` | Loads a flagged vector into a shift register and streams it out until the first false flag. A new vector is taken in the same cycle the last element leaves, so back-to-back vectors flow without a gap. |
| `pack_vec` | Moves the flagged elements of a vector to the front, keeping their order, and zeroes the rest. It is combinational. |
| `switch_apply` | Sends its argument stream to all `N` functions, but only the selected function sees `valid` and `ready`. The others see both low. The selected function's result is muxed back. |

`vec_to_ustm` is used to replay the FC input buffer. `pack_vec` is used to
zero the unused rows of a short FC weight group.

## The program in host memory

Host memory is addressed in 64-byte lines, the transfer unit of the
PCI-Express link. Line 0 holds the instruction count n in bits 15:0. Lines
1..n hold one instruction each. Weights, activations, biases and scales can
sit at any other line address.

An instruction is a packed struct, `shc_pkg::insn_t`, in the low 236 bits of
its line:

| Bits | Field | Meaning |
|---|---|---|
| 0 | `opCfc` | 0: convolution, 1: fully connected |
| 2:1 | `opPsum` | 0: PASS, 1: PART, 2: FULL (see [Arithmetic](#arithmetic)) |
| 3 | `opPool` | 1: average-pool the output |
| 35:4 / 51:36 | `iBase` / `iLen` | Image operand: first line and number of lines |
| 83:52 / 99:84 | `kBase` / `kLen` | Kernel or weight operand: first line and number of lines |
| 131:100 / 147:132 | `wBase` / `wLen` | Output: first line and number of lines written |
| 179:148 / 195:180 | `bBase` / `bLen` | Bias lines and their count (the scale lines use the same count) |
| 227:196 | `qsBase` | Requantisation scale lines |
| 235:228 | `qz` | Output zero point (signed 8-bit) |

`insn_loop` is the controller. On `start`, it reads line 0 and runs a
UCounter over 0..n-1. It streams instruction lines 1..n through a
`mustm_read`, which prefetches while a layer runs. It hands one instruction
at a time to the body and waits for the body's `done` before handing over the
next. That wait is all the reduction's accumulator does: it orders the
iterations, so a layer never reads data its predecessor is still writing.

## The layer pipeline

`lenet_body` runs one instruction:

```
SwitchApply(opCfc){ ReadConvImages | ReadFCWeight }  --a (streamed)-->\
                                                                       ParallelDP (P x L int8 MACs)
SwitchApply(opCfc){ ReadConvWeight | ReadFCImages }  --b (buffered)-->/
   -> PartialSum(opPsum, K) -> Bias -> Requant + ReLU
   -> SwitchApply(opPool){ identity | AvgPool } -> Write(wBase, wLen)
```

All stages start in the same cycle. Port **a** carries the streamed operand,
which is read once and whose `last` ends the pipeline. Port **b** carries the
buffered operand: it is loaded into on-chip memory and then repeated for as
long as port a has data. `ParallelDP` zips the two, waiting until both have an
element. When the writer has every output line acknowledged, the buffers are
cleared and the body reports `done`.

| Layer | a (streamed, P rows) | b (buffered, repeated) |
|---|---|---|
| Convolution | One image patch line, broadcast to all P units | Slice k of the P kernels (one kernel per output channel) |
| Fully connected | P weight lines, one per output neuron | Slice k of the input vector, broadcast to all P units |

So a convolution puts one output pixel of P channels in the P lanes, and a
fully connected layer puts P neighbouring output neurons there.

Seven read ports share `host_mem_if`:
- port 0: the instruction fetch
- ports 1–4: the four data generators
- port 5: the bias reader
- port 6: the scale reader

The interface grants one request per cycle, lowest port first. It records
each winner in a FIFO and returns each in-order response to the port at the
FIFO's head. At most `OUTS` reads are in flight. The single writer talks to
the host directly and counts one `h_wr_ack` per line.

## Operand layouts the host must prepare

The hardware does no address arithmetic beyond "read `len` consecutive
lines". The host lays the data out so that plain sequential reads produce the
right order. This part of the design carries the most weight, so here it is
in full. A dot product spans **K** lines:
- convolution: K = `kLen / P`
- fully connected: K = `iLen`

**Convolution, images (`iBase`, `iLen`).** Use im2col. Each output pixel's
receptive-field patch (kh x kw x C_in bytes) is zero-padded to K whole lines,
and the patches follow each other in output-pixel order. `iLen` = pixels x K.
When `opPool` = 1, the pixel order must put the 4 pixels of each 2x2 pooling
window next to each other.

**Convolution, kernels (`kBase`, `kLen` = P x K).** Line `k*P + p` holds
slice k of output channel p's kernel, in the same byte order as the patch.
Unused channels (p >= C_out) must be zero lines.

**Fully connected, weights (`kBase`, `kLen`).** Neurons are taken in groups
of P. Line `(g*K + k)*P + p` holds slice k of neuron g*P+p's weight row. A
final group may be short: the missing rows are read as zero weights.

**Fully connected, input (`iBase`, `iLen` = K <= KMAX).** The layer's input
vector, zero-padded to whole lines. It is read once and replayed for every
group.

**Bias and scale lines (`bBase`, `qsBase`, `bLen` <= BMAX).** Each line holds
sixteen signed 32-bit values, lane p in bits 32p+31:32p. Output vector n uses
line n mod `bLen`:
- convolution: `bLen` = 1, the same per-channel values for every pixel
- fully connected: `bLen` = number of groups, one line per group

**No overlap within an instruction.** An instruction's output lines must not
overlap the lines it reads. Between instructions there is no such rule: every
write is acknowledged before the next instruction starts, so a layer can read
its predecessor's output in place.

**Output (`wBase`, `wLen`).** The output is a stream of P-byte vectors,
LINE_BYTES/P = 4 of them per line, with vector v in bytes 16v..16v+15. A
final partial line is zero-padded. For a convolution the next layer's im2col
is redone by the host between programs. A fully connected layer's output is
already the next layer's input vector.

## Arithmetic

All data is signed 8-bit, and accumulation is 32-bit.

- **ParallelDP.** P units, each with L = 64 signed multipliers and an adder
  tree, compute P dot products of one line pair per cycle. There is one
  register stage.
- **PartialSum.**
  - PASS forwards each vector; use it when K = 1.
  - PART adds runs of K consecutive vectors lane by lane and emits one vector
    per run, which completes dot products that span K lines.
  - FULL adds all lanes of all vectors of the instruction and emits the
    scalar in lane 0 at the end of the stream.
- **Bias** adds the 32-bit bias of the lane.
- **Requant** computes, per lane,
  `v = ((acc * scale + 2^(QS-1)) >>> QS) + qz` (round half up, QS = 16
  fraction bits). ReLU then clamps `v` below at `qz`, and the result is
  clipped to [-128, 127]. The product is computed at 64 bits.
- **AvgPool** adds 4 consecutive vectors lane by lane and shifts arithmetically
  right by 2, so the result rounds towards minus infinity. A stream that ends
  inside a window closes it, still dividing by 4.

## Sizes and limits

| Parameter | Default | Meaning |
|---|---|---|
| `P` | 16 | Dot-product units, which is also the number of output channels or neurons per pass |
| `L` | 64 | Multipliers per unit, one line. `P*L` = 1024 int8 multipliers |
| `KMAX` | 8 | Most lines per dot product in the buffered operand (512 bytes) |
| `BMAX` | 8 | Most bias or scale lines, so an FC layer has at most 128 outputs |
| `QS` | 16 | Fraction bits of the requantisation scale |
| `WIN` | 4 | Pooling window (2x2) |
| `OUTS` | 16 | Host reads in flight |

LeNet-5 fits:
- 6 and 16 output channels are at most P.
- The conv patches are 25 B (1 line) and 150 B (3 lines), at most KMAX.
- The FC inputs are 256, 120 and 84 B (4, 2 and 2 lines).
- The widest FC layer has 120 outputs, which is 8 groups.

Larger networks (VGG, Tiny YOLOv2, ResNet) need deeper patches than KMAX
lines, 16-bit data (VGG) or operations this configuration does not have: max
pooling, leaky ReLU and residual addition. They do not run on it.

## Where this design departs from, or goes beyond, its source

The composition of the pipeline, the field names, the 64-byte line, Int8 data
with 32-bit results, the memory layout of the program, the stream primitives
and the SwitchApply handshake rule follow the published design. The
following are this implementation's own choices:

- P = 16 and L = 64. The published LeNet-5 design uses 760 DSPs, but how they
  split into units and lanes is not given.
- Field widths and bit positions of the instruction, and the 16-bit count in
  line 0.
- All operand layouts above, the K rule, and the n mod `bLen` rule for bias
  and scale lines.
- The exact arithmetic of PART and FULL. The three modes are specified only
  as "pass", "partial sum" and "full sum".
- The requantisation format (QS, rounding), and ReLU on every layer. The
  instruction has no activation flag, so every layer is rectified at its
  zero point; an output that must keep its negative range needs its zero
  point at -128, with the scale and the next layer's bias adjusted for it.
- Re-laying out convolution inputs on the host between layers. The published
  design has its data generators do the reordering; here they read
  sequentially.
- Read arbitration (fixed priority), the credit scheme toward a host that
  cannot be stalled, and the synchronous active-high reset `rst`.
- Starting the next instruction only after every write is acknowledged. This
  follows the published design's rule that a reduction step completes its
  writes before the next begins; the `wr_ack` signal is this design's.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. Build and run one with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/shc_pkg.sv \
    tb/tb_shc_top.sv --top-module tb_shc_top -o sim && ./obj_dir/sim
```

Replace the testbench name for the others. `tb/host_mem_model.sv` is a
behavioural host memory with:
- random read and write stalls
- fixed read latency with in-order responses
- one acknowledgement per write

`tb_shc_top` runs the top at its default parameters. It runs a five-layer
program through host memory: pooled conv, conv in PART mode, FC with a short
final group, FC in FULL mode, and conv without pooling. Every output line is
compared with a reference model written in the testbench. It also counts
read stalls, write stalls, each opCfc/opPsum/opPool mode, the partly flagged
weight group, pipeline back-pressure and the zip waiting for the buffered
operand. It fails if any of these never happened.

`tb_lenet5` runs a complete LeNet-5 inference at the default parameters:
- a random 28x28 image, random int8 weights and random 32-bit biases and
  scales
- conv1 and conv2 as one-instruction programs, with the testbench doing the
  im2col re-layout in between, like a host driver would
- the three fully connected layers as one three-instruction program

Every activation of every layer is compared with a loop-by-loop reference in
the testbench, and the cycles per program are printed. With the random stalls
of the memory model, the run takes about 1160 cycles for conv1, 490 for conv2
and 1470 for the three FC layers.

The unit testbenches are:
- `tb_ucounter`, `tb_mustm_read`, `tb_ustm_to_vec`, `tb_vec_to_ustm`,
  `tb_pack_vec` and `tb_switch_apply` for the stream primitives
- `tb_host_mem_if` for the memory interface
- `tb_insn_loop` for the controller
- `tb_data_gen` for all four data generators at P = 4
- `tb_parallel_dp`, `tb_partial_sum`, `tb_bias_add`, `tb_requant`, `tb_avg_pool`
  and `tb_write_out` for the datapath stages

To change the configuration, override the parameters of `shc_top`. `P` must
be a power of two, and `LINE_BYTES/P` vectors must fill a line.
