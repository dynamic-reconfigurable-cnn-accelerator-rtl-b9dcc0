# A dynamically reconfigurable CNN accelerator for small edge FPGAs

A small CNN does not need its convolution, pooling and fully connected
engines all at once. It runs them one layer after another. This accelerator
uses that fact. Instead of building every layer engine in fixed logic, it
has two **reconfigurable partitions**, `RP_func0` and `RP_func1`. Each
partition holds one of three compute modules at a time:

* convolution + ReLU,
* 2x2 max pooling,
* fully connected + optional ReLU.

The host processor loads whichever module the next layer needs into a
partition. Loading is dynamic partial reconfiguration on the FPGA. The host
then points an AXI4-Stream switch at the partitions and starts them. Data
comes from memory through a DMA, passes through one partition or through
both in a chain, and goes back to memory. Two partitions can run two layers
back to back, for example convolution then pooling, without storing the
intermediate map.

This RTL is the programmable-logic side of that design, written as plain
synthesizable SystemVerilog:

* the three compute modules;
* the partition wrapper;
* the stream switch;
* the decoupler and shutdown manager that make reloading safe;
* the controller that sequences a reload;
* the AXI4-Lite path through which the host drives everything: a decoder,
  the static register block, and a register block inside each partition.

The processor, the DMA engine and DDR4 are not part of the RTL. Their connections are top-level ports. The same holds for the
"static group" of common operators, whose contents are not specified.

```
      AXI4-Lite (host)
            |
      +--------------+  0x40-0x7F: module registers of RP0 / RP1 ---------+
      | axil_decoder |                                                    |
      +--------------+                            DMA MM2S   DMA S2MM     |
            | 0x00-0x3F                               |          ^        |
      +-----------+  route table        +-------------v----------+------+ |
      | axil_ctrl |-------------------->|        axis_switch           | |
      +-----------+                     |  sources: 0 DMA, 1 RP0,      | |
        |  load requests                |   2 RP1, 3 static group      | |
        v                               |  sinks:   0 DMA, 1 RP0,      | |
   +------------------+                 |   2 RP1, 3 static group      | |
   | rp_reconfig_ctrl |                 +----+---^--------+---^--------+ |
   |   (one per RP)   |                      v   |        ...same for RP1 |
   |                  |--shutdown req/ack--> dfx_shutdown_mgr  <----------+
   |                  |--decouple----------> dfx_decoupler
   |                  |--rm_sel, rm_rst_n--> rp_func: rm_ctrl_regs,
   +------------------+                        conv | pool | fc
```

## Number format

Every value on every stream is one 16-bit signed fixed-point number in Q8.8
format, carried one value per beat. A multiply gives 32 bits with 16
fraction bits, and accumulation is exact in 40 bits. A layer output is
formed in this order:

1. shift the accumulator right arithmetically by 8;
2. saturate it to 16 bits;
3. apply ReLU if the layer has one.

A bias is loaded as Q8.8 and shifted left by 8 before it enters the
accumulator. All of this is in `cnn_pkg::requant`. The source design fixes
only the 16-bit fixed-point width. The Q8.8 split, the accumulator width and
saturation rather than wrap-around are choices of this RTL.

## The convolution engine (`conv_relu_rm`)

This is the block with most of the arithmetic. Its organisation follows the
loop nest of the source design:

```
for to  in output-channel tiles of TN        -- sequential
  for ti in input-channel tiles of TN        -- sequential
    for i in 0..k-1, for j in 0..k-1         -- kernel taps, sequential
      for r in 0..R-1, for c in 0..C-1       -- pipelined, one pixel per clock
        for too in 0..TN-1, tii in 0..TN-1   -- fully unrolled: TN*TN multipliers
          out[to+too][r][c] += w[to+too][ti+tii][i][j] * in[ti+tii][S*r+i][S*c+j]
```

The kernel loops sit outside the pixel loops. So for a whole pass over the
output map the TN x TN weights stay fixed, and only the input pixel address
moves. Each clock the array reads TN input pixels and TN x TN weights. It
forms TN sums of TN products and adds each sum into the accumulator of its
output channel.

To make those parallel reads possible, the buffers are split into banks.
Each bank is a one-dimensional memory with a single write port:

| buffer | banks | bank (a, b) holds | depth per bank |
|---|---|---|---|
| weights | TN x TN | output channels a, a+TN, ...; input channels b, b+TN, ... | ceil(M/TN)*ceil(N/TN)*K*K |
| input map | TN | input channels b, b+TN, ... | ceil(N/TN)*H*W |
| accumulators | TN | output channel a of the current tile, 40 bits | H*W |
| bias | 1 | all output channels | M |

There is a pipeline register between the multiplier array and the
accumulators. A pixel's accumulator is read, added to and written back in
the clock after its products are formed. The same pixel comes back only
after R*C clocks, so there is no read-after-write hazard. On the first
contribution to a pixel (ti = 0, i = j = 0) the accumulator starts from the
bias instead of its old value. So no clearing pass is needed.

Input channels beyond `n_in` in the last tile have their products masked
to zero. Output channels beyond `n_out` are computed but never sent.

**Stream protocol.** `start` captures the layer configuration. The slave
stream then carries, in order:

1. the weights `[n_out][n_in][k][k]`;
2. the biases `[n_out]`;
3. the input map `[n_in][in_h][in_w]`.

After each output-channel tile is computed, its TN channels are streamed out
as `[channel][row][col]`, and the next tile starts. The master stream's
`tlast` marks the last value of the layer, and `done` pulses one clock
later. The output map is R = (in_h-k)/stride+1 by C = (in_w-k)/stride+1.
There is no padding.

**Timing.** Loading takes one beat per clock. Each output-channel tile then
takes:

* `ceil(n_in/TN) * k*k * R*C` compute clocks;
* 2 drain clocks;
* one clock per output value while `m_tready` is high.

The unit testbench checks this count exactly.

The row and column loops are not tiled: the whole map is one tile. This
limits the module to maps that fit its buffers, which is sized per
partition (below).

## Pooling and fully connected modules

`maxpool_rm` pools on the fly and never stores the map. It holds the value
of each even column, which gives the maximum of each horizontal pair. On
even rows it parks that maximum in a half-width line buffer. On odd rows it
compares with the parked value and emits the 2x2 maximum. An odd last row or
column is dropped. It takes one input per clock. Its input-ready signal does
not depend combinationally on its output-ready. When a window would close
while the previous result is still waiting, that beat is stalled. Without
this rule, a chain of two partitions through the switch would form a
combinational path.

`fc_relu_rm` first stores the input vector. Then, for each output neuron, it
receives the bias followed by that neuron's `n_in` weights. A single
multiply-accumulate unit consumes one weight per clock, and the result
leaves as soon as its row is complete. No weight memory is needed, because
every weight is used once. `cfg.relu` selects ReLU, so the final layer can
output raw class scores.

All three modules share one interface: `start`, `cfg`, `busy`, `done`, one
stream in and one stream out. Inside the partition, a small AXI4-Lite
register block (`rm_ctrl_regs`) drives `start` and `cfg` from host writes.
So seen from outside, every module has the same boundary: one AXI4-Lite
slave, two streams and the busy/done lines. That is what lets them occupy
the same partition.

## Partitions and reconfiguration

On the device only the loaded module exists inside a partition. In this RTL,
`rp_func` instantiates all three and uses `rm_sel` to choose one. The
selected module gets the start pulse, the input stream and the output `tready`, and
drives the partition outputs. The other two are held in reset. With
`rm_sel = RM_NONE` (after reset) the partition moves no data, but its
registers still answer. Its ID register then reads 3. Synthesized as
is, `rp_func` is therefore the fully static equivalent of a partition. In a
partial-reconfiguration flow, each of the three module instances becomes one
reconfigurable module of the partition.

The two partitions hold modules of the same kinds but different sizes.
Their defaults, set in `cnn_dpr_top`:

| partition | convolution buffers | pooling line buffer | FC input buffer |
|---|---|---|---|
| RP_func0 | 1 -> 8 channels, 28x28, k <= 5 | 14 (width <= 28) | 256 |
| RP_func1 | 8 -> 16 channels, 12x12, k <= 5 | 14 (width <= 28) | 64 |

Both use TN = 4: a 4x4 multiplier array per convolution module.

`rp_reconfig_ctrl` handles a load request. If the requested module is
already loaded, the request completes in one clock and nothing is reloaded.
Loaded modules stay loaded, and reloading costs time, so the host can
request freely. Otherwise the controller:

1. raises `shutdown_req` and waits for `in_shutdown` from
   `dfx_shutdown_mgr`. That block lets each stream direction finish the
   packet it is in (up to the beat with `tlast`), then holds `tvalid` and
   `tready` low on both sides. On the AXI4-Lite link it starts no new
   transaction. A write or read already under way runs to its response;
   this includes a write whose address was taken but whose data was not.
   The host stays blocked from the first access it makes to a partition
   while it is shut down until the partition is released. By then the
   access reaches the new module.
2. raises `decouple`. `dfx_decoupler` forces every signal crossing the
   partition boundary to zero, in both directions.
3. holds the partition in reset for `LOAD_CYCLES` clocks (default 256). The
   reset includes the module's registers, so the host must write the layer
   sizes again after a load. This
   stands in for the bitstream transfer, which happens through the device
   configuration port and is outside the RTL. Then it switches `rm_sel`.
4. releases the decoupler and the shutdown manager and pulses `load_done`.

The controller counts reloads and skipped requests. Both counts are readable
by the host.

## The stream switch

`axis_switch` has 4 source ports and 4 sink ports. Each sink has a route
entry: an enable bit and a source index. Data, `tvalid` and `tlast` pass
combinationally from source to sink, and `tready` passes back. A source
that is routed nowhere sees `tready` low. A source must feed at most one
sink, and an assertion checks this.

A new route table is committed with one register write. It takes effect
only once no routed sink is in the middle of a packet, so a packet is never
split between two destinations. This lets the host write the next layer's
route while the current layer is still streaming. STATUS bit 6 shows that a
commit is pending.

## Host interface

The host sees one AXI4-Lite slave with 32-bit registers and a 7-bit byte
address. `axil_decoder` splits it three ways:

| addresses | slave |
|---|---|
| 0x00-0x3F | `axil_ctrl`, static registers |
| 0x40-0x5F | `rm_ctrl_regs` in RP_func0 (through its shutdown manager and decoupler) |
| 0x60-0x7F | `rm_ctrl_regs` in RP_func1 |

The decoder has one write and one read in flight at a time. A write opens
at its first AW or W handshake. From then on it stays with the slave chosen
by AWADDR until the B handshake. Every slave takes a write when address and
data are both valid and answers in the next clock. Responses are always
OKAY. Write strobes are ignored.

Static registers (`axil_ctrl`):

| addr | name | access | contents |
|---|---|---|---|
| 0x00 | IRQACK | W | bit0 / bit1 clear the done flag of RP_func0 / RP_func1 |
| 0x04 | STATUS | R | bit0/2 busy RP0/RP1; bit1/3 done RP0/RP1 (sticky until IRQACK); bit4/5 reload in progress RP0/RP1; bit6 route change pending; bits 9:8 / 11:10 module loaded in RP0 / RP1 (0 conv, 1 pool, 2 fc, 3 none) |
| 0x08 | ROUTE | RW | sink m at bits 4m+3..4m: bit3 enable, bits1:0 source; the write commits |
| 0x0C / 0x10 | RCFG0 / RCFG1 | W | bits1:0 module to load into RP0 / RP1 |
| 0x24 | RELOADS | R | module loads done, RP0 in bits 15:0, RP1 in bits 31:16 |
| 0x28 | SKIPS | R | load requests skipped because the module was already loaded |

Module registers (`rm_ctrl_regs`, offsets in the partition's window):

| offset | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | RW | write bit0: start; read bit0: busy, bit1: done (sticky, cleared by the next start) |
| 0x04 | ID | R | module loaded (0 conv, 1 pool, 2 fc, 3 none) |
| 0x08 | CFG0 | RW | bits15:0 n_in (channels or vector length), bits31:16 n_out |
| 0x0C | CFG1 | RW | bits7:0 in_h, 15:8 in_w, 19:16 k, 21:20 stride, 24 relu |

The `irq` output is high while any done flag is set.

### Running the MNIST network

The default sizes fit a LeNet-style MNIST classifier. The source design
names the layer types: two convolutions, two poolings, three ReLUs and two
fully connected layers, on 28x28 images. It gives no layer sizes. The sizes
here are this RTL's choice. The network runs in three steps:

| step | loads | route | layer(s) | result |
|---|---|---|---|---|
| 1 | RP0 <- conv, RP1 <- pool | DMA -> RP0 -> RP1 -> DMA | conv 1->8, 5x5, ReLU; pool | 8x12x12 |
| 2 | RP1 <- conv, RP0 <- pool | DMA -> RP1 -> RP0 -> DMA | conv 8->16, 5x5, ReLU; pool | 16x4x4 |
| 3 | RP0 <- fc, RP1 <- fc | DMA -> RP0 -> DMA, then DMA -> RP1 -> DMA | fc 256->64 ReLU; fc 64->10 | 10 scores |

In step 1, the pooling module receives 8 channels of 24x24 from the
convolution. For each chained step the host writes both modules' CFG
registers, then starts the downstream partition and the upstream one. Then the DMA streams the convolution's weights, biases and
input map. The fully connected layers run one at a time, because each needs
its own weights from memory.

Six loads are needed per image. In a steady stream of images, each step's
modules are reloaded once per image.

At 200 MHz, one image takes about 70,000 clocks (0.35 ms), not counting
reconfiguration:

| layer | clocks |
|---|---|
| conv1 | 28,800 compute + 4,608 output + about 1,000 loading |
| conv2 | 12,800 compute + 1,024 output + 4,368 loading |
| fc1 | 16,768 |
| fc2 | 724 |

The source design reports 0.142 ms of PL processing time per image at
200 MHz. That suggests a wider array or stream than TN = 4 and 16-bit beats.
Its unrolling factor is not given. Raising `TN` shortens the convolutions in
proportion.

The source design also reports 26.2 GOPS, about 65 multiply-accumulates per
clock at 200 MHz. This RTL has a peak of 32 multiply-accumulates per clock,
with both partitions convolving at TN = 4. The two figures together imply
about 3.7 million operations per image. The network assumed here needs
0.67 million, so the source network is larger than this one.

## Where this RTL departs from or adds to the source design

Taken from the source design:

* two reconfigurable partitions, each with a group of convolution+ReLU,
  max-pooling and fully-connected+ReLU modules that share an interface;
* modules of the same kind but different sizes in the two partitions;
* the AXI4-Stream switch, DMA and AXI4-Lite control structure;
* the decoupler, and the shutdown manager on both the AXI4-Lite and the
  AXI4-Stream interfaces;
* control commands sent to the modules over AXI4-Lite through an
  interconnect;
* loaded modules staying loaded, and avoiding needless reloads;
* the convolution loop order, with output and input channels unrolled and
  the pixel loop pipelined at one pixel per clock;
* 16-bit fixed point;
* ReLU and max pooling.

Choices of this RTL, where the source is silent:

* all layer sizes;
* TN = 4;
* Q8.8 with 40-bit accumulation and saturation;
* 16-bit stream beats;
* the stream order of weights, biases and data;
* no padding, and 2x2 stride-2 pooling;
* the fully connected module's single-MAC streaming structure;
* the register maps and the address map;
* a plain 1-to-3 AXI4-Lite decoder as the interconnect;
* route commits at packet boundaries;
* shutdown at packet boundaries;
* `LOAD_CYCLES`;
* asynchronous active-low reset.

An access the host makes to a partition that is shut down is held until
release. It does not get an error response.

The input `tlast` is not used by the compute modules: lengths come from the
configuration registers.

Not in the RTL: the processor, DMA, DDR4, the bitstream
store and configuration port, and the static group of common operators.
The static group's contents are not described, so its stream ports are
brought out of the top. In the testbench they are looped back through a one-entry register.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -y rtl -y tb --top-module tb_cnn_dpr_top \
    rtl/cnn_pkg.sv tb/tb_ref_pkg.sv tb/tb_cnn_dpr_top.sv -Mdir obj_top
obj_top/Vtb_cnn_dpr_top
```

The same command with another `tb_*` file and top module runs that block's
test.

`tb_ref_pkg` holds the reference models: convolution, pooling and fully
connected layers written directly from their definitions with the same
rounding.

`tb_cnn_dpr_top` runs the three-step schedule above at the default sizes on
a synthetic 28x28 image with random weights. It acts as host, DMA and
memory, and puts random backpressure on the DMA write stream. It compares
every layer output and the final class with the reference. It also requires
each mechanism to occur at least once:

* a skipped reload;
* the shutdown handshake;
* decoupling;
* a host access to a partition held during its shutdown;
* partition chaining;
* a route change held back by an open packet;
* backpressure;
* the static-group path.

The whole run takes well under a second.

The unit testbenches cover more cases:

* convolution sizes that are not multiples of TN, stride 2, and the exact
  clock count;
* odd pooling sizes;
* fully connected saturation;
* switch routing and packet-boundary commits;
* decoupler gating;
* shutdown at packet boundaries, and completion of open AXI4-Lite
  transactions;
* AXI4-Lite address decoding, with AW and W in either order;
* the reload sequence and skip;
* every register.

## Files

| file | contents |
|---|---|
| `rtl/cnn_pkg.sv` | number format, `layer_cfg_t`, `rm_e`, AXI4-Lite bundles, `requant` |
| `rtl/conv_relu_rm.sv` | convolution + ReLU module |
| `rtl/maxpool_rm.sv` | 2x2 max-pooling module |
| `rtl/fc_relu_rm.sv` | fully connected module |
| `rtl/rp_func.sv` | one partition with its three modules |
| `rtl/rp_reconfig_ctrl.sv` | reload sequencer |
| `rtl/dfx_shutdown_mgr.sv` | stream and AXI4-Lite shutdown at packet and transaction boundaries |
| `rtl/dfx_decoupler.sv` | partition isolation |
| `rtl/axis_switch.sv` | 4x4 stream switch |
| `rtl/axil_decoder.sv` | AXI4-Lite address decoder |
| `rtl/axil_ctrl.sv` | static host registers |
| `rtl/rm_ctrl_regs.sv` | module registers inside a partition |
| `rtl/cnn_dpr_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ref_pkg.sv` |
