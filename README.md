# Dataflow CNN accelerator: streaming layers in a high-level pipeline

This is synthesizable SystemVerilog for a convolutional neural network (CNN)
accelerator organised as a pure dataflow machine. Every layer of the network is
a free-running hardware core. Cores are joined by valid/ready streams, and each
core starts work as soon as the data it needs have arrived. Pixels are read
once, in raster order, and kept on chip only while some window still needs
them. Because every layer works on its own image, a batch of images flows
through the network like a pipeline. After the first image, a new result comes
out at the rate of the slowest layer, not after the sum of all layer latencies.

The convolution layers borrow the memory system of a *streaming stencil
time-step* (SST), a structure first used for iterative stencil loops. Each
layer can be scaled from one input port and one output port up to fully
parallel. Two networks are built from the same library:

| network | layers | ports | steady-state interval (measured) |
|---|---|---|---|
| `cnn_usps` (16x16 grey digits) | conv 5x5 1->6, max-pool 2x2/2, conv 5x5 6->16, linear 64->10 | conv1 and pooling fully parallel (6 ports), rest single-port | 322 cycles per image |
| `cnn_cifar10` (32x32 RGB) | conv 5x5 3->12, max-pool, conv 5x5 12->36, max-pool, linear 900->64, linear 64->10 | every layer single-port | 11 745 cycles per image |

At 100 MHz these intervals are 3.2 us and 117 us per image. The published
figures for the same two networks are 5.8 us and 128.1 us.
`cnn_top` puts the two networks side by side. They share only clock and reset.

## Streams and data format

* Each stream has `data`, `valid` and `ready`. A beat moves when `valid` and
  `ready` are both high, as in AXI4-Stream.
* Data are signed 16-bit fixed point with 8 fraction bits (Q7.8), set in
  `cnn_pkg`. Products and sums are kept in 40-bit accumulators. A result is
  shifted right by 8 and saturated back to 16 bits.
* Ordering inside a port: raster order (row, then column). When one port
  carries several feature maps (FMs), their values for a pixel follow one
  another. With P ports, map `f` travels on port `f % P`. Every layer, the
  demux and the merge follow this rule.
* Network outputs are the 10 class scores, class 0 first, with `m_last` on
  class 9.
* Reset is `rst_n`: asynchronous and active low.

## The memory structure (`window_filter`, `stream_fifo`, `window_buffer`)

This part of the design is the least obvious. A convolution with a KH x KW
window needs KH*KW values per output position. `window_buffer` delivers all
of them in one cycle, yet it reads each input value from the stream only once.

The buffer is a chain of KH*KW **filters**, with a **FIFO** between each pair
of neighbours. The whole input stream of the port passes through every filter:
a filter reads each element from the FIFO before it and writes it to the FIFO
after it. Each filter owns one tap (r, c) of the window and counts the
coordinates (row, column, map) of the elements passing by. When an element is
tap (r, c) of some output window, the filter also copies it into its *window
register*. For stride S, this happens when `y - r` and `x - c` are
non-negative multiples of S that stay inside the output.

The first filter of the chain owns the last tap, (KH-1, KW-1). The last filter
owns tap (0, 0). Each FIFO is as long as the distance in the stream between
the two taps it joins, plus one word:

* `CH` elements between horizontal neighbours, where `CH` is the number of
  maps on the port;
* `(IMG_W - KW + 1) * CH` elements from the start of one window row to the
  end of the row above.

All filters therefore hold the taps of the same window at the same moment.
`win_valid` is the AND of all the window registers. When the core takes the
window (`win_ready`), every register empties at once.

A filter stalls only when the element it needs arrives while its register is
still full. The stall travels back through the FIFOs, and this is the only
flow control inside the structure. Once the chain has filled, a stride-1
buffer delivers one window per cycle. Images can follow each other without a
gap, because the counters simply wrap.

The mechanism was checked against deadlock with gaps and back-pressure in the
testbenches. Each FIFO holds the elements between two taps. A filter can
never wait for an element that is stuck behind a full FIFO upstream of it.

## Computation core (`conv_core`, `adder_tree`)

For each output position the core receives the IN_FM input windows,
IN_PORTS at a time. It accumulates

    o[k] = b[k] + sum_{f,r,c} w[k][f][r][c] * x[f][r][c]      for k < OUT_FM

The core has LANES lanes. Each lane has IN_PORTS*KH*KW multipliers and one
balanced `adder_tree`, and updates one output accumulator per cycle. The
OUT_FM/LANES lane groups are worked through in consecutive cycles. Meanwhile
the window waits in the filters' registers, which serve as the core's input
buffer. LANES is the smallest divisor of OUT_FM that lets one position finish
within the initiation interval

    II = max(OUT_FM / OUT_PORTS, IN_FM / IN_PORTS)

The rule is in `cnn_pkg::core_lanes`. Examples of the resulting sizes:

| layer | II | lanes x multipliers |
|---|---|---|
| USPS conv1 (1->6, 6 output ports) | 1 | 6 x 25 |
| USPS conv2 (6->16, single port) | 16 | 8 x 25 (12 cycles of work) |
| CIFAR conv1 (3->12, single port) | 12 | 3 x 25 |
| CIFAR conv2 (12->36, single port) | 36 | 12 x 25 |

The output side works like this:

* After the last group of a position, the accumulators are requantised and
  passed through the activation (ReLU in both networks).
* One cycle later they are copied into a result bank. The copy happens as soon
  as the bank is free, at the latest in the cycle its last beat leaves.
* The bank sends OUT_FM/OUT_PORTS beats. Each output port has its own
  handshake, and a beat ends when every port has delivered.
* Sending overlaps with the accumulation of the next position, so a core
  sustains one position per II cycles. The testbench checks this exactly.

`conv_layer` puts one `window_buffer` on each input port in front of a
`conv_core`. The windows of all ports are joined into one group.

## Other layers

* `pool_layer`: a `window_buffer` with a KxK window at stride S, followed by a
  max (or mean, for power-of-two window sizes) and an output register. Maps are
  never combined, so a layer with P ports gets P independent pooling cores.
* `fc_layer`: a linear layer treated as a 1x1 convolution with one port in and
  one out. Each input value updates all OUT_N accumulators in the same cycle,
  using OUT_N multipliers. After the last input, the results go to a result
  bank and leave one per cycle, while the next vector is already being
  accumulated.
* Port adaptation between layers (`port_adapter`):
  * equal port counts are wired straight through;
  * fewer ports feeding more go through `fm_demux`, which deals elements out
    round-robin;
  * more ports feeding fewer go through `fm_merge`, which reads the ports
    round-robin, so the maps come out interleaved in ascending order.

  The USPS network uses the merge: six pooling ports feed the single-port
  second convolution. Neither network needs the demux. It is present and
  tested for other port configurations.

## Weights

Weights and biases are constants fixed at build time, held in on-chip tables
(`wrom`/`brom` in `conv_core` and `fc_layer`). Trained values are not part of
this design. The tables are filled by `cnn_pkg::param_value(seed, index)`, a
deterministic integer hash that gives values in [-0.25, 0.25). Each layer has
its own seed parameter. To load a trained network, replace that function or
the `initial` loops that fill the tables.

Table layout:

* convolution: index `((k*IN_FM + f)*KH + r)*KW + c`;
* linear: index `j*IN_N + i`, where the inputs are ordered position-major,
  map-minor as they leave the convolution.

## Where this design departs from the published one

* **Arithmetic:** fixed point (Q7.8, 40-bit accumulation) instead of
  single-precision floating point. One accumulator per output is enough here.
  The floating-point design needed several interleaved accumulators in the
  linear layer to hide an 11-cycle adder latency.
* **Merge:** the case where a layer has more output ports than the next has
  input ports is handled by a round-robin `fm_merge` in front of an unchanged
  memory structure. The published design adds the extra loop inside the
  filters. The stream seen by the layer is the same.
* **FIFO length:** each filter FIFO has one word more than the strict
  minimum, so that a full FIFO never costs a cycle.
* **Choices the source leaves open:** these are this design's own.
  * ReLU after each convolution and after the CIFAR hidden linear layer.
  * Max pooling in the CIFAR network.
  * A hidden linear layer of 64 neurons in the CIFAR network.
  * No zero padding. Neither network needs it.
  * The pixel order inside a port.
  * A single port in and out for the USPS second convolution. The published
    wording leaves room for a different input-port count.
* **Not included:** the LogSoftMax normalisation, which neither network uses.
  Also the soft processor, DMA and interconnect of the test platform. The
  networks expose plain streams instead.
* **Timing:** each `adder_tree` is combinational within one cycle. No
  frequency target has been checked. The published design ran at 100 MHz on a
  Virtex-7. To reach a given clock, add pipeline registers in the tree and
  after the multipliers.

## Files

`rtl/`:

* `cnn_pkg.sv`: types, fixed-point helpers, weight function, interval rule.
* `stream_fifo.sv`, `window_filter.sv`, `window_buffer.sv`: the memory structure.
* `adder_tree.sv`, `conv_core.sv`, `conv_layer.sv`: convolution.
* `pool_layer.sv`, `fc_layer.sv`: sub-sampling and linear layers.
* `fm_demux.sv`, `fm_merge.sv`, `port_adapter.sv`: port adaptation.
* `cnn_usps.sv`, `cnn_cifar10.sv`, `cnn_top.sv`: the networks and the top.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each one
compares against a model written independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

* `tb_cnn_top` runs both networks at full size: 6 USPS images and 3 CIFAR-10
  images. It checks every class score, checks the steady-state interval
  against the published per-image times, and requires input gaps, output
  back-pressure, input stalls and image overlap to occur.
* `tb_cnn_usps` and `tb_cnn_cifar10` do the same for one network each.

## Simulating

With Verilator 5, for example for the whole design:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/cnn_pkg.sv rtl/*.sv tb/tb_cnn_top.sv --top-module tb_cnn_top -Mdir obj -o sim
    obj/sim +verilator+rand+reset+2

Any other testbench works the same way: replace `tb_cnn_top` with its name.
List `rtl/cnn_pkg.sv` first. The full-size run takes under a second of
simulation time.

To change a network, edit the parameters of `cnn_usps` or `cnn_cifar10`. All
derived sizes follow from the parameters: layer outputs, FIFO lengths, lanes
and the linear-layer input count. The divisibility rules are:

* port counts must divide the map counts;
* the larger port count of two neighbouring layers must be a multiple of the
  smaller one.
