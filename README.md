# Autoencoder bandwidth compressor for FPGAs

This is a streaming hardware version of an autoencoder compressor of the kind
the Baler tool trains for scientific data. Detector data is cut into blocks of
20 numbers. A small neural network, the **encoder**, maps each block to 5
numbers, the latent code. That is a 4:1 reduction before the data leaves the
FPGA. A mirror network, the **decoder**, rebuilds 20 numbers from the 5 at the
receiving end. Compression is lossy. What matters in hardware is how many
blocks per second go through, which is why the work is done on an FPGA and not
on a CPU.

The RTL follows the accelerator described in the thesis *Performance of
ML-Based Bandwidth Compression on FPGAs*. That accelerator was generated with
hls4ml and measured on a Xilinx ZCU104 board (XCZU7EV, 1728 DSP slices). The
thesis gives the network shapes, the fixed-point format, the reuse factor and
the DMA connection. It does not give the microarchitecture inside the
generated IP. Everything at that level is written here from scratch and is
marked as this design's choice below.

## The network

Each half is a chain of fully connected layers. ReLU sits between layers. The
last layer of each half is linear, so the latent code and the reconstruction
can be negative.

| half    | layer widths              | products per block |
|---------|---------------------------|--------------------|
| encoder | 20 → 200 → 100 → 50 → 5   | 4000+20000+5000+250 = 29,250 |
| decoder | 5 → 50 → 100 → 200 → 20   | 250+5000+20000+4000 = 29,250 |

This is the "large" model and the default of every module. Two smaller models
were also run on the board. They are parameter sets of the same RTL:

* **reduced**: 20 → 100 → 50 → 5 and its mirror. It has 3 layers, 7,250 products and reuse factor 7.
* **tiny**: 20 → 32 → 16 → 8 → 5 and its mirror. It has 1,320 products and reuse factor 1.

The two halves are separate IPs that run independently. In a real link the
encoder sits at the sender and the decoder at the receiver.

## Reuse factor: how one layer is scheduled

This is the core of the design (`rtl/dense_layer.sv`). The large encoder needs
29,250 multiplications per block, but the device has only 1728 hard
multipliers. So each multiplier is used **REUSE** times per block. The default
is 22.

A layer with `N_IN` inputs and `N_OUT` outputs has `NW = N_IN*N_OUT` products
and `P = ceil(NW / REUSE)` multipliers.

* Product `k = o*N_IN + i` is the weight `w[o][i]` times the input `x[i]`.
* Product `k` is computed in step `k / P` by multiplier `k % P`.
* The weight memory is therefore `REUSE` rows of `P` words. Step `r` reads row `r`.
* Each multiplier adds its product into the sum of output `o`. Several
  multipliers can hit the same output in one step; their products are added together.
* Sums start at the bias. They are kept at full precision, with
  `2W + clog2(N_IN) + 1` bits and 2F fractional bits.
* After step `REUSE-1`, each sum goes through `act_quant`. That block drops F
  bits (truncating toward minus infinity), saturates to W bits and applies
  ReLU on hidden layers.

Multiplier counts with reuse 22 are 182, 910, 228 and 12 for the large
encoder, and the same in reverse for the decoder. That is 1332 per half, or
77% of 1728 DSP slices. The thesis aimed for about 80% use.

**Layer timing.** A layer takes a vector at a clock edge. Its result is valid
`REUSE` edges later. The layer takes the next vector on the same edge that its
result appears, so a stream runs at one vector per `REUSE` cycles. If the next
stage is not ready, the layer stops before its last step and holds its state.
The last row is never added twice.

**Network timing** (`rtl/dense_network.sv`). Each layer holds its own input
vector, so all layers work at once on different blocks. The next layer takes a
result one edge after it becomes valid. A vector therefore needs
`N_LAYERS*(REUSE+1)` edges from entering the first layer to leaving the last.

## Number format

Every value on a stream, in a weight memory or between layers is signed fixed
point **<19,10>**. That is 19 bits, of which 10 are integer bits including the
sign, and 9 are fractional bits. This follows hls4ml's convention, where the
second number counts integer bits. The real value is `v / 512`. The thesis
chose 19 bits as the widest format that stayed within its DSP budget while
giving a small output error. Parameters `W` and `I` change the format.

Rounding and overflow are this design's choice. The design truncates and
saturates. Each layer reports when it clamped a value, and these reports are
merged into the `sat_o` pulse of each IP.

## DMA streams

The processing system feeds each IP through an AXI DMA.

* `axis_to_vec` gathers `DIMS[0]` stream words into one input vector.
* `vec_to_axis` sends each result back as `DIMS[N_LAYERS]` words.

Word format (this design's choice): one value per 32-bit word, in the low 19
bits and sign-extended. Input ignores bits 31..19. Words are in element order.

`tlast` on any input word marks that block as the end of a transfer. It is
passed through the pipeline and appears on the last output word of that block.
The DMA's receive channel can then close its transfer at the matching point.
Both adapters run at one word per cycle with no bubble between vectors.

A block's steady rate is the slowest of three things: its input words, its
reuse factor and its output words.

| configuration   | rate (cycles per block) | latency, last input word → first output word |
|-----------------|-------------------------|----------------------------------------------|
| large, reuse 22 | 22                      | 4·23+2 = 94                                  |
| reduced, reuse 7 | 20                     | 3·8+2 = 26                                   |
| tiny, reuse 1   | 20                      | 4·2+2 = 10                                   |

At the 3 ns clock the thesis used for the large model, 22 cycles per block
gives about 15 million blocks per second per half. Throughputs measured on the
board were much lower because they include the DMA and Python around the IP.
These cycle counts are for this RTL only. They are not the latencies that the
HLS tool reported for its own implementation.

## Loading weights

The thesis bakes trained weights into the generated IP as constants. No
trained values are available here, so each layer has writable memories
instead. Each IP has a load port: `cfg_we`, `cfg_layer` (3 bits),
`cfg_addr` (16 bits) and `cfg_data` (19 bits). It writes one word per clock.
The address map for a layer is:

* `o*N_IN + i` is the weight `w[o][i]`
* `N_IN*N_OUT + o` is the bias `b[o]`

Weights and biases use the same <19,10> format. Load while the IP is idle.
Weights are not reset.

## Modules

| file | role |
|------|------|
| `rtl/baler_pkg.sv` | shared constants: default format, reuse factor, stream and load-port widths |
| `rtl/act_quant.sv` | requantise one sum to <W,I>, saturate, optional ReLU |
| `rtl/dense_layer.sv` | one fully connected layer with reuse factor, weight and bias memory |
| `rtl/dense_network.sv` | pipelined chain of layers (one autoencoder half) |
| `rtl/axis_to_vec.sv`, `rtl/vec_to_axis.sv` | DMA stream ↔ vector adapters |
| `rtl/baler_model_ip.sv` | one half as an IP: stream in, network, stream out, load port |
| `rtl/baler_fpga_top.sv` | encoder IP and decoder IP side by side, every port brought out |

Outside the RTL are the AXI DMA engine, the processing system that runs
the driver software, and the DSP slices. The DMA and the processing system
connect through the top's stream and load ports. The DSP slices are inferred
from the `*` in `dense_layer`.

## Where this departs from the reference accelerator

* **Both halves in one top.** The thesis built the encoder and the decoder as
  two separate designs. Together they need 2664 multipliers, more than the 1728
  on the target device. For an FPGA build of the large model, use one
  `baler_model_ip` per device as the top.
* **Writable weights** instead of constants (see above).
* **No control interface.** A generated HLS IP also has a control/status
  register interface. It is not described, so there is none here; the IP runs
  whenever data arrives.
* **Microarchitecture.** The product schedule, accumulator width, pipelining,
  rounding and overflow modes, stream word format and reset behaviour are this
  design's own. Because of this, outputs can differ in the last bit from the
  original IP.
* **Clock period.** The thesis's results on clock period (3–50 ns) are about
  timing closure on the device. They have no counterpart in the RTL, whose
  cycle counts do not depend on the clock.
* Reset is `rst_n`, asynchronous and active low. It clears the valid flags and
  counters only.

## Verification

Every module has a self-checking testbench in `tb/`. They all compare against
`tb/baler_ref_pkg.sv`, an integer model of the arithmetic written separately
from the RTL. `tb/ip_harness.sv` drives and checks one IP through its stream
and load ports:

* It loads random weights.
* It sends 24 blocks, one of them with extreme values to force saturation.
* For the first quarter, it inserts random input gaps and holds the output
  back, at first for 400 cycles so that the whole pipeline fills and the input
  stalls.
* After that, both sides run freely.
* It checks every output word, the `tlast` placement, the latency of the first
  block, the steady rate at the end of the run, and the saturation pulse.
* It fails if any of these never happened: input stall, output back-pressure,
  input gap, `tlast`, ReLU zeroing or saturation.

| testbench | covers |
|-----------|--------|
| `tb_act_quant` | 8000 boundary and random sums, with and without ReLU |
| `tb_dense_layer` | 5→7 layer, reuse 4: values, latency, rate, stalls, flags |
| `tb_dense_network` | 6→9→4→3, reuse 5: values, pipelined rate, latency |
| `tb_axis_to_vec`, `tb_vec_to_axis` | word order, sign handling, `tlast`, back-pressure, no bubbles |
| `tb_baler_model_ip` | tiny and reduced models, both halves, through the streams |
| `tb_baler_fpga_top` | the full-size top at its defaults: large encoder and decoder, all 58,500 weights and 725 biases loaded, 24 blocks each |
| `tb_precision_sweep` | tiny encoder in the formats <19,1>, <19,5>, <19,14>, <19,19> |
| `tb_frame_encoder`, `tb_frame_decoder` | one whole detector frame (180,000 blocks) through each large half; about 2 minutes each |

All pass. The full-size run takes under a second of simulation time after a
roughly 20 s build. To run one, for example the top:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_baler_fpga_top \
  -Irtl -Itb -y rtl -y tb rtl/baler_pkg.sv tb/baler_ref_pkg.sv tb/tb_baler_fpga_top.sv
./obj_dir/Vtb_baler_fpga_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and ends with a watchdog
if it stalls.

**What the tests do not show:**

* The reconstruction quality of a trained model. There are no trained
  weights; the tests check bit-exact agreement with the reference arithmetic
  on random weights.
* Synthesis results on the device were not produced.
