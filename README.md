# FiBHA hybrid CNN accelerator and STANN dataflow classifier

This repository holds SystemVerilog for two FPGA inference accelerators built for edge devices.

- **FiBHA** (fixed-budget hybrid accelerator) runs resource-efficient CNNs such as MobileNetV2.
- **STANN classifier** is a small streaming design that decides from 160 current samples whether an electric arc is present. An FFT front end turns the samples into spectra, and a network of four fully connected layers classifies 320 features.

The two designs are independent. `dl_accel_top` places them side by side. They share only clock and reset. Each one keeps its own ports, prefixed `fibha_` or `stann_`.

## The idea behind FiBHA

The layers of a CNN are far from alike.

- **Early layers** work on large, shallow feature maps and have few weights. Each weight is reused thousands of times. Their shapes change quickly from layer to layer, and the only standard convolution of the network is among them.
- **Later layers** work on small, deep feature maps and have many weights, each reused only a few times. They resemble one another.

Accelerators for such networks usually take one of two approaches:

- **One dedicated engine per layer** (SESL, single engine per single layer). This fits every layer well, but its cost grows with depth.
- **A few reusable engines** (SEML, single engine for multiple layers). These are cheap, but they fit the early layers badly.

FiBHA splits the network between the two. The first layers run on an SESL pipeline whose weights are on chip. The remaining layers run on an SEML part that loads each layer's weights from off-chip memory just before it needs them. The total number of multiply-accumulate units (PEs) stays within a fixed budget.

```
 host ─► input   ─► E0 ─► dbuf ─► E1 ─► dbuf ─► E2 ─► bridge ─► SEML engine ◄─ off-chip
        double       (STD 3x3 s2)   (DW 3x3)   (PW)   double    + layer table   weights
        buffer       ── SESL part, weights on chip ──  buffer   ── SEML part ──
                                                                      │
                                                                      ▼ result tile ─► host (FC layer)
```

The image is processed in tiles. A double buffer sits between every pair of neighbouring engines, so every engine works on a different tile at the same time. While E2 finishes tile *n*, E1 is on tile *n+1* and E0 on tile *n+2*. The SEML part reads the bridge buffer, so it too can work on tile *n−1* while the SESL part produces tile *n*.

The final fully connected layer is not in hardware. It runs on the host processor, which reads the result tiles from `out_*`.

### Default configuration

The SESL part holds the first three MobileNetV2 layers:

| engine | layer | tile in → out | PEs | busy cycles per tile |
|---|---|---|---|---|
| E0 | standard 3x3, stride 2, 3 → 32 ch | 19x19x3 → 9x9x32 | 32 | 2349 |
| E1 | depthwise 3x3, 32 ch | 9x9x32 → 7x7x32 | 8 | 2009 |
| E2 | pointwise 32 → 16 | 7x7x32 → 7x7x16 | 16 | 1666 |
| SEML | any STD/DW/PW layer, up to 96 channels | starts from 7x7x16 | 16 | per layer, see below |

The PEs are shared out so that the three SESL engines take about the same time per tile. In a pipeline, the slowest stage sets the throughput, so equal stage times waste the fewest PEs. In total the design uses 72 PEs.

## Convolution engine (`fibha_conv_engine`)

One engine design serves every layer. In the SESL part its configuration is fixed when the design is built. In the SEML part the configuration is rewritten for each layer at run time.

The engine computes one *valid* convolution. There is no padding inside the engine: the host cuts tiles that already include their halo. Output size is `(in − k)/stride + 1`.

A buffer read returns all channels of one pixel. The engine has `PAR` lanes, each one a multiply-accumulate unit:

- **Standard and pointwise convolutions.** The lanes hold `PAR` output channels. Each cycle, one input value (pixel at ky,kx, channel ic) is sent to every lane, and each lane multiplies it by its own weight. Pointwise is simply standard with k = 1.
- **Depthwise convolutions.** Lane p handles channel `g·PAR + p` and multiplies it by its own filter tap.

Loop order, innermost first:

1. ic, kx, ky. One MAC cycle each.
2. One **FIN** cycle per channel group. It adds the bias, shifts right, applies ReLU, saturates to 0..127 and stores the group.
3. One **WR** cycle per output pixel. It writes the pixel vector.

Busy time for one tile is therefore:

```
OH·OW·(G·(K·K·NIC + 1) + 1)    G = ceil(C_out/PAR),  NIC = C_in (STD/PW) or 1 (DW)
```

**Number format.** Activations and weights are INT8, and accumulation is 32 bits. Batch normalisation is folded into the weights and a 32-bit per-channel bias. The result is then requantised as follows:

```
y = min(127, max(0, (acc + bias) >>> shift))
```

The shift is set per layer at run time.

**Weight memory layout.** A weight word holds `PAR` INT8 values. Lane p is bits `8p+7:8p`.

- Standard and pointwise: word `((g·K + ky)·K + kx)·C_in + ic`.
- Depthwise: word `(g·K + ky)·K + kx`.

A bias word holds the `PAR` 32-bit biases of group g.

## Double buffers (`fibha_pingpong_buf`)

Each double buffer has two banks and a pointer for each side.

1. The producer writes into its bank while `wr_ready` is high, then pulses `wr_commit`.
2. The bank now belongs to the consumer. `rd_valid` goes high, and the consumer reads it at random addresses.
3. The consumer pulses `rd_release` when it is done.

When both banks are committed, `wr_ready` is low and the producer stalls. Reads are combinational.

An SESL stage (`fibha_sesl_stage`) starts a tile only when its input bank is full (`in_valid`) and its output buffer has a free bank (`out_ready`). In the cycle its engine finishes, the stage releases the input bank and commits the output bank. A stage that has a tile waiting but no free output bank shows this on `stalled`.

## SEML part (`fibha_seml`)

The host writes a layer table `layers[0..num_layers-1]` of type `seml_layer_t`. Each entry holds:

- type, k and stride;
- c_in and c_out;
- shift;
- w_base and b_base: word addresses in off-chip memory.

For each layer, the SEML controller does the following:

1. **Fetch.** It reads the layer's weights into the on-chip weight buffer (`WDEPTH` words) and its biases into the bias buffer.
   - Requests use `mem_req`/`mem_gnt`, and responses come back in order on `mem_rvalid`.
   - Several requests may be in flight.
   - A memory word is one weight word (`PAR` INT8 values).
   - A bias word (`PAR` × 32 bits) takes four consecutive memory words, lowest bits first.
   - The fetch reads the weight words from w_base, then `4·G` words from b_base.
2. **Run.** It configures the engine with the current tile size and starts it.
   - Layer 0 reads the bridge buffer and writes local buffer 0.
   - Each later layer reads the buffer the previous layer wrote and writes the other one. The two local buffers alternate.
   - The bridge bank is released as soon as layer 0 has finished. The SESL part can then hand over the next tile while layers 1 onward are still running.
3. **Output.** After the last layer it streams the result tile out, one pixel per beat, on `out_valid`/`out_ready`. `out_last` marks the last pixel. Channels above the last layer's `c_out` read as zero.

Weights are fetched a whole layer at a time before compute starts. Prefetching the next layer during compute is not implemented.

## STANN classifier (`stann_fft`, `stann_fft_frontend`, `stann_fc_layer`, `stann_mlp`)

**Input features.** The classifier sees 320 features built from each 160-sample frame:

- the 160 samples themselves;
- the spectrum of the first 128 samples;
- the spectrum of the last 32 samples.

**Spectra.** `stann_fft_frontend` takes in the frame and sends samples 0–127 to a 128-point FFT and samples 128–159 to a 32-point FFT. It then streams out 160 magnitudes: the 128 bins of the long spectrum first, then the 32 bins of the short one.

Each `stann_fft` is an iterative radix-2 FFT that works in place, with one butterfly per cycle:

- The samples are loaded at bit-reversed addresses.
- Stage s (span h = 2^s) combines elements i0 and i0 + h with the twiddle W^k, where k = (b mod h)·N/2h.
- A transform takes N load cycles, N·log2(N)/2 compute cycles and N output beats. For the 128-point FFT that is 448 compute cycles.
- The datapath is 16 + log2(N) + 1 bits wide, so no stage can overflow.
- Twiddles are 16-bit values with 14 fraction bits, computed at elaboration time. Each product is rounded.
- The feature for each bin is the magnitude estimate max(|re|,|im|) + min(|re|,|im|)/2. The exact re and im are also available on the FFT's ports.

**Between the two parts.** Normalising the spectra and joining them with the raw samples is left to the host. The host then sends the 320 features to `stann_mlp`.

**Network.** The network is 320-64-32-16-2. The three hidden layers use ReLU, and the output layer is linear. The layers are chained by valid/ready streams.

**Inside a layer.** Each fully connected layer first stores its whole input vector. It then computes the outputs in blocks of `PE` neurons on a linear systolic chain:

- The input vector enters PE 0 one element per cycle and moves one PE further each cycle.
- PE j holds the weight rows `o` with `o mod PE = j` in its own bank.
- When the chain has drained, the PE results go out with the bias added, rescaled and, in hidden layers, clipped by ReLU.

Because each layer keeps its own copy of the input, layer k can work on vector n while layer k−1 takes in vector n+1.

**Latency.** One vector takes this long per layer without back-pressure:

```
N_IN + ceil(N_OUT/PE)·(N_IN + 2·PE) cycles
```

At the defaults, the whole chain takes 5568 + 640 + 192 + 40 = 6440 cycles, about 26 µs at 250 MHz. With `PE = 1` it takes 23 732 cycles.

**Number format.** Data is signed 16-bit fixed point with `FRAC = 8` fraction bits. Products are accumulated at full width and saturated back to 16 bits.

**Loading weights.** Select the layer with `w_layer`. Weight index is `o·N_IN + i`; bias index is `o`.

## Departures from the original designs, and choices made here

**FiBHA**

- **Requantisation.** Uses a power-of-two right shift per layer, not a fixed-point multiplier.
- **Padding.** Tiles carry their own halo, and every convolution is valid. The host overlaps tiles by the halo and handles image borders.
- **Missing layer features.** Residual additions, squeeze-excitation, swish, and kernels larger than 3x3 are not supported. A complete MobileNetV2 (or MobileNetV1, ProxylessNAS, EfficientNet) therefore does not fit.
- **SEML size.** `C_MAX = 96` channels and `WDEPTH = 1024` weight words. A full network needs up to 1280 channels and about 25 600 weight words for its largest pointwise layer.
- **SEML engine.** A single engine handles both depthwise and pointwise layers. The original evaluation used a baseline with two separate engines there.
- **Number of SESL engines.** Three. The original derived the split point and the PE share per network with a search heuristic. That search is not reproduced; the split here is fixed at the first bottleneck of MobileNetV2.
- **Interfaces and sizes.** Tile size, buffer sizes, port widths and every handshake are this design's own.

**STANN classifier**

- **Number format.** The original classifier uses 32-bit float or IEEE half precision, and its FFTs are floating point. This version uses 16-bit fixed point throughout, so its latency and resources are not comparable one-for-one.
- **FFT speed.** With one butterfly per cycle, the 128-point FFT computes for 448 cycles. At 250 MHz that is 1.8 µs, or 2.8 µs counting load and output. The original reports about 1 µs. Two or four butterfly units would close the gap.
- **Magnitude.** Each FFT bin becomes a feature through a magnitude estimate. This choice is an assumption.
- **Not built.** The normalisation (its method is not specified) and the training path (backward pass and weight update).
- **Layer widths.** The hidden widths 64/32/16 and the two output classes are assumptions.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M`. Compile the packages first:

```
verilator --binary -Wno-fatal --top-module tb_fibha_conv_engine \
  rtl/fibha_pkg.sv tb/fibha_ref_pkg.sv tb/stann_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v fibha_pkg) tb/fibha_ext_mem_model.sv tb/tb_fibha_conv_engine.sv
./obj_dir/Vtb_fibha_conv_engine
```

`-Wno-fatal` is needed only because some style warnings remain. For example, assertion clocks mix with the asynchronous reset.

**Reference models.** `tb/fibha_ref_pkg.sv` and `tb/stann_ref_pkg.sv` compute the expected outputs directly from the formulas above, independently of the RTL loop order. `tb/fibha_ext_mem_model.sv` models the off-chip memory. It grants requests at random and answers in order after a fixed latency.

**End-to-end test.** `tb_dl_accel_top` runs both accelerators at their default size with no parameter overrides.

- **FiBHA.** Four 19x19 tiles pass through the three SESL layers and three SEML layers (PW 16→96, DW 3x3 stride 2, PW 96→24). Each 3x3x24 result is checked.
- **STANN.** Three feature vectors pass through the classifier. One two-tone frame passes through the FFT front end, and its spectrum must peak at the tone bins.

The test counts each mechanism and fails if any never occurred:

- an SESL stall;
- a full bridge buffer;
- SESL and SEML working at the same time;
- SEML weight fetches;
- a memory wait;
- result back-pressure;
- ReLU and saturation clipping;
- STANN layer overlap;
- STANN back-pressure;
- a complete FFT spectrum.

The first FiBHA result appears after about 14 400 cycles, and all four after 38 200 cycles. Building the test takes a few minutes; running it takes well under a second. `tb_fibha_top` is the same test for FiBHA alone.

## Files

| file | contents |
|---|---|
| `rtl/fibha_pkg.sv` | INT8/INT32 types, layer descriptors, requantisation |
| `rtl/fibha_ram.sv` | weight and bias buffer |
| `rtl/fibha_pingpong_buf.sv` | double buffer |
| `rtl/fibha_conv_engine.sv` | STD/DW/PW convolution engine |
| `rtl/fibha_sesl_stage.sv` | one SESL engine with its buffers and start rule |
| `rtl/fibha_sesl.sv` | three-engine SESL pipeline |
| `rtl/fibha_seml.sv` | layer-table controller, weight fetcher, alternating buffers |
| `rtl/fibha_top.sv` | SESL + bridge + SEML |
| `rtl/stann_fc_layer.sv` | systolic fully connected layer |
| `rtl/stann_mlp.sv` | four-layer classifier |
| `rtl/stann_fft.sv` | radix-2 FFT with magnitude output |
| `rtl/stann_fft_frontend.sv` | 128 + 32 split of a frame and spectrum stream |
| `rtl/dl_accel_top.sv` | both accelerators side by side |
