# Tree tensor network classifier for low-latency FPGA inference

This RTL runs inference for a binary classifier built as a **tree tensor network (TTN)**.
It targets trigger-style settings, where every sample needs a decision within a few hundred
nanoseconds. Each input feature is lifted into a two-dimensional vector. The tree then
contracts pairs of vectors with trained weight tensors, layer by layer, until one scalar is
left: the classifier's decision value. The whole computation is linear apart from the
feature map, so it maps cleanly onto multipliers and adders. It is built in two flavours
that trade multipliers for latency:

* **full parallel**: one multiplier per product, fully pipelined. It takes one sample per
  clock and has a latency of 32 cycles for the default network.
* **partial parallel**: one serial multiplier per node for the first product stage. It needs
  about a quarter of the multipliers, at about twice the latency.

Weights are loaded at run time over AXI4-Lite. Samples arrive on an AXI4-Stream input and
results leave on an AXI4-Stream output. The network shape is fixed when the design is built.

## The network

With `N` input features (a power of two) the tree has `L = log2 N` layers.

* **Feature map.** Each feature `x` in [0, 1] becomes `phi(x) = [sin(pi x/2), cos(pi x/2)]`,
  so the leaf dimension is `D = 2`.
* **Layers.** Layer `l` (1..L) has `N/2^l` nodes. Node `m` of layer `l` takes the outputs of
  nodes `2m` (`x`) and `2m+1` (`y`) of layer `l-1`. It computes

      z[i] = sum_j sum_k V[i][j][k] * x[j] * y[k]

  with its own weight tensor `V` of size `X(l) x X(l-1) x X(l-1)`.
* **Bond dimensions.** `X(0) = D`, `X(l) = min(CHI, D^(2^l))` for inner layers, and
  `X(L) = 1`. `CHI` is the maximum bond dimension. The root therefore yields one scalar.

The `ttn_pkg` functions `bond_dim`, `node_weights`, `layer_offset` and `total_weights`
compute these sizes at elaboration. For the default network (`N = 8`, `CHI = 4`) the bond
dimensions are 2 → 4 → 4 → 1, in 4 + 2 + 1 nodes, with 64 + 128 + 16 = 208 weights.

The host converts the scalar into a class probability. It is the raw contraction value,
not normalised in hardware.

## Number format

All data and weights are 16-bit two's complement with 14 fractional bits (Q2.14, range
[-2, 2), LSB = 2^-14). A node does its arithmetic as follows:

1. `x[j]*y[k]` is truncated back to 14 fractional bits and saturated to 16 bits.
2. Each product times its weight is truncated to 14 fractional bits and kept at 18 bits.
   This cannot overflow.
3. The sums grow by one bit per adder level. The node output saturates to 16 bits.

Truncation (rounding toward minus infinity) and these saturation points are this design's
choices. Changing `W` and `FRAC` gives other quantizations. Fewer fractional bits are a
natural place to save multipliers.

## The two node implementations

Both compute exactly the same `z` bit for bit. The testbenches check this against one
reference model. They differ only in scheduling. `DSP_LAT` (default 3) is the number of
pipeline registers in every multiplier (`ttn_mul`), standing for the internal registers of
a DSP slice.

### Full parallel (`tc_full_parallel`)

* Stage 1: `DIN^2` multipliers form all products `x[j]*y[k]` at once.
* Stage 2: `DOUT * DIN^2` multipliers weight every product for every output component.
* Stage 3: `DOUT` adder trees (`adder_tree`, one register per level) sum the `DIN^2`
  weighted products. An output register saturates the result.

Multipliers per node: `DIN^2 (DOUT + 1)`. Latency: `2*DSP_LAT + ceil(log2 DIN^2) + 1`
cycles. A new pair of vectors is accepted every cycle. Every register advances on one
enable. In the tree, that enable is "output register empty or being read", so back-pressure
at the output freezes the whole pipeline without losing data.

### Partial parallel (`tc_partial_parallel`)

This style has the same three stages, made serial where it pays:

* **Stage 1.** One multiplier steps through the `DIN^2` index pairs, one per cycle. It
  writes the saturated products into a product buffer. When the buffer is full, and stage 2
  is free, the buffer is copied into `DIN^2` operand registers in one cycle. Stage 1 is then
  free for the next sample, so it overlaps stages 2-3 of the current one.
* **Stage 2.** Each of `DIN^2` multipliers holds one product. In cycle `i` it multiplies that
  product by `V[i][j][k]`, so one output component is produced per cycle.
* **Stage 3.** One registered adder sums the `DIN^2` weighted products of component `i`,
  saturates the sum and writes `z[i]`. After the last component, `out_valid` rises. `z` is
  held until `out_ready`.

Multipliers per node: `DIN^2 + 1`. The latency from accepting the input to `out_valid` is
`DIN^2 + DOUT + 2*DSP_LAT + 2` cycles: quadratic in the bond dimension, instead of
logarithmic. The node takes a new input at most every `DIN^2 + DSP_LAT + 2` cycles. Nodes
talk valid/ready. A parent node starts when both of its children are valid, and then
releases both. Sibling nodes always finish together, because they are identical and start
together.

### Cost and latency of whole networks

Multiplier counts equal `sum_l N/2^l * X(l-1)^2 (X(l)+1)` (full parallel) and
`sum_l N/2^l * (X(l-1)^2 + 1)` (partial parallel). Latencies are from the accepted input
beat to the output beat. They include the one feature-map stage and assume `DSP_LAT = 3`.

| N  | CHI | weights | multipliers FP / PP | latency FP / PP (cycles) | at 250 MHz |
|----|-----|---------|---------------------|--------------------------|------------|
| 4  | 4   | 48      | 72 / 27             | 21 / 42                  | 84 / 168 ns |
| 8  | 4   | 208     | 272 / 71            | 32 / 70                  | 128 / 280 ns |
| 16 | 4   | 528     | 672 / 159           | 43 / 98                  | 172 / 392 ns |

Coarse synthesis of the default top finds 272 multiply cells, as the formula predicts.
Throughput is one sample per cycle for full parallel. For partial parallel it is one sample
per `X^2 + DSP_LAT + 2` cycles of the widest layer: about 21 cycles at `CHI = 4`. The
stream clock is meant to run at 250 MHz. No timing closure has been done here.

## Feature map (`feature_map`)

The sine over a quarter period is stored as a 1025-entry table. It is indexed by the top 10
fractional bits of `x`, with `x` clamped to [0, 1]. The cosine comes from the same table at
address `1024 - addr`. Entries are `round(2^14 * sin(pi/2 * a/1024))`. They are computed at
elaboration by an integer Taylor series, so no data file is needed. The table size
(`FM_BITS`) is this design's choice. Because of it, `x` is effectively quantized to 2^-10
before the sine is taken. One register stage follows. `ttn_top` has one feature map per
input feature.

## Weight loading (`axil_weight_regs`)

All weights live in registers, so a new network or quantization can be loaded without a new
build. Weight `n` is at byte address `4*n`, in the low 16 bits of the 32-bit word. The flat
order is:

* layer by layer from the leaves;
* within a layer, node by node;
* within a node, `V[i][j][k]` at `(i*DIN + j)*DIN + k`.

`i` is the output index, `j` the left-child index and `k` the right-child index.

* **Writes** honour `WSTRB`, are accepted when address and data are both valid, and answer
  OKAY.
* **Reads** return the weight sign-extended.
* **Out-of-range addresses** answer SLVERR.
* **Reset** clears all weights to zero.

Loading new weights while samples are in flight affects those samples.

## Top level (`ttn_top`)

| port group | meaning |
|---|---|
| `clk`, `rst_n` | one clock; asynchronous active-low reset |
| `s_axil_*` | AXI4-Lite weight port (16-bit address, 32-bit data) |
| `s_axis_tdata[N*16-1:0]`, `tvalid`, `tready` | one sample per beat, feature `n` in bits `[16n +: 16]`, Q2.14 |
| `m_axis_tdata[15:0]`, `tvalid`, `tready` | decision value, Q2.14 |

Parameters and their defaults:

* `N = 8` and `D = 2`: the network shape.
* `CHI = 4`: the maximum bond dimension.
* `W = 16` and `FRAC = 14`: the number format.
* `DSP_LAT = 3`: pipeline registers per multiplier.
* `FM_BITS = 10`: feature-map table address bits.
* `ARCH = ttn_pkg::ARCH_FULL`, or `ARCH_PARTIAL`.
* `ADDR_W = 16`: AXI4-Lite address width.

`s_axis_tready` goes low while the partial-parallel tree is busy, or while a full-parallel
output is stalled. The PCIe/DMA link that would connect these ports to a host computer is
not part of this RTL.

## Where this design makes its own choices

* The weights and samples come from outside the design.
* Four sizes are assumed: the maximum bond dimension (`CHI = 4`), the multiplier latency
  (`DSP_LAT = 3`), the feature-map table size, and the AXI address width.
* The stream framing is assumed: one sample per beat, no TLAST.
* So are the address map and the rounding and saturation points.
* The partial-parallel handshakes and its overlap of stage 1 with stages 2-3 are assumed.
* Partial-parallel latency puts the multiplier pipeline depth once per stage,
  `X(l-1)^2 + X(l) + 2*DSP_LAT + 2` per layer. A formula that scales every term by the
  DSP latency would give larger numbers.
* Multipliers are written as `*` followed by a register chain, for synthesis to map onto
  DSP slices. They are not vendor primitive instances.

## Files

| file | content |
|---|---|
| `rtl/ttn_pkg.sv` | node-style enum, size and latency functions |
| `rtl/ttn_mul.sv` | pipelined fixed-point multiplier |
| `rtl/adder_tree.sv` | pipelined adder tree |
| `rtl/feature_map.sv` | sin/cos look-up |
| `rtl/tc_full_parallel.sv`, `rtl/tc_partial_parallel.sv` | the two node implementations |
| `rtl/ttn_tree.sv` | the network of nodes |
| `rtl/axil_weight_regs.sv` | AXI4-Lite weight registers |
| `rtl/ttn_top.sv` | top level |
| `tb/ttn_ref_pkg.sv` | bit-exact reference model used by all testbenches |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_ttn_top_full.sv` | default build: load weights, 64 back-to-back samples, latency and throughput |
| `tb/tb_ttn_workloads.sv`, `tb/ttn_workload_run.sv` | N = 4, 8, 16 in both styles |

## Verification and simulation

Every testbench compares results with `ttn_ref_pkg`. It is a plain-integer model of the
arithmetic above, with the feature map computed with `$sin`. Each testbench also checks
the cycle latencies given above. It ends with a line
`TB_RESULT checks=<n> failures=<n>`, and a watchdog ends it if it hangs.

The end-to-end testbench (`tb_ttn_top`) covers both node styles on one AXI4-Lite bus. It
forces each of these events and fails if one never happens:

* output stalls;
* input back-pressure;
* SLVERR;
* features outside [0, 1];
* saturated results.

All testbenches pass, each with several random seeds. To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ttn_pkg.sv tb/ttn_ref_pkg.sv tb/tb_ttn_top.sv --top-module tb_ttn_top
    ./obj_dir/Vtb_ttn_top

The testbenches check exact agreement with the model, not classification accuracy. No
trained weights or datasets come with this design.
