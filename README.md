# Two sampling accelerators for Ising problems

An Ising machine looks for a low-energy state of an Ising (or QUBO, or
Boltzmann machine) model: binary variables `s_i`, pairwise weights `W_ij` and
biases `b_i`. If the machine samples states with probability proportional to
`exp(-E(s))`, the states it sees most often are the ones with the lowest energy.
Most problems of interest are NP-hard. Max-Cut, integer factorization and the
travelling salesman problem can all be mapped onto such a model.

The core step of these samplers is small. Each node repeatedly sets itself to 1
with probability `sigmoid(sum_j W_ij s_j + b_i)`. The products `W_ij s_j` need
no multiplier because `s_j` is 0 or 1: a 2:1 mux passes the weight or zero, and
an adder sums what is left.

This repository holds RTL for two accelerators built around that step:

* **RBM Gibbs sampler** (`rbm_*`). This is a synchronous, synthesizable design
  for an FPGA. It samples a restricted Boltzmann machine (RBM), which has a
  visible and a hidden layer and connections only between the two. Every node
  has its own update circuit, so every clock gives a complete new visible
  sample.
* **PASSO chip model** (`passo_*`). PASSO is a "parallel asynchronous
  stochastic sampling optimizer": 256 mixed-signal neurons on a 16x16 grid run
  with no clock. Each neuron has a digital synapse that feeds a DAC, and the
  DAC sets the bias of an analog neuron that turns transistor noise into random
  switching. The digital parts are synthesizable RTL. The analog neuron and the
  DAC are behavioural models. The chip's sampling, buffering and streamout
  logic is written out in full.

`accel_top` puts the two side by side. They share no logic, and each keeps its
own clocks, resets and ports (`rbm_*`, `passo_*`).

---

## Part 1: the RBM Gibbs sampler

```
 host writes ──► rbm_io_ctrl ──► rbm_mem_ctrl ──► rbm_param_mem (W, b_v, b_h, clamps)
                     ▲                                 │ broadcast every clock
                     │                                 ▼
 host stream ◄── rbm_sample_fifo ◄── v_state ◄── rbm_core: NV + NH × rbm_node_update
```

### Node update (`rbm_node_update`)

Each node has one of these units. For visible node `n` it does the following:

1. It masks row `n` of the weight matrix with the hidden states: weight or 0.
   A hidden node uses column `n` and the visible states in the same way.
2. It sums the surviving weights in a balanced adder tree in one cycle, then
   adds the node's bias.
3. It saturates the sum to 8 bits, signed, with 4 fractional bits (range
   -8 .. +7.94).
4. It looks up `p = round(256·sigmoid(x))`, saturated to 255, in a 256-entry
   ROM.
5. It compares `p` with an 8-bit number from the node's own LFSR. The node
   becomes 1 when `rnd < p`.

Weights and biases are signed 8-bit numbers in the same fixed-point format as
the LUT input, so one weight step is 1/16.

The sigmoid table is computed during elaboration by a constant function. That
function evaluates `exp` with range reduction and a Taylor series. To change the
table's bit widths or binary point, change `IN_BITS`, `FRAC_BITS` and
`OUT_BITS`. No generated file is involved.

Each node has its own 32-bit LFSR (`rbm_lfsr32`) with polynomial
x³²+x²²+x²+x+1. It advances eight steps per clock, so each 8-bit number is made
of fresh bits. The seeds come from the node index, so no two nodes share a
sequence.

### Gibbs schedule (`rbm_core`)

On every clock with `en` high, both layers update at once. Each uses the other
layer's current registers:

```
h ← sample(Wᵀ v + b_h)        v ← sample(W h + b_v)
```

This gives a new visible sample every clock. Because both layers update at the
same time, the even and odd clocks form two independent Gibbs chains. A
strictly alternating schedule would give one sample every two clocks. A
visible node whose clamp is enabled takes its clamp value instead of its
sampled value. Problems such as factorization use this to fix known inputs.

### Host interface and address map

`rbm_top` has a write port (`cmd_valid/cmd_ready/cmd_addr/cmd_data`, 16-bit
address, 16-bit data, always ready) and a sample stream
(`out_valid/out_ready/out_data`, one NV-bit visible vector per word).

| `addr[15:14]` | region | offset `addr[13:0]` | data |
|---|---|---|---|
| 0 | weight | `v*NH + h` | `data[7:0]` signed weight W[v][h] |
| 1 | visible bias | `v` | `data[7:0]` signed |
| 2 | hidden bias | `h` | `data[7:0]` signed |
| 3 | control | 0 | start a run of `data` samples |
| 3 | control | `1+v` | clamp of visible `v`: `data[0]` enable, `data[1]` value |

Offsets outside an array are ignored. Writing during a run is allowed, and the
new values take effect on the next clock.

### Run, FIFO and stall

A run of N samples enables the core for N clocks. Every new visible vector is
pushed into a 16-entry first-word-fall-through FIFO (`rbm_sample_fifo`), and
the FIFO feeds the output stream. The IO controller enables the core only when
the FIFO has room for the sample already in flight. If the host reads more
slowly than one word per clock, the core stalls (`stall` is high) and no sample
is lost. With `out_ready` held high, N samples leave in N clocks plus a few
clocks of latency.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `NV`, `NH` | 32, 32 | visible and hidden nodes (this design's choice) |
| `FRAC_BITS` | 4 | fractional bits of weights, biases and the LUT input |
| `FIFO_DEPTH` | 16 | output FIFO entries |

The widths in `rbm_pkg` are: 8-bit weights, 8-bit probabilities and random
numbers, and a 16-bit host bus. The weight array is made of flip-flops because
every node needs a whole row or column in every clock. It grows as `NV·NH·8`
bits, and the adder trees grow in proportion to it.

---

## Part 2: the PASSO chip model

### Neuron tile (`passo_neuron`)

```
neighbours h[3:0] ─► passo_synapse ─► 7-bit code ─► passo_dac ─► Vin ─► passo_neuron_analog ─► out
 weights, bias ────┘   (mux, add, add bias, offset, saturate)    (real V)  (Poisson events, sigmoid)
```

* **Synapse** (RTL, combinational, no clock). Four 2:1 muxes select a weight or
  zero. Two adders sum the first and the second pair of products. A third adder
  sums the two results and the bias is added last. The signed sum, plus 64, is
  saturated to 0..127 to form the DAC code.
* **DAC** (behavioural model). The output is linear, from 0 V at code 0 to
  0.8 V at code 127.
* **Analog neuron** (behavioural model). Events arrive at exponentially
  distributed intervals with a mean of 10 ns. At each event the output becomes
  1 with probability `sigmoid((Vin − 0.42 V)/0.06 V)`. The result is 0 almost
  always at 0.1 V, 1 about half the time near 0.42 V, and 1 mostly at 0.6 V,
  which matches the shape of the silicon neuron's measured activation curve.
  `rstb_a` low holds the output at 0.

Neuron `i` of the fabric (`passo_fabric`) sits at row `i/16`, column `i%16`.
Its synapse inputs are, in order, its north, east, south and west neighbours.
A neighbour outside the grid reads as 0.

### Configuration chain (19171 bits)

All settings sit in one shift register (`passo_cfg_chain`). While
`config_shift_en` is high, one bit enters per `cclk` edge. Bit 0 is sent first
and leaves the chain first on `config_shift_out`. `rstb_cfg` clears the whole
chain.

| bits | content |
|---|---|
| `74·i + 0 .. 74·i + 31` | neuron i: weights to N, E, S, W (8 bits each, signed) |
| `74·i + 32 .. 74·i + 39` | neuron i: bias (8 bits, signed) |
| `74·i + 40 .. 74·i + 73` | neuron i: 34 analog settings (held, not interpreted by the model) |
| `18944 + 7·j .. +6` | bias trim j (j = 0..31), brought out on `bias_trim[j]` |
| `19168 .. 19170` | sampling preset |

The 4-neuron test cluster is a 2x2 fabric with its own 296-bit chain on the
`test_*` pins. Its four outputs go straight to `test_neuron_outputs`.

### Sampling, burst buffer and streamout

The neurons have no clock, so their outputs are sampled on `tclk` through a
two-flop synchronizer. The preset trades the number of neurons against the
sampling rate. It always writes 16 bits per `tclk` cycle, which is
4.8 Gbit/s at 300 MHz:

| preset | neurons sampled | sample rate at `tclk` = 300 MHz | words per sample |
|---|---|---|---|
| 0 | 0..15 | 300 MHz | 1 |
| 1 | 0..31 | 150 MHz | 2 |
| 2 | 0..63 | 75 MHz | 4 |
| 3 | 0..127 | 37.5 MHz | 8 |
| 4 (5–7 act as 4) | 0..255 | 18.75 MHz | 16 |

Word `k` of a sample holds neurons `16k .. 16k+15`, with neuron `16k` in bit 0.
All words of a sample come from the same clock edge.

The IO link is far slower than the sampling rate, so capture and readout take
turns in bursts:

1. `passo_sampler` fills the whole SRAM buffer (`passo_sram_buffer`,
   1024 × 16 bits) on consecutive `tclk` cycles, then toggles `full_tgl` and
   stops. The preset is latched at the start of each burst.
2. `passo_streamout` sees the toggle in the `ioclk` domain. It reads the buffer
   from word 0 and sends each word MSB first on `sample_streamout`. A bit is
   taken in each `ioclk` cycle where `streamout_tx_valid` and
   `streamout_rx_ready` are both high. With `rx_ready` held high, one word
   leaves every 16 IO clocks, which is 1.25 MHz at a 20 MHz IO clock.
3. After the last bit it toggles `drained_tgl`. The sampler sees that toggle
   and starts the next burst.

Only single toggle bits cross between the two clock domains. Each crossing goes
through two flip-flops. The buffer is never written and read at the same time.

A whole burst takes 1024 `tclk` cycles to write (3.4 µs). Reading it out takes
16384 IO clocks (0.82 ms). The samples of one burst are therefore contiguous in
time, and successive bursts are far apart.

### Ports of `passo_top`

The port names follow the chip's bump map: `cclk`, `rstb_cfg`,
`config_shift_en/in/out`, `tclk`, `ioclk`, `rstb`, `rstb_a`,
`streamout_tx_valid`, `streamout_rx_ready`, `sample_streamout`, and `test_cclk`,
`test_rstb_cfg`, `test_config_shift_en/in/out`, `test_neuron_outputs[3:0]`.
`bias_trim[32][7]` carries the trim codes to the analog current references,
which are not modelled. All resets are active low.

Three bumps have no described function and are not modelled:
`fingerprint_streamout`, `test_state_out` and `test_analog_in`.

---

## How far to trust it: what follows the source and what is chosen here

Taken from the design description:

* The RBM node update: the mask mux, adder tree, bias, sigmoid LUT and
  comparison with a per-node LFSR.
* A single-cycle accumulation and one node-update unit per node.
* The 32-bit LFSR and its 8-bit random numbers.
* The programmable weights, biases and clamps, and the FIFO to the IO
  controller.
* For PASSO: the 16x16 fabric and the 4-neuron test cluster.
* The synapse structure: four mux inputs, an adder tree, the bias and a 7-bit
  DAC.
* The 74/7/3-bit configuration fields, totalling 19171 bits.
* The 32 bias trims.
* The sampling presets from 16 neurons at 300 MHz to 256 at 18.75 MHz.
* Burst writes to an SRAM, and 16-bit words read out at 20/16 MHz through a
  serial valid/ready stream.

Chosen here, because the source gives no values:

* The RBM size (32 x 32).
* Weight width and fixed-point format.
* LFSR taps and seeds.
* The address map and run/stall protocol.
* FIFO depth.
* The simultaneous update of both layers.
* The split of the 74 neuron bits.
* The grid neighbours and the open boundary.
* The synapse-to-DAC code conversion.
* The DAC and neuron transfer curves and event rate.
* The intermediate presets and which neurons they select.
* The SRAM size.
* The bit order of the serial stream.
* The toggle handshake between the clock domains.
* The test cluster's separate chain layout.

Not modelled:

* The analog bias generators.
* The IO ring and bumps.
* The FPGA's PCIe core, which is replaced by plain ports.
* The host software.

The behavioural models (`passo_dac`, `passo_neuron_analog`, and through them
`passo_neuron`, `passo_fabric`, `passo_top`, `accel_top`) use `real` signals
and delays. Lint and simulation tools accept them, but they do not synthesize.
The RBM files and the PASSO digital blocks (`passo_synapse`, `passo_cfg_chain`,
`passo_sampler`, `passo_sram_buffer`, `passo_streamout`) are synthesizable.

## Fitting problems to it

| workload | needed | built | fits |
|---|---|---|---|
| TSP, direct QUBO, burma14 (14 cities) | 14² = 196 fully coupled variables | RBM: 32+32 nodes, bipartite only; PASSO: 256 nodes, 4 neighbours each | no |
| TSP, direct QUBO, berlin52 / pr76 / eil101 | 2704 / 5776 / 10201 variables | as above | no |
| TSP 2-opt sub-problem (k = 2) | 4k² = 16 variables, each coupled to ≥ 6 others in its row/column | RBM couples only across layers; PASSO only to 4 neighbours | no |
| TSP 2-reversal sub-problem (k = 2) | 2 variables, one coupling | one visible + one hidden RBM node; two adjacent PASSO neurons | yes (run on the RBM in `tb_rbm_tsp_2rev`) |
| PASSO sampling throughput | 16 neurons × 300 MHz = 4.8 Gsamples/s | 16 bits per `tclk` at every preset | yes |

The 2-reversal mapping puts the reversal bit of segment 1 on visible node 0
and the reversal bit of segment 2 on hidden node 0. The cost
`E = E00 + B·y1 + C·y2 + D·y1·y2` becomes the visible bias `-B/T`, the hidden
bias `-C/T` and the weight `-D/T`, where `T` is a temperature chosen so that the
values fit in 8 bits. Reversing both segments gives the same tour as reversing
neither, so the lowest cost is always shared by two states.

## Simulating

Every file in `rtl/` holds one module or package. Compile the two packages
first. Every testbench in `tb/` prints
`TB_RESULT checks=<n> failures=<m>` and ends with `$finish`. The following
runs the end-to-end test of both designs:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rbm_pkg.sv rtl/passo_pkg.sv tb/tb_accel_top.sv --top-module tb_accel_top
./obj_dir/Vtb_accel_top
```

Pass `-Wno-fatal` if your Verilator version stops on lint warnings. For any
other testbench, replace `tb_accel_top` with that testbench's name; the tools
find the other files through `-Irtl -Itb`.

| testbench | what it shows |
|---|---|
| `tb_rbm_lfsr32` | 2000 outputs equal a bit-serial reference; a zero seed is replaced |
| `tb_rbm_sigmoid_lut` | all 256 entries within 1 LSB of the exact sigmoid; monotonic |
| `tb_rbm_node_update` | probability and firing decision against a reference, with random rows |
| `tb_rbm_param_mem`, `tb_rbm_mem_ctrl` | writes and address decode against a model |
| `tb_rbm_sample_fifo`, `tb_rbm_io_ctrl` | FIFO order and flags; run length, stall, no overflow |
| `tb_rbm_core` | layer coupling through rows and columns; clamps; hold |
| `tb_rbm_tsp_2rev` | the TSP 2-reversal sub-problem on the full-size sampler: the most frequent (y1, y2) is a cheapest reversal choice, and each state's frequency is within 0.04 of its exact Boltzmann probability |
| `tb_rbm_top` | full-size sampler programmed through the host port; slow host (stalls), fast host (one sample per clock) |
| `tb_passo_cfg_chain`, `tb_passo_synapse`, `tb_passo_dac`, `tb_passo_neuron_analog`, `tb_passo_neuron`, `tb_passo_fabric` | chain order and reset; synapse arithmetic; DAC transfer; neuron statistics; grid wiring at 16x16 |
| `tb_passo_sampler`, `tb_passo_sram_buffer`, `tb_passo_streamout` | presets 0–4 and 7; word packing; burst length and re-arm; dual-clock buffer; serial order, hold under backpressure, 16-clock word rate |
| `tb_passo_top` | 19171-bit chain (checked with a marker), test cluster, four bursts with backpressure, and a switch from preset 4 to preset 0 |
| `tb_accel_top` | both designs at once, with a 64-word sample buffer; counts every mechanism above |
| `tb_accel_top_full` | every parameter at its default: RBM run and one full 1024-word burst |

`tb_accel_top_full` runs in a few minutes of wall time. Most of that time goes
to simulating 256 event-driven neurons over the 0.8 ms readout of the
1024-word buffer.
