# MCluster FPGA: an FPGA fabric built from ultrafine-grain logic cells

Conventional FPGAs compute with K-input lookup tables, and most of their area
goes to configuration memory and routing rather than to logic. This fabric
replaces each LUT with a small matrix of two-input reconfigurable gates. Each
gate is the logic model of a seven-transistor cell built from
controllable-polarity transistors. A transistor's n- or p-type behaviour is set
electrostatically by a *polarity gate*, so three bias lines pick one of eight
functions. The gates sit in layers, and a fixed, incomplete wiring pattern
joins each layer to the next. Because that inner wiring needs no switches or
configuration memory, the matrix (the *MCluster*) costs less than a LUT and
can produce several outputs.

The RTL models the whole logic hierarchy: cell → MCluster → basic logic
element (BLE) → configurable logic block (CLB) → fabric. It also includes the
configuration memory and a global routing level. Everything is
parameterised. The defaults are the main configuration of the architecture:

| parameter | default | meaning |
|---|---|---|
| `D`, `W` | 2, 2 | MCluster depth (layers) and width (cells per layer): *MClusters_2_2* |
| `N` | 10 | BLEs per CLB |
| `I` | 22 | CLB inputs, from I = (N + 1) · (2W) / 2 |
| `NCLB` | 4 | CLBs in the fabric (free choice) |
| `NPI`, `NPO` | 16, 8 | fabric inputs and outputs (free choice) |

## 1. The logic cell (`ufg_lc`)

The cell has two inputs, A and B, and one output, Y. Its 3-bit configuration
is `cfg = {V_BA, V_BB, V_BC}`, where a 1 means the polarity gate is tied to
V_DD:

| cfg | Y | cfg | Y |
|---|---|---|---|
| 000 | ¬(A·B) | 100 | A + ¬B |
| 001 | A·B | 101 | ¬A·B |
| 010 | ¬A + B | 110 | A + B |
| 011 | A·¬B | 111 | ¬(A + B) |

This function table is fixed by the cell. The way the RTL computes it is an
interpretation. V_BA and V_BB each optionally invert one input, an AND stage
follows, and V_BC makes the second stage a follower (1) or an inverter (0).
This reproduces the table exactly. Named codes are in `mcfpga_pkg::lc_func_e`.

The real cell is dynamic logic with precharge and evaluate phases. The RTL
treats it as static combinational logic, so its timing is not modelled. Note
that no code makes the cell a plain buffer or inverter of one input, because
all eight functions depend on both A and B. To pass a signal through a cell,
hold the other input at the constant that makes the function transparent.
For example, OR with 0 or AND with 1.

## 2. The MCluster and its fixed inter-layer wiring (`mcluster`, `mc_layer`)

An MCluster of depth D and width W holds D layers of W cells. Cell `f^{nj}` is
row j of layer n, and its code is `cfg[(n*W + j)*3 +: 3]`.

* **Layer 0** takes the 2W cluster inputs directly. Cell j gets `in[2j]` as A
  and `in[2j+1]` as B.
* **Layers 1..D-1** (`mc_layer`) are fed only by the layer just before them. No connection
  skips a layer, and there is no feedback, register or buffering inside the
  cluster. The cluster is a single combinational block with a delay of D cell
  stages.
* **Outputs** are the W outputs of the last layer.

Each cell output has a fan-out of exactly two, so every layer has 2W input
terminals and 2W output terminals. The link between two layers is a
*Modified Omega* pattern. Here it is built as a perfect shuffle of the 2W
output lines, and then consecutive line pairs go to the next-layer cells. The
closed form (`mcfpga_pkg::omega_src`) is:

    input A of cell j  <-  cell floor(j/2)      of the previous layer
    input B of cell j  <-  cell floor((j+W)/2)  of the previous layer

For W = 3 this gives the cross-connectivity matrix of the reference 3×3
cluster. In the matrix, the row is the next-layer cell and the column is the
source cell:

    X = | 1 1 0 |      f1,0 <- f0,0  f0,1
        | 1 0 1 |      f1,1 <- f0,0  f0,2
        | 0 1 1 |      f1,2 <- f0,1  f0,2

For W = 2 (the default), every cell receives both outputs of the previous
layer. For W ≥ 4 the same shuffle rule is used. The architecture describes
its Modified Omega as an Omega network modified to increase shuffling
between layers. The exact W = 4 wiring is not reproduced here, so at W ≥ 4
this link may differ from it (see section 6).

Which of a cell's two sources drives A and which drives B is a choice of
this design. It matters, because several cell functions are asymmetric.

Mapping a netlist onto a cluster is the packer's job. Jumps over a layer and
fan-outs above two are repaired by inserting buffer cells, and all outputs
are pushed to the last layer. A 3×3 example mapping is exercised in
`tb_mcluster`.

## 3. BLE and CLB (`ble`, `clb`, `route_mux`)

A **BLE** is one MCluster plus, for each of its W outputs, a D flip-flop and
a 2:1 multiplexer. A register-select bit chooses the registered or the
combinational value. The BLE configuration is the MCluster configuration
followed by W register-select bits (1 means registered).

A **CLB** holds N BLEs. Every BLE input has its own local routing multiplexer
(`route_mux`) over I + W·N sources: the CLB inputs (sources 0..I-1) and every
BLE output of the same CLB (source `I + n*W + j`). This gives full local
connectivity. At the defaults each multiplexer has 42 inputs and a 6-bit
select. A select code above the last source gives a constant 0, which is how
unused cell inputs are tied off. All W·N BLE outputs leave the CLB.

## 4. Fabric, routing and configuration (`mcfpga_top`, `global_routing`, `config_mem`)

The **global routing** gives each CLB input and each fabric output one
multiplexer over all fabric inputs (sources 0..NPI-1) and all CLB outputs
(source `NPI + c*W*N + m`). The only limit on it is the I inputs per CLB. It
stands in for island-style channels and switchboxes, which are not modelled
(section 6).

The **configuration** is one serial chain. While `cfg_en` is high, every rising
`clk` edge shifts `cfg_din` in. After a load of B bits, the first bit sent is
configuration bit 0. `cfg_dout` returns the old contents in the order they
were sent, so a second load reads back the first. The layout is:

| field | offset | width (defaults) |
|---|---|---|
| global select of CLB c input i | `(c*I + i)*GS` | GS = 7 |
| global select of fabric output p | `(NCLB*I + p)*GS` | 7 |
| CLB c | `GB + c*CB` | CB = 380 |
| — BLE n inside CLB c | `+ n*BB` | BB = D·W·3 + W = 14 |
| — select of input k of BLE n | `+ N*BB + (n*2W + k)*LS` | LS = 6 |

GB = (NCLB·I + NPO)·GS = 672. The default fabric has 672 + 4·380 = 2192
bits. The functions in `mcfpga_pkg` compute all these widths.

### Reset, hold and timing

* `rst_n` (active low, asynchronous) is a global reset. It marks the
  configuration invalid, so a load must follow it.
* The fabric is **held** while `rst_n` is low, while `cfg_en` is high, and
  until the first clock edge after a load ends. While held, every CLB output
  is forced to 0 where it enters the routing, and every BLE flip-flop is
  cleared. A half-loaded configuration therefore cannot close an oscillating
  loop. User logic starts from all-zero registers.
* Once running, combinational BLE outputs follow the fabric inputs in the
  same cycle. Registered outputs change on the rising edge of `clk`.
* The routing lets a BLE output feed back to a BLE input. This makes
  *structural* combinational loops, as in any FPGA. A configuration must not
  close one through combinational BLE outputs. Lint tools report these loops
  (Verilator `UNOPTFLAT`, logic-loop warnings in synthesis). They are
  expected.

## 5. Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Expected values come
from `tb/tb_ref_pkg.sv`, a reference model written separately from the RTL.
It holds the cell truth table, the shuffle rule, and a bit-level decoder of
the configuration layout. It also holds generators for random
configurations that contain no combinational loop.

| testbench | what it shows |
|---|---|
| `tb_ufg_lc` | all 8 codes × 4 input pairs against the table |
| `tb_mc_layer` | link wiring probed through the cells: W = 3 against matrix X (A and B separately), W = 2 full, fan-out rules at W = 4 and 8 |
| `tb_route_mux` | every select code of the 42-input multiplexer, tie-off codes |
| `tb_mcluster` | 3×3 mapping example (buffers, unused cell), random 2×2, 3×3, 4×4 |
| `tb_ble` | combinational and registered outputs, reset, two different functions of the same four inputs |
| `tb_clb` | 20 random configurations with feedback and tie-offs, hold input |
| `tb_config_mem` | bit placement, hold, read-back, valid flag |
| `tb_global_routing` | random selects at the default size |
| `tb_mcfpga_top` | default fabric end to end: 4 serial loads with read-back, hold during loading, global reset, 60 cycles per configuration checked before and after each edge; counts every mechanism |
| `tb_mcfpga_sizes` | MClusters_1_1, 2_2, 3_3, 4_4 with I = 11, 22, 33, 44 (local multiplexers of 21 to 84 inputs) |

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/mcfpga_pkg.sv tb/tb_ref_pkg.sv tb/tb_mcfpga_top.sv \
        --top-module tb_mcfpga_top -o sim && ./obj_dir/sim

Replace the last file and `--top-module` to run another testbench. The
full-size `tb_mcfpga_top` runs in a few seconds. Verilator warns `UNOPTFLAT`
on the configurable feedback paths (section 4). This is expected.

To change the size, set `D`, `W`, `N`, `I`, `NCLB`, `NPI` and `NPO` on
`mcfpga_top`. Every configuration width follows from these parameters. Keep
I = (N + 1)·W, the sizing rule the architecture uses to keep the CLBs
routable. `tb_mcfpga_sizes` shows how to instantiate other sizes.

## 6. How far this follows the architecture

Taken from the architecture:

* The eight cell functions and their bias encoding.
* The layered cluster with layer-to-layer links only and no pipelining.
* The 3×3 Modified Omega matrix.
* The BLE with individually registrable outputs.
* The CLB with N = 10, full local feedback and 42-input multiplexers.
* The I = (N + 1)·inputs/2 sizing rule.
* Configuration held in memory cells. The architecture uses SRAM; here a
  shift chain of flip-flops stands in for it.

Choices of this design:

* The shuffle formula for widths other than 2 and 3.
* The A/B assignment of link inputs and of cluster inputs.
* Binary select codes with a tie-off code.
* The serial configuration chain and its bit layout.
* The fabric hold and the global reset.
* The flip-flop reset.
* The number of CLBs and pins.

Not modelled:

* **Transistor level.** The dynamic precharge/evaluate operation of the cell
  and its clock phases are not modelled, nor is the nanowire device itself.
  The cell is static logic.
* **Island-style routing.** There are no channels, connection boxes or
  switchboxes. The multiplexer-based global routing reaches the same
  sources, but it is not the area or delay structure of a real FPGA.
* **Modified Omega for W ≥ 4.** The exact wiring at W ≥ 4 is not
  reproduced. The plain shuffle is used.
* **CAD flow.** The packer, mapper and place-and-route are software. Here,
  configurations come from the testbench generators.
