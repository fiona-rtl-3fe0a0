# FIONA-V: a RISC-V vector coprocessor with a photonic ALU

FIONA-V is the digital half of a photonic-electronic neural-network accelerator.
Photonic circuits (a bank of microring resonators, a Mach-Zehnder interferometer
mesh, an optical FIR filter) compute dot products, matrix-vector products and
convolutions in the optical domain, fast and at low energy, but they cannot
store data, sequence work or evaluate non-linear functions. FIONA-V supplies
all of that. It is a vector coprocessor attached to a Rocket RISC-V core through
the RoCC coprocessor port: the host core runs the program, splits large
matrices into 32-element tiles and sends FIONA-V custom instructions; FIONA-V
keeps vectors in its own register file, does element-wise arithmetic,
activations and memory transfers electronically, and hands the linear algebra
to the photonic core through a DAC/ADC pair.

This repository holds synthesizable SystemVerilog for the whole coprocessor
(`rtl/`), self-checking testbenches for every unit and for the complete core
(`tb/`), and behavioural models of the parts that are not digital logic: the
photonic core with its converters, and the host's memory.

## Architecture

```
          RoCC cmd/resp                               DAC  ->  photonic core
 Rocket  <-------------->  fiona_v                    ADC  <-  (MRR / MZI / FIR)
  core                      |  decode + sequencer          ^
                            |-- vrf       32 x 32 x 16b    |
                            |-- cfg_regs  STRIDE VLEN VMASK MAT
                            |-- ealu      ADD/SUB .V/.VS   |
                            |-- misc_unit SHUFFLE MAX MIN  |
                            |-- nlu       PReLU tanh sigmoid
                            |-- mdu       MUL.VS DIV.VS    |
                            |-- puc  --------------------- +  photonic-ALU controller
                            `-- lsu  <----> L1 data cache (element requests)
```

| Module | Role |
|---|---|
| `fiona_v` | Top. Accepts one RoCC command at a time, decodes it, runs the unit it needs, writes the destination vector register or returns a scalar response. Holds the performance counters. |
| `vrf` | 32 vector registers of 32 signed 16-bit elements; `v0` always reads zero. Two whole-vector read ports, one write port with a per-element mask. |
| `cfg_regs` | The custom registers: `STRIDE`, `VLEN`, `VMASK` (32 x 32 bits) and `MAT` (32 x 32 x 16-bit weights for the MZI mesh). |
| `ealu` | Element-wise add/subtract, vector-vector and vector-scalar, all lanes in one cycle. |
| `misc_unit` | `SHUFFLE.V` (gather by index vector) and the `MAX.V`/`MIN.V` reductions. |
| `nlu` | Activations: PReLU with a scalar slope, sigmoid and tanh by piecewise-linear approximation. |
| `mdu` | Vector-by-scalar multiply and divide, one element at a time (one multiplier, one divider). |
| `lsu` | Strided vector load/store and the MAT fill, one 16-bit element per memory request. |
| `puc` | Photonic-ALU controller: ships operands to the DAC side, waits for the ADC result, returns it. |
| `fiona_pkg` | Sizes, instruction codes, bus structs and operation enums shared by all of the above. |

## Instruction set

Instructions use the RoCC format: `[31:25]` funct7, `[24:20]` rs2,
`[19:15]` rs1, `[14]` xd, `[13]` xs1, `[12]` xs2, `[11:7]` rd, `[6:0]`
opcode (any custom opcode; FIONA-V does not look at it). Where xs1/xs2 are set,
the host sends the value of that scalar register as `rs1`/`rs2` with the
command; otherwise the rs1/rs2 fields name vector registers VS1/VS2. rd names
the destination vector register, or, with xd = 1, the scalar register that the
response writes.

| funct7 | Mnemonic | Operands (rs2, rs1, xd xs1 xs2, rd) | Effect, for i < VLEN |
|---|---|---|---|
| 41h | DotProd | VS2, VS1, 1 0 0, RD | RD = sum VS1[i]*VS2[i] (microring bank) |
| 42h | MVMul | -, VS1, 0 0 0, VD | VD = MAT @ VS1 (MZI mesh) |
| 43h | Conv1D | VS2, VS1, 0 0 0, VD | VD[i] = sum_k VS2[k]*VS1[i-k] (FIR) |
| 01h | ADD.V | VS2, VS1, 0 0 0, VD | VD[i] = VS1[i] + VS2[i] |
| 02h | SUB.V | VS2, VS1, 0 0 0, VD | VD[i] = VS1[i] - VS2[i] |
| 03h | ADD.VS | RS2, VS1, 0 0 1, VD | VD[i] = VS1[i] + RS2 |
| 04h | SUB.VS | RS2, VS1, 0 0 1, VD | VD[i] = VS1[i] - RS2 |
| 05h | MUL.VS | RS2, VS1, 0 0 1, VD | VD[i] = VS1[i] * RS2 |
| 06h | DIV.VS | RS2, VS1, 0 0 1, VD | VD[i] = VS1[i] / RS2 |
| 0Ah | SHUFFLE.V | VS2, VS1, 0 0 0, VD | VD[i] = VS1[VS2[i]] |
| 0Bh | MAX.V | 0, VS1, 1 0 0, RD | RD = max VS1[i] |
| 0Bh | MIN.V | 1, VS1, 1 0 0, RD | RD = min VS1[i] |
| 0Fh | PRELU.V | RS2, VS1, 0 0 1, VD | VD[i] = VS1[i] >= 0 ? VS1[i] : RS2*VS1[i] |
| 0Fh | TANH.V | 1, VS1, 0 0 0, VD | VD[i] = tanh(VS1[i]) |
| 0Fh | SIGMOID.V | 2, VS1, 0 0 0, VD | VD[i] = sigmoid(VS1[i]) |
| 10h | LOAD.V | -, RS1, 0 1 0, VD | VD[i] = Mem[RS1 + i*STRIDE] |
| 11h | STORE.V | VS2, RS1, 0 1 0, - | Mem[RS1 + i*STRIDE] = VS2[i] |
| 18h | SET.R | -, RS1, 0 1 0, rd=0 | STRIDE = RS1 |
| 18h | SET.R | -, RS1, 0 1 0, rd=1 | VLEN = RS1 |
| 18h | SET.R | RS2, RS1, 0 1 1, rd=2 | VMASK[RS2] = RS1 |
| 18h | SET.R | RS2, RS1, 0 1 1, rd=3 | MAT[RS2+i] = Mem[RS1+i] |

The funct7 values, operand kinds and effects are the published LightRocket
instruction set. The rd codes 0-3 that pick the SET.R target are this design's
own; change `SETR_*` in `fiona_pkg` if your assembler uses others. An
unknown instruction does nothing and, if xd = 1, returns 0 so that the host
never waits forever.

### Vector length and the inactive lanes

Every instruction works on elements 0 .. VLEN-1. VLEN is stored as written
(32 bits); the units see `min(VLEN, 32)`. Lanes at or beyond VLEN of a
destination register keep their old value, and `puc` forces them to zero
before they reach the DAC, so a short vector loaded into a fresh register
behaves as zero-padded in every photonic operation. This is what lets host
software run a 4-input or 10-input layer on the 32-lane hardware without
clearing registers first.

### Number format

Elements are signed 16-bit fixed point with 8 fraction bits (Q8.8, `FV_FRAC`
in the package, `FRAC` parameter on the units). Addition and subtraction wrap.
`MUL.VS` keeps `(a*s) >>> 8`; `DIV.VS` computes `(a << 8) / s` rounded toward
zero, and returns all ones when s = 0. PReLU's slope is Q8.8 as well. Scalars
sent with a command are used through their low 16 bits. Photonic results come
back as 16-bit ADC samples; DotProd sign-extends ADC lane 0 to 32 bits.

### Activations

`nlu` evaluates sigmoid with the four-segment PLAN approximation, which needs
only shifts, adds and compares (|x| below 1, below 2.375, below 5, above), with
sigmoid(-x) = 1 - sigmoid(x). tanh reuses it: tanh(x) = 2*sigmoid(2x) - 1. The
largest error against the exact functions is about 0.02 for sigmoid and 0.04
for tanh in Q8.8. If a model needs better accuracy, a lookup table can replace
`sigmoid_plan` without touching anything else.

## Timing

One instruction is in flight at a time. `cmd_ready` is high only when the core
is idle; `busy` is high from acceptance until the instruction has finished and
its response, if any, has been taken.

| Instruction class | Cycles from acceptance until the next command can be accepted |
|---|---|
| ADD/SUB, SHUFFLE, PReLU/tanh/sigmoid, SET.R (not MAT) | 2 |
| MUL.VS | VLEN + 3 |
| DIV.VS | VLEN * 25 + 3 (a 24-step restoring divide plus one cycle per element) |
| LOAD.V, SET.R MAT | about 2 per element with a one-cycle memory, more with stalls |
| STORE.V | about 1 per element with a memory that never stalls |
| DotProd, MVMul, Conv1D | analogue latency + 5, with a DAC side that is always ready |

Instructions with xd = 1 then wait in the response state until `resp_ready`.
The response holds still while it waits (checked by an assertion in `fiona_v`).

## Interfaces of the top

* **RoCC**: `cmd_valid/cmd_ready/cmd` (`rocc_cmd_t`: instruction word, rs1 and
  rs2 values), `resp_valid/resp_ready/resp` (`rocc_resp_t`: rd and 32-bit data),
  `busy`.
* **Memory** (toward the host's L1 data cache): `mem_req_valid/mem_req_ready`,
  `mem_req` (`mem_req_t`: element address, write flag, 16-bit data),
  `mem_resp_valid/mem_resp_rdata` for reads, answered in order, one request
  outstanding. Addresses count 16-bit elements, not bytes. A wrapper that
  scales them to bytes is needed in front of a byte-addressed cache.
* **Photonic core**: `dac_valid/dac_ready` with `dac_op` (`pop_e`), `dac_a`,
  `dac_b` (32 lanes each) and `dac_mat` (the full 32 x 32 weight matrix), and
  `adc_valid/adc_data` (32 lanes). The converters, the optics and their timing
  lie outside this RTL; any latency works.
* **VMASK**: the 32 x 32-bit register is written by SET.R and brought out as
  `vmask`. No unit inside FIONA-V reads it.
* **Performance counters**: `perf_pops`, `perf_eops`, `perf_mem` count busy
  cycles spent in photonic operations, electronic operations and memory
  transfers (SET.R MAT counts as memory). `perf_insts` counts completed
  instructions. These give the per-class cycle breakdown used to profile
  networks.

## Sizes

All sizes are parameters of `fiona_v` with these defaults: 32 vector registers
(`NVREG`), 32 elements (`NELEM`) of 16 bits (`EW`), 32 VMASK groups, a 32 x 32
MAT, 8 fraction bits. The element count and MAT size must be powers of two,
with `NELEM` equal to `MATN` if MVMul is used. The register file and MAT are
plain flip-flop arrays; `vrf` is written as a memory array so synthesis may map
it to RAM.

## Verification

Each module has a self-checking testbench that computes its expected results
independently of the RTL. Each run prints `TB_RESULT checks=N failures=M`.

| Testbench | What it does |
|---|---|
| `tb_vrf` | 2000 random masked writes mirrored in a model, both read ports compared every cycle, v0 stays zero. |
| `tb_cfg_regs` | Reset values, random register writes, VLEN clamp. |
| `tb_ealu`, `tb_misc_unit` | Random operands, all operations and lengths 0..32. |
| `tb_nlu` | Sigmoid and tanh over all 65,536 inputs against `$exp`/`$tanh` (tolerance 0.025 / 0.045, monotonic), PReLU exactly. |
| `tb_mdu` | Fixed-point products and quotients against 64-bit arithmetic, divide by zero, exact cycle counts. |
| `tb_lsu` | Strided loads, stores and MAT fills against a memory that stalls at random, then exact cycle counts against one that never stalls. |
| `tb_puc` | Operand masking, matrix pass-through, results and the `latency + 3` cycle count through the photonic model. |
| `tb_fiona_v` | The full core at default size: about 3000 random instructions of every kind, with random memory, DAC and response stalls, against an instruction-level model of the ISA. Checks every scalar response and the MAT presented to the optics, and compares all used registers and memory by storing them out. Checks that ADD.V can issue every 2 cycles. It also counts that each instruction and each event (stalls, back-pressure, VLEN above and below 32, writes to v0, divide by zero, unknown instruction) happened at least once. |
| `tb_mlp_iris` | An Iris-sized MLP (4-10-3, batch 32), with every matrix product done as DotProd instructions, the bias added by ADD.VS and ReLU by PRELU.V. Checks the hidden activations and the per-sample maximum logit, and prints the pOps/eOps/Mem cycle split. |
| `tb_zoo_iris` | Gradient-free (zeroth-order) training of the same MLP's 70 weights: per step, w + u and w - u are formed with ADD.V/SUB.V, each is scored by a full forward pass on the core, and the best of the three is kept. Checks every candidate vector, hidden value and logit exactly, and that the loss does not rise. |
| `tb_mnist_tiled` | One MNIST-sized layer (784 inputs, 16 outputs, batch 2) tiled into 25 DotProd operations per output, the last at VLEN 16, with the partial sums added by the host; random memory and DAC stalls. Checks every partial sum and output. |
| `tb_conv2d_tiled` | A 3 x 3 convolution (8 x 8 input, four kernels) mapped onto DotProd: each 3 x 3 patch is gathered on the core with ADD.VS (index offset) and SHUFFLE.V, then one DotProd per kernel; ReLU by PRELU.V. Checks all 144 outputs before and after ReLU. |

`tb/mem_model.sv` and `tb/photonic_model.sv` are behavioural, non-synthesizable
models. The photonic model does exact fixed-point arithmetic with saturation
to the 16-bit ADC range and a fixed latency. It does not model optical noise,
thermal drift or converter resolution, so the accuracy of real hardware is not
covered.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -j 0 --top-module tb_fiona_v \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fiona_pkg.sv tb/tb_fiona_v.sv
./obj_dir/Vtb_fiona_v
```

`-Wno-fatal` is needed because the testbenches mix 32- and 64-bit
arithmetic (time stamps, 64-bit reference sums) and Verilator warns about
that by default. The RTL builds without width warnings.
Replace the top module and file to run another testbench. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/fiona_pkg.sv rtl/<module>.sv`.

## What is specified and what was chosen here

The published LightRocket description fixes the partitioning (Rocket core +
FIONA-V over RoCC, with a PUC driving the photonic core through a DAC and ADC).
It also fixes the register sizes, the instruction list with its funct7 codes,
operand kinds and effects, and the unit list (register file, configuration
registers, ALU, activation, MDU, LSU, PUC). Everything below is this design's
own choice, made where that description stops:

* the Q8.8 number format, wrap-around arithmetic and the divide-by-zero result;
* the SET.R target codes, MIN/MAX and NLU sub-codes taken from the rs2 field
  and the xs2 bit, and ignoring the opcode field;
* leaving inactive lanes unchanged and clamping VLEN at 32;
* element addressing of memory, one outstanding request, and the valid/ready
  handshakes toward memory and the DAC;
* the PLAN approximation for sigmoid and tanh;
* the element-serial MDU and the lane-parallel ALU, activation and MISC units;
* the causal reading of Conv1D, which is done by the optics, not by this RTL;
* the exact definition of the performance counters.

Not included: the Rocket core, caches, bus and DRAM, the DAC/ADC boards and
the photonic devices themselves. The toolchain's other library units (pooling,
normalisation, optical delay lines) are not in this instruction set either.

### Where this RTL departs from the published prototype

* The published FPGA build reports block RAM in the PUC (7.5 blocks) and the
  register file (15), and DSP slices in the activation unit (4) and the MDU
  (2). Here the PUC holds its operands and result in flip-flops with no
  buffer RAM, the activation unit has one PReLU multiplier per lane (32, not
  4), and the MDU has one multiplier and a bit-serial divider. The relative
  sizes of the units therefore differ from the published breakdown.
* The prototype's photonic chip is a microring weight bank that performs only
  DotProd; MVMul and Conv1D are decomposed onto it. This RTL still sends all
  three operations to the photonic side with an operation code (`dac_op`) and
  leaves it to the optics (or a model) to support them.
* The published software stack builds tiled matrix products, linear layers,
  convolutions and attention from DotProd, SET.R VLEN and LOAD/STORE on the
  host. Those libraries are software and are not part of this RTL; only the
  instruction set they use is.
