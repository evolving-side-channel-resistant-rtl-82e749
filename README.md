# Reconfigurable ECC core built from evolved combinational circuits

This is a register-transfer model of an elliptic-curve cryptography (ECC) core. The point
operations are not designed by hand. A genetic algorithm evolves them offline as plain
combinational gate arrays. The core holds several functionally equivalent versions of each
circuit and swaps them at run time. The aim is side-channel resistance:

- a combinational circuit has no registers or clocked stages whose activity an attacker could
  line up with a power trace;
- switching between equivalent but structurally different circuits changes the physical
  circuit that computes an operation, while the result stays the same.

The architecture follows the paper "Evolving Side-Channel Resistant Reconfigurable Hardware
for Elliptic Curve Cryptography". It has three partitions: point addition (PA), point doubling
(PD) and point (scalar) multiplication (PM). A reconfiguration manager contains a
configuration memory, a configuration engine and an ICAP interface. An FSM, the "ECC core
logic", runs the commands. On the FPGA, each version is a separate netlist, and dynamic
partial reconfiguration (DPR) loads it through the device's internal configuration access
port (ICAP). This RTL models DPR differently: each partition is a gate array whose structure
is set by a configuration register. Loading a version therefore means writing that register.
The bitstream of a version is simply its chromosome.

The curve the paper uses as its example is y² = x³ + 4x + 20 over Z₂₉.

## The evolved gate array and its chromosome

Everything else in the design exists to feed and swap these arrays, so this part comes first.

An evolved circuit (`evo_circuit`) has **N levels of M gates**. Each gate is one of eight types,
coded in 3 bits (`ecc_evo_pkg::gate_e`):

| code | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|------|---|---|---|---|---|---|---|---|
| gate | NOT | AND | OR | XOR | NAND | NOR | XNOR | WIRE |

NOT and WIRE have one input and use the first input (IP1). In the paper's cost model the gate
sizes are 1/2/2/3/1/1/3/1 gate equivalents and the delays 0.0625–0.216 ns. The GA used these
numbers for its fitness function; the RTL does not.

- **Level 0** is the input interface. Gate *r* takes the fixed input pair `in_bits[2r]` (IP1) and
  `in_bits[2r+1]` (IP2).
- **Levels 1 … N−1.** Each gate takes its two inputs from any two outputs of the level before.
  The outputs are chosen by two indices of IW = ⌈log₂M⌉ bits each.
- **Outputs.** The M outputs of level N−1 are the circuit's outputs.

There is no other routing: no skip connections and no feedback. The chromosome of one row is:

```
[GATE_ID(L0)] [IP1 IP2 GATE_ID (L1)] [IP1 IP2 GATE_ID (L2)] ... [IP1 IP2 GATE_ID (L N-1)]
```

Chromosome length = M·(3 + (N−1)·(2·IW + 3)). The RTL packs row *r* at `chrom[r*ROW +: ROW]`,
fields lowest bits first, in the order shown. An index of M or more selects no gate and
reads as 0.

The configuration size "A×B" in the paper means **A gates per level (M) by B levels (N)**. This
is the reading that reproduces its chromosome lengths:

| points | M × N | chromosome | words of 32 bits |
|-------|-------|------------|------------------|
| 3-bit (default) | 10 × 10 | 1020 | 32 |
| 4-bit | 10 × 16 | 1680 | 53 |
| 6-bit | 20 × 10 | 2400 | 75 |
| 8-bit | 20 × 16 | 3960 | 124 |

The "n-bit" label names a subset of curve points (a group of points with small coordinates),
not the coordinate width. The published 10×10 circuit carries 5-bit coordinates, enough for
Z₂₉.

### How points enter and leave the array

The pin labels of the published 10×10 circuit set the packing (`ecc_core_logic`). With
C = M/2 bits per coordinate:

- gate *r* < C of level 0 receives (a.x[r], a.y[r]);
- gate C+*r* receives (b.x[r], b.y[r]);
- output *r* < C is x[r], and output C+*r* is y[r].

Each operation uses the two operands as follows:

- **PA**: the two points are a and b.
- **PD**: the point is a; b is driven as zero.
- **PM**: a is the base point; b carries the scalar as k = {b.y, b.x} (2C = 10 bits at the
  default).

## Reconfiguration: memory → engine → ICAP interface → partition

- **`config_memory`** holds NUM_OPS × NUM_VERSIONS = 3 × 4 bitstreams. The versions are
  V1..V4; `ver` 0..3 stands for V1..V4. Bitstream (op, ver) starts at word
  `(op*4 + ver)*WPB`, and word *w* carries chromosome bits [32w+31 : 32w]. A host fills the
  memory through a write port. The engine reads it with one cycle of latency.
- **`config_engine`** takes a request (operation, version) from the core logic. It remembers
  which version each partition holds. If the partition already holds the requested version,
  it answers `done` + `skipped` in the same cycle. Otherwise it streams the WPB words out,
  and `done` comes WPB+2 cycles after the request (34 cycles at the default).
- **`icap_if`** registers each word and writes it into the target partition. It holds that
  partition's `decouple` line high from the first word until the cycle after the last word has
  landed. It raises a sticky `cfg_error` if a load ends with a word count other than WPB, or
  uses an index outside the bitstream.
- **`evo_slot`** is a partition: the configuration register plus an `evo_circuit`. While
  decoupled, its outputs read zero, so no half-written circuit is ever seen.

## The ECC core logic

`ecc_core_logic` accepts one command at a time (valid/ready) and works through
IDLE → REQ → (WAIT) → EVAL → RESP.

1. It picks a version: the command's `cmd_ver`, or, with `rotate_en`, the next one of a
   round-robin counter kept per operation. Rotation makes consecutive operations of one kind
   run on different circuits.
2. It requests that version and stalls in WAIT while a load is in progress.
3. It waits until the partition is coupled again. It then drives the operands into that
   partition only, for `EVAL_CYCLES` cycles (the other partitions see zeros).
4. It registers the result and shows it on `rsp_*` for one cycle, together with the operation
   and the version that produced it.

Latency at the defaults, counted from the cycle a command is accepted to the cycle
`rsp_valid` is high:

- **3 cycles** (2 + EVAL_CYCLES) when the partition already holds the version;
- **38 cycles** (WPB + 5 + EVAL_CYCLES) when the version must be loaded.

The latency does not depend on the operation or on the operands. Only a change of version
adds time, and the host decides when that happens.

`EVAL_CYCLES` is the settling time given to the combinational path. The paper reports
1.565–1.610 ns for its 10×10 circuits, so one cycle is ample at typical FPGA clock rates.

## How far to trust it, and where it departs from the paper

- **No real ECC circuits are included.** The paper prints a single evolved netlist: a 10×10
  point-addition circuit. The testbenches encode it as a chromosome, and the core runs it as
  version V1 of PA.
  - Under this RTL's encoding, that netlist does not compute point addition on the curve. The
    encoding choices are: the upper input of each drawn gate is IP1; one-input gates use IP1;
    coordinate bit 0 is on row 0.
  - The other seven combinations of these choices were also tried, and none computes point
    addition either.
  - The netlist is therefore checked gate for gate, not as ECC arithmetic. No evolved PD or
    PM circuits are published.
  - To use the core for real, load chromosomes evolved for this encoding.
- **DPR is modelled, not implemented.** A real Kintex-7 flow would load a partial bitstream
  per version through the ICAPE2 primitive. Here the partition is a programmable gate array,
  and "reconfiguring" it rewrites its configuration register. This keeps the behaviour:
  versions, load time, decoupling, equivalence of function. But the physical property the
  paper relies on, a fixed netlist with no storage in the operation path, is lost. Each
  partition has 1024 configuration flip-flops, and its inputs select gates through
  multiplexers.
- **This design's own choices.** The paper gives none of the following:
  - the gate codes and the chromosome bit placement;
  - the out-of-range index rule and the input used by one-input gates;
  - the 32-bit word width, the host load port and the request/done handshake;
  - skipping a load that is not needed, decoupling, and the error check;
  - the version-rotation policy, the operand packing for PD and PM, reset (asynchronous,
    active low) and all cycle counts.
- **Version switching for another purpose.** The paper also suggests switching circuits to
  cover different groups of curve points, one circuit per group. The core supports this
  through `cmd_ver` with `rotate_en` low. Choosing the group for a point is left to the host.
- **Not included.** The genetic algorithm itself, which is software, and the ICAP primitive.

## Files

| file | contents |
|------|----------|
| `rtl/ecc_evo_pkg.sv` | gate and operation enums, configuration word struct, chromosome size functions |
| `rtl/evo_gate.sv` | one gate, 8 types |
| `rtl/evo_circuit.sv` | N×M chromosome-configured combinational array |
| `rtl/evo_slot.sv` | reconfigurable partition: configuration register + array + decoupling |
| `rtl/config_memory.sv` | bitstream memory, 12 versions |
| `rtl/config_engine.sv` | request handling and memory-to-ICAP streaming |
| `rtl/icap_if.sv` | word writes into partitions, decoupling, load check |
| `rtl/reconfig_manager.sv` | memory + engine + ICAP interface |
| `rtl/ecc_core_logic.sv` | command FSM, version choice, operand packing |
| `rtl/ecc_evo_top.sv` | top level: core logic, manager, PA/PD/PM partitions |
| `tb/tb_ref_pkg.sv` | reference chromosome evaluator, published 10×10 netlist, random chromosomes |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_evo_configs.sv` | the four published sizes: chromosome lengths and behaviour of the array |
| `tb/tb_ecc_evo_sizes.sv` | the whole core at 10×16, 20×10 and 20×16 |

`tb_ecc_evo_top` runs the whole core at its default size. It loads 12 bitstreams and runs about
50 commands with fixed and rotating versions. Every result is checked against the reference
evaluator, and so is every latency. It also counts each mechanism: host load,
reconfiguration, skipped load, stall, rotation, and each of PA, PD and PM. It fails if any of
them never occurs.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and ends with `$finish`. With Verilator 5,
from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ecc_evo_pkg.sv tb/tb_ref_pkg.sv tb/tb_ecc_evo_top.sv --top-module tb_ecc_evo_top
./obj_dir/Vtb_ecc_evo_top
```

Replace `tb_ecc_evo_top` with any other testbench name. Every run takes well under a second.

## Changing it

- **Size.** Set `M` and `N` on `ecc_evo_top`; every width follows. Use `M` even: half the rows
  carry x, half y. The word index is 8 bits, which covers bitstreams of up to 256 words.
- **Number of versions.** `NUM_VERSIONS` and `VER_W` in the package.
- **Gate set or codes.** `gate_e` and `evo_gate`. Keep `tb_ref_pkg::apply` in step.
- **A different chromosome layout** (for a GA that writes another format) is confined to
  `evo_circuit` and `tb_ref_pkg`.
