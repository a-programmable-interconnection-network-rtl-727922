# A run-time programmable interconnect for a fixed set of communication patterns

A small multiprocessor system-on-chip with at most a dozen or so processing
elements (PEs) is too small to need a network-on-chip. A full crossbar still
costs too much: one multiplexer and one arbiter for every output, plus
N·log2(N) control bits. Many embedded applications follow the bulk-synchronous
model, alternating computation steps with communication steps, and they use
only a handful of fixed communication patterns: a broadcast, a cyclic shift,
the steps of a gather. This design supports exactly those patterns and nothing
else.

Under a given pattern, the input bit of every PE is a fixed function of the
output bits of all PEs. The whole network is therefore one combinational
function. Its inputs are the PE output bits plus a few configuration bits that
name the pattern. There are no routers, no arbiters and no contention. The
controlling PE reprograms the network with one store into a *pattern register*.
That function can be built in three ways, and all three are provided:

* a multiplexer for each PE input, with one data input per pattern and all
  select lines shared;
* a single ROM addressed by the configuration bits and all PE output bits;
* a cascade of two smaller look-up tables (LUTs), obtained by cutting the
  function's decision diagram into two parts.

The same LUT technique is also applied to a second, smaller switch: the 4-input
**bit-masking and shifting (BMS)** unit. It is built as a single table and as a
two-LUT cascade.

This RTL follows the network and BMS examples of V. Dvořák and J. Jaroš, *A
Programmable Interconnection Network for Multiple Communication Patterns*
(FIT BUT, Brno). Where that description is silent, this implementation makes
its own choices. Each choice is listed under "Choices made here" below.

## The example network: 8 PEs, 7 patterns

Each PE has one unidirectional, one-bit link into the network (`pe_out[i]`)
and one out of it (`pe_in[i]`). A longer message is sent bit-serially, one bit
per clock. The 3-bit pattern code selects one of these patterns:

| code | pattern            | routing (source → destination)                |
|------|--------------------|-----------------------------------------------|
| 0    | idle               | no PE input driven                            |
| 1    | broadcast from 0   | 0 → 1..7                                      |
| 2    | cyclic shift by 1  | i → (i+1) mod 8                               |
| 3    | cyclic shift by 2  | i → (i+2) mod 8                               |
| 4    | skew               | i → 7−i (0↔7, 1↔6, 2↔5, 3↔4)                  |
| 5    | gather1            | 7→6, 5→4, 3→2, 1→0                            |
| 6    | gather2            | 6→4, 2→0                                      |
| 7    | gather3            | 4→0                                           |

A PE input that the current pattern does not drive reads 0. Patterns 5, 6 and 7
applied in sequence form a three-step binary-tree gather towards PE 0. The
table is held in `pin_pkg` as `src_of(cfg, dst)`, and `route(cfg, pe_out)`
applies it. All three network builds, and the contents of every ROM, are
derived from this one function. To support a different application, edit
`src_of` and, for the cascade, the encoding described next.

## The two-LUT cascade (`pnoc_cascade`)

The single ROM (`pnoc_rom`) has 11 address bits (3 configuration bits and 8 PE
output bits) and an 8-bit word, for 2048 × 8 = 16 Kbit. The cascade splits this
into two memories:

```
 cfg[2:0] ──┐
 out0,out6, ├─► LUT1 512×8 ──mid[7:0]──► LUT2 1024×8 ──► pe_in[7:0]
 out2,out5, │                              ▲
 out4,out3 ─┘                        out1, out7
```

Together the two memories hold 12 Kbit. The split works because, once the
pattern and six of the eight PE outputs are known, only a small number of
different functions of the last two outputs (out1, out7) can remain. LUT1
computes which of those functions remains and encodes it as the 8-bit
intermediate code `mid`. LUT2 then evaluates that function on out1 and out7.
The inputs are split this way because, with out1 and out7 left for LUT2, the
remaining functions can be told apart in 8 bits.

This implementation encodes `mid` as follows:

| `mid[7:6]` | meaning                        | `mid[5:0]`                                              |
|------------|--------------------------------|---------------------------------------------------------|
| `01`       | shift by 1                     | `{out0,out6,out2,out5,out4,out3}` passed through        |
| `10`       | shift by 2                     | same                                                    |
| `11`       | skew                           | same                                                    |
| `00`       | any other pattern              | `{code[2:0], 0, d1, d0}`                                |

Here `d1`, `d0` are the at most two of the six outputs that the pattern still
needs:

* broadcast: `d0` = out0;
* gather1: out5 and out3;
* gather2: out6 and out2;
* gather3: `d0` = out4.

205 of the 256 codes occur. The three patterns that move all eight bits
(the two shifts and the skew) need all six data bits and two class bits. Every
other pattern fits into class `00`, because it uses at most two of the six
LUT1 inputs. LUT2 rebuilds the vector of PE outputs from `mid`, out1 and out7
and applies `route`. The cascade therefore matches the single ROM bit for bit,
and the testbench checks this exhaustively.

## The bit-masking and shifting unit

A BMS unit takes a mask `m` and data `x`, each N bits wide. The data bits whose
mask bit is 1 move, in index order, to the lowest positions of `y`; the other
bits of `y` are 0. For example, with `m = 1010` and `x = 1010` (bits 3..0), y is
`0011`.

In a micro-programmed controller, `y` serves as the offset into a multi-way
dispatch table. A 16-way table with only some conditions relevant can then be
stored compactly.

* `bms_lut` holds the whole function in one 2^(2N) × N table, addressed by
  `{m, x}`. For N = 4 that is 256 × 4. N may be set from 1 to 8; sizes 4, 6, 7
  and 8 are tested.
* `bms4_cascade` splits BMS4 in the variable order m3, x3, m2, x2, m1 | x1, m0,
  x0. Scanning from the highest index down, each selected bit is shifted in at
  the bottom of a growing vector. After m3..m1, only 8 situations remain:
  * the (at most two) bits collected from indices 3 and 2;
  * whether index 1 is selected.

  LUT1 (32 × 3, address `{m3,x3,m2,x2,m1}`) produces the 3-bit code
  `{p1, p0, m1}`. LUT2 (64 × 4, address `{code, x1, m0, x0}`) finishes the
  scan. The cascade holds 352 bits, against 1024 for the single table.

## Programming, timing and pipelining

`pattern_reg` holds the pattern code. A store (`we` with `wdata`) is taken on
the next rising edge, and the network switches pattern from that edge. A
reconfiguration therefore costs one store instruction and one cycle, not a
reload of FPGA configuration memory. Reset (asynchronous, active low) selects
code 0, which is idle. `changes` counts the stores that actually changed the
pattern.

Every network and BMS module has a `PIPELINE` parameter:

| build                | `PIPELINE = 0`        | `PIPELINE = 1` latency |
|----------------------|-----------------------|------------------------|
| `pnoc_mux`           | combinational         | 1 cycle (output reg.)  |
| `pnoc_rom`, `bms_lut`| asynchronous ROM read | 1 cycle (sync. read)   |
| `pnoc_cascade`, `bms4_cascade` | combinational | 2 cycles            |

With pipelining, the inputs that bypass the first LUT (out1/out7, or x1/m0/x0)
are delayed by one register. They then meet the registered intermediate code,
so a bit-serial message still streams through at one bit per PE per cycle. In
the cost model of a bulk-synchronous communication step, T = h·g + l:

* g is one clock per bit;
* l is one cycle for the store plus the pipeline latency (0, 1 or 2 cycles).

A new pattern applies to the bits sent from the cycle after the store on.
Bits already inside a pipelined build finish under the pattern they entered
with. In the cascade, the pattern travels inside `mid`, so no pipeline flush is
needed between communication steps.

## Top level (`pin_top`)

`pin_top` contains the pattern register and one interconnect build, plus the
BMS4 unit as an independent block with its own ports:

* `NOC_IMPL` chooses the interconnect: `NOC_MUX`, `NOC_ROM` or `NOC_CASCADE`
  (the default).
* `BMS_IMPL` chooses the BMS unit: `BMS_SINGLE_LUT` or `BMS_CASCADE` (the
  default).
* `PIPELINE` is passed to both.

The processing elements themselves are outside this design. They connect to
`pe_out`/`pe_in` and `cfg_we`/`cfg_wdata`.

## Files

| file                         | content                                                   |
|------------------------------|-----------------------------------------------------------|
| `rtl/pin_pkg.sv`             | constants, pattern and implementation enums, `src_of`, `route`, `bms` |
| `rtl/pattern_reg.sv`         | pattern holding register                                  |
| `rtl/pnoc_mux.sv`            | multiplexer network with common control                   |
| `rtl/pnoc_rom.sv`            | single 2048 × 8 ROM network                               |
| `rtl/pnoc_cascade.sv`        | 512 × 8 + 1024 × 8 LUT cascade network                    |
| `rtl/bms_lut.sv`             | single-table BMS, N inputs                                |
| `rtl/bms4_cascade.sv`        | two-LUT BMS4                                              |
| `rtl/pin_top.sv`             | top level                                                 |
| `tb/pin_ref_pkg.sv`          | independent reference models for the testbenches          |
| `tb/*_tb.sv`                 | one self-checking testbench per module, plus `pin_top_full_tb` |

All tables are computed in `initial` blocks from the functions above; there
are no data files. Synthesis tools that accept initialised memories will infer
ROMs or block RAMs from these tables.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing -y rtl -y tb --top-module pin_top_tb \
    rtl/pin_pkg.sv tb/pin_ref_pkg.sv tb/pin_top_tb.sv
./obj_dir/Vpin_top_tb
```

Replace `pin_top_tb` with any other testbench name. What each testbench covers:

* **Block testbenches.** Each one checks its module exhaustively over all input
  combinations (for BMS8, 65,536 of them) against models in `pin_ref_pkg`. These
  models are written out pattern by pattern and are separate from the RTL's own
  table functions.
* **Pipelined copies.** Each block testbench also streams random inputs every
  cycle through a pipelined copy. It checks the result at exactly the stated
  latency.
* **`pin_top_tb`.** This runs 40 communication supersteps on three builds of the
  top side by side. In each step the pattern is stored, then every PE sends a
  16-bit message bit by bit. The words each PE receives are compared with the
  message of its source PE. The testbench counts stores of each code, stores
  that left the pattern unchanged, pipelined streams and BMS masks. It fails if
  any of them never happens.
* **`pin_top_full_tb`.** This runs the top with all parameters at their
  defaults. It sends a 32-bit message under every pattern, then applies all
  BMS4 inputs.

## Choices made here

These are not fixed by the original description:

* **Pattern codes.** Pattern k of the list uses code k, and the spare code 0 is
  idle.
* **Undriven inputs.** An undriven PE input reads 0.
* **Broadcast.** The broadcast from PE 0 does not loop back to PE 0.
* **Cascade encoding.** The intermediate code of the network cascade is this
  implementation's own. So is the assignment of PE outputs to LUT1 address bits
  (in the listed order 0, 6, 2, 5, 4, 3, most significant first).
* **BMS cascade code.** The 3-bit code of the BMS cascade is the partial vector
  plus m1. It is not the node numbering of a particular decision diagram.
* **Address order.** The ROM address order is `{cfg, pe_out}` for the network
  and `{m, x}` for the BMS tables.
* **Pipelining.** The `PIPELINE` option and its latencies are this
  implementation's own. The default is combinational.
* **Pattern register.** It has a single write port, an asynchronous reset to
  idle, and a 16-bit change counter.
* **Multiplexer width.** The multiplexers have 8 inputs: 7 patterns and idle.

## Not included

* **Crossbar and multiplexer network.** The conventional arbitrated crossbar and
  the multiplexer network for BMS4 are only comparison points for this design.
  They are not included.
* **Larger tables.** Decision-diagram cuts for BMS6–BMS8 and for the larger
  16-PE, 32-pattern network are not given, so no cascade is provided for them.
  `bms_lut` covers BMS6–BMS8 as single tables.
* **PE-side logic.** Barrier synchronisation, the choice of which PE programs
  the pattern register, and any PE-side protocol are left outside the design.
