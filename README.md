# A data-driven, distributed-control DSP chip

This chip has no controller and no schedule. A set of functional units
(adders, multipliers, ...) share a few buses. Every datum travels as a
**token**: the data word plus a **tag** that names the operation that
produced it. A unit fires an operation as soon as both operands have
arrived and the unit is free. Its result goes onto the unit's bus as a new
token. Every unit whose decoders recognise the tag takes a copy. Control is
spread over the units: each one only has to know which tags it consumes and
which operation each pair belongs to.

The architecture was conceived for self-timed (asynchronous) circuits that
communicate by four-phase request/acknowledge handshakes. This RTL keeps
every one of those handshakes. It renders them as clocked logic, one clock
per handshake step, so the design can be simulated with Verilator and
synthesised with standard tools. The protocol and the block structure are
the architecture's. The gate-level self-timed timing is not modelled.

The RTL is generic. A concrete application is a set of tables in
`rtl/adsp_pkg.sv`. The example that ships with it computes a complex product
followed by a real gain, the kind of kernel an FFT chip is built around:

```
yr + j*yi = (ar + j*ai) * (br + j*bi)
zr = yr * g          zi = g * yi          (all in Q1.15)
```

It uses 13 logical operations, 4 functional units (two multipliers, a
subtractor, an adder), 2 buses, two input blocks and one output block.

## Block structure

```
 in_req/in_data/in_ack[i]                               out_req/out_data/out_ack[o]
        |                                                          ^
  +-------------+                                          +--------------+
  | input_block |  FIFO -> tagger -> token control          | output_block |  decoders -> slots -> FIFO
  +-------------+  x N_IBLK                                +--------------+  x N_OBLK
        | sender                                                   ^ receiver
  ======+====================== bus_network (NB token_bus) ========+======
        ^ sender          | receiver (all buses)
  +-----+------------------------------------------+
  | fu_node:  output_reg <- functional_unit <- matching_block |   x NF
  +-------------------------------------------------+
```

| Module | Role |
|---|---|
| `async_dsp_chip` | top: NF `fu_node`s, N_IBLK `input_block`s, N_OBLK `output_block`s, `bus_network`, set-completion join |
| `bus_network` | NB `token_bus`es; routes each sender's request to the bus it names |
| `token_bus` | one indirect-transfer bus with its arbiter |
| `bus_arbiter` | fair (round-robin) grant of one sender at a time |
| `fu_node` | `matching_block` + `functional_unit` + `output_reg` |
| `matching_block` | RF_A / RF_B register files, tag decoders, matching and priority |
| `functional_unit` | add, subtract or Q1.15 multiply, with data-dependent delay |
| `output_reg` | holds a result until the bus takes it, so the FU is freed early |
| `input_block` | input FIFO, tagging by arrival order, token control |
| `output_block` | collects results, strips tags, emits them in a fixed order |
| `fifo_buffer` | FIFO used by the input and output blocks |
| `adsp_pkg` | widths, token type, and the application tables |

## Tokens and tags

A token is `{tag, data}` (`adsp_pkg::token_t`): 4 + 16 bits in the example.
The tag names the *parent* of the datum, the operation that produced it.
It does not name the consumers. Three things follow from that choice:

* A result with several consumers is sent once. Each consumer's decoder
  recognises the same tag. For example, `ar` is needed by two multiplies
  and crosses bus 0 once.
* The number of distinct tags equals the number of operations, N_op. That
  count includes the *input operations*, i.e. the tagging of external
  words. The tag width is `ceil(log2 N_op)`: 13 operations give 4 bits.
* Because the mapping of operations to units is fixed, the tag alone tells
  a unit which register to load, which operation the datum belongs to, and
  what tag the result will carry. The result tag is the operation's own
  number.

The data width is 16 bits. Anything from 12 to 16 bits suits typical
real-time DSP. Change `W_D` in the package to resize.

## The application tables (how to map a different algorithm)

Everything application-specific is in `adsp_pkg`. The tables are indexed by
tag. An entry of -1 means "none".

| Table | Meaning |
|---|---|
| `CFG_OP_FU[t]` | functional unit executing operation t (-1 for input operations) |
| `CFG_SRC_A[t]`, `CFG_SRC_B[t]` | tag of the operand on port A / port B |
| `CFG_REG_A[t]`, `CFG_REG_B[t]` | register of the unit's RF_A / RF_B that holds that operand |
| `CFG_BUS_OF[t]` | bus that carries tag t: the producing unit's bus, or the bus the input block uses for it |
| `CFG_FU_KIND[f]`, `CFG_FU_BUS[f]` | function of unit f and the one bus its output drives |
| `CFG_IN_BLK[t]`, `CFG_IN_POS[t]` | input block (port) that receives input operation t, and its place in that port's word sequence |
| `CFG_OUT_BLK[t]`, `CFG_OUT_POS[t]` | output block (port) that emits operation t's result, and its place in that port's word sequence |

The example mapping:

| tag | op | unit | A (register) | B (register) | bus |
|---|---|---|---|---|---|
| 0..4 | ar ai br bi g | input | | | 0 1 0 1 0 |
| 5 | p1 = ar*br | MUL0 | ar (0) | br (0) | 0 |
| 6 | p2 = ai*bi | MUL1 | ai (0) | bi (0) | 1 |
| 7 | p3 = ar*bi | MUL0 | ar (1) | bi (1) | 0 |
| 8 | p4 = ai*br | MUL1 | ai (1) | br (1) | 1 |
| 9 | yr = p1-p2 | SUB | p1 (0) | p2 (0) | 0 |
| 10 | yi = p3+p4 | ADD | p3 (0) | p4 (0) | 1 |
| 11 | zr = yr*g | MUL0 | yr (0, shared with p1) | g (2) | 0 |
| 12 | zi = g*yi | MUL1 | g (2) | yi (1, shared with p4) | 1 |

Input port 0 takes ar then ai; input port 1 takes br, bi then g. The two
ports run independently. The single output port gives zr then zi.

To map a new algorithm you must supply:

* unique register indices per unit, except where sharing is legal (next
  section);
* every operation's operands, routed on the bus of their producer;
* `N_OP`, `NF`, `NB`, `N_IBLK` and `N_OBLK`, set to match.

## Matching block: the part that needs the most care

Operations that share a unit can have their operands arrive in any order.
Two things cause this: the algorithm itself, and the data-dependent delays
of the other units. The matching block makes sure the unit only ever sees a
correct pair.

* **One register per operand.** RF_A has one register for the port-A
  operand of each operation mapped to the unit, and RF_B the same for port
  B. A token on a bus can therefore always be stored at once, and a slow
  consumer never blocks the bus.
* **Decoders.** Each register watches the bus that carries its operand. It
  loads the token whose tag equals that operand's producer. One token can
  load several registers at the same time: `ar` fills both A registers of
  MUL0.
* **Shared registers.** Two registers of one file may be merged. This is
  legal when one of their data cannot exist before the other has been
  consumed. MUL0's A register 0 holds `ar` for p1 and later `yr` for zr. `yr`
  cannot exist until p1 has executed and emptied that register. Each
  register records which operation its current datum belongs to. An
  operation is ready only when *both* its registers are full *and* both are
  tagged with that operation.
* **Priority.** When several operations are ready together, the one with
  the lowest tag is forwarded first. In the example, the arrival of `ar`
  completes p1 and p3 at the same moment, so p1 goes first. The
  architecture leaves the priority scheme open; lowest-tag-first is this
  design's choice.
* **Output tag.** The forwarded operation's number travels with the
  operands through the FU and becomes the result token's tag.

A token whose target register is still full is *not* acknowledged until the
register frees. The original scheme assumes storage is always free. At the
default of one data set in flight this wait never happens. It is kept as a
safety net and is exercised by the matching-block testbench.

## Buses: the indirect transfer

Each bus is a small pipeline stage between two four-phase handshakes
(`token_bus`):

1. **Sender to bus.** The arbiter grants one requesting sender
   (round-robin, so nobody waits for more than N-1 others). The bus latches
   the token and acknowledges the sender at once. The sender (an FU's
   output register or the input block) is free again before delivery has
   even begun.
2. **Bus to receivers.** The bus raises `bus_req`. Each receiver decodes
   the tag (`rcv_sel`) and, if selected, acknowledges once it has stored
   the token. `bus_req` falls when every selected receiver has
   acknowledged. The bus becomes free again, the "precharge" step, when all
   acknowledges have fallen.

Timing at one clock per step: grant and latch on one edge, then `bus_req`,
then acknowledges, then release. An uncontended transfer to a
single-cycle receiver occupies a bus for about 4 clocks. The buses run
independently, so NB transfers can be in flight at once.

Each functional unit drives exactly one bus but listens to all of them. The
input block may put each token on a different bus.

## Functional units

`functional_unit` executes one operation at a time. Its three kinds are:

* `FU_ADD` and `FU_SUB`: wrap-around 16-bit two's complement, one clock.
* `FU_MUL`: signed Q1.15. The product is shifted right by 15 and truncated
  toward minus infinity, and -1.0 * -1.0 wraps to -1.0. It is a
  shift-and-add unit that stops as soon as the remaining multiplier bits
  are zero, so a product takes `bitlen(|b|) + 1` clocks: 1 clock for b = 0,
  17 clocks for b = -1.0.

This imitates the average-case (data-dependent) delay of a self-timed unit.
It is also what makes results arrive out of order in practice. The unit
takes operands with a four-phase handshake and acknowledges on the edge it
latches them. It offers the result token to its `output_reg`. It accepts
the next pair once that register has stored the result.

## Input block, token control and the output block

The **input block** has three jobs:

* It accepts words from its chip input port (four-phase
  `in_req/in_data/in_ack`) into an 8-word FIFO.
* It gives the k-th word of each data set on its port the tag t with
  `CFG_IN_BLK[t]` equal to the block number and `CFG_IN_POS[t] = k`. The
  tag comes purely from arrival order, so one port is shared by several
  inputs.
* It sends each token to the bus of that tag.

**Token control** limits how many data sets are inside the chip. A credit
counter starts at `MAX_SETS`. The first word of a set needs and consumes a
credit. Each output block pulses `set_done` when it has queued the last
result of a set. The top counts these pulses per output block. When every
output block has finished a set, it returns one credit to every input block.
Each input port therefore needs its own credit, so the ports cannot drift
more than `MAX_SETS` sets apart.

The default is **one set in flight**, and this matters. Tags identify
operations, not data sets. With a shared register and two sets inside, a
later set's token can occupy a register that an earlier set still needs,
and the example mapping can then deadlock a bus. Raise `MAX_SETS` only for
mappings without such sharing, and check them in simulation. Both the
credit scheme and its default are this design's choices. The architecture
only says that the input block controls the number of sets in flight.

The **output block** is a receiver on every bus. It has one slot per output
tag it owns. It drains the slots into an 8-word output FIFO in
`CFG_OUT_POS` order, whatever order the results arrived in. Only the data words leave
through the four-phase chip output.

## Chip interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_req`, `in_data`, `in_ack` | in, in, out | N_IBLK, N_IBLK x 16, N_IBLK | one four-phase word input per input block |
| `out_req`, `out_data`, `out_ack` | out, out, in | N_OBLK, N_OBLK x 16, N_OBLK | one four-phase word output per output block |

A data set is 2 + 3 input words and gives 2 output words. In the end-to-end
test, one data set takes roughly 40 to 90 clocks from the moment both input
blocks have started sending it to its last result. Most of that comes from the multiplier delays and the
one-set-in-flight limit. The architecture specifies no rates or latencies.

## Where this design departs from the architecture

* **Clocked rendering of self-timed logic.** The handshakes, their order
  and the release points are kept. Delays become whole clocks, and
  arbitration is a clocked round-robin instead of an interlock (mutex)
  circuit.
* **Chosen where the architecture is silent:**
  * bus count (2);
  * FIFO depths (8);
  * the priority rule (lowest tag first);
  * the token-control scheme (credits, one set in flight);
  * the number format (Q1.15, truncating) and the multiplier's algorithm;
  * the one-token output register;
  * the output reordering slots, the `set_done` return path and the join
    over output blocks;
  * reset behaviour;
  * the whole example application.
* **Receivers may delay an acknowledge** when a register is still full,
  instead of assuming that storage is always free. This never happens at
  the default configuration.
* **Not built:**
  * block buffer memories for inter-chip block transfers (no size or
    interface is defined for them);
  * ALU-type units and other unit kinds;
  * shortened or segmented buses, which are a layout matter.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_async_dsp_chip` runs the whole chip at its default parameters.
  * It pushes 300 data sets through, with random gaps on each of the two
    input ports independently and random back-pressure on the output.
    Half of the sets are sent slowly, with port 0 lagging, so that ar
    arrives after br and bi.
  * Operands include 0, -1.0 and full-scale values.
  * It compares all 600 results with zr and zi computed directly from the
    formulas.
  * It also counts each mechanism and fails if any never happened: bus
    transfers and arbitration conflicts, priority among ready operations,
    shared-register loads, token-control holds, a full input FIFO, results
    arriving out of order, and a spread of multiplier delays.
* The unit testbenches check each block against an independent model:
  * a queue model for the FIFO;
  * round-robin order and fairness for the arbiter;
  * exact delivery sets and the release order for the bus;
  * operand pairs, priority and the shared-register wait for the matching
    block;
  * values and exact per-operand delay for the units;
  * tags, buses and credit limits for the input block (block 1: br, bi,
    g), run with two credits so that two sets are inside together;
  * order and `set_done` for the output block.

Concurrent assertions in the RTL check the handshake rules: a request is
held until acknowledged, and the data stays stable while offered.

## Simulating

Verilator 5 with `--timing`. The package must come first:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/adsp_pkg.sv tb/tb_async_dsp_chip.sv -y rtl \
    --top-module tb_async_dsp_chip -o sim
./obj_dir/sim
```

Replace `tb_async_dsp_chip` with any other `tb_*` module to run a unit
test. All registers that are read are reset, so the design does not depend
on initial values (try `+verilator+rand+reset+2`).
