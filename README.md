# Gate-level pipelined dual-rail logic: GTL cells and a sequence detector

This RTL implements Gate Transfer Level (GTL) circuits. GTL is a way to turn an ordinary
synchronous netlist into a clockless, quasi-delay-insensitive (QDI) circuit in which every gate is
its own pipeline stage. The clock and the flip-flops go away. Every gate gets a small
handshake controller and two wires per signal. Data waves then move through the logic one gate
level at a time, each stage taking new data as soon as its neighbour has taken the old. A
synchronous design can only pipeline this finely at a high price in latches, clock skew and stage
balancing. Here the pipelining comes with the cell template itself, and the circuit stays
functionally correct whatever the gate and wire delays.

The repository contains:

- the cell set: a Muller C-element, a dual-rail completion detector, a GTL gate (a half-buffer
  stage with a selectable unate function), a fork, and a full buffer;
- the mapping of a shift register with parallel taps into GTL;
- the top, `gtl_sequence_detector`. It is the GTL version of a small synchronous design that
  raises its output after three consecutive 1s;
- self-checking testbenches for all of these, plus the c17 benchmark circuit built from the
  cells (`tb/gtl_c17.sv`).

## Signals: dual rail and the four-phase handshake

Every logical bit is a `gtl_pkg::dr_bit_t`, a packed struct `{t, f}`:

| `{t,f}` | meaning |
|---|---|
| `00` | NULL (the spacer between tokens) |
| `10` | DATA 1 |
| `01` | DATA 0 |
| `11` | never occurs (assertions in `gtl_gate` check it) |

A receiver knows that a value has arrived from the value alone: one rail went high. It needs no
timing assumption for this. A channel is a set of dual-rail bits plus one acknowledge wire running
backwards. Every channel uses the same four phases:

1. the sender puts DATA on the rails;
2. the receiver, having stored it, raises `ack`;
3. the sender returns the rails to NULL;
4. the receiver, having stored the NULL, lowers `ack`.

There are no separate request wires. The request is the data itself ("data driven"): the
completion of the rails tells the receiver that a request has arrived.

## The C-element and completion detection

`c_element` is the only state-holding cell. Its output copies its inputs when they all agree
and holds otherwise. For two inputs this is `g = x1·x2 + g·(x1+x2)`. It is written as a
latch that is transparent while all inputs are equal, with an active-high reset to a parameter
value `INIT`.

`dr_completion` detects that a whole dual-rail bus is complete. It ORs the two rails of each pair
and joins all the OR outputs in a C-element. `done_o` rises when the last pair becomes DATA and
falls when the last pair returns to NULL.

## The GTL gate (`gtl_gate`): one gate, one pipeline stage

This block is the core of the design. Each gate of the original netlist becomes the following
stage:

```
            a_i[N-1:0] (dual rail)                     rack_i
                 |                                        |
        +--------+--------+                               |
        |                 |                               v
   F: f_t = f(a.t)   input completion          en = ~rack_i
      f_f = f'(a.f)  (dr_completion)                |
        |                 |                         |
   Storage: z.t = C(f_t, en), z.f = C(f_f, en) <----+
        |                 |
        |      CD: out_done = z.t | z.f
        |                 |
        |      ACK: lack_o = C(in_done, out_done)
        v
      z_o (dual rail)
```

- **F** is the gate function expanded to dual rail. Rail t computes f from the t rails, and rail
  f computes the complement f' from the f rails. Both halves use only AND and OR: AND becomes
  `z.t = &a.t`, `z.f = |a.f`. NAND and NOR are the same gates with the output rails swapped.
  `FUNC` selects BUF, INV, AND, OR, NAND or NOR. The default is a two-input AND.
- **Storage** is one C-element per output rail. Its second input is `~rack_i`. A DATA result is
  therefore latched only while the next stage is waiting for DATA (its acknowledge is low). The
  output returns to NULL only after the next stage has acknowledged and F has gone back to all
  zeros.
- **CD** is the completion of the stage's own output pair.
- **ACK** joins the completion of all inputs with CD. `lack_o` rises only when every input is DATA
  and the output holds DATA. It falls only when every input is NULL and the output is NULL.

The ACK join matters because F need not wait for all its inputs. In an AND, `z.f = |a.f`
fires as soon as one input is 0. The stage may therefore show a 0 result early. It still does not
acknowledge any input until all inputs have arrived, so no token is lost or doubled. The
testbenches see this: the sequence detector can show its next "0" output before the newest input
bit arrives.

A stage holds half a token. It holds either a DATA wave or a NULL wave, never a DATA wave
followed by its NULL. With `INIT_TOKEN = 1` the stage resets holding the DATA value `INIT_VALUE`
with its acknowledge high. Its inputs must then be NULL at reset.

The transistor-level dynamic version of this cell (precharged F, staticizers) is not included. It
has the same logic behaviour as this static version, and its circuit has no RTL form.

## Forks and joins

Where a net has several readers, `gtl_fork` branches the rails unchanged to `M` receivers and
joins their acknowledges in a C-element. The sender sees its acknowledge only after all branches
have taken the token. A fork holds no data and is not a pipeline stage. Its data outputs are wires
from its input, so synthesis reports them as pass-through. Where a gate has several inputs, the
join sits inside the gate: a single `lack_o` acknowledges all input channels together.

## Registers become full buffers (`gtl_full_buffer`)

A flip-flop holds one token. One half-buffer stage holds only half a token, so each flip-flop
maps to two stages in a row, a full buffer (FB). The first stage resets NULL. The second resets
holding the flip-flop's initial value. With its output blocked, an FB that holds its initial token
accepts no input. An empty FB accepts exactly one token. `tb_gtl_full_buffer` checks both.

Token capacity is why the flip-flops cannot simply be dropped when the logic between them is
shallow. `gtl_shift_register` maps an N-bit shift register whose bits are also read in parallel.
Each bit is an FB followed by a fork: one branch is the tap, the other feeds the next bit. If the
FBs were left out, the forks alone would give N copies of the same bit instead of a shift register.
Where a real gate already sits between two flip-flops, that gate's own stage would supply half
the capacity, and one extra half buffer would be enough. This block has no such logic.
Where the logic between registers is several gates deep, the gate stages alone already hold
more than one token per register. The register stages then add nothing and can be removed, so
the non-pipelined logic and its pipelined version map to the same GTL circuit.

## The top: GTL sequence detector

The synchronous specification is a 3-bit shift register clocked by `clk`, plus
`D_out = (data == "111")`. Its GTL form (`gtl_sequence_detector`) is:

```
d_in -> FB -> F -> FB -> F -> FB ---+
             |          |           |
             +----------+-----------+--> HB (3-input AND gtl_gate) -> d_out
```

Each input token corresponds to one clock cycle of the specification, and so does each output
token. The first output token after reset is the AND of the initial register content (000, so
0). Output token k is `D_in[k-1] & D_in[k-2] & D_in[k-3]`, with the initial bits standing in
before the first input. `DEPTH` (default 3) and `INIT_VALUE` (default 000) are parameters.

Ports: `rst_i` (active high; hold it while `d_in_i` is NULL and `d_out_ack_i` is low),
`d_in_i`/`d_in_ack_o`, and `d_out_o`/`d_out_ack_i`. All channels use the four-phase protocol
above. There is no clock and no latency in cycles. Speed depends only on gate delays, which
this RTL does not model.

## Pipeline balancing and the c17 workload

A GTL circuit is correct without any balancing. It runs fastest when all reconvergent paths cross
the same number of stages, because then no branch has to wait for a slower one. Balancing inserts
BUF stages on the short paths. `tb/gtl_c17.sv` builds the six-NAND c17 benchmark from `gtl_gate`
and `gtl_fork` cells, with `BALANCE` adding one buffer on each of the three level-skipping nets.
The netlist is the public ISCAS-85 c17 circuit. `tb_gtl_c17` runs 200 random vectors through a
balanced and an unbalanced copy, with every input and output channel driven by its own
independently delayed process, and checks both against the Boolean function. Larger benchmarks and
the AES blocks are not provided: there is no netlist for them here.

## Reset and initial tokens

The GTL method says which stages start with a data token (those that replace flip-flops) but
leaves the reset circuit open. This design adds an active-high `rst_i` that reaches every
C-element. Stages reset to NULL, or to DATA where `INIT_TOKEN` is set. Acknowledges reset
to the value consistent with the stage's content. A valid reset state needs every
token-holding stage to have NULL inputs, so two initial tokens must never sit in adjacent half
buffers. The full buffer guarantees this by putting the token in its second stage.

## Simulating

The testbenches need Verilator 5 with timing support. Internal handshakes settle in zero time,
and the environment processes add random delays. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/gtl_pkg.sv \
    tb/tb_gtl_sequence_detector.sv --top-module tb_gtl_sequence_detector
obj_dir/Vtb_gtl_sequence_detector
```

Every testbench ends with `TB_RESULT checks=N failures=M`. The available testbenches are:

| testbench | what it checks |
|---|---|
| `tb_c_element` | 2- and 3-input C-elements against the defining equation, reset values |
| `tb_dr_completion` | 4-pair bus, pairs arriving and leaving in random order |
| `tb_gtl_gate` | AND/OR/NAND/NOR stages on a shared input channel, input-complete acknowledge, an inverter with an initial token |
| `tb_gtl_fork` | 3-way fork of a 2-bit channel, acknowledge join in random order |
| `tb_gtl_full_buffer` | capacity of one token; stream order including the initial token |
| `tb_gtl_shift_register` | 4-bit register with initial value 1011, independent slow taps |
| `tb_gtl_sequence_detector` | the top at default parameters: 401 output tokens against a clocked reference; counts detections, input stalls from back-pressure, fork waits and the initial-token output |
| `tb_gtl_c17` | c17 benchmark, balanced and unbalanced |

`-Wno-fatal` is needed because Verilator warns about the combinational loops. Every handshake is a
loop through C-elements, and every C-element is a latch. These warnings are expected for this
circuit style. Yosys likewise reports the C-elements as latches.

## How far to trust it

- The simulation uses zero delay inside the circuit. It shows that the handshakes are consistent
  and that the token streams are right under many interleavings of the environment. It does not
  show delay insensitivity under arbitrary internal gate delays, and it gives no performance
  figures.
- The C-elements are written as latches for synthesis. A standard-cell flow has to map them to
  real C-element cells, or to hazard-free equivalents, and keep the isochronic-fork assumptions
  inside each stage.
- The following are choices of this design, not a fixed template: the data-driven handshake with
  no request wires; the weak-condition storage using `~rack_i`; the ACK join; the N-input
  C-elements; the reset scheme; the tap order; and the initial register values.

## Files

- `rtl/gtl_pkg.sv`: the dual-rail type, the gate-function enum and encoding helpers.
- `rtl/c_element.sv`, `rtl/dr_completion.sv`, `rtl/gtl_gate.sv`, `rtl/gtl_fork.sv`,
  `rtl/gtl_full_buffer.sv`, `rtl/gtl_shift_register.sv`: the cells.
- `rtl/gtl_sequence_detector.sv`: the top.
- `tb/tb_*.sv`: the testbenches.
- `tb/gtl_c17.sv`: the c17 workload netlist.
