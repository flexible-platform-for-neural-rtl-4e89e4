# Neural DF: a data flow machine for neural networks

A neural network is already a data flow graph: a neuron fires when all its
inputs have arrived, and neurons in one layer never wait for each other.
Neural DF runs such a graph directly. Each operator of the graph (a weight
multiplication, a sum, an activation, a back-propagation step) is one
instruction. Operands travel between instructions as **tokens**, and an
instruction executes as soon as its operands are there. No program counter
or global control exists: the arrival of data schedules the work.

This is a dynamic data flow machine. A token carries a context, so several
input patterns can be in the graph at once, and the layers of the network work
as a pipeline. During learning, each neuron keeps its forward-phase output on
a small **neuron stack** until the error for that pattern comes back. The
forward phase of the next patterns therefore does not have to wait for the
backward phase of earlier ones.

The RTL follows a published architecture from the data flow research
tradition. That source gives:

- the units and how tokens move between them;
- the token fields;
- the frame-store entry format and the matching rule;
- the processor stages and their interstage registers;
- the capacity rule for the neuron stacks.

It gives no widths, sizes, instruction format, number format or handshakes.
Those are this design's choices, and the sections below point them out.

## Tokens and direct operand matching

A token (`ndf_pkg::token_t`) has the fields `<P><T,V><MVB><DST><IX>`:

| field | meaning |
|---|---|
| P | priority |
| T | data type |
| V | value |
| MVB | base address of the token's matching vector in the frame store, which identifies the context (for example, the input pattern) |
| DST | consumer instruction |
| IX | item index inside the matching vector |

Here DST is split into the following parts (`dest_t`):

- `ip`: the consumer's instruction address;
- `port`: left or right operand;
- `dyadic`: whether the consumer has two inputs;
- `bwd`: whether the consumer belongs to the backward (learning) phase;
- `host`: the token leaves the machine (`ip` is then a tag).

Values are 16-bit signed fixed point with 8 fraction bits (Q8.8).

A two-input operator needs its operands paired. An associative search for the
partner would be costly, so matching is **direct**. The compiler gives each
two-input operator a fixed item index IX. At run time each context gets a
base MVB. The frame store entry at `MVB + IX` is `<AF><V>`, an affiliation
flag and a value:

- If AF = 0, the partner has not arrived. The value is stored and AF is set,
  and the token is consumed.
- If AF = 1, the partner is waiting. Its value is read and AF is cleared.
  The pair, ordered by port, moves on to execution.

`frame_store` does this read-modify-write in one cycle, atomically. One
request is served per cycle, and the processors arbitrate for it
round-robin.

An entry holds one presence flag, so it pairs exactly two operands. An
operator with more inputs, such as the net-input sum of a neuron with many
synapses, is written as a tree of two-input operators, each with its own IX.

A single-input consumer never touches the frame store. The producer's
destination field says which kind the consumer is (`dyadic`), so matching can
come before instruction fetch.

## The coordinating processor

Each coordinating processor (CP, `coordinating_processor`) has four parts:

- **Two preprocessor units** (`preprocessor_unit`). Unit 0 takes tokens of
  the forward phase and unit 1 those of the backward phase, chosen by
  `dst.bwd`. Each unit is a three-stage pipeline with the interstage
  registers named after the stages they join:
  - **L** (load): the token enters **LMP**, and `MVB + IX` is formed.
  - **M** (match): the frame-store match, or a bypass for single-input
    operands. The result goes to **MFP**.
  - **F** (fetch): the instruction is read from the instruction store into
    **FOP**.
- **One execution unit** (`execution_unit`). In state **O** (operate) it
  executes the instruction in a FOP register with the PEU, and issues the
  result to the first destination. In state **C** (copy) it issues one
  more copy per cycle for each further destination (up to 4), holding that
  FOP meanwhile. When both preprocessor units have an instruction ready, it
  alternates between them.
- **One communication unit** (`communication_unit`). A 2-entry queue drives
  the CP's output port, CP.DO.

`CP_free` (`cp_free`, one per preprocessor unit) is high when stage L can
take a token. It depends only on registers and on the frame-store and stack
grants, never on what the network does this cycle. That is why there is no
combinational loop between the CPs and the router.

**Timing.** A token loaded at clock edge *t* is in MFP after *t+1*, in FOP
after *t+2* and executed at *t+3*. Its first result token is on CP.DO after
that edge, and the router can take it at *t+4*. With no stalls, each
preprocessor unit accepts one token per cycle. The execution unit completes
one instruction or one copy per cycle.

Stalls come from four sources:

- waiting for the frame store or the stack bank;
- copy cycles;
- a full output queue;
- both units needing the execution unit at once.

A stall moves back through FOP, MFP and LMP and drops `cp_free`.

## Where a result token goes

The router (`token_router`) places every result token each cycle, in this
order:

1. A token for the host goes to the host port, one per cycle.
2. A token goes back into its own CP, if the unit of its phase is free.
3. Otherwise, it goes to the same unit of another free CP. This is a
   network transfer.
4. Otherwise, it goes into the **data queue unit** (`data_queue_unit`),
   one put per cycle.
5. Otherwise, it waits on CP.DO.

Free units left without a token are then filled. The DQU comes first (Get
DQ, high-priority tokens first), then a token injected by the host.

For this to work, a token must be able to run on any CP. So the frame store,
the instruction store and the neuron stacks are shared by all CPs. The
instruction store has one read port per preprocessor unit. The frame store
and stack bank take one access per cycle.

## Learning with neuron stacks

The back-propagation equations used are:

- forward: `o_j = logistic(sum_k w_jk o_k)`;
- output neurons: `delta_j = (t_j - o_j) o_j (1 - o_j)`;
- hidden neurons: `delta_j = o_j (1 - o_j) sum_k delta_k w_kj`.

In a pipeline, `o_j` of pattern *p* is needed again only when the error of
pattern *p* returns, and by then later patterns have passed through. So the
neuron model is extended with a stack:

- The forward operator `SIGP` computes the logistic and pushes the output on
  the neuron's stack.
- The backward operator `POPD` pops it and computes `e * o * (1 - o)`.

Consider a neuron at depth *d*, meaning *d* layers from the output. Its
output needs *d* steps to reach the output layer, and the error needs *d*
steps to come back. So at most **c = 2d** outputs wait. `neuron_stack_bank`
gives every neuron stack `2 * D_MAX` entries, where `D_MAX` (default 3) is
the depth of the whole network.

**Ordering.** Patterns come back in the order they went in, so a pop must
return the *oldest* stored output. The "stack" is therefore a small
first-in-first-out queue per neuron.

The machine does not enforce pattern order. Tokens of different patterns can
overtake each other through the network or the DQU. If that happens at a
neuron, the stored outputs pair with the wrong errors. The end-to-end
testbench spaces patterns 16 cycles apart, with up to 5 patterns in flight,
and the results match the reference. At 12 cycles, one hidden-layer delta in
24 was off by one LSB. Programs that need strict pairing must pace their
patterns, or add ordering in the graph.

`tb_ndf_four_layer` runs a four-layer chain, one neuron per layer, with
depths 3, 2, 1 and 0. It checks the outputs, every delta and the weight
change of the first synapse, `dw(t+1) = eta * delta * o + alpha * dw(t)`.
That change uses the input value that waited on the deepest stack. The
previous change `dw(t)` waits between patterns on a fifth stack: each
pattern pops it and pushes the new one. With one pattern every 24 cycles,
all 40 patterns match the reference. The largest stack fills are 3, 3, 2
and 1 entries, within the rule above.

The test also shows the limits of pacing:

- At 20 cycles, a pattern pops `dw(t)` before the previous pattern has
  pushed it, because that chain runs patterns strictly one after another.
- At 16 cycles, patterns also overtake each other and deltas go wrong.
- At 12 cycles or less, the stacks overflow their 6 entries.

The spacing can be set with `+spacing=N`.

If a push would exceed the stack's capacity, it is refused. A pop from an
empty stack is refused too. Both set `stk_err` for one cycle.

## Instructions (`ndf_pkg::instr_t`)

An instruction has these fields:

- `op`;
- `ndest`: 0 to 4;
- `imm`: a 16-bit immediate, holding a weight, a bias or a stack number;
- `dst[0..3]`: the destinations.

The operations are:

| op | result | note |
|---|---|---|
| COPY | a | fan-out |
| ADD, SUB, MUL | a+b, a-b, a*b | saturating Q8.8 |
| MULI, ADDI | a*imm, a+imm | weight or bias as an immediate |
| SIG | logistic(a) | piecewise linear (PLAN), within 0.02 of exact |
| SIGP | logistic(a), push on stack imm | forward neuron output |
| PUSH, POP | push a / pop o | plain stack access |
| POPD | a*o*(1-o), o popped from stack imm | back-propagation delta |

An instruction with `ndest = 0` is executed only for its side effect (a push).
The weight change `eta * delta_j * o_i + alpha * dw` is written as a graph of
MUL, MULI, ADD, PUSH and POP operators, with the previous change kept on a
neuron stack (see `tb_ndf_four_layer`). No operator is dedicated to it.
Weights are instruction immediates (MULI). The machine has no path for
writing a new weight back into an immediate. The host does that through the
instruction-store write port, for example between batches.

`tb/tb_neural_df.sv` shows a complete program: a 2-2-1 network in 20
instructions covering recall and one backward pass.

## Host interface of `neural_df`

| ports | use |
|---|---|
| `is_we`, `is_waddr`, `is_wdata` | load the program |
| `inj_valid`/`inj_tok`/`inj_ready` | inject input tokens; a token is taken when valid and ready are both high at a clock edge |
| `res_valid`/`res_tok`/`res_ready` | result tokens with `dst.host` set |
| `init` | clears every pipeline stage, all AF flags, the DQU and the stacks |
| `idle`, `fs_waiting`, `dq_waiting`, `stk_err` | status |
| `cp_ev[]`, `ev_loop`, `ev_net`, `ev_dq_put`, `ev_dq_get` | event flags, for monitoring |

The host computer, the application (IT) unit and the specialised fast I/O of
the full system are outside this RTL. They connect through these ports.

Parameters (defaults): `N_CP` 4, `IS_DEPTH` 256, `FS_DEPTH` 256, `DQU_DEPTH`
64 per priority, `NSTK` 64, `D_MAX` 3. Widths of values, addresses and
indices are in `ndf_pkg`. At the defaults the design synthesises to about
2,400 word-level cells, 2,000 flip-flop bits and 38 kbit of memory.

## Departures and choices, in one place

- The number of CPs, all memory sizes, the widths, the Q8.8 format, the
  instruction format and the opcode set are this design's own.
- The two preprocessor units are assigned to the forward and backward
  phases through a bit of the destination field.
- Shared frame store, stack bank and instruction store, with round-robin
  arbitration. The source's block diagram gives the units but not how they
  are shared.
- The COPY state is used for fan-out to several destinations.
- Weights live in instruction immediates. The learning graph computes the
  weight change, and the host writes new weights into the instruction store.
- Matching pairs two operands only. Operators with more inputs are trees of
  two-input operators.
- DQU ordering: priority P first, FIFO within a priority.
- Neuron stacks return the oldest entry, and each is sized for the deepest
  neuron.
- The logistic function is a piecewise-linear approximation.
- Every stage takes one clock cycle, and the memories are read
  combinationally.

## Files and simulation

`rtl/` holds one module or package per file: `ndf_pkg` (types and
arithmetic), `neural_df` (top), `coordinating_processor`,
`preprocessor_unit`, `execution_unit`, `communication_unit`, `peu`,
`frame_store`, `instruction_store`, `data_queue_unit`, `neuron_stack_bank`,
`token_router` and `rr_arbiter`.

`tb/` holds a self-checking testbench per module, plus `ndf_ref_pkg`, the
reference arithmetic written independently of the RTL. Each testbench
prints `TB_RESULT checks=N failures=M`. `tb_neural_df` runs the whole
machine at its default parameters:

- recall of 40 patterns, with backpressure from the host;
- pipelined learning of 24 patterns;
- a stack overflow;
- init.

It also checks that every mechanism happened: matching bypass, store and
hit, frame-store wait, copy, stack push, pop and wait, backward-unit use,
both units competing, loopback, network transfer, DQU put and get, stack
error and init.

`tb_ndf_four_layer` is the four-layer learning run described under
"Learning with neuron stacks"; it builds and runs the same way.

To build and run a testbench with Verilator:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/ndf_pkg.sv tb/ndf_ref_pkg.sv tb/tb_neural_df.sv --top-module tb_neural_df
./obj_dir/Vtb_neural_df
```

The full-size run takes well under a second.
