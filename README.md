# A distributed microprogrammed controller (CMC)

A classical microprogrammed controller keeps everything in its control
memory: the datapath control bits, the branch condition, the next address
and any loop count. When the microprogram uses rich sequencing (nested
counted loops, subroutines, multi-way branches, forks) that memory grows
wide and sparse. This controller splits the work over three units:

* the **control memory (CM)** holds per microinstruction only three short
  fields: `f1`, the number of an *internal function* (how the next address
  is formed), `f2`, the number of that function's *parameter*, and `f3`, the
  *external operation number* that goes to the datapath;
* the **internal function unit (IFU)** decodes `f1` into the internal
  controls of the sequencer (push, pop, loop load, address select, ...);
* the **internal function parameter unit (IFPU)** maps `f2`, together with
  the machine status, to the parameter: a jump/call target, a loop count, the
  target of a conditional or multi-way branch, or a fork parameter.

The microsequencer then forms the next CM address. The CM thus never holds
an address: it only says *how* the next one is formed (semi-implicit
addressing). Parameters that many microinstructions share are stored once in
the IFPU.

```
            machine status
                 |
                 v
            +---------+  param, hit
  f2 ------>|  IFPU   |-------------+
            +---------+             v
            +---------+  ictl  +----------------+  cm_addr  +----------+
  f1 ------>|   IFU   |------->| microsequencer |---------->|    CM    |--> f3 = dp_op
            +---------+        +----------------+           +----------+
                 ^   loop_zero        |    ^ ext_bus              |  f1, f2
                 +--------------------+                           |
                 +------------------------------------------------+
```

All of `rtl/` is synthesizable SystemVerilog. The top is `cmc_top`.

## The microinstruction and its internal functions

A CM word is `{f1, f2, f3}` (4 + 4 + 8 bits by default). The nine internal
functions and their codes (`cmc_pkg::ifunc_e`):

| f1 | function | next address | other internal control |
|----|----------|--------------|------------------------|
| 0 | Sequ | register1 (address + 1) | - |
| 1 | Jump (Goto) | IFPU parameter | - |
| 2 | Cjump (If) | IFPU parameter if an IFPU row matched, else address + 1 | - |
| 3 | Call | IFPU parameter | push return address |
| 4 | Return | top of stack | pop |
| 5 | Loop | address + 1 | push saved count, push loop start; counter <= IFPU parameter |
| 6 | End-loop | last pass: address + 1; else top of stack (loop start) | last pass: pop 2, restore outer count; else decrement |
| 7 | Fork | held until `fork_done`, then address + 1 | `fork_req` high, `fork_param` = IFPU parameter |
| 8 | Map | `ext_bus` | - |

Codes 9 to 15 behave as Sequ. The function set is the one the design is
built around; the numeric codes are this implementation's. Code 2 for the
conditional jump makes the microinstruction written "(2 9 2)" read as:
conditional jump, parameter number 9, operation 2.

## The IFPU as a PLA

The IFPU is a small programmable PLA of 32 product terms. A term is
`{valid, pnum, mask, val, param}` and matches when it is valid,
`pnum == f2` and `(status & mask) == (val & mask)`. The output `param` is the
OR of the words of all matching terms and `hit` says whether any matched.

* an unconditional parameter (jump or call target, loop count, fork
  parameter) is one term with `mask = 0`;
* "if status bit k then goto T" is one term with `mask = val = 1<<k`; when it
  does not match, Cjump falls through to the next word;
* an n-way branch is one term per status combination, each with its own
  target. Targets need not be adjacent or aligned.

The microprogrammer (or assembler) must keep terms of one `pnum` disjoint,
or accept the OR of their words, exactly as with a real PLA.

## The microsequencer

The sequencer is the classic incrementer / register / stack / multiplexer
structure with a loop counter:

* **MUX**: `cm_addr` is one of register1, the IFPU parameter, the stack top
  or `ext_bus`, selected by the IFU.
* **Incrementer and register1**: register1 <= `cm_addr + 1` each cycle, so it
  always holds the address that follows the microinstruction being fetched.
  Call pushes it as the return address; Loop pushes it as the loop start.
* **Stack** (`useq_stack`, 8 words): one or two words can be pushed or
  popped per cycle.
* **Loop unit** (`loop_unit`): a count register, a decrementer and a zero
  detect on the decremented value; the zero flag goes back to the IFU.

### How counted loops nest

This is the least obvious part. A Loop microinstruction at address L with
count N does three things in one cycle: it pushes the *current* counter
value (the count of the enclosing loop, if any), then pushes L+1 (the loop
start), and loads the counter with N. The body runs from L+1 to an End-loop
word E, which is part of the body. At E:

* if the counter is not 1, the counter is decremented and the next address
  is the stack top, L+1;
* if it is 1 (the zero detect sees `count - 1 == 0`), both words are popped,
  the counter gets back the saved outer count, and execution continues at
  E+1.

So the body runs exactly N times, N >= 1 (N = 0 is not meaningful: it would
run 2^8 times). Loops and calls may nest in any well-bracketed way as long as
the stack holds: each open loop costs two words, each open call one. The
stack flags overflow and underflow with assertions in simulation and a
sticky `stack_err` output; the offending operation is dropped.

A loop whose body is only its End-loop word (Loop at L, End-loop at L+1) is
legal and repeats that one word N times.

## Timing

The CM has a synchronous read; its output register is the microinstruction
register. In cycle t the register holds the microinstruction at address A;
`dp_op` shows its `f3`, the IFU and IFPU decode it combinationally, and
`cm_addr` is the address of the next one, which is captured at the end of
the cycle. One microinstruction completes per clock, including taken
branches, calls, returns and loop back-jumps: there is no branch penalty.
The combinational path per cycle is CM register -> IFPU (PLA) / IFU -> MUX
-> CM address.

**Fork.** While a Fork microinstruction is current, `fork_req` is high and
`fork_param` carries its IFPU parameter. The controller holds (CM read
disabled, register1, stack and counter frozen) until `fork_done` is high in
a cycle; it then moves on in that same cycle. `fork_done` may therefore be
high in the first cycle for a zero-wait join. While holding, `dp_op` keeps
the Fork word's operation, so the datapath sees it on every held cycle. An
assertion checks that `fork_req` does not drop before the join. The
nanoprogram units (the sub-controllers a fork starts) are outside this
design.

**Reset and loading.** Reset is asynchronous, active low, and the clock must
run during it. While `rst_n` is low, `cm_addr` is 0 and the CM keeps reading,
so after release the first microinstruction is word 0. The CM and the IFPU
have no reset: they are loaded through their write ports
(`cm_wr_*`, `ifpu_wr_*`), normally while reset is held, and every IFPU row
must be written once (unused rows with `valid = 0`). Writes must end at
least one clock before reset is released.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 8 | CM address width (256 words); also the width of IFPU parameters and the loop counter |
| `IF_W` | 4 | width of `f1` |
| `PNUM_W` | 4 | width of `f2` (16 parameter numbers) |
| `OP_W` | 8 | width of `f3` |
| `STATUS_W` | 4 | machine status bits |
| `STACK_DEPTH` | 8 | stack words (a power of two) |
| `IFPU_ROWS` | 32 | IFPU product terms |

None of these sizes comes from the design description, which gives no
widths: they are chosen to be small and simulate quickly. All defaults live
in `cmc_pkg`.

## Files

| file | content |
|------|---------|
| `rtl/cmc_pkg.sv` | default sizes, function codes, MUX select and stack-op enums, the `ictl_t` control bundle |
| `rtl/cmc_top.sv` | the controller |
| `rtl/control_memory.sv` | CM with load port and microinstruction register |
| `rtl/ifu.sv` | internal function decoder |
| `rtl/ifpu.sv` | programmable parameter PLA |
| `rtl/microsequencer.sv` | incrementer, register1, MUX; instantiates the stack and loop unit |
| `rtl/useq_stack.sv` | stack with single and double push/pop |
| `rtl/loop_unit.sv` | loop counter, decrementer, zero detect |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `simc_examples_tb` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. The unit testbenches compare against reference models
(a queue for the stack, a software PLA for the IFPU, an exhaustive table for
the IFU, a behavioural model of register1/stack/counter for the sequencer).

`cmc_top_tb` is the end-to-end test at the default sizes. It loads a
microprogram that uses all nine functions (two nested loops with a call in
the inner body, a one-word loop inside a second subroutine, a single and a
four-way branch, a fork, a Map that restarts the program) and runs 4000
cycles with random status, external bus and join inputs. Its reference is an
interpreter that works on the level of the functions (a list of open calls
and loops with remaining pass counts) and knows nothing of register1, the
stack layout or the counter. It checks `dp_op`, `cm_addr` and the fork
signals every cycle, and it fails if any mechanism (taken and untaken
branch, each of the four ways, call, return, loop entry, nested loop,
back-jump, loop exit, fork wait, fork go, map) never happened.

`simc_examples_tb` runs two small worked cases: a loop of count 3 whose
body must run exactly three times in 1 + 3 x 2 cycles, and the conditional
jump "(2 9 2)" under three machine-status values.

To run one with plain Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl rtl/cmc_pkg.sv rtl/*.sv \
    tb/cmc_top_tb.sv --top-module cmc_top_tb -o sim
./obj_dir/sim
```

Swap the testbench file and `--top-module` for the others. Verilator lint
(`-Wall`) reports only unused package constants, an unconnected debug
output, unused bits of the control bundle and `SYNCASYNCNET` for `rst_n`,
which is used both as an asynchronous reset and, combinationally, to force
address 0 during reset; this is intended.

## How far it follows its source, and where it departs

Taken from the design description: the split into CM, IFU, IFPU and
microsequencer; the three CM fields; the IFPU inputs (parameter number and
machine status); the list of internal functions and their internal controls
(Call pushes and jumps, Return pops, Loop pushes twice and continues,
End-loop tests for zero and jumps or continues, Fork hands control to a
nanoprogram unit, Map takes an external address); and the sequencer parts
(incrementer, register1, stack, MUX fed by register1, stack, IFPU and an
external bus, loop counter with decrementer and zero detect feeding the
IFU).

This implementation's own choices: all widths and depths; the function
codes; the IFPU row format and its load port; the CM load port; the
synchronous CM read serving as the address/microinstruction register; what
the two Loop pushes hold (outer count and loop start) and the single count
register standing for the separate loop register and loop counter; the zero
test on the decremented count; the fork wait-for-join handshake; stack error
handling; reset to address 0.

Not built:

* the nanoprogram sub-controllers a Fork starts, whose structure is not
  given; the fork interface is brought out as ports instead;
* the alternative "semi-distributed" (no IFU) and "classical" (everything
  in the CM) organisations, which are reductions of this one chosen per
  application;
* trimming of the IFU to the functions a given program uses and encoding of
  the CM fields, which are steps of the microassembler rather than hardware;
* the datapath that decodes `f3`.
