# An OCaml virtual machine as a synchronous circuit

This design runs OCaml bytecode directly in hardware. It contains no processor core. The whole
OCaml runtime is built as one synchronous circuit:

- the bytecode interpreter,
- the heap with its copying garbage collector,
- the stack and the global data,
- a set of external functions written as dedicated hardware.

The machine is called once per clock tick, like any other combinational-plus-register function.
Code around it can therefore suspend it, watch its status and pass it inputs in every tick. The
reactive wrapper `reactive_main` does exactly that. Two buttons control the machine and three
LEDs report its state:

- **button1** pressed: the machine is frozen and all LEDs are off.
- **red**: an instruction is in progress.
- **green**: the program has finished.
- **blue**: the program has finished with the integer 42 in the accumulator.

The machine is written in the style of a synchronous functional language. In that style:

- an *instantaneous function* is combinational logic;
- a function with state keeps it in registers;
- a tail-recursive function is a small state machine that takes one tick per call;
- a long computation is started and polled through a `(result, rdy)` pair;
- mutable arrays are single-port on-chip memories:
  - a read takes two ticks (request, then data);
  - a write takes one tick.

Six small circuits show this programming model on its own. They sit beside the machine in the
top level `ocaml_fpga_top`, each with its own ports (see "Example circuits" below).

## Values and memory

Every OCaml value is 32 bits: a 31-bit signed integer field and a mark bit (`vm_pkg::value_t`,
`{n, is_int}`).

| Mark bit | Meaning of the `n` field |
|---|---|
| `is_int = 1` | an integer |
| `is_int = 0` | the word address of the first field of a heap block |

This departs from the usual OCaml encoding, where integers are shifted left and tagged in bit 0.
Here the integer is stored as is, and the mark is a separate bit.

A block is one header word followed by its fields. The header has the standard OCaml layout
inside the `n` field:

| Bits | Field |
|---|---|
| 30:10 | size in words |
| 9:8 | colour |
| 7:0 | tag |

Some tags have fixed meanings:

- 247 marks a closure.
- Tags of 251 and above mark raw data, which the collector does not scan.
- A list cell is a block of two fields with tag 0: the head, then the tail.
- The empty list is the integer 0.

All data lives in one memory of 16384 values (`vm_ram`, single port):

| Words | Use |
|---|---|
| 0 | header of the global-data block |
| 1 .. N_GLOBALS | global variables (64 by default) |
| 1000 .. 3999 | stack (3000 words), growing downwards from 4000 |
| 4000 .. 9999 | semi-space 0 |
| 10000 .. 15999 | semi-space 1 |

The bytecode is in a separate read-only memory, `vm_code_rom`, of 4096 words. It is loaded from
a hex file, one 32-bit word per line. Each instruction is its opcode followed by its operands,
for example `00000013` (opcode 19) then `00000002` for `POP 2`. Opcode numbers follow the standard OCaml instruction
order. Branch and closure offsets are relative to the address of the operand word that holds
them, as in OCaml bytecode. Words beyond the image read as `STOP` (144).

After reset, `vm_init_data` writes the header of the global block and the initial globals, one
word per tick. The initial globals are integer 0 unless a `DATA_FILE` is given. Then the
interpreter starts at code address 0.

## The interpreter (`vm_interp`)

The registers are those of the OCaml stack machine:

- `accu`, the accumulator;
- `sp`, the stack pointer;
- `env`, the current closure;
- `extra_args`, the number of pending extra arguments;
- the trap pointer, for exception handlers;
- `pc`, the code pointer;
- the heap allocation pointer, and which semi-space is current.

All state is one `regs_t` struct. The next state comes from one `always_comb` and is stored by
one `always_ff`. Instructions run one at a time; nothing is pipelined.

Each instruction goes through the same steps:

1. **Fetch, states F0..F4.** These read the opcode and up to two operands, one code word per tick.
   SWITCH and CLOSUREREC read their further operands later.
2. **EX.** This state decides what the instruction does. Register-only instructions finish here.
   These include the constants, ACC/ENVACC from registers, arithmetic and branches.
3. **Memory work.** Anything that touches memory goes through one of four shared engines. Each
   engine returns to state FIN with a step counter incremented, so one instruction can chain
   several engines:
   - **RSEQ** reads up to four consecutive stack words. Each read takes two ticks on the single port.
   - **WSEQ** writes up to six (address, value) pairs, one per tick.
   - **COPY** moves n words in either direction. It is used for the stack shuffles of APPTERM
     and for filling closures, blocks and the arguments of partial applications.
   - **ALLOC** reserves a block and writes its header. If the current semi-space cannot hold the
     block, ALLOC starts the collector, waits, swaps the semi-spaces and tries once more. If the
     second try also fails, the machine stops with `ERR_HEAP`.
4. **DONE.** This state lasts one tick. Here `instr_done` is high, and the machine's `busy`
   output is low.

The PUSH-prefixed forms (`PUSHACC1`, `PUSHCONSTINT`, ...) first push the accumulator and then
run the plain form.

Closures use the layout without a closure-info word:

- field 0 is the code pointer, stored as an integer;
- the free variables follow.

GRAB builds a partial application when too few arguments are present. Its fields are the code
pointer of the preceding RESTART, the environment and the arguments. RESTART unpacks it again.
Code pointers, return addresses, `extra_args` and trap links are pushed as integers, so the
collector never follows them.

### Instructions executed

- Stack and environment:
  - ACC\*, PUSH\*, POP, ASSIGN, ENVACC\*, OFFSETCLOSURE0.
- Calls and closures:
  - PUSH_RETADDR, APPLY\*, APPTERM\*, RETURN, RESTART, GRAB;
  - CLOSURE, and CLOSUREREC with one function.
- Globals and blocks:
  - GETGLOBAL\*, SETGLOBAL, GETGLOBALFIELD\*;
  - MAKEBLOCK\*, GETFIELD\*, SETFIELD\*;
  - VECTLENGTH, GETVECTITEM, SETVECTITEM;
  - OFFSETREF, ISINT.
- Constants, arithmetic and logic:
  - CONST\*;
  - integer arithmetic (division by zero stops the machine with `ERR_DIV_ZERO`);
  - logic, shifts, comparisons, OFFSETINT, BOOLNOT.
- Control:
  - BRANCH, BRANCHIF(NOT), the compare-and-branch forms, SWITCH;
  - CHECK_SIGNALS, which does nothing here.
- Exceptions:
  - PUSHTRAP, POPTRAP, RAISE, RERAISE, RAISE_NOTRACE.
  - An exception with no handler stops the machine with `ERR_UNCAUGHT`.
- External calls and end:
  - C_CALL1..C_CALL5, STOP.

Not built:

- floats and objects;
- strings and their primitives;
- atoms;
- CLOSUREREC for mutually recursive functions;
- the method instructions.

Any of these stops the machine with `ERR_OPCODE`. The machine also stops on stack overflow
(`ERR_STACK`). The cause is shown on `error`.

### Speed

On the default program the machine averages about 6.6 ticks per bytecode instruction, collections
included. With 1000-word semi-spaces it takes 815 k ticks for 123 k instructions and 33
collections.

A second program in `tb/vm_prog_bench.hex` runs eight workloads at the default sizes:

- Takeuchi's function `tak 18 12 6`: 63,609 calls and 875 k instructions in 5.98 M ticks
  (6.8 ticks per instruction). At a 50 MHz clock that is about 0.12 s.
- `List.map2 gcd_ext` over two four-element lists, then a `List.filter`. This is the use of the
  gcd accelerator from OCaml code.
- `gcd 2000 7` twice. As a tail-recursive bytecode function it takes 28,703 ticks. Through the
  gcd external function it takes 316 ticks, which is 91 times faster.
- Composition of partially applied functions, iterated 20 times (`Apply`).
- A binary search tree built from 200 increasing keys, then searched (`BST`). This is the worst
  case: a 200-deep spine. It allocates about 80,000 words, reclaimed by 15 collections, in
  2.9 M ticks.
- A filter of the list 1..100 that shares the longest unchanged tail (`Share`). When nothing is
  removed below a point, an exception carries that fact back up, and the original cells are
  returned instead of copies. Removing 50 takes 21 k ticks.
- `gcd 2000 7` called sixteen times. A bytecode loop that adds the results takes 459,946 ticks.
  The sixteen-way parallel external function takes 316 ticks, which is 1455 times faster. The
  description reports 1,000 times.
- The 8 queens problem with lists of columns (`Queens`): 92 solutions in 8.7 M ticks, with one
  collection.

Where the ticks go:

- **Register-only instructions** spend their time in the fetch states, EX and DONE.
- **Instructions that move stack data** add two ticks per word read and one per word written.

## Garbage collector (`vm_gc`)

This is a stop-and-copy collector using Cheney's breadth-first algorithm. It owns the memory port
while it runs.

1. **Roots.** It forwards these, in order:
   - `accu`,
   - `env`,
   - every stack word from `sp` up to the stack end,
   - every global.
2. **Scan.** A scan pointer then walks the to-space behind the free pointer. It forwards every
   field of every scannable block.

To forward a pointer into from-space, the collector reads the header of the block:

- **Colour 3 (already copied):** field 0 holds the new address, which is used.
- **Otherwise:**
  1. The header and fields are copied to the free pointer.
  2. The old header is recoloured 3.
  3. The new address is written into the old field 0.

Integers and pointers outside from-space pass through unchanged. Sharing and cycles are therefore
kept.

When the collector finishes, `done` pulses for one tick with the new `accu`, `env` and free
pointer. The interpreter swaps the roles of the two semi-spaces.

Cost: each memory read costs two ticks and each write one, all on the single memory port.

## External functions (`vm_external_call`)

`C_CALLk p` passes its k arguments (accu and the top k-1 stack words) and the primitive number `p`
to the dispatcher. The interpreter then waits for `done`. Each primitive is a hardware function:

| p | function | hardware | latency |
|---|---|---|---|
| 0 | `gcd : int -> int -> int` | `gcd_glue`: unwraps both values, runs `gcd_unit`, rewraps the result | 1 tick per subtraction step + 1 |
| 1 | `length : 'a list -> int` | `list_length`: tests for the empty list, reads the tail field, counts | 2 ticks per element + 1 |
| 2 | `input : unit -> bool` | the machine's `in_bit` input (button2 in the reactive wrapper) | 1 tick |
| 3 | `gcd16 : int -> int -> int` | `gcd_parallel`: sixteen `gcd_unit` copies started together on the same arguments, as `let/and/in` does; returns the sum of the sixteen results | the same as one gcd |

Any other number returns unit after one tick. While a call is active the dispatcher owns the
memory port; `list_length` uses it to read list cells.

## Machine interface (`ocaml_vm`)

`ocaml_vm` wires together:

- the loader (`vm_init_data`),
- the code memory (`vm_code_rom`),
- the value memory (`vm_ram`),
- the interpreter (`vm_interp`),
- the collector (`vm_gc`),
- the external-call dispatcher (`vm_external_call`).

It also contains the memory-port multiplexer. Its priority order is: loader, then collector, then
external call, then interpreter. Assertions check that the interpreter never drives the port
while another unit owns it.

| Port | Meaning |
|---|---|
| `en` | 1: the machine is called in this tick. 0: every register and memory holds. This is how button1 suspends it. |
| `in_bit` | the machine's input, readable by the program through primitive 2 |
| `busy` | high while an instruction is in progress. It drops for the one tick in which an instruction completes, and stays low after the end. |
| `stop` | the program has finished (STOP or an error) |
| `result` | the accumulator |
| `error` | cause of an abnormal stop |

The memory map is checked when the design is elaborated. `HEAP_START + 2*HEAP_SIZE` must fit in
`RAM_SIZE`, and the globals must end below the stack.

### The default program

`rtl/vm_prog_default.hex` is 148 words of hand-written bytecode. It exercises every mechanism
above:

- It builds the list `[1..10]` with a tail-recursive function (APPTERM).
- It builds and drops 200 lists of 50 cells. That is 30,000 heap words, so the collector runs 5
  times with the default 6000-word semi-spaces.
- It applies a three-argument function to one argument and later to the remaining two. This goes
  through GRAB and RESTART.
- It raises an exception and handles it.
- It calls `gcd 84 126`, `length` on the saved list, and the input bit.

It checks the intermediate results and ends with accu = 42, or 0 if any check failed. To run
another program, point `CODE_FILE` (and optionally `DATA_FILE`) at another image.

## Example circuits

These circuits illustrate the synchronous programming model. Each follows a published tick-by-tick
trace, which its testbench checks.

| module | what it shows | timing |
|---|---|---|
| `half_add`, `full_add` | inlined combinational functions | combinational |
| `sum_reg`, `sum_main` | a function with state: each call site owns a register. `z = if i>0 then 42 else sum(-10)` advances its register only in ticks where the else branch is taken. | output in the same tick |
| `gcd_unit` | tail recursion as a loop: one tick for the call plus one per recursive call | gcd(2,2) in 1 tick, gcd(5,10) in 2, gcd(18,12) in 3 |
| `gcd_example` | sequential calls, then a parallel pair joined at `in` | x at t1, z at t3, x2 at t5, x1 and s = 11 at t6 |
| `exec_main` | a long computation polled each tick: gcd(a,b) restarts in the tick after `rdy`, and `r = rdy ? gcd : sum(i)` | rdy at t3 and t5 of the trace |
| `gcd_times2_fsm` | the same gcd compiled to an explicit state machine computing gcd(10,11)*2 | result 2 after 12 ticks |

The trace behind `exec_main` has one inconsistency. It prints the gcd inputs sampled in tick 4
as (2,2), but prints the result in tick 5 as 15. The testbench drives (15,15) in tick 4 and
follows the rest of the trace.

## Where this design departs from the description it follows

These are choices made in this design. The description does not give them:

- **Instruction numbering, closure layout, header layout and stack direction.** These follow
  standard OCaml bytecode.
- **How the program reads `in_bit`.** It is external primitive 2.
- **The primitive numbers of the external functions.**
- **What the sixteen parallel gcd results are combined into.** The description only gives the
  speed-up. Here they are added up, so the result equals a loop of sixteen gcd calls that adds
  their results.
- **Code memory size (4096) and number of globals (64).**
- **The forwarding mark and scan order of the collector.**
- **The instruction subset.** Floats and objects are excluded by the description itself. Strings,
  atoms and mutually recursive closures are left out here as well.
- **Error stops.**
- **Synchronous active-high reset everywhere.**
- **"Not calling" a stateful function.** This is modelled as a clock enable, both for
  `sum_main`'s conditional branch and for the suspended machine.

Missing compared with the description:

- The benchmark programs of its evaluation are not available. Gcd, Tak, Apply, BST,
  Share and Queens are rewritten by hand, with sizes chosen here. The hand-written Tak
  allocates nothing, so unlike the original it does not exercise the collector. Programs that
  need runtime primitives not built here cannot run. Examples are array creation and string
  functions.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints a line
`TB_RESULT checks=N failures=M` at the end and has a watchdog. Run them from the directory that
holds `rtl/` and `tb/`, because memory images are loaded by relative paths such as
`rtl/vm_prog_default.hex`. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/vm_pkg.sv tb/tb_ocaml_fpga_top.sv \
          --top-module tb_ocaml_fpga_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_ocaml_fpga_top` | The whole chip at default sizes. The default program runs while button1 is pressed at random, and the example circuits replay their traces. It counts collections, each external function, raise, RESTART, tail calls, suspension ticks, each LED, exec results, parallel gcd activity and the state machine, and fails if any count is zero. It takes about 10 s. |
| `tb_reactive_main` | The LED rules in every tick and the frozen pc under button1. It also checks that the program saw button2, and the final 42. |
| `tb_ocaml_vm` | The default program with 1000-word semi-spaces, which gives 33 collections. It checks the globals the program leaves, `busy` dropping once per instruction, and suspension. |
| `tb_vm_workloads` | The workload program at default sizes: map2 with the gcd external function, filter, length, tak 18 12 6 = 7, gcd 2000 7 in bytecode against the external function, iterated composition, a 200-key search tree checked node by node in memory, a sharing filter whose result is checked to reuse the original cells, the 8 queens count (92) against a software count, and sixteen gcd calls in bytecode against the parallel gcd, which must be over 1000 times faster. The number of tak calls is checked against a software count. |
| `tb_vm_interp` | A second program of 249 words covering arithmetic, comparisons, branches, SWITCH, blocks, vectors, references and a re-raised exception. 22 results are checked against hand-computed values. |
| `tb_vm_gc` | 40 random heaps with sharing, cycles, raw blocks, outside pointers and garbage. Old and new graphs are compared in both copy directions. It checks the free pointer and that there are no stray writes. |
| `tb_vm_external_call`, `tb_gcd_glue`, `tb_gcd_parallel`, `tb_list_length` | Results and latencies against software models. |
| `tb_vm_ram`, `tb_vm_code_rom`, `tb_vm_init_data` | Memory latency, enable freeze, image loading and the global-data layout. |
| example testbenches | The published traces, exhaustive adders, and random inputs against models. |

Testbenches may shrink memory sizes through parameters to stay fast. `tb_ocaml_fpga_top` uses no
overrides.
