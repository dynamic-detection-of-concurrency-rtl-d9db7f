# A concurrency-detecting DEL machine

This machine runs an ordinary serial program and executes, every clock cycle,
every instruction whose inputs are ready. The program is written in a
*directly executed language* (DEL): an instruction set that mirrors a
high-level language one statement per instruction. `C := A + B` is one
instruction that names A, B and C and the operator `+`. The compiler marks no
parallelism. The hardware finds it at run time.

It does this with one counter per instruction instead of a scoreboard or
reservation stations. Loops and branches are handled by bookkeeping on those
counters. No instruction is executed on a guess. An instruction runs only once
it is certain to run, and then it runs as early as its data and control
dependencies allow. The rules are tested against a serial interpreter: on 200
random looping programs, concurrent execution leaves exactly the same variable
values as running one instruction at a time.

## The instruction stream

An instruction is a bit-packed record. It is not word aligned, and its fields
are packed LSB first:

| kind       | fields |
|------------|--------|
| assignment | format (5) · operand 1 · [operand 2] · [operand 3] · operator (4) |
| branch     | format (5) · [operand 1] · [operand 2] · operator (4) · destination (13, IM bit address) |

- **Format.** The format has three characters: left source, right source and
  result. `A`, `B` and `C` point at the first, second and third operand field.
  `S`, `T` and `U` point at the evaluation stack (above the top, the top, and
  under the top). `-` means the slot is unused. So `ABA` encodes `x := x + y`
  with two operand fields.
- **Operand fields.** The number of operand fields is the highest of A, B and C
  that the format uses.
- **Branch formats.** A branch format also says whether the branch is taken
  when its test is true or when it is false.
- **Operand width.** Each operand is a displacement of `opnd_w` bits, which is
  ⌈log2 V⌉ for a procedure with V variables. The width is fixed for the whole
  procedure.

The numbering of the 5-bit format codes is this design's own (`del_pkg::fmt_decode`):

| code | format | code | format |
|------|--------|------|--------|
| 0 | `ABC` | 8 | `-TA` (pop) |
| 1 | `ABA` | 9 | `UTU` |
| 2 | `ABB` | 10 | `ATT` |
| 3 | `AAB` | 16 / 17 | `AB-` branch, taken when true / false |
| 4 | `BAA` | 18 / 19 | `BA-` branch, taken when true / false |
| 5 | `-AB` | 20 | `---` unconditional GO TO |
| 6 | `-AA` | 21 | `UT-` branch, taken when true |
| 7 | `-AS` (push) | others | invalid |

The operators are also this design's own choice, 4 bits wide:
- MOVE (the result is the right source);
- `+`, `-`, `*`, AND, OR, XOR and negate;
- the six signed comparisons, which give 1 or 0;
- constant-true, used by the unconditional GO TO.

### Variables and the contour

All scalar variables, and also the literals a program uses, live in the
*contour*, a 64-word memory of 16-bit words. An operand's contour address is
the *environment pointer* (the base of the current procedure) plus its
displacement. The loader does this addition once, while it loads the program.
The host presets the literals as ordinary contour words.

## Loading: the instruction queue

`queue_loader` reads one procedure from the instruction memory. It reads one
field per clock and writes each instruction as one line of the *instruction
queue*:

| field | content |
|-------|---------|
| `addr` | IM word address of the instruction, or 0 when it does not start on a word boundary |
| `start` | full IM bit address, used to find branch destinations |
| `sink`, `src1`, `src2` | a contour address, the stack code (S/T/U), or none |
| `branch` | the destination IM address (branches only) |
| `mpb` | the *most previous branch*: the line of the nearest branch above this line, or none |
| `op`, `is_branch`, `sense` | operator and branch type |
| `dest_idx` | the queue line where the destination instruction starts |

After the last instruction, the loader resolves each branch destination to a
queue line, one line per clock. A destination that matches no instruction means
the end of the procedure.

A procedure must fit in the queue: 8 lines by default. Loading reports `error`:
- for an unknown format;
- for an operand width of 0 or above 6;
- for more instructions than the queue has lines.

## The concurrency structures

This part is the core of the design. It is easiest to follow with the picture
that the whole procedure is the body of a loop which runs `b` times.

- **`b`, the to-be-executed element.** This is the number of iterations the
  procedure is to run. It starts at 1 and grows by one each time a backward
  branch is taken.
- **`c[i]`, the execution element.** This is the number of iterations that line
  i has completed. An iteration is completed either by executing the line or by
  learning that the line is skipped in that iteration. The task is finished
  when every `c[i] = b`.
- **`ae[i]`, the advanced execution row.** This is a short bit vector of
  iterations *beyond* `c[i]` that are already settled. Bit k-1 stands for
  iteration `c[i]+k`. A branch can settle a line's future iteration before the
  line has finished its current one, and this row records that. After every
  update, the leading ones of the row are folded into the counter (the row
  shifts toward bit 0 and `c` grows by one per bit). So bit 0 of a stored row
  is always 0. Example: `c = 5`, `ae = 0100`. Executing iteration 6 sets bit 0,
  giving `1100`. Folding gives `c = 7`, `ae = 0000`.

`exec_state` holds these structures and performs the folding for every line in
one clock.

### When a line may execute

Line i may execute iteration `n = c[i] + 1` only when `n ≤ b`. In addition
(`indep_detector`):

- every line j above it that shares data with it has `c[j] ≥ n`. Sharing data
  means that one line writes what the other reads or writes. The earlier
  instruction of the same iteration must go first.
- every line j below it that shares data has `c[j] ≥ n - 1`. The later
  instruction must have finished the previous iteration.
- its most previous branch has `c[mpb] ≥ n`. The branch that decides whether
  this line runs in iteration n has already decided.

Every condition compares two counters. The test for all lines together is
therefore an array of counter comparators, with no per-register state.

### Branches as virtual execution

A branch that is not taken counts as an ordinary execution. A taken branch on
line i, running iteration n, does the following (`branch_update`):

- **Forward to line d.** Every line strictly between i and d is marked as done
  in iteration n. The mark is AE bit `n - c[j] - 1`.
- **Backward to line d ≤ i.** First, `b` grows by one. Lines above the loop
  (j < d) are marked done in the new iteration `b+1`, so only the loop body
  really runs it. Lines below the branch (j > i) are marked done in iteration
  n. This means they run only once, in the last iteration, after the loop has
  finished.

A mark can land past the end of the AE row. This happens when a line above a
loop lags several iterations behind a fast loop. In that case the branch is not
executed that cycle and waits until the lagging line catches up. This is an
**AE stall**. A longer AE row gives more overlap for more flip-flops. The
default length is 4.

### One branch per cycle is enough

A later branch depends on every earlier branch of the same iteration through
its MPB chain. `b` only grows after the last branch of an iteration has run. So
in any cycle, at most one branch can be independent, and every branch that
executes runs iteration `b` (its `c` is `b - 1`). The engine therefore has a
single branch-update unit. Assertions check both properties in simulation.

## The machine cycle

`conc_engine` runs one machine cycle per clock:
1. Test every line for independence.
2. Read the sources of every line from the contour. Every line has its own
   operator unit (`del_alu`) and two read ports, so all independent assignments
   execute together and write their results at the clock edge.
3. Evaluate the independent branch, if there is one, and merge its marks.
4. Set AE bit 0 for each line that executed, then fold the rows into `c`.

The dependency rules guarantee that no two lines write the same contour word,
or read a word another line writes, in one cycle. The contour asserts the first
of these.

The engine raises `done` one clock after the last execution. It stops early and
raises `stuck` if the evaluation stack overflows or underflows. It also raises
`stuck` if lines are still pending but none can execute. The rules should make
that impossible, so it acts only as a safety stop.

### The evaluation stack

`T` is the top of the stack, `U` the element under it, and `S` the free place
above the top. A format always names these places as the stack stands *before*
the instruction runs. The stack operands that an instruction reads are consumed.
A result whose sink is on the stack becomes the new top. So each stack
instruction pops 0, 1 or 2 elements (the deepest place it reads) and then may
push one. Some examples:
- `-AS` pushes a variable;
- `-TA` pops the top into a variable;
- `ATT` replaces the top with `A op top`;
- `UTU` replaces the top two elements with `under op top`;
- the branch `UT-` pops two elements and tests them.

The stack contents depend on the order in which instructions run. So the
detector treats *every* stack reference as a reference to one shared variable,
and a stack read counts as a write, since it pops. Any two stack instructions
are therefore dependent. The usual rules then run them in program order,
iteration by iteration. Two dependent lines are never independent in the same
cycle. So at most one stack operation happens per cycle, and a single pop/push
port (`eval_stack`) is enough. An assertion checks this. Instructions that do
not touch the stack still run beside the stack instructions.

The stack holds 16 elements. It is emptied at every `start`. A pop from an
empty stack, or a push onto a full one, is not carried out. Instead the stack
sets a sticky error, and the engine stops with `stuck` at the next clock.

### Worked example

Variables I and J, with the literals 0, 1 and 2 in the contour:

```
1 I = 0             5 IF J < 2 GO TO 7
2 J = 0             6 I = I + 1
3 I = I + 1         7 IF J /= 2 GO TO 4     (encoded as "J = 2, taken when false")
4 J = J + 1
```

| cycle | executes | effect |
|------:|----------|--------|
| 1 | 1, 2 | |
| 2 | 3, 4 | |
| 3 | 5 (taken, forward) | 6 skipped in iteration 1 |
| 4 | 7 (taken, backward) | b = 2; 1–3 done in iteration 2 |
| 5 | 4 | |
| 6 | 5 (not taken) | |
| 7 | 6, 7 (7 not taken) | all c = b = 2; I = 2, J = 2 |

A serial machine needs 10 instruction executions for this program. Here they
fit in 7 cycles.

## Using `del_machine`

Parameters: `DEPTH`, the queue lines (default 8), and `AE`, the AE row length
(default 4, at least 2). All other sizes are in `del_pkg`:
- 16-bit data and counters;
- a 64-word contour with 6-bit addresses;
- a 256 × 32-bit instruction memory, giving 13-bit IM bit addresses;
- a 16-element evaluation stack;
- displacements of at most 6 bits.

1. With the machine idle, write the program with `im_we/im_waddr/im_wdata`.
   Preset the variables and literals with `ct_we/ct_addr/ct_wdata`.
2. Pulse `start` with `start_addr` (the IM bit address), `n_instr`, `env_ptr`
   and `opnd_w`. The queue is cleared at once. `load_busy` stays high while the
   loader reads the program (about 3 to 5 clocks per instruction) and then
   resolves the destinations (one clock per instruction).
3. The engine starts by itself. `running` is high for one clock per machine
   cycle, plus one clock at the end. Then `done` (or `stuck`) stays high until
   the next task.
4. Read results through `ct_addr` / `ct_rdata`. The read is asynchronous.

Observation outputs:
- `q_lines` and `q_count`: the queue;
- `c_vec`, `ae_mat` and `b_elem`: the concurrency structures;
- `stk_depth`: the number of elements on the evaluation stack;
- `stack_lines`: the pending lines that use the stack;
- `exec_vec` and `skip_vec`: which lines execute or receive a virtual mark
  this cycle;
- event counters (`n_cycles`, `n_exec`, `n_fwd`, `n_bwd`, `n_nottaken`,
  `n_ae_stall`, `n_multi`, `n_virtual`). They restart with each task.

Reset is asynchronous and active low.

## What is modelled and what is chosen here

These parts follow the model:
- the queue fields, including the MPB rule;
- the data-dependency conditions;
- the independence test;
- the C / AE / b structures and their update;
- the forward and backward branch rules;
- contour addressing through an environment pointer;
- running until every counter equals `b`;
- the meaning of `S`, `T` and `U`.

These parts are this design's own:
- all widths and memory sizes, the queue depth and the AE length (4, the length
  of the vectors in the model's examples);
- the format and operator numbering, and the bit order of the instruction
  stream;
- keeping each line's full start address so that any instruction can be a
  branch target;
- one field per clock in the loader;
- one clock per machine cycle;
- the AE stall policy;
- `stuck` detection;
- how the evaluation stack takes part in dependency detection (one shared
  variable), that reads pop it, its depth, and its error handling.

Departures and limits:
- **Evaluation stack ordering.** The model gives no rule for how stack
  references take part in dependency detection. Here all stack instructions run
  in program order. This is safe, but it gives no concurrency among the stack
  instructions themselves.
- **Literals** are ordinary contour words that the host presets.
- **MOVE** copies the right source, because the format `-AB` leaves the left
  source empty.
- **Single procedure.** Only one procedure is loaded and run per `start`. The
  queue is not refilled while it runs, and procedure calls are not modelled.
- **Counter overflow.** `c` and `b` are 16 bits, so a loop may run at most
  65 535 iterations.

## Simulating

Testbenches are in `tb/`. `del_asm_pkg` is a small assembler with a serial
reference interpreter, used by the system-level testbenches. Each testbench
prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|-----------|---------------|
| `tb_del_machine_full` | the worked example at default sizes: the queue fields, the per-cycle schedule above, C and b after the branches, the final values |
| `tb_del_machine` | end to end, compared with serial execution: the worked example, a GO TO into a loop, a loop with code before and after it, a dependency chain in front of a fast loop (AE stall on an `AE = 2` instance), two loops that compute through the stack, 200 random looping programs with stack instructions (those whose serial run overflows or underflows the stack must stop with `stuck`), a pop from an empty stack, an invalid format |
| `tb_conc_engine` | the engine with hand-built queues, including the schedule of a stack program beside an independent line |
| `tb_eval_stack` | push, pop and replace operations, overflow, underflow and clear, against a queue model |
| `tb_queue_loader` | 300 random programs of every format, operand width and alignment |
| `tb_indep_detector`, `tb_branch_update`, `tb_exec_state` | the rules, against models written directly from the definitions above |
| `tb_del_alu`, `tb_contour`, `tb_instr_queue`, `tb_instr_mem` | the storage and operator blocks |

The detector, engine and top-level tests cover every mechanism described above
at least once, and count each one:
- several instructions in one cycle;
- forward, backward and not-taken branches;
- virtual execution;
- AE stall;
- stack operations;
- stack errors;
- load errors.
The random end-to-end programs give the strongest evidence: the final contents
of the contour must equal those of a plain serial run.

For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/del_pkg.sv tb/del_asm_pkg.sv rtl/*.sv tb/tb_del_machine.sv \
  --top-module tb_del_machine
./obj_dir/Vtb_del_machine
```

`rtl/del_pkg.sv` must come before the other files. Each module is in a file of
its own name.
