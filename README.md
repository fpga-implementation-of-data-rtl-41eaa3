# Data-flow-graph task processor for recursive DSP filters

A recursive DSP algorithm, such as an IIR or wave-digital filter, can be drawn as a data-flow
graph (DFG). Each node is an addition or a multiplication by a constant. Some edges carry
delays: they use a value computed one or more iterations (samples) earlier. This design does
not turn each DFG into its own datapath. Software does the graph work once, before run time:

- It breaks every delayed edge, so the graph becomes acyclic.
- It orders the nodes so that each comes after the nodes it depends on.
- It merges each multiply that feeds an add into one compound multiply-add task.

The result is a short **task queue**, one 41-bit instruction per task. The hardware here is a
general pipelined processor for such queues. It fetches the tasks of one iteration in order
and checks at run time whether each task's operands exist yet. It hands a task to a processing
element (PE) as soon as both operands are present. Then it ages its store of results by one
iteration, takes a new input sample, and runs the queue again. Loading a different queue gives
a different filter; the hardware stays the same.

There are two variants, both instantiated by `dfg_top`:

- **serial** (`serial_system`): one PE, fed through a four-stage execution array.
- **parallel** (`parallel_system`): four lanes, each with its own instruction buffer,
  execution stage and PE. The lanes share the memory, the state table and the function buffer.

## The task instruction

Each task is one 41-bit word (`dfg_pkg::instr_t`):

| bits    | field        | meaning |
|---------|--------------|---------|
| [40:25] | `factor`     | 16-bit constant used by the multiply |
| [24:19] | `op1_id`     | ID of the task that produces operand 1 |
| [18:13] | `op2_id`     | ID of the task that produces operand 2 |
| [12:7]  | `task_id`    | this task's ID, which names its result |
| [6]     | `last_task`  | set on the last task of the queue |
| [5:4]   | `opcode`     | 00 add, 01 multiply, 10 multiply-add, 11 add |
| [3:2]   | `op1_iter`   | how many iterations ago operand 1 was produced (0 = this one) |
| [1:0]   | `op2_iter`   | the same for operand 2 |

Operations on signed Q8.8 numbers, with two's-complement wrap-around:

- `ADD`: `op1 + op2`
- `MUL`: `op1 * factor`
- `MAC`: `op1 * factor + op2`

The product is rounded toward minus infinity: it is shifted right by 8 bits.

IDs are 6 bits, so 64 names exist. Two are reserved:

- ID 0 means "no value". It appears on buses that carry nothing.
- ID 63 is the input stream. Its entry for "this iteration" holds the current sample.

A queue can therefore hold at most 62 tasks, with IDs 1 to 62. Within one iteration, a task
may use a result of the current iteration only if that result comes earlier in the queue.
It may use any result of iterations 1, 2 or 3 back.

## How an operand finds its value

This is the core of the design, and the part that needs care. Each operand reference is a
pair (ID, iteration). Its value can reach the waiting task by three routes.

**State table** (`state_table`). It holds one bit per ID: "this task's result already exists
in the current iteration". When a task leaves its instruction buffer, the table looks up both
operands. For each one it answers with the pair (ID, iteration) if the value is known, or
with ID 0 if it is not. A value is known when:

- it belongs to an earlier iteration, or
- it is the input stream, or
- its bit is set.

A bit is set in the cycle after the result appears on an ALU result bus. The whole table is
cleared at the end of each iteration and by the load sweep. The answer is registered.

**Multiway function buffer** (`multiway_function_buffer`). It holds a 64-bit word per ID,
which is four 16-bit slots. Slot *k* holds the value from *k* iterations ago; slot 0 is at
bits [63:48]. It turns each state-table answer (ID, iteration) into a `Src` word
{ID, iteration, value}, or into all zeros when the answer was 0. `Src` is registered, so the
value reaches the execution array two cycles after the task left its buffer. Every ALU
result is written into slot 0 of its ID.

**Capture in the execution array** (`execution_array`). Every stage compares both operand
references of its task with every bus, every cycle. An operand is taken:

- from an ALU result bus when the IDs match and the operand's iteration is 0. Results on the
  bus always belong to the current iteration.
- from a `Src` word when both the ID and the iteration match.

Once taken, a value stays with the task. A flag marks it present, so a true zero is not
mistaken for "missing".

Why this loses no result: a value either existed when the state table was read, and comes
back on `Src`, or it appears on an ALU bus later. The stages watch the ALU buses from the
cycle the task enters the array. A task also compares itself with the ALU results of the
cycle in which it enters, because its lookup cannot see those yet. In the parallel system
every lane watches all four ALU buses and its own two `Src` words.

**Issue.** The stage nearest the PE (EA1) hands its task to the PE when:

- both needed operands are present (`MUL` needs only operand 1), and
- the PE is ready.

That hand-over is the *Ready* event. It frees EA1, and the whole array moves forward by one
stage. The array is elastic: a task moves ahead whenever the stage in front is empty or is
moving itself. So the first four tasks of an iteration fill the array without waiting for the
PE, and a bubble never sits between two tasks. In the serial system the tasks therefore
start in strict queue order. The queue's ordering makes that deadlock-free: each task's
current-iteration operands come from tasks ahead of it.

## Processing element

`processing_element` runs one task at a time. Each operation takes a fixed number of cycles:

| operation | cycles | how |
|-----------|--------|-----|
| `ADD`     | 1      | a one-stage adder |
| `MUL`     | 3      | a three-stage multiplier |
| `MAC`     | 4      | the multiplier followed by the adder |

`alu_ready` is high while the PE is idle, and also in the cycle that shows a result. So the
next task can start right behind the last one.

The result appears for one cycle on `alu_result`, a 23-bit word {last_task, ID, value}. The
state table, the function buffer and every execution stage read it. The PE is not pipelined
across tasks: a task that needs the result just before it could not use an overlap anyway.

## Fetching: address generator, memory and instruction buffers

The address generator (`address_generator`) counts through the main memory (`main_memory`).
It steps by 1 in the serial system and by 4 in the parallel one.

The memory read is registered. With four ports, port *k* reads address + *k*, so task 4m+k
goes to lane *k*. Each lane has a FIFO instruction buffer (`instruction_buffer`, depth 4).

When a buffer is empty, an arriving task passes straight through to the buffer's output in
the cycle it arrives. If the execution array takes it then, it is never stored. So at the
start of an iteration, while the array has free stages, the first tasks go directly from
the memory to the array. Only tasks that must wait are queued.

Fetching stops in three cases:

- **A buffer is nearly full.** `Buffer_full` is raised at three entries. That leaves room for
  the word still coming out of the registered memory.
- **The fetched word carries `last_task`.** In the parallel system, the lanes after the one
  holding the last task are masked off for that fetch.
- **The run has not started.**

Fetching restarts from address 0 at each new iteration.

## End of an iteration

The function buffer raises `Rb` and the state table raises `Rd` when both hold:

- a result with `last_task` set has been seen, and
- all lanes are idle. That means every instruction buffer and execution stage is empty,
  every PE is ready, no memory word is in flight, fetching has finished, and no result is on
  any ALU bus in this cycle.

When `Rd & Rb` is high, in one clock edge:

- the address returns to 0;
- the state table, the instruction buffers and the execution array are cleared;
- the function buffer ages: every slot moves one iteration older, slot 3 is dropped and
  slot 0 is cleared;
- the input entry's slot 0 takes the new sample (`sample_take` is high in that cycle);
- the registered state-table and `Src` answers still in flight are dropped, since their
  iteration numbers would be one off.

Waiting for idle lanes, not only for the last task's result, matters in the parallel system.
There the last task in the queue need not be the last one to finish. A PE counts as ready in
the cycle it shows its result. So without the "no result on a bus" term, the iteration could
end in that cycle, and the function buffer would drop the result. The elliptic filter below
triggers exactly this case.

## Run protocol

1. Hold `rw = 1` for 64 cycles. Present instruction *a* on `data_in` in cycle *a*, and the
   starting function-buffer word of ID *a* on `data_buffer`. The same address sweep clears
   the state table. Unused words must be zero, except that the last task must carry
   `last_task`.
2. Drop `rw` and pulse `reset_addr` for one cycle. That starts the run, and the function
   buffer takes the first sample from `sample_in` (`sample_take` is high).
3. Every task result appears once per iteration on `alu_result`. `iter_done` pulses at each
   iteration end, and `sample_in` is read again then.

`dfg_top` simply puts one serial system (`s_*` ports) and one four-lane parallel system
(`p_*` ports) side by side. `buffer_full` and `ea_waiting` are status outputs: a buffer is
full, or a task waits in the array for an operand.

## Measured behaviour

These are clock cycles from the start pulse to the fifth `iter_done`, from `tb_dfg_top`. Both
systems ran the same programs. The 13-, 14- and 26-task programs are random
dependency-ordered queues with the task counts of the lattice, Jaumann and elliptic filters.

| program                            | tasks | serial | parallel |
|------------------------------------|-------|--------|----------|
| second-order IIR (4 multiply-adds) | 4     | 114    | 104      |
| lattice-size                       | 14    | 224    | 114      |
| Jaumann-size                       | 13    | 199    | 94       |
| elliptic-size                      | 26    | 319    | 174      |
| full memory                        | 62    | 909    | 294      |

The IIR gains little from four lanes, because its four tasks form one dependency chain.

Latency from the end of one iteration to the first result of the next is checked exactly.
The first task always starts at once, because it can only use older values and the input.
The latency has these parts:

- 1 cycle to fetch;
- 1 cycle for the memory read;
- 0 cycles in the empty instruction buffer, thanks to the pass-through;
- max(STAGES, 2) cycles until issue: the array's stages, or the 2-cycle table and buffer
  lookup if that is longer;
- the PE latency.

That gives 6 + PE latency in the serial system and 4 + PE latency in a parallel lane.

The four published filter graphs were also run, for 8 iterations each, by
`tb_filter_workloads`:

| filter                          | nodes | tasks | serial | parallel |
|---------------------------------|-------|-------|--------|----------|
| second-order IIR                | 8     | 4     | 183    | 167      |
| all-pole lattice                | 15    | 14    | 311    | 199      |
| fourth-order Jaumann wave       | 17+in | 13    | 255    | 135      |
| fifth-order wave elliptic       | 35    | 26    | 455    | 279      |

## The filter graphs and their compilation

`tb/dfg_tb_pkg.sv` describes each filter node by node. Each node is an adder or a
constant multiplier, and its operands are (node, delay) pairs. Node 0 is the input stream.

Each filter comes with its published grouping into tasks. A group is one node, or a
multiplier merged with the adder it feeds. A multiplier whose value is also needed elsewhere
appears twice: once alone and once merged.

`compile_graph` turns graph plus grouping into a task queue:

- A node's value comes from the task whose last node it is.
- A merged pair becomes `MAC(input of the multiplier, constant, other input of the adder)`.
- It reports an error for a current-iteration operand that is produced later in the queue.
- It reports an error for a delay beyond three iterations.
- It reports an error for a merge that is not multiply-then-add.

`eval_graph` computes every node directly, iteration by iteration. The testbench checks each
task result from the hardware against the value of the task's last node.

The graphs are a reading of published drawings:

- Where an adder is drawn with only one input (lattice nodes 1 and 3), the input stream is
  its second operand.
- A line that fans out to several arrowheads is read as one source feeding them all, and a
  delay mark applies to the branches after it.
- The coefficients are random.
- The published groupings compile without an ordering or merge error under this reading.
  That is a good sign that the reading is right, but it is not proof.

So these runs test the processor on the real structure, with its sizes, merges, duplicated
multipliers and delays of one and two iterations. They do not test the filters' frequency
responses.

## Departures from the published design

- **End of iteration.** The published design ends an iteration on the last task's result.
  This design also waits until all lanes are idle (see above).
- **One task at a time per PE.** The published text says both that one task runs per clock
  cycle and that a new task starts when the previous one is done. This design follows the
  second reading.
- **First four tasks.** The published buffer passes exactly the first four tasks of an
  iteration straight to the execution array, and special registers let them move up without
  a Ready event. Here the elastic array and the buffer's pass-through give the same effect
  without counting tasks. Any task that meets an empty buffer and a free array passes
  straight through.
- **Invented details.** These are not given in the published design:
  - the number format (Q8.8);
  - the meaning of opcode 11;
  - the operand-present flags;
  - the reserved IDs 0 and 63;
  - the registered memory, table and buffer outputs;
  - the four-entry buffer depth.
- **No vendor IP.** The published PE uses vendor multiplier and adder cores. Here they are
  plain RTL with the same latencies.
- **Parallel lane assignment.** The published parallel function buffer is drawn with two
  different multiplexer orders for its two outputs. This design uses the same order for
  both. Task 4m+k always runs in lane k.
- **Only the 64-instruction size.** The published design is also sized for 128 to 512
  instructions. The 41-bit format's 6-bit IDs cannot name more than 64 tasks, so only the
  64-entry size is built.
- **No scheduler software.** The published node-ordering and task-merging steps run in
  software before run time and are not part of this RTL. For the four filters, the testbench
  package takes the published groupings as given and only compiles them into instructions.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`:

- **Units.** The state table, function buffer, instruction buffer, memory, address generator,
  PE and execution array are each checked against a behavioural model under random traffic.
- **Systems.** `tb_serial_system` and `tb_parallel_system` run several programs for six
  iterations:
  - the IIR filter;
  - random dependency-ordered queues of 13 to 62 tasks, with random opcodes, constants,
    operand IDs and iteration distances;
  - the compiled elliptic filter graph.

  Every result is compared with an interpreter (`dfg_tb_pkg::reference`). The serial
  testbench also checks that results come out in queue order.
- **Filters.** `tb_filter_workloads` runs the IIR, lattice, Jaumann and elliptic graphs on
  both systems. It checks them against the direct graph evaluation, as described above.
- **Top.** `tb_dfg_top` runs both systems at the default sizes. It checks the IIR output
  against the filter's difference equations, written directly. It counts each mechanism:
  - buffer-full stalls;
  - operand waits;
  - iteration ends;
  - sample takes;
  - multiply-adds;
  - operands from older iterations;
  - parallel runs finishing sooner than serial ones.
  - tasks passing straight through an empty instruction buffer.

What was not checked: the filters' true coefficients, since only their structure is used,
and any timing on an FPGA.

## Simulating with Verilator

From the top directory, build and run any testbench, for example the top one:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dfg_pkg.sv tb/dfg_tb_pkg.sv tb/tb_dfg_top.sv --top-module tb_dfg_top -o sim
./obj_dir/sim
```

Use `-Irtl` alone and leave out `tb/dfg_tb_pkg.sv` for unit testbenches that do not import
it. Verilator finds the other modules by file name. Each run ends with a `TB_RESULT` line
and has a watchdog.

## Files

- `rtl/dfg_pkg.sv`: widths, the instruction and bus types, and the fixed-point multiply.
- `rtl/processing_element.sv`, `address_generator.sv`, `main_memory.sv`,
  `instruction_buffer.sv`, `state_table.sv`, `multiway_function_buffer.sv`,
  `execution_array.sv`: the units. Each takes a `LANES` or `STAGES` parameter where the two
  systems differ.
- `rtl/serial_system.sv`, `rtl/parallel_system.sv`, `rtl/dfg_top.sv`: the two systems and the
  top.
- `tb/`: the testbenches and `dfg_tb_pkg.sv`. The package holds the instruction builder, the
  IIR program, the random program generator, the reference interpreter, the four filter
  graphs, the graph compiler and the graph evaluator.
