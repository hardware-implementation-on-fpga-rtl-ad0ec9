# MP-Tomasulo: a hardware out-of-order scheduler for tasks

This design is the Tomasulo algorithm moved up from instructions to tasks. A
processor hands it a sequential stream of tasks, called *sub-flows*. Each
sub-flow has a type, a set of variables it writes and a set it reads. The
scheduler sends each one to a processing element (PE) able to run it: a
fixed-function IP core or a general-purpose processor (GPP). A sub-flow starts
as soon as its inputs exist, so independent work overlaps.

Only true dependences (read-after-write, RAW) delay a sub-flow.
Write-after-write (WAW) and write-after-read (WAR) conflicts are removed by
renaming. Each consumer waits for one particular producer, not for "the
variable". Memory is written only when sub-flows retire in program order. The
programmer sees sequential semantics: the final memory contents, and the
order in which memory is written, are those of running the tasks one after
another.

The RTL is a (4,4)-channel scheduler, meaning 4 IP cores and 4 GPPs. It is
written in SystemVerilog and is synthesizable. The PEs, the system memory and
the issuing processor are outside it and connect through ports.

## The sub-flow

A variable is a 32-bit value named by an 8-bit ID, so there are 256 of them.
A sub-flow has up to 8 outputs and up to 8 inputs. An in/out parameter is
listed in both sets. The issuing processor writes a sub-flow into the scheduler as
32-bit words:

| word | contents |
|------|----------|
| start | `{START_TAG (16'h5F10), 8'h00, type[7:0]}` |
| out_num | number of outputs, 0..8 |
| in_num | number of inputs, 0..8 |
| out_num words | write-set variable IDs (bits 7:0) |
| in_num words | read-set variable IDs (bits 7:0) |
| end | `END_FLAG` (32'hE0F10E0D) |

The words carry variable IDs, not values. The scheduler fetches values itself
when it issues the sub-flow, so it always sees the newest value. A word that
breaks this format is dropped and counted in `frame_errors`. The constants are
in `rtl/mpt_pkg.sv`.

## Blocks

```
 issuing CPU ──► Dataflow FIFO ──► Dataflow Mapper ◄──── Interrupt Controller ◄── PE irqs
                                   │  │  │   │
                   Variable Set ◄──┘  │  │   └──► system memory (operand reads, in-order write-back)
                  Ordering Unit ◄─────┘  │
                                         ▼
                       Map Table 0..7 (one per PE) ──► PE task ports
```

| block | file | what it holds / does |
|-------|------|----------------------|
| Dataflow FIFO (DF) | `dataflow_fifo.sv` | 64 x 32-bit queue of sub-flow words; `df_not_full` towards the CPU, first-word fall-through towards the mapper. |
| Variable Set (VS) | `variable_set.sv` | 256 entries, one per variable. Each is free (the newest value is in memory) or holds the 6-bit Ordering Unit entry of the in-flight sub-flow that will produce the newest value. This is the rename table. |
| Ordering Unit (OU) | `ordering_unit.sv` | 64 entries in issue order, each one an in-flight sub-flow: its write-set IDs, a done flag and a 256-bit result row (8 x 32). The entry number is the sub-flow's tag everywhere else. |
| Map Table (MT) | `map_table.sv` | One per PE, 4 entries each: a reservation station. Each entry has the OU tag, 8 x 9-bit read-set status `{var_id, prepared}` and 8 x 32-bit values. |
| Interrupt Controller (ICtr) | `interrupt_controller.sv` | Chooses one finished PE at a time: the lowest PE number wins (IP cores are numbered first). No nesting. |
| Dataflow Mapper (DM) | `dataflow_mapper.sv` | The control FSM. It parses, maps, renames, serves interrupts, broadcasts results and retires. It holds Head/Tail of the OU, the per-MT 3-bit occupancy counters and the IP-core type decoder. |
| top | `hw_scheduler.sv` | Wires the blocks together. |
| types | `mpt_pkg.sv` | Widths, word format, `task_t`, `result_t`, `rs_status_t`. |

## How renaming works

This is the part to understand. Everything else is bookkeeping around it.

**Issue.** The mapper has parsed a sub-flow and picked a PE. It allocates the
OU entry at Tail, call it `t`, and a free entry in that PE's Map Table. Then
it resolves each input variable `v` through the VS:

* **VS[v] free:** no sub-flow in flight writes `v`. The mapper reads memory
  (one cycle) and writes the value into the MT slot, marked *prepared*.
* **VS[v] = o, and OU entry `o` is done:** the producer has finished but has
  not retired yet. The value is taken from `o`'s result row. The OU lookup
  port finds which slot of `o` wrote `v`.
* **VS[v] = o, and `o` still runs:** the slot is marked *not prepared*, and
  its value field holds `o`. This is the dependence edge.

Only after all inputs are resolved does the mapper point `VS[w] = t` for each
output `w`. A sub-flow that both reads and writes `w` therefore reads the
*previous* producer. Last, the MT entry is committed and Tail advances.

**Why WAW and WAR disappear.**
* **WAR:** a later writer of `v` never touches the value already captured in
  an earlier reader's MT slot. Nor does it touch the producer tag captured
  there.
* **WAW:** two writers of `v` in flight have different OU entries and
  different result rows. Consumers issued between them name the first writer;
  those issued later name the second.
* Memory receives both values in program order, so its final value is right.

**Completion.** A PE raises its interrupt and holds its `result_t` until
acknowledged. The result carries the OU tag and MT entry it was given. The
mapper takes the granted PE's result and:
1. writes the whole row into the OU entry and marks it done;
2. broadcasts `(tag, var, value)` for each output to all eight Map Tables,
   one per cycle. Every not-prepared slot whose `var_id` and tag match takes
   the value. If a sub-flow writes the same variable in two slots, only the
   later slot is broadcast, because that is the value a sequential run
   leaves;
3. frees the PE's MT entry, decrements that MT's counter and acknowledges.

A Map Table offers an entry to its PE once all eight slots are prepared
(unused slots are prepared from the start). If several entries are ready,
the lowest-numbered one goes first.

**Retirement.** When the OU head entry is done, its outputs are written to
memory in slot order, one per cycle. Each VS entry that still names the head
is freed, and Head advances. If the VS names a younger producer, it is left
alone: that is a WAW successor.

There is no reorder buffer and no speculation. Every sub-flow in the stream
will execute, so nothing is ever squashed. The OU exists only to order the
write-back.

## Mapping (Algorithm 2) and stalls

For a sub-flow of type `T`:
1. If an online IP core's decoder entry equals `T` and its MT has a free
   entry, the sub-flow goes there. The lowest-numbered such core is chosen.
2. Otherwise it goes to the GPP with the most free MT entries (lowest number
   on a tie). This also covers types that no IP core implements.
3. Otherwise the sub-flow stays *pending* and `mt_full` is high. A full OU
   also leaves it pending. While a sub-flow is pending, the mapper keeps
   serving interrupts and retiring. That is what guarantees progress.

The mapper's FSM serves, in priority order: a granted interrupt, then
retirement of a done OU head, then the pending sub-flow, then a new
sub-flow. It does one job at a time, and this is why no VS, OU or MT update
can race another. A sub-flow's words are parsed without interruption once
its start word is taken.

### Run-time reconfiguration

IP cores can be swapped by partial reconfiguration. The scheduler's part of
that:
1. `rcfg_offline_en` with `rcfg_ip` makes the core look full, so nothing new
   is mapped to it.
2. `ip_drained[ip]` goes high once its Map Table is empty. The bitstream can
   then be replaced.
3. `rcfg_load_en` with `rcfg_type` writes the decoder entry and brings the
   core back online.

The decoder's reset contents are set by `IP_TYPE_INIT` (default: cores 0..3
serve types 1..4).

## Interfaces and timing

All blocks use one clock and an asynchronous active-low reset, `rst_n`.

* **Issuing CPU.** `df_wr_en`/`df_wr_data`, accepted when `df_not_full`.
* **PE p, task port.** `pe_task_valid[p]`/`pe_task[p]`/`pe_task_ready[p]` is
  a valid/ready handshake. `task_t` holds `ou_id`, `mt_entry`, `ttype`,
  `in_num` and `args[8]`.
* **PE p, completion.** The PE holds `pe_irq[p]` high with `pe_result[p]`
  (`ou_id`, `mt_entry`, `results[8]`) until `pe_irq_ack[p]` pulses. It
  returns the `ou_id` and `mt_entry` it was given.
* **Memory.** `mem_rd_en`/`mem_rd_addr` return `mem_rd_data` on the next
  cycle. `mem_wr_en`/`mem_wr_addr`/`mem_wr_data` write one variable per
  cycle, in program order.
* **Status.**
  * `sched_idle`: nothing is queued, pending or in flight. A kernel's closing
    synchronisation waits for this.
  * `pe_load[p]`: how many Map Table entries PE `p` holds (the mapper's
    occupancy counter).
  * `mt_full`
  * `frame_errors`

Cycle counts, measured from taking the start word:
* Issuing a sub-flow with `w` outputs and `r` inputs takes
  `(3 + w + r + 1) + 1 + 1 + 2r + w + 1` cycles: parse, map, allocate, two
  MT writes per input, one VS write per output, commit.
* A 1-input/1-output sub-flow reaches its PE's task port 12 cycles after its
  start word is taken. A 2-in/2-out sub-flow takes 17 cycles. The worst case,
  8-in/8-out, takes 47 cycles.
* Interrupt service takes `3 + out_num` cycles.
* Retirement takes `2 + out_num` cycles.

The testbenches check the 12- and 17-cycle figures. The original FPGA
prototype reports an average scheduling overhead of about 20 cycles.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_IP`, `N_GPP` | 4, 4 | channels, giving `N_PE` Map Tables |
| `DF_DEPTH` | 64 | Dataflow FIFO words |
| `OU_DEPTH` | 64 | Ordering Unit entries (at most 64: tags are 6 bits) |
| `VS_DEPTH` | 256 | variables (IDs are 8 bits) |
| `MT_ENTRIES` | 4 | entries per Map Table (the entry index is 2 bits) |
| `IP_TYPE_INIT` | {4,3,2,1} | decoder reset contents, IP core 0 in the low byte |

The defaults reproduce the published configuration: DF 64 x 32, VS 256 x 6,
OU 64 x 256, eight MTs of 4 entries. Widths that appear in the `task_t`,
`result_t` and MT address formats are package constants: 8/8 parameters,
32-bit values, 8-bit IDs, 6-bit tags.

## Where this RTL departs from the published design, and what it adds

* **VS free marker.** A free VS entry is a separate valid bit. The published
  design uses a reserved "N" code in the 6-bit field, but 6 bits are fully
  used by 64 OU tags.
* **Extra per-entry fields.** Each OU entry also stores its write-set IDs and
  `out_num`, needed to write back and free VS entries. Each MT entry also
  stores busy/committed/dispatched flags, the task type and `in_num`, beyond
  the published 334 bits.
* **Asynchronous reads.** VS, OU and MT are read asynchronously (distributed
  RAM style). The published design speaks of block RAM with controllers; its
  resource figures also show LUT RAM.
* **No task receiving queue.** Each PE holds its finished result until
  acknowledged, in place of a queue of finished tasks.
* **Taking an IP core offline** uses a flag. The published description loads
  the occupancy counter with the entry count, which would be corrupted by
  sub-flows still running on that core.
* **Own choices, where the description is silent:**
  * word format and where the type travels;
  * how operands are fetched (memory read or OU lookup at issue);
  * duplicate-output handling;
  * job priority inside the mapper;
  * the dispatch handshake and lowest-entry-first dispatch;
  * tie-breaking in the mapping;
  * the reset contents of the decoder;
  * the `sched_idle` output.
* **Not built.** The estimate-based mapping of the high-level model (finish
  time = waiting + execution + transfer, round-robin on ties) is not built.
  The hardware uses Algorithm 2 above. Nor are the PEs themselves (MicroBlaze
  processors, CC-DCT-Quant JPEG accelerators), the memory, the peripherals or
  the bitstream-loading mechanism. The testbenches model PEs and memory
  behaviourally.

## Verification

Each block has a self-checking testbench that ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_dataflow_fifo` | order against a queue model, full at exactly 64, drain |
| `tb_variable_set` | reset to free, random set/clear against a model |
| `tb_ordering_unit` | allocate / complete out of order / retire in order, lookup returns the last matching slot |
| `tb_map_table` | wake-up needs both the right variable and the right producer tag; dispatch only when all slots are prepared |
| `tb_interrupt_controller` | lowest request wins; a held grant is not pre-empted |
| `tb_dataflow_mapper` | Algorithm 2 decisions, `mt_full` pending and recovery, issue timing, framing errors, reconfiguration, in-order write-back of a RAW/WAW/WAR chain |
| `tb_hw_scheduler` | full default size; 400 random sub-flows, details below |
| `tb_table3_sequence` | an 11-task JPEG/IDCT/AES/DES sequence, details below |
| `tb_jpeg_flow` | the JPEG pipeline, details below |

`tb_hw_scheduler` runs the whole design at its default size. It issues 400
random sub-flows over a small variable pool, with 8 behavioural PEs of
random latency. It checks every memory write, in order and by value, against
a sequential reference, and then the final memory image. It also counts RAW
waits, broadcasts, WAW renames, WAR cases, operands from memory and from
finished OU entries, out-of-order completions, IP and GPP mapping, IP-to-GPP
spill, MT-full and OU-full stalls, simultaneous interrupts, a framing error,
and a live reconfiguration. It fails if any of these never happens.

`tb_table3_sequence` runs the 11-task sequence. It checks results, that the
WAR pair overlaps, and that the RAW pair is ordered. It prints the speed-up
over sequential execution: about 2.2x with its latencies.

`tb_jpeg_flow` runs the JPEG pipeline (colour convert/DCT/quantise on two IP
cores, Huffman on a GPP) on a (2,2)-channel instance. Every block reuses one
coefficient buffer. It prints about 1.9x over back-to-back execution, against
about 2.1x ideal for its latencies.

Shared testbench code lives in `tb/sched_tb_pkg.sv` (the PE work function and
start-word helper) and `tb/pe_model.sv` (the behavioural PE).

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/mpt_pkg.sv tb/sched_tb_pkg.sv tb/tb_hw_scheduler.sv --top-module tb_hw_scheduler
./obj_dir/Vtb_hw_scheduler
```

The full-size run takes well under a second. Assertions in the RTL cover:
* FIFO overflow and underflow;
* one-hot grants;
* that a granted PE is still requesting;
* allocation only into free MT entries;
* release only of dispatched entries;
* completion of an OU entry at most once;
* that an OU lookup always finds the variable it was sent for.

Synthesis of the default top gives about 12k flip-flops. Most of them are the
eight Map Tables, which are registers because they are searched in parallel
on every broadcast. The VS, the OU and the DF map to memories.
