# A partially shared thin reconfigurable array for a four-core processor

Coarse-grained reconfigurable arrays speed up a processor by running whole
stretches of its code as one spatial configuration. Each core of a multicore
processor can get a private array. But a private array sized for the best case
sits mostly idle, because few code sequences have enough parallelism to fill it.
This design gives each of four cores a *thin* reconfigurable column of only
three processing elements (PEs) and one load/store unit. When a core needs more
than three PEs in a cycle, it borrows PEs that the other cores' columns are not
using. Configurations are built as if every column had five PEs. The sharing
hardware decides, cycle by cycle, which physical PE runs each operation. An
operation that finds no free PE simply waits one cycle.

Configurations are made at run time by a binary translator per core, which
watches the MIPS instructions the core executes. No compiler support is needed.
They are kept in a configuration cache and replayed when the core's program
counter reaches their first instruction again.

```
 core 0..3 (5-stage MIPS, outside this RTL)
   |  executed instructions        |  fetch PC / stall / register file
   v                               v
 binary_translator --> config_cache <--> config_controller      (one set per core)
                                              | configuration words
                                              v
              +------------- reconfig_array ----------------+
              | config_scheduler (CD stage: AT, RT | RA stage)|
              | operand_router (RF -> PE, PE/LSU -> RF muxes) |
              | array_regfile x4 (32 x 32 bit, 10R / 5W)      |
              | recon_column  x4 (3 x pe, 1 x lsu)            |
              +-----------------------------------------------+
                                              | load/store ports, one per column
                                              v
                                    L1 data caches (outside)
```

`rca_top` is the top level. The MIPS cores, their 16 KB L1 caches and the
directory-based MSI coherence between them are standard parts. They are not
part of this RTL; their connections are ports of `rca_top`.

## Configurations and configuration words

A configuration is a sequence of up to `NWORDS` = 16 configuration words. Each
word is executed in one array cycle. A word has `NSLOT` = 5 slots. Each slot
(`slot_t` in `rca_pkg`) holds either nothing or one operation:

| field | meaning |
|---|---|
| `valid` | slot holds an operation |
| `is_mem`, `is_store` | operation goes to the load/store unit, load or store |
| `op` | ALU operation: add, sub, and, or, xor, nor, slt, sltu, sll, srl, sra, lui |
| `rd`, `ra`, `rb` | target and source registers (array register file of the owner core) |
| `b_imm`, `imm` | use the 32-bit immediate instead of `R[rb]`; address offset for memory |

Slot *s* reads register-file ports 2*s* and 2*s*+1 and writes port *s*. Five
slots therefore use exactly the 10 read and 5 write ports of an array register
file. A word holds at most one memory operation, because a column has one
load/store unit. The memory operation takes one of the five slots.

The binary translator guarantees that no two operations in a word depend on
each other. None writes a register another reads or writes, and memory
operations keep program order across words. Because of this, the operations of
a word may finish over several cycles without changing the result. The sharing
scheme relies on this.

Each configuration has a header (`chdr_t`) with three fields:

- the PC of its first instruction;
- the PC at which the core resumes afterwards;
- its number of words.

## Sharing PEs: the configuration scheduler

`config_scheduler` is the heart of the design. It has two pipeline stages, and
every core has its own lane through both.

**CD (configuration decode), a register stage.** When a word of core *i* is
accepted, its pending ALU operations are split by the *basic priority rule*.
The first three go to core *i*'s own column. They set the bits of the
allocation table entry `AT[i]`, 3 bits with one per PE. The rest, at most two,
set the bits of the request table entry `RT[i]`, 2 bits. A core's own column
is always its own: a core can lend PEs, but never loses them.

**RA (resource allocation), combinational in the next cycle.**

- Every PE marked in `AT` executes the operation of its own core.
- Every request in `RT` searches the other columns for a PE that no `AT` bit
  marks.
  - Core *i* searches columns *i*+1, *i*+2 and *i*+3 (mod 4), PE 0 to 2 in each.
  - Cores are served in order of descending thread priority (`prio`, 2 bits
    per core). Equal priorities go to the lower core index.
  - A found PE gets the operation plus routing control (`pe_ctl.owner`,
    `pe_ctl.slot`). This makes it read its operands from, and write its
    result to, the requesting core's register file.
- A request that finds no idle PE is *deferred*. The word stays in CD with a
  per-slot pending mask. In the next cycle the leftover operations are decoded
  again, now into the core's own column.
- The memory operation goes to the core's own load/store unit. It also stays
  pending until the memory port grants it.

`in_ready` is high in the cycle in which the last pending operation of the
current word executes. With no deferral and no memory wait, each core
therefore runs one word per cycle: a word offered in cycle *t* executes in
cycle *t*+1 and is written at the end of it.

`operand_router` holds the multiplexers for this. Each PE's operands are
selected from the register file of the PE's current owner, at the read ports
of the owner's slot. Each register-file write port selects its data from
wherever its slot actually ran (`exec.col`, `exec.pe`) or from the load/store
unit.

## Translating code at run time: the binary translator

`binary_translator` is a five-stage pipeline per core:

1. **ID** decodes the instruction.
2. **DV** (dependency verification) uses a *write bitmap table*, one bit per
   register and word. It finds the first word after the last producer of each
   source. Memory operations are also placed after the previous memory
   operation.
3. **RA** uses a *resource table* (operations used per word) to find the first
   word from there on that has a free slot, and a free memory slot if needed.
4. **RR** handles false dependences with the *read table* (sources read per
   word). The instruction is moved behind the last word that reads its target
   (write-after-read) or writes it (write-after-write).
5. **UT** writes the operation into its slot and updates the tables.

A configuration ends on one of four events:

- a branch or jump;
- an unsupported instruction;
- no word with room, in which case the instruction starts the next
  configuration;
- a jump in the PC stream, which happens when the array has just run a
  configuration.

Configurations with fewer than `MIN_INSTR` = 3 instructions are dropped.
Register-0 targets (NOPs) take no slot.

Supported instructions:

| group | instructions |
|---|---|
| ALU, register form | add, addu, sub, subu, and, or, xor, nor, slt, sltu |
| ALU, immediate form | addi, addiu, andi, ori, xori, slti, sltiu |
| shifts | sll, srl, sra, sllv, srlv, srav |
| other | lui, lw, sw |

There is no trap on overflow.

The tables are read by DV to RR and written by UT. One instruction is therefore
in flight between DV and UT at a time. The translator accepts one instruction
every 4 cycles, and the core must hold `bt_valid` until `bt_ready`.

## Starting a configuration: cache and controller

`config_cache` holds up to 128 configurations per core. It is fully
associative and looked up by start PC. Replacement is LFRU (least frequently,
then least recently used):

- each entry has a 3-bit saturating use count and a 16-bit last-use stamp;
- the victim has the smallest count, and among those the oldest stamp;
- when any count saturates, all counts are halved.

`config_controller` compares the core's fetch PC with the cache every cycle.
On a hit it does the following:

1. It raises `stall` (the core's fetch stage inserts NOPs) and copies the
   core's register file into the array register file (`rf_load`).
2. It issues the words one by one to the scheduler.
3. It waits until the scheduler holds no word of the core.
4. It pulses `wb_valid`, with `wb_pc` set to the resume PC. The core copies the
   array register file back and continues.

An *N*-word configuration stalls the core for *N*+3 cycles when nothing is
deferred.

## Where this design departs from or adds to the description it follows

- **No branch speculation.** The original design lets a configuration extend
  over one predicted branch. Here every branch ends a configuration, so
  configurations are shorter, especially in branch-heavy code.
- **No register renaming.** The original rename stage removes false
  dependences. The array register files have no spare registers to rename
  into, so the RR stage resolves them by placement instead. This costs some
  parallelism.
- **The memory operation shares the five slots.** A word could instead carry
  five PE operations plus a load or store. That would need more than the 10
  read and 5 write ports of the array register file, so here the memory
  operation uses one of the five slots.
- **Chosen details:**
  - 16 words per configuration;
  - the PE operation set;
  - the thread-priority encoding, tie-breaking and lending search order;
  - all handshakes and the controller's state machine;
  - the LFRU bookkeeping and the fully associative cache;
  - the 4-cycle translator rate;
  - the minimum configuration length of 3;
  - single-cycle loads and copy-backs of the whole register file;
  - a combinational grant and read-data port on the load/store unit.
- The L1 caches, the coherence protocol and the MIPS cores are not included.

## Files

| file | contents |
|---|---|
| `rtl/rca_pkg.sv` | sizes and types: `slot_t`, `cword_t`, `chdr_t`, `pe_ctl_t`, `exec_t` |
| `rtl/pe.sv`, `rtl/lsu.sv`, `rtl/recon_column.sv` | PE, load/store unit, one column |
| `rtl/array_regfile.sv` | 32-entry, 10-read, 5-write register file with load |
| `rtl/config_scheduler.sv`, `rtl/operand_router.sv` | sharing scheduler and routing |
| `rtl/reconfig_array.sv` | the whole array |
| `rtl/config_cache.sv`, `rtl/config_controller.sv`, `rtl/binary_translator.sv` | per-core parts |
| `rtl/rca_top.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches: one per block (`pe` and `lsu` are tested inside `tb_recon_column`), the end-to-end test and the workload test |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog stops it if it hangs. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/rca_pkg.sv \
          tb/tb_rca_top.sv --top-module tb_rca_top -Mdir obj_top
obj_top/Vtb_rca_top
```

Replace `tb_rca_top` with any other testbench name. The testbenches do not
depend on reset values of undriven state (try `+verilator+rand+reset+2`).

## What the tests cover

| testbench | what is checked |
|---|---|
| `tb_recon_column` | every ALU operation against a reference model; load/store requests and grants |
| `tb_array_regfile` | random reads and writes on all ports against a model; load priority; register 0 |
| `tb_operand_router` | random words and PE assignments; every PE operand and every write-back against a model |
| `tb_config_scheduler` | basic priority rule, AT/RT contents, lending order by priority and index, deferral, memory waits, one word per cycle |
| `tb_reconfig_array` | random words from four cores with random priorities and memory grants, compared with sequential execution; lending, deferral and memory stalls all occur |
| `tb_config_cache` | lookup, refill of an existing PC, LFRU victim choice against a model, halving, eviction flag |
| `tb_config_controller` | hit handling, register copy-in, word order, write-back, *N*+3 stall cycles |
| `tb_binary_translator` | placement of dependent and independent instructions, write-after-read and write-after-write handling, memory ordering, all four end reasons, the 4-cycle rate |
| `tb_rca_top` | end to end at the default sizes (see below) |
| `tb_workloads` | four small kernels on the whole system (see below) |

`tb_rca_top` models each core with an instruction-set model. Four small MIPS
programs run with loops, loads and stores, dependence chains and an
unsupported instruction. The final registers and memory are compared with a
plain run of the same programs. The test also requires each of these
mechanisms to happen at least once:

- configurations saved and run;
- PE lending;
- deferral;
- memory stalls;
- each of the four configuration-end reasons.

`tb_workloads` runs four kernels at the same time, one per core, with the
same core model and reference comparison. They are small versions of typical
array workloads:

| kernel | size |
|---|---|
| bit counting, shift-and-mask method | 16 integers |
| integer matrix multiplication | 4x4 |
| Laplacian filter | 8x6 image |
| LU decomposition, with integer division | 4x4 |

Each kernel runs three times, so configurations are built once and then
reused. The array executes roughly half to two thirds of each kernel's
instructions (printed per kernel). Multiplies and divides are not PE
operations, so the core runs them and they end configurations.

The tests do not measure speedup against a real five-stage core, because the
cores are modelled only at instruction level.
