# ARISE embedded multiprocessor

An embedded core processor (CP) is given a one-time extension of its instruction set. From then on,
any number of further processors can hang off it as *computing units* (CUs): an integer unit, a
load-store unit, a VLIW engine, or anything on reconfigurable fabric. The CUs do not have to match
each other or the CP, so the machine is an asymmetric multiprocessor.

The extension is the **ARISE interface** (Aristotle Reconfigurable Instruction Set Extension). It
runs as a small pipeline beside the CP's own pipeline and solves three problems:

* **Opcode space.** The CP has only a few spare opcode bits. ARISE uses one primary opcode for all
  ARISE instructions. An 8-bit `opc` field names an operation indirectly, through a run-time
  rewritable *Opcode-to-Id table*. The table gives a 12-bit operation **Id**, and each CU's
  **wrapper** owns a range of Ids. This gives 256 opcodes and 4096 operations, and new CUs need no
  new opcodes.
* **Operand count.** A CP instruction carries two source operands and one result. An ARISE operation
  may need more. The **IOB** (input/output buffer) collects operands two at a time (`movta`, which
  uses both register-file read ports). It hands results back one at a time (`movfa`, which uses the
  single write port).
* **Control.** Each wrapper keeps a small configuration word per operation. The word is loaded from
  a bitstream in memory, and it says how the CP must behave while the operation runs. The CP either
  stalls for a known number of cycles, or stalls until the CU says it is done, or keeps running
  (*concurrent mode*). The word also says whether interrupts are blocked.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017). The CP itself is not part of the
RTL. The top module exposes the signals a CP pipeline has to connect. The testbench of the top
contains a small CP model that shows how.

## Structure

```
                 CP fetch          CP ID/EX/WB (outside)
                    |                   ^      ^
   if_instr ------> arise_decoder ------+      | wb_rd / wb_data
                    | ARISE word               |
                    v                          |
   arise_interface: PRE  control unit, Opcode-to-Id table, RF operands
                    PRO  IOB write/read, setid, dispatch, stall logic, status register
                    POST write-back -----------+
                    |  Id, exec/conf start, IOB banks
        +-----------+-------------+--------------------+
        v                         v                    v
   arise_wrapper (0x010-013)  arise_wrapper (0x020-023)  arise_wrapper (0x030-033)
     cfg table, cfg ctrl,       same                      same
     exec ctrl                    |                        |
        |                      cu_ldst                  x_* ports (third processor,
     cu_int                       | memory requests        e.g. a VLIW engine)
                                  v                        |
   CP memory port ----------> arise_mem_arbiter <----------+
                                  |
                              shared_mem (data, 1024 x 32)

   cmem_load_* ----------> shared_mem (configuration, 256 x 32) <--- wrappers' cfg controllers
```

| module | role |
|---|---|
| `arise_pkg` | widths, instruction encoding, `arise_word_t`, `arise_ctrl_t`, `arise_cfg_t`, status bits |
| `arise_decoder` | fetch-stage pre-decode: ARISE word to PRE, bubble to the CP |
| `arise_control_unit` | PRE-stage decode of `instr` into control signals |
| `arise_opc_id_table` | 256 x 12-bit opc to Id map, reset to the identity |
| `arise_iob` | two 8-word register banks (input, output) with auto-incrementing places |
| `arise_interface` | the PRE/PRO/POST pipeline, dispatch, stalls, status register |
| `arise_cfg_ctrl` | wrapper's configuration controller (bitstream fetch) |
| `arise_exec_ctrl` | wrapper's execution controller (latency, stall, interrupts) |
| `arise_wrapper` | Id range, configuration table, both controllers, CU memory gate |
| `arise_mem_arbiter` | CUs and CP share one data-memory port; the CU wins |
| `cu_int` | integer-operation processor (configurable reduction unit) |
| `cu_ldst` | load-store processor (strided gather / scatter) |
| `shared_mem` | single-port synchronous RAM |
| `arise_mp_top` | the whole system |

## Instruction encoding

All ARISE instructions use primary opcode `0x1C`. The register fields are the CP's own, so the CP
reads and writes the operands with its normal register-file ports.

```
 31    26 25   21 20   16 15   11 10    8 7        0
+--------+-------+-------+-------+-------+----------+
| 011100 |  rs   |  rt   |  rd   | instr |   opc    |
+--------+-------+-------+-------+-------+----------+
```

| instr | name | effect |
|---|---|---|
| 0 | `movta rs, rt` | write R[rs] and R[rt] to the next two input-bank places |
| 1 | `movfa rd` | R[rd] gets the next output-bank place |
| 2 | `exec opc` | run the operation whose Id is table[opc] on its CU |
| 3 | `conf opc, rs, rt` | load the bitstream at configuration-memory words R[rs]..R[rt] for operation table[opc] |
| 4 | `setid opc, rs` | table[opc] becomes R[rs][11:0] |
| 5 | `rdst rd` | R[rd] gets the ARISE status register; clears its sticky bits |
| 6, 7 | – | no operation |

`movta`, `movfa`, `exec` and `conf` wait (stall the CP) while any ARISE operation is still running.
`setid` and `rdst` never wait.

## Pipeline and timing

The interface has one stage for each CP stage. A word fetched in cycle *c* is in PRE in *c+1* and
in PRO in *c+2*. A result from `movfa` or `rdst` is on `wb_*` in *c+3*.

* **PRE.** The control unit decodes `instr`. The table turns `opc` into an Id. The CP supplies the
  values of `pre_rs`/`pre_rt` in the same cycle, with its own forwarding already applied. A `setid`
  that retires in PRO in the same cycle is bypassed into this lookup. So `setid 5,r1; exec 5`
  already runs the new operation.
* **PRO.** The instruction takes effect. An `exec` or `conf` is dispatched to the wrapper whose
  range holds the Id (`hit`). If no wrapper owns the Id, the instruction retires without effect and
  sets the *unknown Id* status bit.
* **POST.** The registered write-back goes to the CP. The CP must forward it, or the program must
  leave two instructions before the first reader of `rd`.

`stall_cp` is the OR of the interface stall and a lost memory arbitration. While it is high the CP
holds its whole pipeline. The interface also freezes whenever the CP reports `cp_ext_stall`.

Stall lengths, counted in cycles in which `stall_cp` is high:

| situation | stall |
|---|---|
| `exec` of a stalling operation whose latency *L* is given | *L* cycles. The instruction retires in the cycle the wrapper signals done. |
| `exec` of a stalling operation with unknown latency | until the CU raises `done`, including the dispatch cycle |
| `exec` in concurrent mode | none. The CP runs on while the CU works. |
| `conf` of a *K*-word bitstream | *K+1* cycles |
| `movta`/`movfa`/`exec`/`conf` while an operation runs | until it ends |
| CP memory access while a CU uses the memory | until the CP is granted |

`irq_block` is high while an operation configured with *block interrupts* runs.

## Operations, wrappers and bitstreams

Each wrapper owns `NOPS` = 4 consecutive Ids. In the top these are 0x010-0x013 for `cu_int`,
0x020-0x023 for `cu_ldst`, and 0x030-0x033 for the external third processor. The wrapper maps an
Id to the local operation index `Id - ID_BASE`.

A `conf` makes the wrapper's configuration controller read the configuration memory from the start
address to the end address, one word per cycle. The first word is the operation's **ARISE
configuration word**, which the wrapper keeps:

```
[31] latency given   [30] concurrent mode   [29] block interrupts   [15:0] latency in cycles
```

Every following word is configuration data for the CU. It is streamed out on
`cu_cfg_valid/idx/data` and not stored in the wrapper. The two CUs in this design keep bits [7:0] of
the last such word per operation:

| CU | config word bits | meaning |
|---|---|---|
| `cu_int` | [2:0] | 0 sum, 1 a0−a1−…, 2 and, 3 or, 4 xor, 5 signed max, 6 signed min, 7 Σ a(2i)·a(2i+1) |
| | [7:4] | operand count *n* (0: the number of operands written to the IOB) |
| `cu_ldst` | [0] | 0 gather (load), 1 scatter (store) |
| | [7:4] | word count *n* (0: 8 for a load, all operands after the first two for a store) |

The latency of `cu_int` is fixed: *n* cycles, or ceil(*n*/2) for multiply-accumulate, and at least
1. That number is what belongs in its ARISE word. `cu_ldst` competes for memory, so its operations
should leave the latency unknown. It raises `done` when the last word has been transferred. For
`cu_ldst`, input place 0 is the base address and place 1 is the stride. A gather fills output
places 0..*n*−1. A scatter writes input places 2..*n*+1.

Execution: `exec` rewinds the IOB input place for the next operand set. The wrapper's execution
controller starts the CU and counts the latency or waits for `done`. When the operation ends, the
IOB output read place is rewound, so the next `movfa` returns output place 0.

### Example

Sum six registers, with the operation configured at configuration-memory words 0..1 as
`{latency given, stalling, 6}` followed by CU word `0x60`:

```
addi  r1, r0, 0x010 ; setid 1, r1      # opc 1 -> Id 0x010 (cu_int, slot 0)
addi  r2, r0, 0 ; addi r3, r0, 1
conf  1, r2, r3                        # 3 stall cycles
movta r4, r5 ; movta r6, r7 ; movta r8, r9
exec  1                                # CP stalled 6 cycles
movfa r10                              # r10 = r4+...+r9
```

## Status register (`rdst`, also on the `status` port)

| bit | meaning |
|---|---|
| 0 | an operation or configuration is running (live) |
| 1 | an operation completed (sticky) |
| 2 | `exec`/`conf` named an Id that no wrapper owns (sticky) |
| 3 | a configuration completed (sticky) |
| 27:16 | Id of the last dispatched operation |

`rdst` returns the value before clearing the sticky bits. An event in the same cycle as the clear
wins.

## Shared memory

The CUs reach data memory through their wrappers. A wrapper passes a CU's requests on only while an
operation of that CU is running. `arise_mem_arbiter` merges the wrappers' requests with the CP's
memory port into one single-port RAM. CU requests win, lowest wrapper index first. A CP request
that loses raises `stall_cp`. This happens only in concurrent mode, because in stalling mode the CP
is frozen anyway. A read returns in the cycle after its grant (`*_rvalid`), and the data bus is
shared by all requesters.

The configuration memory is loaded through `cmem_load_*`. In a full system this port belongs to
whatever fills memory from SDRAM. A load write takes priority over a configuration read, so load
bitstreams before issuing `conf`.

## Connecting a CP

| port | direction | use |
|---|---|---|
| `if_instr`, `if_valid` | in | word in the CP fetch stage |
| `cp_instr` | out | what the CP's decode stage should see (zero for ARISE words) |
| `pre_rs`, `pre_rt` / `pre_rs_val`, `pre_rt_val` | out / in | register reads for the ARISE word in PRE, same cycle |
| `wb_we`, `wb_rd`, `wb_data` | out | register-file write from POST |
| `stall_cp`, `cp_ext_stall` | out / in | freeze the CP / CP frozen for its own reasons |
| `irq_block` | out | mask interrupts |
| `cp_mem_*` | in/out | the CP's data-memory port (req, we, addr, wdata → gnt, rvalid, rdata) |
| `x_*` | in/out | CU side of the third wrapper |

## Parameters (top)

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 8 | words per IOB bank |
| `NOPS` | 4 | operations per wrapper |
| `DMEM_WORDS` | 1024 | shared data memory |
| `CMEM_WORDS` | 256 | configuration memory |

The instruction-field widths (`OPC_W` = 8, `ID_W` = 12) and the data width (32) are in `arise_pkg`.
None of these sizes come from a published configuration. They are sized for a small FPGA system.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv` that ends by printing
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_arise_mp_top \
    rtl/arise_pkg.sv tb/tb_arise_mp_top.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

`-Irtl` lets Verilator find each module in `rtl/<module>.sv`; only the package has to be named.
The same command with another `tb_*` name runs any block testbench.

```
```

`tb_arise_mp_top` runs the whole system at its default sizes. It contains a three-stage CP model
whose own instructions (`addi`, `lw`, `sw`) execute in the stage aligned with PRO, and a behavioural
third CU. That CU reads one data-memory word through its wrapper and returns it together with its
first operand byte-reversed. The program:

* configures five operations on the three CUs;
* runs a stalling fixed-latency sum (timed at exactly 6 stall cycles, interrupts blocked for 6);
* runs a concurrent multiply-accumulate while the CP keeps executing;
* runs a concurrent gather while the CP's own loads and stores collide with it;
* runs a stalling scatter, then checks the written words;
* runs an operation on the third CU, which waits for its wrapper to pass its memory read;
* executes an Id that no wrapper owns, then reassigns an opc to another operation;
* reads the status register in between.

It checks every result and counts each mechanism: stall, concurrent execution, memory-conflict
stall, waiting for a running operation, configuration stall, interrupt blocking and the `setid`
bypass. It fails if any of them never happened. The block testbenches use reference models and
random stimulus. They also check cycle counts where the timing is defined: configuration K+1
cycles, fixed latency, `cu_int` latency, and read latency.

## How this relates to the ARISE concept

These parts follow the published ARISE organisation:

* the fetch-stage pre-decoder;
* the PRE-stage control unit;
* the rewritable opc-to-Id table with Ids wider than the opcode;
* the two-bank IOB filled by `movta` and drained by `movfa`;
* wrappers that own Id ranges and hold a per-operation configuration table;
* a configuration controller that keeps the first part of the bitstream and streams the rest to the
  CU;
* an execution controller with given or unknown latency, stall, status and interrupt blocking;
* CU memory accesses through the CP's port that stall the CP on a conflict in concurrent mode;
* the PRE/PRO/POST stage structure.

These are this design's own choices:

* all bit encodings: the primary opcode, field positions, `instr` codes, the ARISE word layout and
  the status layout;
* the `setid` and `rdst` instructions, which make the table and the status register reachable;
* the ARISE part of a bitstream being exactly one word (the concept allows several);
* the IOB depth and the rewind rules;
* waiting for a running operation before the next `movta`/`movfa`/`exec`/`conf`;
* fixed CU priority in the memory arbiter;
* the stall length of `conf`;
* the wrappers being hardwired logic rather than hosted on the CU.

Not modelled:

* The CP itself.
* The VLIW processor. Only its slot exists: wrapper 2 and the `x_*` ports.
* The SDRAM controller. The configuration-memory load port stands in for it.
* Real FPGA partial reconfiguration. A CU here is "reconfigured" by the configuration words it
  receives, which select its function.
* The two CUs stand for the integer and load-store processors. Their internals (a serial reduction
  unit and a strided block mover) are this design's choices.
* Data-width conversion between processors of different word sizes needs no special hardware here.
  A CU may reformat data freely on its way from the input bank to the output bank, as the
  byte-reversing CU model in the top testbench does.
