# Value prediction and instruction reuse in one out-of-order core

Many instructions compute the same result again and again. This design exploits
that redundancy in two ways at once:

* **Value prediction (VP)** guesses an instruction's result from the results
  it produced before. Consumers start early with the guess, and the guess is
  checked later.
* **Instruction reuse (IR)** remembers the operand values and the result of
  earlier executions. When the operands are the same again, the stored result
  is taken and the instruction is not executed.

Both are consulted for every instruction. Confidence values decide which one
is believed. A wrong prediction does not flush the pipeline. Only the
instructions that consumed the wrong value execute again. To make this
possible, a **confirm stage** follows writeback. Only instructions that ran
with predicted operands pass through it. Branches never use predicted
operands, so the branch misprediction penalty does not grow.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It has four
modules and one package:

| file | what it is |
|---|---|
| `rtl/vpir_pkg.sv` | types, micro-ISA, counter constants, saturating-counter helpers, the reuse test |
| `rtl/vpir_core.sv` | the core: dispatch, issue, writeback, confirm, commit (top) |
| `rtl/hybrid_vp.sv` | hybrid stride + context value predictor |
| `rtl/reuse_buffer.sv` | 4-way reuse buffer with replacement counters |
| `rtl/int_alu.sv` | integer ALU |

## The pipeline and its six paths

`vpir_core` is 4 wide (parameter `W`). It receives groups of up to four
instructions in program order (`in_valid`/`in_ready`/`in_instr`; lane 0 is
the oldest and the valid lanes start at lane 0).

1. **Fetch.** Each PC looks up the predictor and the reuse buffer in the
   cycle the group is accepted.
2. **Dispatch.** One cycle later all lookups are complete. The group is
   renamed and each instruction gets a reorder buffer (ROB) entry; if the ROB
   lacks room for the whole group, the group waits. A younger instruction
   of the group takes an operand from an older one of the same group.
3. **Issue.** Instructions wait until they may execute. Up to four issue
   per cycle, oldest first.
4. **Execute.** Four integer ALUs take one cycle each. Loads and stores use
   them for their address.
5. **Writeback.** The result is checked and published.
6. **Confirm.** Entries that ran with predicted operands wait here.
7. **Commit.** Instructions retire in order.

The ROB entry does three jobs at once:

* It is the reservation station.
* It is the physical register that holds the result.
* It holds the register status of that result: a *predicted* bit and a
  confidence value.

Each entry also has an **RS prediction flag**. For each source operand it
has three bits:

* `pred` (is_operand_predicted): the instruction used a predicted value for
  this operand.
* `misp` (is_operand_mispredicted): that value turned out wrong.
* `rdy` (is_operand_ready): the actual value has arrived.

### Dispatch decisions

A source operand is *actual* once its producer's result is final. It is
*predicted* while the producer's register holds a predicted value. Otherwise
it is unavailable. The reuse test compares the current operand values with
those stored in the reuse buffer. It can run when every operand is
available, actual or predicted.

| case | action | next |
|---|---|---|
| reuse test passes, all operands actual | stored result is final | commit — **path (1)** |
| reuse test passes with predicted operands, hit confidence > VP confidence (or no VP prediction) | stored result written as a predicted value with the hit confidence; flag set | confirm — **path (2)** |
| otherwise, VP predicts | VP value written as a predicted value with its confidence; flag set | issue |
| otherwise | nothing predicted | issue |

The *hit confidence* is the lowest confidence among the predicted operands.
A branch takes part in the reuse test only with actual operands. The reuse
buffer stores the branch's next PC, so a branch that passes is resolved at
dispatch (`ev.branch_early`). Branches are never value predicted.

### Issue

* An entry whose prediction flag is set waits for actual operands. So does
  every branch, load and store.
* Any other entry may issue with predicted operands. They are read from the
  producer's register, together with its confidence, and the entry sets
  `pred` for them.

As a result, an instruction whose own result was predicted always runs with
correct inputs. No instruction executes more than twice.

### Writeback and the common data bus

The common data bus (CDB) carries a tag, a value and a *mispredicted* flag.

* **Prediction flag set.** The result is correct, because the entry ran with
  actual operands. It is compared with the predicted value and put on the
  CDB with the outcome as the mispredicted flag — **path (3)**.
* **No operand predicted.** The result goes on the CDB as it is — **path (3)**.
* **Some operand predicted.** The result is only a guess. It is written as a
  predicted value whose confidence is the lowest among the operands used.
  The flag is set and the entry goes to confirm — **path (4)**. Consumers may
  already use this value.

On a CDB broadcast, every consumer that still waits on that tag captures the
value and sets `rdy`. A consumer that used the predicted value also copies
the broadcast's mispredicted flag into `misp`.

Every executed instance is written into the reuse buffer at writeback. An
instance computed from wrong operands is still a correct mapping from
operands to result.

### Confirm

The confirm stage takes up to four of the oldest entries whose predicted
operands are all ready.

* **No `misp` bit set.** The result becomes final and is broadcast on one
  of the confirm stage's CDB ports. There are eight ports in all: four for
  writeback and four for confirm. The entry goes to commit — **path (5)**.
* **A `misp` bit set.** The `pred`/`misp` bits are cleared and the entry
  returns to issue — **path (6)**. Its prediction flag is still set, so it
  waits for actual operands and runs again. Its writeback then compares the
  new result with the one it had published. It broadcasts the correction
  with the mispredicted flag, which sends its own consumers through path (6)
  in turn.

A consequence worth knowing: a result computed from predicted operands is
itself a predicted value. A long dependent chain can therefore run ahead on
a wrong value. The whole chain then executes a second time, in order, as the
corrections ripple down. The end-to-end test has such a chain and shows it.

### Commit

Up to four entries retire per cycle, in order, once their results are
final. Each writes the architectural register file and clears the register status if
no younger instruction renamed the register. It also trains the value
predictor with the committed value. The retired instructions appear on
`commit_valid`/`commit_info`. For a branch, the value is its next PC; for a
store, its address.

### Loads and stores

* `LD rd, imm(rs1)` reads the word at `rs1 + imm`. `ST rs2, imm(rs1)` writes
  `rs2` there. Addresses count words.
* Address and store data always come from actual operands.
* A load may be value predicted at dispatch like any other instruction. Its
  consumers can then run early, and its writeback checks the prediction.
  Loads and stores are never reuse-tested and never enter the reuse buffer.
* One memory instruction issues per cycle. A load sends its address on
  `dmem_rd_addr` in its issue cycle and takes `dmem_rd_data` in the next
  cycle, which is its writeback.
* A load does not issue while an older store is still in the ROB.
* A store writes memory (`dmem_wr_*`) when it commits, at most one per
  cycle.

## Hybrid value predictor (`hybrid_vp`)

* **Value History Table (VHT)**, 4096 entries, direct mapped by PC, tagged.
  Each entry holds:
  * the last 4 results;
  * the stride in use and the last stride seen;
  * a 2-bit stride warmup counter;
  * a 4-bit stride confidence;
  * a 4-bit replacement counter.
* **Value Prediction Table (VPT)**, 8192 entries, shared by all
  instructions. Each entry holds a value, a 4-bit context confidence and a
  2-bit warmup counter. It is indexed by an xor fold of the 4 history values
  `h0 ^ rotl(h1,5) ^ rotl(h2,10) ^ rotl(h3,15)`, taken in 13-bit slices and
  xored together.
* **Stride component.** It predicts `h0 + stride`. This is a *two-delta*
  stride: the stride in use changes only when the same new stride is seen
  twice in a row.
* **Context component.** It predicts `VPT[hash(history)]`.
* **Counters.** A component may predict once its warmup counter is at least
  2 and its confidence is above 6. Confidence moves +2 when the component
  was right and −4 when it was wrong, saturating at 0 and 15. When both
  components may predict, the more confident one wins. On a tie the stride
  component wins.
* **Replacement.** The replacement counter moves +2 when either component
  was right and −4 when both were wrong. A conflicting instruction lowers
  it by 4. The resident entry is replaced only once the counter falls below
  4. A new entry starts at 4.
* **Ports.** There are `LANES` = 4 lookup ports and 4 training ports.
* **Timing.** The VHT is read in the fetch cycle and the VPT in the dispatch
  cycle. `pred_*` are valid one cycle after `lk_pc`. Training reads,
  recomputes and writes the entry in one cycle. When several lanes train the
  same entry in one cycle, they are applied in order; each lane sees the
  result of the older ones.
* **Reset.** The tables are cleared by a sweep of 8192 cycles.
  `init_done`, and with it the core's `ready_for_work`, rises when the sweep
  ends.

Starting from an empty entry, a steady stride is first predicted after the
7th training value.

## Reuse buffer (`reuse_buffer`)

* **Organisation.** 1024 entries in 256 sets of 4 ways, indexed by the low
  PC bits. One instruction may own several ways, one per operand set. Each
  way stores the PC tag, both operand values (0 for an operand that is not
  read) and the result.
* **Ports.** There are `LANES` = 4 lookup ports and 4 insertion ports.
* **Timing.** The set is read in the fetch cycle. `lk_ways` shows the four
  ways of the set one cycle after `lk_pc`. In the dispatch cycle the core
  runs the reuse test (`reuse_test` in the package) on them with the
  current operands.
* **Counters on a test.** The core reports each test on `test_en`,
  `test_pass` and `test_way`. A passing way gets +2. When the PC is present
  but no way passes, all its ways get −4.
* **Insertion.** The victim is a free way, or else the way with the lowest
  counter. Its counter is lowered by 4. The way is replaced only when the
  lowered counter is below 4. An instance used often therefore survives
  several conflicts: from 15 it takes three.
* **Same-set insertions.** If two lanes insert into the same set in one
  cycle, only the older one inserts.
* **Storage.** Valid bits and counters are flip-flops cleared by reset. The
  data is a memory array.

## Interface of `vpir_core`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready`, `in_instr` | in/out/in | W/1/W×`instr_t` | instruction groups, program order, lane 0 oldest |
| `commit_valid`, `commit_info` | out | W/W×`commit_t` | retirement: pc, op, wen, rd, value |
| `dmem_rd_en`, `dmem_rd_addr`, `dmem_rd_data` | out/out/in | 1/64/64 | load port; data one cycle after the request |
| `dmem_wr_en`, `dmem_wr_addr`, `dmem_wr_data` | out | 1/64/64 | store port, written at commit |
| `dbg_reg`, `dbg_value` | in/out | 5/64 | read an architectural register |
| `ev` | out | `events_t` | per-cycle event counts: paths (1)–(6), VP use, early branch, ROB-full stall, predicted load, ... |
| `ready_for_work` | out | 1 | predictor tables cleared after reset |

The micro-ISA (`op_e`) has eleven operations:

* `LI` loads an immediate.
* `ADD`, `SUB`, `AND`, `OR`, `XOR`, `SLL` and `SRL` take two registers, or a
  register and an immediate when `use_imm` is set.
* `BEQ` is a branch. Its next PC is `pc + imm` if taken and `pc + 1`
  otherwise.
* `LD` and `ST` load and store a word at `rs1 + imm`.

Values are 64 bits wide, PCs 32 bits. There are 32 architectural registers.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `W` | 4 | dispatch/issue width and integer ALUs of the evaluated machine |
| `ROB_N` | 32 | reorder buffer size of the evaluated machine |
| `VHT_N` / `VPT_N` | 4096 / 8192 | predictor table sizes as specified |
| `RB_N` / `RB_WAYS` | 1024 / 4 | reuse buffer as specified |
| `CONF_MAX`, `INC_BONUS`, `MISP_PEN`, `PRED_THRESH` (package) | 15, 2, 4, 6 | counter policy as specified |
| `WARM_THRESH` | 2 | own choice |
| `REPL_THRESH` | 4 | own choice (VHT and reuse buffer) |

## How far this RTL goes, and where it departs

Built as specified:

* the dispatch decision between reuse and prediction using confidences;
* the issue rule;
* the three operand bits;
* the writeback compare and the confirm stage with selective re-execution;
* the two-delta stride, the order-4 context and hybrid selection;
* confidence, warmup and replacement counters with the specified constants
  and table sizes.

Departures and own choices:

* **Width.** Four instructions per cycle are dispatched, issued, confirmed
  and committed. A group enters the ROB whole or waits. The predictor and
  the reuse buffer simply have four ports each.
* **Memory.** There is no load/store queue. A load waits until no older
  store is left in the ROB, and there is no store-to-load forwarding. The
  evaluated machine has a 16-entry queue with optimistic disambiguation.
  There are no caches either: the data port is a plain memory interface.
* **Front end.** There is no fetch unit and no branch predictor. Branch
  outcomes leave through the commit port; the instruction source must
  follow them.
* **Functional units.** Only integer ALUs; no multiply, divide or floating
  point.
* **Predictor training.** The predictor is trained at commit, with
  committed values in program order. The reuse buffer is trained at
  writeback.
* **Ties and missing cases.**
  * When the hit confidence equals the VP confidence, the VP value is used.
  * A reuse hit on predicted operands with no VP prediction keeps the reuse
    result.
* **Own choices for details left open:**
  * the hash function;
  * the VHT organisation (direct mapped, tagged);
  * warmup and replacement thresholds and initial counter values;
  * the clearing sweep;
  * 2W CDB ports;
  * oldest-first selection;
  * no reuse of loads;
  * the micro-ISA.
* **No bypass.** A consumer issues two cycles after its producer.

## Testbenches

Every testbench checks its results against values it computes itself. Each
prints `TB_RESULT checks=N failures=M`.

* `tb/tb_int_alu.sv`: 2000 random operations against a reference function.
* `tb/tb_hybrid_vp.sv` (69 checks) covers:
  * silence before training;
  * the exact training step at which a stride is first predicted, and the
    confidence it then has;
  * the −4 penalty;
  * that one odd stride does not replace the stride in use (two-delta);
  * context prediction of a period-4 sequence;
  * that a trained entry survives two conflicts and is replaced by the third;
  * the one-cycle lookup latency;
  * four lanes training one entry in the same cycle, and four lookups.
* `tb/tb_reuse_buffer.sv` (26 checks) covers:
  * the reuse test;
  * four instances of one PC;
  * lowest-counter victim choice;
  * that a saturated way resists two conflicts;
  * the −4 on a failed test;
  * the one-cycle lookup latency;
  * insertions from several lanes in one cycle, including two into one set.
* `tb/tb_vpir_core.sv` runs the whole design at its default sizes. It runs
  an architectural reference model alongside and compares every retired
  instruction (PC, register, value or branch target), then the final
  register file and the data memory. The instructions arrive in groups of
  random size (1 to 4) with idle cycles between some of them. The program
  is a loop body of 68 instructions run 400 times, about 27,200
  instructions in all. It includes:
  * a stride counter;
  * a period-4 value;
  * a value that changes every 8 iterations;
  * a pseudo-random register;
  * reuse with actual and with predicted operands;
  * two branches;
  * random instructions;
  * a store of the counter and a reload of it, which waits for the store
    and is predicted as a stride;
  * a load of a constant and a consumer of both loads;
  * a 36-long dependent xorshift chain.

  The test counts how often each mechanism happens and fails if one never
  does. A typical run:

  | mechanism | count |
  |---|---|
  | ROB-full stall (cycles) | 20853 |
  | path (1), reuse with actual operands | 3283 |
  | path (2), reuse with predicted operands | 292 |
  | reuse passed over for the VP value | 296 |
  | VP prediction used | 3799 |
  | of which loads | 786 |
  | branch resolved at dispatch | 794 |
  | operand taken from an older instruction of the same group | 12336 |
  | issue with predicted operands | 1186 |
  | writeback, prediction correct / wrong | 3335 / 1439 |
  | path (4), to confirm | 1186 |
  | path (5), confirmed / path (6), re-executed | 503 / 975 |
  | cycles a ready load waited for an older store | 3120 |

  In this run, 27,205 instructions retired in 30,625 cycles.

Most re-executions come from the xorshift chain, as described above under
*Confirm*.

To simulate with Verilator, for example the core:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/vpir_pkg.sv rtl/int_alu.sv rtl/hybrid_vp.sv rtl/reuse_buffer.sv rtl/vpir_core.sv \
  tb/tb_vpir_core.sv --top-module tb_vpir_core -o sim
./obj_dir/sim
```

The other testbenches need `rtl/vpir_pkg.sv`, their module and their
testbench file. The core's run takes well under a second, including the
8192-cycle table clearing after reset.
