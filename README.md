# Boolean formula branch predictor

Table-based branch predictors get slower as wires get slower relative to gates. In a deep
sub-micron process at an aggressive clock, only a small pattern table can be read within one
cycle. This design moves most of the predictor into the program instead. Profiling picks, for each
static branch, a Boolean function of the recent global branch history that predicts the branch
well. The function is encoded in spare bits of the branch instruction. At fetch, a small
combinational circuit evaluates that function on the history register, and the result is the
prediction. The hardware holds no per-branch state: it has one history register, a tree of
N-1 programmable gates and one XOR.

The functions are limited to *read-once monotone formulas*: AND/OR trees in which every history
bit appears exactly once, optionally complemented as a whole. For a fixed tree shape, such a
formula is named by one bit per gate (AND or OR) plus one invert bit. That is N bits for N history
bits, where an arbitrary function of N bits would need 2^N bits.

The RTL also contains the hybrid form: an *agree* pattern table of 2-bit counters that predicts
whether the outcome will agree with the formula. It can correct branches that no monotone formula
captures.

Default configuration: N = 8 history bits and 8-bit formulas, with a 1024-entry agree table. That
is the size the underlying study places within one cycle at 70 nm and about 5 GHz. The same RTL
builds N = 2, 4 and 16, with any power-of-two table size.

## The formula encoding

This is the part that needs care when writing a compiler back end or a profiler for the hardware.

History: `hist[0]` is x0, the outcome of the most recently resolved branch; `hist[i]` is x_i
(1 = taken).

Formula word `f[N-1:0]`, read from the instruction:

| bits        | meaning                                                                   |
|-------------|---------------------------------------------------------------------------|
| `f[N-1]`    | invert: complement the tree output                                        |
| `f[k]`, k < N-1 | connective k: 0 = AND, 1 = OR                                         |

The connectives form a balanced binary tree. They are numbered level by level, starting at the
leaves:

- Connectives 0 .. N/2-1 combine (x0,x1), (x2,x3), …
- The next N/4 connectives combine pairs of those results, and so on.
- Connective N-2 is the root.

As a node list: node i < N is x_i, and node N+k = conn_k(node 2k, node 2k+1).

For N = 8, `((x0|x1)|(x2&x3)) & ((x4|x5)&(x6|x7))` is `f = 8'b0_0_01_1101`:

- bit 7: invert = 0
- bit 6: root = AND
- bits 5:4: middle connectives = AND, OR
- bits 3:0: leaf connectives = OR, OR, AND, OR

**Constants.** A monotone formula cannot be constant. So the word whose connectives are all AND
is defined as the constant 0, and with the invert bit set it is the constant 1. These are "always
not taken" and "always taken", by far the most common choices. The hardware gates the tree output
to 0 when all connective bits are 0, before the XOR. This departs from plain evaluation only for
the all-ones history. As a result, the formula x0&x1&…&x(N-1) cannot be expressed.

Note for profiler writers: one published table of chosen 4-bit formulas lists the all-AND formula
as an ordinary formula and omits the all-OR one. That suggests some implementation used all-OR as
the constant. This RTL follows the prose definition (all-AND is the constant). Changing it is a
one-line edit of `all_and` in `bf_formula_eval.sv`.

## Hardware

```
                   fetch_insn ──► bf_branch_decode ──► formula[N-1:0] ─┐      ┌─► pred_formula
                   fetch_pc   ──►        │             target          ▼      │
                                         └──► is_cond        bf_formula_eval ─┤
   res_valid/res_taken ──► bf_history_reg ── hist[N-1:0] ──────────►  (tree+XOR)
                                  │                                            │   pred_agree =
                                  └── hist ──► XOR pc[2+:IDX_W] ─► bf_agree_pht ─► pred_formula
                                                                   (2-bit ctrs)    ^ ~agree
```

| module | what it is |
|---|---|
| `bf_pkg` | connective enum, Alpha field constants, 2-bit counter type and update function |
| `bf_connective` | one programmable gate: AND when ctrl = 0, OR when ctrl = 1. This is the majority function (a full adder's carry), built as three 2-input NANDs into a 3-input NAND |
| `bf_formula_eval` | N-1 connectives in a balanced tree, the all-AND-is-0 gate, the output XOR. Combinational, 2·log2(N) NAND levels plus the XOR |
| `bf_history_reg` | global history shift register, shifted at branch resolution |
| `bf_branch_decode` | splits an Alpha conditional branch into opcode, register, formula and shortened displacement; computes the target |
| `bf_agree_pht` | table of 2-bit counters, "agree with formula" when the MSB is 1; reset to weakly agree |
| `bf_predictor_top` | the predictor: all of the above |

### Instruction format

The Alpha conditional-branch format is kept: opcode `[31:26]`, register `[25:21]` and a 21-bit
displacement `[20:0]`. The top N displacement bits carry the formula (`insn[20 -: N]`). The low
21-N bits remain a signed word displacement, and target = pc + 4 + 4·disp. With N = 8 a branch
reaches ±4K instructions; with N = 16, only ±16. Longer branches must be split into a branch and a
jump. Opcodes 0x31–0x33, 0x35–0x37 and 0x38–0x3F count as conditional branches. BR and BSR are not
predicted.

### Top-level interface and timing

- **Fetch.** Drive `fetch_valid`, `fetch_pc` and `fetch_insn`. In the same cycle, combinationally,
  `pred_valid`, `pred_formula`, `pred_agree`, `pred_target` and `pred_pht_idx` are valid. The
  predictor has no pipeline registers of its own. Its whole point is to finish well inside one
  cycle.
- **Resolve.** Pulse `res_valid` with `res_taken`, together with the `pred_pht_idx` and
  `pred_formula` that the branch received at fetch (`res_pht_idx`, `res_formula_pred`). On that
  clock edge the outcome shifts into the history and the indexed counter moves toward "agree"
  (outcome == formula prediction) or "disagree". A fetch in the same cycle sees the state before the
  update.
- **Reset.** `rst_n` is asynchronous and active low. It clears the history and sets every counter
  to weakly agree, so an untrained hybrid behaves exactly like the pure formula predictor.

`pred_formula` is the pure Boolean-formula prediction. `pred_agree` is the agree/formula hybrid.
The fetch unit uses whichever it was built for.

Parameters of `bf_predictor_top`:

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | history bits used by the formula = formula field width; power of two, 2..16 |
| `PHT_ENTRIES` | 1024 | agree counters; power of two |
| `HIST_LEN` | 10 | history register length; at least N. The table index uses its low log2(PHT_ENTRIES) bits |
| `ADDR_W` | 64 | address width |

## Where this design makes its own choices

The method defines the encoding, the circuit and the agree combination. The following are
choices of this implementation:

- **Bit order.** The order of connective bits in the formula word, the position of the invert bit,
  and which displacement bits carry the formula (all described above).
- **History update.** The history is updated at resolution, not speculatively at fetch. This
  matters. The formulas are profiled on a history that contains every earlier branch. When
  branches resolve several cycles after fetch, the formula sees a lagging history and its accuracy
  drops sharply. In the end-to-end test, a 3-cycle resolve delay raises the formula predictor's
  misprediction rate from about 7 % to about 36 % on the same program. The agree table absorbs much
  of this. A processor with a long fetch-to-resolve distance would want a speculatively updated
  history with repair on misprediction. That is not built here.
- **Table index.** The agree table is indexed gshare-style: `pc[2 +: log2(PHT_ENTRIES)] ^ hist`.
- **Table structure.** The table is a flip-flop array with one combinational read and one write per
  cycle. At 1K entries this costs 2048 flops. A register-file or SRAM macro would replace it in a
  real implementation.
- **Tree size.** N must be a power of two, because the balanced tree is the only shape defined.
  History lengths such as 18 are not supported.
- **Fetch state at resolve.** The caller carries the fetch state (table index, formula prediction)
  to resolution.

Not part of the RTL: the profiler that chooses formulas, which is a compile-time tool, and the
instruction-cache pre-decode bits that would deliver the formula field early.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bf_connective` | all 8 input combinations against AND/OR |
| `tb_bf_formula_eval` | N = 2, 4 and 8 exhaustively (every formula × every history), N = 2 also by hand; N = 16 randomly; hand-written formulas, including the example above, the 4-input formulas with their complements, the two constants and all-OR. The reference is a recursive evaluator |
| `tb_bf_history_reg` | random updates against a queue model |
| `tb_bf_branch_decode` | random fields at N = 8 and 16: fields, conditional-branch opcode list, sign-extended targets |
| `tb_bf_agree_pht` | reset value of every entry, saturation at both ends, read-after-write timing |
| `tb_bf_predictor_top` | end to end at the default parameters (below) |
| `tb_bf_predictor_n2`, `tb_bf_predictor_n4`, `tb_bf_predictor_n16` | the same at N = 2 and N = 4 with 1K entries, and at N = 16 with 8K entries |

The end-to-end benches share `tb/bf_bench_body.svh`. Each one:

1. Generates a synthetic program of nine static branches: a loop back-edge, two biased branches,
   branches following monotone formulas of recent history and their complements, an XOR of the
   last two outcomes (not monotone), and a rarely executed branch.
2. Profiles a training run. For each branch it picks the formula with the fewest mispredictions
   over the histories seen before that branch. For N ≤ 8 every formula is tried; for N = 16 a
   restarted local search stands in. Branches seen fewer than 500 times get only a constant.
3. Encodes the formulas into BNE instructions.
4. Drives a second run through the predictor with another seed. Non-branch instructions and idle
   cycles are mixed in. Branches resolve first in their fetch cycle, then 3 cycles later.

Every prediction, table index, target and history value is compared, in the fetch cycle, with a
reference model in the testbench. Each mechanism must occur at least once:

- constant-0, constant-1, plain and inverted formulas
- the agree table overriding the formula
- counter saturation at both ends
- the rare-branch constant
- filtered non-branches
- idle cycles
- delayed resolution

With same-cycle resolution, the formula predictor must also beat the best per-branch constant (a
bias bit). On the default bench it mispredicts about 6.7 % against 12 % for bias bits.

Run a bench with plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_bf_predictor_top rtl/bf_pkg.sv tb/tb_bf_predictor_top.sv
./obj_dir/Vtb_bf_predictor_top
```

Every bench finishes in seconds. Replace the top-module name to run another bench.

## Limits of trust

- The logic function of every block is checked against independent models. The agree
  combination's accuracy is only shown on a synthetic program. The benchmark traces that the
  method was evaluated on are not part of this repository.
- Timing and power are properties of a hand-built static-CMOS circuit. Synthesis of this RTL will
  not necessarily produce the NAND-only structure. `bf_connective` is written as NANDs to match it,
  but a synthesis tool may restructure it. The output XOR and the constant-0 gate are written as
  ordinary logic, not as a particular gate netlist.
