# Conjoined pipelines: overclocking and fault tolerance from one duplicated pipeline

A conjoined pipeline runs two copies of every pipeline stage in lock step.
The leading copy (L) is clocked faster than its worst-case delay allows, so
it may latch wrong values (timing errors). The shadow copy (S) always has
enough time. Both copies can be hit by soft errors. A mismatch between the
two triggers a short rollback. Because the shadow copy is never trusted
blindly, the scheme covers all of these cases:

- timing errors in L
- soft errors in L, in S, or in both
- faults that persist for several cycles (intermittent)
- faults that never go away (permanent)

This repository holds synthesizable SystemVerilog for two conjoined designs,
with self-checking testbenches:

* a two-stage arithmetic pipeline: a 64-bit carry look-ahead addition, then a
  32 x 32 multiplication of the sum's upper and lower halves
  (`conjoined_addmult`);
* a five-stage in-order MIPS-subset processor with operand forwarding
  (`conjoined_mips`).

`conjoined_top` places the two side by side. They share only the clock.

## The idea: who reads what

Each pipeline boundary has two registers: an **L register** and an **S
register**. The two copies of the stage logic feed them:

| Logic copy | Reads | Writes |
|------------|-------|--------|
| L-LOGIC | the **L** registers | the next L registers |
| S-LOGIC | the **L** registers as well | the next S registers |

Every feedback path also comes from the L registers: forwarding, branch
redirect and stall. So the two copies always see the same inputs.

The S registers are never read by the logic. They hold the last state that
was *checked*. E-DETECT compares what the L register latched with what
S-LOGIC computed from the same inputs. The S register is written only when
no stage in the whole pipeline reports a mismatch. A soft error in S-LOGIC
therefore never reaches an S register, and the S registers are always a safe
point to return to.

## Cycle-level model of the clocks

The physical scheme has three phase-shifted clocks:

| Clock | Role |
|-------|------|
| L_Clk | clocks the L registers |
| E_Clk | latches the global error flag |
| S_Clk | clocks the S registers |

S-LOGIC's contamination delay is padded beyond the L-to-S phase shift.
Because of that padding, S-LOGIC still shows the result of the *old* L
values when S_Clk arrives. The gated clocks L_Clock and S_Clock follow
L_Clk and S_Clk, and are held during recovery.

The RTL models this with a single clock `clk` (= L_Clk) and two clock
enables, `l_en` for L_Clock and `s_en` for S_Clock. Each `conjoined_stage`
has three registers:

* `l_q`, the L register. At an enabled edge it takes the L-LOGIC result, or
  the S register when `load_sp` (Load_SP) is high.
* `sl_q`, the S-LOGIC result captured at the same edge. This stands for the
  padded contamination delay: it is the value S-LOGIC still holds when
  S_Clk arrives.
* `s_q`, the S register. It takes `sl_q` at the next edge if `s_en` is high.

E-DETECT compares `l_q` with `sl_q` during the cycle in between. The error
register clocked by E_Clk is folded into the same edge. In short: a value
latched by L at edge *n* is checked during cycle *n*. If it is right, it is
copied into S at edge *n+1*.

The enables and their gating are exact. The physical phase shifts are not
modelled. Timing errors are therefore injected as bit flips on the L side
(next section).

## Recovery, retry and single-pipeline mode

`clk_stall_cntrl` is a four-state machine: NORMAL, STALL, RESUME and SINGLE.
Any stage's error flag in NORMAL starts a three-cycle recovery:

| cycle | L registers | S registers | error flags |
|-------|-------------|-------------|-------------|
| 1 (error seen) | loaded from S at its end (Load_SP) | held | cause the recovery |
| 2 STALL | held (L_Clock stalled) | held | ignored |
| 3 RESUME | capture normally | held | ignored |
| next NORMAL | capture | written if no error | checked |

After the rollback, L-LOGIC gets two full cycles (STALL and RESUME) to
compute from the restored state. That is enough even for an overclocked
period, given the timing relations below. Each recovery costs exactly three
cycles; the testbenches check this count.

A retry counter counts recoveries with no error-free NORMAL cycle between
them. When it has reached `MAX_RETRY` (default 4) and another error arrives,
the fault is declared permanent:

* The controller enters SINGLE: errors are ignored and S_Clock stops.
* `overclock_ok` drops, telling the clock generator to return to the safe
  frequency.
* The input `single_use_s` chooses which logic copy feeds the L registers
  from then on. This is how the surviving copy is selected, for example
  after a diagnostic test.

So a permanent fault costs `MAX_RETRY + 1` recoveries and then runs on
without fault tolerance.

## The add-multiply pipeline (`conjoined_addmult`)

| stage | register contents | logic feeding it |
|-------|-------------------|------------------|
| 0 | valid, a, b (129 bits) | input selection |
| 1 | valid, sum (65 bits) | `cla_adder`, 64 bits |
| 2 | valid, product (65 bits) | `multiplier`: sum[63:32] x sum[31:0] |

* **Stage 0.** The input register makes the adder read an L register, like
  every other stage logic. Its "logic" is the choice between a new operand
  and a replayed one.
* **Rollback and replay.** A rollback discards the operation taken in the
  error cycle. The pipeline keeps a copy of it (`hold_q`) and offers it again
  after recovery (`replay_q`). While that happens, `in_ready` is low.
* **Output.** Results leave from the stage-2 S register, so only checked
  values come out. In single-pipeline mode they leave from the L register.
* **Latency.** An operand accepted at edge *n* is presented (`out_valid`)
  after edge *n+3*. In single mode it is one cycle earlier.
* **Throughput.** One operation per cycle, plus three cycles per recovery.

`cla_adder` is a tree of 4-bit look-ahead units with group generate and
propagate, so WIDTH must be a power of four. `multiplier` is the plain `*`
operator; the synthesis tool picks the architecture.

## The MIPS pipeline (`conjoined_mips`)

A classic IF / ID / EX / MEM / WB pipeline:

* **Conjoined state.** All five pipeline registers are conjoined stages: PC,
  IF/ID, ID/EX, EX/MEM and MEM/WB. The combinational logic of all stages is
  one module, `mips_logic`, instantiated twice.
* **Hazards.** EX forwards from EX/MEM (non-loads) and MEM/WB. ID bypasses
  the register file from MEM/WB. A load-use hazard costs one bubble.
* **Control flow.** Branches and jumps resolve in EX. A taken one squashes
  the two younger instructions. There is no delay slot.
* **Instructions:**
  * ADD(U), SUB(U), AND, OR, XOR, NOR, SLT(U)
  * SLL, SRL, SRA, SLLV, SRLV
  * JR, MUL (SPECIAL2)
  * ADDI(U), SLTI(U), ANDI, ORI, XORI, LUI
  * LW, SW, BEQ, BNE, J, JAL
  * BREAK, which halts.

  Other encodings do nothing.
* **Memories.** Instruction memory is 1024 words and data memory 16384 words.
  Both are word addressed; the data memory is read asynchronously.
* **Program load and inspection.** The program is written through `imem_*`
  while in reset. Data memory is read through `dbg_*`.

**Architectural state is shared, not duplicated.** This covers the register
file, the data memory, the halt flag and the retired-instruction counter.
Both logic copies read it through their own ports. It is written only at the
end of a cycle whose pipeline state has just been checked (`s_en`), using the
L register contents. Those contents equal the checked S-LOGIC result.

A recovery goes back exactly one state, to the S registers. Their writes have
already been made. Re-executing from there writes the same values again, and
the ID-stage bypass gives the same operands as before. So the rollback leaves
memory and registers consistent. In single-pipeline mode every new L state
commits.

## Fault injection ports

Both designs carry fault-injection inputs. Tie them to zero in use.

* **Add-multiply pipeline:** `fi_l0..2` and `fi_s0..2`. These are XOR masks
  on each L-LOGIC and S-LOGIC result.
* **MIPS:** `fi_l_en` and `fi_s_en` (one bit per stage) with `fi_bit`. Each
  flips bit `fi_bit mod width` of the selected stages' results.

The testbenches model the fault types with these ports as follows:

| fault | how it is injected |
|-------|--------------------|
| timing error | L side only, never on the capture after a stall |
| soft error | one-cycle flip on either side |
| intermittent fault | flip held for 2 to 6 cycles |
| permanent fault | stuck bit in the leading logic |

Every injected flip reaches a register. Faults that would vanish inside the
logic (logically masked upsets) do not occur in this model, so every flip is
detected.

## Timing relations (for the clock generator)

The design's timing analysis uses these quantities:

| quantity | meaning | value |
|----------|---------|-------|
| T_Max | worst-case period | 18 ns |
| T_Min | overclocked period | 12 ns |
| T_Err | error detection | 2.6 ns |
| T_SStall | stalling S_Clk | 2.1 ns |
| T_LSP | asserting Load_SP and the mux | 2.69 ns |

These relations follow from them:

* PS_Min = T_Err + T_SStall = 4.7 ns. This is the smallest L-to-S phase
  shift.
* PS_Max = T_Max - T_Min + PS_Min = 10.7 ns.
* PS_Max <= T_FmaxCD. T_FmaxCD is the smallest S-LOGIC contamination delay.
  It must lie between PS_Min and T_Min.
* 2 x T_Min >= T_Max + T_Err + T_LSP, i.e. 24 >= 23.29 ns. The two recovery
  cycles must cover a worst-case evaluation plus detection and reload.

The tunable phase shift T_PS must satisfy 0 <= T_PS <= T_Max - T_Min and
PS_Min <= T_PS + T_Err + T_SStall <= PS_Max.

The testbenches report run times at 18 ns and 12 ns per cycle.

## What this RTL does not contain, and where it departs

* **Clock generation.** There is no generator or tuning loop for L_Clk, E_Clk
  and S_Clk. That is clock synthesis (PLL or phase shifters) driven by an
  external tuning algorithm. The design models the clocks as enables and
  exports `overclock_ok`.
* **Metastability.** E-DETECT has no metastability detection on the L
  flip-flops; a two-state simulation has no metastability. In silicon, the
  error register must be hardened.
* **Delay padding.** The padding of S-LOGIC's contamination delay is a
  physical-design constraint, not RTL. The `sl_q` register stands for it.
* **Duplicated logic in synthesis.** A synthesis tool will merge the two
  identical logic copies. A real implementation needs keep or don't-touch
  attributes on both copies, and minimum-delay constraints on S-LOGIC.
* **Multiplier.** It is behavioural, not a specific fast low-power multiplier
  architecture.
* **This design's own choices:**
  * the stage-0 input register and the replay of the rolled-back operation;
  * results taken from the S register;
  * `MAX_RETRY` = 4;
  * the single-copy selection input;
  * the whole MIPS microarchitecture beyond "five stages with forwarding",
    including the memory sizes and how architectural state joins the scheme.
* **No explicit unprotected mode.** A mode with fault tolerance switched off
  is exactly the single-pipeline mode.

## Testbenches

| testbench | what it shows |
|-----------|---------------|
| `tb_cla_adder`, `tb_multiplier` | carry-chain and operand corner cases plus 20,000 random vectors against independent references (`+`, shift-and-add) |
| `tb_e_detect` | single-bit and random mismatches |
| `tb_conjoined_stage` | L/S/Load_SP register behaviour against a reference model |
| `tb_clk_stall_cntrl` | recovery sequence, retry count, entry into single mode |
| `tb_conjoined_addmult` | fault-free latency and throughput, every stage and side, random soft/timing/intermittent faults, stuck bit; cycle count = base + 3 x recoveries |
| `tb_addmult_workloads` | three 10,000-cycle fault campaigns (soft, intermittent, permanent) with detected/masked/undetected counts; 100,000 operations with faults at 10 per 1000 cycles |
| `tb_conjoined_mips` | ALU, Fibonacci, random-number and matrix programs with and without faults, intermittent faults, stuck bit in single mode |
| `tb_conjoined_top` | both designs at default sizes: 100,000 add-multiplies, the Fibonacci (45 numbers), random-number (10,000 numbers) and 10x10 matrix-multiply programs, each with faults at 10 per 1000 cycles, then a permanent fault in each; counts every mechanism |

`tb/mips_asm_pkg.sv` builds the test programs from small encoder functions
and computes their expected results.

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

To simulate, for example the end-to-end run:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/conjoined_pkg.sv rtl/mips_pkg.sv tb/mips_asm_pkg.sv \
  tb/tb_conjoined_top.sv --top-module tb_conjoined_top
./obj_dir/Vtb_conjoined_top
```

Testbenches that do not use the MIPS do not need `mips_asm_pkg.sv`.
Each testbench finishes in under a second.

## Measured behaviour

Figures from one run of the testbenches. The fault positions are random, so
the recovery counts vary slightly between seeds.

* **Add-multiply, 100,000 operations with faults at 10 per 1000 cycles.**
  The run takes 103,042 cycles with 1,013 recoveries; the fault-free count
  is 100,003. The testbench compares three ways of running:

  | mode | execution time |
  |------|----------------|
  | unprotected at 18 ns | 1.80 ms |
  | protected at 18 ns | 1.85 ms |
  | protected and overclocked at 12 ns | 1.24 ms, about 32% less than unprotected |

  This ignores clock-skew margin and the time the clock generator needs to
  switch frequency. A real gain is therefore smaller.
* **Fault campaigns, 10,000 cycles each.**
  * Soft errors: about 100 injected, all detected, none escaped.
  * Intermittent faults: all detected by repeated recovery.
  * Permanent fault: detected; the pipeline ends in single-pipeline mode and
    its results stay correct.
* **MIPS programs, fault free.**

  | program | cycles |
  |---------|--------|
  | 45 Fibonacci numbers | 413 |
  | 10,000 random numbers | 80,011 |
  | 10x10 matrix multiply | 13,843 |

  With faults, each run takes exactly three cycles more per recovery and
  leaves the same memory contents.
