# A five-stage RISC-V pipeline that forwards results instead of waiting for them

In a classic five-stage pipeline (fetch, register read, ALU, data memory,
register write) an instruction reads its source registers in stage 2. Its
predecessors write theirs in stage 5. A result computed by the instruction just
ahead therefore reaches the register file two or three cycles after the next
instructions have already read a stale copy. The result itself exists much
earlier: an ALU result exists at the end of stage 3, and load data at the end of
stage 4. This design takes each result from the pipeline register where it
currently sits and feeds it to the ALU inputs of the instruction that needs it.
That is *forwarding* (or *bypassing*). Forwarding removes every read-after-write
stall except one: an instruction that uses the data of a load immediately before
it. That instruction must wait one cycle, and the pipeline inserts the wait by
itself.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It executes a 64-bit
RISC-V integer subset: ALU operations, `lui`, `ld` and `sd`. It has no branches.

## Pipeline organisation

| stage | name | work | pipeline registers at its end |
|---|---|---|---|
| 1 | fetch | `PC` addresses the instruction memory; `PC+4` is computed | `PC`, `IR` |
| 2 | register read / decode | register file read (`rs1`, `rs2`), operation decode, immediate, **hazard detection and forwarding decision** | `A`, `B`, `Imm`, `rrd3`, `rwe3`, `mrd3`, `mwe3`, ALU op, B-select, `fwd.ctrl` |
| 3 | ALU | forwarding muxes choose the operands; the ALU computes | ALU result, store data, `rrd4`, `rwe4`, `mrd4`, `mwe4` |
| 4 | data memory | load or store at the ALU result address | load data, ALU result, `rrd5`, `rwe5`, `mrd5` |
| 5 | register write | write-back mux (`mrd5` ? load data : ALU result) drives the register file | — |

The signal names follow a simple rule. `rrdN` is the destination register of
the instruction now in stage N. `rweN` says it writes a register, `mrdN` that it
is a load, and `mweN` that it is a store.

## When a result is ready and when it is needed

This is the heart of the design. Let the *distance* be how many instructions
separate the producer from the consumer (1 = adjacent).

| distance | producer is an ALU op | producer is a load |
|---|---|---|
| 1 | consumer in stage 3 takes the **stage-4 ALU result register** | data not ready yet: **one wait cycle**, then as distance 2 |
| 2 | consumer in stage 3 takes the **stage-5 write-back value** | same, the write-back mux already selects the load data |
| 3 | the register file passes the value being written straight to its read port in the same cycle | same |
| ≥ 4 | ordinary register file read | same |

Two multiplexers sit in front of the ALU (`fwd_mux`), one for operand A and one
for operand B. Each has three inputs: the value read from the register file,
the stage-4 ALU result and the stage-5 write-back value. The B-side mux also
feeds the store-data register, so `sd` gets forwarded data as well. The
immediate/B selection comes after the B-side mux.

The register file behaves like a latch-based register file. Data written in a
cycle can be read in that same cycle. The RTL builds it from edge-triggered
storage plus a bypass from the write port to both read ports. This is why
distance 3 needs nothing extra.

## Forwarding control

`hazard_fwd_ctrl` works in stage 2, on the instruction in `IR`, one cycle
before its operands are used:

```
Match(rs, rd) = (rs == rd) AND (rd != x0) AND rd.writeEnable

fwd_a = Match(rs1, rrd3) ? FROM_STAGE4 : Match(rs1, rrd4) ? FROM_STAGE5 : NONE
fwd_b = (same with rs2)
```

The instruction in stage 3 is more recent than the one in stage 4, so it wins
when both write the same register (`add t0,..; add t0,t0,..; add t0,t0,..`).
The decision is stored in the `fwd.ctrl` pipeline register. By the next cycle
the consumer is in stage 3 and the producers have moved one stage on. So a
match against stage 3 now means "take the stage-4 register", and a match
against stage 4 means "take the stage-5 value". `x0` never matches, so writes
to `x0` are never forwarded.

## The load-use wait

```
Wait = mrd3 AND Match(rs1, rrd3) AND need_rs1
    OR mrd3 AND Match(rs2, rrd3) AND need_rs2
```

`Wait` is high when the instruction in stage 3 is a load and the instruction in
stage 2 really reads the loaded register. The flags `need_rs1` and `need_rs2`
come from the decoder. They stop a meaningless register field from causing a
stall: `lui` reads no register, and I-format instructions (`addi`, `ld`) have
no `rs2`. During a Wait cycle:

* `PC` and `IR` keep their contents (their load enable is `!Wait`), so the
  waiting instruction and the one behind it are repeated;
* the instruction entering stage 3 is turned into a no-op by clearing `rwe3`,
  `mrd3` and `mwe3`.

One cycle later the load is in stage 4. The repeated decode then sees
`Match(rs, rrd4)` and forwards the load data from stage 5. Example, with cycle
numbers counted from the fetch of the load:

```
cycle        0      1        2         3         4        5
ld x10       IF     RR       ALU       MEM       WB
sub x11,x10         IF       RR(Wait)  RR        ALU<-wb  MEM ...
add x12                      IF        IF        RR       ALU ...
bubble                                 ALU       MEM      WB (writes nothing)
```

ALU instructions never cause a wait. Memory accesses happen in program order in
stage 4, so memory causes no hazards. Register writes also happen in program
order, so write-after-read and write-after-write cannot go wrong.

## Instruction subset and memories

* `op_decoder` supports these instructions: `add sub sll slt sltu xor srl sra or and`,
  `addi slti sltiu xori ori andi slli srli srai` (6-bit shift amounts), `lui`,
  `ld`, `sd`. It turns every other encoding into a no-op with all write enables
  clear. That includes branches, jumps, the 32-bit `W` forms and loads or
  stores of other widths.
* Instruction memory (`imem`): 1024 words. It has a combinational fetch and a
  separate write port that loads the program.
* Data memory (`dmem`): 4096 bytes, little-endian, with 64-bit accesses at
  **any** byte address. Unaligned access is allowed on purpose: the worked
  example loads from address 140. Reads are combinational and the result is
  captured at the end of stage 4. Writes happen at the clock edge.
* Register file: 32 × 64 bits, `x0` = 0.

## Top-level interface (`rv_pipeline_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `imem_we`, `imem_widx`, `imem_wdata` | in | 1, 10, 32 | load one instruction word (normally while in reset) |
| `pc` | out | 64 | PC register (address being fetched) |
| `wait_o` | out | 1 | load-use wait this cycle |
| `fwd_a3`, `fwd_b3` | out | 2 | forwarding select used in stage 3 this cycle (0 none, 1 stage 4, 2 stage 5) |
| `rf_we`, `rf_wa`, `rf_wd` | out | 1, 5, 64 | register-file write port (stage 5) |
| `dm_we`, `dm_addr`, `dm_wdata` | out | 1, 64, 64 | data-memory write (stage 4) |

Parameters: `XLEN` = 64, `IM_WORDS` = 1024, `DM_BYTES` = 4096.

Reset sets `PC` to 0, loads a no-op (`addi x0,x0,0`) into `IR` and clears all
pipeline control bits. The register file and the memories are not reset.
Programs must initialise the registers they read. Without stalls, an
instruction fetched in cycle *t* writes memory in cycle *t+3* and the register
file in cycle *t+4*. Each Wait cycle it suffered adds one.

Two assertions in the top check the stall logic. Wait only happens when a load
is in stage 3, and the instruction after a Wait cycle writes nothing.

## Files

| file | contents |
|---|---|
| `rtl/pipe_pkg.sv` | opcodes, ALU-op / immediate-format / forwarding-select enums, control-word struct |
| `rtl/rv_pipeline_top.sv` | PC, IR, all pipeline registers, stall and bubble, write-back mux; instantiates everything |
| `rtl/hazard_fwd_ctrl.sv` | Match, forwarding selects, Wait |
| `rtl/fwd_mux.sv` | 3-input operand forwarding mux |
| `rtl/regfile.sv` | 2-read/1-write register file with write-through |
| `rtl/op_decoder.sv` | control word, `need_rs1`/`need_rs2` |
| `rtl/imm_gen.sv` | I/S/U immediates |
| `rtl/alu.sv` | ALU |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction and data memories |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and contains a watchdog.

* `tb_rv_pipeline_top` runs the full design at its default parameters. It
  contains an instruction-set reference model that executes the same
  instruction words one at a time, without a pipeline. The testbench compares
  the ordered lists of register writes and memory writes, and checks the
  number of wait cycles against the number of load-use pairs in the program.
  The programs are:
  * the worked forwarding examples (`ld x10,40(x1); sub x11,x2,x3; ...` with
    x1=100, x2=200, x3=32, x4=400, x13=130, M[140]=14). It checks the results
    14, 168 and 414, the store of 130 to address 216, and exactly one wait
    for the distance-1 load dependence;
  * store-data forwarding, distance 3, and writes to `x0`;
  * the scheduling example `a = b + c; e = b - f`. The naive order (`ld; ld;
    add; sd; ld; sub; sd`) must lose exactly 2 cycles. The reordered version
    with a third temporary register must lose none. Both are checked on the
    cycle of the last store. A third variant, `a[i] = b + c; e = b - a[j]`
    with i = j, checks that a load right after a store to the same address
    sees the stored value;
  * six random 400-instruction programs. They draw registers from x0–x7, so
    dependences at every distance are frequent.

  The testbench counts how often each mechanism occurs and fails if one never
  does: waits, each forwarding path on A and B, store-data forwarding, and
  register-file write-through.
* The module testbenches compare against models written in the testbench. They
  use random and directed stimulus, with exhaustive tables where they are small.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pipe_pkg.sv \
    tb/tb_rv_pipeline_top.sv --top-module tb_rv_pipeline_top -o sim
./obj_dir/sim
```

The same pattern works for every other `tb/tb_<module>.sv`.

## What is taken from the pipeline description and what is this design's own

These parts follow the pipeline description: the five stages; the pipeline
registers and their names; the three-input forwarding muxes and their sources;
forwarding decided one cycle early and registered; the Match definition and
stage-3 priority; the Wait equation with `need_rs1`/`need_rs2`; stalling PC and
IR while a bubble goes down; and the write-through register file.

These are choices of this design:

* **No branches or jumps.** The PC mux has a branch/jump input in the original
  datapath, but its source and the handling of control hazards are not
  specified. Here the PC always advances by 4, and branch and jump encodings
  execute as no-ops.
* The instruction subset beyond `ld`, `sd`, `add`, `sub`, `addi` and `lui`.
  Also the RV64 encodings and immediate layouts.
* The register file uses flip-flops plus a bypass instead of latches. Reads
  give the same results.
* Memory sizes, little-endian byte order, unaligned 64-bit access, the program
  load port, the reset behaviour and the observation outputs.
* The forwarding selects are not gated by `need_rs1`/`need_rs2`. Forwarding a
  value that an instruction ignores changes nothing.
