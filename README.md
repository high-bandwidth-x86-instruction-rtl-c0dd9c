# x86 instruction fetch with an Instruction Pointer Table

x86 instructions are 1 to 15 bytes long, and where one starts is only known once
the length of the one before it is known. A superscalar fetch unit that wants to
hand four instructions a cycle to the decoders therefore faces a serial chain:
size instruction 0, then instruction 1, and so on. Common designs break the chain
with predecode boundary bits stored next to every byte of the instruction cache
and a scanner that turns them into pointers, which costs cache area and a scan
whose delay grows with the fetch degree.

This design keeps the cache untouched. A separate, small **Instruction Pointer
Table (IPT)** remembers, for a fetch PC that has been seen before, where the next
few instructions start. On a hit the whole group of pointers comes out of one
table access. Where the table knows too little, the **Instruction Identifier**
*predicts* one instruction length (always 3 bytes, the most common x86 length),
which lets two sizers run side by side: one measures the predicted instruction P
and the other the speculative instruction S that would follow it if the
prediction is right. The check happens in the same cycle, so a wrong prediction
never reaches the decoders. It only means that S is not handed out. Whatever the
sizers find is written back, so the next visit to the same code gets more
pointers.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). The defaults are a fetch
degree of 4, a 64-entry IPT and 32-byte cache lines.

## Block structure

```
                 +-------------------------- fetch_top ----------------------------+
 I-cache  <------| fetcher: PC register, line pair, one 15-byte aligner per slot   |---> decoders
 (outside)       |    | PC, line pair              ^ pointers O0..O(N-1), NSFA     |     (outside)
                 |    v                            |                               |
                 |  instruction_identifier                                         |
                 |    ipt  <---->  ii_controller  <---->  spec_commit_unit         |
                 |                                           2 x x86_sizer         |
                 +-----------------------------------------------------------------+
```

| file | what it is |
|---|---|
| `rtl/fetch_pkg.sv` | shared constants: sizer window (15 bytes) and length width |
| `rtl/x86_sizer.sv` | combinational IA-32 length decoder |
| `rtl/spec_commit_unit.sv` | two sizers at O_p and O_s, prediction check, split-line flags, next sequential offset |
| `rtl/ipt.sv` | the table: associative PC lookup, FIFO allocation, update and allocation write ports |
| `rtl/ii_controller.sv` | access, prediction, commitment, placement and address generation |
| `rtl/instruction_identifier.sv` | the three blocks above, wired together |
| `rtl/fetcher.sv` | fetch PC, line-pair read, cutting instructions into decoder slots |
| `rtl/fetch_top.sv` | top level: fetcher + instruction identifier |

The instruction cache, the branch predictor and the decoders are not part of the
RTL. The top reads the cache through `icache_addr`/`icache_bytes` and must get the
bytes back in the same cycle, like a perfect cache. The predictor answers on
`taken_*`, and the decoders take the `slot_*` outputs.

## Taken branches

A predicted-taken branch is the last instruction of its group. Nothing after it
reaches a decoder in that cycle.

* The branch predictor sits outside the unit. For the current fetch it names the
  first branch it predicts taken (`taken_pc`) and that branch's target.
* If `taken_pc` matches one of the group's pointers, the fetcher drops the slots
  after it (`stat[8]`) and loads the target as the next PC. No cycle is lost.
* The table still records the pointers behind the branch, because they are
  correct for the sequential path.
* The next PC differs from the NSFA, so the identifier treats the target as a
  fresh start: it either hits an entry for the target or opens a new one.

`redirect_valid` is for everything else, such as a misprediction found later or
a restart. It discards the current group.

## What an IPT entry means

An entry describes one run of sequential instructions that starts at the entry's
PC and stays within the PC's cache line:

```
 | v0 s0  PC | v1 s1 off1 | v2 s2 off2 | ... | v(N-1) s(N-1) off(N-1) | offN |
```

* Instruction 0 starts at the PC. Instruction k (k >= 1) starts at `line_base + off[k]`.
  Here `line_base` is the PC with its low log2(LINE_BYTES) bits cleared.
* `v[k]` means the length of instruction k is known, that is, `off[k+1]` is valid.
  The valid fields always form a prefix: c fields with `v` set means c instructions
  are known and `off[c]` is where the first unknown one starts.
* `off[N]` is the end of the last field's instruction. A full entry can therefore
  give the next fetch address without sizing anything.
* `s[k]` marks a split-line instruction, one that starts in this line and ends in
  the next.
* Offsets are `log2(2*LINE_BYTES)+1` bits, so an end offset can point past the line.

An entry is **closed** when all N fields are known, or when the last known
instruction ends at or beyond the end of the line. A split-line instruction
always closes its entry. A closed entry is never extended. The code that follows
gets an entry of its own.

Lookup compares the fetch PC with the PC field of every valid entry (fully
associative; if two entries match, the lowest index wins). New entries are placed
first-in-first-out.

## One cycle of the Instruction Identifier

Everything below happens combinationally in the cycle in which the fetcher
presents a PC (`pc_valid`). The table and the two registers (previous NSFA and the
entry used in the previous cycle) are written at the following clock edge.

1. **Access.** The PC is looked up.
   * On a **hit**, the c known instructions of the entry are handed out at once.
   * On a **miss**, there are two cases. If the PC equals the NSFA given in the
     previous cycle and the entry used then is not closed, the PC continues that
     entry (**append**). Otherwise a **new entry** is taken from the FIFO head.
2. **Prediction.** If the working entry is not closed, the first unknown
   instruction is P, at offset O_p. S is placed at O_s = O_p + 3.
3. **Commitment.** Both sizers run.
   * P is always handed out and recorded, with its real length and split bit.
   * S is handed out and recorded only if all of these hold: P's length was 3,
     P is not split-line, S starts in the current line, and S has a place.
   * On a hit, S has a place only if the entry has a free field for it. On a
     miss, if P took the entry's last field, S opens a new entry with S as its
     PC (**new entry for S**).
   * Because S's length is measured too, a right prediction commits two
     instructions.
4. **Address generation.** The NSFA is the end of S if S was committed, otherwise
   the end of P. If there was nothing to predict (closed entry), it is the end of
   the last known instruction.
5. **Placement.**
   * The update port rewrites the hit or appended entry.
   * The allocation port writes a new entry: P's entry on a plain miss, or S's
     entry as described above.
   * Both ports can be used in the same cycle.

Group sizes that follow from these rules, for N = 4:

| situation | instructions handed out |
|---|---|
| miss, prediction right | 2 (P, S) |
| miss, prediction wrong, or P split-line | 1 (P) |
| hit on a closed entry with c known | c (4 for a full entry) |
| hit with c known, c < 3, prediction right | c + 2 |
| hit with c = 3 | 4 (S has no field) |

A sequential stretch of new code therefore goes in at one or two instructions a
cycle. On the second pass it comes out at up to N a cycle.

### Split-line instructions

The fetcher reads the PC's line **and the next line** every cycle. A sizer thus
always sees a whole instruction, even one that runs past the end of the line. Such
an instruction is handed out whole, with its `slot_split` flag set. The NSFA is the
address right after it, which lies in the next line. The entry is closed, so the
instruction after it starts a new entry. This is one reading of a rule that could
also be read as "stop at the split instruction and fetch the next line first". See
*Departures and interpretations*.

## The sizer

`x86_sizer` decodes the length of an IA-32 instruction in a 32-bit code segment
from its first 15 bytes. The checks run in this order:

* **prefixes**: up to `MAX_PREFIX` = 11 of them. `66h` switches immediates between
  2 and 4 bytes, and `67h` switches to 16-bit addressing.
* **first opcode byte**, then the **second opcode byte** if the first is `0Fh`.
* **ModR/M**, which gives the displacement size.
* **SIB**: a base of 101b with mod 00 adds a 32-bit displacement.

The opcode tables cover:

* the one-byte map, including the F6/F7 rule that only `/0` and `/1` carry an
  immediate, and the `moffs` forms of A0–A3;
* the two-byte map of the integer, x87, MMX and SSE generations.

Not covered specially:

* The three-byte maps (0F 38, 0F 3A), 3DNow! and VEX.
* MOV to and from CR/DR (0F 20–23) is sized as if mod selected memory.

Eleven prefixes plus 0F, opcode, ModR/M and SIB fill the 15-byte window exactly,
and that is the sizer's longest path.

## Interfaces and timing

`fetch_top` parameters:

| parameter | default | meaning |
|---|---|---|
| `DEGREE` | 4 | instructions per cycle, N |
| `ENTRIES` | 64 | IPT entries (at least 2) |
| `ADDR_W` | 32 | address width |
| `LINE_BYTES` | 32 | cache line size; power of two, at least 16 |
| `PRED_LEN` | 3 | predicted length of an unknown instruction |
| `MAX_PREFIX` | 11 | prefixes the sizer scans |
| `RESET_PC` | 0 | fetch PC after reset |

Ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (empties the IPT, PC = `RESET_PC`) |
| `icache_addr` | out | line-aligned fetch address |
| `icache_bytes` | in | 2×`LINE_BYTES` bytes from `icache_addr`, byte 0 in bits [7:0], same cycle |
| `taken_valid`, `taken_pc`, `taken_target` | in | first predicted-taken branch of the current fetch and its target; the group ends there |
| `redirect_valid`, `redirect_pc` | in | load a new PC (misprediction, restart); the group of that cycle is dropped |
| `dec_ready` | in | decoders take the group; when low, the PC holds and the table is not touched |
| `slot_valid[k]` | out | slot k holds an instruction; valid slots are contiguous from 0 |
| `slot_pc[k]`, `slot_len[k]` | out | its address and length |
| `slot_split[k]` | out | it crosses into the next line |
| `slot_bytes[k]` | out | 15 bytes from its address (bytes beyond its length are whatever follows) |
| `stat` | out | one-cycle event bits, listed below |

The `stat` bits are:

* [0] IPT hit
* [1] append
* [2] new entry
* [3] new entry for S
* [4] prediction right
* [5] prediction wrong
* [6] split-line instruction
* [7] hit on a closed entry
* [8] group ended by a taken branch

Timing:

* The path from PC to slots is one cycle: the first group after reset appears in
  the first cycle.
* At the rising edge the PC register is loaded as follows:
  * with `redirect_pc` if a redirect is requested;
  * otherwise held if the decoders are not ready;
  * otherwise with `taken_target` if the group was cut at a taken branch;
  * otherwise with the NSFA.
* The whole identifier (CAM lookup, two sizers, controller) is one combinational
  path. Its depth is what limits the clock.

## Departures and interpretations

* **Entry size.** One description of the entry gives N fields, a PC and N−1
  offsets. The drawing of the entry shows offsets 1 to N. The RTL keeps N offsets,
  because the last one (the end of the last instruction) is what lets a full entry
  give the next fetch address.
* **Split-line handling.** The fetcher holds a line pair. The split-line
  instruction is handed out in the cycle it is found, and fetch continues right
  after it. The alternative reading sends the fetcher to the start of the next line
  and re-fetches from the split instruction. That reading would need a PC value
  the identifier cannot size from the line it is given, so it was not followed.
  A split-line instruction also forces the next fetch into a new entry. Here
  that rule becomes "a split-line instruction closes its entry": the instruction
  itself is recorded in the entry it belongs to, and the code after it gets a new
  one.
* **An instruction ending exactly at the line end** closes its entry too, so an
  entry never mixes two lines.
* **Prediction scheme.** Only the fixed 3-byte prediction is built. History-based
  variants, one global bit or a small table of bits, perform no better with this
  organisation and are not included.
* **Degree and line size** (4 and 32 bytes) are this design's choices. Every
  degree from 2 up and every power-of-two line size from 16 up is a parameter
  value.
* **Where the taken-branch cut happens.** The rule "no instruction after a taken
  branch" belongs to the identifier's commit step. The identifier has no branch
  input, so the fetcher applies the rule to the identifier's pointers. The
  effect is the same. There is no branch predictor inside the unit.
* **Reset** clears the valid and `v` bits, the FIFO head, the remembered NSFA and
  the fetch PC. Nothing else is reset.
* **Duplicate entries.** A branch into the middle of a known run misses and gets
  an entry of its own, so the same instruction can be described by two entries.
  This is harmless.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come from
a random instruction generator (`tb/x86_gen_pkg.sv`). The generator builds each
instruction byte by byte from templates (prefixes, opcode, ModR/M, SIB,
displacement, immediate), so lengths are known without a length-decoding table.
`tb/code_mem.sv` fills a perfect-cache model with such a program.

| testbench | what it checks |
|---|---|
| `tb_x86_sizer` | 5000 generated instructions plus directed edge cases: 11 prefixes, 15 bytes, SIB with disp32, 16-bit addressing, F6/F7, ENTER, far call |
| `tb_spec_commit_unit` | lengths, O_s, right/wrong prediction, split flags and next offset on line pairs cut from a program |
| `tb_ipt` | lookup against an array model, FIFO order and eviction, both write ports in one cycle, read port, reset |
| `tb_ii_controller` | seven hand-worked cycles of the algorithm: new entry, append, new entry for S, full hit, split-line P, closed entry, idle |
| `tb_instruction_identifier` | 20000 cycles on random code with jumps into a hot region; every pointer, split flag and NSFA checked; exact group sizes on a directed line; every mechanism must occur |
| `tb_fetcher` | line request, slot bytes, lengths, NSFA following, taken-branch cut and target, redirect, stall, against an ideal identifier |
| `tb_fetch_top` | end to end at the default parameters: hot loop closed by a predicted-taken branch, sweep past the table size (FIFO eviction), second loop, random stalls and redirects. Every instruction reaching the decoders is checked in order; every mechanism must occur; the warm loop must beat 2 instructions/cycle |
| `tb_fetch_rate_sweep` | average fetch rate on a program with a taken branch every ~5 instructions, with the testbench acting as a perfect branch predictor, for (degree, entries) = (4,8), (4,64), (4,256), (2,64), (8,64) at 32-byte lines, and for lines of 16, 32, 64 and 128 bytes at degree 8 with 256 entries |

Typical numbers from `tb_fetch_rate_sweep`, in instructions per fetch cycle with
perfect branch prediction:

| degree | entries | line bytes | rate |
|---|---|---|---|
| 2 | 64 | 32 | 1.7 |
| 4 | 8 | 32 | 1.05 |
| 4 | 64 | 32 | 2.4 |
| 4 | 256 | 32 | 2.4 |
| 8 | 64 | 32 | 3.2 |
| 8 | 256 | 16 | 2.6 |
| 8 | 256 | 32 | 3.2 |
| 8 | 256 | 64 | 3.5 |
| 8 | 256 | 128 | 4.3 |

The rate grows with the degree, and it saturates once the table holds the working
set. Longer lines help because an entry never spans two lines: a short line ends
entries early and cuts groups short. The warm hot loop of `tb_fetch_top` reaches about 3.3 per cycle at degree 4.
These numbers come from synthetic code, not from real program traces.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fetch_pkg.sv tb/x86_gen_pkg.sv tb/tb_fetch_top.sv --top-module tb_fetch_top
./obj_dir/Vtb_fetch_top
```

Replace `tb_fetch_top` with any other testbench name. Every run takes well under
a second.

Things to change:

* **Degree, table size, line size:** set the parameters of `fetch_top`.
  `tb_fetch_rate_sweep` shows how to instantiate several configurations side by
  side.
* **Another prediction:** `PRED_LEN` is the only input of the predictor. A
  history-based predictor would drive `pred_len` in `ii_controller` from a table
  instead.
* **Opcode coverage:** the opcode tables are the `case` statements in
  `x86_sizer.sv`.

## Limitations

* Only 32-bit code segments are sized (no 16-bit default operand size, no 64-bit mode).
* There is no branch predictor inside the unit. Without one driving `taken_*`,
  taken branches do not cut a group short.
* The IPT does not watch for code being modified. Self-modifying code would need
  the table flushed, which reset does.
* The whole identifier works in a single cycle. A pipelined version (table access
  in one stage, sizing in the next) is not provided.
