# Ts: a zero-cycle thread-switch instruction for a multithreaded ARM/Thumb front end

This RTL implements the front end (fetch, and decode with register read) of a multithreaded
ARM-style five-stage pipeline that runs 16-bit Thumb code for several hardware threads. Its main
idea is an extra 16-bit Thumb instruction, **Ts** ("thread switch"). A compiler or programmer
places it in the code to say "after the next two instructions, let another thread use the
pipeline". Typical places are just before a long-latency load or a hard-to-predict branch. The
decoder removes the Ts in the same cycle as the Thumb instruction in front of it. So a Ts costs no
decode cycle, and the thread switch happens without a pipeline bubble of its own.

The later stages are not part of this RTL: shift/ALU, data memory and write-back, the branch unit,
the instruction and data memories. The front end hands decoded instructions and their register
operands to the execute stage through an ID/EX register. It takes stall, branch-redirect and
write-back signals back from the later stages.

## Placing a Ts in a program

* **Encoding.** Ts is `0xDExx`: the Thumb conditional-branch slot with condition `1110`, which
  ARMv4T leaves undefined. The low byte is ignored and reserved.
* **Position.** To make a thread yield at instruction *X*, put the Ts two instructions before
  *X*, so the sequence is `..., P, Ts, Y, X, ...`. *P* and the Ts are decoded together. *Y* and *X*
  still issue from the old thread. After that the next thread's instructions follow.
* **Rules.**
  * A Ts must not be the first instruction of a sequence.
  * Two Ts must not be adjacent.
  * If a branch lands directly on a Ts anyway, the design still works. The Ts is then consumed in
    a cycle of its own, without issuing, and the switch point stays the same (two instructions
    after the Ts).
* **What the switch does.** The fetch port moves to the next thread in round-robin order, which
  continues from its own saved PC. The old thread's PC stays at the first instruction not yet
  fetched. Any old-thread instruction after *X* that was fetched in the same 32-bit word as *X* is
  dropped, and is fetched again when the thread comes back. Register state never moves. Each
  thread has its own register bank, selected by the thread id that travels with every
  instruction.

## Cycle-by-cycle behaviour

Fetch reads one 32-bit word, which holds two Thumb instructions, per cycle. The decode stage issues
one Thumb instruction per cycle. Below, the sequence of thread A is `i1 i2 Ts i3 i4 i5`, with `i4`
the yielding instruction. Thread B is `b1 b2 ...`. Both start word-aligned. The buffer column
shows ib1/ib2/ib3 at the start of the cycle.

| cycle | fetch            | buffer (ib1 ib2 ib3) | decode            | note                                   |
|-------|------------------|----------------------|-------------------|----------------------------------------|
| 1     | A: i1 i2         | -                    | -                 |                                        |
| 2     | A: Ts i3         | i1 i2                | i1                |                                        |
| 3     | A: i4 (i5 dropped)| i2 Ts i3            | i2 + Ts           | switch requested; cut-off = addr(i5)   |
| 4     | B: b1 b2         | i3 i4                | i3                | fetch belongs to B from now on         |
| 5     | (no room)        | i4 b1 b2             | i4                |                                        |
| 6     | B: b3 b4         | b1 b2                | b1                |                                        |
| 7     | ...              | b2 b3 b4             | b2                |                                        |

Four instructions of thread A plus its Ts, and the first two of B, reach decode in the six cycles
2 to 7: the Ts takes no cycle of its own, and B's first instruction follows A's yielding one
without a gap. When thread A returns, its fetch restarts at `i5`, an odd halfword address. That
fetch delivers one halfword, and the next fetch is word-aligned again.

If the yielding instruction is the second one after the Ts and the Ts is the second halfword of a
word (`i1 Ts i2 i3 b1 ...`), nothing is dropped. `i1` and the Ts decode in cycle 2, `i2` and `i3`
in cycles 3 and 4, and `b1` in cycle 5.

## Microarchitecture

```
             imem_addr/imem_rdata
                    |
   +----------------v-----------------+          switch_valid / switch_tid / switch_cut
   | fetch_unit: one PC per thread,   |<-----------------------------------------------+
   | owner thread, 2 halfwords/cycle  |                                                |
   +----------------+-----------------+                                                |
                    | push_n, push[2]   ^ buf_space                                    |
   +----------------v-------------------+-----------------------------------------+    |
   | decode_stage                                                                  |    |
   |   instr_buffer  ib1 ib2 ib3 (48 bits, tagged with address and thread)         |    |
   |      ib1 --> thumb_decompressor --> arm_decoder --> id_* (one per cycle)      |    |
   |      ib1,ib2 --> ts_decoder ------------------------------------------------------+
   +----------------+--------------------------------------------------------------+
                    | id_dec, id_tid, id_pc
   +----------------v-----------------+
   | banked_regfile (bank = thread),  |<---- wb_en / wb_tid / wb_rd / wb_data
   | R15 replaced by PC+4             |
   +----------------+-----------------+
                    v
              ID/EX register (ex_*)  -->  execute stage (not included)
```

**fetch_unit.** Each thread has its own PC, and one thread at a time owns the fetch port. The
instruction memory is read combinationally in the fetch cycle. A fetch is made only if all its
halfwords fit in the buffer this cycle (`buf_space`). This keeps two or three instructions in the
buffer while a thread runs, so ib2 always holds the next instruction for the Ts decoder. In the cycle a switch is requested, the old thread may still fetch, but
only halfwords below the cut-off address, which is the Ts address + 6. From the next cycle the
next thread owns the port. A redirect loads the PC of the branching thread and discards that
thread's fetch in the same cycle. It does not change which thread owns the port: a thread that
yielded on a branch gets its target PC and waits for its turn.

**instr_buffer.** Three 16-bit slots, kept in program order from ib1. Each cycle it removes the
entries of a flushed thread, then pops the 0 to 2 oldest entries, then appends 0 to 2 fetched
ones. Because entries carry their thread id, the tail of the old thread and the head of the new
one can sit in the buffer together across a switch.

**ts_decoder.** It works beside the Thumb path, not in series with it. When ib1 holds a Thumb
instruction and ib2 a Ts of the same thread, both leave in the same cycle. The decoder then raises
`switch_valid` with the thread id and the cut-off. A Ts in ib1 is consumed alone. The only logic
is an 8-bit compare on two slots and an adder for the cut-off.

**thumb_decompressor.** It expands all 19 ARMv4T Thumb formats into their ARM equivalents.
Thumb operations that set flags become ARM `S` forms, and shifts become `MOVS` with a shifted
operand. `PUSH`/`POP` become `STMDB`/`LDMIA` on SP with write-back. Where ARM has no exact
equivalent, the side-band flags `xlat` tell the ARM decoder how to read the word:
* Conditional and unconditional branches keep their offset in halfwords.
* The two halves of `BL` are flagged as prefix and suffix.
* `LDR Rd,[PC,#]` and `ADD Rd,PC,#` read a word-aligned PC.
* Undefined Thumb encodings become `0xE7F000F0` with `undef` set.

**arm_decoder.** It decodes the ARM word into a `dec_t` bundle, defined in `mt_thumb_pkg`:
* instruction class, condition, ALU opcode and S bit;
* Rn/Rm/Rs/Rd and which of them are read or written;
* the expanded rotated immediate or memory offset, and the shift;
* the load/store mode and register list;
* the branch offset in bytes, scaled by 2 in Thumb state.

It decodes as undefined what Thumb code cannot produce: coprocessor instructions, SWP and long
multiplies.

**banked_regfile.** Sixteen 32-bit registers per thread, read by three combinational ports in
decode and written by one write-back port. A write and a read of the same register in the same
cycle return the new value. In the top, a read of R15 returns the instruction address + 4,
word-aligned for the two PC-relative forms.

## Top-level interface (`mt_thumb_frontend`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `imem_addr` / `imem_rdata` | out / in | word-aligned fetch address; the 32-bit word there, in the same cycle (little-endian halfwords) |
| `stall` | in | freeze decode and the ID/EX register |
| `redirect_valid`, `redirect_tid`, `redirect_pc` | in | taken branch of a thread: new PC; flushes that thread's buffered instructions; nothing is issued in that cycle |
| `wb_en`, `wb_tid`, `wb_rd`, `wb_data` | in | register write into the bank of `wb_tid` |
| `ex_valid`, `ex_tid`, `ex_pc`, `ex_thumb`, `ex_arm`, `ex_dec` | out | ID/EX register: the instruction, its thread and address, its ARM expansion and decoded fields |
| `ex_op_a`, `ex_op_b`, `ex_op_c` | out | values of Rn, Rm, and Rd (for instructions that read Rd) or Rs |
| `fetch_tid`, `fetch_pc`, `thread_switch` | out | status: thread owning fetch, its PC, a Ts decoded this cycle |

The parameters are:
* `NUM_THREADS`, default 2. The thread-id fields are 4 bits wide, so up to 16 threads fit.
* `BOOT_PC` and `BOOT_STRIDE`. Thread *t* starts at `BOOT_PC + t*BOOT_STRIDE`.

## Design choices beyond the base concept

The concept fixes these points:
* the Ts instruction and its position two instructions ahead of the yielding instruction;
* Ts decoded in parallel with the preceding Thumb instruction;
* the 48-bit buffer;
* two instructions per fetch;
* the switch in the next cycle, with the old-thread instruction fetched beside the yielding one
  abandoned;
* banked registers;
* the decompressor followed by an ARM decoder.

The following are choices made here:
* the Ts opcode `0xDExx`;
* two threads, in round-robin order;
* the lone-Ts fallback;
* the all-or-nothing fetch handshake;
* address and thread tags on buffer entries;
* the redirect and flush rules;
* the branch-offset and BL conventions between decompressor and decoder;
* three read ports with write-through;
* R15 read as PC + 4;
* synchronous reset to zero;
* the thread start addresses.

Not included:
* the execute, memory and write-back stages;
* branch resolution;
* ARM-state (32-bit) instruction fetch and the BX switch between ARM and Thumb state (all threads
  run in Thumb state);
* exceptions and banked privileged-mode registers;
* instruction and data memories.

How far to trust it: every block has a self-checking testbench against independent models, and
each testbench has been shown to catch a deliberately broken copy of its block. The
decompressor's ARM encodings are checked against hand-assembled words, not against a reference
simulator of the instruction set. In addition, all 65,536 halfword encodings are swept, and the
undefined flag and branch condition are checked for each one.

## Files

* `rtl/mt_thumb_pkg.sv`: shared types (`ib_entry_t`, `xlat_t`, `dec_t`, `iclass_e`) and the Ts
  encoding.
* `rtl/fetch_unit.sv`, `rtl/instr_buffer.sv`, `rtl/ts_decoder.sv`, `rtl/thumb_decompressor.sv`,
  `rtl/arm_decoder.sv`, `rtl/decode_stage.sv`, `rtl/banked_regfile.sv`: the blocks described
  above.
* `rtl/mt_thumb_frontend.sv`: the top.
* `tb/tb_<block>.sv`: one self-checking testbench per block. Each ends by printing
  `TB_RESULT checks=N failures=M`.
  * `tb_mt_thumb_frontend` runs the whole front end at its default size. Two threads execute
    generated Thumb programs with scattered Ts instructions, and the testbench plays memory and
    the later stages: random stalls, write-backs and branch redirects. It checks the cycle
    numbers of the table above, the program order of every thread, the two-instructions-then-yield
    rule, and every operand value. It fails if any mechanism (paired Ts, lone Ts, dropped
    halfword, stall, redirect, full buffer, odd-halfword fetch, write-through, bank separation, PC
    read) never occurs.
  * `tb_ts_timing` checks the two switch patterns of the timing section cycle by cycle.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/mt_thumb_pkg.sv tb/tb_mt_thumb_frontend.sv --top-module tb_mt_thumb_frontend
./obj_dir/Vtb_mt_thumb_frontend
```

Replace the testbench name to run any other one. `verilator --lint-only -Wall -y rtl
rtl/mt_thumb_pkg.sv rtl/mt_thumb_frontend.sv` lints the design. The only remaining warnings are about
side-band bits that the front end passes on unused (the later stages would consume them).
