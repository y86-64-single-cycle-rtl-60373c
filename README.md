# Y86-64 single-cycle processors

Y86-64 is a small teaching instruction set modelled on x86-64: 15 64-bit
registers, two condition flags, a program counter, and variable-length
instructions of 1 to 10 bytes. This RTL builds a single-cycle
implementation ("SEQ"). Every instruction is fetched, decoded, executed,
given its memory access, written back, and gets its next PC, all in one
clock cycle. The state elements (PC, register file, flags, status, data
memory) update together at the rising edge.

The course material this follows gets to SEQ in steps, through processors
that each run a tiny instruction set. Those steps are built here as well, as
separate processors, and all six sit side by side in `y86_top`:

| processor    | instructions                                   | state used                          |
|--------------|------------------------------------------------|-------------------------------------|
| `seq_cpu`    | the full Y86-64 set (below)                    | PC, registers, ZF/SF, Stat, memories |
| `mov_cpu`    | rrmovq, irmovq, mrmovq, rmmovq                 | PC, registers, both memories        |
| `movreg_cpu` | rrmovq, irmovq, mrmovq                         | PC, registers, both memories (data read only) |
| `jmpnop_cpu` | `jmp Dest` (0x70 + address), `nop` (0x10)      | PC, instruction memory              |
| `jmp_cpu`    | one instruction: an 8-byte target address      | PC, instruction memory              |
| `addq_cpu`   | one instruction: a 1-byte `addq rXX, rYY`      | PC, registers, instruction memory   |

## The instruction set

Byte 0 holds the instruction code in its high nibble and a function code in
its low nibble. Where registers are named, byte 1 holds rA (high nibble) and
rB (low nibble). Constants, displacements and jump targets are 8 bytes,
little-endian.

| instruction      | bytes                     | length |
|------------------|---------------------------|--------|
| halt             | `0 0`                     | 1      |
| nop              | `1 0`                     | 1      |
| rrmovq / cmovXX  | `2 cc rA rB`              | 2      |
| irmovq V, rB     | `3 0 F rB V`              | 10     |
| rmmovq rA, D(rB) | `4 0 rA rB D`             | 10     |
| mrmovq D(rB), rA | `5 0 rA rB D`             | 10     |
| OPq rA, rB       | `6 fn rA rB`              | 2      |
| jXX Dest         | `7 cc Dest`               | 9      |
| call Dest        | `8 0 Dest`                | 9      |
| ret              | `9 0`                     | 1      |
| pushq rA         | `A 0 rA F`                | 2      |
| popq rA          | `B 0 rA F`                | 2      |

Codes that the table leaves open use the standard Y86-64 values. They are
this design's choice and live in `rtl/y86_pkg.sv`:

* OPq `fn`: 0 add, 1 sub (rB − rA), 2 and, 3 xor.
* Condition `cc`: 0 always, 1 le, 2 l, 3 e, 4 ne, 5 ge, 6 g.
* Registers: 0 %rax, 1 %rcx, 2 %rdx, 3 %rbx, 4 %rsp, 5 %rbp, 6 %rsi,
  7 %rdi, 8–14 %r8–%r14. Number 15 means "no register". Reading it gives 0
  and writing it does nothing.

### Flags without overflow

This machine keeps only two flags: ZF (result zero) and SF (result
negative). There is no overflow flag and no carry flag. So the signed
conditions are computed from ZF and SF alone:

| cc | meaning | Cnd          |
|----|---------|--------------|
| le | ≤       | SF \| ZF     |
| l  | <       | SF           |
| e  | =       | ZF           |
| ne | ≠       | !ZF          |
| ge | ≥       | !SF          |
| g  | >       | !SF & !ZF    |

This differs from standard Y86-64 when a subtraction overflows. For
example, `subq` of a large positive number from a large negative one can
produce a positive result, and then `jl` is not taken. Only OPq updates the
flags. Reset sets ZF = 1 and SF = 0.

## How SEQ executes one instruction

All of `seq_cpu` between the state elements is combinational. It is written
as six stages, but the stages are only a way to organise the logic: every
one of them works on the values the state held at the end of the previous
cycle.

**Fetch.** The instruction memory returns the 10 bytes at the PC. From byte
0 come `icode` and `ifun`. `need_regids` (icodes 2, 3, 4, 5, 6, A, B) says
whether byte 1 holds rA:rB. `need_valC` (icodes 3, 4, 5, 7, 8) says whether
there is an 8-byte constant. The constant `valC` starts at byte 2 or byte 1
accordingly, and `valP = PC + 1 + need_regids + 8·need_valC` is the address
of the next instruction. Any icode above B, or a function code outside the
valid range, is an invalid instruction.

**Decode.** The register file's two read ports are driven by

| icode           | srcA | srcB | dstE           | dstM |
|-----------------|------|------|----------------|------|
| rrmovq/cmovXX   | rA   | –    | rB if Cnd      | –    |
| irmovq          | –    | –    | rB             | –    |
| rmmovq          | rA   | rB   | –              | –    |
| mrmovq          | –    | rB   | –              | rA   |
| OPq             | rA   | rB   | rB             | –    |
| call            | –    | %rsp | %rsp           | –    |
| ret             | %rsp | %rsp | %rsp           | –    |
| pushq           | rA   | %rsp | %rsp           | –    |
| popq            | %rsp | %rsp | %rsp           | rA   |

**Execute.** The ALU computes `valE = aluB op aluA`:

| icode                  | aluA | aluB | op   |
|------------------------|------|------|------|
| rrmovq                 | valA | 0    | add  |
| irmovq                 | valC | 0    | add  |
| rmmovq, mrmovq         | valC | valB | add  |
| OPq                    | valA | valB | ifun |
| call, pushq            | −8   | valB | add  |
| ret, popq              | +8   | valB | add  |

The condition `Cnd` is evaluated from the flags held in the register, not
from the ALU's current output.

**Memory.** rmmovq, pushq and call write memory, at address `valE`. The
data written is `valA`, except for call, which writes the return address
`valP`. mrmovq reads at `valE`. popq and ret read at `valA`, the old stack
pointer.

**Write back.** `valE` goes to `dstE` and `valM`, the memory read data, to
`dstM`. If both name the same register, `valM` wins. This makes
`popq %rsp` load the popped value.

**PC update.** call goes to `valC`. A taken jXX goes to `valC`. ret goes to
`valM`. Everything else goes to `valP`.

**Status.** `Stat` is AOK while running. Executing `halt` sets HLT. Fetching
an invalid instruction sets INS. Once `Stat` leaves AOK, nothing changes
any more: the PC stays on the halt or invalid instruction and no register,
flag or memory write happens. Only reset restarts the processor. The
standard Y86-64 "bad address" status is not implemented. Addresses simply
wrap modulo the memory size.

### When things happen inside one cycle

Take `pushq %rax`. Right after the rising edge, the new PC selects the
instruction bytes, and the decode, execute and memory logic settle during
the cycle. Nothing visible changes until the next rising edge. At that edge
the memory word, `%rsp` and the PC all change together. The SEQ testbench
checks exactly this.

## The building blocks

* **`pc_reg`**: a 64-bit edge-triggered register. Its input may change
  during the cycle; the output changes only at the rising edge. It has an
  enable, used by SEQ to freeze after halt.
* **`instr_mem`**: a byte array. It reads the 10 bytes from an address
  combinationally (byte 0 in bits 7:0) and has a one-byte-per-cycle write
  port for loading programs.
* **`data_mem`**: a byte array with an 8-byte little-endian combinational
  read, an 8-byte write at the rising edge, and a byte loader port. If the
  loader and a word write hit the same byte in one cycle, the word write
  wins.
* **`regfile`**: 15 × 64-bit registers with read ports srcA/srcB
  (combinational) and write ports dstE/valE and dstM/valM (rising edge).
  Register 15 reads 0 and ignores writes. A third read port (`dbg_reg`) is
  there for observation. Reset clears all registers.
* **`alu`**: add, sub, and, xor; outputs ZF and SF of the result.
* **`mux4`**: four WIDTH-bit inputs; select 00 → a, 01 → b, 10 → c,
  11 → d. `jmpnop_cpu` uses it to choose the next PC.

## The stepping-stone processors

* **`addq_cpu`**: each byte is `rXX:rYY`. R[rYY] ← R[rYY] + R[rXX] and
  PC ← PC + 1. Starting from rax = 1, rbx = 2, rdx = 3, the program
  `addq %rax,%rdx` at 0x00 then `addq %rbx,%rdx` at 0x01 gives PC = 0x01 and
  rdx = 4 after one cycle, and PC = 0x02 and rdx = 6 after two.
* **`jmp_cpu`**: the 8 bytes at the PC are the next PC. With `jmp 0x10` at
  0x00, `jmp 0x00` at 0x08 and `jmp 0x08` at 0x10, the PC runs 0x10, 0x08,
  0x00, 0x10, …
* **`jmpnop_cpu`**: the opcode nibble drives the select of a mux: 1 for jmp
  picks the target in bytes 1–8, and 0 for nop picks PC + 1.
* **`movreg_cpu`** and **`mov_cpu`**: fetch splits out rA, rB and the
  constant. The ALU adds 0 to R[rA] (rrmovq) or to V (irmovq), or adds D to
  R[rB] to form the address (mrmovq, rmmovq). The result goes to rB, or the
  loaded word goes to rA, or R[rA] is stored.

In these four processors, an opcode outside their set runs as a 1-byte
no-op. This is a design choice; programs for them should not rely on it.

## Ports and use

Every processor has the same outline:

```
clk, rst_n            rising-edge clock, synchronous active-low reset
load_i  (load_t)      {we, dmem, addr[63:0], data[7:0]}: one byte per
                      cycle into instruction memory (dmem=0) or data memory (dmem=1)
dbg_reg_i / dbg_reg_val_o   read any register (processors with a register file)
pc_o                  current PC
stat_o, zf_o, sf_o    SEQ only
```

To run a program: hold `rst_n` low, write the program bytes (and any data)
through `load_i`, then release reset. Execution starts at PC = 0 with all
registers 0, one instruction per clock. The loader writes memory directly,
whether or not the processor is in reset. `y86_top` brings out each
processor's ports with a prefix (`seq_`, `addq_`, `jmp_`, `jnop_`,
`movreg_`, `mov_`). Only clock and reset are shared.

Parameters: `IMEM_BYTES` and `DMEM_BYTES` (default 1024 each, powers of
two). Memories wrap addresses modulo their size.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs.

* `tb/y86_iss_pkg.sv` is an independent instruction-level model of SEQ with
  the same conventions. It also holds a random program generator: programs
  are laid out from address 0, jump and call targets are instruction starts,
  register 15 and wrapping addresses are included, and rare invalid
  function codes appear.
* `tb_seq_cpu` checks three hand-assembled programs:
  * `addOne(41)` returns 42 and halts after exactly 7 cycles.
  * The pushq timing described above.
  * An array-sum loop with a store, push/pop, and taken and not-taken
    cmov; it takes 35 cycles.

  It then runs 40 random programs of 150 cycles each, comparing PC,
  registers, flags and status every cycle, and all of data memory at the
  end of each run. It requires every instruction kind, taken and not-taken
  conditions, halt and an invalid instruction to occur.
* `tb_mov_cpu` and `tb_movreg_cpu` compare random programs with the same
  model every cycle.
* `tb_addq_cpu` and `tb_jmp_cpu` run the worked examples above, then random
  programs.
* `tb_jmpnop_cpu` runs random nop/jmp programs.
* `tb_y86_top` runs all six processors at the default sizes at the same
  time and counts each mechanism.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/y86_pkg.sv tb/y86_iss_pkg.sv tb/tb_y86_top.sv --top-module tb_y86_top
./obj_dir/Vtb_y86_top
```

The same pattern works for any `tb_<module>`; the `-I` paths let Verilator
find the other modules. Verilator is a two-state simulator, so the
testbenches load or reset everything they read.

## Where this goes beyond the source material

The source defines the instruction formats, the state, the register file's
ports and its register-15 rule, the ALU operations, the mux truth table, the
datapaths of the small processors, and the stage breakdown. These parts are
this design's own choices:

* The numeric fn/cc codes and the register numbering.
* The Stat encoding and freeze behaviour, and the missing address-error
  status.
* The exact SEQ control tables above, which follow the standard SEQ
  organisation.
* Memory sizes and address wrap.
* The loader and debug ports.
* Reset values.
* The no-op treatment of unknown opcodes in the small processors.
* M-port priority in the register file.
