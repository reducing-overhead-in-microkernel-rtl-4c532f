# Register banks for fast context switches

A microkernel-based multiserver operating system does much of its work in
user-mode servers. A service that a monolithic kernel handles with one kernel
entry here also needs thread switches. The main cost of each switch, on a core
with a tagged TLB and a system call instruction, is saving and restoring
registers through memory.

This RTL makes the register file large enough to hold many register sets at
once. It holds 16 banks of the 32 general purpose registers. A context switch
(kernel entry, kernel exit or thread switch) becomes a write to one control
register that selects another bank. Memory traffic is needed only when the
operating system gives a bank to a different context (*bank assignment*).

Moving data between contexts still needs a channel: system call arguments,
results, IPC message registers. Registers that stay visible across a switch
used to be that channel. Here, part of a second bank can be mapped into the
instruction's register address space. Code can then use those registers
directly, with no copy instructions and no extra register file ports.

The RTL covers the back end of a 32-bit, 8-stage RISC pipeline:

* the banked register file;
* operand address translation;
* the translation control register and how updates to it become visible;
* result and load forwarding made bank-aware;
* a small ALU.

Instruction fetch, caches, TLBs, the bus and the exception logic are outside
this RTL. Their signals are ports of the top module.

## Major bank, minor bank and the translation formula

Instructions name registers with a 6-bit *encoded address* `e`:

* `0..31` are general purpose registers;
* `32..63` are special purpose registers, kept in flip-flops outside the register file.

The translation control register holds three fields:

| bits   | field | meaning                                             |
|--------|-------|-----------------------------------------------------|
| 31..13 | –     | unused, read as zero                                |
| 12..8  | `c`   | minor bank register count (0..31)                   |
| 7..4   | `m`   | minor bank id                                       |
| 3..0   | `M`   | major bank id                                       |

Every operand is translated to a register file *set* (`bank_xlate.sv`):

```
set = 0          if e >= 32        (special purpose register)
set = m          if e >  31 - c    (the top c general purpose addresses)
set = M          otherwise
```

With `c = 8`, for example, `r0..r23` come from the major bank (the current
context) and `r24..r31` from the minor bank (the context it talks to). `c = 0`
shows only the major bank. Because `c` is at most 31, `r0` always maps to the
major bank, and it always reads as zero.

Giving special purpose registers set 0 keeps the forwarding comparison
uniform. Every operand is a `{set, e}` pair (`rf_addr_t`), and forwarding
compares the whole pair.

Typical uses (software, not part of this RTL):

* **System call entry:** a privileged stub selects the kernel bank as major
  and maps the top registers of the user bank as minor. It copies the
  arguments it needs, then sets `c` back to 0.
* **Returning a result:** map the single user register and write it.
* **Kernel exit / thread switch:** select the user bank, or another thread's
  bank, as major.
* **IPC:** map the sender's bank as minor and store its message registers
  directly. A count of up to 31 covers the largest message.

Only privileged code may write the control register. An unprivileged write is
dropped, and `priv_fault` pulses so the exception logic can trap it.

## Register file

`banked_regfile.sv` has two read ports and one write port. Each port takes a
4-bit set selector and a 5-bit register address, giving 16 × 32 × 32 bits.

It is built from two 512 × 32 block RAMs (`bram_18k.sv`, the 18 Kibit FPGA
block RAM without its parity bits):

* each read port reads its own block;
* every write goes to both blocks in the same cycle.

Each block is addressed by byte address `{set, reg, 2'b00}`: set on bits
10..7, register on bits 6..2.

Reads are synchronous. The address is presented in Operand Fetch (OF) and the
data arrives in Execute (EX). A read and a write of the same register in one
cycle return the old value, so the pipeline forwards Write Back (WB) data
itself.

## Pipeline and hazards (`rb_core.sv`, the top)

```
 IF1 IF2 IF3 |  OF  |  EX  |  DM1  |  DM2  |  WB
 (outside)   |      |      |       |       |
             translate rs1/rs2 with the OF view of the control register,
             address the register file, pick forwarded values, maybe stall
                    ALU; translate rd with the EX view of the control register
                           data memory request out
                                   load data in
                                           register file / control register write
```

The destination is translated in EX and its set travels with the instruction
to WB. From OF on, the pipeline therefore works on register file addresses,
not encoded ones.

### Operand forwarding

`operand_fwd.sv` compares each source `{set, e}` with the destinations in EX,
DM1, DM2 and WB, and takes the youngest match:

* ALU results forward from any of these stages.
* A load's value exists only after DM2, so it forwards from WB only. A
  dependent instruction right behind a load stalls 3 cycles.
* Explicit reads of a special purpose register forward the same way.

### Visibility of control register updates

This is the subtle part of the design. Nearly every instruction reads the
control register implicitly, in OF (sources) and in EX (destination). An
explicit write commits only at the end of WB, 4 cycles after the writer left
OF. The parameter `FWD_CTRL` picks one of two behaviours (`ctrl_hazard.sv`):

* **`FWD_CTRL = 0` (default, stalling).** OF is held while a control register
  write is in flight anywhere in EX..WB, so the instruction right behind a
  write waits 4 cycles. Both stages always use the committed value. Nothing is
  forwarded; at this setting `ctrl_of`/`ctrl_ex` equal the committed register,
  which is why a synthesis report shows those outputs as pass-through. Use
  this build when timing matters: in the FPGA implementation described in the
  source material, the forwarding path (an ALU result used in the same cycle
  to translate a register address) cost clock frequency.
* **`FWD_CTRL = 1` (forwarding).** OF uses the youngest in-flight value,
  including the one the ALU is computing in EX in that cycle. EX uses the
  youngest value from DM1..WB; it never needs its own, since it is the
  writer. There are no control register stalls.

A load must never write the control register. Its value would arrive only in
WB, too late for the instruction in EX. An assertion checks this rule.

### Measured costs (from the testbenches)

| sequence                                                        | stalling | forwarding |
|-----------------------------------------------------------------|---------:|-----------:|
| control register write → next instruction                        | 5 cycles | 1 cycle    |
| kernel entry stub: map user bank, 2 copies, unmap → handler      | 12       | 4          |
| kernel exit: select user bank → first user instruction           | 5        | 1          |
| load → dependent instruction                                    | 4        | 4          |
| ALU → dependent instruction                                     | 1        | 1          |

The entry-stub difference of 8 cycles is two bank switches × 4 stall cycles.
This is also the gain published for this mechanism between the two builds.
The published exit gain is 1 cycle, not 4. There the mode-return instruction
already stalled, and the bank switch sat in its delay slot. That instruction
is not part of this RTL.

## Interfaces of the top

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (pipeline empty, control register 0 = bank 0, nothing mapped; register file contents are not reset) |
| `in_valid`, `in_uop`, `in_ready` | in/in/out | decoded instruction from fetch (`uop_t` in `rb_pkg.sv`); accepted when both valid and ready are high; `in_ready` is low while OF stalls |
| `dmem_req`, `dmem_we`, `dmem_addr`, `dmem_wdata` | out | data memory request, driven in DM1 |
| `dmem_rdata` | in | load data, must be valid the cycle after the request (DM2) |
| `wb_valid`, `wb_wen`, `wb_dst`, `wb_data` | out | one pulse per instruction leaving WB, with its translated destination |
| `bank_ctrl` | out | committed control register |
| `priv_fault` | out | an unprivileged control register write was dropped |
| `ev_*` | out | one-cycle event pulses: control stall, load stall, control forwarded, result forwarded, load forwarded, minor bank access |

`uop_t` carries `op` (NOP, ADD, SUB, AND, OR, XOR, ADDI, LW, SW), `rd`, `rs1`
and `rs2` (6-bit encoded addresses), a 16-bit sign-extended `imm`, and
`priv`. A write to the control register is any ALU operation whose `rd` is
`SPR_BANK_CTRL` (encoded address 48). For example, `ADDI rd=48, rs1=r0,
imm=(c<<8)|(m<<4)|M` sets all three fields. Reading address 48 returns the
register.

## What this RTL decides for itself

The following points are not fixed by the mechanism and were chosen here:

* **Instruction format and ALU operation set.** This is a minimal decoded
  form, enough to run kernel-style code.
* **Special purpose registers.** The control register sits at address 48.
  Other special purpose addresses read zero and ignore writes. The core's
  other special purpose registers (fault address, return address, …) belong
  to the exception logic, which is not included.
* **Unprivileged writes.** They are dropped and signalled, not trapped inside
  the core.
* **Data memory.** It has a fixed best-case latency with no stall input.
  Cache or TLB misses would need a pipeline hold that is not modelled.
* **Block RAM collisions.** A writing port returns the old word, and a read
  on the other port sees the old word.
* **Forwarding priority.** When several in-flight writes match, the youngest
  wins.
* **Reset.** Pipeline registers and the control register reset to zero.
* **No mapping offset.** Mapping offsets into the minor bank or the mapping
  region, and implicit bank switches on kernel entry and exit, are possible
  extensions and are not built. The minor bank therefore always includes
  `r31`.

## Files

| file | contents |
|------|----------|
| `rtl/rb_pkg.sv` | widths, control register struct, operand address, micro-operation, in-flight write types |
| `rtl/rb_core.sv` | top: OF..WB pipeline |
| `rtl/bank_xlate.sv` | encoded address → set |
| `rtl/banked_regfile.sv` | 16-bank, 2-read 1-write register file |
| `rtl/bram_18k.sv` | 512 × 32 dual-port block RAM |
| `rtl/bank_ctrl_reg.sv` | translation control register |
| `rtl/ctrl_hazard.sv` | control register stall / forwarding |
| `rtl/operand_fwd.sv` | bank-aware result and load forwarding |
| `rtl/rb_alu.sv` | ALU |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/rb_core_env.sv` | random program + reference model for `tb_rb_core` |
| `tb/rb_syscall_env.sv` | system call workload for `tb_rb_core_full` and `tb_rb_core_syscall_fwd` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself;
each has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rb_core \
    rtl/rb_pkg.sv tb/tb_rb_core.sv -Mdir obj_tb_rb_core
./obj_tb_rb_core/Vtb_rb_core
```

Replace `tb_rb_core` with any other testbench name. Each finishes in well
under a second.

* `tb_rb_core` runs both builds side by side on a random program of about
  5000 instructions. A sequential reference model predicts every Write Back,
  and memory is compared at the end. The test fails if any hazard mechanism
  never occurred: control register stall or forward, load stall, result and
  load forwarding, minor bank access, bank switch, control register read,
  dropped unprivileged write.
* `tb_rb_core_full` runs the system call workload on the default build: 15
  user threads on banks 1..15 plus the kernel on bank 0. It checks every
  latency in the table above and all 16 × 31 register values at the end.
  `tb_rb_core_syscall_fwd` runs the same workload on the forwarding build.

For lint, `verilator --lint-only -Wall -Irtl rtl/rb_pkg.sv rtl/rb_core.sv`
should report only unused-bit warnings. It also reports `SYNCASYNCNET`,
because the assertions sample the asynchronous reset synchronously.

## Changing it

* **Number of banks.** 16 banks fill the two block RAMs. For more banks,
  widen `SET_W` in `rb_pkg.sv` and the block RAM `WORDS`/`ADDR_W` together.
  The control register fields would then need a new layout.
* **Adding an instruction.** Extend `op_e` and the `op_writes_rd` /
  `op_reads_rs*` helpers in the package, and `rb_alu.sv`. The reference
  model in `tb/rb_core_env.sv` needs the same change.
