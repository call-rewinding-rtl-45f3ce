# Call rewinding: checking return targets in the fetch stage

Return-oriented programming chains short code fragments ("gadgets") by
overwriting return addresses on the stack. Gadgets start at arbitrary
places in a binary, so the return that jumps to one lands on an address
that no call instruction precedes. In correct code compiled to the RISC-V
calling convention, every return lands just after a call. Call rewinding
enforces that rule in hardware. Before it continues at the return address
`ra`, the core fetches the instruction just before it (the *rewinded
address*, `rwa = ra - 4`). It checks that this instruction is a call and
discards it. If it is not a call, the core raises the exception
`INVALID_RETURN_ADDRESS` (cause 25).

Checking every return would cost a cycle each time. A return address stack
(RAS) only ever holds addresses that real calls pushed, so a return whose
target the RAS predicted correctly is trusted. Only *mispredicted* returns
are checked: the rare legitimate ones (stack overflow after deep nesting,
`longjmp`, context switches) and every return of an attack.

This repository holds the added hardware and enough of the surrounding
fetch stage to run it: instruction scanning, the RAS, the rewind checker and
the branch unit. It does not include decode, issue, the register file or
commit of a host core. Those connect through ports.

## How a checked return proceeds

```
cycle   branch unit (execute)            fetch
t0      ret resolves, target != predicted
        -> sends rwa = ra - 4             pc <= rwa, rewind module armed
t1                                       reads 32 bits at rwa, scans them,
                                         offers nothing to decode (discard),
                                         verdict taken
t2                                       valid:   fetches ra (normal flow)
                                         invalid: offers an exception entry
                                                  (cause 25, tval = ra)
```

After a plain misprediction, the correct target is fetched in t1. A checked
return costs exactly one extra cycle. After the exception entry is accepted,
fetch stops and waits for the core's trap redirect (`flush_i`).

The chunk read at `rwa` must never reach decode. If it did, a valid call
would be executed a second time, and the program would call and return
forever. `is_rewind_o` marks the cycle in which fetch holds it back.

## Deciding whether the target follows a call

With compressed instructions a call is 4 or 2 bytes long. A return cannot
tell which, so `rwa` is always `ra - 4`. The 32 bits read there are seen as
two halfwords, at `rwa` and at `rwa + 2`:

| bits at `rwa` / `rwa + 2`          | example (halfwords)        | verdict |
|------------------------------------|----------------------------|---------|
| 32-bit call starting at `rwa`      | `jal ra, ...` = `0x72C010EF` | valid   |
| anything, then 16-bit call at `rwa + 2` | `c.add sp,tp` `0x9112`, `c.jalr s7` `0x9B82` | valid |
| 16-bit call at `rwa`, no call at `rwa + 2` | `c.jalr s4` `0x9A02`, `c.lui a4,3` `0x670D` | invalid |
| 32-bit non-call at `rwa`           | `addi a5,a3,2` = `0x00268793` | invalid |

A 16-bit call at `rwa` is rejected because its return address is
`rwa + 2`, never `rwa + 4`. This case also catches "unintended" calls that
appear when code is entered in the middle of a 32-bit instruction.

A *call* is any instruction that writes a link register (`ra` = x1 or `t0`
= x5): `jal` or `jalr` with such an `rd`, and `c.jalr`. `c.jal` counts as a
call only when `XLEN = 32`: on RV64 its encoding means `c.addiw`. The
predicates are `is_call32` and `is_ccall` in `rtl/callrw_pkg.sv`. The
verdict is `lo_call32 || (RVC && hi_ccall)` in `rtl/rewind.sv`.

## When a return is checked

The scanner sorts jumps by their link hints. `jalr`, `c.jr` and `c.jalr`
pop the RAS (so they count as returns) when `rs1` is a link register. They
push when `rd` is a link register. When both are links and differ, the
instruction pops then pushes (coroutine swap). When both are the same link
register, it only pushes. `jal` pushes when `rd` is a link register.

A return is checked when all of these hold:

* the branch unit finds that its real target differs from the predicted
  one;
* `CALL_RW_EN = 1`;
* the hart is not in S-mode. Rewinding is on in U-mode (applications) and
  M-mode (bare metal), and off in S-mode, where kernel code may use `ra`
  outside the convention. Secure boot, not this check, covers that code.

With `RAS_DEPTH = 0` there is no stack. The prediction is address 0 and not
valid, and every return is treated as mispredicted, so every return is
checked.

## Interrupts and exceptions during a check

If the core takes a trap while a check is in progress, `flush_i` abandons
the check. Execution later restarts at the return instruction, so the
return resolves again and the check is repeated. An interrupt therefore
cannot be used to skip the check. The end-to-end test fires an interrupt
in the check cycle and confirms that the check is redone.

A flush that arrives while the exception entry is waiting drops the entry
the same way, and the re-executed return fails the check again. Cause 25
must win over a pending interrupt. That priority is decided where traps
are taken, in the host core's commit stage, not in these blocks.

## Blocks

| file | role |
|------|------|
| `rtl/callrw_pkg.sv` | control-flow classes, privilege levels, scan record, call predicates, cause 25 |
| `rtl/instr_scan.sv` | combinational predecoder: width, class, offset, RAS push/pop, call at `rwa` / `rwa + 2` |
| `rtl/ras.sv` | return address stack, `DEPTH` entries, oldest dropped on overflow, `DEPTH = 0` means absent |
| `rtl/branch_unit.sv` | combinational resolution, mispredict compare, `ra - 4` for checked returns |
| `rtl/rewind.sv` | three-state checker (idle, check, exception) |
| `rtl/callrw_top.sv` | fetch stage (PC select, scan, RAS, rewind) plus the branch unit |

`callrw_top` parameters: `XLEN = 64`, `RAS_DEPTH = 2`, `CALL_RW_EN = 1`,
`RVC = 1`. These describe an RV64 core with a two-entry RAS, compressed
instructions, and the protection enabled. `CALL_RW_EN = 0` and/or
`RAS_DEPTH = 0` give the baseline and no-stack variants. `RVC = 0` accepts
only a 32-bit call at `rwa`.

### Interface of `callrw_top`

* **Instruction memory:** `imem_addr_o` is a halfword-aligned address.
  `imem_data_i` must return the 32 bits starting there in the same cycle.
  Realignment across word boundaries is the memory side's job.
* **Fetch entry (`fe_*`):** a valid/ready handshake. An entry carries `pc`,
  the raw instruction, its width and class, and the predicted next
  address. A flagged entry instead carries the exception: `fe_ex_valid_o`,
  cause 25, `tval` = the rejected `ra`, and `pc` = the return instruction.
  An offered entry is withdrawn when fetch is redirected in the same cycle.
* **Branch unit (`bu_*` in, `res_*` out):** the core issues one
  control-flow instruction, with its `rs1` value, offset, comparison result
  and the prediction that came with its fetch entry. `res_mispredict_o`
  tells the core to drop every younger instruction. Fetch redirects itself
  (to `rwa` for a checked return).
* **Trap redirect:** `flush_i` and `flush_pc_i` come from commit.
  `priv_i` is the current privilege level.

Fetch delivers one instruction per cycle. Conditional branches are
predicted not taken. Indirect jumps that are not returns are predicted
sequential, because there is no branch history table or target buffer. The
RAS is updated when a call or return leaves fetch, and is never repaired.
A stale entry only costs a misprediction, and then a check.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
A watchdog ends a run that hangs. To simulate one, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/callrw_pkg.sv tb/tb_enc_pkg.sv tb/tb_callrw_top.sv \
    --top-module tb_callrw_top -o sim && ./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_instr_scan` | the four chunks of the table above, every `rd`/`rs1` link combination of `jalr`/`c.jr`/`c.jalr`, random offsets of `jal`, `beq`, `c.j` and `c.beqz` |
| `tb_ras` | random push/pop/pop-push against a queue model; overflow flag; the absent stack |
| `tb_branch_unit` | random resolutions in three builds: main, rewinding off, no stack; S-mode exemption |
| `tb_rewind` | verdicts for five chunk kinds, exact cycle timing, exception record, flush in the check and exception cycles, `RVC = 0` |
| `tb_callrw_top` | default build, end to end (see below) |
| `tb_callrw_configs` | the same program in the baseline, no-stack and no-stack-with-rewinding builds |

The two end-to-end tests share `tb_callrw_bench`. This checker connects
by port name to one `callrw_top` instance and plays the rest of an
in-order core. It has a two-cycle decode/issue queue and an interpreter for
`addi`, `jal`, `jalr`, `beq`, `c.jr`, `c.jalr` and `c.nop`. It takes the
exception and resumes at a recovery address in `t6`. Markers of the form
`addi x0, x0, 0x7F0..0x7F3` switch the privilege level or arm an interrupt.
`tb_callrw_pair` pairs one build with its checker.

The program covers these cases:

* a correctly predicted return;
* a four-deep call chain that overflows the two-entry stack, where two
  returns are checked and found valid;
* returns to the four patterns of the table, in M- and U-mode;
* an invalid return in S-mode, which is not checked;
* an interrupt during a check;
* a `c.jalr` call and a taken branch.

Every return site continues at `t6`, so the program also completes in a
build without the protection.

The expected verdicts come from the checker's own reading of memory. It
checks every executed pc, every resolution and the exception record. It
also checks the redirect timing: the target arrives one cycle after a plain
misprediction and two cycles after a checked return. Each build has an
expected count for every mechanism (for example, no exceptions without
rewinding, and no correct predictions without a stack). A mechanism that
does not occur as expected fails the test.

For this program the four builds take these cycle counts:

| build | cycles |
|-------|--------|
| unprotected | 112 |
| no stack | 124 |
| no stack with rewinding | 144 |
| default | 128 |

These numbers mix check cycles with trap handling. They show the mechanism
at work, not a performance figure.

## How far to trust it, and where it departs

* The check sequence, the `ra - 4` rule, the four-case verdict, the
  one-cycle cost, cause 25, the S-mode exemption, the trust in correct RAS
  predictions, the no-stack behaviour and the flush rule are the method as
  published.
* These are choices of this implementation:
  * the fetch stage around the added blocks (single instruction per cycle,
    combinational halfword-addressed memory, no BHT/BTB);
  * the RAS organisation;
  * the exception entry reporting the return's pc with `tval = ra`.
* When 16-bit calls sit at both `rwa` and `rwa + 2`, the target is
  accepted, because the one at `rwa + 2` is a legitimate call site.
* There is no CSR to turn the protection on or off per process. The method
  suggests one as a way to run code that breaks the calling convention, and
  the usual operating-system answer is a trap handler for cause 25. Only the
  `CALL_RW_EN` build parameter and the S-mode rule control it here.
* This is not a whole core, so nothing here reproduces benchmark cycle
  counts or FPGA resource figures. For context, the published integration
  into a 64-bit application core reports about 0.1% average cycle overhead
  and under 0.3% extra LUTs.
* All results come from simulation with two-state logic. No gate-level or
  formal verification has been done.
