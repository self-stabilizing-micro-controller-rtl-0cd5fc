# Self-stabilizing guard hardware for an MSP430-class micro controller

Sensor networks with hundreds of unattended nodes have to recover from soft
errors by themselves. Self-stabilizing software can repair any corrupted RAM
contents, but only if the CPU keeps executing the program it was given. A bit
flip in the program counter (PC) breaks that assumption. The CPU cannot tell an
opcode word from the data word of an instruction, so a corrupted PC can start
executing immediates and addresses as if they were code. A watchdog normally
ends such runaway execution. It fails in one case: the misread words form a
loop that also happens to clear the watchdog. A loop like that can come from a
stray `MOV #5A08h,&0120h` pattern followed by a stray backward jump, or from a
stray `PUSH` followed by `RET`. The CPU is then trapped forever, and no
software measure can get it out.

This RTL adds small hardware changes around an MSP430-class CPU so that such a
trap cannot exist. After any soft error, the CPU is back on its intended
instructions within a bounded time. There are three alternative ways to do
this. All three are implemented and sit side by side in the top module:

| core | approach | how a trapped watchdog-clearing loop is ruled out |
|---|---|---|
| 0 | register/ROM compare | the watchdog accepts a write only from the one instruction whose address is stored in the last ROM word |
| 1 | WDRST instruction | the watchdog register is taken out of the address space; only a special 32-bit instruction can clear it, and its bit pattern can be hit by a stray PC only once in a row |
| 2 | 2^X byte alignment | code is laid out so that every block of 2^X bytes starts with a real instruction (or empty space), and every PC change that is not a plain increment must land on a block start |

The approaches break the trap in two different ways. Approaches 1 and 2 make a
loop unable to clear the watchdog, so the watchdog always ends the loop.
Approach 3 makes runaway execution on data words unable to loop at all.

## Hardware common to all three cores

* **Code only runs from ROM** (`pc_restrict`). The upper bits of every fetch
  address, and of every value loaded into the PC, are forced to the ROM window
  (4000h-7FFFh by default). RAM contents are unknown after an error. If the CPU
  could execute them, nothing about its behaviour could be guaranteed.
* **A watchdog that cannot be switched off** (`ss_wdt`). It is a 16-bit counter
  that advances on every `wdt_tick`. It has no hold bit, no NMI mode and no
  interval-timer mode, so a corrupted control write cannot disable it.
  Software can only clear the count (CNTCL) and pick one of four intervals
  (32768, 8192, 512 or 64 ticks). If a soft error pushes the count above the
  current threshold, it keeps counting and requests a reset when it wraps past
  FFFFh. As on the MSP430, a write without the password 5Ah in the high byte
  also resets the CPU.
* **Invalid opcodes reset the CPU** (`wdrst_decoder`). No MSP430 opcode word
  lies below 1000h (the lowest opcode prefix is 000100). Any such word is
  treated as an invalid instruction. This includes 0000h, which is what empty
  ROM reads as.
* **One reset path** (`reset_ctrl`). Every detector loads a down-counter, and
  the CPU reset stays asserted for `RST_CYCLES` (4) cycles after the last
  request. The same reset also clears the guard's own state: the watchdog
  returns to count 0 with the longest interval, and the approach-1 state
  machine returns to idle. `cause_o` records which detectors fired.

## Approach 1: register/ROM compare (`wdt_access_check`)

The software is written so that exactly one instruction in the whole program
writes WDTCTL (0120h), at the top of the main loop. The compiler writes that
instruction's address into the last ROM word (7FFEh). No soft error can change
that word. On every WDTCTL write the guard does the following:

```
cycle 0  write to 0120h seen      stall=1  ROM read of 7FFEh issued
cycle 1                           stall=1  comparison register <- ROM data
cycle 2  compare with instr_pc    stall=0  match: write goes to the watchdog
                                           else:  CPU reset
```

The comparison register is reloaded from ROM before every check, so a
corrupted copy never survives to the next check. The two stall cycles only
cost time on the single intended write per main-loop pass.

Once this check is in place, a stray PC can never clear the watchdog. That
holds even for writes whose address is only known at run time, which no
static code analysis can find. Any loop therefore ends by a watchdog reset.
Placing the write at the start of the main loop also matters. That write sets
the interval too, so an interval that a bit flip made too short gets repaired
after the next reset.

The restriction is that the whole program may have only one watchdog-clearing
instruction. A shared "clear the watchdog" subroutine is not an option: a
runaway loop could call it.

## Approach 2: the WDRST instruction

In this core WDTCTL is not in the address space. A write to 0120h reaches no
device. The only way to clear the watchdog is the new instruction WDRST. Its
opcode word is 0001h and its data word is also 0001h:

```
0001h 0001h   WDRST: count <- 0, interval <- longest (32768 ticks)
```

The interval is fixed in hardware, so no stray instruction can shorten it. A
normal three-word watchdog clear such as `MOV #5A08h,&0120h` is replaced by
WDRST followed by a one-word NOP. That replacement is the same length, so the
code size does not change.

The reason for this bit pattern is the central idea of the approach. No real
opcode word has the value 0001h. Suppose the two words 0001h 0001h sit inside
the data fields of some other instruction, and a corrupted PC lands on them.
There are only two cases:

* The PC lands on the first 0001h. The CPU executes WDRST once. The next
  instruction starts right after the second 0001h, and that word must be a
  real opcode (it follows the data fields). Execution has realigned onto real
  code after clearing the watchdog just once.
* The PC lands on the second 0001h. The word after it is a real opcode, so it
  cannot be 0001h. The decoder sees 0001h without its 0001h data word and
  treats it as an invalid instruction, which resets the CPU.

So no loop made of misread data words can contain a WDRST. The instruction has
to be at least 32 bits long for this argument to work. A 16-bit WDRST could
sit alone in one data field followed by a stray backward jump, and the PC would
loop on it. 0001h was chosen rather than 0000h because 0000h is what empty
ROM contains.

The guarantee depends on the programmer: the intended program must not contain
an endless loop that executes WDRST other than the main loop.

## Approach 3: 2^X byte alignment (`jump_target`, `pc_align_check`)

The code is cut into blocks of 2^X bytes (X = 3, so 8-byte blocks, by default).
The compiler guarantees three things. First, no instruction crosses a block
boundary: one-word NOPs are inserted in front of an instruction that would
cross one. Second, every jump target starts a block. Third, every CALL ends a
block, so its return address starts a block. As a result, the first word of
every block is either a real opcode or empty (0000h).

The hardware enforces the matching rule:

* **Relative jumps count blocks** (`jump_target`). The 10-bit offset field is
  read as a number of blocks, and the base is the PC with its low X bits
  cleared: `target = (PC & ~(2^X-1)) + sext(offset) * 2^X`. Every jump
  destination is therefore a block start. The reach grows by a factor of
  2^(X-1) (four times for 8-byte blocks, -512..+511 blocks). That makes up for
  the distance that the padding NOPs add.
* **Every other PC write must be aligned** (`pc_align_check`). CALL, RETURN and
  `MOV ..., PC` write the PC directly. If the low X bits of the value written
  are not zero, the CPU is reset. Plain PC increments are not checked.

Now consider a PC that lands on a data word. It runs forward through misread
words. Four things can happen:

* It reaches an invalid word, which resets the CPU.
* It reaches the end of the code and then empty space, which also resets the
  CPU.
* It executes a misread jump. That jump can only go to a block start, which
  holds real code (or empty space).
* It executes a misread RETURN or PC write. If the value is unaligned, the CPU
  is reset. If it is aligned, execution continues on real code.

Execution on data words can therefore never close a loop. Once the PC is back
on real code, a loop that does not clear the watchdog in time ends by a
watchdog reset. This approach does not depend on any particular opcode.

The cost is code size. Each block can waste up to W of its bytes on padding:
W = 60% for 8-byte blocks with MSP430 instructions of 2 to 6 bytes (6 NOP
bytes for 10 instruction bytes in the worst case), 33% for 16-byte blocks and
14% for 32-byte blocks. Jump targets and CALLs also need padding. An average
estimate of the number of NOPs added, for program size PS bytes, block size A,
J jump targets and C calls, is

```
NOPs ~ ( PS*W/A + (A - 2)*J + (A - sizeof(CALL))*C ) / 4
```

Few long jumps favour large blocks. Many jumps in a short program favour small
ones. Set `ALIGN_X` to match the program.

## Module map

```
ssmc_top                       three cores side by side, shared clk / rst_n / wdt_tick
└─ ss_core  (x3, APPROACH = ROM_COMPARE, WDRST, ALIGN)
   ├─ pc_restrict   (x2)       fetch address, new PC value
   ├─ jump_target              word- or block-relative jump destination
   ├─ prog_rom                 program ROM, port A fetch, port B comparison-register load
   ├─ wdrst_decoder            WDRST and invalid opcode words (< 1000h)
   ├─ wdt_access_check         approach 1 only
   ├─ pc_align_check           approach 3 only
   ├─ ss_wdt                   watchdog (interval fixed to the maximum in approach 2)
   └─ reset_ctrl
ss_pkg                         approach_e, rst_src_t, cpu_hooks_t, cpu_ctl_t, constants
```

The CPU core is not part of this RTL. Each `ss_core` talks to its CPU through
two structs defined in `ss_pkg`. The CPU must be changed to report these hooks
and to obey the control outputs:

| `cpu_hooks_t` (CPU to guard) | meaning |
|---|---|
| `fetch`, `fetch_addr` | instruction fetch request and the CPU's raw PC; `ctl.fetch_data` comes back one cycle later from the restricted address |
| `dec_valid`, `dec_ir`, `dec_ext` | an instruction being decoded: its opcode word and the word after it |
| `instr_pc` | address of the instruction now executing (what approach 1 compares) |
| `jmp`, `jmp_pc`, `jmp_off` | a taken relative jump (JMP or a conditional jump), the PC it is relative to (its address + 2), its 10-bit offset |
| `pc_wr`, `pc_wr_data` | any other programmatic PC write (CALL, RETURN, MOV ..., PC) |
| `dwr`, `daddr`, `dwdata` | data write; held by the CPU while `ctl.stall` is high |
| `fault` | a reset request raised by the CPU itself |

| `cpu_ctl_t` (guard to CPU) | meaning |
|---|---|
| `rst` | CPU reset, `RST_CYCLES` long |
| `stall` | hold the current instruction (approach 1, two cycles per WDTCTL write) |
| `fetch_data` | ROM word, one cycle after `fetch` |
| `pc_load`, `pc_new` | combinational in the cycle of `jmp`/`pc_wr`: the value the CPU must load into its PC (jump destination computed here; upper bits forced into ROM) |
| `wdrst` | WDRST recognised; the CPU treats it as a 4-byte instruction |

Everything is synchronous to `clk`. Only `rst_n`, the power-on reset, is
asynchronous.

## Parameters (`ssmc_top`, passed to every core)

| parameter | default | meaning |
|---|---|---|
| `ALIGN_X` | 3 | log2 of the block size for approach 3 (8-byte blocks) |
| `ROM_BASE`, `ROM_AW` | 4000h, 14 | ROM window start and log2 of its size in bytes (16 KB) |
| `WDT_CNT_W` | 16 | watchdog counter width |
| `WDT_IVAL0..3` | 32768, 8192, 512, 64 | interval lengths in ticks for interval select 00..11 |
| `RST_CYCLES` | 4 | CPU reset length |

`ss_core` also takes `APPROACH` and `ROM_INIT`, a `$readmemh` image for its
ROM. The ROM of `ssmc_top` is empty (all 0000h) unless it is loaded. That is
why a synthesis run of the bare top folds the ROM into constants. In a real
build, pass the program image through `ROM_INIT` or replace `prog_rom` with
the target's ROM macro.

## Choices made in this implementation

The ideas above fix what each mechanism must do. They leave the following
details open, and this RTL fills them as described:

* The ROM window 4000h-7FFFh and the valid-address word at 7FFEh.
* The watchdog register layout, password and interval lengths. These are the
  MSP430 WDT+ ones, minus the hold, NMI and timer-mode bits. The counter is
  16 bits wide.
* WDTCTL reads are not checked by approach 1, because a read cannot clear the
  watchdog.
* Approach 1 takes two stall cycles per WDTCTL write, assuming a ROM with one
  cycle of read latency.
* The 10-bit block offset is read as two's complement (-512..+511 blocks).
* The jump base is the MSP430 relative-jump PC, which is the jump's address + 2.
* Invalid-opcode detection covers only words below 1000h. The extended MSP430X
  opcodes are not considered.
* The reset length, the cause record, and the rule that the CPU reset also
  clears the guard.
* The hook interface to the CPU. Every variant needs some such interface, but
  the exact signals are this design's own.

Not included: the CPU core itself, the compiler support (NOP padding, CALL
placement, storing the valid address, replacing watchdog writes by WDRST),
and the watchdog's clock-source selection (`wdt_tick` is an input).

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. Run them from the repository root, because
`tb_prog_rom` loads `tb/rom_test.hex` by a relative path. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/ss_pkg.sv \
    tb/tb_ssmc_top.sv --top-module tb_ssmc_top
./obj_dir/Vtb_ssmc_top
```

| testbench | what it shows |
|---|---|
| `tb_ssmc_top` | End to end at default sizes, a few hundred thousand cycles. A behavioural CPU (`tb/msp430_model.sv`, a few MSP430 encodings only) runs a main loop on each core for three full watchdog intervals without a reset. Then the test injects PC errors. On core 0: a stray watchdog write inside data fields followed by a stray jump back to it is refused; empty code is invalid; a jump-to-self ends by watchdog after 32768 ticks. On core 1: a stray WDRST clears once and realigns; the second WDRST word alone is invalid; a loop writing 0120h cannot hold off the watchdog. On core 2: a stray PUSH/RETURN to an unaligned address resets; a stray jump lands on a block start; a shortened interval with a high count ends by overflow; a bad password resets; `MOV #0288h,PC` is forced to 4288h. Each reset must have exactly the expected cause. |
| `tb_pc_corruption` | Randomized campaign at default sizes: 200 random PC values per core (programmed words, the rest of the program area, the RAM stack, anywhere). Each time, the core must execute its intended watchdog clear at 4000h again within 70000 cycles. The test prints how each corruption ended: realigned without reset, or reset by which detector. The worst case seen is one watchdog interval (about 32.8k cycles) for cores 0 and 1, and a count wrapping past FFFFh (about 65.5k cycles) for core 2. |
| `tb_ss_core` | Cycle-level behaviour of one core of each approach, with 64-tick intervals. |
| `tb_ss_wdt` | Expiry after exactly 32768/8192/512/64 ticks, CNTCL, the password, overflow after the wrap, the fixed-interval variant. |
| `tb_wdt_access_check` | Grant after two stall cycles, refusal of any other address, reload of the comparison register on every check. |
| `tb_wdrst_decoder`, `tb_jump_target`, `tb_pc_align_check`, `tb_pc_restrict`, `tb_reset_ctrl`, `tb_prog_rom` | Unit checks against independently computed values. |
| `tb_align_sizes` | Block-relative jumps and the alignment check for 8-, 16- and 32-byte blocks. |

The behavioural CPU model is deliberately crude. Every instruction takes five
cycles, and unknown opcode words run as one-word no-ops. It exists only to
steer the guard through the corrupted-PC situations described above. It says
nothing about how the hooks would be timed inside a real MSP430 pipeline.
