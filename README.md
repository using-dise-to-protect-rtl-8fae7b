# DISE return-address protection hardware

A stack-smashing attack overflows a buffer on the stack until it overwrites
the saved return address of the current function, so that the `ret` jumps to
code the attacker chose. This design defends against it below the software.
An instruction-stream editor sits between the fetch and execute stages of a
processor. It rewrites every call so that the call also pushes the return
address onto a protected *shadow stack*. It rewrites every return so that the
return first checks the address it is about to use against that stack. The
program's binary is never changed: libraries, dynamically generated code and
code without source are covered too. The checks are produced by the hardware
while the program runs, so software cannot skip them.

The editor is DISE (dynamic instruction stream editing). It is programmable,
and return-address protection is one program for it. The RTL here is the DISE
hardware. The protection itself is a set of rewriting rules and two small
routines, which the end-to-end testbench installs and runs.

## Productions: what DISE is programmed with

A **production** is a pattern plus a replacement sequence.

* The **pattern** describes one instruction. It gives a set of opcode
  classes (for example "jsr or bsr", "ret" or "any store"), an opcode under a
  bit mask, and optionally exact values for the `ra` and `rb` register fields.
* A fetched instruction that matches is the **trigger**. It is replaced by the
  **replacement sequence**, a run of **templates**. A template is an
  instruction word in which some fields are literal and some are filled in
  from the trigger:

| directive | fills in |
|---|---|
| `T.INST` | the whole trigger instruction |
| `T.OP`   | the trigger's opcode (and its function code, if the trigger is an operate instruction) |
| `T.RA`, `T.RB`, `T.RC` | a register field copied from the trigger. For loads, stores and jumps, "T.RS" (base or target register) is `T.RB` and "T.RD" is `T.RA` |
| `T.IMM`  | the trigger's 16-bit displacement |
| `T.PC`   | the trigger's PC, used as a source operand |
| literal DISE register | a register of the dedicated DISE register set |

Return-address protection uses three productions. They are built by
`prod_tmpl` / `prod_pat` in `tb/dise_tb_pkg.sv`. Alpha syntax, with `$d…` for
DISE registers:

```
jsr|bsr  =>  addq   T.PC, 4, $dr0        ; return address
             xor    $dr0, $dxr, $dr0     ; encode with a secret key
             addq   $dssp, 16, $dssp     ; push ...
             stq    $dr0, -8($dssp)      ; ... encoded return address
             stq    $sp, -16($dssp)      ; ... and the stack pointer
             cmpeq  $dssp, $darp, $dr0   ; shadow stack full?
             ccall  $dr0, expand         ; then grow it
             T.INST                      ; the call itself
ret      =>  ldq    $dr0, -8($dssp)      ; pop
             subq   $dssp, 16, $dssp
             xor    $dr0, $dxr, $dr0     ; decode
             cmpne  T.RB, $dr0, $dr0     ; differs from the real target?
             ccall  $dr0, addrcheck      ; then decide what to do
             T.INST                      ; the return itself
store    =>  lda    $dr0, T.IMM(T.RB)    ; store address
             srl    $dr0, 26, $dr0       ; its segment
             cmpeq  $dr0, $dsr, $dr0     ; the shadow stack's segment?
             ctrap  $dr0, error          ; then trap
             T.INST                      ; the store itself
```

The store production is optional. It keeps application stores out of the
shadow stack's 64 MB address segment. XOR encoding with `$dxr` is the other
way to protect the stack, and the two can be used together. Stores inside
replacement sequences are never matched again, so the shadow-stack pushes
themselves are not checked.

## The engine and its stream

`dise_engine` is a pipeline stage with a valid/ready handshake on the fetch
side (`in_*`) and on the execute side (`out_*`). Each cycle the instruction
offered by fetch is matched against every pattern-table entry at once. The
lowest-numbered valid entry wins.

* A **non-matching** instruction is passed on unchanged, one cycle later.
* A **trigger** starts its sequence: templates `rt_start … rt_start+rt_len-1`
  are read from the replacement table, instantiated, and emitted **one per
  cycle**. Fetch is held off (`in_ready` low) until the last one. So an
  N-template sequence fills N consecutive output cycles, and the next
  instruction follows in the next cycle. The call production costs 8 cycles
  of decode bandwidth and the return production 6.
* Every replacement instruction carries the **trigger's PC**, and `repl` is
  set in its uop. A sequence has no addresses of its own, so no branch can
  enter it halfway. If a flush arrives while a sequence is being emitted, the
  rest of the sequence is dropped. The refetched trigger then expands again
  from its first template. A sequence is therefore executed whole or not at
  all.

Each output `uop_t` holds the Alpha-format word and a 2-bit *register space*
per register field. The space is application register, DISE register or
"the trigger's PC". The 5-bit Alpha fields cannot name DISE registers, so
this is how a replacement instruction does it. The uop also carries its
template index, the sequence end and the trigger word. The execute side
needs these for `ccall`.

### DISE mode, `ccall` and `dret`: the part that needs care

Complex logic does not belong in a sequence. A sequence calls a **DISE
function** (ordinary code, loaded in the application's address space) with
`ccall reg, target`. The call is taken when `reg` is non-zero. Inside such a
function DISE must not expand anything, or sequences could expand
recursively. When the function ends with `dret`, the interrupted sequence
must continue where it stopped (usually only `T.INST` is left). The protocol:

1. The execute side executes a `ccall` whose condition is true. It does not
   retire younger uops. In the next cycle it raises `ccall_taken` for one
   cycle and hands back `ccall_resume`: the ccall's `rt_idx + 1`, its
   `rt_end`, its `trig` and its `pc`, all taken from the uop. It also
   redirects fetch to the target.
2. The engine drops everything in flight, stores the resume state, and
   enters the DISE-function state (`in_dfunc`). From then on, fetched
   instructions pass through **unexpanded**, with `dfunc` set.
3. Inside the function, `dmfr` (DISE register → general register) and `dmtr`
   (the reverse) are legal. The engine tags their DISE-side field (`rb` for
   `dmfr`, `rc` for `dmtr`) with the DISE space.
4. When `dret` executes, the execute side raises `dret` for one cycle and
   restarts fetch at `resume_pc` (trigger PC + 4). The engine leaves the
   DISE-function state and emits the rest of the stored sequence before it
   accepts fetched instructions again.

`flush` (any other redirect) drops in-flight work and leaves the
DISE-function state as it is. A branch inside a DISE function does not end
it.

**Legality.** `dmfr`, `dmtr` and `dret` are legal only in DISE mode, that is
in a replacement sequence or a DISE function. `ccall` and `ctrap` are legal
only in a replacement sequence. When application code contains any of them,
the uop is passed on with `illegal` set, and the execute side must raise an
exception.

## DISE registers and the controller

`dise_regfile` is the dedicated register set: 8 × 64 bits, with two reads and
one write per cycle. Every access states whether its instruction is in DISE
mode. An access from outside DISE mode, or to a number of 8 or more, reads 0,
writes nothing and raises `fault`. The protection uses `$dr0` (temporary,
0), `$dssb` (shadow-stack base, 1), `$dssp` (pointer, 2), `$darp` (limit, 3),
`$dxr` (XOR key, 4) and `$dsr` (segment number, 5). The hardware gives the
numbers no fixed meaning.

`dise_controller` is the only way to program DISE. `cfg_priv` must be driven
from the processor's privilege mode, so that only the OS can load or read
patterns, templates and DISE registers, or set the enable bit (control
register 0, bit 0). Control registers 1 to 3 hold the engine context:
1 is the DISE-function flag (bit 0), 2 the stored resume point
(`{rt_next[47:40], rt_end[39:32], trigger word[31:0]}`) and 3 the trigger
PC. A write takes effect at the next clock edge. A read
returns `cfg_rdata` with `cfg_rvalid` one cycle later; this serves saving
DISE state on a context switch. An unprivileged or out-of-range access
changes nothing and pulses `cfg_error` one cycle later. Patterns and
templates travel in the low bits of the 64-bit data word (`pattern_t` is 48
bits, `template_t` is 44).

## Modules

| file | role |
|---|---|
| `rtl/dise_pkg.sv` | opcodes, opcode classes, `pattern_t`, `template_t`, `uop_t`, `resume_t` |
| `rtl/dise_pattern_table.sv` | `PT_ENTRIES` patterns; combinational first-match |
| `rtl/dise_replacement_table.sv` | `RT_ENTRIES` templates; engine and controller read ports |
| `rtl/dise_instantiate.sv` | template + trigger → instruction (combinational) |
| `rtl/dise_engine.sv` | the stream editor: tables, instantiation, sequencing, DISE mode |
| `rtl/dise_regfile.sv` | dedicated DISE registers with the DISE-mode check |
| `rtl/dise_controller.sv` | privileged programming and read-back port, including the engine context |
| `rtl/dise_top.sv` | controller + engine + registers; the processor connects to its ports |

Parameters: `PT_ENTRIES` = 8, `RT_ENTRIES` = 32, `N_DREGS` = 8. The three
productions need 3 patterns, 19 templates and 6 registers. Pattern and
template indices are 8 bits wide, so up to 256 templates are possible.
Synthesized, the top is about 880 word-level cells and 2750 flip-flop bits,
nearly all of it table storage.

## Instruction encoding

Alpha AXP formats and opcode numbers are used: opcode `[31:26]`, `ra [25:21]`,
`rb [20:16]`, displacement `[15:0]`, operate literal `[20:13]` with flag
`[12]`, function `[11:5]`, `rc [4:0]`. The DISE-only instructions take opcodes
that Alpha reserves:

| instruction | encoding |
|---|---|
| `dmfr` | `0x01`, function 0: `rc` ← DISE `rb` |
| `dmtr` | `0x01`, function 1: DISE `rc` ← `ra` |
| `dret` | `0x01`, function 2 |
| `ccall ra, target` | `0x02`, `[20:0]` = absolute word address of the DISE function |
| `ctrap ra, code` | `0x03`, `[20:0]` = trap code |
| `cmpne` | operate `0x10`, function `0x2E` (a slot Alpha leaves unused) |

Alpha literals are unsigned, so the pop is written `subq $dssp, 16` rather
than an add of −16.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
To build and run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dise_top \
    -y rtl -y tb +libext+.sv rtl/dise_pkg.sv tb/dise_tb_pkg.sv tb/tb_dise_top.sv
./obj_dir/Vtb_dise_top
```

The block testbenches build the same way. Add `tb/dise_tb_expect.sv` after
`tb/dise_tb_pkg.sv` for `tb_dise_engine`.

| testbench | what it establishes |
|---|---|
| `tb_dise_pattern_table` | class, opcode-mask and register matching; first-match priority; empty entries; read-back; reset |
| `tb_dise_replacement_table` | storage on both read ports against a model; reset |
| `tb_dise_instantiate` | every directive, the load-through-`$sp` example rewrite, each protection template against hand-built words |
| `tb_dise_engine` | exact edited streams under random fetch gaps and back-pressure; 8 back-to-back cycles per call; no expansion when disabled or inside a DISE function; ccall/dret resume; context restore followed by dret; illegal marking; flush mid-sequence; unchecked `$sp` stores by entry priority |
| `tb_dise_regfile` | DISE-mode and range checks, fault, OS port, 2000 random cycles |
| `tb_dise_controller` | privileged write/read timing, refusal of unprivileged and out-of-range accesses, enable, engine-context words |
| `tb_dise_top` | the whole design at its default parameters, running real programs (below) |

`tb_dise_top` contains a small in-order executor for the needed Alpha subset.
It stands in for a processor core. The OS side installs the three
productions, a shadow stack at `0x0400_0000` with room for three entries, and
a random-looking XOR key. Then it runs:

* **a recursive sum** with five nested calls, once without protection as a
  baseline and once with it. The protected run executes exactly the inserted
  instructions more: 7 per call, 5 per return, 4 per store, plus the 6
  instructions of one `expand()`. That is 167 instructions against 61 and, on
  the simple executor, 202 cycles against 92. The program does almost
  nothing but call, store and return, so the relative overhead is far larger
  than on ordinary code, where it scales with how often calls and stores
  occur. The executor runs one instruction per cycle, so nothing hides the
  extra instructions as a wide core would. The third push fills the shadow
  stack, and the call sequence then calls `expand()` (a DISE function using
  `dmtr`, `dmfr`, `lda`, `dret`), which raises `$darp`. The test checks the
  result (10), the restored `$sp` and `$dssp`, and that the shadow entries
  hold XOR-encoded addresses. With only the call and return productions
  installed (XOR encoding without the store check) the same sum takes 127
  instructions and 162 cycles;
* **a context switch inside `expand()`**: the same sum is stopped while the
  engine is in the DISE-function state. The OS side reads the DISE registers
  and the engine context (control registers 1 to 3), resets the hardware,
  reloads the productions, writes everything back and restarts fetch at the
  first instruction not yet executed. `dret` then resumes the interrupted
  call sequence and the sum completes as before;
* **a buffer overflow**: a copy routine overruns its 3-word stack buffer onto
  its saved return address. The return sequence detects the mismatch, and
  `addrcheck()` finds no older matching entry and stops the program. With
  DISE disabled, the same run reaches the attacker's code. With an input that
  fits, it returns normally;
* **a non-local return**: the innermost of three nested functions unwinds
  straight into its grandparent's epilogue, as `longjmp` does. The
  grandparent's return mismatches the top shadow entry. `addrcheck()` pops
  entries until one matches both the return address and the stack pointer,
  cuts the shadow stack back to it, and `dret` lets the return go ahead;
* **a redirect within the call chain**: a function overwrites its return
  address with a return point that *is* on the shadow stack, but with a
  different stack pointer. `addrcheck()` finds no entry that matches both, so
  the program is stopped. This is why each entry also records `$sp`;
* **a store into the shadow-stack segment**, which traps before the store is
  performed;
* **unprivileged attempts**: writes through the controller are refused, and
  `dmfr` in application code is flagged illegal.

It counts each mechanism (call, return and store expansions, ccall to each
function, dret, DISE-function instructions, ctrap, illegal, fetch stalls,
flushes, refused configuration, context switch) and fails if any never
occurred.

## Where this design departs from, or goes beyond, its source description

* The DISE hardware is described only by what it does. Its internal
  structure, table sizes, one-instruction-per-cycle rate, handshakes, resume
  protocol, DISE instruction encodings, register-space tags and controller
  access format are all this design's own choices.
* The processor is outside the design. The protection was evaluated on a
  4-wide, 12-stage out-of-order Alpha core; here there is only the
  testbench's in-order executor. A real core must squash uops younger than a
  taken `ccall`, a `dret` or a redirect, as the executor does. It must also
  supply the trigger PC for `T.PC` operands.
* The DISE functions are software and live in the testbench as short Alpha
  routines. `addrcheck()` assumes the return goes through `$ra`, the usual
  convention; the trigger's real register is not handed to it. It keeps
  the three general registers it uses in DISE registers. `expand()` raises
  the limit instead of allocating a larger region and copying the stack.
* The engine's own state (the DISE-function flag and the stored resume
  point) is saved and restored by the OS through control registers 1 to 3,
  not automatically by the hardware. The engine must be drained (no
  sequence in progress, `busy` low) when it is saved or restored. A switch
  between a trigger and the end of its sequence is not supported, so the
  core should take interrupts only at sequence boundaries.
* `T.IMM` copies only memory-format displacements, not operate literals.
* The store production inserts four instructions per store (address,
  segment, compare, trap), as its listed sequence does. The overhead figures
  of the source speak of three per store; the difference is the address
  computation.
* Patterns test a register field only for equality. A refinement that
  leaves stores through `$sp` unchecked ("trust the stack pointer") is still
  possible: give such stores a higher-priority entry whose sequence is just
  `T.INST`. `tb_dise_engine` exercises this.
