# PeANUt: a teaching accumulator machine in SystemVerilog

PeANUt is a small 16-bit accumulator computer used to teach how a
processor runs programs. Every instruction is one 16-bit word that names
one operand; the result goes to the accumulator AC. This RTL covers the
machine's more advanced features:

* **traps**: one instruction asks for a service by number. Trap 1 halts,
  trap 2 reads a character from the keyboard and trap 3 prints one.
* **exceptions**: the machine stops on an illegal instruction (5), an
  illegal addressing mode (6), an arithmetic overflow while overflow
  traps are enabled (7), or a divide by zero (8).
* **condition codes and branches**: a compare sets GT and EQ in the
  program status word (PSW), arithmetic sets OV, and six branch
  instructions test them. This is enough for if/else and loops.
* **an index register XR and indexed addressing**, which let a loop walk
  through an array.

The design is a multi-cycle core with main memory, plus a host port for
loading programs and valid/ready console handshakes for the keyboard and
display.

## Instruction word

```
 15   13 12   10 9                    0
+-------+-------+----------------------+
| mode/ |  op   |       opspec         |
| class |       |                      |
+-------+-------+----------------------+
```

The 10-bit `opspec` is either an address (1024 words of memory) or a
small constant. Addresses in programs are usually written in octal: `a50`
is word 050₈ = 40.

| bits 15..10 | instruction | effect |
|---|---|---|
| `mmm 001` | load | AC ← OP |
| `mmm 010` | store | mem[EA] ← AC (*) |
| `mmm 011` | add | AC ← AC + OP, sets OV |
| `mmm 100` | sub | AC ← AC − OP, sets OV (*) |
| `mmm 101` | mul | AC ← AC × OP (low word), sets OV (*) |
| `mmm 110` | div | AC ← AC ÷ OP, sets OV; OP = 0 gives exception 8 (*) |
| `mmm 111` | comp | GT ← AC > OP, EQ ← AC = OP |
| `101 000` | jump | PC ← opspec |
| `101 001` | branch equal | if EQ = 1 |
| `101 010` | branch not equal | if EQ = 0 |
| `101 011` | branch greater | if GT = 1 (*) |
| `101 100` | branch less-or-equal | if GT = 0 (*) |
| `101 101` | branch overflow | if OV = 1 (*) |
| `110 001` | set XR | XR ← opspec (sign-extended) |
| `110 010` | increment XR | XR ← XR + opspec (sign-extended, so it can also decrement) |
| `110 101` | trap | trap number = opspec |
| `111 001` | load XR | AC ← XR (*) |
| `111 010` | compare XR | GT ← XR > AC, EQ ← XR = AC |
| `111 011` | store XR | XR ← AC (*) |

`mmm` is the addressing mode of the accumulator instructions:

| mode | name | operand OP |
|---|---|---|
| `000` | immediate | the opspec itself, sign-extended to 16 bits |
| `001` | direct (*) | mem[opspec] |
| `011` | indexed | mem[XR + opspec], wrapping at 1024 |
| `010`, `100` | — | exception 6 (illegal mode) |

Store with immediate mode also raises exception 6. Every code not in the
tables raises exception 5 (illegal instruction). Rows marked (*) use codes
chosen for this design. The PeANUt material names these operations or
implies them, but the description this RTL follows does not give their
encodings. Which codes are illegal is also this design's choice. The
unmarked codes are PeANUt's own. The compare-XR word has bit 9 set in the
usual listings (`111010 1 000000000`), and the decoder ignores bits 9..0
of that instruction.

## PSW and exceptions

| PSW bit | name | set by |
|---|---|---|
| 12 | GT | comp, compare XR |
| 11 | EQ | comp, compare XR |
| 10 | OV | add, sub, mul, div |
| 9  | EN | overflow-trap enable, loaded from `en_init` during reset (*) |

The other PSW bits always read 0. Compare leaves OV unchanged, arithmetic
leaves GT and EQ unchanged, and load, store and the XR instructions do
not touch the PSW.

PeANUt leaves the response to a trap or exception to the operating
system, and that part is not designed here. This machine **stops**
instead: `halted` rises and `stop_code` shows the cause. Code 1 means the
program halted with trap 1, and codes 5 to 8 are the exception numbers.
PC then points past the instruction that stopped the machine. A trap
instruction with number 5 to 8 stops the machine exactly as the exception
would. Trap numbers other than 1–3 and 5–8 count as illegal instructions.
On overflow with EN set, the wrapped result is still written to AC
before the stop. On a divide by zero, AC is left unchanged.

## How an instruction runs

`peanut_cpu` is a state machine around the registers PC, CI (current
instruction), AC, XR and PSW:

| state | what happens |
|---|---|
| FETCH | memory address ← PC |
| DECODE | CI ← memory word, PC ← PC + 1 |
| EXEC | execute. A store writes here. A direct or indexed operand sends its address to memory and goes to OPREAD |
| OPREAD | execute with the operand word just read |
| GET / PUT | wait for the keyboard or display handshake |
| HALT | stopped |

Timing follows from the table:

* immediate, branch, XR and halt instructions take 3 cycles;
* stores take 3 cycles;
* direct and indexed operands take 4 cycles;
* get and put take 3 cycles plus the wait for the console.

The memory `peanut_mem` is a synchronous RAM with two ports: read data
arrives one cycle after the address. Port A belongs to the core. Port B
is the host's: it loads programs while the core is held in reset, and it
can read results back.

Submodules of the core, all combinational:

* `peanut_decoder` classifies CI and flags illegal codes and modes.
* `peanut_agu` forms the operand address. In indexed mode it adds XR to
  the opspec.
* `peanut_alu` does signed two's-complement arithmetic and compare, and
  flags overflow and divide by zero.
* `peanut_branch` evaluates the branch conditions against the PSW.

Types and encodings are shared through `peanut_pkg`.

## Top level: `peanut_top`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start_pc` | in | 10 | where execution starts after reset |
| `en_init` | in | 1 | EN bit after reset |
| `load_we`, `load_addr`, `load_data` | in | 1/10/16 | host writes to memory |
| `load_rdata` | out | 16 | mem[load_addr], one cycle later |
| `in_valid`, `in_data` / `in_ready` | in / out | 1, 8 / 1 | keyboard. A get takes `in_data` in the cycle `in_valid` and `in_ready` are both high, and AC ← that character, zero-extended |
| `out_valid`, `out_data` / `out_ready` | out / in | 1, 8 / 1 | display. A put holds AC[7:0] on `out_data` until `out_ready` |
| `halted`, `stop_code` | out | 1, 4 | stop indication and cause |
| `retire` | out | 1 | one-cycle pulse per completed instruction |
| `pc`, `ac`, `xr`, `psw` | out | 10/16/16/16 | register state |

To run a program:

1. Hold `rst_n` low and write the words through the load port.
2. Set `start_pc`.
3. Release reset.
4. Serve the console handshakes.
5. Wait for `halted`.

## Departures and open points

* No stack pointer. PeANUt has an SP register, but no instruction that
  uses it is specified here.
* No operating-system trap handler. Exceptions stop the machine (see
  above).
* Memory size (1024 words), the direct mode, the reset values (AC, XR
  and PSW cleared) and the console handshake are choices made for this
  design.
* The usual description of the looping even-letters program says it
  executes 67 instructions. The program itself executes 65: one load,
  12 loop passes of 5, a final put/compare/branch, and the halt. The
  testbench checks 65.

## Verification

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`:

* `tb_peanut_alu`: corner cases plus 4000 random operations against
  integer arithmetic.
* `tb_peanut_decoder`: every class/op code, plus the words of the example
  programs.
* `tb_peanut_agu`: the indexed example a20 + XR(3) = a23, plus random
  addresses.
* `tb_peanut_branch`: every condition against every GT/EQ/OV
  combination.
* `tb_peanut_mem`: full fill and readback, then random traffic on both
  ports.
* `tb_peanut_cpu`: directed programs for arithmetic, every branch taken
  and not taken, each exception, and the console stalls. It also checks
  cycle counts.
* `tb_peanut_top`: the full-size machine. It runs:
  * the straight-line and looped even-letter printers (output
    `BDFHJLNPRTVXZ`; 27 and 65 instructions);
  * the indexed word printer (23 characters from a50..a76, 140
    instructions);
  * an if/else PASS/FAIL grade program, run with two inputs;
  * one program for each exception.

  It counts each mechanism (display stall, keyboard wait, branch taken
  and not taken, indexed access, store, halt, exceptions 5 to 8) and
  fails if any never happened.

`tb/peanut_asm_pkg.sv` holds small functions that build instruction
words. Simulate with Verilator, for example:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/peanut_pkg.sv tb/peanut_asm_pkg.sv tb/tb_peanut_top.sv -o sim
obj_dir/sim
```

Any other testbench builds the same way with its own file in place of
`tb/tb_peanut_top.sv`. Verilator finds the remaining modules in `rtl/`
and `tb/` by their file names.
