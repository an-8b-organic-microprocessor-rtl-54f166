# An 8-bit accumulator processor built for organic thin-film logic

This is RTL for a very small 8-bit processor intended for organic thin-film
transistors printed on plastic foil. Such a process has slow gates, giving clock
rates of a few hertz. It offers only inverters, NAND gates and buffers, and
every transistor counts. So the machine is cut down as far as it will go. It
has one accumulator, three working registers, an output register and a
ten-bit instruction word whose bits drive the datapath almost directly, with
no decoder.

The system is made of two separate circuits that are connected pin to pin:

* the **processor foil** (`processor_foil`): the datapath. Its pins are
  `opcode(8:0)`, `in(7:0)` and `clk` in, and `out(7:0)` and `overflow` out;
* the **instruction foil** (`instruction_foil`): a program counter and a
  hard-wired program. It drives `opcode(8:0)` from `clk` and `reset`.

`organic_mpu_top` connects the two. The stored program is a *running
averager*: it smooths a repeatedly sampled input and gives one extra bit of
resolution.

## The instruction word

Each instruction is ten bits, `opcode(9:0)`. Bit 9 belongs to the
instruction foil (jump). The other nine go to the processor, and each field
acts on the datapath directly:

| bits  | field    | effect on the processor |
|-------|----------|-------------------------|
| 9     | jump     | handled on the instruction foil: the PC loads bits (3:0) |
| 8:7   | Regsel   | selects C0, C1, C2, or the constant 1 (`11`) as the ALU's second operand and as the register to write |
| 6     | write C  | write the register named by Regsel (nothing happens for `11`) |
| 5     | write A  | A <= ALU result |
| 4     | write Out| Out <= A |
| 3     | C source | value written into C: 1 = A, 0 = the `in` pins |
| 2:0   | ALU op   | 000 AND, 001 OR, 010 NOT A, 011 pass operand (LD), 100 ADD, 101 SUB, 110 shift right, 111 shift left |

The assembly mnemonics are just particular settings of these bits, with
don't-care bits set to 0:

| instruction | word          | instruction   | word          |
|-------------|---------------|---------------|---------------|
| AND A,Cr    | `0rr0100000`  | LD Cr,A       | `0rr1001000`  |
| OR A,Cr     | `0rr0100001`  | LD Cr,IN      | `0rr1000000`  |
| NOT A       | `0000100010`  | LD OUT,A      | `0000010000`  |
| LD A,Cr     | `0rr0100011`  | NOOP          | `0000000000`  |
| ADD A,Cr    | `0rr0100100`  | INC A         | `0110100100`  |
| SUB A,Cr    | `0rr0100101`  | DEC A         | `0110100101`  |
| LSR A       | `0000100110`  | JUMP t        | `100000tttt`  |
| LSL A       | `0000100111`  |               |               |

INC and DEC need no logic of their own. They are ADD and SUB with Regsel =
`11`, which puts the constant 1 on the operand mux. In the same way, `LD
A,C3` loads 1 and `SUB A,C3` then clears A. The processor has no reset
pin, so a program uses this pair to start from a known state.

The write enables are independent. A word may set several of bits 6, 5 and 4,
and all the selected writes then happen on the same clock edge. Each one
reads the register values from before that edge. The helper functions
`enc_alu`, `enc_ldc`, `enc_ldout`, `enc_nop` and `enc_jump` in `mpu_pkg`
build these words.

## Processor foil

```
             +-------------------------------+
             v                               |
 Cr/1 --> [ ALU op(2:0) ] --> A (en=bit5) ---+--> Out (en=bit4) --> out(7:0)
   ^            |                            |
   |         overflow                        |
 [4:1 mux Regsel] <-- C0 C1 C2 "1"           |
                      ^  (decoder: bit6, Regsel)
                      |                      |
            [2:1 mux bit3]: 1 = A <----------+
                            0 = in(7:0)
```

* `alu`: combinational. Its inputs are A and the Regsel-selected operand.
  The right shift is logical: a zero enters at the top.
* `working_regs`: C0–C2, the write decoder and the operand mux with the
  constant 1.
* `en_reg`: the 8-bit register with load enable. A, Out and C0–C2 all use it.
  It is rising-edge triggered and has no reset.

Every instruction completes in one clock. `out(7:0)` is the Out register, so
it changes only on an `LD OUT,A` edge. `overflow` is combinational from the
ALU and describes the word currently on `opcode`. It is the carry out of
ADD/INC or the borrow of SUB/DEC, and 0 for all other operations. So it flags
an *unsigned* result outside 0..255.

## Instruction foil and the two-foil timing

This is the part that needs the most care when you read waveforms.

* `instr_encoder` is a combinational 16-word ROM addressed by the 4-bit PC.
* `program_counter` has a write enable equal to `reset OR word(9)`. When the
  enable is set it loads 0 (during reset) or the jump target `word(3:0)`.
  Otherwise it counts up. Reset is synchronous.
* An output register captures `word(8:0)` on every clock edge. This register
  drives the connector. It has no reset.

The two foils share one clock, so there is a one-stage pipeline. The word at
address *p* is fetched while the PC holds *p*. It appears on `opcode` after
the next edge, and the processor executes it on the edge after that.
Consequences:

* **Jumps cost one cycle and never reach the processor as jumps.** A jump
  word has bits (8:4) clear, so its low nine bits decode as NOOP. The
  processor therefore executes a NOOP in the slot where the jump was. An
  assertion in `instruction_foil` checks that every jump word has this form.
* **Reset.** While `reset` is high the PC sits at 0 and the output register
  keeps capturing word 0. On the first edge after `reset` falls, the PC still
  holds 0, so the processor executes word 0 twice. This does no harm for
  `LD A,C3`. Counted from the last edge with `reset` high, address *k* is
  executed on edge *k* + 2.
* The PC is 4 bits, so jump targets are 4 bits. Bit 4 of a jump word must stay
  0, because otherwise the processor would see an `LD OUT`.

## The running-averager program

```
 0 LD A,C3    1 SUB A,C3      ; A = 0
 2 LD C1,A                    ; C1 = A (previous half-output)
 3 LD C0,IN   4 LD A,C0   5 ADD A,C1   6 INC A   7 LSR A   8 LD C1,A
 9 LD C0,IN  10 LD A,C0  11 ADD A,C1  12 LD OUT,A  13 LSR A
14 JUMP 2
```

The loop from address 2 to 14 takes 13 clocks: 12 instructions plus the NOOP
that replaces the jump. The input is sampled twice per loop, at addresses 3
and 9, and Out is written once, at address 12. Let *s* be the value left in A
by the previous loop (0 after reset) and *x* the input. One loop computes

    h   = (x + s + 1) >> 1        (rounded average, kept in C1)
    out = x + h                   (twice the new average: one extra bit)
    s'  = out >> 1

For a steady input *x*, `out` settles at 2*x*. A step from 0 to 7 gives
0x0B, 0x0D, 0x0E, which are 5.5, 6.5 and 7.0 in half-units. The first `LD
OUT` executes 14 edges after the last reset edge, and after that one comes
every 13 edges. With a 6-bit input (0..63) the output stays within 7 bits and
the adder never overflows. Larger inputs wrap, and the `overflow` pin shows
when that happens.

## How this RTL relates to the original design

These points follow the published design:

* the block structure of both foils;
* the opcode fields and the ALU operation codes;
* the constant-1 slot on the operand mux;
* the 4-bit PC with its reset/jump load mux;
* the averager program.

These are choices made here, because the published description leaves them
open:

* **Shift right is logical.** One description of the ALU calls it an
  arithmetic shift right. The instruction table names it LSR, and the
  reference results it gives (0xE4 then 0x72; 0x1B, 0x0D, 0x06, 0x03) are a
  logical shift. This RTL follows the table. Changing the `ALU_LSR` line of
  `alu.sv` to `{a[WIDTH-1], a[WIDTH-1:1]}` gives the arithmetic variant.
* **Overflow** is the unsigned carry/borrow of ADD/SUB, combinational. The
  original gives only the pin name.
* **Jump target width.** The jump word in the instruction table shows a
  five-bit target, but the program counter is four bits. Four bits are used.
* **Clocking.** Registers are rising-edge triggered, and the two foils share
  one clock.
* **No reset on the processor.** This is as in the original, which has no
  reset pin. Simulations must initialise registers through instructions. A
  simulator that starts registers at random values shows garbage on `out`
  until the first `LD OUT`.
* **Unused ROM word.** Address 15 is unused and holds a NOOP.

Not modelled: the transistor-level cell library (dual-threshold organic
inverters, NANDs and buffers with a back-gate bias), the power, ground and
back-gate pins of the connectors, and an analog-to-digital converter for the
input. Timing is functional only. The physical circuit runs at a few hertz,
and nothing in the RTL depends on that.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `alu`, `working_regs`, `processor_foil`, `organic_mpu_top` | `WIDTH` | 8 (`mpu_pkg::DATA_W`) | datapath width |
| `en_reg` | `WIDTH` | 8 | |
| `program_counter`, `instr_encoder`, `instruction_foil`, `organic_mpu_top` | `PC_W` | 4 | with a wider PC, the program still fills only addresses 0..14 and the rest read as NOOP |

The opcode layout is fixed in `mpu_pkg` and does not scale with `WIDTH`.

## Files

`rtl/`:
* `mpu_pkg.sv`: widths, field positions, the `regsel_e` and `alu_op_e` enums, and the instruction encoders.
* `alu.sv`, `en_reg.sv`, `working_regs.sv`, `processor_foil.sv`: the processor foil.
* `program_counter.sv`, `instr_encoder.sv`, `instruction_foil.sv`: the instruction foil.
* `organic_mpu_top.sv`: the two foils connected.

`tb/`: each `tb_<module>.sv` is a self-checking bench for that module.
`averager_ref_pkg.sv` holds the expected program words, written out bit by
bit, and a loop-level model of the averager. Every bench ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_alu`: all operations on corner and random operands.
* `tb_processor_foil`: drives only the foil's pins, as a bench tester would.
  It tries every table instruction on every register and then 3000 random
  nine-bit opcodes, checking `out` and `overflow` against a register-level
  model.
* `tb_instruction_foil`: checks the opcode stream cycle by cycle, including
  the repeated word 0 after reset and a reset in mid-loop.
* `tb_organic_mpu_top`: runs the complete system at its default parameters.
  It replays the 0-to-7 step (0x0B, 0x0D, 0x0E), then random 6-bit and
  large inputs (these overflow the adder), then a mid-run reset. It checks
  every output update against the model and checks that `out` holds for the
  12 clocks between updates. It also counts each mechanism (reset, jump/NOOP,
  LD C from IN and from A, INC, ADD, SUB, LSR, LD OUT, overflow) and fails if
  any of them never occurs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mpu_pkg.sv tb/averager_ref_pkg.sv tb/tb_organic_mpu_top.sv \
    --top-module tb_organic_mpu_top -o sim
./obj_dir/sim
```

Replace the top module to run another bench. Each one finishes in well under
a second. To run a different program, edit the `case` in `instr_encoder.sv`
using the `enc_*` helpers. The program can use at most 2^`PC_W` words, and
jump targets must fit in bits (3:0).
