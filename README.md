# A 16-bit cryptographic coprocessor

This is a small coprocessor that takes the bit-level work of ciphers and hash functions off a main
processor. It holds sixteen 16-bit registers and runs a 12-instruction set. The set has the usual
arithmetic and logic operations, the rotations and shifts that ciphers use for transposition and
permutation, and a nonlinear lookup (`LUT`). The lookup passes a word through two 5-bit S-boxes
and works as a 16-bit hash step. Every instruction reads up to two registers and writes one. It
finishes in a single clock cycle of execute, with no stalls.

The design has three parts:

```
           instr ──► input register ──► combinational logic ──► RES ─┐
                                          ▲    ▲                     │
                                       ABUS  BBUS                    │
                                          │    │                     │
 host load/read ◄──────────────► 16 x 16 register file ◄──── Rd, WEN ─┘
```

- **Input register** (`input_register`). It holds the instruction being executed.
- **Register file** (`register_file`). It has two asynchronous read ports, `ABUS = R[Ra]` and
  `BBUS = R[Rb]`, and one synchronous write port, `R[Rd] <= RES`.
- **Combinational logic** (`comb_logic`). It contains the control unit, which decodes the
  instruction and drives the control signals. The ALU, the shifter and the lookup unit compute in
  parallel, and the result multiplexer selects one of them as `RES`.

## Instruction format

An instruction is 16 bits, in four 4-bit fields, most significant first:

| bits  | 15..12 | 11..8 | 7..4 | 3..0 |
|-------|--------|-------|------|------|
| field | opcode | Rd    | Ra   | Rb   |

Read as hex digits, `0f12` therefore means "ADD, R15 <- R1 + R2".

| opcode | mnemonic | effect | unit |
|--------|----------|--------|------|
| 0000 | ADD  | Rd <- Ra + Rb (mod 2^16) | ALU |
| 0001 | SUB  | Rd <- Ra - Rb (mod 2^16) | ALU |
| 0010 | AND  | Rd <- Ra & Rb | ALU |
| 0011 | OR   | Rd <- Ra \| Rb | ALU |
| 0100 | XOR  | Rd <- Ra ^ Rb | ALU |
| 0101 | NOT  | Rd <- ~Ra | ALU |
| 0110 | MOV  | Rd <- Ra | ALU |
| 0111 | NOP  | nothing written | - |
| 1000 | ROR8 | Rd <- Rb rotated right by 8 | shifter |
| 1001 | ROR4 | Rd <- Rb rotated right by 4 | shifter |
| 1010 | SLL8 | Rd <- Rb << 8, zero fill | shifter |
| 1011 | LUT  | Rd <- lookup(Ra) | lookup unit |
| 11xx | -    | unused, behaves as NOP | - |

The shift and rotate instructions read **Rb**. NOT, MOV and LUT read **Ra**. ADD and SUB produce
no carry, borrow or status flags.

## Control word

The control unit (`control_unit`) turns the opcode into four control fields, defined in
`cop_pkg`:

| field | width | codes |
|-------|-------|-------|
| WEN | 1 | 1 for every instruction that writes Rd |
| ALUctrl | 3 | 001 ADD, 010 SUB, 011 AND, 100 OR, 101 XOR, 110 NOT, 111 MOV, 000 none |
| ShifterCtrl | 2 | 01 ROR8, 10 ROR4, 11 SLL8, 00 none (pass-through) |
| MuxCtrl | 2 | 01 ALU, 10 shifter, 11 lookup unit, 00 zero |

Note that the ALU's 3-bit code is not the opcode: ADD is opcode 0000 but ALUctrl 001. The value
000 is kept free to mean "no ALU operation".

## The lookup unit (hash step)

`lut_unit` is the part of the design that is most specific to cryptography, and also the least
specified. It splits the 16-bit operand into three parts:

```
LUTIN[15:10] ───────────────────────────────┐
LUTIN[9:5]   ──► S-Box 2 (5 -> 5 bits) ──┐  ├─► nibble operation ──► LUTOUT[15:0]
LUTIN[4:0]   ──► S-Box 1 (5 -> 5 bits) ──┘  │
```

The overall shape is fixed: a 10-bit path through two 5-bit S-boxes, a 6-bit path around them,
and a merge stage called the nibble operation. The following parts are this implementation's own
choices:

- **The S-box contents.** The S-boxes are meant to hold arbitrary ("random") nonlinear tables.
  `sbox1` and `sbox2` each hold a fixed permutation of 0..31.
  - S-Box 1 is pinned by seven known operand/result pairs: 5->3, 6->6, 7->e, a->c, b->d, c->8
    and f->4. Inputs below 16 map to outputs below 16.
  - S-Box 2 maps 0 to 0.

  As a result, LUT on any operand below 16 gives a result below 16.
- **The bit split.** S-Box 1 takes the low five bits and S-Box 2 the next five.
- **The nibble operation.** It is the plain reassembly
  `LUTOUT = {LUTIN[15:10], SBox2(LUTIN[9:5]), SBox1(LUTIN[4:0])}`. No further mixing is done.

To use other S-boxes, edit the `case` tables in `rtl/sbox1.sv` and `rtl/sbox2.sv`. Then update
the copies of the tables in `tb/cop_ref_pkg.sv`, which the testbenches use as the reference, and
the seven pinned pairs checked by `tb_sbox1`, `tb_lut_unit` and `tb_crypto_coprocessor`. A
bijective S-box keeps the LUT instruction invertible. Nothing in the RTL relies on that, but
`tb_sbox1` and `tb_sbox2` check for it.

## Timing

The clock is a single rising-edge clock. Reset is synchronous and active high.

| cycle | what happens |
|-------|--------------|
| n     | `instr` is offered with `instr_valid = 1` |
| edge ending n | the input register captures it |
| n+1   | decode, register read, execute; `res` and `res_wen` show the result |
| edge ending n+1 | `R[Rd] <- res`; the next instruction is captured at the same edge |

An instruction can be issued every cycle. The result is written at the same edge that captures
the next instruction, so an instruction that reads the previous instruction's Rd sees the new
value. No forwarding or stall logic is needed. The latency from issue to a readable result is two
edges.

When `instr_valid` is low, the input register loads the NOP word `0x7000`, so idle cycles change
nothing. Reset clears all sixteen registers and loads the same NOP.

## Host port

The coprocessor needs a way to receive operands and return results. The top level has a simple
host port for this:

- `load_en`, `load_addr`, `load_data`: write one register at the clock edge.
- `rd_addr`, `rd_data`: combinational read of one register.

A host write and an instruction's write-back can happen in the same cycle. If both target the
same register, the instruction's result wins. Host writes land at the same edge as the
write-back, so operands loaded in cycle n are seen by an instruction issued in cycle n.

This port is an addition of this implementation. No protocol for moving data in or out was
specified. A real system would put a bus interface in front of it.

## How far to trust it, and where it departs from its specification

Every instruction's 16-bit behaviour is checked against an independent reference model. The
known operand/result sequences for ADD, SUB and LUT are replayed. The points below were choices
where the source specification was unclear or self-contradictory:

- **NOP writes nothing.** One control table listed write-enable = 1 for NOP. With that encoding,
  NOP would overwrite Rd, so the instruction-level definition "no operation" was followed.
- **SLL shifts by 8.** The left shift was described as a shift by 8 bits, named SLL4 in one
  table and SLL8 in another, and written as `Rb << 2` in the instruction list. This
  implementation uses 8, half the word. ROR8 and ROR4 likewise rotate by half and a quarter of
  the word.
- **Reference waveforms are 4 bits wide.** The published simulation results wrap at 4 bits.
  For example, `0c8b` with Ra = a and Rb = d gives 3, NOT of 6 gives 9, and ROR8 of 2 gives 8.
  The registers and buses, however, are specified as 16 bits, and this RTL is 16 bits. The
  waveform operands are replayed with 16-bit expected results: a+d = 0x0017, NOT 6 = 0xfff9, and
  so on.
- **Unused opcodes and the zero/pass-through codes are this implementation's choices.** This
  covers opcodes 1100-1111, ALU code 000, shifter code 00 and mux code 00.
- **The lookup tables and the nibble operation are placeholders.** See the lookup-unit section.
  The structure is right, but the hash a given deployment wants is not known.

## Files

| file | contents |
|------|----------|
| `rtl/cop_pkg.sv` | widths, opcode and control-code enums, `instr_t`, `ctrl_t` |
| `rtl/crypto_coprocessor.sv` | top level |
| `rtl/input_register.sv` | instruction register |
| `rtl/register_file.sv` | 16 x 16 registers, 2 read + 1 write port + host port |
| `rtl/comb_logic.sv` | execute stage: control unit, ALU, shifter, lookup unit, mux |
| `rtl/control_unit.sv` | field split and opcode to control word |
| `rtl/alu.sv`, `rtl/shifter.sv` | arithmetic/logic and rotate/shift units |
| `rtl/lut_unit.sv`, `rtl/sbox1.sv`, `rtl/sbox2.sv` | nonlinear lookup unit and its S-boxes |
| `rtl/result_mux.sv` | RES selection |
| `tb/cop_ref_pkg.sv` | reference model used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_isa_program.sv` | demonstration program run back to back on the top level |

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog stops it with a failure if it hangs. From the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  --top-module tb_crypto_coprocessor rtl/cop_pkg.sv tb/cop_ref_pkg.sv \
  tb/tb_crypto_coprocessor.sv -o sim
./obj_dir/sim
```

For another unit, replace the testbench name, for example `tb_alu` or `tb_lut_unit`.

`tb_crypto_coprocessor` runs the whole design at its default size. It has two parts:

1. It replays the known ADD, SUB and LUT waveform sequences, plus one hand-worked case for each
   other instruction, and checks the two-edge latency.
2. It runs 20,000 cycles of random instructions with random host loads, idle cycles,
   back-to-back dependent instructions, write collisions and mid-run resets. `res`, `res_wen`
   and a random register are compared with a cycle model every cycle.

`tb_isa_program` issues a twelve-instruction demonstration program, one of each instruction, back
to back at one instruction per clock. It checks the final register contents against an
instruction-level model and checks that the program takes 13 clock edges.

At the end it prints how often each opcode and each of those events occurred. An event that never
occurred counts as a failure. The run takes well under a second.

The lint and synthesis flows used were `verilator --lint-only -Wall` and yosys with the slang
front end. All RTL is synthesizable. The register file is an array that synthesizes to flip-flops
or distributed RAM with two asynchronous read ports and a third for the host.
