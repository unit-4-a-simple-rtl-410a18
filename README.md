# Simple-12: a microprogrammed 12-bit accumulator machine

Simple-12 is a small computer that can be understood in full. It has
a 12-bit accumulator, an 8-bit program counter, a 256-word memory and nine
instructions. The control unit is **microprogrammed**. Each machine
instruction is carried out by a short routine of microinstructions, and these
routines are held in a 64-word control store. A 6-bit microaddress register
steps through them. The opcode of the instruction being fetched is loaded
straight into the middle bits of that register. This makes a 16-way branch
to the opcode's routine in the same cycle as the fetch, so no separate decode
step is needed.

This RTL implements the whole machine (processor and memory) in
synthesizable SystemVerilog. Each part has a self-checking testbench, and an
end-to-end test runs programs in lockstep with an instruction-level model.

## Programmer's view

| Opcode | Mnemonic | Effect |
|--------|----------|--------|
| 0000 | `JMP X`   | PC ← X |
| 0001 | `JN X`    | if A < 0 (A[11] = 1) then PC ← X else PC ← PC+1 |
| 0010 | `JZ X`    | if A = 0 then PC ← X else PC ← PC+1 |
| 0100 | `LOAD X`  | A ← M[X], PC ← PC+1 |
| 0101 | `STORE X` | M[X] ← A, PC ← PC+1 |
| 1000 | `AND X`   | A ← A and M[X], PC ← PC+1 |
| 1001 | `OR X`    | A ← A or M[X], PC ← PC+1 |
| 1010 | `ADD X`   | A ← A + M[X], PC ← PC+1 (mod 2^12) |
| 1011 | `SUB X`   | A ← A − M[X], PC ← PC+1 (mod 2^12) |
| others | reserved | stop: the machine returns to the Stopped state |

An instruction word is `{opcode[11:8], X[7:0]}`. Code and data share one
memory of 256 × 12 bits. The machine has no flags: JN looks at the sign bit
of A and JZ tests A for zero.

`start` is a level input. While it is 0 the machine stays in Stopped and
holds PC = 0. On the first cycle it sees `start` = 1 it begins fetching at
address 0. It runs until it meets a reserved opcode, and then goes back to
Stopped. If `start` is still 1 at that point, the program runs again from
address 0.

## Dataflow (`datapath`, `alu`)

There are four registers:

- A (12 bits), the accumulator.
- PC (8 bits), the program counter.
- MAR (8 bits), the memory address register. It drives the memory address.
- MDR (12 bits), the memory data register. It is loaded from the memory's
  read data.

There is one ALU, and every new register value passes through it:

```
            +---------+   b   +-----+
  0   --00->|         |------>|     |
  MDR --10->|  b MUX  |       | ALU |---+--> A      (LoadA)
  PC  --11->|         |   a   |     |   +--> PC     (LoadPC,  bits 7:0)
            +---------+  +--->|     |   +--> MAR    (LoadMAR, bits 7:0) --> Address
  A --[AND: a Gate]------+    +-----+
  A ----------------------------------------------> DataOut
  DataIn ---------------------------------------------> MDR (LoadMDR), and opcode bits to the sequencer
```

The ALU is controlled by four bits, `{b-invert, carry-in, op1, op0}`. The op
codes are 00 = AND, 01 = OR and 10 = ADD. These settings cover every transfer
the machine needs:

| ALU | b | a | result | used for |
|-----|---|---|--------|----------|
| 0010 | 0   | 0 | 0         | PC ← MAR ← 0 in Stopped |
| 0110 | PC  | 0 | PC + 1    | IFetch |
| 0010 | MDR | 0 | MDR       | MAR ← MDR, PC ← MDR, A ← MDR |
| 0010 | PC  | 0 | PC        | MAR ← PC |
| 0010 | 0   | A | A         | zero test for JZ |
| 0000 / 0001 / 0010 | MDR | A | A and / or / + MDR | operate instructions |
| 1110 | MDR | A | A + ~MDR + 1 = A − MDR | SUB |

A drives DataOut directly. A STORE therefore writes A to memory without first
copying it to MDR.

## Control: sequencer and microinstruction (`microsequencer`, `control_store`)

### The microinstruction

Each microinstruction is 23 bits. The fields, from MSB to LSB, are
(`uinstr_t` in `simple12_pkg`):

| Cond Sel | Addr Sel | Next Adr | Load A | Load PC | Load MAR | Load MDR | ALU | b MUX | a Gate | Read | Write |
|---|---|---|---|---|---|---|---|---|---|---|---|
| 3 | 1 | 6 | 1 | 1 | 1 | 1 | 4 | 2 | 1 | 1 | 1 |

The last 13 bits (`ctrl_t`) go to the dataflow and to the memory. The first
10 bits steer the sequencer.

### Sequencing

In each cycle, Cond Sel picks one condition:

| Code | Condition |
|------|-----------|
| 000 | false |
| 001 | true |
| 010 | ~A(11) |
| 011 | ~(ALU = 0) |
| 100 | ~start |

If the condition is 1, the microaddress Q is loaded. If it is 0, Q is
incremented.

When Q is loaded, Addr Sel chooses what goes into it:

- Addr Sel = 0 loads the Next Adr field.
- Addr Sel = 1 loads `{1, DataIn[11:8], 0}`. This is the multiway branch.
  IFetch uses it while it reads the instruction, so the opcode goes straight
  into Q[4:1]. Those four bits then act as the instruction register (`ir`
  output). The machine has no separate IR register.

Each condition is an *inverted* status bit. This matters when a routine has
to choose between two paths. The routine is laid out so that the default path
is to fall through to the next word (Q + 1). The exit "back to IFetch" is
taken when the inverted condition is 1. For example, the JN word branches to
IFetch when A(11) = 0, which is the not-taken case. When A(11) = 1 it falls
through into the word that loads PC.

### Control store map

```
000000         Stopped          common words
000001         IFetch
01wxyz         spare word for the routine of opcode 1wxyz (third step)
1wxyz0,1wxyz1  first two words of the routine of opcode wxyz
```

| Routine | Words | Cycles (with IFetch) |
|---|---|---|
| Stopped | `000000` PC ← MAR ← 0; stay while start = 0 | – |
| IFetch | `000001` Read, MDR ← DataIn, PC ← MAR ← PC+1, branch to 1·opcode·0 | 1 |
| JMP | `100000` PC ← MAR ← MDR[7:0] | 2 |
| JN | `100010` to IFetch if A(11) = 0; `100011` PC ← MAR ← MDR[7:0] | 2 / 3 taken |
| JZ | `100100` ALU = A, to IFetch if ALU ≠ 0; `100101` PC ← MAR ← MDR[7:0] | 2 / 3 taken |
| LOAD | `101000` MAR ← MDR; `101001` Read, MDR ← DataIn, MAR ← PC, go to `010100`; `010100` A ← MDR | 4 |
| STORE | `101010` MAR ← MDR; `101011` Write (A), MAR ← PC | 3 |
| AND, OR, ADD, SUB | `11xy00` MAR ← MDR; `11xy01` Read, MDR ← DataIn, MAR ← PC, go to `0110xy`; `0110xy` A ← A op MDR | 4 |
| reserved | any unused word: go to Stopped | 2 |

Because IFetch already sets MAR to PC+1, a jump that is not taken has nothing
left to do. It returns to IFetch at once. A taken jump uses a second word to
load PC and MAR from MDR.

A JZ has to test A with the ALU, and it cannot also use the ALU to move MDR
into PC in the same cycle. This is why the taken case of JZ costs a third
cycle. JN uses the same layout, so it costs the same.

Every register loads only at the clock edge, and the control outputs depend
on Q alone, so the control unit is a Moore machine. Status bits affect only
the choice of the next microaddress, never the current dataflow.

## Timing and interfaces

All state changes on the rising edge of `clk`. `rst_n` is an asynchronous
active-low reset. It clears A, PC, MAR and MDR and puts Q at Stopped. The
memory contents are not reset.

The memory (`ram`) has one port:

- Reads are combinational. While `read` = 1, the addressed word appears on
  the read data in the same cycle. This is what lets IFetch load MDR and take
  the opcode branch in a single cycle. While `read` = 0, the read data is 0.
- Writes are synchronous. The word is written at the clock edge of a cycle in
  which `write` = 1.

`simple12_top` brings out observation ports: A, PC, the microaddress, IR, a
`stopped` flag and the memory bus.

## Decisions beyond the machine's definition

The instruction set, register widths, dataflow, field encodings, address map
and most of the microprogram are fixed by the Simple-12 definition. The
following points are choices made in this implementation:

- **MAR ← PC in operand access.** The memory-access words (`101001`,
  `101011`, `11xy01`) also load MAR with PC. Without this, the next IFetch
  would read from the operand address instead of the next instruction. The
  register-transfer form of the routine (`OperandAccess: MAR ← PC || …`)
  does this. The tabulated microwords leave Load MAR at 0 and are corrected
  here.
- **JZ's test word** sets a Gate = 1, b MUX = 0 and ALU = ADD, so that
  "ALU = 0" means A = 0.
- **Taken JN/JZ take 3 cycles**, not 2, as explained above.
- **Reserved opcodes and unused microwords** go to Stopped.
- **Unassigned encodings** also have fixed behaviour:
  - ALU op 11 gives 0.
  - b MUX 01 selects 0.
  - Cond Sel 101–111 read as false.
- **Reset behaviour** and the **observation ports** are additions.
- **Memory behaviour:** combinational read, zero read data while not reading,
  and no reset of the array.
- **Microprogrammed control only.** The control unit is the sequencer and
  control store described above. No hardwired state-machine version of the
  controller is included.

## Files

| File | Contents |
|---|---|
| `rtl/simple12_pkg.sv` | widths, opcode, field encodings, `uinstr_t`, `ctrl_t` |
| `rtl/alu.sv` | ALU with zero test |
| `rtl/datapath.sv` | A, PC, MAR, MDR, b MUX, a gate, ALU |
| `rtl/microsequencer.sv` | Q/IR register, condition and address select |
| `rtl/control_store.sv` | the 64-word microprogram, as a case table |
| `rtl/simple12_cpu.sv` | processor: sequencer + control store + datapath |
| `rtl/ram.sv` | 256 × 12 memory |
| `rtl/simple12_top.sv` | processor + memory |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and calls `$finish`.
To build and run one of them with Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/simple12_pkg.sv \
    tb/simple12_top_tb.sv --top-module simple12_top_tb
./obj_dir/Vsimple12_top_tb
```

Substitute the name of another testbench to run it instead.

To run your own program, write the instruction words into
`dut.u_ram.mem[]` from the testbench while reset is low, then pulse
`start`. `simple12_top_tb` shows how to do this.

## Verification

- **`alu_tb`** runs random operands under all 16 control codes against a
  reference function.
- **`datapath_tb`** applies random control words for 4000 cycles against a
  register-level model.
- **`microsequencer_tb`** drives random conditions and addresses against a
  next-address model.
- **`control_store_tb`** compares all 64 words with the expected microprogram.
  The expected words are written as bit strings in field order.
- **`ram_tb`** runs random reads and writes against a model array.
- **`simple12_cpu_tb`** runs a directed program against a testbench memory.
  For each instruction it checks:
  - cycles, reads and writes (jumps: 1 read; LOAD and operate instructions:
    2 reads; STORE: 1 read and 1 write);
  - the fetch address;
  - the write address and write data.
- **`simple12_top_tb`** runs the full machine at its default size, in lockstep
  with an instruction-level model. At every IFetch it compares A and PC and
  the previous instruction's cycle count, and at the end of each program it
  compares the whole memory. The programs are:
  - 7 × 5 by repeated addition;
  - the maximum of six signed values;
  - 40 random 64-word programs.

  It counts each mechanism and fails if one never occurs: every opcode, both
  outcomes of JN and JZ, use of the spare words, waiting in Stopped, and the
  stop on a reserved opcode.

## Extending

To add an instruction, choose a reserved opcode `wxyz` and fill the words
`1wxyz0` and `1wxyz1` in `control_store.sv`. If the routine needs a third
word and `w` = 1, it can also use `01wxyz`. The opcode enum in
`simple12_pkg.sv` is only a set of names, so it does not have to change.
Cond Sel has three free codes (101–111) for new branch conditions, and they
would be wired in `microsequencer.sv`. The ALU's free op code 11 can hold a
fourth function.
