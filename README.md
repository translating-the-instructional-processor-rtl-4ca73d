# Instructional Processor microcontroller

A small 16-bit processor built to teach how a computer is put together from
the parts every digital-design course covers: registers, a register file, an
ALU, a counter, decoders and a memory. It has a **three-bus data path** (two
operand buses into the ALU, one result bus out of it) and a **step-counter
control unit**: every instruction is a sequence of at most eight clock steps,
T0 to T7, and in each step a combinational encoder turns the step number, the
instruction register and the status flags into the control signals of the data
path. With a 4K x 16 memory and memory-mapped I/O ports on the same chip it
becomes a microcontroller that can run small applications such as software
PWM, keypad scanning or bit-banged serial output.

The processor structure (register file, key registers, buses, eight time steps,
instruction decoders, subroutine stack, 4K x 16 memory, memory-mapped I/O)
and the register-to-register instruction timing follow a published
teaching design. Its instruction encoding, memory map and most of its
sequences are not reproduced here but defined anew, and the section
"What is original and what is chosen here" lists where.

## Block structure

```
ip_mcu ─┬─ step_counter      T0..T7, cleared at the end of each instruction
        ├─ control_unit      four decoders + control signal encoder (combinational)
        ├─ datapath ─┬─ reg4    4 x 16 register file (REGS), two read ports, one write port
        │            ├─ alu     combinational, ALU_OP = opcode
        │            └─ stack   16-entry return-address stack
        ├─ mem4k             4096 x 16 main memory (+ program-load port)
        └─ io_ports          memory-mapped input/output ports
```

`ip_pkg` holds the shared types: the opcode, addressing-mode, condition and
step enums, the `status_t` flags and the `ctrl_t` control word.

## The three buses

| bus   | driven by                                          | read by |
|-------|----------------------------------------------------|---------|
| BUS_A | REGS port 1 (SRC_REG), PC, MDR, stack top          | ALU input a (source operand) |
| BUS_B | REGS port 2 (DST_REG), MDR                         | ALU input b (destination operand) |
| BUS_C | ALU result                                         | REGS (at DST_REG), PC, IR, MAR, MDR |

Everything that moves between registers goes through the ALU: a plain transfer
uses the ALU's MOVE (y = a) or PASSB (y = b) operation. The register file reads
Rs on port 1 and Rd on port 2, and writes at the port-2 address. So
`ADD Rs,Rd` is a single step: Rd and Rs go onto the buses, and Rd + Rs is
written back to Rd on the next edge.

The original design uses tri-state buffers for BUS_A and BUS_B. This RTL is
two-state, so every source is forced to zero unless enabled and the bus is the
OR of its sources. With at most one source enabled this gives the same value
as the tri-state bus. Assertions in `datapath` check that at most one source
drives each bus. A synthesis flow that wants real tri-state buses has to
rebuild them from the enables.

Registers: PC (16 bit, with its own incrementer), IR, MAR (16 bit, addresses
memory and I/O), MDR (loads memory read data or BUS_C; it is the memory write
data), STATUS = {C, V, N, Z}.

## Instruction format

```
 15   12  11  10  9  8   7  6   5  4   3  2    0
+-------+---+------+------+------+------+-------+
|  OP   | 0 | SRC  | SRC  | DST  | DST  | COND  |
|       |   | REG  | MODE | REG  | MODE |       |
+-------+---+------+------+------+------+-------+
```

Immediate values, absolute addresses and branch targets follow in the next
word.

| OP | mnemonic | operation |
|----|----------|-----------|
| 0  | MOVE src,dst | dst = src |
| 1  | INV  src,dst | dst = ~src |
| 2  | SHL  src,dst | dst = src << 1, C = bit shifted out |
| 3  | ASHR src,dst | dst = src >>> 1, C = bit shifted out |
| 4  | ADD  src,dst | dst = dst + src |
| 5  | SUB  src,dst | dst = dst - src (C = borrow) |
| 6  | AND  src,dst | dst = dst & src |
| 7  | OR   src,dst | dst = dst \| src |
| 8  | Bcc target   | if cond: PC = target (BRA = always, BNZ = not zero, ...) |
| 9  | JSR target   | push return address, PC = target |
| 10 | RTS          | PC = popped return address |
| 11-15 | -         | no operation |

Every data operation loads Z, N, C and V, MOVE included. C and V are zero
where the table gives no rule for them.

Addressing modes: `M0` register `Rn`; `M1` register indirect `[Rn]`; `M2`
immediate `#value` (source only); `M3` absolute `[address]`. Conditions
(COND): 0 always, 1 Z, 2 NZ, 3 N, 4 not N, 5 C, 6 not C, 7 V.

## Time steps

This is the heart of the design. The step counter advances every clock. The
encoder's `Clear` signal, asserted in an instruction's last step, sends it
back to T0. Fetch takes three steps for every instruction:

```
T0  MAR <- PC, PC <- PC + 1
T1  MDR <- MEM[MAR]
T2  IR  <- MDR
```

Execution starts at T3:

| instruction | steps from T3 | cycles |
|-------------|---------------|--------|
| OP Rs,Rd | T3 Rd <- Rd op Rs, STATUS, Clear | 4 |
| OP #imm,Rd | T3 MAR <- PC, PC+1; T4 MDR <- MEM; T5 Rd <- Rd op MDR | 6 |
| OP [Rs],Rd | T3 MAR <- Rs; T4 MDR <- MEM; T5 Rd <- Rd op MDR | 6 |
| OP [abs],Rd | T3 MAR <- PC, PC+1; T4 MDR <- MEM; T5 MAR <- MDR; T6 MDR <- MEM; T7 Rd <- Rd op MDR | 8 |
| OP1 Rs,[Rd] | T3 MAR <- Rd; T4 MDR <- op Rs; T5 MEM <- MDR | 6 |
| OP2 Rs,[Rd] | T3 MAR <- Rd; T4 MDR <- MEM; T5 MDR <- MDR op Rs; T6 MEM <- MDR | 7 |
| OP1 Rs,[abs] | T3 MAR <- PC, PC+1; T4 MDR <- MEM; T5 MAR <- MDR; T6 MDR <- op Rs; T7 MEM <- MDR | 8 |
| Bcc taken | T3 MAR <- PC, PC+1; T4 MDR <- MEM; T5 PC <- MDR | 6 |
| Bcc not taken | T3 PC <- PC+1 (skip the target word) | 4 |
| JSR | as a taken branch, pushing PC at T5 | 6 |
| RTS | T3 PC <- stack top, pop | 4 |

OP1 is MOVE/INV/SHL/ASHR and OP2 is ADD/SUB/AND/OR. The MDR is the only
memory buffer, and an instruction may not take more than eight steps. So a
memory destination is allowed only with a register source, and OP2 may not
use an absolute destination. These combinations, destination mode M2 and
opcodes 11-15 end at T3 and do nothing. They take no extension word, so an
assembler must not emit them.

The memory read is combinational at MAR and is captured in MDR at the end of
the read step. Together they behave like a block RAM with a registered output.

## Subroutine stack

JSR pushes the PC in the same edge that loads the target. At that point the
PC already points past the target word, so the stack holds the return
address. RTS pops it onto BUS_A and into PC. The stack holds 16 entries. A
push to a full stack is dropped and sets the sticky `stack_overflow` output.
A pop from an empty stack loads PC with 0 and sets `stack_underflow`. Reset
clears both.

## Memory map and I/O

| address | meaning |
|---------|---------|
| 0x0000-0x0FFF | main memory, 4096 words |
| 0xFFF0 | input port 0 (`in_port0`) |
| 0xFFF1 | input port 1 (`in_port1`) |
| 0xFFF8 | output port 0 (`out_port0`), readable |
| 0xFFF9 | output port 1 (`out_port1`), readable |
| other | read 0, writes ignored |

## Loading and running a program

Hold `rst` high. Write the program word by word with `ld_we`, `ld_addr` and
`ld_data`, one word per clock. Then release `rst`: the processor fetches from
address 0. The load port is ignored while the processor runs. `mem4k` also has
an `INIT_FILE` parameter (binary words, one per line, read by `$readmemb`; it
may be shorter than the memory) for designs that prefer an
initialised memory. Memory starts all-zero, so it is always fully initialised.
The general registers have no reset.

Example, the array sum used by the end-to-end test (data at 0x100: SUM, N = 3,
X = 7, -8, 10):

```
START: MOVE [N],R1      ; 8 cycles
       MOVE #X,R2       ; 6
       MOVE #0,R0       ; 6
LOOP:  ADD [R2],R0      ; 6
       ADD #1,R2        ; 6
       ADD #-1,R1       ; 6
       BNZ LOOP         ; 6 taken / 4 not
       MOVE R0,[SUM]    ; 8
STOP:  BRA STOP
```

The result 9 is written to SUM 98 clock cycles after reset.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops at a watchdog limit.

- `tb_reg4`, `tb_alu`, `tb_stack`, `tb_step_counter`, `tb_mem4k`,
  `tb_io_ports`: each checks its unit against a reference model, with directed
  corner cases and random traffic.
- `tb_control_unit` checks exact control words for representative
  instructions. It also walks all 65536 instruction words and checks each
  one's length in steps, that each bus has at most one driver, and that
  results load STATUS.
- `tb_datapath` drives random legal control words against a register-level
  model.
- `tb_ip_mcu` is the end-to-end test at the default sizes. It runs the array
  sum (result and cycle count), then a directed program, then three random
  4K-word programs. The directed and random programs run in lockstep with an instruction-level
  model: PC, registers, STATUS, ports and the cycle count of every instruction
  are compared, and the whole memory at the end. It counts each mechanism:
  every addressing mode, branch taken and not taken, JSR, RTS, stack overflow
  and underflow, I/O reads and writes, no-operation. Any mechanism that never
  happened counts as a failure.
- Application programs at the default sizes: `tb_pwm` (software PWM; checks
  the high time duty x 44 cycles and the period of 722 cycles), `tb_keypad`
  (4 x 4 keypad scanning; all 16 keys are reported) and `tb_uart_tx` (8N1
  serial output at 9600 baud from a 50 MHz clock using delay loops; a UART
  model receives the frames).

All of these pass. Hardware timing (the target FPGA at 50 MHz) is not checked
here.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert rtl/ip_pkg.sv rtl/*.sv tb/ip_asm_pkg.sv \
          tb/tb_ip_mcu.sv --top-module tb_ip_mcu
./obj_dir/Vtb_ip_mcu
```

Change the testbench name to run another one. Run from the folder that holds
`rtl/` and `tb/`: `tb_mem4k` reads `tb/mem4k_init.mem` by that relative path.
`tb/ip_asm_pkg.sv` holds `enc()`, which builds instruction words, and the I/O addresses. Use it to
write new programs.

## What is original and what is chosen here

Taken from the original design:

- 16-bit data path with three buses.
- 4 x 16 register file with enabled asynchronous reads and a synchronous write
  at the port-2 address, wired to SRC_REG = IR[10:9] and DST_REG = IR[6:5].
- The key registers PC, IR, MAR and MDR, plus STATUS.
- A step counter with eight steps.
- A control unit with four decoders on IR fields.
- `OP Rs,Rd` executing at T3 with Read1, ALU_OP = OP, Load_STATUS,
  REGS_Write and Clear.
- The operation names MOVE, INV, SHL, ASHR, ADD, BRA and BNZ.
- A subroutine stack, a 4K x 16 memory and memory-mapped I/O.

Chosen in this implementation:

- The rest of the instruction format, the opcode values, and the SUB, AND and
  OR operations.
- The condition set and the flag definitions.
- All execute sequences other than `OP Rs,Rd`.
- The restriction on memory destinations.
- The stack depth and its overflow and underflow behaviour.
- The memory map and the number of I/O ports.
- The program-load port.
- Synchronous active-high reset.
- OR-combined buses in place of tri-state buffers.
