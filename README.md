# Neptun: a 16-bit processor for elliptic-curve signatures

Neptun is a small, non-pipelined Harvard processor for ECDSA over the NIST
P-192 curve on RFID tags and smart cards. Big-number arithmetic on a narrow
datapath costs most of its time in the inner loop of a multi-word
multiplication. Neptun makes that loop cheap in three ways:

- a 16 x 16 multiplier feeds a 48-bit accumulator;
- every instruction can use the result of the previous memory access
  directly as an operand;
- "parallel" instructions do an arithmetic operation and a load or store
  in the same cycle.

A column of a product-scanning multiplication therefore costs two
instructions per partial product: one loads the next word of B, the other
multiplies, accumulates and loads the next word of A at the same time. A
4 x 4-word product is about 40 instructions.

The processor is meant as a reusable platform. Program and constants live
in RAM, not ROM, and a boot program in a small look-up table loads them.
The chip also has:

- an EIA-232 serial interface;
- a 16-bit parallel port;
- three timers;
- block isolation of the RAMs for scan test.

All of the chip's logic is given here as synthesizable SystemVerilog,
with self-checking Verilator testbenches. The one exception is the
contents of the boot table, which are firmware and are not included (see
*Program memory and loading*).

## Block structure

```
            BootAddrxDO/BootPWxDI (boot table, outside)
                    |
  +-----------------v-----+  PW   +-----------+ ctrl_t +---------------------------+
  | neptun_progmem        |------>| neptun_   |------->| neptun_cpu                |
  |  program RAM 5120x16  |       | decoder   |        |  registers, operand muxes |
  |  (fetch at PC next)   |<--PCxDN-----------------------  neptun_alu:             |
  +-----------^-----------+                            |   adder, shifter, logic,  |
              | bus to 8000h-93FFh                     |   mac (16x16 + 48-bit acc)|
  +-----------+------------------------------------+   |   branch, flags           |
  | neptun_memory                                  |<--+ address = base + offset   |
  |  CS decode, data RAM 512x16, const RAM 512x16, |   +---------------------------+
  |  uart, pio, 3 x timer, read mux (MemOut)       |
  +------------------------------------------------+
```

| Module | Role |
|---|---|
| `neptun_pkg` | Types: register codes, operand codes, the control vector `ctrl_t`, opcodes, memory regions |
| `neptun_top` | The chip |
| `neptun_progmem` | Boot-table port, program RAM, fetch/bus address multiplexer |
| `neptun_decoder` | 16-bit program word to `ctrl_t`; the two-word LDI |
| `neptun_cpu` | Register set, operand selection, address generation, write-back |
| `neptun_alu` | Result multiplexer (AND/OR/XOR/shift/add) and status flags |
| `neptun_adder` | 16-bit adder with the carry-in select of ADD/ADDC/SUB/SUBC |
| `neptun_shifter` | Logarithmic barrel shifter (left, logical right, arithmetic right) |
| `neptun_mac` | Multiplier with operand isolation, 48-bit accumulate/add/subtract |
| `neptun_branch` | Branch condition and gating of the branch offset |
| `neptun_memory` | Address decode, data and constant RAM, peripherals, read-data register |
| `neptun_sram` | Single-port synchronous RAM (stands in for a RAM macro) |
| `neptun_ram_iso` | RAM with block-isolation scan registers |
| `neptun_uart`, `neptun_pio`, `neptun_timer` | Memory-mapped peripherals |

## The cycle: one instruction, one clock

There is no pipeline. In each clock cycle:

1. The program word at PC arrives.
2. The decoder turns it into `ctrl_t`.
3. The CPU picks operand A, operand B, or an immediate.
4. The ALU computes all its results at once and selects one.
5. On the rising edge, the result, the flags, the accumulator and the next
   PC are written.

Rules that follow from this:

- **Next PC.** The next PC is PC+1, or the ALU result when the destination
  is PC.
- **Branches.** A branch adds the offset to PC in the ALU adder. When the
  condition is false, the offset is forced to zero and the adder's
  increment still adds 1. A branch is one cycle, taken or not.
- **Program RAM.** The program RAM is synchronous, so it is addressed with
  the next PC (`PCxDN`). Its output in a cycle is the word of the current
  PC.
- **MemOut.** The data memory keeps the result of the last access in a
  register called `MemOut` (`MemDataOutxD`). It stays valid until the next
  access, and after a write it shows the written word. Any later
  instruction may use it as operand A or B. A load and the use of its data
  therefore cost one cycle each, and a "move from memory" (LDR) is simply
  `LD` followed by `MOVNF reg, MemOut`.
- **Multi-word instructions.** LDI takes two words. The second program word
  is the 16-bit constant, so `LDI PC, addr` is an absolute jump. CALL,
  RET, PUSH, POP and LDR are short sequences:

| Sequence | Words / cycles | Expansion |
|---|---|---|
| `LDI r, k` | 2 | opcode word, then the constant word |
| `JMP a` | 2 | `LDI PC, a` |
| `CALL a` | 4 | `Custom1` ([SP] = PC+4), `Custom3` (SP = SP-1), `LDI PC, a` |
| `RET` | 2 | `Custom2` (SP = SP+1, load [SP+1]), `MOVNF PC, MemOut` |
| `PUSH r` | 2 | `STR [SP+0], r`, `Custom3` |
| `POP r` | 2 | `Custom2`, `MOVNF r, MemOut` |
| `LDR r, [B+o]` | 2 | `LD [B+o]`, `MOVNF r, MemOut` |

## Registers and operand codes

| Code | Register | Code | Register |
|---|---|---|---|
| 0-3 | Work0-Work3 | 8 | BaseC |
| 4 | BaseA | 9, 10, 11 | Acc0, Acc1, Acc2 |
| 5 | BaseB | 12 | State (status) |
| 6 | SP | 13 | MemOut (operand only) |
| 7 | PC | 14 / 15 | zero / no destination |

Operands come from four fields:

- **Operand A (4 bits):** any register above.
- **Operand B (3 bits):** Work0-3 (0-3), MemOut (4), zero (5-7).
- **Base (2 bits):** BaseA, BaseB, BaseC, SP.
- **2-bit operands of the parallel instructions:** operand A is MemOut,
  Work1, Work2, Work3; operand B is Work0-3.

Memory addresses are `base + offset`, where the offset is an unsigned
4-bit number.

## Instruction encoding

Bits [15:12] are the major opcode. The common fields are:

- Result: [11:8]
- SelOpA: [7:4]
- variant bit: [3]
- SelOpB: [2:0]

| [15:12] | Instructions | Layout |
|---|---|---|
| 0 | ADD, ADDC | Res, OpA, C=[3], OpB |
| 1 | SUB, SUBC (CMP, CMPC with Res = none) | Res, OpA, C=[3], OpB |
| 2, 3 | ADDI, SUBI | OpA/Res [11:8], unsigned imm8 |
| 4 | AND ([3]=0), OR ([3]=1); MOV = OR with zero | Res, OpA, OpB |
| 5 | XOR ([3]=0), MOVNF ([3:0]=1000), MVN (1010), LDI (1111) | Res, OpA |
| 6 | RS ([3]=0), LS ([3]=1) | Res, OpA, OpB = amount |
| 7 | CMPI | OpA [11:8], imm8 |
| 8 | RSI / ASRI / LSI ([7:4] = 0000/0001/0010, imm4); LDSI ([7]=1, unsigned imm7) | Res/OpA [11:8] |
| 9 | BRA | [11] = branch if bit is 1, [10:8] = status bit (6 = never, 7 = always), signed offset8 |
| A | MUL (0000), MULACC (0010), ADDACC (0100), SUBACC (0101), RSACC (1000), Custom1-3 (A976h, AA60h, AC60h) | sub-op [11:8], OpA, R/[3], OpB |
| B | MOV_LD (00), STR (01), ADDACC_LD (10), SUBACC_LD (11) | sub-op [11:10], Base [9:8], reg [7:4], offset [3:0] |
| C | ADDACC_ST ([11]=0), SUBACC_ST ([11]=1) | R [10], Base, OpA, offset |
| D | MULACC_LD ([11:10]=00), MULACC_ST ([11]=1, R [10]) | Base, OpA2 [7:6], OpB2 [5:4], offset |
| E | ADD_ST, ADDC_ST ([11] = with carry) | R [10], Base, OpA2, OpB2, offset |
| F | SUB_ST, SUBC_ST | R [10], Base, OpA2, OpB2, offset |

More detail on some of these:

- **Branch target.** A taken branch goes to PC + offset + 1.
- **The R bit.** In the *_ST instructions, R shifts the whole accumulator
  right by 16 bits after the operation. This is the step between two
  columns of a product-scanning multiplication.
- **Stores from the accumulator.** The value stored by ADDACC_ST,
  SUBACC_ST and MULACC_ST is the new Acc0, taken before the shift.
- **ADD_ST family.** ADD_ST and its relatives store the ALU result, and
  with R set they also shift the accumulator.
- **MUL.** MUL writes its 32-bit product to Work1:Work0 (R = 0) or
  Work3:Work2 (R = 1).
- **Unused encodings** execute as a no-operation.

`tb/neptun_asm.svh` has one encoder function per instruction. It is the
quickest way to write test programs.

## Multiply-accumulate

`neptun_mac` multiplies operand A by operand B. Its inputs are forced to
zero unless the instruction uses the multiplier (operand isolation), so
the largest block does not toggle for other instructions.

The 48-bit adder behind it adds one of two things to Acc2:Acc1:Acc0:

- the 32-bit product (MULACC*);
- operand A (ADDACC*, SUBACC*).

Subtraction inverts the addend and sets the carry-in. 48 bits are 32 bits
of product plus 16 guard bits, enough to sum 65536 products of a column
without overflow. The shift by one word (RSACC, or R = 1) is a function of
the accumulator register itself, not of the ALU.

## Status flags and conditions

The status register holds these bits:

| Bit | Meaning |
|---|---|
| 0 | C (carry; for subtraction 1 = no borrow) |
| 1 | Z (zero) |
| 2 | V (signed overflow) |
| 3 | N (negative) |
| 4 | N xor V, read-only (signed less-than) |
| 5 | not C, read-only |

Which instructions update which flags:

- ADD, SUB, ADDI, SUBI, CMPI and the arithmetic *_ST instructions update
  all four flags.
- Logic and shift instructions (including MOV and MVN) update Z and N.
- MOVNF, LDI, LDSI and the loads update nothing.

ADDC and SUBC keep Z at 1 only if it was 1 before. A chain of CMP/CMPC
over many words therefore leaves Z = 1 only when all words are equal.

BRA tests any of bits 0-5 for 0 or 1. Selects 6 and 7 give "never" and
"always".

## Memory map

The two top address bits select the region:

| Address | Contents |
|---|---|
| 0000h-01FFh | Data RAM, 512 x 16 |
| 4000h-41FFh | Constant RAM, 512 x 16 |
| 8000h-93FFh | Program RAM, 5120 x 16 (see below) |
| C000h-C008h | EIA-232: 0 control, 1 status, 2 TX buffer, 3 TX bit count, 4 TX clock counter, 5 RX buffer, 6 RX shift register, 7 RX clock counter, 8 clock divider |
| C040h, C041h | Parallel output (reset value 2000h, so the SPI chip select on bit 13 starts high), parallel input |
| C080h, C0C0h, C100h | Timer 0, 1, 2: 0 control, 1 status, 2 counter, 3 compare A, 4 compare B |

Other behaviour of the map:

- Addresses that are not mapped read as 0 and ignore writes.
- All peripherals return their read data one cycle after the access,
  through `MemOut`.

## Program memory and loading

Program addresses below 8000h belong to the boot program. It is a fixed
look-up table addressed by PC bits 9:0. Of the 1024 words, the original
boot program uses 649. The table is outside the top, on the ports
`BootAddrxDO` and `BootPWxDI`, and may be a ROM, a small RAM, or a model in
a testbench.

Program addresses from 8000h hold the program RAM. The program word comes
from one of two places:

- the RAM, when PC[15] = 1;
- the boot table otherwise.

The boot code writes the program RAM through ordinary STR instructions to
8000h-93FFh, and then jumps or calls to 8000h. The RAM has one port, and
while a program runs from it that port is busy fetching. Data-bus accesses
to the program RAM therefore work only while the PC is in the boot region.
At other times they are ignored.

The original boot program offers these functions:

- a RAM self test (AAAAh, 5555h, walking one);
- loading of S-records over EIA-232;
- loading from an SPI flash.

Any boot program built on the instructions above can do the same. The
testbench contains a small one that loads a program word by word with
`LDI`/`STR`.

## Peripherals

**EIA-232 (`neptun_uart`).**

- Full duplex, 8 data bits, no parity, one stop bit, LSB first.
- The bit time is `divider + 1` clock cycles. The clock is not divided;
  down-counters count it.
- The receiver samples each bit `divider/2` cycles after the bit edge.
- Both directions are double buffered.
- Status bits: data ready, frame error (stop bit 0), overrun, receiving,
  transmitting, TX buffer empty.
- Reading the RX buffer clears "data ready". Reading the status register
  clears the two error flags.

**Timers (`neptun_timer`).**

- The counter counts clock cycles while it is enabled and started.
- With TriggerCountWhenHigh set, it counts only while the trigger is high.
  The trigger can be inverted.
- A rising trigger edge can reset the counter.
- When the counter matches compare A or compare B, the output is set,
  cleared or toggled.
- A match with B can also stop the counter, or restart it from zero.
  Restart wins over stop. Restarting gives a PWM with period B+1 and a high
  time of B-A.
- The force bits 12-14 (start, stop, reset) take effect once, in the cycle
  of the write, and win over everything else.
- With OverrideOutput set, timer *i* drives parallel output pin 9+*i*.
- The trigger of timer *i* is parallel input 9+*i*.

**Parallel port (`neptun_pio`).** A 16-bit output register and an input
register sampled every cycle.

## Block isolation for scan test

Each RAM sits in `neptun_ram_iso`. A scan register sits behind every RAM
input: each data-in bit, each address bit, WE and CS. What the registers
do depends on the two test inputs:

- **TestModexTI = 0.** The registers load zero, so they do not toggle in
  normal operation (an AND gate with TestModexTI in front of each).
- **TestModexTI = 1, ScanEnxTI = 0.** They capture the RAM inputs.
- **TestModexTI = 1, ScanEnxTI = 1.** They shift.

In test mode the RAM's output is replaced by the data-in registers. The
logic around the RAM can then be tested by scan without the RAM's
contents. The RAM itself is tested by the boot program.

The three RAMs are chained in this order: `ScanInxTI`, program RAM (31
registers), data RAM (27), constant RAM (27), `ScanOutxTO`. The full-chip
scan chain through all other flip-flops is left to the DFT insertion tool.

## Choices made in this RTL

The register set, the datapath, the opcode map, the memory map, the RAM
sizes, the peripheral register maps and block isolation all follow the
original Neptun description. These points had to be decided here:

- **Register numbering.** The numeric codes of the registers, except SP = 6
  and PC = 7, which follow from the Custom1-3 encodings.
- **Operand sets.** The set and order of the 3-bit and 2-bit operand
  codes.
- **Low decode bits.** The low decode bits of MOVNF/MVN/LDI. How LDI
  splits into two words: the whole constant is in the second word, so that
  LDI can also jump.
- **Branch condition.** The split of the BRA condition field, and the two
  extra conditions "never" and "always".
- **Flags.** Which instructions update which flags, and the multi-word Z
  rule of ADDC/SUBC.
- **Control vector.** `ctrl_t` is about 60 bits, not the original 76. It
  only has to express the 16-bit instruction set.
- **Boot table.** Its size (1024 words) and the rule that the program RAM
  is reachable from the bus only while the PC is in the boot region.
- **MemOut details.** After a write, `MemOut` shows the written word.
  Unmapped addresses read 0.
- **Serial interface.** The frame format, reset values, and when the error
  flags clear.
- **Timer bit 9.** The timer restarts on compare B.
- **Reset.** It is synchronous and active low, and clears every register.
  PC starts at 0, in the boot program.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops on its own, and a watchdog ends
it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_neptun_top \
    -y rtl -y tb -Irtl -Itb rtl/neptun_pkg.sv tb/tb_neptun_top.sv
./obj_dir/Vtb_neptun_top
```

Replace `top` with the name of any other block. Every testbench follows
the pattern `tb_neptun_<block>`. For example:

- `tb_neptun_alu` compares 26000 random operations with a reference
  model.
- `tb_neptun_cpu` runs a program covering almost every instruction,
  including multi-word addition, 4 x 4-word product scanning and
  CALL/PUSH/POP/RET. It also checks the cycle counts of LDI (2), CALL (4)
  and RET (2).

`tb_neptun_top` runs the whole chip at its full sizes. The boot program
loads an application into the program RAM and calls it. The application:

1. adds and multiplies 64-bit numbers with the parallel instructions;
2. sends a byte over EIA-232 and waits for one from the testbench;
3. writes and reads the parallel port;
4. starts a timer as a PWM on pin 9;
5. calls a subroutine;
6. runs a counted loop;
7. tries to overwrite its own program (this is blocked);
8. returns to the boot code, which reads the program RAM back.

Afterwards the bench shifts a random pattern through the 85-register RAM
scan chain. It counts every mechanism (boot and RAM fetch, program
loading, the blocked write, carry chains, MAC, accumulator shift, taken and
untaken branches, LDI, CALL, RET, serial TX and RX, parallel input, MMIO,
PWM edges, scan shifts) and fails if any of them never happened. The run
takes about 850 clock cycles.

`tb_neptun_p192mul` runs the kernel that dominates an ECDSA signature: a
NIST P-192 field multiplication on the full chip. The boot program
receives the application over EIA-232, word by word, and writes it into
the program RAM. The application computes the 24-word product by product
scanning (317 cycles). It then reduces the product modulo
p = 2^192 - 2^64 - 1 with column sums in the accumulator, followed by one
carry fold (84 cycles), and sends the 12 result words back over the serial
line. The bench compares the result with A * B mod p. The result may
exceed p by one p, because the final conditional subtraction is left to
the caller.

## Limits

- **Boot program.** The original boot program is not included. A chip
  built from this RTL needs one written for the instruction set above.
- **ECDSA firmware.** The original ECDSA firmware is not included either.
  For reference, the original signature program has about 2600 program
  words and the verification program about 3400. Both fit in the 5120-word
  program RAM, and their data (up to about 150 words each of RAM and
  constants) fits in the 512-word memories.
- **RAM model.** `neptun_sram` is an array model of a RAM macro. Replace it
  with the foundry macro for a real chip and keep the ports: active-low CS
  and WE, read data registered.
