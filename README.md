# CE1921 single-cycle computer for the DE10-Lite

This is a small but complete stored-program computer sized for a MAX10 FPGA
board. It has a single-cycle ARM processor and a 32-word data memory. It also
has three memory-mapped devices: the ten slider switches, the ten LEDs and six
seven-segment digits. The processor reaches all of them with ordinary `LDR`
and `STR` instructions; there are no I/O instructions. An address decoder
watches the processor's memory buses and picks out the device for each access.
A two-flip-flop synchronizer turns the board's reset pushbutton into a clean
reset release.

The default instruction ROM holds a short test program, DE10ROM1. It reads n
from the sliders and adds 1 + 2 + ... + n. It shows the sum in hex on the
displays. Then it lights LED0 when the sum is at least 32. Examples:

| sliders | display | LED0 |
|---------|---------|------|
| 10      | 37      | on   |
| 15      | 78      | on   |
| 3       | 6       | off  |

## System structure

```
 SYSRST ──► synchronizer ──► RST (to every register below)

 SLIDERS ─► reg10 ──Q──► D0 ┐
                            ├ busmux2to1 ──► MEMDATAIN ┐
 dmem RD ──────────────► D1 ┘   ▲ DATAS                │
                                │                      ▼
                        addressdecoder ◄── MEMADDR,MEMRD,MEMWR ── scp
                          │LD2  │LD1  │LD0                       │
                          ▼     ▼     ▼                          │
                        dmem   led   seg7  ◄──── MEMDATAOUT ─────┘
                               LEDS  SEG0..SEG5
```

`system` (`rtl/system.sv`) is the top level. Besides the board signals
(`CLK`, `SYSRST`, `SLIDERS`, `LEDS`, `SEG0`..`SEG5`), it brings out every
processor debug signal (control word, flags, `PC4`, `INSTR`, `BRADDR`, `WD3`)
and the decoder strobes (`LD2`, `LD1`, `LD0`, `DATAS`). Use these for
simulation and on-chip debugging.

### Memory map and decoding

| address               | device                 | access | decoder output |
|-----------------------|------------------------|--------|----------------|
| 0x00000000–0x0000001F | main memory, 32 words  | LDR    | DATAS = 1      |
|                       |                        | STR    | LD2 (write)    |
| 0x000000F4            | sliders, read-only     | LDR    | DATAS = 0      |
| 0x000000F8            | LED register           | STR    | LD1            |
| 0x000000FC            | seven-segment register | STR    | LD0            |

Main memory counts one 32-bit location per address, not per byte. Address 4
is word 4, so the program's `MEM[4]` is at address 4.

`addressdecoder` is purely combinational:

- A store sets exactly one load strobe, or none for an unmapped address.
- For a load, `DATAS` steers the system input mux. It is 1 inside the memory
  range and 0 everywhere else, so a load from any address outside main memory
  returns the slider word.
- A cycle with `MEMRD` and `MEMWR` both high is invalid and asserts nothing.
  The processor never produces one, and an assertion in `scp` checks for it.

The slider register has its load enable tied high, so it samples the switches
on every clock. It returns `{22'b0, switches}`.

## The processor (`scp`)

Each instruction completes in one clock cycle. All the work between two rising
edges is combinational:

1. **fetch** (`fetch`, `irom`): the PC register, the instruction ROM, `PC4 = PC+4`
   and the branch target `BRADDR = PC+8 + IMM32`.
2. **decode** (`controller`, `regfile`, `extend`):
   - The controller decodes `COND`=INSTR[31:28], `OP`=[27:26], `FUNCT`=[25:20]
     and `ROT`=[11:8], using the stored flags.
   - The register file reads Rn (INSTR[19:16]) and a second register. This is
     Rm (INSTR[3:0]), or Rd (INSTR[15:12]) when `REGDST`=1, which STR needs
     for its store data.
   - `extend` forms the immediate.
3. **execute** (`execute`): operand B is RD2 or IMM32 (`ALUSRCB`). The ALU
   result `F` is the write-back value and also the memory address `MEMADDR`.
   The program status register holds N, Z, C and V.
4. **write-back** (`busmux2to1`): `REGSRC`=1 writes back the ALU result and
   `REGSRC`=0 writes back `MEMDATAIN`. The selected value is `WD3`.

The processor holds no data memory. `MEMADDR`, `MEMDATAOUT` (= RD2) and
`MEMDATAIN` leave the core, and the load data must return in the same cycle.
`dmem` therefore reads combinationally.

### Control signals

| signal  | meaning |
|---------|---------|
| PCSRC   | 1: next PC is BRADDR (a taken branch) |
| PCWR    | PC load enable; high on every cycle |
| REGDST  | 1: second register read address is Rd (LDR/STR) |
| REGWR   | write WD3 into Rd |
| EXTS    | immediate format: 00 = imm8 rotated right by 2·ROTATE; 01 = imm12 zero-extended; 10 = imm24 sign-extended ×4 |
| ALUSRCB | 1: ALU operand B is IMM32 |
| ALUS    | 0 ADD, 1 SUB, 2 AND, 3 ORR, 4 EOR, 5 MOV (B), 6 MVN (~B), 7 RSB (B−A) |
| CPSRWR  | write the flags |
| MEMRD   | high while an LDR executes |
| MEMWR   | high while an STR executes |
| REGSRC  | 1: write back the ALU result; 0: write back memory data |
| ROTATE  | rotate amount for a data-processing immediate (INSTR[11:8]), 0 otherwise |

The encodings live in `rtl/ce1921_pkg.sv` as the enums `alu_op_e` and `exts_e`.

### Instruction subset

- **Data processing:** AND, EOR, SUB, RSB, ADD, ORR, MOV, MVN, and TST, TEQ,
  CMP, CMN. The S suffix is honoured.
  - Operand 2 is an 8-bit rotated immediate or an unshifted register. The
    shift field of a register operand is ignored.
  - ADD, SUB and RSB set all four flags. C is the carry out, which means "no
    borrow" for a subtraction.
  - The logical operations and the moves set N and Z and keep C and V.
- **LDR / STR:** word access, Rn ± 12-bit immediate, offset addressing only
  (no write-back).
- **B:** under any of the 15 condition codes. Code 1111 is treated as never.
- **Conditional execution:** every instruction is conditional. When the
  condition fails, nothing changes except PC ← PC+4.
- **Unsupported encodings** run as no-ops. These are register-controlled
  shifts, ADC/SBC/RSC/BIC, BL, byte and write-back transfers, multiplies and
  coprocessor instructions.
- **R15:** reading R15 gives PC+8, as in ARM. Writes to R15 are dropped.

### Reset

- Every register clears asynchronously while its `RST` input is low: the PC
  (to 0), R0–R14, the flags, main memory and the three device registers. No
  clock is needed for this.
- `synchronizer` has two flip-flops. Both are cleared by `SYSRST`, the first
  samples a constant 1 and the second samples the first.
- Pressing the button pulls `RST` low at once. On release, `RST` rises on the
  second rising clock edge. The processor then executes its first instruction
  on the third edge. The first flip-flop may go metastable if the release
  lands close to an edge; it gets a whole clock period to settle.

### Seven-segment coding

`seg7decode` turns nibble k of the display register into bus `SEGk`, for
k = 0..5. The buses are active low:

- bit i lights segment i: 0 top, 1 upper right, 2 lower right, 3 bottom,
  4 lower left, 5 upper left, 6 middle;
- bit 7 is the decimal point and is always dark.

For example, "0" is `8'b1100_0000` and "1" is `8'b1111_1001`. Digits A–F use
the usual glyphs, with lower-case b and d. The LED device shows bits 9..0 of
its register.

## The DE10ROM1 program and its timing

`rtl/de10rom1.hex` is the program in ARM machine code, 25 words, one word per
line, word 0 first. The assembly source is:

```
main:  MOV R4,#4 / MOV R12,#0 / STR R12,[R4]      ; MEM[4] = 0
       MOV R12,#0xF4 / LDR R8,[R12]                ; n = sliders
       MOV R9,#0 / CMP R8,#0 / BEQ print
loop:  ADD R9,R9,R8 / SUB R8,R8,#1 / CMP R8,#0 / BNE loop
       MOV R10,#0 / SUB R10,R10,#32 / AND R10,R9,R10 / CMP R10,#0
       BEQ else / MOV R10,#1
else:  STR R10,[R4]                                ; MEM[4] = (sum >= 32)
print: MOV R12,#0xFC / STR R9,[R12]                ; display = sum
       MOV R12,#0xF8 / LDR R3,[R4] / STR R3,[R12]  ; LEDs = MEM[4]
done:  B done
```

One instruction runs per clock. From the first instruction to the final
`B done`, the program takes:

- 13 cycles for n = 0;
- 19 + 4n cycles for n > 0, plus 1 cycle when n(n+1)/2 ≥ 32.

The largest slider value, 1023, gives the sum 0x7FE00, which still fits the
six displayed digits.

## Where this design departs from, or fills in, its source

The source specifies the system level in full: the blocks, their connections,
the memory map, the decoder table, the register and reset rules, the
synchronizer and the display devices. Their RTL follows it.

The processor is a different case. Only its interface and the names of its
control signals are given, so its internals here are this design's own ARM
subset. This includes the ALUS and EXTS encodings, the instruction subset
above and the flag rules.

Further choices and open points:

- **Displayed digits.** The source says both that the low five hex digits are
  shown and that six digit buses are produced, with the sixth fed from bits
  23..20. This design follows the six-bus form.
- **`PCWR`** is a plain PC load enable and is always 1.
- **Reset values.** Zero wherever the source gives none.
- **Instruction ROM size.** 64 words, set by the parameter `IROM_WORDS`.
- **Board-level parts** are outside the RTL: the FPGA fabric, the pin
  assignment and the 20 ns (50 MHz) clock constraint. Timing closure at
  50 MHz has not been checked.
- **The basic processor's own test program** is not available. The processor
  testbench uses its own program, `tb/scp_test.hex`, instead.

## Files

| module | role |
|--------|------|
| `system` | top level, the whole computer |
| `scp` | single-cycle processor |
| `fetch`, `irom` | PC, PC adders, instruction ROM |
| `controller` | instruction decode and condition check |
| `regfile` | R0–R14, R15 = PC+8 |
| `extend` | immediate generator |
| `execute` | ALU and flag register |
| `busmux2to1` | 32-bit 2:1 mux (write-back and system input) |
| `reg32` | 32-bit register, asynchronous active-low reset, active-high load |
| `reg10` | slider register, zero-extended to 32 bits |
| `addressdecoder` | memory-map decoder |
| `dmem` | 32-word main memory |
| `led`, `seg7`, `seg7decode` | output devices |
| `synchronizer` | reset synchronizer |
| `ce1921_pkg` | shared enums and address constants |

Parameters:

- `system` and `scp` take `IROM_FILE` (hex image, default `rtl/de10rom1.hex`)
  and `IROM_WORDS` (default 64).
- `system` also takes `MEM_WORDS` (32).
- `reg32` takes `WIDTH` (32).

The hex path is relative, so run simulations from the directory that holds
`rtl/` and `tb/`.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. To build and run one with
Verilator 5 from the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb rtl/ce1921_pkg.sv tb/tb_system.sv --top-module tb_system
./obj_dir/Vtb_system
```

What the testbenches check:

- **`tb_system`** runs the whole computer at its default parameters, with
  DE10ROM1:
  - slider values 10, 15, 3, 0, 7, 8, 1023 and four random values;
  - the display and LED results, and the cycle count above;
  - the two-edge reset release, and a reset pressed in mid-run;
  - that each mechanism happens at least once: taken and untaken branches,
    failed conditions, flag writes, loads from memory and from the sliders,
    and stores to memory, LEDs and display.
- **`tb_scp`** runs the processor alone on `tb/scp_test.hex`. That program
  covers every supported operation, all condition codes, loads and stores with
  ± offsets, and R15 reads. The testbench steps an instruction-level reference
  model in lock step and compares the fetched word, the register write, the
  memory strobes and the flags on every cycle.
- **The block testbenches** compare each block with an independent reference
  on random and corner-case stimulus.
