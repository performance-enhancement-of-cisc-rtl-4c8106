# Enhanced CISC microcontroller

A small 8051-style CISC controller is made faster by pipelining it, so that every
instruction, whatever its length, finishes in one clock. It is then extended with
three units a plain controller lacks:

- a general purpose register file, R16..R31, where R30 is the Z pointer for the data RAM;
- a UART;
- floating point hardware: a full IEEE-754 single-precision FPU, plus the integer
  significand adder/subtractor, multiplier and divider it is built from.

This repository holds synthesizable SystemVerilog for all of these parts, a self-checking
testbench for each, and an end-to-end testbench of the whole chip.

## Top level: `enhanced_mcu`

`enhanced_mcu` has no parameters. Each block runs at its default size, and each brings out
its own pins, so every unit can be driven and observed directly:

| group | pins | block |
|---|---|---|
| core | `pc`, `acc`, `ir`, `retired`, `illegal_op`, `zp_data` | `cisc_core` (with `prog_rom`, `data_ram`) |
| register file | `clrn`, `c`, `wr_reg`, `dest`, `rd`, `rr`, `inc_zp`, `dec_zp` → `reg_rd`, `reg_rr`, `addrbus` | `gprf` |
| UART | `ResetF`, `ClkEnbT`, `Clk16xT`, `Shift_LdF`, `TxDataT`, `RxSerial_In` → `TxSerial_Out`, `XmitMT`, `RxData`, `DataRdyT` | `uart` (`uart_tx`+`p2s`, `uart_rx`+`s2p`) |
| significand units | `opa`, `opb`, `add` → `sum`, `co`; `opa1`, `opb1` → `prod`; `dividend`, `divisor` → `quo`, `remainder` | `fpu_addsub`, `fpu_mul`, `fpu_div` |
| FPU | `fpu_start`, `fpu_op`, `fpu_rmode`, `fpu_a`, `fpu_b` → `fpu_result`, `fpu_flags`, `fpu_zero`, `fpu_valid` | `fpu` |
| stack | `stk_push`, `stk_pop`, `stk_din` → `stk_top`, `stk_empty`, `stk_full`, `stk_overflow`, `stk_underflow` | `hw_stack` |

There is one clock, `clk`. `rst_n` resets the core, the FPU and the stack. `clrn` clears
the register file. `ResetF` resets the UART. All resets are active low and asynchronous.

The register file's address bus `addrbus` carries the Z pointer, R30. It addresses the
core's data RAM through a read port, and `zp_data` shows the byte at that address. Load R30
and step it with `inc_zp` or `dec_zp` to walk through the data a program left behind. Only
the low 7 bits of the pointer are used, because the RAM has 128 bytes.

Apart from this link, the core does not drive the register file, the UART or the FPU. No
instruction encoding exists for them, so the added units sit beside the core with their
own pins. Connecting them needs an instruction-set extension, which is left to the user.

## The pipelined core (`cisc_core`)

The core has two stages.

1. **Fetch.** `prog_rom` has three asynchronous read ports, so the fetch stage reads the
   bytes at PC, PC+1 and PC+2 in one clock. It decodes the instruction length (1–3 bytes)
   from the opcode with `mcu_pkg::instr_len`. It loads all three bytes into the 24-bit
   instruction register `ir` and advances PC by that length.
2. **Execute.** This stage decodes `ir` and finishes the instruction in the same clock.
   Indirect operands need two RAM reads in a row. The RAM address is `R0` or `R1`, which
   are RAM bytes 0 and 1, as in 8051 register bank 0. `data_ram` therefore has two
   asynchronous read ports: port b is addressed by port a's data. Writes to the
   accumulator or the RAM happen on the clock edge.

The fetch stage never reads data and the subset has no branches, so the pipeline has no
hazards. After a one-clock fill, `retired` is high on every clock.

| opcode | instruction | bytes |
|---|---|---|
| 00 | `nop` | 1 |
| 74 dd | `mov a,#dd` | 2 |
| 75 aa dd | `mov aa,#dd` | 3 |
| E5 aa | `mov a,aa` | 2 |
| E6 / E7 | `mov a,@r0` / `mov a,@r1` | 1 |
| F5 aa | `mov aa,a` | 2 |
| F6 / F7 | `mov @r0,a` / `mov @r1,a` | 1 |

Any other opcode executes as a one-byte NOP and pulses `illegal_op`. Direct addresses
use 7 bits (128 bytes of RAM); there is no SFR space.

The program memory holds a swap program by default; the `prog_rom` header lists it.
The program points R0 at 64h and R1 at 65h, stores FFh and 88h there, and exchanges the
two values through the accumulator, using 48h as a temporary. It is 12 instructions and
23 bytes long, and it ends after 13 clocks with [64h]=88h, [65h]=FFh and A=FFh. Set
`INIT_FILE` on `cisc_core`/`prog_rom` to load another program with `$readmemh`.

## The FPU (`fpu`)

This is the largest and subtlest block. It implements IEEE-754 binary32 add, subtract,
multiply and divide.

| `op` | operation |
|---|---|
| 0 | add |
| 1 | sub |
| 2 | mul |
| 3 | div |

| `rmode` | rounding |
|---|---|
| 0 | to nearest, ties to even |
| 1 | towards zero |
| 2 | towards +∞ |
| 3 | towards −∞ |

Denormal operands and results are supported, and so are signed zeros, infinities and
NaNs. The block raises the five exception flags `invalid`, `div_by_zero`, `overflow`,
`underflow` and `inexact`.

**Timing.** The operands are sampled when `fpu_start` is high. `result`, `flags` and
`zero` are registered, and `valid` pulses one clock later. Everything between is
combinational.

**Common frame.** Each operation produces an unrounded significand `u_mant` of 50 bits.
Bit 49 has weight 2^(`u_exp`−127). A sticky bit stands for anything lost below bit 0.

- **Add/sub.** The operand with the larger magnitude is taken as the base. The other
  operand's significand is shifted right by the exponent difference, keeping a guard bit,
  a round bit and a sticky bit; the shift is clamped at 32. A 27-bit `fpu_addsub` adds
  or subtracts the two magnitudes. The result sign is the larger operand's sign. An exact
  zero from operands of opposite sign is +0, or −0 when rounding towards −∞.
- **Mul.** The 24×24 product comes from `fpu_mul`, and the exponent is `ea+eb−126`.
- **Div.** Both significands are normalised first, because a denormal divisor or dividend
  would otherwise lose quotient bits. `fpu_div` then divides `{ma, 26 zeros}` by `mb` to
  give 27 quotient bits, and a non-zero remainder sets sticky.

**Shared back end.** A leading-zero count normalises the frame. If the exponent falls
below 1, the value is shifted right into the denormal range, and the shifted-out bits
feed sticky. The top 24 bits are kept, and the round bit and sticky decide the increment
for the selected mode.

A carry out of a denormal turns it into the smallest normal number. A carry out of 1.11…1
bumps the exponent. An exponent of 255 or more overflows: the result is ∞ or the largest
finite number, depending on the mode and sign. Underflow is signalled when the result is
tiny before rounding and inexact.

**Special operands** bypass the datapath:

- Any NaN in gives the quiet NaN 7FC00000. `invalid` is set only for a signalling NaN.
- ∞−∞, 0×∞, 0/0 and ∞/∞ give 7FC00000 with `invalid`.
- x/0 gives a signed ∞ with `div_by_zero`.

The three significand units are also brought out on their own at the top level
(`fpu_addsub`, 24-bit, `co`=1 on subtract means no borrow; `fpu_mul`, 24×24→48 shift-and-add
array; `fpu_div`, 24/24 restoring array, x/0 gives all-ones quotient and zero remainder).

## Register file (`gprf`)

The register file has sixteen 8-bit registers, R16..R31, addressed as 0..15 by `rd` and
`rr`:

- `reg_rd` and `reg_rr` are asynchronous reads.
- With `wr_reg` high, `c` is written into R[`rd`] when `dest`=0, or into R[`rr`] when
  `dest`=1.
- R30 (index 14) is the Z pointer. It drives `addrbus` and is incremented or decremented
  by `inc_zp` or `dec_zp`. A write to R30 in the same clock takes priority.

## UART (`uart`)

The frame is a start bit, 8 data bits **MSB first**, and a stop bit, with no parity. MSB first is unusual
for a UART; it follows from the shift direction of the two converters. `Clk16xT` is a
one-clock tick at 16× the bit rate and `ClkEnbT` gates it. A bit lasts 16 ticks and a
frame lasts 160.

Both halves are eleven-state machines, S0..S10:

- **Transmitter.** S0 is idle and `XmitMT`=1. A low pulse on `Shift_LdF` loads `TxDataT`
  into `p2s`. S1 sends the start bit, S2..S9 shift the data out, and S10 sends the stop
  bit. A load while busy is ignored.
- **Receiver.** Two flops synchronise `RxSerial_In`. S1 re-checks the start bit at
  mid-bit, and a glitch returns the receiver to idle. S2..S9 sample each bit at its middle
  into `s2p`. S10 checks the stop bit: a good byte goes to `RxData` and raises `DataRdyT`,
  and a bad one is dropped. `DataRdyT` stays high until the next start bit.

## Hardware stack (`hw_stack`)

The stack holds four entries of 8 bits (a PC) and is built as a shift register.

- Pushing when full loses the oldest entry and pulses `overflow`.
- Popping when empty returns 0 and pulses `underflow`.
- A push and a pop in the same clock replace the top entry.

The core's instruction subset has no call or return, so the stack's pins are brought out.

## Where this RTL departs from, or goes beyond, the original description

The original design gives:

- the block list;
- the register-file organisation and pins;
- the UART pin names and the S0..S10 state machines;
- the converters' shift behaviour;
- the FPU's operations, format and rounding modes;
- the test program.

The following are this design's own choices:

- **Core.** The original names a pipelined, one-instruction-per-clock CISC controller,
  but this design chose:
  - the 8051 opcode encodings;
  - the two-stage split;
  - the hexadecimal reading of the program's constants;
  - the memory sizes (256 B program, 128 B data);
  - `illegal_op`.
- **Test program.** The original prose about the swap contradicts itself about which
  value first sits at 64h. The program listing is followed: FFh at 64h, 88h at 65h,
  swapped at the end.
- **Not built: ALU and status register.** The base controller's integer ALU and status
  register are only named, so they are not built. No instruction here uses them.
- **FPU.**
  - Encodings, one-clock latency, canonical NaN and tininess-before-rounding are this
    design's choices.
  - Divide is built although one feature list omits it.
  - The 24-bit width of the significand units is read from the example values.
- **UART.**
  - The roles of `ClkEnbT` (a gate) and `Clk16xT` (a 16× tick) are this design's reading.
  - The stop-bit check, the glitch filter and the synchroniser are additions.
- **Converters.**
  - `p2s` loads synchronously and has a shift enable; the original reads as an
    asynchronous load.
  - `p2s` shifts its own contents left. This follows the worked example
    (00111110 → 01111100), not the printed assignment.
- **Register file.** The meaning of `dest`, the 8-bit width and the write-over-increment
  priority are choices.

## Verification

Each block has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`.

- **`tb_fpu`** checks about 40,000 random operations across all ops and modes, with
  normal, denormal, tiny and huge operands, plus directed special cases. The reference is
  computed independently in double precision, and a bit-level rounder in the testbench
  rounds it to single precision for each mode.
  - Round-to-nearest is exact by the double-rounding theorem, because 53 ≥ 2·24+2.
  - For directed rounding of add/sub, operands are kept within 28 binades so that the
    double sum is exact.
  - Flags are compared wherever the double result is exact.
- **`tb_cisc_core`** checks the swap program instruction by instruction, including PC,
  the accumulator, the RAM and one retirement per clock. It also runs a second program,
  `tb/core_illegal.hex`, for the illegal-opcode path.
- **`tb_uart*`** checks frame timing (160 ticks), the bit order, loopback, framing errors,
  glitches and the clock enable.
- **`tb_enhanced_mcu`** runs the whole chip at its default size. It covers:
  - the swap program, with its result read back through the Z pointer;
  - register-file writes and Z-pointer moves;
  - the significand-unit examples (16h+12h=28h, 16h−12h=4, 6×8=30h, 0Ch/4=3);
  - FPU operations in all four modes with overflow, underflow, denormal, invalid and
    divide-by-zero cases;
  - UART loopback of 54h, CCh and E3h;
  - stack overflow and underflow.

  It counts each of these mechanisms and fails if any never occurred.

To simulate with Verilator, run from the repository root, because the core testbench
reads `tb/core_illegal.hex` by a relative path:

```
verilator --binary --timing --assert -Irtl rtl/mcu_pkg.sv rtl/*.sv tb/tb_enhanced_mcu.sv \
          --top-module tb_enhanced_mcu -Mdir obj_top
./obj_top/Vtb_enhanced_mcu
```

Replace the testbench and top module name to run a single block. `rtl/mcu_pkg.sv` holds
the shared opcodes, the FPU enums and the flag struct, and must be compiled first.

Some modules carry concurrent assertions, which are checked when Verilator is run with
`--assert`:

- the FPU answers exactly one clock after `start`;
- the core retires an instruction on every clock once the pipeline has filled;
- the UART state machines stay within S0..S10;
- the stack's count never exceeds its depth.
