// Enhanced CISC microcontroller, top level.
// The base controller is a two-stage pipelined 8051-style core (cisc_core,
// with its program memory and data RAM) that retires one instruction per
// clock. Three units are added beside it, each with its own pins as in the
// original top level: the general purpose register file R16..R31 with its
// Z-pointer address bus (gprf), a UART (uart), and floating point hardware:
// the IEEE-754 single-precision FPU (fpu) plus the stand-alone significand
// adder/subtractor, multiplier and divider it is built from (fpu_addsub,
// fpu_mul, fpu_div). The four-level hardware return stack (hw_stack) is also
// brought out. There is no parameter: every block runs at its default size.
//
// Clocking: one clock, clk. rst_n resets the core, the FPU and the stack;
// clrn clears the register file; ResetF resets the UART. The arithmetic
// units fpu_addsub, fpu_mul and fpu_div are combinational; the FPU answers
// one clock after fpu_start (fpu_valid).
// Which blocks exist and the pins of the register file, UART and integer
// units follow the original design; the core does not drive the added units
// because no instruction encoding for them is defined.
module enhanced_mcu
  import mcu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // core
  output logic [7:0]  pc,
  output logic [7:0]  acc,
  output logic [23:0] ir,
  output logic        retired,
  output logic        illegal_op,
  output logic [7:0]  zp_data,    // data RAM byte addressed by the Z pointer
  // general purpose register file
  input  logic        clrn,
  input  logic [7:0]  c,
  input  logic        wr_reg,
  input  logic        dest,
  input  logic [3:0]  rd,
  input  logic [3:0]  rr,
  input  logic        inc_zp,
  input  logic        dec_zp,
  output logic [7:0]  reg_rd,
  output logic [7:0]  reg_rr,
  output logic [7:0]  addrbus,
  // UART
  input  logic        ResetF,
  input  logic        ClkEnbT,
  input  logic        Clk16xT,
  input  logic        Shift_LdF,
  input  logic [7:0]  TxDataT,
  output logic        TxSerial_Out,
  output logic        XmitMT,
  input  logic        RxSerial_In,
  output logic [7:0]  RxData,
  output logic        DataRdyT,
  // significand adder/subtractor, multiplier, divider
  input  logic [23:0] opa,
  input  logic [23:0] opb,
  input  logic        add,
  output logic [23:0] sum,
  output logic        co,
  input  logic [23:0] opa1,
  input  logic [23:0] opb1,
  output logic [47:0] prod,
  input  logic [23:0] dividend,
  input  logic [23:0] divisor,
  output logic [23:0] quo,
  output logic [23:0] remainder,
  // IEEE-754 FPU
  input  logic        fpu_start,
  input  logic [1:0]  fpu_op,
  input  logic [1:0]  fpu_rmode,
  input  logic [31:0] fpu_a,
  input  logic [31:0] fpu_b,
  output logic [31:0] fpu_result,
  output fpu_flags_t  fpu_flags,
  output logic        fpu_zero,
  output logic        fpu_valid,
  // hardware stack
  input  logic        stk_push,
  input  logic        stk_pop,
  input  logic [7:0]  stk_din,
  output logic [7:0]  stk_top,
  output logic        stk_empty,
  output logic        stk_full,
  output logic        stk_overflow,
  output logic        stk_underflow
);

  // the register file's address bus (Z pointer, R30) addresses the data RAM;
  // the RAM has 128 bytes, so bit 7 of the pointer is not used
  logic unused_zp7;
  assign unused_zp7 = addrbus[7];

  cisc_core u_core (
    .clk, .rst_n, .pc, .acc, .ir, .retired, .illegal_op,
    .dbg_addr(addrbus[6:0]), .dbg_data(zp_data)
  );

  gprf u_gprf (
    .clk, .clrn, .c, .wr_reg, .dest, .rd, .rr, .inc_zp, .dec_zp,
    .reg_rd, .reg_rr, .addrbus
  );

  uart u_uart (
    .clk, .ResetF, .ClkEnbT, .Clk16xT, .Shift_LdF, .TxDataT, .TxSerial_Out,
    .XmitMT, .RxSerial_In, .RxData, .DataRdyT
  );

  fpu_addsub u_addsub (.opa, .opb, .add, .sum, .co);
  fpu_mul    u_mul    (.opa1, .opb1, .prod);
  fpu_div    u_div    (.opa(dividend), .opb(divisor), .quo, .remainder);

  fpu u_fpu (
    .clk, .rst_n, .start(fpu_start), .op(fpu_op_e'(fpu_op)),
    .rmode(fpu_rmode_e'(fpu_rmode)), .opa(fpu_a), .opb(fpu_b),
    .result(fpu_result), .flags(fpu_flags), .zero(fpu_zero), .valid(fpu_valid)
  );

  hw_stack u_stack (
    .clk, .rst_n, .push(stk_push), .pop(stk_pop), .din(stk_din), .top(stk_top),
    .empty(stk_empty), .full(stk_full), .overflow(stk_overflow),
    .underflow(stk_underflow)
  );

endmodule
