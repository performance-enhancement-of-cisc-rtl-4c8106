// Shared types and constants of the enhanced CISC microcontroller.
// Holds the 8051-style opcodes executed by the core, the FPU operation and
// rounding-mode encodings, and the canonical quiet NaN.
// The opcode values are the standard 8051 encodings of the MOV forms used by
// the swap test program; the FPU encodings follow the order in which the
// operations and rounding modes are usually listed (add, sub, mul, div and
// nearest-even, zero, up, down) and are this design's choice.
package mcu_pkg;

  // ---- core opcodes --------------------------------------------------------
  localparam logic [7:0] OP_NOP        = 8'h00;
  localparam logic [7:0] OP_MOV_A_IMM  = 8'h74;  // mov a,#data
  localparam logic [7:0] OP_MOV_D_IMM  = 8'h75;  // mov direct,#data
  localparam logic [7:0] OP_MOV_A_DIR  = 8'hE5;  // mov a,direct
  localparam logic [7:0] OP_MOV_A_IR0  = 8'hE6;  // mov a,@r0
  localparam logic [7:0] OP_MOV_A_IR1  = 8'hE7;  // mov a,@r1
  localparam logic [7:0] OP_MOV_D_A    = 8'hF5;  // mov direct,a
  localparam logic [7:0] OP_MOV_IR0_A  = 8'hF6;  // mov @r0,a
  localparam logic [7:0] OP_MOV_IR1_A  = 8'hF7;  // mov @r1,a

  // Length in bytes of an instruction, from its opcode. Unknown opcodes are
  // one byte long (they execute as NOP).
  function automatic logic [1:0] instr_len(input logic [7:0] op);
    unique case (op)
      OP_MOV_D_IMM:                          return 2'd3;
      OP_MOV_A_IMM, OP_MOV_A_DIR, OP_MOV_D_A: return 2'd2;
      default:                               return 2'd1;
    endcase
  endfunction

  // ---- floating point ------------------------------------------------------
  typedef enum logic [1:0] {
    FPU_ADD = 2'd0,
    FPU_SUB = 2'd1,
    FPU_MUL = 2'd2,
    FPU_DIV = 2'd3
  } fpu_op_e;

  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'd0,
    RM_ZERO         = 2'd1,
    RM_UP           = 2'd2,   // towards +infinity
    RM_DOWN         = 2'd3    // towards -infinity
  } fpu_rmode_e;

  typedef struct packed {
    logic invalid;
    logic div_by_zero;
    logic overflow;
    logic underflow;
    logic inexact;
  } fpu_flags_t;

  // the quiet NaN returned for every invalid operation or NaN operand
  localparam logic [31:0] QNAN   = 32'h7FC0_0000;

endpackage
