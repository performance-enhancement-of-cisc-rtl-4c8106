// Pipelined 8051-style CISC controller core.
// Two stages. Fetch reads the three program bytes at PC, stores them in the
// instruction register (IR) and advances PC by the instruction's length
// (1 to 3 bytes, decoded from the opcode). Execute decodes IR and completes
// the instruction in that same clock: operands come from the accumulator,
// the immediate bytes in IR, or the data RAM (direct address, or indirect
// through R0/R1, which are RAM bytes 0 and 1); results go to the
// accumulator or to the RAM. Because the fetch stage never touches data and
// the subset has no jumps, there are no hazards: after the first fill clock
// one instruction, whatever its length, retires every clock (retired pulses).
//
// Instructions: mov a,#d (74), mov dir,#d (75), mov a,dir (E5),
// mov a,@Ri (E6/E7), mov dir,a (F5), mov @Ri,a (F6/F7), nop (00). Any other
// opcode executes as a one-byte NOP and raises illegal_op for a clock.
// Reset (rst_n low, asynchronous) clears PC, ACC and IR. dbg_addr/dbg_data
// read the data RAM from outside.
// The instruction subset is the one of the original design's test program
// and the single-clock, pipelined execution is its stated aim; the 8051
// encodings, the two-stage split, the 7-bit direct address space (no SFRs)
// and the illegal_op output are this design's choices.
module cisc_core
  import mcu_pkg::*;
#(
  parameter int unsigned PC_W      = 8,
  parameter int unsigned RAM_DEPTH = 128,
  parameter string       INIT_FILE = "",
  localparam int unsigned RAW      = $clog2(RAM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [PC_W-1:0] pc,
  output logic [7:0]      acc,
  output logic [23:0]     ir,
  output logic            retired,
  output logic            illegal_op,
  input  logic [RAW-1:0]  dbg_addr,
  output logic [7:0]      dbg_data
);
  // ------------------------------------------------------------ fetch
  logic [7:0] b0, b1, b2;
  logic       ir_valid;

  prog_rom #(.DEPTH(1 << PC_W), .INIT_FILE(INIT_FILE)) u_rom (
    .addr(pc), .d0(b0), .d1(b1), .d2(b2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      ir       <= '0;
      ir_valid <= 1'b0;
    end else begin
      ir       <= {b0, b1, b2};
      ir_valid <= 1'b1;
      pc       <= pc + PC_W'(instr_len(b0));
    end
  end

  // ---------------------------------------------------------- execute
  logic [7:0]     op, arg1, arg2;
  logic           indirect;
  logic [RAW-1:0] ra_a, ra_b, waddr;
  logic [7:0]     rd_a, rd_b, wdata;
  logic           we, acc_we, bad;
  logic [7:0]     acc_d;

  assign {op, arg1, arg2} = ir;
  assign indirect = (op == OP_MOV_A_IR0) || (op == OP_MOV_A_IR1) ||
                    (op == OP_MOV_IR0_A) || (op == OP_MOV_IR1_A);
  // port a: R0/R1 for indirect forms, else the direct address byte
  assign ra_a = indirect ? RAW'(op[0]) : RAW'(arg1);
  assign ra_b = RAW'(rd_a);

  data_ram #(.DEPTH(RAM_DEPTH)) u_ram (
    .clk, .we, .waddr, .wdata,
    .raddr_a(ra_a), .rdata_a(rd_a),
    .raddr_b(ra_b), .rdata_b(rd_b),
    .raddr_dbg(dbg_addr), .rdata_dbg(dbg_data)
  );

  always_comb begin
    we     = 1'b0;
    waddr  = RAW'(arg1);
    wdata  = acc;
    acc_we = 1'b0;
    acc_d  = acc;
    bad    = 1'b0;
    if (ir_valid) begin
      unique case (op)
        OP_NOP: ;
        OP_MOV_A_IMM: begin acc_we = 1'b1; acc_d = arg1; end
        OP_MOV_D_IMM: begin we = 1'b1; wdata = arg2; end
        OP_MOV_A_DIR: begin acc_we = 1'b1; acc_d = rd_a; end
        OP_MOV_A_IR0, OP_MOV_A_IR1: begin acc_we = 1'b1; acc_d = rd_b; end
        OP_MOV_D_A: begin we = 1'b1; end
        OP_MOV_IR0_A, OP_MOV_IR1_A: begin we = 1'b1; waddr = RAW'(rd_a); end
        default: bad = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      retired    <= 1'b0;
      illegal_op <= 1'b0;
    end else begin
      if (acc_we) acc <= acc_d;
      retired    <= ir_valid;
      illegal_op <= bad;
    end
  end

  // no hazards: after the pipeline has filled, an instruction retires every clock
  a_one_per_clock: assert property (@(posedge clk) disable iff (!rst_n) ir_valid |=> retired);
  // a RAM write and an accumulator write never come from the same instruction
  a_one_dest: assert property (@(posedge clk) disable iff (!rst_n) !(we && acc_we));
endmodule
