// General purpose register file of the enhanced controller.
// Sixteen 8-bit registers, numbered R16..R31 by the instruction set and
// addressed here by a 4-bit index (0 = R16 ... 15 = R31). Two asynchronous
// read ports (reg_rd = R[rd], reg_rr = R[rr]) feed the ALU/FPU operands; one
// synchronous write port stores c when wr_reg is high. R30 doubles as the Z
// pointer: its value drives addrbus, the address of the data RAM, and it can
// be post-incremented (inc_zp) or post-decremented (dec_zp) in the same clock
// as an access. clrn clears every register asynchronously.
// The register count, the R16..R31 numbering, the Z pointer in R30 and the
// port names follow the original design; the meaning of dest (0 writes R[rd],
// 1 writes R[rr]), the 8-bit width and the priority of a write to R30 over
// inc_zp/dec_zp are this design's choices.
module gprf #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          clrn,     // asynchronous clear, active low
  input  logic [DW-1:0] c,        // write data
  input  logic          wr_reg,   // write enable
  input  logic          dest,     // 0: write R[rd], 1: write R[rr]
  input  logic [AW-1:0] rd,
  input  logic [AW-1:0] rr,
  input  logic          inc_zp,   // Z <= Z + 1
  input  logic          dec_zp,   // Z <= Z - 1
  output logic [DW-1:0] reg_rd,
  output logic [DW-1:0] reg_rr,
  output logic [DW-1:0] addrbus   // Z pointer (R30)
);
  // R30 is index 14 when R16 is index 0
  localparam logic [AW-1:0] ZP = AW'(NREGS - 2);

  logic [DW-1:0] regs [NREGS];
  logic [AW-1:0] waddr;

  assign waddr = dest ? rr : rd;

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      if (wr_reg) regs[waddr] <= c;
      if (!(wr_reg && waddr == ZP)) begin
        if (inc_zp && !dec_zp)      regs[ZP] <= regs[ZP] + 1'b1;
        else if (dec_zp && !inc_zp) regs[ZP] <= regs[ZP] - 1'b1;
      end
    end
  end

  assign reg_rd  = regs[rd];
  assign reg_rr  = regs[rr];
  assign addrbus = regs[ZP];

endmodule
