// Program memory of the CISC core. DEPTH bytes, read asynchronously at three
// consecutive addresses (addr, addr+1, addr+2, wrapping) so that the fetch
// stage can take a whole instruction of up to three bytes in one clock.
// With INIT_FILE empty the memory holds the swap test program below, padded
// with NOPs; otherwise it is cleared to NOPs and loaded with $readmemh from
// INIT_FILE.
//
//   00: 74 00     mov a,#00        clear the accumulator
//   02: 75 00 64  mov 00h,#64h     R0 -> first operand
//   05: 75 64 FF  mov 64h,#FFh     first operand
//   08: 75 01 65  mov 01h,#65h     R1 -> second operand
//   0B: 75 65 88  mov 65h,#88h     second operand
//   0E: E6        mov a,@r0
//   0F: F5 48     mov 48h,a        temporary copy
//   11: E7        mov a,@r1
//   12: F6        mov @r0,a
//   13: E5 48     mov a,48h
//   15: F7        mov @r1,a        the two operands are now swapped
//   16: 00        nop
//
// The program is the original design's test program; the 8051 encodings,
// the hexadecimal reading of its constants and the memory size are this
// design's choices.
module prog_rom #(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic [AW-1:0] addr,
  output logic [7:0]    d0,
  output logic [7:0]    d1,
  output logic [7:0]    d2
);
  localparam int unsigned PLEN = 23;
  localparam logic [7:0] SWAP_PROG [PLEN] = '{
    8'h74, 8'h00,
    8'h75, 8'h00, 8'h64,
    8'h75, 8'h64, 8'hFF,
    8'h75, 8'h01, 8'h65,
    8'h75, 8'h65, 8'h88,
    8'hE6,
    8'hF5, 8'h48,
    8'hE7,
    8'hF6,
    8'hE5, 8'h48,
    8'hF7,
    8'h00
  };

  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      mem[i] = (i < PLEN && INIT_FILE == "") ? SWAP_PROG[i] : 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign d0 = mem[addr];
  assign d1 = mem[AW'(addr + AW'(1))];
  assign d2 = mem[AW'(addr + AW'(2))];
endmodule
