// Testbench of the pipelined core running the built-in swap program.
// Checks every instruction's effect in the clock it retires (accumulator and
// RAM through the debug port), that the 12 instructions retire in 12
// consecutive clocks after a one-clock pipeline fill, that PC advances by
// each instruction's length, and the final state: RAM[64h] = 88h,
// RAM[65h] = FFh, RAM[48h] = FFh, A = FFh. Then it loads a second program
// from a small hex file that uses opcodes outside the subset and checks that
// they execute as NOPs and raise illegal_op.
module tb_cisc_core;
  logic clk = 0, rst_n = 0;
  logic [7:0] pc, acc, dbg_data;
  logic [23:0] ir;
  logic retired, illegal_op;
  logic [6:0] dbg_addr = '0;
  int checks = 0, failures = 0;

  cisc_core #(.PC_W(8), .RAM_DEPTH(128)) dut (.*);

  // second core with a program holding two opcodes outside the subset:
  // 74 5A (mov a,#5A), A5, 04, F5 10 (mov 10h,a), then NOPs
  logic [7:0]  pc2, acc2, dbg2;
  logic [23:0] ir2;
  logic        ret2, ill2;
  int          n_ill = 0;
  cisc_core #(.PC_W(8), .RAM_DEPTH(128), .INIT_FILE("tb/core_illegal.hex")) dut2 (
    .clk, .rst_n, .pc(pc2), .acc(acc2), .ir(ir2), .retired(ret2), .illegal_op(ill2),
    .dbg_addr(7'h10), .dbg_data(dbg2)
  );
  always @(posedge clk) if (rst_n && ill2) n_ill++;
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (acc=%h pc=%h)", what, acc, pc); end
  endtask

  task automatic peek(input logic [6:0] a, input logic [7:0] v, input string what);
    dbg_addr = a;
    #1;
    chk(dbg_data == v, what);
  endtask

  // expected accumulator after each of the 12 instructions, and PC after fetch
  localparam logic [7:0] EXP_ACC [12] = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
    8'hFF, 8'hFF, 8'h88, 8'h88, 8'hFF, 8'hFF, 8'hFF};
  localparam logic [7:0] EXP_PC [12] = '{8'h02, 8'h05, 8'h08, 8'h0B, 8'h0E,
    8'h0F, 8'h11, 8'h12, 8'h13, 8'h15, 8'h16, 8'h17};

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // after one clock the first instruction sits in IR; PC has moved by 2
    chk(pc == 8'h02 && !retired, "pipeline fill");
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      chk(retired, "one instruction per clock");
      chk(acc == EXP_ACC[i], $sformatf("acc after instruction %0d", i));
      if (i + 1 < 12) chk(pc == EXP_PC[i + 1], $sformatf("pc after fetch %0d", i + 1));
      case (i)
        1: peek(7'h00, 8'h64, "R0 = 64");
        2: peek(7'h64, 8'hFF, "[64] = FF");
        3: peek(7'h01, 8'h65, "R1 = 65");
        4: peek(7'h65, 8'h88, "[65] = 88");
        6: peek(7'h48, 8'hFF, "[48] = FF");
        8: peek(7'h64, 8'h88, "[64] = 88 via @r0");
        default: ;
      endcase
      chk(!illegal_op, "no illegal opcode");
    end
    peek(7'h64, 8'h88, "final [64]");
    peek(7'h65, 8'hFF, "final [65]");
    peek(7'h48, 8'hFF, "final [48]");
    chk(acc == 8'hFF, "final A");
    // the NOPs after the program keep everything still
    repeat (20) @(negedge clk);
    chk(acc == 8'hFF && retired && !illegal_op, "nop sled");
    peek(7'h65, 8'hFF, "still swapped");
    chk(n_ill == 2, "two illegal opcodes flagged");
    chk(acc2 == 8'h5A && dbg2 == 8'h5A, "illegal opcodes act as NOPs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
