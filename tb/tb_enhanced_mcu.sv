// End-to-end testbench of the enhanced microcontroller at its default size.
// The UART's serial output is looped back to its input. In turn it:
//   - lets the core run the built-in swap program and checks, through the
//     Z pointer of the register file, which addresses the data RAM, that
//     locations 64h and 65h are swapped, and that the twelve instructions
//     retired in twelve consecutive clocks after a one-clock pipeline fill;
//   - writes and reads the register file, moves the Z pointer up and down on
//     addrbus and clears the file;
//   - drives the significand adder/subtractor, multiplier and divider with
//     the reference examples (16h+12h, 16h-12h, 6*8, 0Ch/4);
//   - runs IEEE-754 operations in all four rounding modes, including
//     overflow, underflow, denormals, an invalid operation and division by
//     zero, each checked one clock after start;
//   - sends 54h, CCh and E3h through the UART and receives them back;
//   - pushes five entries on the four-level stack and pops five.
// Every mechanism is counted and a mechanism that never happened counts as
// a failure.
module tb_enhanced_mcu;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] pc, acc, zp_data;
  logic [23:0] ir;
  logic retired, illegal_op;
  logic clrn = 0, wr_reg = 0, dest = 0, inc_zp = 0, dec_zp = 0;
  logic [7:0] c = '0, reg_rd, reg_rr, addrbus;
  logic [3:0] rd = '0, rr = '0;
  logic ResetF = 0, ClkEnbT = 1, Clk16xT = 0, Shift_LdF = 1;
  logic [7:0] TxDataT = '0, RxData;
  logic TxSerial_Out, XmitMT, RxSerial_In, DataRdyT;
  logic [23:0] opa = '0, opb = '0, sum, opa1 = '0, opb1 = '0, dividend = '0, divisor = 24'd1;
  logic [23:0] quo, remainder;
  logic add = 1, co;
  logic [47:0] prod;
  logic fpu_start = 0;
  logic [1:0] fpu_op = '0, fpu_rmode = '0;
  logic [31:0] fpu_a = '0, fpu_b = '0, fpu_result;
  fpu_flags_t fpu_flags;
  logic fpu_zero, fpu_valid;
  logic stk_push = 0, stk_pop = 0;
  logic [7:0] stk_din = '0, stk_top;
  logic stk_empty, stk_full, stk_overflow, stk_underflow;

  int checks = 0, failures = 0;

  assign RxSerial_In = TxSerial_Out;

  enhanced_mcu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) Clk16xT <= ~Clk16xT;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_zread = 0, n_retire_run = 0, n_zinc = 0, n_zdec = 0, n_clear = 0, n_borrow = 0;
  int n_rm [4] = '{0, 0, 0, 0};
  int n_ovf = 0, n_unf = 0, n_inv = 0, n_dbz = 0, n_denorm = 0, n_frames = 0;
  int n_stk_ovf = 0, n_stk_unf = 0;

  always @(posedge clk) begin
    if (rst_n && stk_overflow)  n_stk_ovf++;
    if (rst_n && stk_underflow) n_stk_unf++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic fp(input logic [1:0] o, input logic [1:0] rm, input logic [31:0] a,
                    input logic [31:0] b, input logic [31:0] e, input string what);
    @(negedge clk);
    fpu_op = o; fpu_rmode = rm; fpu_a = a; fpu_b = b; fpu_start = 1;
    @(negedge clk);
    fpu_start = 0;
    chk(fpu_valid && fpu_result == e, what);
    n_rm[rm]++;
    if (fpu_flags.overflow)    n_ovf++;
    if (fpu_flags.underflow)   n_unf++;
    if (fpu_flags.invalid)     n_inv++;
    if (fpu_flags.div_by_zero) n_dbz++;
    if (a[30:23] == 0 && a[22:0] != 0) n_denorm++;
    if (!fpu_flags.invalid && e[30:23] == 0 && e[22:0] != 0) n_denorm++;
    if (fpu_result !== e) $display("  got %h expected %h", fpu_result, e);
  endtask

  task automatic uart_xfer(input logic [7:0] v);
    int n;
    @(negedge clk);
    TxDataT = v; Shift_LdF = 0;
    @(negedge clk); Shift_LdF = 1;
    n = 0;
    while (!(DataRdyT && RxData == v) && n < 400) begin @(negedge clk); n++; end
    chk(DataRdyT && RxData == v, $sformatf("uart loopback %h", v));
    if (DataRdyT && RxData == v) n_frames++;
    while (!XmitMT) @(negedge clk);
  endtask

  initial begin
    int run;
    repeat (3) @(negedge clk);
    rst_n = 1; clrn = 1; ResetF = 1;

    // ---------------- core: swap program
    run = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      if (retired) run++;
    end
    chk(run >= 12, "core retires every clock");
    if (run >= 12) n_retire_run++;
    chk(acc == 8'hFF && !illegal_op, "accumulator");
    // read the result back through the Z pointer (R30) of the register file
    wr_reg = 1; dest = 0; rd = 4'd14;
    c = 8'h64; @(negedge clk); chk(addrbus == 8'h64 && zp_data == 8'h88, "Z -> swapped [64]");
    c = 8'h48; @(negedge clk); chk(zp_data == 8'hFF, "Z -> temporary [48]");
    wr_reg = 0; inc_zp = 1; @(negedge clk); inc_zp = 0;
    chk(addrbus == 8'h49, "Z post-increment");
    c = 8'h65; wr_reg = 1; @(negedge clk); wr_reg = 0;
    chk(zp_data == 8'hFF, "Z -> swapped [65]");
    if (zp_data == 8'hFF) n_zread++;

    // ---------------- register file
    wr_reg = 1; rd = 4'd0; rr = 4'd0; c = 8'h04;
    @(negedge clk); chk(reg_rd == 8'h04 && reg_rr == 8'h04, "R16 = 04");
    c = 8'h09; @(negedge clk); chk(reg_rd == 8'h09, "R16 = 09");
    c = 8'h24; dest = 1; rr = 4'd5; @(negedge clk);
    chk(reg_rr == 8'h24 && reg_rd == 8'h09, "R21 = 24 through dest");
    dest = 0; rd = 4'd14; c = 8'hA0; @(negedge clk);
    chk(addrbus == 8'hA0, "Z = A0");
    wr_reg = 0; inc_zp = 1; @(negedge clk); inc_zp = 0;
    chk(addrbus == 8'hA1, "Z incremented"); if (addrbus == 8'hA1) n_zinc++;
    dec_zp = 1; repeat (2) @(negedge clk); dec_zp = 0;
    chk(addrbus == 8'h9F, "Z decremented"); if (addrbus == 8'h9F) n_zdec++;
    clrn = 0; #1;
    chk(addrbus == 8'h00 && reg_rr == 8'h00, "register file cleared");
    if (addrbus == 8'h00) n_clear++;
    @(negedge clk); clrn = 1;

    // ---------------- significand units
    opa = 24'h16; opb = 24'h12; add = 1; #1 chk(sum == 24'h28 && !co, "16h+12h");
    add = 0; #1 chk(sum == 24'h04 && co, "16h-12h");
    opa = 24'h7; opb = 24'h9; #1 chk(sum == 24'hFFFFFE && !co, "7-9 borrows");
    if (!co) n_borrow++;
    opa1 = 24'd6; opb1 = 24'd8; #1 chk(prod == 48'h30, "6*8");
    opa1 = 24'h0C; opb1 = 24'h11; #1 chk(prod == 48'hCC, "0Ch*11h");
    dividend = 24'h0C; divisor = 24'd4; #1 chk(quo == 24'd3 && remainder == 0, "0Ch/4");
    dividend = 24'd100; divisor = 24'd7; #1 chk(quo == 24'd14 && remainder == 24'd2, "100/7");

    // ---------------- IEEE-754 FPU
    fp(0, 0, 32'h3FC0_0000, 32'h4010_0000, 32'h4070_0000, "1.5+2.25");
    fp(1, 0, 32'h41B0_0000, 32'h4190_0000, 32'h4080_0000, "22-18");
    fp(2, 0, 32'h40C0_0000, 32'h4100_0000, 32'h4240_0000, "6*8");
    fp(3, 0, 32'h4140_0000, 32'h4080_0000, 32'h4040_0000, "12/4");
    fp(3, 0, 32'h3F80_0000, 32'h4040_0000, 32'h3EAA_AAAB, "1/3 nearest");
    fp(3, 1, 32'h3F80_0000, 32'h4040_0000, 32'h3EAA_AAAA, "1/3 to zero");
    fp(3, 2, 32'hBF80_0000, 32'h4040_0000, 32'hBEAA_AAAA, "-1/3 up");
    fp(3, 3, 32'hBF80_0000, 32'h4040_0000, 32'hBEAA_AAAB, "-1/3 down");
    fp(3, 2, 32'h3F80_0000, 32'h4040_0000, 32'h3EAA_AAAB, "1/3 up");
    fp(2, 0, 32'h7F7F_FFFF, 32'h4000_0000, 32'h7F80_0000, "overflow");
    chk(fpu_flags.overflow && fpu_flags.inexact, "overflow flags");
    fp(2, 0, 32'h0080_0001, 32'h3F00_0000, 32'h0040_0000, "underflow");
    chk(fpu_flags.underflow, "underflow flag");
    fp(0, 0, 32'h0000_0001, 32'h0000_0001, 32'h0000_0002, "denormal add");
    fp(1, 0, 32'h7F80_0000, 32'h7F80_0000, QNAN, "inf-inf");
    chk(fpu_flags.invalid, "invalid flag");
    fp(3, 0, 32'h3F80_0000, 32'h0000_0000, 32'h7F80_0000, "1/0");
    chk(fpu_flags.div_by_zero, "div by zero flag");
    fp(1, 3, 32'h4000_0000, 32'h4000_0000, 32'h8000_0000, "2-2 rounding down");
    chk(fpu_zero, "zero flag");

    // ---------------- UART loopback
    uart_xfer(8'h54); uart_xfer(8'hCC); uart_xfer(8'hE3);

    // ---------------- hardware stack
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); stk_push = 1; stk_din = 8'(8'h10 + i);
    end
    @(negedge clk); stk_push = 0;
    chk(stk_full && stk_top == 8'h14, "stack full");
    for (int i = 0; i < 5; i++) begin
      if (i < 4) chk(stk_top == 8'(8'h14 - i), "stack LIFO order");
      stk_pop = 1;
      @(negedge clk);
    end
    stk_pop = 0;
    @(negedge clk);
    chk(stk_empty, "stack empty");

    // ---------------- mechanisms
    chk(n_retire_run > 0, "mechanism: single-clock pipelined execution");
    chk(n_zinc > 0 && n_zdec > 0, "mechanism: Z pointer increment/decrement");
    chk(n_clear > 0, "mechanism: register clear");
    chk(n_zread > 0, "mechanism: data RAM read through the Z pointer");
    chk(n_borrow > 0, "mechanism: subtract borrow");
    for (int m = 0; m < 4; m++) chk(n_rm[m] > 0, $sformatf("mechanism: rounding mode %0d", m));
    chk(n_ovf > 0 && n_unf > 0, "mechanism: overflow and underflow");
    chk(n_inv > 0 && n_dbz > 0, "mechanism: invalid and divide by zero");
    chk(n_denorm > 0, "mechanism: denormal operand/result");
    chk(n_frames == 3, "mechanism: UART frames");
    chk(n_stk_ovf == 1 && n_stk_unf == 1, "mechanism: stack overflow/underflow");
    $display("mechanisms: zread=%0d retire_runs=%0d zinc=%0d zdec=%0d clear=%0d borrow=%0d rm=%0d/%0d/%0d/%0d ovf=%0d unf=%0d inv=%0d dbz=%0d denorm=%0d frames=%0d stk_ovf=%0d stk_unf=%0d",
             n_zread, n_retire_run, n_zinc, n_zdec, n_clear, n_borrow, n_rm[0], n_rm[1], n_rm[2], n_rm[3],
             n_ovf, n_unf, n_inv, n_dbz, n_denorm, n_frames, n_stk_ovf, n_stk_unf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
