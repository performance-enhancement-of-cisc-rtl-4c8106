// Testbench of the general purpose register file. Keeps its own model of
// the sixteen registers and runs random writes through both dest settings,
// Z-pointer increments and decrements and asynchronous clears, comparing
// both read ports and addrbus (R30) after every clock. Also replays the
// register-file example: writing 04 and 09 into R16 and reading them back.
module tb_gprf;
  logic clk = 0, clrn = 0, wr_reg = 0, dest = 0, inc_zp = 0, dec_zp = 0;
  logic [7:0] c = '0, reg_rd, reg_rr, addrbus;
  logic [3:0] rd = '0, rr = '0;
  int checks = 0, failures = 0;
  logic [7:0] model [16];

  gprf #(.NREGS(16), .DW(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (reg_rd !== model[rd] || reg_rr !== model[rr] || addrbus !== model[14]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s rd=%0d rr=%0d got %h %h %h exp %h %h %h", what, rd, rr,
                 reg_rd, reg_rr, addrbus, model[rd], model[rr], model[14]);
    end
  endtask

  initial begin
    logic [3:0] wa;
    for (int i = 0; i < 16; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    clrn = 1;
    compare("after clear");
    // example: c=04 then c=09 written to R16, read on both ports
    wr_reg = 1; c = 8'h04; rd = 0; rr = 0;
    @(negedge clk); model[0] = 8'h04; compare("write 04");
    c = 8'h09; @(negedge clk); model[0] = 8'h09; compare("write 09");
    wr_reg = 0;
    // Z pointer
    wr_reg = 1; rd = 14; c = 8'hA0; @(negedge clk); model[14] = 8'hA0; wr_reg = 0;
    compare("Z load");
    inc_zp = 1; @(negedge clk); inc_zp = 0; model[14] = 8'hA1; compare("Z inc");
    dec_zp = 1; repeat (2) @(negedge clk); dec_zp = 0; model[14] = 8'h9F; compare("Z dec");
    for (int n = 0; n < 3000; n++) begin
      wr_reg = ($urandom_range(0, 2) != 0);
      dest   = 1'($urandom);
      rd     = 4'($urandom);
      rr     = 4'($urandom);
      c      = 8'($urandom);
      inc_zp = ($urandom_range(0, 3) == 0);
      dec_zp = ($urandom_range(0, 3) == 0);
      wa     = dest ? rr : rd;
      @(negedge clk);
      if (wr_reg) model[wa] = c;
      if (!(wr_reg && wa == 4'd14)) begin
        if (inc_zp && !dec_zp) model[14] = model[14] + 1;
        if (dec_zp && !inc_zp) model[14] = model[14] - 1;
      end
      compare("random");
      if (n % 500 == 499) begin
        #1 clrn = 0; #1;
        for (int i = 0; i < 16; i++) model[i] = '0;
        wr_reg = 0; inc_zp = 0; dec_zp = 0;
        compare("async clear");
        @(negedge clk); clrn = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
