// Testbench of the mantissa adder/subtractor: the examples 16h+12h = 28h and
// 16h-12h = 4 (22+18 = 40, 22-18 = 4) and 7+4, 0B+9, then random operands
// checked against W+1-bit arithmetic in the testbench.
module tb_fpu_addsub;
  logic [23:0] opa = '0, opb = '0, sum;
  logic add = 1, co;
  int checks = 0, failures = 0;

  fpu_addsub #(.W(24)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input logic [23:0] a, input logic [23:0] b, input logic ad);
    logic [24:0] e;
    opa = a; opb = b; add = ad;
    #1;
    e = ad ? {1'b0, a} + {1'b0, b} : {1'b0, a} + {1'b0, ~b} + 25'd1;
    checks++;
    if ({co, sum} !== e) begin
      failures++;
      $display("FAIL a=%h b=%h add=%b got %b_%h exp %h", a, b, ad, co, sum, e);
    end
  endtask

  initial begin
    t(24'h16, 24'h12, 1); checks++; if (sum != 24'h28) failures++;
    t(24'h16, 24'h12, 0); checks++; if (sum != 24'h04 || !co) failures++;
    t(24'h07, 24'h04, 1); checks++; if (sum != 24'h0B) failures++;
    t(24'h0B, 24'h09, 1); checks++; if (sum != 24'h14) failures++;
    t(24'h04, 24'h09, 0); checks++; if (co) failures++;   // borrow
    repeat (2000) t(24'($urandom), 24'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
