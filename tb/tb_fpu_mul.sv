// Testbench of the mantissa multiplier: the examples 6*8 = 30h, 3*4 = 0Ch,
// 0Ch*11h = 0CCh and 4*5, corner values and random 24-bit operands checked
// against a 48-bit product computed in the testbench.
module tb_fpu_mul;
  logic [23:0] opa1 = '0, opb1 = '0;
  logic [47:0] prod;
  int checks = 0, failures = 0;

  fpu_mul #(.W(24)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input logic [23:0] a, input logic [23:0] b);
    logic [47:0] e;
    opa1 = a; opb1 = b;
    #1;
    e = 48'(a) * 48'(b);
    checks++;
    if (prod !== e) begin
      failures++;
      $display("FAIL %h * %h got %h exp %h", a, b, prod, e);
    end
  endtask

  initial begin
    t(24'd6, 24'd8); checks++; if (prod != 48'h30) failures++;
    t(24'd3, 24'd4); t(24'h0C, 24'h11); t(24'd4, 24'd5);
    t('1, '1); t(24'h80_0000, 24'h80_0000); t(0, 24'h123456);
    repeat (2000) t(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
