// Testbench of the restoring divider: the example 0Ch / 4 = 3 remainder 0,
// division by zero, and random operands (including small divisors) checked
// against the / and % operators of the testbench.
module tb_fpu_div;
  logic [23:0] opa = '0, opb = 24'd1, quo, remainder;
  int checks = 0, failures = 0;

  fpu_div #(.NW(24), .DW(24)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input logic [23:0] a, input logic [23:0] b);
    opa = a; opb = b;
    #1;
    checks++;
    if (b == 0 ? (quo !== '1 || remainder !== '0) : (quo !== a / b || remainder !== a % b)) begin
      failures++;
      $display("FAIL %h / %h got %h r %h", a, b, quo, remainder);
    end
  endtask

  initial begin
    t(24'h0C, 24'h4); checks++; if (quo != 24'd3 || remainder != 0) failures++;
    t(24'h123456, 0); t('1, '1); t('1, 24'd1); t(24'd5, 24'd7);
    repeat (1000) t(24'($urandom), 24'($urandom));
    repeat (1000) t(24'($urandom), 24'($urandom_range(1, 300)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
