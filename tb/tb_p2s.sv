// Testbench of the parallel-to-serial converter: loads 00111110 (the value
// used as the converter's reference example), checks the load, one shift
// (shift_reg = 01111100, serial = 0) and the MSB-first bit order for random
// bytes, and that nothing moves while shift_en is low.
module tb_p2s;
  logic clk = 0, rst_n = 0, load = 1, shift_en = 0;
  logic [7:0] parallel = '0, shift_reg;
  logic serial;
  int checks = 0, failures = 0;

  p2s #(.W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sreg=%b serial=%b", what, shift_reg, serial); end
  endtask

  initial begin
    logic [7:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(serial == 1'b1, "idle level");
    parallel = 8'b0011_1110; load = 0;
    @(negedge clk); load = 1;
    chk(shift_reg == 8'b0011_1110, "load");
    shift_en = 1;
    @(negedge clk); shift_en = 0;
    chk(shift_reg == 8'b0111_1100 && serial == 1'b0, "first shift");
    @(negedge clk);
    chk(shift_reg == 8'b0111_1100, "hold without shift_en");
    repeat (50) begin
      v = 8'($urandom);
      parallel = v; load = 0;
      @(negedge clk); load = 1; shift_en = 1;
      for (int i = 7; i >= 0; i--) begin
        @(negedge clk);
        chk(serial == v[i], "bit order");
      end
      shift_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
