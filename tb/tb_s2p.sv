// Testbench of the serial-to-parallel converter: shifting in ones must give
// 00000001, 00000011, ... 11111111; random bytes sent MSB first must appear
// whole on po; po holds while en is low.
module tb_s2p;
  logic clk = 0, rst_n = 0, en = 0, si = 0;
  logic [7:0] po;
  int checks = 0, failures = 0;

  s2p #(.W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s po=%b", what, po); end
  endtask

  initial begin
    logic [7:0] v, expv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(po == 8'd0, "reset");
    en = 1; si = 1;
    expv = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      expv = {expv[6:0], 1'b1};
      chk(po == expv, "ones");
    end
    en = 0; si = 0;
    @(negedge clk);
    chk(po == 8'hFF, "hold");
    repeat (50) begin
      v = 8'($urandom);
      en = 1;
      for (int i = 7; i >= 0; i--) begin si = v[i]; @(negedge clk); end
      en = 0;
      chk(po == v, "byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
