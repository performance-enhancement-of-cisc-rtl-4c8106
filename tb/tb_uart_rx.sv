// Testbench of the UART receiver. The testbench itself drives serial frames
// (16 ticks per bit, a tick every 2 clocks, MSB first): random bytes must
// arrive on RxData with DataRdyT; a frame with a low stop bit must be
// dropped; a start glitch shorter than half a bit must be ignored.
module tb_uart_rx;
  logic clk = 0, rst_n = 0, tick16 = 0, RxSerial_In = 1;
  logic [7:0] RxData;
  logic DataRdyT;
  int checks = 0, failures = 0;

  uart_rx #(.DW(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) tick16 <= ~tick16;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s RxData=%h rdy=%b", what, RxData, DataRdyT); end
  endtask

  task automatic send_bit(input logic b);
    RxSerial_In = b;
    repeat (32) @(negedge clk);   // 16 ticks
  endtask

  task automatic send(input logic [7:0] v, input logic stop);
    send_bit(0);
    for (int i = 7; i >= 0; i--) send_bit(v[i]);
    send_bit(stop);
    RxSerial_In = 1'b1;
  endtask

  initial begin
    logic [7:0] v, last;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    chk(!DataRdyT, "not ready after reset");
    for (int n = 0; n < 20; n++) begin
      v = (n == 0) ? 8'h58 : 8'($urandom);
      send(v, 1'b1);
      repeat (8) @(negedge clk);
      chk(DataRdyT && RxData == v, "byte received");
      last = v;
    end
    // bad stop bit: dropped
    send(8'hA5 ^ last, 1'b0);
    repeat (40) @(negedge clk);
    chk(!DataRdyT && RxData == last, "framing error drops byte");
    // glitch of 4 ticks
    RxSerial_In = 0; repeat (8) @(negedge clk); RxSerial_In = 1;
    repeat (400) @(negedge clk);
    chk(!DataRdyT && RxData == last, "glitch ignored");
    send(8'h3C, 1'b1);
    repeat (8) @(negedge clk);
    chk(DataRdyT && RxData == 8'h3C, "byte after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
