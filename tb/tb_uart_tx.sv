// Testbench of the UART transmitter. A tick is generated every 3 clocks.
// For random bytes it loads the byte, then samples the line in the middle of
// each 16-tick bit cell, expecting a start bit, the 8 data bits MSB first
// and a stop bit; XmitMT must be low during the frame and high after it,
// and the whole frame must last 160 ticks. A load while busy is ignored.
module tb_uart_tx;
  logic clk = 0, rst_n = 0, tick16 = 0, Shift_LdF = 1;
  logic [7:0] TxDataT = '0;
  logic TxSerial_Out, XmitMT;
  int checks = 0, failures = 0;
  int ticks = 0;

  uart_tx #(.DW(8)) dut (.*);
  always #5 clk = ~clk;

  int div = 0;
  always @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
    tick16 <= (div == 2);
    if (tick16) ticks <= ticks + 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wait_ticks(input int n);
    int t0;
    t0 = ticks;
    while (ticks < t0 + n) @(negedge clk);
  endtask

  initial begin
    logic [7:0] v;
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(XmitMT && TxSerial_Out, "idle");
    for (int n = 0; n < 20; n++) begin
      v = (n == 0) ? 8'h58 : 8'($urandom);
      TxDataT = v; Shift_LdF = 0;
      @(negedge clk); Shift_LdF = 1;
      t0 = ticks;
      chk(!XmitMT, "busy after load");
      wait_ticks(8);
      chk(TxSerial_Out == 1'b0, "start bit");
      // a load while busy must not disturb the frame
      TxDataT = ~v; Shift_LdF = 0; @(negedge clk); Shift_LdF = 1;
      for (int i = 7; i >= 0; i--) begin
        wait_ticks(16);
        chk(TxSerial_Out == v[i], "data bit");
      end
      wait_ticks(16);
      chk(TxSerial_Out == 1'b1 && !XmitMT, "stop bit");
      while (!XmitMT) @(negedge clk);
      chk(ticks - t0 == 160 || ticks - t0 == 161, "frame length 160 ticks");
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
