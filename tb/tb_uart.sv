// Testbench of the UART with TxSerial_Out looped back to RxSerial_In. It
// sends the bytes 54, CC, E3 and 58 and random bytes and expects each back on
// RxData with DataRdyT, within one frame time (160 ticks plus a few clocks).
// With ClkEnbT low nothing may move; ResetF must return the line to idle.
module tb_uart;
  logic clk = 0, ResetF = 0, ClkEnbT = 1, Clk16xT = 0, Shift_LdF = 1;
  logic [7:0] TxDataT = '0, RxData;
  logic TxSerial_Out, XmitMT, RxSerial_In, DataRdyT;
  int checks = 0, failures = 0;

  assign RxSerial_In = TxSerial_Out;
  uart #(.DW(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) Clk16xT <= ~Clk16xT;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s RxData=%h", what, RxData); end
  endtask

  task automatic xfer(input logic [7:0] v);
    int n;
    TxDataT = v; Shift_LdF = 0;
    @(negedge clk); Shift_LdF = 1;
    n = 0;
    while (!(DataRdyT && RxData == v) && n < 400) begin @(negedge clk); n++; end
    // 160 ticks = 320 clocks; the receiver sees the stop bit at mid-cell
    chk(DataRdyT && RxData == v, "loopback byte");
    chk(n >= 290 && n <= 320, "frame time");
    while (!XmitMT) @(negedge clk);
  endtask

  initial begin
    logic [7:0] hold;
    repeat (3) @(negedge clk);
    ResetF = 1;
    repeat (4) @(negedge clk);
    chk(XmitMT && TxSerial_Out && !DataRdyT, "idle");
    xfer(8'h54); xfer(8'hCC); xfer(8'hE3); xfer(8'h58);
    repeat (30) xfer(8'($urandom));
    // clock enable low: the transmitter must stay in its start bit
    TxDataT = 8'h0F; Shift_LdF = 0; @(negedge clk); Shift_LdF = 1;
    ClkEnbT = 0;
    hold = RxData;
    repeat (1000) @(negedge clk);
    chk(!XmitMT && TxSerial_Out == 1'b0 && RxData == hold, "frozen while disabled");
    ResetF = 0; @(negedge clk); ResetF = 1; ClkEnbT = 1;
    @(negedge clk);
    chk(XmitMT && TxSerial_Out && !DataRdyT, "reset to idle");
    xfer(8'h0F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
