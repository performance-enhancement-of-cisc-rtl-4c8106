// UART transmitter: an eleven-state machine S0..S10 around the p2s shift
// register. S0 is idle (line high, XmitMT = 1) and waits for a load strobe
// (Shift_LdF low), which copies TxDataT into the shift register. S1 sends the
// start bit (0), S2..S9 the DW data bits MSB first, S10 the stop bit (1),
// then the machine returns to S0. Every bit lasts 16 ticks of tick16, a
// one-clock enable at 16 times the bit rate. A load strobe outside S0 is
// ignored.
// The S0..S10 state set, the idle state S0 and the MSB-first shift follow the
// original design; the 16-tick bit time and the frame (no parity, one stop
// bit) are this design's choices.
module uart_tx #(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick16,      // 16 x bit-rate enable
  input  logic          Shift_LdF,   // load strobe, active low
  input  logic [DW-1:0] TxDataT,
  output logic          TxSerial_Out,
  output logic          XmitMT       // transmitter empty
);
  localparam int unsigned NS = DW + 3;   // S0 .. S(DW+2)
  localparam int unsigned SW = $clog2(NS);
  localparam logic [SW-1:0] S_IDLE  = '0;
  localparam logic [SW-1:0] S_START = SW'(1);
  localparam logic [SW-1:0] S_STOP  = SW'(NS - 1);

  logic [SW-1:0] state;
  logic [3:0]    tcnt;
  logic          bit_end;
  logic          load_n, shift_en, p2s_serial;
  logic [DW-1:0] sreg;

  assign bit_end  = tick16 && (tcnt == 4'd15);
  assign load_n   = !((state == S_IDLE) && !Shift_LdF);
  // a data bit is moved to the p2s output at the start of states S2..S9
  assign shift_en = bit_end && (state >= S_START) && (state < S_STOP - SW'(1));

  p2s #(.W(DW)) u_p2s (
    .clk, .rst_n, .load(load_n), .shift_en, .parallel(TxDataT),
    .shift_reg(sreg), .serial(p2s_serial)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tcnt  <= '0;
    end else if (state == S_IDLE) begin
      tcnt <= '0;
      if (!Shift_LdF) state <= S_START;
    end else if (tick16) begin
      tcnt <= tcnt + 4'd1;
      if (tcnt == 4'd15) state <= (state == S_STOP) ? S_IDLE : state + SW'(1);
    end
  end

  always_comb begin
    if (state == S_IDLE || state == S_STOP) TxSerial_Out = 1'b1;
    else if (state == S_START)              TxSerial_Out = 1'b0;
    else                                    TxSerial_Out = p2s_serial;
  end

  assign XmitMT = (state == S_IDLE);

  a_state_range: assert property (@(posedge clk) disable iff (!rst_n) state <= S_STOP);
  // the line is high whenever the transmitter is empty
  a_idle_high: assert property (@(posedge clk) disable iff (!rst_n) XmitMT |-> TxSerial_Out);

  // the shift register content below the bits already sent is not used
  logic unused;
  assign unused = ^sreg;
endmodule
