// UART: the transmitter and receiver of the enhanced controller sharing one
// bit-rate clock. ResetF (active low) resets both halves. Clk16xT is a
// one-clock tick at 16 times the bit rate and ClkEnbT gates it, so the UART
// stops when ClkEnbT is low. Pulling Shift_LdF low while XmitMT is high
// loads TxDataT and sends it as a frame of one start bit, DW data bits MSB
// first and one stop bit on TxSerial_Out. Frames arriving on RxSerial_In are
// presented on RxData with DataRdyT high. A frame takes 16 x (DW + 2) ticks.
// Port names follow the original design; the roles given to ClkEnbT and
// Clk16xT and the frame format are this design's reading of them.
module uart #(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          ResetF,
  input  logic          ClkEnbT,
  input  logic          Clk16xT,
  input  logic          Shift_LdF,
  input  logic [DW-1:0] TxDataT,
  output logic          TxSerial_Out,
  output logic          XmitMT,
  input  logic          RxSerial_In,
  output logic [DW-1:0] RxData,
  output logic          DataRdyT
);
  logic tick16;
  assign tick16 = Clk16xT & ClkEnbT;

  uart_tx #(.DW(DW)) u_tx (
    .clk, .rst_n(ResetF), .tick16, .Shift_LdF, .TxDataT, .TxSerial_Out, .XmitMT
  );

  uart_rx #(.DW(DW)) u_rx (
    .clk, .rst_n(ResetF), .tick16, .RxSerial_In, .RxData, .DataRdyT
  );
endmodule
