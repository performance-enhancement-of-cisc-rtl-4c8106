// UART receiver: an eleven-state machine S0..S10 with 16x oversampling
// around the s2p shift register. S0 idle waits for the synchronised line to
// fall. S1 counts 8 ticks to the middle of the start bit and goes back to S0
// if the line is high again (a glitch). S2..S9 wait 16 ticks each and sample
// one data bit at its middle into s2p (first bit ends at the MSB). S10
// samples the stop bit: if it is 1 the byte is copied to RxData and DataRdyT
// rises; a missing stop bit drops the byte. DataRdyT stays high until the
// next start bit is seen. tick16 is a one-clock enable at 16 times the bit
// rate.
// The S0..S10 state set and the serial-to-parallel shift follow the original
// design; the mid-bit sampling, glitch check, stop-bit check, DataRdyT
// behaviour and the two-flop input synchroniser are this design's choices.
module uart_rx #(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick16,
  input  logic          RxSerial_In,
  output logic [DW-1:0] RxData,
  output logic          DataRdyT
);
  localparam int unsigned NS = DW + 3;
  localparam int unsigned SW = $clog2(NS);
  localparam logic [SW-1:0] S_IDLE  = '0;
  localparam logic [SW-1:0] S_START = SW'(1);
  localparam logic [SW-1:0] S_STOP  = SW'(NS - 1);

  logic [1:0]    sync;
  logic          rxd;
  logic [SW-1:0] state;
  logic [3:0]    tcnt;
  logic          sample;
  logic [DW-1:0] po;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], RxSerial_In};
  end
  assign rxd = sync[1];

  // data bits are sampled 16 ticks apart, starting 16 ticks after mid-start
  assign sample = tick16 && (tcnt == 4'd15) && (state > S_START) && (state < S_STOP);

  s2p #(.W(DW)) u_s2p (.clk, .rst_n, .en(sample), .si(rxd), .po);

  a_state_range: assert property (@(posedge clk) disable iff (!rst_n) state <= S_STOP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      tcnt     <= '0;
      RxData   <= '0;
      DataRdyT <= 1'b0;
    end else if (tick16) begin
      unique case (state)
        S_IDLE: begin
          tcnt <= '0;
          if (!rxd) begin
            state    <= S_START;
            DataRdyT <= 1'b0;
          end
        end
        S_START: begin
          tcnt <= tcnt + 4'd1;
          if (tcnt == 4'd7) begin
            tcnt  <= '0;
            state <= rxd ? S_IDLE : state + SW'(1);
          end
        end
        default: begin
          tcnt <= tcnt + 4'd1;
          if (tcnt == 4'd15) begin
            if (state == S_STOP) begin
              state <= S_IDLE;
              if (rxd) begin
                RxData   <= po;
                DataRdyT <= 1'b1;
              end
            end else begin
              state <= state + SW'(1);
            end
          end
        end
      endcase
    end
  end
endmodule
