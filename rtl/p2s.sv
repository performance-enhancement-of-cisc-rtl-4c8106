// Parallel-to-serial converter of the UART transmitter.
// load = 0 copies parallel into shift_reg on the next clock. Otherwise, on
// each clock with shift_en high, serial takes shift_reg's top bit and the
// register shifts left by one, a zero entering at bit 0, so data leave MSB
// first. serial is registered: it shows the bit shifted out last.
// The active-low load and the MSB-first left shift follow the original
// converter; the synchronous load, the shift enable and the reset value of
// serial (1, the line's idle level) are this design's choices.
module p2s #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,       // active low: load parallel
  input  logic         shift_en,
  input  logic [W-1:0] parallel,
  output logic [W-1:0] shift_reg,
  output logic         serial
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_reg <= '0;
      serial    <= 1'b1;
    end else if (!load) begin
      shift_reg <= parallel;
    end else if (shift_en) begin
      serial    <= shift_reg[W-1];
      shift_reg <= {shift_reg[W-2:0], 1'b0};
    end
  end
endmodule
