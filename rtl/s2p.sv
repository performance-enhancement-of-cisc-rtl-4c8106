// Serial-to-parallel converter of the UART receiver.
// On each clock with en high, si enters at bit 0 and po shifts left, so a
// run of ones gives po = 00000001, 00000011, 00000111, ... and the first bit
// received ends up at the MSB (matching the MSB-first transmitter).
// The shift direction follows the original converter; the enable and the
// active-low reset are this design's additions.
module s2p #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         si,
  output logic [W-1:0] po
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  po <= '0;
    else if (en) po <= {po[W-2:0], si};
  end
endmodule
