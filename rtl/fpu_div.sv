// Unsigned restoring divider: quo = opa / opb, remainder = opa % opb.
// One row per quotient bit, MSB first: shift the next dividend bit into the
// partial remainder, subtract the divisor, keep the difference and set the
// quotient bit when it did not go negative. Purely combinational.
// Division by zero gives an all-ones quotient and a zero remainder; widths
// default to a 24-bit significand.
// The structure and defaults are this design's choices.
module fpu_div #(
  parameter int unsigned NW = 24,   // dividend / quotient width
  parameter int unsigned DW = 24    // divisor / remainder width
) (
  input  logic [NW-1:0] opa,
  input  logic [DW-1:0] opb,
  output logic [NW-1:0] quo,
  output logic [DW-1:0] remainder
);
  logic [DW:0] r;
  logic [DW:0] diff;
  always_comb begin
    r    = '0;
    quo  = '0;
    diff = '0;
    for (int i = NW - 1; i >= 0; i--) begin
      r    = {r[DW-1:0], opa[i]};
      diff = r - {1'b0, opb};
      if (!diff[DW]) begin
        r      = diff;
        quo[i] = 1'b1;
      end
    end
    remainder = r[DW-1:0];
    if (opb == '0) begin
      quo       = '1;
      remainder = '0;
    end
  end
endmodule
