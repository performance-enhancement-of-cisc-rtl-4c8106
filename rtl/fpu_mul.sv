// Unsigned mantissa multiplier: prod = opa1 * opb1, 2W bits wide.
// Written as a shift-and-add array: row i adds opa1 shifted left by i when
// bit i of opb1 is set. Purely combinational. The 24-bit default width (a
// single-precision significand, 48-bit product) is this design's choice.
module fpu_mul #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0]   opa1,
  input  logic [W-1:0]   opb1,
  output logic [2*W-1:0] prod
);
  always_comb begin
    prod = '0;
    for (int i = 0; i < W; i++)
      if (opb1[i]) prod = prod + ((2*W)'(opa1) << i);
  end
endmodule
