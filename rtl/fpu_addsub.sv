// Unsigned mantissa adder/subtractor.
// add = 1: {co, sum} = opa + opb. add = 0: {co, sum} = opa + ~opb + 1, so sum
// is opa - opb modulo 2^W and co = 1 means no borrow (opa >= opb).
// Purely combinational. Used on its own and inside the FPU for aligned
// significands. The width default (a 24-bit single-precision significand) and
// the borrow convention are this design's choices.
module fpu_addsub #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] opa,
  input  logic [W-1:0] opb,
  input  logic         add,
  output logic [W-1:0] sum,
  output logic         co
);
  logic [W-1:0] b_eff;
  assign b_eff     = add ? opb : ~opb;
  assign {co, sum} = {1'b0, opa} + {1'b0, b_eff} + (W+1)'(!add);
endmodule
