// Hardware return-address stack, DEPTH entries of W bits (4 x 8 by default).
// Built as a shift register: push moves every entry down one place and puts
// din on top; pop moves every entry up and clears the bottom one; push and
// pop together replace the top entry. top is the newest entry. Pushing when
// full loses the oldest entry and pulses overflow; popping when empty
// returns zero and pulses underflow. All updates on the rising clock;
// rst_n (active low, asynchronous) empties the stack.
// The four-level hardware stack is the original design's; the width, the
// full/empty behaviour and the flags are this design's choices.
module hw_stack #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 8,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic         pop,
  input  logic [W-1:0] din,
  output logic [W-1:0] top,
  output logic         empty,
  output logic         full,
  output logic         overflow,
  output logic         underflow
);
  logic [W-1:0]  st [DEPTH];
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) st[i] <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      overflow  <= push && !pop && (count == CW'(DEPTH));
      underflow <= pop && !push && (count == '0);
      if (push && pop) begin
        st[0] <= din;
        if (count == '0) count <= CW'(1);
      end else if (push) begin
        st[0] <= din;
        for (int i = 1; i < DEPTH; i++) st[i] <= st[i-1];
        if (count != CW'(DEPTH)) count <= count + CW'(1);
      end else if (pop) begin
        for (int i = 0; i < DEPTH - 1; i++) st[i] <= st[i+1];
        st[DEPTH-1] <= '0;
        if (count != '0) count <= count - CW'(1);
      end
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));

  assign top   = st[0];
  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
endmodule
