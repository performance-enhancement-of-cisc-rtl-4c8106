// Testbench of the 4-level hardware stack: random push/pop sequences against
// a queue model that drops its oldest entry when a fifth is pushed, checking
// top, empty, full and the overflow/underflow pulses after every clock.
module tb_hw_stack;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [7:0] din = '0, top;
  logic empty, full, overflow, underflow;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  int n_ovf = 0, n_unf = 0;

  hw_stack #(.DEPTH(4), .W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eo, eu;
    logic [7:0] et;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      push = ($urandom_range(0, 2) == 0) ? 1'b0 : 1'($urandom);
      pop  = 1'($urandom);
      din  = 8'($urandom);
      eo = push && !pop && q.size() == 4;
      eu = pop && !push && q.size() == 0;
      @(negedge clk);
      if (push && pop) begin
        if (q.size() > 0) void'(q.pop_front());
        q.push_front(din);
      end else if (push) begin
        q.push_front(din);
        if (q.size() > 4) void'(q.pop_back());
      end else if (pop) begin
        if (q.size() > 0) void'(q.pop_front());
      end
      et = (q.size() > 0) ? q[0] : 8'h00;
      if (eo) n_ovf++;
      if (eu) n_unf++;
      checks++;
      if (top !== et || empty !== (q.size() == 0) || full !== (q.size() == 4) ||
          overflow !== eo || underflow !== eu) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d top=%h exp %h size=%0d", n, top, et, q.size());
      end
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
