// Testbench of the data RAM: random writes against a model array, with
// the three read ports compared after every clock, including a chained read
// where port b is addressed by port a's data (the indirect access).
module tb_data_ram;
  logic clk = 0, we = 0;
  logic [6:0] waddr = '0, raddr_a = '0, raddr_b = '0, raddr_dbg = '0;
  logic [7:0] wdata = '0, rdata_a, rdata_b, rdata_dbg;
  logic [7:0] model [128];
  bit         known [128];
  int checks = 0, failures = 0;

  data_ram #(.DEPTH(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every location first
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); we = 1; waddr = 7'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      we = 1'($urandom); waddr = 7'($urandom); wdata = 8'($urandom);
      raddr_a = 7'($urandom); raddr_dbg = 7'($urandom);
      #1 raddr_b = rdata_a[6:0];
      #1;
      checks++;
      if (rdata_a !== model[raddr_a] || rdata_b !== model[model[raddr_a][6:0]] ||
          rdata_dbg !== model[raddr_dbg]) begin
        failures++;
        if (failures < 10) $display("FAIL read a=%h b=%h dbg=%h", raddr_a, raddr_b, raddr_dbg);
      end
      @(negedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
