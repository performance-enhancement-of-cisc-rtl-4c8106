// Testbench of the program memory: the three read ports must return the
// bytes of the swap test program at every address (wrapping at the end) and
// NOPs beyond it.
module tb_prog_rom;
  logic [7:0] addr = '0, d0, d1, d2;
  int checks = 0, failures = 0;
  localparam logic [7:0] PROG [23] = '{8'h74, 8'h00, 8'h75, 8'h00, 8'h64,
    8'h75, 8'h64, 8'hFF, 8'h75, 8'h01, 8'h65, 8'h75, 8'h65, 8'h88, 8'hE6,
    8'hF5, 8'h48, 8'hE7, 8'hF6, 8'hE5, 8'h48, 8'hF7, 8'h00};

  prog_rom #(.DEPTH(256)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] e(input int a);
    a = a % 256;
    return (a < 23) ? PROG[a] : 8'h00;
  endfunction

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1;
      checks++;
      if (d0 !== e(a) || d1 !== e(a + 1) || d2 !== e(a + 2)) begin
        failures++;
        $display("FAIL addr %h: %h %h %h", a, d0, d1, d2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
