// Internal data RAM of the CISC core: DEPTH bytes with one synchronous write
// port and three asynchronous read ports. Port a reads a direct address or
// the pointer register R0/R1 (bytes 0 and 1); port b is addressed by the
// core with port a's data, so indirect operands (@Ri) are read in the same
// clock; port dbg lets the outside world inspect the memory. The contents
// are not reset. Size and port count are this design's choices.
module data_ram #(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [7:0]    rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [7:0]    rdata_b,
  input  logic [AW-1:0] raddr_dbg,
  output logic [7:0]    rdata_dbg
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a   = mem[raddr_a];
  assign rdata_b   = mem[raddr_b];
  assign rdata_dbg = mem[raddr_dbg];
endmodule
