// Self-checking testbench of the IEEE-754 single-precision FPU.
// The reference is computed independently in double precision: the exact
// operands are built from their bit fields, the operation is done in a
// `real`, and the double is rounded to single precision by integer code for
// each of the four rounding modes. For add and subtract with directed
// rounding the operands are kept within 28 binades of each other so that the
// double sum is exact; round-to-nearest is correct for any operands because
// double precision has more than twice the single-precision bits plus two.
// Special values, signed zeros, overflow, underflow and division by zero are
// checked with directed vectors. Every result must appear exactly one clock
// after start.
module tb_fpu;
  import mcu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fpu_op_e op = FPU_ADD;
  fpu_rmode_e rmode = RM_NEAREST_EVEN;
  logic [31:0] opa = '0, opb = '0, result;
  fpu_flags_t flags;
  logic zero, valid;
  int checks = 0, failures = 0;

  fpu dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real f2r(input logic [31:0] x);
    int   e;
    real  m;
    e = int'(x[30:23]);
    m = real'({(e != 0), x[22:0]});
    if (e == 0) e = 1;
    f2r = (x[31] ? -m : m) * (2.0 ** (e - 150));
  endfunction

  // round a non-zero double to single precision
  function automatic logic [31:0] rnd(input real d, input logic [1:0] rm,
                                      output logic inx, output logic ovf);
    logic [63:0] b, m, q, rem, half;
    logic        s, inc;
    int          ex, sh;
    logic [63:0] val;
    b    = $realtobits(d);
    s    = b[63];
    ex   = int'(b[62:52]) - 1023;
    m    = {11'd0, 1'b1, b[51:0]};
    sh   = (ex >= -126) ? 29 : 29 + (-126 - ex);
    if (sh > 60) sh = 60;
    q    = m >> sh;
    rem  = m & ((64'd1 << sh) - 1);
    half = 64'd1 << (sh - 1);
    case (rm)
      2'd0: inc = (rem > half) || (rem == half && q[0]);
      2'd1: inc = 1'b0;
      2'd2: inc = (rem != 0) && !s;
      default: inc = (rem != 0) && s;
    endcase
    q   = q + 64'(inc);
    inx = (rem != 0);
    ovf = 1'b0;
    if (ex >= -126) val = 64'(ex + 126) * 64'h80_0000 + q;
    else            val = q;
    if (val >= 64'(255) * 64'h80_0000) begin
      ovf = 1'b1;
      inx = 1'b1;
      case (rm)
        2'd0: val = 64'h7F80_0000;
        2'd1: val = 64'h7F7F_FFFF;
        2'd2: val = s ? 64'h7F7F_FFFF : 64'h7F80_0000;
        default: val = s ? 64'h7F80_0000 : 64'h7F7F_FFFF;
      endcase
    end
    rnd = {s, val[30:0]};
  endfunction

  // reference for finite, non-NaN operands
  function automatic logic [31:0] ref_fp(input logic [1:0] o, input logic [1:0] rm,
                                         input logic [31:0] a, input logic [31:0] bb,
                                         output logic inx, output logic ovf);
    real ra, rb, d;
    logic sbe;
    ra = f2r(a);
    rb = f2r(bb);
    inx = 0; ovf = 0;
    sbe = bb[31] ^ (o == 2'd1);
    case (o)
      2'd0: d = ra + rb;
      2'd1: d = ra - rb;
      2'd2: d = ra * rb;
      default: d = ra / rb;
    endcase
    if (d == 0.0) begin
      if (o <= 2'd1) ref_fp = {(a[31] == sbe) ? a[31] : (rm == 2'd3), 31'd0};
      else           ref_fp = {a[31] ^ bb[31], 31'd0};
    end else begin
      ref_fp = rnd(d, rm, inx, ovf);
    end
  endfunction

  task automatic run(input logic [1:0] o, input logic [1:0] rm,
                     input logic [31:0] a, input logic [31:0] bb,
                     input logic [31:0] exp_res, input bit chk_flags,
                     input logic exp_inx, input logic exp_ovf);
    @(negedge clk);
    op = fpu_op_e'(o); rmode = fpu_rmode_e'(rm); opa = a; opb = bb; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!valid || result !== exp_res ||
        (chk_flags && (flags.inexact !== exp_inx || flags.overflow !== exp_ovf))) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%0d rm=%0d a=%h b=%h got=%h exp=%h valid=%b inx=%b/%b ovf=%b/%b",
                 o, rm, a, bb, result, exp_res, valid, flags.inexact, exp_inx,
                 flags.overflow, exp_ovf);
    end
  endtask

  task automatic run_ref(input logic [1:0] o, input logic [1:0] rm,
                         input logic [31:0] a, input logic [31:0] bb);
    logic [31:0] e;
    logic inx, ovf;
    int d;
    e = ref_fp(o, rm, a, bb, inx, ovf);
    d = int'(a[30:23]) - int'(bb[30:23]);
    // the flags are checked only where the double result is exact
    run(o, rm, a, bb, e, !(o <= 2'd1 && (d > 28 || d < -28)), inx, ovf);
  endtask

  task automatic run_special(input logic [1:0] o, input logic [31:0] a,
                             input logic [31:0] bb, input logic [31:0] e,
                             input logic inv, input logic dbz);
    run(o, 2'd0, a, bb, e, 1'b0, 1'b0, 1'b0);
    checks++;
    if (flags.invalid !== inv || flags.div_by_zero !== dbz) begin
      failures++;
      $display("FAIL flags op=%0d a=%h b=%h inv=%b dbz=%b", o, a, bb,
               flags.invalid, flags.div_by_zero);
    end
  endtask

  function automatic logic [31:0] rand_fp(input int kind);
    logic [31:0] r;
    r = $urandom;
    case (kind)
      0: if (r[30:23] == 8'hFF) r[30:23] = 8'hFE;            // any finite
      1: r[30:23] = 8'(120 + $urandom_range(0, 14));          // near 1.0
      2: r[30:23] = 8'd0;                                     // denormal
      3: r[30:23] = 8'(1 + $urandom_range(0, 3));             // small normal
      default: r[30:23] = 8'(250 + $urandom_range(0, 4));     // huge
    endcase
    return r;
  endfunction

  initial begin
    logic [31:0] a, bb;
    logic [1:0]  o, rm;
    int ka, kb;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- directed values
    run_ref(2'd0, 2'd0, 32'h3FC0_0000, 32'h4010_0000);   // 1.5 + 2.25
    run_ref(2'd1, 2'd0, 32'h41B0_0000, 32'h4190_0000);   // 22 - 18
    run_ref(2'd2, 2'd0, 32'h40C0_0000, 32'h4100_0000);   // 6 * 8
    run_ref(2'd3, 2'd0, 32'h4140_0000, 32'h4080_0000);   // 12 / 4
    run(2'd0, 2'd0, 32'h4180_0000, 32'h4140_0000, 32'h41E0_0000, 1'b1, 0, 0); // 16+12=28
    run(2'd3, 2'd0, 32'h3F80_0000, 32'h4040_0000, 32'h3EAA_AAAB, 1'b1, 1, 0); // 1/3
    run(2'd3, 2'd1, 32'h3F80_0000, 32'h4040_0000, 32'h3EAA_AAAA, 1'b1, 1, 0);
    run(2'd1, 2'd0, 32'h3F80_0000, 32'h3F80_0000, 32'h0000_0000, 1'b1, 0, 0); // 1-1=+0
    run(2'd1, 2'd3, 32'h3F80_0000, 32'h3F80_0000, 32'h8000_0000, 1'b1, 0, 0); // -0 rounding down
    run(2'd2, 2'd0, 32'h7F7F_FFFF, 32'h4000_0000, 32'h7F80_0000, 1'b1, 1, 1); // overflow
    run(2'd2, 2'd1, 32'h7F7F_FFFF, 32'h4000_0000, 32'h7F7F_FFFF, 1'b1, 1, 1);
    run(2'd0, 2'd0, 32'h0000_0001, 32'h0000_0001, 32'h0000_0002, 1'b1, 0, 0); // denormals
    run(2'd2, 2'd2, 32'h0080_0000, 32'h3400_0000, 32'h0000_0001, 1'b1, 0, 0); // exactly 2^-149
    run(2'd2, 2'd2, 32'h0080_0000, 32'h3300_0000, 32'h0000_0001, 1'b1, 1, 0); // 2^-150 rounds up
    run(2'd2, 2'd0, 32'h0080_0000, 32'h3300_0000, 32'h0000_0000, 1'b1, 1, 0); // tie to even zero
    run(2'd2, 2'd0, 32'h0080_0000, 32'h3F00_0000, 32'h0040_0000, 1'b1, 0, 0); // exact denormal
    checks++;
    if (flags.underflow !== 1'b0) begin failures++; $display("FAIL exact underflow"); end
    run(2'd2, 2'd0, 32'h0080_0001, 32'h3F00_0000, 32'h0040_0000, 1'b1, 1, 0);
    checks++;
    if (flags.underflow !== 1'b1) begin failures++; $display("FAIL underflow flag"); end
    // specials
    run_special(2'd0, 32'h7F80_0000, 32'hFF80_0000, QNAN, 1, 0);       // inf - inf
    run_special(2'd1, 32'h7F80_0000, 32'h7F80_0000, QNAN, 1, 0);
    run_special(2'd0, 32'h7F80_0000, 32'h3F80_0000, 32'h7F80_0000, 0, 0);
    run_special(2'd1, 32'h3F80_0000, 32'h7F80_0000, 32'hFF80_0000, 0, 0);
    run_special(2'd2, 32'h7F80_0000, 32'h0000_0000, QNAN, 1, 0);       // inf * 0
    run_special(2'd2, 32'hFF80_0000, 32'h4000_0000, 32'hFF80_0000, 0, 0);
    run_special(2'd2, 32'h8000_0000, 32'h4000_0000, 32'h8000_0000, 0, 0);
    run_special(2'd3, 32'h0000_0000, 32'h0000_0000, QNAN, 1, 0);       // 0 / 0
    run_special(2'd3, 32'h7F80_0000, 32'hFF80_0000, QNAN, 1, 0);       // inf / inf
    run_special(2'd3, 32'hBF80_0000, 32'h0000_0000, 32'hFF80_0000, 0, 1); // -1 / 0
    run_special(2'd3, 32'h3F80_0000, 32'hFF80_0000, 32'h8000_0000, 0, 0); // 1 / -inf
    run_special(2'd3, 32'hFF80_0000, 32'h4000_0000, 32'hFF80_0000, 0, 0);
    run_special(2'd0, 32'h7FC0_1234, 32'h3F80_0000, QNAN, 0, 0);       // quiet NaN
    run_special(2'd2, 32'h3F80_0000, 32'h7F80_0001, QNAN, 1, 0);       // signalling NaN
    checks++;
    if (zero !== 1'b0) begin failures++; $display("FAIL zero flag"); end
    run_special(2'd2, 32'h0000_0000, 32'h4000_0000, 32'h0000_0000, 0, 0);
    checks++;
    if (zero !== 1'b1) begin failures++; $display("FAIL zero flag set"); end

    // ---- random vectors
    for (int n = 0; n < 40000; n++) begin
      o  = 2'($urandom_range(0, 3));
      rm = 2'($urandom_range(0, 3));
      ka = $urandom_range(0, 4);
      kb = $urandom_range(0, 4);
      a  = rand_fp(ka);
      bb = rand_fp(kb);
      if (o == 2'd3 && bb[30:0] == '0) bb[0] = 1'b1;
      if (o == 2'd2 && (a[30:0] == '0 || bb[30:0] == '0)) a[0] = 1'b1;
      if (o <= 2'd1 && rm != 2'd0) begin
        // keep the exact double sum: exponents within 28 of each other
        if (int'(a[30:23]) - int'(bb[30:23]) > 28 || int'(bb[30:23]) - int'(a[30:23]) > 28)
          bb[30:23] = a[30:23] - 8'($urandom_range(0, 20)) + 8'd10 > 8'hFE ? a[30:23] :
                      (a[30:23] < 8'd11 ? a[30:23] + 8'($urandom_range(0, 9)) : a[30:23] - 8'($urandom_range(0, 10)));
      end
      run_ref(o, rm, a, bb);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
