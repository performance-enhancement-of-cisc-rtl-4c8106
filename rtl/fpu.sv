// IEEE-754 single-precision floating point unit: add, subtract, multiply and
// divide, each with the four rounding modes (nearest-even, towards zero,
// towards +infinity, towards -infinity). Denormal operands and results,
// signed zeros, infinities and NaNs are handled as the standard requires;
// every NaN result is the quiet NaN 7FC00000.
//
// How it works. The operands are unpacked into sign, biased exponent and a
// 24-bit significand (hidden bit explicit, denormals given exponent 1). Each
// operation then produces an unrounded significand in a common 50-bit frame,
// plus the exponent of its top bit and a sticky bit:
//   add/sub  the smaller operand is aligned to the larger with guard, round
//            and sticky bits and the two are added or subtracted by a 27-bit
//            fpu_addsub;
//   mul      the 24x24 significand product comes from fpu_mul;
//   div      both significands are normalised and fpu_div computes 27
//            quotient bits; a non-zero remainder sets sticky.
// A shared back end normalises (leading-zero count and left shift),
// denormalises results below the normal range, rounds to 24 bits and detects
// overflow. Special operands bypass this path.
//
// Interface and timing: opa, opb, op and rmode are taken when start is high;
// result, flags and zero are registered and valid pulses one clock later.
// The operation set, the rounding modes and the 32-bit format come from the
// design's specification; the encodings, the one-clock latency and the
// canonical NaN are this design's choices.
module fpu
  import mcu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  fpu_op_e    op,
  input  fpu_rmode_e rmode,
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  output logic [31:0] result,
  output fpu_flags_t  flags,
  output logic        zero,
  output logic        valid
);
  localparam int MW = 50;   // width of the common unrounded significand

  // ---------------------------------------------------------------- unpack
  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic [23:0] ma, mb;
  logic signed [12:0] xa, xb;     // effective biased exponents
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, a_snan, b_snan;

  assign {sa, ea, fa} = opa;
  assign eb = opb[30:23];
  assign fb = opb[22:0];
  // the sign of b is inverted for a subtraction
  assign sb = opb[31] ^ (op == FPU_SUB);

  assign ma = {ea != 8'd0, fa};
  assign mb = {eb != 8'd0, fb};
  assign xa = (ea == 8'd0) ? 13'sd1 : 13'(ea);
  assign xb = (eb == 8'd0) ? 13'sd1 : 13'(eb);

  assign a_zero = (ea == 8'd0)   && (fa == '0);
  assign b_zero = (eb == 8'd0)   && (fb == '0);
  assign a_inf  = (ea == 8'hFF)  && (fa == '0);
  assign b_inf  = (eb == 8'hFF)  && (fb == '0);
  assign a_nan  = (ea == 8'hFF)  && (fa != '0);
  assign b_nan  = (eb == 8'hFF)  && (fb != '0);
  assign a_snan = a_nan && !fa[22];
  assign b_snan = b_nan && !fb[22];

  function automatic logic [5:0] lzc24(input logic [23:0] v);
    lzc24 = 6'd24;
    for (int i = 0; i < 24; i++) if (v[i]) lzc24 = 6'(23 - i);
  endfunction

  function automatic logic [5:0] lzc50(input logic [MW-1:0] v);
    lzc50 = 6'(MW);
    for (int i = 0; i < MW; i++) if (v[i]) lzc50 = 6'(MW - 1 - i);
  endfunction

  // ------------------------------------------------------------- add / sub
  logic        swap, sl, ss, eff_sub;
  logic [23:0] ml, ms;
  logic signed [12:0] xl, xs;
  logic [7:0]  dshift;
  logic [58:0] align;
  logic [26:0] ml_ext, ms_al;
  logic [26:0] as_sum;
  logic        as_co;
  logic [27:0] as_res;

  assign swap    = opb[30:0] > opa[30:0];
  assign sl      = swap ? sb : sa;
  assign ss      = swap ? sa : sb;
  assign ml      = swap ? mb : ma;
  assign ms      = swap ? ma : mb;
  assign xl      = swap ? xb : xa;
  assign xs      = swap ? xa : xb;
  assign eff_sub = sl ^ ss;
  assign dshift  = (xl - xs > 13'sd32) ? 8'd32 : 8'(xl - xs);
  assign align   = {ms, 3'b000, 32'd0} >> dshift;
  assign ml_ext  = {ml, 3'b000};
  assign ms_al   = {align[58:33], align[32] | (|align[31:0])};

  fpu_addsub #(.W(27)) u_addsub (
    .opa(ml_ext), .opb(ms_al), .add(!eff_sub), .sum(as_sum), .co(as_co)
  );
  assign as_res = eff_sub ? {1'b0, as_sum} : {as_co, as_sum};

  // ------------------------------------------------------------------ mul
  logic [47:0] prod;
  fpu_mul #(.W(24)) u_mul (.opa1(ma), .opb1(mb), .prod(prod));

  // ------------------------------------------------------------------ div
  logic [23:0] man, mbn;
  logic signed [12:0] xan, xbn;
  logic [49:0] quo;
  logic [23:0] rem;

  assign man = ma << lzc24(ma);
  assign mbn = mb << lzc24(mb);
  assign xan = xa - 13'(lzc24(ma));
  assign xbn = xb - 13'(lzc24(mb));

  fpu_div #(.NW(50), .DW(24)) u_div (
    .opa({man, 26'd0}), .opb(mbn), .quo(quo), .remainder(rem)
  );
  // normalised significands give a quotient below 2^27: quo[49:27] is zero
  logic unused_quo;
  assign unused_quo = |quo[49:27];

  // --------------------------------------------- select unrounded result
  // value = mant * 2^(exp - 127 - (MW-1)) ; mant[MW-1] has weight 2^(exp-127)
  logic              u_sign, u_sticky;
  logic [MW-1:0]     u_mant;
  logic signed [12:0] u_exp;

  always_comb begin
    unique case (op)
      FPU_ADD, FPU_SUB: begin
        u_sign   = sl;
        u_mant   = {as_res, 22'd0};
        u_exp    = xl + 13'sd1;
        u_sticky = 1'b0;
        // exact zero from operands of opposite sign: +0, or -0 rounding down
        if (eff_sub && as_res == '0) u_sign = (rmode == RM_DOWN);
      end
      FPU_MUL: begin
        u_sign   = sa ^ opb[31];
        u_mant   = {prod, 2'b00};
        u_exp    = xa + xb - 13'sd126;
        u_sticky = 1'b0;
      end
      default: begin
        u_sign   = sa ^ opb[31];
        u_mant   = {quo[26:0], 23'd0};
        u_exp    = xan - xbn + 13'sd127;
        u_sticky = (rem != '0);
      end
    endcase
  end

  // ------------------------------------------- normalise, round, pack
  logic [5:0]         lz;
  logic [MW-1:0]      m1, m2;
  logic signed [12:0] e1;
  logic               tiny;
  logic [6:0]         dn;
  logic [MW+63:0]     dtmp;
  logic [23:0]        q;
  logic               rbit, sbit, inc;
  logic [24:0]        q2;
  logic signed [12:0] expo;
  logic [31:0]        r_norm;
  logic               r_ovf, r_inexact;

  always_comb begin
    lz    = lzc50(u_mant);
    m1    = u_mant << lz;
    e1    = u_exp - 13'(lz);
    tiny  = (e1 < 13'sd1);
    dn    = tiny ? ((13'sd1 - e1 > 13'sd60) ? 7'd60 : 7'(13'sd1 - e1)) : 7'd0;
    dtmp  = {m1, 64'd0} >> dn;
    m2    = dtmp[MW+63:64];
    q     = m2[MW-1:MW-24];
    rbit  = m2[MW-25];
    sbit  = (|m2[MW-26:0]) | (|dtmp[63:0]) | u_sticky;
    r_inexact = rbit | sbit;
    unique case (rmode)
      RM_NEAREST_EVEN: inc = rbit & (sbit | q[0]);
      RM_ZERO:         inc = 1'b0;
      RM_UP:           inc = r_inexact & !u_sign;
      default:         inc = r_inexact & u_sign;
    endcase
    q2    = {1'b0, q} + 25'(inc);
    r_ovf = 1'b0;
    expo  = '0;
    if (u_mant == '0) begin
      r_norm    = {u_sign, 31'd0};
      r_inexact = 1'b0;
      tiny      = 1'b0;
    end else if (tiny) begin
      // denormal: a carry into bit 23 turns it into the smallest normal
      r_norm = {u_sign, 6'd0, q2};
    end else begin
      expo  = e1 + 13'(q2[24]);
      r_ovf = (expo >= 13'sd255);
      r_norm = {u_sign, expo[7:0], q2[22:0]};
      if (r_ovf) begin
        r_inexact = 1'b1;
        unique case (rmode)
          RM_NEAREST_EVEN: r_norm = {u_sign, 8'hFF, 23'd0};
          RM_ZERO:         r_norm = {u_sign, 8'hFE, 23'h7FFFFF};
          RM_UP:           r_norm = u_sign ? {1'b1, 8'hFE, 23'h7FFFFF} : {1'b0, 8'hFF, 23'd0};
          default:         r_norm = u_sign ? {1'b1, 8'hFF, 23'd0} : {1'b0, 8'hFE, 23'h7FFFFF};
        endcase
      end
    end
  end

  // ------------------------------------------------------ special values
  logic [31:0] res_c;
  fpu_flags_t  flg_c;
  logic        s_mul;

  assign s_mul = sa ^ opb[31];

  always_comb begin
    res_c = r_norm;
    flg_c = '{invalid: 1'b0, div_by_zero: 1'b0, overflow: r_ovf,
              underflow: tiny & r_inexact, inexact: r_inexact};
    if (a_nan || b_nan) begin
      res_c = QNAN;
      flg_c = '0;
      flg_c.invalid = a_snan | b_snan;
    end else begin
      unique case (op)
        FPU_ADD, FPU_SUB: begin
          if (a_inf && b_inf && (sa != sb)) begin
            res_c = QNAN; flg_c = '0; flg_c.invalid = 1'b1;
          end else if (a_inf) begin
            res_c = {sa, 8'hFF, 23'd0}; flg_c = '0;
          end else if (b_inf) begin
            res_c = {sb, 8'hFF, 23'd0}; flg_c = '0;
          end
        end
        FPU_MUL: begin
          if ((a_inf && b_zero) || (a_zero && b_inf)) begin
            res_c = QNAN; flg_c = '0; flg_c.invalid = 1'b1;
          end else if (a_inf || b_inf) begin
            res_c = {s_mul, 8'hFF, 23'd0}; flg_c = '0;
          end else if (a_zero || b_zero) begin
            res_c = {s_mul, 31'd0}; flg_c = '0;
          end
        end
        default: begin
          if ((a_zero && b_zero) || (a_inf && b_inf)) begin
            res_c = QNAN; flg_c = '0; flg_c.invalid = 1'b1;
          end else if (a_inf) begin
            res_c = {s_mul, 8'hFF, 23'd0}; flg_c = '0;
          end else if (b_zero) begin
            res_c = {s_mul, 8'hFF, 23'd0}; flg_c = '0; flg_c.div_by_zero = 1'b1;
          end else if (a_zero || b_inf) begin
            res_c = {s_mul, 31'd0}; flg_c = '0;
          end
        end
      endcase
    end
  end

  // --------------------------------------------------------- output reg
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
      flags  <= '0;
      zero   <= 1'b0;
      valid  <= 1'b0;
    end else begin
      valid <= start;
      if (start) begin
        result <= res_c;
        flags  <= flg_c;
        zero   <= (res_c[30:0] == '0);
      end
    end
  end

  // every start is answered exactly one clock later
  a_latency: assert property (@(posedge clk) disable iff (!rst_n) start |=> valid);
  a_no_spurious: assert property (@(posedge clk) disable iff (!rst_n) !start |=> !valid);

endmodule
