// hyb_unpack: unpacks one operand of the hybrid binary16/32/64 multiplier.
// binary64 uses all 64 bits; binary32 and binary16 operands sit in the upper
// bits (x[63:32], x[63:48]). The fraction is placed left-aligned under a
// hidden bit in a 53-bit mantissa, so all formats share the binary64
// multiplier. The hidden bit is the OR of the exponent bits; a denormal
// (exponent 0) gets exponent 1 by setting the exponent LSB. The exponent is
// moved to the binary64 bias with the inverter converters (+1008 / +896) and
// reduced by the mantissa's leading-zero count, giving a 13-bit two's
// complement value that can go below zero. The mantissa itself is not
// shifted here: the carry-save shifter normalizes the product instead.
// Also classifies zero, infinity, NaN and signaling NaN. Combinational.
module hyb_unpack
  import fp_pkg::*;
(
  input  logic [63:0]            x,
  input  fmt_e                   fm,
  output logic                   sign,
  output logic [52:0]            mant,
  output logic signed [EXPW-1:0] exp64,
  output logic [5:0]             lz,
  output logic                   is_zero,
  output logic                   is_inf,
  output logic                   is_nan,
  output logic                   is_snan
);
  logic [10:0] e64_raw, e16_w, e32_w;
  logic [51:0] frac;
  logic        emax, enz, fnz, fmsb, hidden;
  logic [4:0]  e16;
  logic [7:0]  e32;

  assign sign = x[63];
  assign e16  = x[62:58] | {4'd0, ~(|x[62:58])};   // denormal exponent reads as 1
  assign e32  = x[62:55] | {7'd0, ~(|x[62:55])};

  exp_widen #(.N(5), .W(11)) u_w16 (.e_in(e16), .e_out(e16_w));
  exp_widen #(.N(8), .W(11)) u_w32 (.e_in(e32), .e_out(e32_w));

  always_comb begin
    unique case (fm)
      FM_HALF: begin
        enz     = |x[62:58];
        emax    = &x[62:58];
        frac    = {x[57:48], 42'd0};
        e64_raw = e16_w;
      end
      FM_SINGLE: begin
        enz     = |x[62:55];
        emax    = &x[62:55];
        frac    = {x[54:32], 29'd0};
        e64_raw = e32_w;
      end
      default: begin
        enz     = |x[62:52];
        emax    = &x[62:52];
        frac    = x[51:0];
        e64_raw = x[62:52] | {10'd0, ~(|x[62:52])};
      end
    endcase
  end

  assign hidden = enz;
  assign mant   = {hidden, frac};
  assign fnz    = |frac;
  assign fmsb   = frac[51];

  logic [5:0] lz_cnt;
  lzc #(.W(53), .CW(6)) u_lzc (.x(mant), .cnt(lz_cnt));
  assign lz = lz_cnt;

  assign exp64   = $signed({2'b00, e64_raw}) - $signed({7'd0, lz_cnt});
  assign is_zero = ~enz & ~fnz;
  assign is_inf  = emax & ~fnz;
  assign is_nan  = emax & fnz;
  assign is_snan = emax & fnz & ~fmsb;
endmodule
