// comb_fpmul: combined IEEE binary32 / binary16 multiplier. op = 0 multiplies
// two binary32 numbers; op = 1 multiplies two binary16 numbers held in the
// upper halves a[31:16], b[31:16] and returns the binary16 product in
// z[31:16] (z[15:0] = 0). Sign is an XOR, the exponent goes through
// comb_exp_add and the mantissa through comb_mant_mul, which share one
// datapath between the two formats; binary16 mode switches far fewer bits.
// Unpack and pack handle zero, infinity and NaN (canonical quiet NaN,
// invalid for signaling NaN and infinity times zero) and raise flags
// {I, X, V, O, U}. Subnormal handling is this design's choice: subnormal
// operands read as zero and results below the normal range become a signed
// zero with U and X (flush to zero). Overflow gives infinity, or the
// largest finite number when the mode rounds toward zero.
// rm: 00 RN, 01 RZ, 10 RP, 11 RM. Combinational.
module comb_fpmul
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [1:0]  rm,
  input  logic        op,
  output logic [31:0] z,
  output logic [4:0]  flags
);
  logic       sa, sb, sz;
  logic       ea_z, eb_z, ea_m, eb_m, fa_z, fb_z, fa_msb, fb_msb;
  logic       a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, a_snan, b_snan;
  logic [23:0] ma, mb, mz;

  assign sa = a[31];
  assign sb = b[31];
  assign sz = sa ^ sb;

  // ---- unpack / check inputs --------------------------------------------
  assign ea_z   = op ? ~|a[30:26] : ~|a[30:23];
  assign eb_z   = op ? ~|b[30:26] : ~|b[30:23];
  assign ea_m   = op ?  &a[30:26] :  &a[30:23];
  assign eb_m   = op ?  &b[30:26] :  &b[30:23];
  assign fa_z   = op ? ~|a[25:16] : ~|a[22:0];
  assign fb_z   = op ? ~|b[25:16] : ~|b[22:0];
  assign fa_msb = op ? a[25] : a[22];
  assign fb_msb = op ? b[25] : b[22];
  assign a_zero = ea_z;
  assign b_zero = eb_z;
  assign a_inf  = ea_m & fa_z;
  assign b_inf  = eb_m & fb_z;
  assign a_nan  = ea_m & ~fa_z;
  assign b_nan  = eb_m & ~fb_z;
  assign a_snan = a_nan & ~fa_msb;
  assign b_snan = b_nan & ~fb_msb;
  assign ma = op ? {1'b1, a[25:16], 13'd0} : {1'b1, a[22:0]};
  assign mb = op ? {1'b1, b[25:16], 13'd0} : {1'b1, b[22:0]};

  // ---- exponent and mantissa paths ----------------------------------------
  logic             norm_shift, inexact;
  logic [7:0]       ez;
  logic signed [9:0] ez_full;

  comb_mant_mul u_mant (.ma(ma), .mb(mb), .op(op), .rm(rm), .sign(sz),
                        .mz(mz), .norm_shift(norm_shift), .inexact(inexact));
  comb_exp_add  u_exp  (.ea(a[30:23]), .eb(b[30:23]), .op(op), .norm_shift(norm_shift),
                        .ez(ez), .ez_full(ez_full));

  // ---- packing / exceptions ----------------------------------------------
  rclass_e rc;
  logic    ovf, tiny, nan_out;
  logic [7:0]  ef;
  logic [22:0] ff;
  assign rc   = round_class(rmode_e'(rm), sz);
  assign ovf  = op ? (ez_full >= 10'sd143) : (ez_full >= 10'sd255);
  assign tiny = op ? (ez_full <= 10'sd112) : (ez_full <= 10'sd0);
  assign nan_out = a_nan | b_nan | (a_inf & b_zero) | (a_zero & b_inf);

  fp_flags_t fl;
  always_comb begin
    fl = '0;
    ef = ez;
    ff = mz[22:0];
    if (nan_out) begin
      ef   = '1;
      ff   = {1'b1, 22'd0};
      fl.v = a_snan | b_snan | (a_inf & b_zero) | (a_zero & b_inf);
    end else if (a_inf || b_inf) begin
      ef = '1;
      ff = '0;
    end else if (a_zero || b_zero) begin
      ef = '0;
      ff = '0;
    end else if (ovf) begin
      fl.o = 1'b1;
      fl.x = 1'b1;
      if (rc == RC_RZ) begin
        ef = op ? 8'b11110_000 : 8'hFE;
        ff = '1;
      end else begin
        ef = '1;
        ff = '0;
      end
    end else if (tiny) begin
      fl.u = 1'b1;
      fl.x = 1'b1;
      ef   = '0;
      ff   = '0;
    end else begin
      fl.x = inexact;
    end
  end

  assign z     = op ? {nan_out ? 1'b0 : sz, ef[7:3], ff[22:13], 16'd0}
                    : {nan_out ? 1'b0 : sz, ef, ff};
  assign flags = fl;
endmodule
