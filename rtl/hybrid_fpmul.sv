// hybrid_fpmul: IEEE 754 multiplier for binary16, binary32 and binary64 with
// full denormal support, selected per operation by fm (0 half, 1 single,
// 2 double). Narrow operands and results occupy the upper bits of the 64-bit
// words.
//
// Datapath (all combinational):
//  1. hyb_unpack: left-aligned 53-bit mantissas, leading-zero counts and
//     binary64-biased, lz-adjusted exponents; special-value classes.
//  2. cs_multiplier: 53x53 carry-save product (sum/carry, 106 bits each).
//  3. hyb_exp_add gives the native exponent Ez; shift_amount turns Ez and the
//     lz counts into one signed shift that normalizes denormal operands,
//     denormalizes tiny results and right-aligns binary32/16 products to the
//     binary64 rounding position (bit 52).
//  4. cs_shifter shifts both carry-save vectors into a 161-bit field.
//  5. rounding_unit rounds the upper 54 bits using the lower 107 bits for
//     carry/guard/sticky, with the special compound adder and 2-signal select.
//  6. hyb_exp_add selects Ez or Ez+1 from the adder's overflow bits; hyb_pack
//     packs the result and raises flags {I, X, V, O, U}.
// rm is the IEEE rounding mode (00 RN, 01 RZ, 10 RP, 11 RM), folded with the
// result sign into the RN/RZ/RI classes the rounding unit implements.
module hybrid_fpmul
  import fp_pkg::*;
(
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic [1:0]  fm,
  input  logic [1:0]  rm,
  output logic [63:0] z,
  output logic [4:0]  flags
);
  fmt_e fmt;
  assign fmt = (fm == 2'd3) ? FM_DOUBLE : fmt_e'(fm);

  // ---- unpack ----------------------------------------------------------
  logic                   sa, sb, sz;
  logic [52:0]            ma, mb;
  logic signed [EXPW-1:0] ea, eb;
  logic [5:0]             lza, lzb;
  logic                   a_zero, a_inf, a_nan, a_snan;
  logic                   b_zero, b_inf, b_nan, b_snan;

  hyb_unpack u_ua (.x(a), .fm(fmt), .sign(sa), .mant(ma), .exp64(ea), .lz(lza),
                   .is_zero(a_zero), .is_inf(a_inf), .is_nan(a_nan), .is_snan(a_snan));
  hyb_unpack u_ub (.x(b), .fm(fmt), .sign(sb), .mant(mb), .exp64(eb), .lz(lzb),
                   .is_zero(b_zero), .is_inf(b_inf), .is_nan(b_nan), .is_snan(b_snan));

  assign sz = sa ^ sb;
  rclass_e rc;
  assign rc = round_class(rmode_e'(rm), sz);

  // ---- carry-save mantissa product --------------------------------------
  logic [105:0] ps, pc;
  cs_multiplier #(.N(53)) u_mul (.a(ma), .b(mb), .s(ps), .c(pc));

  // ---- exponent and shift amount ---------------------------------------
  logic signed [EXPW-1:0] ez_pre, ez;
  logic signed [7:0]      shift;
  logic                   denorm;
  logic                   v0, v1, sel1, vsel, inexact;

  hyb_exp_add u_exp (.ex(ea), .ey(eb), .fm(fmt), .v0(v0), .v1(v1), .sel1(sel1),
                     .ez_pre(ez_pre), .ez(ez));
  // The lz counts are already in ea/eb, so Ez is the normalized exponent.
  shift_amount u_sha (.ez(ez_pre), .xlz(lza), .ylz(lzb), .fm(fmt),
                      .shift(shift), .denorm(denorm));

  // ---- carry-save shift ------------------------------------------------
  logic [160:0] ss, sc;
  cs_shifter #(.W(106), .EXT(55)) u_sh (.s_in(ps), .c_in(pc), .shift(shift),
                                        .s_out(ss), .c_out(sc));

  // ---- rounding ----------------------------------------------------------
  logic [52:0] mr;
  rounding_unit #(.NL(107)) u_rnd (
    .sh(ss[160:107]), .ch(sc[160:107]), .sl(ss[106:0]), .cl(sc[106:0]),
    .rc(rc), .fm(fmt), .m(mr), .vsel(vsel), .sel1(sel1), .v0(v0), .v1(v1),
    .inexact(inexact)
  );

  // ---- pack ------------------------------------------------------------
  fp_flags_t fl;
  hyb_pack u_pk (
    .fm(fmt), .rc(rc), .sign(sz), .ez(ez), .denorm(denorm), .vsel(vsel),
    .m(mr), .inexact(inexact),
    .a_zero(a_zero), .a_inf(a_inf), .a_nan(a_nan), .a_snan(a_snan),
    .b_zero(b_zero), .b_inf(b_inf), .b_nan(b_nan), .b_snan(b_snan),
    .z(z), .flags(fl)
  );
  assign flags = fl;
endmodule
