// rounding_unit: rounds a carry-save product to the target precision with a
// single special compound adder, for all IEEE rounding classes (RN, RZ, RI).
//
// The carry-save product is split at the rounding position into an upper part
// SH/CH (54 bits: the 53-bit significand plus the overflow position) and a
// lower part SL/CL (NL bits). The lower part only yields carry c, guard g (MSB of SL+CL) and
// sticky t. In parallel the upper part is pre-added with a prediction bit
// p = MSB(SL) | MSB(CL) (0 in RZ): a full adder adds p to SH[0]+CH[0] giving
// lp and a carry cp, a row of half adders re-encodes SH/CH[53:1], and the
// special compound adder forms PH+p, PH+p+1 and PH+p+2. p guarantees that the
// needed increment INC - p is 0, 1 or 2 in every mode. round_select turns
// (p, c, g, t, lp, v0) into the adder selects; v0, the overflow bit of PH+p,
// picks the normalization (take bits [53:1] instead of [52:0]). In RN the
// LSB of the result is cleared on a tie (f0 / f1).
//
// The overflow bit position depends on the format (fm) because binary32 and
// binary16 products are right-aligned to the binary64 rounding position:
// P0[52] for binary64, P0[23] for binary32, P0[10] for binary16.
// Outputs: the normalized 53-bit mantissa m (hidden bit at 52/23/10), vsel =
// MSB of the selected adder output (the exponent adds one), and inexact.
// Combinational. Carry/guard/sticky come from a plain addition of SL+CL here,
// and the inexact output is this design's addition.
module rounding_unit
  import fp_pkg::*;
#(
  parameter int unsigned NL = 107
) (
  input  logic [53:0]   sh,
  input  logic [53:0]   ch,
  input  logic [NL-1:0] sl,
  input  logic [NL-1:0] cl,
  input  rclass_e       rc,
  input  fmt_e          fm,
  output logic [52:0]   m,
  output logic          vsel,
  output logic          sel1,
  output logic          v0,
  output logic          v1,
  output logic          inexact
);
  // ---- lower part: carry, guard, sticky --------------------------------
  logic [NL:0] low;
  logic        c, g, t;
  assign low = {1'b0, sl} + {1'b0, cl};
  assign c   = low[NL];
  assign g   = low[NL-1];
  assign t   = |low[NL-2:0];

  // ---- prediction bit, full adder and half-adder row ---------------------
  logic        p, lp, cp;
  logic [52:0] hs, hc;
  assign p  = (rc != RC_RZ) & (sl[NL-1] | cl[NL-1]);
  assign lp = sh[0] ^ ch[0] ^ p;
  assign cp = (sh[0] & ch[0]) | (sh[0] & p) | (ch[0] & p);
  assign hs = sh[53:1] ^ ch[53:1];
  assign hc = sh[53:1] & ch[53:1];

  // ---- special compound adder -------------------------------------------
  logic [53:0] ca_a, ca_b, z;
  logic [52:0] p0, p1;
  logic        sel0, sel0_novf, f0, f1;
  assign ca_a = {hs, lp};
  assign ca_b = {hc[51:0], cp, 1'b0};

  special_ca #(.M(54)) u_ca (
    .a(ca_a), .b(ca_b), .sel1(sel1), .sel0(sel0_novf), .z(z), .y0(p0), .y1(p1)
  );

  // ---- overflow bit position per format ----------------------------------
  always_comb begin
    unique case (fm)
      FM_HALF:   begin v0 = p0[10]; v1 = p1[10]; end
      FM_SINGLE: begin v0 = p0[23]; v1 = p1[23]; end
      default:   begin v0 = p0[52]; v1 = p1[52]; end
    endcase
  end

  round_select u_sel (
    .rc(rc), .p(p), .c(c), .g(g), .t(t), .lp(lp), .v0(v0),
    .sel1(sel1), .sel0(sel0), .sel0_novf(sel0_novf), .f0(f0), .f1(f1)
  );

  // ---- normalization and RN tie fix ----------------------------------------
  assign m    = v0 ? {z[53:2], z[1] & f1} : {z[52:1], z[0] & f0};
  assign vsel = sel1 ? v1 : v0;

  logic l_true;
  assign l_true  = lp ^ p ^ c;
  assign inexact = v0 ? (l_true | g | t) : (g | t);

  // sel0 (the overflow-aware select) only matters through sel1 and the
  // LSB mux; it is kept for observation in simulation.
  logic unused_sel0;
  assign unused_sel0 = sel0;
endmodule
