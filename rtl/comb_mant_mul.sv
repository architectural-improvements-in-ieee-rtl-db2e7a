// comb_mant_mul: combined binary32/binary16 mantissa multiplication with
// rounding. Both formats use 24-bit mantissas; a binary16 mantissa is 11 bits
// left-aligned (low 13 bits zero). Steps:
//  1. P = Ma * Mb (48 bits, in [1,4)).
//  2. Normalizer: NP = P >> 1 when P[47] is set, else P.
//  3. Sticky T from P in parallel with normalization: binary32 OR(P[21:0])
//     or OR(P[22:0]); binary16 OR(P[34:25]) or OR(P[35:25]). Last and guard
//     bits are NP[23]/NP[22] (binary32) or NP[36]/NP[35] (binary16).
//  4. RV = 0 (RZ), G&(L|T) (RN), ~S&(G|T) (RP), S&(G|T) (RM).
//  5. RV is shifted left by 13 in binary16 mode and added to NP[46:23] by a
//     24-bit carry-propagate adder; a carry out renormalizes the result.
// norm_shift (to the exponent adder) is P[47] or the rounding carry out.
// The multiplier is a product operator and the rounding carry is taken from
// the adder's carry out; these are this design's choices. Combinational.
module comb_mant_mul (
  input  logic [23:0] ma,
  input  logic [23:0] mb,
  input  logic        op,
  input  logic [1:0]  rm,
  input  logic        sign,
  output logic [23:0] mz,
  output logic        norm_shift,
  output logic        inexact
);
  logic [47:0] p, np;
  logic        ovf, t, l, g, rv, co;
  logic [23:0] rv2, rp;

  assign p   = ma * mb;
  assign ovf = p[47];
  assign np  = ovf ? (p >> 1) : p;

  always_comb begin
    if (op) t = ovf ? |p[35:25] : |p[34:25];
    else    t = ovf ? |p[22:0]  : |p[21:0];
  end
  assign l = op ? np[36] : np[23];
  assign g = op ? np[35] : np[22];

  always_comb begin
    unique case (rm)
      2'b00:   rv = g & (l | t);
      2'b01:   rv = 1'b0;
      2'b10:   rv = ~sign & (g | t);
      default: rv = sign & (g | t);
    endcase
  end

  assign rv2        = op ? {10'd0, rv, 13'd0} : {23'd0, rv};
  assign {co, rp}   = {1'b0, np[46:23]} + {1'b0, rv2};
  assign mz         = co ? {1'b1, rp[23:1]} : rp;
  assign norm_shift = ovf | co;
  assign inexact    = g | t;
endmodule
