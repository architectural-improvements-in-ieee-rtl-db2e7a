// hyb_exp_add: combined exponent path of the hybrid multiplier. The operand
// exponents arrive in the binary64 bias (13-bit two's complement). A
// carry-save adder folds Ex, Ey and -1023 into two vectors, and a compound
// adder forms Sum = Ex+Ey-1023 and Sum+1 in parallel. Both are converted
// back to the selected format's bias (-1008 for binary16, -896 for binary32)
// and the result exponent is chosen as in the rounding unit: sel1 picks
// between the overflow bits v1 (of P1) and v0 (of P0), and that bit picks
// Sum+1 or Sum. ez_pre (native Sum) feeds the shift-amount logic.
// The backward conversion is a plain subtraction in this design.
// Combinational.
module hyb_exp_add
  import fp_pkg::*;
(
  input  logic signed [EXPW-1:0] ex,
  input  logic signed [EXPW-1:0] ey,
  input  fmt_e                   fm,
  input  logic                   v0,
  input  logic                   v1,
  input  logic                   sel1,
  output logic signed [EXPW-1:0] ez_pre,
  output logic signed [EXPW-1:0] ez
);
  localparam logic [EXPW-1:0] NBIAS = -EXPW'(1023);

  logic [EXPW-1:0] cs_s, cs_c, sum0, sum1, off, n0, n1;

  // carry-save adder: Ex + Ey + (-bias)
  assign cs_s = ex ^ ey ^ NBIAS;
  assign cs_c = ((ex & ey) | (ex & NBIAS) | (ey & NBIAS)) << 1;

  // compound adder
  assign sum0 = cs_s + cs_c;
  assign sum1 = cs_s + cs_c + EXPW'(1);

  always_comb begin
    unique case (fm)
      FM_HALF:   off = EXPW'(1008);
      FM_SINGLE: off = EXPW'(896);
      default:   off = '0;
    endcase
  end

  assign n0     = sum0 - off;
  assign n1     = sum1 - off;
  assign ez_pre = signed'(n0);
  assign ez     = signed'(sel1 ? (v1 ? n1 : n0) : (v0 ? n1 : n0));
endmodule
