// hyb_pack: packing and exception logic of the hybrid multiplier.
// The rounded mantissa (hidden bit at 10/23/52) is left-aligned back to bit
// 52 and the fraction taken from its top bits. The exponent is the selected
// exponent, or 1 (+1 on a rounding carry) when the result was denormalized;
// a result whose hidden bit stayed 0 is packed with exponent 0 (subnormal or
// zero). Special operands override the datapath: any NaN gives the quiet NaN
// (invalid for a signaling NaN), infinity times zero is invalid, infinity and
// zero propagate with the product sign. Exponent overflow gives infinity (RN,
// RI) or the largest finite number (RZ) with O and X. U is raised for an
// inexact subnormal or zero result. binary32/16 results sit in the upper
// bits of z with the rest zero. Flags are {I, X, V, O, U}.
// The exception rules are this design's own; the document leaves them out
// of its proposed units. Combinational.
module hyb_pack
  import fp_pkg::*;
(
  input  fmt_e                   fm,
  input  rclass_e                rc,
  input  logic                   sign,
  input  logic signed [EXPW-1:0] ez,
  input  logic                   denorm,
  input  logic                   vsel,
  input  logic [52:0]            m,
  input  logic                   inexact,
  input  logic                   a_zero, a_inf, a_nan, a_snan,
  input  logic                   b_zero, b_inf, b_nan, b_snan,
  output logic [63:0]            z,
  output fp_flags_t              flags
);
  logic [52:0]           m_al;
  logic                  normal, ovf;
  logic signed [EXPW-1:0] e, emaxv;
  logic [10:0]           ef;
  logic [51:0]           ff;

  always_comb begin
    unique case (fm)
      FM_HALF:   begin m_al = m << 42; emaxv = EXPW'(31);   end
      FM_SINGLE: begin m_al = m << 29; emaxv = EXPW'(255);  end
      default:   begin m_al = m;       emaxv = EXPW'(2047); end
    endcase
  end

  assign normal = m_al[52] | vsel;
  assign e      = denorm ? EXPW'(1 + 32'(vsel)) : ez;
  assign ovf    = normal & (e >= emaxv);

  always_comb begin
    flags = '0;
    // default: the rounded datapath result
    ef = normal ? e[10:0] : 11'd0;
    ff = m_al[51:0];
    if (a_nan || b_nan || (a_inf && b_zero) || (a_zero && b_inf)) begin
      ef      = '1;
      ff      = {1'b1, 51'd0};
      flags.v = a_snan | b_snan | (a_inf & b_zero) | (a_zero & b_inf);
    end else if (a_inf || b_inf) begin
      ef = '1;
      ff = '0;
    end else if (a_zero || b_zero) begin
      ef = '0;
      ff = '0;
    end else if (ovf) begin
      flags.o = 1'b1;
      flags.x = 1'b1;
      if (rc == RC_RZ) begin
        ef = emaxv[10:0] - 11'd1;
        ff = '1;
      end else begin
        ef = '1;
        ff = '0;
      end
    end else begin
      flags.x = inexact;
      flags.u = inexact & ~normal;
    end
  end

  logic nan_out;
  assign nan_out = a_nan | b_nan | (a_inf & b_zero) | (a_zero & b_inf);

  always_comb begin
    unique case (fm)
      FM_HALF:   z = {nan_out ? 1'b0 : sign, ef[4:0], ff[51:42], 48'd0};
      FM_SINGLE: z = {nan_out ? 1'b0 : sign, ef[7:0], ff[51:29], 32'd0};
      default:   z = {nan_out ? 1'b0 : sign, ef, ff};
    endcase
  end
endmodule
