// shift_amount: signed shift for the carry-save shifter of the hybrid
// multiplier. One shift both normalizes denormal operands (left, by the sum
// of their leading-zero counts) and denormalizes results below emin (right,
// by 1 - Ez, at most the format's cap), and it also right-aligns binary32 and
// binary16 products to the binary64 rounding position:
//   shift = min(max(1 - Ez, 0), cap) - (Xlz + Ylz) + align
//   cap   = 13 / 26 / 55,  align = 42 / 29 / 0   (binary16 / 32 / 64)
// Positive values shift right. Ez is the result exponent in the format's own
// bias, already reduced by the leading-zero counts. denorm flags Ez <= 0.
// The clamp is a signed compare and the denormal test is Ez <= 0; both are
// this design's choice of gates for the same function. Combinational.
module shift_amount
  import fp_pkg::*;
(
  input  logic signed [EXPW-1:0] ez,
  input  logic [5:0]             xlz,
  input  logic [5:0]             ylz,
  input  fmt_e                   fm,
  output logic signed [7:0]      shift,
  output logic                   denorm
);
  logic signed [EXPW:0] neg;      // 1 - Ez
  logic [5:0]           cap;
  logic [5:0]           align;
  logic [5:0]           dshift;
  logic [6:0]           lzsum;

  always_comb begin
    unique case (fm)
      FM_HALF:   begin cap = 6'd13; align = 6'd42; end
      FM_SINGLE: begin cap = 6'd26; align = 6'd29; end
      default:   begin cap = 6'd55; align = 6'd0;  end
    endcase
  end

  assign neg    = (EXPW+1)'(signed'(1)) - (EXPW+1)'(ez);
  assign denorm = (ez <= 0);
  assign dshift = !denorm ? 6'd0 :
                  (neg > $signed({8'd0, cap})) ? cap : neg[5:0];
  assign lzsum  = {1'b0, xlz} + {1'b0, ylz};
  assign shift  = $signed({2'b00, dshift}) + $signed({2'b00, align}) - $signed({1'b0, lzsum});
endmodule
