// round_select: select-result logic of the proposed rounding scheme. From the
// prediction bit p, the carry c out of the low carry-save half, guard g,
// sticky t, the LSB lp of PH+p and the overflow bit v0 = MSB of P0 it
// computes the compound-adder selects sel1/sel0 and the round-to-nearest-even
// LSB fix terms f0 (no overflow) and f1 (overflow). Both overflow and
// no-overflow versions are formed in parallel and v0 picks one, because v0
// arrives late. Equations per rounding class:
//   RI: sel0 = v0 ? ~c&p : (g|t)&(~p|c)   sel1 = v0 ? lp|((g|t)&(~p|c)) : lp&sel0_novf
//   RN: sel0 = v0 ? ~p|c : g&(~p|c)       sel1 = v0 ? lp&(~p|c) : lp&g&(~p|c)
//       f0 = ~g|t,  f1 = ~lp|g|t
//   RZ: sel0 = c, sel1 = lp&c, f0 = f1 = 1 (p is forced to 0 by the caller)
// sel0_novf drives the LSB mux (when v0 = 1 the LSB is discarded anyway).
// Combinational; follows the document's tables and claims.
module round_select
  import fp_pkg::*;
(
  input  rclass_e rc,
  input  logic    p,
  input  logic    c,
  input  logic    g,
  input  logic    t,
  input  logic    lp,
  input  logic    v0,
  output logic    sel1,
  output logic    sel0,
  output logic    sel0_novf,
  output logic    f0,
  output logic    f1
);
  logic s0_n, s0_o, s1_n, s1_o;
  logic np_c;

  assign np_c = ~p | c;

  always_comb begin
    f0 = 1'b1;
    f1 = 1'b1;
    unique case (rc)
      RC_RN: begin
        s0_n = g & np_c;
        s0_o = np_c;
        s1_n = lp & g & np_c;
        s1_o = lp & np_c;
        f0   = ~g | t;
        f1   = ~lp | g | t;
      end
      RC_RI: begin
        s0_n = (g | t) & np_c;
        s0_o = ~c & p;
        s1_n = lp & (g | t) & np_c;
        s1_o = lp | ((g | t) & np_c);
      end
      default: begin  // RC_RZ
        s0_n = c;
        s0_o = c;
        s1_n = lp & c;
        s1_o = lp & c;
      end
    endcase
  end

  assign sel0      = v0 ? s0_o : s0_n;
  assign sel1      = v0 ? s1_o : s1_n;
  assign sel0_novf = s0_n;
endmodule
