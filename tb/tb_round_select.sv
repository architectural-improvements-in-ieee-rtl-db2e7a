// tb_round_select: exhaustive check of the select logic. For every
// consistent combination of (class, p, c, g, t, lp, v0) the needed increment
// INC is worked out from the rounding rules (no overflow: c + rounding bit
// at the LSB; overflow: c + 2 * rounding bit at the next position, the guard
// now being the old LSB), and the compound-adder output it implies, INC - p
// in {0,1,2}, must be what sel1/sel0 select. Also checks the RN tie fixes.
// Infeasible inputs are skipped: p = 0 forces c = 0, p = 1 with c = 0
// forces g = 1, and p = 0 in RZ.
module tb_round_select;
  import fp_pkg::*;
  rclass_e rc;
  logic p, c, g, t, lp, v0, sel1, sel0, sel0_novf, f0, f1;
  int checks = 0, failures = 0;

  round_select dut (.*);

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++)
      for (int v = 0; v < 64; v++) begin
        int inc, need;
        logic e_sel1, e_sel0, e_f0, e_f1;
        rc = rclass_e'(k);
        {p, c, g, t, lp, v0} = 6'(v);
        if (!p && c) continue;
        if (p && !c && !g) continue;
        if (rc == RC_RZ && p) continue;
        #1;
        if (!v0) begin
          case (rc)
            RC_RN:   inc = int'(c) + int'(g);
            RC_RI:   inc = int'(c) + ((g | t) ? 1 : 0);
            default: inc = int'(c);
          endcase
        end else begin
          case (rc)
            RC_RN:   inc = int'(c) + 1;
            RC_RI:   inc = int'(c) + ((lp | g | t) ? 2 : 0);
            default: inc = int'(c);
          endcase
        end
        need   = inc - int'(p);
        e_sel0 = (need == 1);
        e_sel1 = (need == 2) || (need == 1 && lp);
        e_f0   = !(rc == RC_RN && g && !t);
        e_f1   = !(rc == RC_RN && lp && !g && !t);
        checks++;
        if (need < 0 || need > 2 || sel1 != e_sel1 || sel0 != e_sel0 ||
            (!v0 && sel0_novf != e_sel0) || f0 != e_f0 || f1 != e_f1) begin
          failures++;
          if (failures < 8)
            $display("FAIL rc=%0d p=%0d c=%0d g=%0d t=%0d lp=%0d v0=%0d: sel1=%0d sel0=%0d need=%0d",
                     k, p, c, g, t, lp, v0, sel1, sel0, need);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
