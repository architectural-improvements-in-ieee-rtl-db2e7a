// fp_ref_pkg: bit-exact reference model of IEEE 754 multiplication used by
// the testbenches. It works on exact integers: the full product of the two
// significands is formed, the leading one located, the unbounded exponent
// computed and the value rounded once at the precision that the (possibly
// subnormal) result has. Nothing in it shares structure with the RTL.
// fields are right-aligned: ew exponent bits, fw fraction bits.
// rm: 0 RN-even, 1 RZ, 2 RP, 3 RM. flags {I,X,V,O,U}; U = inexact and the
// result is subnormal or zero. With ftz set, subnormal operands read as zero
// and any result whose rounded unbounded exponent is below 1 becomes a
// signed zero with U and X (flush-to-zero mode).
package fp_ref_pkg;

  function automatic void fp_mul_ref(input int ew, input int fw, input logic [63:0] a,
                                     input logic [63:0] b, input int rm, input bit ftz,
                                     output logic [63:0] z, output logic [4:0] flags);
    longint emaxf, bias, ea, eb, e, ebase;
    logic [63:0] fa, fb, ma, mb;
    logic [127:0] p, q, rem, half;
    bit sa, sb, s, nana, nanb, infa, infb, zera, zerb, snan, g, st, inc, nx, normal;
    int k, rsh, cls;
    emaxf = (64'd1 << ew) - 1;
    bias  = (64'd1 << (ew - 1)) - 1;
    sa = a[ew + fw]; sb = b[ew + fw]; s = sa ^ sb;
    ea = longint'((a >> fw) & emaxf); eb = longint'((b >> fw) & emaxf);
    fa = a & ((64'd1 << fw) - 1);     fb = b & ((64'd1 << fw) - 1);
    nana = (ea == emaxf) && (fa != 0); nanb = (eb == emaxf) && (fb != 0);
    infa = (ea == emaxf) && (fa == 0); infb = (eb == emaxf) && (fb == 0);
    zera = (ea == 0) && (fa == 0 || ftz); zerb = (eb == 0) && (fb == 0 || ftz);
    snan = (nana && !fa[fw-1]) || (nanb && !fb[fw-1]);
    flags = '0;
    if (nana || nanb || (infa && zerb) || (zera && infb)) begin
      z = (emaxf << fw) | (64'd1 << (fw - 1));
      flags[2] = snan || (infa && zerb) || (zera && infb);
      return;
    end
    if (infa || infb) begin z = (64'(s) << (ew + fw)) | (emaxf << fw); return; end
    if (zera || zerb) begin z = 64'(s) << (ew + fw); return; end
    // rounding class: 0 RN, 1 RZ, 2 RI
    case (rm)
      0: cls = 0;
      1: cls = 1;
      2: cls = s ? 1 : 2;
      default: cls = s ? 2 : 1;
    endcase
    ma = (ea == 0) ? fa : (fa | (64'd1 << fw));
    mb = (eb == 0) ? fb : (fb | (64'd1 << fw));
    if (ea == 0) ea = 1;
    if (eb == 0) eb = 1;
    p = 128'(ma) * 128'(mb);
    k = 0;
    for (int i = 0; i < 128; i++) if (p[i]) k = i;
    e = ea + eb - bias + longint'(k) - longint'(2 * fw);  // biased exponent of the leading one
    rsh = k - fw;
    if (!ftz && e < 1) rsh = rsh + int'(1 - e);
    ebase = (!ftz && e < 1) ? 1 : e;
    if (rsh <= 0) begin
      q = p << (-rsh); g = 0; st = 0;
    end else if (rsh > 120) begin
      q = 0; g = 0; st = 1;
    end else begin
      q    = p >> rsh;
      rem  = p & ((128'd1 << rsh) - 1);
      half = 128'd1 << (rsh - 1);
      g    = (rem & half) != 0;
      st   = (rem & (half - 1)) != 0;
    end
    case (cls)
      0: inc = g && (st || q[0]);
      1: inc = 0;
      default: inc = g || st;
    endcase
    nx = g || st;
    q = q + 128'(inc);
    if (q[fw + 1]) begin q = q >> 1; ebase = ebase + 1; end
    normal = q[fw];
    if (ftz && ebase < 1) begin
      z = 64'(s) << (ew + fw);
      flags[0] = 1; flags[3] = 1;
      return;
    end
    if (normal && ebase >= emaxf) begin
      flags[1] = 1; flags[3] = 1;
      if (cls == 1) z = (64'(s) << (ew + fw)) | (64'(emaxf - 1) << fw) | ((64'd1 << fw) - 1);
      else          z = (64'(s) << (ew + fw)) | (emaxf << fw);
      return;
    end
    z = (64'(s) << (ew + fw)) | ((normal ? 64'(ebase) : 64'd0) << fw) | (q[63:0] & ((64'd1 << fw) - 1));
    flags[3] = nx;
    flags[0] = nx && !normal;
  endfunction

endpackage
