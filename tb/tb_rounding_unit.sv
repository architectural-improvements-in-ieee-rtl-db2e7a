// tb_rounding_unit: checks the rounding unit on carry-save vectors built the
// way the multiplier builds them: a product of two random (possibly
// unnormalized) significands of the selected format, placed in the 161-bit
// field and shifted right by the format alignment plus a random
// denormalizing amount, then split at random into sum and carry vectors.
// The expected fraction, hidden bit, exponent-increment bit and inexact flag come from
// rounding the exact integer with the IEEE rules.
module tb_rounding_unit;
  import fp_pkg::*;
  logic [53:0]  sh, ch;
  logic [106:0] sl, cl;
  rclass_e      rc;
  fmt_e         fm;
  logic [52:0]  m;
  logic         vsel, sel1, v0, v1, inexact;
  int checks = 0, failures = 0;

  rounding_unit #(.NL(107)) dut (.*);

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [160:0] rnd161();
    return 161'({$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()});
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [160:0] x, s, c, rem, half;
      logic [127:0] ma, mb, q;
      logic         v, g, st, inc;
      int f, mw, al, d, h, top;
      f  = $urandom_range(0, 2);
      mw = (f == 0) ? 11 : (f == 1) ? 24 : 53;
      al = (f == 0) ? 42 : (f == 1) ? 29 : 0;
      ma = 128'({$urandom(), $urandom()}) & ((128'd1 << mw) - 1);
      mb = 128'({$urandom(), $urandom()}) & ((128'd1 << mw) - 1);
      if ($urandom_range(0, 3) != 0) begin
        ma[mw-1] = 1'b1; mb[mw-1] = 1'b1;
      end
      // short significands give exact products and ties in a quarter of the cases
      if (n % 4 == 1) begin
        ma = ma & ~((128'd1 << (mw - mw / 2 - 1)) - 1);
        mb = mb & ~((128'd1 << (mw - mw / 2 - 1)) - 1);
      end
      if (n % 50 == 0) begin ma = (128'd1 << mw) - 1; mb = (128'd1 << (mw - 1)) | 1; end
      d = ($urandom_range(0, 2) == 0) ? $urandom_range(0, 12) : 0;
      // product at the top of the 161-bit field, then aligned to bit 52+55
      x = (161'(ma * mb) << (161 - 2 * mw)) >> (al + d);
      s = x & rnd161();
      c = x - s;
      {sh, sl} = s;
      {ch, cl} = c;
      rc = rclass_e'($urandom_range(0, 2));
      fm = fmt_e'(f);
      #1;
      h   = (f == 0) ? 10 : (f == 1) ? 23 : 52;  // hidden-bit position in m
      top = 107 + h + 1;                          // overflow bit in the field
      v   = x[top];
      if (v) begin
        q = 128'(x >> 108); rem = x & ((161'd1 << 108) - 1); half = 161'd1 << 107;
      end else begin
        q = 128'(x >> 107); rem = x & ((161'd1 << 107) - 1); half = 161'd1 << 106;
      end
      g  = (rem & half) != 0;
      st = (rem & (half - 1)) != 0;
      case (rc)
        RC_RN:   inc = g & (st | q[0]);
        RC_RI:   inc = g | st;
        default: inc = 1'b0;
      endcase
      q = q + 128'(inc);
      checks++;
      // fraction bits, the exponent-increment bit and (without it) the hidden bit;
      // a carry into the next binade may leave the leading one in either place
      if ((m & ((53'd1 << h) - 1)) != (q[52:0] & ((53'd1 << h) - 1)) ||
          vsel != (v | q[h+1]) || (!vsel && m[h] != q[h]) ||
          (m >> (h + 1)) > 1 || inexact != (rem != 0)) begin
        failures++;
        if (failures < 8)
          $display("FAIL fm=%0d rc=%0d x=%h m=%h exp %h vsel=%0d inexact=%0d", f, rc, x, m,
                   q[52:0], vsel, inexact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
