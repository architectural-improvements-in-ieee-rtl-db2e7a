// tb_comb_mant_mul: random binary32 (24-bit) and binary16 (11-bit,
// left-aligned) significands in all four rounding modes and both signs. The
// expected rounded significand, total normalization shift and inexact bit
// come from rounding the exact integer product.
module tb_comb_mant_mul;
  logic [23:0] ma, mb, mz;
  logic op, sign, norm_shift, inexact;
  logic [1:0] rm;
  int checks = 0, failures = 0;

  comb_mant_mul dut (.*);

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int w, sh;
      logic [63:0] a, b, p, q, rem, half;
      logic g, st, inc, ns;
      op = 1'($urandom_range(0, 1));
      w  = op ? 11 : 24;
      a = 64'($urandom()) & ((64'd1 << w) - 1) | (64'd1 << (w - 1));
      b = 64'($urandom()) & ((64'd1 << w) - 1) | (64'd1 << (w - 1));
      if (n % 40 == 0) begin a = (64'd1 << w) - 2; b = (64'd1 << (w - 1)) | 1; end
      ma = 24'(a << (24 - w));
      mb = 24'(b << (24 - w));
      rm = 2'($urandom_range(0, 3));
      sign = 1'($urandom_range(0, 1));
      #1;
      p  = a * b;
      ns = p[2*w-1];
      sh = ns ? w : w - 1;
      q  = p >> sh;
      rem = p & ((64'd1 << sh) - 1);
      half = 64'd1 << (sh - 1);
      g  = (rem & half) != 0;
      st = (rem & (half - 1)) != 0;
      case (rm)
        2'b00: inc = g & (st | q[0]);
        2'b01: inc = 0;
        2'b10: inc = !sign & (g | st);
        default: inc = sign & (g | st);
      endcase
      q = q + 64'(inc);
      if (q[w]) begin q = q >> 1; ns = 1; end
      checks++;
      if (mz[23 -: 11] != 11'(q >> (w - 11)) || (!op && mz != 24'(q)) ||
          norm_shift != ns || inexact != (g | st)) begin
        failures++;
        if (failures < 6) $display("FAIL op=%0d rm=%0d a=%h b=%h mz=%h exp %h", op, rm, a, b, mz, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
