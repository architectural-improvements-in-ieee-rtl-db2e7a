// tb_hyb_unpack: checks operand unpacking in all three formats. For a
// normal number the mantissa is 1.f left-aligned in 53 bits and the
// exponent is e - bias + 1023; for a subnormal the mantissa is 0.f, the
// leading-zero count is found by scanning and the exponent is
// 1 - bias + 1023 - lz. Also checks the zero/infinity/NaN/sNaN classes.
module tb_hyb_unpack;
  import fp_pkg::*;
  import fp_gen_pkg::*;
  logic [63:0] x;
  fmt_e fm;
  logic sign, is_zero, is_inf, is_nan, is_snan;
  logic [52:0] mant;
  logic signed [EXPW-1:0] exp64;
  logic [5:0] lz;
  int checks = 0, failures = 0;

  hyb_unpack dut (.*);

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 6000; n++) begin
      int f, ew, fw, bias, e, elz, exp_e;
      logic [63:0] r, fr;
      logic [52:0] em;
      f  = $urandom_range(0, 2);
      ew = (f == 0) ? 5 : (f == 1) ? 8 : 11;
      fw = (f == 0) ? 10 : (f == 1) ? 23 : 52;
      bias = (1 << (ew - 1)) - 1;
      r  = gen_operand(ew, fw);
      fm = fmt_e'(f);
      x  = r << (63 - ew - fw);
      #1;
      e  = int'((r >> fw) & ((64'd1 << ew) - 1));
      fr = r & ((64'd1 << fw) - 1);
      em = 53'((e != 0 ? (64'd1 << fw) : 64'd0) | fr) << (52 - fw);
      elz = 53;
      for (int i = 0; i < 53; i++) if (em[i]) elz = 52 - i;
      exp_e = ((e == 0) ? 1 : e) - bias + 1023 - elz;
      checks++;
      if (sign != r[ew + fw] || mant != em || int'(lz) != elz ||
          is_zero != (e == 0 && fr == 0) ||
          is_inf  != (e == (1 << ew) - 1 && fr == 0) ||
          is_nan  != (e == (1 << ew) - 1 && fr != 0) ||
          is_snan != (e == (1 << ew) - 1 && fr != 0 && !fr[fw-1]) ||
          (!(e == 0 && fr == 0) && int'(exp64) != exp_e)) begin
        failures++;
        if (failures < 5) $display("FAIL f=%0d r=%h mant=%h lz=%0d exp=%0d exp_e=%0d", f, r, mant, lz, exp64, exp_e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
