// tb_hyb_exp_add: the exponent path must return Ex + Ey - 1023 converted to
// the format's bias (minus 1008 for binary16, 896 for binary32) as ez_pre,
// and ez = ez_pre + 1 exactly when the overflow bit chosen by sel1 (v1 if
// set, else v0) is one. Random exponents, including negative (lz-adjusted)
// ones, all formats and all select combinations.
module tb_hyb_exp_add;
  import fp_pkg::*;
  logic signed [EXPW-1:0] ex, ey, ez_pre, ez;
  fmt_e fm;
  logic v0, v1, sel1;
  int checks = 0, failures = 0;

  hyb_exp_add dut (.*);

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int a, b, off, s, inc;
      fm = fmt_e'($urandom_range(0, 2));
      a  = $urandom_range(0, 2200) - 110;
      b  = $urandom_range(0, 2200) - 110;
      ex = EXPW'(a); ey = EXPW'(b);
      {v0, v1, sel1} = 3'($urandom_range(0, 7));
      #1;
      off = (fm == FM_HALF) ? 1008 : (fm == FM_SINGLE) ? 896 : 0;
      s   = a + b - 1023 - off;
      inc = sel1 ? int'(v1) : int'(v0);
      checks += 2;
      if (int'(ez_pre) != s) failures++;
      if (int'(ez) != s + inc) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
