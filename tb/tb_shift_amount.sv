// tb_shift_amount: compares the signed carry-save shift with the formula
// min(max(1-Ez, 0), cap) - (Xlz + Ylz) + align for random exponents around
// and far from emin, random leading-zero counts and all three formats.
module tb_shift_amount;
  import fp_pkg::*;
  logic signed [EXPW-1:0] ez;
  logic [5:0] xlz, ylz;
  fmt_e fm;
  logic signed [7:0] shift;
  logic denorm;
  int checks = 0, failures = 0;

  shift_amount dut (.*);

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int e, cap, al, ds, exp_sh;
      fm  = fmt_e'($urandom_range(0, 2));
      e   = ($urandom_range(0, 1) == 1) ? $urandom_range(0, 140) - 80 : $urandom_range(0, 3000) - 1200;
      xlz = 6'($urandom_range(0, 52));
      ylz = ($urandom_range(0, 3) == 0) ? 6'($urandom_range(0, 52)) : 6'd0;
      ez  = EXPW'(e);
      #1;
      cap = (fm == FM_HALF) ? 13 : (fm == FM_SINGLE) ? 26 : 55;
      al  = (fm == FM_HALF) ? 42 : (fm == FM_SINGLE) ? 29 : 0;
      ds  = (1 - e > 0) ? 1 - e : 0;
      if (ds > cap) ds = cap;
      exp_sh = ds - int'(xlz) - int'(ylz) + al;
      checks++;
      if (int'(shift) != exp_sh || denorm != (e <= 0)) begin
        failures++;
        if (failures < 5) $display("FAIL ez=%0d lz=%0d/%0d fm=%0d shift=%0d exp %0d", e, xlz, ylz, fm, shift, exp_sh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
