// tb_hyb_pack: checks packing and exceptions of the hybrid multiplier:
// normal results, a rounding carry (hidden bit moved up, vsel set),
// subnormal results (with and without inexact), a subnormal rounded up to
// the smallest normal, overflow in each rounding class, and the special
// operand rules (NaN, signaling NaN, infinity times zero, infinity, zero),
// for all three formats. Expected words are assembled field by field.
module tb_hyb_pack;
  import fp_pkg::*;
  fmt_e fm;
  rclass_e rc;
  logic sign, denorm, vsel, inexact;
  logic signed [EXPW-1:0] ez;
  logic [52:0] m;
  logic a_zero, a_inf, a_nan, a_snan, b_zero, b_inf, b_nan, b_snan;
  logic [63:0] z;
  fp_flags_t flags;
  int checks = 0, failures = 0;

  hyb_pack dut (.*);

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] word(int f, logic s, longint e, logic [63:0] frac);
    int ew, fw;
    ew = (f == 0) ? 5 : (f == 1) ? 8 : 11;
    fw = (f == 0) ? 10 : (f == 1) ? 23 : 52;
    return ((64'(s) << (ew + fw)) | (64'(e) << fw) | (frac & ((64'd1 << fw) - 1))) << (63 - ew - fw);
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int f, fw, h, kind;
      longint emax;
      logic [63:0] frac, ez_w;
      logic [4:0] ef;
      f = $urandom_range(0, 2);
      fw = (f == 0) ? 10 : (f == 1) ? 23 : 52;
      h = fw;
      emax = (f == 0) ? 31 : (f == 1) ? 255 : 2047;
      fm = fmt_e'(f);
      rc = rclass_e'($urandom_range(0, 2));
      sign = 1'($urandom_range(0, 1));
      inexact = 1'($urandom_range(0, 1));
      {a_zero, a_inf, a_nan, a_snan, b_zero, b_inf, b_nan, b_snan} = '0;
      frac = {$urandom(), $urandom()} & ((64'd1 << fw) - 1);
      denorm = 0; vsel = 0;
      kind = $urandom_range(0, 9);
      ez = EXPW'($urandom_range(1, 32'(emax - 1)));
      m = 53'((64'd1 << h) | frac);
      ef = {1'b0, inexact, 3'b000};
      case (kind)
        0, 1, 2: ez_w = word(f, sign, longint'(ez), frac);
        3: begin m = 53'(64'd1 << (h + 1)); vsel = 1; ez_w = word(f, sign, longint'(ez), 0); end
        4: begin denorm = 1; m = 53'(frac); ez = -EXPW'($urandom_range(0, 40));
             ez_w = word(f, sign, 0, frac); ef = {1'b0, inexact, 2'b00, inexact}; end
        5: begin denorm = 1; ez = '0; ez_w = word(f, sign, 1, frac); end
        6: begin ez = EXPW'(emax + $urandom_range(0, 5)); ef = 5'b01010;
             ez_w = (rc == RC_RZ) ? word(f, sign, emax - 1, '1) : word(f, sign, emax, 0); end
        7: begin a_nan = 1; a_snan = 1'($urandom_range(0, 1)); b_zero = 1'($urandom_range(0, 1));
             ez_w = word(f, 0, emax, 64'd1 << (fw - 1)); ef = {2'b00, a_snan, 2'b00}; end
        8: begin a_inf = 1; b_zero = 1'($urandom_range(0, 1));
             ez_w = b_zero ? word(f, 0, emax, 64'd1 << (fw - 1)) : word(f, sign, emax, 0);
             ef = {2'b00, b_zero, 2'b00}; end
        default: begin b_zero = 1; ez_w = word(f, sign, 0, 0); ef = '0; end
      endcase
      #1;
      checks++;
      if (z != ez_w || flags != ef) begin
        failures++;
        if (failures < 6) $display("FAIL kind=%0d f=%0d rc=%0d z=%h exp %h flags=%b exp %b", kind, f, rc, z, ez_w, flags, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
