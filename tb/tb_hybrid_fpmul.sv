// tb_hybrid_fpmul: self-checking test of the hybrid binary16/32/64
// multiplier against the exact-integer reference model, in all three formats
// and all four rounding modes, with operands biased toward subnormals,
// specials, tiny and huge products and rounding ties. Also counts how often
// the datapath met subnormal operands, subnormal results, exponent overflow
// and a rounding carry into the next binade, and fails if one never occurred.
module tb_hybrid_fpmul;
  import fp_ref_pkg::*;
  import fp_gen_pkg::*;

  localparam int NVEC = 50000;

  logic [63:0] a, b, z;
  logic [1:0]  fm, rm;
  logic [4:0]  flags;
  int checks = 0, failures = 0;
  int n_sub_in = 0, n_sub_out = 0, n_ovf = 0, n_rcarry = 0, n_tie = 0;

  hybrid_fpmul dut (.a(a), .b(b), .fm(fm), .rm(rm), .z(z), .flags(flags));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ra, rb, rz;
    logic [4:0]  rf;
    int ew, fw, sh;
    for (int f = 0; f < 3; f++) begin
      ew = (f == 0) ? 5 : (f == 1) ? 8 : 11;
      fw = (f == 0) ? 10 : (f == 1) ? 23 : 52;
      sh = 63 - ew - fw;
      for (int n = 0; n < NVEC; n++) begin
        ra = gen_operand(ew, fw);
        rb = gen_operand(ew, fw);
        if (n % 64 == 0) begin  // (1+ulp) * (2-2ulp) = 2 - 2ulp^2: rounds up to 2
          ra = (((64'd1 << (ew - 1)) - 1) << fw) | ((64'd1 << fw) - 2);
          rb = (((64'd1 << (ew - 1)) - 1) << fw) | 64'd1;
        end
        fm = 2'(f);
        rm = 2'($urandom_range(0, 3));
        a  = ra << sh;
        b  = rb << sh;
        #1;
        fp_mul_ref(ew, fw, ra, rb, int'(rm), 1'b0, rz, rf);
        checks++;
        if (z !== (rz << sh) || flags !== rf) begin
          failures++;
          if (failures < 10)
            $display("FAIL fm=%0d rm=%0d a=%h b=%h got %h/%b exp %h/%b", f, rm, ra, rb,
                     z >> sh, flags, rz, rf);
        end
        if (dut.u_ua.is_zero == 0 && dut.u_ua.mant[52] == 0) n_sub_in++;
        if (rf[0]) n_sub_out++;
        if (rf[1]) n_ovf++;
        begin logic [105:0] pr; pr = dut.ps + dut.pc;
        if (dut.vsel && !pr[105] && dut.lza == 0 && dut.lzb == 0) n_rcarry++; end
        if (rm == 0 && dut.u_rnd.g && !dut.u_rnd.t && !dut.v0) n_tie++;
      end
    end
    $display("subnormal operands=%0d subnormal/zero inexact results=%0d overflows=%0d rounding carries=%0d ties=%0d",
             n_sub_in, n_sub_out, n_ovf, n_rcarry, n_tie);
    if (n_sub_in == 0 || n_sub_out == 0 || n_ovf == 0 || n_rcarry == 0 || n_tie == 0) begin
      failures++;
      $display("a datapath case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
