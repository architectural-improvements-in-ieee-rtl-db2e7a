// tb_comb_fpmul: self-checking test of the combined binary32/binary16
// multiplier against the exact-integer reference model in flush-to-zero
// mode, both formats, all four rounding modes, with operands biased toward
// specials, tiny and huge products and rounding ties. Counts the
// normalization shift, rounding carries, flushes and overflows and fails if
// one of them never occurred.
module tb_comb_fpmul;
  import fp_ref_pkg::*;
  import fp_gen_pkg::*;

  localparam int NVEC = 50000;

  logic [31:0] a, b, z;
  logic [1:0]  rm;
  logic        op;
  logic [4:0]  flags;
  int checks = 0, failures = 0;
  int n_norm = 0, n_rcarry = 0, n_flush = 0, n_ovf = 0;

  comb_fpmul dut (.a(a), .b(b), .rm(rm), .op(op), .z(z), .flags(flags));

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
    for (int f = 0; f < 2; f++) begin
      ew = (f == 1) ? 5 : 8;
      fw = (f == 1) ? 10 : 23;
      sh = 31 - ew - fw;
      for (int n = 0; n < NVEC; n++) begin
        ra = gen_operand(ew, fw);
        rb = gen_operand(ew, fw);
        op = f[0];
        rm = 2'($urandom_range(0, 3));
        a  = 32'(ra << sh);
        b  = 32'(rb << sh);
        #1;
        fp_mul_ref(ew, fw, ra, rb, int'(rm), 1'b1, rz, rf);
        checks++;
        if (z !== 32'(rz << sh) || flags !== rf) begin
          failures++;
          if (failures < 10)
            $display("FAIL op=%0d rm=%0d a=%h b=%h got %h/%b exp %h/%b", op, rm, ra, rb,
                     z >> sh, flags, rz, rf);
        end
        if (dut.u_mant.ovf) n_norm++;
        if (dut.u_mant.co) n_rcarry++;
        if (rf[0]) n_flush++;
        if (rf[1]) n_ovf++;
      end
    end
    $display("normalization shifts=%0d rounding carries=%0d flushes=%0d overflows=%0d",
             n_norm, n_rcarry, n_flush, n_ovf);
    if (n_norm == 0 || n_rcarry == 0 || n_flush == 0 || n_ovf == 0) begin
      failures++;
      $display("a datapath case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
