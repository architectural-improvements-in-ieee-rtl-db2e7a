// tb_fpmul_top: end-to-end test of the top level at its default
// configuration. Both multipliers run at once on independent random
// operand streams and every result and flag vector is compared with the
// exact-integer reference model (full subnormal support for the hybrid
// unit, flush-to-zero for the combined unit). The test counts each mechanism
// of the two datapaths and fails if any never happened:
//   hybrid: every format and rounding mode, subnormal operands (left shift
//   of the carry-save vectors), subnormal results (right shift),
//   prediction bit set, round-to-nearest tie fix, rounding carry into the
//   next binade, exponent overflow, invalid operation;
//   combined: both op modes, the mantissa normalization shift, the rounding
//   carry, flush to zero, overflow.
module tb_fpmul_top;
  import fp_ref_pkg::*;
  import fp_gen_pkg::*;

  localparam int NVEC = 30000;

  logic [63:0] h_a, h_b, h_z;
  logic [1:0]  h_fm, h_rm, c_rm;
  logic [4:0]  h_flags, c_flags;
  logic [31:0] c_a, c_b, c_z;
  logic        c_op;
  int checks = 0, failures = 0;
  int n_fmt[3], n_rm[4], n_op[2];
  int n_lsh = 0, n_rsh = 0, n_pred = 0, n_tie = 0, n_rcarry = 0, n_ovf = 0, n_inv = 0;
  int c_norm = 0, c_rcarry = 0, c_flush = 0, c_ovf = 0;

  fpmul_top dut (.*);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ra, rb, rz, ca, cb, cz;
    logic [4:0]  rf, cf;
    int f, ew, fw, sh, cew, cfw, csh;
    foreach (n_fmt[i]) n_fmt[i] = 0;
    foreach (n_rm[i]) n_rm[i] = 0;
    foreach (n_op[i]) n_op[i] = 0;
    for (int n = 0; n < NVEC; n++) begin
      f  = $urandom_range(0, 2);
      ew = (f == 0) ? 5 : (f == 1) ? 8 : 11;
      fw = (f == 0) ? 10 : (f == 1) ? 23 : 52;
      sh = 63 - ew - fw;
      ra = gen_operand(ew, fw);
      rb = gen_operand(ew, fw);
      if (n % 64 == 0) begin  // (1+ulp) * (2-2ulp) = 2 - 2ulp^2: rounds up to 2
        ra = (((64'd1 << (ew - 1)) - 1) << fw) | ((64'd1 << fw) - 2);
        rb = (((64'd1 << (ew - 1)) - 1) << fw) | 64'd1;
      end
      h_fm = 2'(f);
      h_rm = 2'($urandom_range(0, 3));
      h_a  = ra << sh;
      h_b  = rb << sh;
      c_op = 1'($urandom_range(0, 1));
      cew  = c_op ? 5 : 8;
      cfw  = c_op ? 10 : 23;
      csh  = 31 - cew - cfw;
      ca   = gen_operand(cew, cfw);
      cb   = gen_operand(cew, cfw);
      c_rm = 2'($urandom_range(0, 3));
      c_a  = 32'(ca << csh);
      c_b  = 32'(cb << csh);
      #1;
      fp_mul_ref(ew, fw, ra, rb, int'(h_rm), 1'b0, rz, rf);
      fp_mul_ref(cew, cfw, ca, cb, int'(c_rm), 1'b1, cz, cf);
      checks += 2;
      if (h_z !== (rz << sh) || h_flags !== rf) begin
        failures++;
        if (failures < 10) $display("FAIL hybrid fm=%0d rm=%0d %h * %h: %h/%b expected %h/%b",
                                    f, h_rm, ra, rb, h_z >> sh, h_flags, rz, rf);
      end
      if (c_z !== 32'(cz << csh) || c_flags !== cf) begin
        failures++;
        if (failures < 10) $display("FAIL comb op=%0d rm=%0d %h * %h: %h/%b expected %h/%b",
                                    c_op, c_rm, ca, cb, c_z >> csh, c_flags, cz, cf);
      end
      n_fmt[f]++;
      n_rm[h_rm]++;
      n_op[c_op]++;
      if (dut.u_hybrid.shift < 0) n_lsh++;
      if (dut.u_hybrid.denorm && !rf[2] && h_z[62 -: 5] == 0) n_rsh++;
      if (dut.u_hybrid.u_rnd.p) n_pred++;
      if (h_rm == 0 && dut.u_hybrid.u_rnd.g && !dut.u_hybrid.u_rnd.t) n_tie++;
      begin logic [105:0] pr; pr = dut.u_hybrid.ps + dut.u_hybrid.pc;
        if (dut.u_hybrid.vsel && !pr[105] && dut.u_hybrid.lza == 0 && dut.u_hybrid.lzb == 0) n_rcarry++; end
      if (rf[1]) n_ovf++;
      if (rf[2]) n_inv++;
      if (dut.u_comb.u_mant.ovf) c_norm++;
      if (dut.u_comb.u_mant.co) c_rcarry++;
      if (cf[0]) c_flush++;
      if (cf[1]) c_ovf++;
    end
    $display("hybrid: formats %0d/%0d/%0d modes %0d/%0d/%0d/%0d", n_fmt[0], n_fmt[1], n_fmt[2],
             n_rm[0], n_rm[1], n_rm[2], n_rm[3]);
    $display("hybrid: left shifts=%0d denormalized=%0d prediction=%0d ties=%0d rounding carries=%0d overflows=%0d invalid=%0d",
             n_lsh, n_rsh, n_pred, n_tie, n_rcarry, n_ovf, n_inv);
    $display("combined: op0=%0d op1=%0d norm shifts=%0d rounding carries=%0d flushes=%0d overflows=%0d",
             n_op[0], n_op[1], c_norm, c_rcarry, c_flush, c_ovf);
    foreach (n_fmt[i]) if (n_fmt[i] == 0) failures++;
    foreach (n_rm[i])  if (n_rm[i] == 0) failures++;
    foreach (n_op[i])  if (n_op[i] == 0) failures++;
    if (n_lsh == 0 || n_rsh == 0 || n_pred == 0 || n_tie == 0 || n_rcarry == 0 ||
        n_ovf == 0 || n_inv == 0 || c_norm == 0 || c_rcarry == 0 || c_flush == 0 || c_ovf == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
