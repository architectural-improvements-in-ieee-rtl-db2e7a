// tb_special_ca: checks the (Sum, Sum+1, Sum+2) decoder of the special
// compound adder: sel1/sel0 = 00 gives A+B, 10 gives A+B+2 and sel0 = 1 with
// sel1 = L (LSB of A+B) gives A+B+1, all modulo 2^M, and the exposed upper
// halves of both sums.
module tb_special_ca;
  localparam int M = 54;
  logic [M-1:0] a, b, z;
  logic [M-2:0] y0, y1;
  logic sel1, sel0;
  int checks = 0, failures = 0;

  special_ca #(.M(M)) dut (.a(a), .b(b), .sel1(sel1), .sel0(sel0), .z(z), .y0(y0), .y1(y1));

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [63:0] sum, exp_z;
      int k;
      a = M'({$urandom(), $urandom()});
      b = M'({$urandom(), $urandom()}) & ~M'(1);
      if (n < 4) begin a = '1; b = '0; end
      k = $urandom_range(0, 2);
      sum = 64'(a) + 64'(b);
      sel0 = (k == 1);
      sel1 = (k == 2) || (k == 1 && sum[0]);
      #1;
      exp_z = (sum + 64'(k)) & ((64'd1 << M) - 1);
      checks += 2;
      if (64'(z) != exp_z) begin
        failures++;
        if (failures < 5) $display("FAIL k=%0d a=%h b=%h z=%h", k, a, b, z);
      end
      if (64'(y0) != ((sum >> 1) & ((64'd1 << (M - 1)) - 1)) ||
          64'(y1) != (((sum + 2) >> 1) & ((64'd1 << (M - 1)) - 1))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
