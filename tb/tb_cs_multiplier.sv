// tb_cs_multiplier: the carry-save product must add up exactly (no
// wrap-around beyond 2N bits) to the integer product, for random and corner
// operands of the 53-bit multiplier.
module tb_cs_multiplier;
  localparam int N = 53;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] s, c;
  int checks = 0, failures = 0;

  cs_multiplier #(.N(N)) dut (.a(a), .b(b), .s(s), .c(c));

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [127:0] prod, sum;
      case (n)
        0: begin a = '1; b = '1; end
        1: begin a = '0; b = '1; end
        2: begin a = N'(1) << (N - 1); b = N'(1) << (N - 1); end
        default: begin a = N'({$urandom(), $urandom()}); b = N'({$urandom(), $urandom()}); end
      endcase
      #1;
      prod = 128'(a) * 128'(b);
      sum  = 128'(s) + 128'(c);
      checks++;
      if (sum != prod) begin
        failures++;
        if (failures < 5) $display("FAIL a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
