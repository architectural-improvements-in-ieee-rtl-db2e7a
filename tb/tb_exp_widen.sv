// tb_exp_widen: exhaustive check of the inverter-based exponent converters
// for binary16->binary32 (+112), binary16->binary64 (+1008) and
// binary32->binary64 (+896): every input value is compared with the sum.
module tb_exp_widen;
  logic [4:0]  e5;
  logic [7:0]  e8, o58;
  logic [10:0] o511, o811;
  int checks = 0, failures = 0;

  exp_widen #(.N(5), .W(8))  u0 (.e_in(e5), .e_out(o58));
  exp_widen #(.N(5), .W(11)) u1 (.e_in(e5), .e_out(o511));
  exp_widen #(.N(8), .W(11)) u2 (.e_in(e8), .e_out(o811));

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      e5 = 5'(i); e8 = 8'(i);
      #1;
      checks++;
      if (int'(o811) != i + 896) failures++;
      if (i < 32) begin
        checks += 2;
        if (int'(o58) != i + 112) failures++;
        if (int'(o511) != i + 1008) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
