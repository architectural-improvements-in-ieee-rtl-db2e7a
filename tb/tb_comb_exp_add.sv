// tb_comb_exp_add: binary32 mode must give Ea + Eb - 127 (+1 with
// norm_shift); binary16 mode must give Ea[7:3] + Eb[7:3] - 15 (+1) as a
// binary16 exponent in ez[7:3] (checked where it lies in 1..30) and the
// same value in the binary32 bias (+112) on ez_full. Exhaustive over all
// exponent pairs for both modes.
module tb_comb_exp_add;
  logic [7:0] ea, eb, ez;
  logic op, norm_shift;
  logic signed [9:0] ez_full;
  int checks = 0, failures = 0;

  comb_exp_add dut (.*);

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j += 3) begin
        int s32, s16;
        ea = 8'(i); eb = 8'(j);
        norm_shift = 1'((i + j) & 1);
        op = 0;
        #1;
        s32 = i + j - 127 + int'(norm_shift);
        checks++;
        if (int'(ez_full) != s32 || (s32 >= 0 && s32 < 256 && int'(ez) != s32)) failures++;
        op = 1;
        #1;
        s16 = (i >> 3) + (j >> 3) - 15 + int'(norm_shift);
        checks++;
        if (int'(ez_full) != s16 + 112 || (s16 >= 1 && s16 <= 30 && int'(ez[7:3]) != s16) ||
            ez[2:0] != 0) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
