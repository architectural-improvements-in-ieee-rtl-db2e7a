// tb_lzc: leading-zero counter check. For every position i a one is placed
// at bit i with random bits below it (expected count W-1-i), plus the
// all-zero input (expected W).
module tb_lzc;
  localparam int W = 53;
  logic [W-1:0] x;
  logic [5:0]   cnt;
  int checks = 0, failures = 0;

  lzc #(.W(W)) dut (.x(x), .cnt(cnt));

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; #1; checks++;
    if (cnt != 6'(W)) failures++;
    for (int r = 0; r < 20; r++)
      for (int i = 0; i < W; i++) begin
        logic [63:0] rnd;
        rnd = {$urandom(), $urandom()};
        x = W'((64'd1 << i) | (rnd & ((64'd1 << i) - 1)));
        #1; checks++;
        if (int'(cnt) != W - 1 - i) begin
          failures++;
          if (failures < 5) $display("FAIL x=%h cnt=%0d", x, cnt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
