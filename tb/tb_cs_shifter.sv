// tb_cs_shifter: for random sum/carry vectors and shifts from -60 to +55,
// each output must equal its input times 2^55 divided (right shift) or
// multiplied (left shift, modulo 2^161) by 2^|shift|, computed with
// integer arithmetic.
module tb_cs_shifter;
  logic [105:0] s_in, c_in;
  logic signed [7:0] shift;
  logic [160:0] s_out, c_out;
  int checks = 0, failures = 0;

  cs_shifter #(.W(106), .EXT(55)) dut (.*);

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [160:0] ref_shift(logic [105:0] x, int k);
    logic [255:0] w, p;
    w = 256'(x) * (256'd1 << 55);
    p = (k >= 0) ? w / (256'd1 << k) : w * (256'd1 << (-k));
    return p[160:0];
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int k;
      s_in  = 106'({$urandom(), $urandom(), $urandom(), $urandom()});
      c_in  = 106'({$urandom(), $urandom(), $urandom(), $urandom()});
      k     = $urandom_range(0, 115) - 60;
      shift = 8'(k);
      #1;
      checks += 2;
      if (s_out != ref_shift(s_in, k)) failures++;
      if (c_out != ref_shift(c_in, k)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
