// lzc: leading-zero counter for operand unpacking. Counts the zeros above the
// most significant one of x; an all-zero input gives W. Used to normalize
// denormal mantissas (through the carry-save shifter) and to adjust their
// exponent. The counter structure is this design's own (a priority scan);
// only its function is required. Combinational.
module lzc #(
  parameter int unsigned W  = 53,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  output logic [CW-1:0] cnt
);
  always_comb begin
    cnt = CW'(W);
    for (int i = 0; i < W; i++) begin
      if (x[i]) cnt = CW'(W - 1 - i);
    end
  end
endmodule
