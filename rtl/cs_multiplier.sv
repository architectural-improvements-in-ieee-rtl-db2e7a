// cs_multiplier: unsigned N x N carry-save array multiplier. Partial products
// are AND terms a & b[j]; a linear array of carry-save adder rows (the
// modified full adders of an array multiplier) accumulates them, one row per
// multiplier bit. The result is left as sum and carry vectors (s + c = a*b
// exactly, no wrap-around), because the rounding logic works directly on the
// carry-save form and the final carry-propagate adder is folded into it.
// Combinational. The array topology is this design's choice: the multiplier
// itself is outside what the rounding work specifies.
module cs_multiplier #(
  parameter int unsigned N = 53
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] s,
  output logic [2*N-1:0] c
);
  logic [2*N-1:0] rs [N+1];
  logic [2*N-1:0] rc [N+1];

  assign rs[0] = '0;
  assign rc[0] = '0;

  for (genvar j = 0; j < N; j++) begin : g_row
    logic [2*N-1:0] pp;
    assign pp = (2*N)'(a & {N{b[j]}}) << j;
    // 3:2 compression of the running sum, running carry and the new row
    assign rs[j+1] = rs[j] ^ rc[j] ^ pp;
    assign rc[j+1] = ((rs[j] & rc[j]) | (rs[j] & pp) | (rc[j] & pp)) << 1;
  end

  assign s = rs[N];
  assign c = rc[N];
endmodule
