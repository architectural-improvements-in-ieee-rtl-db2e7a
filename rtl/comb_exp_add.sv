// comb_exp_add: combined binary32/binary16 exponent addition of the
// half/single multiplier. In binary32 mode (op = 0) the 8-bit exponents are
// added with the bias 127 removed; in binary16 mode (op = 1) the 5-bit
// exponents E[7:3] are first moved to the binary32 bias by the inverter
// converter (+112). A carry-select adder forms Ea+Eb-127 and Ea+Eb-127+1 in
// parallel and norm_shift (the mantissa's normalization shift) picks one.
// In binary16 mode the result is converted back as {E[7], E[3:0], 000}.
// ez_full is the same sum as a 10-bit two's complement number in the
// binary32 bias, which the packing logic uses for range checks (this extra
// output is this design's addition). Combinational.
module comb_exp_add (
  input  logic              [7:0] ea,
  input  logic              [7:0] eb,
  input  logic                    op,
  input  logic                    norm_shift,
  output logic              [7:0] ez,
  output logic signed       [9:0] ez_full
);
  logic [7:0] ca, cb, xa, xb;
  logic signed [9:0] s0, s1;

  exp_widen #(.N(5), .W(8)) u_cva (.e_in(ea[7:3]), .e_out(ca));
  exp_widen #(.N(5), .W(8)) u_cvb (.e_in(eb[7:3]), .e_out(cb));

  assign xa = op ? ca : ea;
  assign xb = op ? cb : eb;

  // carry-select: both candidate sums in parallel
  assign s0 = $signed({2'b00, xa}) + $signed({2'b00, xb}) - 10'sd127;
  assign s1 = $signed({2'b00, xa}) + $signed({2'b00, xb}) - 10'sd126;

  assign ez_full = norm_shift ? s1 : s0;
  assign ez      = op ? {ez_full[7], ez_full[3:0], 3'b000} : ez_full[7:0];
endmodule
