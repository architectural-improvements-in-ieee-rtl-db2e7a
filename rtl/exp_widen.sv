// exp_widen: converts an N-bit biased exponent field into the W-bit field of a
// wider IEEE format (same real exponent, wider bias) without an adder.
// The bias difference 2^(W-1) - 2^(N-1) has the bit pattern 0111..1000..0, so
// the low N-1 bits pass straight through, the MSB is kept, and the W-N bits
// below the MSB are the inverted MSB. For 5->8 this adds 112 (binary16 ->
// binary32), for 5->11 it adds 1008 and for 8->11 it adds 896, as described
// for the combined exponent adders. Purely combinational; valid for any field
// value including 0 and all-ones.
module exp_widen #(
  parameter int unsigned N = 5,
  parameter int unsigned W = 8
) (
  input  logic [N-1:0] e_in,
  output logic [W-1:0] e_out
);
  assign e_out = {e_in[N-1], {(W-N){~e_in[N-1]}}, e_in[N-2:0]};
endmodule
