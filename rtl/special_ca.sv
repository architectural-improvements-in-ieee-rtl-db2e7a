// special_ca: simplified special compound adder producing Sum, Sum+1 or Sum+2
// of two M-bit operands with only two carry chains. It computes Y0 = A+B and
// Y2 = A+B+2 in parallel. Both have the same LSB L = Y0[0], so the upper M-1
// bits come from an (M-1)-bit 2:1 mux (sel1) and the LSB from a 1-bit mux
// between L and ~L (sel0):
//   Sum   : sel1=0 sel0=0      Sum+2 : sel1=1 sel0=0
//   Sum+1 : sel0=1, sel1=L (take Y0 and set L, or take Y2 and clear L)
// The +2 trick requires that bit 0 produces no carry (b[0] is 0 in use).
// y0/y1 expose the upper bits of both sums (P0, P1) for overflow detection.
// Combinational; follows the document's simplified special compound adder.
module special_ca #(
  parameter int unsigned M = 54
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         sel1,
  input  logic         sel0,
  output logic [M-1:0] z,
  output logic [M-2:0] y0,
  output logic [M-2:0] y1
);
  logic [M-1:0] sum0, sum2;
  logic         l;

  // Upper part shared by both sums: the +2 is a +1 carry into bit 1.
  assign sum0 = a + b;
  assign sum2 = a + b + M'(2);
  assign l    = sum0[0];
  assign y0   = sum0[M-1:1];
  assign y1   = sum2[M-1:1];

  assign z[M-1:1] = sel1 ? y1 : y0;
  assign z[0]     = sel0 ? ~l : l;
endmodule
