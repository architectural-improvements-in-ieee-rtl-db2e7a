// cs_shifter: bidirectional barrel shifter applied separately to the sum and
// carry vectors of the carry-save product. Both vectors are first widened by
// EXT zero bits below the LSB (106 -> 161 bits) so that bits shifted right
// are kept for the sticky bit; a positive shift moves right, a negative one
// left. Shifting the two vectors alone is exact because their sum never
// exceeds the product width. Combinational; the widths follow the document,
// the shifter structure (a shift operator) is this design's.
module cs_shifter #(
  parameter int unsigned W   = 106,
  parameter int unsigned EXT = 55
) (
  input  logic [W-1:0]       s_in,
  input  logic [W-1:0]       c_in,
  input  logic signed [7:0]  shift,
  output logic [W+EXT-1:0]   s_out,
  output logic [W+EXT-1:0]   c_out
);
  logic [W+EXT-1:0] s_ext, c_ext;
  logic [7:0]       lamt;

  assign s_ext = {s_in, {EXT{1'b0}}};
  assign c_ext = {c_in, {EXT{1'b0}}};
  assign lamt  = -shift;

  always_comb begin
    if (shift < 0) begin
      s_out = s_ext << lamt;
      c_out = c_ext << lamt;
    end else begin
      s_out = s_ext >> $unsigned(shift);
      c_out = c_ext >> $unsigned(shift);
    end
  end
endmodule
