// fpmul_top: the two floating-point multipliers side by side.
//  - hybrid_fpmul: binary16/32/64 with subnormal support, the carry-save
//    shifter and the single-compound-adder rounding scheme (h_* ports;
//    h_fm 0 half, 1 single, 2 double; narrow formats in the upper bits).
//  - comb_fpmul: combined binary16/32 multiplier sharing one binary32
//    datapath (c_* ports; c_op 1 = binary16 in the upper half).
// They share no logic; each keeps its own ports. rm: 00 RN, 01 RZ, 10 RP,
// 11 RM. Flags are {I, X, V, O, U}. Fully combinational: a result is valid
// in the same cycle as its operands.
module fpmul_top (
  input  logic [63:0] h_a,
  input  logic [63:0] h_b,
  input  logic [1:0]  h_fm,
  input  logic [1:0]  h_rm,
  output logic [63:0] h_z,
  output logic [4:0]  h_flags,
  input  logic [31:0] c_a,
  input  logic [31:0] c_b,
  input  logic        c_op,
  input  logic [1:0]  c_rm,
  output logic [31:0] c_z,
  output logic [4:0]  c_flags
);
  hybrid_fpmul u_hybrid (.a(h_a), .b(h_b), .fm(h_fm), .rm(h_rm), .z(h_z), .flags(h_flags));
  comb_fpmul   u_comb   (.a(c_a), .b(c_b), .rm(c_rm), .op(c_op), .z(c_z), .flags(c_flags));
endmodule
