// fp_pkg: types and constants shared by the floating-point multipliers.
// The IEEE 754 rounding modes are reduced to three rounding classes (RN, RZ, RI)
// using the result sign: RP is RI for positive and RZ for negative results,
// RM the reverse. The 2-bit rounding-mode encoding and the format encoding are
// this design's own choices; the format select follows the 0/1/2 mux inputs
// of the combined exponent and shift-amount logic (half/single/double).
package fp_pkg;

  // External 2-bit rounding mode.
  typedef enum logic [1:0] {
    RM_RNE = 2'b00,  // round to nearest, ties to even
    RM_RTZ = 2'b01,  // round toward zero
    RM_RUP = 2'b10,  // round toward +infinity
    RM_RDN = 2'b11   // round toward -infinity
  } rmode_e;

  // Internal rounding class after folding in the sign.
  typedef enum logic [1:0] {
    RC_RN = 2'b00,   // nearest even
    RC_RZ = 2'b01,   // truncate
    RC_RI = 2'b10    // away from zero (toward infinity in magnitude)
  } rclass_e;

  // Format select of the hybrid multiplier.
  typedef enum logic [1:0] {
    FM_HALF   = 2'd0,
    FM_SINGLE = 2'd1,
    FM_DOUBLE = 2'd2
  } fmt_e;

  // The five IEEE flags, in the order I X V O U.
  typedef struct packed {
    logic i;  // infinite / divide by zero (never raised by a multiply)
    logic x;  // inexact
    logic v;  // invalid
    logic o;  // overflow
    logic u;  // underflow
  } fp_flags_t;

  // Exponent width of the hybrid datapath (two's complement, room for over/underflow).
  localparam int unsigned EXPW = 13;

  function automatic rclass_e round_class(rmode_e rm, logic sign);
    case (rm)
      RM_RNE:  return RC_RN;
      RM_RTZ:  return RC_RZ;
      RM_RUP:  return sign ? RC_RZ : RC_RI;
      default: return sign ? RC_RI : RC_RZ;
    endcase
  endfunction

endpackage
