// fp_gen_pkg: random operand generator for the multiplier testbenches.
// Operands are right-aligned IEEE fields (ew exponent bits, fw fraction bits).
// The mix favours the hard cases: zeros, infinities, NaNs, subnormals,
// exponents near the bottom (tiny and subnormal products) and near the top
// (overflow), and fractions with only a few high bits set so that exact
// products and round-to-nearest ties occur often.
package fp_gen_pkg;

  function automatic logic [63:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  function automatic logic [63:0] gen_operand(input int ew, input int fw);
    logic [63:0] f, e, emaxf, bias;
    int cls;
    emaxf = (64'd1 << ew) - 1;
    bias  = (64'd1 << (ew - 1)) - 1;
    f = rnd64() & ((64'd1 << fw) - 1);
    if ($urandom_range(0, 3) == 0)
      f = f & ~((64'd1 << (fw - 4)) - 1);          // few high bits only
    else if ($urandom_range(0, 15) == 0)
      f = (64'd1 << fw) - 1;                        // all ones
    else if ($urandom_range(0, 15) == 0)
      f = 64'($urandom_range(1, 3));                // just above a power of two
    cls = $urandom_range(0, 19);
    case (cls)
      0:       e = 0;                                                  // zero / subnormal
      1:       begin e = 0; f = 0; end                                 // zero
      2:       begin e = emaxf; f = 0; end                             // infinity
      3:       begin e = emaxf; if (f == 0) f = 1; end                 // NaN
      4, 5:    e = 0;                                                  // subnormal
      6, 7, 8: e = 64'($urandom_range(1, fw + 4));                     // small
      9, 10:   e = 64'($urandom_range(32'(emaxf - 64'(fw) - 4), 32'(emaxf - 1))); // large
      11, 12:  e = bias / 2 + 64'($urandom_range(0, 32'(fw + 6))) - 3; // product near emin
      13:      e = bias + bias / 2 - 64'($urandom_range(0, 3));        // product near emax
      default: e = 64'($urandom_range(1, 32'(emaxf - 1)));
    endcase
    return {$urandom_range(0, 1) == 1 ? 1'b1 : 1'b0, 63'd0} >> (63 - ew - fw)
           | (e << fw) | f;
  endfunction

endpackage
