// mlrns_pkg: shared sizing rules of the three-level MLRNS multiplier.
//
// Every level of the multi-level residue number system uses a moduli set of
// the form {2^n-1, 2^n, 2^n+1}. A level must be able to hold the unreduced
// product of two residues of the level above it, whose largest value is
// (2^n)^2 = 2^(2n). The next exponent is therefore the smallest one whose
// dynamic range (2^m-1)(2^m)(2^m+1) exceeds 2^(2n): m = floor(2n/3) + 1.
// The same rule sizes the first level from the operand width W, because the
// product X*Y is below 2^(2W).
package mlrns_pkg;

  // Moduli exponent of the level below a level (or operand) of width n.
  function automatic int unsigned next_n(input int unsigned n);
    return (2 * n) / 3 + 1;
  endfunction

  // Number of residue lanes: three levels of three moduli each, 3^3.
  localparam int unsigned LANES = 27;

endpackage
