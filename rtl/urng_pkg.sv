// urng_pkg: constants shared by the uniform random number generator.
//
// The generator is a linear congruential generator X(n+1) = (a*X(n) + c) mod 2^32.
// The word width and the multiplier/increment pair are the ones the design is built
// around: a = 2^27 + 2^21 + 2^0 = 136314881 and c = 2^14 + 2^11 + 2^0 = 18433. Both
// have only three non-zero bits, so multiplying by a is a sum of three shifted copies
// of X and adding c adds a constant 1 in three columns. MAX_COL_INPUTS is the widest
// column summing module available (six inputs): three shifted copies of X, one bit of
// c and the two carries arriving from the two columns below.
package urng_pkg;
  localparam int unsigned WIDTH          = 32;
  localparam logic [31:0] LCG_A          = 32'(2**27 + 2**21 + 1);  // 136314881
  localparam logic [31:0] LCG_C          = 32'(2**14 + 2**11 + 1);  // 18433
  localparam int unsigned MAX_COL_INPUTS = 6;
endpackage
