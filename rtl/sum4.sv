// sum4: four-input column summing module.
//
// Counts four bits of equal weight (0..4) and returns the count as three bits:
// y (weight 1) stays in the column, p (weight 2) goes to the next column and r
// (weight 4) to the column two places up. r is set only when all four inputs are one;
// p is "at least two inputs set" masked off by r:
//   r = a & b & c & d
//   p = ~r & (((a | b) & (c | d)) | ((a | c) & (b | d)))
// Combinational, flat two-level logic so that the depth does not grow with the count.
//
// The output equations are those of the original design; the port names are this
// implementation's.
module sum4 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic y,   // weight 1
  output logic p,   // weight 2, to column + 1
  output logic r    // weight 4, to column + 2
);
  assign y = a ^ b ^ c ^ d;
  assign r = a & b & c & d;
  assign p = ~r & (((a | b) & (c | d)) | ((a | c) & (b | d)));
endmodule
