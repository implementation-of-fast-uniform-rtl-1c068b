// sum6: six-input column summing module.
//
// Counts six bits of equal weight (0..6) and returns the count as three bits:
// y (weight 1) stays in the column, p (weight 2) goes to the next column and r
// (weight 4) to the column two places up.
//   r = "at least four set", as six products over the pairs {a,b}, {c,d}, {e,f}
//   p = "at least two set" and (not r, or all six set, since 6 = 4 + 2)
// Combinational.
//
// The output equations are those of the original design; the port names are this
// implementation's.
module sum6 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  input  logic f,
  output logic y,   // weight 1
  output logic p,   // weight 2, to column + 1
  output logic r    // weight 4, to column + 2
);
  logic all6;
  logic two_or_more;

  assign y    = a ^ b ^ c ^ d ^ e ^ f;
  assign all6 = a & b & c & d & e & f;
  assign r = ((a | b) & (c | d) & e & f)
           | ((a | b) & c & d & (e | f))
           | (a & b & (c | d) & (e | f))
           | (c & d & e & f)
           | (a & b & e & f)
           | (a & b & c & d);
  assign two_or_more = ((a | b | c) & (d | e | f))
                     | ((a | d | f) & (b | c | e))
                     | ((b | d) & (c | f));
  assign p = (~r | all6) & two_or_more;
endmodule
