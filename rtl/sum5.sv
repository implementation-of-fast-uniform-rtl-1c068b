// sum5: five-input column summing module.
//
// Counts five bits of equal weight (0..5) and returns the count as three bits:
// y (weight 1) stays in the column, p (weight 2) goes to the next column and r
// (weight 4) to the column two places up.
//   r = "at least four set"
//     = (a & b & c & (d | e)) | ((a | b) & c & d & e) | (a & b & d & e)
//   p = "at least two set" and not r
//     = ~r & (((a | b | c) & (d | e)) | ((a | b | d) & (c | e)) | (a & b))
// Combinational.
//
// The output equations are those of the original design; the port names are this
// implementation's.
module sum5 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic y,   // weight 1
  output logic p,   // weight 2, to column + 1
  output logic r    // weight 4, to column + 2
);
  assign y = a ^ b ^ c ^ d ^ e;
  assign r = (a & b & c & (d | e)) | ((a | b) & c & d & e) | (a & b & d & e);
  assign p = ~r & (((a | b | c) & (d | e)) | ((a | b | d) & (c | e)) | (a & b));
endmodule
