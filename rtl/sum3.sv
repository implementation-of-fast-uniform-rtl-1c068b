// sum3: three-input column summing module.
//
// Counts three bits of equal weight (0..3) and returns the count in binary: y is the
// bit that stays in the column, p the carry into the next column up. This is a full
// adder with the majority written as p = (a & b) | (c & (a | b)). Combinational.
//
// The output equations are those of the original design; the port names are this
// implementation's.
module sum3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y,   // weight 1
  output logic p    // weight 2, to column + 1
);
  assign y = a ^ b ^ c;
  assign p = (a & b) | (c & (a | b));
endmodule
