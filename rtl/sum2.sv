// sum2: two-input column summing module.
//
// Adds two bits of equal weight. y is the sum bit that stays in the column and p the
// carry into the next column up (weight 2). This is a half adder written in the
// gate form y = a ^ b, p = a & b. Purely combinational, no clock.
//
// The output equations are those of the original design; the port names are this
// implementation's.
module sum2 (
  input  logic a,
  input  logic b,
  output logic y,   // weight 1
  output logic p    // weight 2, to column + 1
);
  assign y = a ^ b;
  assign p = a & b;
endmodule
