// icac: incomplete adder cell, the building block of the approximate tree
// compressor.
//
// Two bits a and b of the same column are turned into p = a | b and
// q = a & b. p is an approximate sum that never loses a "1" from the inputs;
// q is the error recovery bit, and p + q equals a + b exactly (both at the
// weight of the column). The gate structure (one OR, one AND) follows the
// cell as published. Purely combinational, no clock.
module icac (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a | b;
  assign q = a & b;

endmodule
