// pp_gen: partial product generation, the first step of the multiplier.
//
// Each bit of the multiplier b is ANDed with every bit of the multiplicand
// a, giving eight rows of eight partial products: pp[i][j] = a[j] & b[i],
// with weight 2^(i+j). Row i is therefore meant to be placed at column i.
// Unsigned operands. Purely combinational.
module pp_gen
  import lpsa_pkg::*;
(
  input  operand_t         a,
  input  operand_t         b,
  output operand_t [N-1:0] pp      // pp[i] = row i, LSB at column i
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = a & {N{b[i]}};
    end
  end

endmodule
