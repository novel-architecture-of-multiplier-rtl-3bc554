// comp_vector: builds the accuracy compensation vector V from the error
// recovery vectors Q1..Q7.
//
// Recovery vectors are sparse, so instead of adding them they are merged
// column by column with OR gates: V[c] is the OR of every Q bit that sits in
// column c. A column covered by a single Q vector (column 13) is wired
// through. Columns 3..1 are truncated: they are not part of V, because the
// final adder passes the low columns of P7 straight to the product. V covers
// columns 13..4 and is returned with its LSB at column 4. OR-merging and the
// truncated columns follow the published design. Purely combinational.
module comp_vector
  import lpsa_pkg::*;
(
  input  qvecs_t          q,       // q[k] = Q(k+1), LSB at column Q_LSB[k]
  output logic [V_W-1:0]  v        // V, LSB at column V_LSB
);

  always_comb begin
    v = '0;
    for (int k = 0; k < NUM_Q; k++) begin
      for (int i = 0; i < Q_W; i++) begin
        if (Q_LSB[k] + i >= V_LSB && Q_LSB[k] + i <= V_MSB) begin
          v[Q_LSB[k] + i - V_LSB] = v[Q_LSB[k] + i - V_LSB] | q[k][i];
        end
      end
    end
  end

endmodule
