// atc_tree: approximate tree compressor, the second step of the multiplier.
//
// The eight partial-product rows are compressed in three rounds of iCAC
// groups, seven iCACs per group:
//   round 1: rows (0,1) (2,3) (4,5) (6,7)  -> P1..P4 (9 bits), Q1..Q4
//   round 2: (P1,P2) (P3,P4)               -> P5, P6 (11 bits), Q5, Q6
//   round 3: (P5,P6)                       -> P7 (15 bits),     Q7
// P7 is the approximate product; Q1..Q7 are the error recovery vectors, each
// seven bits wide, whose LSB columns are listed in lpsa_pkg::Q_LSB. The sum
// of P7 and every Q vector at its column equals a*b exactly. The round
// structure follows the published tree; only the port packing is this RTL's.
// Purely combinational.
module atc_tree
  import lpsa_pkg::*;
(
  input  operand_t [N-1:0] pp,     // pp[i] = row i, LSB at column i
  output logic [P7_W-1:0]  p7,     // approximate product, columns 14..0
  output qvecs_t           q       // q[k] = Q(k+1)
);

  // Round 1: each pair of rows, offset by one column.
  logic [N:0] p_r1 [4];            // P1..P4, LSB at column 2k

  for (genvar k = 0; k < 4; k++) begin : g_round1
    atc_merge #(.W_A(N), .W_B(N), .SHIFT(1)) u_grp (
      .a (pp[2*k]),
      .b (pp[2*k+1]),
      .p (p_r1[k]),
      .q (q[k])
    );
  end

  // Round 2: P1 with P2, P3 with P4, offset by two columns.
  logic [N+2:0] p5, p6;            // P5 at column 0, P6 at column 4

  atc_merge #(.W_A(N+1), .W_B(N+1), .SHIFT(2)) u_grp5 (
    .a (p_r1[0]), .b (p_r1[1]), .p (p5), .q (q[4])
  );

  atc_merge #(.W_A(N+1), .W_B(N+1), .SHIFT(2)) u_grp6 (
    .a (p_r1[2]), .b (p_r1[3]), .p (p6), .q (q[5])
  );

  // Round 3: P5 with P6, offset by four columns.
  atc_merge #(.W_A(N+3), .W_B(N+3), .SHIFT(4)) u_grp7 (
    .a (p5), .b (p6), .p (p7), .q (q[6])
  );

endmodule
