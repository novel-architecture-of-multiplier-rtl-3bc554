// lpsa_pkg: shared sizes and column positions of the 8x8 accuracy-scalable
// approximate multiplier.
//
// The multiplier works on a column grid of 16 product bits. The approximate
// tree compressor leaves one approximate product P7 (columns 14..0) and seven
// error recovery vectors Q1..Q7, each exactly seven bits wide. The Q vectors
// start at different columns; Q_LSB gives that column for each. The final
// adder splits the columns into a pass-through part (3..0), a 7-bit
// carry-maskable part (10..4) and a 4-bit exact part (14..11, carry into 15).
// All widths and split points follow the 8-bit design described for this
// multiplier; the type names and the mask default are choices of this RTL.
package lpsa_pkg;

  localparam int unsigned N       = 8;            // operand width
  localparam int unsigned PROD_W  = 2 * N;        // product width
  localparam int unsigned P7_W    = 2 * N - 1;    // approximate product, columns 14..0
  localparam int unsigned Q_W     = 7;            // width of every recovery vector
  localparam int unsigned NUM_Q   = 7;            // Q1..Q7

  // Final-adder split.
  localparam int unsigned CMA_LSB = 4;            // lowest column of the CMA
  localparam int unsigned CMA_W   = 7;            // 7-bit CMA, columns 10..4
  localparam int unsigned CPA_LSB = CMA_LSB + CMA_W;   // 11
  localparam int unsigned CPA_W   = 4;            // 4-bit CPA, columns 14..11

  // Compensation vector V covers columns 13..4; columns 3..1 of the
  // recovery vectors are truncated.
  localparam int unsigned V_LSB   = CMA_LSB;      // 4
  localparam int unsigned V_MSB   = 13;
  localparam int unsigned V_W     = V_MSB - V_LSB + 1;  // 10

  // Lowest column of Q1..Q7 (index 0 is Q1).
  localparam int unsigned Q_LSB [NUM_Q] = '{1, 3, 5, 7, 2, 6, 4};

  typedef logic [N-1:0]      operand_t;
  typedef logic [PROD_W-1:0] product_t;
  typedef logic [Q_W-1:0]    qvec_t;
  typedef logic [CMA_W-1:0]  mask_t;

  // Recovery vectors, index 0 = Q1 ... index 6 = Q7.
  typedef qvec_t [NUM_Q-1:0] qvecs_t;

  // Mask with the upper three CMA bits exact and the lower four
  // approximate (mask width 4): 1 = full adder, 0 = carry masked.
  localparam mask_t MASK_W4 = 7'b1110000;

endpackage
